// Data Register Group: the KxK window register in front of the PE array.
//
// Each shift_en cycle it takes one image column: the Data Buffer word of the
// current set (rows a0..a7) and up to three T_SRAM lines for that column.
// For output line `line` (0..6) of the set and half-kernel H=(K-1)/2 it picks
// rows line-H .. line+H: row q < 0 comes from T_SRAM slot q+H (last lines of
// the previous set), row q > 7 from T_SRAM slot q-8 (pre-read lines of the
// next set), the rest from the word. zero_col gives a zero column (image
// border padding). The column enters the newest end of a 7-column shift
// register; the window is its last K columns, presented as row-major taps
// r*K+c (taps past K*K are zero).
// Timing: the window reflects the column shifted in on the previous clock
// edge. The document names this register group and says it pre-reads data
// for the PEs; the slice selection is this design's.
module mpra_data_reg_group
  import mpra_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  ker_e                         ker,
  input  logic                         shift_en,
  input  logic [2:0]                   line,
  input  logic                         zero_col,
  input  dbword_t                      dbword,
  input  logic [TSLOTS-1:0][DW-1:0]    tval,
  output logic [KTAPS-1:0][DW-1:0]     taps
);
  logic [KMAX-1:0][KMAX-1:0][DW-1:0] cols;   // [column][row]
  logic [KMAX-1:0][DW-1:0]           slice;
  int                                k, h;

  always_comb begin
    k = int'(ker_size(ker));
    h = (k - 1) / 2;
    slice = '0;
    for (int r = 0; r < KMAX; r++) begin
      int q;
      q = int'(line) - h + r;
      if (r < k && !zero_col) begin
        if (q < 0)                      slice[r] = tval[q + h];
        else if (q >= int'(SET_ROWS))   slice[r] = tval[q - int'(SET_ROWS)];
        else                            slice[r] = dbword[q];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cols <= '0;
    else if (shift_en) begin
      for (int c = 0; c < KMAX - 1; c++) cols[c] <= cols[c+1];
      cols[KMAX-1] <= slice;
    end
  end

  always_comb begin
    taps = '0;
    for (int r = 0; r < KMAX; r++)
      for (int c = 0; c < KMAX; c++)
        if (r < k && c < k) taps[r*k + c] = cols[KMAX - k + c][r];
  end
endmodule
