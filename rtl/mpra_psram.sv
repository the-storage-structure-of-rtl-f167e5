// P_SRAM: 48 KB store of intermediate convolution results.
//
// One bank per PE (24 banks of 512 x 32 bits = 2 KB). A window result of the
// PE array is added into the word at acc_addr of every bank set in acc_mask,
// so the partial sums of successive input channels build up here instead of
// going back to off-chip memory. Each 32-bit word holds 1, 2 or 4 signed lanes
// of 32, 16 or 8 bits (PREC_16X16 / 16X8 / 8X8), the lane order of the PE.
// Update of one lane: v = sat(pe_lane >>> shift); word lane =
// sat(old + v), or sat(offset + v) when `first` is set (first input channel).
// The offset of bank b is its 16-bit offset word: whole in PREC_16X16, the
// high byte for lanes 0/2 and the low byte for lanes 1/3 in the 8-bit modes.
// The 48 KB size and its role follow the document; lane packing, scaling
// and saturation are this design's choice.
// Timing: two-stage read-modify-write, one update per cycle, result written
// two edges after acc_valid; back-to-back updates of one address are
// forwarded. The host read port returns rd_data the cycle after rd_en.
module mpra_psram
  import mpra_pkg::*;
#(
  parameter int unsigned DEPTH = PS_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  prec_e                       prec,
  input  logic [4:0]                  shift,
  input  logic                        first,
  input  logic [NUM_PE-1:0][DW-1:0]   bias,
  input  logic                        acc_valid,
  input  logic [NUM_PE-1:0]           acc_mask,
  input  logic [AW-1:0]               acc_addr,
  input  lanes_t [NUM_PE-1:0]         acc_in,
  input  logic                        rd_en,
  input  logic [4:0]                  rd_bank,
  input  logic [AW-1:0]               rd_addr,
  output logic [31:0]                 rd_data
);

  // stage 1 -> stage 2 registers
  logic                      s2_valid, s2_first;
  prec_e                     s2_prec;
  logic [NUM_PE-1:0]         s2_mask;
  logic [AW-1:0]             s2_addr;
  logic [NUM_PE-1:0][31:0]   s2_old, s2_add, s2_base, s2_new;
  logic [NUM_PE-1:0][31:0]   bank_q, bank_rd;
  logic [4:0]                rd_bank_q;

  // Clamp a signed value to an n-bit signed range
  function automatic logic signed [39:0] sat(logic signed [39:0] x, int unsigned n);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (n - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (n - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  // Scaled, saturated PE lanes packed in word layout
  function automatic logic [31:0] pack_add(lanes_t in, prec_e p, logic [4:0] sh);
    logic [31:0]        w;
    logic signed [39:0] v [LANES];
    for (int l = 0; l < LANES; l++) v[l] = 40'(signed'(in[l])) >>> sh;
    case (p)
      PREC_16X8: begin
        w[15:0]  = 16'(sat(v[0], 16));
        w[31:16] = 16'(sat(v[1], 16));
      end
      PREC_8X8: begin
        w[7:0]   = 8'(sat(v[0], 8));
        w[15:8]  = 8'(sat(v[1], 8));
        w[23:16] = 8'(sat(v[2], 8));
        w[31:24] = 8'(sat(v[3], 8));
      end
      default: w = 32'(sat(v[0], 32));
    endcase
    return w;
  endfunction

  // Offset in word layout
  function automatic logic [31:0] pack_bias(logic [15:0] bv, prec_e p);
    case (p)
      PREC_16X8: return {{8{bv[7]}}, bv[7:0], {8{bv[15]}}, bv[15:8]};
      PREC_8X8:  return {bv[7:0], bv[15:8], bv[7:0], bv[15:8]};
      default:   return {{16{bv[15]}}, bv};
    endcase
  endfunction

  // Lane-wise saturating add of two words
  function automatic logic [31:0] add_words(logic [31:0] x, logic [31:0] y, prec_e p);
    logic [31:0] w;
    case (p)
      PREC_16X8:
        for (int l = 0; l < 2; l++)
          w[l*16 +: 16] = 16'(sat(40'(signed'(x[l*16 +: 16])) + 40'(signed'(y[l*16 +: 16])), 16));
      PREC_8X8:
        for (int l = 0; l < 4; l++)
          w[l*8 +: 8] = 8'(sat(40'(signed'(x[l*8 +: 8])) + 40'(signed'(y[l*8 +: 8])), 8));
      default:
        w = 32'(sat(40'(signed'(x)) + 40'(signed'(y)), 32));
    endcase
    return w;
  endfunction

  always_comb
    for (int b = 0; b < NUM_PE; b++)
      s2_new[b] = add_words(s2_first ? s2_base[b] : s2_old[b], s2_add[b], s2_prec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_prec  <= PREC_16X16;
      s2_mask  <= '0;
      s2_addr  <= '0;
      s2_old   <= '0;
      s2_add   <= '0;
      s2_base  <= '0;
    end else begin
      s2_valid <= acc_valid;
      if (acc_valid) begin
        s2_first <= first;
        s2_prec  <= prec;
        s2_mask  <= acc_mask;
        s2_addr  <= acc_addr;
        for (int b = 0; b < NUM_PE; b++) begin
          s2_add[b]  <= pack_add(acc_in[b], prec, shift);
          s2_base[b] <= pack_bias(bias[b], prec);
          s2_old[b]  <= (s2_valid && s2_mask[b] && s2_addr == acc_addr)
                        ? s2_new[b] : bank_q[b];
        end
      end
    end
  end

  // One memory per bank: a read port for the update, one for the host

  for (genvar b = 0; b < NUM_PE; b++) begin : g_bank
    logic [31:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (s2_valid && s2_mask[b]) mem[s2_addr] <= s2_new[b];
      if (rd_en) bank_rd[b] <= mem[rd_addr];
    end
    assign bank_q[b] = mem[acc_addr];
  end

  always_ff @(posedge clk) if (rd_en) rd_bank_q <= rd_bank;
  assign rd_data = (rd_bank_q < 5'(NUM_PE)) ? bank_rd[rd_bank_q] : '0;
endmodule
