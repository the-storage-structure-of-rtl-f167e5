// Reconfigurable PE array: 24 PEs that share one broadcast window.
//
// ker selects how PEs combine:
//   KER_3 : every PE is its own group; 24 filters (output maps) at once.
//   KER_5 : groups of 3 PEs (27 MACs >= 25 taps); 8 filters at once.
//   KER_7 : groups of 6 PEs (54 MACs >= 49 taps); 4 filters at once.
// Within a group, PE j (0..G-1) takes window taps 9j .. 9j+8 of the
// row-major KxK window; taps past K*K are fed as zero. The lane sums of a
// group's PEs are added and presented at the slot of the group's first PE;
// out_mask marks those slots. Weights come from the Weight Register Group,
// already laid out per PE in the same tap order.
// The 24 PEs and the 3-PE 5x5 group follow the document; the 6-PE 7x7 group
// and the tap split are this design's choice.
// Timing: one window per cycle; results one cycle after in_valid (PE
// register), group addition is combinational after it.
module mpra_pe_array
  import mpra_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  prec_e                              prec,
  input  ker_e                               ker,
  input  logic                               in_valid,
  input  logic [KTAPS-1:0][DW-1:0]           taps,
  input  logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] weights,
  output logic                               out_valid,
  output logic [NUM_PE-1:0]                  out_mask,
  output lanes_t [NUM_PE-1:0]                out
);
  logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] pe_data;
  lanes_t [NUM_PE-1:0]                 pe_sum;
  logic   [NUM_PE-1:0]                 pe_valid;
  int unsigned                         g, kk;

  always_comb begin
    g  = ker_group(ker);
    kk = ker_size(ker) * ker_size(ker);
    for (int p = 0; p < NUM_PE; p++)
      for (int t = 0; t < TAPS; t++) begin
        int unsigned idx;
        idx = (p % g) * TAPS + t;
        pe_data[p][t] = (idx < kk) ? taps[idx] : '0;
      end
  end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    mpra_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .prec     (prec),
      .in_valid (in_valid),
      .data     (pe_data[p]),
      .weight   (weights[p]),
      .out_valid(pe_valid[p]),
      .sum      (pe_sum[p])
    );
  end

  always_comb begin
    out_valid = pe_valid[0];
    out_mask  = '0;
    out       = '0;
    for (int p = 0; p < NUM_PE; p++) begin
      if (p % g == 0) begin
        out_mask[p] = 1'b1;
        for (int j = 0; j < KMAX - 1; j++)
          if (j < g)
            for (int l = 0; l < LANES; l++)
              out[p][l] = out[p][l] + pe_sum[(p + j) % NUM_PE][l];
      end
    end
  end
endmodule
