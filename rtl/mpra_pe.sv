// Processing engine (PE): one 3x3 window per clock.
//
// Nine multi-precision multipliers (mpra_mp_mul) and a lane-wise adder tree.
// In PREC_16X16 a PE is nine 16x16 MACs and computes one 3x3 convolution; in
// PREC_16X8 eighteen 16x8 MACs (one image, two filters); in PREC_8X8
// thirty-six 8x8 MACs, i.e. four 3x3 convolutions (two images packed in the
// data bytes, two filters packed in the weight bytes). The 9/18/36 MAC counts
// follow the document; the byte packing is this design's choice.
//
// Timing: inputs sampled on the rising clock edge, sum and out_valid are
// registered, so the result appears one cycle after in_valid. A new window
// can be accepted every cycle. Lane sums are 32-bit two's complement
// (nine 16x16 products cannot exceed 2^34, the sum wraps; the P_SRAM stage
// shifts and saturates).
module mpra_pe
  import mpra_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  prec_e                  prec,
  input  logic                   in_valid,
  input  logic [TAPS-1:0][DW-1:0] data,
  input  logic [TAPS-1:0][DW-1:0] weight,
  output logic                   out_valid,
  output lanes_t                 sum
);
  lanes_t prod [TAPS];
  lanes_t acc;

  for (genvar t = 0; t < TAPS; t++) begin : g_mul
    mpra_mp_mul u_mul (.prec(prec), .a(data[t]), .b(weight[t]), .p(prod[t]));
  end

  always_comb begin
    acc = '0;
    for (int t = 0; t < TAPS; t++)
      for (int l = 0; l < LANES; l++)
        acc[l] = acc[l] + prod[t][l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= acc;
    end
  end
endmodule
