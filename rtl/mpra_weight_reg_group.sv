// Weight Register Group: the weights and offsets the PEs use.
//
// Holds nine 16-bit weights for each of the 24 PEs and one 16-bit offset
// (bias) per PE. It is loaded one word per cycle from the Parameter Buffer:
// index i < 216 writes weight i%9 of PE i/9, index 216+p writes the offset of
// PE p. The contents stay until overwritten, so the PEs read all 216 weights
// in parallel every cycle. The document names the register group and says
// the buffer holds weights and offsets; the load order is this design's.
// Timing: a write on load_en shows at the outputs after the clock edge.
module mpra_weight_reg_group
  import mpra_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                load_en,
  input  logic [7:0]                          load_idx,
  input  word_t                               load_data,
  output logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] weights,
  output logic [NUM_PE-1:0][DW-1:0]           bias
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      weights <= '0;
      bias    <= '0;
    end else if (load_en) begin
      if (load_idx < 8'(NUM_PE * TAPS))
        weights[int'(load_idx) / TAPS][int'(load_idx) % TAPS] <= load_data;
      else if (load_idx < 8'(WREG_WORDS))
        bias[load_idx - 8'(NUM_PE * TAPS)] <= load_data;
    end
  end
endmodule
