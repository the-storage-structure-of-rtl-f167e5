// Parameter Buffer: 1 KB on-chip store of filter weights and offsets.
//
// 512 words of 16 bits. A channel's parameters take 240 words (nine weights
// for each of the 24 PEs, then one offset per PE; see mpra_pkg), so the
// buffer holds two channels and one can be loaded while the other is used.
// The size and contents follow the document; word width and layout are this
// design's choice. Host write port, synchronous read port (rdata valid the
// cycle after ren).
module mpra_param_buffer
  import mpra_pkg::*;
#(
  parameter int unsigned DEPTH = PB_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  word_t          wdata,
  input  logic           ren,
  input  logic [AW-1:0]  raddr,
  output word_t          rdata
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end
endmodule
