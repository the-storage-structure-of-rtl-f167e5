// Data Buffer: 128 KB on-chip store of input image data.
//
// Organised as 8192 words of 128 bits. A word is one column of one
// eight-line set of an image: lines a0..a6 are seven independent image lines
// and a7 is a redundant copy of the first line of the next set, so a 3x3
// window centred on a6 needs no second read. Set s, column c of an image of
// width W stored from address base lives at base + s*W + c. Row r of the
// word sits in bits [16r +: 16]. The size and the column-per-set layout follow
// the document; the port arrangement is this design's choice.
// Ports: a host write port (loads the buffer from off-chip memory) and a read
// port for the accelerator. Reads are synchronous: rdata is valid the cycle
// after ren. A write and a read in the same cycle to the same address return
// the old word.
module mpra_data_buffer
  import mpra_pkg::*;
#(
  parameter int unsigned DEPTH = DB_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  dbword_t        wdata,
  input  logic           ren,
  input  logic [AW-1:0]  raddr,
  output dbword_t        rdata
);
  dbword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end
endmodule
