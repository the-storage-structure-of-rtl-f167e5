// T_SRAM: 112-byte store of boundary lines between sets.
//
// A window centred near the top or bottom line of a set needs image lines
// that the current Data Buffer word does not hold: the last H lines of the
// previous set, or (for 5x5 and 7x7) lines a1.. of the next set beyond the
// redundant line. Those lines are copied here before the output lines that
// need them, so every window still needs only one Data Buffer read per
// column. The 112-byte size (one 56-pixel line of 16-bit data, or two
// 28-pixel lines) follows the document.
// Organisation (this design's choice): 56 entries of 16 bits, addressed
// slot*NC + column, where NC is the number of image columns the strip uses.
// Three write ports and three read ports, so one column of up to three
// lines moves per cycle. Reads are synchronous (data the cycle after ren);
// addresses past the end read zero and are not written.
module mpra_tsram
  import mpra_pkg::*;
#(
  parameter int unsigned DEPTH = TS_DEPTH,
  parameter int unsigned PORTS = TSLOTS,
  parameter int unsigned AW    = 9
) (
  input  logic                       clk,
  input  logic [PORTS-1:0]           we,
  input  logic [PORTS-1:0][AW-1:0]   waddr,
  input  logic [PORTS-1:0][DW-1:0]   wdata,
  input  logic                       ren,
  input  logic [PORTS-1:0][AW-1:0]   raddr,
  output logic [PORTS-1:0][DW-1:0]   rdata
);
  localparam int unsigned IW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++)
      if (we[p] && waddr[p] < AW'(DEPTH)) mem[waddr[p][IW-1:0]] <= wdata[p];
    if (ren)
      for (int p = 0; p < PORTS; p++)
        rdata[p] <= (raddr[p] < AW'(DEPTH)) ? mem[raddr[p][IW-1:0]] : '0;
  end
endmodule
