// Test of T_SRAM: three write ports fill all 56 entries with random data,
// three read ports read random triples back one cycle later; addresses past
// the end must read zero and must not alias onto real entries.
module tb_mpra_tsram;
  import mpra_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [TSLOTS-1:0] we = '0;
  logic [TSLOTS-1:0][8:0] waddr = '0, raddr = '0;
  logic [TSLOTS-1:0][DW-1:0] wdata = '0, rdata;
  logic ren = 1'b0;
  logic [15:0] model [TS_DEPTH];
  int checks = 0, failures = 0;

  mpra_tsram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < TS_DEPTH; a += 3) begin
      @(negedge clk);
      for (int j = 0; j < TSLOTS; j++) begin
        we[j] = 1'b1; waddr[j] = 9'(a + j); wdata[j] = 16'($urandom);
        if (a + j < TS_DEPTH) model[a + j] = wdata[j];
      end
    end
    @(negedge clk);
    // writes past the end are dropped
    for (int j = 0; j < TSLOTS; j++) begin
      we[j] = 1'b1; waddr[j] = 9'(TS_DEPTH + 8 * j); wdata[j] = 16'($urandom);
    end
    @(negedge clk);
    we = '0;
    for (int n = 0; n < 500; n++) begin
      int a [TSLOTS];
      @(negedge clk);
      ren = 1'b1;
      for (int j = 0; j < TSLOTS; j++) begin
        a[j] = $urandom_range(0, TS_DEPTH + 10);
        raddr[j] = 9'(a[j]);
      end
      @(negedge clk);
      ren = 1'b0;
      for (int j = 0; j < TSLOTS; j++) begin
        checks++;
        if (rdata[j] !== ((a[j] < TS_DEPTH) ? model[a[j]] : 16'h0)) begin
          failures++;
          if (failures < 10) $display("port %0d addr %0d got %h", j, a[j], rdata[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
