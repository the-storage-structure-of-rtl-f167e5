// Test of the Data Buffer at its full size: random words are written to every
// address, then read back in random order and compared with a copy kept
// here; a read must deliver its word on the next cycle, and a write in the
// same cycle as a read of the same address must return the old word.
module tb_mpra_data_buffer;
  import mpra_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0, ren = 1'b0;
  logic [DB_AW-1:0] waddr = '0, raddr = '0;
  dbword_t wdata = '0, rdata;
  dbword_t model [DB_DEPTH];
  int checks = 0, failures = 0;

  mpra_data_buffer dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DB_DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = DB_AW'(a); wdata = {$urandom, $urandom, $urandom, $urandom}; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, DB_DEPTH - 1);
      @(negedge clk);
      ren = 1'b1; raddr = DB_AW'(a);
      // same-cycle write to the address being read
      if (n % 5 == 0) begin we = 1'b1; waddr = DB_AW'(a); wdata = {$urandom, $urandom, $urandom, $urandom}; end
      @(negedge clk);
      ren = 1'b0;
      we = 1'b0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rdata, model[a]);
      end
      if (n % 5 == 0) model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
