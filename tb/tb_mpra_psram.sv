// Test of P_SRAM accumulation: random PE lane results are added into random
// addresses of random banks in all precision modes, with the offset start
// (`first`), shift and saturation; a model memory kept here predicts every
// word. Includes back-to-back updates of one address (forwarding) and reads
// through the host port, which must return data one cycle after rd_en.
module tb_mpra_psram;
  import mpra_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  prec_e prec = PREC_16X16;
  logic [4:0] shift = '0;
  logic first = 1'b0, acc_valid = 1'b0, rd_en = 1'b0;
  logic [NUM_PE-1:0][DW-1:0] bias = '0;
  logic [NUM_PE-1:0] acc_mask = '0;
  logic [5:0] acc_addr = '0, rd_addr = '0;
  lanes_t [NUM_PE-1:0] acc_in = '0;
  logic [4:0] rd_bank = '0;
  logic [31:0] rd_data;
  logic [31:0] model [NUM_PE][DEPTH];
  int checks = 0, failures = 0, nsat = 0;

  mpra_psram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampn(longint x, int n);
    longint hi, lo;
    hi = (64'sd1 <<< (n - 1)) - 1;
    lo = -(64'sd1 <<< (n - 1));
    if (x > hi) begin nsat++; return hi; end
    if (x < lo) begin nsat++; return lo; end
    return x;
  endfunction

  function automatic logic [31:0] update(logic [31:0] old, lanes_t in, prec_e p, int sh,
                                          logic fst, logic [15:0] b);
    int n;
    logic [31:0] w;
    n = (p == PREC_16X16) ? 32 : (p == PREC_16X8) ? 16 : 8;
    w = '0;
    for (int l = 0; l < 32 / n; l++) begin
      longint o, v;
      if (fst) begin
        if (p == PREC_16X16) o = longint'(signed'(b));
        else o = (l % 2 == 0) ? longint'(signed'(b[15:8])) : longint'(signed'(b[7:0]));
      end else begin
        o = 0;
        for (int i = 0; i < 64; i++) o[i] = old[l * n + ((i < n) ? i : n - 1)];
      end
      v = clampn(longint'(signed'(in[l])) >>> sh, n);
      v = clampn(o + v, n);
      for (int i = 0; i < n; i++) w[l * n + i] = v[i];
    end
    return w;
  endfunction

  task automatic issue(prec_e p, int sh, logic fst, int addr);
    prec = p; shift = 5'(sh); first = fst; acc_addr = 6'(addr); acc_valid = 1'b1;
    for (int b = 0; b < NUM_PE; b++) begin
      acc_mask[b] = ($urandom_range(0, 3) != 0) || fst;
      bias[b] = 16'($urandom);
      for (int l = 0; l < LANES; l++) acc_in[b][l] = ($urandom_range(0, 1) ? 32'($urandom) : 32'($urandom_range(0, 4000)) - 32'd2000);
      if (acc_mask[b]) model[b][addr] = update(model[b][addr], acc_in[b], p, sh, fst, bias[b]);
    end
  endtask

  task automatic check_all();
    for (int b = 0; b < NUM_PE; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        rd_en = 1'b1; rd_bank = 5'(b); rd_addr = 6'(a);
        @(negedge clk);
        rd_en = 1'b0;
        checks++;
        if (rd_data !== model[b][a]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d got %h exp %h", b, a, rd_data, model[b][a]);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      // first channel writes every address, then random accumulations,
      // including runs of updates to one address
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        issue(prec_e'(m), 0, 1'b1, a);
      end
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) acc_valid = 1'b0;
        else issue(prec_e'(m), $urandom_range(0, 12), 1'b0,
                   (n % 8 < 3) ? 5 : $urandom_range(0, DEPTH - 1));
      end
      @(negedge clk);
      acc_valid = 1'b0;
      repeat (3) @(negedge clk);
      check_all();
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
