// Test of one PE: random windows and weights in all three precision modes,
// lane sums compared with products computed here from the signed byte and
// word values; checks the one-cycle latency and back-to-back windows.
module tb_mpra_pe;
  import mpra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  prec_e prec = PREC_16X16;
  logic in_valid = 1'b0, out_valid;
  logic [TAPS-1:0][DW-1:0] data = '0, weight = '0;
  lanes_t sum;
  int checks = 0, failures = 0;

  mpra_pe dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lane_mul(prec_e p, logic [15:0] a, logic [15:0] b, int lane);
    longint sa, sb, ah, al, bh, bl;
    sa = longint'(signed'(a)); sb = longint'(signed'(b));
    ah = longint'(signed'(a[15:8])); al = longint'(signed'(a[7:0]));
    bh = longint'(signed'(b[15:8])); bl = longint'(signed'(b[7:0]));
    case (p)
      PREC_16X16: return (lane == 0) ? sa * sb : 0;
      PREC_16X8:  return (lane == 0) ? sa * bh : (lane == 1) ? sa * bl : 0;
      default:    return (lane == 0) ? ah * bh : (lane == 1) ? ah * bl : (lane == 2) ? al * bh : al * bl;
    endcase
  endfunction

  lanes_t expq [$];

  // scoreboard: result must appear exactly one cycle after the window
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        lanes_t e;
        e = expq.pop_front();
        if (sum !== e) begin
          failures++;
          if (failures < 10) $display("prec %0d got %h exp %h", prec, sum, e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++)
      for (int n = 0; n < 300; n++) begin
        lanes_t e;
        @(negedge clk);
        prec = prec_e'(m);
        in_valid = ($urandom_range(0, 3) != 0);
        for (int t = 0; t < TAPS; t++) begin
          data[t]   = 16'($urandom);
          weight[t] = 16'($urandom);
          if (n < 4) begin data[t] = 16'h8000; weight[t] = (n % 2) ? 16'h8080 : 16'h7fff; end
        end
        for (int l = 0; l < LANES; l++) begin
          longint s;
          s = 0;
          for (int t = 0; t < TAPS; t++) s += lane_mul(prec_e'(m), data[t], weight[t], l);
          e[l] = 32'(s);
        end
        if (in_valid) expq.push_back(e);
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== in_valid) begin failures++; $display("latency wrong"); end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
