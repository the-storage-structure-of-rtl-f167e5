// Test of the reconfigurable PE array: random KxK windows and per-filter
// weights for 3x3 (24 filters), 5x5 (8 filters of 3 PEs) and 7x7 (4 filters
// of 6 PEs) in all precision modes. Group results are compared with a direct
// KxK convolution computed here; the output mask must mark exactly the
// first PE of every group, one cycle after the window.
module tb_mpra_pe_array;
  import mpra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  prec_e prec = PREC_16X16;
  ker_e  ker = KER_3;
  logic in_valid = 1'b0, out_valid;
  logic [KTAPS-1:0][DW-1:0] taps = '0;
  logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] weights = '0;
  logic [NUM_PE-1:0] out_mask;
  lanes_t [NUM_PE-1:0] out;
  int checks = 0, failures = 0;
  logic [15:0] fw [NUM_PE][KTAPS];

  mpra_pe_array dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int kc = 0; kc < 3; kc++)
      for (int m = 0; m < 3; m++)
        for (int n = 0; n < 20; n++) begin
          int k, g, nf;
          k = 3 + 2 * kc; g = (kc == 0) ? 1 : (kc == 1) ? 3 : 6; nf = NUM_PE / g;
          @(negedge clk);
          ker = ker_e'(kc); prec = prec_e'(m); in_valid = 1'b1;
          taps = '0;
          for (int t = 0; t < k * k; t++) taps[t] = 16'($urandom);
          for (int f = 0; f < nf; f++)
            for (int t = 0; t < k * k; t++) fw[f][t] = 16'($urandom);
          for (int p = 0; p < NUM_PE; p++)
            for (int t = 0; t < TAPS; t++) begin
              int idx;
              idx = (p % g) * TAPS + t;
              weights[p][t] = (idx < k * k) ? fw[p / g][idx] : 16'($urandom);
            end
          @(negedge clk);
          in_valid = 1'b0;
          checks++;
          if (!out_valid) begin failures++; $display("no result after one cycle"); end
          for (int p = 0; p < NUM_PE; p++) begin
            checks++;
            if (out_mask[p] !== (p % g == 0)) begin failures++; $display("mask bit %0d wrong", p); end
            if (p % g == 0)
              for (int l = 0; l < LANES; l++) begin
                longint s;
                s = 0;
                for (int t = 0; t < k * k; t++) s += lane_mul(prec, taps[t], fw[p / g][t], l);
                checks++;
                if (out[p][l] !== 32'(s)) begin
                  failures++;
                  if (failures < 10) $display("k=%0d prec=%0d pe=%0d lane=%0d got %h exp %h", k, m, p, l, out[p][l], 32'(s));
                end
              end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
