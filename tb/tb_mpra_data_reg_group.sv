// Test of the Data Register Group: random set words and T_SRAM lines are
// shifted in column by column for every kernel size and output line; after
// each shift the window taps must equal the rows line-H..line+H of the last
// K columns, rows above the set from T_SRAM slots 0..H-1, rows below a7 from
// slots 0.., and zero for columns flagged as outside the image.
module tb_mpra_data_reg_group;
  import mpra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  ker_e ker = KER_3;
  logic shift_en = 1'b0, zero_col = 1'b0;
  logic [2:0] line = '0;
  dbword_t dbword = '0;
  logic [TSLOTS-1:0][DW-1:0] tval = '0;
  logic [KTAPS-1:0][DW-1:0] taps;
  int checks = 0, failures = 0;
  logic [15:0] hist [$][KMAX];   // column slices as the test expects them

  mpra_data_reg_group dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int kc = 0; kc < 3; kc++)
      for (int ln = 0; ln < 7; ln++) begin
        int k, h;
        k = 3 + 2 * kc; h = kc + 1;
        hist.delete();
        for (int c = 0; c < 12; c++) begin
          logic [15:0] col [KMAX];
          @(negedge clk);
          ker = ker_e'(kc); line = 3'(ln);
          shift_en = 1'b1;
          zero_col = ($urandom_range(0, 5) == 0);
          for (int r = 0; r < 8; r++) dbword[r] = 16'($urandom);
          for (int j = 0; j < TSLOTS; j++) tval[j] = 16'($urandom);
          for (int r = 0; r < KMAX; r++) begin
            int q;
            q = ln - h + r;
            col[r] = 16'h0;
            if (r < k && !zero_col)
              col[r] = (q < 0) ? tval[q + h] : (q > 7) ? tval[q - 8] : dbword[q];
          end
          hist.push_back(col);
          @(negedge clk);
          shift_en = 1'b0;
          if (c >= k - 1)
            for (int r = 0; r < k; r++)
              for (int cc = 0; cc < k; cc++) begin
                checks++;
                if (taps[r * k + cc] !== hist[hist.size() - k + cc][r]) begin
                  failures++;
                  if (failures < 10) $display("k=%0d line=%0d tap(%0d,%0d) got %h exp %h", k, ln, r, cc,
                                              taps[r * k + cc], hist[hist.size() - k + cc][r]);
                end
              end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
