// Test of the Weight Register Group: 240 random words are loaded in index
// order and every weight of every PE and every offset is compared; a second
// partial load must change only the words it addresses.
module tb_mpra_weight_reg_group;
  import mpra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load_en = 1'b0;
  logic [7:0] load_idx = '0;
  word_t load_data = '0;
  logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] weights;
  logic [NUM_PE-1:0][DW-1:0] bias;
  logic [15:0] model [WREG_WORDS];
  int checks = 0, failures = 0;

  mpra_weight_reg_group dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int p = 0; p < NUM_PE; p++) begin
      for (int t = 0; t < TAPS; t++) begin
        checks++;
        if (weights[p][t] !== model[p * TAPS + t]) begin
          failures++;
          if (failures < 10) $display("PE %0d weight %0d got %h", p, t, weights[p][t]);
        end
      end
      checks++;
      if (bias[p] !== model[NUM_PE * TAPS + p]) begin failures++; $display("PE %0d offset wrong", p); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WREG_WORDS; i++) begin
      @(negedge clk);
      load_en = 1'b1; load_idx = 8'(i); load_data = 16'($urandom); model[i] = load_data;
    end
    @(negedge clk);
    load_en = 1'b0;
    compare();
    for (int n = 0; n < 40; n++) begin
      int i;
      i = $urandom_range(0, WREG_WORDS - 1);
      @(negedge clk);
      load_en = 1'b1; load_idx = 8'(i); load_data = 16'($urandom); model[i] = load_data;
    end
    @(negedge clk);
    load_en = 1'b0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
