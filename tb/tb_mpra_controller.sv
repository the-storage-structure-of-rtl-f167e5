// Test of the controller on its own, against a Data Buffer model kept here.
// For 3x3, 5x5 and 7x7 runs (middle set, first set, last set, strips) it
// checks: the 240 weight loads in order, the T_SRAM previous-set fill and
// next-set pre-read (addresses and data), the order of Data Buffer reads of
// the line sweeps, one P_SRAM address per window in order, and the run's
// cycle count.
module tb_mpra_controller;
  import mpra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  run_cfg_t cfg_in = '0, cfg;
  logic busy, done, pb_ren, wr_load, db_ren, ts_ren, dr_shift, dr_zero, pe_valid;
  logic [PB_AW-1:0] pb_raddr;
  logic [7:0] wr_idx;
  logic [DB_AW-1:0] db_raddr;
  dbword_t db_rdata = '0;
  logic [TSLOTS-1:0] ts_we;
  logic [TSLOTS-1:0][8:0] ts_waddr, ts_raddr;
  logic [TSLOTS-1:0][DW-1:0] ts_wdata;
  logic [2:0] dr_line;
  logic [PS_AW-1:0] ps_addr;
  logic [15:0] n_tprev, n_tnext, n_windows;
  int checks = 0, failures = 0;

  mpra_controller dut (.*);

  // Data Buffer model: word content is a function of its address
  function automatic dbword_t word_at(int a);
    dbword_t w;
    for (int r = 0; r < 8; r++) w[r] = 16'(a * 8 + r + 1);
    return w;
  endfunction
  always_ff @(posedge clk) if (db_ren) db_rdata <= word_at(int'(db_raddr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed events
  int loads [$];
  int sweep_reads [$];
  int ps_seq [$];
  int tsw_addr [$], tsw_data [$];
  logic pe_valid_q;
  always @(posedge clk) if (rst_n) begin
    pe_valid_q <= pe_valid;
    if (wr_load) loads.push_back(int'(wr_idx));
    if (ts_ren && db_ren) sweep_reads.push_back(int'(db_raddr));
    if (pe_valid_q) ps_seq.push_back(int'(ps_addr));
    for (int j = 0; j < TSLOTS; j++)
      if (ts_we[j]) begin tsw_addr.push_back(int'(ts_waddr[j])); tsw_data.push_back(int'(ts_wdata[j])); end
  end

  task automatic run(ker_e ker, int w, int nsets, int s, int col0, int ncols, int base);
    int k, h, cs, ce, nc, t0, t1, exp_cycles, ri;
    int exp_ts_a [$], exp_ts_d [$];
    k = 3 + 2 * int'(ker); h = (k - 1) / 2;
    cs = (col0 - h < 0) ? 0 : col0 - h;
    ce = (col0 + ncols - 1 + h > w - 1) ? w - 1 : col0 + ncols - 1 + h;
    nc = ce - cs + 1;
    loads.delete(); sweep_reads.delete(); ps_seq.delete(); tsw_addr.delete(); tsw_data.delete();
    @(negedge clk);
    cfg_in = '0;
    cfg_in.ker = ker; cfg_in.prec = PREC_16X16; cfg_in.width = 9'(w); cfg_in.nsets = 6'(nsets);
    cfg_in.set_idx = 6'(s); cfg_in.col0 = 9'(col0); cfg_in.ncols = 9'(ncols);
    cfg_in.db_base = DB_AW'(base); cfg_in.wbase = PB_AW'(17);
    start = 1'b1;
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = $time;
    @(negedge clk);
    // weight loads
    checks++;
    if (loads.size() != WREG_WORDS) begin failures++; $display("%0d weight loads", loads.size()); end
    for (int i = 0; i < loads.size(); i++) begin
      checks++;
      if (loads[i] != i) begin failures++; $display("load %0d has index %0d", i, loads[i]); break; end
    end
    // T_SRAM writes: previous-set lines, then next-set lines
    for (int i = 0; i < nc; i++)
      for (int j = 0; j < h; j++) begin
        exp_ts_a.push_back(j * nc + i);
        exp_ts_d.push_back((s > 0) ? int'(word_at(base + (s - 1) * w + cs + i)[7 - h + j]) : 0);
      end
    if (h >= 2)
      for (int i = 0; i < nc; i++)
        for (int j = 0; j < h - 1; j++) begin
          exp_ts_a.push_back(j * nc + i);
          exp_ts_d.push_back((s + 1 < nsets) ? int'(word_at(base + (s + 1) * w + cs + i)[1 + j]) : 0);
        end
    checks++;
    if (tsw_addr.size() != exp_ts_a.size()) begin
      failures++; $display("k=%0d %0d T_SRAM writes, expected %0d", k, tsw_addr.size(), exp_ts_a.size());
    end else
      for (int i = 0; i < exp_ts_a.size(); i++) begin
        checks++;
        if (tsw_addr[i] != exp_ts_a[i] || tsw_data[i] != exp_ts_d[i]) begin
          failures++; $display("k=%0d T_SRAM write %0d: %0d<=%h, expected %0d<=%h", k, i,
                               tsw_addr[i], tsw_data[i], exp_ts_a[i], exp_ts_d[i]);
          break;
        end
      end
    // sweep reads
    ri = 0;
    for (int l = 0; l < 7; l++)
      for (int c = col0 - h; c <= col0 + ncols - 1 + h; c++)
        if (c >= 0 && c < w) begin
          checks++;
          if (ri >= sweep_reads.size() || sweep_reads[ri] != base + s * w + c) begin
            failures++; $display("k=%0d sweep read %0d wrong", k, ri); break;
          end
          ri++;
        end
    checks++;
    if (ri != sweep_reads.size()) begin failures++; $display("extra sweep reads"); end
    // P_SRAM addresses
    checks++;
    if (ps_seq.size() != 7 * ncols) begin failures++; $display("%0d windows, expected %0d", ps_seq.size(), 7 * ncols); end
    for (int i = 0; i < ps_seq.size(); i++) begin
      checks++;
      if (ps_seq[i] != i) begin failures++; $display("window %0d to address %0d", i, ps_seq[i]); break; end
    end
    // cycle count
    exp_cycles = 1 + (WREG_WORDS + 1) + (nc + 1) + 7 * (ncols + 2 * h) + ((h >= 2) ? nc + 1 : 0) + 6;
    checks++;
    if ((t1 - t0) / 10 != exp_cycles) begin failures++; $display("k=%0d run took %0d cycles, expected %0d", k, (t1 - t0) / 10, exp_cycles); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(KER_3, 56, 8, 3, 0, 56, 100);
    run(KER_3, 20, 3, 0, 5, 7, 0);
    run(KER_5, 28, 4, 1, 0, 28, 500);
    run(KER_5, 28, 4, 3, 4, 9, 500);
    run(KER_7, 224, 32, 6, 0, 12, 0);
    run(KER_7, 224, 32, 31, 150, 12, 0);
    checks++;
    if (n_tnext != 4 || n_tprev != 6) begin failures++; $display("event counters %0d %0d", n_tprev, n_tnext); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
