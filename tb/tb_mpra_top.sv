// End-to-end test of the MPRA top at its default sizes.
//
// For several layer shapes (3x3 on 14- and 56-wide images, 5x5 on 10- and
// 28-wide, 7x7 on 12-wide and on a 12-column strip of a 224-wide image) and
// all three precision modes, the test writes random images into the Data
// Buffer in the eight-line set layout, writes random weights and offsets
// into the Parameter Buffer, runs every input channel of a set, reads all
// output maps back from P_SRAM and compares them with a reference
// convolution computed here from the images (zero padding, wrap of the
// 32-bit PE sums, shift, saturation and offset as the design specifies).
// It also checks the cycle count of every run and counts the mechanisms
// exercised: each kernel size, each precision, T_SRAM fill from a real
// previous set, next-set pre-reads, partial strips, channel accumulation
// and lane saturation.
module tb_mpra_top;
  import mpra_pkg::*;

  localparam int MAXW = 224;
  localparam int MAXH = 224;
  localparam int MAXC = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 db_we = 1'b0, pb_we = 1'b0, start = 1'b0, ps_rd_en = 1'b0;
  logic [DB_AW-1:0]     db_waddr = '0;
  dbword_t              db_wdata = '0;
  logic [PB_AW-1:0]     pb_waddr = '0;
  word_t                pb_wdata = '0;
  run_cfg_t             cfg = '0;
  logic                 busy, done;
  logic [4:0]           ps_rd_bank = '0;
  logic [PS_AW-1:0]     ps_rd_addr = '0;
  logic [31:0]          ps_rd_data;
  logic [15:0]          n_tprev, n_tnext, n_windows;

  mpra_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int seen_ker [3];
  int seen_prec [3];
  int seen_prev_fill = 0, seen_next_read = 0, seen_strip = 0, seen_accum = 0, seen_sat = 0;

  logic [15:0] img [MAXC][MAXH][MAXW];
  logic [15:0] wt  [MAXC][NUM_PE][KTAPS];
  logic [15:0] bs  [NUM_PE];

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ksz(ker_e k);
    return (k == KER_3) ? 3 : (k == KER_5) ? 5 : 7;
  endfunction
  function automatic int kgrp(ker_e k);
    return (k == KER_3) ? 1 : (k == KER_5) ? 3 : 6;
  endfunction
  function automatic int lbits(prec_e p);
    return (p == PREC_16X16) ? 32 : (p == PREC_16X8) ? 16 : 8;
  endfunction

  // product of one lane, straight from the mode definition
  function automatic longint lane_mul(prec_e p, logic [15:0] a, logic [15:0] b, int lane);
    longint sa, sah, sal, sbh, sbl, sb;
    sa  = longint'(signed'(a));
    sb  = longint'(signed'(b));
    sah = longint'(signed'(a[15:8]));
    sal = longint'(signed'(a[7:0]));
    sbh = longint'(signed'(b[15:8]));
    sbl = longint'(signed'(b[7:0]));
    case (p)
      PREC_16X16: return (lane == 0) ? sa * sb : 0;
      PREC_16X8:  return (lane == 0) ? sa * sbh : (lane == 1) ? sa * sbl : 0;
      default:    return (lane == 0) ? sah * sbh : (lane == 1) ? sah * sbl :
                         (lane == 2) ? sal * sbh : sal * sbl;
    endcase
  endfunction

  function automatic longint clampn(longint x, int n, ref int sat_hits);
    longint hi, lo;
    hi = (64'sd1 <<< (n - 1)) - 1;
    lo = -(64'sd1 <<< (n - 1));
    if (x > hi) begin sat_hits++; return hi; end
    if (x < lo) begin sat_hits++; return lo; end
    return x;
  endfunction

  task automatic host_db_write(int addr, dbword_t w);
    @(negedge clk);
    db_we = 1'b1; db_waddr = DB_AW'(addr); db_wdata = w;
    @(negedge clk);
    db_we = 1'b0;
  endtask

  task automatic host_pb_write(int addr, logic [15:0] w);
    @(negedge clk);
    pb_we = 1'b1; pb_waddr = PB_AW'(addr); pb_wdata = w;
    @(negedge clk);
    pb_we = 1'b0;
  endtask

  task automatic ps_read(int bank, int addr, output logic [31:0] d);
    @(negedge clk);
    ps_rd_en = 1'b1; ps_rd_bank = 5'(bank); ps_rd_addr = PS_AW'(addr);
    @(negedge clk);
    ps_rd_en = 1'b0;
    d = ps_rd_data;
  endtask

  // One layer: nch channels, image w x (nsets*7), runs sets [s0, s1],
  // output strip col0..col0+ncols-1.
  task automatic layer(ker_e ker, prec_e prec, int w, int nsets, int nch,
                       int s0, int s1, int col0, int ncols, int shift, int amp);
    int k, h, g, nf, hh, nc, cs, ce, expect_cycles, t0, sat_hits;
    k = ksz(ker); h = (k - 1) / 2; g = kgrp(ker); nf = NUM_PE / g; hh = nsets * 7;
    cs = (col0 - h < 0) ? 0 : col0 - h;
    ce = (col0 + ncols - 1 + h > w - 1) ? w - 1 : col0 + ncols - 1 + h;
    nc = ce - cs + 1;
    seen_ker[ker]++;
    seen_prec[prec]++;
    if (col0 > 0 || ncols < w) seen_strip++;
    // stimulus
    for (int c = 0; c < nch; c++) begin
      for (int y = 0; y < hh; y++)
        for (int x = 0; x < w; x++)
          img[c][y][x] = 16'($urandom_range(0, 2 * amp)) - 16'(amp) ^ ((prec == PREC_8X8) ? 16'($urandom_range(0, 255) << 8) : 16'h0);
      for (int f = 0; f < nf; f++)
        for (int t = 0; t < k * k; t++)
          wt[c][f][t] = 16'($urandom);
    end
    for (int f = 0; f < nf; f++) bs[f] = 16'($urandom);
    // Data Buffer: channel c at base c*nsets*w, set-column words
    for (int c = 0; c < nch; c++)
      for (int s = 0; s < nsets; s++)
        for (int x = 0; x < w; x++) begin
          dbword_t word;
          for (int r = 0; r < 8; r++)
            word[r] = (s * 7 + r < hh) ? img[c][s * 7 + r][x] : 16'h0;
          host_db_write(c * nsets * w + s * w + x, word);
        end
    for (int s = s0; s <= s1; s++) begin
      for (int c = 0; c < nch; c++) begin
        int wb;
        wb = (c % 2) * 256;
        // Parameter Buffer: PE p = f*g + j holds taps 9j..9j+8
        for (int p = 0; p < NUM_PE; p++) begin
          for (int t = 0; t < 9; t++) begin
            int idx;
            idx = (p % g) * 9 + t;
            host_pb_write(wb + p * 9 + t, (idx < k * k) ? wt[c][p / g][idx] : 16'h0);
          end
          host_pb_write(wb + 216 + p, (p % g == 0) ? bs[p / g] : 16'h0);
        end
        @(negedge clk);
        cfg = '0;
        cfg.ker = ker; cfg.prec = prec; cfg.width = 9'(w); cfg.nsets = 6'(nsets);
        cfg.set_idx = 6'(s); cfg.col0 = 9'(col0); cfg.ncols = 9'(ncols);
        cfg.db_base = DB_AW'(c * nsets * w); cfg.wbase = PB_AW'(wb);
        cfg.first = (c == 0); cfg.shift = 5'(shift);
        start = 1'b1;
        t0 = cycle;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        if (s > 0) seen_prev_fill++;
        if (h >= 2) seen_next_read++;
        if (c > 0) seen_accum++;
        // cycle budget: load, previous-set fill, 7 line sweeps,
        // next-set pre-read (5x5/7x7), drain
        expect_cycles = 1 + (WREG_WORDS + 1) + (nc + 1) + 7 * (ncols + 2 * h)
                      + ((h >= 2) ? nc + 1 : 0) + 6;
        checks++;
        if (cycle - t0 != expect_cycles) begin
          failures++;
          $display("run cycles %0d, expected %0d", cycle - t0, expect_cycles);
        end
      end
      // compare every output of the set
      for (int f = 0; f < nf; f++)
        for (int l = 0; l < 7; l++)
          for (int xi = 0; xi < ncols; xi++) begin
            logic [31:0] got, exp;
            int n, y, x;
            longint acc [4];
            n = lbits(prec);
            y = s * 7 + l; x = col0 + xi;
            sat_hits = 0;
            for (int ln = 0; ln < 32 / n; ln++) begin
              logic [7:0] bb;
              if (prec == PREC_16X16) acc[ln] = longint'(signed'(bs[f]));
              else begin
                bb = (ln % 2 == 0) ? bs[f][15:8] : bs[f][7:0];
                acc[ln] = longint'(signed'(bb));
              end
            end
            for (int c = 0; c < nch; c++)
              for (int ln = 0; ln < 32 / n; ln++) begin
                longint sum;
                logic [31:0] w32;
                sum = 0;
                for (int dy = 0; dy < k; dy++)
                  for (int dx = 0; dx < k; dx++) begin
                    int yy, xx;
                    yy = y + dy - h; xx = x + dx - h;
                    if (yy >= 0 && yy < hh && xx >= 0 && xx < w)
                      sum += lane_mul(prec, img[c][yy][xx], wt[c][f][dy * k + dx], ln);
                  end
                w32 = 32'(sum);
                acc[ln] = clampn(acc[ln] + clampn(longint'(signed'(w32)) >>> shift, n, sat_hits), n, sat_hits);
              end
            exp = '0;
            for (int ln = 0; ln < 32 / n; ln++)
              for (int b = 0; b < n; b++) exp[ln * n + b] = acc[ln][b];
            if (sat_hits > 0) seen_sat++;
            ps_read(f * g, l * ncols + xi, got);
            checks++;
            if (got !== exp) begin
              failures++;
              if (failures < 10)
                $display("mismatch k=%0d prec=%0d set=%0d f=%0d line=%0d x=%0d got=%h exp=%h",
                         k, prec, s, f, l, x, got, exp);
            end
          end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // small shapes
    layer(KER_3, PREC_16X16, 14, 2, 2, 0, 1, 0, 14, 4, 2000);
    layer(KER_5, PREC_16X8,  10, 3, 2, 0, 2, 3, 4, 8, 30000);
    layer(KER_7, PREC_8X8,   12, 3, 2, 0, 2, 0, 12, 10, 127);
    // full layer shapes: 56x56 3x3 (all sets), 28x28 5x5 (all sets),
    // one set of a 12-column strip of 224x224 7x7
    layer(KER_3, PREC_8X8,   56, 8, 2, 0, 7, 0, 56, 9, 127);
    layer(KER_5, PREC_16X16, 28, 4, 2, 0, 3, 0, 28, 8, 4000);
    layer(KER_7, PREC_16X8,  224, 32, 1, 10, 10, 100, 12, 4, 3000);
    // mechanism coverage
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen_ker[i] == 0) begin failures++; $display("kernel mode %0d never ran", i); end
      checks++;
      if (seen_prec[i] == 0) begin failures++; $display("precision %0d never ran", i); end
    end
    checks++; if (seen_prev_fill == 0) begin failures++; $display("no previous-set fill"); end
    checks++; if (seen_next_read == 0) begin failures++; $display("no next-set pre-read"); end
    checks++; if (seen_strip == 0)     begin failures++; $display("no partial strip"); end
    checks++; if (seen_accum == 0)     begin failures++; $display("no accumulation"); end
    checks++; if (seen_sat == 0)       begin failures++; $display("no saturation"); end
    checks++;
    if (n_tnext == 0 || n_tprev == 0 || n_windows == 0) begin
      failures++; $display("event counters idle");
    end
    $display("mechanisms: k3=%0d k5=%0d k7=%0d p16=%0d p168=%0d p8=%0d prevfill=%0d nextread=%0d strip=%0d accum=%0d sat=%0d tprev=%0d tnext=%0d windows=%0d",
             seen_ker[0], seen_ker[1], seen_ker[2], seen_prec[0], seen_prec[1], seen_prec[2],
             seen_prev_fill, seen_next_read, seen_strip, seen_accum, seen_sat, n_tprev, n_tnext, n_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
