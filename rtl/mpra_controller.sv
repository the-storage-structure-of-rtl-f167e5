// Controller: sequences one run of the accelerator.
//
// A run convolves one input channel over one set (seven output lines) and
// one strip of output columns, and adds the results into P_SRAM, so a layer
// is a sequence of runs: every input channel for a set/strip, with `first`
// on the first channel. Phases of a run:
//   LOADW  : copy 240 words (24x9 weights, 24 offsets) from the Parameter
//            Buffer into the Weight Register Group, one per cycle.
//   TPREV  : copy the last H lines (a7-H..a6) of the previous set into
//            T_SRAM for every column the strip touches (zeros for set 0).
//   SWEEP  : for each output line, read one Data Buffer word (and three
//            T_SRAM entries) per column, from col0-H to col0+S-1+H; the Data
//            Register Group shifts the column in, and once K columns are in,
//            each cycle yields one window for all 24 PEs.
//   TNEXT  : (5x5 and 7x7 only) before the lines whose window reaches past
//            the redundant line a7, pre-read lines a1..aH-1 of the next set
//            into T_SRAM, reusing the space of the previous-set lines.
//   DRAIN  : wait for the last results to be written.
// With H=(K-1)/2 the lines 0..7-H are swept before TNEXT and 8-H..6 after it.
// The reuse of T_SRAM (previous-set lines first, next-set lines read ahead
// before line a6 for 5x5) follows the document; the phase order for 7x7,
// strips and all timing are this design's choice.
// Pipeline of a sweep (cycle of issue = 0): 1 memory data and window shift,
// 2 window valid (PE input), 3 PE result and P_SRAM update issue, 4-5 P_SRAM
// write. Window (line l, centre column c) goes to P_SRAM address
// l*S + (c-col0). Rules checked at start: (H lines) x (columns used) must
// fit the 56-entry T_SRAM and 7*S must fit a 512-word P_SRAM bank.
module mpra_controller
  import mpra_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  run_cfg_t                          cfg_in,
  output logic                              busy,
  output logic                              done,
  output run_cfg_t                          cfg,
  // Parameter Buffer read / Weight Register Group load
  output logic                              pb_ren,
  output logic [PB_AW-1:0]                  pb_raddr,
  output logic                              wr_load,
  output logic [7:0]                        wr_idx,
  // Data Buffer read
  output logic                              db_ren,
  output logic [DB_AW-1:0]                  db_raddr,
  input  dbword_t                           db_rdata,
  // T_SRAM
  output logic [TSLOTS-1:0]                 ts_we,
  output logic [TSLOTS-1:0][8:0]            ts_waddr,
  output logic [TSLOTS-1:0][DW-1:0]         ts_wdata,
  output logic                              ts_ren,
  output logic [TSLOTS-1:0][8:0]            ts_raddr,
  // Data Register Group
  output logic                              dr_shift,
  output logic [2:0]                        dr_line,
  output logic                              dr_zero,
  // PE array and P_SRAM
  output logic                              pe_valid,
  output logic [PS_AW-1:0]                  ps_addr,
  // event counters for observation
  output logic [15:0]                       n_tprev,
  output logic [15:0]                       n_tnext,
  output logic [15:0]                       n_windows
);
  typedef enum logic [2:0] {S_IDLE, S_LOADW, S_TPREV, S_SWEEP, S_TNEXT, S_DRAIN} state_e;

  state_e          state;
  logic [9:0]      cnt;          // position within the current phase
  logic [2:0]      line;
  int              k, h;
  int              cs, ce, nc;   // first / last image column touched, count
  int              col;          // image column of the current sweep issue
  logic [9:0]      sweep_len;

  // pipeline registers
  logic            p1_fill, p1_src, p1_next, p1_shift, p1_emit, p1_zero;
  logic [2:0]      p1_line;
  logic [9:0]      p1_idx;
  logic [PS_AW-1:0] p1_addr, p2_addr, p3_addr;
  logic            p2_emit;
  logic [2:0]      drain_cnt;

  always_comb begin
    k  = int'(ker_size(cfg.ker));
    h  = (k - 1) / 2;
    cs = int'(cfg.col0) - h;
    if (cs < 0) cs = 0;
    ce = int'(cfg.col0) + int'(cfg.ncols) - 1 + h;
    if (ce > int'(cfg.width) - 1) ce = int'(cfg.width) - 1;
    nc = ce - cs + 1;
    sweep_len = 10'(int'(cfg.ncols) + 2 * h);
    col = int'(cfg.col0) - h + int'(cnt);
  end

  // ---- issue side -------------------------------------------------------
  always_comb begin
    pb_ren   = (state == S_LOADW) && (cnt < 10'(WREG_WORDS));
    pb_raddr = cfg.wbase + PB_AW'(cnt);
    db_ren   = 1'b0;
    db_raddr = '0;
    ts_ren   = 1'b0;
    ts_raddr = '0;
    case (state)
      S_TPREV: begin
        db_ren   = (cnt < 10'(nc)) && (cfg.set_idx != 0);
        db_raddr = DB_AW'(int'(cfg.db_base) + (int'(cfg.set_idx) - 1) * int'(cfg.width) + cs + int'(cnt));
      end
      S_TNEXT: begin
        db_ren   = (cnt < 10'(nc)) && (int'(cfg.set_idx) + 1 < int'(cfg.nsets));
        db_raddr = DB_AW'(int'(cfg.db_base) + (int'(cfg.set_idx) + 1) * int'(cfg.width) + cs + int'(cnt));
      end
      S_SWEEP: begin
        db_ren   = (col >= 0) && (col < int'(cfg.width));
        db_raddr = DB_AW'(int'(cfg.db_base) + int'(cfg.set_idx) * int'(cfg.width) + col);
        ts_ren   = 1'b1;
        for (int j = 0; j < int'(TSLOTS); j++)
          ts_raddr[j] = 9'(j * nc + col - cs);
      end
      default: ;
    endcase
  end

  // ---- T_SRAM fill write side (one cycle after issue) -------------------
  always_comb begin
    ts_we    = '0;
    ts_waddr = '0;
    ts_wdata = '0;
    if (p1_fill)
      for (int j = 0; j < int'(TSLOTS); j++) begin
        ts_waddr[j] = 9'(j * nc + int'(p1_idx));
        if (!p1_next && j < h) begin
          ts_we[j]    = 1'b1;
          ts_wdata[j] = p1_src ? db_rdata[int'(SET_ROWS) - 1 - h + j] : '0;
        end else if (p1_next && j < h - 1) begin
          ts_we[j]    = 1'b1;
          ts_wdata[j] = p1_src ? db_rdata[1 + j] : '0;
        end
      end
  end

  assign dr_shift = p1_shift;
  assign dr_line  = p1_line;
  assign dr_zero  = p1_zero;
  assign pe_valid = p2_emit;
  assign ps_addr  = p3_addr;
  assign wr_load  = (state == S_LOADW) && (cnt != 0);
  assign wr_idx   = 8'(cnt - 10'd1);
  assign busy     = (state != S_IDLE);

  // ---- state machine ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cfg       <= '0;
      cnt       <= '0;
      line      <= '0;
      done      <= 1'b0;
      drain_cnt <= '0;
      p1_fill   <= 1'b0;
      p1_src    <= 1'b0;
      p1_next   <= 1'b0;
      p1_shift  <= 1'b0;
      p1_emit   <= 1'b0;
      p1_zero   <= 1'b0;
      p1_line   <= '0;
      p1_idx    <= '0;
      p1_addr   <= '0;
      p2_addr   <= '0;
      p3_addr   <= '0;
      p2_emit   <= 1'b0;
      n_tprev   <= '0;
      n_tnext   <= '0;
      n_windows <= '0;
    end else begin
      done <= 1'b0;
      // pipeline defaults
      p1_fill  <= 1'b0;
      p1_shift <= 1'b0;
      p1_emit  <= 1'b0;
      p2_emit  <= p1_emit;
      p2_addr  <= p1_addr;
      p3_addr  <= p2_addr;
      if (p1_emit) n_windows <= n_windows + 16'd1;

      case (state)
        S_IDLE: if (start) begin
          cfg   <= cfg_in;
          cnt   <= '0;
          line  <= '0;
          state <= S_LOADW;
        end
        S_LOADW: begin
          cnt <= cnt + 10'd1;
          if (cnt == 10'(WREG_WORDS)) begin
            cnt   <= '0;
            state <= S_TPREV;
            n_tprev <= n_tprev + 16'd1;
          end
        end
        S_TPREV, S_TNEXT: begin
          p1_fill <= (cnt < 10'(nc));
          p1_next <= (state == S_TNEXT);
          p1_src  <= db_ren;
          p1_idx  <= cnt;
          cnt     <= cnt + 10'd1;
          if (cnt == 10'(nc)) begin
            cnt   <= '0;
            state <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          p1_shift <= 1'b1;
          p1_zero  <= !db_ren;
          p1_line  <= line;
          p1_emit  <= (int'(cnt) >= 2 * h);
          p1_addr  <= PS_AW'(int'(line) * int'(cfg.ncols) + int'(cnt) - 2 * h);
          cnt      <= cnt + 10'd1;
          if (cnt == sweep_len - 10'd1) begin
            cnt  <= '0;
            line <= line + 3'd1;
            if (line == 3'(SET_ROWS - 2)) begin
              state     <= S_DRAIN;
              drain_cnt <= '0;
            end else if (h >= 2 && int'(line) == int'(SET_ROWS) - 1 - h) begin
              state   <= S_TNEXT;
              n_tnext <= n_tnext + 16'd1;
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 3'd1;
          if (drain_cnt == 3'd5) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Size rules of a run
  always_ff @(posedge clk) begin
    if (state == S_LOADW && cnt == 10'd0)
      assert (h * nc <= int'(TS_DEPTH))
        else $error("%0d boundary lines of %0d columns do not fit T_SRAM", h, nc);
    if (start && state == S_IDLE) begin
      assert (cfg_in.ncols != 0 && int'(cfg_in.ncols) * int'(SET_LINES) <= int'(PS_DEPTH))
        else $error("strip of %0d columns does not fit a P_SRAM bank", cfg_in.ncols);
      assert (cfg_in.ker != 2'd3)
        else $error("undefined kernel code");
    end
  end
endmodule
