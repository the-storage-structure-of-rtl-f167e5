// MPRA top: multi-precision reconfigurable CNN convolution accelerator.
//
// Data path: Data Buffer (128 KB) -> Data Register Group (KxK window, with
// T_SRAM supplying set-boundary lines) -> PE array (24 PEs, broadcast
// window, per-PE weights from the Weight Register Group, loaded from the
// 1 KB Parameter Buffer) -> P_SRAM (48 KB, per-PE banks accumulating over
// input channels). The controller runs one input channel over one set of
// seven output lines per `start`. This structure and the memory sizes follow
// the document; the host ports are this design's choice.
// Host interface (use while busy is low): db_we/db_waddr/db_wdata load the
// Data Buffer, pb_we/pb_waddr/pb_wdata the Parameter Buffer, start+cfg begin
// a run, done pulses when its results are in P_SRAM, ps_rd_* read a P_SRAM
// word one cycle after ps_rd_en. Output map f of a run lands in bank
// f*G (G = 1, 3, 6 PEs per filter for 3x3, 5x5, 7x7) at address
// line*S + column-in-strip. The event counters count T_SRAM previous-set
// fills, next-set pre-reads and windows sent to the PE array.
module mpra_top
  import mpra_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // host loading of the buffers
  input  logic                  db_we,
  input  logic [DB_AW-1:0]      db_waddr,
  input  dbword_t               db_wdata,
  input  logic                  pb_we,
  input  logic [PB_AW-1:0]      pb_waddr,
  input  word_t                 pb_wdata,
  // run control
  input  logic                  start,
  input  run_cfg_t              cfg,
  output logic                  busy,
  output logic                  done,
  // result read-out
  input  logic                  ps_rd_en,
  input  logic [4:0]            ps_rd_bank,
  input  logic [PS_AW-1:0]      ps_rd_addr,
  output logic [31:0]           ps_rd_data,
  // observation
  output logic [15:0]           n_tprev,
  output logic [15:0]           n_tnext,
  output logic [15:0]           n_windows
);
  run_cfg_t                            rcfg;
  logic                                pb_ren, wr_load, db_ren, ts_ren;
  logic [PB_AW-1:0]                    pb_raddr;
  logic [7:0]                          wr_idx;
  word_t                               pb_rdata;
  logic [DB_AW-1:0]                    db_raddr;
  dbword_t                             db_rdata;
  logic [TSLOTS-1:0]                   ts_we;
  logic [TSLOTS-1:0][8:0]              ts_waddr, ts_raddr;
  logic [TSLOTS-1:0][DW-1:0]           ts_wdata, ts_rdata;
  logic                                dr_shift, dr_zero, pe_valid;
  logic [2:0]                          dr_line;
  logic [PS_AW-1:0]                    ps_addr;
  logic [KTAPS-1:0][DW-1:0]            taps;
  logic [NUM_PE-1:0][TAPS-1:0][DW-1:0] weights;
  logic [NUM_PE-1:0][DW-1:0]           bias;
  logic                                arr_valid;
  logic [NUM_PE-1:0]                   arr_mask;
  lanes_t [NUM_PE-1:0]                 arr_out;

  mpra_controller u_ctrl (
    .clk, .rst_n, .start, .cfg_in(cfg), .busy, .done, .cfg(rcfg),
    .pb_ren, .pb_raddr, .wr_load, .wr_idx,
    .db_ren, .db_raddr, .db_rdata,
    .ts_we, .ts_waddr, .ts_wdata, .ts_ren, .ts_raddr,
    .dr_shift, .dr_line, .dr_zero,
    .pe_valid, .ps_addr,
    .n_tprev, .n_tnext, .n_windows
  );

  mpra_data_buffer u_dbuf (
    .clk, .we(db_we), .waddr(db_waddr), .wdata(db_wdata),
    .ren(db_ren), .raddr(db_raddr), .rdata(db_rdata)
  );

  mpra_param_buffer u_pbuf (
    .clk, .we(pb_we), .waddr(pb_waddr), .wdata(pb_wdata),
    .ren(pb_ren), .raddr(pb_raddr), .rdata(pb_rdata)
  );

  mpra_tsram u_tsram (
    .clk, .we(ts_we), .waddr(ts_waddr), .wdata(ts_wdata),
    .ren(ts_ren), .raddr(ts_raddr), .rdata(ts_rdata)
  );

  mpra_weight_reg_group u_wreg (
    .clk, .rst_n, .load_en(wr_load), .load_idx(wr_idx), .load_data(pb_rdata),
    .weights, .bias
  );

  mpra_data_reg_group u_dreg (
    .clk, .rst_n, .ker(rcfg.ker), .shift_en(dr_shift), .line(dr_line),
    .zero_col(dr_zero), .dbword(db_rdata), .tval(ts_rdata), .taps
  );

  mpra_pe_array u_array (
    .clk, .rst_n, .prec(rcfg.prec), .ker(rcfg.ker), .in_valid(pe_valid),
    .taps, .weights, .out_valid(arr_valid), .out_mask(arr_mask), .out(arr_out)
  );

  mpra_psram u_psram (
    .clk, .rst_n, .prec(rcfg.prec), .shift(rcfg.shift), .first(rcfg.first),
    .bias, .acc_valid(arr_valid), .acc_mask(arr_mask), .acc_addr(ps_addr),
    .acc_in(arr_out), .rd_en(ps_rd_en), .rd_bank(ps_rd_bank),
    .rd_addr(ps_rd_addr), .rd_data(ps_rd_data)
  );
endmodule
