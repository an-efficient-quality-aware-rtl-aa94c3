// mis2 - memory interface socket II (layer 0 of the memory controller).
//
// Turns accesses from the scheduler into SDRAM command sequences while
// keeping all banks busy in parallel: one bank_ctrl per bank, a time_wheel
// that tracks inter-command timing, and a master_ctrl that picks one bank
// command per cycle, runs the data bursts, power-up and refresh. This split
// (bank controllers + time wheel + master controller, burst control in the
// master) is the document's; the details inside each part are described in
// the part's own file.
//
// Interface:
//   acc_valid/acc    one access per cycle from the scheduler; it must only be
//                    sent to a bank whose bk_ready (or, with acc.preempt set,
//                    bk_preempt_ready) is high in that cycle.
//   bk_*             per-bank status ("DRAM status") for the scheduler.
//   col_issued/...   reports each column command (the access is then in
//                    order on the data bus and its bank is free again).
//   wd_* / rd_*      burst data to and from the channels, see master_ctrl.
//   sd_*             SDRAM pins; dq is split into dq_out / dq_oe / dq_in.
// sd_dqm is held low by the master controller (no byte masking).
module mis2
  import mc_pkg::*;
#(
  parameter int NBANK = BANKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  timing_cfg_t           cfg,
  // access from the scheduler
  input  logic                  acc_valid,
  input  access_t               acc,
  // DRAM status
  output logic [NBANK-1:0]      bk_ready,
  output logic [NBANK-1:0]      bk_preempt_ready,
  output logic [NBANK-1:0]      bk_row_open,
  output logic [ROW_W-1:0]      bk_open_row [NBANK],
  output logic                  preempted,
  output logic                  init_done,
  // service control and reports
  input  logic                  cai_active,
  output logic                  col_issued,
  output logic [CH_W-1:0]       col_chan,
  output logic                  col_ls,
  output logic                  xfer_valid,
  output logic [CH_W-1:0]       xfer_chan,
  output logic                  ref_issued,
  // channel data
  output logic                  wd_take,
  output logic [CH_W-1:0]       wd_chan,
  input  logic [DQ_W-1:0]       wd_data,
  output logic                  rd_valid,
  output logic [CH_W-1:0]       rd_chan,
  output logic [DQ_W-1:0]       rd_data,
  // SDRAM pins
  output logic                  sd_cke,
  output logic                  sd_cs_n,
  output logic                  sd_ras_n,
  output logic                  sd_cas_n,
  output logic                  sd_we_n,
  output logic [BA_W-1:0]       sd_ba,
  output logic [A_W-1:0]        sd_a,
  output logic [DQ_W/8-1:0]     sd_dqm,
  output logic [DQ_W-1:0]       sd_dq_out,
  output logic                  sd_dq_oe,
  input  logic [DQ_W-1:0]       sd_dq_in
);

  logic [NBANK-1:0] bk_req, bk_grant, bk_block, bk_busy, bk_pre;
  sd_cmd_e          bk_cmd [NBANK];
  access_t          bk_acc [NBANK];
  logic             hold, close_all;
  logic             act_ok, rd_ok, wr_ok, tw_quiet;
  logic [NBANK-1:0] pre_ok;
  logic             issue_valid;
  sd_cmd_e          issue_cmd;
  logic [BA_W-1:0]  issue_bank;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic to_me;
    assign to_me       = acc_valid && acc.bank == BA_W'(b);
    assign bk_block[b] = to_me;
    bank_ctrl u_bank (
      .clk, .rst_n, .cfg,
      .acc_valid     (to_me),
      .acc           (acc),
      .acc_ready     (bk_ready[b]),
      .preempt_ready (bk_preempt_ready[b]),
      .preempted     (bk_pre[b]),
      .row_open      (bk_row_open[b]),
      .open_row      (bk_open_row[b]),
      .busy          (bk_busy[b]),
      .cmd_req       (bk_req[b]),
      .cmd           (bk_cmd[b]),
      .cmd_acc       (bk_acc[b]),
      .cmd_grant     (bk_grant[b]),
      .hold          (hold),
      .close_all     (close_all)
    );
  end

  assign preempted = |bk_pre;

  time_wheel #(.NBANK(NBANK)) u_tw (
    .clk, .rst_n, .cfg,
    .issue_valid, .issue_cmd, .issue_bank,
    .act_ok, .pre_ok, .rd_ok, .wr_ok, .quiet(tw_quiet)
  );

  master_ctrl #(.NBANK(NBANK)) u_master (
    .clk, .rst_n, .cfg,
    .bk_req, .bk_cmd, .bk_acc, .bk_block, .bk_busy, .bk_grant,
    .hold, .close_all, .init_done,
    .act_ok, .pre_ok, .rd_ok, .wr_ok, .tw_quiet,
    .issue_valid, .issue_cmd, .issue_bank,
    .cai_active, .col_issued, .col_chan, .col_ls, .xfer_valid, .xfer_chan, .ref_issued,
    .wd_take, .wd_chan, .wd_data, .rd_valid, .rd_chan, .rd_data,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  // an access must go to a bank that can take it
  a_acc_accepted: assert property (@(posedge clk) disable iff (!rst_n)
    acc_valid |-> (bk_ready[acc.bank] || (acc.preempt && acc.ls && bk_preempt_ready[acc.bank])));

endmodule
