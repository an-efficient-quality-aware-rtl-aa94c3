// qa_mc_top - quality-aware SDRAM memory controller with all three layers.
//
// Layer 2: channel 0 (the CPU) has an address buffer (ch_abuf); channels
//          1..NCH-1 each have a built-in address generator (ch_agen) and are
//          given whole 1-D or 2-D jobs instead of single addresses.
// Layer 1: the quality-aware scheduler (qas) picks one channel request per
//          cycle according to each channel's class (latency-sensitive,
//          bandwidth-sensitive, don't-care), its service-cycle budget and the
//          DRAM status, and drives the preemptive and column-access-inhibition
//          services.
// Layer 0: the memory interface socket (mis2) runs the SDRAM: bank
//          controllers in parallel, time wheel, master controller.
// Channels connect in a star: each has its own port. Write data are pulled
// from the channel named by ch_wd_take in the cycle it is high (the word
// must be on ch_wdata[c] then); read data come out on rdata with
// ch_rvalid[c] marking the owner. The default channel use is the set-top-box
// arrangement of the document: 7 channels, channel 0 the CPU.
// SDRAM data pins are split into dq_out / dq_oe / dq_in; a bidirectional pad
// is left to the chip level.
// Status outputs (grant, column issue, data-bus cycle, refresh, preemption,
// service period end) are there so that bandwidth and latency can be
// measured from outside.
// sd_dqm is held low: all transfers are whole words.
module qa_mc_top
  import mc_pkg::*;
#(
  parameter int NCH = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  timing_cfg_t       cfg,
  input  chan_type_e        ch_type  [NCH],
  input  logic [CNT_W-1:0]  ch_alloc [NCH],
  input  logic [CNT_W-1:0]  period,
  input  logic              preempt_en,
  input  logic              cai_en,
  // channel 0: CPU address buffer
  input  logic              cpu_valid,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  output logic              cpu_ready,
  // channels 1..NCH-1: address-generator jobs
  input  logic [NCH-1:1]    ag_start,
  input  agen_cmd_t         ag_cmd   [NCH-1:1],
  output logic [NCH-1:1]    ag_busy,
  // channel data
  input  logic [DQ_W-1:0]   ch_wdata [NCH],
  output logic [NCH-1:0]    ch_wd_take,
  output logic [NCH-1:0]    ch_rvalid,
  output logic [DQ_W-1:0]   rdata,
  // status
  output logic              init_done,
  output logic              grant_valid,
  output logic [CH_W-1:0]   grant_chan,
  output logic              col_issued,
  output logic [CH_W-1:0]   col_chan,
  output logic              xfer_valid,
  output logic [CH_W-1:0]   xfer_chan,
  output logic              ref_issued,
  output logic              preempted,
  output logic              cai_active,
  output logic              period_end,
  // SDRAM pins
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BA_W-1:0]   sd_ba,
  output logic [A_W-1:0]    sd_a,
  output logic [DQ_W/8-1:0] sd_dqm,
  output logic [DQ_W-1:0]   sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [DQ_W-1:0]   sd_dq_in
);

  // ---------------- layer 2: channel front ends ----------------
  logic [NCH-1:0]    req_valid, req_we, req_ack;
  logic [ADDR_W-1:0] req_addr [NCH];

  ch_abuf u_ch0_ab (
    .clk, .rst_n,
    .in_valid (cpu_valid),
    .in_we    (cpu_we),
    .in_addr  (cpu_addr),
    .in_ready (cpu_ready),
    .req_valid(req_valid[0]),
    .req_we   (req_we[0]),
    .req_addr (req_addr[0]),
    .req_ack  (req_ack[0])
  );

  for (genvar c = 1; c < NCH; c++) begin : g_ag
    ch_agen u_ag (
      .clk, .rst_n,
      .burst_len(cfg.burst_len),
      .cmd_start(ag_start[c]),
      .cmd      (ag_cmd[c]),
      .busy     (ag_busy[c]),
      .req_valid(req_valid[c]),
      .req_we   (req_we[c]),
      .req_addr (req_addr[c]),
      .req_ack  (req_ack[c])
    );
  end

  // ---------------- layer 1: scheduler ----------------
  logic              acc_valid;
  access_t           acc;
  logic [BANKS-1:0]  bk_ready, bk_preempt_ready, bk_row_open;
  logic [ROW_W-1:0]  bk_open_row [BANKS];
  logic              col_ls, ls_running;
  chan_type_e        eff_type [NCH];
  logic              wd_take, rd_valid;
  logic [CH_W-1:0]   wd_chan, rd_chan;

  qas #(.NCH(NCH), .NBANK(BANKS)) u_qas (
    .clk, .rst_n,
    .ch_type, .ch_alloc, .period, .preempt_en, .cai_en,
    .req_valid, .req_we, .req_addr, .req_ack,
    .bk_ready, .bk_preempt_ready, .bk_row_open, .bk_open_row,
    .col_issued, .col_chan, .col_ls, .xfer_valid, .xfer_chan,
    .acc_valid, .acc, .cai_active, .ls_running, .eff_type, .period_end
  );

  assign grant_valid = acc_valid;
  assign grant_chan  = acc.chan;

  // ---------------- layer 0: memory interface socket ----------------
  logic [DQ_W-1:0] wd_data;
  assign wd_data = ch_wdata[wd_chan];

  mis2 #(.NBANK(BANKS)) u_mis (
    .clk, .rst_n, .cfg,
    .acc_valid, .acc,
    .bk_ready, .bk_preempt_ready, .bk_row_open, .bk_open_row,
    .preempted, .init_done,
    .cai_active, .col_issued, .col_chan, .col_ls, .xfer_valid, .xfer_chan, .ref_issued,
    .wd_take, .wd_chan, .wd_data, .rd_valid, .rd_chan, .rd_data(rdata),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  always_comb begin
    ch_wd_take = '0;
    ch_rvalid  = '0;
    if (wd_take)  ch_wd_take[wd_chan] = 1'b1;
    if (rd_valid) ch_rvalid[rd_chan]  = 1'b1;
  end

endmodule
