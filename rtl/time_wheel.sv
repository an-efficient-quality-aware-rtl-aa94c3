// time_wheel - timing bookkeeping of the memory interface socket (MIS-II).
//
// Every command the master controller issues is reported here (issue_*).
// The block keeps down-counters for each constraint that spans more than one
// bank controller or outlives a bank controller's own wait states, and turns
// them into permissions:
//   act_ok      ACT allowed on any bank        (tRRD since the last ACT)
//   pre_ok[b]   PRE allowed on bank b          (tRAS since ACT, read burst
//                                               finished, write recovery tWR)
//   rd_ok       READ allowed                   (data bus free of earlier bursts)
//   wr_ok       WRITE allowed                  (data bus free, one turnaround
//                                               cycle after read data)
//   quiet       no counter running (used before PALL / REF)
// A counter loaded with d-1 on the issue cycle reaches zero exactly d cycles
// later, so the next command may issue d cycles after the first one.
// The document names this block and its role (it supplies the timing
// information to bank and master controllers); the counter structure is
// this design's own. tRP and tRCD are waited out inside each bank controller
// with its NOP state, as in the shared-state FSM.
module time_wheel
  import mc_pkg::*;
#(
  parameter int NBANK = BANKS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  timing_cfg_t             cfg,
  input  logic                    issue_valid,
  input  sd_cmd_e                 issue_cmd,
  input  logic [BA_W-1:0]         issue_bank,
  output logic                    act_ok,
  output logic [NBANK-1:0]        pre_ok,
  output logic                    rd_ok,
  output logic                    wr_ok,
  output logic                    quiet
);

  logic [4:0] act_wait;
  logic [4:0] rd_wait, wr_wait;
  logic [4:0] pre_wait [NBANK];

  // the larger of a running count and a new requirement
  function automatic logic [4:0] upd(input logic [4:0] cur, input logic [4:0] need);
    logic [4:0] dec;
    dec = (cur != 0) ? cur - 5'd1 : 5'd0;
    return (need > dec) ? need : dec;
  endfunction

  logic [4:0] bl_m1, ras_m1, rrd_m1, wrrec_m1, rd2wr_m1;
  always_comb begin
    bl_m1    = 5'(cfg.burst_len) - 5'd1;
    ras_m1   = 5'(cfg.t_ras) - 5'd1;
    rrd_m1   = 5'(cfg.t_rrd) - 5'd1;
    wrrec_m1 = 5'(cfg.burst_len) + 5'(cfg.t_wr) - 5'd1;
    rd2wr_m1 = 5'(cfg.cas_lat) + 5'(cfg.burst_len);   // CL + BL + 1 turnaround, minus 1
  end

  logic is_act, is_rd, is_wr;
  assign is_act = issue_valid && issue_cmd == CMD_ACT;
  assign is_rd  = issue_valid && issue_cmd == CMD_RD;
  assign is_wr  = issue_valid && issue_cmd == CMD_WR;

  // PRE restriction that the command of this cycle adds to each bank
  logic [4:0] pre_need [NBANK];
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      pre_need[b] = 5'd0;
      if (issue_bank == BA_W'(b)) begin
        if (is_act) pre_need[b] = ras_m1;
        if (is_rd)  pre_need[b] = bl_m1;
        if (is_wr)  pre_need[b] = wrrec_m1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_wait <= '0;
      rd_wait  <= '0;
      wr_wait  <= '0;
      for (int b = 0; b < NBANK; b++) pre_wait[b] <= '0;
    end else begin
      act_wait <= upd(act_wait, is_act ? rrd_m1 : 5'd0);
      rd_wait  <= upd(rd_wait,  (is_rd || is_wr) ? bl_m1 : 5'd0);
      wr_wait  <= upd(wr_wait,  is_rd ? rd2wr_m1 : (is_wr ? bl_m1 : 5'd0));
      for (int b = 0; b < NBANK; b++) pre_wait[b] <= upd(pre_wait[b], pre_need[b]);
    end
  end

  always_comb begin
    act_ok = (act_wait == 0);
    rd_ok  = (rd_wait == 0);
    wr_ok  = (wr_wait == 0);
    quiet  = act_ok && rd_ok && wr_ok;
    for (int b = 0; b < NBANK; b++) begin
      pre_ok[b] = (pre_wait[b] == 0);
      quiet     = quiet && pre_ok[b];
    end
  end

endmodule
