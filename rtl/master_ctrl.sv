// master_ctrl - master controller of the memory interface socket (MIS-II).
//
// It owns the SDRAM command, address and data pins. Its jobs:
//  * Power-up: wait cfg.init_wait cycles, PRECHARGE ALL, two AUTO REFRESH,
//    LOAD MODE REGISTER (burst length and CAS latency from cfg), then run.
//  * Refresh: every cfg.ref_interval cycles it raises `hold` so that no new
//    access is accepted, lets the banks finish, then issues PRECHARGE ALL
//    (close_all to the banks) and AUTO REFRESH.
//  * Command selection: each cycle at most one bank controller's request is
//    granted. A request is eligible when the time wheel allows it; while
//    cai_active (column-access inhibition) column commands of
//    non-latency-sensitive accesses are masked. A latency-sensitive bank
//    controller wins first; otherwise a rotating pointer picks among the
//    eligible banks.
//  * Burst transfer: after a WRITE it takes burst_len words from the owning
//    channel (wd_take / wd_chan, the word must be on wd_data in that cycle)
//    and drives them on dq; after a READ it samples dq_in CAS latency + 1
//    cycles after the grant and returns the words with rd_valid / rd_chan.
//    xfer_valid / xfer_chan mark every data-bus (service) cycle.
// The wait states of the power-up and refresh sequences use the same
// shared-NOP style as the bank controllers (nop_count + return state).
// Timing: a command granted in cycle g appears on the pins from cycle g+1;
// write data word i appears on dq in cycle g+1+i; read word i is on dq_in
// in cycle g+1+CL+i and is returned on rd_data one cycle later.
// The document gives the master controller's duties; the sequence details,
// the grant order and the pin timing are this design's own choices.
// sd_dqm is held low: every access moves whole 16-bit words, so no byte is
// ever masked (the document does not mention byte masks).
module master_ctrl
  import mc_pkg::*;
#(
  parameter int NBANK = BANKS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  timing_cfg_t          cfg,
  // bank controllers
  input  logic [NBANK-1:0]     bk_req,
  input  sd_cmd_e              bk_cmd   [NBANK],
  input  access_t              bk_acc   [NBANK],
  input  logic [NBANK-1:0]     bk_block,     // bank takes a new access this cycle
  input  logic [NBANK-1:0]     bk_busy,
  output logic [NBANK-1:0]     bk_grant,
  output logic                 hold,
  output logic                 close_all,
  output logic                 init_done,
  // time wheel
  input  logic                 act_ok,
  input  logic [NBANK-1:0]     pre_ok,
  input  logic                 rd_ok,
  input  logic                 wr_ok,
  input  logic                 tw_quiet,
  output logic                 issue_valid,
  output sd_cmd_e              issue_cmd,
  output logic [BA_W-1:0]      issue_bank,
  // scheduler
  input  logic                 cai_active,
  output logic                 col_issued,
  output logic [CH_W-1:0]      col_chan,
  output logic                 col_ls,
  output logic                 xfer_valid,
  output logic [CH_W-1:0]      xfer_chan,
  output logic                 ref_issued,
  // channel data
  output logic                 wd_take,
  output logic [CH_W-1:0]      wd_chan,
  input  logic [DQ_W-1:0]      wd_data,
  output logic                 rd_valid,
  output logic [CH_W-1:0]      rd_chan,
  output logic [DQ_W-1:0]      rd_data,
  // SDRAM pins
  output logic                 sd_cke,
  output logic                 sd_cs_n,
  output logic                 sd_ras_n,
  output logic                 sd_cas_n,
  output logic                 sd_we_n,
  output logic [BA_W-1:0]      sd_ba,
  output logic [A_W-1:0]       sd_a,
  output logic [DQ_W/8-1:0]    sd_dqm,
  output logic [DQ_W-1:0]      sd_dq_out,
  output logic                 sd_dq_oe,
  input  logic [DQ_W-1:0]      sd_dq_in
);

  typedef enum logic [2:0] {M_INIT, M_PALL, M_REF, M_MRS, M_NOP, M_RUN, M_RPALL} mstate_e;

  mstate_e     mstate, mret;
  logic [15:0] nop_count;
  logic [1:0]  ref_left;       // refreshes still to do in the power-up sequence
  logic [15:0] ref_timer;
  logic        ref_pending;

  // ---------------- read-data schedule ----------------
  logic [RD_PIPE-1:0] rd_sched;
  logic [RD_PIPE-1:0][CH_W-1:0] rd_sched_ch;
  logic               rd_busy;
  assign rd_busy = |rd_sched;

  // ---------------- write-data schedule ----------------
  logic [3:0]         wr_left;
  logic [CH_W-1:0]    wr_ch;

  // ---------------- command selection ----------------
  logic [NBANK-1:0]        elig;
  logic                    run_sel;
  logic [$clog2(NBANK)-1:0] rr_ptr, sel;
  logic                    sel_valid;

  always_comb begin
    logic tok;
    logic [$clog2(NBANK)-1:0] idx;
    tok = 1'b0;
    idx = 0;
    for (int b = 0; b < NBANK; b++) begin
      tok = 1'b0;
      unique case (bk_cmd[b])
        CMD_ACT: tok = act_ok;
        CMD_PRE: tok = pre_ok[b];
        CMD_RD:  tok = rd_ok && !(cai_active && !bk_acc[b].ls);
        CMD_WR:  tok = wr_ok && !(cai_active && !bk_acc[b].ls);
        default: tok = 1'b0;
      endcase
      elig[b] = bk_req[b] && !bk_block[b] && tok;
    end
    run_sel   = (mstate == M_RUN) || (mstate == M_RPALL);
    sel_valid = 1'b0;
    sel       = '0;
    // latency-sensitive bank controller first
    for (int b = 0; b < NBANK; b++)
      if (!sel_valid && elig[b] && bk_acc[b].ls) begin
        sel_valid = 1'b1;
        sel       = ($clog2(NBANK))'(b);
      end
    // then round robin starting after the last granted bank
    for (int i = 1; i <= NBANK; i++) begin
      idx = ($clog2(NBANK))'((int'(rr_ptr) + i) % NBANK);
      if (!sel_valid && elig[idx]) begin
        sel_valid = 1'b1;
        sel       = idx;
      end
    end
    sel_valid = sel_valid && run_sel;
    bk_grant  = '0;
    if (sel_valid) bk_grant[sel] = 1'b1;
  end

  // ---------------- master sequence ----------------
  logic    seq_cmd_valid;
  sd_cmd_e seq_cmd;
  logic    all_idle;
  assign all_idle = !(|bk_busy) && tw_quiet && !rd_busy && (wr_left == 0);

  always_comb begin
    seq_cmd_valid = 1'b0;
    seq_cmd       = CMD_NOP;
    unique case (mstate)
      M_PALL:  begin seq_cmd_valid = 1'b1; seq_cmd = CMD_PALL; end
      M_REF:   begin seq_cmd_valid = 1'b1; seq_cmd = CMD_REF;  end
      M_MRS:   begin seq_cmd_valid = 1'b1; seq_cmd = CMD_MRS;  end
      M_RPALL: if (all_idle) begin seq_cmd_valid = 1'b1; seq_cmd = CMD_PALL; end
      default: ;
    endcase
  end

  assign hold       = (mstate != M_RUN) || ref_pending;
  assign close_all  = seq_cmd_valid && seq_cmd == CMD_PALL;
  assign ref_issued = seq_cmd_valid && seq_cmd == CMD_REF && init_done;

  // the command of this cycle
  sd_cmd_e   now_cmd;
  access_t   now_acc;
  logic      now_valid;
  always_comb begin
    now_valid = sel_valid || seq_cmd_valid;
    now_cmd   = seq_cmd_valid ? seq_cmd : bk_cmd[sel];
    now_acc   = bk_acc[sel];
  end
  assign issue_valid = sel_valid;
  assign issue_cmd   = bk_cmd[sel];
  assign issue_bank  = BA_W'(sel);

  assign col_issued = sel_valid && (bk_cmd[sel] == CMD_RD || bk_cmd[sel] == CMD_WR);
  assign col_chan   = bk_acc[sel].chan;
  assign col_ls     = bk_acc[sel].ls;

  logic wr_start;
  assign wr_start = sel_valid && bk_cmd[sel] == CMD_WR;
  assign wd_take  = wr_start || (wr_left != 0);
  assign wd_chan  = wr_start ? bk_acc[sel].chan : wr_ch;

  always_comb begin
    xfer_valid = 1'b0;
    xfer_chan  = '0;
    if (wd_take) begin
      xfer_valid = 1'b1;
      xfer_chan  = wd_chan;
    end else if (rd_sched[0]) begin
      xfer_valid = 1'b1;
      xfer_chan  = rd_sched_ch[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate      <= M_INIT;
      mret        <= M_INIT;
      nop_count   <= '0;
      ref_left    <= '0;
      ref_timer   <= '0;
      ref_pending <= 1'b0;
      init_done   <= 1'b0;
      rr_ptr      <= '0;
      rd_sched    <= '0;
      rd_sched_ch <= '0;
      wr_left     <= '0;
      wr_ch       <= '0;
      rd_valid    <= 1'b0;
      rd_chan     <= '0;
      rd_data     <= '0;
      sd_cke      <= 1'b0;
      sd_cs_n     <= 1'b1;
      sd_ras_n    <= 1'b1;
      sd_cas_n    <= 1'b1;
      sd_we_n     <= 1'b1;
      sd_ba       <= '0;
      sd_a        <= '0;
      sd_dq_out   <= '0;
      sd_dq_oe    <= 1'b0;
    end else begin
      sd_cke <= 1'b1;
      // ---------- master FSM ----------
      unique case (mstate)
        M_INIT: begin
          nop_count <= (cfg.init_wait > 16'd1) ? cfg.init_wait - 16'd1 : 16'd1;
          mret      <= M_PALL;
          ref_left  <= 2'd2;
          mstate    <= M_NOP;
        end
        M_PALL: begin
          nop_count <= 16'(cfg.t_rp);
          mret      <= M_REF;
          mstate    <= M_NOP;
        end
        M_REF: begin
          nop_count <= 16'(cfg.t_rfc);
          if (!init_done && ref_left > 2'd1) begin
            ref_left <= ref_left - 2'd1;
            mret     <= M_REF;
          end else if (!init_done) begin
            ref_left <= '0;
            mret     <= M_MRS;
          end else begin
            mret     <= M_RUN;
          end
          mstate <= M_NOP;
        end
        M_MRS: begin
          nop_count <= 16'(cfg.t_mrd);
          mret      <= M_RUN;
          mstate    <= M_NOP;
        end
        M_NOP: begin
          // stay nop_count cycles in total, counting the command cycle
          if (nop_count <= 16'd2) begin
            mstate <= mret;
            if (mret == M_RUN) init_done <= 1'b1;
          end else begin
            nop_count <= nop_count - 16'd1;
          end
        end
        M_RUN: if (ref_pending) mstate <= M_RPALL;
        M_RPALL: if (all_idle) begin
          nop_count   <= 16'(cfg.t_rp);
          mret        <= M_REF;
          ref_pending <= 1'b0;
          mstate      <= M_NOP;
        end
        default: mstate <= M_INIT;
      endcase

      // ---------- refresh timer ----------
      if (init_done) begin
        if (ref_timer >= cfg.ref_interval - 16'd1) begin
          ref_timer   <= '0;
          ref_pending <= 1'b1;
        end else begin
          ref_timer <= ref_timer + 16'd1;
        end
      end

      if (sel_valid) rr_ptr <= sel;

      // ---------- command pins ----------
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0111;   // NOP
      if (now_valid) begin
        unique case (now_cmd)
          CMD_ACT:  begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0011;
                          sd_ba <= now_acc.bank; sd_a <= now_acc.row; end
          CMD_RD:   begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0101;
                          sd_ba <= now_acc.bank; sd_a <= A_W'(now_acc.col); end
          CMD_WR:   begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0100;
                          sd_ba <= now_acc.bank; sd_a <= A_W'(now_acc.col); end
          CMD_PRE:  begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0010;
                          sd_ba <= now_acc.bank; sd_a <= '0; end
          CMD_PALL: begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0010;
                          sd_a <= A_W'(1) << 10; end
          CMD_REF:  {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0001;
          CMD_MRS:  begin {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= 4'b0000;
                          sd_ba <= '0; sd_a <= mode_word(cfg); end
          default: ;
        endcase
      end

      // ---------- write burst ----------
      sd_dq_oe <= wd_take;
      if (wd_take) sd_dq_out <= wd_data;
      if (wr_start) begin
        wr_left <= cfg.burst_len - 4'd1;
        wr_ch   <= bk_acc[sel].chan;
      end else if (wr_left != 0) begin
        wr_left <= wr_left - 4'd1;
      end

      // ---------- read burst ----------
      rd_valid <= rd_sched[0];
      rd_chan  <= rd_sched_ch[0];
      if (rd_sched[0]) rd_data <= sd_dq_in;
      for (int k = 0; k < RD_PIPE - 1; k++) begin
        rd_sched[k]    <= rd_sched[k+1];
        rd_sched_ch[k] <= rd_sched_ch[k+1];
      end
      rd_sched[RD_PIPE-1]    <= 1'b0;
      rd_sched_ch[RD_PIPE-1] <= '0;
      if (sel_valid && bk_cmd[sel] == CMD_RD) begin
        for (int k = 0; k < RD_PIPE - 1; k++) begin
          if (k >= int'(cfg.cas_lat) && k < int'(cfg.cas_lat) + int'(cfg.burst_len)) begin
            rd_sched[k]    <= 1'b1;
            rd_sched_ch[k] <= bk_acc[sel].chan;
          end
        end
      end
    end
  end

  assign sd_dqm = '0;   // no byte masking: whole words are always written

  // one command per cycle: the sequence never overlaps a bank grant
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(seq_cmd_valid && sel_valid));
  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bk_grant));

endmodule
