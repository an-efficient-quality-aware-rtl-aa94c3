// qas - quality-aware scheduler (layer 1 of the memory controller).
//
// Each of the NCH channels is programmed as latency-sensitive (LS),
// bandwidth-sensitive (BS) or don't-care (DC) and, for LS and BS, with a
// number of service cycles (data-bus cycles) it may use per service period.
// Every cycle at most one channel request is granted and sent to MIS-II:
//   1. If some LS channel has a request, only LS channels are considered:
//      round robin among them. If an LS access is already being served, or
//      the target bank cannot take it, the winner stays pending. An LS grant
//      carries the preemptive flag (when enabled) and starts the CAI service
//      (when enabled), which lasts until its column command is issued.
//   2. Else BS requests are sorted by DRAM status: row hit, then bank miss,
//      then row miss, and within a status the request with the same
//      direction (read/write) as the last grant first; round robin breaks
//      ties.
//      If no BS request can be taken this cycle (its bank is busy), nothing
//      is granted: DC requests are not served while a BS request waits.
//   3. Else (no BS request at all) DC requests, sorted the same way.
// An LS or BS channel that has used its allocation in the current period is
// treated as DC until the period ends (reset of all channel settings).
//
// Interface: req_valid/req_we/req_addr per channel; req_ack pulses in the
// cycle a request is taken (the channel then presents its next request).
// A channel has at most one access in MIS-II before its column command is
// issued (col_issued), so data come back in request order per channel.
// The period is counted in clock cycles (every clock cycle is one potential
// service cycle).
// The scheduling order, the three channel classes, the service-cycle budgets
// and the two services follow the document; the period counting, the
// one-access-per-channel rule and the exact grant pipeline are this design's
// choices.
module qas
  import mc_pkg::*;
#(
  parameter int NCH   = 7,
  parameter int NBANK = BANKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  chan_type_e            ch_type  [NCH],
  input  logic [CNT_W-1:0]      ch_alloc [NCH],   // service cycles per period
  input  logic [CNT_W-1:0]      period,           // clock cycles per period
  input  logic                  preempt_en,
  input  logic                  cai_en,
  // channel requests
  input  logic [NCH-1:0]        req_valid,
  input  logic [NCH-1:0]        req_we,
  input  logic [ADDR_W-1:0]     req_addr [NCH],
  output logic [NCH-1:0]        req_ack,
  // DRAM status from MIS-II
  input  logic [NBANK-1:0]      bk_ready,
  input  logic [NBANK-1:0]      bk_preempt_ready,
  input  logic [NBANK-1:0]      bk_row_open,
  input  logic [ROW_W-1:0]      bk_open_row [NBANK],
  input  logic                  col_issued,
  input  logic [CH_W-1:0]       col_chan,
  input  logic                  col_ls,
  input  logic                  xfer_valid,
  input  logic [CH_W-1:0]       xfer_chan,
  // access to MIS-II
  output logic                  acc_valid,
  output access_t               acc,
  output logic                  cai_active,
  output logic                  ls_running,
  output chan_type_e            eff_type [NCH],
  output logic                  period_end
);

  logic [CNT_W-1:0] used [NCH];
  logic [CNT_W-1:0] period_cnt;
  logic [NCH-1:0]   outstanding;
  logic             last_we;
  logic [$clog2(NCH)-1:0] rr_ls, rr_bs, rr_dc;

  // ---------------- per-channel view ----------------
  logic [ROW_W-1:0] c_row  [NCH];
  logic [BA_W-1:0]  c_bank [NCH];
  logic [COL_W-1:0] c_col  [NCH];
  logic [2:0]       c_score[NCH];   // {DRAM status, same direction}
  logic [NCH-1:0]   c_live, c_elig_ls, c_elig_norm;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      acc_status_e st;
      {c_row[c], c_bank[c], c_col[c]} = req_addr[c];
      eff_type[c] = (ch_type[c] != CH_DC && used[c] >= ch_alloc[c]) ? CH_DC : ch_type[c];
      if (!bk_row_open[c_bank[c]])                    st = ST_BANK_MISS;
      else if (bk_open_row[c_bank[c]] == c_row[c])    st = ST_ROW_HIT;
      else                                            st = ST_ROW_MISS;
      c_score[c]     = {st, req_we[c] == last_we};
      c_live[c]      = req_valid[c] && !outstanding[c];
      c_elig_ls[c]   = c_live[c] && (bk_ready[c_bank[c]] ||
                                     (preempt_en && bk_preempt_ready[c_bank[c]]));
      c_elig_norm[c] = c_live[c] && bk_ready[c_bank[c]];
    end
  end

  // ---------------- selection ----------------
  logic                   ls_assert, bs_assert, win_valid, win_ls;
  logic [$clog2(NCH)-1:0] win;

  always_comb begin
    logic [2:0] best;
    logic       found;
    logic [$clog2(NCH)-1:0] idx, ptr;
    chan_type_e want;
    idx  = 0;
    ptr  = 0;
    want = CH_BS;
    ls_assert = 1'b0;
    bs_assert = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      if (c_live[c] && eff_type[c] == CH_LS) ls_assert = 1'b1;
      if (c_live[c] && eff_type[c] == CH_BS) bs_assert = 1'b1;
    end

    win_valid = 1'b0;
    win_ls    = 1'b0;
    win       = '0;
    best      = '0;
    found     = 1'b0;
    if (ls_assert) begin
      // latency-sensitive: plain round robin; pending while one is served
      if (!ls_running) begin
        for (int i = 1; i <= NCH; i++) begin
          idx = ($clog2(NCH))'((int'(rr_ls) + i) % NCH);
          if (!found && eff_type[idx] == CH_LS && c_elig_ls[idx]) begin
            found = 1'b1;
            win   = idx;
          end
        end
        win_valid = found;
        win_ls    = found;
      end
    end else begin
      // bandwidth-sensitive while any BS request is asserted, else
      // don't-care; sorted by DRAM status
      for (int cls = 0; cls < 2; cls++) begin
        want = (cls == 0) ? CH_BS : CH_DC;
        ptr  = (cls == 0) ? rr_bs : rr_dc;
        if ((cls == 0) == bs_assert) begin
          for (int i = 1; i <= NCH; i++) begin
            idx = ($clog2(NCH))'((int'(ptr) + i) % NCH);
            if (eff_type[idx] == want && c_elig_norm[idx] &&
                (!found || c_score[idx] > best)) begin
              found = 1'b1;
              best  = c_score[idx];
              win   = idx;
            end
          end
        end
      end
      win_valid = found;
    end
  end

  always_comb begin
    req_ack = '0;
    if (win_valid) req_ack[win] = 1'b1;
    acc_valid   = win_valid;
    acc.we      = req_we[win];
    acc.row     = c_row[win];
    acc.bank    = c_bank[win];
    acc.col     = c_col[win];
    acc.chan    = CH_W'(win);
    acc.ls      = win_ls;
    acc.preempt = win_ls && preempt_en && !bk_ready[c_bank[win]];
  end

  assign cai_active = ls_running && cai_en;
  assign period_end = (period_cnt >= period - 1'b1);

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) used[c] <= '0;
      period_cnt  <= '0;
      outstanding <= '0;
      ls_running  <= 1'b0;
      last_we     <= 1'b0;
      rr_ls       <= '0;
      rr_bs       <= '0;
      rr_dc       <= '0;
    end else begin
      // service period and bandwidth budgets
      if (period_end) begin
        period_cnt <= '0;
        for (int c = 0; c < NCH; c++) used[c] <= '0;
      end else begin
        period_cnt <= period_cnt + 1'b1;
        if (xfer_valid && used[xfer_chan] != '1)
          used[xfer_chan] <= used[xfer_chan] + 1'b1;
      end
      // outstanding accesses
      for (int c = 0; c < NCH; c++) begin
        if (win_valid && win == ($clog2(NCH))'(c))           outstanding[c] <= 1'b1;
        else if (col_issued && col_chan == CH_W'(c))         outstanding[c] <= 1'b0;
      end
      if (win_valid && win_ls)         ls_running <= 1'b1;
      else if (col_issued && col_ls)   ls_running <= 1'b0;
      if (win_valid) begin
        last_we <= req_we[win];
        if (win_ls)                        rr_ls <= win;
        else if (eff_type[win] == CH_BS)   rr_bs <= win;
        else                               rr_dc <= win;
      end
    end
  end

  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ack));
  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) |(req_ack & ~req_valid) == 1'b0);

endmodule
