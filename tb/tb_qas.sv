// tb_qas - self-checking testbench of the quality-aware scheduler.
//
// The scheduler is driven with random channel requests, random bank status
// (ready, preempt-ready, open row), random column-issue and data-transfer
// reports. A reference model written from the document's scheduling
// pseudocode predicts every cycle's grant:
//  * a latency-sensitive (LS) request is served first, round robin among LS
//    channels; while an LS access is still running, other LS requests stay
//    pending and nothing else is granted;
//  * otherwise bandwidth-sensitive (BS) requests, or don't-care (DC) ones
//    when no BS request is asserted, are sorted by DRAM status (row hit >
//    bank miss > row miss), then by same direction as the last grant, then
//    round robin; a BS request whose bank is busy blocks DC grants;
//  * a channel that has used its allocation in the service period is served
//    as DC until the period ends; budgets restart every period;
//  * a channel has at most one access between grant and column command.
// It also checks the preempt flag (LS access to a busy bank with preemption
// enabled) and the column-access-inhibit output. Counting the allocation in
// data cycles per period of clock cycles is this design's choice.
module tb_qas;
  import mc_pkg::*;

  localparam int NCH = 7;
  localparam int NB  = BANKS;
  localparam int RW  = $clog2(NCH);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  chan_type_e         ch_type  [NCH];
  logic [CNT_W-1:0]   ch_alloc [NCH];
  logic [CNT_W-1:0]   period;
  logic               preempt_en, cai_en;
  logic [NCH-1:0]     req_valid, req_we, req_ack;
  logic [ADDR_W-1:0]  req_addr [NCH];
  logic [NB-1:0]      bk_ready, bk_preempt_ready, bk_row_open;
  logic [ROW_W-1:0]   bk_open_row [NB];
  logic               col_issued, col_ls, xfer_valid;
  logic [CH_W-1:0]    col_chan, xfer_chan;
  logic               acc_valid, cai_active, ls_running, period_end;
  access_t            acc;
  chan_type_e         eff_type [NCH];

  qas #(.NCH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // ---------------- reference model state ----------------
  int m_used [NCH];
  int m_pcnt = 0;
  bit m_out [NCH];
  bit m_out_ls [NCH];
  bit m_lsrun = 0;
  bit m_last_we = 0;
  int m_rr_ls = 0, m_rr_bs = 0, m_rr_dc = 0;

  function automatic chan_type_e m_eff(input int c);
    if (ch_type[c] != CH_DC && m_used[c] >= int'(ch_alloc[c])) return CH_DC;
    return ch_type[c];
  endfunction

  function automatic int m_score(input int c);
    int b, st;
    b = int'(req_addr[c][COL_W +: BA_W]);
    if (!bk_row_open[b]) st = 1;
    else if (bk_open_row[b] == req_addr[c][COL_W+BA_W +: ROW_W]) st = 2;
    else st = 0;
    return st * 2 + ((req_we[c] == m_last_we) ? 1 : 0);
  endfunction

  // expected winner, -1 for none; exp_ls says whether it is an LS grant
  int exp_win;
  bit exp_ls;
  always_comb begin
    bit any_ls, any_bs;
    int best, b;
    exp_win = -1;
    exp_ls  = 0;
    best    = -1;
    any_ls  = 0;
    any_bs  = 0;
    for (int c = 0; c < NCH; c++) begin
      if (req_valid[c] && !m_out[c] && m_eff(c) == CH_LS) any_ls = 1;
      if (req_valid[c] && !m_out[c] && m_eff(c) == CH_BS) any_bs = 1;
    end
    if (any_ls) begin
      if (!m_lsrun)
        for (int i = 1; i <= NCH; i++) begin
          int c;
          c = (m_rr_ls + i) % NCH;
          b = int'(req_addr[c][COL_W +: BA_W]);
          if (exp_win < 0 && req_valid[c] && !m_out[c] && m_eff(c) == CH_LS &&
              (bk_ready[b] || (preempt_en && bk_preempt_ready[b]))) begin
            exp_win = c; exp_ls = 1;
          end
        end
    end else begin
      // DC only when no BS request is asserted, even if no BS one can go
      for (int cls = any_bs ? 0 : 1; cls < (any_bs ? 1 : 2); cls++)
        for (int i = 1; i <= NCH; i++) begin
          int c;
          c = ((cls == 0 ? m_rr_bs : m_rr_dc) + i) % NCH;
          b = int'(req_addr[c][COL_W +: BA_W]);
          if (req_valid[c] && !m_out[c] && bk_ready[b] &&
              m_eff(c) == (cls == 0 ? CH_BS : CH_DC) && m_score(c) > best) begin
            best = m_score(c); exp_win = c;
          end
        end
    end
  end

  int n_ls = 0, n_bs = 0, n_dc = 0, n_demoted = 0, n_pre = 0, n_pend_ls = 0, n_periods = 0;

  always @(posedge clk) if (rst_n) begin
    int w;
    chan_type_e w_cls;
    w = -1;
    w_cls = CH_DC;
    for (int c = 0; c < NCH; c++) if (req_ack[c]) w = c;
    check(w == exp_win, "grant matches the scheduling rule");
    if (w != exp_win && failures < 20)
      $display("  got %0d expected %0d (ls_run %0d)", w, exp_win, m_lsrun);
    check(acc_valid == (w >= 0), "acc_valid with a grant");
    check(cai_active == (m_lsrun && cai_en), "column-access inhibit while LS runs");
    for (int c = 0; c < NCH; c++) check(eff_type[c] == m_eff(c), "effective class");
    if (w >= 0) begin
      int b;
      b = int'(req_addr[w][COL_W +: BA_W]);
      check({acc.row, acc.bank, acc.col} == req_addr[w] && acc.we == req_we[w] &&
            int'(acc.chan) == w && acc.ls == exp_ls, "access fields");
      check(acc.preempt == (exp_ls && preempt_en && !bk_ready[b]), "preempt flag");
      if (acc.preempt) n_pre++;
      if (exp_ls) n_ls++; else if (ch_type[w] == CH_BS && m_eff(w) == CH_BS) n_bs++;
      else if (ch_type[w] == CH_DC) n_dc++; else n_demoted++;
    end
    if (m_lsrun) for (int c = 0; c < NCH; c++)
      if (req_valid[c] && !m_out[c] && m_eff(c) == CH_LS) n_pend_ls++;
    // model update (classes as seen at the grant)
    if (w >= 0) w_cls = m_eff(w);
    if (m_pcnt >= int'(period) - 1) begin
      m_pcnt = 0; n_periods++;
      for (int c = 0; c < NCH; c++) m_used[c] = 0;
      check(period_end, "period end");
    end else begin
      check(!period_end, "no early period end");
      m_pcnt++;
      if (xfer_valid) m_used[xfer_chan]++;
    end
    if (col_issued) begin
      m_out[col_chan] = 0;
      if (col_ls) m_lsrun = 0;
    end
    if (w >= 0) begin
      m_out[w] = 1; m_out_ls[w] = exp_ls;
      if (exp_ls) m_lsrun = 1;
      m_last_we = req_we[w];
      if (exp_ls) m_rr_ls = w; else if (w_cls == CH_BS) m_rr_bs = w; else m_rr_dc = w;
    end
  end

  // ---------------- stimulus ----------------
  function automatic logic [ADDR_W-1:0] rnd_addr();
    return {ROW_W'($urandom_range(0, 3)), BA_W'($urandom_range(0, NB - 1)), COL_W'($urandom)};
  endfunction

  initial begin
    ch_type[0] = CH_LS;
    for (int c = 1; c < NCH - 1; c++) ch_type[c] = CH_BS;
    ch_type[NCH-1] = CH_DC;
    for (int c = 0; c < NCH; c++) begin
      ch_alloc[c] = 16'($urandom_range(5, 40));
      req_addr[c] = '0;
      m_used[c] = 0; m_out[c] = 0; m_out_ls[c] = 0;
    end
    ch_type[3] = CH_LS;    // two LS channels to exercise LS round robin
    period = 16'd200;
    preempt_en = 0; cai_en = 0;
    req_valid = '0; req_we = '0;
    bk_ready = '0; bk_preempt_ready = '0; bk_row_open = '0;
    for (int b = 0; b < NB; b++) bk_open_row[b] = '0;
    col_issued = 0; col_ls = 0; col_chan = '0; xfer_valid = 0; xfer_chan = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i == 10000) begin preempt_en = 1; cai_en = 1; end
      // new requests: a granted request is replaced by the next one
      for (int c = 0; c < NCH; c++) begin
        if (!req_valid[c] || req_ack[c]) begin
          req_valid[c] = ($urandom_range(0, 3) != 0);
          req_we[c]    = 1'($urandom);
          req_addr[c]  = rnd_addr();
        end
      end
      for (int b = 0; b < NB; b++) begin
        bk_ready[b]         = ($urandom_range(0, 2) == 0);
        bk_preempt_ready[b] = !bk_ready[b] && ($urandom_range(0, 1) == 0);
        bk_row_open[b]      = 1'($urandom);
        if ($urandom_range(0, 7) == 0) bk_open_row[b] = ROW_W'($urandom_range(0, 3));
      end
      // column command of one outstanding access
      col_issued = 0;
      if ($urandom_range(0, 2) == 0) begin
        int c;
        c = $urandom_range(0, NCH - 1);
        if (m_out[c]) begin
          col_issued = 1; col_chan = CH_W'(c); col_ls = m_out_ls[c];
        end
      end
      xfer_valid = ($urandom_range(0, 1) == 0);
      xfer_chan  = CH_W'($urandom_range(0, NCH - 1));
    end
    $display("grants: LS %0d BS %0d DC %0d demoted %0d preempt %0d; LS-pending cycles %0d; periods %0d",
             n_ls, n_bs, n_dc, n_demoted, n_pre, n_pend_ls, n_periods);
    check(n_ls > 0 && n_bs > 0 && n_dc > 0 && n_demoted > 0 && n_pre > 0 && n_pend_ls > 0,
          "every scheduling case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
