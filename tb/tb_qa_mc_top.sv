// tb_qa_mc_top - end-to-end testbench of the quality-aware memory controller.
//
// The controller runs with its default size (7 channels) and the default
// SDRAM timing (100 MHz values, 100 us power-up wait, 15.6 us refresh) in a
// set-top-box like setting:
//   channel 0  CPU, latency-sensitive: random single reads and some writes
//              through the address buffer, one at a time;
//   channels 1-5 bandwidth-sensitive: back-to-back address-generator jobs,
//              1-D, 2-D linear and 2-D tiled, reads and writes;
//   channel 6  don't-care: back-to-back 1-D jobs.
// The run has two phases of equal length: first without, then with the
// preemptive and column-access-inhibition services.
// Checks: every read word equals the last word written to its address (or
// zero), and goes to the right channel; the SDRAM model sees no timing
// violation; every job finishes; no don't-care grant is given while a
// bandwidth-sensitive channel with budget left has a request, and no
// other grant while a latency-sensitive request waits; a saturated
// bandwidth-sensitive channel reaches its allocation in at least 95% of
// the periods; the don't-care channel gets less than a bandwidth-sensitive
// one; and the CPU read
// latency with the services is lower than without them. Every mechanism
// of the design (preemption, CAI blocking, refresh, row hit / bank miss /
// row miss, budget demotion, period end, 1-D, 2-D linear and 2-D tiled
// jobs, don't-care grants, read/write turnaround, bank overlap) must be
// seen at least once.
// The channel classes follow the document's set-top-box setup; the traffic
// (random jobs, sizes, allocations, a 1000-cycle service period) is this
// design's own, since the document's traces are not given.
module tb_qa_mc_top;
  import mc_pkg::*;

  localparam int NCH = 7;
  localparam int PHASE_CYCLES = 24000;
  localparam logic [CNT_W-1:0] PERIOD = 16'd1000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  timing_cfg_t       cfg;
  chan_type_e        ch_type  [NCH];
  logic [CNT_W-1:0]  ch_alloc [NCH];
  logic              preempt_en, cai_en;
  logic              cpu_valid, cpu_we, cpu_ready;
  logic [ADDR_W-1:0] cpu_addr;
  logic [NCH-1:1]    ag_start, ag_busy;
  agen_cmd_t         ag_cmd [NCH-1:1];
  logic [DQ_W-1:0]   ch_wdata [NCH];
  logic [NCH-1:0]    ch_wd_take, ch_rvalid;
  logic [DQ_W-1:0]   rdata;
  logic init_done, grant_valid, col_issued, xfer_valid, ref_issued, preempted, cai_active,
        period_end;
  logic [CH_W-1:0] grant_chan, col_chan, xfer_chan;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [BA_W-1:0] sd_ba;
  logic [A_W-1:0]  sd_a;
  logic [1:0]      sd_dqm;
  logic [DQ_W-1:0] sd_dq_out, sd_dq_in;

  qa_mc_top dut (
    .clk, .rst_n, .cfg, .ch_type, .ch_alloc, .period(PERIOD), .preempt_en, .cai_en,
    .cpu_valid, .cpu_we, .cpu_addr, .cpu_ready,
    .ag_start, .ag_cmd, .ag_busy,
    .ch_wdata, .ch_wd_take, .ch_rvalid, .rdata,
    .init_done, .grant_valid, .grant_chan, .col_issued, .col_chan, .xfer_valid, .xfer_chan,
    .ref_issued, .preempted, .cai_active, .period_end,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  sdram_model mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dqm(sd_dqm), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // ---------------- data scoreboard ----------------
  function automatic logic [15:0] pat(input logic [ADDR_W-1:0] a, input int ver);
    return a[15:0] ^ {a[22:16], 9'd0} ^ 16'(ver * 16'h3A5);
  endfunction
  int                version [logic [ADDR_W-1:0]];   // writes done to a word
  int                wr_ver = 1;
  logic [ADDR_W-1:0] tag_addr [NCH];
  logic              tag_we   [NCH];
  logic [ADDR_W-1:0] wbase;
  int                widx, wver;
  logic [15:0]       rq_exp [$];
  logic [CH_W-1:0]   rq_ch  [$];
  int                words_read = 0;

  always_comb begin
    logic [ADDR_W-1:0] b;
    int i, v;
    b = col_issued ? tag_addr[col_chan] : wbase;
    i = col_issued ? 0 : widx;
    v = col_issued ? wr_ver : wver;
    for (int c = 0; c < NCH; c++) ch_wdata[c] = pat(b + ADDR_W'(i), v);
  end

  always @(posedge clk) if (rst_n) begin
    if (grant_valid) begin
      tag_addr[grant_chan] <= {dut.acc.row, dut.acc.bank, dut.acc.col};
      tag_we[grant_chan]   <= dut.acc.we;
    end
    if (col_issued) begin
      if (tag_we[col_chan]) begin
        wbase <= tag_addr[col_chan];
        widx  <= 1;
        wver  <= wr_ver;
        for (int i = 0; i < int'(cfg.burst_len); i++) version[tag_addr[col_chan] + ADDR_W'(i)] = wr_ver;
        wr_ver++;
      end else begin
        for (int i = 0; i < int'(cfg.burst_len); i++) begin
          logic [ADDR_W-1:0] a;
          a = tag_addr[col_chan] + ADDR_W'(i);
          rq_exp.push_back(version.exists(a) ? pat(a, version[a]) : 16'h0000);
          rq_ch.push_back(col_chan);
        end
      end
    end else if (|ch_wd_take) begin
      widx <= widx + 1;
    end
    if (|ch_rvalid) begin
      if (rq_exp.size() == 0) check(0, "read data without a read");
      else begin
        check(rdata == rq_exp[0], "read data match");
        check(ch_rvalid == (NCH'(1) << rq_ch[0]), "read data to the right channel");
        void'(rq_exp.pop_front());
        void'(rq_ch.pop_front());
        words_read++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_preempt = 0, n_cai_block = 0, n_ref = 0, n_hit = 0, n_bmiss = 0, n_rmiss = 0;
  int n_demote = 0, n_period = 0, n_job1d = 0, n_job2d = 0, n_job2dt = 0, n_dc_grant = 0;
  int n_turn = 0, n_overlap = 0, n_ls_grant = 0;
  logic last_col_we = 0;
  int   xfer_ch [NCH];
  int   xfer_period [NCH];
  int   bw_short = 0, bw_periods = 0, n_prio_viol = 0;
  int   req_cyc [NCH];

  always @(posedge clk) if (rst_n && init_done) begin
    if (preempted) n_preempt++;
    if (ref_issued) n_ref++;
    if (period_end) n_period++;
    for (int b = 0; b < BANKS; b++)
      if (cai_active && dut.u_mis.bk_req[b] && !dut.u_mis.bk_acc[b].ls &&
          (dut.u_mis.bk_cmd[b] == CMD_RD || dut.u_mis.bk_cmd[b] == CMD_WR)) n_cai_block++;
    // class order: no don't-care grant while a bandwidth-sensitive channel
    // with budget left has a request, no BS/DC grant while an LS request waits
    if (grant_valid && dut.u_qas.eff_type[grant_chan] == CH_DC)
      for (int c = 0; c < NCH; c++)
        if (dut.u_qas.eff_type[c] == CH_BS && dut.u_qas.c_live[c]) n_prio_viol++;
    if (grant_valid && dut.u_qas.eff_type[grant_chan] != CH_LS && dut.u_qas.ls_assert)
      n_prio_viol++;
    if (grant_valid) begin
      unique case (dut.u_qas.c_score[grant_chan][2:1])
        2'(ST_ROW_HIT):  n_hit++;
        2'(ST_BANK_MISS): n_bmiss++;
        default:         n_rmiss++;
      endcase
      if (dut.u_qas.eff_type[grant_chan] == CH_DC) n_dc_grant++;
      if (grant_chan == 0) n_ls_grant++;
    end
    for (int c = 0; c < NCH; c++) if (dut.u_qas.eff_type[c] != ch_type[c]) n_demote++;
    if (col_issued) begin
      if (tag_we[col_chan] != last_col_we) n_turn++;
      last_col_we <= tag_we[col_chan];
    end
    if ($countones(dut.u_mis.bk_busy) >= 2) n_overlap++;
    for (int c = 0; c < NCH; c++) if (dut.req_valid[c]) req_cyc[c]++;
    if (xfer_valid) begin
      xfer_ch[xfer_chan]++;
      xfer_period[xfer_chan]++;
    end
    if (period_end) begin
      for (int c = 1; c <= 5; c++) if (req_cyc[c] * 100 >= int'(PERIOD) * 95) begin
        bw_periods++;
        if (xfer_period[c] < int'(ch_alloc[c])) bw_short++;
      end
      for (int c = 0; c < NCH; c++) begin xfer_period[c] = 0; req_cyc[c] = 0; end
    end
  end

  // ---------------- CPU (channel 0) ----------------
  bit     run = 0;
  longint lat_sum [2] = '{0, 0};
  int     lat_n   [2] = '{0, 0};
  int     phase = 0;

  initial begin
    cpu_valid = 0; cpu_we = 0; cpu_addr = '0;
    wait (run);
    while (run) begin
      int t;
      logic we;
      we = ($urandom_range(0, 3) == 0);
      cpu_addr  = {ROW_W'($urandom_range(0, 63)), BA_W'($urandom_range(0, 3)),
                   COL_W'($urandom_range(0, 127) * 4)};
      cpu_we    = we;
      cpu_valid = 1;
      @(negedge clk);
      while (!cpu_ready) @(negedge clk);
      @(posedge clk);
      cpu_valid = 0;
      t = 0;
      if (!we) begin
        while (!ch_rvalid[0]) begin @(posedge clk); t++; end
        lat_sum[phase] += t;
        lat_n[phase]++;
      end else begin
        while (!(col_issued && col_chan == 0)) @(posedge clk);
      end
      repeat ($urandom_range(10, 40)) @(negedge clk);
    end
  end

  // ---------------- address-generator channels ----------------
  for (genvar c = 1; c < NCH; c++) begin : g_drv
    initial begin
      int k;
      k = 0;
      ag_start[c] = 0;
      ag_cmd[c]   = '0;
      wait (run);
      while (run) begin
        agen_cmd_t j;
        j        = '0;
        j.we     = (k % 3 == 0);
        j.base   = ADDR_W'(c) << 18;
        if (c == 6 || k % 3 == 0) begin
          j.mode2d = 0;
          j.base   = j.base + ADDR_W'($urandom_range(0, 1023) * 4);
          j.len    = 16'd64;
        end else begin
          j.mode2d = 1;
          j.tiled  = (k % 3 == 1);
          j.pitch  = 16'd256;
          j.x0     = 16'($urandom_range(0, 55) * 4);
          j.y0     = 16'($urandom_range(0, 63));
          j.w      = 16'd16;
          j.h      = 16'd4;
        end
        ag_cmd[c]   = j;
        ag_start[c] = 1;
        @(negedge clk);
        ag_start[c] = 0;
        @(negedge clk);
        if (!ag_busy[c]) check(0, "job accepted");
        while (ag_busy[c] && run) @(negedge clk);
        if (!ag_busy[c]) begin
          if (!j.mode2d) n_job1d++;
          else if (j.tiled) n_job2dt++;
          else n_job2d++;
        end
        k++;
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    cfg = DEFAULT_TIMING;
    ch_type[0] = CH_LS; ch_alloc[0] = 16'd150;
    for (int c = 1; c <= 5; c++) begin ch_type[c] = CH_BS; ch_alloc[c] = 16'd100; end
    ch_type[6] = CH_DC; ch_alloc[6] = 16'd0;
    preempt_en = 0; cai_en = 0;
    for (int c = 0; c < NCH; c++) begin xfer_ch[c] = 0; xfer_period[c] = 0; req_cyc[c] = 0;
                                        tag_addr[c] = '0; tag_we[c] = 0; end
    wbase = '0; widx = 0; wver = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    check(mem.n_mrs == 1 && mem.n_ref == 2, "power-up sequence");
    // phase 0: no services
    run = 1;
    repeat (PHASE_CYCLES) @(negedge clk);
    // phase 1: preemptive and CAI services
    phase = 1;
    preempt_en = 1; cai_en = 1;
    repeat (PHASE_CYCLES) @(negedge clk);
    run = 0;
    repeat (2000) @(negedge clk);
    check(rq_exp.size() == 0, "all reads returned");
    check(mem.violations == 0, "SDRAM timing respected");
    check(words_read > 1000, "reads performed");
    check(n_prio_viol == 0, "channel class order kept");
    $display("saturated bandwidth-sensitive channel periods: %0d, below allocation: %0d",
             bw_periods, bw_short);
    check(bw_short * 100 <= bw_periods * 5,
          "saturated bandwidth-sensitive channels reach their allocation in 95% of periods");
    check(xfer_ch[6] < xfer_ch[1], "don't-care channel gets less than bandwidth-sensitive");
    $display("CPU read latency: no services %0d.%02d, with services %0d.%02d cycles (%0d / %0d reads)",
             lat_sum[0] / lat_n[0], (lat_sum[0] * 100 / lat_n[0]) % 100,
             lat_sum[1] / lat_n[1], (lat_sum[1] * 100 / lat_n[1]) % 100, lat_n[0], lat_n[1]);
    check(lat_n[0] > 50 && lat_n[1] > 50, "CPU reads in both phases");
    check(lat_sum[1] * lat_n[0] < lat_sum[0] * lat_n[1], "services shorten CPU latency");
    $display("service cycles per channel: %0d %0d %0d %0d %0d %0d %0d",
             xfer_ch[0], xfer_ch[1], xfer_ch[2], xfer_ch[3], xfer_ch[4], xfer_ch[5], xfer_ch[6]);
    $display("mechanisms: preempt=%0d cai_block=%0d refresh=%0d hit=%0d bank_miss=%0d row_miss=%0d",
             n_preempt, n_cai_block, n_ref, n_hit, n_bmiss, n_rmiss);
    $display("            demoted=%0d periods=%0d jobs1d=%0d jobs2d=%0d jobs2d_tiled=%0d dc_grants=%0d",
             n_demote, n_period, n_job1d, n_job2d, n_job2dt, n_dc_grant);
    $display("            turnarounds=%0d overlap_cycles=%0d ls_grants=%0d bw_periods=%0d",
             n_turn, n_overlap, n_ls_grant, bw_periods);
    check(n_preempt > 0,   "preemption happened");
    check(n_cai_block > 0, "column-access inhibition happened");
    check(n_ref > 0,       "refresh happened");
    check(n_hit > 0 && n_bmiss > 0 && n_rmiss > 0, "row hit, bank miss and row miss seen");
    check(n_demote > 0,    "budget demotion to don't-care happened");
    check(n_period > 2,    "service periods ended");
    check(n_job1d > 0 && n_job2d > 0 && n_job2dt > 0, "1-D, 2-D and tiled 2-D jobs done");
    check(n_dc_grant > 0,  "don't-care grants happened");
    check(n_turn > 0,      "read/write turnarounds happened");
    check(n_overlap > 0,   "bank-parallel processing happened");
    check(bw_periods > 0,  "bandwidth periods measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000 + 2 * PHASE_CYCLES + 6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
