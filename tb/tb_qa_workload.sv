// tb_qa_workload - constrained random access streams on the full controller.
//
// Runs the controller at its default size with the reference control set:
// 7 access initiators, 4 banks, burst length 4, and each initiator issuing
// 3 accesses every 60-cycle process period. Initiator 0 is the CPU channel
// (latency-sensitive, reads only, through the address buffer). Initiators
// 1-6 are bandwidth-sensitive address-generator channels; each access is a
// one-burst 1-D job at a random burst-aligned address, and one access in
// three is a write. An initiator waits for each access to finish before the
// next. It then waits out the rest of its process period, or starts at
// once if the period is already over.
// One parameter at a time is swept away from the reference set:
//   number of available banks 1..4 (random bank limited to 0..n-1),
//   burst length 1, 2, 4, 8,
//   number of active initiators 1..7,
//   services: none, preemptive only, CAI only, both.
// The services are on in the bank, burst and initiator sweeps.
// Each run restarts the controller from reset, with a short power-up wait,
// and measures for 6000 cycles. It reports:
//   * bandwidth: data words moved on the SDRAM bus, in MB/s at 100 MHz and
//     16 bits per word;
//   * min_latency: the mean read latency of initiator 0, in cycles from
//     cpu_valid to the first data word.
// Checks: no SDRAM timing violation; every active initiator completes
// accesses; nothing is left hanging after a run. The trends named for the
// quality-aware controller are also checked: more banks, longer bursts and
// more initiators each give more bandwidth; more initiators give a longer
// initiator-0 latency; preemption plus CAI give a shorter initiator-0
// latency than no services. The control parameters and the swept ranges
// follow the document's constrained random experiments. The initiator
// timing details and the random address ranges are this design's own.
module tb_qa_workload;
  import mc_pkg::*;

  localparam int NCH = 7;
  localparam int RUN_CYCLES = 6000;
  localparam int PROC_PERIOD = 60;
  localparam int ACCESS_NO = 3;
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
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  always_comb for (int c = 0; c < NCH; c++) ch_wdata[c] = 16'(c * 16'h1111);

  // ---------------- run state ----------------
  bit  run = 0;          // initiators may start new accesses
  bit  measure = 0;      // counting window
  int  nbank = 4;        // available banks
  int  ninit = NCH;      // active initiators
  int  words = 0;        // data words moved during the window
  longint lat_sum = 0;
  int  lat_n = 0;
  int  done_acc [NCH];
  bit  in_flight [NCH];

  always @(posedge clk) if (measure && xfer_valid) words++;

  // random burst-aligned word address in the available banks
  function automatic logic [ADDR_W-1:0] rand_addr();
    int bl, col;
    bl  = int'(cfg.burst_len);
    col = $urandom_range(0, 512 / bl - 1) * bl;
    return {ROW_W'($urandom_range(0, 63)), BA_W'($urandom_range(0, nbank - 1)), COL_W'(col)};
  endfunction

  // ---------------- initiator 0: CPU channel ----------------
  initial begin
    cpu_valid = 0; cpu_we = 0; cpu_addr = '0;
    in_flight[0] = 0;
    forever begin
      int t0;
      wait (run && ninit >= 1);
      t0 = 0;
      for (int k = 0; k < ACCESS_NO && run; k++) begin
        int t;
        in_flight[0] = 1;
        @(negedge clk); t0++;
        cpu_addr  = rand_addr();
        cpu_we    = 0;
        cpu_valid = 1;
        t = 0;
        while (!cpu_ready) begin @(negedge clk); t++; t0++; end
        @(negedge clk); t++; t0++;     // taken on the edge in between
        cpu_valid = 0;
        while (!ch_rvalid[0]) begin @(negedge clk); t++; t0++; end
        if (measure) begin lat_sum += t; lat_n++; done_acc[0]++; end
        repeat (int'(cfg.burst_len)) begin @(negedge clk); t0++; end
        in_flight[0] = 0;
      end
      while (t0 < PROC_PERIOD && run) begin @(negedge clk); t0++; end
    end
  end

  // ---------------- initiators 1-6: address-generator channels ----------------
  for (genvar c = 1; c < NCH; c++) begin : g_init
    initial begin
      ag_start[c] = 0;
      ag_cmd[c]   = '0;
      in_flight[c] = 0;
      forever begin
        int t0;
        wait (run && ninit > c);
        t0 = 0;
        for (int k = 0; k < ACCESS_NO && run; k++) begin
          agen_cmd_t j;
          j      = '0;
          j.we   = ($urandom_range(0, 2) == 0);
          j.base = rand_addr();
          j.len  = 16'(cfg.burst_len);
          in_flight[c] = 1;
          @(negedge clk);
          ag_cmd[c]   = j;
          ag_start[c] = 1;
          @(negedge clk);
          ag_start[c] = 0;
          t0 += 2;
          while (ag_busy[c]) begin @(negedge clk); t0++; end
          if (measure) done_acc[c]++;
          in_flight[c] = 0;
        end
        while (t0 < PROC_PERIOD && run) begin @(negedge clk); t0++; end
      end
    end
  end

  // ---------------- one configuration ----------------
  task automatic run_cfg(input int banks, input int bl, input int inits, input bit pre,
                         input bit cai, output int mbps, output int lat);
    bit idle;
    int wait_cyc;
    rst_n = 0;
    cfg = DEFAULT_TIMING;
    cfg.burst_len = 4'(bl);
    cfg.init_wait = 16'd100;
    nbank = banks;
    ninit = inits;
    preempt_en = pre;
    cai_en = cai;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    for (int c = 0; c < NCH; c++) done_acc[c] = 0;
    words = 0; lat_sum = 0; lat_n = 0;
    run = 1;
    repeat (200) @(negedge clk);   // settle into steady state
    measure = 1;
    repeat (RUN_CYCLES) @(negedge clk);
    measure = 0;
    run = 0;
    // drain: every initiator finishes its access and the controller empties
    wait_cyc = 0;
    do begin
      @(negedge clk);
      wait_cyc++;
      idle = 1;
      for (int c = 0; c < NCH; c++) if (in_flight[c]) idle = 0;
    end while (!idle && wait_cyc < 5000);
    check(idle, "all accesses finish after a run");
    repeat (50) @(negedge clk);
    for (int c = 0; c < NCH; c++)
      if (c < inits) check(done_acc[c] > 0, "active initiator served");
    check(mem.violations == 0, "SDRAM timing respected");
    mbps = int'((longint'(words) * 200) / RUN_CYCLES);   // 2 bytes per word at 100 MHz
    lat  = (lat_n > 0) ? int'((lat_sum * 10) / lat_n) : 0; // tenths of a cycle
    $display("  banks=%0d BL=%0d initiators=%0d preempt=%0d cai=%0d : bandwidth %0d MB/s (%0d%% of %0d), min_latency %0d.%0d cycles",
             banks, bl, inits, pre, cai, mbps, mbps / 2, 200, lat / 10, lat % 10);
  endtask

  int bw_bank [5], lat_bank [5];
  int bw_bl [9], lat_bl [9];
  int bw_ini [8], lat_ini [8];
  int bw_srv [4], lat_srv [4];

  initial begin
    cfg = DEFAULT_TIMING;
    ch_type[0] = CH_LS;
    for (int c = 1; c < NCH; c++) ch_type[c] = CH_BS;
    for (int c = 0; c < NCH; c++) ch_alloc[c] = PERIOD;   // ample allocation
    preempt_en = 0; cai_en = 0;
    repeat (3) @(negedge clk);

    $display("number of available banks (burst 4, 7 initiators, both services):");
    for (int b = 1; b <= 4; b++) run_cfg(b, 4, 7, 1, 1, bw_bank[b], lat_bank[b]);
    $display("burst length (4 banks, 7 initiators, both services):");
    for (int k = 0; k < 4; k++) run_cfg(4, 1 << k, 7, 1, 1, bw_bl[1 << k], lat_bl[1 << k]);
    $display("number of access initiators (4 banks, burst 4, both services):");
    for (int n = 1; n <= 7; n++) run_cfg(4, 4, n, 1, 1, bw_ini[n], lat_ini[n]);
    $display("services (4 banks, burst 4, 7 initiators): none, preemptive, CAI, both:");
    for (int s = 0; s < 4; s++) run_cfg(4, 4, 7, s[0], s[1], bw_srv[s], lat_srv[s]);

    check(bw_bank[4] > bw_bank[1], "more banks give more bandwidth");
    check(bw_bl[8] > bw_bl[1], "longer bursts give more bandwidth");
    check(bw_ini[7] > bw_ini[1], "more initiators give more bandwidth");
    check(lat_ini[7] > lat_ini[1], "more initiators give a longer initiator-0 latency");
    check(lat_srv[3] < lat_srv[0], "preemption and CAI shorten the initiator-0 latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
