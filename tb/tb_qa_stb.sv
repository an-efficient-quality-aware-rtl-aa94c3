// tb_qa_stb - set-top-box event scenario on the full controller.
//
// Seven processing units share the SDRAM with these classes:
//   channel 0  CPU               latency-sensitive (address buffer)
//   channel 1  transport stream  bandwidth-sensitive
//   channel 2  DSP (audio)       bandwidth-sensitive
//   channel 3  OSD               bandwidth-sensitive
//   channel 4  video decoder     bandwidth-sensitive
//   channel 5  display           bandwidth-sensitive
//   channel 6  wireless LAN      don't-care, always busy (a download)
// The 35,000-cycle run has these events:
//   5000-10000   OSD event: the OSD unit raises its demand;
//   16000-31000  interactive-TV event: the CPU demand jumps far above its
//                latency-sensitive allocation, and the total demand exceeds
//                what the SDRAM can deliver;
//   21000-31000  the TV program is paused: the video decoder stops.
// Each bandwidth-sensitive unit streams one 16-word 1-D job after another
// through its own buffer area. Every 1000-cycle service period adds its demand to
// what the unit still owes (capped at two periods of demand, as a unit with
// a buffer of that size would); the unit issues jobs while it owes words.
// The CPU posts single-burst reads to random addresses, up to its demand in
// each period, and drops what it could not issue. The service period is
// 1000 cycles, and the allocations are about 25% above the demands, so that
// a unit catching up on a backlog keeps its bandwidth-sensitive class.
// Checks, per phase (skipping the first slot of each):
//   * every bandwidth-sensitive unit receives at least 85% of its demand in
//     every phase, also while the CPU demand exceeds the SDRAM's capacity
//     (typically all of it; at least 90% over many seeds);
//   * no don't-care grant while a bandwidth-sensitive unit is eligible;
//   * the wireless LAN loses bandwidth when the interactive-TV event starts;
//   * the CPU gains bandwidth when the video decoder pauses;
//   * no SDRAM timing violation.
// The classes, the event kinds and their cycle ranges follow the document's
// set-top-box experiment. The start of the interactive-TV event (16000), the
// demand levels and the traffic shapes are this design's own.
module tb_qa_stb;
  import mc_pkg::*;

  localparam int NCH = 7;
  localparam int SLOT = 1000;
  localparam int END_CYCLE = 35000;
  localparam int JOB_WORDS = 16;
  localparam logic [CNT_W-1:0] PERIOD = 16'(SLOT);

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

  always_comb for (int c = 0; c < NCH; c++) ch_wdata[c] = 16'(c * 16'h0101);

  // ---------------- scenario ----------------
  int cyc = 0;            // cycles since init_done
  bit go = 0;
  int slot = 0;           // service periods since init_done
  always @(posedge clk) if (go) begin
    cyc <= cyc + 1;
    if (period_end) slot <= slot + 1;
  end

  // phases: 0 normal, 1 OSD event, 2 normal, 3 ITV, 4 ITV with TV paused, 5 normal
  localparam int NPH = 6;
  localparam int PH_START [NPH] = '{0, 5000, 10000, 16000, 21000, 31000};
  localparam int PH_END   [NPH] = '{5000, 10000, 16000, 21000, 31000, 35000};
  function automatic int phase_of(input int t);
    for (int p = NPH - 1; p >= 0; p--) if (t >= PH_START[p]) return p;
    return 0;
  endfunction

  // demand in words per 1000-cycle slot (percent of peak x 10)
  function automatic int demand(input int c, input int p);
    unique case (c)
      0: return (p == 3 || p == 4) ? 448 : 16;   // CPU
      1: return 128;                              // transport stream
      2: return 144;                              // DSP (audio)
      3: return (p == 1) ? 64 : 16;               // OSD
      4: return (p == 4) ? 0 : 288;               // video decoder
      5: return 144;                              // display
      default: return 1000;                       // wireless LAN: as much as it gets
    endcase
  endfunction

  // words moved per channel and phase (first slot of each phase skipped)
  int got [NCH][NPH];
  always @(posedge clk) if (go && xfer_valid && cyc < END_CYCLE) begin
    int p;
    p = phase_of(cyc);
    if (cyc >= PH_START[p] + SLOT) got[xfer_chan][p]++;
  end

  // class order: no don't-care grant while a bandwidth-sensitive channel
  // with budget left could be granted
  int n_prio_viol = 0;
  always @(posedge clk) if (go && grant_valid && dut.u_qas.eff_type[grant_chan] == CH_DC)
    for (int c = 0; c < NCH; c++)
      if (dut.u_qas.eff_type[c] == CH_BS && dut.u_qas.c_elig_norm[c]) n_prio_viol++;

  // words each unit still has to move; a new slot adds its demand, and a
  // unit that falls behind may carry up to two slots of backlog
  int owed [NCH];
  int slot_seen [NCH] = '{default: -1};

  // ---------------- CPU ----------------
  initial begin
    cpu_valid = 0; cpu_we = 0; cpu_addr = '0;
    wait (go);
    owed[0] = 0;
    while (cyc < END_CYCLE) begin
      if (slot != slot_seen[0]) begin
        slot_seen[0] = slot;
        owed[0] = demand(0, phase_of(cyc));   // the CPU drops what it could not issue
      end
      @(negedge clk);
      if (owed[0] > 0) begin
        cpu_addr  = {ROW_W'($urandom_range(0, 255)), BA_W'($urandom_range(0, 3)),
                     COL_W'($urandom_range(0, 127) * 4)};
        cpu_valid = 1;
        while (!cpu_ready) @(negedge clk);
        @(negedge clk);
        cpu_valid = 0;
        owed[0] = owed[0] - int'(cfg.burst_len);
      end
    end
  end

  // ---------------- address-generator units ----------------
  for (genvar c = 1; c < NCH; c++) begin : g_unit
    initial begin
      logic [ADDR_W-1:0] ptr;
      ag_start[c] = 0;
      ag_cmd[c]   = '0;
      ptr = ADDR_W'(c) << 19;   // own buffer area of 128 rows
      wait (go);
      owed[c] = 0;
      while (cyc < END_CYCLE) begin
        if (slot != slot_seen[c]) begin   // a new slot adds its demand
          slot_seen[c] = slot;
          owed[c] = owed[c] + demand(c, phase_of(cyc));
          if (owed[c] > 2 * demand(c, phase_of(cyc))) owed[c] = 2 * demand(c, phase_of(cyc));
        end
        if (owed[c] > 0 || c == 6) begin
          agen_cmd_t j;
          j      = '0;
          j.we   = (c == 2 || c == 4 || c == 6);   // producers write, consumers read
          j.base = ptr;
          j.len  = 16'(JOB_WORDS);
          ptr    = ptr + ADDR_W'(JOB_WORDS);
          if (ptr[18:0] == '0) ptr = ADDR_W'(c) << 19;
          @(negedge clk);
          ag_cmd[c]   = j;
          ag_start[c] = 1;
          @(negedge clk);
          ag_start[c] = 0;
          while (ag_busy[c]) @(negedge clk);
          owed[c] = owed[c] - JOB_WORDS;
        end else begin
          @(negedge clk);
        end
      end
    end
  end

  // ---------------- sequence and checks ----------------
  string name [NCH] = '{"CPU", "transport stream", "DSP", "OSD", "video decoder", "display",
                        "wireless LAN"};
  initial begin
    cfg = DEFAULT_TIMING;
    ch_type[0] = CH_LS; ch_alloc[0] = 16'd32;
    for (int c = 1; c <= 5; c++) ch_type[c] = CH_BS;
    ch_alloc[1] = 16'd160; ch_alloc[2] = 16'd180; ch_alloc[3] = 16'd80;
    ch_alloc[4] = 16'd340; ch_alloc[5] = 16'd180;
    ch_type[6] = CH_DC; ch_alloc[6] = 16'd0;
    preempt_en = 1; cai_en = 1;
    for (int c = 0; c < NCH; c++) for (int p = 0; p < NPH; p++) got[c][p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    go = 1;
    while (cyc < END_CYCLE + 500) @(negedge clk);

    $display("words per 1000 cycles in each phase (normal, OSD, normal, ITV, ITV paused, normal):");
    for (int c = 0; c < NCH; c++) begin
      string line;
      line = $sformatf("  %-17s", name[c]);
      for (int p = 0; p < NPH; p++)
        line = {line, $sformatf(" %4d/%-4d", got[c][p] * SLOT / (PH_END[p] - PH_START[p] - SLOT),
                                c == 6 ? 0 : demand(c, p))};
      $display("%s", line);
    end
    for (int c = 1; c <= 5; c++)
      for (int p = 0; p < NPH; p++)
        check(got[c][p] * SLOT * 100 >= demand(c, p) * (PH_END[p] - PH_START[p] - SLOT) * 85,
              $sformatf("%s bandwidth kept in phase %0d", name[c], p));
    check(got[6][3] * (PH_END[2] - PH_START[2] - SLOT) < got[6][2] * (PH_END[3] - PH_START[3] - SLOT),
          "wireless LAN gives way to the ITV event");
    check(got[0][4] * (PH_END[3] - PH_START[3] - SLOT) > got[0][3] * (PH_END[4] - PH_START[4] - SLOT),
          "CPU takes the bandwidth released by the paused video decoder");
    check(n_prio_viol == 0, "no don't-care grant while a bandwidth-sensitive unit is eligible");
    check(mem.violations == 0, "SDRAM timing respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
