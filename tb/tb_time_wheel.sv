// tb_time_wheel - self-checking testbench of the time wheel.
//
// Single commands are issued on an idle time wheel and the number of cycles
// until each permission returns is measured and compared with the SDRAM
// rules (Table II timing of the document plus this design's datasheet values
// for tRRD and tWR):
//   ACT -> next ACT after tRRD; ACT -> PRE of that bank after tRAS;
//   READ -> next READ after BL; READ -> WRITE after CL + BL + 1;
//   READ -> PRE after BL; WRITE -> PRE after BL + tWR; WRITE -> READ after BL.
// Other banks' PRE permission must not be affected. The same is repeated for
// burst lengths 1, 2, 4 and 8 and random timing values.
module tb_time_wheel;
  import mc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  timing_cfg_t      cfg;
  logic             issue_valid, act_ok, rd_ok, wr_ok, quiet;
  sd_cmd_e          issue_cmd;
  logic [BA_W-1:0]  issue_bank;
  logic [BANKS-1:0] pre_ok;

  time_wheel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // issue one command and return, for each permission, the number of cycles
  // from the issue until it is seen again (1 = allowed in the next cycle)
  int d_act, d_rd, d_wr, d_pre, d_pre_other;
  task automatic issue(input sd_cmd_e c, input int b);
    int t;
    issue_valid = 1; issue_cmd = c; issue_bank = BA_W'(b);
    @(negedge clk);
    issue_valid = 0;
    d_act = -1; d_rd = -1; d_wr = -1; d_pre = -1; d_pre_other = -1;
    for (t = 1; t < 40; t++) begin
      if (d_act < 0 && act_ok) d_act = t;
      if (d_rd  < 0 && rd_ok)  d_rd  = t;
      if (d_wr  < 0 && wr_ok)  d_wr  = t;
      if (d_pre < 0 && pre_ok[b]) d_pre = t;
      if (d_pre_other < 0 && pre_ok[(b + 1) % BANKS]) d_pre_other = t;
      @(negedge clk);
    end
    check(quiet, "quiet when all counters expired");
  endtask

  function automatic int mx1(input int v);
    return v < 1 ? 1 : v;
  endfunction

  initial begin
    issue_valid = 0; issue_cmd = CMD_NOP; issue_bank = '0;
    cfg = DEFAULT_TIMING;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(act_ok && rd_ok && wr_ok && pre_ok == '1 && quiet, "all allowed after reset");
    for (int i = 0; i < 80; i++) begin
      int bl, b;
      if (i >= 4) begin
        cfg.t_ras   = 4'($urandom_range(2, 9));
        cfg.t_rrd   = 4'($urandom_range(1, 4));
        cfg.t_wr    = 4'($urandom_range(1, 4));
        cfg.cas_lat = 2'($urandom_range(2, 3));
      end
      bl = 1 << (i % 4);
      cfg.burst_len = 4'(bl);
      b = $urandom_range(0, BANKS - 1);
      issue(CMD_ACT, b);
      check(d_act == mx1(int'(cfg.t_rrd)), "ACT to ACT = tRRD");
      check(d_pre == mx1(int'(cfg.t_ras)), "ACT to PRE = tRAS");
      check(d_pre_other == 1, "other bank PRE unaffected");
      check(d_rd == 1 && d_wr == 1, "ACT does not block the data bus");
      issue(CMD_RD, b);
      check(d_rd == bl, "READ to READ = BL");
      check(d_wr == int'(cfg.cas_lat) + bl + 1, "READ to WRITE = CL + BL + 1");
      check(d_pre == bl, "READ to PRE = BL");
      check(d_act == 1, "READ does not block ACT");
      issue(CMD_WR, b);
      check(d_rd == bl && d_wr == bl, "WRITE to READ/WRITE = BL");
      check(d_pre == bl + int'(cfg.t_wr), "WRITE to PRE = BL + tWR");
      check(d_pre_other == 1, "other bank PRE unaffected by WRITE");
    end
    // back-to-back ACTs keep the larger requirement
    cfg = DEFAULT_TIMING;
    issue_valid = 1; issue_cmd = CMD_WR; issue_bank = 2'd1;
    @(negedge clk);
    issue_cmd = CMD_ACT; issue_bank = 2'd1;
    @(negedge clk);
    issue_valid = 0;
    check(!pre_ok[1], "PRE blocked by the longer of write recovery and tRAS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
