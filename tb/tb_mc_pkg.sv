// tb_mc_pkg - self-checking testbench of the shared package.
//
// Checks the constants against the controller's reference configuration
// (4 banks, 16-bit data, tRP = tRCD = CAS latency = 2, tRAS = 5, burst
// length 4 at 100 MHz), the address split of the 128 Mbit x16 device
// (4096 rows, 512 columns), the burst-length helpers for 1, 2, 4 and 8, and
// the mode-register word (burst length in A[2:0], sequential bursts, CAS
// latency in A[6:4], all other bits zero). The data-sheet timing defaults
// (tWR, tRRD, tRFC, refresh interval) are this design's choices. The
// absolute-time conversion is checked against the 100 MHz defaults and
// against hand-worked 133 MHz values.
module tb_mc_pkg;
  import mc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    timing_cfg_t c;
    c = DEFAULT_TIMING;
    check(BANKS == 4 && DQ_W == 16, "4 banks, 16-bit data");
    check(ROW_W == 12 && COL_W == 9 && ADDR_W == 23, "row / column / word address widths");
    check(c.t_rp == 2 && c.t_rcd == 2 && c.cas_lat == 2, "tRP, tRCD, CAS latency");
    check(c.t_ras == 5 && c.burst_len == 4, "tRAS and burst length");
    check(c.t_wr == 2 && c.t_rrd == 2 && c.t_rfc == 7, "data-sheet timing at 100 MHz");
    check(c.ref_interval == 1562, "refresh interval 4096 rows in 64 ms at 100 MHz");
    for (int k = 0; k < 4; k++) begin
      check(bl_log2(4'(1 << k)) == 2'(k), "bl_log2");
      check(bl_code(4'(1 << k)) == 3'(k), "mode register burst code");
    end
    for (int cl = 2; cl <= 3; cl++)
      for (int k = 0; k < 4; k++) begin
        c.cas_lat   = 2'(cl);
        c.burst_len = 4'(1 << k);
        check(mode_word(c) == A_W'((cl << 4) | k), "mode register word");
      end
    // data-sheet times of a -75 speed grade part: tRP = tRCD = 20 ns,
    // tRAS = 44 ns, tWR = tRRD = 15 ns, tRFC = 66 ns, 15.625 us refresh
    // interval, 100 us power-up wait
    check(timing_from_ps(10000, 20000, 20000, 44000, 15000, 15000, 2, 66000,
                         15625000, 100000000, 2, 4) == DEFAULT_TIMING,
          "100 MHz cycle counts from data-sheet times");
    c = timing_from_ps(7500, 20000, 20000, 44000, 15000, 15000, 2, 66000,
                       15625000, 100000000, 3, 8);
    check(c.t_rp == 3 && c.t_rcd == 3 && c.t_ras == 6 && c.t_wr == 2 && c.t_rrd == 2
          && c.t_rfc == 9 && c.ref_interval == 2083 && c.init_wait == 13334
          && c.cas_lat == 3 && c.burst_len == 8, "133 MHz cycle counts from data-sheet times");
    for (int k = 1; k <= 40; k++)
      check(ps_to_cycles(k * 2500, 10000) == (k + 3) / 4, "round up to whole cycles");
    check(CMD_NOP != CMD_ACT && CMD_RD != CMD_WR, "command codes distinct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
