// tb_bag_1d - self-checking testbench of the 1-D (linear) address generator.
//
// Random jobs (base, length, write flag, burst length 1/2/4/8) are started
// and the requests are acknowledged with random delays. Every request address
// is compared with a reference list base, base+BL, ... covering ceil(len/BL)
// bursts; the write flag must follow the job; busy must drop right after the
// last acknowledge; a zero-length job must not start. The checks follow the
// linear address generator described in the document; the job interface is
// this design's own.
module tb_bag_1d;
  import mc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  logic [3:0]        burst_len;
  logic              start, we, busy, req_valid, req_we, req_ack;
  logic [ADDR_W-1:0] base, req_addr;
  logic [15:0]       len;

  bag_1d dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  task automatic run_job(input logic w, input logic [ADDR_W-1:0] b, input int n, input int bl);
    int expect_n, got;
    logic [ADDR_W-1:0] a;
    burst_len = 4'(bl);
    start = 1; we = w; base = b; len = 16'(n);
    @(negedge clk);
    start = 0;
    expect_n = (n + bl - 1) / bl;
    got = 0;
    a = b;
    if (n == 0) begin
      check(!busy && !req_valid, "zero-length job does not start");
      return;
    end
    check(busy, "busy after start");
    while (busy) begin
      check(req_valid, "request while busy");
      check(req_addr == a, "request address");
      check(req_we == w, "request direction");
      if ($urandom_range(0, 2) == 0) begin
        req_ack = 1;
        @(negedge clk);
        req_ack = 0;
        got++;
        a = a + ADDR_W'(bl);
      end else @(negedge clk);
    end
    check(got == expect_n, "number of bursts");
  endtask

  initial begin
    start = 0; we = 0; base = '0; len = '0; req_ack = 0; burst_len = 4'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !req_valid, "idle after reset");
    run_job(0, 23'h000100, 16, 4);
    run_job(1, 23'h7FFFF0, 5, 2);     // partial last burst
    run_job(0, 23'h000000, 0, 4);
    for (int i = 0; i < 200; i++) begin
      int bl;
      bl = 1 << $urandom_range(0, 3);
      run_job(1'($urandom_range(0, 1)), ADDR_W'($urandom), $urandom_range(0, 70), bl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
