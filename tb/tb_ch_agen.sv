// tb_ch_agen - self-checking testbench of a channel address generator.
//
// The channel generator holds a 1-D and a 2-D generator and starts the one
// selected by the job's mode bit. The testbench starts alternating 1-D,
// 2-D linear and 2-D tiled jobs and compares every request with a reference
// address list, with random acknowledge delays; it also checks that a start
// while busy is ignored and that busy drops when the job is done. Holding
// both generator kinds in every channel is this design's choice.
module tb_ch_agen;
  import mc_pkg::*;

  localparam int TW = 32, TH = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  logic [3:0]        burst_len;
  logic              cmd_start, busy, req_valid, req_we, req_ack;
  agen_cmd_t         cmd;
  logic [ADDR_W-1:0] req_addr;

  ch_agen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  logic [ADDR_W-1:0] exp_q [$];

  function automatic logic [ADDR_W-1:0] a2d(input agen_cmd_t c, input int x, input int y);
    int p;
    p = int'(c.pitch);
    if (!c.tiled) return c.base + ADDR_W'(y * p + x);
    return c.base + ADDR_W'(((y / TH) * (p / TW) + x / TW) * TW * TH + (y % TH) * TW + x % TW);
  endfunction

  task automatic run(input agen_cmd_t c);
    int bl;
    bl = int'(burst_len);
    exp_q.delete();
    if (!c.mode2d)
      for (int k = 0; k < (int'(c.len) + bl - 1) / bl; k++) exp_q.push_back(c.base + ADDR_W'(k * bl));
    else
      for (int y = int'(c.y0); y < int'(c.y0) + int'(c.h); y++)
        for (int x = int'(c.x0); x < int'(c.x0) + int'(c.w); x += bl) exp_q.push_back(a2d(c, x, y));
    cmd = c;
    cmd_start = 1;
    @(negedge clk);
    cmd_start = 0;
    while (busy) begin
      check(exp_q.size() != 0, "no extra request");
      if (exp_q.size() != 0) check(req_valid && req_addr == exp_q[0] && req_we == c.we, "request address");
      // a second start while busy must be ignored
      if ($urandom_range(0, 20) == 0) begin
        cmd_start = 1;
        cmd.base = ~c.base;
      end
      if ($urandom_range(0, 1) == 0) begin
        req_ack = 1;
        @(negedge clk);
        req_ack = 0;
        cmd_start = 0;
        void'(exp_q.pop_front());
      end else begin
        @(negedge clk);
        cmd_start = 0;
      end
    end
    check(exp_q.size() == 0, "every request of the job issued");
  endtask

  int n1 = 0, n2 = 0, nt = 0;

  initial begin
    agen_cmd_t c;
    cmd_start = 0; cmd = '0; req_ack = 0; burst_len = 4'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !req_valid, "idle after reset");
    for (int i = 0; i < 120; i++) begin
      burst_len = 4'(1 << $urandom_range(0, 3));
      c = '0;
      c.we     = 1'($urandom);
      c.mode2d = (i % 3 != 0);
      c.tiled  = (i % 3 == 2);
      c.base   = ADDR_W'(TW * TH * $urandom_range(0, 4000));
      c.len    = 16'($urandom_range(1, 64));
      c.pitch  = 16'(TW * $urandom_range(1, 16));
      c.x0     = 16'(int'(burst_len) * $urandom_range(0, 6));
      c.y0     = 16'($urandom_range(0, 30));
      c.w      = 16'(int'(burst_len) * $urandom_range(1, 6));
      c.h      = 16'($urandom_range(1, 8));
      run(c);
      if (!c.mode2d) n1++; else if (c.tiled) nt++; else n2++;
    end
    $display("jobs: 1-D %0d, 2-D linear %0d, 2-D tiled %0d", n1, n2, nt);
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
