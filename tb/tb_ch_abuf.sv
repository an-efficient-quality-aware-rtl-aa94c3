// tb_ch_abuf - self-checking testbench of the CPU channel address buffer.
//
// Random pushes from the CPU side and random acknowledges from the scheduler
// side are compared with a queue model: the request at the head must be the
// oldest entry not yet acknowledged, in_ready must be low exactly when the
// buffer is full, and req_valid high exactly when it is not empty. The FIFO
// behaviour is this design's choice for the document's address buffer.
module tb_ch_abuf;
  import mc_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  logic              in_valid, in_we, in_ready, req_valid, req_we, req_ack;
  logic [ADDR_W-1:0] in_addr, req_addr;

  ch_abuf #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  logic [ADDR_W:0] q [$];
  int pushes = 0, pops = 0, fulls = 0;

  initial begin
    in_valid = 0; in_we = 0; in_addr = '0; req_ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      // phases with more pushes and phases with more pops
      int pp;
      pp = ((i / 300) % 2 == 0) ? 3 : 1;
      in_valid = ($urandom_range(0, 3) < pp);
      in_we    = 1'($urandom);
      in_addr  = ADDR_W'($urandom);
      req_ack  = ($urandom_range(0, 3) >= pp) && (q.size() != 0);
      #1;
      check(in_ready == (q.size() < DEPTH), "in_ready matches fill level");
      check(req_valid == (q.size() != 0), "req_valid matches fill level");
      if (q.size() != 0) check({req_we, req_addr} == q[0], "head entry in order");
      if (q.size() == DEPTH) fulls++;
      @(posedge clk);
      if (req_ack) begin void'(q.pop_front()); pops++; end
      if (in_valid && in_ready) begin q.push_back({in_we, in_addr}); pushes++; end
      @(negedge clk);
    end
    $display("pushes=%0d pops=%0d full cycles=%0d", pushes, pops, fulls);
    check(fulls > 0, "buffer filled up at least once");
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
