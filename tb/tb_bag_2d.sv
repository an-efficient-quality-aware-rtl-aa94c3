// tb_bag_2d - self-checking testbench of the 2-D block address generator.
//
// Random blocks (origin, width, height, pitch, burst length) are walked in
// linear and in tiled layout, with random acknowledge delays. A reference
// model computes every address independently:
//   linear: base + y*pitch + x
//   tiled:  base + ((y/TH)*(pitch/TW) + x/TW)*TW*TH + (y%TH)*TW + x%TW
// with x stepping by the burst length along a line and y stepping by one.
// With the default 32 x 16 tile and an aligned base, every word of one tile
// must fall into a single DRAM row of a single bank (same row and bank
// fields), which is the point of the tile-based mapping in the document.
// Tile size and the job interface are this design's choices.
module tb_bag_2d;
  import mc_pkg::*;

  localparam int TW = 32, TH = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  logic [3:0]        burst_len;
  logic              start, we, tiled, busy, req_valid, req_we, req_ack;
  logic [ADDR_W-1:0] base, req_addr;
  logic [15:0]       pitch, x0, y0, w, h;

  bag_2d dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  function automatic logic [ADDR_W-1:0] ref_addr(input bit t, input logic [ADDR_W-1:0] b,
                                                 input int p, input int x, input int y);
    if (!t) return b + ADDR_W'(y * p + x);
    return b + ADDR_W'(((y / TH) * (p / TW) + x / TW) * TW * TH + (y % TH) * TW + x % TW);
  endfunction

  int tile_rows_ok = 0;

  task automatic run_job(input bit t, input logic wr, input logic [ADDR_W-1:0] b, input int p,
                         input int xs, input int ys, input int ww, input int hh, input int bl);
    int x, y, n;
    logic [ADDR_W-1:0] first;
    burst_len = 4'(bl);
    start = 1; we = wr; tiled = t; base = b; pitch = 16'(p);
    x0 = 16'(xs); y0 = 16'(ys); w = 16'(ww); h = 16'(hh);
    @(negedge clk);
    start = 0;
    if (ww == 0 || hh == 0) begin
      check(!busy, "empty block does not start");
      return;
    end
    x = xs; y = ys; n = 0;
    first = ref_addr(t, b, p, xs, ys);
    while (busy) begin
      check(req_valid && req_we == wr, "request valid and direction");
      check(req_addr == ref_addr(t, b, p, x, y), "block address");
      if (req_addr != ref_addr(t, b, p, x, y) && failures < 20)
        $display("  x=%0d y=%0d got %h expected %h", x, y, req_addr, ref_addr(t, b, p, x, y));
      if (t && xs % TW == 0 && ys % TH == 0 && ww <= TW && hh <= TH && b % (TW * TH) == 0)
        check(req_addr[ADDR_W-1:COL_W] == first[ADDR_W-1:COL_W], "tile stays in one DRAM row");
      if ($urandom_range(0, 1) == 0) begin
        req_ack = 1;
        @(negedge clk);
        req_ack = 0;
        n++;
        x += bl;
        if (x >= xs + ww) begin x = xs; y++; end
      end else @(negedge clk);
    end
    check(y == ys + hh && x == xs, "whole block walked");
    check(n == hh * ((ww + bl - 1) / bl), "number of bursts");
  endtask

  initial begin
    start = 0; we = 0; tiled = 0; base = '0; pitch = '0; x0 = '0; y0 = '0; w = '0; h = '0;
    req_ack = 0; burst_len = 4'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy, "idle after reset");
    run_job(0, 0, 23'h010000, 720, 16, 8, 32, 4, 4);
    run_job(1, 1, 23'h020000, 256, 32, 16, 32, 16, 4);   // exactly one tile
    run_job(1, 0, 23'h020000, 256, 0, 0, 32, 16, 8);
    run_job(0, 0, 23'h000000, 64, 0, 0, 0, 3, 4);
    for (int i = 0; i < 150; i++) begin
      int bl, p;
      bit t;
      bl = 1 << $urandom_range(0, 3);
      t  = 1'($urandom_range(0, 1));
      p  = TW * $urandom_range(1, 24);
      if ($urandom_range(0, 2) == 0)
        run_job(t, 1'($urandom_range(0, 1)), ADDR_W'(TW * TH * $urandom_range(0, 1000)), p,
                TW * $urandom_range(0, p / TW - 1), TH * $urandom_range(0, 20), TW, TH, bl);
      else
        run_job(t, 1'($urandom_range(0, 1)), ADDR_W'(TW * TH * $urandom_range(0, 1000)), p,
                bl * $urandom_range(0, 8), $urandom_range(0, 40), bl * $urandom_range(1, 10),
                $urandom_range(1, 12), bl);
    end
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
