// tb_mis2 - self-checking testbench of the memory interface socket (mis2).
//
// The testbench plays the scheduler: it sends accesses to banks that report
// ready, at most one open access per channel tag, and feeds write data.
// Checks:
//  * power-up: the first access is only accepted after init_done; the model
//    must have seen PALL, two REF and MRS before any ACT;
//  * exact read latencies of an isolated access: row hit, bank miss and row
//    miss (access-to-rd_valid = 3 + [tRP] + [tRCD] + CL cycles);
//  * two row-miss reads to different banks overlap (faster than twice one);
//  * a random mix of writes then reads over all banks: every read word equals
//    the word written to that address, returned to the right tag;
//  * refresh happens and the SDRAM model records no timing violation.
// The latency formula and the bank overlap follow the document's MIS-II
// description; the three-cycle front end and the test sequence are this
// design's own.
module tb_mis2;
  import mc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  timing_cfg_t cfg;
  logic              acc_valid;
  access_t           acc;
  logic [BANKS-1:0]  bk_ready, bk_preempt_ready, bk_row_open;
  logic [ROW_W-1:0]  bk_open_row [BANKS];
  logic preempted, init_done, col_issued, col_ls, xfer_valid, ref_issued;
  logic [CH_W-1:0] col_chan, xfer_chan, wd_chan, rd_chan;
  logic wd_take, rd_valid;
  logic [DQ_W-1:0] wd_data, rd_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [BA_W-1:0] sd_ba;
  logic [A_W-1:0] sd_a;
  logic [1:0] sd_dqm;
  logic [DQ_W-1:0] sd_dq_out, sd_dq_in;

  mis2 dut (
    .clk, .rst_n, .cfg, .acc_valid, .acc,
    .bk_ready, .bk_preempt_ready, .bk_row_open, .bk_open_row, .preempted, .init_done,
    .cai_active(1'b0), .col_issued, .col_chan, .col_ls, .xfer_valid, .xfer_chan, .ref_issued,
    .wd_take, .wd_chan, .wd_data, .rd_valid, .rd_chan, .rd_data,
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

  // data pattern of a word address
  function automatic logic [15:0] pat(input logic [ADDR_W-1:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[22:16], 9'd0};
  endfunction
  // words written so far; unwritten words read back as zero from the model
  bit written [logic [ADDR_W-1:0]];
  function automatic logic [15:0] expect_word(input logic [ADDR_W-1:0] a);
    return written.exists(a) ? pat(a) : 16'h0000;
  endfunction

  // ---------------- scoreboard ----------------
  logic [ADDR_W-1:0] tag_addr [8];
  logic              tag_we   [8];
  logic [ADDR_W-1:0] wbase;
  int                widx;
  logic [ADDR_W-1:0] rq_addr [$];
  logic [CH_W-1:0]   rq_tag  [$];
  int                rd_word = 0;
  int                reads_ok = 0;

  always_comb begin
    logic [ADDR_W-1:0] b;
    int i;
    b = col_issued ? tag_addr[col_chan] : wbase;
    i = col_issued ? 0 : widx;
    wd_data = pat(b + ADDR_W'(i));
  end

  always @(posedge clk) begin
    if (wd_take) begin
      if (col_issued) begin wbase <= tag_addr[col_chan]; widx <= 1; end
      else widx <= widx + 1;
    end
    if (col_issued && !tag_we[col_chan] && rst_n) begin
      rq_addr.push_back(tag_addr[col_chan]);
      rq_tag.push_back(col_chan);
    end
    if (rd_valid && rst_n) begin
      if (rq_addr.size() == 0) check(0, "read data without a read");
      else begin
        check(rd_data == expect_word(rq_addr[0] + ADDR_W'(rd_word)), "read data match");
        if (rd_data != expect_word(rq_addr[0] + ADDR_W'(rd_word)))
          $display("  got %h expected %h (addr %h word %0d)", rd_data, expect_word(rq_addr[0] + ADDR_W'(rd_word)), rq_addr[0], rd_word);
        check(rd_chan == rq_tag[0], "read data tag");
        if (rd_data == expect_word(rq_addr[0] + ADDR_W'(rd_word))) reads_ok++;
        rd_word++;
        if (rd_word == int'(cfg.burst_len)) begin
          rd_word = 0;
          void'(rq_addr.pop_front());
          void'(rq_tag.pop_front());
        end
      end
    end
  end

  // ---------------- driver ----------------
  function automatic logic [ADDR_W-1:0] mk(input int row, input int bank, input int col);
    return {ROW_W'(row), BA_W'(bank), COL_W'(col)};
  endfunction

  // send one access and wait for the tag's column command
  task automatic send(input logic we, input logic [ADDR_W-1:0] a, input int tag);
    while (!bk_ready[a[COL_W +: BA_W]]) @(negedge clk);
    acc_valid  = 1;
    acc        = '0;
    acc.we     = we;
    {acc.row, acc.bank, acc.col} = a;
    acc.chan   = CH_W'(tag);
    tag_addr[tag] = a;
    tag_we[tag]   = we;
    if (we) for (int i = 0; i < int'(cfg.burst_len); i++) written[a + ADDR_W'(i)] = 1;
    @(negedge clk);
    acc_valid = 0;
  endtask

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (dut.u_master.bk_busy != 0 || dut.u_master.rd_busy || dut.u_master.wr_left != 0
           || rq_addr.size() != 0) @(negedge clk);
    repeat (12) @(negedge clk);
  endtask

  // latency of one isolated read: cycles from the send to the first rd_valid
  task automatic lat_read(input logic [ADDR_W-1:0] a, output int lat);
    int t0;
    while (!bk_ready[a[COL_W +: BA_W]]) @(negedge clk);
    t0 = 0;
    fork
      send(0, a, 0);
      begin
        @(posedge clk);
        while (!rd_valid) begin @(posedge clk); t0++; end
      end
    join
    lat = t0;
    wait_idle();
  endtask

  int lat_hit, lat_bmiss, lat_rmiss, t_two;
  logic [ADDR_W-1:0] wr_list [64];

  initial begin
    cfg = DEFAULT_TIMING;
    cfg.init_wait    = 16'd30;
    cfg.ref_interval = 16'd300;
    acc_valid = 0;
    acc = '0;
    wbase = '0;
    widx = 0;
    for (int i = 0; i < 8; i++) begin tag_addr[i] = '0; tag_we[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(bk_ready == '0, "no access accepted during power-up");
    while (!init_done) @(negedge clk);
    check(mem.n_pall == 1 && mem.n_ref == 2 && mem.n_mrs == 1 && mem.n_act == 0,
          "power-up sequence PALL, 2xREF, MRS");
    @(negedge clk);

    // write a known word block into bank 1 row 19 and bank 2 row 8
    send(1, mk(19, 1, 16), 1);
    send(1, mk(8, 2, 28), 2);
    wait_idle();

    // ---- latencies (burst 4, CL 2, tRP 2, tRCD 2) ----
    lat_read(mk(19, 1, 16), lat_hit);      // row 19 open in bank 1
    lat_read(mk(5, 3, 0), lat_bmiss);      // bank 3 closed
    lat_read(mk(8, 1, 0), lat_rmiss);      // bank 1 open at row 19
    $display("latency hit=%0d bank-miss=%0d row-miss=%0d", lat_hit, lat_bmiss, lat_rmiss);
    check(lat_hit   == 3 + int'(cfg.cas_lat), "row-hit read latency");
    check(lat_bmiss == 3 + int'(cfg.t_rcd) + int'(cfg.cas_lat), "bank-miss read latency");
    check(lat_rmiss == 3 + int'(cfg.t_rp) + int'(cfg.t_rcd) + int'(cfg.cas_lat),
          "row-miss read latency");

    // ---- two row misses in different banks overlap (bank-parallel) ----
    begin
      int t;
      // open other rows first so that both become row misses
      send(0, mk(100, 1, 0), 1);
      send(0, mk(101, 2, 0), 2);
      wait_idle();
      t = 0;
      fork
        begin send(0, mk(19, 1, 16), 1); send(0, mk(8, 2, 28), 2); end
        begin
          int n;
          n = 0;
          @(posedge clk);
          while (n < 2 * int'(cfg.burst_len)) begin
            @(posedge clk); t++;
            if (rd_valid) n++;
          end
        end
      join
      t_two = t;
      $display("two row-miss reads in different banks: %0d cycles (one alone: %0d)",
               t_two, lat_rmiss + int'(cfg.burst_len));
      check(t_two < 2 * (lat_rmiss + int'(cfg.burst_len) - 1), "different-bank accesses overlap");
      wait_idle();
    end

    // ---- random writes then reads over all banks ----
    for (int i = 0; i < 64; i++) begin
      wr_list[i] = mk($urandom_range(0, 7), $urandom_range(0, 3), 4 * $urandom_range(0, 127));
      for (int j = 0; j < i; j++) if (wr_list[j] == wr_list[i]) wr_list[i] = mk(200 + i, i % 4, 0);
      send(1, wr_list[i], i % 8);
    end
    wait_idle();
    for (int i = 0; i < 64; i++) send(0, wr_list[63 - i], i % 8);
    wait_idle();
    check(reads_ok >= 64 * int'(cfg.burst_len), "all random reads returned");
    check(rq_addr.size() == 0, "no read left outstanding");
    check(mem.n_ref > 2, "auto refresh issued");
    check(mem.violations == 0, "SDRAM timing respected");
    $display("model: act=%0d pre=%0d rd=%0d wr=%0d ref=%0d viol=%0d",
             mem.n_act, mem.n_pre, mem.n_rd, mem.n_wr, mem.n_ref, mem.violations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (init_done=%0b bank ready=%b busy=%b reads pending=%0d)",
             init_done, bk_ready, dut.u_master.bk_busy, rq_addr.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
