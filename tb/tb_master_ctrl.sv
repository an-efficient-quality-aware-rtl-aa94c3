// tb_master_ctrl - self-checking testbench of the master controller.
//
// The master controller is connected to a real time wheel and to the SDRAM
// model. Four simple bank drivers in the testbench stand in for the bank
// controllers: each takes a random access (row, column, direction, LS flag),
// requests PRE / ACT / column commands as its bank needs them and waits tRP
// and tRCD itself. Checks:
//  * power-up: PALL, two REF and a LOAD MODE REGISTER with the configured
//    burst length and CAS latency before any access; init_done afterwards;
//  * a granted command appears on the pins one cycle later, with bank and
//    row/column address; at most one grant per cycle;
//  * an LS bank request wins over a normal request of the same command;
//  * while column-access inhibit is active, no normal READ/WRITE is granted;
//  * periodic refresh happens; the SDRAM model sees no timing violation;
//  * write data reach the SDRAM and read data come back with the right tag.
// Command arbitration between banks and the pin registers are this design's
// choices; the master role (init, refresh, command issue) follows the
// document's MIS-II.
module tb_master_ctrl;
  import mc_pkg::*;

  localparam int NB = BANKS;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  timing_cfg_t cfg;
  logic [NB-1:0] bk_req, bk_block, bk_busy, bk_grant, pre_ok;
  sd_cmd_e       bk_cmd [NB];
  access_t       bk_acc [NB];
  logic hold, close_all, init_done, act_ok, rd_ok, wr_ok, tw_quiet, issue_valid;
  sd_cmd_e issue_cmd;
  logic [BA_W-1:0] issue_bank;
  logic cai_active, col_issued, col_ls, xfer_valid, ref_issued, wd_take, rd_valid;
  logic [CH_W-1:0] col_chan, xfer_chan, wd_chan, rd_chan;
  logic [DQ_W-1:0] wd_data, rd_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [BA_W-1:0] sd_ba;
  logic [A_W-1:0]  sd_a;
  logic [1:0]      sd_dqm;
  logic [DQ_W-1:0] sd_dq_out, sd_dq_in;

  master_ctrl dut (.*);

  time_wheel tw (
    .clk, .rst_n, .cfg, .issue_valid, .issue_cmd, .issue_bank,
    .act_ok, .pre_ok, .rd_ok, .wr_ok, .quiet(tw_quiet)
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
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  function automatic logic [15:0] pat(input logic [ADDR_W-1:0] a);
    return a[15:0] ^ 16'hC3A5 ^ {a[22:16], 9'd0};
  endfunction
  bit written [logic [ADDR_W-1:0]];

  // ---------------- bank drivers ----------------
  bit          j_valid [NB];
  bit          b_open  [NB];
  int          b_row   [NB];
  int          b_wait  [NB];
  logic [ADDR_W-1:0] tag_addr [8];
  logic        tag_we [8];

  always_comb
    for (int b = 0; b < NB; b++) begin
      bk_busy[b] = j_valid[b];
      bk_req[b]  = j_valid[b] && b_wait[b] == 0;
      if (!b_open[b])                          bk_cmd[b] = CMD_ACT;
      else if (b_row[b] != int'(bk_acc[b].row)) bk_cmd[b] = CMD_PRE;
      else                                      bk_cmd[b] = bk_acc[b].we ? CMD_WR : CMD_RD;
    end

  // ---------------- write data and read scoreboard ----------------
  logic [ADDR_W-1:0] wbase;
  int                widx;
  logic [ADDR_W-1:0] rq_addr [$];
  logic [CH_W-1:0]   rq_tag  [$];
  int                rd_word = 0, reads_ok = 0;

  always_comb begin
    logic [ADDR_W-1:0] base;
    int i;
    base = col_issued ? tag_addr[col_chan] : wbase;
    i = col_issued ? 0 : widx;
    wd_data = pat(base + ADDR_W'(i));
  end

  // ---------------- monitors ----------------
  bit      prev_valid = 0;
  sd_cmd_e prev_cmd;
  int      prev_bank, prev_row, prev_col;
  int      n_ls_wins = 0, n_cai_blocks = 0, n_refs = 0, first_act_seen = 0;

  always @(posedge clk) if (rst_n) begin
    check($onehot0(bk_grant), "one grant per cycle");
    // command on the pins one cycle after the grant
    if (prev_valid) begin
      check(!sd_cs_n, "granted command on the pins");
      unique case (prev_cmd)
        CMD_ACT: check({sd_ras_n, sd_cas_n, sd_we_n} == 3'b011 && int'(sd_a) == prev_row,
                       "ACT pins and row");
        CMD_PRE: check({sd_ras_n, sd_cas_n, sd_we_n} == 3'b010 && !sd_a[10], "PRE pins");
        CMD_RD:  check({sd_ras_n, sd_cas_n, sd_we_n} == 3'b101 && int'(sd_a[8:0]) == prev_col,
                       "READ pins and column");
        CMD_WR:  check({sd_ras_n, sd_cas_n, sd_we_n} == 3'b100 && int'(sd_a[8:0]) == prev_col,
                       "WRITE pins and column");
        default: ;
      endcase
      check(int'(sd_ba) == prev_bank, "bank pins");
    end
    prev_valid = |bk_grant;
    if (|bk_grant) begin
      int g;
      g = 0;
      for (int b = 0; b < NB; b++) if (bk_grant[b]) g = b;
      prev_cmd = bk_cmd[g]; prev_bank = g;
      prev_row = int'(bk_acc[g].row); prev_col = int'(bk_acc[g].col);
      check(init_done, "no access command before init_done");
      // LS priority among requests of the same command kind
      if (!bk_acc[g].ls && bk_cmd[g] != CMD_PRE)
        for (int b = 0; b < NB; b++)
          check(!(bk_req[b] && bk_acc[b].ls && bk_cmd[b] == bk_cmd[g]), "LS request first");
      if (bk_acc[g].ls) n_ls_wins++;
      if (cai_active && (bk_cmd[g] == CMD_RD || bk_cmd[g] == CMD_WR))
        check(bk_acc[g].ls, "column-access inhibit");
    end
    if (cai_active)
      for (int b = 0; b < NB; b++)
        if (bk_req[b] && !bk_acc[b].ls && (bk_cmd[b] == CMD_RD || bk_cmd[b] == CMD_WR)) n_cai_blocks++;
    if (ref_issued) n_refs++;
    if (mem.n_act > 0 && !first_act_seen) begin
      first_act_seen = 1;
      check(mem.n_pall >= 1 && mem.n_ref >= 2 && mem.n_mrs == 1, "power-up sequence before first ACT");
    end
    // scoreboard
    if (wd_take) begin
      if (col_issued) begin wbase <= tag_addr[col_chan]; widx <= 1; end
      else widx <= widx + 1;
    end
    if (col_issued && !tag_we[col_chan]) begin
      rq_addr.push_back(tag_addr[col_chan]);
      rq_tag.push_back(col_chan);
    end
    if (rd_valid) begin
      if (rq_addr.size() == 0) check(0, "read data without a read");
      else begin
        logic [ADDR_W-1:0] a;
        a = rq_addr[0] + ADDR_W'(rd_word);
        check(rd_data == (written.exists(a) ? pat(a) : 16'h0), "read data");
        if (rd_data != (written.exists(a) ? pat(a) : 16'h0) && failures < 6)
          $display("  addr %h got %h expected %h", a, rd_data, written.exists(a) ? pat(a) : 16'h0);
        check(rd_chan == rq_tag[0], "read tag");
        reads_ok++;
        rd_word++;
        if (rd_word == int'(cfg.burst_len)) begin
          rd_word = 0;
          void'(rq_addr.pop_front());
          void'(rq_tag.pop_front());
        end
      end
    end
    // a write is visible to reads that return after this edge
    if (col_issued && tag_we[col_chan])
      for (int i = 0; i < int'(cfg.burst_len); i++) written[tag_addr[col_chan] + ADDR_W'(i)] = 1;
    // bank drivers react to grants (non-blocking: the DUT samples them at this edge)
    for (int b = 0; b < NB; b++) begin
      if (b_wait[b] > 0) b_wait[b] <= b_wait[b] - 1;
      if (bk_grant[b]) begin
        unique case (bk_cmd[b])
          CMD_PRE: begin b_open[b] <= 0; b_wait[b] <= int'(cfg.t_rp) - 1; end
          CMD_ACT: begin b_open[b] <= 1; b_row[b] <= int'(bk_acc[b].row); b_wait[b] <= int'(cfg.t_rcd) - 1; end
          default: j_valid[b] <= 0;
        endcase
      end
    end
    if (close_all) for (int b = 0; b < NB; b++) b_open[b] <= 0;
  end

  // new accesses are loaded at the negative edge when the bank is free
  int n_jobs = 0;
  always @(negedge clk) begin
    bk_block = '0;
    if (rst_n && !hold && n_jobs < 3000)
      for (int b = 0; b < NB; b++)
        if (!j_valid[b] && $urandom_range(0, 2) == 0) begin
          access_t a;
          logic [ADDR_W-1:0] wa;
          a = '0;
          a.row  = ROW_W'($urandom_range(0, 5));
          a.bank = BA_W'(b);
          a.col  = COL_W'(int'(cfg.burst_len) * $urandom_range(0, 7));
          a.we   = ($urandom_range(0, 1) == 0);
          a.ls   = ($urandom_range(0, 4) == 0);
          a.chan = CH_W'(b);
          wa = {a.row, a.bank, a.col};
          tag_addr[b] = wa;
          tag_we[b]   = a.we;
          bk_acc[b]   = a;
          j_valid[b]  = 1;
          b_wait[b]   = 1;       // the bank takes the access this cycle
          bk_block[b] = 1;
          n_jobs++;
        end
    cai_active = ($urandom_range(0, 3) == 0);
  end

  initial begin
    cfg = DEFAULT_TIMING;
    cfg.init_wait    = 16'd40;
    cfg.ref_interval = 16'd400;
    for (int b = 0; b < NB; b++) begin
      j_valid[b] = 0; b_open[b] = 0; b_row[b] = 0; b_wait[b] = 0; bk_acc[b] = '0;
    end
    for (int i = 0; i < 8; i++) begin tag_addr[i] = '0; tag_we[i] = 0; end
    wbase = '0; widx = 0; cai_active = 0; bk_block = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    check(mem.n_pall == 1 && mem.n_ref == 2 && mem.n_mrs == 1 && mem.n_act == 0,
          "power-up sequence PALL, 2xREF, MRS");
    check(mem.bl == int'(cfg.burst_len) && mem.cl == int'(cfg.cas_lat), "mode register contents");
    while (n_jobs < 3000) @(negedge clk);
    while (j_valid[0] || j_valid[1] || j_valid[2] || j_valid[3] || rq_addr.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    $display("jobs %0d, LS grants %0d, inhibited column requests %0d, refreshes %0d, read words %0d",
             n_jobs, n_ls_wins, n_cai_blocks, n_refs, reads_ok);
    check(n_refs >= 3, "periodic refresh");
    check(n_cai_blocks > 0 && n_ls_wins > 0, "inhibit and LS cases exercised");
    check(mem.violations == 0, "SDRAM timing respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (jobs %0d)", n_jobs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
