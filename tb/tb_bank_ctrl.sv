// tb_bank_ctrl - self-checking testbench of one bank controller.
//
// The testbench plays the master controller: it grants requested commands
// after random delays (never in the cycle a new access is taken) and keeps a
// model of the bank (open or closed, open row). Checks:
//  * a READ/WRITE is only granted with the access's row open, ACT only on a
//    closed bank, PRE only on an open bank;
//  * the command count of an access follows its DRAM status (row hit: column
//    only; bank miss: ACT + column; row miss: PRE + ACT + column);
//  * after PRE the next request comes exactly tRP cycles later, after ACT the
//    column request exactly tRCD cycles later (the shared NOP state);
//  * an LS access with the preempt flag is taken while a normal access waits
//    in PRE/ACT/COL, is served first, and the parked access then completes;
//  * no access is taken while hold is high; close_all marks the bank closed.
// The state machine follows the document's shared-state FSM; the exact
// handshake is this design's own.
module tb_bank_ctrl;
  import mc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;

  timing_cfg_t cfg;
  logic        acc_valid, acc_ready, preempt_ready, preempted, row_open, busy;
  access_t     acc, cmd_acc;
  logic [ROW_W-1:0] open_row;
  logic        cmd_req, cmd_grant, hold, close_all;
  sd_cmd_e     cmd;

  bank_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // bank model
  bit m_open = 0;
  int m_row  = 0;
  int n_cmds [8];
  int exp_cmds [8];
  bit was_parked [8];
  int done_order [$];
  int t = 0, t_pre = -100, t_act = -100, wait_since_pre = -1, wait_since_act = -1;
  bit grant_ok;     // the driver allows a grant this cycle
  int n_pre_taken = 0, n_hit = 0, n_bmiss = 0, n_rmiss = 0, gap_checks = 0;

  function automatic int expect_n(input int row);
    if (!m_open) return 2;
    return (m_row == row) ? 1 : 3;
  endfunction

  always_comb cmd_grant = cmd_req && grant_ok && !(acc_valid && (acc_ready || preempt_ready));

  always @(posedge clk) if (rst_n) begin
    t++;
    if (wait_since_pre >= 0 && cmd_req) begin
      check(t - t_pre == int'(cfg.t_rp), "ACT request tRP after PRE");
      wait_since_pre = -1; gap_checks++;
    end
    if (wait_since_act >= 0 && cmd_req) begin
      check(t - t_act == int'(cfg.t_rcd), "column request tRCD after ACT");
      wait_since_act = -1; gap_checks++;
    end
    if (cmd_grant) begin
      int c;
      c = int'(cmd_acc.chan);
      n_cmds[c]++;
      unique case (cmd)
        CMD_PRE: begin
          check(m_open, "PRE on an open bank");
          m_open = 0; t_pre = t; wait_since_pre = 0;
        end
        CMD_ACT: begin
          check(!m_open, "ACT on a closed bank");
          m_open = 1; m_row = int'(cmd_acc.row); t_act = t; wait_since_act = 0;
        end
        CMD_RD, CMD_WR: begin
          check(m_open && m_row == int'(cmd_acc.row), "column command on the open row");
          if (!was_parked[c]) check(n_cmds[c] == exp_cmds[c], "command count of the access");
          done_order.push_back(c);
        end
        default: check(0, "unexpected command");
      endcase
    end
  end

  task automatic send(input int c, input int row, input bit ls, input bit pre);
    acc = '0;
    acc.row = ROW_W'(row); acc.bank = 2'd1; acc.col = COL_W'($urandom_range(0, 511));
    acc.we = 1'($urandom); acc.chan = CH_W'(c); acc.ls = ls; acc.preempt = pre;
    n_cmds[c] = 0; exp_cmds[c] = expect_n(row); was_parked[c] = 0;
    acc_valid = 1;
    #1;
    check(preempted == pre, "preempt pulse only for a preempting access");
    @(negedge clk);
    acc_valid = 0;
  endtask

  task automatic wait_done();
    while (busy) @(negedge clk);
  endtask

  initial begin
    cfg = DEFAULT_TIMING;
    acc_valid = 0; acc = '0; hold = 0; close_all = 0; grant_ok = 0;
    for (int i = 0; i < 8; i++) begin n_cmds[i] = 0; exp_cmds[i] = 0; was_parked[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(acc_ready && !busy && !row_open, "idle and closed after reset");
    hold = 1;
    @(negedge clk);
    check(!acc_ready && !preempt_ready, "no access taken under hold");
    hold = 0;

    for (int i = 0; i < 400; i++) begin
      int row, c;
      if (i % 100 == 50) begin
        cfg.t_rp  = 4'($urandom_range(1, 4));
        cfg.t_rcd = 4'($urandom_range(1, 4));
      end
      grant_ok = 1'($urandom);
      while (!acc_ready) begin grant_ok = 1'($urandom); @(negedge clk); end
      row = $urandom_range(0, 3);
      c = i % 4;
      if (!m_open) n_bmiss++; else if (m_row == row) n_hit++; else n_rmiss++;
      send(c, row, 0, 0);
      // sometimes preempt it with an LS access
      if ($urandom_range(0, 2) == 0) begin
        int lrow;
        repeat ($urandom_range(0, 3)) begin
          grant_ok = 1'($urandom);
          @(negedge clk);
        end
        if (preempt_ready) begin
          lrow = $urandom_range(0, 3);
          was_parked[c] = 1;
          done_order.delete();
          send(7, lrow, 1, 1);
          n_pre_taken++;
          while (busy) begin grant_ok = 1'($urandom); @(negedge clk); end
          check(done_order.size() == 2 && done_order[0] == 7 && done_order[1] == c,
                "preempting access served first, parked access completes");
        end
      end
      while (busy) begin grant_ok = 1'($urandom); @(negedge clk); end
    end
    // close_all closes the bank
    close_all = 1;
    @(negedge clk);
    close_all = 0;
    check(!row_open, "close_all marks the bank closed");
    $display("accesses: hit %0d bank miss %0d row miss %0d preempted %0d gap checks %0d",
             n_hit, n_bmiss, n_rmiss, n_pre_taken, gap_checks);
    check(n_hit > 0 && n_bmiss > 0 && n_rmiss > 0 && n_pre_taken > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
