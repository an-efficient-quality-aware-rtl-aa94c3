// bank_ctrl - one bank controller of the memory interface socket (MIS-II).
//
// Each SDRAM bank has one of these. It accepts one access at a time from the
// scheduler, works out from the bank's open row whether the access is a row
// hit (column command only), a bank miss (ACT, column) or a row miss (PRE,
// ACT, column), and requests those commands one after the other from the
// master controller (cmd_req / cmd_grant, a grant completes a command in the
// same cycle).
//
// The FSM follows the shared-state style: the command states PRE, ACT and COL
// set nop_count and the return state and then all wait in the single NOP
// state, so tRP and tRCD are run-time values, not chains of states. The burst
// itself is run by the master controller, so the bank returns to IDLE as soon
// as its column command is granted and can take the next access while the
// data of the previous one is still on the bus (open-page policy: the row
// stays open).
//
// Preemption: a latency-sensitive access flagged `preempt` is also accepted
// while the bank is waiting for a grant (PRE, ACT or COL state) for a
// non-latency-sensitive access. The current access is parked in `saved`, the
// latency-sensitive one is served, and the parked access is then resumed and
// re-classified against the row the latency-sensitive access left open. The
// document describes suspension of the processed access; parking one access
// and not allowing preemption during a NOP wait are this design's choices.
//
// hold (refresh / power-up in progress) stops new accepts; close_all marks the
// bank closed after the master's PRECHARGE ALL.
module bank_ctrl
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  timing_cfg_t       cfg,
  // access from the scheduler
  input  logic              acc_valid,
  input  access_t           acc,
  output logic              acc_ready,       // can take a normal access
  output logic              preempt_ready,   // can take a preempting LS access
  output logic              preempted,       // pulse: an access was parked
  // bank status for the scheduler
  output logic              row_open,
  output logic [ROW_W-1:0]  open_row,
  output logic              busy,            // holds an access
  // command request to the master controller
  output logic              cmd_req,
  output sd_cmd_e           cmd,
  output access_t           cmd_acc,
  input  logic              cmd_grant,
  // master controller control
  input  logic              hold,
  input  logic              close_all
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_ACT, S_COL, S_NOP} state_e;

  state_e      state, ret_state;
  logic [3:0]  nop_count;
  access_t     cur, saved;
  logic        saved_valid;

  function automatic state_e classify(input logic ro, input logic [ROW_W-1:0] orow,
                                      input logic [ROW_W-1:0] row);
    if (!ro)            return S_ACT;   // bank miss
    else if (orow == row) return S_COL; // row hit
    else                return S_PRE;   // row miss
  endfunction

  logic take_norm, take_pre;
  assign acc_ready     = (state == S_IDLE) && !hold;
  assign preempt_ready = (state == S_PRE || state == S_ACT || state == S_COL) &&
                         !cur.ls && !saved_valid && !hold;
  assign take_norm = acc_valid && acc_ready;
  assign take_pre  = acc_valid && preempt_ready && acc.preempt && acc.ls;
  assign preempted = take_pre;

  assign busy    = (state != S_IDLE) || saved_valid;
  assign cmd_req = (state == S_PRE || state == S_ACT || state == S_COL);
  assign cmd_acc = cur;
  always_comb begin
    unique case (state)
      S_PRE:   cmd = CMD_PRE;
      S_ACT:   cmd = CMD_ACT;
      S_COL:   cmd = cur.we ? CMD_WR : CMD_RD;
      default: cmd = CMD_NOP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ret_state   <= S_IDLE;
      nop_count   <= '0;
      cur         <= '0;
      saved       <= '0;
      saved_valid <= 1'b0;
      row_open    <= 1'b0;
      open_row    <= '0;
    end else begin
      if (close_all) row_open <= 1'b0;
      if (take_norm) begin
        cur   <= acc;
        state <= classify(row_open, open_row, acc.row);
      end else if (take_pre) begin
        saved       <= cur;
        saved_valid <= 1'b1;
        cur         <= acc;
        state       <= classify(row_open, open_row, acc.row);
      end else begin
        unique case (state)
          S_PRE: if (cmd_grant) begin
            row_open <= 1'b0;
            if (cfg.t_rp <= 4'd1) state <= S_ACT;
            else begin
              nop_count <= cfg.t_rp - 4'd1;
              ret_state <= S_ACT;
              state     <= S_NOP;
            end
          end
          S_ACT: if (cmd_grant) begin
            row_open <= 1'b1;
            open_row <= cur.row;
            if (cfg.t_rcd <= 4'd1) state <= S_COL;
            else begin
              nop_count <= cfg.t_rcd - 4'd1;
              ret_state <= S_COL;
              state     <= S_NOP;
            end
          end
          S_COL: if (cmd_grant) begin
            if (saved_valid) begin
              cur         <= saved;
              saved_valid <= 1'b0;
              state       <= classify(1'b1, open_row, saved.row);
            end else begin
              state <= S_IDLE;
            end
          end
          S_NOP: begin
            if (nop_count <= 4'd1) state <= ret_state;
            else nop_count <= nop_count - 4'd1;
          end
          default: ;
        endcase
      end
    end
  end

  // A grant is only given for a requested command; the master never grants
  // a bank in the cycle it receives a new access.
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) cmd_grant |-> cmd_req);
  a_no_grant_on_take: assert property (@(posedge clk) disable iff (!rst_n)
                                       (take_norm || take_pre) |-> !cmd_grant);

endmodule
