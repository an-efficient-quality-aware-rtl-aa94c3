// ch_abuf - address buffer of the CPU (latency-sensitive) channel.
//
// The CPU's accesses have no regular pattern, so this channel carries a full
// address with every access instead of a generated one. The buffer is a
// small FIFO of {we, address} entries between the CPU bus and the scheduler
// port, so that the CPU can post an access while the previous one waits for
// its grant. The document only names this buffer; the FIFO and its depth are
// this design's choice.
// Interface: in_valid/in_ready on the CPU side (taken when both are high),
// req_valid/req_we/req_addr/req_ack on the scheduler side. An entry written
// in one cycle can be requested in the next.
module ch_abuf
  import mc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_we,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              in_ready,
  output logic              req_valid,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ack
);

  localparam int PW = $clog2(DEPTH);

  logic [ADDR_W:0] mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;
  logic            push, pop;

  assign in_ready  = (count != (PW+1)'(DEPTH));
  assign req_valid = (count != 0);
  assign {req_we, req_addr} = mem[rd_ptr];
  assign push = in_valid && in_ready;
  assign pop  = req_ack && req_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= {in_we, in_addr};
        wr_ptr      <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) req_ack |-> req_valid);

endmodule
