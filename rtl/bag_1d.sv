// bag_1d - one-dimensional (linear) built-in address generator.
//
// Given a start address and a length in words, it issues the burst accesses
// that cover the range: addresses base, base+BL, base+2*BL, ... where BL is
// the programmed SDRAM burst length, ceil(len / BL) accesses in all. The
// processing unit behind it only sends the job once instead of one address
// per access, which is the point of a built-in address generator.
// Interface: a job is taken when start is high and busy is low. Requests are
// presented on req_valid/req_we/req_addr and advance on req_ack (one per
// cycle at most). busy falls in the cycle after the last ack.
// The function is the document's; counter structure and handshake are this
// design's own.
module bag_1d
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        burst_len,
  input  logic              start,
  input  logic              we,
  input  logic [ADDR_W-1:0] base,
  input  logic [15:0]       len,
  output logic              busy,
  output logic              req_valid,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ack
);

  logic [16:0] left;   // accesses still to issue

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left     <= '0;
      req_we   <= 1'b0;
      req_addr <= '0;
    end else if (!busy) begin
      if (start) begin
        left     <= (17'(len) + 17'(burst_len) - 17'd1) >> bl_log2(burst_len);
        req_we   <= we;
        req_addr <= base;
      end
    end else if (req_ack) begin
      left     <= left - 17'd1;
      req_addr <= req_addr + ADDR_W'(burst_len);
    end
  end

  assign busy      = (left != 0);
  assign req_valid = busy;

endmodule
