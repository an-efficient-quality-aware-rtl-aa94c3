// ch_agen - address generator of one multimedia channel.
//
// Holds a 1-D (linear) and a 2-D (block) built-in address generator side by
// side and starts the one selected by cmd.mode2d when a job is given
// (cmd_start while busy is low). The requests of the running generator are
// passed on to the scheduler port of the channel. The document lists one
// address generator per multimedia channel and the two generator kinds; the
// choice of both kinds in every channel, selected per job, is this design's.
module ch_agen
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        burst_len,
  input  logic              cmd_start,
  input  agen_cmd_t         cmd,
  output logic              busy,
  output logic              req_valid,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ack
);

  logic              busy1, busy2, v1, v2, we1, we2;
  logic [ADDR_W-1:0] a1, a2;

  bag_1d u_1d (
    .clk, .rst_n, .burst_len,
    .start    (cmd_start && !busy && !cmd.mode2d),
    .we       (cmd.we),
    .base     (cmd.base),
    .len      (cmd.len),
    .busy     (busy1),
    .req_valid(v1),
    .req_we   (we1),
    .req_addr (a1),
    .req_ack  (req_ack && v1)
  );

  bag_2d u_2d (
    .clk, .rst_n, .burst_len,
    .start    (cmd_start && !busy && cmd.mode2d),
    .we       (cmd.we),
    .tiled    (cmd.tiled),
    .base     (cmd.base),
    .pitch    (cmd.pitch),
    .x0       (cmd.x0),
    .y0       (cmd.y0),
    .w        (cmd.w),
    .h        (cmd.h),
    .busy     (busy2),
    .req_valid(v2),
    .req_we   (we2),
    .req_addr (a2),
    .req_ack  (req_ack && v2)
  );

  assign busy      = busy1 || busy2;
  assign req_valid = v1 || v2;
  assign req_we    = v2 ? we2 : we1;
  assign req_addr  = v2 ? a2 : a1;

  a_one_gen: assert property (@(posedge clk) disable iff (!rst_n) !(busy1 && busy2));

endmodule
