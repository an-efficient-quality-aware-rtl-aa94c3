// bag_2d - two-dimensional block-based built-in address generator.
//
// For block-based processing units (motion compensation, DCT, ...) it walks
// a block of w words by h lines whose top-left corner is (x0, y0) in a frame
// that is `pitch` words wide, one burst of BL words at a time, line by line.
// Two memory layouts are supported:
//   linear (tiled = 0): addr = base + y*pitch + x
//   tiled  (tiled = 1): the frame is cut into tiles of 2**TW_LOG2 words by
//     2**TH_LOG2 lines stored one after the other, so that a small block
//     stays inside one tile, i.e. inside one DRAM row:
//       addr = base + ((y>>TH_LOG2)*(pitch>>TW_LOG2) + (x>>TW_LOG2)) * tile_size
//                   + (y mod tile_h)*tile_w + (x mod tile_w)
// The defaults make a tile 32 words x 16 lines = 512 words, one row of the
// SDRAM. The document asks for a 2-D block generator with tile-based mapping;
// the formula, the tile shape and the walking order are this design's own.
// x0 and w should be multiples of BL so that no burst crosses a tile edge.
// Interface: as bag_1d (start/busy, req_valid/req_ack).
module bag_2d
  import mc_pkg::*;
#(
  parameter int TW_LOG2 = 5,
  parameter int TH_LOG2 = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        burst_len,
  input  logic              start,
  input  logic              we,
  input  logic              tiled,
  input  logic [ADDR_W-1:0] base,
  input  logic [15:0]       pitch,
  input  logic [15:0]       x0,
  input  logic [15:0]       y0,
  input  logic [15:0]       w,
  input  logic [15:0]       h,
  output logic              busy,
  output logic              req_valid,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ack
);

  logic [15:0]       x, y, x_start, x_end, y_end, pitch_q;
  logic [ADDR_W-1:0] base_q;
  logic              tiled_q;

  always_comb begin
    logic [ADDR_W-1:0] tile_idx, in_tile;
    tile_idx = ADDR_W'(y >> TH_LOG2) * ADDR_W'(pitch_q >> TW_LOG2) + ADDR_W'(x >> TW_LOG2);
    in_tile  = (ADDR_W'(y & 16'((1 << TH_LOG2) - 1)) << TW_LOG2) +
               ADDR_W'(x & 16'((1 << TW_LOG2) - 1));
    if (tiled_q) req_addr = base_q + (tile_idx << (TW_LOG2 + TH_LOG2)) + in_tile;
    else         req_addr = base_q + ADDR_W'(y) * ADDR_W'(pitch_q) + ADDR_W'(x);
  end

  assign req_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      req_we  <= 1'b0;
      x       <= '0;
      y       <= '0;
      x_start <= '0;
      x_end   <= '0;
      y_end   <= '0;
      pitch_q <= '0;
      base_q  <= '0;
      tiled_q <= 1'b0;
    end else if (!busy) begin
      if (start && w != 0 && h != 0) begin
        busy    <= 1'b1;
        req_we  <= we;
        tiled_q <= tiled;
        base_q  <= base;
        pitch_q <= pitch;
        x       <= x0;
        y       <= y0;
        x_start <= x0;
        x_end   <= x0 + w;
        y_end   <= y0 + h - 16'd1;
      end
    end else if (req_ack) begin
      if (x + 16'(burst_len) < x_end) begin
        x <= x + 16'(burst_len);
      end else if (y != y_end) begin
        x <= x_start;
        y <= y + 16'd1;
      end else begin
        busy <= 1'b0;
      end
    end
  end

endmodule
