// mc_pkg - types and constants shared by the quality-aware SDRAM controller.
//
// The SDRAM geometry is that of a 128 Mbit x16 SDR SDRAM: 4 banks, 4096 rows
// of 512 columns, 16-bit data (bank count and data width follow the
// controller's reference configuration; rows and columns come from the data
// sheet of that device). A channel word address is split {row, bank, col}.
//
// Timing values are carried at run time in timing_cfg_t so that they can be
// reprogrammed when the clock frequency changes; DEFAULT_TIMING holds the
// 100 MHz values (tRP = tRCD = CAS latency = 2, tRAS = 5, burst length 4).
// tWR, tRRD, tMRD, tRFC, the refresh interval and the power-up wait are not
// part of the reference table and are taken from the SDRAM data sheet at 100 MHz.
// timing_from_ps converts data-sheet times to cycle counts for any clock; the
// document describes such a conversion but does not print its equations, so
// the rounding (up for minimum delays, down for the refresh interval) is this
// design's own.
// The class names, the access statuses and the Table-style timing values
// follow the document; the address split, the struct layouts and the
// command encoding are this design's own.
package mc_pkg;

  // ---------------- SDRAM geometry ----------------
  localparam int BANKS   = 4;
  localparam int BA_W    = 2;
  localparam int ROW_W   = 12;
  localparam int COL_W   = 9;
  localparam int DQ_W    = 16;
  localparam int A_W     = 12;                    // SDRAM address pins
  localparam int ADDR_W  = ROW_W + BA_W + COL_W;  // channel word address
  localparam int CH_W    = 3;                     // up to 8 channels
  localparam int CNT_W   = 16;                    // budget / period counters

  // ---------------- commands ----------------
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,
    CMD_RD   = 3'd2,
    CMD_WR   = 3'd3,
    CMD_PRE  = 3'd4,
    CMD_PALL = 3'd5,
    CMD_REF  = 3'd6,
    CMD_MRS  = 3'd7
  } sd_cmd_e;

  // ---------------- channel classes (QAS) ----------------
  typedef enum logic [1:0] {
    CH_LS = 2'd0,   // latency-sensitive
    CH_BS = 2'd1,   // bandwidth-sensitive
    CH_DC = 2'd2    // don't-care
  } chan_type_e;

  // DRAM status of an access, ordered by scheduling preference
  typedef enum logic [1:0] {
    ST_ROW_MISS  = 2'd0,
    ST_BANK_MISS = 2'd1,
    ST_ROW_HIT   = 2'd2
  } acc_status_e;

  // ---------------- access descriptor (QAS -> MIS) ----------------
  typedef struct packed {
    logic             we;       // 1 = write
    logic [ROW_W-1:0] row;
    logic [BA_W-1:0]  bank;
    logic [COL_W-1:0] col;
    logic [CH_W-1:0]  chan;     // originating channel
    logic             ls;       // latency-sensitive access
    logic             preempt;  // may suspend a non-LS access in its bank
  } access_t;

  // ---------------- programmable timing (in clock cycles) ----------------
  typedef struct packed {
    logic [3:0]  t_rp;
    logic [3:0]  t_rcd;
    logic [3:0]  t_ras;
    logic [3:0]  t_wr;
    logic [3:0]  t_rrd;
    logic [3:0]  t_mrd;
    logic [4:0]  t_rfc;
    logic [1:0]  cas_lat;      // 1..3
    logic [3:0]  burst_len;    // 1, 2, 4 or 8
    logic [15:0] ref_interval; // cycles between auto refreshes
    logic [15:0] init_wait;    // power-up wait before PALL
  } timing_cfg_t;

  localparam timing_cfg_t DEFAULT_TIMING = '{
    t_rp: 4'd2, t_rcd: 4'd2, t_ras: 4'd5, t_wr: 4'd2, t_rrd: 4'd2, t_mrd: 4'd2,
    t_rfc: 5'd7, cas_lat: 2'd2, burst_len: 4'd4,
    ref_interval: 16'd1562, init_wait: 16'd10000
  };

  // Absolute-time to cycle conversion. SDRAM data sheets give their limits
  // in nanoseconds; the controller counts clock cycles. A minimum delay needs
  // ceil(t / tCK) cycles, the refresh interval is a maximum and takes
  // floor(t / tCK). All times are in picoseconds; the CAS latency and burst
  // length are already cycle counts and pass through. The result can be
  // used as a constant at elaboration or loaded into the cfg registers.
  function automatic int ps_to_cycles(input int t_ps, input int clk_ps);
    return (t_ps + clk_ps - 1) / clk_ps;
  endfunction

  function automatic timing_cfg_t timing_from_ps(
    input int clk_ps, input int t_rp_ps, input int t_rcd_ps, input int t_ras_ps,
    input int t_wr_ps, input int t_rrd_ps, input int t_mrd_clk, input int t_rfc_ps,
    input int t_refi_ps, input int t_init_ps, input int cas_lat, input int burst_len);
    timing_cfg_t c;
    c.t_rp         = 4'(ps_to_cycles(t_rp_ps, clk_ps));
    c.t_rcd        = 4'(ps_to_cycles(t_rcd_ps, clk_ps));
    c.t_ras        = 4'(ps_to_cycles(t_ras_ps, clk_ps));
    c.t_wr         = 4'(ps_to_cycles(t_wr_ps, clk_ps));
    c.t_rrd        = 4'(ps_to_cycles(t_rrd_ps, clk_ps));
    c.t_mrd        = 4'(t_mrd_clk);
    c.t_rfc        = 5'(ps_to_cycles(t_rfc_ps, clk_ps));
    c.cas_lat      = 2'(cas_lat);
    c.burst_len    = 4'(burst_len);
    c.ref_interval = 16'(t_refi_ps / clk_ps);
    c.init_wait    = 16'(ps_to_cycles(t_init_ps, clk_ps));
    return c;
  endfunction

  // Longest read-data schedule: CAS latency 3 plus burst 8 plus the pin register.
  localparam int RD_PIPE = 16;

  // ---------------- address generator command ----------------
  typedef struct packed {
    logic              mode2d;   // 0: 1-D linear, 1: 2-D block
    logic              we;       // direction of all accesses of the job
    logic              tiled;    // 2-D: tile-based memory layout
    logic [ADDR_W-1:0] base;     // 1-D start address / 2-D frame base
    logic [15:0]       len;      // 1-D: words to transfer
    logic [15:0]       pitch;    // 2-D: frame width in words
    logic [15:0]       x0;       // 2-D: block origin, words
    logic [15:0]       y0;       // 2-D: block origin, lines
    logic [15:0]       w;        // 2-D: block width, words
    logic [15:0]       h;        // 2-D: block height, lines
  } agen_cmd_t;

  // log2 of a burst length of 1, 2, 4 or 8
  function automatic logic [1:0] bl_log2(input logic [3:0] bl);
    unique case (bl)
      4'd1:    return 2'd0;
      4'd2:    return 2'd1;
      4'd4:    return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  // Burst-length field of the SDRAM mode register.
  function automatic logic [2:0] bl_code(input logic [3:0] bl);
    unique case (bl)
      4'd1:    return 3'd0;
      4'd2:    return 3'd1;
      4'd4:    return 3'd2;
      default: return 3'd3;
    endcase
  endfunction

  // Mode register: sequential bursts, programmed burst length on writes.
  function automatic logic [A_W-1:0] mode_word(input timing_cfg_t c);
    return {5'b00000, 1'b0, c.cas_lat, 1'b0, bl_code(c.burst_len)};
  endfunction

endpackage
