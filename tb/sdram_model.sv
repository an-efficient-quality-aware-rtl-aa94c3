// sdram_model - behavioural model of a 4-bank x16 SDR SDRAM for testbenches.
//
// Not synthesizable: it stores written words in an associative array and
// checks the command stream against the device rules, counting every
// violation in `violations` (and printing the first few):
//   ACT to an open bank, ACT earlier than tRP after PRE or tRRD after the
//   last ACT or tRFC after REF; READ/WRITE to a closed bank or earlier than
//   tRCD after ACT; PRE earlier than tRAS after ACT, before a read burst has
//   left or before write recovery; REF with a bank open; any access before
//   the mode register is loaded; controller driving dq while read data are
//   due; a write burst without data driven.
// Pins are sampled on the rising clock edge. Read data for a READ sampled at
// edge E are driven so that they are sampled at edges E+CL .. E+CL+BL-1;
// write data are sampled with the WRITE and at the following BL-1 edges.
// CAS latency and burst length come from the LOAD MODE REGISTER command
// (CAS latency 2 or 3). Counters of each command type are public.
// tRP, tRCD, tRAS and the CAS latency follow the document's SDRAM table;
// tWR, tRRD and tRFC are data-sheet values, and the checking style is this
// design's own.
module sdram_model #(
  parameter int T_RP  = 2,
  parameter int T_RCD = 2,
  parameter int T_RAS = 5,
  parameter int T_WR  = 2,
  parameter int T_RRD = 2,
  parameter int T_RFC = 7
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [11:0] a,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_in,     // from the controller
  input  logic        dq_oe,     // controller drives dq
  output logic [15:0] dq_out     // to the controller
);

  logic [15:0] mem [int];

  longint cyc = 0;
  int violations = 0;
  int n_act = 0, n_pre = 0, n_pall = 0, n_rd = 0, n_wr = 0, n_ref = 0, n_mrs = 0;
  int n_rd_words = 0, n_wr_words = 0;
  bit mode_set = 0;
  int cl = 2, bl = 1;

  bit     open_b   [4];
  int     row_b    [4];
  longint t_act    [4];
  longint t_pre    [4];
  longint t_pre_ok [4];   // earliest PRE allowed by bursts / write recovery
  longint t_last_act = -100;
  longint t_ref      = -100;

  // read pipeline (index j drives dq at edge E+1+j)
  bit          rp_v [32];
  logic [15:0] rp_d [32];
  bit          rd_drive;
  // write burst in progress
  int          wr_left = 0;
  int          wr_addr = 0;
  int          wr_cnt  = 0;

  initial begin
    for (int b = 0; b < 4; b++) begin
      open_b[b] = 0; row_b[b] = 0; t_act[b] = -100; t_pre[b] = -100; t_pre_ok[b] = -100;
    end
    for (int k = 0; k < 32; k++) begin rp_v[k] = 0; rp_d[k] = '0; end
    rd_drive = 0;
    dq_out = '0;
  end

  task automatic viol(input string msg);
    violations++;
    if (violations <= 10) $display("SDRAM model: violation at cycle %0d: %s", cyc, msg);
  endtask

  function automatic int word_addr(input int b, input int r, input int c);
    return (r << 11) | (b << 9) | c;
  endfunction

  always @(posedge clk) begin
    cyc++;
    // controller must not drive while read data are on the bus
    if (rd_drive && dq_oe) viol("data bus contention");
    // ---- read data out ----
    if (rp_v[0]) begin
      dq_out   <= rp_d[0];
      rd_drive = 1;
    end else begin
      rd_drive = 0;
    end
    for (int k = 0; k < 31; k++) begin rp_v[k] = rp_v[k+1]; rp_d[k] = rp_d[k+1]; end
    rp_v[31] = 0;

    // ---- write data in ----
    if (wr_left > 0) begin
      if (!dq_oe) viol("write burst without data");
      mem[wr_addr + wr_cnt] = dq_in;
      n_wr_words++;
      wr_cnt++;
      wr_left--;
    end

    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACT
          n_act++;
          if (!mode_set) viol("ACT before mode register");
          if (open_b[ba]) viol("ACT to open bank");
          if (cyc - t_pre[ba] < T_RP) viol("tRP");
          if (cyc - t_last_act < T_RRD) viol("tRRD");
          if (cyc - t_ref < T_RFC) viol("tRFC");
          open_b[ba] = 1; row_b[ba] = int'(a); t_act[ba] = cyc; t_last_act = cyc;
        end
        3'b101, 3'b100: begin // READ / WRITE
          int col, base;
          col  = int'(a[8:0]);
          if (!mode_set) viol("column access before mode register");
          if (!open_b[ba]) viol("column access to closed bank");
          if (cyc - t_act[ba] < T_RCD) viol("tRCD");
          base = word_addr(int'(ba), row_b[ba], col);
          if (we_n) begin
            n_rd++;
            for (int i = 0; i < bl; i++) begin
              rp_v[cl-2+i] = 1;
              rp_d[cl-2+i] = mem.exists(base + i) ? mem[base + i] : 16'h0000;
            end
            n_rd_words += bl;
            if (t_pre_ok[ba] < cyc + bl) t_pre_ok[ba] = cyc + bl;
          end else begin
            n_wr++;
            if (!dq_oe) viol("write without data");
            mem[base] = dq_in;
            n_wr_words++;
            wr_addr = base; wr_cnt = 1; wr_left = bl - 1;
            if (t_pre_ok[ba] < cyc + bl - 1 + T_WR) t_pre_ok[ba] = cyc + bl - 1 + T_WR;
          end
        end
        3'b010: begin // PRE / PALL
          if (a[10]) begin
            n_pall++;
            for (int b = 0; b < 4; b++) begin
              if (open_b[b] && cyc - t_act[b] < T_RAS) viol("tRAS (PALL)");
              if (open_b[b] && cyc < t_pre_ok[b]) viol("PALL during burst / tWR");
              open_b[b] = 0; t_pre[b] = cyc;
            end
          end else begin
            n_pre++;
            if (open_b[ba] && cyc - t_act[ba] < T_RAS) viol("tRAS");
            if (cyc < t_pre_ok[ba]) viol("PRE during burst / tWR");
            open_b[ba] = 0; t_pre[ba] = cyc;
          end
        end
        3'b001: begin // REF
          n_ref++;
          for (int b = 0; b < 4; b++) if (open_b[b]) viol("REF with open bank");
          if (cyc - t_pre[0] < T_RP) viol("tRP before REF");
          if (cyc - t_ref < T_RFC) viol("tRFC between REF");
          t_ref = cyc;
        end
        3'b000: begin // MRS
          n_mrs++;
          bl = 1 << int'(a[2:0]);
          cl = int'(a[6:4]);
          if (cl < 2) viol("CAS latency below 2 not modelled");
          mode_set = 1;
        end
        default: ;
      endcase
    end
  end

endmodule
