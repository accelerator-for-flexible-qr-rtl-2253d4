// qr_bs_top: folded QR decomposition and back-substitution accelerator.
//
// Solves A x = B for a complex n x n matrix A (n a multiple of 4, up to NMAX
// = 20, chosen per run on n) by Givens-rotation QR decomposition, A = Q R,
// followed by back substitution R x = Q^H B. Instead of an n x n systolic
// array, one triangular Type I block (4 boundary + 6 internal cells), one 4x4
// Type II block (16 internal cells) and one 4x1 Type III block (4 internal
// cells) are reused for every 4x4 tile of the array, with four memories to
// carry data between uses:
//   RAM I   rotations (C,S) of the Type I block, replayed into Type II / III
//   RAM II  row vectors left by one band for the tiles of the next band
//   RAM III the finished R and B' = Q^H B
//   RAM IV  the solution x
// qr_scheduler decides what each block works on when (see there).
//
// Host interface. The matrix stays in host memory, read combinationally
// through three ports that the accelerator addresses: a1_row (columns 0..3 of
// row a1_row, for the Type I block), a2_row/a2_grp (columns 4*a2_grp..+3 of row
// a2_row, for the Type II block) and b_row (B). Pulse start with n set; busy
// stays high until done pulses. R, B' and x are then read through
// r_rd_addr (qr_pkg::r_addr / b_addr layout) and x_rd_addr. Inputs must be
// scaled so that no intermediate value leaves [-2, 2): column norms of [A B]
// below 2 and |x| below 2.
//
// Datapath glue in this module:
//  * RAM I replay: each pass's issue word is delayed 3, 7, 11 and 15 cycles;
//    each tap addresses its row's bank of RAM I, so row i of the Type II /
//    Type III blocks sees the rotation of vector k exactly when that vector
//    reaches it.
//  * The Type II block's outputs of vectors 4.. of a band's first tile become
//    the Type I input of the next band; the outputs of later tiles and of the
//    Type III column go to RAM II. The first four outputs of a band are the
//    rows absorbed into that band's R and are exactly zero; they are dropped.
//  * Back substitution keeps the band's four partial sums in a register,
//    loaded from B' and updated by each Type II pass, then handed to Type I.
//    The Type I block takes the partial sums when it starts but reads its R
//    tile for seven cycles, so that tile and the band number (for the RAM IV
//    writes of x) are held in registers from the start of the run; meanwhile
//    the register, RAM III's read ports and the Type II block serve the next
//    band.
//
// The two assertions at the end are disabled during reset with rst_n, which
// lint reports as a reset used both asynchronously and synchronously; that
// use is only in the assertions, not in the circuit.
module qr_bs_top
  import qr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NW-1:0]     n,
  output logic              busy,
  output logic              done,
  output logic              en_bs,
  // host matrix reads (combinational)
  output logic [IDXW-1:0]   a1_row,
  input  vec_t              a1_data,
  output logic [IDXW-1:0]   a2_row,
  output logic [BLKW-1:0]   a2_grp,
  input  vec_t              a2_data,
  output logic [IDXW-1:0]   b_row,
  input  cplx_t             b_data,
  // result reads (combinational)
  input  logic [R3AW-1:0]   r_rd_addr,
  output cplx_t             r_rd_data,
  input  logic [$clog2(NMAX)-1:0] x_rd_addr,
  output cplx_t             x_rd_data
);

  localparam int unsigned XAW  = $clog2(NMAX);
  localparam int unsigned R1AW = $clog2(NMAX);
  localparam int unsigned R2GW = $clog2(NBLK + 1);
  localparam int unsigned R2AW = $clog2(NMAX);
  localparam logic [R2GW-1:0] BGRP = R2GW'(NBLK);   // RAM II region of B

  // ---------------------------------------------------------------- scheduler
  ctl_t            t1_issue;
  issue_t          pass_issue;
  logic [BLKW-1:0] nblk;
  logic            bs_load_b, bs_t2_go, bs_t1_go, bs_t2_done, bs_t1_done;
  logic [BLKW-1:0] bs_band, bs_tile;

  qr_scheduler u_sched (
    .clk, .rst_n, .start, .n_in(n), .busy, .done, .en_bs,
    .t1_issue, .pass_issue, .nblk,
    .bs_load_b, .bs_t2_go, .bs_t1_go, .bs_band, .bs_tile,
    .bs_t2_done, .bs_t1_done
  );

  // ---------------------------------------------------------------- memories
  logic [TILE-1:0]           r1_we, r1_wpage, r1_rpage;
  logic [TILE-1:0][R1AW-1:0] r1_waddr, r1_raddr;
  rot_t [TILE-1:0]           r1_wdata, r1_rdata;

  ram1_cs u_ram1 (
    .clk, .we(r1_we), .wpage(r1_wpage), .waddr(r1_waddr), .wdata(r1_wdata),
    .rpage(r1_rpage), .raddr(r1_raddr), .rdata(r1_rdata)
  );

  logic            r2_we;
  logic [R2GW-1:0] r2_wgrp, r2_rgrp_a;
  logic [R2AW-1:0] r2_waddr, r2_raddr_a, r2_raddr_b;
  vec_t            r2_wdata, r2_rdata_a, r2_rdata_b;

  ram2_u u_ram2 (
    .clk, .we(r2_we), .wgrp(r2_wgrp), .waddr(r2_waddr), .wdata(r2_wdata),
    .rgrp_a(r2_rgrp_a), .raddr_a(r2_raddr_a), .rdata_a(r2_rdata_a),
    .rgrp_b(BGRP), .raddr_b(r2_raddr_b), .rdata_b(r2_rdata_b)
  );

  localparam int unsigned R3WP = 2 * TILE + 1;
  localparam int unsigned R3RP = TILE * TILE + TILE + 1;
  logic  [R3WP-1:0]           r3_we;
  logic  [R3WP-1:0][R3AW-1:0] r3_waddr;
  cplx_t [R3WP-1:0]           r3_wdata;
  logic  [R3RP-1:0][R3AW-1:0] r3_raddr;
  cplx_t [R3RP-1:0]           r3_rdata;

  ram3_r #(.NWP(R3WP), .NRP(R3RP)) u_ram3 (
    .clk, .we(r3_we), .waddr(r3_waddr), .wdata(r3_wdata),
    .raddr(r3_raddr), .rdata(r3_rdata)
  );

  logic  [TILE-1:0]            r4_we;
  logic  [TILE-1:0][XAW-1:0]   r4_waddr;
  cplx_t [TILE-1:0]            r4_wdata;
  logic  [TILE:0][XAW-1:0]     r4_raddr;
  cplx_t [TILE:0]              r4_rdata;

  ram4_x u_ram4 (
    .clk, .we(r4_we), .waddr(r4_waddr), .wdata(r4_wdata),
    .raddr(r4_raddr), .rdata(r4_rdata)
  );

  // ---------------------------------------------------------------- blocks
  ctl_t                       t1_in_ctl;
  vec_t                       t1_in_vec;
  ctl_t  [TILE-1:0]           t1_cs_ctl;
  fix_t  [TILE-1:0]           t1_cs_c;
  cplx_t [TILE-1:0]           t1_cs_s;
  logic  [TILE-1:0]           t1_rw_en;
  logic  [TILE-1:0][1:0]      t1_rw_row;
  ctl_t  [TILE-1:0]           t1_rw_ctl;
  cplx_t [TILE-1:0]           t1_rw_data;
  logic  [TILE-1:0]           t1_xv;
  vec_t                       t1_x;

  ctl_t  [TILE-1:0]           t2_cs_ctl, t3_cs_ctl;
  fix_t  [TILE-1:0]           rp_c;
  cplx_t [TILE-1:0]           rp_s;
  vec_t                       t2_in_vec;
  ctl_t                       t2_out_ctl;
  vec_t                       t2_out_vec;
  logic  [TILE-1:0]           t2_rw_en;
  logic  [TILE-1:0][1:0]      t2_rw_row;
  ctl_t  [TILE-1:0]           t2_rw_ctl;
  cplx_t [TILE-1:0]           t2_rw_data;
  logic                       t2_bs_ov;
  vec_t                       t2_bs_out;

  cplx_t                      t3_in_b;
  ctl_t                       t3_out_ctl;
  cplx_t                      t3_out_b;
  logic                       t3_bw_en;
  logic  [1:0]                t3_bw_row;
  ctl_t                       t3_bw_ctl;
  cplx_t                      t3_bw_data;

  vec_t                       bs_acc;
  cplx_t [TILE-1:0][TILE-1:0] bs_r;
  vec_t                       bs_x;
  cplx_t [TILE-1:0][TILE-1:0] t1_r_hold, t1_bs_r;
  logic  [BLKW-1:0]           t1_band_q;

  type1_block u_t1 (
    .clk, .rst_n,
    .in_ctl(t1_in_ctl), .in_vec(t1_in_vec),
    .cs_ctl(t1_cs_ctl), .cs_c(t1_cs_c), .cs_s(t1_cs_s),
    .rw_en(t1_rw_en), .rw_row(t1_rw_row), .rw_ctl(t1_rw_ctl), .rw_data(t1_rw_data),
    .bs_valid(bs_t1_go), .bs_b(bs_acc), .bs_r(t1_bs_r),
    .x_valid(t1_xv), .x_out(t1_x)
  );

  type2_block u_t2 (
    .clk, .rst_n,
    .in_vec(t2_in_vec), .cs_ctl(t2_cs_ctl), .cs_c(rp_c), .cs_s(rp_s),
    .out_ctl(t2_out_ctl), .out_vec(t2_out_vec),
    .rw_en(t2_rw_en), .rw_row(t2_rw_row), .rw_ctl(t2_rw_ctl), .rw_data(t2_rw_data),
    .bs_valid(bs_t2_go), .bs_b(bs_acc), .bs_x(bs_x), .bs_r(bs_r),
    .bs_out_valid(t2_bs_ov), .bs_out(t2_bs_out)
  );

  type3_block u_t3 (
    .clk, .rst_n,
    .in_b(t3_in_b), .cs_ctl(t3_cs_ctl), .cs_c(rp_c), .cs_s(rp_s),
    .out_ctl(t3_out_ctl), .out_b(t3_out_b),
    .bw_en(t3_bw_en), .bw_row(t3_bw_row), .bw_ctl(t3_bw_ctl), .bw_data(t3_bw_data)
  );

  // ---------------------------------------------------------------- forward glue
  // Sources of a pass: host memory for band 0, RAM II for later bands.
  assign a1_row     = t1_issue.idx;
  assign a2_row     = pass_issue.ctl.idx;
  assign a2_grp     = pass_issue.ctl.tile;
  assign b_row      = pass_issue.ctl.idx;
  assign r2_rgrp_a  = R2GW'(pass_issue.ctl.tile);
  assign r2_raddr_a = R2AW'(pass_issue.ctl.idx);
  assign r2_raddr_b = R2AW'(pass_issue.ctl.idx);
  assign t2_in_vec  = (pass_issue.ctl.band == 0) ? a2_data : r2_rdata_a;
  assign t3_in_b    = (pass_issue.ctl.band == 0) ? b_data  : r2_rdata_b[0];

  // RAM I replay taps: row i sees the issue word 4i+3 cycles later.
  issue_t [TILE-1:0] tap;
  for (genvar i = 0; i < TILE; i++) begin : g_tap
    issue_t tap_src;
    if (i == 0) begin : g_first
      assign tap_src = pass_issue;
    end else begin : g_next
      assign tap_src = tap[i-1];
    end
    delay_line #(.T(issue_t), .DEPTH(i == 0 ? 3 : 4)) u_tap (
      .clk, .rst_n, .d(tap_src), .q(tap[i]));

    assign r1_rpage[i] = tap[i].ctl.band[0];
    assign r1_raddr[i] = R1AW'(tap[i].ctl.idx);
    assign rp_c[i]     = r1_rdata[i].c;
    assign rp_s[i]     = r1_rdata[i].s;
    always_comb begin
      t2_cs_ctl[i] = tap[i].ctl;
      t2_cs_ctl[i].valid = tap[i].ctl.valid && tap[i].t2;
      t3_cs_ctl[i] = tap[i].ctl;
      t3_cs_ctl[i].valid = tap[i].ctl.valid && tap[i].t3;
    end

    // RAM I write: Type I row i's rotation of vector idx
    assign r1_we[i]    = t1_cs_ctl[i].valid;
    assign r1_wpage[i] = t1_cs_ctl[i].band[0];
    assign r1_waddr[i] = R1AW'(t1_cs_ctl[i].idx);
    assign r1_wdata[i] = '{c: t1_cs_c[i], s: t1_cs_s[i]};
  end

  // Type II / Type III outputs: drop the band's first four vectors.
  logic t2_keep, t2_to_t1, t3_keep;
  assign t2_keep  = t2_out_ctl.valid && (t2_out_ctl.idx >= IDXW'(TILE));
  assign t2_to_t1 = t2_keep && (t2_out_ctl.tile == t2_out_ctl.band + 1'b1);
  assign t3_keep  = t3_out_ctl.valid && (t3_out_ctl.idx >= IDXW'(TILE));

  always_comb begin
    if (t1_issue.valid) begin
      t1_in_ctl = t1_issue;
      t1_in_vec = a1_data;
    end else begin
      t1_in_ctl       = '0;
      t1_in_ctl.valid = t2_to_t1;
      t1_in_ctl.first = (t2_out_ctl.idx == IDXW'(TILE));
      t1_in_ctl.last  = t2_out_ctl.last;
      t1_in_ctl.band  = t2_out_ctl.band + 1'b1;
      t1_in_ctl.tile  = t2_out_ctl.band + 1'b1;
      t1_in_ctl.idx   = t2_out_ctl.idx - IDXW'(TILE);
      t1_in_vec       = t2_out_vec;
    end
  end

  always_comb begin
    r2_we    = 1'b0;
    r2_wgrp  = '0;
    r2_waddr = '0;
    r2_wdata = '0;
    if (t3_keep) begin
      r2_we       = 1'b1;
      r2_wgrp     = BGRP;
      r2_waddr    = R2AW'(t3_out_ctl.idx - IDXW'(TILE));
      r2_wdata[0] = t3_out_b;
    end else if (t2_keep && !t2_to_t1) begin
      r2_we    = 1'b1;
      r2_wgrp  = R2GW'(t2_out_ctl.tile);
      r2_waddr = R2AW'(t2_out_ctl.idx - IDXW'(TILE));
      r2_wdata = t2_out_vec;
    end
  end

  // RAM III writes: Type I (ports 0..3), Type II (4..7), Type III (8)
  always_comb begin
    for (int j = 0; j < TILE; j++) begin
      r3_we[j]           = t1_rw_en[j];
      r3_waddr[j]        = r_addr(TILE * t1_rw_ctl[j].band + int'(t1_rw_row[j]),
                                  TILE * t1_rw_ctl[j].band + j);
      r3_wdata[j]        = t1_rw_data[j];
      r3_we[TILE+j]      = t2_rw_en[j];
      r3_waddr[TILE+j]   = r_addr(TILE * t2_rw_ctl[j].band + int'(t2_rw_row[j]),
                                  TILE * t2_rw_ctl[j].tile + j);
      r3_wdata[TILE+j]   = t2_rw_data[j];
    end
    r3_we[2*TILE]    = t3_bw_en;
    r3_waddr[2*TILE] = b_addr(TILE * t3_bw_ctl.band + int'(t3_bw_row));
    r3_wdata[2*TILE] = t3_bw_data;
  end

  // ---------------------------------------------------------------- backward glue
  // RAM III reads: the 4x4 tile (bs_band, bs_tile) of R, the band's B', host.
  always_comb begin
    for (int i = 0; i < TILE; i++) begin
      for (int j = 0; j < TILE; j++) begin
        if (TILE * bs_tile + j >= TILE * bs_band + i)
          r3_raddr[TILE*i+j] = r_addr(TILE * bs_band + i, TILE * bs_tile + j);
        else
          r3_raddr[TILE*i+j] = '0;                 // below the diagonal: unused
        bs_r[i][j] = r3_rdata[TILE*i+j];
      end
      r3_raddr[TILE*TILE+i] = b_addr(TILE * bs_band + i);
    end
    r3_raddr[R3RP-1] = r_rd_addr;
  end
  assign r_rd_data = r3_rdata[R3RP-1];

  for (genvar j = 0; j < TILE; j++) begin : g_x
    assign r4_raddr[j] = XAW'(TILE * bs_tile + j);
    assign bs_x[j]     = r4_rdata[j];
    assign r4_we[j]    = t1_xv[j];
    assign r4_waddr[j] = XAW'(TILE * t1_band_q + j);
    assign r4_wdata[j] = t1_x[j];
  end
  assign r4_raddr[TILE] = x_rd_addr;
  assign x_rd_data      = r4_rdata[TILE];

  // the Type I run's R tile and band, held from its start
  assign t1_bs_r = bs_t1_go ? bs_r : t1_r_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_r_hold <= '0;
      t1_band_q <= '0;
    end else if (bs_t1_go) begin
      t1_r_hold <= bs_r;
      t1_band_q <= bs_band;
    end
  end

  always_ff @(posedge clk) begin
    if (bs_load_b) begin
      for (int i = 0; i < TILE; i++) bs_acc[i] <= r3_rdata[TILE*TILE+i];
    end else if (t2_bs_ov) begin
      bs_acc <= t2_bs_out;
    end
  end

  assign bs_t2_done = t2_bs_ov;
  assign bs_t1_done = t1_xv[0];

  // Only one of Type II / Type III may write RAM II in a cycle.
  a_ram2_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(t3_keep && t2_keep && !t2_to_t1));
  // The Type I input is fed by the scheduler or by the Type II block, never both.
  a_t1_one_source: assert property (@(posedge clk) disable iff (!rst_n)
    !(t1_issue.valid && t2_to_t1));

  logic unused_ok;
  assign unused_ok = ^{nblk, r2_rdata_b[TILE-1:1], t2_out_ctl.first, t3_out_ctl.first, t3_out_ctl.last, t3_out_ctl.band,
                       t3_out_ctl.tile, t3_bw_ctl.valid, t3_bw_ctl.first, t3_bw_ctl.last,
                       t3_bw_ctl.tile, t3_bw_ctl.idx};

endmodule
