// type3_block: a column of four internal cells that applies the band's
// rotations to the right-hand side B, producing B' = Q^H B.
//
// It runs alongside the first Type II tile of each band and is fed by the same
// RAM I replay: element b of a row enters on in_b at t, row i's C/S arrive on
// cs_*[i] at t+4i+3, each cell holds its element three cycles to meet the
// rotation, and the last cell's output (the part of B still to be reduced by
// the next band) leaves on out_b/out_ctl at t+16. At the band's last element
// each cell's stored value is a finished B' entry and leaves on bw_* (rows
// finish four cycles apart, so one port suffices). The block has no backward
// function: in back substitution its cells are idle and B' is read from RAM III.
//
// Its role and its schedule (alongside the first Type II tile) follow the
// reference design; where its outputs go is this implementation's choice.
module type3_block
  import qr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  cplx_t               in_b,
  input  ctl_t  [TILE-1:0]    cs_ctl,
  input  fix_t  [TILE-1:0]    cs_c,
  input  cplx_t [TILE-1:0]    cs_s,
  output ctl_t                out_ctl,
  output cplx_t               out_b,
  output logic                bw_en,
  output logic  [1:0]         bw_row,
  output ctl_t                bw_ctl,
  output cplx_t               bw_data
);

  ctl_t  ic_ctl [TILE];
  cplx_t ic_u   [TILE];
  cplx_t ic_r   [TILE];
  logic  ic_fin [TILE];

  for (genvar i = 0; i < TILE; i++) begin : g_row
    cplx_t u_src, u_dly;
    mag_t  mag_unused;
    logic  bsv_unused;
    cplx_t bsb_unused;
    if (i == 0) begin : g_u0
      assign u_src = in_b;
    end else begin : g_un
      assign u_src = ic_u[i-1];
    end
    delay_line #(.T(cplx_t), .DEPTH(3)) u_udly (
      .clk, .rst_n, .d(u_src), .q(u_dly));

    internal_cell u_ic (
      .clk, .rst_n,
      .in_ctl (cs_ctl[i]),
      .in_c   (cs_c[i]),
      .in_s   (cs_s[i]),
      .in_u   (u_dly),
      .out_ctl(ic_ctl[i]),
      .out_u  (ic_u[i]),
      .out_mag(mag_unused),
      .r_out  (ic_r[i]),
      .r_fin  (ic_fin[i]),
      .bs_valid(1'b0),
      .bs_b   (CPLX_ZERO),
      .bs_x   (CPLX_ZERO),
      .bs_r   (CPLX_ZERO),
      .bs_valid_out(bsv_unused),
      .bs_b_out(bsb_unused)
    );
  end

  assign out_ctl = ic_ctl[TILE-1];
  assign out_b   = ic_u[TILE-1];

  always_comb begin
    bw_en   = 1'b0;
    bw_row  = '0;
    bw_ctl  = '0;
    bw_data = '0;
    for (int i = 0; i < TILE; i++) begin
      if (ic_fin[i]) begin
        bw_en   = 1'b1;
        bw_row  = 2'(i);
        bw_ctl  = ic_ctl[i];
        bw_data = ic_r[i];
      end
    end
  end

endmodule
