// type2_block: the rectangular 4x4 block of sixteen internal cells, reused for
// every off-diagonal tile of R in the folded array.
//
// Forward path. A stream of row vectors (four columns of the tile, one vector
// per cycle) enters on in_vec at t. The rotations of the band's four rows are
// replayed from RAM I: row i's C/S for that vector must be on cs_*[i] at
// t+4i+3, together with the vector's control word (the scheduler's replay taps
// do exactly that). Each row holds its incoming elements three cycles in a
// delay line to meet its rotation and hands its outputs to the next row one
// cycle later, as in the triangular block. The last row's outputs leave on
// out_vec/out_ctl at t+16: they are the rows that the next band must still
// reduce. Finished R values leave per column on rw_* (rows of one column
// finish four cycles apart).
//
// Backward path. The four partial sums of a band enter on bs_b with bs_valid;
// bs_x holds the four solved x of the tile's columns and bs_r the tile of R.
// Column 3 subtracts R(i,3)*x3 first and each column passes its results to
// the column on its left a cycle later, so the updated partial sums leave on
// bs_out after four cycles. The rows are independent in this direction.
//
// The 16-cell tile and its two directions follow the reference design; the
// 4-cycle row skew (the reference uses 2) is this implementation's choice,
// made so that one set of replay taps serves Type II and Type III alike.
module type2_block
  import qr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // forward
  input  vec_t                   in_vec,
  input  ctl_t  [TILE-1:0]       cs_ctl,
  input  fix_t  [TILE-1:0]       cs_c,
  input  cplx_t [TILE-1:0]       cs_s,
  output ctl_t                   out_ctl,
  output vec_t                   out_vec,
  output logic  [TILE-1:0]       rw_en,
  output logic  [TILE-1:0][1:0]  rw_row,
  output ctl_t  [TILE-1:0]       rw_ctl,
  output cplx_t [TILE-1:0]       rw_data,
  // backward
  input  logic                   bs_valid,
  input  vec_t                   bs_b,
  input  vec_t                   bs_x,
  input  cplx_t [TILE-1:0][TILE-1:0] bs_r,
  output logic                   bs_out_valid,
  output vec_t                   bs_out
);

  ctl_t  ic_ctl  [TILE][TILE];
  cplx_t ic_u    [TILE][TILE];
  cplx_t ic_r    [TILE][TILE];
  logic  ic_fin  [TILE][TILE];
  logic  ic_bsv  [TILE][TILE];
  cplx_t ic_bsb  [TILE][TILE];

  for (genvar i = 0; i < TILE; i++) begin : g_row
    for (genvar j = 0; j < TILE; j++) begin : g_col
      cplx_t u_src, u_dly;
      logic  bsv_src;
      cplx_t bsb_src;
      mag_t  mag_unused;
      if (i == 0) begin : g_u0
        assign u_src = in_vec[j];
      end else begin : g_un
        assign u_src = ic_u[i-1][j];
      end
      if (j == TILE - 1) begin : g_b_in
        assign bsv_src = bs_valid;
        assign bsb_src = bs_b[i];
      end else begin : g_b_ic
        assign bsv_src = ic_bsv[i][j+1];
        assign bsb_src = ic_bsb[i][j+1];
      end
      delay_line #(.T(cplx_t), .DEPTH(3)) u_udly (
        .clk, .rst_n, .d(u_src), .q(u_dly));

      internal_cell u_ic (
        .clk, .rst_n,
        .in_ctl (cs_ctl[i]),
        .in_c   (cs_c[i]),
        .in_s   (cs_s[i]),
        .in_u   (u_dly),
        .out_ctl(ic_ctl[i][j]),
        .out_u  (ic_u[i][j]),
        .out_mag(mag_unused),
        .r_out  (ic_r[i][j]),
        .r_fin  (ic_fin[i][j]),
        .bs_valid(bsv_src),
        .bs_b   (bsb_src),
        .bs_x   (bs_x[j]),
        .bs_r   (bs_r[i][j]),
        .bs_valid_out(ic_bsv[i][j]),
        .bs_b_out(ic_bsb[i][j])
      );
    end
  end

  assign out_ctl = ic_ctl[TILE-1][0];
  for (genvar j = 0; j < TILE; j++) begin : g_out
    assign out_vec[j] = ic_u[TILE-1][j];
    assign bs_out[j]  = ic_bsb[j][0];
  end
  assign bs_out_valid = ic_bsv[0][0];

  always_comb begin
    for (int j = 0; j < TILE; j++) begin
      rw_en[j]   = 1'b0;
      rw_row[j]  = '0;
      rw_ctl[j]  = '0;
      rw_data[j] = '0;
      for (int i = 0; i < TILE; i++) begin
        if (ic_fin[i][j]) begin
          rw_en[j]   = 1'b1;
          rw_row[j]  = 2'(i);
          rw_ctl[j]  = ic_ctl[i][j];
          rw_data[j] = ic_r[i][j];
        end
      end
    end
  end

endmodule
