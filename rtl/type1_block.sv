// type1_block: the triangular 4x4 block of the folded array (four boundary
// cells on the diagonal, six internal cells above it).
//
// Forward path. A stream of row vectors enters on in_vec/in_ctl, one per
// cycle; lane j is the element in the band's column j. Row i of the block
// works on a vector 4*i cycles after row 0: boundary cell i gets its element
// at t+4i and sends C/S to its row at t+4i+3; each internal cell's element is
// held three cycles in a delay line to meet that rotation and its output goes
// to the next row at t+4i+4. The rotations of row i leave on cs_ctl[i]/cs_c[i]/
// cs_s[i] (for RAM I), and the finished R values leave per column j on
// rw_*. Within one band the cells of a column finish on different cycles
// (row i of column j at 4i+4 after the band's last vector, the diagonal at
// 4j+3). Two bands whose last vectors enter 4 or 8 cycles apart would make
// two cells of a column finish together; the scheduler never comes that
// close (band p+1's last vector enters at least 17 cycles after band p's,
// from the scheduler's 21-cycle lag between the bands' passes), and the assertion
// a_rw_one_per_column checks it (it is disabled in reset, a use of rst_n
// that lint reports as synchronous; the circuit itself resets asynchronously).
// The last row
// has no internal cell, so the block emits no vector: the rest of the band's
// columns are handled by Type II/III blocks that replay these rotations.
// |u|^2 for boundary cell 0 is formed here from lane 0; the others get it
// from the internal cell above them.
//
// Backward path (back substitution). With bs_valid the four partial sums
// b[0..3] of the band's rows enter, and bs_r supplies the 4x4 upper triangle
// of R for this band. Boundary cell 3 solves x3 = b3/R33 in one cycle, the
// internal cells of column 3 subtract R(i,3)*x3 and pass the result left, and
// so on: a new x every two cycles, x3 at t+1, x2 at t+3, x1 at t+5, x0 at t+7,
// each with its x_valid pulse. Partial sums wait one register before each
// internal cell so that they meet their column's x.
//
// The cell arrangement, the 3-cycle boundary cell and the two-cycle x rate
// follow the reference design; the 4-cycle row skew, the per-column R
// write-back and the control words are this implementation's choices.
module type1_block
  import qr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // forward
  input  ctl_t                   in_ctl,
  input  vec_t                   in_vec,
  output ctl_t  [TILE-1:0]       cs_ctl,
  output fix_t  [TILE-1:0]       cs_c,
  output cplx_t [TILE-1:0]       cs_s,
  output logic  [TILE-1:0]       rw_en,     // per column: a finished R value
  output logic  [TILE-1:0][1:0]  rw_row,    // its row within the block
  output ctl_t  [TILE-1:0]       rw_ctl,    // its band / tile tag
  output cplx_t [TILE-1:0]       rw_data,
  // backward
  input  logic                   bs_valid,
  input  vec_t                   bs_b,
  input  cplx_t [TILE-1:0][TILE-1:0] bs_r,  // [row][col], upper triangle used
  output logic  [TILE-1:0]       x_valid,
  output vec_t                   x_out
);

  // boundary cell signals, per row
  ctl_t  bc_in_ctl [TILE];
  cplx_t bc_in_u   [TILE];
  mag_t  bc_in_mag [TILE];
  fix_t  bc_r      [TILE];
  logic  bc_fin    [TILE];
  logic  bc_bsv    [TILE];
  cplx_t bc_bsb    [TILE];
  cplx_t bc_x      [TILE];
  logic  bc_xv     [TILE];

  // internal cell signals, [row][col] with col > row
  ctl_t  ic_ctl  [TILE][TILE];
  cplx_t ic_u    [TILE][TILE];
  mag_t  ic_mag  [TILE][TILE];
  cplx_t ic_r    [TILE][TILE];
  logic  ic_fin  [TILE][TILE];
  logic  ic_bsv  [TILE][TILE];
  cplx_t ic_bsb  [TILE][TILE];

  for (genvar i = 0; i < TILE; i++) begin : g_row
    if (i == 0) begin : g_src0
      assign bc_in_ctl[i] = in_ctl;
      assign bc_in_u[i]   = in_vec[0];
      assign bc_in_mag[i] = cmag(in_vec[0]);
    end else begin : g_srcn
      assign bc_in_ctl[i] = ic_ctl[i-1][i];
      assign bc_in_u[i]   = ic_u[i-1][i];
      assign bc_in_mag[i] = ic_mag[i-1][i];
    end

    // backward source of boundary cell i
    if (i == TILE - 1) begin : g_bsb_last
      assign bc_bsv[i] = bs_valid;
      assign bc_bsb[i] = bs_b[i];
    end else begin : g_bsb_ic
      assign bc_bsv[i] = ic_bsv[i][i+1];
      assign bc_bsb[i] = ic_bsb[i][i+1];
    end

    boundary_cell u_bc (
      .clk, .rst_n,
      .in_ctl (bc_in_ctl[i]),
      .in_u   (bc_in_u[i]),
      .in_mag (bc_in_mag[i]),
      .out_ctl(cs_ctl[i]),
      .out_c  (cs_c[i]),
      .out_s  (cs_s[i]),
      .r_out  (bc_r[i]),
      .r_fin  (bc_fin[i]),
      .bs_valid(bc_bsv[i]),
      .bs_b   (bc_bsb[i]),
      .bs_r   (bs_r[i][i].re),
      .x_valid(bc_xv[i]),
      .x_out  (bc_x[i])
    );
    assign x_valid[i] = bc_xv[i];
    assign x_out[i]   = bc_x[i];

    for (genvar j = 0; j < TILE; j++) begin : g_col
      if (j > i) begin : g_ic
        cplx_t u_src, u_dly;
        logic  bsv_src, bsv_dly;
        cplx_t bsb_src, bsb_dly;
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
        delay_line #(.T(logic), .DEPTH(1)) u_vdly (
          .clk, .rst_n, .d(bsv_src), .q(bsv_dly));
        delay_line #(.T(cplx_t), .DEPTH(1)) u_bdly (
          .clk, .rst_n, .d(bsb_src), .q(bsb_dly));

        internal_cell u_ic (
          .clk, .rst_n,
          .in_ctl (cs_ctl[i]),
          .in_c   (cs_c[i]),
          .in_s   (cs_s[i]),
          .in_u   (u_dly),
          .out_ctl(ic_ctl[i][j]),
          .out_u  (ic_u[i][j]),
          .out_mag(ic_mag[i][j]),
          .r_out  (ic_r[i][j]),
          .r_fin  (ic_fin[i][j]),
          .bs_valid(bsv_dly),
          .bs_b   (bsb_dly),
          .bs_x   (bc_x[j]),
          .bs_r   (bs_r[i][j]),
          .bs_valid_out(ic_bsv[i][j]),
          .bs_b_out(ic_bsb[i][j])
        );
      end else begin : g_none
        assign ic_ctl[i][j] = '0;
        assign ic_u[i][j]   = '0;
        assign ic_mag[i][j] = '0;
        assign ic_r[i][j]   = '0;
        assign ic_fin[i][j] = 1'b0;
        assign ic_bsv[i][j] = 1'b0;
        assign ic_bsb[i][j] = '0;
      end
    end
  end

  // R write-back, one port per column: the diagonal cell or one of the
  // internal cells above it (they finish on different cycles).
  always_comb begin
    for (int j = 0; j < TILE; j++) begin
      rw_en[j]   = bc_fin[j];
      rw_row[j]  = 2'(j);
      rw_ctl[j]  = cs_ctl[j];
      rw_data[j] = '{re: bc_r[j], im: '0};
      for (int i = 0; i < j; i++) begin
        if (ic_fin[i][j]) begin
          rw_en[j]   = 1'b1;
          rw_row[j]  = 2'(i);
          rw_ctl[j]  = ic_ctl[i][j];
          rw_data[j] = ic_r[i][j];
        end
      end
    end
  end

  // At most one finished R value per column and cycle.
  for (genvar j = 0; j < TILE; j++) begin : g_chk
    logic [TILE-1:0] fin_col;
    for (genvar i = 0; i < TILE; i++) begin : g_bit
      if (i < j) begin : g_ic_fin
        assign fin_col[i] = ic_fin[i][j];
      end else if (i == j) begin : g_bc_fin
        assign fin_col[i] = bc_fin[j];
      end else begin : g_no_fin
        assign fin_col[i] = 1'b0;
      end
    end
    a_rw_one_per_column: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fin_col))
      else $error("type1_block: two R values of column %0d finished together", j);
  end

endmodule
