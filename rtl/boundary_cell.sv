// boundary_cell: diagonal processing element of the Givens systolic array.
//
// Forward (QR) path. For each incoming element u of its column (with |u|^2
// supplied alongside, computed by the cell above or the block input), the cell
// updates its real diagonal value R and emits the rotation that zeroes u:
//     R' = sqrt(R^2 + |u|^2),  C = R / R',  S = u / R',  R <= R'
// and C = 1, S = 0, R unchanged when u = 0. The computation is a three-stage
// pipeline, as the design prescribes: stage 1 accumulates the running sum of
// squares (R'^2 is simply the sum of all |u|^2 seen in the band, which removes
// the R -> R' feedback from the pipeline so a new element can enter every
// cycle), stage 2 takes the square root, stage 3 forms the reciprocal 1/R' and
// the two products. C and S leave three cycles after u enters, with the control
// word that came with u. On the band's last element the final R is on r_out and
// r_fin pulses. A control word with 'first' set restarts R at 0.
//
// Backward (back-substitution) path. With bs_valid the cell computes
//     X = B / R
// from the incoming partial sum B and the diagonal R read back from memory
// (bs_r), using the stage-3 reciprocal and multiplier. X is registered: one
// cycle latency. Forward and backward use never overlap in time.
//
// Widths: data in qr_pkg (Q1.38 parts), reciprocal 50 bits with 14 fraction
// bits as in the design's precision study. The asynchronous active-low reset
// clears only the valid bits; data registers need no reset because they are
// only read when their valid bit is set.
module boundary_cell
  import qr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // forward
  input  ctl_t  in_ctl,
  input  cplx_t in_u,
  input  mag_t  in_mag,
  output ctl_t  out_ctl,
  output fix_t  out_c,
  output cplx_t out_s,
  output fix_t  r_out,
  output logic  r_fin,
  // backward
  input  logic  bs_valid,
  input  cplx_t bs_b,
  input  fix_t  bs_r,
  output logic  x_valid,
  output cplx_t x_out
);

  // stage 1: running sum of squares
  ctl_t  s1_ctl;
  cplx_t s1_u;
  logic  s1_uz;
  mag_t  s1_acc;
  mag_t  acc_q;

  // stage 2: square root; r_prev is R before this element
  ctl_t  s2_ctl;
  cplx_t s2_u;
  logic  s2_uz;
  fix_t  s2_rnew;
  fix_t  s2_rprev;
  fix_t  r_cur;

  // stage 3 registers
  ctl_t  s3_ctl;
  fix_t  s3_c;
  cplx_t s3_s;
  fix_t  s3_r;
  logic  s3_xv;

  mag_t acc_next;
  assign acc_next = (in_ctl.first ? mag_t'(0) : acc_q) + in_mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_ctl <= '0;
      s2_ctl <= '0;
      s3_ctl <= '0;
      s3_xv  <= 1'b0;
    end else begin
      s1_ctl <= in_ctl;
      s2_ctl <= s1_ctl;
      s3_ctl <= s2_ctl;
      s3_xv  <= bs_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ctl.valid) begin
      acc_q  <= acc_next;
      s1_acc <= acc_next;
      s1_u   <= in_u;
      s1_uz  <= (in_u.re == '0) && (in_u.im == '0);
    end
    if (s1_ctl.valid) begin
      s2_rnew  <= fix_t'(isqrt(s1_acc));
      s2_rprev <= s1_ctl.first ? fix_t'(0) : r_cur;
      r_cur    <= fix_t'(isqrt(s1_acc));
      s2_u     <= s1_u;
      s2_uz    <= s1_uz;
    end
  end

  // stage 3: reciprocal and products, shared with the backward path
  fix_t                  rec_in;
  cplx_t                 mul_in;
  logic signed [RW-1:0]  inv;
  always_comb begin
    rec_in = bs_valid ? bs_r : s2_rnew;
    mul_in = bs_valid ? bs_b : s2_u;
    inv    = recip(rec_in);
  end

  always_ff @(posedge clk) begin
    if (bs_valid) begin
      s3_s <= '{re: rcmul(mul_in.re, inv), im: rcmul(mul_in.im, inv)};
    end else if (s2_ctl.valid) begin
      s3_r <= s2_rnew;
      if (s2_uz) begin
        s3_c <= FIX_ONE;
        s3_s <= CPLX_ZERO;
      end else begin
        s3_c <= rcmul(s2_rprev, inv);
        s3_s <= '{re: rcmul(mul_in.re, inv), im: rcmul(mul_in.im, inv)};
      end
    end
  end

  assign out_ctl = s3_ctl;
  assign out_c   = s3_c;
  assign out_s   = s3_s;
  assign r_out   = s3_r;
  assign r_fin   = s3_ctl.valid && s3_ctl.last;
  assign x_valid = s3_xv;
  assign x_out   = s3_s;

endmodule
