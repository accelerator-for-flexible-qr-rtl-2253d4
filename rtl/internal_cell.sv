// internal_cell: off-diagonal processing element of the Givens systolic array.
//
// Forward (QR) path. The cell holds one complex element R of the triangular
// factor. Given the rotation (C real, S complex) broadcast along its row and
// the element u arriving from the row above, it computes
//     u_out = C*u - S*R,     R <= conj(S)*u + C*R
// and also |u_out|^2, which a boundary cell directly below needs as its
// magnitude input. Everything is registered: results appear one cycle after
// the inputs, with the control word that came with C/S. A control word with
// 'first' set treats the stored R as 0 (start of a band); with 'last' set the
// updated R is final and r_fin pulses with it on r_out.
//
// Backward (back-substitution) path. With bs_valid the cell computes
//     b_out = b_in - R * x
// where b_in is the partial sum arriving from the cell on its right, x the
// solution element of its column and R its element of the factor read back
// from memory (bs_r). One cycle latency.
//
// The equations follow the design; the one-cycle latency and the valid/first/
// last control word are this implementation's choices. Only valid bits are
// reset (asynchronous, active low).
module internal_cell
  import qr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // forward
  input  ctl_t  in_ctl,
  input  fix_t  in_c,
  input  cplx_t in_s,
  input  cplx_t in_u,
  output ctl_t  out_ctl,
  output cplx_t out_u,
  output mag_t  out_mag,
  output cplx_t r_out,
  output logic  r_fin,
  // backward
  input  logic  bs_valid,
  input  cplx_t bs_b,
  input  cplx_t bs_x,
  input  cplx_t bs_r,
  output logic  bs_valid_out,
  output cplx_t bs_b_out
);

  cplx_t r_q;
  ctl_t  ctl_q;
  cplx_t u_q;
  mag_t  mag_q;
  logic  bsv_q;
  cplx_t b_q;

  cplx_t r_use, u_next, r_next, b_next;
  always_comb begin
    r_use  = in_ctl.first ? CPLX_ZERO : r_q;
    u_next = csub(rmul(in_c, in_u), cmul(in_s, r_use));
    r_next = cadd(cmul(cconj(in_s), in_u), rmul(in_c, r_use));
    b_next = csub(bs_b, cmul(bs_r, bs_x));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_q <= '0;
      bsv_q <= 1'b0;
    end else begin
      ctl_q <= in_ctl;
      bsv_q <= bs_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ctl.valid) begin
      r_q   <= r_next;
      u_q   <= u_next;
      mag_q <= cmag(u_next);
    end
    if (bs_valid) begin
      b_q <= b_next;
    end
  end

  assign out_ctl      = ctl_q;
  assign out_u        = u_q;
  assign out_mag      = mag_q;
  assign r_out        = r_q;
  assign r_fin        = ctl_q.valid && ctl_q.last;
  assign bs_valid_out = bsv_q;
  assign bs_b_out     = b_q;

endmodule
