// internal_cell_tb: checks the internal cell against a real-valued model.
//
// Forward: bands of random rotations (C, S) and elements u are applied one per
// cycle, with gaps; each result must appear exactly one cycle later and match
// u_out = C u - S R, R' = conj(S) u + C R, |u_out|^2, with R restarted by
// 'first' and r_fin on 'last'. A cycle without 'valid' must leave R unchanged.
// Backward: b_out = b_in - R x, one cycle later. Tolerances allow for the
// truncation of each product (a few units of 2^-38).
//
// The equations are the reference design's; the one-cycle latency and the
// 'first'/'last' control are this design's.
module internal_cell_tb;
  import qr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t in_ctl = '0;
  fix_t in_c = '0;
  cplx_t in_s = '0, in_u = '0;
  ctl_t out_ctl;
  cplx_t out_u, r_out;
  mag_t out_mag;
  logic r_fin;
  logic bs_valid = 1'b0, bs_valid_out;
  cplx_t bs_b = '0, bs_x = '0, bs_r = '0, bs_b_out;

  always #5 clk = ~clk;

  internal_cell dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real TOL = 1.0e-10;

  initial begin
    real rr, ri, c, sr, si, ur, ui, our, oui, nrr, nri, mag;
    int c0, fins;
    fins = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 3; b++) begin
      rr = 0.0; ri = 0.0;
      for (int k = 0; k < 6; k++) begin
        c  = fr(to_fix(urand(0.0, 1.0)));
        sr = fr(to_fix(urand(-0.6, 0.6)));
        si = fr(to_fix(urand(-0.6, 0.6)));
        ur = fr(to_fix(urand(-0.8, 0.8)));
        ui = fr(to_fix(urand(-0.8, 0.8)));
        @(negedge clk);
        in_ctl = '0;
        in_ctl.valid = 1'b1;
        in_ctl.first = (k == 0);
        in_ctl.last  = (k == 5);
        in_ctl.idx   = IDXW'(k);
        in_c = to_fix(c);
        in_s = to_c(sr, si);
        in_u = to_c(ur, ui);
        c0 = cycle;
        // model
        our = c * ur - (sr * rr - si * ri);
        oui = c * ui - (sr * ri + si * rr);
        nrr = (sr * ur + si * ui) + c * rr;
        nri = (sr * ui - si * ur) + c * ri;
        rr = nrr; ri = nri;
        mag = our * our + oui * oui;
        @(negedge clk);
        in_ctl = '0;
        in_u = to_c(0.7, 0.7);       // ignored: not valid
        checks += 6;
        if (!out_ctl.valid || out_ctl.idx != IDXW'(k) || cycle - c0 != 1) begin
          failures++; $display("latency/ctl wrong at k %0d", k);
        end
        if (!near(out_u, our, oui, TOL)) begin
          failures++; $display("u_out k %0d got %f,%f exp %f,%f", k, fr(out_u.re), fr(out_u.im), our, oui);
        end
        if (!near(r_out, rr, ri, TOL)) begin
          failures++; $display("R k %0d got %f,%f exp %f,%f", k, fr(r_out.re), fr(r_out.im), rr, ri);
        end
        if (absr(real'(out_mag) / (SCALE * SCALE) - mag) > 1.0e-9) begin
          failures++; $display("mag k %0d", k);
        end
        if (r_fin != (k == 5)) begin failures++; $display("r_fin k %0d", k); end
        if (r_fin) fins++;
        // an idle cycle (random length) must keep R
        repeat ($urandom % 3) @(negedge clk);
        if (!near(r_out, rr, ri, TOL)) begin
          failures++; $display("R changed while idle");
        end
      end
    end
    checks++;
    if (fins != 3) begin failures++; $display("r_fin count %0d", fins); end

    // backward
    for (int t = 0; t < 8; t++) begin
      real br, bi, xr, xi, qr, qi;
      br = fr(to_fix(urand(-0.8, 0.8))); bi = fr(to_fix(urand(-0.8, 0.8)));
      xr = fr(to_fix(urand(-0.8, 0.8))); xi = fr(to_fix(urand(-0.8, 0.8)));
      qr = fr(to_fix(urand(-0.8, 0.8))); qi = fr(to_fix(urand(-0.8, 0.8)));
      @(negedge clk);
      bs_valid = 1'b1;
      bs_b = to_c(br, bi); bs_x = to_c(xr, xi); bs_r = to_c(qr, qi);
      c0 = cycle;
      @(negedge clk);
      bs_valid = 1'b0;
      checks += 2;
      if (!bs_valid_out || cycle - c0 != 1) begin failures++; $display("bs latency"); end
      if (!near(bs_b_out, br - (qr * xr - qi * xi), bi - (qr * xi + qi * xr), TOL)) begin
        failures++; $display("b_out wrong at %0d", t);
      end
    end
    @(negedge clk);
    checks++;
    if (bs_valid_out) begin failures++; $display("bs_valid_out stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
