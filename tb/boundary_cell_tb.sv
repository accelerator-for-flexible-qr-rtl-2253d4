// boundary_cell_tb: checks the boundary cell against a real-valued model.
//
// Two bands of row elements are streamed one per cycle (the first element of
// band one is zero, which must give C = 1, S = 0 exactly; band two restarts R
// with 'first'). For every element the C/S output must appear exactly three
// cycles after the input (the three-stage pipeline) and match
// C = R/R', S = u/R' with R' = sqrt(R^2 + |u|^2); the final R must come with
// r_fin on the band's last element. Then the backward function X = B/R is
// checked, with its one-cycle latency.
//
// The equations and the three-cycle latency are the reference design's; the
// one-cycle backward latency and the exact u = 0 result are this design's.
module boundary_cell_tb;
  import qr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t in_ctl = '0;
  cplx_t in_u = '0;
  mag_t in_mag = '0;
  ctl_t out_ctl;
  fix_t out_c, r_out, bs_r = '0;
  cplx_t out_s, bs_b = '0, x_out;
  logic r_fin, bs_valid = 1'b0, x_valid;

  always #5 clk = ~clk;

  boundary_cell dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int M = 7;
  real ur [2][M], ui [2][M];
  real ec [2][M], esr [2][M], esi [2][M], er [2][M];
  int  icyc [2][M];
  int  seen = 0, fins = 0;

  // monitor
  always @(posedge clk) if (rst_n && out_ctl.valid) begin
    automatic int b = out_ctl.band;
    automatic int k = out_ctl.idx;
    checks += 3;
    if (cycle - icyc[b][k] != 3) begin
      failures++; $display("latency %0d for band %0d k %0d", cycle - icyc[b][k], b, k);
    end
    if (ur[b][k] == 0.0 && ui[b][k] == 0.0) begin
      if (out_c != FIX_ONE || out_s != CPLX_ZERO) begin
        failures++; $display("u=0 did not give C=1,S=0");
      end
    end else begin
      if (absr(fr(out_c) - ec[b][k]) > 2.0e-4) begin
        failures++; $display("C band %0d k %0d got %f exp %f", b, k, fr(out_c), ec[b][k]);
      end
      if (!near(out_s, esr[b][k], esi[b][k], 2.0e-4)) begin
        failures++; $display("S band %0d k %0d got %f,%f exp %f,%f", b, k,
                             fr(out_s.re), fr(out_s.im), esr[b][k], esi[b][k]);
      end
    end
    if (absr(fr(r_out) - er[b][k]) > 1.0e-9) begin
      failures++; $display("R band %0d k %0d got %f exp %f", b, k, fr(r_out), er[b][k]);
    end
    if (r_fin != out_ctl.last) begin
      failures++; $display("r_fin wrong at k %0d", k);
    end
    if (r_fin) fins++;
    seen++;
  end

  initial begin
    real r, rn;
    // stimulus and model
    for (int b = 0; b < 2; b++) begin
      r = 0.0;
      for (int k = 0; k < M; k++) begin
        if (b == 0 && (k == 0 || k == 3)) begin
          ur[b][k] = 0.0; ui[b][k] = 0.0;
        end else begin
          ur[b][k] = fr(to_fix(urand(-0.4, 0.4)));
          ui[b][k] = fr(to_fix(urand(-0.4, 0.4)));
        end
        if (ur[b][k] == 0.0 && ui[b][k] == 0.0) begin
          ec[b][k] = 1.0; esr[b][k] = 0.0; esi[b][k] = 0.0; er[b][k] = r;
        end else begin
          rn = $sqrt(r * r + ur[b][k] * ur[b][k] + ui[b][k] * ui[b][k]);
          ec[b][k] = r / rn; esr[b][k] = ur[b][k] / rn; esi[b][k] = ui[b][k] / rn;
          r = rn;
          er[b][k] = r;
        end
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++) begin
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        in_ctl = '0;
        in_ctl.valid = 1'b1;
        in_ctl.first = (k == 0);
        in_ctl.last  = (k == M - 1);
        in_ctl.band  = BLKW'(b);
        in_ctl.idx   = IDXW'(k);
        in_u   = '{re: to_fix(ur[b][k]), im: to_fix(ui[b][k])};
        in_mag = cmag(in_u);
        icyc[b][k] = cycle;
      end
      @(negedge clk);
      in_ctl = '0;
      repeat (2) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks += 2;
    if (seen != 2 * M) begin failures++; $display("saw %0d outputs", seen); end
    if (fins != 2) begin failures++; $display("saw %0d r_fin", fins); end

    // backward: X = B / R, one cycle
    for (int t = 0; t < 6; t++) begin
      real rv, br, bi;
      int c0;
      rv = fr(to_fix(urand(0.2, 1.2)));
      br = fr(to_fix(urand(-0.5, 0.5)));
      bi = fr(to_fix(urand(-0.5, 0.5)));
      @(negedge clk);
      bs_valid = 1'b1;
      bs_r = to_fix(rv);
      bs_b = '{re: to_fix(br), im: to_fix(bi)};
      c0 = cycle;
      @(negedge clk);
      bs_valid = 1'b0;
      checks += 2;
      if (!x_valid || cycle - c0 != 1) begin failures++; $display("x latency"); end
      if (!near(x_out, br / rv, bi / rv, 1.0e-4)) begin
        failures++; $display("X got %f,%f exp %f,%f", fr(x_out.re), fr(x_out.im), br / rv, bi / rv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
