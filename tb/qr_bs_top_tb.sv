// qr_bs_top_tb: end-to-end test of the folded QR + back-substitution
// accelerator at its default size (NMAX = 20).
//
// For each runtime size n = 4, 8, 12, 16, 20 (and a second 20x20 matrix) the
// testbench builds a random, diagonally dominant complex matrix A and a random
// right-hand side B, serves them through the host read ports, runs the
// accelerator, and compares R, B' = Q^H B and x with a double-precision model:
// a row-by-row Givens triangularisation with the same cell equations (the QR
// factor with a real positive diagonal is unique, so R and B' must agree) and
// a plain back substitution. The error is checked per element and as the
// normalised error energy in dB. It also counts how often each mechanism of
// the folded schedule happened (Type I reuse per band, Type II tile passes,
// Type III passes, RAM II traffic, both RAM I pages, the u = 0 rotation, the
// back-substitution passes, a Type II back-substitution step overlapping a
// Type I run, a pass held back by the band lag, and the mode switch) and
// fails if one never did, and reports the cycle count of each run.
//
// The cycle budget (1.15x the reference design's published 16x16 and 20x20
// counts) allows for this design's schedule being its own; the
// precision target of the formats is the reference design's -40 dB, checked
// here far more strictly.
module qr_bs_top_tb;
  import qr_pkg::*;

  localparam real SCALE = 2.0 ** FW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [NW-1:0] n_sz = '0;
  logic busy, done, en_bs;
  logic [IDXW-1:0] a1_row, a2_row, b_row;
  logic [BLKW-1:0] a2_grp;
  vec_t  a1_data, a2_data;
  cplx_t b_data;
  logic [R3AW-1:0] r_rd_addr = '0;
  cplx_t r_rd_data;
  logic [$clog2(NMAX)-1:0] x_rd_addr = '0;
  cplx_t x_rd_data;

  always #5 clk = ~clk;

  qr_bs_top dut (
    .clk, .rst_n, .start, .n(n_sz), .busy, .done, .en_bs,
    .a1_row, .a1_data, .a2_row, .a2_grp, .a2_data, .b_row, .b_data,
    .r_rd_addr, .r_rd_data, .x_rd_addr, .x_rd_data
  );

  // host memory
  cplx_t amem [NMAX][NMAX];
  cplx_t bmem [NMAX];
  always_comb begin
    for (int j = 0; j < TILE; j++) begin
      a1_data[j] = amem[a1_row % NMAX][j];
      a2_data[j] = amem[a2_row % NMAX][(TILE * a2_grp + j) % NMAX];
    end
    b_data = bmem[b_row % NMAX];
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int m_t1_band = 0, m_t2_pass = 0, m_t3_pass = 0, m_t3_alone = 0;
  int m_ram2_rd = 0, m_ram2_wr_t2 = 0, m_ram2_wr_t3 = 0, m_page1 = 0;
  int m_t1_from_t2 = 0, m_rot_zero = 0, m_bs_t2 = 0, m_bs_t1 = 0, m_mode = 0;
  int m_bs_overlap = 0, m_lag_hold = 0;
  logic en_bs_d = 1'b0, t1_run = 1'b0;
  always @(posedge clk) if (rst_n) begin
    en_bs_d <= en_bs;
    if (dut.t1_in_ctl.valid && dut.t1_in_ctl.first) m_t1_band++;
    if (dut.t1_in_ctl.valid && !dut.t1_issue.valid) m_t1_from_t2++;
    if (dut.pass_issue.ctl.valid && dut.pass_issue.ctl.first && dut.pass_issue.t2) m_t2_pass++;
    if (dut.pass_issue.ctl.valid && dut.pass_issue.ctl.first && dut.pass_issue.t3) m_t3_pass++;
    if (dut.pass_issue.ctl.valid && dut.pass_issue.ctl.first && !dut.pass_issue.t2) m_t3_alone++;
    if (dut.pass_issue.ctl.valid && dut.pass_issue.ctl.band != 0) m_ram2_rd++;
    if (dut.r2_we && dut.r2_wgrp != NBLK) m_ram2_wr_t2++;
    if (dut.r2_we && dut.r2_wgrp == NBLK) m_ram2_wr_t3++;
    if (|dut.r1_we && dut.r1_wpage[0]) m_page1++;
    for (int i = 0; i < TILE; i++)
      if (dut.t1_cs_ctl[i].valid && dut.t1_cs_c[i] == FIX_ONE && dut.t1_cs_s[i] == CPLX_ZERO)
        m_rot_zero++;
    if (dut.bs_t2_go) m_bs_t2++;
    if (dut.bs_t1_go) m_bs_t1++;
    if (en_bs && !en_bs_d) m_mode++;
    if (dut.bs_t1_go) t1_run <= 1'b1;
    else if (dut.bs_t1_done) t1_run <= 1'b0;
    if (dut.bs_t2_go && t1_run) m_bs_overlap++;
    if (dut.u_sched.state == dut.u_sched.S_FWD && !dut.u_sched.p_act && !dut.u_sched.all_issued
        && dut.u_sched.pp != 0 && !dut.u_sched.start_ok) m_lag_hold++;
  end

  // ------------------------------------------------------------ reference model
  real ar [NMAX][NMAX+1];   // [A | B], real parts
  real ai [NMAX][NMAX+1];
  real rr [NMAX][NMAX+1];   // R | B'
  real ri [NMAX][NMAX+1];
  real xr [NMAX], xi [NMAX];

  function automatic fix_t to_fix(real v);
    return fix_t'(longint'(v * SCALE));
  endfunction
  function automatic real from_fix(fix_t v);
    return real'(longint'(v)) / SCALE;
  endfunction
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 1000001) / 1000000.0;
  endfunction

  task automatic make_problem(int n);
    for (int i = 0; i < NMAX; i++)
      for (int j = 0; j <= NMAX; j++) begin
        ar[i][j] = 0.0; ai[i][j] = 0.0;
      end
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        ar[i][j] = urand(-0.04, 0.04);
        ai[i][j] = urand(-0.04, 0.04);
      end
      ar[i][i] = ar[i][i] + urand(0.25, 0.35);
      ar[i][n] = urand(-0.15, 0.15);
      ai[i][n] = urand(-0.15, 0.15);
    end
    // quantise the inputs so the model sees exactly what the hardware sees
    for (int i = 0; i < NMAX; i++) begin
      for (int j = 0; j < NMAX; j++) begin
        amem[i][j] = '{re: to_fix(ar[i][j]), im: to_fix(ai[i][j])};
        ar[i][j] = from_fix(amem[i][j].re);
        ai[i][j] = from_fix(amem[i][j].im);
      end
      bmem[i] = '{re: to_fix(ar[i][n]), im: to_fix(ai[i][n])};
      ar[i][n] = from_fix(bmem[i].re);
      ai[i][n] = from_fix(bmem[i].im);
    end
  endtask

  task automatic reference(int n);
    real ur [NMAX+1], ui [NMAX+1];
    real rn, c, sr, si, tr, ti;
    for (int i = 0; i < NMAX; i++)
      for (int j = 0; j <= NMAX; j++) begin
        rr[i][j] = 0.0; ri[i][j] = 0.0;
      end
    for (int k = 0; k < n; k++) begin
      for (int j = 0; j <= n; j++) begin
        ur[j] = ar[k][j]; ui[j] = ai[k][j];
      end
      for (int i = 0; i < n; i++) begin
        if (ur[i] == 0.0 && ui[i] == 0.0) continue;
        rn = $sqrt(rr[i][i] * rr[i][i] + ur[i] * ur[i] + ui[i] * ui[i]);
        c  = rr[i][i] / rn;
        sr = ur[i] / rn;
        si = ui[i] / rn;
        rr[i][i] = rn;
        for (int j = i + 1; j <= n; j++) begin
          // u' = c u - s R ; R' = conj(s) u + c R
          tr = c * ur[j] - (sr * rr[i][j] - si * ri[i][j]);
          ti = c * ui[j] - (sr * ri[i][j] + si * rr[i][j]);
          rr[i][j] = (sr * ur[j] + si * ui[j]) + c * rr[i][j];
          ri[i][j] = (sr * ui[j] - si * ur[j]) + c * ri[i][j];
          ur[j] = tr; ui[j] = ti;
        end
      end
    end
    for (int i = n - 1; i >= 0; i--) begin
      tr = rr[i][n]; ti = ri[i][n];
      for (int j = i + 1; j < n; j++) begin
        tr = tr - (rr[i][j] * xr[j] - ri[i][j] * xi[j]);
        ti = ti - (rr[i][j] * xi[j] + ri[i][j] * xr[j]);
      end
      xr[i] = tr / rr[i][i];
      xi[i] = ti / rr[i][i];
    end
  endtask

  task automatic check_results(int n);
    real er, sr, ex, sx, dr, di, tol_r, tol_x, db_r, db_x;
    cplx_t v;
    int bad;
    er = 0.0; sr = 0.0; ex = 0.0; sx = 0.0; bad = 0;
    // the 1/R' of the boundary cell has 14 fraction bits: about 2e-5 relative
    tol_r = 1.0e-4;
    tol_x = 1.0e-3;
    for (int i = 0; i < n; i++) begin
      for (int j = i; j <= n; j++) begin
        r_rd_addr = (j < n) ? r_addr(i, j) : b_addr(i);
        #1;
        v  = r_rd_data;
        dr = from_fix(v.re) - rr[i][j];
        di = from_fix(v.im) - ri[i][j];
        er += dr * dr + di * di;
        sr += rr[i][j] * rr[i][j] + ri[i][j] * ri[i][j];
        checks++;
        if (dr > tol_r || dr < -tol_r || di > tol_r || di < -tol_r) begin
          failures++;
          if (bad++ < 5)
            $display("n=%0d %s(%0d,%0d) got (%f, %f) expected (%f, %f)", n,
                     (j < n) ? "R" : "B'", i, j, from_fix(v.re), from_fix(v.im),
                     rr[i][j], ri[i][j]);
        end
      end
      x_rd_addr = ($clog2(NMAX))'(i);
      #1;
      v  = x_rd_data;
      dr = from_fix(v.re) - xr[i];
      di = from_fix(v.im) - xi[i];
      ex += dr * dr + di * di;
      sx += xr[i] * xr[i] + xi[i] * xi[i];
      checks++;
      if (dr > tol_x || dr < -tol_x || di > tol_x || di < -tol_x) begin
        failures++;
        if (bad++ < 10)
          $display("n=%0d x(%0d) got (%f, %f) expected (%f, %f)", n, i,
                   from_fix(v.re), from_fix(v.im), xr[i], xi[i]);
      end
    end
    db_r = 10.0 * $log10((er + 1.0e-300) / sr);
    db_x = 10.0 * $log10((ex + 1.0e-300) / sx);
    $display("n=%0d: R,B' error %0.1f dB, x error %0.1f dB", n, db_r, db_x);
    checks += 2;
    if (db_r > -60.0) failures++;
    if (db_x > -55.0) failures++;
  endtask

  task automatic run(int n);
    int t0, t_bs, t_end;
    make_problem(n);
    reference(n);
    @(negedge clk);
    n_sz  = NW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycle;
    t_bs = 0;
    while (!done) begin
      @(negedge clk);
      if (en_bs && t_bs == 0) t_bs = cycle;
    end
    t_end = cycle;
    $display("n=%0d: forward %0d cycles, back substitution %0d cycles, total %0d",
             n, t_bs - t0, t_end - t_bs, t_end - t0);
    // The published schedules finish 20x20 in 220 (forward) + 73 (back
    // substitution) cycles, 16x16 in 127 + 47. This implementation starts its
    // passes by its own rule and does not overlap everything the published
    // schedules do; it must stay within 15 % of those figures.
    if (n == 20 || n == 16) begin
      checks += 2;
      if (real'(t_bs - t0) > 1.15 * ((n == 20) ? 220.0 : 127.0)) begin
        failures++; $display("forward too slow");
      end
      if (real'(t_end - t_bs) > 1.15 * ((n == 20) ? 73.0 : 47.0)) begin
        failures++; $display("back substitution too slow");
      end
    end
    @(negedge clk);
    check_results(n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(4);
    run(8);
    run(12);
    run(16);
    run(20);
    run(20);
    // mechanisms
    checks += 12;
    if (m_t1_band    == 0) begin failures++; $display("Type I never reused for a later band"); end
    if (m_t1_from_t2 == 0) begin failures++; $display("Type I never fed by Type II"); end
    if (m_t2_pass    == 0) begin failures++; $display("no Type II tile pass"); end
    if (m_t3_alone   == 0) begin failures++; $display("no Type III-only pass"); end
    if (m_ram2_rd    == 0) begin failures++; $display("RAM II never read"); end
    if (m_ram2_wr_t2 == 0) begin failures++; $display("RAM II never written by Type II"); end
    if (m_page1      == 0) begin failures++; $display("RAM I page 1 never used"); end
    if (m_rot_zero   == 0) begin failures++; $display("u = 0 rotation never seen"); end
    if (m_bs_t2 == 0 || m_bs_t1 == 0) begin failures++; $display("back substitution pass missing"); end
    if (m_bs_overlap == 0) begin failures++; $display("Type II never overlapped a Type I run"); end
    if (m_lag_hold   == 0) begin failures++; $display("no pass was ever held by the band lag"); end
    if (m_mode       != 6) begin failures++; $display("mode switch count %0d", m_mode); end
    // expected pass counts: sum over runs of Q, Q(Q-1)/2
    checks += 3;
    if (m_t1_band != 1+2+3+4+5+5) begin failures++; $display("Type I bands %0d", m_t1_band); end
    if (m_t2_pass != 0+1+3+6+10+10) begin failures++; $display("Type II passes %0d", m_t2_pass); end
    if (m_bs_t2   != 0+1+3+6+10+10) begin failures++; $display("BS Type II passes %0d", m_bs_t2); end
    $display("mechanisms: T1 bands %0d (fed by T2 %0d vectors), T2 passes %0d, T3 passes %0d (alone %0d), RAM II reads %0d, writes T2 %0d T3 %0d, RAM I page-1 writes %0d, u=0 rotations %0d, BS T2 %0d T1 %0d (T2 during T1 %0d), lag-hold cycles %0d, mode switches %0d",
             m_t1_band, m_t1_from_t2, m_t2_pass, m_t3_pass, m_t3_alone, m_ram2_rd,
             m_ram2_wr_t2, m_ram2_wr_t3, m_page1, m_rot_zero, m_bs_t2, m_bs_t1, m_bs_overlap, m_lag_hold, m_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
