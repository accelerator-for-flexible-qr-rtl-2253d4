// type2_block_tb: checks the 4x4 Type II block on its own.
//
// Forward: random unit rotations (C real, S complex, C^2 + |S|^2 = 1) are
// made up for each vector and row, as the Type I block would send them, and
// replayed on cs_* exactly when the scheduler's taps would: row i at t+4i+3
// for the vector that entered at t. A double-precision model applies the same
// rotations. The test checks that every vector leaves the last row exactly 16
// cycles after it entered with the model's values, and that all 16 R values
// of each band are written back once and are right. Two bands are run.
// Backward: b_out(i) = b(i) - sum_j R(i,j) x(j) after four cycles.
//
// The cell equations are the reference design's; the 16-cycle pass latency
// and the 4-cycle backward step are this design's timing.
module type2_block_tb;
  import qr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vec_t in_vec = '0;
  ctl_t  [TILE-1:0] cs_ctl = '0;
  fix_t  [TILE-1:0] cs_c = '0;
  cplx_t [TILE-1:0] cs_s = '0;
  ctl_t out_ctl;
  vec_t out_vec;
  logic  [TILE-1:0] rw_en;
  logic  [TILE-1:0][1:0] rw_row;
  ctl_t  [TILE-1:0] rw_ctl;
  cplx_t [TILE-1:0] rw_data;
  logic bs_valid = 1'b0, bs_out_valid;
  vec_t bs_b = '0, bs_x = '0, bs_out;
  cplx_t [TILE-1:0][TILE-1:0] bs_r = '0;

  always #5 clk = ~clk;

  type2_block dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int M = 9;
  localparam int NB = 2;
  localparam real TOL = 1.0e-8;
  real ar [NB][M][TILE], ai [NB][M][TILE];     // input vectors
  real kc [NB][M][TILE], ksr [NB][M][TILE], ksi [NB][M][TILE];  // rotations
  real orr [NB][M][TILE], ori [NB][M][TILE];   // model outputs
  real rr [NB][TILE][TILE], ri [NB][TILE][TILE];
  real gr [NB][TILE][TILE], gi [NB][TILE][TILE];
  int  nw [NB][TILE][TILE];
  int  icyc [NB][M];
  int  outs = 0;

  task automatic model(int b);
    real wr [TILE], wi [TILE];
    real c, sr, si, tr, ti, nr, ni;
    for (int i = 0; i < TILE; i++)
      for (int j = 0; j < TILE; j++) begin rr[b][i][j] = 0.0; ri[b][i][j] = 0.0; end
    for (int k = 0; k < M; k++) begin
      for (int j = 0; j < TILE; j++) begin wr[j] = ar[b][k][j]; wi[j] = ai[b][k][j]; end
      for (int i = 0; i < TILE; i++) begin
        c = kc[b][k][i]; sr = ksr[b][k][i]; si = ksi[b][k][i];
        for (int j = 0; j < TILE; j++) begin
          tr = wr[j]; ti = wi[j];
          wr[j] = c * tr - (sr * rr[b][i][j] - si * ri[b][i][j]);
          wi[j] = c * ti - (sr * ri[b][i][j] + si * rr[b][i][j]);
          nr = (sr * tr + si * ti) + c * rr[b][i][j];
          ni = (sr * ti - si * tr) + c * ri[b][i][j];
          rr[b][i][j] = nr; ri[b][i][j] = ni;
        end
      end
      for (int j = 0; j < TILE; j++) begin orr[b][k][j] = wr[j]; ori[b][k][j] = wi[j]; end
    end
  endtask

  function automatic ctl_t mk_ctl(int b, int k);
    ctl_t c;
    c = '0;
    c.valid = 1'b1;
    c.first = (k == 0);
    c.last  = (k == M - 1);
    c.band  = BLKW'(b);
    c.tile  = BLKW'(b + 1);
    c.idx   = IDXW'(k);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_ctl.valid) begin
      automatic int b = out_ctl.band;
      automatic int k = out_ctl.idx;
      checks += 2;
      outs++;
      if (cycle - icyc[b][k] != 16) begin
        failures++; $display("vector %0d left after %0d cycles", k, cycle - icyc[b][k]);
      end
      for (int j = 0; j < TILE; j++)
        if (!near(out_vec[j], orr[b][k][j], ori[b][k][j], TOL)) begin
          failures++; $display("out band %0d k %0d lane %0d got %f,%f exp %f,%f", b, k, j,
                               fr(out_vec[j].re), fr(out_vec[j].im), orr[b][k][j], ori[b][k][j]);
          break;
        end
    end
    for (int j = 0; j < TILE; j++)
      if (rw_en[j]) begin
        automatic int b = rw_ctl[j].band;
        automatic int r = rw_row[j];
        gr[b][r][j] = fr(rw_data[j].re);
        gi[b][r][j] = fr(rw_data[j].im);
        nw[b][r][j]++;
      end
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < M; k++)
        for (int j = 0; j < TILE; j++) begin
          real c, sr, si, nn;
          ar[b][k][j] = fr(to_fix(urand(-0.3, 0.3)));
          ai[b][k][j] = fr(to_fix(urand(-0.3, 0.3)));
          // a unit rotation for row j of vector k
          c = urand(0.0, 1.0); sr = urand(-1.0, 1.0); si = urand(-1.0, 1.0);
          nn = $sqrt(c * c + sr * sr + si * si);
          kc[b][k][j]  = fr(to_fix(c / nn));
          ksr[b][k][j] = fr(to_fix(sr / nn));
          ksi[b][k][j] = fr(to_fix(si / nn));
        end
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) nw[b][i][j] = 0;
      model(b);
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < M + 4 * TILE; t++) begin
        @(negedge clk);
        if (t < M) begin
          for (int j = 0; j < TILE; j++) in_vec[j] = to_c(ar[b][t][j], ai[b][t][j]);
          icyc[b][t] = cycle;
        end else begin
          in_vec = '0;
        end
        for (int i = 0; i < TILE; i++) begin
          automatic int k = t - 4 * i - 3;
          if (k >= 0 && k < M) begin
            cs_ctl[i] = mk_ctl(b, k);
            cs_c[i]   = to_fix(kc[b][k][i]);
            cs_s[i]   = to_c(ksr[b][k][i], ksi[b][k][i]);
          end else begin
            cs_ctl[i] = '0;
            cs_c[i]   = to_fix(urand(-1.0, 1.0));     // must be ignored
            cs_s[i]   = to_c(urand(-1.0, 1.0), 0.0);
          end
        end
      end
      repeat (4) @(negedge clk);
    end
    cs_ctl = '0;
    repeat (6) @(negedge clk);

    checks++;
    if (outs != NB * M) begin failures++; $display("%0d vectors left the block", outs); end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) begin
          checks += 2;
          if (nw[b][i][j] != 1) begin
            failures++; $display("R(%0d,%0d) band %0d written %0d times", i, j, b, nw[b][i][j]);
          end
          if (absr(gr[b][i][j] - rr[b][i][j]) > TOL || absr(gi[b][i][j] - ri[b][i][j]) > TOL) begin
            failures++; $display("R(%0d,%0d) band %0d got %f,%f exp %f,%f", i, j, b,
                                 gr[b][i][j], gi[b][i][j], rr[b][i][j], ri[b][i][j]);
          end
        end

    // backward
    for (int t = 0; t < 5; t++) begin
      real br [TILE], bi [TILE], er [TILE], ei [TILE];
      real xr [TILE], xi [TILE], qr [TILE][TILE], qi [TILE][TILE];
      int t0;
      for (int i = 0; i < TILE; i++) begin
        br[i] = fr(to_fix(urand(-0.4, 0.4))); bi[i] = fr(to_fix(urand(-0.4, 0.4)));
        xr[i] = fr(to_fix(urand(-0.4, 0.4))); xi[i] = fr(to_fix(urand(-0.4, 0.4)));
        for (int j = 0; j < TILE; j++) begin
          qr[i][j] = fr(to_fix(urand(-0.4, 0.4))); qi[i][j] = fr(to_fix(urand(-0.4, 0.4)));
        end
      end
      for (int i = 0; i < TILE; i++) begin
        er[i] = br[i]; ei[i] = bi[i];
        for (int j = 0; j < TILE; j++) begin
          er[i] -= qr[i][j] * xr[j] - qi[i][j] * xi[j];
          ei[i] -= qr[i][j] * xi[j] + qi[i][j] * xr[j];
        end
      end
      @(negedge clk);
      bs_valid = 1'b1;
      for (int i = 0; i < TILE; i++) begin
        bs_b[i] = to_c(br[i], bi[i]);
        bs_x[i] = to_c(xr[i], xi[i]);
        for (int j = 0; j < TILE; j++) bs_r[i][j] = to_c(qr[i][j], qi[i][j]);
      end
      t0 = cycle;
      @(negedge clk);
      bs_valid = 1'b0;
      bs_b = '0;
      for (int s = 1; s <= 5; s++) begin
        checks++;
        if (bs_out_valid != (s == TILE)) begin
          failures++; $display("bs_out_valid=%0d at t+%0d", bs_out_valid, cycle - t0);
        end
        if (s == TILE)
          for (int i = 0; i < TILE; i++) begin
            checks++;
            if (!near(bs_out[i], er[i], ei[i], TOL)) begin
              failures++; $display("b_out %0d got %f,%f exp %f,%f", i, fr(bs_out[i].re), fr(bs_out[i].im), er[i], ei[i]);
            end
          end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
