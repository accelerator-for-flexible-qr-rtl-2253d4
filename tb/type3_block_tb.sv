// type3_block_tb: checks the Type III column (rotation of the right-hand side).
//
// Random unit rotations are replayed on cs_* at t+4i+3 for the element that
// entered at t, as the scheduler's taps do. A double-precision model applies
// them to the B column. The test checks that each element leaves exactly 16
// cycles after it entered with the model's value, and that the four B' values
// of each band come out once on bw_* with the right row and value. Two bands.
//
// The Type III role (rotating B alongside the first Type II tile) is the
// reference design's; the timing checked is this design's.
module type3_block_tb;
  import qr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cplx_t in_b = '0;
  ctl_t  [TILE-1:0] cs_ctl = '0;
  fix_t  [TILE-1:0] cs_c = '0;
  cplx_t [TILE-1:0] cs_s = '0;
  ctl_t out_ctl;
  cplx_t out_b;
  logic bw_en;
  logic [1:0] bw_row;
  ctl_t bw_ctl;
  cplx_t bw_data;

  always #5 clk = ~clk;

  type3_block dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int M = 10;
  localparam int NB = 2;
  localparam real TOL = 1.0e-8;
  real br [NB][M], bi [NB][M];
  real kc [NB][M][TILE], ksr [NB][M][TILE], ksi [NB][M][TILE];
  real orr [NB][M], ori [NB][M];
  real rr [NB][TILE], ri [NB][TILE];
  real gr [NB][TILE], gi [NB][TILE];
  int  nw [NB][TILE];
  int  icyc [NB][M];
  int  outs = 0;

  task automatic model(int b);
    real wr, wi, c, sr, si, tr, ti, nr, ni;
    for (int i = 0; i < TILE; i++) begin rr[b][i] = 0.0; ri[b][i] = 0.0; end
    for (int k = 0; k < M; k++) begin
      wr = br[b][k]; wi = bi[b][k];
      for (int i = 0; i < TILE; i++) begin
        c = kc[b][k][i]; sr = ksr[b][k][i]; si = ksi[b][k][i];
        tr = wr; ti = wi;
        wr = c * tr - (sr * rr[b][i] - si * ri[b][i]);
        wi = c * ti - (sr * ri[b][i] + si * rr[b][i]);
        nr = (sr * tr + si * ti) + c * rr[b][i];
        ni = (sr * ti - si * tr) + c * ri[b][i];
        rr[b][i] = nr; ri[b][i] = ni;
      end
      orr[b][k] = wr; ori[b][k] = wi;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_ctl.valid) begin
      automatic int b = out_ctl.band;
      automatic int k = out_ctl.idx;
      checks += 2;
      outs++;
      if (cycle - icyc[b][k] != 16) begin
        failures++; $display("element %0d left after %0d cycles", k, cycle - icyc[b][k]);
      end
      if (!near(out_b, orr[b][k], ori[b][k], TOL)) begin
        failures++; $display("out band %0d k %0d got %f,%f exp %f,%f", b, k,
                             fr(out_b.re), fr(out_b.im), orr[b][k], ori[b][k]);
      end
    end
    if (bw_en) begin
      gr[bw_ctl.band][bw_row] = fr(bw_data.re);
      gi[bw_ctl.band][bw_row] = fr(bw_data.im);
      nw[bw_ctl.band][bw_row]++;
    end
  end

  function automatic ctl_t mk_ctl(int b, int k);
    ctl_t c;
    c = '0;
    c.valid = 1'b1;
    c.first = (k == 0);
    c.last  = (k == M - 1);
    c.band  = BLKW'(b);
    c.idx   = IDXW'(k);
    return c;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < M; k++) begin
        br[b][k] = fr(to_fix(urand(-0.3, 0.3)));
        bi[b][k] = fr(to_fix(urand(-0.3, 0.3)));
        for (int i = 0; i < TILE; i++) begin
          real c, sr, si, nn;
          c = urand(0.0, 1.0); sr = urand(-1.0, 1.0); si = urand(-1.0, 1.0);
          nn = $sqrt(c * c + sr * sr + si * si);
          kc[b][k][i]  = fr(to_fix(c / nn));
          ksr[b][k][i] = fr(to_fix(sr / nn));
          ksi[b][k][i] = fr(to_fix(si / nn));
        end
      end
      for (int i = 0; i < TILE; i++) nw[b][i] = 0;
      model(b);
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < M + 4 * TILE; t++) begin
        @(negedge clk);
        if (t < M) begin
          in_b = to_c(br[b][t], bi[b][t]);
          icyc[b][t] = cycle;
        end else begin
          in_b = to_c(0.5, -0.5);                 // must be ignored
        end
        for (int i = 0; i < TILE; i++) begin
          automatic int k = t - 4 * i - 3;
          if (k >= 0 && k < M) begin
            cs_ctl[i] = mk_ctl(b, k);
            cs_c[i]   = to_fix(kc[b][k][i]);
            cs_s[i]   = to_c(ksr[b][k][i], ksi[b][k][i]);
          end else begin
            cs_ctl[i] = '0;
          end
        end
      end
      repeat (3) @(negedge clk);
    end
    cs_ctl = '0;
    repeat (6) @(negedge clk);

    checks++;
    if (outs != NB * M) begin failures++; $display("%0d elements left the block", outs); end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < TILE; i++) begin
        checks += 2;
        if (nw[b][i] != 1) begin failures++; $display("B'(%0d) band %0d written %0d times", i, b, nw[b][i]); end
        if (absr(gr[b][i] - rr[b][i]) > TOL || absr(gi[b][i] - ri[b][i]) > TOL) begin
          failures++; $display("B'(%0d) band %0d got %f,%f exp %f,%f", i, b, gr[b][i], gi[b][i], rr[b][i], ri[b][i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
