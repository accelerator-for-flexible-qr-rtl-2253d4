// type1_block_tb: checks the triangular Type I block on its own.
//
// Forward: two bands of M random row vectors (4 complex elements each) are
// streamed, spaced as the scheduler spaces them. A double-precision model applies the same row-by-row
// Givens updates and gives the expected rotations and the final 4x4 R. The
// test checks that row i's rotation of vector k leaves exactly 4i+3 cycles
// after the vector entered, that row 0's C/S match the model, and that all ten
// R values of each band are written back once with the model's values.
// Backward: for random b and a random upper-triangular R, x3..x0 must leave at
// 1, 3, 5 and 7 cycles after bs_valid (two cycles per row, the rate of the
// design's back substitution) and solve R x = b.
//
// The 3-cycle boundary cell and the two-cycle x rate follow the reference
// design; the 4-cycle row skew and per-column R write-back are this design's.
module type1_block_tb;
  import qr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t in_ctl = '0;
  vec_t in_vec = '0;
  ctl_t  [TILE-1:0] cs_ctl;
  fix_t  [TILE-1:0] cs_c;
  cplx_t [TILE-1:0] cs_s;
  logic  [TILE-1:0] rw_en;
  logic  [TILE-1:0][1:0] rw_row;
  ctl_t  [TILE-1:0] rw_ctl;
  cplx_t [TILE-1:0] rw_data;
  logic bs_valid = 1'b0;
  vec_t bs_b = '0;
  cplx_t [TILE-1:0][TILE-1:0] bs_r = '0;
  logic [TILE-1:0] x_valid;
  vec_t x_out;

  always #5 clk = ~clk;

  type1_block dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int M = 8;
  localparam int NB = 2;
  real ar [NB][M][TILE], ai [NB][M][TILE];
  real rr [NB][TILE][TILE], ri [NB][TILE][TILE];   // model R
  real c0m [NB][M], s0r [NB][M], s0i [NB][M];       // model row-0 rotations
  real gr [NB][TILE][TILE], gi [NB][TILE][TILE];   // R written by the block
  int  nw [NB][TILE][TILE];
  int  icyc [NB][M];
  int  cs_seen [TILE];

  task automatic model(int b);
    real wr [TILE], wi [TILE];
    real r, rn, c, sr, si, tr, ti, nr, ni;
    for (int i = 0; i < TILE; i++)
      for (int j = 0; j < TILE; j++) begin rr[b][i][j] = 0.0; ri[b][i][j] = 0.0; end
    for (int k = 0; k < M; k++) begin
      for (int j = 0; j < TILE; j++) begin wr[j] = ar[b][k][j]; wi[j] = ai[b][k][j]; end
      for (int i = 0; i < TILE; i++) begin
        r  = rr[b][i][i];
        rn = $sqrt(r * r + wr[i] * wr[i] + wi[i] * wi[i]);
        if (wr[i] == 0.0 && wi[i] == 0.0) begin c = 1.0; sr = 0.0; si = 0.0; end
        else begin c = r / rn; sr = wr[i] / rn; si = wi[i] / rn; end
        if (i == 0) begin c0m[b][k] = c; s0r[b][k] = sr; s0i[b][k] = si; end
        rr[b][i][i] = (wr[i] == 0.0 && wi[i] == 0.0) ? r : rn;
        for (int j = i + 1; j < TILE; j++) begin
          tr = wr[j]; ti = wi[j];
          wr[j] = c * tr - (sr * rr[b][i][j] - si * ri[b][i][j]);
          wi[j] = c * ti - (sr * ri[b][i][j] + si * rr[b][i][j]);
          nr = (sr * tr + si * ti) + c * rr[b][i][j];
          ni = (sr * ti - si * tr) + c * ri[b][i][j];
          rr[b][i][j] = nr; ri[b][i][j] = ni;
        end
      end
    end
  endtask

  // monitor: rotation timing, row-0 values, R write-back
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < TILE; i++) begin
      if (cs_ctl[i].valid) begin
        automatic int b = cs_ctl[i].band;
        automatic int k = cs_ctl[i].idx;
        checks++;
        cs_seen[i]++;
        if (cycle - icyc[b][k] != 4 * i + 3) begin
          failures++; $display("row %0d rotation of k %0d after %0d cycles", i, k, cycle - icyc[b][k]);
        end
        if (i == 0) begin
          checks++;
          if (absr(fr(cs_c[0]) - c0m[b][k]) > 2.0e-4 || !near(cs_s[0], s0r[b][k], s0i[b][k], 2.0e-4)) begin
            failures++; $display("row 0 C/S wrong at band %0d k %0d", b, k);
          end
        end
      end
      if (rw_en[i]) begin
        automatic int b = rw_ctl[i].band;
        automatic int r = rw_row[i];
        gr[b][r][i] = fr(rw_data[i].re);
        gi[b][r][i] = fr(rw_data[i].im);
        nw[b][r][i]++;
      end
    end
  end

  initial begin
    for (int i = 0; i < TILE; i++) cs_seen[i] = 0;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < M; k++)
        for (int j = 0; j < TILE; j++) begin
          ar[b][k][j] = fr(to_fix(urand(-0.3, 0.3)));
          ai[b][k][j] = fr(to_fix(urand(-0.3, 0.3)));
        end
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) nw[b][i][j] = 0;
      model(b);
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      // bands are spaced apart (9 to 16 idle cycles), as the scheduler's lag rule does
      if (b > 0) begin
        @(negedge clk);
        in_ctl = '0;
        repeat (9 + $urandom % 8) @(negedge clk);
      end
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        in_ctl = '0;
        in_ctl.valid = 1'b1;
        in_ctl.first = (k == 0);
        in_ctl.last  = (k == M - 1);
        in_ctl.band  = BLKW'(b);
        in_ctl.idx   = IDXW'(k);
        for (int j = 0; j < TILE; j++) in_vec[j] = to_c(ar[b][k][j], ai[b][k][j]);
        icyc[b][k] = cycle;
      end
    end
    @(negedge clk);
    in_ctl = '0;
    repeat (25) @(negedge clk);

    for (int i = 0; i < TILE; i++) begin
      checks++;
      if (cs_seen[i] != NB * M) begin failures++; $display("row %0d gave %0d rotations", i, cs_seen[i]); end
    end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < TILE; i++)
        for (int j = i; j < TILE; j++) begin
          checks += 2;
          if (nw[b][i][j] != 1) begin
            failures++; $display("R(%0d,%0d) band %0d written %0d times", i, j, b, nw[b][i][j]);
          end
          if (absr(gr[b][i][j] - rr[b][i][j]) > 2.0e-4 || absr(gi[b][i][j] - ri[b][i][j]) > 2.0e-4) begin
            failures++; $display("R(%0d,%0d) band %0d got %f,%f exp %f,%f", i, j, b,
                                 gr[b][i][j], gi[b][i][j], rr[b][i][j], ri[b][i][j]);
          end
        end

    // backward
    for (int t = 0; t < 4; t++) begin
      real qr [TILE][TILE], qi [TILE][TILE], br [TILE], bi [TILE], xr [TILE], xi [TILE];
      real sr, si;
      int t0;
      for (int i = 0; i < TILE; i++) begin
        br[i] = fr(to_fix(urand(-0.3, 0.3))); bi[i] = fr(to_fix(urand(-0.3, 0.3)));
        for (int j = 0; j < TILE; j++) begin
          if (j == i) begin qr[i][j] = fr(to_fix(urand(0.5, 1.0))); qi[i][j] = 0.0; end
          else if (j > i) begin
            qr[i][j] = fr(to_fix(urand(-0.2, 0.2))); qi[i][j] = fr(to_fix(urand(-0.2, 0.2)));
          end else begin qr[i][j] = 0.0; qi[i][j] = 0.0; end
        end
      end
      for (int i = TILE - 1; i >= 0; i--) begin
        sr = br[i]; si = bi[i];
        for (int j = i + 1; j < TILE; j++) begin
          sr -= qr[i][j] * xr[j] - qi[i][j] * xi[j];
          si -= qr[i][j] * xi[j] + qi[i][j] * xr[j];
        end
        xr[i] = sr / qr[i][i]; xi[i] = si / qr[i][i];
      end
      @(negedge clk);
      bs_valid = 1'b1;
      for (int i = 0; i < TILE; i++) begin
        bs_b[i] = to_c(br[i], bi[i]);
        for (int j = 0; j < TILE; j++) bs_r[i][j] = to_c(qr[i][j], qi[i][j]);
      end
      t0 = cycle;
      @(negedge clk);
      bs_valid = 1'b0;
      for (int s = 1; s <= 8; s++) begin
        for (int i = 0; i < TILE; i++) begin
          automatic bit due = (s == 2 * (TILE - 1 - i) + 1);
          if (x_valid[i] != due) begin
            failures++; $display("x%0d valid=%0d at t+%0d", i, x_valid[i], cycle - t0);
          end
          if (due) begin
            checks += 2;
            if (cycle - t0 != s) begin failures++; $display("x%0d timing", i); end
            if (!near(x_out[i], xr[i], xi[i], 1.0e-4)) begin
              failures++; $display("x%0d got %f,%f exp %f,%f", i, fr(x_out[i].re), fr(x_out[i].im), xr[i], xi[i]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
