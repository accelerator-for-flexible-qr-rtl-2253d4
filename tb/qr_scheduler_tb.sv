// qr_scheduler_tb: checks the order and timing of everything the scheduler
// issues, for every matrix size n = 4, 8, ..., 20.
//
// Expected sequence, worked out here from n alone:
//  * Type I issue of the n rows of band 0: n consecutive cycles, right after
//    start, with first/last on the first/last row.
//  * Passes, band by band (m = n - 4p vectors each, consecutive cycles, idx
//    0..m-1): tiles p+1 .. Q-1 of band p, the Type III column only with the
//    first of them; for the last band one Type III-only pass.
//  * Start cycles, exactly: band 0's first pass two cycles after the Type I
//    issue begins; any other pass at the earliest of: two cycles after the
//    previous pass's last issue, BAND_LAG cycles after the previous band's
//    pass on the same tile, and, for a band's first pass, BAND_LAG cycles
//    after the previous band's first pass.
//  * Back substitution begins at least FWD_DRAIN cycles after the last issue.
//    For p = Q-1 .. 0: one load of B', a Type II run for tiles Q-1 .. p+1, one
//    Type I run. This bench returns each done after a random delay. A Type II
//    run must wait for its done; a Type I run goes on in the background, but
//    no second Type I run and no Type II run on tile p+1 (whose x it solves)
//    may start before its done, and the scheduler must not wait for it
//    otherwise. en_bs is high throughout, done pulses once, after the last
//    Type I run's done.
//
// The horizontal pass order and Type III's place follow the reference design;
// so does the overlap of Type I and Type II steps in back substitution; the
// start rules and the handshakes are this design's.
module qr_scheduler_tb;
  import qr_pkg::*;

  localparam int unsigned BAND_LAG = 21, FWD_DRAIN = 24;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NW-1:0] n_in = '0;
  logic busy, done, en_bs;
  ctl_t t1_issue;
  issue_t pass_issue;
  logic [BLKW-1:0] nblk;
  logic bs_load_b, bs_t2_go, bs_t1_go;
  logic [BLKW-1:0] bs_band, bs_tile;
  logic bs_t2_done = 1'b0, bs_t1_done = 1'b0;

  always #5 clk = ~clk;

  qr_scheduler dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("n=%0d cycle %0d: %s", n_in, cycle, msg);
  endtask

  // expected pass list
  int ep_band [$], ep_tile [$], ep_t2 [$], ep_t3 [$];
  // expected back-substitution steps: 0 load, 1 t2, 2 t1 ; with band/tile
  int eb_kind [$], eb_band [$], eb_tile [$];
  int pst [$];   // start cycle of each pass seen

  // the Type I run in flight: its done comes t1_left cycles after its start
  bit t1_out = 0;
  int t1_left = 0;
  always @(negedge clk) begin
    bs_t1_done <= 1'b0;
    if (t1_out) begin
      if (t1_left == 0) begin bs_t1_done <= 1'b1; t1_out = 0; end
      else t1_left--;
    end
  end

  task automatic run(int n);
    int q, t1_seen, t1_start, pass_i, pk, last_issue, gap_start, bs_i, done_seen;
    int delay, t1_go_c, t1_band, t1_done_c, step_end_c;
    bit in_pass, fwd_over;
    q = n / 4;
    ep_band.delete(); ep_tile.delete(); ep_t2.delete(); ep_t3.delete();
    eb_kind.delete(); eb_band.delete(); eb_tile.delete(); pst.delete();
    for (int p = 0; p < q; p++) begin
      if (p < q - 1)
        for (int t = p + 1; t < q; t++) begin
          ep_band.push_back(p); ep_tile.push_back(t); ep_t2.push_back(1); ep_t3.push_back(t == p + 1);
        end
      else begin
        ep_band.push_back(p); ep_tile.push_back(q); ep_t2.push_back(0); ep_t3.push_back(1);
      end
    end
    for (int p = q - 1; p >= 0; p--) begin
      eb_kind.push_back(0); eb_band.push_back(p); eb_tile.push_back(-1);
      for (int t = q - 1; t > p; t--) begin
        eb_kind.push_back(1); eb_band.push_back(p); eb_tile.push_back(t);
      end
      eb_kind.push_back(2); eb_band.push_back(p); eb_tile.push_back(p);
    end

    @(negedge clk);
    n_in = NW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t1_seen = 0; t1_start = -1; pass_i = 0; pk = 0; in_pass = 0;
    last_issue = cycle; gap_start = 0; bs_i = 0; done_seen = 0; fwd_over = 0;
    t1_go_c = -1; t1_band = -1; t1_done_c = -1; step_end_c = -1;
    while (!done_seen) begin
      if (bs_t1_done) t1_done_c = cycle;
      // sample the outputs of this cycle
      if (t1_issue.valid) begin
        checks++;
        if (t1_start < 0) t1_start = cycle;
        if (t1_issue.idx != IDXW'(t1_seen) || t1_issue.first != (t1_seen == 0)
            || t1_issue.last != (t1_seen == n - 1) || cycle != t1_start + t1_seen)
          fail("Type I issue out of order");
        t1_seen++;
        last_issue = cycle;
      end
      if (pass_issue.ctl.valid) begin
        automatic int m;
        checks++;
        if (pass_i >= ep_band.size()) begin
          fail("pass beyond the expected list");
        end else begin
          m = n - 4 * ep_band[pass_i];
          if (pk == 0) begin
            // start rule of this pass
            checks++;
            pst.push_back(cycle);
            if (pass_i == 0) begin
              if (cycle != t1_start + 2) fail("band 0 first pass not two cycles after Type I issue");
            end else begin
              automatic int b = ep_band[pass_i];
              automatic bit first = (b == 0) || (ep_band[pass_i - 1] != b);
              automatic int earliest = last_issue + 2;
              if (b > 0)
                for (int j = 0; j < pass_i; j++)
                  if (ep_band[j] == b - 1 &&
                      ((ep_tile[j] == ep_tile[pass_i] && ep_tile[pass_i] < q) ||
                       (first && (j == 0 || ep_band[j - 1] != b - 1))))
                    if (pst[j] + int'(BAND_LAG) > earliest) earliest = pst[j] + int'(BAND_LAG);
              if (cycle != earliest) begin
                $display("  pass %0d (band %0d tile %0d) started at %0d, expected %0d", pass_i, b,
                         ep_tile[pass_i], cycle, earliest);
                fail("pass start cycle");
              end
            end
          end
          if (pass_issue.ctl.band != BLKW'(ep_band[pass_i]) || pass_issue.ctl.tile != BLKW'(ep_tile[pass_i])
              || pass_issue.t2 != ep_t2[pass_i][0] || pass_issue.t3 != ep_t3[pass_i][0]) begin
            $display("  got band %0d tile %0d t2 %0d t3 %0d, expected band %0d tile %0d t2 %0d t3 %0d",
                     pass_issue.ctl.band, pass_issue.ctl.tile, pass_issue.t2, pass_issue.t3,
                     ep_band[pass_i], ep_tile[pass_i], ep_t2[pass_i], ep_t3[pass_i]);
            fail("wrong pass");
          end
          if (pass_issue.ctl.idx != IDXW'(pk) || pass_issue.ctl.first != (pk == 0)
              || pass_issue.ctl.last != (pk == m - 1))
            fail("pass vector numbering");
          pk++;
          if (pk == m) begin pk = 0; pass_i++; end
        end
        last_issue = cycle;
      end
      if (en_bs && !fwd_over) begin
        fwd_over = 1;
        checks += 3;
        if (pass_i != ep_band.size()) fail("back substitution before all passes were issued");
        if (t1_seen != n) fail("Type I issue count");
        if (cycle - last_issue - 1 < FWD_DRAIN) fail("back substitution started too early");
      end
      if (bs_load_b || bs_t2_go || bs_t1_go) begin
        automatic int kind = bs_load_b ? 0 : (bs_t2_go ? 1 : 2);
        checks++;
        if (!en_bs) fail("back-substitution step without en_bs");
        if (bs_i >= eb_kind.size()) fail("extra back-substitution step");
        else begin
          if (kind != eb_kind[bs_i] || bs_band != BLKW'(eb_band[bs_i])
              || (kind != 0 && bs_tile != BLKW'(eb_tile[bs_i]))) begin
            $display("  got kind %0d band %0d tile %0d, expected %0d %0d %0d", kind, bs_band, bs_tile,
                     eb_kind[bs_i], eb_band[bs_i], eb_tile[bs_i]);
            fail("back-substitution order");
          end
          bs_i++;
        end
        if (kind == 0 && bs_i > 1 && eb_kind[bs_i - 2] == 2) begin
          checks++;
          if (cycle != t1_go_c + 1) fail("scheduler waited for a Type I run it does not need");
        end
        if (kind == 0) step_end_c = cycle + 1;
        if (kind == 2) begin
          checks++;
          if (t1_out) fail("Type I started while busy");
          t1_out  = 1;
          t1_left = 6 + int'($urandom % 3);
          t1_go_c = cycle;
          t1_band = int'(bs_band);
        end
        if (kind == 1) begin
          checks++;
          if (t1_out && int'(bs_tile) == int'(bs_band) + 1) fail("Type II on a tile whose x are not solved");
          // the scheduler must not wait longer than needed
          // (it may also have waited for the previous step to end)
          if (int'(bs_tile) == int'(bs_band) + 1 && t1_band == int'(bs_band) + 1
              && cycle > ((t1_done_c > step_end_c) ? t1_done_c : step_end_c) + 1)
            fail("Type II step waited too long for the Type I run");
          // answer with the block's done after a few cycles; go must not repeat
          delay = 4;
          for (int d = 0; d < delay + int'($urandom % 3); d++) begin
            @(negedge clk);
            if (bs_t1_done) t1_done_c = cycle;
            if (bs_t2_go || bs_t1_go || bs_load_b) fail("new step while a block runs");
            if (pass_issue.ctl.valid || t1_issue.valid) fail("forward issue during back substitution");
          end
          bs_t2_done = 1'b1;
          @(negedge clk);
          bs_t2_done = 1'b0;
          step_end_c = cycle;
          continue;
        end
      end
      if (done) begin
        done_seen = 1;
        checks += 2;
        if (bs_i != eb_kind.size()) fail("done before all back-substitution steps");
        if (t1_out) fail("done before the last Type I run finished");
        if (!busy) fail("busy low with done");
      end
      @(negedge clk);
    end
    checks++;
    if (busy) fail("busy after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy || en_bs || done) fail("not idle after reset");
    for (int n = 4; n <= int'(NMAX); n += 4) run(n);
    run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
