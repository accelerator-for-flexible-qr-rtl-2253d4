// qr_scheduler: sequences the folded array for a runtime matrix size n
// (a multiple of 4, 4 <= n <= NMAX), first the QR decomposition, then back
// substitution.
//
// Forward phase. With Q = n/4 row bands, band p covers rows 4p..4p+3 of R and
// must reduce m = n - 4p row vectors. The scheduler
//  * issues the n rows of A's first four columns to the Type I block
//    (t1_issue, cycles 0..n-1 of the run); the Type I input of every later band
//    comes straight from the Type II block working on that band's first tile;
//  * issues "passes" to the Type II / Type III blocks in the horizontal order:
//    band p's tiles q = p+1 .. Q-1 one after another, the Type III column
//    alongside the first of them, and for the last band a pass of the Type III
//    column alone. Each pass issues m vectors on consecutive cycles
//    (pass_issue, with the control word that the RAM I replay taps delay to
//    each row of the block). A pass starts as soon as the block is free and
//    its data exist. Band 0's first pass starts two cycles after the Type I
//    issue begins (one cycle is the least the RAM I write-then-replay needs).
//    For band p > 0, vector k is band p-1's vector k+4, which leaves the
//    Type II / III block 16 cycles after its issue and can be read back one
//    cycle later, so a pass of band p on tile q starts at least BAND_LAG = 21
//    cycles after band p-1's pass on tile q started (its RAM II data), and the
//    first pass of band p also at least BAND_LAG cycles after band p-1's first
//    pass (its rotations from the Type I block and its B' column). The start
//    cycle of the latest pass on each tile is kept in st[]. Later passes of a
//    band need only their tile's lag, so passes follow one another with one
//    idle cycle unless that lag holds them back.
//  * ends the phase FWD_DRAIN cycles after the last issue, when every R and B'
//    value is in RAM III.
// Backward phase, band p from Q-1 down to 0: load the band's four B' values
// into the partial-sum register (bs_load_b), run the Type II block once per
// tile q = Q-1 .. p+1 (bs_t2_go, waiting for bs_t2_done), then start the Type I
// block (bs_t1_go). The Type I run is not waited for: the scheduler goes on
// with band p-1 while it runs (the datapath keeps the R tile and band number
// the Type I block needs), and only the Type II step on tile p, which needs
// the x being solved, waits until bs_t1_done. So a band's Type II steps on
// tiles whose x are already known overlap the Type I step of the band below.
// bs_band/bs_tile name the tile whose R and X the datapath must present.
// en_bs is high throughout this phase, the mode signal that switches the
// cells' direction.
//
// The pass order and the fact that Type III follows the first Type II tile of
// a band follow the design's schedule, as does the overlap of Type I and
// Type II steps in back substitution; the exact start rules (BAND_LAG) and the
// one-step-at-a-time use of each block are this implementation's own, so cycle
// counts differ from the design's published schedules.
//
// The size assertion is disabled during reset with rst_n; lint reports that
// as a reset used both asynchronously and synchronously, which concerns only
// the assertion.
module qr_scheduler
  import qr_pkg::*;
#(
  parameter int unsigned BAND_LAG  = 21,   // 4 dropped vectors + 16 latency + 1
  parameter int unsigned FWD_DRAIN = 24    // last issue to last RAM III write, +margin
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NW-1:0]   n_in,
  output logic            busy,
  output logic            done,
  output logic            en_bs,
  // forward
  output ctl_t            t1_issue,
  output issue_t          pass_issue,
  output logic [BLKW-1:0] nblk,        // Q = n/4 of the run in progress
  // backward
  output logic            bs_load_b,
  output logic            bs_t2_go,
  output logic            bs_t1_go,
  output logic [BLKW-1:0] bs_band,
  output logic [BLKW-1:0] bs_tile,
  input  logic            bs_t2_done,
  input  logic            bs_t1_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FWD, S_BS_B, S_BS_T2, S_BS_T2W, S_BS_T1, S_BS_T1W, S_DONE
  } state_t;

  state_t state;

  logic [BLKW-1:0] q_n;              // Q
  logic [NW-1:0]   n_q;
  // Type I band-0 issue
  logic            t1_act, t1_started;
  logic [IDXW-1:0] t1_k;
  // pass issue
  logic            p_act, all_issued;
  logic [BLKW-1:0] pp, pq;
  logic [IDXW-1:0] pk, pm;
  logic [5:0]      gap;
  localparam int unsigned TW = 10;   // forward phase is well under 2^TW cycles
  logic [TW-1:0]   tnow;             // cycles since start
  logic [TW-1:0]   st [NMAX/4+1];    // start of the latest pass on each tile
  // backward
  logic [BLKW-1:0] bp, bq;
  logic            t1_busy;          // a Type I back-substitution run is in flight
  logic            t2_ready, t1_ready;
  // tile bp+1's x come from the Type I run in flight, if any
  assign t2_ready = !(t1_busy && bq == bp + 1'b1);
  assign t1_ready = !t1_busy;

  logic first_of_band, start_ok, lag_tile, lag_first;
  assign first_of_band = (pq == pp + 1'b1) || (pq == q_n);
  // RAM II data of this tile (the Type III-only pass has none) and, for a
  // band's first pass, the previous band's first pass (on tile pp)
  assign lag_tile  = (pq == q_n) || ((tnow - st[pq]) >= TW'(BAND_LAG));
  assign lag_first = (tnow - st[pp]) >= TW'(BAND_LAG);
  always_comb begin
    if (pp == 0)            start_ok = first_of_band ? t1_started : 1'b1;
    else if (first_of_band) start_ok = lag_tile && lag_first;
    else                    start_ok = lag_tile;
  end

  // band p has n - 4p vectors
  function automatic logic [IDXW-1:0] band_len(input logic [NW-1:0] size, input logic [BLKW-1:0] p);
    return IDXW'(size - NW'(4 * p));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      q_n        <= '0;
      n_q        <= '0;
      t1_act     <= 1'b0;
      t1_started <= 1'b0;
      t1_k       <= '0;
      p_act      <= 1'b0;
      all_issued <= 1'b0;
      pp         <= '0;
      pq         <= '0;
      pk         <= '0;
      pm         <= '0;
      gap        <= '0;
      bp         <= '0;
      bq         <= '0;
      t1_busy    <= 1'b0;
      tnow       <= '0;
      for (int q = 0; q <= int'(NMAX / 4); q++) st[q] <= '0;
    end else begin
      tnow <= tnow + 1'b1;
      if (state == S_BS_T1 && t1_ready) t1_busy <= 1'b1;
      else if (bs_t1_done)              t1_busy <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_FWD;
          n_q        <= n_in;
          q_n        <= BLKW'(n_in / 4);
          t1_act     <= 1'b1;
          t1_started <= 1'b0;
          t1_k       <= '0;
          p_act      <= 1'b0;
          all_issued <= 1'b0;
          pp         <= '0;
          pq         <= BLKW'(1);   // tile 1, or for n = 4 the T3-only pass (Q = 1)
          gap        <= '0;
          tnow       <= '0;
        end

        S_FWD: begin
          // Type I issue of band 0
          if (t1_act) begin
            t1_started <= 1'b1;
            t1_k       <= t1_k + 1'b1;
            if (t1_k == IDXW'(n_q - 1)) t1_act <= 1'b0;
          end
          // passes
          if (p_act) begin
            pk <= pk + 1'b1;
            if (pk == pm - 1'b1) begin
              p_act <= 1'b0;
              if (pq == q_n) begin
                all_issued <= 1'b1;                 // T3-only pass of last band
              end else if (pq < q_n - 1'b1) begin
                pq <= pq + 1'b1;                    // next tile of the band
              end else begin
                pp <= pp + 1'b1;                    // next band
                pq <= (pp + 1'b1 == q_n - 1'b1) ? q_n : pp + 2'd2;
              end
            end
          end else if (!all_issued && start_ok) begin
            p_act  <= 1'b1;
            pk     <= '0;
            pm     <= band_len(n_q, pp);
            st[pq] <= tnow;
          end
          // issue gap
          if (t1_act || p_act) gap <= '0;
          else if (gap != '1) gap <= gap + 1'b1;
          if (all_issued && !p_act && !t1_act && gap >= 6'(FWD_DRAIN)) begin
            state <= S_BS_B;
            bp    <= q_n - 1'b1;
          end
        end

        S_BS_B: begin
          bq    <= q_n - 1'b1;
          state <= (q_n - 1'b1 > bp) ? S_BS_T2 : S_BS_T1;
        end
        S_BS_T2:  if (t2_ready) state <= S_BS_T2W;
        S_BS_T2W: if (bs_t2_done) begin
          bq    <= bq - 1'b1;
          state <= (bq - 1'b1 > bp) ? S_BS_T2 : S_BS_T1;
        end
        S_BS_T1:  if (t1_ready) begin
          if (bp == 0) state <= S_BS_T1W;
          else begin
            bp    <= bp - 1'b1;
            state <= S_BS_B;
          end
        end
        S_BS_T1W: if (bs_t1_done) state <= S_DONE;     // last band only
        S_DONE:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    t1_issue       = '0;
    t1_issue.valid = (state == S_FWD) && t1_act;
    t1_issue.first = (t1_k == 0);
    t1_issue.last  = (t1_k == IDXW'(n_q - 1));
    t1_issue.idx   = t1_k;

    pass_issue           = '0;
    pass_issue.ctl.valid = (state == S_FWD) && p_act;
    pass_issue.ctl.first = (pk == 0);
    pass_issue.ctl.last  = (pk == pm - 1'b1);
    pass_issue.ctl.band  = pp;
    pass_issue.ctl.tile  = pq;
    pass_issue.ctl.idx   = pk;
    pass_issue.t2        = (pq != q_n);
    pass_issue.t3        = first_of_band;
  end

  assign nblk      = q_n;
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign en_bs     = (state inside {S_BS_B, S_BS_T2, S_BS_T2W, S_BS_T1, S_BS_T1W});
  assign bs_load_b = (state == S_BS_B);
  assign bs_t2_go  = (state == S_BS_T2) && t2_ready;
  assign bs_t1_go  = (state == S_BS_T1) && t1_ready;
  assign bs_band   = bp;
  assign bs_tile   = (state inside {S_BS_T1, S_BS_T1W}) ? bp : bq;

  property p_size_ok;
    @(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && start) |-> (n_in != 0 && n_in[1:0] == 2'b00 && n_in <= NW'(NMAX));
  endproperty
  a_size_ok: assert property (p_size_ok) else $error("n must be a multiple of 4 in 4..%0d", NMAX);

endmodule
