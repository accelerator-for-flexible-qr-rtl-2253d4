// ram3_r_tb: checks RAM III (R and B') against a shadow array.
//
// Every cycle a random subset of the nine write ports writes distinct random
// entries (the forward pass never writes one entry twice in a cycle) and all
// 21 read ports read random entries. Reads are asynchronous and must match
// the shadow copy in the same cycle; writes are seen from the next cycle on.
// A final pass writes the packed triangle through qr_pkg::r_addr and b_addr
// for a 20x20 matrix and reads it back to check that the layout fits the
// memory and no two (i,j) share an entry.
//
// Storing R and B' is the reference design's; the packed layout and the port
// counts are this design's choices.
module ram3_r_tb;
  import qr_pkg::*;

  localparam int unsigned NWP = 9, NRP = 21, DEPTH = R3_DEPTH, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic  [NWP-1:0]         we = '0;
  logic  [NWP-1:0][AW-1:0] waddr = '0;
  cplx_t [NWP-1:0]         wdata = '0;
  logic  [NRP-1:0][AW-1:0] raddr = '0;
  cplx_t [NRP-1:0]         rdata;

  always #5 clk = ~clk;

  ram3_r dut (.*);

  int checks = 0, failures = 0;
  cplx_t shadow [DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd_c();
    return '{re: fix_t'({$urandom, $urandom}), im: fix_t'({$urandom, $urandom})};
  endfunction

  initial begin
    // fill through all write ports
    for (int a = 0; a < DEPTH; a += NWP) begin
      @(negedge clk);
      for (int p = 0; p < NWP; p++) begin
        we[p] = (a + p < DEPTH);
        waddr[p] = AW'(a + p);
        wdata[p] = rnd_c();
        if (a + p < DEPTH) shadow[a + p] = wdata[p];
      end
    end
    for (int t = 0; t < 1500; t++) begin
      int base;
      @(negedge clk);
      base = $urandom % (DEPTH - 4 * NWP);
      for (int p = 0; p < NWP; p++) begin
        we[p]    = ($urandom % 2) == 0;
        waddr[p] = AW'(base + 4 * p + $urandom % 4);   // distinct per port
        wdata[p] = rnd_c();
      end
      for (int p = 0; p < NRP; p++) raddr[p] = AW'(base + $urandom % (4 * NWP));
      #1;
      for (int p = 0; p < NRP; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++; $display("read port %0d addr %0d wrong", p, raddr[p]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NWP; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
    end

    // packed layout of R and B' for the largest matrix
    @(negedge clk);
    we = '0;
    for (int i = 0; i < NMAX; i++) begin
      for (int j = i; j <= NMAX; j++) begin
        @(negedge clk);
        we[0]    = 1'b1;
        waddr[0] = (j == NMAX) ? b_addr(i) : r_addr(i, j);
        wdata[0] = '{re: fix_t'(1000 * i + j), im: fix_t'(-(1000 * i + j))};
      end
    end
    @(negedge clk);
    we = '0;
    for (int i = 0; i < NMAX; i++)
      for (int j = i; j <= NMAX; j++) begin
        raddr[0] = (j == NMAX) ? b_addr(i) : r_addr(i, j);
        #1;
        checks++;
        if (rdata[0].re != fix_t'(1000 * i + j) || rdata[0].im != fix_t'(-(1000 * i + j))) begin
          failures++; $display("layout: entry (%0d,%0d) overwritten", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
