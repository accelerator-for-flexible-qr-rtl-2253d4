// ram4_x_tb: checks RAM IV (solution x) against a shadow array.
//
// Each cycle the four write ports write random data to four distinct random
// entries (as the four boundary cells of a band do) or stay idle, and the five
// read ports read random entries. Reads are asynchronous and must match the
// shadow copy in the same cycle; writes are seen from the next cycle on.
//
// Storing x is the reference design's; the port counts are this design's.
module ram4_x_tb;
  import qr_pkg::*;

  localparam int unsigned NWP = TILE, NRP = TILE + 1, DEPTH = NMAX, AW = $clog2(NMAX);

  logic clk = 1'b0;
  logic  [NWP-1:0]         we = '0;
  logic  [NWP-1:0][AW-1:0] waddr = '0;
  cplx_t [NWP-1:0]         wdata = '0;
  logic  [NRP-1:0][AW-1:0] raddr = '0;
  cplx_t [NRP-1:0]         rdata;

  always #5 clk = ~clk;

  ram4_x dut (.*);

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
    for (int a = 0; a < DEPTH; a += NWP) begin
      @(negedge clk);
      for (int p = 0; p < NWP; p++) begin
        we[p] = 1'b1; waddr[p] = AW'(a + p); wdata[p] = rnd_c();
        shadow[a + p] = wdata[p];
      end
    end
    for (int t = 0; t < 3000; t++) begin
      int band;
      @(negedge clk);
      band = $urandom % (DEPTH / NWP);
      for (int p = 0; p < NWP; p++) begin
        we[p]    = ($urandom % 2) == 0;
        waddr[p] = AW'(NWP * band + p);
        wdata[p] = rnd_c();
      end
      for (int p = 0; p < NRP; p++) raddr[p] = AW'($urandom % DEPTH);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
