// ram1_cs_tb: checks RAM I (rotation store) against a shadow array.
//
// Each cycle every bank gets a random write (bank, page, address, data) and a
// random read. Reads are asynchronous: the data must match the shadow copy in
// the same cycle, before that cycle's writes land, and a write must be seen
// from the next cycle on. Addresses are drawn from a small range so that
// reads often hit the entry written just before, and the two pages of a bank
// are checked to be independent.
//
// RAM I's role is the reference design's; banks, pages and the asynchronous
// read are this design's choices.
module ram1_cs_tb;
  import qr_pkg::*;

  localparam int unsigned ROWS = TILE, DEPTH = NMAX, AW = $clog2(NMAX);

  logic clk = 1'b0;
  logic [ROWS-1:0]         we = '0, wpage = '0, rpage = '0;
  logic [ROWS-1:0][AW-1:0] waddr = '0, raddr = '0;
  rot_t [ROWS-1:0]         wdata = '0, rdata;

  always #5 clk = ~clk;

  ram1_cs dut (.*);

  int checks = 0, failures = 0;
  rot_t shadow [ROWS][2][DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rot_t rnd_rot();
    rot_t r;
    r.c    = fix_t'({$urandom, $urandom});
    r.s.re = fix_t'({$urandom, $urandom});
    r.s.im = fix_t'({$urandom, $urandom});
    return r;
  endfunction

  initial begin
    // fill every entry first so that every read has a known value
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        for (int i = 0; i < ROWS; i++) begin
          we[i] = 1'b1; wpage[i] = p[0]; waddr[i] = AW'(a);
          wdata[i] = rnd_rot();
          shadow[i][p][a] = wdata[i];
        end
      end
    @(negedge clk);
    we = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < ROWS; i++) begin
        we[i]    = ($urandom % 2) == 0;
        wpage[i] = 1'($urandom);
        waddr[i] = AW'($urandom % 6);
        wdata[i] = rnd_rot();
        rpage[i] = 1'($urandom);
        raddr[i] = AW'($urandom % 6);
      end
      #1;
      for (int i = 0; i < ROWS; i++) begin
        checks++;
        if (rdata[i] !== shadow[i][rpage[i]][raddr[i]]) begin
          failures++;
          $display("bank %0d page %0d addr %0d read wrong", i, rpage[i], raddr[i]);
        end
      end
      @(posedge clk);
      for (int i = 0; i < ROWS; i++)
        if (we[i]) shadow[i][wpage[i]][waddr[i]] = wdata[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
