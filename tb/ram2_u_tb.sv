// ram2_u_tb: checks RAM II (row vectors between bands) against a shadow array.
//
// Random writes (region, slot, 4-element vector) and two random reads per
// cycle. The asynchronous reads must return the shadow contents in the same
// cycle; a write is visible from the next cycle on. Both read ports are
// checked independently, including reads of the region being written.
//
// RAM II's role is the reference design's; regions and ports are this
// design's choices.
module ram2_u_tb;
  import qr_pkg::*;

  localparam int unsigned GROUPS = NBLK + 1, DEPTH = NMAX;
  localparam int unsigned GW = $clog2(GROUPS), AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [GW-1:0] wgrp = '0, rgrp_a = '0, rgrp_b = '0;
  logic [AW-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  vec_t wdata = '0, rdata_a, rdata_b;

  always #5 clk = ~clk;

  ram2_u dut (.*);

  int checks = 0, failures = 0;
  vec_t shadow [GROUPS][DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t rnd_vec();
    vec_t v;
    for (int j = 0; j < TILE; j++) begin
      v[j].re = fix_t'({$urandom, $urandom});
      v[j].im = fix_t'({$urandom, $urandom});
    end
    return v;
  endfunction

  initial begin
    for (int g = 0; g < GROUPS; g++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1'b1; wgrp = GW'(g); waddr = AW'(a); wdata = rnd_vec();
        shadow[g][a] = wdata;
      end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we      = ($urandom % 3) != 0;
      wgrp    = GW'($urandom % GROUPS);
      waddr   = AW'($urandom % 5);
      wdata   = rnd_vec();
      rgrp_a  = GW'($urandom % GROUPS);
      raddr_a = AW'($urandom % 5);
      rgrp_b  = ($urandom % 2) ? GW'(GROUPS - 1) : wgrp;
      raddr_b = AW'($urandom % 5);
      #1;
      checks += 2;
      if (rdata_a !== shadow[rgrp_a][raddr_a]) begin
        failures++; $display("port a region %0d slot %0d wrong", rgrp_a, raddr_a);
      end
      if (rdata_b !== shadow[rgrp_b][raddr_b]) begin
        failures++; $display("port b region %0d slot %0d wrong", rgrp_b, raddr_b);
      end
      @(posedge clk);
      if (we) shadow[wgrp][waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
