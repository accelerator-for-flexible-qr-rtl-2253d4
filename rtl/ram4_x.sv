// ram4_x: RAM IV, the store of the solution vector X of R X = B'.
//
// NMAX complex entries. The four boundary cells of the Type I block each
// write their x as it is solved (NWP = 4 synchronous write ports, distinct
// addresses). The Type II block reads the four x of the tile it works on and
// the host reads the result (NRP asynchronous read ports).
//
// Holding the n values of x follows the reference design; the ports are this
// implementation's choices.
module ram4_x
  import qr_pkg::*;
#(
  parameter int unsigned NWP   = TILE,
  parameter int unsigned NRP   = TILE + 1,
  parameter int unsigned DEPTH = NMAX,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic  [NWP-1:0]         we,
  input  logic  [NWP-1:0][AW-1:0] waddr,
  input  cplx_t [NWP-1:0]         wdata,
  input  logic  [NRP-1:0][AW-1:0] raddr,
  output cplx_t [NRP-1:0]         rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWP; p++) begin
      if (we[p]) mem[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NRP; p++) rdata[p] = mem[raddr[p]];
  end

endmodule
