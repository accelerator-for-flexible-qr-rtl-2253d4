// ram3_r: RAM III, the store of the triangular factor R and of B' = Q^H B.
//
// Entries are complex. R(i,j), j >= i, lives at the packed triangular address
// qr_pkg::r_addr(i,j) (rows laid out one after another for an NMAX x NMAX
// matrix, NMAX*(NMAX+1)/2 entries) and B'(i) at qr_pkg::b_addr(i) after the
// triangle. The forward pass writes the finished values as the cells of the
// Type I, II and III blocks complete them, several in one cycle: NWP
// synchronous write ports, which never address the same entry at once. Back
// substitution reads a whole 4x4 tile of R and four B' values at a time, and
// the host reads results: NRP asynchronous read ports.
//
// Holding R and B' follows the reference design; the packed layout and the
// port counts are this implementation's choices.
module ram3_r
  import qr_pkg::*;
#(
  parameter int unsigned NWP   = 9,
  parameter int unsigned NRP   = 21,
  parameter int unsigned DEPTH = R3_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic  [NWP-1:0]        we,
  input  logic  [NWP-1:0][AW-1:0] waddr,
  input  cplx_t [NWP-1:0]        wdata,
  input  logic  [NRP-1:0][AW-1:0] raddr,
  output cplx_t [NRP-1:0]        rdata
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
