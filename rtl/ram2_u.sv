// ram2_u: RAM II, the store of row vectors that a band leaves for the next.
//
// When a band's Type II tile (or Type III column) has reduced a row vector, the
// vector's remaining part, leaving the tile's last row, is what the tile one
// band lower must start from; that tile runs only after the whole band has
// been processed, so the vectors wait here. The memory is organised as one
// region per column tile (GROUPS = NMAX/4 + 1, the last region holding the
// right-hand side B, one element in lane 0) with NMAX vector slots each, each
// slot a 4-element vector. A band reads slots 0..m-1 of a region and writes its
// results back to slots 0..m-5 of the same region, always behind its reads, so
// the region is reused in place. One synchronous write port, two asynchronous
// read ports (a Type II tile and the Type III column read together).
//
// Its role follows the reference design; keeping B's remainder in an extra
// region, the in-place reuse and the ports are this implementation's choices.
module ram2_u
  import qr_pkg::*;
#(
  parameter int unsigned GROUPS = NBLK + 1,
  parameter int unsigned DEPTH  = NMAX,
  parameter int unsigned GW     = $clog2(GROUPS),
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [GW-1:0] wgrp,
  input  logic [AW-1:0] waddr,
  input  vec_t          wdata,
  input  logic [GW-1:0] rgrp_a,
  input  logic [AW-1:0] raddr_a,
  output vec_t          rdata_a,
  input  logic [GW-1:0] rgrp_b,
  input  logic [AW-1:0] raddr_b,
  output vec_t          rdata_b
);

  vec_t mem [GROUPS][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wgrp][waddr] <= wdata;
  end

  assign rdata_a = mem[rgrp_a][raddr_a];
  assign rdata_b = mem[rgrp_b][raddr_b];

endmodule
