// ram1_cs: RAM I, the store of rotation parameters (C, S) produced by the
// Type I block and replayed into the Type II and Type III blocks.
//
// One bank per row of the Type I block, so all four rows can write and read in
// the same cycle. Each bank has two pages of NMAX entries: the Type I block
// fills the page of band p+1 while the tiles of band p still replay band p's
// page, and a page is overwritten only once its band is finished (the
// rotations of older bands are no longer needed). Entry k of a page holds the
// rotation applied to the band's k-th row vector. Writes are synchronous;
// reads are asynchronous (distributed-RAM style), so the replay address and
// its data are in the same cycle.
//
// Storing the rotations and overwriting a band's entries once it is done
// follow the reference design; the bank/page organisation and the
// asynchronous read are this implementation's choices.
module ram1_cs
  import qr_pkg::*;
#(
  parameter int unsigned ROWS  = TILE,
  parameter int unsigned DEPTH = NMAX,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic [ROWS-1:0]            we,
  input  logic [ROWS-1:0]            wpage,
  input  logic [ROWS-1:0][AW-1:0]    waddr,
  input  rot_t [ROWS-1:0]            wdata,
  input  logic [ROWS-1:0]            rpage,
  input  logic [ROWS-1:0][AW-1:0]    raddr,
  output rot_t [ROWS-1:0]            rdata
);

  rot_t mem [ROWS][2][DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < ROWS; i++) begin
      if (we[i]) mem[i][wpage[i]][waddr[i]] <= wdata[i];
    end
  end

  always_comb begin
    for (int i = 0; i < ROWS; i++) rdata[i] = mem[i][rpage[i]][raddr[i]];
  end

endmodule
