// qr_pkg: types, sizes and fixed-point arithmetic shared by the folded QR
// decomposition / back-substitution accelerator.
//
// Numbers are complex, each part a signed fixed-point word of DW = 40 bits with
// FW = 38 fraction bits (one sign bit, one integer bit), so a part covers
// [-2, 2). The reciprocal used in the boundary cell is a RW = 50 bit word with
// RFW = 14 fraction bits. These widths follow the precision study of the
// design. Squared magnitudes are kept unsigned with 2*FW fraction bits (MW bits)
// so the boundary cell can accumulate them without rounding.
//
// Products are truncated (arithmetic shift right), not rounded; that choice is
// this implementation's own.
//
// The largest matrix the hardware holds is NMAX x NMAX (20, the largest size
// the design is evaluated at). Matrices are processed in bands of TILE = 4 rows
// and tiles of 4 columns, so the runtime size n must be a multiple of 4.
package qr_pkg;

  localparam int unsigned DW    = 40;           // data word per real part
  localparam int unsigned FW    = 38;           // fraction bits of data
  localparam int unsigned RW    = 50;           // reciprocal word
  localparam int unsigned RFW   = 14;           // reciprocal fraction bits
  localparam int unsigned MW    = 88;           // |u|^2 / sum of squares width
  localparam int unsigned TILE  = 4;            // rows/cols per block
  localparam int unsigned NMAX  = 20;           // largest matrix size
  localparam int unsigned NBLK  = NMAX / TILE;  // tiles per side (5)
  localparam int unsigned IDXW  = $clog2(NMAX + 1);
  localparam int unsigned BLKW  = $clog2(NBLK + 1);

  typedef logic signed [DW-1:0] fix_t;          // one real part
  typedef logic        [MW-1:0] mag_t;          // squared magnitude, 2*FW fraction bits

  typedef struct packed {
    fix_t re;
    fix_t im;
  } cplx_t;

  typedef cplx_t [TILE-1:0] vec_t;              // one 4-element row slice

  // One rotation as stored in RAM I: C is real, S complex.
  typedef struct packed {
    fix_t  c;
    cplx_t s;
  } rot_t;

  // Control word that travels with each row vector through a block.
  typedef struct packed {
    logic            valid;  // a vector is present
    logic            first;  // first vector of a band: stored R restarts at 0
    logic            last;   // last vector of a band: stored R is final
    logic [BLKW-1:0] band;   // row band (which 4 rows of R)
    logic [BLKW-1:0] tile;   // column tile (which 4 columns)
    logic [IDXW-1:0] idx;    // vector number within the band
  } ctl_t;

  // A vector issued by the scheduler into the Type II / Type III blocks, with
  // which of the two take part in this pass.
  typedef struct packed {
    ctl_t ctl;
    logic t2;   // Type II tile (band, tile) is processed
    logic t3;   // Type III column of this band is processed
  } issue_t;

  localparam int unsigned NW = $clog2(NMAX + 1);   // width of the runtime size n

  localparam fix_t  FIX_ONE  = fix_t'(64'sd1 <<< FW);
  localparam cplx_t CPLX_ZERO = '{re: '0, im: '0};

  // a*b for two fixed-point reals, truncated back to FW fraction bits.
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return fix_t'(p >>> FW);
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    return '{re: a.re + b.re, im: a.im + b.im};
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    return '{re: a.re - b.re, im: a.im - b.im};
  endfunction

  function automatic cplx_t cconj(input cplx_t a);
    return '{re: a.re, im: -a.im};
  endfunction

  // Complex product; each real product is formed at full width before the sum.
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    logic signed [2*DW-1:0] rr, ii, ri, ir;
    logic signed [2*DW:0]   pr, pi;
    rr = a.re * b.re;
    ii = a.im * b.im;
    ri = a.re * b.im;
    ir = a.im * b.re;
    pr = (2*DW+1)'(rr) - (2*DW+1)'(ii);
    pi = (2*DW+1)'(ri) + (2*DW+1)'(ir);
    return '{re: fix_t'(pr >>> FW), im: fix_t'(pi >>> FW)};
  endfunction

  // Real times complex.
  function automatic cplx_t rmul(input fix_t r, input cplx_t a);
    return '{re: fmul(r, a.re), im: fmul(r, a.im)};
  endfunction

  // |a|^2 with 2*FW fraction bits.
  function automatic mag_t cmag(input cplx_t a);
    logic signed [2*DW-1:0] pr, pi;
    pr = a.re * a.re;
    pi = a.im * a.im;
    return mag_t'($unsigned(pr)) + mag_t'($unsigned(pi));
  endfunction

  // Integer square root of a MW-bit value (bit-serial restoring method,
  // unrolled). With 2*FW fraction bits in, the root has FW fraction bits.
  function automatic logic [MW/2-1:0] isqrt(input mag_t v);
    logic [MW/2-1:0] root;
    logic [MW/2+1:0] rem;
    logic [MW/2+1:0] trial;
    root = '0;
    rem  = '0;
    for (int i = MW/2 - 1; i >= 0; i--) begin
      rem   = {rem[MW/2-1:0], v[2*i+1], v[2*i]};
      trial = {root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[MW/2-2:0], 1'b1};
      end else begin
        root = {root[MW/2-2:0], 1'b0};
      end
    end
    return root;
  endfunction

  // Reciprocal of a positive fixed-point real: 2^(FW+RFW) / r, i.e. 1/r with
  // RFW fraction bits. Saturates to the largest RW-bit value when r is so small
  // that 1/r does not fit (and when r is 0).
  function automatic logic signed [RW-1:0] recip(input fix_t r);
    logic [63:0] num, den, q;
    num = 64'd1 << (FW + RFW);
    den = {{(64-DW){1'b0}}, $unsigned(r)};
    if (r <= 0) return {1'b0, {(RW-1){1'b1}}};
    q = num / den;
    if (q > {{(64-RW+1){1'b0}}, {(RW-1){1'b1}}}) return {1'b0, {(RW-1){1'b1}}};
    return (RW)'(q);
  endfunction

  // x * inv, with inv the RW-bit reciprocal (RFW fraction bits).
  function automatic fix_t rcmul(input fix_t x, input logic signed [RW-1:0] inv);
    logic signed [DW+RW-1:0] p;
    p = x * inv;
    return fix_t'(p >>> RFW);
  endfunction

  // Packed address of R(i,j), j >= i, in a triangle laid out row by row for
  // an NMAX x NMAX matrix; B'(i) follows the triangle.
  localparam int unsigned R_ENTRIES = NMAX * (NMAX + 1) / 2;
  localparam int unsigned R3_DEPTH  = R_ENTRIES + NMAX;
  localparam int unsigned R3AW      = $clog2(R3_DEPTH);

  function automatic logic [R3AW-1:0] r_addr(input int unsigned i, input int unsigned j);
    return R3AW'(i * (2 * NMAX - i + 1) / 2 + (j - i));
  endfunction

  function automatic logic [R3AW-1:0] b_addr(input int unsigned i);
    return R3AW'(R_ENTRIES + i);
  endfunction

endpackage
