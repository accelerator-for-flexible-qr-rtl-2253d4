// tb_util_pkg: conversions between the accelerator's fixed-point complex
// words and real numbers, plus small random helpers, for the testbenches.
//
// Helpers only; nothing here models the design.
package tb_util_pkg;
  import qr_pkg::*;

  localparam real SCALE = 2.0 ** FW;

  function automatic fix_t to_fix(real v);
    return fix_t'(longint'(v * SCALE));
  endfunction

  function automatic real fr(fix_t v);
    return real'(longint'(v)) / SCALE;
  endfunction

  function automatic cplx_t to_c(real re, real im);
    return '{re: to_fix(re), im: to_fix(im)};
  endfunction

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 1000001) / 1000000.0;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // |got - (er, ei)| within tol on both parts
  function automatic bit near(cplx_t got, real er, real ei, real tol);
    return absr(fr(got.re) - er) <= tol && absr(fr(got.im) - ei) <= tol;
  endfunction
endpackage
