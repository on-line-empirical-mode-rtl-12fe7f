// emd_poly_pu: last-stage PU of one envelope set. It evaluates the current
// cubic spline piece at offset t' from the piece's first extremum:
//     y = a t'^3 + b t'^2 + c t' + d        (eq. 2)
// and rounds the result to a saturated SAMPLE_W-bit envelope sample.
//
// How it works: Horner's rule, ((a t' + b) t' + c) t' + d, with three
// fixed-point-by-integer products in the package's Q31.32 format, followed
// by round-half-up to an integer. Horner's form is this design's choice; the
// substitution of t' into eq. 2 is the architecture's.
//
// Interface and timing: combinational, one envelope sample per cycle. The
// controller supplies t' (its t'_u or t'_l) and the coefficient set.
module emd_poly_pu
  import emd_pkg::*;
(
  input  spline_t sp,
  input  time_t   tp,       // t' = t - t_k
  output sample_t y
);
  fx_t h1, h2, h3;

  always_comb begin
    h1 = fx_mul_t(sp.a, tp) + sp.b;
    h2 = fx_mul_t(h1, tp) + sp.c;
    h3 = fx_mul_t(h2, tp) + sp.d;
    y  = fx_to_sample(h3);
  end
endmodule
