// emd_candidate_unit: the adder, halving and subtractors that close one
// sifting step (steps 3, 4 and 6 of the sifting procedure).
//   m      = (U + L) / 2          mean of the two envelopes
//   c_next = s - m                next IMF candidate
//   x_next = x - c_next           input of the next component (residue after
//                                 the last component)
//
// How it works: the division by two is an arithmetic right shift (rounds
// toward minus infinity); both differences saturate to SAMPLE_W bits. When a
// sample leaves its stage before both envelopes were interpolated for it
// (start-up, or the stage buffer overflowed) env_ok is low and the sample is
// passed on unchanged (m taken as 0). That fallback is this design's choice.
//
// Interface and timing: purely combinational.
module emd_candidate_unit
  import emd_pkg::*;
(
  input  sample_t s,        // sample of the current candidate c_{i,j}
  input  sample_t u,        // upper envelope at the same time
  input  sample_t l,        // lower envelope at the same time
  input  logic    env_ok,   // both envelopes valid
  input  sample_t x,        // component input x_i at the same time
  output sample_t m,
  output sample_t c_next,
  output sample_t x_next
);
  logic signed [SAMPLE_W:0] sum;

  always_comb begin
    sum    = wsample_t'(u) + wsample_t'(l);
    m      = env_ok ? sample_t'(sum >>> 1) : '0;
    c_next = sat_sample(wsample_t'(s) - wsample_t'(m));
    x_next = sat_sample(wsample_t'(x) - wsample_t'(c_next));
  end
endmodule
