// emd_pkg: types, constants and fixed-point helpers shared by the on-line
// EMD processor.
//
// Number formats
//   * Samples, IMF candidates, envelopes and residue are SAMPLE_W-bit signed
//     integers (16 bits, the precision of the reference chip).
//   * Sample times are TIME_W-bit unsigned counters that wrap; only their
//     differences are used.
//   * Every spline intermediate (slopes, C', D', S, a, b, c, d) is a signed
//     fixed-point number with FX_FRAC fraction bits in an FX_W-bit word
//     (Q31.32). This internal format is a design choice: the spline
//     recursion needs far more range and resolution than the 16-bit samples.
//
// History record
//   Each envelope of each sifting stage keeps the newest NB+1 extrema with the
//   forward-sweep coefficients already computed for them (data reuse). Entry 0
//   is the newest extremum. NB = N_EXT/2 is how far the back substitution
//   reaches: with the 8-extrema window the middle spline lies NB extrema back.
package emd_pkg;

  localparam int SAMPLE_W = 16;          // sample precision (bits)
  localparam int TIME_W   = 16;          // sample-time counter width
  localparam int FX_W     = 64;          // fixed-point word
  localparam int FX_FRAC  = 32;          // fraction bits
  localparam int N_EXT    = 8;           // extrema per CSI window
  localparam int NB       = N_EXT / 2;   // back-substitution depth
  localparam int CNT_W    = 4;           // extrema counter (saturates at N_EXT)

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [TIME_W-1:0]   time_t;
  typedef logic signed [FX_W-1:0]     fx_t;

  // 1/6 in Q.32, rounded: used for the "/6" terms of the coefficient formulas.
  localparam fx_t FX_RECIP6 = fx_t'(64'sh0000_0000_2AAA_AAAB);
  localparam fx_t FX_MAX    = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN    = {1'b1, {(FX_W-1){1'b0}}};

  // One extremum of an envelope plus its forward-sweep coefficients.
  typedef struct packed {
    time_t t;    // sample time of the extremum
    sample_t m;  // extremum value
    fx_t   sl;   // slope of the interval ending at this extremum
    fx_t   cp;   // C'_k of the row of this extremum
    fx_t   dp;   // D'_k of the row of this extremum
  } ext_rec_t;

  typedef struct packed {
    logic [CNT_W-1:0] cnt;       // extrema seen so far, saturating at N_EXT
    ext_rec_t [NB:0]  e;         // e[0] newest
  } hist_t;

  // Cubic piece U(t0 + t') = a t'^3 + b t'^2 + c t' + d, t' in [0, h).
  typedef struct packed {
    time_t t0;
    time_t h;
    fx_t   a;
    fx_t   b;
    fx_t   c;
    fx_t   d;
  } spline_t;

  // One slot of the candidate buffer: the stage's input sample and the two
  // interpolated envelope values once they are known.
  typedef struct packed {
    sample_t s;
    sample_t u;
    logic    uv;
    sample_t l;
    logic    lv;
  } cand_entry_t;

  // Output stream tag values: 0..M-1 are IMFs, M is the residue.

  function automatic fx_t int_to_fx(input sample_t v);
    return fx_t'({{(FX_W-FX_FRAC-SAMPLE_W){v[SAMPLE_W-1]}}, v, {FX_FRAC{1'b0}}});
  endfunction

  function automatic fx_t time_to_fx(input time_t v);
    return fx_t'({{(FX_W-FX_FRAC-TIME_W){1'b0}}, v, {FX_FRAC{1'b0}}});
  endfunction

  // Fixed-point product, truncated toward minus infinity.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_FRAC);
  endfunction

  // Fixed-point value times an integer time difference (exact, wraps on
  // overflow of the word).
  function automatic fx_t fx_mul_t(input fx_t a, input time_t t);
    logic signed [FX_W+TIME_W:0] p;
    p = a * $signed({1'b0, t});
    return fx_t'(p);
  endfunction

  // Round a fixed-point value to the nearest integer sample, saturating.
  function automatic sample_t fx_to_sample(input fx_t v);
    fx_t r;
    r = (v + (fx_t'(1) <<< (FX_FRAC-1))) >>> FX_FRAC;
    if (r > fx_t'(2**(SAMPLE_W-1)-1))   return sample_t'(2**(SAMPLE_W-1)-1);
    if (r < -fx_t'(2**(SAMPLE_W-1)))    return sample_t'(-(2**(SAMPLE_W-1)));
    return sample_t'(r);
  endfunction

  // Saturate a SAMPLE_W+1 bit difference to SAMPLE_W bits.
  typedef logic signed [SAMPLE_W:0] wsample_t;
  localparam wsample_t WS_MAX = wsample_t'(2**(SAMPLE_W-1)-1);
  localparam wsample_t WS_MIN = wsample_t'(-(2**(SAMPLE_W-1)));

  function automatic sample_t sat_sample(input wsample_t v);
    if (v > WS_MAX) return sample_t'(WS_MAX);
    if (v < WS_MIN) return sample_t'(WS_MIN);
    return v[SAMPLE_W-1:0];
  endfunction

endpackage
