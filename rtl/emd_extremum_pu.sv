// emd_extremum_pu: first-stage PU of one envelope set. It decides whether the
// previous sample of a sifting stage is a new local maximum (IS_MAX = 1) or a
// new local minimum (IS_MAX = 0).
//
// How it works: the PU keeps one bit of state per sifting stage, "the signal
// was last seen moving toward an extremum" (rising for the maxima PU,
// falling for the minima PU). When the next non-zero step goes the other way,
// the sample before the current one is reported as an extremum. Equal
// neighbours (plateaus) neither set nor clear the bit, so a flat top is
// reported once, at its last sample, and maxima and minima always alternate.
// The plateau rule is this design's choice; the architecture only states that
// this PU detects whether there is a new extremum.
//
// Interface and timing: purely combinational. The controller supplies the
// stage's stored state bit (trend_in), the previous sample (prev) and the new
// sample (cur), and writes trend_out back with the sample. `found` means prev
// is an extremum of this PU's kind, located one sample before cur.
module emd_extremum_pu
  import emd_pkg::*;
#(
  parameter bit IS_MAX = 1'b1
) (
  input  logic    valid,      // prev holds a real sample of this stage
  input  logic    trend_in,
  input  sample_t prev,
  input  sample_t cur,
  output logic    found,
  output logic    trend_out
);
  logic toward, away;

  always_comb begin
    toward = IS_MAX ? (cur > prev) : (cur < prev);
    away   = IS_MAX ? (cur < prev) : (cur > prev);
    found     = valid && trend_in && away;
    trend_out = trend_in;
    if (valid && toward) trend_out = 1'b1;
    if (valid && away)   trend_out = 1'b0;
  end
endmodule
