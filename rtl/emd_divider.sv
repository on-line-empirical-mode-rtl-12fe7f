// emd_divider: sequential signed fixed-point divider shared by the divisions
// of the spline-coefficient PU (eqs. 6, 7 and 9: C'_k, D'_k, the interval
// slopes and the cubic coefficient a_k).
//
// Function: q = num / den with num, den and q all in the package's Q31.32
// format, i.e. q = (num << FX_FRAC) / den, truncated toward zero. A quotient
// that does not fit, or a zero divisor, saturates to the largest value of the
// quotient's sign.
//
// How it works: a radix-2 restoring divider on the magnitudes. The partial
// remainder is preloaded with the integer part of |num|; if that is already
// not smaller than |den| the quotient would exceed FX_W bits and the result
// saturates. Otherwise FX_W iterations each shift in one dividend bit and
// produce one quotient bit. The algorithm and the one-bit-per-cycle rate are
// this design's choices; the architecture only requires the divisions.
//
// Interface and timing: pulse `start` with num/den valid while busy is low.
// `done` pulses for one cycle with q valid FX_W+1 cycles after start (65
// cycles at the default format); q holds until the next start.
module emd_divider
  import emd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic busy,
  output logic done,
  output fx_t  q
);
  localparam int CW = $clog2(FX_W + 1);

  logic [FX_W-1:0]   rem;        // partial remainder
  logic [FX_W-1:0]   dvd;        // dividend bits still to shift in
  logic [FX_W-1:0]   dvs;        // |den|
  logic [FX_W-1:0]   quo;
  logic [CW-1:0]     cnt;
  logic              neg;
  logic              ovf;

  logic [FX_W-1:0]   num_mag, den_mag;
  logic [FX_W:0]     trial;

  always_comb begin
    num_mag = num[FX_W-1] ? FX_W'(-num) : FX_W'(num);
    den_mag = den[FX_W-1] ? FX_W'(-den) : FX_W'(den);
    trial   = {rem, dvd[FX_W-1]} - {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; dvd <= '0; dvs <= '0; quo <= '0; cnt <= '0;
      neg <= 1'b0; ovf <= 1'b0; busy <= 1'b0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // integer part of |num| is the preloaded remainder
        rem  <= num_mag >> FX_FRAC;
        dvd  <= num_mag << (FX_W - FX_FRAC);
        dvs  <= den_mag;
        quo  <= '0;
        neg  <= num[FX_W-1] ^ den[FX_W-1];
        ovf  <= (den_mag == '0) || ((num_mag >> FX_FRAC) >= den_mag);
        cnt  <= CW'(FX_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          if (!trial[FX_W]) begin
            rem <= trial[FX_W-1:0];
            quo <= {quo[FX_W-2:0], 1'b1};
          end else begin
            rem <= {rem[FX_W-2:0], dvd[FX_W-1]};
            quo <= {quo[FX_W-2:0], 1'b0};
          end
          dvd <= dvd << 1;
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (ovf || quo[FX_W-1])
            q <= neg ? FX_MIN : FX_MAX;
          else
            q <= neg ? fx_t'(-quo) : fx_t'(quo);
        end
      end
    end
  end
endmodule
