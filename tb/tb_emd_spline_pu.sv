// tb_emd_spline_pu: checks the spline-coefficient PU against a floating-point
// model of the same on-line natural cubic spline: a forward sweep that runs
// over every extremum since the start (data reuse), back substitution from
// the newest extremum with S = 0 there, and the coefficients of the piece
// NB extrema back. Extrema come with random spacings (short ones and some
// long ones) and random values. Checked: when a piece is produced (only from
// the N_EXT-th extremum on), its start time and length exactly, a, b, c, d
// within a small tolerance, the returned history (times, values, extremum
// count), and the latency of each update against the divider schedule.
module tb_emd_spline_pu;
  import emd_pkg::*;

  localparam int N_EXTREMA = 200;
  localparam real Q = 4294967296.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  time_t t_new = '0;
  sample_t m_new = '0;
  hist_t hist_in = '0, hist_out;
  logic busy, done, seg_valid;
  spline_t seg;

  emd_spline_pu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real tr [N_EXTREMA], mr [N_EXTREMA], cpr [N_EXTREMA], dpr [N_EXTREMA];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit close(input real got, input real exp, input real tol);
    real d;
    d = got - exp;
    if (d < 0) d = -d;
    return d <= tol * (1.0 + ((exp < 0) ? -exp : exp));
  endfunction

  function automatic real fx2r(input fx_t v);
    return real'(v) / Q;
  endfunction

  initial begin
    time_t t;
    t = 16'd100;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < N_EXTREMA; n++) begin
      int gap, cyc, exp_cyc;
      gap = ($urandom_range(0, 9) == 0) ? $urandom_range(100, 600) : $urandom_range(2, 40);
      if (n > 0) t = t + time_t'(gap);
      tr[n] = real'(t);          // absolute times stay below 2^16 here
      m_new = sample_t'($urandom_range(0, 40000) - 20000);
      mr[n] = real'(m_new);
      // reference forward sweep row of extremum n-1
      cpr[n] = 0.0; dpr[n] = 0.0;
      if (n >= 2) begin
        real a, b, c, d, den, sl1, sl0;
        a = tr[n-1] - tr[n-2];
        c = tr[n] - tr[n-1];
        b = 2.0 * (a + c);
        sl1 = (mr[n] - mr[n-1]) / c;
        sl0 = (mr[n-1] - mr[n-2]) / a;
        d = 6.0 * (sl1 - sl0);
        den = b - cpr[n-2] * a;
        cpr[n-1] = c / den;
        dpr[n-1] = (d - dpr[n-2] * a) / den;
      end
      // drive the PU
      t_new = t;
      start = 1'b1;
      @(posedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      // 2 cycles of set-up, FX_W+3 per division, NB for the back substitution
      exp_cyc = (n == 0) ? 2 : (n == 1) ? 2 + (FX_W + 3) : 2 + 3 * (FX_W + 3);
      if (n >= N_EXT - 1) exp_cyc += NB + (FX_W + 3);
      check(cyc == exp_cyc, $sformatf("extremum %0d: latency %0d, expected %0d", n, cyc, exp_cyc));
      check(hist_out.cnt == CNT_W'((n + 1 < N_EXT) ? n + 1 : N_EXT), "extremum count");
      check(hist_out.e[0].t == t && hist_out.e[0].m == m_new, "newest extremum stored");
      if (n >= 1) check(close(fx2r(hist_out.e[1].cp), cpr[n-1], 1e-6) &&
                        close(fx2r(hist_out.e[1].dp), dpr[n-1], 1e-6),
                        $sformatf("forward sweep row %0d: C' %f/%f D' %f/%f", n-1,
                                  fx2r(hist_out.e[1].cp), cpr[n-1], fx2r(hist_out.e[1].dp), dpr[n-1]));
      check(seg_valid == (n >= N_EXT - 1), "piece produced from the N_EXT-th extremum on");
      if (n >= N_EXT - 1) begin
        real s [NB+1];
        real h, ea, eb, ec, ed;
        s[0] = 0.0;
        for (int k = 1; k <= NB; k++) s[k] = dpr[n-k] - cpr[n-k] * s[k-1];
        h  = tr[n-NB+1] - tr[n-NB];
        ea = (s[NB-1] - s[NB]) / (6.0 * h);
        eb = s[NB] / 2.0;
        ec = (mr[n-NB+1] - mr[n-NB]) / h - h * (2.0 * s[NB] + s[NB-1]) / 6.0;
        ed = mr[n-NB];
        check(real'(seg.t0) == tr[n-NB] && real'(seg.h) == h, "piece position");
        check(close(fx2r(seg.a), ea, 1e-5), $sformatf("a %g vs %g", fx2r(seg.a), ea));
        check(close(fx2r(seg.b), eb, 1e-6), $sformatf("b %g vs %g", fx2r(seg.b), eb));
        check(close(fx2r(seg.c), ec, 1e-6), $sformatf("c %g vs %g", fx2r(seg.c), ec));
        check(close(fx2r(seg.d), ed, 1e-9), "d");
      end
      hist_in = hist_out;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
