// tb_emd_poly_pu: evaluates random spline pieces with the polynomial PU and
// compares with a floating-point evaluation of a t'^3 + b t'^2 + c t' + d,
// rounded and saturated to 16 bits. Coefficients are drawn the way real
// pieces look (d a sample value, c a slope, b and a small curvature terms)
// for piece lengths up to 300 samples, plus some pieces that overflow the
// sample range to exercise saturation. Allowed error: 1 LSB.
module tb_emd_poly_pu;
  import emd_pkg::*;

  localparam real Q = 4294967296.0;

  spline_t sp;
  time_t tp;
  sample_t y;

  emd_poly_pu dut (.sp, .tp, .y);

  int checks = 0, failures = 0, n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic fx_t r2fx(input real v);
    return fx_t'(longint'(v * Q));
  endfunction

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      real a, b, c, d, h, ev, er;
      int ei;
      h = real'($urandom_range(2, 300));
      d = real'($urandom_range(0, 40000)) - 20000.0;
      c = urand(-200.0, 200.0) / h;
      b = urand(-2000.0, 2000.0) / (h * h);
      a = urand(-2000.0, 2000.0) / (h * h * h);
      if (n % 10 == 9) begin d = (d >= 0.0) ? 32000.0 : -32000.0; c = ((d >= 0.0) == (c >= 0.0)) ? c * 200.0 : -c * 200.0; end
      sp = '{t0: '0, h: time_t'($rtoi(h)), a: r2fx(a), b: r2fx(b), c: r2fx(c), d: r2fx(d)};
      tp = time_t'($urandom_range(0, $rtoi(h) - 1));
      #1;
      // evaluate with the quantised coefficients
      a = real'(sp.a) / Q; b = real'(sp.b) / Q; c = real'(sp.c) / Q; d = real'(sp.d) / Q;
      ev = ((a * real'(tp) + b) * real'(tp) + c) * real'(tp) + d;
      if (ev > 32767.0)       begin ei = 32767;  n_sat++; end
      else if (ev < -32768.0) begin ei = -32768; n_sat++; end
      else ei = $rtoi($floor(ev + 0.5));
      er = real'(y) - real'(ei);
      check(er <= 1.0 && er >= -1.0, $sformatf("t'=%0d: got %0d expected %0d (%f)", tp, y, ei, ev));
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
