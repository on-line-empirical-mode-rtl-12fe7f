// tb_emd_extremum_pu: drives both extremum PUs (maxima and minima) with
// random integer sequences that include plateaus, keeping their state bits
// as the controller does, and compares every decision with an independent
// search: prev is a maximum when the nearest earlier sample different from
// it is smaller and the current sample is smaller (plateau reported at its
// last sample); likewise for minima with "larger".
module tb_emd_extremum_pu;
  import emd_pkg::*;

  localparam int N = 4000;

  logic valid;
  logic tr_max, tr_min, to_max, to_min, f_max, f_min;
  sample_t prev, cur;

  emd_extremum_pu #(.IS_MAX(1'b1)) u_max (.valid, .trend_in(tr_max), .prev, .cur,
                                         .found(f_max), .trend_out(to_max));
  emd_extremum_pu #(.IS_MAX(1'b0)) u_min (.valid, .trend_in(tr_min), .prev, .cur,
                                         .found(f_min), .trend_out(to_min));

  int checks = 0, failures = 0;
  sample_t x [N];
  int n_max = 0, n_min = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    x[0] = '0;
    for (int t = 1; t < N; t++)
      x[t] = ($urandom_range(0, 3) == 0) ? x[t-1] : sample_t'($urandom_range(0, 20) - 10);
    tr_max = 1'b0; tr_min = 1'b0;
    valid = 1'b0; prev = '0; cur = x[0];
    #1;
    check(!f_max && !f_min, "nothing found before the second sample");
    for (int t = 1; t < N; t++) begin
      bit exp_max, exp_min;
      int k;
      valid = 1'b1;
      prev  = x[t-1];
      cur   = x[t];
      #1;
      // reference: look back past the plateau that ends at t-1
      k = t - 2;
      while (k >= 0 && x[k] == x[t-1]) k--;
      exp_max = (k >= 0) && (x[k] < x[t-1]) && (x[t] < x[t-1]);
      exp_min = (k >= 0) && (x[k] > x[t-1]) && (x[t] > x[t-1]);
      check(f_max == exp_max, $sformatf("max decision at t=%0d", t-1));
      check(f_min == exp_min, $sformatf("min decision at t=%0d", t-1));
      n_max += int'(f_max);
      n_min += int'(f_min);
      tr_max = to_max;
      tr_min = to_min;
    end
    check(n_max > 100 && n_min > 100, "both kinds of extrema occur");
    check(n_max - n_min <= 1 && n_min - n_max <= 1, "maxima and minima alternate in number");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
