// tb_emd_candidate_unit: random operands through the mean / candidate /
// next-input unit, compared with integer arithmetic in the testbench:
// m = floor((U + L) / 2) when both envelopes are valid, else 0;
// c = sat16(s - m); x_next = sat16(x - c).
module tb_emd_candidate_unit;
  import emd_pkg::*;

  sample_t s, u, l, x, m, c_next, x_next;
  logic env_ok;

  emd_candidate_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int em, ec, ex, sum;
      bit big;
      big = ($urandom_range(0, 4) == 0);
      s = sample_t'(big ? $urandom : $urandom_range(0, 8000) - 4000);
      u = sample_t'(big ? $urandom : $urandom_range(0, 8000) - 4000);
      l = sample_t'(big ? $urandom : $urandom_range(0, 8000) - 4000);
      x = sample_t'(big ? $urandom : $urandom_range(0, 8000) - 4000);
      env_ok = ($urandom_range(0, 5) != 0);
      #1;
      sum = int'(u) + int'(l);
      em = env_ok ? ((sum >= 0) ? sum / 2 : -((-sum + 1) / 2)) : 0;
      ec = sat(int'(s) - em);
      ex = sat(int'(x) - ec);
      check(int'(m) == em, $sformatf("mean of %0d and %0d: %0d vs %0d", u, l, m, em));
      check(int'(c_next) == ec, "candidate");
      check(int'(x_next) == ex, "next input");
    end
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
