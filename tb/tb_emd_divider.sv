// tb_emd_divider: checks the sequential fixed-point divider against exact
// integer arithmetic: q = trunc((num * 2^32) / den) on 128-bit integers, with
// saturation when the quotient does not fit 64 bits or den is zero. Operands
// are random with random signs and magnitudes (small divisors, typical spline
// values, and cases that overflow). The latency from start to done is
// checked to be FX_W+1 cycles, and busy must be high meanwhile.
module tb_emd_divider;
  import emd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t num = '0, den = '0, q;
  logic busy, done;

  emd_divider dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic fx_t rnd_fx(input int int_bits);
    logic [63:0] v;
    v = {$urandom, $urandom};
    v = v >> (63 - (FX_FRAC + int_bits));
    if ($urandom_range(0, 1)) v = -v;
    return fx_t'(v);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic signed [127:0] e, nn, dd;
      fx_t exp_q;
      int cyc;
      num = rnd_fx($urandom_range(0, 30));
      den = (n % 50 == 49) ? '0 : rnd_fx($urandom_range(0, 20));
      if (den == '0 && n % 50 != 49) den = fx_t'(64'sd1);
      nn = 128'(num);
      dd = 128'(den);
      if (dd == 0) begin
        exp_q = num[63] ? FX_MIN : FX_MAX;
      end else begin
        e = (nn <<< 32) / dd;
        if (e > 128'(FX_MAX))      exp_q = FX_MAX;
        else if (e < 128'(FX_MIN)) exp_q = FX_MIN;
        else                       exp_q = fx_t'(e);
        // a saturated positive quotient of a negative pair keeps FX_MAX
      end
      start = 1'b1;
      @(posedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done) begin
        check(busy || cyc == 0, "busy while dividing");
        @(posedge clk);
        cyc++;
      end
      check(cyc == FX_W + 1, $sformatf("latency %0d", cyc));
      check(q == exp_q, $sformatf("%0d / %0d: got %0d expected %0d", num, den, q, exp_q));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
