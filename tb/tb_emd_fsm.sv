// tb_emd_fsm: tests the controller inside a small processor (M = 2
// components, R = 3 iterations, 32-slot stage rings, 8-entry hand-over
// queue), small enough that ring overflow and a full hand-over queue happen
// often. Input: a tone of period 6 plus a slow tone and random bursts.
// Checks, after every sample period:
//   * the controller visited all M*R stages once, in order;
//   * conservation: the first stage has stored every input sample, each
//     stage has stored exactly the samples the stage before it released,
//     and the last stage's releases equal the residue samples sent out;
//   * no stage ring holds more than its 32 slots;
// and at the end: exact reconstruction x = r + c_1 + c_2, that the first
// IMF follows the fast tone before the first flat stretch, and that
// overflow releases, sifted releases and deferred releases (full queue)
// all happened.
module tb_emd_fsm;
  import emd_pkg::*;

  localparam int M = 2, R = 3, D = 32, NS = M * R;
  localparam int N_SAMPLES = 1500;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  sample_t x_data = '0;
  logic x_ready, imf_valid, res_valid, pu_en;
  logic [0:0] imf_idx;
  sample_t imf_data, res_data;

  emd_processor #(.M(M), .R(R), .DEPTH(D), .QDEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sample_t xs [N_SAMPLES];
  sample_t imf [M][N_SAMPLES];
  sample_t res [N_SAMPLES];
  int n_imf [M];
  int n_res = 0;
  int visits [$];
  int ev_overflow = 0, ev_sifted = 0, ev_deferred = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (imf_valid) begin imf[imf_idx][n_imf[imf_idx]] <= imf_data; n_imf[imf_idx] <= n_imf[imf_idx] + 1; end
    if (res_valid) begin res[n_res] <= res_data; n_res <= n_res + 1; end
    if (int'(dut.u_fsm.st) == 1) visits.push_back(int'(dut.u_fsm.s));        // stage load
    if (int'(dut.u_fsm.st) == 4) begin                                        // release
      if (int'(dut.u_fsm.ret_st) == 3) ev_overflow++;
      if (dut.cu_env_ok) ev_sifted++;
    end
    if (int'(dut.u_fsm.st) == 10 && dut.u_fsm.rel_ready && !dut.u_fsm.rel_ok) ev_deferred++;
  end

  initial begin
    n_imf[0] = 0; n_imf[1] = 0;
    for (int t = 0; t < N_SAMPLES; t++) begin
      real v;
      v = 900.0 * $sin(2.0 * PI * t / 6.0) + 1500.0 * $sin(2.0 * PI * t / 150.0);
      if ((t / 200) % 2 == 1 && (t % 200) < 40) v = 0.0;     // flat stretches
      xs[t] = sample_t'($rtoi(v));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < N_SAMPLES; t++) begin
      while (!x_ready) @(posedge clk);
      visits.delete();
      x_valid <= 1'b1; x_data <= xs[t];
      @(posedge clk);
      x_valid <= 1'b0;
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      @(posedge clk);
      // stage order
      check(visits.size() == NS, $sformatf("sample %0d: %0d stage visits", t, visits.size()));
      for (int k = 0; k < visits.size(); k++) check(visits[k] == k, "stage visit order");
      // conservation through the stages
      check(int'(dut.u_fsm.sreg[0].wr) == (t + 1) % 65536, "first stage stored every input");
      for (int k = 1; k < NS; k++)
        check(dut.u_fsm.sreg[k].wr == dut.u_fsm.sreg[k-1].rd, $sformatf("stage %0d stored what stage %0d released", k, k-1));
      check(int'(dut.u_fsm.sreg[NS-1].rd) == n_res, "last stage releases all reach the residue");
      for (int k = 0; k < NS; k++)
        check(time_t'(dut.u_fsm.sreg[k].wr - dut.u_fsm.sreg[k].rd) <= time_t'(D), "ring occupancy");
    end
    for (int t = 0; t < n_res; t++)
      check(int'(res[t]) + int'(imf[0][t]) + int'(imf[1][t]) == int'(xs[t]), $sformatf("reconstruction at %0d", t));
    // the first IMF should be the fast tone before the first flat stretch
    begin
      real e2, s2, f;
      e2 = 0.0; s2 = 0.0;
      for (int t = 60; t < n_imf[0] && t < 150; t++) begin
        if ((t / 200) % 2 == 1 && (t % 200) < 80) continue;
        f = 900.0 * $sin(2.0 * PI * t / 6.0);
        e2 += (real'(imf[0][t]) - f) ** 2;
        s2 += f ** 2;
      end
      $display("IMF1 relative rms error %f", $sqrt(e2 / s2));
      check($sqrt(e2 / s2) < 0.2, "IMF1 follows the fast tone");
    end
    $display("released: overflow %0d sifted %0d deferred %0d, residue %0d", ev_overflow, ev_sifted, ev_deferred, n_res);
    check(ev_overflow > 0, "overflow releases");
    check(ev_sifted > 0, "sifted releases");
    check(ev_deferred > 0, "deferred releases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
