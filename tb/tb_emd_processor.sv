// tb_emd_processor: end-to-end test of the on-line EMD processor at its
// default configuration (M = 5 IMFs, R = 10 iterations, 256-slot stage
// rings, 16-bit samples).
//
// Stimulus: a sum of three integer-rounded sinusoids with periods of 10, 64
// and 1500 samples (a fast, a middle and a very slow tone) plus a short flat
// stretch, N_SAMPLES samples in all, one sample per processor period.
// Checks:
//   * every output stream is in time order and no component runs ahead of
//     the one before it;
//   * exact reconstruction x(t) = r(t) + sum_i c_i(t) for every time whose
//     residue has come out and where no output saturated (rare: below 5%);
//   * the first IMF matches the fast tone (relative rms error below 25% after
//     the start-up region), which shows the sifting really separates scales;
//   * the delay of IMF i does not shrink with i;
//   * the mean work per sample fits the reference rate of 2040 cycles per
//     sample (522.24 kHz clock, 256 samples/s); the maximum is reported;
//   * each mechanism happens at least once: new maxima and minima, spline
//     pieces of both envelopes, interpolated envelope samples, sifted and
//     unsifted releases, ring overflow, releases deferred by a full
//     hand-over queue, hand-over to the next component,
//     residue output, and stage visits in which the PUs stay off.
module tb_emd_processor;
  import emd_pkg::*;

  localparam int M = 5;
  localparam int N_SAMPLES = 12000;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x_valid = 1'b0;
  sample_t x_data = '0;
  logic x_ready, imf_valid, res_valid, pu_en;
  logic [2:0] imf_idx;
  sample_t imf_data, res_data;

  emd_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sample_t xs   [N_SAMPLES];
  real     fast [N_SAMPLES];
  sample_t imf  [M][N_SAMPLES];
  sample_t res  [N_SAMPLES];
  int      n_imf [M];
  int      n_res = 0;
  int      n_sat = 0;   // times at which some output saturated

  // mechanism counters
  int ev_max = 0, ev_min = 0, ev_seg_u = 0, ev_seg_l = 0, ev_int_u = 0, ev_int_l = 0;
  int ev_sifted = 0, ev_unsifted = 0, ev_overflow = 0, ev_handover = 0, ev_deferred = 0;
  int ev_idle_frames = 0;
  int frame_cycles = 0, max_frame = 0;
  longint total_cycles = 0;
  logic pu_seen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // FSM state encodings used for event counting (order of the state enum)
  localparam int ST_EMIT = 4;
  localparam int ST_WRITE = 3;
  localparam int ST_LOAD = 1;
  localparam int ST_SAVE = 11;
  localparam int ST_REL = 10;
  logic visit_pu = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (imf_valid) begin
      imf[imf_idx][n_imf[imf_idx]] <= imf_data;
      n_imf[imf_idx] <= n_imf[imf_idx] + 1;
    end
    if (res_valid) begin
      res[n_res] <= res_data;
      n_res <= n_res + 1;
    end
    if (dut.cb_we_s && dut.ex_found[0]) ev_max++;
    if (dut.cb_we_s && dut.ex_found[1]) ev_min++;
    if (dut.sp_done[0] && dut.sp_seg_valid[0]) ev_seg_u++;
    if (dut.sp_done[1] && dut.sp_seg_valid[1]) ev_seg_l++;
    if (dut.cb_we_u) ev_int_u++;
    if (dut.cb_we_l) ev_int_l++;
    if (int'(dut.u_fsm.st) == ST_LOAD) visit_pu <= 1'b0;
    else if (pu_en) visit_pu <= 1'b1;
    if (int'(dut.u_fsm.st) == ST_SAVE && !visit_pu) ev_idle_frames++;
    if (int'(dut.u_fsm.st) == ST_REL && dut.u_fsm.rel_ready && !dut.u_fsm.rel_ok) ev_deferred++;
    if (int'(dut.u_fsm.st) == ST_EMIT) begin
      if (dut.cu_env_ok) ev_sifted++; else ev_unsifted++;
      if (int'(dut.u_fsm.ret_st) == ST_WRITE) ev_overflow++;
      if (dut.u_fsm.last_iter && dut.xb_push) ev_handover++;
    end
  end

  initial begin
    for (int c = 0; c < M; c++) n_imf[c] = 0;
    for (int t = 0; t < N_SAMPLES; t++) begin
      real v;
      fast[t] = 1500.0 * $sin(2.0 * PI * t / 10.0);
      v = fast[t] + 2500.0 * $sin(2.0 * PI * t / 64.0 + 0.3)
                  + 3000.0 * $sin(2.0 * PI * t / 1500.0 + 1.0);
      if (t >= 1800 && t < 1830) v = 0.0;   // flat stretch
      xs[t] = sample_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < N_SAMPLES; t++) begin
      while (!x_ready) @(posedge clk);
      x_valid <= 1'b1;
      x_data  <= xs[t];
      @(posedge clk);
      x_valid <= 1'b0;
      frame_cycles = 1;
      pu_seen = 1'b0;
      @(posedge clk);
      while (!x_ready) begin
        if (pu_en) pu_seen = 1'b1;
        frame_cycles++;
        @(posedge clk);
      end
      total_cycles += frame_cycles;
      if (frame_cycles > max_frame) max_frame = frame_cycles;
    end
    repeat (4) @(posedge clk);

    // stream ordering and counts
    for (int c = 0; c < M; c++) begin
      check(n_imf[c] <= N_SAMPLES, "IMF count within input count");
      if (c > 0) check(n_imf[c] <= n_imf[c-1], $sformatf("IMF %0d does not run ahead of IMF %0d", c+1, c));
    end
    check(n_res == n_imf[M-1], "residue count equals last IMF count");
    check(n_res > N_SAMPLES / 2, $sformatf("residue reached %0d of %0d samples", n_res, N_SAMPLES));

    // exact reconstruction
    for (int t = 0; t < n_res; t++) begin
      int sum;
      bit sat;
      sum = int'(res[t]);
      sat = (res[t] == 16'sh7fff) || (res[t] == -16'sh8000);
      for (int c = 0; c < M; c++) begin
        sum += int'(imf[c][t]);
        sat |= (imf[c][t] == 16'sh7fff) || (imf[c][t] == -16'sh8000);
      end
      if (sat) n_sat++;
      else check(sum == int'(xs[t]), $sformatf("reconstruction at t=%0d: %0d vs %0d (%0d %0d %0d %0d %0d r %0d)", t, sum, xs[t], imf[0][t], imf[1][t], imf[2][t], imf[3][t], imf[4][t], res[t]));
    end

    $display("times with a saturated output: %0d", n_sat);
    check(n_sat < n_res / 20, "saturation is rare");

    // first IMF against the fast tone, away from the start-up and flat parts
    begin
      real e2, s2;
      e2 = 0.0; s2 = 0.0;
      for (int t = 300; t < n_imf[0] && t < 1700; t++) begin
        e2 += (real'(imf[0][t]) - fast[t]) ** 2;
        s2 += fast[t] ** 2;
      end
      $display("IMF1 vs fast tone: relative rms error %f", (s2 > 0.0) ? $sqrt(e2 / s2) : -1.0);
      check(s2 > 0.0 && $sqrt(e2 / s2) < 0.25, "IMF1 follows the fast tone");
    end

    // delays
    for (int c = 1; c < M; c++)
      check(N_SAMPLES - n_imf[c] >= N_SAMPLES - n_imf[c-1], "IMF delay does not shrink");
    $display("delays in samples: IMF1 %0d IMF2 %0d IMF3 %0d IMF4 %0d IMF5 %0d",
             N_SAMPLES - n_imf[0], N_SAMPLES - n_imf[1], N_SAMPLES - n_imf[2],
             N_SAMPLES - n_imf[3], N_SAMPLES - n_imf[4]);
    $display("cycles per sample period: mean %0d max %0d",
             total_cycles / N_SAMPLES, max_frame);
    // 522.24 kHz / 256 samples/s = 2040 cycles per sample on average
    check(total_cycles / N_SAMPLES <= 2040, "mean cycles per sample within 2040");
    $display("events: max %0d min %0d seg_u %0d seg_l %0d int_u %0d int_l %0d sifted %0d unsifted %0d overflow %0d handover %0d idle_visits %0d deferred %0d",
             ev_max, ev_min, ev_seg_u, ev_seg_l, ev_int_u, ev_int_l, ev_sifted, ev_unsifted,
             ev_overflow, ev_handover, ev_idle_frames, ev_deferred);
    check(ev_max > 0, "maxima detected");
    check(ev_min > 0, "minima detected");
    check(ev_seg_u > 0, "upper spline pieces");
    check(ev_seg_l > 0, "lower spline pieces");
    check(ev_int_u > 0, "upper envelope samples");
    check(ev_int_l > 0, "lower envelope samples");
    check(ev_sifted > 0, "sifted releases");
    check(ev_unsifted > 0, "unsifted releases");
    check(ev_overflow > 0, "ring overflow");
    check(ev_deferred > 0, "releases deferred by a full hand-over queue");
    check(ev_handover > 0, "hand-over to next component");
    check(n_res > 0, "residue output");
    check(ev_idle_frames > 0, "stage visits with the PUs off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
