// tb_emd_coef_buffer: checks the coefficient buffer of 4 stages x 2
// envelopes. After reset every word must read as an empty history (count 0);
// then random history words are written and read back at random
// (stage, envelope) addresses and compared with a testbench model, with
// one-cycle read latency.
module tb_emd_coef_buffer;
  import emd_pkg::*;

  localparam int NS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en = 1'b0, rd_env = 1'b0, we = 1'b0, wr_env = 1'b0;
  logic [1:0] rd_stage = '0, wr_stage = '0;
  hist_t rd_data, wr_data = '0;

  emd_coef_buffer #(.N_STAGE(NS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  hist_t model [NS][2];
  bit    valid [NS][2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic hist_t rnd_hist();
    hist_t h;
    h.cnt = CNT_W'($urandom_range(1, N_EXT));
    for (int k = 0; k <= NB; k++)
      h.e[k] = '{t: time_t'($urandom), m: sample_t'($urandom), sl: fx_t'({$urandom, $urandom}),
                 cp: fx_t'({$urandom, $urandom}), dp: fx_t'({$urandom, $urandom})};
    return h;
  endfunction

  initial begin
    for (int a = 0; a < NS; a++) for (int e = 0; e < 2; e++) valid[a][e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      hist_t exp_h;
      @(negedge clk);
      we = 0;
      if ($urandom_range(0, 1)) begin
        we = 1; wr_stage = $urandom_range(0, NS-1); wr_env = $urandom_range(0, 1);
        wr_data = rnd_hist();
        model[wr_stage][wr_env] = wr_data; valid[wr_stage][wr_env] = 1;
      end
      @(negedge clk);
      we = 0;
      rd_en = 1; rd_stage = $urandom_range(0, NS-1); rd_env = $urandom_range(0, 1);
      exp_h = valid[rd_stage][rd_env] ? model[rd_stage][rd_env] : '0;
      @(negedge clk);
      rd_en = 0;
      check(rd_data == exp_h, $sformatf("history %0d/%0d", rd_stage, rd_env));
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
