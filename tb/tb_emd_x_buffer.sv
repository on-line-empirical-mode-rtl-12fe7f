// tb_emd_x_buffer: three component queues of 20 words (not a power of two,
// to exercise the wrap) driven with random pushes and pops, sometimes in the
// same cycle on different or the same queue, never overfilling. Popped data
// (one cycle after pop) and the fill counts are compared with testbench
// queues.
module tb_emd_x_buffer;
  import emd_pkg::*;

  localparam int NC = 3, XD = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_en = 1'b0, pop_en = 1'b0;
  logic [1:0] push_comp = '0, pop_comp = '0;
  sample_t push_data = '0, pop_data;
  logic [5:0] count [NC];

  emd_x_buffer #(.N_COMP(NC), .XDEPTH(XD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0;
  sample_t q [NC][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      sample_t exp_d;
      bit did_pop;
      @(negedge clk);
      push_en = 0; pop_en = 0; did_pop = 0;
      pop_comp = $urandom_range(0, NC-1);
      if ($urandom_range(0, 1) && q[pop_comp].size() > 0) begin
        pop_en = 1; did_pop = 1;
        exp_d = q[pop_comp].pop_front();
      end
      push_comp = $urandom_range(0, NC-1);
      if ($urandom_range(0, 2) != 0 && q[push_comp].size() < XD) begin
        push_en = 1; push_data = sample_t'($urandom);
        q[push_comp].push_back(push_data);
        if (q[push_comp].size() == XD) n_wrap++;
      end
      @(negedge clk);
      push_en = 0; pop_en = 0;
      if (did_pop) check(pop_data == exp_d, "popped data");
      for (int c = 0; c < NC; c++) check(int'(count[c]) == q[c].size(), "fill count");
    end
    check(n_wrap > 0, "queues filled up");
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
