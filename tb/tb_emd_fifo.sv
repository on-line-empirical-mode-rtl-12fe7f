// tb_emd_fifo: the hand-over queue at a depth of 12 (not a power of two, so
// the pointer wrap is exercised), driven with random pushes and pops, also in
// the same cycle and at the full and empty limits, never overfilling. The
// show-ahead output and the fill count are compared with a testbench queue
// every cycle.
module tb_emd_fifo;
  import emd_pkg::*;

  localparam int D = 12;

  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  sample_t wr_data = '0, rd_data;
  logic [$clog2(D):0] count;

  emd_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  sample_t q [$];

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
    for (int n = 0; n < 6000; n++) begin
      int bias;
      @(negedge clk);
      check(int'(count) == q.size(), $sformatf("count %0d, expected %0d", count, q.size()));
      if (q.size() > 0) check(rd_data == q[0], "oldest entry shown");
      if (q.size() == D) n_full++;
      // drift between filling and draining phases
      bias = ((n / 300) % 2 == 0) ? 3 : 1;
      pop  = (q.size() > 0) && ($urandom_range(0, 3) >= bias);
      push = (q.size() < D || pop) && ($urandom_range(0, 3) < bias);
      wr_data = sample_t'($urandom);
      if (push && pop) n_both++;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0;
    check(n_full > 0, "queue was full at some point");
    check(n_both > 0, "push and pop in the same cycle");
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
