// tb_emd_cand_buffer: random sample, upper- and lower-envelope writes to a
// small candidate buffer (4 stages x 16 slots), mirrored in a testbench
// model. Every read is compared with the model one cycle later: sample,
// both envelope values and both valid flags, including that a new sample
// clears the flags of its slot and that stages do not alias.
module tb_emd_cand_buffer;
  import emd_pkg::*;

  localparam int NS = 4, D = 16;

  logic clk = 1'b0;
  logic rd_en = 1'b0, we_s = 1'b0, we_u = 1'b0, we_l = 1'b0;
  logic [1:0] rd_stage = '0, wr_stage = '0;
  logic [3:0] rd_slot = '0, wr_slot = '0;
  sample_t wr_data = '0;
  cand_entry_t rd_data;

  emd_cand_buffer #(.N_STAGE(NS), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cand_entry_t model [NS][D];
  bit written [NS][D];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < NS; a++) for (int b = 0; b < D; b++) written[a][b] = 0;
    // fill every slot with a sample first
    for (int a = 0; a < NS; a++) for (int b = 0; b < D; b++) begin
      @(negedge clk);
      we_s = 1; wr_stage = a; wr_slot = b; wr_data = sample_t'($urandom);
      model[a][b] = '{s: wr_data, u: '0, uv: 1'b0, l: '0, lv: 1'b0};
      written[a][b] = 1;
    end
    @(negedge clk); we_s = 0;
    for (int n = 0; n < 3000; n++) begin
      int op;
      cand_entry_t exp_e;
      @(negedge clk);
      we_s = 0; we_u = 0; we_l = 0;
      op = $urandom_range(0, 2);
      wr_stage = $urandom_range(0, NS-1); wr_slot = $urandom_range(0, D-1);
      wr_data = sample_t'($urandom);
      if (op == 0) begin we_s = 1; model[wr_stage][wr_slot] = '{s: wr_data, u: model[wr_stage][wr_slot].u, uv: 1'b0, l: model[wr_stage][wr_slot].l, lv: 1'b0}; end
      if (op == 1) begin we_u = 1; model[wr_stage][wr_slot].u = wr_data; model[wr_stage][wr_slot].uv = 1'b1; end
      if (op == 2) begin we_l = 1; model[wr_stage][wr_slot].l = wr_data; model[wr_stage][wr_slot].lv = 1'b1; end
      @(negedge clk);
      we_s = 0; we_u = 0; we_l = 0;
      rd_en = 1; rd_stage = $urandom_range(0, NS-1); rd_slot = $urandom_range(0, D-1);
      exp_e = model[rd_stage][rd_slot];
      @(negedge clk);
      rd_en = 0;
      check(rd_data.s == exp_e.s && rd_data.uv == exp_e.uv && rd_data.lv == exp_e.lv,
            $sformatf("slot %0d/%0d sample and flags", rd_stage, rd_slot));
      if (exp_e.uv) check(rd_data.u == exp_e.u, "upper value");
      if (exp_e.lv) check(rd_data.l == exp_e.l, "lower value");
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
