// emd_fifo: small first-in first-out queue with show-ahead output. The
// controller uses it to hand the samples one sifting stage releases during a
// sample period to the next stage (the c_{i,j+1} feedback path into the
// candidate buffer). This hand-over queue is this design's choice.
//
// Interface and timing: rd_data always shows the oldest entry; pop removes
// it at the clock edge. Push and pop may happen in the same cycle. count is
// the fill level. Overflow and underflow are errors (asserted).
module emd_fifo
  import emd_pkg::*;
#(
  parameter int DEPTH = 512,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  sample_t wr_data,
  input  logic    pop,
  output sample_t rd_data,
  output logic [AW:0] count
);
  sample_t mem [DEPTH];
  logic [AW-1:0] head, tail;

  assign rd_data = mem[head];

  always_ff @(posedge clk) begin
    if (push) mem[tail] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
    end else begin
      if (push) tail <= (tail == AW'(DEPTH - 1)) ? '0 : tail + 1'b1;
      if (pop)  head <= (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < (AW+1)'(DEPTH)) || pop);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
endmodule
