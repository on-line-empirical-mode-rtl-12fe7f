// emd_x_buffer: the buffer for the input signals x(t) = x_1(t) and x_i(t).
// Component i's input is kept here until its IMF c_i(t) leaves the last
// sifting iteration, so that the next component's input
// x_{i+1}(t) = x_i(t) - c_i(t) (the residue after the last component) can be
// formed with matching time. Because every stage keeps the order and number
// of its samples, each component's store is a first-in first-out queue.
//
// How it works: one memory of N_COMP*XDEPTH words split into N_COMP circular
// queues with their own head, tail and fill counters. XDEPTH need not be a
// power of two. The queue organisation is this design's choice.
//
// Interface and timing: push and pop may address different queues in the
// same cycle. pop_data is valid the cycle after pop_en. Pushing into a full
// queue or popping an empty one is an error (asserted).
module emd_x_buffer
  import emd_pkg::*;
#(
  parameter int N_COMP = 5,
  parameter int XDEPTH = 2560,
  localparam int CW = (N_COMP > 1) ? $clog2(N_COMP) : 1,
  localparam int AW = $clog2(XDEPTH),
  localparam int NW = N_COMP * XDEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_en,
  input  logic [CW-1:0] push_comp,
  input  sample_t       push_data,
  input  logic          pop_en,
  input  logic [CW-1:0] pop_comp,
  output sample_t       pop_data,
  output logic [AW:0]   count [N_COMP]
);
  sample_t mem [NW];
  logic [AW-1:0] head [N_COMP];
  logic [AW-1:0] tail [N_COMP];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(XDEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic [$clog2(NW)-1:0] wa, ra;
  always_comb begin
    wa = $clog2(NW)'(push_comp) * $clog2(NW)'(XDEPTH) + $clog2(NW)'(tail[push_comp]);
    ra = $clog2(NW)'(pop_comp)  * $clog2(NW)'(XDEPTH) + $clog2(NW)'(head[pop_comp]);
  end

  always_ff @(posedge clk) begin
    if (push_en) mem[wa] <= push_data;
    if (pop_en)  pop_data <= mem[ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_COMP; c++) begin
        head[c] <= '0; tail[c] <= '0; count[c] <= '0;
      end
    end else begin
      for (int c = 0; c < N_COMP; c++) begin
        if (push_en && push_comp == CW'(c)) tail[c] <= inc(tail[c]);
        if (pop_en  && pop_comp  == CW'(c)) head[c] <= inc(head[c]);
        count[c] <= count[c] + (AW+1)'(push_en && push_comp == CW'(c))
                             - (AW+1)'(pop_en  && pop_comp  == CW'(c));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    push_en |-> count[push_comp] < (AW+1)'(XDEPTH) || (pop_en && pop_comp == push_comp));
  assert property (@(posedge clk) disable iff (!rst_n)
    pop_en |-> count[pop_comp] != '0);
endmodule
