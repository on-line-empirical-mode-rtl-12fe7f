// emd_coef_buffer: the buffer for the previous spline coefficients, the data
// reuse store of the on-line interpolation. For each sifting stage and each
// envelope (0 = upper, 1 = lower) it holds the newest NB+1 extrema with their
// values, interval slopes and forward-sweep coefficients C'_k and D'_k, plus
// the number of extrema seen (see emd_pkg::hist_t).
//
// How it works: a memory of 2*N_STAGE history words and a valid flag per
// word. Reset clears only the flags; a word that was never written reads as
// an empty history, so a stage starts its forward sweep from nothing.
// The architecture lists A_k, B_k, C_k, D_k, C'_k, D'_k and m_k as the
// buffer's contents; this design keeps the extremum times and slopes instead
// of A..D, from which the spline PU recomputes them.
//
// Interface and timing: synchronous read (data one cycle after rd_en), one
// write port.
module emd_coef_buffer
  import emd_pkg::*;
#(
  parameter int N_STAGE = 50,
  localparam int SW = $clog2(N_STAGE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [SW-1:0] rd_stage,
  input  logic          rd_env,
  output hist_t         rd_data,
  input  logic          we,
  input  logic [SW-1:0] wr_stage,
  input  logic          wr_env,
  input  hist_t         wr_data
);
  localparam int NW = 2 * N_STAGE;

  hist_t mem [NW];
  logic [NW-1:0] vld;

  logic [SW:0] ra, wa;
  always_comb begin
    ra = {rd_stage, rd_env};
    wa = {wr_stage, wr_env};
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld     <= '0;
      rd_data <= '0;
    end else begin
      if (we) vld[wa] <= 1'b1;
      if (rd_en) rd_data <= vld[ra] ? mem[ra] : '0;
    end
  end
endmodule
