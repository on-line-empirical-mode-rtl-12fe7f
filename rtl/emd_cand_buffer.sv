// emd_cand_buffer: the buffer for the IMF candidates c_{i,j}(t). Every
// sifting stage (component i, iteration j) owns a ring of DEPTH slots,
// indexed by the low bits of the stage's sample time. A slot holds the
// stage's input sample and, once the spline PUs have interpolated them, the
// upper and lower envelope values at the same time.
//
// How it works: one memory of N_STAGE*DEPTH words, kept as separate field
// arrays so that a sample, an upper-envelope value and a lower-envelope value
// can each be written without a read-modify-write. Writing a sample clears the
// slot's two envelope-valid flags; writing an envelope value sets its flag.
// The ring organisation and slot layout are this design's choices; the
// architecture names the buffer and what it stores.
//
// Interface and timing: one synchronous read port (data one cycle after
// rd_en) and one write port (we_s, we_u or we_l, at most one per cycle).
module emd_cand_buffer
  import emd_pkg::*;
#(
  parameter int N_STAGE = 50,
  parameter int DEPTH   = 256,
  localparam int SW = $clog2(N_STAGE),
  localparam int DW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [SW-1:0] rd_stage,
  input  logic [DW-1:0] rd_slot,
  output cand_entry_t   rd_data,
  input  logic          we_s,
  input  logic          we_u,
  input  logic          we_l,
  input  logic [SW-1:0] wr_stage,
  input  logic [DW-1:0] wr_slot,
  input  sample_t       wr_data
);
  localparam int NW = N_STAGE * DEPTH;

  sample_t s_mem  [NW];
  sample_t u_mem  [NW];
  sample_t l_mem  [NW];
  logic    uv_mem [NW];
  logic    lv_mem [NW];

  logic [$clog2(NW)-1:0] ra, wa;
  always_comb begin
    ra = $clog2(NW)'(rd_stage) * $clog2(NW)'(DEPTH) + $clog2(NW)'(rd_slot);
    wa = $clog2(NW)'(wr_stage) * $clog2(NW)'(DEPTH) + $clog2(NW)'(wr_slot);
  end

  always_ff @(posedge clk) begin
    if (we_s) begin
      s_mem[wa]  <= wr_data;
      uv_mem[wa] <= 1'b0;
      lv_mem[wa] <= 1'b0;
    end
    if (we_u) begin
      u_mem[wa]  <= wr_data;
      uv_mem[wa] <= 1'b1;
    end
    if (we_l) begin
      l_mem[wa]  <= wr_data;
      lv_mem[wa] <= 1'b1;
    end
    if (rd_en)
      rd_data <= '{s: s_mem[ra], u: u_mem[ra], uv: uv_mem[ra], l: l_mem[ra], lv: lv_mem[ra]};
  end

  // only one kind of write per cycle
  assert property (@(posedge clk) $onehot0({we_s, we_u, we_l}));
endmodule
