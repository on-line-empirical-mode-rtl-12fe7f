// emd_processor: on-line empirical mode decomposition (EMD) processor for the
// Hilbert-Huang transform of a single biomedical signal (one EEG channel in
// the reference configuration: 256 samples/s, M = 5 IMFs, R = 10 sifting
// iterations, 16-bit samples).
//
// The signal is pushed in one sample at a time. Each sample is carried as far
// as it can go through all M*R sifting stages before the next sample is
// accepted (component and iteration loop decomposition), so the IMFs and the
// residue come out continuously, each with its own, data-dependent delay,
// instead of after a whole window has been collected. Envelopes are cubic
// splines built on-line: each new extremum extends a never-restarted TDMA
// forward sweep (data reuse) and yields the middle piece of the newest eight
// extrema.
//
// Structure (one set of PUs per envelope, shared by all M*R stages):
//   emd_extremum_pu x2  first stage: new maximum / new minimum?
//   emd_spline_pu   x2  second stage: forward sweep, back substitution,
//                       spline coefficients a, b, c, d
//   emd_poly_pu     x2  last stage: envelope value at t'
//   emd_candidate_unit  mean of the envelopes, next candidate, next input
//   emd_coef_buffer     previous forward-sweep coefficients (data reuse)
//   emd_cand_buffer     IMF candidates and their envelopes, per stage
//   emd_x_buffer        x(t) and x_i(t), per component
//   emd_fifo            hand-over of released samples to the next stage
//   emd_fsm             controller
//
// Interface and timing: a sample is accepted when x_valid && x_ready. The
// processor is then busy for a data-dependent number of cycles (it must be
// done before the next sample period: at 256 samples/s and a 522.24 kHz
// clock that is 2040 cycles) and raises x_ready again. Outputs are one-cycle
// pulses without back-pressure: imf_valid with imf_idx = i and sample c_i(t),
// res_valid with the residue r(t); every stream is in time order and
// x(t) = r(t) + sum_i c_i(t) holds exactly unless a value saturated.
// pu_en is high while the spline and polynomial PUs are working, the enable
// of the clock gate that turns them off otherwise.
module emd_processor
  import emd_pkg::*;
#(
  parameter int M      = 5,      // IMF components
  parameter int R      = 10,     // sifting iterations per component
  parameter int DEPTH  = 256,    // candidate ring slots per sifting stage
  parameter int QDEPTH = 256,    // hand-over queue entries
  localparam int NS    = M * R,
  localparam int CW    = (M > 1) ? $clog2(M) : 1,
  localparam int XDEPTH = R * DEPTH + QDEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  input  sample_t       x_data,
  output logic          x_ready,
  output logic          imf_valid,
  output logic [CW-1:0] imf_idx,
  output sample_t       imf_data,
  output logic          res_valid,
  output sample_t       res_data,
  output logic          pu_en
);
  localparam int SW = $clog2(NS);
  localparam int DW = $clog2(DEPTH);
  localparam int QW = $clog2(QDEPTH);

  // hand-over queue
  logic q_push, q_pop;
  sample_t q_wdata, q_rdata;
  logic [QW:0] q_count;
  // buffer for x
  logic xb_push, xb_pop;
  logic [CW-1:0] xb_push_comp, xb_pop_comp;
  sample_t xb_push_data, xb_pop_data;
  logic [$clog2(XDEPTH):0] xb_count [M];
  // candidate buffer
  logic cb_rd_en, cb_we_s, cb_we_u, cb_we_l;
  logic [SW-1:0] cb_rd_stage, cb_wr_stage;
  logic [DW-1:0] cb_rd_slot, cb_wr_slot;
  cand_entry_t cb_rd_data;
  sample_t cb_wr_data;
  // coefficient buffer
  logic kb_rd_en, kb_rd_env, kb_we, kb_wr_env;
  logic [SW-1:0] kb_rd_stage, kb_wr_stage;
  hist_t kb_rd_data, kb_wr_data;
  // PUs
  logic ex_valid;
  logic [1:0] ex_trend_in, ex_found, ex_trend_out;
  sample_t ex_prev, ex_cur;
  logic [1:0] sp_start, sp_done, sp_seg_valid, sp_busy;
  time_t sp_t_new;
  sample_t sp_m_new;
  hist_t sp_hist_in;
  hist_t sp_hist_out [2];
  spline_t sp_seg [2];
  spline_t pp_sp [2];
  time_t pp_tp [2];
  sample_t pp_y [2];
  sample_t cu_s, cu_u, cu_l, cu_x, cu_m, cu_c_next, cu_x_next;
  logic cu_env_ok;

  emd_fsm #(.M(M), .R(R), .DEPTH(DEPTH), .QDEPTH(QDEPTH)) u_fsm (.*);

  emd_fifo #(.DEPTH(QDEPTH)) u_handover (
    .clk, .rst_n, .push(q_push), .wr_data(q_wdata), .pop(q_pop),
    .rd_data(q_rdata), .count(q_count)
  );

  emd_x_buffer #(.N_COMP(M), .XDEPTH(XDEPTH)) u_xbuf (
    .clk, .rst_n, .push_en(xb_push), .push_comp(xb_push_comp), .push_data(xb_push_data),
    .pop_en(xb_pop), .pop_comp(xb_pop_comp), .pop_data(xb_pop_data), .count(xb_count)
  );

  emd_cand_buffer #(.N_STAGE(NS), .DEPTH(DEPTH)) u_cbuf (
    .clk, .rd_en(cb_rd_en), .rd_stage(cb_rd_stage), .rd_slot(cb_rd_slot),
    .rd_data(cb_rd_data), .we_s(cb_we_s), .we_u(cb_we_u), .we_l(cb_we_l),
    .wr_stage(cb_wr_stage), .wr_slot(cb_wr_slot), .wr_data(cb_wr_data)
  );

  emd_coef_buffer #(.N_STAGE(NS)) u_kbuf (
    .clk, .rst_n, .rd_en(kb_rd_en), .rd_stage(kb_rd_stage), .rd_env(kb_rd_env),
    .rd_data(kb_rd_data), .we(kb_we), .wr_stage(kb_wr_stage), .wr_env(kb_wr_env),
    .wr_data(kb_wr_data)
  );

  for (genvar e = 0; e < 2; e++) begin : g_env
    emd_extremum_pu #(.IS_MAX(e == 0)) u_ext (
      .valid(ex_valid), .trend_in(ex_trend_in[e]), .prev(ex_prev), .cur(ex_cur),
      .found(ex_found[e]), .trend_out(ex_trend_out[e])
    );

    emd_spline_pu u_spline (
      .clk, .rst_n, .start(sp_start[e]), .t_new(sp_t_new), .m_new(sp_m_new),
      .hist_in(sp_hist_in), .busy(sp_busy[e]), .done(sp_done[e]),
      .hist_out(sp_hist_out[e]), .seg_valid(sp_seg_valid[e]), .seg(sp_seg[e])
    );

    emd_poly_pu u_poly (.sp(pp_sp[e]), .tp(pp_tp[e]), .y(pp_y[e]));
  end

  emd_candidate_unit u_cand (
    .s(cu_s), .u(cu_u), .l(cu_l), .env_ok(cu_env_ok), .x(cu_x),
    .m(cu_m), .c_next(cu_c_next), .x_next(cu_x_next)
  );
endmodule
