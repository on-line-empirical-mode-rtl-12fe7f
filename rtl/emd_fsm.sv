// emd_fsm: controller of the on-line EMD processor. It implements the
// decomposed component and iteration loops: for every new input sample it
// visits all M*R sifting stages (component i = 0..M-1, iteration
// j = 0..R-1) once, in order, and moves every sample that a stage can finish
// into the next stage before leaving it.
//
// Work done in one stage visit
//   1. Take the samples the previous stage released in this sample period
//      (the raw input x(t) for stage (0,0)) from the hand-over queue. For
//      each one:
//        - if the stage's ring in the candidate buffer is full, release its
//          oldest sample first (overflow);
//        - store the sample; ask both extremum PUs whether the previous
//          sample was a maximum or a minimum;
//        - on an extremum, read that envelope's history from the
//          coefficient buffer, run its spline PU, write the history back and,
//          if a new middle spline piece came out, step t' over the piece
//          (t'_u or t'_l) through the polynomial PU, writing the envelope
//          values into the ring. Samples already released are skipped.
//   2. Release, oldest first, every sample that both envelopes have passed:
//      c_{i,j+1}(t) = c_{i,j}(t) - (U(t) + L(t))/2. After the last iteration
//      of component i the result is IMF i; it is sent out and subtracted from
//      the queued x_i(t) (buffer for x) to give x_{i+1}(t), the input of the
//      next component, or the residue after the last one.
// A sample released before both envelope values reached it (start-up, or an
// overflow) leaves the stage unchanged. Releases stop while the hand-over
// queue is full; the samples wait in the ring for the stage's next visit.
//
// Per-stage state (time counters, last sample, extremum-PU trend bits, how
// far each envelope is final) is kept in a small register file here. The
// architecture gives the FSM's duties (loop decomposition, t' generation,
// buffer traffic, stopping the PUs when no extremum was found); the state
// sequence, the hand-over queue and the overflow rule are this design's.
//
// Interface and timing: x_ready is high between sample periods; a sample is
// taken when x_valid && x_ready. IMF samples appear on imf_valid/imf_idx/
// imf_data and residue samples on res_valid/res_data, one-cycle pulses with
// no back-pressure, each component in time order. pu_en is high while the
// second- and last-stage PUs work (the enable of their clock gate).
module emd_fsm
  import emd_pkg::*;
#(
  parameter int M     = 5,
  parameter int R     = 10,
  parameter int DEPTH = 256,
  parameter int QDEPTH = 256,
  localparam int NS  = M * R,
  localparam int SW  = $clog2(NS),
  localparam int DW  = $clog2(DEPTH),
  localparam int CW  = (M > 1) ? $clog2(M) : 1,
  localparam int QW  = $clog2(QDEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // sample input
  input  logic          x_valid,
  input  sample_t       x_data,
  output logic          x_ready,
  // outputs
  output logic          imf_valid,
  output logic [CW-1:0] imf_idx,
  output sample_t       imf_data,
  output logic          res_valid,
  output sample_t       res_data,
  output logic          pu_en,
  // hand-over queue
  output logic          q_push,
  output sample_t       q_wdata,
  output logic          q_pop,
  input  sample_t       q_rdata,
  input  logic [QW:0]   q_count,
  // buffer for x
  output logic          xb_push,
  output logic [CW-1:0] xb_push_comp,
  output sample_t       xb_push_data,
  output logic          xb_pop,
  output logic [CW-1:0] xb_pop_comp,
  input  sample_t       xb_pop_data,
  // candidate buffer
  output logic          cb_rd_en,
  output logic [SW-1:0] cb_rd_stage,
  output logic [DW-1:0] cb_rd_slot,
  input  cand_entry_t   cb_rd_data,
  output logic          cb_we_s,
  output logic          cb_we_u,
  output logic          cb_we_l,
  output logic [SW-1:0] cb_wr_stage,
  output logic [DW-1:0] cb_wr_slot,
  output sample_t       cb_wr_data,
  // coefficient buffer
  output logic          kb_rd_en,
  output logic [SW-1:0] kb_rd_stage,
  output logic          kb_rd_env,
  input  hist_t         kb_rd_data,
  output logic          kb_we,
  output logic [SW-1:0] kb_wr_stage,
  output logic          kb_wr_env,
  output hist_t         kb_wr_data,
  // extremum PUs (0 = maxima, 1 = minima)
  output logic          ex_valid,
  output logic [1:0]    ex_trend_in,
  output sample_t       ex_prev,
  output sample_t       ex_cur,
  input  logic [1:0]    ex_found,
  input  logic [1:0]    ex_trend_out,
  // spline PUs
  output logic [1:0]    sp_start,
  output time_t         sp_t_new,
  output sample_t       sp_m_new,
  output hist_t         sp_hist_in,
  input  logic [1:0]    sp_done,
  input  hist_t         sp_hist_out [2],
  input  logic [1:0]    sp_seg_valid,
  input  spline_t       sp_seg [2],
  // polynomial PUs
  output spline_t       pp_sp [2],
  output time_t         pp_tp [2],
  input  sample_t       pp_y  [2],
  // candidate unit
  output sample_t       cu_s,
  output sample_t       cu_u,
  output sample_t       cu_l,
  output logic          cu_env_ok,
  output sample_t       cu_x,
  input  sample_t       cu_c_next,
  input  sample_t       cu_x_next
);
  typedef struct packed {
    time_t   wr;       // time of the next sample to be stored
    time_t   rd;       // time of the oldest sample not yet released
    time_t   du;       // upper envelope final for all times before du
    time_t   dl;       // lower envelope final for all times before dl
    sample_t prev;     // last stored sample
    logic    rise;     // maxima PU trend bit
    logic    fall;     // minima PU trend bit
    logic    started;  // at least one sample stored
  } stage_t;

  typedef enum logic [3:0] {
    F_IDLE, F_LOAD, F_IN, F_WRITE, F_EMIT, F_CREAD, F_CSTART, F_CWAIT,
    F_INTERP, F_NEXTIN, F_REL, F_SAVE
  } fst_t;

  fst_t    st, ret_st;
  stage_t  sreg [NS];
  stage_t  cur;
  logic [SW-1:0] s;
  logic [CW-1:0] ci;            // component index i
  logic [$clog2(R+1)-1:0] cj;   // iteration index j
  logic [QW:0]   n_in;
  sample_t v_r;
  logic    env;                 // envelope being updated: 0 upper, 1 lower
  time_t   t_ext;
  sample_t m_ext;
  spline_t seg_r;
  time_t   tt, t_end;
  logic    last_iter;

  // wrap-aware "a is earlier than b"
  function automatic logic earlier(input time_t a, input time_t b);
    time_t d;
    d = b - a;
    return (d != '0) && !d[TIME_W-1];
  endfunction

  assign last_iter = (cj == ($clog2(R+1))'(R - 1));

  // the oldest sample may leave: both envelopes are final for it and the
  // hand-over queue has room (otherwise it waits for the next visit)
  logic rel_ready, rel_ok;
  assign rel_ready = (cur.rd != cur.wr) && earlier(cur.rd, cur.du) && earlier(cur.rd, cur.dl);
  assign rel_ok    = rel_ready && (q_count < (QW+1)'(QDEPTH));

  // ---------------- combinational outputs ----------------
  always_comb begin
    x_ready   = (st == F_IDLE);
    pu_en     = (st == F_CSTART) || (st == F_CWAIT) || (st == F_INTERP);

    q_push = 1'b0; q_wdata = '0; q_pop = 1'b0;
    xb_push = 1'b0; xb_push_comp = '0; xb_push_data = '0;
    xb_pop = 1'b0; xb_pop_comp = ci;
    cb_rd_en = 1'b0; cb_rd_stage = s; cb_rd_slot = cur.rd[DW-1:0];
    cb_we_s = 1'b0; cb_we_u = 1'b0; cb_we_l = 1'b0;
    cb_wr_stage = s; cb_wr_slot = cur.wr[DW-1:0]; cb_wr_data = v_r;
    kb_rd_en = 1'b0; kb_rd_stage = s; kb_rd_env = env;
    kb_we = 1'b0; kb_wr_stage = s; kb_wr_env = env; kb_wr_data = sp_hist_out[env];
    imf_valid = 1'b0; imf_idx = ci; imf_data = cu_c_next;
    res_valid = 1'b0; res_data = cu_x_next;

    ex_valid    = cur.started;
    ex_trend_in = {cur.fall, cur.rise};
    ex_prev     = cur.prev;
    ex_cur      = v_r;

    sp_start   = 2'b00;
    sp_t_new   = t_ext;
    sp_m_new   = m_ext;
    sp_hist_in = kb_rd_data;

    pp_sp[0] = seg_r; pp_sp[1] = seg_r;
    pp_tp[0] = tt - seg_r.t0; pp_tp[1] = tt - seg_r.t0;

    cu_s      = cb_rd_data.s;
    cu_u      = cb_rd_data.u;
    cu_l      = cb_rd_data.l;
    cu_env_ok = cb_rd_data.uv && cb_rd_data.lv;
    cu_x      = xb_pop_data;

    unique case (st)
      F_IDLE: if (x_valid) begin
        q_push = 1'b1; q_wdata = x_data;
        xb_push = 1'b1; xb_push_comp = '0; xb_push_data = x_data;
      end
      F_IN: begin
        q_pop = 1'b1;
        if ((cur.wr - cur.rd) == time_t'(DEPTH)) begin
          cb_rd_en = 1'b1;
          xb_pop   = last_iter;
        end
      end
      F_REL: if (rel_ok) begin
        cb_rd_en = 1'b1;
        xb_pop   = last_iter;
      end
      F_EMIT: begin
        if (last_iter) begin
          imf_valid = 1'b1;
          if (ci == CW'(M - 1)) begin
            res_valid = 1'b1;
          end else begin
            q_push = 1'b1; q_wdata = cu_x_next;
            xb_push = 1'b1; xb_push_comp = ci + 1'b1; xb_push_data = cu_x_next;
          end
        end else begin
          q_push = 1'b1; q_wdata = cu_c_next;
        end
      end
      F_WRITE: begin
        cb_we_s = 1'b1;
        kb_rd_en = |ex_found;
        kb_rd_env = ex_found[1];
      end
      F_CSTART: sp_start[env] = 1'b1;
      F_CWAIT: kb_we = sp_done[env];
      F_INTERP: begin
        cb_we_u = !env; cb_we_l = env;
        cb_wr_slot = tt[DW-1:0];
        cb_wr_data = pp_y[env];
      end
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; ret_st <= F_IDLE;
      for (int k = 0; k < NS; k++) sreg[k] <= '0;
      cur <= '0; s <= '0; ci <= '0; cj <= '0; n_in <= '0; v_r <= '0;
      env <= 1'b0; t_ext <= '0; m_ext <= '0; seg_r <= '0; tt <= '0; t_end <= '0;
    end else begin
      unique case (st)
        F_IDLE: if (x_valid) begin
          s <= '0; ci <= '0; cj <= '0;
          st <= F_LOAD;
        end
        F_LOAD: begin
          cur  <= sreg[s];
          n_in <= q_count;
          st   <= (q_count == '0) ? F_SAVE : F_IN;
        end
        F_IN: begin
          v_r <= q_rdata;
          if ((cur.wr - cur.rd) == time_t'(DEPTH)) begin
            ret_st <= F_WRITE;
            st     <= F_EMIT;
          end else begin
            st <= F_WRITE;
          end
        end
        F_EMIT: begin
          cur.rd <= cur.rd + 1'b1;
          st     <= ret_st;
        end
        F_WRITE: begin
          cur.wr      <= cur.wr + 1'b1;
          cur.prev    <= v_r;
          cur.started <= 1'b1;
          cur.rise    <= ex_trend_out[0];
          cur.fall    <= ex_trend_out[1];
          t_ext <= cur.wr - 1'b1;
          m_ext <= cur.prev;
          if (|ex_found) begin
            env <= ex_found[1];
            st  <= F_CREAD;
          end else begin
            st <= F_NEXTIN;
          end
        end
        F_CREAD:  st <= F_CSTART;
        F_CSTART: st <= F_CWAIT;
        F_CWAIT: if (sp_done[env]) begin
          if (sp_seg_valid[env]) begin
            seg_r <= sp_seg[env];
            t_end <= sp_seg[env].t0 + sp_seg[env].h;
            tt    <= earlier(sp_seg[env].t0, cur.rd) ? cur.rd : sp_seg[env].t0;
            if (env) cur.dl <= sp_seg[env].t0 + sp_seg[env].h;
            else     cur.du <= sp_seg[env].t0 + sp_seg[env].h;
            st <= earlier(earlier(sp_seg[env].t0, cur.rd) ? cur.rd : sp_seg[env].t0,
                         sp_seg[env].t0 + sp_seg[env].h) ? F_INTERP : F_NEXTIN;
          end else begin
            st <= F_NEXTIN;
          end
        end
        F_INTERP: begin
          tt <= tt + 1'b1;
          if (tt + 1'b1 == t_end) st <= F_NEXTIN;
        end
        F_NEXTIN: begin
          n_in <= n_in - 1'b1;
          st   <= (n_in == (QW+1)'(1)) ? F_REL : F_IN;
        end
        F_REL: begin
          if (rel_ok) begin
            ret_st <= F_REL;
            st     <= F_EMIT;
          end else begin
            st <= F_SAVE;
          end
        end
        F_SAVE: begin
          sreg[s] <= cur;
          if (s == SW'(NS - 1)) begin
            st <= F_IDLE;
          end else begin
            s <= s + 1'b1;
            if (last_iter) begin
              cj <= '0;
              ci <= ci + 1'b1;
            end else begin
              cj <= cj + 1'b1;
            end
            st <= F_LOAD;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // the hand-over queue holds every sample of a stage visit
  assert property (@(posedge clk) disable iff (!rst_n)
    q_push |-> q_count < (QW+1)'(QDEPTH) || q_pop);
endmodule
