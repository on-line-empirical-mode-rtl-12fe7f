// emd_spline_pu: second-stage PU of one envelope set. When the first-stage
// PU reports a new extremum (t_n, m_n) it updates the envelope's stored
// forward sweep and derives the cubic coefficients of the middle spline of
// the newest N_EXT extrema.
//
// Algorithm (natural cubic spline, S = second derivative at an extremum,
// h_k = t_{k+1} - t_k, sl_k = (m_{k+1} - m_k) / h_k):
//   row k of the tridiagonal system:  A_k = h_{k-1}, B_k = 2 (h_{k-1} + h_k),
//                                     C_k = h_k,     D_k = 6 (sl_k - sl_{k-1})
//   forward sweep (eqs. 6, 7):        C'_k = C_k / (B_k - C'_{k-1} A_k)
//                                     D'_k = (D_k - D'_{k-1} A_k) / (B_k - C'_{k-1} A_k)
//   back substitution (eq. 8):        S_n = 0,  S_k = D'_k - C'_k S_{k+1}
//   coefficients of piece k (eq. 9):  a = (S_{k+1} - S_k) / (6 h_k), b = S_k / 2,
//                                     c = sl_k - h_k (2 S_k + S_{k+1}) / 6, d = m_k
// Data reuse: the forward sweep is never restarted. C' and D' of older
// extrema come from the coefficient buffer (hist_in); a new extremum adds
// only the row of the extremum before it, which needs the last two extrema.
// The back substitution then runs NB = N_EXT/2 rows from the newest extremum
// (boundary S_n = 0) down to the middle spline, piece n-NB .. n-NB+1, which
// is emitted once N_EXT extrema have been seen. The first extremum carries
// C' = D' = 0, i.e. the natural boundary S_1 = 0.
// The row entries A..D follow the standard natural-spline system (the text
// defining them is not reproduced in the source); they are recomputed from
// the stored times, values and slopes rather than stored.
//
// Interface and timing: pulse `start` with t_new, m_new and the envelope's
// hist_in while busy is low. `done` pulses once with hist_out (to be written
// back) and, if seg_valid, the new spline piece `seg`. Latency is 2 cycles
// for the first extremum, about 2 divisions (~135 cycles) for the second,
// about 3 divisions for the others, and one more division plus NB cycles
// when a piece is produced (~270 cycles in total at the default format).
// All registers load only while the PU is active (`busy` or `start`): this is
// the enable that gates the PU's clock when no extremum was found.
module emd_spline_pu
  import emd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  time_t   t_new,
  input  sample_t m_new,
  input  hist_t   hist_in,
  output logic    busy,
  output logic    done,
  output hist_t   hist_out,
  output logic    seg_valid,
  output spline_t seg
);
  typedef enum logic [2:0] {S_IDLE, S_SLOPE, S_ROWC, S_ROWD, S_PUSH, S_BACK, S_COEF} st_t;
  st_t st;

  hist_t   h;            // working copy of the history
  time_t   tn;
  sample_t mn;
  fx_t     sl_n;         // slope of the newest interval
  fx_t     den_r, dnum_r;
  fx_t     s_arr [NB+1];
  logic [$clog2(NB+2)-1:0] k;

  // divider
  logic div_start, div_done;
  fx_t  div_num, div_den, div_q;

  emd_divider u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(), .done(div_done), .q(div_q)
  );

  // combinational helpers
  fx_t   a_row, c_row, b_row, d_row, den_row, h_mid_fx, s_k, s_k1;
  time_t h_mid;

  always_comb begin
    a_row   = time_to_fx(h.e[0].t - h.e[1].t);
    c_row   = time_to_fx(tn - h.e[0].t);
    b_row   = (a_row + c_row) <<< 1;
    d_row   = fx_mul_t(div_q - h.e[0].sl, time_t'(6));
    den_row = b_row - fx_mul(h.e[1].cp, a_row);
    h_mid   = h.e[NB-1].t - h.e[NB].t;
    h_mid_fx = time_to_fx(h_mid);
    s_k     = s_arr[NB];
    s_k1    = s_arr[NB-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; seg_valid <= 1'b0;
      h <= '0; hist_out <= '0; seg <= '0; tn <= '0; mn <= '0; sl_n <= '0;
      den_r <= '0; dnum_r <= '0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0; k <= '0;
      for (int i = 0; i <= NB; i++) s_arr[i] <= '0;
    end else if (busy || start || done) begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          h    <= hist_in;
          tn   <= t_new;
          mn   <= m_new;
          busy <= 1'b1;
          seg_valid <= 1'b0;
          if (hist_in.cnt == '0) begin
            sl_n <= '0;
            st   <= S_PUSH;
          end else begin
            div_num   <= int_to_fx(m_new) - int_to_fx(hist_in.e[0].m);
            div_den   <= time_to_fx(t_new - hist_in.e[0].t);
            div_start <= 1'b1;
            st        <= S_SLOPE;
          end
        end
        S_SLOPE: if (div_done) begin
          sl_n <= div_q;
          if (h.cnt >= CNT_W'(2)) begin
            den_r     <= den_row;
            dnum_r    <= d_row - fx_mul(h.e[1].dp, a_row);
            div_num   <= c_row;
            div_den   <= den_row;
            div_start <= 1'b1;
            st        <= S_ROWC;
          end else begin
            st <= S_PUSH;
          end
        end
        S_ROWC: if (div_done) begin
          h.e[0].cp <= div_q;
          div_num   <= dnum_r;
          div_den   <= den_r;
          div_start <= 1'b1;
          st        <= S_ROWD;
        end
        S_ROWD: if (div_done) begin
          h.e[0].dp <= div_q;
          st        <= S_PUSH;
        end
        S_PUSH: begin
          // shift the new extremum in; its own row is not known yet
          for (int i = NB; i > 0; i--) h.e[i] <= h.e[i-1];
          h.e[0] <= '{t: tn, m: mn, sl: sl_n, cp: '0, dp: '0};
          if (h.cnt < CNT_W'(N_EXT)) h.cnt <= h.cnt + 1'b1;
          if (h.cnt >= CNT_W'(N_EXT - 1)) begin
            s_arr[0] <= '0;               // boundary at the newest extremum
            s_arr[1] <= h.e[0].dp;        // S_{n-1} = D'_{n-1}
            k        <= 2;
            st       <= S_BACK;
          end else begin
            hist_out <= '{cnt: h.cnt + 1'b1, e: {h.e[NB-1:0], ext_rec_t'{t: tn, m: mn, sl: sl_n, cp: '0, dp: '0}}};
            busy <= 1'b0;
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        S_BACK: begin
          if (int'(k) <= NB) begin
            s_arr[k] <= h.e[k].dp - fx_mul(h.e[k].cp, s_arr[k-1]);
            k <= k + 1'b1;
          end else begin
            div_num   <= s_k1 - s_k;
            div_den   <= fx_mul_t(h_mid_fx, time_t'(6));
            div_start <= 1'b1;
            st        <= S_COEF;
          end
        end
        S_COEF: if (div_done) begin
          seg.t0 <= h.e[NB].t;
          seg.h  <= h_mid;
          seg.a  <= div_q;
          seg.b  <= s_k >>> 1;
          seg.c  <= h.e[NB-1].sl - fx_mul(fx_mul_t((s_k <<< 1) + s_k1, h_mid), FX_RECIP6);
          seg.d  <= int_to_fx(h.e[NB].m);
          seg_valid <= 1'b1;
          hist_out  <= h;
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
