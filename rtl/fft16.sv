// fft16: 16-point radix-2 decimation-in-time FFT in 32-bit fixed point.
//
// The 16 real inputs (the AR parameters A(1)..A(16)) are loaded into a
// register file of 16 complex words in bit-reversed order, and the four
// butterfly stages are then computed in place, all eight butterflies of a
// stage at once: top' = top + W*bottom, bottom' = top - W*bottom. The output
// is X[0..15] in natural order.
//
// Stage 1 has only W^0 and takes one cycle. Every other butterfly whose
// twiddle is not W^0 gets its own complex multiplier (4 in stage 2, 6 in
// stage 3, 7 in stage 4, so N_MULT = 7 cover the largest stage). Twiddles
// other than W^0 and W^4 = -j are stored as whole numbers scaled by 10,000;
// both parts of those products are then divided by the scale on the N_DIV = 4
// dividers, four quotients per round: 0 rounds in stage 2, 2 in stage 3 and 3
// in stage 4. Multipliers and dividers are outside this module (multiplier 0
// and divider 0 are shared with the LMS engine); they are fired together with
// one valid and their lane-0 valid marks completion.
//
// Timing, multiplier latency L and divider latency D:
//   start to done = 16 + 3*L + 5*D cycles (L=5, D=35: 206 cycles).
// The stage structure, the unscaled W^0/W^4 products, the 7 multipliers and
// the 4 dividers follow the estimator's description; the state sequence and
// the assignment of products to multiplier and divider lanes are this
// design's.
module fft16
  import psd_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  word_t       x_in [N_FFT],
  // complex multipliers
  output logic        m_valid,
  output cplx_t       m_a [N_MULT],
  output cplx_t       m_b [N_MULT],
  input  logic        m_done,
  input  cplx_t       m_p [N_MULT],
  // dividers (divisor wired outside)
  output logic        d_valid,
  output word_t       d_dividend [N_DIV],
  input  logic        d_done,
  input  word_t       d_q [N_DIV],
  // result
  output cplx_t       x_out [N_FFT],
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_MUL, S_MWAIT, S_DIV, S_DWAIT, S_BFLY, S_DONE
  } state_t;

  // One butterfly of a stage: indices, twiddle exponent, multiplier lane.
  typedef struct packed {
    logic [3:0] top;
    logic [3:0] bot;
    logic [2:0] k;
    logic [2:0] lane;
  } bfly_t;

  state_t      state;
  logic [1:0]  stage;        // 0..3 for stages 1..4
  logic [1:0]  round;        // division round within a stage
  cplx_t       x   [N_FFT];
  cplx_t       t   [N_MULT]; // W*bottom for the current stage

  bfly_t       bf  [8];
  logic [2:0]  n_prod;       // products in this stage
  logic [3:0]  n_divq;       // quotients (parts) to divide in this stage
  logic [2:0]  dq_lane [12]; // division item i: multiplier lane ...
  logic        dq_im   [12]; // ... and part (0 re, 1 im)

  assign x_out = x;
  assign busy  = (state != S_IDLE);

  // Butterfly table and division work list of the current stage.
  always_comb begin
    int unsigned h, g, j, ln, nd;
    h  = 1 << stage;
    ln = 0;
    nd = 0;
    for (int i = 0; i < 12; i++) begin dq_lane[i] = '0; dq_im[i] = 1'b0; end
    for (int b = 0; b < 8; b++) begin
      g = b / h;
      j = b % h;
      bf[b].top  = 4'(g * 2 * h + j);
      bf[b].bot  = 4'(g * 2 * h + j + h);
      bf[b].k    = 3'(j * (8 >> stage));
      bf[b].lane = 3'(ln);
      if (bf[b].k != 0) begin
        if (twiddle_scaled(bf[b].k)) begin
          dq_lane[nd]   = 3'(ln); dq_im[nd]   = 1'b0;
          dq_lane[nd+1] = 3'(ln); dq_im[nd+1] = 1'b1;
          nd = nd + 2;
        end
        ln = ln + 1;
      end
    end
    n_prod = 3'(ln);
    n_divq = 4'(nd);
  end

  // Multiplier and divider operands.
  always_comb begin
    m_valid = (state == S_MUL) && (n_prod != 0);
    for (int m = 0; m < int'(N_MULT); m++) begin
      m_a[m] = '0;
      m_b[m] = '0;
    end
    for (int b = 0; b < 8; b++) begin
      if (bf[b].k != 0) begin
        m_a[bf[b].lane] = x[bf[b].bot];
        m_b[bf[b].lane] = twiddle(bf[b].k);
      end
    end
    d_valid = (state == S_DIV);
    for (int d = 0; d < int'(N_DIV); d++) begin
      int unsigned it;
      it = round * N_DIV + d;
      if (it < n_divq)
        d_dividend[d] = dq_im[it] ? t[dq_lane[it]].im : t[dq_lane[it]].re;
      else
        d_dividend[d] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      stage <= '0;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_LOAD;
        S_LOAD: begin
          for (int i = 0; i < int'(N_FFT); i++) begin
            x[i].re <= x_in[bitrev4(4'(i))];
            x[i].im <= '0;
          end
          stage <= '0;
          state <= S_MUL;
        end
        S_MUL: state <= (n_prod == 0) ? S_BFLY : S_MWAIT;
        S_MWAIT: if (m_done) begin
          for (int m = 0; m < int'(N_MULT); m++) t[m] <= m_p[m];
          round <= '0;
          state <= (n_divq == 0) ? S_BFLY : S_DIV;
        end
        S_DIV: state <= S_DWAIT;
        S_DWAIT: if (d_done) begin
          for (int d = 0; d < int'(N_DIV); d++) begin
            int unsigned it;
            it = round * N_DIV + d;
            if (it < n_divq) begin
              if (dq_im[it]) t[dq_lane[it]].im <= d_q[d];
              else           t[dq_lane[it]].re <= d_q[d];
            end
          end
          round <= round + 2'd1;
          state <= ((32'(round) + 1) * N_DIV < n_divq) ? S_DIV : S_BFLY;
        end
        S_BFLY: begin
          for (int b = 0; b < 8; b++) begin
            cplx_t w;
            w = (bf[b].k == 0) ? x[bf[b].bot] : t[bf[b].lane];
            x[bf[b].top].re <= x[bf[b].top].re + w.re;
            x[bf[b].top].im <= x[bf[b].top].im + w.im;
            x[bf[b].bot].re <= x[bf[b].top].re - w.re;
            x[bf[b].bot].im <= x[bf[b].top].im - w.im;
          end
          if (stage == 2'd3) state <= S_DONE;
          else begin
            stage <= stage + 2'd1;
            state <= S_MUL;
          end
        end
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
