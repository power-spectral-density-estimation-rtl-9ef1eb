// psd_logic: sequential power-spectral-density estimator on a block RAM.
//
// A run is started by the host after it has written the run parameters and
// the input samples into the shared block RAM. The block then
//   1. reads the four parameter words at PARAM_BASE..PARAM_BASE+3:
//      number of samples N, filter length fl, LMS step size u and the
//      fixed-point scale F (10,000),
//   2. zeroes the AR parameters, and for every sample n = 1..N
//   3. runs one LMS update (lms_engine) on x(n) and its fl predecessors,
//   4. runs the 16-point FFT (fft16) on the 16 AR parameters A(1)..A(16),
//   5. writes the 16 complex bins to RES_BASE + 32*(n-1) as 32 words,
//      real part of X[i] at offset 2i and imaginary part at 2i+1.
// The host turns each spectrum into a PSD (1/|X|^2 scaled, in dB) itself.
//
// This block owns the arithmetic: N_MULT = 7 complex multipliers of latency
// MULT_LAT and N_DIV = 4 dividers of latency DIV_LAT, whose divisor is F.
// The LMS loop is serial, so it borrows multiplier 0 and divider 0 while it
// runs; the FFT uses all of them. The two engines never run at once, so the
// operands of lane 0 are simply selected by which engine is busy.
//
// Memory port B: one access per cycle, read data one cycle after the
// address. done pulses for one cycle at the end of the run; busy is high
// from the cycle after start until done. ef is the LMS prediction error of
// the latest sample, sample the index of the sample in progress.
// Timing, multiplier latency L and divider latency D: one sample takes
// P = 56 + fl*(3L+3D+4) + 3L + 5D cycles (LMS 6 + fl*(3L+3D+4), FFT
// 16 + 3L + 5D, 32 writes, 2 cycles of hand-over), and a run of N samples
// takes 7 + N*P cycles from the start cycle to the done pulse (L = 5,
// D = 35, fl = 16: P = 2230, and 66,907 cycles for N = 30).
// The work split, unit counts, latencies, fixed-point rules and the
// sample/result addresses follow the estimator's description; the parameter
// address, the host handshake and the hand-over cycles are this design's.
module psd_logic
  import psd_pkg::*;
#(
  parameter int unsigned ADDR_W      = 10,
  parameter int unsigned MAX_FL      = 16,
  parameter int unsigned MULT_LAT    = 5,
  parameter int unsigned DIV_LAT     = 35,
  parameter int unsigned SAMPLE_BASE = 0,
  parameter int unsigned RES_BASE    = 31,
  parameter int unsigned PARAM_BASE  = 1020
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [15:0]       sample,
  output word_t             ef,
  // block RAM port B
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output word_t             mem_wdata,
  input  word_t             mem_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_PRD, S_LMS, S_LMSW, S_FFT, S_FFTW, S_WR, S_DONE
  } state_t;

  state_t      state;
  logic [2:0]  pc;          // parameter read counter
  logic [5:0]  wc;          // result write counter
  logic [15:0] n_samples;
  logic [4:0]  fl;
  word_t       u;
  logic [15:0] fpm;

  // ---------------- LMS engine ----------------
  logic              lms_re, lms_mul_valid, lms_div_valid, lms_done, lms_busy;
  logic [ADDR_W-1:0] lms_addr;
  word_t             lms_mul_a, lms_mul_b, lms_div_dividend;
  word_t             a_par [MAX_FL];

  // ---------------- FFT ----------------
  logic   fft_m_valid, fft_d_valid, fft_done, fft_busy;
  cplx_t  fft_m_a [N_MULT];
  cplx_t  fft_m_b [N_MULT];
  word_t  fft_d_dividend [N_DIV];
  cplx_t  spec [N_FFT];
  word_t  fft_in [N_FFT];

  // ---------------- arithmetic units ----------------
  logic   mul_in_valid [N_MULT];
  cplx_t  mul_a [N_MULT];
  cplx_t  mul_b [N_MULT];
  logic   mul_out_valid [N_MULT];
  cplx_t  mul_p [N_MULT];
  logic   div_in_valid [N_DIV];
  word_t  div_dividend [N_DIV];
  logic   div_out_valid [N_DIV];
  word_t  div_q [N_DIV];

  assign busy = (state != S_IDLE);

  lms_engine #(
    .ADDR_W(ADDR_W), .MAX_FL(MAX_FL), .SAMPLE_BASE(SAMPLE_BASE)
  ) u_lms (
    .clk, .rst,
    .clear       (state == S_IDLE && start),
    .start       (state == S_LMS),
    .n           (sample),
    .fl          (fl),
    .u           (u),
    .mem_re      (lms_re),
    .mem_addr    (lms_addr),
    .mem_rdata   (mem_rdata),
    .mul_valid   (lms_mul_valid),
    .mul_a       (lms_mul_a),
    .mul_b       (lms_mul_b),
    .mul_done    (mul_out_valid[0]),
    .mul_p       (mul_p[0].re),
    .div_valid   (lms_div_valid),
    .div_dividend(lms_div_dividend),
    .div_done    (div_out_valid[0]),
    .div_q       (div_q[0]),
    .a_par       (a_par),
    .ef          (ef),
    .busy        (lms_busy),
    .done        (lms_done)
  );

  // The FFT always transforms 16 AR parameters; those beyond MAX_FL are 0.
  always_comb
    for (int i = 0; i < int'(N_FFT); i++)
      fft_in[i] = (i < int'(MAX_FL)) ? a_par[i] : '0;

  fft16 u_fft (
    .clk, .rst,
    .start      (state == S_FFT),
    .x_in       (fft_in),
    .m_valid    (fft_m_valid),
    .m_a        (fft_m_a),
    .m_b        (fft_m_b),
    .m_done     (mul_out_valid[0]),
    .m_p        (mul_p),
    .d_valid    (fft_d_valid),
    .d_dividend (fft_d_dividend),
    .d_done     (div_out_valid[0]),
    .d_q        (div_q),
    .x_out      (spec),
    .busy       (fft_busy),
    .done       (fft_done)
  );

  // Lane 0 is shared: the LMS engine drives it while it is busy.
  always_comb begin
    for (int m = 0; m < int'(N_MULT); m++) begin
      mul_in_valid[m] = fft_m_valid;
      mul_a[m]        = fft_m_a[m];
      mul_b[m]        = fft_m_b[m];
    end
    for (int d = 0; d < int'(N_DIV); d++) begin
      div_in_valid[d] = fft_d_valid;
      div_dividend[d] = fft_d_dividend[d];
    end
    if (lms_busy) begin
      mul_in_valid[0] = lms_mul_valid;
      mul_a[0]        = '{re: lms_mul_a, im: '0};
      mul_b[0]        = '{re: lms_mul_b, im: '0};
      div_in_valid[0] = lms_div_valid;
      div_dividend[0] = lms_div_dividend;
    end
  end

  // Lane 0 may only be shared because the engines take turns.
  a_engines_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(lms_busy && fft_busy))
    else $error("LMS engine and FFT busy at the same time");

  for (genvar m = 0; m < int'(N_MULT); m++) begin : g_mul
    cmult #(.LAT(MULT_LAT)) u_mul (
      .clk, .rst,
      .in_valid (mul_in_valid[m]),
      .a        (mul_a[m]),
      .b        (mul_b[m]),
      .out_valid(mul_out_valid[m]),
      .p        (mul_p[m])
    );
  end

  for (genvar d = 0; d < int'(N_DIV); d++) begin : g_div
    fxdiv #(.LAT(DIV_LAT)) u_div (
      .clk, .rst,
      .in_valid (div_in_valid[d]),
      .dividend (div_dividend[d]),
      .divisor  (fpm),
      .out_valid(div_out_valid[d]),
      .q        (div_q[d])
    );
  end

  // Block RAM port B.
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (state)
      S_PRD: begin
        mem_en   = (pc < 3'd4);
        mem_addr = ADDR_W'(PARAM_BASE + 32'(pc));
      end
      S_LMSW: begin
        mem_en   = lms_re;
        mem_addr = lms_addr;
      end
      S_WR: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = ADDR_W'(RES_BASE + 32 * (32'(sample) - 1) + 32'(wc));
        mem_wdata = wc[0] ? spec[wc[4:1]].im : spec[wc[4:1]].re;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pc        <= '0;
      wc        <= '0;
      sample    <= '0;
      n_samples <= '0;
      fl        <= '0;
      u         <= '0;
      fpm       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          state <= S_PRD;
        end
        S_PRD: begin
          pc <= pc + 3'd1;
          unique case (pc)
            3'd1: n_samples <= mem_rdata[15:0];
            3'd2: fl <= (mem_rdata > word_t'(MAX_FL)) ? 5'(MAX_FL)
                      : (mem_rdata[31] ? 5'd0 : mem_rdata[4:0]);
            3'd3: u <= mem_rdata;
            3'd4: fpm <= mem_rdata[15:0];
            default: ;
          endcase
          if (pc == 3'd4) begin
            sample <= 16'd1;
            state  <= (n_samples == 16'd0) ? S_DONE : S_LMS;
          end
        end
        S_LMS:  state <= S_LMSW;
        S_LMSW: if (lms_done) state <= S_FFT;
        S_FFT:  state <= S_FFTW;
        S_FFTW: if (fft_done) begin wc <= '0; state <= S_WR; end
        S_WR: begin
          wc <= wc + 6'd1;
          if (wc == 6'd31) begin
            if (sample == n_samples) state <= S_DONE;
            else begin
              sample <= sample + 16'd1;
              state  <= S_LMS;
            end
          end
        end
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
