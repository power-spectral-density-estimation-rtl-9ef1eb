// lms_engine: one sequential fixed-point LMS update of the AR parameters.
//
// For sample n (1-based) with filter length fl (0..MAX_FL), step size u and
// scale F (all in the fixed point of psd_pkg) the engine computes
//   ef   = x(n) + sum_{k=1..fl} trunc(A(k) * x(n-k) / F)
//   A(k) = A(k) - trunc(2u * trunc(ef * x(n-k) / F) / F)      for k = 1..fl
// where x(m) for m < 1 counts as zero and trunc() drops the fraction toward
// zero. Every product and quotient goes through ONE multiplier and ONE
// divider that live outside this module (they are shared with the FFT), so
// the loop is strictly serial: read x(n-k) from block RAM, multiply, wait
// for the multiplier, divide, wait for the divider, accumulate. 2u is formed
// with a shift since 2 is a whole number. The AR parameters are registers
// that keep their values from one sample to the next; clear zeroes them at
// the start of a run.
//
// Interface: start (pulse, while idle) begins the update for sample n.
// Samples are read through a block-RAM read port (address SAMPLE_BASE+m-1
// for x(m), data one cycle later). mul_* and div_* are fire-and-wait
// requests: the engine raises *_valid for one cycle and waits for *_done.
// Every division divides the product just returned, so div_dividend is
// mul_p passed straight through.
// done pulses for one cycle when all fl parameters are updated; ef then holds
// the prediction error of this sample.
// Timing with multiplier latency L and divider latency D:
//   6 + fl*(3L+3D+4) cycles from the start cycle to the done pulse.
// The equations and the one-multiplier/one-divider schedule follow the
// estimator's description; the state split and handshake are this design's.
module lms_engine
  import psd_pkg::*;
#(
  parameter int unsigned ADDR_W      = 10,
  parameter int unsigned MAX_FL      = 16,
  parameter int unsigned SAMPLE_BASE = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              start,
  input  logic [15:0]       n,
  input  logic [4:0]        fl,
  input  word_t             u,
  // sample read port
  output logic              mem_re,
  output logic [ADDR_W-1:0] mem_addr,
  input  word_t             mem_rdata,
  // shared multiplier (real operands)
  output logic              mul_valid,
  output word_t             mul_a,
  output word_t             mul_b,
  input  logic              mul_done,
  input  word_t             mul_p,
  // shared divider (divisor is the scale, wired outside)
  output logic              div_valid,
  output word_t             div_dividend,
  input  logic              div_done,
  input  word_t             div_q,
  // results
  output word_t             a_par [MAX_FL],
  output word_t             ef,
  output logic              busy,
  output logic              done
);

  typedef enum logic [3:0] {
    S_IDLE, S_RDX, S_LDX,
    S_L1RD, S_L1LD, S_L1MW, S_L1DW,
    S_L2RD, S_L2LD, S_L2MW1, S_L2DW1, S_L2MW2, S_L2DW2,
    S_DONE
  } state_t;

  state_t      state;
  logic [4:0]  k;
  logic        in_range;   // n-k >= 1, so x(n-k) exists
  word_t       hist;       // x(n-k) or 0

  assign in_range = ({11'd0, k} < n);
  assign hist     = in_range ? mem_rdata : '0;
  assign busy     = (state != S_IDLE);

  // Sample read address: x(n) in S_RDX, x(n-k) in the loop read states.
  always_comb begin
    mem_re   = 1'b0;
    mem_addr = '0;
    if (state == S_RDX) begin
      mem_re   = 1'b1;
      mem_addr = ADDR_W'(SAMPLE_BASE + 32'(n) - 32'd1);
    end else if ((state == S_L1RD || state == S_L2RD) && k <= fl) begin
      mem_re   = in_range;
      mem_addr = ADDR_W'(SAMPLE_BASE + 32'(n) - 32'(k) - 32'd1);
    end
  end

  // Arithmetic requests.
  always_comb begin
    mul_valid    = 1'b0;
    mul_a        = '0;
    mul_b        = '0;
    div_valid    = 1'b0;
    div_dividend = mul_p;
    unique case (state)
      S_L1LD: begin mul_valid = 1'b1; mul_a = a_par[k-1]; mul_b = hist; end
      S_L2LD: begin mul_valid = 1'b1; mul_a = ef;         mul_b = hist; end
      S_L1MW, S_L2MW1, S_L2MW2: div_valid = mul_done;
      S_L2DW1: begin mul_valid = div_done; mul_a = u <<< 1; mul_b = div_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      k     <= '0;
      ef    <= '0;
      done  <= 1'b0;
      for (int i = 0; i < int'(MAX_FL); i++) a_par[i] <= '0;
    end else begin
      done <= 1'b0;
      if (clear && state == S_IDLE)
        for (int i = 0; i < int'(MAX_FL); i++) a_par[i] <= '0;
      unique case (state)
        S_IDLE:  if (start) state <= S_RDX;
        S_RDX:   state <= S_LDX;
        S_LDX:   begin ef <= mem_rdata; k <= 5'd1; state <= S_L1RD; end
        // first loop: prediction error
        S_L1RD:  if (k > fl) begin k <= 5'd1; state <= S_L2RD; end
                 else state <= S_L1LD;
        S_L1LD:  state <= S_L1MW;
        S_L1MW:  if (mul_done) state <= S_L1DW;
        S_L1DW:  if (div_done) begin
                   ef    <= ef + div_q;
                   k     <= k + 5'd1;
                   state <= S_L1RD;
                 end
        // second loop: parameter update
        S_L2RD:  if (k > fl) state <= S_DONE;
                 else state <= S_L2LD;
        S_L2LD:  state <= S_L2MW1;
        S_L2MW1: if (mul_done) state <= S_L2DW1;
        S_L2DW1: if (div_done) state <= S_L2MW2;
        S_L2MW2: if (mul_done) state <= S_L2DW2;
        S_L2DW2: if (div_done) begin
                   a_par[k-1] <= a_par[k-1] - div_q;
                   k          <= k + 5'd1;
                   state      <= S_L2RD;
                 end
        S_DONE:  begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
