// fxdiv: pipelined signed divider used to remove the fixed-point scale.
//
// q = dividend / divisor with the quotient truncated toward zero (the sign of
// the dividend is kept and the fraction dropped), the rounding the estimator
// uses everywhere. The divisor is the unsigned 16-bit scale (10,000 in normal
// use); a zero divisor gives q = 0. The quotient is formed in the cycle the
// operands are presented and carried through a shift register so that
// out_valid and q appear exactly LAT cycles after in_valid, matching a
// 35-cycle pipelined divider core; one division may start every cycle.
// Truncation toward zero and the latency follow the estimator's description;
// computing the quotient in one step before the delay line is this design's
// own simplification of a radix-2 divider pipeline.
module fxdiv
  import psd_pkg::*;
#(
  parameter int unsigned LAT = 35
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  word_t       dividend,
  input  logic [15:0] divisor,
  output logic        out_valid,
  output word_t       q
);

  logic [31:0] mag, qmag;
  word_t       quot;

  always_comb begin
    mag  = dividend[31] ? 32'(-dividend) : 32'(dividend);
    qmag = (divisor == 16'd0) ? 32'd0 : mag / {16'd0, divisor};
    quot = dividend[31] ? -word_t'(qmag) : word_t'(qmag);
  end

  logic  vpipe [LAT];
  word_t dpipe [LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(LAT); i++) vpipe[i] <= 1'b0;
    end else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < int'(LAT); i++) vpipe[i] <= vpipe[i-1];
    end
  end

  always_ff @(posedge clk) begin
    dpipe[0] <= quot;
    for (int i = 1; i < int'(LAT); i++) dpipe[i] <= dpipe[i-1];
  end

  assign out_valid = vpipe[LAT-1];
  assign q         = dpipe[LAT-1];

endmodule
