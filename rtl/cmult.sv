// cmult: pipelined 32-bit complex multiplier.
//
// p = a * b with p.re = a.re*b.re - a.im*b.im and p.im = a.re*b.im + a.im*b.re,
// each part kept to its low 32 bits (the inputs are chosen so that the
// products fit). The result is computed in the cycle the operands are
// presented and then carried through a shift register, so out_valid and p
// appear exactly LAT cycles after in_valid; a new operation may start every
// cycle. LAT = 5 is the multiplier latency the estimator's controller waits
// for; a real-only product is obtained by tying both imaginary parts to zero.
// The arithmetic follows the estimator's description; the single-register
// pipeline form is this design's own choice.
module cmult
  import psd_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t a,
  input  cplx_t b,
  output logic  out_valid,
  output cplx_t p
);

  logic signed [63:0] rr, ii, ri, ir;
  cplx_t              prod;

  always_comb begin
    rr = 64'(a.re) * 64'(b.re);
    ii = 64'(a.im) * 64'(b.im);
    ri = 64'(a.re) * 64'(b.im);
    ir = 64'(a.im) * 64'(b.re);
    prod.re = word_t'(rr - ii);
    prod.im = word_t'(ri + ir);
  end

  logic  vpipe [LAT];
  cplx_t dpipe [LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(LAT); i++) vpipe[i] <= 1'b0;
    end else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < int'(LAT); i++) vpipe[i] <= vpipe[i-1];
    end
  end

  always_ff @(posedge clk) begin
    dpipe[0] <= prod;
    for (int i = 1; i < int'(LAT); i++) dpipe[i] <= dpipe[i-1];
  end

  assign out_valid = vpipe[LAT-1];
  assign p         = dpipe[LAT-1];

endmodule
