// dpram: dual-port block RAM, DEPTH words of 32 bits.
//
// Port A faces the host CPU, which fills in the run parameters and samples
// and collects the spectra; port B faces the PSD logic. Both ports are
// synchronous on one clock: with en high, a write stores din at addr, and the
// word at addr (its value before any write in that cycle) appears on dout one
// cycle later. When both ports write one address in the same cycle, port B
// wins. A 1024-word depth and a
// 10-bit address follow the estimator's block RAM port; one common clock is
// this design's own choice.
module dpram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [31:0]       a_din,
  output logic [31:0]       a_dout,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [31:0]       b_din,
  output logic [31:0]       b_dout
);

  logic [31:0] mem [DEPTH];

  // One process for both ports keeps the array single-driven; on a same-cycle
  // write collision port B's data is the one kept.
  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_din;
    end
    if (b_en) begin
      b_dout <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_din;
    end
  end

endmodule
