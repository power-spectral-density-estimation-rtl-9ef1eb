// psd_top: fabric side of the FPGA power-spectral-density estimator.
//
// A dual-port block RAM sits between the host CPU (port A, brought out as the
// host_* pins) and the estimator logic (port B). The host writes the run
// parameters at word 1020..1023 (number of samples N, filter length fl,
// LMS step size u, fixed-point scale F) and the samples x(1..N), scaled by
// F, at words 0..N-1, then pulses start. For every sample the logic updates
// the AR model by LMS, takes the 16-point FFT of the AR parameters and
// writes the 16 complex bins, 32 words, at 31 + 32*(n-1). done pulses when
// the last spectrum is in memory; sample and ef (the latest LMS prediction
// error) show progress. Host reads return data one cycle after the
// address. The parameters are those of the estimator's main configuration:
// 1024-word RAM, filter length up to 16, multiplier latency 5, divider
// latency 35. The parameter address and the start/done handshake are this
// design's own choice.
module psd_top
  import psd_pkg::*;
#(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned MAX_FL   = 16,
  parameter int unsigned MULT_LAT = 5,
  parameter int unsigned DIV_LAT  = 35
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [15:0]       sample,
  output word_t             ef,
  input  logic              host_en,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [31:0]       host_din,
  output logic [31:0]       host_dout
);

  logic              b_en, b_we;
  logic [ADDR_W-1:0] b_addr;
  word_t             b_din, b_dout;

  dpram #(.ADDR_W(ADDR_W)) u_ram (
    .clk,
    .a_en  (host_en),
    .a_we  (host_we),
    .a_addr(host_addr),
    .a_din (host_din),
    .a_dout(host_dout),
    .b_en  (b_en),
    .b_we  (b_we),
    .b_addr(b_addr),
    .b_din (b_din),
    .b_dout(b_dout)
  );

  psd_logic #(
    .ADDR_W    (ADDR_W),
    .MAX_FL    (MAX_FL),
    .MULT_LAT  (MULT_LAT),
    .DIV_LAT   (DIV_LAT),
    .PARAM_BASE((1 << ADDR_W) - 4)
  ) u_logic (
    .clk, .rst, .start, .busy, .done, .sample, .ef,
    .mem_en   (b_en),
    .mem_we   (b_we),
    .mem_addr (b_addr),
    .mem_wdata(b_din),
    .mem_rdata(b_dout)
  );

endmodule
