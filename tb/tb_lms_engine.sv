// tb_lms_engine: self-checking test of the sequential LMS update.
// The engine is wired to one multiplier (latency 5), one divider (latency
// 35) and a sample memory with one cycle of read latency. For each run of
// samples the prediction error and all AR parameters after every sample are
// compared with the reference model, and the start-to-done time with
// 6 + fl*(3L+3D+4) cycles. Runs: the 30-sample three-tone signal with
// filter length 16 and step 0.0299, a short filter, filter length 0, and a
// random signal; the clear input is checked between runs.
module tb_lms_engine;
  import psd_pkg::*;
  import psd_ref_pkg::*;

  localparam int unsigned L = 5, D = 35, MAX_FL = 16, ADDR_W = 10;

  logic              clk = 0, rst = 1, clear = 0, start = 0;
  logic [15:0]       n;
  logic [4:0]        fl;
  word_t             u;
  logic              mem_re, mul_valid, mul_done, div_valid, div_done, busy, done;
  logic [ADDR_W-1:0] mem_addr;
  word_t             mem_rdata, mul_a, mul_b, mul_p, div_dividend, div_q, ef;
  word_t             a_par [MAX_FL];
  word_t             mem [1 << ADDR_W];
  cplx_t             prod;
  int                checks = 0, failures = 0;

  lms_engine #(.ADDR_W(ADDR_W), .MAX_FL(MAX_FL)) dut (.*);

  cmult #(.LAT(L)) u_mul (.clk, .rst, .in_valid(mul_valid),
    .a('{re: mul_a, im: '0}), .b('{re: mul_b, im: '0}), .out_valid(mul_done), .p(prod));
  assign mul_p = prod.re;
  fxdiv #(.LAT(D)) u_div (.clk, .rst, .in_valid(div_valid), .dividend(div_dividend),
    .divisor(16'd10000), .out_valid(div_done), .q(div_q));

  always_ff @(posedge clk) if (mem_re) mem_rdata <= mem[mem_addr];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint x [], input int nfl, input longint uu, input string tag);
    longint A [16], e;
    int cyc;
    for (int i = 0; i < 16; i++) A[i] = 0;
    for (int i = 0; i < x.size(); i++) mem[i] = word_t'(x[i]);
    fl = 5'(nfl); u = word_t'(uu);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    for (int i = 0; i < 16; i++) if (a_par[i] != 0) begin
      failures++; $display("FAIL %s clear", tag); break;
    end
    for (int s = 1; s <= x.size(); s++) begin
      lms(x, s, nfl, uu, 10000, A, e);
      n = 16'(s);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 6 + nfl * (3 * L + 3 * D + 4)) begin
        failures++; $display("FAIL %s latency %0d", tag, cyc);
      end
      checks++;
      if (longint'(ef) != e) begin
        failures++; $display("FAIL %s n=%0d ef %0d exp %0d", tag, s, ef, e);
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (longint'(a_par[i]) != A[i]) begin
          failures++; $display("FAIL %s n=%0d A(%0d) %0d exp %0d", tag, s, i + 1, a_par[i], A[i]);
        end
      end
    end
  endtask

  initial begin
    longint x [];
    n = 0; fl = 0; u = 0;
    repeat (3) @(posedge clk); rst = 0;
    x = new[30];
    for (int i = 0; i < 30; i++) x[i] = sig(i, 10000);
    run(x, 16, 299, "tones fl16");
    run(x, 4, 500, "tones fl4");
    run(x, 0, 299, "fl0");
    x = new[12];
    for (int i = 0; i < 12; i++) x[i] = longint'($signed($urandom) % 9000);
    run(x, 9, 150, "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
