// tb_fft16: self-checking test of the 16-point fixed-point FFT.
// The FFT is wired to 7 complex multipliers and 4 dividers as in the
// estimator. Checks:
//  - a published case: the AR parameters of sample 30 of the 30-sample,
//    filter-length-16 run and the 16 bins that run printed for them;
//  - random inputs against the reference model in psd_ref_pkg;
//  - the start-to-done time, 16 + 3*L + 5*D cycles.
module tb_fft16;
  import psd_pkg::*;
  import psd_ref_pkg::*;

  localparam int unsigned L = 5, D = 35;

  logic  clk = 0, rst = 1, start = 0;
  word_t x_in [N_FFT];
  logic  m_valid, m_done, d_valid, d_done, busy, done;
  cplx_t m_a [N_MULT], m_b [N_MULT], m_p [N_MULT];
  word_t d_dividend [N_DIV], d_q [N_DIV];
  cplx_t x_out [N_FFT];
  logic  mv [N_MULT], dv [N_DIV];
  int    checks = 0, failures = 0;

  fft16 dut (.*);

  for (genvar m = 0; m < int'(N_MULT); m++) begin : g_m
    cmult #(.LAT(L)) u (.clk, .rst, .in_valid(m_valid), .a(m_a[m]), .b(m_b[m]),
                        .out_valid(mv[m]), .p(m_p[m]));
  end
  for (genvar d = 0; d < int'(N_DIV); d++) begin : g_d
    fxdiv #(.LAT(D)) u (.clk, .rst, .in_valid(d_valid), .dividend(d_dividend[d]),
                        .divisor(16'd10000), .out_valid(dv[d]), .q(d_q[d]));
  end
  assign m_done = mv[0];
  assign d_done = dv[0];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a [16], output int cycles);
    for (int i = 0; i < 16; i++) x_in[i] = word_t'(a[i]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic compare(input longint er [16], input longint ei [16], input string tag);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (longint'(x_out[i].re) != er[i] || longint'(x_out[i].im) != ei[i]) begin
        failures++;
        $display("FAIL %s X[%0d] got %0d,%0d exp %0d,%0d", tag, i,
                 x_out[i].re, x_out[i].im, er[i], ei[i]);
      end
    end
  endtask

  initial begin
    longint a [16], er [16], ei [16];
    int cyc;
    // AR parameters A(1..16) after sample 30 and the FFT bins printed for them
    longint pa [16] = '{161, 1537, -566, -311, 691, -682, -339, 1399,
                        67, -1430, 37, 765, -228, -78, 257, -378};
    longint pr [16] = '{902, 1009, 778, 990, 1302, -794, -1248, -829,
                        -742, -829, -1248, -794, 1302, 990, 778, 1009};
    longint pi [16] = '{0, -334, 235, -3259, 2128, -6791, -659, -190,
                        0, 190, 659, 6791, -2128, 3259, -235, 334};
    for (int i = 0; i < 16; i++) x_in[i] = '0;
    repeat (3) @(posedge clk); rst = 0;

    run(pa, cyc);
    compare(pr, pi, "published");
    checks++;
    if (cyc != 16 + 3 * L + 5 * D) begin
      failures++; $display("FAIL latency %0d exp %0d", cyc, 16 + 3 * L + 5 * D);
    end

    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 16; i++)
        a[i] = (t < 20) ? longint'($signed($urandom) % 20000)
                        : longint'($signed($urandom) % 2000000);
      if (t == 0) for (int i = 0; i < 16; i++) a[i] = (i == 3) ? 10000 : 0;
      if (t == 1) for (int i = 0; i < 16; i++) a[i] = -7;
      fft16(a, 10000, er, ei);
      run(a, cyc);
      compare(er, ei, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
