// tb_psd_top: end-to-end test of the estimator at its default size.
// Acting as the host CPU, the testbench writes the parameters and the
// 30-sample test signal (100, 200 and 300 Hz tones of amplitude 0.1, 0.3
// and 0.5 sampled at 1 kHz, scaled by 10,000) through port A, starts a run
// with filter length 16 and step size 0.0299 (299), waits for done and reads
// all 30 spectra back. Checks:
//  - every result word against the reference model;
//  - the run time, 7 + 30*(56 + 16*(3*5+3*35+4) + 3*5 + 5*35) = 66,907 cycles;
//  - the last spectrum peaks at 312.5 Hz (bin 5) with local maxima at
//    187.5 Hz and 62.5 Hz (bins 3 and 1), the peaks the three-tone signal
//    gives with a 16-point transform;
//  - a second, short run (N=4, fl=2) restarts from zeroed AR parameters.
// It also counts how often each mechanism of the design occurred and fails
// any that never did: LMS use of the shared multiplier and divider lane,
// taps that read before the first sample (zero history), cycles spent
// waiting on unit latency, FFT stages multiplied by whole-number twiddles
// without division, stages needing more than one round on the 4 dividers,
// FFT use of all 7 multipliers, and result writes to the block RAM.
module tb_psd_top;
  import psd_pkg::*;
  import psd_ref_pkg::*;

  localparam int N = 30, FL = 16, U = 299, F = 10000;
  localparam int L = 5, D = 35;
  localparam int RES_BASE = 31, PB = 1020;

  logic        clk = 0, rst = 1, start = 0, busy, done;
  logic [15:0] sample;
  word_t       ef;
  logic        host_en = 0, host_we = 0;
  logic [9:0]  host_addr = '0;
  logic [31:0] host_din = '0, host_dout;
  int          checks = 0, failures = 0;

  psd_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_lms_mul, n_lms_div, n_zero_tap, n_wait, n_whole_tw, n_multi_round,
      n_fft_all7, n_res_wr;
  always @(posedge clk) if (!rst) begin
    if (dut.u_logic.u_lms.busy && dut.u_logic.u_lms.mul_valid) n_lms_mul++;
    if (dut.u_logic.u_lms.busy && dut.u_logic.u_lms.div_valid) n_lms_div++;
    if (dut.u_logic.u_lms.mul_valid && !dut.u_logic.u_lms.in_range) n_zero_tap++;
    if (dut.u_logic.u_lms.busy && !dut.u_logic.u_lms.mul_valid &&
        !dut.u_logic.u_lms.div_valid && !dut.u_logic.u_lms.mem_re &&
        !dut.u_logic.u_lms.done) n_wait++;
    if (dut.u_logic.u_fft.m_valid && dut.u_logic.u_fft.n_divq == 0) n_whole_tw++;
    if (dut.u_logic.u_fft.d_valid && dut.u_logic.u_fft.round != 0) n_multi_round++;
    if (dut.u_logic.u_fft.m_valid && dut.u_logic.u_fft.n_prod == 3'(N_MULT)) n_fft_all7++;
    if (dut.b_we) n_res_wr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(input int a, input longint v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = 10'(a); host_din = 32'(v);
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic hread(input int a, output longint v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = 10'(a);
    @(negedge clk);
    host_en = 0;
    v = longint'($signed(host_dout));
  endtask

  task automatic run(input longint x [], input int nfl, input longint uu,
                     input bit check_time, output longint lr [16], output longint li [16]);
    longint A [16], e, er [16], ei [16], vr, vi;
    int cyc;
    for (int i = 0; i < x.size(); i++) hwrite(i, x[i]);
    hwrite(PB, x.size()); hwrite(PB + 1, nfl); hwrite(PB + 2, uu); hwrite(PB + 3, F);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (check_time) begin
      checks++;
      if (cyc != 7 + x.size() * (56 + nfl * (3 * L + 3 * D + 4) + 3 * L + 5 * D)) begin
        failures++; $display("FAIL run time %0d cycles", cyc);
      end
      $display("run of %0d samples took %0d cycles", x.size(), cyc);
    end
    for (int i = 0; i < 16; i++) A[i] = 0;
    for (int s = 1; s <= x.size(); s++) begin
      lms(x, s, nfl, uu, F, A, e);
      fft16(A, F, er, ei);
      for (int b = 0; b < 16; b++) begin
        hread(RES_BASE + 32 * (s - 1) + 2 * b, vr);
        hread(RES_BASE + 32 * (s - 1) + 2 * b + 1, vi);
        checks++;
        if (vr != er[b] || vi != ei[b]) begin
          failures++;
          $display("FAIL n=%0d X[%0d] got %0d,%0d exp %0d,%0d", s, b, vr, vi, er[b], ei[b]);
        end
        lr[b] = vr; li[b] = vi;
      end
    end
    checks++;
    if (x.size() > 0 && longint'(ef) != e) begin
      failures++; $display("FAIL final ef %0d exp %0d", ef, e);
    end
  endtask

  initial begin
    longint x [], lr [16], li [16], pw [16];
    repeat (3) @(posedge clk); rst = 0;

    x = new[N];
    for (int i = 0; i < N; i++) x[i] = sig(i, F);
    run(x, FL, U, 1, lr, li);

    // spectrum of sample 30: peak bins
    for (int b = 0; b < 16; b++) pw[b] = lr[b] * lr[b] + li[b] * li[b];
    checks++;
    for (int b = 0; b < 16; b++) if (b != 5 && b != 11 && pw[b] >= pw[5]) begin
      failures++; $display("FAIL 312.5 Hz is not the largest peak"); break;
    end
    foreach (pw[b]) if (b == 1 || b == 3) begin
      checks++;
      if (!(pw[b] > pw[b-1] && pw[b] > pw[b+1])) begin
        failures++; $display("FAIL no peak at bin %0d", b);
      end
    end

    // a second run must start from zeroed AR parameters
    x = new[4];
    for (int i = 0; i < 4; i++) x[i] = longint'($signed($urandom) % 9000);
    run(x, 2, 1000, 1, lr, li);

    $display("mechanisms: lms_mul=%0d lms_div=%0d zero_taps=%0d wait_cycles=%0d",
             n_lms_mul, n_lms_div, n_zero_tap, n_wait);
    $display("            whole_twiddle_stages=%0d multi_round_divs=%0d all7_mult=%0d result_writes=%0d",
             n_whole_tw, n_multi_round, n_fft_all7, n_res_wr);
    checks += 8;
    if (n_lms_mul == 0)     begin failures++; $display("FAIL never: LMS multiply"); end
    if (n_lms_div == 0)     begin failures++; $display("FAIL never: LMS divide"); end
    if (n_zero_tap == 0)    begin failures++; $display("FAIL never: zero history"); end
    if (n_wait == 0)        begin failures++; $display("FAIL never: latency wait"); end
    if (n_whole_tw == 0)    begin failures++; $display("FAIL never: whole twiddle stage"); end
    if (n_multi_round == 0) begin failures++; $display("FAIL never: multi-round division"); end
    if (n_fft_all7 == 0)    begin failures++; $display("FAIL never: 7 multipliers"); end
    checks++;
    if (n_res_wr != 32 * (N + 4)) begin failures++; $display("FAIL result writes %0d", n_res_wr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
