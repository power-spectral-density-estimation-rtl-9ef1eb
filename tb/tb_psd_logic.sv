// tb_psd_logic: self-checking test of the estimator's sequencer.
// psd_logic runs against a behavioural block-RAM port (one cycle read
// latency). Each run writes parameters and samples, pulses start and then
// checks every result word against the reference model, that samples and
// parameters are left untouched, and the run time 7 + N*P cycles with
// P = 56 + fl*(3L+3D+4) + 3L + 5D. Runs use shortened unit latencies, a
// filter length above the 16-parameter maximum (clamped), filter length 0
// and an empty run.
module tb_psd_logic;
  import psd_pkg::*;
  import psd_ref_pkg::*;

  localparam int unsigned L = 2, D = 3, ADDR_W = 10, RES_BASE = 31, PB = 1020;

  logic              clk = 0, rst = 1, start = 0, busy, done;
  logic [15:0]       sample;
  word_t             ef;
  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  word_t             mem_wdata, mem_rdata;
  word_t             mem [1 << ADDR_W];
  int                checks = 0, failures = 0;

  psd_logic #(.ADDR_W(ADDR_W), .MULT_LAT(L), .DIV_LAT(D)) dut (.*);

  always_ff @(posedge clk) if (mem_en) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint x [], input int nfl, input longint uu, input string tag);
    longint A [16], e, er [16], ei [16];
    int cyc, efl;
    word_t snap [1 << ADDR_W];
    efl = (nfl > 16) ? 16 : nfl;
    for (int i = 0; i < (1 << ADDR_W); i++) mem[i] = word_t'($urandom);
    for (int i = 0; i < x.size(); i++) mem[i] = word_t'(x[i]);
    mem[PB] = x.size(); mem[PB+1] = nfl; mem[PB+2] = word_t'(uu); mem[PB+3] = 10000;
    snap = mem;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 7 + x.size() * (56 + efl * (3 * L + 3 * D + 4) + 3 * L + 5 * D)) begin
      failures++; $display("FAIL %s run time %0d", tag, cyc);
    end
    for (int i = 0; i < 16; i++) A[i] = 0;
    for (int s = 1; s <= x.size(); s++) begin
      lms(x, s, efl, uu, 10000, A, e);
      fft16(A, 10000, er, ei);
      for (int b = 0; b < 16; b++) begin
        int ad = RES_BASE + 32 * (s - 1) + 2 * b;
        checks += 2;
        if (longint'(mem[ad]) != er[b] || longint'(mem[ad+1]) != ei[b]) begin
          failures++;
          $display("FAIL %s n=%0d X[%0d] %0d,%0d exp %0d,%0d", tag, s, b,
                   mem[ad], mem[ad+1], er[b], ei[b]);
        end
        snap[ad] = mem[ad]; snap[ad+1] = mem[ad+1];
      end
    end
    checks++;
    if (x.size() > 0 && longint'(ef) != e) begin
      failures++; $display("FAIL final ef %0d exp %0d", ef, e);
    end
    checks++;
    if (snap != mem) begin failures++; $display("FAIL %s stray write", tag); end
  endtask

  initial begin
    longint x [];
    repeat (3) @(posedge clk); rst = 0;
    x = new[10];
    for (int i = 0; i < 10; i++) x[i] = sig(i, 10000);
    run(x, 16, 299, "tones");
    run(x, 20, 299, "clamped");
    run(x, 0, 299, "fl0");
    x = new[6];
    for (int i = 0; i < 6; i++) x[i] = longint'($signed($urandom) % 9000);
    run(x, 7, 400, "random");
    x = new[0];
    run(x, 16, 299, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
