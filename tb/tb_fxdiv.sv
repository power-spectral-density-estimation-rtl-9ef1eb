// tb_fxdiv: self-checking test of the pipelined truncating divider.
// Checks quotients of positive, negative and zero dividends by 10,000 and by
// random divisors against a reference that truncates toward zero, including
// dividend/quotient pairs printed in the estimator's divider waveform, and
// checks that each quotient arrives exactly LAT = 35 cycles after issue.
module tb_fxdiv;
  import psd_pkg::*;

  localparam int unsigned LAT = 35;

  logic        clk = 0, rst = 1, in_valid = 0;
  word_t       dividend, q;
  logic [15:0] divisor;
  logic        out_valid;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  fxdiv #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint eq; int due; } exp_t;
  exp_t xq[$];

  task automatic issue(input longint a, input longint d);
    exp_t e;
    longint m;
    dividend = word_t'(a); divisor = 16'(d); in_valid = 1;
    m = (a < 0 ? -a : a);
    e.eq = (d == 0) ? 0 : ((a < 0) ? -(m / d) : (m / d));
    e.due = cycle + LAT;
    xq.push_back(e);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (xq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        automatic exp_t e = xq.pop_front();
        if (e.due != cycle || longint'(q) != e.eq) begin
          failures++;
          $display("FAIL cycle %0d due %0d got %0d exp %0d", cycle, e.due, q, e.eq);
        end
      end
    end else if (xq.size() != 0 && xq[0].due < cycle) begin
      failures++; checks++; $display("FAIL missing output due %0d", xq[0].due);
      void'(xq.pop_front());
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dividend = '0; divisor = 16'd10000;
    repeat (3) @(posedge clk); #1 rst = 0;
    issue(-10139814, 10000);   // -1013
    issue(-2121300, 10000);    // -212
    issue(9194193, 10000);     // 919
    issue(-2628599, 10000);    // -262
    issue(9999, 10000);        // 0
    issue(-9999, 10000);       // 0
    issue(-10000, 10000);      // -1
    issue(-64'sd2147483648, 10000);
    issue(2147483647, 1);
    issue(12345, 0);
    for (int i = 0; i < 300; i++) begin
      longint a;
      a = longint'($signed($urandom));
      if (i % 2 == 0) issue(a, 10000);
      else            issue(a, longint'($urandom % 65536));
      if ($urandom % 4 == 0) begin repeat ($urandom % 40) @(posedge clk); #1; end
    end
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("FAIL outputs outstanding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
