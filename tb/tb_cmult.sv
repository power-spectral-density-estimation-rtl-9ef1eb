// tb_cmult: self-checking test of the pipelined complex multiplier.
// Issues operations back to back and with gaps, including the operand pairs
// printed in the estimator's multiplier waveform, and checks each product
// against a 64-bit reference and its arrival exactly LAT cycles after issue.
module tb_cmult;
  import psd_pkg::*;

  localparam int unsigned LAT = 5;

  logic  clk = 0, rst = 1, in_valid = 0;
  cplx_t a, b, p;
  logic  out_valid;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  cmult #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint er; longint ei; int due; } exp_t;
  exp_t q[$];

  function automatic longint w32(input longint v); return longint'(int'(v)); endfunction

  task automatic issue(input longint ar, ai, br, bi);
    exp_t e;
    a.re = word_t'(ar); a.im = word_t'(ai); b.re = word_t'(br); b.im = word_t'(bi);
    in_valid = 1;
    e.er = w32(ar * br - ai * bi);
    e.ei = w32(ar * bi + ai * br);
    e.due = cycle + LAT;
    q.push_back(e);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  // Checker: every output must be due now and carry the expected value.
  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        automatic exp_t e = q.pop_front();
        if (e.due != cycle || longint'(p.re) != e.er || longint'(p.im) != e.ei) begin
          failures++;
          $display("FAIL cycle %0d due %0d got %0d,%0d exp %0d,%0d",
                   cycle, e.due, p.re, p.im, e.er, e.ei);
        end
      end
    end else if (q.size() != 0 && q[0].due < cycle) begin
      failures++; checks++; $display("FAIL missing output due %0d", q[0].due);
      void'(q.pop_front());
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // operand pairs printed in the multiplier waveform of the estimator
    issue(950, 109, 9239, -3827);   // -> 9194193, -2628599
    issue(867, 567, 7071, -7071);
    issue(4984, -1099, 3827, -9239);
    issue(-2128, 0, 0, -1);
    repeat (3) @(posedge clk); #1;
    for (int i = 0; i < 200; i++) begin
      issue($signed($urandom) % 100000, $signed($urandom) % 100000,
            $signed($urandom) % 10001, $signed($urandom) % 10001);
      if ($urandom % 3 == 0) begin @(posedge clk); #1; end
    end
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL outputs outstanding"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
