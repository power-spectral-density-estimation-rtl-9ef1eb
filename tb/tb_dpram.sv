// tb_dpram: self-checking test of the dual-port block RAM.
// Writes random words through both ports, reads them back through the other
// port, and checks the one-cycle read latency and read-before-write
// behaviour against a shadow array.
module tb_dpram;
  localparam int unsigned ADDR_W = 10;

  logic              clk = 0;
  logic              a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [ADDR_W-1:0] a_addr = '0, b_addr = '0;
  logic [31:0]       a_din = '0, b_din = '0, a_dout, b_dout;
  logic [31:0]       shadow [1 << ADDR_W];
  int                checks = 0, failures = 0;

  dpram #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    // fill: even addresses by port A, odd by port B, in the same cycles
    for (int i = 0; i < (1 << ADDR_W); i += 2) begin
      a_en = 1; a_we = 1; a_addr = ADDR_W'(i);     a_din = $urandom;
      b_en = 1; b_we = 1; b_addr = ADDR_W'(i + 1); b_din = $urandom;
      shadow[i] = a_din; shadow[i+1] = b_din;
      @(negedge clk);
    end
    a_we = 0; b_we = 0;
    // cross read-back with one cycle of latency
    for (int i = 0; i < (1 << ADDR_W); i++) begin
      a_addr = ADDR_W'(i); b_addr = ADDR_W'((1 << ADDR_W) - 1 - i);
      @(negedge clk);
      check(a_dout, shadow[i], "port A read");
      check(b_dout, shadow[(1 << ADDR_W) - 1 - i], "port B read");
    end
    // read-before-write on port B, data visible on port A afterwards
    b_addr = 10'd77; b_we = 1; b_din = 32'hCAFE_0077;
    @(negedge clk);
    check(b_dout, shadow[77], "read-before-write");
    b_we = 0; a_addr = 10'd77;
    @(negedge clk);
    check(a_dout, 32'hCAFE_0077, "written word");
    // disabled port holds its output
    a_en = 0; a_addr = 10'd3;
    @(negedge clk);
    check(a_dout, 32'hCAFE_0077, "hold when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
