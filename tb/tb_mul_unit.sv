// Self-checking testbench for mul_unit (8 x 8 unsigned multiplication unit).
//
// Every pair of 8-bit operands is written through wr_a / wr_b, and both
// product bytes are compared with the integer product right after the clock
// edge that stores the second operand: the product is combinational, so it
// must be valid with no further clock. The reset value (0 * 0) is checked too.
module tb_mul_unit;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] din;
  logic       wr_a, wr_b;
  logic [7:0] prod_lo, prod_hi;

  mul_unit dut (.clk, .rst_n, .din, .wr_a, .wr_b, .prod_lo, .prod_hi);

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; wr_a = 1'b0; wr_b = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset product", {prod_hi, prod_lo}, 0);
    for (int a = 0; a < 256; a++) begin
      din = 8'(a); wr_a = 1'b1;
      @(posedge clk); #1 wr_a = 1'b0;
      for (int b = 0; b < 256; b++) begin
        din = 8'(b); wr_b = 1'b1;
        @(posedge clk); #1 wr_b = 1'b0;
        check("product", {prod_hi, prod_lo}, a * b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
