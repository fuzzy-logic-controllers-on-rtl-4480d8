// Self-checking testbench for div_unit (8-bit unsigned division unit).
//
// Every dividend/divisor pair is written through wr_a / wr_b and quotient and
// remainder are compared with integer division right after the clock edge that
// stores the second operand (the array is combinational). For a zero divisor
// the unit is specified to return quotient 255 and the dividend as remainder.
module tb_div_unit;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] din;
  logic       wr_a, wr_b;
  logic [7:0] quot, rem;

  div_unit dut (.clk, .rst_n, .din, .wr_a, .wr_b, .quot, .rem);

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
    for (int a = 0; a < 256; a++) begin
      din = 8'(a); wr_a = 1'b1;
      @(posedge clk); #1 wr_a = 1'b0;
      for (int b = 0; b < 256; b++) begin
        din = 8'(b); wr_b = 1'b1;
        @(posedge clk); #1 wr_b = 1'b0;
        if (b == 0) begin
          check("quotient /0", quot, 255);
          check("remainder /0", rem, a);
        end else begin
          check("quotient", quot, a / b);
          check("remainder", rem, a % b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
