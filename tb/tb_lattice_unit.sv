// Self-checking testbench for lattice_unit, as a maximum and as a minimum unit.
//
// Random operand pairs (plus equal operands and the extremes) are written to
// both instances. The result register must still hold the previous value
// right after the second operand is stored, and must show max/min of the new
// pair one clock later (registered output, one cycle of latency). Writing the
// second operand before the first is also covered, since the operand
// registers are independent.
module tb_lattice_unit;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] din;
  logic       wr_a, wr_b;
  logic [7:0] vmax, vmin;

  lattice_unit #(.IS_MAX(1'b1)) dut_max (.clk, .rst_n, .din, .wr_a, .wr_b, .result(vmax));
  lattice_unit #(.IS_MAX(1'b0)) dut_min (.clk, .rst_n, .din, .wr_a, .wr_b, .result(vmin));

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Reference model of the operand registers and of the registered result.
  logic [7:0] ma = '0, mb = '0, emax = '0, emin = '0;

  // One bus write; the model advances by the same clock edge: the result
  // register takes max/min of the operands held before the edge.
  task automatic write(input logic sel_b, input logic [7:0] v);
    din = v; wr_a = !sel_b; wr_b = sel_b;
    @(posedge clk);
    emax = (ma > mb) ? ma : mb;
    emin = (ma < mb) ? ma : mb;
    if (sel_b) mb = v; else ma = v;
    #1;
    wr_a = 1'b0; wr_b = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, y;
    din = '0; wr_a = 1'b0; wr_b = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset max", vmax, 0);
    check("reset min", vmin, 0);
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin x = 8'd0;   y = 8'd255; end
        1: begin x = 8'd255; y = 8'd0;   end
        2: begin x = 8'd77;  y = 8'd77;  end
        default: begin x = 8'($urandom); y = 8'($urandom); end
      endcase
      if (i % 2 == 0) begin
        write(1'b0, x); write(1'b1, y);
      end else begin
        write(1'b1, y); write(1'b0, x);
      end
      // Right after the last write the output still reflects the old operands.
      check("max before update", vmax, emax);
      check("min before update", vmin, emin);
      @(posedge clk); #1;
      check("max", vmax, (x > y) ? x : y);
      check("min", vmin, (x < y) ? x : y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
