// End-to-end testbench for fl_coproc, at its default (and only) size.
//
// The testbench plays the role of the microcontroller program. It drives the
// 8-bit bus and the 4-bit selector exactly as the register map prescribes and
// runs a small fuzzy controller on the coprocessor:
//   * two inputs x0, x1 in 0..255, three triangular membership functions each
//     (grades 0..255, evaluated in software as a lookup would be);
//   * nine rules "IF x0 is A0j AND x1 is A1k THEN f is B(j,k)": AND is a min
//     on the minimum unit, rules with the same consequent are combined with
//     max on the maximum unit;
//   * defuzzification by singletons: v_l = w_l * c_l on the multiplication
//     unit (16-bit results read as two bytes), N = sum v_l and D = sum w_l
//     accumulated in software, f = N / D on the division unit after both are
//     shifted right until N fits in 8 bits.
// A golden model computes the same integer algorithm directly, and every
// read of the bus is compared with it. Besides the controller runs there are
// directed checks: reset values, reads of write and unused codes, divide by
// zero, and reading a lattice result too early (the value must still be the
// previous one, since the result register updates one clock after the write).
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fl_coproc;
  import fl_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] sel;
  logic       wr;
  logic [7:0] din, dout;

  fl_coproc dut (.clk, .rst_n, .sel, .wr, .din, .dout);

  // Mechanism counters.
  int n_mul = 0, n_div = 0, n_div0 = 0, n_max = 0, n_min = 0;
  int n_early = 0, n_idle_code = 0, n_flc = 0;

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic bus_write(input sel_e s, input logic [7:0] v);
    sel = s; din = v; wr = 1'b1;
    @(posedge clk); #1;
    wr = 1'b0;
  endtask

  // Combinational read: the value on dout for the selector, no clock needed.
  task automatic bus_read(input sel_e s, output logic [7:0] v);
    sel = s; #1;
    v = dout;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  function automatic int unsigned imax(int unsigned a, int unsigned b); return a > b ? a : b; endfunction
  function automatic int unsigned imin(int unsigned a, int unsigned b); return a < b ? a : b; endfunction

  // Coprocessor operations as the program would issue them.
  task automatic cp_mul(input logic [7:0] a, input logic [7:0] b, output int unsigned p);
    logic [7:0] lo, hi;
    bus_write(SEL_MUL_WR_A, a);
    bus_write(SEL_MUL_WR_B, b);
    bus_read(SEL_MUL_RD_LO, lo);
    bus_read(SEL_MUL_RD_HI, hi);
    p = {hi, lo};
    check("mul", p, int'(a) * int'(b));
    n_mul++;
  endtask

  task automatic cp_div(input logic [7:0] a, input logic [7:0] b, output logic [7:0] q);
    logic [7:0] r;
    bus_write(SEL_DIV_WR_A, a);
    bus_write(SEL_DIV_WR_B, b);
    bus_read(SEL_DIV_RD_Q, q);
    bus_read(SEL_DIV_RD_R, r);
    if (b == 0) begin
      check("div0 q", q, 255); check("div0 r", r, a); n_div0++;
    end else begin
      check("div q", q, a / b); check("div r", r, a % b); n_div++;
    end
  endtask

  task automatic cp_lattice(input logic is_max, input logic [7:0] a, input logic [7:0] b,
                            output logic [7:0] res);
    bus_write(is_max ? SEL_MAX_WR_A : SEL_MIN_WR_A, a);
    bus_write(is_max ? SEL_MAX_WR_B : SEL_MIN_WR_B, b);
    idle(1);  // the result register takes one clock
    bus_read(is_max ? SEL_MAX_RD : SEL_MIN_RD, res);
    if (is_max) begin check("max", res, imax(a, b)); n_max++; end
    else        begin check("min", res, imin(a, b)); n_min++; end
  endtask

  // Triangular membership functions over 0..255, peaks at 0, 128, 255.
  function automatic int unsigned mf(int j, int unsigned x);
    int unsigned pk [3] = '{0, 128, 255};
    int unsigned d, half;
    d    = (x > pk[j]) ? x - pk[j] : pk[j] - x;
    half = 128;
    return (d >= half) ? 0 : ((half - d) * 255) / half;
  endfunction

  // Rule table: consequent index for (x0 term, x1 term), and singleton centers.
  int unsigned rule_out [3][3] = '{'{0, 0, 1}, '{0, 1, 2}, '{1, 2, 2}};
  int unsigned center   [3]    = '{30, 128, 220};

  // Golden model of the whole controller.
  function automatic int unsigned golden(int unsigned x0, int unsigned x1);
    int unsigned w [3] = '{0, 0, 0};
    int unsigned n, d, sh;
    for (int j = 0; j < 3; j++)
      for (int k = 0; k < 3; k++)
        w[rule_out[j][k]] = imax(w[rule_out[j][k]], imin(mf(j, x0), mf(k, x1)));
    n = 0; d = 0;
    for (int l = 0; l < 3; l++) begin n += w[l] * center[l]; d += w[l]; end
    sh = 0;
    while ((n >> sh) > 255) sh++;
    if ((d >> sh) == 0) return 255;
    return (n >> sh) / (d >> sh);
  endfunction

  // The controller run on the coprocessor.
  task automatic flc_run(input int unsigned x0, input int unsigned x1, output int unsigned f);
    logic [7:0] y0 [3], y1 [3], w [3], r, q;
    int unsigned n, d, sh, v;
    for (int j = 0; j < 3; j++) begin y0[j] = 8'(mf(j, x0)); y1[j] = 8'(mf(j, x1)); end
    w = '{8'd0, 8'd0, 8'd0};
    for (int j = 0; j < 3; j++)
      for (int k = 0; k < 3; k++) begin
        cp_lattice(1'b0, y0[j], y1[k], r);                   // AND -> min
        cp_lattice(1'b1, w[rule_out[j][k]], r, w[rule_out[j][k]]);  // OR -> max
      end
    n = 0; d = 0;
    for (int l = 0; l < 3; l++) begin
      cp_mul(w[l], 8'(center[l]), v);
      n += v; d += w[l];
    end
    sh = 0;
    while ((n >> sh) > 255) sh++;
    cp_div(8'(n >> sh), 8'(d >> sh), q);
    f = q;
    n_flc++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, old;
    int unsigned p, f;
    sel = '0; wr = 1'b0; din = '0;
    idle(3);
    rst_n = 1'b1;

    // Reset values: all operand and result registers are zero.
    bus_read(SEL_MUL_RD_HI, v); check("reset mul", v, 0);
    bus_read(SEL_MAX_RD, v);    check("reset max", v, 0);
    bus_read(SEL_MIN_RD, v);    check("reset min", v, 0);
    bus_read(SEL_DIV_RD_Q, v);  check("reset div q (0/0)", v, 255);

    // Write and unused codes read as zero.
    for (int c = 0; c < 16; c++) begin
      if (!(sel_e'(c) inside {SEL_MUL_RD_LO, SEL_MUL_RD_HI, SEL_DIV_RD_Q, SEL_DIV_RD_R,
                              SEL_MAX_RD, SEL_MIN_RD})) begin
        bus_write(SEL_MUL_WR_A, 8'hff);  // make sure something nonzero is stored
        bus_read(sel_e'(c), v);
        check("non-result code reads 0", v, 0);
        n_idle_code++;
      end
    end

    // Directed arithmetic corner cases.
    cp_mul(8'd255, 8'd255, p);
    cp_mul(8'd0, 8'd200, p);
    cp_div(8'd200, 8'd0, v);
    cp_div(8'd255, 8'd1, v);
    cp_div(8'd7, 8'd9, v);

    // Reading a lattice result too early returns the previous result.
    cp_lattice(1'b1, 8'd10, 8'd20, old);
    bus_write(SEL_MAX_WR_A, 8'd90);
    bus_read(SEL_MAX_RD, v);
    check("early max read shows previous", v, old);
    n_early++;
    idle(1);
    bus_read(SEL_MAX_RD, v);
    check("max after one clock", v, 90);
    cp_lattice(1'b0, 8'd10, 8'd20, old);
    bus_write(SEL_MIN_WR_B, 8'd3);
    bus_read(SEL_MIN_RD, v);
    check("early min read shows previous", v, old);
    n_early++;

    // Random arithmetic.
    for (int i = 0; i < 300; i++) begin
      cp_mul(8'($urandom), 8'($urandom), p);
      cp_div(8'($urandom), 8'($urandom_range(255, 1)), v);
      cp_lattice(i[0], 8'($urandom), 8'($urandom), v);
    end

    // Fuzzy controller over a grid of inputs plus random inputs.
    for (int i = 0; i < 64; i++) begin
      int unsigned x0, x1;
      if (i < 25) begin x0 = (i % 5) * 63; x1 = (i / 5) * 63; end
      else begin x0 = $urandom_range(255); x1 = $urandom_range(255); end
      flc_run(x0, x1, f);
      check("controller output", f, golden(x0, x1));
    end

    // Every mechanism must have happened.
    if (n_mul == 0)       begin failures++; $display("FAIL no multiplication"); end
    if (n_div == 0)       begin failures++; $display("FAIL no division"); end
    if (n_div0 == 0)      begin failures++; $display("FAIL no divide by zero"); end
    if (n_max == 0)       begin failures++; $display("FAIL no maximum"); end
    if (n_min == 0)       begin failures++; $display("FAIL no minimum"); end
    if (n_early == 0)     begin failures++; $display("FAIL no early lattice read"); end
    if (n_idle_code == 0) begin failures++; $display("FAIL no non-result code read"); end
    if (n_flc == 0)       begin failures++; $display("FAIL no controller run"); end
    $display("mul=%0d div=%0d div0=%0d max=%0d min=%0d early=%0d noncode=%0d flc=%0d",
             n_mul, n_div, n_div0, n_max, n_min, n_early, n_idle_code, n_flc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
