// Self-checking testbench for rc_mult (p = a*b + c + s).
//
// Combinational arrays of 2, 3 and 4 bits are checked exhaustively over all
// a, b, c, s against the integer expression. Pipelined arrays of 2, 3 and 4
// bits (one register rank per row) are fed a new random operand set every
// clock; each result must appear exactly N cycles after its operands, which
// checks both the latency and the one-result-per-cycle throughput.
module tb_rc_mult;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Combinational instances, N = 2, 3, 4.
  logic [1:0] a2, b2, c2, s2;  logic [3:0] p2;
  logic [2:0] a3, b3, c3, s3;  logic [5:0] p3;
  logic [3:0] a4, b4, c4, s4;  logic [7:0] p4;

  rc_mult #(.N(2)) dut2 (.clk, .rst_n, .a(a2), .b(b2), .c(c2), .s(s2), .p(p2));
  rc_mult #(.N(3)) dut3 (.clk, .rst_n, .a(a3), .b(b3), .c(c3), .s(s3), .p(p3));
  rc_mult          dut4 (.clk, .rst_n, .a(a4), .b(b4), .c(c4), .s(s4), .p(p4));

  // Pipelined instance.
  localparam int NP = 4;
  logic [NP-1:0] pa, pb, pc, ps;  logic [2*NP-1:0] pp;
  rc_mult #(.N(NP), .PIPE(1'b1)) dutp (.clk, .rst_n, .a(pa), .b(pb), .c(pc), .s(ps), .p(pp));

  int unsigned expq [$];

  // Pipelined 2- and 3-bit arrays, checked with their own latencies.
  logic [1:0] qa2, qb2, qc2, qs2;  logic [3:0] qp2;
  logic [2:0] qa3, qb3, qc3, qs3;  logic [5:0] qp3;
  rc_mult #(.N(2), .PIPE(1'b1)) dutp2 (.clk, .rst_n, .a(qa2), .b(qb2), .c(qc2), .s(qs2), .p(qp2));
  rc_mult #(.N(3), .PIPE(1'b1)) dutp3 (.clk, .rst_n, .a(qa3), .b(qb3), .c(qc3), .s(qs3), .p(qp3));
  int unsigned expq2 [$], expq3 [$];

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pa = '0; pb = '0; pc = '0; ps = '0;
    {qa2, qb2, qc2, qs2} = '0;
    {qa3, qb3, qc3, qs3} = '0;
    a2 = '0; b2 = '0; c2 = '0; s2 = '0;
    a3 = '0; b3 = '0; c3 = '0; s3 = '0;
    a4 = '0; b4 = '0; c4 = '0; s4 = '0;

    for (int v = 0; v < 256; v++) begin
      {a2, b2, c2, s2} = 8'(v);
      #1 check("N=2", p2, a2 * b2 + c2 + s2);
    end
    for (int v = 0; v < 4096; v++) begin
      {a3, b3, c3, s3} = 12'(v);
      #1 check("N=3", p3, a3 * b3 + c3 + s3);
    end
    for (int v = 0; v < 65536; v++) begin
      {a4, b4, c4, s4} = 16'(v);
      #1 check("N=4", p4, a4 * b4 + c4 + s4);
    end

    // Pipelined array: release reset, then stream operands.
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300 + NP; t++) begin
      // Sample the output of the operands issued NP cycles ago.
      if (t >= NP) check("pipelined latency", pp, expq.pop_front());
      if (t >= 2 && t < 302) check("pipelined latency N=2", qp2, expq2.pop_front());
      if (t >= 3 && t < 303) check("pipelined latency N=3", qp3, expq3.pop_front());
      if (t < 300) begin
        logic [NP-1:0] ra, rb, rc, rs;
        logic [1:0] w2a, w2b, w2c, w2s;
        logic [2:0] w3a, w3b, w3c, w3s;
        {ra, rb, rc, rs} = 16'($urandom);
        pa <= ra; pb <= rb; pc <= rc; ps <= rs;
        expq.push_back(int'(ra) * int'(rb) + int'(rc) + int'(rs));
        {w2a, w2b, w2c, w2s} = 8'($urandom);
        {w3a, w3b, w3c, w3s} = 12'($urandom);
        qa2 <= w2a; qb2 <= w2b; qc2 <= w2c; qs2 <= w2s;
        qa3 <= w3a; qb3 <= w3b; qc3 <= w3c; qs3 <= w3s;
        expq2.push_back(int'(w2a) * int'(w2b) + int'(w2c) + int'(w2s));
        expq3.push_back(int'(w3a) * int'(w3b) + int'(w3c) + int'(w3s));
      end
      @(posedge clk);
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
