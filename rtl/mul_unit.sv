// Multiplication unit of the fuzzy-logic coprocessor: 8 x 8 -> 16 bits, unsigned.
//
// Two operand registers are loaded from the bus (wr_a, wr_b, one clock edge each)
// and the product of the stored operands is formed combinationally, so it can be
// read (low and high byte) as soon as the array has settled after the second
// write; nothing signals completion, the program simply waits long enough.
//
// The 8 x 8 product is built from four 4 x 4 multiply-add cells (rc_mult, which
// computes a*b+c+s), i.e. one 8 x 8 multiplication is four 4 x 4 operations:
//   row 0: aL*bL          -> P[3:0], carry nibble h00
//          aH*bL + h00    -> nibble m01, carry nibble h01
//   row 1: aL*bH + m01    -> P[7:4], carry nibble h10
//          aH*bH + h01 + h10 -> P[15:8]
// Building the product from 4-bit multipliers and keeping the operation
// combinational follow the design description; doing the four operations side
// by side in space (rather than one after another) is this implementation's
// choice. Operand registers reset to zero (synchronous, active low).
module mul_unit #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         wr_a,
  input  logic         wr_b,
  output logic [W-1:0] prod_lo,
  output logic [W-1:0] prod_hi
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] op_a, op_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_a <= '0;
      op_b <= '0;
    end else begin
      if (wr_a) op_a <= din;
      if (wr_b) op_b <= din;
    end
  end

  logic [2*H-1:0] p00, p01, p10, p11;

  rc_mult #(.N(H), .PIPE(1'b0)) u_ll (
    .clk, .rst_n,
    .a(op_a[H-1:0]), .b(op_b[H-1:0]), .c('0), .s('0), .p(p00)
  );
  rc_mult #(.N(H), .PIPE(1'b0)) u_hl (
    .clk, .rst_n,
    .a(op_a[W-1:H]), .b(op_b[H-1:0]), .c(p00[2*H-1:H]), .s('0), .p(p01)
  );
  rc_mult #(.N(H), .PIPE(1'b0)) u_lh (
    .clk, .rst_n,
    .a(op_a[H-1:0]), .b(op_b[W-1:H]), .c(p01[H-1:0]), .s('0), .p(p10)
  );
  rc_mult #(.N(H), .PIPE(1'b0)) u_hh (
    .clk, .rst_n,
    .a(op_a[W-1:H]), .b(op_b[W-1:H]), .c(p01[2*H-1:H]), .s(p10[2*H-1:H]), .p(p11)
  );

  assign prod_lo = {p10[H-1:0], p00[H-1:0]};
  assign prod_hi = p11;

endmodule
