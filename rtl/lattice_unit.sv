// Lattice unit of the fuzzy-logic coprocessor: maximum (IS_MAX = 1) or minimum
// (IS_MAX = 0) of two unsigned 8-bit operands.
//
// The unit keeps its two operands in local registers, loaded from the bus by
// wr_a and wr_b, so the processor can store them and go on with other work. The
// comparison result is captured in an output register on every clock edge:
// it shows the max/min of the stored operands one clock after the later write.
// Operand and result registers reset to zero (synchronous, active low); for the
// minimum unit this makes the reset result zero as well.
// Local operand registers and a registered output follow the design
// description; unsigned comparison and one module for both units are this
// implementation's choices.
module lattice_unit #(
  parameter int unsigned W      = 8,
  parameter bit          IS_MAX = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         wr_a,
  input  logic         wr_b,
  output logic [W-1:0] result
);

  logic [W-1:0] op_a, op_b;
  logic         a_ge_b;
  logic [W-1:0] pick;

  assign a_ge_b = (op_a >= op_b);
  assign pick   = (a_ge_b == IS_MAX) ? op_a : op_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_a   <= '0;
      op_b   <= '0;
      result <= '0;
    end else begin
      if (wr_a) op_a <= din;
      if (wr_b) op_b <= din;
      result <= pick;
    end
  end

endmodule
