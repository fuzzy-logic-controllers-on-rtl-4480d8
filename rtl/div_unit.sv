// Division unit of the fuzzy-logic coprocessor: 8-bit unsigned dividend and
// divisor, integer quotient and remainder.
//
// Two operand registers are loaded from the bus (wr_a = dividend, wr_b =
// divisor). A combinational restoring array divider of W rows works on the
// stored operands: row i shifts the next dividend bit into the partial
// remainder, subtracts the divisor, and keeps the difference (quotient bit 1)
// or restores the old value (quotient bit 0). The results are valid once the
// array has settled after the second write; there is no busy flag.
// A divisor of zero makes every row's subtraction succeed, so the quotient
// reads all ones and the remainder equals the dividend; no error is raised.
// Quotient and remainder as the unit's two results follow the design
// description; the restoring array and the divide-by-zero result are this
// implementation's choices. Operand registers reset to zero (synchronous).
module div_unit #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         wr_a,
  input  logic         wr_b,
  output logic [W-1:0] quot,
  output logic [W-1:0] rem
);

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

  // part[i] is the partial remainder entering row i (W+1 bits wide so the
  // shifted value cannot overflow).
  logic [W:0] part [W+1];
  assign part[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_row
    logic [W:0] shifted;
    logic [W+1:0] diff;   // one extra bit: diff[W+1] is the borrow
    assign shifted = {part[i][W-1:0], op_a[W-1-i]};
    assign diff    = {1'b0, shifted} - {2'b00, op_b};
    assign quot[W-1-i] = ~diff[W+1];
    assign part[i+1]   = diff[W+1] ? shifted : diff[W:0];
  end

  assign rem = part[W][W-1:0];

endmodule
