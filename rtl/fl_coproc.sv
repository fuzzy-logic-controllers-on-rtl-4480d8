// Fuzzy-logic arithmetic coprocessor for an 8051-class microcontroller.
//
// A fuzzy controller spends its time on lattice operations (max, min) during
// rule evaluation and on multiplication and division during defuzzification.
// This block puts those four operations in programmable logic next to the
// processor. The processor reaches it through one 8-bit I/O port used as a
// data bus plus a 4-bit selector (fl_pkg::sel_e):
//
//   0000 W mul op1   0001 W mul op2   0010 R product low   0011 R product high
//   0100 W div op1   0101 W div op2   0110 R quotient      0111 R remainder
//   1000 unused      1001 W max op1   1010 W max op2       1011 R maximum
//   1100 unused      1101 W min op1   1110 W min op2       1111 R minimum
//
// Write: drive sel and din and hold wr high for one rising clock edge; the
// operand register named by sel is loaded. Read: drive sel; dout shows the
// chosen result combinationally (unused and write codes read as zero).
// Multiplication and division are combinational on the stored operands; the
// max and min results are registered and valid one clock after the later
// operand write. There is no done flag: the program waits a fixed time before
// reading, which saves port bits and polling time.
//
// The register map, the 8-bit bus, the unit set, the combinational arithmetic
// and the registered lattice units follow the design description. The
// separate din/dout buses, the wr strobe, the read value of non-result codes
// and the synchronous active-low reset are this implementation's choices.
module fl_coproc
  import fl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SEL_W-1:0]  sel,
  input  logic              wr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  sel_e  s;
  assign s = sel_e'(sel);

  byte_t prod_lo, prod_hi, quot, rem, vmax, vmin;

  mul_unit #(.W(DATA_W)) u_mul (
    .clk, .rst_n, .din,
    .wr_a(wr && s == SEL_MUL_WR_A),
    .wr_b(wr && s == SEL_MUL_WR_B),
    .prod_lo, .prod_hi
  );

  div_unit #(.W(DATA_W)) u_div (
    .clk, .rst_n, .din,
    .wr_a(wr && s == SEL_DIV_WR_A),
    .wr_b(wr && s == SEL_DIV_WR_B),
    .quot, .rem
  );

  lattice_unit #(.W(DATA_W), .IS_MAX(1'b1)) u_max (
    .clk, .rst_n, .din,
    .wr_a(wr && s == SEL_MAX_WR_A),
    .wr_b(wr && s == SEL_MAX_WR_B),
    .result(vmax)
  );

  lattice_unit #(.W(DATA_W), .IS_MAX(1'b0)) u_min (
    .clk, .rst_n, .din,
    .wr_a(wr && s == SEL_MIN_WR_A),
    .wr_b(wr && s == SEL_MIN_WR_B),
    .result(vmin)
  );

  always_comb begin
    unique case (s)
      SEL_MUL_RD_LO: dout = prod_lo;
      SEL_MUL_RD_HI: dout = prod_hi;
      SEL_DIV_RD_Q:  dout = quot;
      SEL_DIV_RD_R:  dout = rem;
      SEL_MAX_RD:    dout = vmax;
      SEL_MIN_RD:    dout = vmin;
      default:       dout = '0;
    endcase
  end

  // Bus rule: a write strobe must name an operand register.
  a_wr_code : assert property (@(posedge clk) disable iff (!rst_n)
                               wr |-> is_write_code(s))
    else $error("fl_coproc: write strobe with non-operand selector %b", sel);

endmodule
