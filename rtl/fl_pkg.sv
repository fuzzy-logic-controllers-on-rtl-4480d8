// Shared constants and types of the fuzzy-logic coprocessor.
//
// The coprocessor is reached through one 8-bit data bus and a 4-bit selector.
// The selector values below follow the register map of the design: the upper two
// bits pick the unit (multiplication, division, maximum, minimum) and the lower
// two bits pick the register inside it. Codes 1000 and 1100 are unused.
// Which bus direction each code has (write operand or read result) is part of
// that map; the enum names carry it.
package fl_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned SEL_W  = 4;

  typedef logic [DATA_W-1:0] byte_t;

  typedef enum logic [SEL_W-1:0] {
    SEL_MUL_WR_A  = 4'b0000,  // write 1st operand of the multiplication
    SEL_MUL_WR_B  = 4'b0001,  // write 2nd operand of the multiplication
    SEL_MUL_RD_LO = 4'b0010,  // read low byte of the product
    SEL_MUL_RD_HI = 4'b0011,  // read high byte of the product
    SEL_DIV_WR_A  = 4'b0100,  // write dividend
    SEL_DIV_WR_B  = 4'b0101,  // write divisor
    SEL_DIV_RD_Q  = 4'b0110,  // read integer quotient
    SEL_DIV_RD_R  = 4'b0111,  // read remainder
    SEL_UNUSED_8  = 4'b1000,
    SEL_MAX_WR_A  = 4'b1001,  // write 1st operand of the maximum
    SEL_MAX_WR_B  = 4'b1010,  // write 2nd operand of the maximum
    SEL_MAX_RD    = 4'b1011,  // read the maximum
    SEL_UNUSED_C  = 4'b1100,
    SEL_MIN_WR_A  = 4'b1101,  // write 1st operand of the minimum
    SEL_MIN_WR_B  = 4'b1110,  // write 2nd operand of the minimum
    SEL_MIN_RD    = 4'b1111   // read the minimum
  } sel_e;

  // True for the selector codes that name an operand register.
  function automatic logic is_write_code(sel_e s);
    return s inside {SEL_MUL_WR_A, SEL_MUL_WR_B, SEL_DIV_WR_A, SEL_DIV_WR_B,
                     SEL_MAX_WR_A, SEL_MAX_WR_B, SEL_MIN_WR_A, SEL_MIN_WR_B};
  endfunction

endpackage
