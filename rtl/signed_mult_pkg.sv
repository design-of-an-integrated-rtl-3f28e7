// signed_mult_pkg -- widths shared by the registered signed multiplier, its
// combinational core and their testbenches.
//
// The defaults are a 16-bit operand A and an 8-bit operand B, giving a
// 24-bit product: a product of two's complement numbers needs exactly as many
// bits as both operands together, so each module derives its product width
// as the sum of its operand widths. Keeping the numbers in one package lets
// the hardware and the testbenches agree on them.
package signed_mult_pkg;

  // Width of operand A (the multiplicand).
  localparam int unsigned A_WIDTH_DEFAULT = 16;
  // Width of operand B (the multiplier).
  localparam int unsigned B_WIDTH_DEFAULT = 8;

endpackage
