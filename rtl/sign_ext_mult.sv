// sign_ext_mult -- combinational two's complement multiplier by sign extension.
//
// An unsigned multiplier gives the wrong answer for negative two's complement
// operands: -89 (8'b1010_0111) times 7 read as unsigned is 167 * 7 = 1169,
// not -623. The cure used here is to widen both operands to the full product
// width Z_width by copying their sign bits, multiply the widened numbers as
// unsigned values, and keep only the low Z_width bits. Modulo 2^Z_width the
// widened operands equal the signed ones, so the low bits are the exact
// signed product; every bit above them is discarded, and synthesis removes
// the logic that would have produced it.
//
// Interface: a is A_width bits, b is B_width bits, both signed; z is the
// signed product, Z_width bits (by default A_width + B_width, which can
// never overflow).
//
// Timing: purely combinational.
//
// The sign-extension method and the widths follow the described multiplier.
// The described circuit forms a double-width product and truncates it; here
// the product is formed at Z_width bits directly, which yields the same bits.
module sign_ext_mult
  import signed_mult_pkg::*;
#(
  parameter int unsigned A_width = A_WIDTH_DEFAULT,
  parameter int unsigned B_width = B_WIDTH_DEFAULT,
  parameter int unsigned Z_width = A_width + B_width
) (
  input  logic [A_width-1:0] a,
  input  logic [B_width-1:0] b,
  output logic [Z_width-1:0] z
);

  // Sign extension needs a product at least as wide as each operand.
  if (Z_width < A_width || Z_width < B_width) begin : g_bad_width
    $error("sign_ext_mult: Z_width (%0d) narrower than an operand", Z_width);
  end

  logic [Z_width-1:0] a_ext;
  logic [Z_width-1:0] b_ext;

  // Copy each operand's sign bit into every upper bit of the product width.
  always_comb begin
    a_ext = {{(Z_width - A_width){a[A_width-1]}}, a};
    b_ext = {{(Z_width - B_width){b[B_width-1]}}, b};
  end

  // Unsigned multiply of the widened operands; the context width Z_width keeps
  // only the low half of the full 2*Z_width-bit product.
  assign z = a_ext * b_ext;

endmodule
