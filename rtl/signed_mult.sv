// signed_mult -- registered two's complement multiplier.
//
// Multiplies a signed A_width-bit operand A by a signed B_width-bit operand B
// and delivers the signed Z_width-bit product on Z. Both operands are
// captured in input registers (Areg, Breg), the product of the registered
// operands is formed by the sign-extension multiplier (sign_ext_mult) and is
// captured in the output register (Zreg). Registering every input and output
// leaves one full clock cycle for the multiply logic and keeps the delay of
// the buses outside out of that path.
//
// Interface:
//   clk     rising-edge clock
//   rst_an  asynchronous, active-low reset; clears Areg, Breg and Zreg
//   en      enable; while low all three registers hold, pausing the pipeline
//   A, B    signed operands
//   Z       registered signed product A*B
//
// Timing: a new operand pair may be presented every cycle. Its product is on
// Z after the second rising edge of clk at which en is high: the first edge
// loads Areg/Breg, the second loads Zreg. After reset Z reads zero.
//
// Structure, widths (16 x 8 -> 24 bits), reset and enable follow the
// described multiplier; splitting it into a register module and a
// multiplier core is this design's own choice.
module signed_mult
  import signed_mult_pkg::*;
#(
  parameter int unsigned A_width = A_WIDTH_DEFAULT,
  parameter int unsigned B_width = B_WIDTH_DEFAULT,
  parameter int unsigned Z_width = A_width + B_width
) (
  input  logic               clk,
  input  logic               rst_an,
  input  logic               en,
  input  logic [A_width-1:0] A,
  input  logic [B_width-1:0] B,
  output logic [Z_width-1:0] Z
);

  logic [A_width-1:0] a_q;      // Areg
  logic [B_width-1:0] b_q;      // Breg
  logic [Z_width-1:0] product;  // combinational product of the registered operands

  io_reg #(.WIDTH(A_width)) u_areg (
    .clk(clk), .rst_an(rst_an), .en(en), .d(A), .q(a_q)
  );

  io_reg #(.WIDTH(B_width)) u_breg (
    .clk(clk), .rst_an(rst_an), .en(en), .d(B), .q(b_q)
  );

  sign_ext_mult #(.A_width(A_width), .B_width(B_width), .Z_width(Z_width)) u_mult (
    .a(a_q), .b(b_q), .z(product)
  );

  io_reg #(.WIDTH(Z_width)) u_zreg (
    .clk(clk), .rst_an(rst_an), .en(en), .d(product), .q(Z)
  );

endmodule
