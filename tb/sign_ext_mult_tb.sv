// sign_ext_mult_tb -- self-checking testbench for the sign-extension
// multiplier core.
//
// Two instances are tested against products computed with the simulator's
// own signed integer arithmetic:
//   * an 8 x 4 -> 12-bit core over every one of its 4096 operand pairs,
//     including the worked cases -89 * 7 = -623 (12'b1101_1001_0001) and
//     -89 * -7 = +623 (12'b0010_0110_1111), and 167 * 7 = 1169 where the
//     8-bit pattern 1010_0111 must be read as -89, not as 167;
//   * the default 16 x 8 -> 24-bit core over its four extreme corners and
//     5000 random operand pairs.
`timescale 1ns/1ps
module sign_ext_mult_tb;
  import signed_mult_pkg::*;

  localparam int unsigned AW = A_WIDTH_DEFAULT;
  localparam int unsigned BW = B_WIDTH_DEFAULT;
  localparam int unsigned ZW = A_WIDTH_DEFAULT + B_WIDTH_DEFAULT;

  int checks = 0;
  int failures = 0;

  // Small instance.
  logic [7:0]  sa;
  logic [3:0]  sb;
  logic [11:0] sz;
  sign_ext_mult #(.A_width(8), .B_width(4)) dut_small (.a(sa), .b(sb), .z(sz));

  // Default-size instance.
  logic [AW-1:0] a;
  logic [BW-1:0] b;
  logic [ZW-1:0] z;
  sign_ext_mult dut (.a(a), .b(b), .z(z));

  function automatic int sx(input int value, input int width);
    // Sign-extend the low 'width' bits of value to an int.
    int shift = 32 - width;
    return (value <<< shift) >>> shift;
  endfunction

  task automatic check_small(input int ai, input int bi);
    int expect_v;
    sa = 8'(ai); sb = 4'(bi);
    #1;
    expect_v = sx(ai, 8) * sx(bi, 4);
    checks++;
    if (sx(int'(sz), 12) != expect_v) begin
      failures++;
      $display("FAIL 8x4: %0d * %0d = %0d, got %0d (%b)", sx(ai, 8), sx(bi, 4), expect_v,
               sx(int'(sz), 12), sz);
    end
  endtask

  task automatic check_full(input int ai, input int bi);
    longint expect_v;
    a = AW'(ai); b = BW'(bi);
    #1;
    expect_v = longint'(sx(ai, AW)) * longint'(sx(bi, BW));
    checks++;
    if (longint'(sx(int'(z), ZW)) != expect_v) begin
      failures++;
      $display("FAIL %0dx%0d: %0d * %0d = %0d, got %0d", AW, BW, sx(ai, AW), sx(bi, BW),
               expect_v, sx(int'(z), ZW));
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked examples, with their bit patterns spelled out.
    sa = 8'b1010_0111; sb = 4'b0111; #1;
    checks++;
    if (sz !== 12'b1101_1001_0001) begin
      failures++; $display("FAIL -89*7: got %b", sz);
    end
    sa = 8'b1010_0111; sb = 4'b1001; #1;
    checks++;
    if (sz !== 12'b0010_0110_1111) begin
      failures++; $display("FAIL -89*-7: got %b", sz);
    end
    // Exhaustive 8 x 4.
    for (int ai = 0; ai < 256; ai++)
      for (int bi = 0; bi < 16; bi++)
        check_small(ai, bi);
    // Extreme corners of 16 x 8.
    check_full(32767, 127);
    check_full(-32768, 127);
    check_full(-32768, -128);
    check_full(32767, -128);
    // Random 16 x 8.
    repeat (5000) check_full(int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
