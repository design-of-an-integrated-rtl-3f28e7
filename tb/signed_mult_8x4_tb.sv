// signed_mult_8x4_tb -- exhaustive test of the registered multiplier at
// 8 x 4 -> 12 bits.
//
// Streams all 4096 pairs of an 8-bit and a 4-bit two's complement operand
// through signed_mult, one pair per clock with en high, and checks each
// product two edges later against integer arithmetic. The worked examples
// -89 * 7 = -623 and -89 * -7 = +623 are among the pairs and are counted
// separately; both must be seen.
`timescale 1ns/1ps
module signed_mult_8x4_tb;
  localparam int unsigned AW = 8;
  localparam int unsigned BW = 4;
  localparam int unsigned ZW = AW + BW;

  logic          clk = 1'b0;
  logic          rst_an = 1'b0;
  logic          en = 1'b1;
  logic [AW-1:0] A = '0;
  logic [BW-1:0] B = '0;
  logic [ZW-1:0] Z;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_examples = 0;
  int pending[$];  // expected products, oldest first

  signed_mult #(.A_width(AW), .B_width(BW)) dut (
    .clk(clk), .rst_an(rst_an), .en(en), .A(A), .B(B), .Z(Z)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input int value, input int width);
    int shift = 32 - width;
    return (value <<< shift) >>> shift;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_an = 1'b1;
    // One pair per cycle; after the first edge that loads a pair, the
    // product on Z belongs to the pair presented one cycle earlier.
    for (int n = 0; n < 4096 + 2; n++) begin
      if (n < 4096) begin
        A = AW'(n >> BW);
        B = BW'(n);
        pending.push_back(sx(n >> BW, AW) * sx(n, BW));
      end else begin
        A = '0;
        B = '0;
      end
      @(posedge clk);
      #1;
      if (n >= 1 && n - 1 < 4096) begin
        automatic int expect_v = pending.pop_front();
        checks++;
        if (sx(int'(Z), ZW) != expect_v) begin
          failures++;
          $display("FAIL pair %0d: Z=%0d expected %0d", n - 1, sx(int'(Z), ZW), expect_v);
        end
        if ((Z == 12'b1101_1001_0001 && expect_v == -623) ||
            (Z == 12'b0010_0110_1111 && expect_v == 623 && sx((n - 1) >> BW, AW) == -89))
          n_examples++;
      end
    end
    checks++;
    if (n_examples < 2) begin
      failures++;
      $display("FAIL worked examples seen %0d times", n_examples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
