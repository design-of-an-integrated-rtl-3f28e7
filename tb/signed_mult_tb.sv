// signed_mult_tb -- end-to-end, self-checking testbench for the registered
// signed multiplier at its default size (16 x 8 -> 24 bits).
//
// Phases:
//   1. random stream: reset, then 100 random operand pairs, one per clock,
//      over the whole signed range of A and B. The expected products are
//      then searched for in the recorded output stream, wherever they appear,
//      and the position where they are found must correspond to a latency of
//      two clock edges; every output cycle is also compared directly.
//   2. extreme operands: the four corners of the operand range
//      (32767 * 127, -32768 * 127, -32768 * -128, 32767 * -128), which give
//      the largest positive and negative products.
//   3. pause and reset: a random stream with en dropped at random and the
//      asynchronous reset pulsed at random between clock edges.
// A reference pipeline in the testbench (two stages, advanced only when en
// is high, cleared by reset) holds integer products computed with the
// simulator's signed arithmetic; Z is compared with it after every edge.
// Each mechanism (pause while data is in flight, mid-stream reset, negative
// product, extreme corner) is counted and must occur at least once.
`timescale 1ns/1ps
module signed_mult_tb;
  import signed_mult_pkg::*;

  localparam int unsigned AW = A_WIDTH_DEFAULT;
  localparam int unsigned BW = B_WIDTH_DEFAULT;
  localparam int unsigned ZW = A_WIDTH_DEFAULT + B_WIDTH_DEFAULT;
  localparam int          LATENCY = 2;  // edges from operands to product on Z
  localparam int          N_RANDOM = 100;

  logic          clk = 1'b0;
  logic          rst_an = 1'b1;
  logic          en = 1'b1;
  logic [AW-1:0] A = '0;
  logic [BW-1:0] B = '0;
  logic [ZW-1:0] Z;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_pauses = 0, n_resets = 0, n_negative = 0, n_corners = 0, n_stream_found = 0;

  // Reference pipeline: stage 1 holds the operands, stage 2 their product.
  int ref_a = 0, ref_b = 0, ref_z = 0;

  // Recorded stream for the latency-agnostic search.
  int out_stream[$];
  int exp_stream[$];

  signed_mult dut (.clk(clk), .rst_an(rst_an), .en(en), .A(A), .B(B), .Z(Z));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input int value, input int width);
    int shift = 32 - width;
    return (value <<< shift) >>> shift;
  endfunction

  function automatic int z_int();
    return sx(int'(Z), ZW);
  endfunction

  // Compare Z with the reference pipeline.
  task automatic compare(input string what);
    checks++;
    if (z_int() != ref_z) begin
      failures++;
      $display("FAIL %s at cycle %0d: Z=%0d expected %0d", what, cycles, z_int(), ref_z);
    end
  endtask

  // Present one operand pair (and en) just after an edge, clock it, update the
  // reference pipeline and compare.
  task automatic step(input int a_i, input int b_i, input bit en_i, input string what);
    A = AW'(a_i);
    B = BW'(b_i);
    en = en_i;
    @(posedge clk);
    if (rst_an && en_i) begin
      ref_z = ref_a * ref_b;
      ref_a = sx(a_i, AW);
      ref_b = sx(b_i, BW);
    end else if (rst_an && (ref_a != 0 || ref_z != 0)) begin
      n_pauses++;  // paused with data in the pipeline
    end
    #1;
    if (ref_z < 0) n_negative++;
    compare(what);
  endtask

  task automatic do_reset();
    @(negedge clk) rst_an = 1'b0;
    #1;
    ref_a = 0; ref_b = 0; ref_z = 0;
    checks++;
    if (Z !== '0) begin
      failures++;
      $display("FAIL Z not cleared by asynchronous reset: %0d", z_int());
    end
    @(posedge clk) #1 rst_an = 1'b1;
    compare("after reset");
  endtask

  function automatic int rand_a();
    return sx(int'($urandom), AW);  // -32768 .. 32767
  endfunction

  function automatic int rand_b();
    return sx(int'($urandom), BW);  // -128 .. 127
  endfunction

  // Return the index in out_stream where exp_stream occurs, or -1.
  function automatic int search_stream();
    for (int i = 0; i + exp_stream.size() <= out_stream.size(); i++) begin
      bit match = 1'b1;
      for (int j = 0; j < exp_stream.size(); j++)
        if (out_stream[i + j] != exp_stream[j]) begin
          match = 1'b0;
          break;
        end
      if (match) return i;
    end
    return -1;
  endfunction

  initial begin
    int pos;
    // ---- 1. random stream -------------------------------------------------
    do_reset();
    out_stream.delete();
    exp_stream.delete();
    for (int n = 0; n < N_RANDOM + LATENCY; n++) begin
      automatic int a_i = rand_a();
      automatic int b_i = rand_b();
      if (n < N_RANDOM) exp_stream.push_back(a_i * b_i);
      step(a_i, b_i, 1'b1, "random stream");
      out_stream.push_back(z_int());
    end
    // out_stream[k] is Z after the (k+1)-th edge since the first pair was
    // presented, so a match at index k means a latency of k+1 edges.
    pos = search_stream();
    checks++;
    if (pos < 0) begin
      failures++;
      $display("FAIL expected products not found in the output stream");
    end else begin
      n_stream_found++;
      $display("random stream found at latency %0d edges", pos + 1);
      if (pos + 1 != LATENCY) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", pos + 1, LATENCY);
      end
    end

    // ---- 2. extreme operands ---------------------------------------------
    do_reset();
    step(32767, 127, 1'b1, "corner");
    step(-32768, 127, 1'b1, "corner");
    step(-32768, -128, 1'b1, "corner");
    step(32767, -128, 1'b1, "corner");
    for (int n = 0; n < LATENCY; n++) step(0, 0, 1'b1, "corner flush");
    // Check the corner products explicitly as well as through the model.
    do_reset();
    begin
      automatic int corner_a[4] = '{32767, -32768, -32768, 32767};
      automatic int corner_b[4] = '{127, 127, -128, -128};
      automatic int corner_z[4] = '{4161409, -4161536, 4194304, -4194176};
      for (int k = 0; k < 4 + LATENCY; k++) begin
        step(k < 4 ? corner_a[k] : 0, k < 4 ? corner_b[k] : 0, 1'b1, "corner");
        if (k >= LATENCY - 1 && k - (LATENCY - 1) < 4) begin
          checks++;
          if (z_int() != corner_z[k - (LATENCY - 1)]) begin
            failures++;
            $display("FAIL corner %0d: Z=%0d expected %0d", k - (LATENCY - 1), z_int(),
                     corner_z[k - (LATENCY - 1)]);
          end else n_corners++;
        end
      end
    end

    // ---- 3. pause and reset ----------------------------------------------
    do_reset();
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 99) == 0) begin
        do_reset();
        n_resets++;
      end
      step(rand_a(), rand_b(), ($urandom_range(0, 3) != 0), "pause/reset stream");
    end

    // ---- coverage of the mechanisms --------------------------------------
    $display("pauses=%0d resets=%0d negative=%0d corners=%0d stream_found=%0d cycles=%0d",
             n_pauses, n_resets, n_negative, n_corners, n_stream_found, cycles);
    checks++;
    if (n_pauses == 0 || n_resets == 0 || n_negative == 0 || n_corners != 4 ||
        n_stream_found == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
