// io_reg_tb -- self-checking testbench for io_reg.
//
// Drives random data, random enables and asynchronous resets (asserted
// between clock edges) into a 12-bit io_reg and compares q after every event
// with a reference value kept in the testbench: cleared by reset, loaded when
// en is high at a rising edge, unchanged otherwise. It also checks that reset
// takes effect before the next clock edge.
`timescale 1ns/1ps
module io_reg_tb;
  localparam int unsigned W = 12;

  logic         clk = 1'b0;
  logic         rst_an = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] model = '0;
  int           checks = 0;
  int           failures = 0;
  int           loads = 0, holds = 0, resets = 0;

  io_reg #(.WIDTH(W)) dut (.clk(clk), .rst_an(rst_an), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %0t", what, q, model, $time);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initial asynchronous reset.
    #2 rst_an = 1'b0;
    #1 model = '0;
    check("reset asserted without clock");
    @(posedge clk); #1 rst_an = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      // Inputs change just after the rising edge.
      @(posedge clk); #1;
      check("after edge");
      if ($urandom_range(0, 49) == 0) begin
        // Asynchronous reset in the middle of a clock period.
        #2 rst_an = 1'b0;
        #1 model = '0; resets++;
        check("async reset");
        @(negedge clk) rst_an = 1'b1;
        #1;
      end
      en = ($urandom_range(0, 3) != 0);
      d  = W'($urandom);
      // Model the next edge.
      @(posedge clk);
      if (rst_an && en) begin model = d; loads++; end
      else if (rst_an) holds++;
      #0;
      @(negedge clk);
      check("after load/hold");
      // Go back so the next iteration begins just after an edge.
    end
    if (loads == 0 || holds == 0 || resets == 0) begin
      failures++;
      $display("FAIL not every case exercised: loads=%0d holds=%0d resets=%0d", loads, holds, resets);
    end
    $display("loads=%0d holds=%0d resets=%0d", loads, holds, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
