// io_reg -- enabled register with an asynchronous active-low reset.
//
// The multiplier registers its operands at its inputs and its product at its
// output, so that the only timing path left inside is one full clock cycle
// through the multiply logic, and the buses that bring the operands in and
// take the product away see a plain flip-flop. This module is that register.
//
// Interface: q clears to zero at once when rst_an falls and stays zero while
// rst_an is low. Otherwise q takes d on each rising edge of clk at which en
// is high, and holds its value when en is low ("pauses the system").
//
// Timing: one cycle from d to q. The reset value, the asynchronous active-low
// reset and the enable follow the multiplier as described; putting the
// register in a module of its own is this design's choice.
//
// Lint reports rst_an as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the assertion below,
// which is not logic.
module io_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_an,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_an) begin
    if (!rst_an) begin
      q <= '0;
    end else if (en) begin
      q <= d;
    end
  end

  // A register that is not enabled must keep its value; only a reset, which
  // may pulse between two edges, can clear it.
  hold_when_paused: assert property (
    @(posedge clk) disable iff (!rst_an) !en |=> ($stable(q) || q == '0)
  ) else $error("io_reg: q changed while en was low");

endmodule
