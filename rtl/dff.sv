// dff: positive edge-triggered D flip-flop with true and inverted outputs.
//
// q takes the value of d at every rising edge of clk; q_bar is its
// complement. The original cell is a master-slave pair of gated D latches;
// this RTL describes the same edge-triggered behaviour directly. The
// active-low asynchronous reset rst_n (q = 0) is an addition of this RTL:
// the original flip-flop has no reset, but the accumulator must start from a
// known phase in a two-state simulation and after power-up.
module dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic q_bar
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign q_bar = ~q;
endmodule
