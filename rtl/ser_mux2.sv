// 2:1 multiplexer cell of the serializer tree, built on flip-flops.
//
// Inputs a and b each carry one bit per period of `clk`. On the rising edge
// both are captured; b is captured again on the falling edge so that it is
// stable through the low phase. The output shows a while clk is high and b
// while it is low, so it carries two bits per clock period: a0 b0 a1 b1 ...,
// one clock period after the inputs were captured. This is the half-rate
// (both-edge) form of a flip-flop based 2:1 multiplexer; the exact cell
// circuit is this design's choice.
module ser_mux2 (
  input  logic clk,
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ps; timeprecision 1fs;

  logic ra, rb, rbn;

  always_ff @(posedge clk) begin
    ra <= a;
    rb <= b;
  end

  always_ff @(negedge clk) rbn <= rb;

  assign y = clk ? ra : rbn;
endmodule
