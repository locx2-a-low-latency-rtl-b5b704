// 16:1 serializer: 16 bits at 320 MHz in, 5.12 Gbps serial out, MSB first.
//
// Four stages of 2:1 multiplexer cells (ser_mux2) form a binary tree:
// 8 cells clocked at 320 MHz, 4 at 640 MHz, 2 at 1.28 GHz and 1 at 2.56 GHz.
// Every cell sends one input while its clock is high and the other while it
// is low, so each stage doubles the bit rate. Cell j of a stage with M cells
// takes lanes j and j+M of the stage before it; with input lane k carrying
// d[15-k], the output order is d[15], d[14], ..., d[0]. The four clocks
// must be the aligned outputs of the PLL's divider chain (all rising
// together at the 320 MHz edge). A word captured at a 320 MHz rising edge
// starts leaving about one 320 MHz period later. The four-stage binary tree
// of flip-flop based 2:1 multiplexers follows the LOCx2 serializer; the lane
// order and the cell circuit are this design's choice.
module serializer16
  import locx2_pkg::*;
(
  input  logic  clk320,
  input  logic  clk640,
  input  logic  clk1g28,
  input  logic  clk2g56,
  input  word_t d,
  output logic  sout
);
  timeunit 1ps; timeprecision 1fs;

  logic [15:0] l0;
  logic [7:0]  l1;
  logic [3:0]  l2;
  logic [1:0]  l3;

  for (genvar k = 0; k < 16; k++) begin : g_in
    assign l0[k] = d[15-k];
  end

  for (genvar j = 0; j < 8; j++) begin : g_s1
    ser_mux2 u (.clk(clk320),  .a(l0[j]), .b(l0[j+8]), .y(l1[j]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_s2
    ser_mux2 u (.clk(clk640),  .a(l1[j]), .b(l1[j+4]), .y(l2[j]));
  end
  for (genvar j = 0; j < 2; j++) begin : g_s3
    ser_mux2 u (.clk(clk1g28), .a(l2[j]), .b(l2[j+2]), .y(l3[j]));
  end
  ser_mux2 u_s4 (.clk(clk2g56), .a(l3[0]), .b(l3[1]), .y(sout));
endmodule
