// Divide-by-64 chain of the LOCx2 PLL.
//
// Six toggle flip-flops in a ripple chain divide the 2.56 GHz VCO clock to
// 1.28 GHz, 640 MHz, 320 MHz, 160 MHz, 80 MHz and 40 MHz. The 40 MHz output
// is the PLL feedback to the phase-frequency detector; the others clock the
// serializer stages (1.28 GHz, 640 MHz, 320 MHz), the encoders (320 MHz) and
// the 640 MHz test clock output. After reset all outputs are low and rise
// together on the first VCO rising edge, so every rising edge of a slower
// clock coincides with a rising edge of each faster one. The /64 ratio
// follows the LOCx2 PLL; the ripple toggle structure is this design's choice.
module pll_div64 (
  input  logic clk_vco,     // 2.56 GHz
  input  logic rst_n,
  output logic clk_1g28,
  output logic clk_640,
  output logic clk_320,
  output logic clk_160,
  output logic clk_80,
  output logic clk_40       // feedback clock
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk_vco or negedge rst_n)
    if (!rst_n) clk_1g28 <= 1'b0; else clk_1g28 <= ~clk_1g28;
  always_ff @(posedge clk_1g28 or negedge rst_n)
    if (!rst_n) clk_640 <= 1'b0;  else clk_640 <= ~clk_640;
  always_ff @(posedge clk_640 or negedge rst_n)
    if (!rst_n) clk_320 <= 1'b0;  else clk_320 <= ~clk_320;
  always_ff @(posedge clk_320 or negedge rst_n)
    if (!rst_n) clk_160 <= 1'b0;  else clk_160 <= ~clk_160;
  always_ff @(posedge clk_160 or negedge rst_n)
    if (!rst_n) clk_80 <= 1'b0;   else clk_80 <= ~clk_80;
  always_ff @(posedge clk_80 or negedge rst_n)
    if (!rst_n) clk_40 <= 1'b0;   else clk_40 <= ~clk_40;
endmodule
