// LOCx2: two-channel, 2 x 5.12 Gbps low-latency transmitter.
//
// Each LHC clock (40 MHz), each channel takes a 112-bit payload from two
// ADC chips (4 samples of 12 bits + 8 calibration bits per chip), encodes
// it as a 128-bit LOCic frame (header 1010 + 4-bit BCID code, scrambled
// payload, CRC-8) and sends it on one 5.12 Gbps serial line: 16 bits of
// overhead per 112, 14.3 %. A shared PLL multiplies the 40 MHz reference to
// 2.56 GHz; its /64 chain supplies 1.28 GHz, 640 MHz and 320 MHz to the
// serializer trees, 320 MHz to the encoders and 640 MHz to the test clock
// pin. A shared I2C slave holds the 16-bit configuration registers;
// register 0 programs the PLL.
//
// Timing: ADC words and BCR are sampled in the 320 MHz domain one 320 MHz
// period after each rising edge of the divided 40 MHz clock (which the PLL
// aligns to `ref_clk40`), so they must be stable around that point; the
// test drives them at the falling edge of the reference. The first bit of
// the frame leaves about 12 ns after the sampling reference edge and the
// last bit 25 ns after the first. The CML line drivers, SLVS receivers and
// pads are analog and are outside this module: `ser_out` goes to the line
// drivers, the inputs come from the receivers.
//
// Block structure, rates and frame format follow LOCx2; the sampling point,
// the parallel ADC interface, the register map and the status outputs are
// this design's choices.
module locx2_top
  import locx2_pkg::*;
#(
  parameter int unsigned NCH      = 2,
  parameter logic [6:0]  I2C_ADDR = 7'h20
) (
  input  logic                          ref_clk40,
  input  logic                          rst_n,
  input  logic                          bcr,
  input  adc_word_t [NCH-1:0][1:0]      adc_word,
  input  logic                          scl,
  input  logic                          sda_in,
  output logic                          sda_oe,
  output logic [NCH-1:0]                ser_out,
  output logic                          test_clk640,
  output logic                          pll_lock,
  output logic [NCH-1:0]                fifo_overflow,
  output logic [NCH-1:0]                fifo_underflow
);
  timeunit 1ps; timeprecision 1fs;

  logic [NREG-1:0][15:0] regs;
  pll_cfg_t pll_cfg;
  logic clk_vco, clk_1g28, clk_640, clk_320, clk_160, clk_80, clk_40;
  logic c40_q, frame_strobe;

  i2c_slave #(.I2C_ADDR(I2C_ADDR), .NREGS(NREG)) u_i2c (
    .clk(ref_clk40), .rst_n, .scl, .sda_in, .sda_oe, .regs);

  assign pll_cfg = pll_cfg_t'(regs[0]);

  pll_analog u_pll (
    .ref_clk(ref_clk40), .fb_clk(clk_40),
    .vco_band(pll_cfg.vco_band), .cp_cur(pll_cfg.cp_cur),
    .lpf_bw(pll_cfg.lpf_bw), .lpf_3rd(pll_cfg.lpf_3rd),
    .vco_clk(clk_vco), .locked(pll_lock));

  pll_div64 u_div (
    .clk_vco, .rst_n, .clk_1g28, .clk_640, .clk_320, .clk_160, .clk_80, .clk_40);

  assign test_clk640 = clk_640;

  // One strobe per LHC clock in the 320 MHz domain, one 320 MHz period
  // after the divided 40 MHz clock rises.
  always_ff @(posedge clk_320 or negedge rst_n)
    if (!rst_n) c40_q <= 1'b0;
    else        c40_q <= clk_40;
  assign frame_strobe = clk_40 && !c40_q;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    word_t      word;
    logic [2:0] word_idx;

    locic_encoder u_enc (
      .clk(clk_320), .rst_n,
      .in_valid(frame_strobe), .in_bcr(bcr),
      .in_payload({adc_word[ch][0], adc_word[ch][1]}),
      .word, .word_idx,
      .fifo_overflow(fifo_overflow[ch]), .fifo_underflow(fifo_underflow[ch]));

    serializer16 u_ser (
      .clk320(clk_320), .clk640(clk_640), .clk1g28(clk_1g28), .clk2g56(clk_vco),
      .d(word), .sout(ser_out[ch]));
  end
endmodule
