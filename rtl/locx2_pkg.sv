// Shared constants and types of the LOCx2 two-channel 5.12 Gbps transmitter.
//
// A LOCic frame is what one channel sends in one 40 MHz LHC clock period:
// 128 bits = 8-bit header + 112-bit payload + 8-bit CRC trailer, sent as
// eight 16-bit words at 320 MHz and serialized MSB first at 5.12 Gbps.
// The frame format, its sizes and the header pattern "1010" follow the
// LOCic definition; the CRC polynomial, the scrambler polynomial and the
// two BCID PRBS polynomials are this design's own choices (the line code
// definition names these functions without giving their equations).
package locx2_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned FRAME_BITS   = 128;
  localparam int unsigned HEADER_BITS  = 8;
  localparam int unsigned PAYLOAD_BITS = 112;
  localparam int unsigned CRC_BITS     = 8;
  localparam int unsigned WORD_BITS    = 16;   // serializer parallel width
  localparam int unsigned WORDS_PER_FRAME = FRAME_BITS / WORD_BITS;  // 8

  // Header: fixed pattern followed by the 4-bit encoded BCID.
  localparam logic [3:0] HEADER_PATTERN = 4'b1010;

  // CRC-8, polynomial x^8 + x^2 + x + 1, initial value 0, payload MSB first.
  localparam logic [7:0] CRC8_POLY = 8'h07;

  // Self-synchronizing payload scrambler x^58 + x^39 + 1.
  localparam int unsigned SCR_LEN  = 58;
  localparam int unsigned SCR_TAP  = 39;

  // BCID PRBS generators: PRBS7 (x^7+x^6+1) and PRBS5 (x^5+x^3+1), both
  // restarted at all-ones by BCR. lcm(127,31) = 3937 > 3564 bunch crossings,
  // so the pair of states identifies the bunch crossing within an orbit.
  localparam logic [6:0] PRBS7_SEED = 7'h7F;
  localparam logic [4:0] PRBS5_SEED = 5'h1F;
  localparam int unsigned ORBIT_BC  = 3564;

  // One ADC chip contributes 4 channels x 12 bits plus 8 calibration bits
  // per LHC clock; two chips fill the 112-bit payload of one channel.
  localparam int unsigned ADC_CH_PER_CHIP = 4;
  localparam int unsigned ADC_BITS        = 12;
  localparam int unsigned ADC_CAL_BITS    = 8;
  localparam int unsigned ADC_WORD_BITS   = ADC_CH_PER_CHIP*ADC_BITS + ADC_CAL_BITS; // 56

  typedef logic [PAYLOAD_BITS-1:0] payload_t;
  typedef logic [FRAME_BITS-1:0]   frame_t;
  typedef logic [WORD_BITS-1:0]    word_t;
  typedef logic [ADC_WORD_BITS-1:0] adc_word_t;

  // One FIFO entry: the payload of one LHC clock and the BCR flag of that clock.
  typedef struct packed {
    logic     bcr;
    payload_t payload;
  } fifo_entry_t;

  // Configuration register 0: PLL settings.
  typedef struct packed {
    logic [5:0] reserved;
    logic       lpf_3rd;     // 1: 3rd-order loop filter, 0: 2nd-order
    logic [2:0] lpf_bw;      // loop bandwidth code, 0.5 .. 2.5 MHz
    logic [3:0] cp_cur;      // charge-pump current code
    logic [1:0] vco_band;    // LC-VCO tuning band
  } pll_cfg_t;

  localparam pll_cfg_t PLL_CFG_DEFAULT = '{reserved: '0, lpf_3rd: 1'b1,
                                           lpf_bw: 3'd3, cp_cur: 4'd8, vco_band: 2'd2};
  localparam int unsigned NREG = 4;
endpackage
