// Payload scrambler of the LOCic encoder.
//
// Self-synchronizing (multiplicative) scrambler x^58 + x^39 + 1 applied to
// the 112 payload bits of a frame, bit 111 first: s[k] = d[k] ^ s[k-39] ^ s[k-58],
// where s[] is the stream of scrambled payload bits. Header and trailer
// bits do not pass through it, so the history spans payload bits only,
// across frames. The whole payload is scrambled in one combinational step;
// the 58-bit history register advances when `advance` is high (once per frame).
// Scrambling the payload only follows LOCic; the polynomial and the
// self-synchronizing form are this design's choice. A receiver descrambles
// with d[k] = s[k] ^ s[k-39] ^ s[k-58] and needs no seed.
module scrambler
  import locx2_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     advance,
  input  payload_t din,
  output payload_t dout
);
  timeunit 1ps; timeprecision 1fs;

  // hist[0] is the most recent scrambled bit.
  logic [SCR_LEN-1:0] hist, hist_next;

  always_comb begin
    logic [SCR_LEN-1:0] h;
    logic               s;
    h = hist;
    for (int i = PAYLOAD_BITS-1; i >= 0; i--) begin
      s       = din[i] ^ h[SCR_TAP-1] ^ h[SCR_LEN-1];
      dout[i] = s;
      h       = {h[SCR_LEN-2:0], s};
    end
    hist_next = h;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       hist <= '0;
    else if (advance) hist <= hist_next;
endmodule
