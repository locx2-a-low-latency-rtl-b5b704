// Frame builder of the LOCic encoder.
//
// Builds the 128-bit frame {header, scrambled payload, CRC} and sends it as
// eight 16-bit words, one per 320 MHz clock, first word = frame bits
// [127:112]. After `start` the builder runs a free cadence of 8-cycle frame
// slots; `take` is high in the last cycle of each slot, and at that edge the
// next frame is loaded and its first word appears on `word` one cycle later
// (so `take` is also the request to the FIFO). If `frame_valid` is low at a
// take, an all-zero idle frame is sent, which a receiver rejects because its
// header lacks the 1010 pattern. The frame layout follows LOCic; the
// cadence, the idle frame and the start handshake are this design's choice.
module frame_builder
  import locx2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,        // begin the frame cadence (ignored once running)
  input  logic [7:0] header,
  input  payload_t   payload,      // already scrambled
  input  logic [7:0] crc,
  input  logic       frame_valid,
  output logic       take,         // loading a new frame at this edge
  output word_t      word,         // to the serializer
  output logic [2:0] word_idx,     // index of `word` in its frame
  output logic       running
);
  timeunit 1ps; timeprecision 1fs;

  logic [FRAME_BITS-WORD_BITS-1:0] rest;   // words not yet sent
  frame_t                          frame;

  assign frame = {header, payload, crc};
  assign take  = running && (word_idx == 3'd7);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running  <= 1'b0;
      word_idx <= 3'd0;
      word     <= '0;
      rest     <= '0;
    end else if (!running) begin
      if (start) begin
        running  <= 1'b1;
        word_idx <= 3'd7;          // next edge is a take
      end
    end else if (take) begin
      word_idx <= 3'd0;
      {word, rest} <= frame_valid ? frame : '0;
    end else begin
      word_idx <= word_idx + 3'd1;
      word     <= rest[FRAME_BITS-WORD_BITS-1 -: WORD_BITS];
      rest     <= rest << WORD_BITS;
    end
endmodule
