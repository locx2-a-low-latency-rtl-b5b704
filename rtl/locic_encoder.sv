// LOCic encoder: one channel's line encoder, 320 MHz domain.
//
// Once per LHC clock `in_valid` writes the 112-bit payload and the BCR flag
// of that clock into a synchronous FIFO. The first write starts the frame
// builder; from then on, in the last cycle of every 8-cycle slot the
// builder takes the FIFO head: the PRBS generator steps (restarting on BCR)
// and yields the 4-bit BCID, the CRC generator computes the trailer over
// the raw payload, the scrambler scrambles the payload, and the builder
// registers the frame {1010, BCID, scrambled payload, CRC}. The frame leaves
// as eight 16-bit words on `word`, first word one cycle after the take.
// Latency from the write edge to the first word is two clocks. Unit list
// and frame format follow LOCic; the one-shot (whole-frame) CRC and
// scrambling, the FIFO depth and start-on-first-write are this design's choices.
module locic_encoder
  import locx2_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic       clk,          // 320 MHz
  input  logic       rst_n,
  input  logic       in_valid,     // one cycle per LHC clock
  input  logic       in_bcr,
  input  payload_t   in_payload,
  output word_t      word,
  output logic [2:0] word_idx,
  output logic       fifo_overflow,  // sticky
  output logic       fifo_underflow  // sticky: an idle frame was sent
);
  timeunit 1ps; timeprecision 1fs;

  fifo_entry_t wr_entry, head;
  logic        full, empty, take, running;
  logic [$clog2(FIFO_DEPTH+1)-1:0] count;
  logic [3:0]  bcid, bcid_next;
  payload_t    scrambled;
  logic [7:0]  crc;
  logic        pop;

  assign wr_entry = '{bcr: in_bcr, payload: in_payload};
  assign pop      = take && !empty;

  sync_fifo #(.WIDTH($bits(fifo_entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid && !full), .wr_data(wr_entry), .full,
    .rd_en(pop), .rd_data(head), .empty, .count);

  bcid_prbs u_prbs (.clk, .rst_n, .step(pop), .bcr(head.bcr), .bcid, .bcid_next);

  crc8 u_crc (.data(head.payload), .crc);

  scrambler u_scr (.clk, .rst_n, .advance(pop), .din(head.payload), .dout(scrambled));

  frame_builder u_fb (
    .clk, .rst_n, .start(in_valid),
    .header({HEADER_PATTERN, bcid_next}), .payload(scrambled), .crc,
    .frame_valid(!empty), .take, .word, .word_idx, .running);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fifo_overflow  <= 1'b0;
      fifo_underflow <= 1'b0;
    end else begin
      if (in_valid && full) fifo_overflow  <= 1'b1;
      if (take && empty)    fifo_underflow <= 1'b1;
    end
endmodule
