// PRBS generator of the LOCic encoder: the 4-bit encoded BCID of the header.
//
// Two LFSRs, PRBS7 (x^7+x^6+1) and PRBS5 (x^5+x^3+1), advance once per frame
// (`step`). A frame whose data was taken in the bunch-crossing-reset clock
// (`bcr` with `step`) restarts both at all-ones, so the state pair counts
// bunch crossings since BCR; the pair repeats only after lcm(127,31) = 3937
// frames, longer than the 3564-crossing orbit. The header field is
// bcid = {prbs7[1:0], prbs5[1:0]} of the state after the step; a receiver
// rebuilds both states from a few consecutive headers and looks the
// crossing number up. That the BCID is carried in 4 bits derived from two
// PRBSs follows LOCic; the polynomials, seeds and bit selection are this
// design's choice.
module bcid_prbs
  import locx2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       bcr,
  output logic [3:0] bcid,
  output logic [3:0] bcid_next   // field of the frame being taken now
);
  timeunit 1ps; timeprecision 1fs;

  logic [6:0] p7, p7_n;
  logic [4:0] p5, p5_n;

  always_comb begin
    if (bcr) begin
      p7_n = PRBS7_SEED;
      p5_n = PRBS5_SEED;
    end else begin
      p7_n = {p7[5:0], p7[6] ^ p7[5]};
      p5_n = {p5[3:0], p5[4] ^ p5[2]};
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p7 <= PRBS7_SEED;
      p5 <= PRBS5_SEED;
    end else if (step) begin
      p7 <= p7_n;
      p5 <= p5_n;
    end

  assign bcid      = {p7[1:0], p5[1:0]};
  assign bcid_next = {p7_n[1:0], p5_n[1:0]};
endmodule
