// Testbench for frame_builder: after start, a new frame must be taken every
// 8 clocks, its first word must appear the clock after the take, and the
// eight words must be the frame MSB first; a missing frame gives an all-zero
// idle frame.
module tb_frame_builder;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;

  logic clk = 0, rst_n = 1, start = 0, frame_valid = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [7:0] header, crc;
  payload_t payload;
  logic take, running;
  word_t word;
  logic [2:0] word_idx;
  int checks = 0, failures = 0, nidle = 0;

  frame_builder dut (.clk, .rst_n, .start, .header, .payload, .crc, .frame_valid,
                     .take, .word, .word_idx, .running);

  always #1000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    header = '0; crc = '0; payload = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < 100; k++) begin
      // this cycle must be a take
      header = {4'b1010, 4'($urandom)};
      payload = {$urandom, $urandom, $urandom, $urandom};
      crc = 8'($urandom);
      frame_valid = (k % 10) != 5;
      f = frame_valid ? {header, payload, crc} : '0;
      if (!frame_valid) nidle++;
      checks++;
      if (take !== 1'b1) begin
        failures++;
        $display("FAIL frame %0d: no take", k);
      end
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        if (w == 0) begin header = '0; payload = '0; crc = '0; end
        checks++;
        if (word !== f[127 - 16*w -: 16] || word_idx !== 3'(w)) begin
          failures++;
          $display("FAIL frame %0d word %0d: %h idx %0d expected %h", k, w, word, word_idx, f[127-16*w -: 16]);
        end
        if (w < 7) begin
          checks++;
          if (take !== 1'b0) begin
            failures++;
            $display("FAIL frame %0d: take in word %0d", k, w);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
