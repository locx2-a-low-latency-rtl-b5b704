// Testbench for locic_encoder: one payload per 8 clocks with BCRs at chosen
// crossings. Every output frame is decoded by a reference receiver: header
// pattern, BCID code against the crossing count since BCR, descrambled
// payload against what was sent, and CRC against a long-division CRC of it.
// The first word of a frame must be on the output right after the second
// rising edge counted from the one that wrote its payload (write, take).
module tb_locic_encoder;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  logic clk = 0, rst_n = 1, in_valid = 0, in_bcr = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  payload_t in_payload;
  word_t word;
  logic [2:0] word_idx;
  logic ovf, unf;
  int checks = 0, failures = 0;

  locic_encoder dut (.clk, .rst_n, .in_valid, .in_bcr, .in_payload, .word, .word_idx,
                     .fifo_overflow(ovf), .fifo_underflow(unf));

  always #1562.5 clk = ~clk;   // 320 MHz

  typedef struct { payload_t p; int n; int t; } sent_t;
  sent_t sent[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: write on cycles 3 mod 8
  initial begin
    int n;
    in_payload = '0;
    n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = 0;
      repeat (7) @(negedge clk);
      in_valid = 1;
      in_bcr = (k == 10 || k == 300);
      if (in_bcr) n = 0; else n++;
      in_payload = (k % 37 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      sent.push_back('{p: in_payload, n: n, t: cyc + 1});
    end
    @(negedge clk);
    in_valid = 0;
  end

  // reference receiver
  initial begin
    frame_t f;
    scr_hist_t h;
    sent_t s;
    payload_t d;
    int nframes, t0;
    h = '0;
    nframes = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (word_idx == 3'd0 && dut.u_fb.running && sent.size() > 0) begin
        t0 = cyc;
        f[127:112] = word;
        for (int w = 1; w < 8; w++) begin
          @(negedge clk);
          f[127 - 16*w -: 16] = word;
        end
        s = sent.pop_front();
        d = descramble(f[119:8], h);
        checks++;
        if (f[127:124] !== 4'b1010) begin
          failures++; $display("FAIL frame %0d header %h", nframes, f[127:120]);
        end
        if (nframes >= 10) begin
          checks++;
          if (f[123:120] !== bcid_code(s.n)) begin
            failures++; $display("FAIL frame %0d bcid %h expected %h (n=%0d)", nframes, f[123:120], bcid_code(s.n), s.n);
          end
        end
        checks++;
        if (d !== s.p) begin
          failures++; $display("FAIL frame %0d payload %h expected %h", nframes, d, s.p);
        end
        checks++;
        if (f[7:0] !== crc8_ref(s.p)) begin
          failures++; $display("FAIL frame %0d crc %h expected %h", nframes, f[7:0], crc8_ref(s.p));
        end
        checks++;
        if (t0 - s.t != 1) begin
          failures++; $display("FAIL frame %0d latency %0d clocks", nframes, t0 - s.t);
        end
        nframes++;
        if (nframes == 400) begin
          checks++;
          if (ovf || unf) begin
            failures++; $display("FAIL FIFO flags ovf=%b unf=%b", ovf, unf);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
