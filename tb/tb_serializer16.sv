// Testbench for serializer16: random 16-bit words are presented at each
// 320 MHz rising edge; the serial output is sampled in the middle of every
// 195.3125 ps bit and must reproduce the words MSB first. A word presented
// at edge t0 is captured at t0 + 3125 ps and passes half a clock period of
// the 640 MHz, 1.28 GHz and 2.56 GHz stages (1562.5 + 781.25 + 390.625 ps),
// so its first bit must start at t0 + 5859.375 ps. The clocks come from the
// divider chain, as in the chip.
module tb_serializer16;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;

  logic clk_vco = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic clk_1g28, clk_640, clk_320, clk_160, clk_80, clk_40;
  word_t d;
  logic sout;
  int checks = 0, failures = 0;

  pll_div64 u_div (.clk_vco, .rst_n, .clk_1g28, .clk_640, .clk_320, .clk_160, .clk_80, .clk_40);
  serializer16 dut (.clk320(clk_320), .clk640(clk_640), .clk1g28(clk_1g28), .clk2g56(clk_vco),
                    .d, .sout);

  always #195.3125 clk_vco = ~clk_vco;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { word_t w; realtime t0; } ev_t;
  ev_t q[$];

  initial begin
    d = '0;
    #1000;
    @(negedge clk_vco);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      word_t v;
      @(posedge clk_320);
      v = (k % 50 == 3) ? 16'hAAAA : (k % 50 == 4) ? 16'h0001 : 16'($urandom);
      d <= v;
      q.push_back('{w: v, t0: $realtime});
    end
  end

  initial begin
    ev_t e;
    realtime tb;
    wait (rst_n);
    for (int k = 0; k < 280; k++) begin
      wait (q.size() > 0);
      e = q.pop_front();
      tb = e.t0 + 5859.375;
      #(tb - $realtime + 97.65625);   // middle of the first bit
      for (int i = 15; i >= 0; i--) begin
        checks++;
        if (sout !== e.w[i]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d (%h) bit %0d at %t", k, e.w, i, $realtime);
        end
        if (i > 0) #195.3125;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
