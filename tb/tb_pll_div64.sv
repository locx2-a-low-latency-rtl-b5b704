// Testbench for pll_div64: counts rising edges of every output against the
// VCO edges (ratios 2, 4, 8, 16, 32, 64), and checks that at every 40 MHz
// rising edge all faster outputs rise in the same time step.
module tb_pll_div64;
  timeunit 1ps; timeprecision 1fs;

  logic clk_vco = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic clk_1g28, clk_640, clk_320, clk_160, clk_80, clk_40;
  int checks = 0, failures = 0;
  int n[7];
  realtime last[7];

  pll_div64 dut (.clk_vco, .rst_n, .clk_1g28, .clk_640, .clk_320, .clk_160, .clk_80, .clk_40);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    #195.3125 clk_vco = ~clk_vco;
  end

  always @(posedge clk_vco)  begin n[0]++; last[0] = $realtime; end
  always @(posedge clk_1g28) begin n[1]++; last[1] = $realtime; end
  always @(posedge clk_640)  begin n[2]++; last[2] = $realtime; end
  always @(posedge clk_320)  begin n[3]++; last[3] = $realtime; end
  always @(posedge clk_160)  begin n[4]++; last[4] = $realtime; end
  always @(posedge clk_80)   begin n[5]++; last[5] = $realtime; end
  always @(posedge clk_40)   begin
    n[6]++; last[6] = $realtime;
    #1;
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (last[i] != last[6]) begin
        failures++;
        $display("FAIL output %0d not aligned with 40 MHz edge at %t", i, $realtime);
      end
    end
  end

  initial begin
    #1000;
    checks++;
    if (clk_1g28 || clk_640 || clk_320 || clk_40) begin
      failures++; $display("FAIL outputs not low in reset");
    end
    @(negedge clk_vco);
    rst_n = 1;
    for (int i = 0; i < 7; i++) n[i] = 0;
    repeat (64 * 20) @(posedge clk_vco);
    #1;
    for (int i = 1; i < 7; i++) begin
      checks++;
      if (n[i] != n[0] / (1 << i)) begin
        failures++;
        $display("FAIL output %0d: %0d edges for %0d VCO edges", i, n[i], n[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
