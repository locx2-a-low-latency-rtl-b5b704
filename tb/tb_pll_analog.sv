// Testbench for the PLL model closed through the real divider chain:
// with the default settings (band 2) the loop must lock within the
// acquisition time plus a few cycles, the VCO period must be 390.625 ps and
// the 40 MHz feedback edges must coincide with the reference edges.
// Switching to band 0 (top 2.20 GHz) must drop lock and leave the VCO at the
// band's top frequency; switching back must lock again.
module tb_pll_analog;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [1:0] vco_band = 2'd2;
  logic [3:0] cp_cur = 4'd8;
  logic [2:0] lpf_bw = 3'd3;
  logic lpf_3rd = 1'b1;
  logic vco_clk, locked;
  logic clk_1g28, clk_640, clk_320, clk_160, clk_80, clk_40;
  int checks = 0, failures = 0, nref = 0;

  pll_analog dut (.ref_clk, .fb_clk(clk_40), .vco_band, .cp_cur, .lpf_bw, .lpf_3rd, .vco_clk, .locked);
  pll_div64 u_div (.clk_vco(vco_clk), .rst_n, .clk_1g28, .clk_640, .clk_320, .clk_160, .clk_80, .clk_40);

  always #12500 ref_clk = ~ref_clk;
  always @(posedge ref_clk) nref++;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", msg, $realtime);
    end
  endtask

  // average VCO period over 640 cycles, in ps
  task automatic vco_period(output real p);
    realtime t0;
    @(posedge vco_clk);
    t0 = $realtime;
    repeat (640) @(posedge vco_clk);
    p = ($realtime - t0) / 640.0;
  endtask

  initial begin
    real p;
    int n0;
    realtime tr;
    #20000 rst_n = 1;
    check(!locked, "locked before any reference edge");
    // default bandwidth code 3, cp 8, 3rd order: 4/(1.357 MHz)*40*1.25 = 147 cycles
    n0 = nref;
    wait (locked);
    check(nref - n0 > 100 && nref - n0 < 200, $sformatf("lock after %0d reference cycles", nref - n0));
    vco_period(p);
    check(p > 390.62 && p < 390.63, $sformatf("VCO period %f ps", p));
    repeat (20) begin
      @(posedge ref_clk);
      tr = $realtime;
      #1;
      check(clk_40 && clk_320, "feedback edge aligned with reference");
    end
    // band 0 cannot reach 2.56 GHz
    @(negedge ref_clk);
    vco_band = 2'd0;
    repeat (3) @(posedge ref_clk);
    #20000;
    check(!locked, "still locked in band 0");
    vco_period(p);
    check(p > 454.5 && p < 454.6, $sformatf("band 0 VCO period %f ps, expected 454.545", p));
    repeat (300) @(posedge ref_clk);
    check(!locked, "locked in band 0");
    @(negedge ref_clk);
    vco_band = 2'd2;
    lpf_bw = 3'd7;      // 2.5 MHz: 4/2.5*40*1.25 = 80 cycles
    n0 = nref;
    wait (locked);
    check(nref - n0 > 60 && nref - n0 < 120, $sformatf("relock after %0d reference cycles", nref - n0));
    vco_period(p);
    check(p > 390.62 && p < 390.63, $sformatf("VCO period after relock %f ps", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
