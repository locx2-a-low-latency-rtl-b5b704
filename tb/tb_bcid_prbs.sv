// Testbench for bcid_prbs: the header code is compared with two reference
// PRBS sequences over more than an orbit, BCR restarts them, and the
// (PRBS7, PRBS5) state pair is checked to be unique over the 3564 bunch
// crossings of an orbit, which is what lets a receiver recover the BCID.
module tb_bcid_prbs;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  logic clk = 0, rst_n = 1, step = 0, bcr = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [3:0] bcid, bcid_next;
  int checks = 0, failures = 0;

  bcid_prbs dut (.clk, .rst_n, .step, .bcr, .bcid, .bcid_next);

  always #1000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, n;
    bit seen [int];
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = 'h7f; b = 'h1f; n = 0;
    for (int t = 0; t < 2 * ORBIT_BC + 100; t++) begin
      @(negedge clk);
      step = ($urandom % 4) != 0;
      bcr  = step && (t == 20 || t == 20 + 5000);
      #1;
      if (step) begin
        int na, nb;
        if (bcr) begin na = 'h7f; nb = 'h1f; n = 0; end
        else begin na = prbs7_next(a); nb = prbs5_next(b); n++; end
        checks++;
        if (bcid_next !== 4'(((na & 3) << 2) | (nb & 3))) begin
          failures++;
          $display("FAIL t=%0d bcid_next %h", t, bcid_next);
        end
        a = na; b = nb;
        if (t > 20 && t < 5020 && n < int'(ORBIT_BC)) begin
          checks++;
          if (seen.exists(a * 32 + b)) begin
            failures++;
            $display("FAIL state pair repeats at crossing %0d", n);
          end
          seen[a * 32 + b] = 1;
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (bcid !== 4'(((a & 3) << 2) | (b & 3))) begin
        failures++;
        $display("FAIL t=%0d bcid %h", t, bcid);
      end
    end
    checks++;
    if (seen.num() != int'(ORBIT_BC) - 1) begin
      failures++;
      $display("FAIL only %0d distinct states", seen.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
