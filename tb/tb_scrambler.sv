// Testbench for scrambler: random payloads are scrambled frame after frame;
// a reference descrambler driven only by the scrambled stream must return
// the originals, and the scrambled stream must be checked bit by bit
// against a reference scrambler written as a bit queue.
module tb_scrambler;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  logic clk = 0, rst_n = 1, advance = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  payload_t din, dout;
  int checks = 0, failures = 0;
  scr_hist_t h_rx;
  bit sq[$];   // scrambled stream seen so far, oldest first

  scrambler dut (.clk, .rst_n, .advance, .din, .dout);

  always #1000 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    payload_t exp, back;
    int nsame;
    h_rx = '0;
    for (int k = 0; k < 58; k++) sq.push_back(1'b0);
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nsame = 0;
    for (int f = 0; f < 300; f++) begin
      @(negedge clk);
      din = (f % 50 == 7) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      advance = 1;
      #1;
      // reference scrambler from the bit queue
      for (int i = 111; i >= 0; i--) begin
        exp[i] = din[i] ^ sq[sq.size()-39] ^ sq[sq.size()-58];
        sq.push_back(exp[i]);
      end
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL frame %0d scrambled %h expected %h", f, dout, exp);
      end
      back = descramble(dout, h_rx);
      checks++;
      if (back !== din) begin
        failures++;
        $display("FAIL frame %0d descrambled %h expected %h", f, back, din);
      end
      if (dout == din) nsame++;
      @(posedge clk);
    end
    // hold: advance low keeps the history
    @(negedge clk);
    advance = 0;
    din = '0;
    #1;
    begin
      payload_t a;
      a = dout;
      @(posedge clk); @(negedge clk); #1;
      checks++;
      if (dout !== a) begin
        failures++;
        $display("FAIL history moved while advance was low");
      end
    end
    checks++;
    if (nsame > 3) begin
      failures++;
      $display("FAIL %0d frames were not scrambled", nsame);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
