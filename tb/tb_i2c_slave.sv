// Testbench for i2c_slave: a bit-banged I2C master (SCL 2.5 MHz, open-drain
// bus modelled as a wired AND) checks the reset values, writes several
// registers in one transaction (pointer auto-increment), reads them back
// with a repeated start, and checks that a wrong device address is not
// acknowledged and changes nothing.
module tb_i2c_slave;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;

  localparam logic [6:0] ADDR = 7'h20;
  localparam realtime Q = 100_000;   // quarter SCL period, ps

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic scl = 1, sda_m = 1, sda_oe;
  logic sda;
  logic [NREG-1:0][15:0] regs;
  int checks = 0, failures = 0;

  assign sda = sda_m & !sda_oe;

  i2c_slave #(.I2C_ADDR(ADDR)) dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe, .regs);

  always #12500 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic i2c_start();
    sda_m = 1; #Q; scl = 1; #Q; sda_m = 0; #Q; scl = 0; #Q;
  endtask
  task automatic i2c_stop();
    sda_m = 0; #Q; scl = 1; #Q; sda_m = 1; #Q;
  endtask
  // send a byte, return the acknowledge (1 = ACK)
  task automatic i2c_wr(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; #Q; scl = 1; #(2*Q); scl = 0; #Q;
    end
    sda_m = 1; #Q; scl = 1; #Q; ack = !sda; #Q; scl = 0; #Q;
  endtask
  task automatic i2c_rd(output logic [7:0] b, input bit ack);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin
      #Q; scl = 1; #Q; b[i] = sda; #Q; scl = 0; #Q;
    end
    sda_m = !ack; #Q; scl = 1; #(2*Q); scl = 0; #Q; sda_m = 1;
  endtask

  task automatic write_regs(input logic [6:0] a, input logic [7:0] ptr,
                            input logic [15:0] v[], output bit all_ack);
    bit ack;
    all_ack = 1;
    i2c_start();
    i2c_wr({a, 1'b0}, ack); all_ack &= ack;
    if (ack) begin
      i2c_wr(ptr, ack); all_ack &= ack;
      foreach (v[i]) begin
        i2c_wr(v[i][15:8], ack); all_ack &= ack;
        i2c_wr(v[i][7:0], ack);  all_ack &= ack;
      end
    end
    i2c_stop();
  endtask

  task automatic read_regs(input logic [7:0] ptr, input int n, output logic [15:0] v[]);
    bit ack;
    logic [7:0] hi, lo;
    v = new[n];
    i2c_start();
    i2c_wr({ADDR, 1'b0}, ack);
    check(ack, "address acknowledged (read setup)");
    i2c_wr(ptr, ack);
    i2c_start();               // repeated start
    i2c_wr({ADDR, 1'b1}, ack);
    check(ack, "address acknowledged (read)");
    for (int i = 0; i < n; i++) begin
      i2c_rd(hi, 1'b1);
      i2c_rd(lo, i != n - 1);
      v[i] = {hi, lo};
    end
    i2c_stop();
  endtask

  initial begin
    logic [15:0] w[], r[];
    bit ok;
    #100_000 rst_n = 1;
    #100_000;
    check(regs[0] == 16'(PLL_CFG_DEFAULT), $sformatf("reg0 reset value %h", regs[0]));
    read_regs(8'd0, 1, r);
    check(r[0] == 16'(PLL_CFG_DEFAULT), $sformatf("reg0 read %h", r[0]));
    w = '{16'h1234, 16'hBEEF, 16'h0F0F};
    write_regs(ADDR, 8'd1, w, ok);
    check(ok, "write acknowledged");
    check(regs[1] == 16'h1234 && regs[2] == 16'hBEEF && regs[3] == 16'h0F0F,
          $sformatf("regs after write %h %h %h", regs[1], regs[2], regs[3]));
    read_regs(8'd1, 3, r);
    check(r[0] == 16'h1234 && r[1] == 16'hBEEF && r[2] == 16'h0F0F,
          $sformatf("read back %h %h %h", r[0], r[1], r[2]));
    // PLL register: band 1
    w = '{16'h0281};
    write_regs(ADDR, 8'd0, w, ok);
    check(ok && regs[0] == 16'h0281, $sformatf("reg0 write %h", regs[0]));
    // wrong address: no acknowledge, nothing written
    w = '{16'hDEAD};
    write_regs(ADDR ^ 7'h01, 8'd1, w, ok);
    check(!ok, "wrong address acknowledged");
    check(regs[1] == 16'h1234, "register changed by another device's write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
