// Testbench for crc8: random and corner payloads against a long-division
// reference, plus the check that appending the CRC leaves remainder zero.
module tb_crc8;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  payload_t   data;
  logic [7:0] crc;
  int checks = 0, failures = 0;

  crc8 dut (.data, .crc);

  task automatic check(input payload_t p);
    logic [7:0] exp;
    logic [119:0] r;
    data = p;
    #1;
    exp = crc8_ref(p);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL crc(%h) = %h, expected %h", p, crc, exp);
    end
    // codeword {p, crc} must be divisible by the generator
    r = {p, crc};
    for (int i = 119; i >= 8; i--) if (r[i]) r[i -: 9] ^= 9'h107;
    checks++;
    if (r[7:0] !== 8'h00) begin
      failures++;
      $display("FAIL codeword remainder %h", r[7:0]);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(payload_t'(1));
    check({1'b1, 111'b0});
    for (int i = 0; i < 500; i++)
      check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
