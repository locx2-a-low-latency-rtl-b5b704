// Testbench for sync_fifo: random writes and reads (never into a full or
// out of an empty FIFO) against a queue model; checks data order, count,
// full and empty every cycle.
module tb_sync_fifo;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 113, D = 4;
  logic clk = 0, rst_n = 1, wr_en = 0, rd_en = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [W-1:0] wr_data, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .full,
                                          .rd_en, .rd_data, .empty, .count);

  always #1000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || int'(count) != q.size()) begin
        failures++;
        $display("FAIL t=%0d flags empty=%b full=%b count=%0d model=%0d", t, empty, full, count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data !== q[0]) begin
          failures++;
          $display("FAIL t=%0d head %h expected %h", t, rd_data, q[0]);
        end
      end
      if (q.size() == D) nfull++;
      wr_en = (q.size() < D) && ($urandom % 100 < (t < 1500 ? 60 : 40));
      rd_en = (q.size() > 0) && ($urandom % 100 < (t < 1500 ? 40 : 60));
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (nfull == 0) begin
      failures++;
      $display("FAIL FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
