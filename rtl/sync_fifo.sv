// Synchronous FIFO of the LOCic encoder.
//
// Single-clock FIFO with show-ahead read: rd_data is the oldest entry while
// `empty` is low, and `rd_en` removes it at the clock edge. In the encoder it
// takes one payload per LHC clock (write) and hands it to the frame builder
// at the start of each frame slot (read), decoupling the arrival phase of the
// ADC data from the frame cadence. Writing when full or reading when empty is
// a protocol error, caught by assertions. The FIFO and its synchronous
// nature follow LOCic; depth and show-ahead interface are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 113,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk)
    if (wr_en && !full) mem[wptr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en && !full)  wptr <= incr(wptr);
      if (rd_en && !empty) rptr <= incr(rptr);
      unique case ({wr_en && !full, rd_en && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
