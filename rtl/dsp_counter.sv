// Tap counter of the FIR core. Counts 0 .. MAX-1 while en is high and wraps
// to 0 after MAX-1; clear forces 0. last flags the final count, zero the
// first. Clocked by the gated core clock, asynchronous active-high reset.
//
// The reference core has a counter block but does not describe it; its use
// as the tap counter is this design's reading.
module dsp_counter #(
  parameter int MAX = 16,
  parameter int W   = (MAX > 1) ? $clog2(MAX) : 1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         zero,
  output logic         last
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset)                 count <= '0;
    else if (clear)            count <= '0;
    else if (en && last)       count <= '0;
    else if (en)               count <= count + 1'b1;
  end

  assign zero = (count == '0);
  assign last = (32'(count) == MAX - 1);
endmodule
