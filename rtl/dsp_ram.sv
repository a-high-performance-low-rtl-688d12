// Small register-file memory of the FIR core: one synchronous write port and
// one asynchronous read port. The core uses one instance for the filter
// coefficients h(n) and one for the partial sums of the transposed direct
// form. Write happens on the rising edge of the (gated) core clock when we is
// high; rdata follows raddr combinationally. An address beyond DEPTH-1 is
// ignored on write and reads zero.
//
// The reference core has a RAM block but does not describe it; the register-
// file organisation and the out-of-range behaviour are this design's choices.
module dsp_ram #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 16,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
