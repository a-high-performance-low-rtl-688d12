// Multiply-add unit of the FIR core: sum = coef * sample + addend, all signed
// two's complement. In the transposed direct form the sample stays on one
// multiplier input while the coefficients are stepped on the other, which is
// what keeps the switching at the sample input low. Purely combinational;
// the caller registers the result (into the partial-sum memory or the
// output register). The accumulator width is chosen by the instantiating
// core so that no sum of TAPS products can overflow.
//
// The reference core is built around a MAC unit in transposed direct form;
// the operand widths and the combinational form are this design's choices.
module dsp_mac #(
  parameter int DW    = 16,
  parameter int ACC_W = 36
) (
  input  logic signed [DW-1:0]    coef,
  input  logic signed [DW-1:0]    sample,
  input  logic signed [ACC_W-1:0] addend,
  output logic signed [ACC_W-1:0] sum
);
  logic signed [2*DW-1:0] product;

  always_comb begin
    product = coef * sample;
    sum     = ACC_W'(product) + addend;
  end
endmodule
