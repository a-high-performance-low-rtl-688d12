// Output rounding of the FIR core. The accumulator holds a sum of
// Q(FRAC) coefficient times integer-sample products; the output is the
// accumulator shifted right by FRAC bits, rounded half up (add 2^(FRAC-1)
// before the arithmetic shift) and saturated to the signed DW-bit range.
// Combinational.
//
// The reference core has a rounding block but does not describe it; the Q15
// format, round-half-up and saturation are this design's choices.
module dsp_round #(
  parameter int ACC_W = 36,
  parameter int DW    = 16,
  parameter int FRAC  = 15
) (
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [DW-1:0]    y
);
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((1 << (DW-1)) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(1 << (DW-1));

  logic signed [ACC_W:0] biased;
  logic signed [ACC_W:0] shifted;

  always_comb begin
    biased  = (ACC_W+1)'(acc) + ((ACC_W+1)'(1) <<< (FRAC-1));
    shifted = biased >>> FRAC;
    if (shifted > MAXV)      y = MAXV[DW-1:0];
    else if (shifted < MINV) y = MINV[DW-1:0];
    else                     y = shifted[DW-1:0];
  end
endmodule
