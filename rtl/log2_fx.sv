// log2_fx: fixed-point base-2 logarithm of a positive integer.
//
// The integer part of log2(x) is the position of the leading one; the
// fraction is taken as the FRAC_W bits that follow the leading one
// (log2(1+f) ~ f, error below 0.087). Output y = {int part (5 bits),
// fraction (FRAC_W bits)}; x = 0 gives 0. The reference design takes the
// natural logarithm; base 2 differs only by a constant factor, which the
// min/max normalisation that follows cancels. Combinational.
module log2_fx #(
  parameter int unsigned IN_W   = 21,
  parameter int unsigned FRAC_W = 8
) (
  input  logic [IN_W-1:0]     x,
  output logic [5+FRAC_W-1:0] y
);
  logic [4:0]            p;
  logic [IN_W+FRAC_W-1:0] norm;

  always_comb begin
    p = '0;
    for (int i = 0; i < int'(IN_W); i++) if (x[i]) p = 5'(i);
    // left-align the leading one at bit IN_W+FRAC_W-1
    norm = {x, FRAC_W'(0)} << (IN_W - 1 - int'(p));
    y    = {p, norm[IN_W+FRAC_W-2 -: FRAC_W]};
  end
endmodule
