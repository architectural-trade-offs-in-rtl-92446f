// sm_conv: two's complement to sign-magnitude converter.
//
// Splits a W-bit two's complement value into its sign bit and a W-bit
// unsigned magnitude (W bits, not W-1, so that the most negative value
// -2^(W-1) keeps its magnitude). The magnitude is formed by a conditional
// inversion and increment: mag = (v ^ {W{sign}}) + sign. Placed at the
// multiplier inputs of a MAC in sign-magnitude mode; the two signs are
// combined by the MAC into its add/subtract control. Purely combinational.
module sm_conv #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] v,
  output logic         sign,
  output logic [W-1:0] mag
);
  always_comb begin
    sign = v[W-1];
    mag  = (v ^ {W{sign}}) + W'(sign);
  end
endmodule
