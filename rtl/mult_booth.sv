// mult_booth: radix-4 Booth multiplier, x * y = out1 + out2.
//
// y is scanned in overlapping triples {y(2i+1), y(2i), y(2i-1)}, y(-1) = 0.
// Each triple selects one partial product of the multiplicand x: 0, +x,
// +2x, -x or -2x. A negative row is formed by inverting the selected
// multiple, and its "+1" goes into a shared correction row. The rows and
// the correction row are reduced by a 3:2 carry-save tree; the result is
// left in carry-save form for the MAC's adders. The encoder is the usual
// one: one = y(2i) ^ y(2i-1), two = the triple is 011 or 100, neg = y(2i+1),
// and each partial product bit is (one & x(j) | two & x(j-1)) ^ neg.
// SIGNED selects two's complement operands or unsigned magnitudes (the
// unsigned case needs one more digit). Rows are built at width PW (see
// mult_wd). Purely combinational.
module mult_booth
  import fir_pkg::*;
#(
  parameter int unsigned XW     = 16,
  parameter int unsigned YW     = 16,
  parameter int unsigned PW     = 36,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  output logic [PW-1:0] out1,
  output logic [PW-1:0] out2
);
  localparam int unsigned ND = SIGNED ? (YW + 1) / 2 : YW / 2 + 1;  // digits
  localparam int unsigned NR = ND + 1;

  logic [PW-1:0]   xe;
  logic [2*ND:0]   ye;   // ye[0] is y(-1)
  logic [PW-1:0]   rows [NR];

  always_comb begin
    xe = SIGNED ? PW'({{PW{x[XW-1]}}, x}) : PW'(x);
    ye = SIGNED ? (2*ND+1)'({{(2*ND){y[YW-1]}}, y, 1'b0})
                : (2*ND+1)'({y, 1'b0});
    rows[NR-1] = '0;
    for (int i = 0; i < ND; i++) begin
      logic          one, two, neg;
      logic [PW-1:0] m;
      one = ye[2*i+1] ^ ye[2*i];
      two = (ye[2*i+2] & ~ye[2*i+1] & ~ye[2*i]) | (~ye[2*i+2] & ye[2*i+1] & ye[2*i]);
      neg = ye[2*i+2];
      m   = ({PW{one}} & xe) | ({PW{two}} & (xe << 1));
      rows[i] = (m ^ {PW{neg}}) << (2 * i);
      rows[NR-1][2*i] = neg;
    end
  end

  pp_tree #(.NR(NR), .W(PW), .MODE(0)) u_tree (
    .rows(rows), .out1(out1), .out2(out2)
  );
endmodule
