// mult_rb_booth: radix-4 Booth multiplier with a redundant-binary (4:2)
// reduction tree, x * y = out1 + out2.
//
// Partial products are formed exactly as in mult_booth (triples of y select
// 0, +-x or +-2x of x; negative rows are inverted with their "+1" in a
// correction row). The rows are then reduced four to two per level instead
// of three to two. Each 4:2 step is a comp42 row, the binary-coded form of
// a redundant binary adder over the digit set {-1, 0, 1}: a pair of binary
// rows is one signed-digit number, and two such numbers add to one without
// carry propagation. The final pair is left in carry-save form for the MAC.
// SIGNED selects two's complement operands or unsigned magnitudes. Rows are
// built at width PW. Purely combinational.
module mult_rb_booth
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

  pp_tree #(.NR(NR), .W(PW), .MODE(1)) u_tree (
    .rows(rows), .out1(out1), .out2(out2)
  );
endmodule
