// mult_rg_booth: reduced-glitch radix-4 Booth multiplier, x * y = out1 + out2.
//
// Same digit selection as mult_booth, but the encoder and partial product
// generator are balanced to two gate levels so that all partial product
// bits settle at about the same time and fewer glitches enter the tree:
//   level 1: e1 = y(2i+1) ^ x(j),  e2 = y(2i+1) ^ x(j-1)  (in parallel with
//            one = y(2i) ^ y(2i-1) and the two-detect)
//   level 2: pp(j) = e1 & one | e2 & two.
// The sign inversion is thus folded into the first gate instead of a final
// XOR after the multiplexer. A zero digit gives a zero row, so the "+1" of a
// negative row is neg & (one | two). Rows are reduced by a 3:2 carry-save
// tree and left in carry-save form. SIGNED selects two's complement operands
// or unsigned magnitudes. Rows are built at width PW. Purely combinational.
module mult_rg_booth
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
  localparam int unsigned ND = SIGNED ? (YW + 1) / 2 : YW / 2 + 1;
  localparam int unsigned NR = ND + 1;

  logic [PW-1:0] xe;
  logic [PW:0]   xs;     // xe with a zero below it: xs[j] = x(j-1)
  logic [2*ND:0] ye;
  logic [PW-1:0] rows [NR];

  always_comb begin
    xe = SIGNED ? PW'({{PW{x[XW-1]}}, x}) : PW'(x);
    xs = {xe, 1'b0};
    ye = SIGNED ? (2*ND+1)'({{(2*ND){y[YW-1]}}, y, 1'b0})
                : (2*ND+1)'({y, 1'b0});
    rows[NR-1] = '0;
    for (int i = 0; i < ND; i++) begin
      logic          one, two, neg;
      logic [PW-1:0] e1, e2, pp;
      neg = ye[2*i+2];
      one = ye[2*i+1] ^ ye[2*i];
      two = (neg & ~ye[2*i+1] & ~ye[2*i]) | (~neg & ye[2*i+1] & ye[2*i]);
      e1  = {PW{neg}} ^ xe;
      e2  = {PW{neg}} ^ xs[PW-1:0];
      pp  = (e1 & {PW{one}}) | (e2 & {PW{two}});
      rows[i] = pp << (2 * i);
      rows[NR-1][2*i] = neg & (one | two);
    end
  end

  pp_tree #(.NR(NR), .W(PW), .MODE(0)) u_tree (
    .rows(rows), .out1(out1), .out2(out2)
  );
endmodule
