// csa: W-bit carry-save adder (3 operands to 2) with carry-in.
//
// Each bit position is a full adder. The sum vector s1 holds the bit sums;
// the carry vector s2 holds the carries moved up one position, and its free
// least significant bit takes the carry-in. So p1 + p2 + p3 + cin equals
// s1 + s2 modulo 2^W. The MAC uses a 36-bit instance (csa_36) whose carry-in
// carries the two's complement "+1" of one negated product vector; the
// multipliers use it as the 3:2 cell of their reduction trees.
// Purely combinational.
module csa #(
  parameter int unsigned W = 36
) (
  input  logic [W-1:0] p1,
  input  logic [W-1:0] p2,
  input  logic [W-1:0] p3,
  input  logic         cin,
  output logic [W-1:0] s1,
  output logic [W-1:0] s2
);
  logic [W-1:0] c;

  always_comb begin
    s1 = p1 ^ p2 ^ p3;
    c  = (p1 & p2) | (p1 & p3) | (p2 & p3);
    s2 = {c[W-2:0], cin};
  end
endmodule
