// comp42: W-bit 4:2 compressor row (helper for the 4:2 reduction trees).
//
// Each bit position chains two full adders: the first adds a, b, c and
// passes its carry to the next position (the "horizontal" carry); the second
// adds that sum, d and the horizontal carry from the position below. The
// result is a sum vector and a carry vector (moved up one position) with
// a + b + c + d = s + cy modulo 2^W. Because the horizontal carry of a bit
// does not depend on the horizontal carry it receives, the delay does not
// grow with W. A 4:2 compressor is the binary-coded form of a redundant
// binary (digit set {-1,0,1}) adder cell. Purely combinational.
module comp42 #(
  parameter int unsigned W = 36
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] t, h, k;
  logic [W:0]   hin;

  always_comb begin
    t = a ^ b ^ c;
    h = (a & b) | (a & c) | (b & c);
    hin = {h, 1'b0};
    s = t ^ d ^ hin[W-1:0];
    k = (t & d) | (t & hin[W-1:0]) | (d & hin[W-1:0]);
    cy = {k[W-2:0], 1'b0};
  end
endmodule
