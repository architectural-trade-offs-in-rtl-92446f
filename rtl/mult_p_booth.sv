// mult_p_booth: pre-add Booth multiplier, x * (y1 + y2) = out1 + out2.
//
// Meant for symmetric-coefficient filters, where two samples are added
// before they are multiplied by the shared coefficient. Instead of a
// separate pre-adder, each radix-4 Booth encoder slice adds its two bits of
// y1 and y2 itself, takes the carry from the slice below and passes its own
// carry to the slice above; it then encodes the resulting two sum bits
// together with the top sum bit of the slice below. The carry therefore
// ripples through all encoders. The selected multiples of x (0, +-x, +-2x)
// are reduced by a mixed tree: 4:2 compressors where four rows are
// available and a 3:2 adder for a group of three. Two's complement operands
// only; the pre-added operand is YW+1 bits wide and needs no overflow
// handling. Rows are built at width PW; the pair is left in carry-save form.
// Purely combinational.
module mult_p_booth
  import fir_pkg::*;
#(
  parameter int unsigned XW = 16,
  parameter int unsigned YW = 16,
  parameter int unsigned PW = 36
) (
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y1,
  input  logic [YW-1:0] y2,
  output logic [PW-1:0] out1,
  output logic [PW-1:0] out2
);
  localparam int unsigned ND = (YW + 2) / 2;  // digits of the YW+1 bit sum
  localparam int unsigned NR = ND + 1;

  logic [PW-1:0]   xe;
  logic [2*ND-1:0] a, b;    // sign-extended y1, y2
  logic [2*ND:0]   sm;      // pre-added operand, sm[0] is y(-1) = 0
  logic [PW-1:0]   rows [NR];

  always_comb begin
    logic cc;   // carry between encoder slices
    xe = PW'({{PW{x[XW-1]}}, x});
    a  = (2*ND)'({{(2*ND){y1[YW-1]}}, y1});
    b  = (2*ND)'({{(2*ND){y2[YW-1]}}, y2});
    sm = '0;
    cc = 1'b0;
    rows[NR-1] = '0;
    for (int i = 0; i < ND; i++) begin
      logic          c1, one, two, neg;
      logic [PW-1:0] m;
      // pre-add slice: two sum bits and the carry to the next slice
      sm[2*i+1] = a[2*i] ^ b[2*i] ^ cc;
      c1        = (a[2*i] & b[2*i]) | (cc & (a[2*i] ^ b[2*i]));
      sm[2*i+2] = a[2*i+1] ^ b[2*i+1] ^ c1;
      cc        = (a[2*i+1] & b[2*i+1]) | (c1 & (a[2*i+1] ^ b[2*i+1]));
      // Booth encoder on the sum bits
      neg = sm[2*i+2];
      one = sm[2*i+1] ^ sm[2*i];
      two = (neg & ~sm[2*i+1] & ~sm[2*i]) | (~neg & sm[2*i+1] & sm[2*i]);
      m   = ({PW{one}} & xe) | ({PW{two}} & (xe << 1));
      rows[i] = (m ^ {PW{neg}}) << (2 * i);
      rows[NR-1][2*i] = neg;
    end
  end

  pp_tree #(.NR(NR), .W(PW), .MODE(2)) u_tree (
    .rows(rows), .out1(out1), .out2(out2)
  );
endmodule
