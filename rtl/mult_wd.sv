// mult_wd: Wallace-Dadda parallel multiplier, x * y = out1 + out2.
//
// One partial product row per bit of y (an AND of x with that bit, shifted),
// reduced by a tree of 3:2 carry-save adders until two rows are left. No
// final adder: the two rows are the carry-save product, and the MAC's own
// csa/cla adders add them. With SIGNED = 1 the operands are two's complement
// and the row of y's sign bit is subtracted: it is formed as the inverted
// row plus a "+1" in a separate correction row. With SIGNED = 0 the operands
// are unsigned magnitudes (sign-magnitude mode of the MAC).
// The rows are formed directly at the output width PW (sign- or
// zero-extended) so that out1 + out2 equals the product modulo 2^PW; the
// MAC uses PW = 36, its accumulator width. Purely combinational.
module mult_wd
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
  localparam int unsigned NR = SIGNED ? YW + 1 : YW;

  logic [PW-1:0] xe;
  logic [PW-1:0] rows [NR];

  always_comb begin
    xe = SIGNED ? PW'({{PW{x[XW-1]}}, x}) : PW'(x);
    for (int i = 0; i < YW; i++) begin
      if (SIGNED && i == YW - 1)
        rows[i] = y[i] ? (~xe) << i : '0;
      else
        rows[i] = y[i] ? xe << i : '0;
    end
    if (SIGNED) rows[NR-1] = PW'(y[YW-1]) << (YW - 1);
  end

  pp_tree #(.NR(NR), .W(PW), .MODE(0)) u_tree (
    .rows(rows), .out1(out1), .out2(out2)
  );
endmodule
