// cla: W-bit carry-look-ahead adder, s = a + b + cin (mod 2^W).
//
// Bits are grouped in 4-bit blocks. Inside a block every carry is formed
// directly from the block's generate/propagate terms and the block carry-in
// (two-level look-ahead); the block carries ripple from block to block
// through the block generate/propagate signals. W need not be a multiple of
// four: the top block is shorter. The MAC uses a 36-bit instance (cla_36)
// whose carry-in carries the "+1" of the second negated product vector.
// Purely combinational.
module cla #(
  parameter int unsigned W = 36
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  localparam int unsigned NB = (W + 3) / 4;

  logic [W-1:0] g, p, c;

  always_comb begin
    logic bc;
    g = a & b;
    p = a ^ b;
    bc = cin;   // carry into the current block
    for (int k = 0; k < NB; k++) begin
      logic       gg, pp;
      gg = 1'b0;
      pp = 1'b1;
      for (int j = 0; j < 4; j++) begin
        if (4 * k + j < W) begin
          // carry into bit 4k+j, looked ahead from the block carry-in
          logic cj;
          logic pr;
          cj = 1'b0;
          pr = 1'b1;
          for (int i = j - 1; i >= 0; i--) begin
            cj = cj | (g[4*k+i] & pr);
            pr = pr & p[4*k+i];
          end
          c[4*k+j] = cj | (pr & bc);
          gg = g[4*k+j] | (p[4*k+j] & gg);
          pp = pp & p[4*k+j];
        end
      end
      bc = gg | (pp & bc);
    end
    s = p ^ c;
  end
endmodule
