// mac: multiply-accumulate unit with a 36-bit accumulator.
//
// Function, evaluated every enabled clock edge:
//   acc = 1:  s <= s     + (-1)^neg * beta * gamma
//   acc = 0:  s <= alpha + (-1)^neg * beta * gamma
// where gamma = gamma1 (PREADD = 0) or gamma1 + gamma2 (PREADD = 1, the
// pre-add MAC for folded filters; gamma is then one bit wider).
//
// Datapath: the multiplier (type MULT) delivers its product as a carry-save
// pair out1 + out2. Both vectors are conditionally inverted (XOR with neg)
// and added to the multiplexer output (alpha or s) by a 3:2 carry-save adder
// (csa_36); the two "+1"s that complete the two's complement negation enter
// through the carry-in of csa_36 and of the carry-look-ahead adder (cla_36)
// that adds the final pair. The sum is stored in the accumulator.
// The accumulator has 4 guard bits over the 32-bit product.
//
// NUMREP = NR_SM: both multiplier operands are first converted to
// sign-magnitude, the magnitudes are multiplied unsigned and the XOR of the
// two signs with neg decides between add and subtract. NUMREP = NR_2SC:
// two's complement operands go straight into a signed multiplier.
// MULT_P_BOOTH needs PREADD = 1 and NR_2SC: its encoder does the pre-add.
//
// This design's own choices: the carry-save pair is formed at the full
// accumulator width (36 bits) rather than at product width and then
// extended, because extending the two vectors of a carry-save pair
// separately does not preserve their sum; an enable (en) gates the
// accumulator; reset clears it. Timing: one MAC per clock, s is registered.
module mac
  import fir_pkg::*;
#(
  parameter int unsigned BW      = COEF_W,   // beta width
  parameter int unsigned GW      = DATA_W,   // gamma1/gamma2 width
  parameter int unsigned AW      = ACC_W,    // accumulator width
  parameter mult_e       MULT    = MULT_WD,
  parameter numrep_e     NUMREP  = NR_SM,
  parameter bit          PREADD  = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          acc,
  input  logic          neg,
  input  logic [AW-1:0] alpha,
  input  logic [BW-1:0] beta,
  input  logic [GW-1:0] gamma1,
  input  logic [GW-1:0] gamma2,
  output logic [AW-1:0] s,
  output logic [AW-1:0] p        // adder output, the next accumulator value
);
  localparam int unsigned YW = PREADD ? GW + 1 : GW;   // multiplier y width
  localparam bit          SM = (NUMREP == NR_SM);

  if (MULT == MULT_P_BOOTH && (!PREADD || SM)) begin : g_bad_cfg
    $error("mac: MULT_P_BOOTH needs PREADD = 1 and NR_2SC");
  end

  logic [YW-1:0] gam;        // pre-added (or plain) gamma, two's complement
  logic [BW-1:0] mx;         // multiplier x operand
  logic [YW-1:0] my;         // multiplier y operand
  logic          sb, sg;     // operand signs (sign-magnitude mode)
  logic          ne;         // effective negate
  logic [AW-1:0] out1, out2, pa, pb, mux, s1, s2;

  if (PREADD) begin : g_pre
    assign gam = YW'({gamma1[GW-1], gamma1}) + YW'({gamma2[GW-1], gamma2});
  end else begin : g_nopre
    assign gam = gamma1;
  end

  if (SM) begin : g_sm
    sm_conv #(.W(BW)) u_cb (.v(beta), .sign(sb), .mag(mx));
    sm_conv #(.W(YW)) u_cg (.v(gam),  .sign(sg), .mag(my));
  end else begin : g_tc
    assign {sb, sg} = 2'b00;
    assign mx = beta;
    assign my = gam;
  end

  assign ne = neg ^ sb ^ sg;

  if (MULT == MULT_WD) begin : g_wd
    mult_wd #(.XW(BW), .YW(YW), .PW(AW), .SIGNED(!SM)) u_mult (
      .x(mx), .y(my), .out1(out1), .out2(out2));
  end else if (MULT == MULT_BOOTH) begin : g_booth
    mult_booth #(.XW(BW), .YW(YW), .PW(AW), .SIGNED(!SM)) u_mult (
      .x(mx), .y(my), .out1(out1), .out2(out2));
  end else if (MULT == MULT_RG_BOOTH) begin : g_rg
    mult_rg_booth #(.XW(BW), .YW(YW), .PW(AW), .SIGNED(!SM)) u_mult (
      .x(mx), .y(my), .out1(out1), .out2(out2));
  end else if (MULT == MULT_RB_BOOTH) begin : g_rb
    mult_rb_booth #(.XW(BW), .YW(YW), .PW(AW), .SIGNED(!SM)) u_mult (
      .x(mx), .y(my), .out1(out1), .out2(out2));
  end else begin : g_pb
    // the pre-add happens inside the Booth encoder; gam/my stay unused here
    mult_p_booth #(.XW(BW), .YW(GW), .PW(AW)) u_mult (
      .x(beta), .y1(gamma1), .y2(gamma2), .out1(out1), .out2(out2));
  end

  // xor_32 stages (here at accumulator width), multiplexer, csa_36, cla_36
  assign pa  = out1 ^ {AW{ne}};
  assign pb  = out2 ^ {AW{ne}};
  assign mux = acc ? s : alpha;

  csa #(.W(AW)) u_csa (.p1(pa), .p2(pb), .p3(mux), .cin(ne), .s1(s1), .s2(s2));
  cla #(.W(AW)) u_cla (.a(s1), .b(s2), .cin(ne), .s(p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= '0;
    else if (en) s <= p;
  end
endmodule
