// tb_mac: self-checking testbench for the MAC unit.
//
// Instantiates the MAC in every configuration the filter family uses: the
// four multipliers that work in both number representations, each with
// two's complement and sign-magnitude operands, with and without the
// pre-adder (16-bit gamma operands), the pre-add Booth multiplier, and the
// 17-bit gamma form used behind the folded filter's own pre-adder; plus one
// instance with all parameters at their defaults. All get the same random
// stimulus (alpha, beta, gamma1, gamma2, acc, neg, en) every clock. A
// reference accumulator per instance, computed with 64-bit integers,
//   s = (acc ? s : alpha) + (-1)^neg * beta * gamma  (mod 2^36),
// is compared with s after every clock; en = 0 must hold s. Directed
// operand corners (most negative values, zero) are mixed in.
module tb_mac;
  import fir_pkg::*;

  localparam int NI = 19;
  localparam mult_e MT [NI] = '{
    MULT_WD, MULT_BOOTH, MULT_RG_BOOTH, MULT_RB_BOOTH,
    MULT_WD, MULT_BOOTH, MULT_RG_BOOTH, MULT_RB_BOOTH,
    MULT_WD, MULT_BOOTH, MULT_RG_BOOTH, MULT_RB_BOOTH,
    MULT_WD, MULT_BOOTH, MULT_RG_BOOTH, MULT_RB_BOOTH,
    MULT_P_BOOTH, MULT_WD, MULT_WD};
  localparam bit SMV [NI] = '{0,0,0,0, 1,1,1,1, 0,0,0,0, 1,1,1,1, 0, 1, 1};
  localparam bit PRE [NI] = '{0,0,0,0, 0,0,0,0, 1,1,1,1, 1,1,1,1, 1, 0, 0};
  localparam int G17 [NI] = '{0,0,0,0, 0,0,0,0, 0,0,0,0, 0,0,0,0, 0, 1, 0};

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en, acc, neg;
  logic [35:0] alpha;
  logic [15:0] beta;
  logic [16:0] g1, g2;
  logic [35:0] s [NI];
  logic [35:0] ref_s [NI];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NI - 1; i++) begin : g_dut
    localparam int GW = G17[i] ? 17 : 16;
    logic [35:0] p_unused;
    mac #(.BW(16), .GW(GW), .AW(36), .MULT(MT[i]),
          .NUMREP(SMV[i] ? NR_SM : NR_2SC), .PREADD(PRE[i])) u_mac (
      .clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .neg(neg), .alpha(alpha),
      .beta(beta), .gamma1(g1[GW-1:0]), .gamma2(g2[GW-1:0]), .s(s[i]), .p(p_unused));
  end
  // the default configuration
  logic [35:0] p_def;
  mac u_def (.clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .neg(neg), .alpha(alpha),
             .beta(beta), .gamma1(g1[15:0]), .gamma2(g2[15:0]), .s(s[NI-1]), .p(p_def));

  function automatic longint gam_val(int i);
    if (G17[i]) return longint'($signed(g1));
    if (PRE[i]) return longint'($signed(g1[15:0])) + longint'($signed(g2[15:0]));
    return longint'($signed(g1[15:0]));
  endfunction

  initial begin
    rst_n = 1'b0; en = 0; acc = 0; neg = 0; alpha = '0; beta = '0; g1 = '0; g2 = '0;
    for (int i = 0; i < NI; i++) ref_s[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      acc   = ($urandom % 4) != 0;
      neg   = 1'($urandom);
      alpha = {$urandom, $urandom} >> 28;
      beta  = 16'($urandom);
      g1    = 17'($urandom);
      g2    = 17'($urandom);
      case ($urandom % 8)
        0: beta = 16'h8000;
        1: begin g1 = 17'h08000; g2 = 17'h08000; end
        2: begin g1 = 17'h17FFF; g2 = 17'h07FFF; end
        3: beta = 16'h0000;
        default: ;
      endcase
      @(posedge clk);
      #1;
      for (int i = 0; i < NI; i++) begin
        longint prod;
        prod = longint'($signed(beta)) * gam_val(i);
        if (neg) prod = -prod;
        if (en) ref_s[i] = (acc ? ref_s[i] : alpha) + 36'(prod);
        checks++;
        if (s[i] !== ref_s[i]) begin
          failures++;
          if (failures < 10) $display("FAIL inst %0d cycle %0d got %h exp %h", i, k, s[i], ref_s[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
