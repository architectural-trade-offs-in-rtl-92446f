// tb_mult_wd: self-checking testbench for mult_wd.
//
// Four instances cover the operand shapes the MAC uses: 16x16 and 16x17,
// each with two's complement and with unsigned (magnitude) operands. Corner
// values (0, 1, -1, most negative, most positive) and random operands are
// applied; out1 + out2 modulo 2^36 is compared with the product computed
// with 64-bit integer arithmetic.
module tb_mult_wd;
  localparam int PW = 36;

  logic [15:0] x;
  logic [15:0] y16;
  logic [16:0] y17;
  logic [PW-1:0] a1, a2, b1, b2, c1, c2, d1, d2;
  int checks = 0, failures = 0;

  mult_wd #(.XW(16), .YW(16), .PW(PW), .SIGNED(1)) u_s16 (.x(x), .y(y16), .out1(a1), .out2(a2));
  mult_wd #(.XW(16), .YW(17), .PW(PW), .SIGNED(1)) u_s17 (.x(x), .y(y17), .out1(b1), .out2(b2));
  mult_wd #(.XW(16), .YW(16), .PW(PW), .SIGNED(0)) u_u16 (.x(x), .y(y16), .out1(c1), .out2(c2));
  mult_wd #(.XW(16), .YW(17), .PW(PW), .SIGNED(0)) u_u17 (.x(x), .y(y17), .out1(d1), .out2(d2));

  task automatic check(input logic [PW-1:0] o1, o2, input longint expv, input string what);
    logic [PW-1:0] got, exp;
    got = o1 + o2;
    exp = PW'(expv);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%h y16=%h y17=%h got=%h exp=%h", what, x, y16, y17, got, exp);
    end
  endtask

  task automatic apply(input logic [15:0] xv, input logic [16:0] yv);
    x = xv;
    y16 = yv[15:0];
    y17 = yv;
    #1;
    check(a1, a2, longint'($signed(x)) * longint'($signed(y16)), "s16x16");
    check(b1, b2, longint'($signed(x)) * longint'($signed(y17)), "s16x17");
    check(c1, c2, longint'({48'd0, x}) * longint'({48'd0, y16}), "u16x16");
    check(d1, d2, longint'({48'd0, x}) * longint'({47'd0, y17}), "u16x17");
  endtask

  initial begin
    automatic logic [16:0] cy [8] = '{17'h00000, 17'h00001, 17'h1FFFF, 17'h10000,
                                      17'h0FFFF, 17'h08000, 17'h07FFF, 17'h18000};
    automatic logic [15:0] cx [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                      16'h7FFF, 16'h5555};
    foreach (cx[i]) foreach (cy[j]) apply(cx[i], cy[j]);
    repeat (4000) apply(16'($urandom), 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
