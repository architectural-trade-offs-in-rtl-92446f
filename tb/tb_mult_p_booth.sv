// tb_mult_p_booth: self-checking testbench for mult_p_booth.
//
// Applies corner and random two's complement operands x, y1, y2 (16 bits
// each) and compares out1 + out2 modulo 2^36 with x * (y1 + y2) computed
// with 64-bit integer arithmetic. The corner set includes sums that need
// the 17th bit (both samples at the most negative or most positive value).
module tb_mult_p_booth;
  localparam int PW = 36;

  logic [15:0] x, y1, y2;
  logic [PW-1:0] o1, o2;
  int checks = 0, failures = 0;

  mult_p_booth #(.XW(16), .YW(16), .PW(PW)) dut (.x(x), .y1(y1), .y2(y2), .out1(o1), .out2(o2));

  task automatic apply(input logic [15:0] xv, input logic [15:0] a, input logic [15:0] b);
    logic [PW-1:0] got, exp;
    x = xv; y1 = a; y2 = b;
    #1;
    got = o1 + o2;
    exp = PW'(longint'($signed(x)) * (longint'($signed(y1)) + longint'($signed(y2))));
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y1=%h y2=%h got=%h exp=%h", x, y1, y2, got, exp);
    end
  endtask

  initial begin
    automatic logic [15:0] cv [7] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                      16'h7FFF, 16'h5555, 16'hAAAA};
    foreach (cv[i]) foreach (cv[j]) foreach (cv[k]) apply(cv[i], cv[j], cv[k]);
    repeat (5000) apply(16'($urandom), 16'($urandom), 16'($urandom));
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
