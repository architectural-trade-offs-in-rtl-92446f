// tb_cla: self-checking testbench for the 36-bit carry-look-ahead adder.
//
// Random operands, long carry chains (all-ones plus one) and both carry-in
// values; s must equal a + b + cin modulo 2^36. A 7-bit instance checks a
// width that is not a multiple of the 4-bit look-ahead block.
module tb_cla;
  logic [35:0] a, b, s;
  logic [6:0]  a7, b7, s7;
  logic        cin;
  int checks = 0, failures = 0;

  cla #(.W(36)) dut   (.a(a), .b(b), .cin(cin), .s(s));
  cla #(.W(7))  dut7  (.a(a7), .b(b7), .cin(cin), .s(s7));

  task automatic apply(input logic [35:0] x, y, input logic ci);
    a = x; b = y; cin = ci; a7 = x[6:0]; b7 = y[6:0];
    #1;
    checks += 2;
    if (s !== 36'(x + y + 36'(ci))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b s=%h", x, y, ci, s);
    end
    if (s7 !== 7'(x[6:0] + y[6:0] + 7'(ci))) begin
      failures++;
      if (failures < 10) $display("FAIL7 a=%h b=%h cin=%b s=%h", x[6:0], y[6:0], ci, s7);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, 36'd1, 1'b0);
    apply(36'h7_FFFF_FFFF, 36'h0_0000_0001, 1'b0);
    apply('1, '1, 1'b1);
    repeat (4000) apply({$urandom, $urandom} >> 28, {$urandom, $urandom} >> 28, 1'($urandom));
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
