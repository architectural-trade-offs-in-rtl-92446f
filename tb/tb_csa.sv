// tb_csa: self-checking testbench for the 36-bit carry-save adder.
//
// Random and corner operands with both carry-in values; checks that
// s1 + s2 equals p1 + p2 + p3 + cin modulo 2^36 and that s1 is the bitwise
// sum (XOR) of the three operands.
module tb_csa;
  logic [35:0] p1, p2, p3, s1, s2;
  logic        cin;
  int checks = 0, failures = 0;

  csa #(.W(36)) dut (.p1(p1), .p2(p2), .p3(p3), .cin(cin), .s1(s1), .s2(s2));

  task automatic apply(input logic [35:0] a, b, c, input logic ci);
    logic [35:0] exp;
    p1 = a; p2 = b; p3 = c; cin = ci;
    #1;
    exp = a + b + c + 36'(ci);
    checks += 2;
    if (36'(s1 + s2) !== exp) begin
      failures++;
      $display("FAIL sum a=%h b=%h c=%h cin=%b", a, b, c, ci);
    end
    if (s1 !== (a ^ b ^ c)) begin
      failures++;
      $display("FAIL s1 a=%h b=%h c=%h", a, b, c);
    end
  endtask

  initial begin
    apply('0, '0, '0, 1'b0);
    apply('1, '1, '1, 1'b1);
    apply('1, 36'd1, '0, 1'b0);
    repeat (3000) apply({$urandom, $urandom} >> 28, {$urandom, $urandom} >> 28,
                        {$urandom, $urandom} >> 28, 1'($urandom));
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
