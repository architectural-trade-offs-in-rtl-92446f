// tb_sm_conv: self-checking testbench for the sign-magnitude converter.
//
// Exhaustive over all 2^16 inputs of a 16-bit instance and 2^17 of a
// 17-bit one: sign must be the MSB and the magnitude |v|, including 2^15
// (2^16) for the most negative value.
module tb_sm_conv;
  logic [15:0] v16, m16;
  logic [16:0] v17, m17;
  logic        s16, s17;
  int checks = 0, failures = 0;

  sm_conv #(.W(16)) dut16 (.v(v16), .sign(s16), .mag(m16));
  sm_conv #(.W(17)) dut17 (.v(v17), .sign(s17), .mag(m17));

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      int iv;
      v17 = 17'(i);
      v16 = 16'(i);
      #1;
      iv = int'($signed(v17));
      checks++;
      if (s17 !== (iv < 0) || int'(m17) !== ((iv < 0) ? -iv : iv)) begin
        failures++;
        if (failures < 10) $display("FAIL17 v=%h sign=%b mag=%h", v17, s17, m17);
      end
      if (i < (1 << 16)) begin
        iv = int'($signed(v16));
        checks++;
        if (s16 !== (iv < 0) || int'(m16) !== ((iv < 0) ? -iv : iv)) begin
          failures++;
          if (failures < 10) $display("FAIL16 v=%h sign=%b mag=%h", v16, s16, m16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
