// tb_coef_rom: self-checking testbench for the coefficient ROM.
//
// Reads every address. The expected values are recomputed here from the
// design formula (Hamming-windowed sinc, cut-off fs/6, 24 taps, DC gain
// 0.9 in Q15) with real arithmetic, independently of the stored table;
// addresses 12..15 must read zero. Also checks that a second instance with
// a user table returns that table.
module tb_coef_rom;
  import fir_pkg::*;
  logic [3:0]  a;
  logic [15:0] b, b2;
  int checks = 0, failures = 0;

  localparam coef_tab_t USER = '{16'sd1, 16'sd2, 16'sd3, 16'sd4, 16'sd5, 16'sd6,
                                 16'sd7, 16'sd8, 16'sd9, 16'sd10, 16'sd11, -16'sd12};

  coef_rom dut (.b_addr(a), .b(b));
  coef_rom #(.COEFS(USER)) dut2 (.b_addr(a), .b(b2));

  real h [24];
  real tot;

  initial begin
    automatic real pi = 3.14159265358979;
    tot = 0.0;
    for (int n = 0; n < 24; n++) begin
      real m, sv, wv;
      m  = real'(n) - 11.5;
      sv = $sin(2.0 * pi * m / 6.0) / (pi * m);
      wv = 0.54 - 0.46 * $cos(2.0 * pi * real'(n) / 23.0);
      h[n] = sv * wv;
      tot += h[n];
    end
    for (int i = 0; i < 16; i++) begin
      int exp;
      a = 4'(i);
      #1;
      exp = (i < 12) ? int'($rtoi(h[i] / tot * 32768.0 * 0.9 + ((h[i] >= 0) ? 0.5 : -0.5))) : 0;
      checks++;
      if (int'($signed(b)) != exp) begin
        failures++;
        $display("FAIL addr %0d got %0d exp %0d", i, $signed(b), exp);
      end
      checks++;
      if (int'($signed(b2)) != ((i < 12) ? int'(USER[i]) : 0)) begin
        failures++;
        $display("FAIL user addr %0d got %0d", i, $signed(b2));
      end
    end
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
