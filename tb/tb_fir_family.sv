// tb_fir_family: runs all seventeen filter configurations of the family side
// by side: direct form and folded direct form, each with the Wallace-Dadda,
// Booth, reduced-glitch Booth and redundant-binary Booth multipliers in
// two's complement and sign-magnitude, plus the folded pre-add Booth core.
//
// All cores get the same stimulus: the memory self-test (must pass, and
// clears the history), the MAC self-test (each signature is compared with
// an independent model for that core's operand shape; 256 patterns to keep
// the run short), then the distorted-sine test signal (carrier fs/9 plus
// distortion fs/3 at equal amplitude) followed by random full-scale samples
// with random alpha. A sample is given when every core is ready. Every
// output of every core is compared with the integer reference
// y(n) = alpha(n) + sum_m h(m) x(n-m), and the latency is checked: 27
// cycles for direct form, 16 for folded direct form.
module tb_fir_family;
  import fir_pkg::*;

  localparam int NC = 17;
  localparam int NPAT = 256;
  localparam arch_e A [NC] = '{
    ARCH_DF, ARCH_DF, ARCH_DF, ARCH_DF, ARCH_DF, ARCH_DF, ARCH_DF, ARCH_DF,
    ARCH_FDF, ARCH_FDF, ARCH_FDF, ARCH_FDF, ARCH_FDF,
    ARCH_FDF, ARCH_FDF, ARCH_FDF, ARCH_FDF};
  localparam mult_e M [NC] = '{
    MULT_BOOTH, MULT_RB_BOOTH, MULT_RG_BOOTH, MULT_WD,
    MULT_BOOTH, MULT_RB_BOOTH, MULT_RG_BOOTH, MULT_WD,
    MULT_BOOTH, MULT_RB_BOOTH, MULT_RG_BOOTH, MULT_P_BOOTH, MULT_WD,
    MULT_BOOTH, MULT_RB_BOOTH, MULT_RG_BOOTH, MULT_WD};
  localparam numrep_e R [NC] = '{
    NR_2SC, NR_2SC, NR_2SC, NR_2SC, NR_SM, NR_SM, NR_SM, NR_SM,
    NR_2SC, NR_2SC, NR_2SC, NR_2SC, NR_2SC, NR_SM, NR_SM, NR_SM, NR_SM};

  logic        clk = 1'b0;
  logic        rst_n;
  logic        x_valid;
  logic signed [15:0] x_in;
  logic [35:0] alpha;
  logic        rb_start, mb_start, scan_en;
  logic        ready [NC], y_valid [NC], rb_done [NC], rb_fail [NC], mb_done [NC], so [NC];
  logic signed [35:0] y_out [NC];
  logic [35:0] sig [NC];
  int checks = 0, failures = 0;
  int cyc = 0;

  longint exp_q [NC][$];
  int     t_q [NC][$];
  int     n_out [NC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  for (genvar i = 0; i < NC; i++) begin : g_core
    fir_core #(.ARCH(A[i]), .MULT(M[i]), .NUMREP(R[i]), .BIST_NPAT(NPAT)) u_core (
      .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .alpha(alpha),
      .ready(ready[i]), .y_valid(y_valid[i]), .y_out(y_out[i]),
      .ram_bist_start(rb_start), .ram_bist_done(rb_done[i]), .ram_bist_fail(rb_fail[i]),
      .mac_bist_start(mb_start), .mac_bist_done(mb_done[i]), .mac_signature(sig[i]),
      .scan_en(scan_en), .scan_in(1'b0), .scan_out(so[i]));

    always @(posedge clk) begin
      if (rst_n && y_valid[i]) begin
        if (exp_q[i].size() == 0) begin
          failures++;
          $display("FAIL core %0d unexpected output", i);
        end else begin
          expect_eq(longint'(y_out[i]), exp_q[i].pop_front(), $sformatf("core %0d output", i));
          expect_eq(cyc - t_q[i].pop_front(), (A[i] == ARCH_FDF) ? 16 : 27,
                    $sformatf("core %0d latency", i));
          n_out[i]++;
        end
      end
    end
  end

  function automatic logic [35:0] model_signature(int i);
    logic [31:0] l;
    logic [35:0] sm, m;
    logic [71:0] w;
    longint prod, g;
    l = 32'hACE1_2468;
    sm = '0;
    m = '0;
    for (int k = 0; k < NPAT; k++) begin
      if (k != 0) m = {m[34:0], m[35] ^ m[24]} ^ sm;
      w = {l[7:0], ({l[24:0], l[31:25]} ^ 32'h9E37_79B9), l};
      if (M[i] == MULT_P_BOOTH) g = longint'($signed(w[30:15])) + longint'($signed(w[51:36]));
      else if (A[i] == ARCH_FDF) g = longint'($signed(w[31:15]));
      else g = longint'($signed(w[30:15]));
      prod = longint'($signed(w[15:0])) * g;
      if (w[61]) prod = -prod;
      sm = ((w[60] && k != 0) ? sm : w[71:36]) + 36'(prod);
      l = {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
    end
    return {m[34:0], m[35] ^ m[24]} ^ sm;
  endfunction

  longint hist [24];

  function automatic bit all_ready();
    for (int i = 0; i < NC; i++) if (!ready[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic put_sample(input logic signed [15:0] xv, input logic [35:0] av);
    longint acc;
    while (!all_ready()) @(negedge clk);
    x_valid = 1'b1;
    x_in = xv;
    alpha = av;
    for (int m = 23; m > 0; m--) hist[m] = hist[m-1];
    hist[0] = longint'(xv);
    acc = longint'($signed(av));
    for (int m = 0; m < 24; m++)
      acc += longint'(DEFAULT_COEFS[(m < 12) ? m : 23 - m]) * hist[m];
    for (int i = 0; i < NC; i++) begin
      exp_q[i].push_back(acc);
      t_q[i].push_back(cyc);
    end
    @(negedge clk);
    x_valid = 1'b0;
  endtask

  initial begin
    real pi;
    pi = 3.14159265358979;
    rst_n = 1'b0; x_valid = 0; x_in = '0; alpha = '0; rb_start = 0; mb_start = 0; scan_en = 0;
    for (int m = 0; m < 24; m++) hist[m] = 0;
    for (int i = 0; i < NC; i++) n_out[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rb_start = 1'b1;
    @(negedge clk);
    rb_start = 1'b0;
    repeat (160) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      expect_eq(longint'(rb_done[i]), 1, $sformatf("core %0d memory test done", i));
      expect_eq(longint'(rb_fail[i]), 0, $sformatf("core %0d memory test pass", i));
    end
    mb_start = 1'b1;
    @(negedge clk);
    mb_start = 1'b0;
    repeat (NPAT + 10) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      expect_eq(longint'(mb_done[i]), 1, $sformatf("core %0d MAC test done", i));
      expect_eq(longint'(sig[i]), longint'(model_signature(i)), $sformatf("core %0d MAC signature", i));
    end
    for (int n = 0; n < 120; n++) begin
      real v;
      v = 16000.0 * $sin(2.0 * pi * real'(n) / 9.0) + 16000.0 * $sin(2.0 * pi * real'(n) / 3.0 + 0.3);
      put_sample(16'($rtoi(v)), 36'd0);
    end
    for (int n = 0; n < 120; n++) begin
      logic [15:0] xv;
      case ($urandom % 4)
        0: xv = 16'h8000;
        1: xv = 16'h7FFF;
        default: xv = 16'($urandom);
      endcase
      put_sample(xv, {$urandom, $urandom} >> 30);
    end
    repeat (40) @(negedge clk);
    for (int i = 0; i < NC; i++) expect_eq(n_out[i], 240, $sformatf("core %0d output count", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
