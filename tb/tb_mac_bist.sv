// tb_mac_bist: self-checking testbench for the MAC with its self-test.
//
// 1. Functional mode: random MAC operations pass through the isolation
//    multiplexers and match a reference accumulator.
// 2. Self-test: after a bist_start pulse the unit must stay busy for
//    NPAT + 1 = 1025 cycles and then report done. The signature must equal
//    the one computed here by an independent model of the pattern
//    generator (32-bit LFSR), the MAC arithmetic and the 36-bit MISR.
// 3. Scan: shifting the signature out on scan_out (MSB first) must return
//    it bit for bit; a pattern shifted in through scan_in must appear in the
//    LFSR/MISR chain (checked on the signature port).
module tb_mac_bist;
  localparam logic [31:0] SEED = 32'hACE1_2468;
  localparam int NPAT = 1024;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en, acc, neg;
  logic [35:0] alpha, s, sig;
  logic [15:0] beta, g1, g2;
  logic        start, busy, done, scan_en, scan_in, scan_out;
  int checks = 0, failures = 0;

  mac_bist dut (
    .clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .neg(neg), .alpha(alpha),
    .beta(beta), .gamma1(g1), .gamma2(g2), .s(s), .bist_start(start),
    .bist_busy(busy), .bist_done(done), .signature(sig), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out));

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [35:0] mac_op(logic [35:0] s0, logic a, logic n,
                                         logic [35:0] al, logic [15:0] b, logic [15:0] g);
    longint prod;
    prod = longint'($signed(b)) * longint'($signed(g));
    if (n) prod = -prod;
    return (a ? s0 : al) + 36'(prod);
  endfunction

  function automatic logic [35:0] expected_signature();
    logic [31:0] l;
    logic [35:0] sm, m;
    logic [71:0] w;
    l = SEED;
    sm = '0;
    m = '0;
    for (int k = 0; k < NPAT; k++) begin
      if (k != 0) m = {m[34:0], m[35] ^ m[24]} ^ sm;
      w  = {l[7:0], ({l[24:0], l[31:25]} ^ 32'h9E37_79B9), l};
      sm = mac_op(sm, w[60] && k != 0, w[61], w[71:36], w[15:0], w[30:15]);
      l  = {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
    end
    m = {m[34:0], m[35] ^ m[24]} ^ sm;
    return m;
  endfunction

  initial begin
    logic [35:0] ref_s, exp_sig, shifted;
    int cyc;
    rst_n = 1'b0; en = 0; acc = 0; neg = 0; alpha = '0; beta = '0; g1 = '0; g2 = '0;
    start = 0; scan_en = 0; scan_in = 0;
    ref_s = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // 1. functional
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      en = 1'($urandom); acc = 1'($urandom); neg = 1'($urandom);
      alpha = {$urandom, $urandom} >> 28; beta = 16'($urandom); g1 = 16'($urandom);
      g2 = 16'($urandom);
      @(posedge clk);
      #1;
      if (en) ref_s = mac_op(ref_s, acc, neg, alpha, beta, g1);
      expect_eq(64'(s), 64'(ref_s), "functional MAC");
    end
    // 2. self-test
    exp_sig = expected_signature();
    @(negedge clk);
    start = 1'b1;
    en = 1'b0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    expect_eq(64'(cyc), 64'(NPAT + 1), "BIST cycles after start");
    expect_eq(64'(done), 64'd1, "done");
    expect_eq(64'(sig), 64'(exp_sig), "signature");
    // 3. scan out the signature, MSB first
    shifted = '0;
    scan_en = 1'b1;
    for (int i = 0; i < 36; i++) begin
      shifted = {shifted[34:0], scan_out};
      scan_in = 1'(i);
      @(negedge clk);
    end
    scan_en = 1'b0;
    expect_eq(64'(shifted), 64'(exp_sig), "scanned signature");
    // after 36 more shifts with an alternating input pattern, the MISR holds
    // the LFSR's former top 36 bits (32 bits of LFSR plus 4 of scan_in)
    scan_en = 1'b1;
    for (int i = 0; i < 68; i++) begin
      scan_in = 1'(i % 3 == 0);
      @(negedge clk);
    end
    scan_en = 1'b0;
    begin
      logic [67:0] chain;
      chain = '0;
      for (int i = 0; i < 68; i++) chain = {chain[66:0], 1'(i % 3 == 0)};
      expect_eq(64'(sig), 64'(chain[67:32]), "scan-in reaches MISR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
