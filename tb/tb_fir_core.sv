// tb_fir_core: end-to-end testbench of the filter core at its default
// parameters (folded direct form, Wallace-Dadda multiplier, sign-magnitude
// operands, 1024 self-test patterns).
//
// Sequence:
//  1. Memory self-test: must take 144 cycles and pass; it leaves the sample
//     history at zero, which the reference filter assumes.
//  2. MAC self-test: busy for 1025 cycles; the signature must equal the one
//     computed by an independent model in this testbench. Samples offered
//     while a self-test runs must be refused (ready low, no output).
//  3. Scan path: a pattern shifted into scan_in must come out of scan_out
//     after as many clocks as the chain is long (controller + LFSR + MISR).
//     Reset follows, since the scan changed the controller state.
//  4. Filtering: a distorted sine (carrier fs/9 plus an equally strong
//     distortion at fs/3, i.e. signal-to-noise ratio 1), then random samples
//     including full-scale corners, each with a random alpha. Samples are
//     given back to back (accepted in the first cycle ready is high) and
//     with idle gaps. Every output is compared with
//     y(n) = alpha(n) + sum_m h(m) x(n-m) computed with integers, and the
//     latency from sample to y_valid must be 16 cycles, the sample spacing
//     at full rate 13 cycles (12 MAC cycles per output).
//  5. The low-pass effect: over the steady-state part of the sine run, the
//     output must keep the fs/9 carrier and suppress the fs/3 distortion
//     (checked by correlating with the two frequencies).
// Counts of each mechanism (self-tests, refused samples, scan shifts,
// back-to-back and gapped samples) are printed; one that never happened is
// a failure.
module tb_fir_core;
  import fir_pkg::*;

  localparam int LAT   = 16;    // sample edge to y_valid
  localparam int RATE  = 13;    // cycles between samples at full rate
  localparam int NMAC  = 12;
  localparam int NSINE = 180;
  localparam int NRAND = 120;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        x_valid, ready, y_valid;
  logic signed [15:0] x_in;
  logic [35:0] alpha, mac_sig;
  logic signed [35:0] y_out;
  logic        rb_start, rb_done, rb_fail, mb_start, mb_done;
  logic        scan_en, scan_in, scan_out;
  int checks = 0, failures = 0;

  fir_core dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .alpha(alpha),
    .ready(ready), .y_valid(y_valid), .y_out(y_out),
    .ram_bist_start(rb_start), .ram_bist_done(rb_done), .ram_bist_fail(rb_fail),
    .mac_bist_start(mb_start), .mac_bist_done(mb_done), .mac_signature(mac_sig),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out));

  always #5 clk = ~clk;

  // mechanism counters
  int n_ram_bist = 0, n_mac_bist = 0, n_refused = 0, n_scan = 0;
  int n_b2b = 0, n_gap = 0, n_out = 0;

  // reference model state
  longint hist [24];
  longint exp_q [$];
  int     t_q [$];
  int     cyc = 0;
  bit     scan_phase = 1'b0;   // outputs are meaningless while scanning
  longint ysave [$];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic longint coef(int m);
    return longint'(DEFAULT_COEFS[(m < 12) ? m : 23 - m]);
  endfunction

  // independent model of the MAC self-test signature for this configuration
  // (gamma is the 17-bit operand behind the folded filter's pre-adder)
  function automatic logic [35:0] model_signature(int npat);
    logic [31:0] l;
    logic [35:0] sm, m;
    logic [71:0] w;
    longint prod;
    l = 32'hACE1_2468;
    sm = '0;
    m = '0;
    for (int k = 0; k < npat; k++) begin
      if (k != 0) m = {m[34:0], m[35] ^ m[24]} ^ sm;
      w = {l[7:0], ({l[24:0], l[31:25]} ^ 32'h9E37_79B9), l};
      prod = longint'($signed(w[15:0])) * longint'($signed(w[31:15]));
      if (w[61]) prod = -prod;
      sm = ((w[60] && k != 0) ? sm : w[71:36]) + 36'(prod);
      l = {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
    end
    return {m[34:0], m[35] ^ m[24]} ^ sm;
  endfunction

  // output checker: runs all the time
  always @(posedge clk) begin
    if (rst_n && y_valid && !scan_phase) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y_out);
      end else begin
        longint e;
        int t0;
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        expect_eq(longint'(y_out), e, "filter output");
        expect_eq(cyc - t0, LAT, "latency");
        ysave.push_back(longint'(y_out));
        n_out++;
      end
    end
  end

  // give one sample; gap = idle cycles to wait first
  task automatic put_sample(input logic signed [15:0] xv, input logic [35:0] av, input int gap);
    longint acc;
    int waited;
    repeat (gap) @(negedge clk);
    waited = 0;
    while (!ready) begin
      @(negedge clk);
      waited++;
    end
    if (gap == 0 && waited > 0) n_b2b++;
    if (gap > 0) n_gap++;
    x_valid = 1'b1;
    x_in = xv;
    alpha = av;
    for (int m = 23; m > 0; m--) hist[m] = hist[m-1];
    hist[0] = longint'(xv);
    acc = longint'($signed(av));
    for (int m = 0; m < 24; m++) acc += coef(m) * hist[m];
    exp_q.push_back(acc);
    t_q.push_back(cyc);
    @(negedge clk);
    x_valid = 1'b0;
  endtask

  initial begin
    int c, sw, t_prev;
    logic [127:0] pat, got;
    logic [35:0] esig;
    real pi, cs9, sn9, cs3, sn3, a9, a3;
    pi = 3.14159265358979;
    rst_n = 1'b0; x_valid = 0; x_in = '0; alpha = '0; rb_start = 0; mb_start = 0;
    scan_en = 0; scan_in = 0;
    for (int m = 0; m < 24; m++) hist[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. memory self-test
    @(negedge clk);
    rb_start = 1'b1;
    @(negedge clk);
    rb_start = 1'b0;
    c = 1;
    while (!rb_done) begin
      // a sample offered now must be refused
      x_valid = 1'b1;
      x_in = 16'sh1234;
      #1;
      if (!ready) n_refused++;
      expect_eq(longint'(ready), 0, "ready low during memory self-test");
      @(negedge clk);
      c++;
    end
    x_valid = 1'b0;
    expect_eq(c, 145, "memory self-test cycles (start to done)");
    expect_eq(longint'(rb_fail), 0, "memory self-test pass");
    n_ram_bist++;

    // 2. MAC self-test
    esig = model_signature(1024);
    @(negedge clk);
    mb_start = 1'b1;
    @(negedge clk);
    mb_start = 1'b0;
    c = 1;
    while (!mb_done) begin
      x_valid = 1'b1;
      #1;
      if (!ready) n_refused++;
      @(negedge clk);
      c++;
    end
    x_valid = 1'b0;
    expect_eq(c, 1026, "MAC self-test cycles (start to done)");
    expect_eq(longint'(mac_sig), longint'(esig), "MAC signature");
    n_mac_bist++;
    repeat (30) @(negedge clk);
    expect_eq(n_out, 0, "no output from refused samples");

    // 3. scan path
    sw = $bits(dut.u_ctrl.q) + 32 + 36;
    pat = {$urandom, $urandom, $urandom, $urandom};
    got = '0;
    scan_phase = 1'b1;
    scan_en = 1'b1;
    for (int k = 0; k < 2 * sw; k++) begin
      scan_in = (k < sw) ? pat[k] : 1'b0;
      if (k >= sw) got[k - sw] = scan_out;
      @(negedge clk);
      n_scan++;
    end
    scan_en = 1'b0;
    for (int k = 0; k < sw; k++) expect_eq(longint'(got[k]), longint'(pat[k]), "scan chain bit");
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    scan_phase = 1'b0;

    // 4. filtering: distorted sine, back to back, alpha = 0
    for (int n = 0; n < NSINE; n++) begin
      real v;
      v = 16000.0 * $sin(2.0 * pi * real'(n) / 9.0) + 16000.0 * $sin(2.0 * pi * real'(n) / 3.0 + 0.3);
      put_sample(16'($rtoi(v)), 36'd0, (n % 40 == 39) ? 5 : 0);
    end
    // spacing at full rate
    t_prev = -1;
    for (int n = 0; n < 6; n++) begin
      put_sample(16'($urandom), 36'd0, 0);
      if (t_prev >= 0) expect_eq(t_q[$] - t_prev, RATE, "sample spacing at full rate");
      t_prev = t_q[$];
    end
    // random samples, corners, random alpha, random gaps
    for (int n = 0; n < NRAND; n++) begin
      logic [15:0] xv;
      case ($urandom % 5)
        0: xv = 16'h8000;
        1: xv = 16'h7FFF;
        default: xv = 16'($urandom);
      endcase
      put_sample(xv, {$urandom, $urandom} >> 30, ($urandom % 3 == 0) ? int'($urandom % 20) : 0);
    end
    repeat (LAT + 5) @(negedge clk);
    expect_eq(exp_q.size(), 0, "all outputs delivered");

    // 5. low-pass check over outputs 40..179 of the sine run
    cs9 = 0; sn9 = 0; cs3 = 0; sn3 = 0;
    for (int n = 40; n < NSINE; n++) begin
      cs9 += real'(ysave[n]) * $cos(2.0 * pi * real'(n) / 9.0);
      sn9 += real'(ysave[n]) * $sin(2.0 * pi * real'(n) / 9.0);
      cs3 += real'(ysave[n]) * $cos(2.0 * pi * real'(n) / 3.0);
      sn3 += real'(ysave[n]) * $sin(2.0 * pi * real'(n) / 3.0);
    end
    a9 = $sqrt(cs9 * cs9 + sn9 * sn9);
    a3 = $sqrt(cs3 * cs3 + sn3 * sn3);
    checks++;
    if (!(a3 * 20.0 < a9)) begin
      failures++;
      $display("FAIL low-pass: fs/9 amplitude %f, fs/3 amplitude %f", a9, a3);
    end
    $display("fs/9 to fs/3 output amplitude ratio: %f", a9 / a3);

    $display("mechanisms: memory self-tests=%0d MAC self-tests=%0d refused samples=%0d scan shifts=%0d",
             n_ram_bist, n_mac_bist, n_refused, n_scan);
    $display("            back-to-back samples=%0d gapped samples=%0d outputs=%0d",
             n_b2b, n_gap, n_out);
    checks++;
    if (n_ram_bist == 0 || n_mac_bist == 0 || n_refused == 0 || n_scan == 0 ||
        n_b2b == 0 || n_gap == 0 || n_out == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
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
