// tb_mac_bist_cover: stuck-at fault coverage of the MAC self-test.
//
// The MAC with its BIST is instantiated as the default filter core uses it
// (folded form: 16-bit beta, 17-bit gamma; Wallace-Dadda multiplier,
// sign-magnitude operands, 1024 patterns). First a fault-free self-test
// gives the good signature, and records which values every injected net bit
// takes; a second fault-free run must give the same signature. Then, one at
// a time, every bit of the MAC's internal nets is forced to 0 and to 1
// (single stuck-at faults), the self-test is run, and the fault counts as
// detected when the signature differs from the good one.
//
// Nets covered (inside the MAC): the multiplier operands after the
// sign-magnitude converters (mx, my), the effective negate (ne), the two
// carry-save product vectors (out1, out2), the vectors after the negating
// XOR (pa, pb), the alpha/accumulator multiplexer (mux), the carry-save
// adder outputs (s1, s2) and the carry-look-ahead adder output (p).
// Nets inside the multiplier's reduction tree are not injected here.
//
// A stuck-at-v fault is "excited" when the fault-free run drives the bit to
// the opposite value at least once. Faults that are never excited are bits
// that the patterns hold constant: low bits of out2 that the reduction tree
// never drives, the top bits of the unsigned product, and the operand
// magnitude MSBs, which are 1 only for the most negative operand.
//
// Checks: both good runs agree, every run takes NPAT + 1 cycles, every
// excited fault is detected, and the coverage over all injected faults is
// at least 97 %.
module tb_mac_bist_cover;
  import fir_pkg::*;

  localparam int unsigned NPAT = 1024;
  localparam int NNET = 11;
  localparam int NET_W [NNET] = '{16, 17, 36, 36, 36, 36, 36, 36, 36, 36, 1};
  localparam string NET_N [NNET] = '{"mx", "my", "out1", "out2", "pa", "pb",
                                     "mux", "s1", "s2", "p", "ne"};

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start, busy, done;
  logic [35:0]   sig;
  logic          so;
  int checks = 0, failures = 0;

  // fault selection: net number, bit, stuck value, active
  int            f_net, f_bit;
  logic          f_val, f_on;

  mac_bist #(.BW(16), .GW(17), .AW(36), .MULT(MULT_WD), .NUMREP(NR_SM),
             .NPAT(NPAT)) dut (
    .clk(clk), .rst_n(rst_n), .en(1'b0), .acc(1'b0), .neg(1'b0),
    .alpha('0), .beta('0), .gamma1('0), .gamma2('0), .s(),
    .bist_start(start), .bist_busy(busy), .bist_done(done), .signature(sig),
    .scan_en(1'b0), .scan_in(1'b0), .scan_out(so));

  always #5 clk = ~clk;

  // one force/release process per injectable bit
  `define FAULT_NET(NAME, NUM, WIDTH)                                      \
    for (genvar i = 0; i < WIDTH; i++) begin : g_f_``NAME                   \
      always @(f_on or f_net or f_bit or f_val)                            \
        if (f_on && f_net == NUM && f_bit == i)                            \
          force dut.u_mac.NAME[i] = f_val;                                 \
        else                                                               \
          release dut.u_mac.NAME[i];                                       \
    end

  `FAULT_NET(mx,   0, 16)
  `FAULT_NET(my,   1, 17)
  `FAULT_NET(out1, 2, 36)
  `FAULT_NET(out2, 3, 36)
  `FAULT_NET(pa,   4, 36)
  `FAULT_NET(pb,   5, 36)
  `FAULT_NET(mux,  6, 36)
  `FAULT_NET(s1,   7, 36)
  `FAULT_NET(s2,   8, 36)
  `FAULT_NET(p,    9, 36)
  always @(f_on or f_net or f_val)
    if (f_on && f_net == 10) force dut.u_mac.ne = f_val;
    else release dut.u_mac.ne;

  // values each net bit took during the fault-free run
  logic          rec;
  logic [35:0]   ever1 [NNET];
  logic [35:0]   ever0 [NNET];
  logic [35:0]   cur [NNET];

  always_comb begin
    cur[0]  = 36'(dut.u_mac.mx);
    cur[1]  = 36'(dut.u_mac.my);
    cur[2]  = dut.u_mac.out1;
    cur[3]  = dut.u_mac.out2;
    cur[4]  = dut.u_mac.pa;
    cur[5]  = dut.u_mac.pb;
    cur[6]  = dut.u_mac.mux;
    cur[7]  = dut.u_mac.s1;
    cur[8]  = dut.u_mac.s2;
    cur[9]  = dut.u_mac.p;
    cur[10] = 36'(dut.u_mac.ne);
  end

  always @(negedge clk)
    if (rec && busy)
      for (int n = 0; n < NNET; n++) begin
        ever1[n] = ever1[n] | cur[n];
        ever0[n] = ever0[n] | ~cur[n];
      end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_bist(output logic [35:0] signature, output int cycles);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    #1;
    while (busy) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    signature = sig;
  endtask

  initial begin
    logic [35:0] good, again, got;
    int cyc, total = 0, found = 0, ex_tot = 0, ex_det = 0;
    int n_tot [NNET];
    int n_det [NNET];
    bit excited;
    for (int n = 0; n < NNET; n++) begin
      ever1[n] = '0;
      ever0[n] = '0;
    end
    rec = 1'b1;
    rst_n = 1'b0; start = 1'b0;
    f_on = 1'b0; f_net = -1; f_bit = 0; f_val = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_bist(good, cyc);
    rec = 1'b0;
    expect_true(cyc == NPAT + 1, "good run cycle count");
    expect_true(done == 1'b1, "good run done");
    run_bist(again, cyc);
    expect_true(again == good, "good signature repeats");
    $display("good signature %h", good);
    for (int n = 0; n < NNET; n++) begin
      n_tot[n] = 0;
      n_det[n] = 0;
      for (int b = 0; b < NET_W[n]; b++) begin
        for (int v = 0; v < 2; v++) begin
          f_net = n; f_bit = b; f_val = v[0]; f_on = 1'b1;
          run_bist(got, cyc);
          f_on = 1'b0;
          expect_true(cyc == NPAT + 1, "faulty run cycle count");
          n_tot[n]++;
          if (got != good) n_det[n]++;
          excited = (v == 0) ? ever1[n][b] : ever0[n][b];
          if (excited) begin
            ex_tot++;
            if (got != good) ex_det++;
          end
          if (got == good)
            $display("undetected: %s[%0d] stuck-at-%0d (%s)", NET_N[n], b, v,
                     excited ? "excited" : "never excited");
          if (excited) expect_true(got != good, "excited fault detected");
        end
      end
      $display("net %-4s  faults %3d  detected %3d", NET_N[n], n_tot[n], n_det[n]);
      total += n_tot[n];
      found += n_det[n];
    end
    $display("stuck-at faults %0d, detected %0d, coverage %0.2f %%",
             total, found, 100.0 * found / total);
    $display("excited faults %0d, detected %0d", ex_tot, ex_det);
    expect_true(found * 100 >= total * 97, "coverage at least 97 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
