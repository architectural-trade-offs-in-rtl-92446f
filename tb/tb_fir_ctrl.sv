// tb_fir_ctrl: self-checking testbench for the filter controller.
//
// A direct-form and a folded (default) controller are run side by side for
// several samples. For each sample the testbench records, cycle by cycle,
// what the controller asks for and compares it with the schedule worked out
// here: the write address (write pointer moving down modulo 24), the read
// addresses of tap m (wptr + m; for FDF also wptr + 23 - m on port 2), the
// coefficient address (m or 23 - m for DF, m for FDF) in the cycle the
// operand registers load, exactly 24 (DF) or 12 (FDF) MAC cycles with only
// the first restarting the sum, the output load 26 (DF) / 15 (FDF) cycles
// after the sample was taken, and ready returning after 25 / 13 cycles.
// hold must block new samples. Finally the scan path: a bit pattern shifted
// in must come out at scan_out after as many clocks as the chain is long.
module tb_fir_ctrl;
  import fir_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic x_valid, hold, scan_en, scan_in;
  int checks = 0, failures = 0;

  // per-instance observation signals
  logic       ready [2], we [2], ld_port [2], ld_alpha [2], ld_op [2];
  logic       mac_en [2], mac_acc [2], out_ld [2], so [2];
  logic [4:0] wa [2], r1 [2], r2 [2];
  logic [3:0] ba [2];

  fir_ctrl #(.ARCH(ARCH_DF)) u_df (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .ready(ready[0]), .hold(hold),
    .ram_we(we[0]), .ram_waddr(wa[0]), .ram_raddr1(r1[0]), .ram_raddr2(r2[0]),
    .ld_port(ld_port[0]), .b_addr(ba[0]), .ld_alpha(ld_alpha[0]), .ld_op(ld_op[0]),
    .mac_en(mac_en[0]), .mac_acc(mac_acc[0]), .out_ld(out_ld[0]),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(so[0]));
  fir_ctrl u_fdf (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .ready(ready[1]), .hold(hold),
    .ram_we(we[1]), .ram_waddr(wa[1]), .ram_raddr1(r1[1]), .ram_raddr2(r2[1]),
    .ld_port(ld_port[1]), .b_addr(ba[1]), .ld_alpha(ld_alpha[1]), .ld_op(ld_op[1]),
    .mac_en(mac_en[1]), .mac_acc(mac_acc[1]), .out_ld(out_ld[1]),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(so[1]));

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // run one sample on instance i (0 = DF, 1 = FDF) and check its schedule
  task automatic one_sample(input int i, inout int wptr);
    int fdf, nrd, t, nmac, nacc0, rdidx, opidx, t_out, t_ready;
    int exp_r1 [24];
    int exp_r2 [24];
    fdf = i;
    nrd = fdf ? 12 : 24;
    @(negedge clk);
    expect_eq(int'(ready[i]), 1, "ready before sample");
    x_valid = 1'b1;
    #1;
    wptr = (wptr + 23) % 24;
    expect_eq(int'(we[i]), 1, "write enable");
    expect_eq(int'(wa[i]), wptr, "write address");
    expect_eq(int'(ld_alpha[i]), 1, "alpha load");
    @(negedge clk);
    x_valid = 1'b0;
    for (int m = 0; m < 24; m++) begin
      exp_r1[m] = (wptr + m) % 24;
      exp_r2[m] = (wptr + 23 - m) % 24;
    end
    t = 1; nmac = 0; nacc0 = 0; rdidx = 0; opidx = 0; t_out = -1; t_ready = -1;
    while (t < 40) begin
      #1;
      if (t_ready < 0 && ready[i]) t_ready = t;
      // read stage
      if ((fdf && ld_port[i]) || (!fdf && ld_op[i])) begin
        expect_eq(int'(r1[i]), exp_r1[rdidx], "read address port 1");
        if (fdf) expect_eq(int'(r2[i]), exp_r2[rdidx], "read address port 2");
        rdidx++;
      end
      // operand register load: coefficient address
      if (ld_op[i]) begin
        expect_eq(int'(ba[i]), fdf ? opidx : ((opidx < 12) ? opidx : 23 - opidx), "coefficient address");
        opidx++;
      end
      if (mac_en[i]) begin
        nmac++;
        if (!mac_acc[i]) nacc0++;
        if (nmac == 1) expect_eq(int'(mac_acc[i]), 0, "first MAC restarts");
      end
      if (out_ld[i]) t_out = t;
      @(negedge clk);
      t++;
    end
    expect_eq(rdidx, nrd, "read cycles");
    expect_eq(opidx, nrd, "operand loads");
    expect_eq(nmac, nrd, "MAC cycles per sample");
    expect_eq(nacc0, 1, "restarts per sample");
    expect_eq(t_out, fdf ? 15 : 26, "output load cycle");
    expect_eq(t_ready, fdf ? 13 : 25, "ready again");
  endtask

  initial begin
    int wp_df, wp_fdf;
    int sw;
    logic [63:0] pat, got;
    rst_n = 1'b0; x_valid = 0; hold = 0; scan_en = 0; scan_in = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wp_df = 0;
    wp_fdf = 0;
    // interleave: both controllers see x_valid, but only the one checked
    // is idle-aligned; run DF samples then FDF samples
    for (int n = 0; n < 30; n++) one_sample(0, wp_df);
    // the FDF controller accepted the same 30 x_valid pulses
    wp_fdf = (24 * 30 - 30) % 24;
    for (int n = 0; n < 30; n++) begin
      one_sample(1, wp_fdf);
      wp_df = (wp_df + 23) % 24;   // DF controller took this sample too
    end
    // hold blocks new samples
    @(negedge clk);
    hold = 1'b1;
    x_valid = 1'b1;
    #1;
    expect_eq(int'(we[0]) + int'(we[1]), 0, "no write while hold");
    expect_eq(int'(ready[0]) + int'(ready[1]), 0, "not ready while hold");
    @(negedge clk);
    hold = 1'b0;
    x_valid = 1'b0;
    // scan path: shift a random pattern through each chain
    sw = $bits(u_fdf.q);
    pat = {$urandom, $urandom};
    got = '0;
    scan_en = 1'b1;
    for (int k = 0; k < 2 * sw; k++) begin
      scan_in = (k < sw) ? pat[k] : 1'b0;
      if (k >= sw) got[k - sw] = so[1];
      @(negedge clk);
    end
    scan_en = 1'b0;
    for (int k = 0; k < sw; k++) expect_eq(int'(got[k]), int'(pat[k]), "FDF scan chain bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
