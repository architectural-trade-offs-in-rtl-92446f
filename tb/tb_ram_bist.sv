// tb_ram_bist: self-checking testbench for the RAM with its 6n self-test.
//
// 1. Functional path: random words written and read back on both ports of
//    a two-port instance through the isolation multiplexers.
// 2. Self-test on a good memory: busy for exactly 6 x 24 = 144 cycles,
//    done set, fail clear, and afterwards every word reads zero.
// 3. Self-test with an injected fault: the latch enable of one word is
//    forced inactive (the word cannot be written, a stuck word); the test
//    must report fail. Then released, the test must pass again.
// 4. Functional traffic during a self-test is ignored (isolation), and the
//    read outputs bypass the memory: they show the write data input.
module tb_ram_bist;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        we;
  logic [4:0]  wa;
  logic [15:0] wd;
  logic [4:0]  ra [2];
  logic [15:0] rd [2];
  logic        start, busy, done, fail;
  logic [15:0] ref_mem [24];
  int checks = 0, failures = 0;

  ram_bist #(.DEPTH(24), .W(16), .NRD(2)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd), .raddr(ra),
    .rdata(rd), .bist_start(start), .bist_busy(busy), .bist_done(done),
    .bist_fail(fail));

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic fill_random();
    for (int i = 0; i < 24; i++) begin
      @(posedge clk);
      we <= 1'b1; wa <= 5'(i); wd <= 16'($urandom | 1);
      #1 ref_mem[i] = wd;
    end
    @(posedge clk);
    we <= 1'b0;
  endtask

  task automatic read_all(input bit zero);
    for (int i = 0; i < 24; i++) begin
      @(posedge clk);
      ra[0] <= 5'(i);
      ra[1] <= 5'(23 - i);
      @(negedge clk);
      expect_eq(32'(rd[0]), zero ? 32'd0 : 32'(ref_mem[i]), "read port 0");
      expect_eq(32'(rd[1]), zero ? 32'd0 : 32'(ref_mem[23-i]), "read port 1");
    end
  endtask

  task automatic run_bist(output int cycles);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    #1;
    while (busy) begin
      // isolation: functional writes during the test must have no effect
      we <= 1'b1; wa <= 5'($urandom % 24); wd <= 16'($urandom);
      #1;
      expect_eq(32'(rd[0]), 32'(wd), "bypass port 0");
      expect_eq(32'(rd[1]), 32'(wd), "bypass port 1");
      @(posedge clk);
      #1;
      cycles++;
    end
    we <= 1'b0;
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; we = 1'b0; wa = '0; wd = '0; ra[0] = '0; ra[1] = '0; start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fill_random();
    read_all(1'b0);
    // good memory
    run_bist(cyc);
    expect_eq(32'(cyc), 32'd144, "BIST cycle count");
    expect_eq(32'(done), 32'd1, "done");
    expect_eq(32'(fail), 32'd0, "fail on good memory");
    read_all(1'b1);
    // stuck word 7
    fill_random();
    force dut.u_ram.len[7] = 1'b0;
    run_bist(cyc);
    expect_eq(32'(fail), 32'd1, "fail with stuck word");
    release dut.u_ram.len[7];
    run_bist(cyc);
    expect_eq(32'(fail), 32'd0, "fail after release");
    expect_eq(32'(done), 32'd1, "done after release");
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
