// tb_ram_bist_cover: fault coverage of the 6n memory self-test.
//
// The two-port sample RAM of the folded core (24 words of 16 bits) is
// wrapped by its self-test. One fault at a time is injected, the self-test
// is run, and the fault counts as detected when bist_fail is set:
//   - every cell bit stuck at 0 and stuck at 1 (768 faults), forced on the
//     latch that stores the bit;
//   - every word's latch enable from the address demultiplexer stuck at 0
//     (the word can never be written) and stuck at 1 (the word follows the
//     write data all the time), 48 faults.
// Fault-free runs before and after must pass and take 6 x 24 = 144 cycles.
// The 6n march detects all of these faults, so the check is 100 %.
module tb_ram_bist_cover;
  localparam int DEPTH = 24;
  localparam int W     = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [4:0]  ra [2];
  logic [15:0] rd [2];
  logic        start, busy, done, fail;
  int checks = 0, failures = 0;

  // fault selection: kind (0 cell, 1 latch enable), word, bit, value, active
  int          f_kind, f_word, f_bit;
  logic        f_val, f_on;

  ram_bist #(.DEPTH(DEPTH), .W(W), .NRD(2)) dut (
    .clk(clk), .rst_n(rst_n), .we(1'b0), .waddr('0), .wdata('0), .raddr(ra),
    .rdata(rd), .bist_start(start), .bist_busy(busy), .bist_done(done),
    .bist_fail(fail));

  always #5 clk = ~clk;

  for (genvar i = 0; i < DEPTH; i++) begin : g_word
    for (genvar b = 0; b < W; b++) begin : g_bit
      always @(f_on or f_kind or f_word or f_bit or f_val)
        if (f_on && f_kind == 0 && f_word == i && f_bit == b)
          force dut.u_ram.mem[i][b] = f_val;
        else
          release dut.u_ram.mem[i][b];
    end
    always @(f_on or f_kind or f_word or f_val)
      if (f_on && f_kind == 1 && f_word == i)
        force dut.u_ram.len[i] = f_val;
      else
        release dut.u_ram.len[i];
  end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (word %0d bit %0d value %0d)",
                                  what, f_word, f_bit, f_val);
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
      @(posedge clk);
      #1;
      cycles++;
    end
  endtask

  initial begin
    int cyc, n_cell = 0, d_cell = 0, n_len = 0, d_len = 0;
    rst_n = 1'b0; start = 1'b0; ra[0] = '0; ra[1] = '0;
    f_on = 1'b0; f_kind = -1; f_word = 0; f_bit = 0; f_val = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_bist(cyc);
    expect_true(cyc == 6 * DEPTH, "good run cycle count");
    expect_true(done && !fail, "good run passes");
    for (int i = 0; i < DEPTH; i++)
      for (int b = 0; b < W; b++)
        for (int v = 0; v < 2; v++) begin
          f_kind = 0; f_word = i; f_bit = b; f_val = v[0]; f_on = 1'b1;
          run_bist(cyc);
          f_on = 1'b0;
          n_cell++;
          if (fail) d_cell++;
          expect_true(fail, "cell stuck-at detected");
          expect_true(cyc == 6 * DEPTH, "faulty run cycle count");
        end
    for (int i = 0; i < DEPTH; i++)
      for (int v = 0; v < 2; v++) begin
        f_kind = 1; f_word = i; f_bit = 0; f_val = v[0]; f_on = 1'b1;
        run_bist(cyc);
        f_on = 1'b0;
        n_len++;
        if (fail) d_len++;
        expect_true(fail, "latch enable stuck-at detected");
      end
    run_bist(cyc);
    expect_true(done && !fail, "good run after the faults passes");
    $display("cell stuck-at faults %0d, detected %0d", n_cell, d_cell);
    $display("latch enable stuck-at faults %0d, detected %0d", n_len, d_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
