// tb_ram_latch: self-checking testbench for the latch-bank sample RAM.
//
// A two-read-port instance (24 x 16) is written through its write port
// with flip-flop-driven signals, as in the core, and read back through both
// ports against a reference array kept by the testbench: random writes and
// reads, a write followed by a read of the same word in the next cycle,
// cycles without write enable (contents must hold), a read of the word
// being written (returns the new value late in the cycle) and out-of-range read
// addresses (must read zero).
module tb_ram_latch;
  logic        clk = 1'b0;
  logic        we;
  logic [4:0]  wa;
  logic [15:0] wd;
  logic [4:0]  ra [2];
  logic [15:0] rd [2];
  logic [15:0] ref_mem [24];
  int checks = 0, failures = 0;

  ram_latch #(.DEPTH(24), .W(16), .NRD(2)) dut (
    .clk(clk), .we(we), .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  always #5 clk = ~clk;

  task automatic check_read(input int port);
    logic [15:0] exp;
    exp = (ra[port] < 24) ? ref_mem[ra[port]] : 16'h0000;
    checks++;
    if (rd[port] !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL port%0d addr %0d got %h exp %h", port, ra[port], rd[port], exp);
    end
  endtask

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra[0] = '0; ra[1] = '0;
    // fill every word
    for (int i = 0; i < 24; i++) begin
      @(posedge clk);
      we <= 1'b1; wa <= 5'(i); wd <= 16'($urandom);
      #1 ref_mem[i] = wd;
    end
    @(posedge clk);
    we <= 1'b0;
    // random traffic; reads are sampled just before the rising edge
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk);
      we    <= 1'($urandom);
      wa    <= 5'($urandom % 24);
      wd    <= 16'($urandom);
      ra[0] <= 5'($urandom % 26);
      ra[1] <= 5'($urandom % 26);
      @(negedge clk);
      #4;
      // the latches are open in the low phase: a word being written
      // already reads its new value before the cycle ends
      if (we) ref_mem[wa] = wd;
      check_read(0);
      check_read(1);
      @(posedge clk);
      // read back the word just written
      we    <= 1'b0;
      ra[0] <= wa;
      ra[1] <= wa;
      @(negedge clk);
      #4;
      check_read(0);
      check_read(1);
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
