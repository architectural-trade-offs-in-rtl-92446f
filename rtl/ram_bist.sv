// ram_bist: sample RAM (ram_latch) wrapped by its built-in self-test.
//
// Normal operation: the write port and the read ports are driven by the
// filter controller through isolation multiplexers. A one-cycle bist_start
// pulse switches the multiplexers to the BIST controller, which runs the
// 6n march test (MATS++), one memory operation per clock:
//   M0: for every address (up):    write 0
//   M1: for every address (up):    read 0, write 1
//   M2: for every address (down):  read 1, write 0, read 0
// "0" and "1" are the all-zeros and all-ones words. 6 x DEPTH operations
// in all (144 cycles for 24 words). Every read is checked on all read ports
// at once (the BIST drives the same address to all of them), so each read
// multiplexer is tested too. The output compressor is a comparator with a
// sticky fail flag. bist_done rises after the last operation; the memory
// is left all zeros. bist_fail is cleared at start.
//
// Output bypass: while the test runs, the read data outputs do not show
// the memory but the functional write data input (rdata[k] = wdata), so the
// test patterns never reach the logic behind the RAM and the environment
// still sees a defined, transparent path through the block.
//
// The choice of test (6n), and that the BIST encloses the RAM with
// multiplexers on its inputs and outputs, follow the core's test concept; the exact march elements
// (MATS++ is the standard 6n march) and the handshake are this design's own.
module ram_bist #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned W     = 16,
  parameter int unsigned NRD   = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // functional port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD],
  // self-test
  input  logic          bist_start,
  output logic          bist_busy,
  output logic          bist_done,
  output logic          bist_fail
);
  typedef enum logic [2:0] {
    T_IDLE, T_M0_W0, T_M1_R0, T_M1_W1, T_M2_R1, T_M2_W0, T_M2_R0
  } tstate_e;

  tstate_e       st;
  logic [AW-1:0] ta;          // test address
  logic          t_we;
  logic [W-1:0]  t_wd;
  logic          t_rd;        // a read is checked this cycle
  logic [W-1:0]  t_exp;       // expected read data
  logic          mismatch;

  logic          r_we;
  logic [AW-1:0] r_wa;
  logic [W-1:0]  r_wd;
  logic [AW-1:0] r_ra [NRD];
  logic [W-1:0]  m_rd [NRD];  // memory read data

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_comb begin
    t_we  = 1'b0;
    t_wd  = '0;
    t_rd  = 1'b0;
    t_exp = '0;
    unique case (st)
      T_M0_W0: begin t_we = 1'b1; t_wd = '0; end
      T_M1_R0: begin t_rd = 1'b1; t_exp = '0; end
      T_M1_W1: begin t_we = 1'b1; t_wd = '1; end
      T_M2_R1: begin t_rd = 1'b1; t_exp = '1; end
      T_M2_W0: begin t_we = 1'b1; t_wd = '0; end
      T_M2_R0: begin t_rd = 1'b1; t_exp = '0; end
      default: ;
    endcase
  end

  // isolation multiplexers
  always_comb begin
    r_we = bist_busy ? t_we : we;
    r_wa = bist_busy ? ta   : waddr;
    r_wd = bist_busy ? t_wd : wdata;
    for (int k = 0; k < NRD; k++) r_ra[k] = bist_busy ? ta : raddr[k];
  end

  ram_latch #(.DEPTH(DEPTH), .W(W), .NRD(NRD), .AW(AW)) u_ram (
    .clk(clk), .we(r_we), .waddr(r_wa), .wdata(r_wd), .raddr(r_ra), .rdata(m_rd)
  );

  // output bypass multiplexers
  always_comb
    for (int k = 0; k < NRD; k++) rdata[k] = bist_busy ? wdata : m_rd[k];

  always_comb begin
    mismatch = 1'b0;
    for (int k = 0; k < NRD; k++)
      if (m_rd[k] != t_exp) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      ta        <= '0;
      bist_done <= 1'b0;
      bist_fail <= 1'b0;
    end else begin
      if (t_rd && mismatch) bist_fail <= 1'b1;
      unique case (st)
        T_IDLE: if (bist_start) begin
          st        <= T_M0_W0;
          ta        <= '0;
          bist_done <= 1'b0;
          bist_fail <= 1'b0;
        end
        T_M0_W0: if (ta == LAST) begin st <= T_M1_R0; ta <= '0; end
                 else ta <= ta + 1'b1;
        T_M1_R0: st <= T_M1_W1;
        T_M1_W1: if (ta == LAST) begin st <= T_M2_R1; ta <= LAST; end
                 else begin st <= T_M1_R0; ta <= ta + 1'b1; end
        T_M2_R1: st <= T_M2_W0;
        T_M2_W0: st <= T_M2_R0;
        T_M2_R0: if (ta == '0) begin st <= T_IDLE; bist_done <= 1'b1; end
                 else begin st <= T_M2_R1; ta <= ta - 1'b1; end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign bist_busy = (st != T_IDLE);
endmodule
