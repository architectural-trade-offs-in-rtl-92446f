// mac_bist: the MAC together with its built-in self-test.
//
// In normal operation the functional inputs pass through isolation
// multiplexers to the MAC. A test is started by a one-cycle bist_start
// pulse. The BIST controller then switches the multiplexers to the pattern
// generator for NPAT clock cycles (1024 by default), one pattern per cycle.
// The pattern generator is a 32-bit maximal-length LFSR (x^32 + x^22 + x^2 +
// x + 1, Fibonacci form, seeded with SEED at start); every pattern bit
// (alpha, beta, gamma1, gamma2, acc, neg) is a fixed function of the LFSR
// state, listed at the field assignments below. acc is forced to 0 in the
// first pattern so that the run does not depend on the accumulator's
// previous contents. The output compressor is a 36-bit MISR
// (feedback x^36 + x^25 + 1) that folds in the accumulator output s on
// every cycle after the first pattern, plus one flush cycle after the last,
// so it compacts the NPAT accumulator values that the patterns produce.
// It is cleared at start. bist_done rises when the signature is complete.
//
// Scan access: while scan_en is high (and no test is running) the LFSR and
// the MISR form one shift register, scan_in -> LFSR bit 0 ... bit 31 ->
// MISR bit 0 ... bit 35 -> scan_out, shifting once per clock. This lets a
// tester load a seed and unload the signature (MSB first).
//
// The arrangement (input multiplexers, pattern generator, output
// compressor, controller with scanIn/scanControl/scanOut) follows the MAC
// self-test structure of the core; the LFSR, MISR polynomials, the pattern
// mapping and the start/done handshake are this design's own choices.
module mac_bist
  import fir_pkg::*;
#(
  parameter int unsigned BW     = COEF_W,
  parameter int unsigned GW     = DATA_W,
  parameter int unsigned AW     = ACC_W,
  parameter mult_e       MULT   = MULT_WD,
  parameter numrep_e     NUMREP = NR_SM,
  parameter bit          PREADD = 1'b0,
  parameter int unsigned NPAT   = 1024,
  parameter logic [31:0] SEED   = 32'hACE1_2468
) (
  input  logic          clk,
  input  logic          rst_n,
  // functional MAC interface
  input  logic          en,
  input  logic          acc,
  input  logic          neg,
  input  logic [AW-1:0] alpha,
  input  logic [BW-1:0] beta,
  input  logic [GW-1:0] gamma1,
  input  logic [GW-1:0] gamma2,
  output logic [AW-1:0] s,
  // self-test
  input  logic          bist_start,
  output logic          bist_busy,
  output logic          bist_done,
  output logic [AW-1:0] signature,
  input  logic          scan_en,
  input  logic          scan_in,
  output logic          scan_out
);
  typedef enum logic [1:0] {B_IDLE, B_RUN, B_FLUSH} bstate_e;

  bstate_e       st;
  logic [$clog2(NPAT+1)-1:0] cnt;
  logic [31:0]   lfsr;
  logic [AW-1:0] misr;
  logic [71:0]   w;          // pattern word derived from the LFSR
  logic          test;

  // pattern multiplexer inputs
  logic          t_acc, t_neg;
  logic [AW-1:0] t_alpha;
  logic [BW-1:0] t_beta;
  logic [GW-1:0] t_g1, t_g2;
  // MAC inputs after the isolation multiplexers
  logic          m_en, m_acc, m_neg;
  logic [AW-1:0] m_alpha;
  logic [BW-1:0] m_beta;
  logic [GW-1:0] m_g1, m_g2;
  logic [AW-1:0] p_unused;

  assign test = (st == B_RUN);

  // w = {lfsr[7:0], rotl(lfsr, 7) ^ 32'h9E3779B9, lfsr}
  assign w       = {lfsr[7:0], ({lfsr[24:0], lfsr[31:25]} ^ 32'h9E37_79B9), lfsr};
  assign t_beta  = w[0 +: BW];
  // gamma starts at bit 15 (sharing one bit with beta's sign) so that its
  // own sign bit is an LFSR bit and not a rotated copy of one of its
  // magnitude bits, which would leave that magnitude bit nearly constant
  // after sign-magnitude conversion
  assign t_g1    = w[15 +: GW];
  assign t_g2    = w[36 +: GW];
  assign t_acc   = w[60] & (cnt != '0);
  assign t_neg   = w[61];
  assign t_alpha = w[71 -: AW];

  assign m_en    = test ? 1'b1    : en;
  assign m_acc   = test ? t_acc   : acc;
  assign m_neg   = test ? t_neg   : neg;
  assign m_alpha = test ? t_alpha : alpha;
  assign m_beta  = test ? t_beta  : beta;
  assign m_g1    = test ? t_g1    : gamma1;
  assign m_g2    = test ? t_g2    : gamma2;

  mac #(.BW(BW), .GW(GW), .AW(AW), .MULT(MULT), .NUMREP(NUMREP),
        .PREADD(PREADD)) u_mac (
    .clk(clk), .rst_n(rst_n), .en(m_en), .acc(m_acc), .neg(m_neg),
    .alpha(m_alpha), .beta(m_beta), .gamma1(m_g1), .gamma2(m_g2),
    .s(s), .p(p_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= B_IDLE;
      cnt  <= '0;
      lfsr <= SEED;
      misr <= '0;
    end else begin
      unique case (st)
        B_IDLE: begin
          if (bist_start) begin
            st   <= B_RUN;
            cnt  <= '0;
            lfsr <= SEED;
            misr <= '0;
          end else if (scan_en) begin
            lfsr <= {lfsr[30:0], scan_in};
            misr <= {misr[AW-2:0], lfsr[31]};
          end
        end
        B_RUN: begin
          lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
          if (cnt != '0) misr <= {misr[AW-2:0], misr[AW-1] ^ misr[24]} ^ s;
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(NPAT+1))'(NPAT - 1)) st <= B_FLUSH;
        end
        B_FLUSH: begin
          misr <= {misr[AW-2:0], misr[AW-1] ^ misr[24]} ^ s;
          st   <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  // done: set when the flush cycle ends, cleared by the next start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 bist_done <= 1'b0;
    else if (bist_start && st == B_IDLE) bist_done <= 1'b0;
    else if (st == B_FLUSH)     bist_done <= 1'b1;
  end

  assign bist_busy = (st != B_IDLE);
  assign signature = misr;
  assign scan_out  = misr[AW-1];
endmodule
