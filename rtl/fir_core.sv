// fir_core: low-power 24-tap linear-phase FIR filter core (top level).
//
// Computes y(n) = alpha + sum_{m=0}^{23} h(m) x(n-m) with a single
// multiply-accumulate unit, 16-bit samples and coefficients and a 36-bit
// result. alpha is the accumulator's start value (0 for a plain filter,
// or e.g. a rounding constant). The blocks: a latch-based circular sample
// memory with its 6n march self-test (ram_bist), a 12-word coefficient ROM
// (coef_rom; h(m) = h(23-m)), operand registers, the MAC with its LFSR/MISR
// self-test (mac_bist), the output storage register and the controller
// (fir_ctrl) with a scan path.
//
// ARCH_DF: one sample x(n-m) and one coefficient per cycle, 24 MAC cycles
// per output. ARCH_FDF: the RAM has two read ports; the two samples that
// share a coefficient, x(n-m) and x(n-23+m), are registered, added (17-bit
// pre-adder) and multiplied once, 12 MAC cycles per output. With
// MULT_P_BOOTH (FDF only) the two samples go to the MAC separately and the
// pre-add happens inside the multiplier's Booth encoder. MULT and NUMREP
// pick the multiplier architecture and the number representation inside it.
// The default, FDF with a Wallace-Dadda multiplier working on
// sign-magnitude operands, is the lowest-power combination of the family.
//
// Interface and timing: present x_in with x_valid while ready is high; the
// sample is taken on that clock edge. y_out is updated and y_valid pulses
// 27 cycles (DF) or 16 cycles (FDF) after that edge. A new sample can be
// given every 25 (DF) or 13 (FDF) cycles. Self-test: ram_bist_start and
// mac_bist_start (one-cycle pulses while no sample is being processed)
// run the memory and MAC tests; the RAM test leaves the sample history
// cleared to zero. Scan path: scan_in -> controller -> MAC BIST pattern
// generator -> MAC output compressor -> scan_out, shifting while scan_en.
module fir_core
  import fir_pkg::*;
#(
  parameter arch_e   ARCH   = ARCH_FDF,
  parameter mult_e   MULT   = MULT_WD,
  parameter numrep_e NUMREP = NR_SM,
  parameter int unsigned BIST_NPAT = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // samples in
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic        [ACC_W-1:0]  alpha,
  output logic                     ready,
  // filtered output (output storage)
  output logic                     y_valid,
  output logic signed [ACC_W-1:0]  y_out,
  // self-test and scan
  input  logic                     ram_bist_start,
  output logic                     ram_bist_done,
  output logic                     ram_bist_fail,
  input  logic                     mac_bist_start,
  output logic                     mac_bist_done,
  output logic        [ACC_W-1:0]  mac_signature,
  input  logic                     scan_en,
  input  logic                     scan_in,
  output logic                     scan_out
);
  localparam bit          FDF    = (ARCH == ARCH_FDF);
  localparam bit          PB     = (MULT == MULT_P_BOOTH);
  localparam int unsigned NRD    = FDF ? 2 : 1;
  localparam int unsigned AW     = $clog2(NTAPS);
  localparam int unsigned CW     = $clog2(NCOEF);
  // MAC gamma operand width: pre-added sum (17) or a plain sample (16)
  localparam int unsigned GW     = (FDF && !PB) ? DATA_W + 1 : DATA_W;

  if (PB && !FDF) begin : g_bad_cfg
    $error("fir_core: MULT_P_BOOTH needs ARCH_FDF");
  end

  logic          ram_we, ld_port, ld_alpha, ld_op, mac_en, mac_acc, out_ld;
  logic [AW-1:0] ram_waddr, ram_raddr1, ram_raddr2;
  logic [CW-1:0] b_addr;
  logic [AW-1:0] raddr [NRD];
  logic [DATA_W-1:0] rdata [NRD];
  logic          ram_busy, mac_busy, ctrl_so;
  logic [COEF_W-1:0] b;

  logic [ACC_W-1:0]  alpha_q;
  logic [COEF_W-1:0] beta_q;
  logic [GW-1:0]     gamma1_q, gamma2_q;
  logic [DATA_W-1:0] port1_q, port2_q;
  logic [ACC_W-1:0]  s;

  fir_ctrl #(.ARCH(ARCH)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .ready(ready),
    .hold(ram_busy || mac_busy),
    .ram_we(ram_we), .ram_waddr(ram_waddr), .ram_raddr1(ram_raddr1),
    .ram_raddr2(ram_raddr2), .ld_port(ld_port), .b_addr(b_addr),
    .ld_alpha(ld_alpha), .ld_op(ld_op), .mac_en(mac_en), .mac_acc(mac_acc),
    .out_ld(out_ld), .scan_en(scan_en), .scan_in(scan_in), .scan_out(ctrl_so)
  );

  assign raddr[0] = ram_raddr1;
  if (FDF) begin : g_rd2
    assign raddr[NRD-1] = ram_raddr2;
  end

  ram_bist #(.DEPTH(NTAPS), .W(DATA_W), .NRD(NRD)) u_ram (
    .clk(clk), .rst_n(rst_n), .we(ram_we), .waddr(ram_waddr), .wdata(x_in),
    .raddr(raddr), .rdata(rdata), .bist_start(ram_bist_start),
    .bist_busy(ram_busy), .bist_done(ram_bist_done), .bist_fail(ram_bist_fail)
  );

  coef_rom u_rom (.b_addr(b_addr), .b(b));

  // alpha and beta operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q <= '0;
      beta_q  <= '0;
    end else begin
      if (ld_alpha) alpha_q <= alpha;
      if (ld_op)    beta_q  <= b;
    end
  end

  if (FDF) begin : g_fdf
    // registers behind the two RAM read ports
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        port1_q <= '0;
        port2_q <= '0;
      end else if (ld_port) begin
        port1_q <= rdata[0];
        port2_q <= rdata[NRD-1];
      end
    end
    if (PB) begin : g_pb
      // pre-add inside the P_Booth encoder: register both samples
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          gamma1_q <= '0;
          gamma2_q <= '0;
        end else if (ld_op) begin
          gamma1_q <= port1_q;
          gamma2_q <= port2_q;
        end
      end
    end else begin : g_preadd
      // 17-bit pre-adder in front of the gamma register
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) gamma1_q <= '0;
        else if (ld_op)
          gamma1_q <= GW'({port1_q[DATA_W-1], port1_q}) + GW'({port2_q[DATA_W-1], port2_q});
      end
      assign gamma2_q = '0;
    end
  end else begin : g_df
    assign port1_q = '0;
    assign port2_q = '0;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     gamma1_q <= '0;
      else if (ld_op) gamma1_q <= rdata[0];
    end
    assign gamma2_q = '0;
  end

  mac_bist #(.BW(COEF_W), .GW(GW), .AW(ACC_W), .MULT(MULT), .NUMREP(NUMREP),
             .PREADD(PB), .NPAT(BIST_NPAT)) u_mac (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .acc(mac_acc), .neg(1'b0),
    .alpha(alpha_q), .beta(beta_q), .gamma1(gamma1_q), .gamma2(gamma2_q),
    .s(s), .bist_start(mac_bist_start), .bist_busy(mac_busy),
    .bist_done(mac_bist_done), .signature(mac_signature),
    .scan_en(scan_en), .scan_in(ctrl_so), .scan_out(scan_out)
  );

  // output storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= out_ld;
      if (out_ld) y_out <= s;
    end
  end
endmodule
