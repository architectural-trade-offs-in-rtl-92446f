// fir_ctrl: schedules one filter output per input sample.
//
// The sample RAM is a circular buffer. The write pointer moves down by one
// (modulo 24) for every new sample, and the new sample is written at the new
// pointer, so sample x(n-m) sits at address (wptr + m) mod 24.
//
// Direct form (ARCH_DF), 25 cycles per sample:
//   cycle 0       x_valid accepted: write x(n), load the alpha register.
//   cycles 1..24  read tap m = 0..23: RAM read address wptr + m, coefficient
//                 address b_addr = m (m < 12) or 23 - m (m >= 12); the
//                 operand registers (beta, gamma) load at the end (ld_op).
//   one cycle later each operand pair is multiply-accumulated (mac_en; the
//                 first of the 24 restarts the sum from alpha, mac_acc = 0);
//   the cycle after the last MAC loads the output register (out_ld).
// Folded direct form (ARCH_FDF), 13 cycles per sample:
//   cycles 1..12  read pair m = 0..11: port 1 at wptr + m (x(n-m)); port 2
//                 from its own down-counter, loaded with wptr - 1 at the
//                 write and stepped down (x(n-23+m)); the port registers load
//                 at the end (ld_port).
//   next cycle    pre-add, coefficient address b_addr = m, ld_op;
//   then MAC and output load as above, 12 MACs per output.
// A new sample is accepted (ready = 1) as soon as the read phase of the
// previous one has ended; the pipeline tail overlaps the next write.
//
// Scan path: every register of the controller is part of one shift
// register. While scan_en is high it shifts once per clock from scan_in to
// scan_out (most significant field first out) instead of operating.
//
// The counters, the 24-entry circular buffer addressing and the cycle
// counts (24 MAC cycles per DF sample, 12 per FDF sample) follow the core's
// architecture; the handshake (x_valid/ready), the down-counting write
// pointer and the exact pipeline are this design's own.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter arch_e       ARCH  = ARCH_FDF,
  parameter int unsigned DEPTH = NTAPS,
  parameter int unsigned AW    = $clog2(NTAPS),
  parameter int unsigned CW    = $clog2(NCOEF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          ready,
  input  logic          hold,       // a self-test is running: accept nothing
  // data memory
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  output logic [AW-1:0] ram_raddr1,
  output logic [AW-1:0] ram_raddr2,
  output logic          ld_port,    // FDF: load the RAM port registers
  // coefficient memory
  output logic [CW-1:0] b_addr,
  // operand registers, MAC, output storage
  output logic          ld_alpha,
  output logic          ld_op,
  output logic          mac_en,
  output logic          mac_acc,
  output logic          out_ld,
  // scan path
  input  logic          scan_en,
  input  logic          scan_in,
  output logic          scan_out
);
  localparam bit          FDF   = (ARCH == ARCH_FDF);
  localparam int unsigned NRD   = FDF ? DEPTH / 2 : DEPTH;  // read cycles
  localparam int unsigned RW    = $clog2(DEPTH);

  typedef struct packed {
    logic          run;     // read phase active
    logic [AW-1:0] wptr;    // write pointer
    logic [RW-1:0] rcnt;    // read counter (read 1)
    logic [AW-1:0] rd2;     // read 2 counter (FDF)
    logic          v1;      // read stage done: data in port/operand regs
    logic          f1;
    logic          l1;
    logic [RW-1:0] m1;      // tap index of the read stage (FDF b_addr)
    logic          v2;      // FDF pre-add stage done
    logic          f2;
    logic          l2;
    logic          vo;      // last MAC done: load output next
  } ctrl_t;

  localparam int unsigned SW = $bits(ctrl_t);

  ctrl_t q, d;
  logic [AW-1:0] wdec;
  logic [AW:0]   rsum;
  logic          accept;
  logic          last_rd;

  always_comb begin
    wdec    = (q.wptr == '0) ? AW'(DEPTH - 1) : q.wptr - 1'b1;
    rsum    = {1'b0, q.wptr} + (AW+1)'(q.rcnt);
    accept  = x_valid && !q.run && !hold;
    last_rd = q.run && (q.rcnt == RW'(NRD - 1));

    ready      = !q.run && !hold;
    ram_we     = accept;
    ram_waddr  = wdec;
    ram_raddr1 = (rsum >= (AW+1)'(DEPTH)) ? AW'(rsum - (AW+1)'(DEPTH)) : AW'(rsum);
    ram_raddr2 = q.rd2;
    ld_alpha   = accept;

    if (FDF) begin
      ld_port = q.run;
      ld_op   = q.v1;
      b_addr  = CW'(q.m1);
      mac_en  = q.v2;
      mac_acc = !q.f2;
    end else begin
      ld_port = 1'b0;
      ld_op   = q.run;
      b_addr  = (q.rcnt < RW'(NCOEF)) ? CW'(q.rcnt) : CW'(RW'(DEPTH - 1) - q.rcnt);
      mac_en  = q.v1;
      mac_acc = !q.f1;
    end
    out_ld = q.vo;

    // next state
    d = q;
    if (accept) begin
      d.run  = 1'b1;
      d.wptr = wdec;
      d.rcnt = '0;
      d.rd2  = (wdec == '0) ? AW'(DEPTH - 1) : wdec - 1'b1;
    end else if (q.run) begin
      d.rcnt = q.rcnt + 1'b1;
      d.rd2  = (q.rd2 == '0) ? AW'(DEPTH - 1) : q.rd2 - 1'b1;
      if (last_rd) d.run = 1'b0;
    end
    d.v1 = q.run;
    d.f1 = q.run && (q.rcnt == '0);
    d.l1 = last_rd;
    d.m1 = q.rcnt;
    if (FDF) begin
      d.v2 = q.v1;
      d.f2 = q.f1;
      d.l2 = q.l1;
      d.vo = q.v2 && q.l2;
    end else begin
      d.v2 = 1'b0;
      d.f2 = 1'b0;
      d.l2 = 1'b0;
      d.vo = q.v1 && q.l1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= ctrl_t'({q[SW-2:0], scan_in});
    else              q <= d;
  end

  assign scan_out = q[SW-1];
endmodule
