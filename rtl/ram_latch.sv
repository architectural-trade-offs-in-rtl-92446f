// ram_latch: sample memory built from latch banks.
//
// DEPTH words of W bits (24 x 16 by default), each word a bank of
// transparent latches. A 1:DEPTH address demultiplexer decodes waddr into
// one latch enable per word. NRD read ports (1 for the direct-form filter,
// 2 for the folded filter) each have their own DEPTH:1 data multiplexer;
// reads are combinational, and an address of DEPTH or more reads zero.
//
// Timing: a word's latches are open while we is high, the word is selected
// and clk is low, i.e. in the second half of the cycle in which the write is
// requested; they close at the next rising edge. waddr, wdata and we must
// come from rising-edge flip-flops (they then stay stable while the latch is
// open). The new value can be read from the next cycle on. The latches are
// intended: a latch bank is smaller and draws less power than a flip-flop
// bank, and the low-phase enable avoids any hold race with the flip-flops
// that drive the write port. Contents are not reset.
module ram_latch #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned W     = 16,
  parameter int unsigned NRD   = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD]
);
  logic [W-1:0]     mem [DEPTH];
  logic [DEPTH-1:0] len;    // latch enables from the address demultiplexer

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      len[i] = we && !clk && (waddr == AW'(i));
  end

  for (genvar i = 0; i < DEPTH; i++) begin : g_bank
    always_latch begin
      if (len[i]) mem[i] = wdata;
    end
  end

  always_comb begin
    for (int k = 0; k < NRD; k++) begin
      rdata[k] = '0;
      for (int i = 0; i < DEPTH; i++)
        if (raddr[k] == AW'(i)) rdata[k] = mem[i];
    end
  end
endmodule
