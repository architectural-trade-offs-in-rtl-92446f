// coef_rom: coefficient memory of the symmetric 24-tap filter.
//
// Holds the NCOEF = 12 distinct coefficients h(0..11) of the linear-phase
// filter (h(m) = h(23-m), so half the taps suffice) as a constant look-up
// table, and a 12:1 data multiplexer selects the word addressed by the
// 4-bit coefficient address b_addr. Addresses 12..15 read zero.
// Combinational; the address counter sits in the filter controller.
// The table contents (COEFS) are a parameter; the default low-pass set is
// defined in fir_pkg.
module coef_rom
  import fir_pkg::*;
#(
  parameter int unsigned NC    = NCOEF,
  parameter int unsigned BW    = COEF_W,
  parameter int unsigned AW    = $clog2(NC),
  parameter coef_tab_t   COEFS = DEFAULT_COEFS
) (
  input  logic [AW-1:0] b_addr,
  output logic [BW-1:0] b
);
  always_comb begin
    b = '0;
    for (int i = 0; i < NC; i++)
      if (b_addr == AW'(i)) b = BW'(COEFS[i]);
  end
endmodule
