// fir_pkg: types and constants shared by the FIR filter core.
//
// The core computes y(n) = sum_{m=0}^{23} h(m) x(n-m) for a 24-tap
// linear-phase low-pass filter with 16-bit samples and coefficients and a
// 36-bit accumulator (32-bit product plus 4 guard bits). The filter family
// is selected by three parameters: the filter structure (direct form or
// folded direct form), the multiplier architecture and the number
// representation used inside the multiplier.
//
// The coefficient values are this design's own: the half of a 24-tap
// Hamming-windowed sinc low-pass with cut-off at fs/6, normalised to a DC
// gain of 0.9 in Q15, h(m) = round(0.9 * 2^15 * w(m) s(m) / sum(w s)),
// s(m) = sin(2 pi (m-11.5)/6) / (pi (m-11.5)),
// w(m) = 0.54 - 0.46 cos(2 pi m / 23). Only h(0..11) are stored; the taps
// are symmetric, h(m) = h(23-m).
package fir_pkg;

  // Filter structure: direct form or folded direct form.
  typedef enum logic {
    ARCH_DF  = 1'b0,
    ARCH_FDF = 1'b1
  } arch_e;

  // Multiplier architecture.
  typedef enum logic [2:0] {
    MULT_WD       = 3'd0,  // Wallace-Dadda, 3:2 tree
    MULT_BOOTH    = 3'd1,  // radix-4 Booth, 3:2 tree
    MULT_RG_BOOTH = 3'd2,  // reduced-glitch Booth, 3:2 tree
    MULT_RB_BOOTH = 3'd3,  // redundant-binary Booth, 4:2 tree
    MULT_P_BOOTH  = 3'd4   // pre-add Booth, mixed 3:2 / 4:2 tree (FDF only)
  } mult_e;

  // Number representation at the multiplier inputs.
  typedef enum logic {
    NR_2SC = 1'b0,  // two's complement
    NR_SM  = 1'b1   // sign-magnitude
  } numrep_e;

  localparam int unsigned DATA_W  = 16;  // sample width
  localparam int unsigned COEF_W  = 16;  // coefficient width
  localparam int unsigned GUARD_W = 4;   // accumulator guard bits
  localparam int unsigned ACC_W   = DATA_W + COEF_W + GUARD_W;  // 36
  localparam int unsigned NTAPS   = 24;
  localparam int unsigned NCOEF   = NTAPS / 2;  // stored coefficients

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [NCOEF];

  localparam coef_tab_t DEFAULT_COEFS = '{
    -16'sd33, -16'sd87, -16'sd73, 16'sd125, 16'sd412, 16'sd323,
    -16'sd489, -16'sd1452, -16'sd1083, 16'sd1689, 16'sd6038, 16'sd9375
  };

  // Rows left after one level of a carry-save reduction tree.
  // mode 0: 3:2 only; 1: 4:2 only (a group of three gets a zero fourth row);
  // 2: 4:2 groups first, a remaining group of three uses a 3:2 adder.
  function automatic int unsigned tree_next(int unsigned n, int unsigned mode);
    int unsigned r;
    if (n <= 2) return n;
    if (mode == 0) begin
      r = 2 * (n / 3) + (n % 3);
    end else begin
      r = 2 * (n / 4);
      if ((n % 4) == 3) r += 2;
      else r += n % 4;
    end
    return r;
  endfunction

  // Number of levels until two rows are left.
  function automatic int unsigned tree_levels(int unsigned n, int unsigned mode);
    int unsigned l;
    int unsigned k;
    l = 0;
    k = n;
    for (int i = 0; i < 32; i++) begin
      if (k > 2) begin
        k = tree_next(k, mode);
        l++;
      end
    end
    return l;
  endfunction

  // Rows present at a given level of the tree (level 0 = input).
  function automatic int unsigned tree_rows(int unsigned n, int unsigned mode,
                                            int unsigned level);
    int unsigned k;
    k = n;
    for (int i = 0; i < 32; i++) begin
      if (i < level) k = tree_next(k, mode);
    end
    return k;
  endfunction

endpackage
