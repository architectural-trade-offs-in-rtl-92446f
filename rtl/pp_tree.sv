// pp_tree: reduces NR partial product rows of W bits to a carry-save pair.
//
// The tree is built level by level. MODE 0 uses only 3:2 carry-save adders
// (csa), taking the rows in groups of three (Wallace-style). MODE 1 uses
// only 4:2 compressors (comp42); a left-over group of three gets a zero
// fourth row. MODE 2 mixes them: groups of four go to 4:2 compressors and a
// left-over group of three to a 3:2 adder. Rows that do not fill a group
// pass to the next level unchanged. The number of levels and the rows at
// each level are worked out at elaboration by functions in fir_pkg.
// All arithmetic is modulo 2^W. Purely combinational.
module pp_tree
  import fir_pkg::*;
#(
  parameter int unsigned NR   = 9,
  parameter int unsigned W    = 36,
  parameter int unsigned MODE = 0
) (
  input  logic [W-1:0] rows [NR],
  output logic [W-1:0] out1,
  output logic [W-1:0] out2
);
  localparam int unsigned NL = tree_levels(NR, MODE);

  // one generate block per level: cur holds its input rows, nxt its output
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned N    = tree_rows(NR, MODE, l);
    localparam int unsigned N4   = (MODE == 0) ? 0 : N / 4;
    localparam int unsigned R4   = N - 4 * N4;
    localparam bit          T3   = (MODE != 0) && (R4 == 3);   // group of three
    localparam int unsigned N3   = (MODE == 0) ? N / 3 : 0;
    localparam int unsigned USED = 4 * N4 + 3 * N3 + (T3 ? 3 : 0);
    localparam int unsigned OUT0 = 2 * N4 + 2 * N3 + (T3 ? 2 : 0);
    localparam int unsigned NN   = tree_rows(NR, MODE, l + 1);

    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [NN];

    if (l == 0) begin : g_src
      for (genvar r = 0; r < N; r++) begin : g_r
        assign cur[r] = rows[r];
      end
    end else begin : g_src
      for (genvar r = 0; r < N; r++) begin : g_r
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end

    for (genvar g = 0; g < N4; g++) begin : g_c42
      comp42 #(.W(W)) u_c (
        .a (cur[4*g]),   .b (cur[4*g+1]),
        .c (cur[4*g+2]), .d (cur[4*g+3]),
        .s (nxt[2*g]),   .cy(nxt[2*g+1])
      );
    end
    for (genvar g = 0; g < N3; g++) begin : g_c32
      csa #(.W(W)) u_c (
        .p1(cur[3*g]), .p2(cur[3*g+1]), .p3(cur[3*g+2]), .cin(1'b0),
        .s1(nxt[2*g]), .s2(nxt[2*g+1])
      );
    end
    if (T3 && MODE == 1) begin : g_t42
      comp42 #(.W(W)) u_c (
        .a (cur[4*N4]), .b (cur[4*N4+1]), .c (cur[4*N4+2]), .d ('0),
        .s (nxt[2*N4]), .cy(nxt[2*N4+1])
      );
    end
    if (T3 && MODE == 2) begin : g_t32
      csa #(.W(W)) u_c (
        .p1(cur[4*N4]), .p2(cur[4*N4+1]), .p3(cur[4*N4+2]), .cin(1'b0),
        .s1(nxt[2*N4]), .s2(nxt[2*N4+1])
      );
    end
    for (genvar r = USED; r < N; r++) begin : g_pass
      assign nxt[OUT0 + r - USED] = cur[r];
    end
  end

  if (NL == 0) begin : g_out
    assign out1 = rows[0];
    if (NR > 1) begin : g_o2
      assign out2 = rows[NR-1];
    end else begin : g_o1
      assign out2 = '0;
    end
  end else begin : g_out
    assign out1 = g_lvl[NL-1].nxt[0];
    assign out2 = g_lvl[NL-1].nxt[1];
  end
endmodule
