// part_multiplier: W x W unsigned multiplier partitioned both horizontally
// and vertically. Each operand is split into halves; four (W/2)x(W/2)
// multipliers compute a_lo*b_lo, a_hi*b_lo, a_lo*b_hi and a_hi*b_hi side by
// side and pp_combiner adds them with their shifts. Each of those is split
// the same way, down to LEAF_W x LEAF_W array multipliers, so the 32x32
// default is a tree 32 -> 16 -> 8 -> 4: 64 leaf 4x4 arrays, 16 combiners of
// 4-bit halves, 4 of 8-bit halves and one of 16-bit halves. Cutting the
// array this way shortens the longest carry path (one row plus the left
// column of a full-size array) to that of a small array plus short adder
// stages, which is what allows the supply to be lowered at unchanged clock
// rate.
// The tree is written out level by level rather than as a recursive module.
// Node n of a level has the children 4n+0..4n+3 on the level below, in the
// order ll, hl, lh, hh; so base-4 digit m of a leaf index says which half of
// a (bit 0 of the digit) and of b (bit 1) the leaf takes at the split whose
// halves are LEAF_W*2^m bits wide.
// W must be LEAF_W times a power of two. Interface: p = a * b, 2W bits.
// Purely combinational.
module part_multiplier #(
  parameter int unsigned W       = 32,
  parameter int unsigned LEAF_W  = 4,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned L     = $clog2(W / LEAF_W);  // levels of splitting
  localparam int unsigned NLEAF = 1 << (2 * L);        // 4**L leaf arrays

  // bit offset, in a (sel=0) or in b (sel=1), of the slice leaf n multiplies
  function automatic int unsigned leaf_off(int unsigned n, bit sel);
    int unsigned off = 0;
    for (int m = 0; m < int'(L); m++)
      if ((((n >> (2 * m)) >> sel) & 1) != 0) off += LEAF_W << m;
    return off;
  endfunction

  // level 0: the leaf array multipliers
  for (genvar k = 0; k <= L; k++) begin : g_lvl
    localparam int unsigned S  = LEAF_W << k;     // operand width at level k
    localparam int unsigned NN = NLEAF >> (2 * k); // nodes at level k
    logic [2*S-1:0] prod [NN];

    for (genvar n = 0; n < NN; n++) begin : g_node
      if (k == 0) begin : g_leaf
        array_multiplier #(.N(LEAF_W), .M(LEAF_W)) u_array (
          .a(a[leaf_off(n, 1'b0) +: LEAF_W]),
          .b(b[leaf_off(n, 1'b1) +: LEAF_W]),
          .p(prod[n]));
      end else begin : g_comb
        pp_combiner #(.H(S / 2), .USE_CLA(USE_CLA)) u_comb (
          .p_ll(g_lvl[k-1].prod[4*n+0]),
          .p_hl(g_lvl[k-1].prod[4*n+1]),
          .p_lh(g_lvl[k-1].prod[4*n+2]),
          .p_hh(g_lvl[k-1].prod[4*n+3]),
          .p   (prod[n]));
      end
    end
  end

  assign p = g_lvl[L].prod[0];

  initial assert (W >= LEAF_W && LEAF_W >= 1 && (LEAF_W << L) == W)
    else $error("part_multiplier: W=%0d must be LEAF_W=%0d times a power of two",
                W, LEAF_W);
endmodule
