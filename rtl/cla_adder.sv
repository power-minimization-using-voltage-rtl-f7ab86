// cla_adder: W-bit carry look-ahead adder, used for the upper half of the
// final addition of the partitioned multiplier, where both operands arrive
// at the same time and speed matters.
// Structure: bit generate g = x&y and propagate p = x^y; 4-bit groups with
// group generate/propagate; a second look-ahead level forms every group
// carry directly from the group signals and cin (each carry is written out
// as an OR of product terms, not as a ripple); inside a group each bit carry
// is again formed directly from the group carry-in. W must be a multiple
// of 4 (the 4-bit grouping is this design's choice; the width 16 is the one
// of the 32x32 multiplier).
// Interface: {cout, s} = x + y + cin. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  // bit and group generate / propagate
  always_comb begin
    g = x & y;
    p = x ^ y;
    for (int k = 0; k < NG; k++) begin
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
      gp[k] = &p[4*k +: 4];
    end
  end

  // second level: group carries, each one as a sum of products
  always_comb begin
    logic t, pp;
    gc[0] = cin;
    for (int k = 0; k < NG; k++) begin
      t  = gg[k];
      pp = gp[k];
      for (int j = k - 1; j >= 0; j--) begin
        t  = t | (pp & gg[j]);
        pp = pp & gp[j];
      end
      gc[k+1] = t | (pp & cin);
    end
  end

  // first level: bit carries inside each group from the group carry-in
  always_comb begin
    logic t, pp;
    for (int k = 0; k < NG; k++) begin
      for (int i = 0; i < 4; i++) begin
        t  = 1'b0;
        pp = 1'b1;
        for (int j = i - 1; j >= 0; j--) begin
          t  = t | (pp & g[4*k+j]);
          pp = pp & p[4*k+j];
        end
        c[4*k+i] = t | (pp & gc[k]);
      end
    end
  end

  assign s    = p ^ c;
  assign cout = gc[NG];

  initial assert (W % 4 == 0 && W >= 4)
    else $error("cla_adder: W=%0d must be a positive multiple of 4", W);
endmodule
