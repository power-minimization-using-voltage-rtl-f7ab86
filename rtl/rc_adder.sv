// rc_adder: W-bit ripple-carry adder, a chain of full adders with the carry
// passed from bit i to bit i+1. Ripple-carry is used wherever operands arrive
// early or in sequence, because it is the lowest-power adder; the delay of a
// W-bit ripple adder is W full-adder delays from cin to cout.
// Interface: {cout, s} = x + y + cin. Purely combinational.
module rc_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
