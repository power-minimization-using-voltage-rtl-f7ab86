// ha_incrementer: W-bit incrementer made of a chain of half adders whose
// first carry input is tied to '1'. It computes the "upper bits plus one"
// alternative of a carry-select stage in advance, so that only a multiplexer
// sits on the path of the late carry.
// Interface: {cout, s} = x + 1. Purely combinational.
module ha_incrementer #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    half_adder u_ha (.a(x[i]), .b(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
