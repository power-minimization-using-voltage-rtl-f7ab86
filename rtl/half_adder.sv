// half_adder: one-bit half adder, the cell of the incrementers that add the
// carry-select '1' to the top bits of the partitioned multiplier.
// s = a ^ b, co = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
