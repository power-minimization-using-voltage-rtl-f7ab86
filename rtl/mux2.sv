// mux2: W-bit 2-to-1 multiplexer. In the partial-product combiner it picks
// either the upper bits as they are (sel=0) or the same bits plus one
// (sel=1), selected by a late-arriving carry: a carry-select increment.
// Purely combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
