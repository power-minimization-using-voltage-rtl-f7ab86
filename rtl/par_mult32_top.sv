// par_mult32_top: 32x32 unsigned multiplier with parallelism added inside
// the array, for running at a lowered supply voltage at the original clock
// rate. The product is formed by part_multiplier (four 16x16 multipliers,
// each four 8x8, each four 4x4 array multipliers, with a small adder network
// at each level). The combinational multiplier sits between an input
// register and an output register, so its delay is a register-to-register
// path that sets the clock period; these two registers, the valid bit and
// the reset are this design's choice, the document treats the multiplier as
// a combinational block.
// Timing: operands presented with in_valid at clock edge t give p and
// out_valid after edge t+1 (two-cycle latency, one product per cycle).
// Reset (asynchronous, active low) clears the registers.
module par_mult32_top #(
  parameter int unsigned W       = 32,
  parameter int unsigned LEAF_W  = 4,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           out_valid,
  output logic [2*W-1:0] p
);
  logic [W-1:0]   a_q, b_q;
  logic           v_q;
  logic [2*W-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        a_q <= a;
        b_q <= b;
      end
    end
  end

  part_multiplier #(.W(W), .LEAF_W(LEAF_W), .USE_CLA(USE_CLA)) u_mult (
    .a(a_q), .b(b_q), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) p <= prod;
    end
  end
endmodule
