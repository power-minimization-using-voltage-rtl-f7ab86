// array_multiplier: generic N x M unsigned ripple-carry array multiplier, the
// leaf ("mini multiplier") of the partitioned multiplier and, at full size,
// the conventional multiplier it is meant to replace.
// Row i of full adders adds the partial product a[i]&b to the running sum
// shifted right by one. The carry ripples from right (column 0) to left
// within a row; the carry out of a row's leftmost cell enters the next row
// as its leftmost sum input. The rightmost sum of each row is product bit i;
// the last row gives the top M bits and its carry out the MSB. The first
// row's sum and carry inputs are 0. This follows the cell arrangement of the
// classic array; the critical path runs along a row and down the left side.
// Interface: p = a * b, N+M bits. Purely combinational.
module array_multiplier #(
  parameter int unsigned N = 4,   // width of a (number of rows)
  parameter int unsigned M = 4    // width of b (number of columns)
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] p
);
  // sum[i][j], carry[i][j] : outputs of cell (row i, column j)
  logic [M-1:0] sum   [N];
  logic [M:0]   carry [N];   // carry[i][0] is the row's carry input (0)
  logic [M-1:0] sin   [N];   // sum input of each cell

  for (genvar i = 0; i < N; i++) begin : g_row
    if (i == 0) begin : g_first
      assign sin[i] = '0;
    end else begin : g_next
      assign sin[i] = {carry[i-1][M], sum[i-1][M-1:1]};
    end
    assign carry[i][0] = 1'b0;
    for (genvar j = 0; j < M; j++) begin : g_col
      full_adder u_cell (
        .a (a[i] & b[j]),
        .b (sin[i][j]),
        .ci(carry[i][j]),
        .s (sum[i][j]),
        .co(carry[i][j+1])
      );
    end
    if (i < N - 1) begin : g_pbit
      assign p[i] = sum[i][0];
    end
  end

  assign p[N+M-1:N-1] = {carry[N-1][M], sum[N-1]};
endmodule
