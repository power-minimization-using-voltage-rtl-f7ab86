// tb_size_sweep: runs the three multiplier sizes that are compared in delay,
// 8x8, 16x16 and 32x32, each both as a partitioned multiplier (tree of 4x4
// arrays with the CLA) and as a conventional array multiplier of the same
// size. Each pair first gets the all-zeros to all-ones operand transition
// used for circuit-level delay measurement, then a stream of LFSR operands
// of the kind used for power estimation. Both implementations are checked
// against integer multiplication and against each other. The design here is
// combinational, so the test checks function only; delay and power need a
// gate-level or circuit-level model. Prints TB_RESULT.
module tb_size_sweep;
  logic [31:0] a, b;
  logic [15:0] pp8, pa8;
  logic [31:0] pp16, pa16;
  logic [63:0] pp32, pa32;
  int          checks = 0, failures = 0;

  part_multiplier  #(.W(8))            u_par8  (.a(a[7:0]),  .b(b[7:0]),  .p(pp8));
  array_multiplier #(.N(8),  .M(8))    u_arr8  (.a(a[7:0]),  .b(b[7:0]),  .p(pa8));
  part_multiplier  #(.W(16))           u_par16 (.a(a[15:0]), .b(b[15:0]), .p(pp16));
  array_multiplier #(.N(16), .M(16))   u_arr16 (.a(a[15:0]), .b(b[15:0]), .p(pa16));
  part_multiplier                      u_par32 (.a(a),       .b(b),        .p(pp32));
  array_multiplier #(.N(32), .M(32))   u_arr32 (.a(a),       .b(b),        .p(pa32));

  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    a = x;
    b = y;
    #1;
    checks += 3;
    if (pp8 != 16'(x[7:0]) * 16'(y[7:0]) || pa8 != pp8) begin
      failures++;
      $display("FAIL 8x8 %h*%h par=%h arr=%h", x[7:0], y[7:0], pp8, pa8);
    end
    if (pp16 != 32'(x[15:0]) * 32'(y[15:0]) || pa16 != pp16) begin
      failures++;
      $display("FAIL 16x16 %h*%h par=%h arr=%h", x[15:0], y[15:0], pp16, pa16);
    end
    if (pp32 != 64'(x) * 64'(y) || pa32 != pp32) begin
      failures++;
      $display("FAIL 32x32 %h*%h par=%h arr=%h", x, y, pp32, pa32);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s1, s2;
    apply('0, '0);
    apply('1, '1);
    s1 = 32'hACE1_2468;
    s2 = 32'h1357_BDF0;
    for (int i = 0; i < 10000; i++) begin
      s1 = lfsr_next(s1);
      s2 = lfsr_next(lfsr_next(s2));
      apply(s1, s2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
