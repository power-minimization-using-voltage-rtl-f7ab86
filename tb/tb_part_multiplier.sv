// tb_part_multiplier: checks the partitioned multiplier against integer
// multiplication in several configurations: the default 32x32 tree of 4x4
// arrays on corner, all-zeros/all-ones and random operands; an 8x8 tree
// exhaustively; a 16x16 tree with the CLA replaced by a ripple adder; a
// 32x32 tree of 8x8 leaves; a 16x16 tree of 2x2 leaves (one split level
// more, where the smallest adder networks fall back to ripple adders); and a
// 4x4 "tree" that is a single leaf.
// Self-checking; prints TB_RESULT.
module tb_part_multiplier;
  logic [31:0] a, b;
  logic [63:0] p, p_l8;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16, p16l2;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int          checks = 0, failures = 0;

  part_multiplier dut (.a(a), .b(b), .p(p));
  part_multiplier #(.W(32), .LEAF_W(8)) dut_l8 (.a(a), .b(b), .p(p_l8));
  part_multiplier #(.W(8)) dut8 (.a(a8), .b(b8), .p(p8));
  part_multiplier #(.W(16), .USE_CLA(1'b0)) dut16rc (.a(a16), .b(b16), .p(p16));
  part_multiplier #(.W(16), .LEAF_W(2)) dut16l2 (.a(a16), .b(b16), .p(p16l2));
  part_multiplier #(.W(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check32(input logic [31:0] av, input logic [31:0] bv);
    a = av; b = bv;
    a16 = av[15:0]; b16 = bv[31:16];
    #1;
    checks++;
    if (p != 64'(av) * 64'(bv)) begin
      failures++;
      $display("FAIL %h * %h -> %h", av, bv, p);
    end
    checks++;
    if (p_l8 != 64'(av) * 64'(bv)) begin
      failures++;
      $display("FAIL leaf8 %h * %h -> %h", av, bv, p_l8);
    end
    checks++;
    if (p16 != 32'(a16) * 32'(b16)) begin
      failures++;
      $display("FAIL rc16 %h * %h -> %h", a16, b16, p16);
    end
    checks++;
    if (p16l2 != 32'(a16) * 32'(b16)) begin
      failures++;
      $display("FAIL leaf2 %h * %h -> %h", a16, b16, p16l2);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('0, '0);
    check32('1, '1);     // the all-zeros to all-ones transition
    check32('1, 32'd1);
    check32(32'h0000_FFFF, 32'hFFFF_0000);
    check32(32'hFFFF_0000, 32'hFFFF_0000);
    for (int k = 0; k < 32; k++) check32(32'd1 << k, '1);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom);
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL8 %0d * %0d -> %0d", a8, b8, p8);
      end
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 != 8'(a4) * 8'(b4)) begin
        failures++;
        $display("FAIL4 %0d * %0d -> %0d", a4, b4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
