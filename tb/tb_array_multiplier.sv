// tb_array_multiplier: checks the ripple-carry array multiplier against
// integer multiplication: the default 4x4 leaf exhaustively, an 8x8 array
// exhaustively, a non-square 5x3 array exhaustively, and a full 32x32 array
// on corner and random operands. Self-checking; prints TB_RESULT.
module tb_array_multiplier;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [4:0]  a5;
  logic [2:0]  b3;
  logic [7:0]  p53;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int          checks = 0, failures = 0;

  array_multiplier                 dut4  (.a(a4),  .b(b4),  .p(p4));
  array_multiplier #(.N(8), .M(8))   dut8  (.a(a8),  .b(b8),  .p(p8));
  array_multiplier #(.N(5), .M(3))   dut53 (.a(a5),  .b(b3),  .p(p53));
  array_multiplier #(.N(32), .M(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check32(input logic [31:0] av, input logic [31:0] bv);
    a32 = av; b32 = bv;
    #1;
    checks++;
    if (p32 != 64'(av) * 64'(bv)) begin
      failures++;
      $display("FAIL32 %h * %h -> %h", av, bv, p32);
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
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 != 8'(a4) * 8'(b4)) begin
        failures++;
        $display("FAIL4 %0d * %0d -> %0d", a4, b4, p4);
      end
    end
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
      {a5, b3} = 8'(v);
      #1;
      checks++;
      if (p53 != 8'(a5) * 8'(b3)) begin
        failures++;
        $display("FAIL53 %0d * %0d -> %0d", a5, b3, p53);
      end
    end
    check32('1, '1);
    check32('0, '1);
    check32(32'h8000_0000, 32'h8000_0001);
    for (int i = 0; i < 3000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
