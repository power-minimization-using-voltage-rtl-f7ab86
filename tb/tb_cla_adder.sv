// tb_cla_adder: checks the 16-bit carry look-ahead adder (default width) on
// corner cases, including carries that cross every 4-bit group and the
// full-length propagate chain, and on random operands; 4-bit and 8-bit
// instances (one and two groups) are checked exhaustively. The reference is
// integer addition. Self-checking; prints TB_RESULT.
module tb_cla_adder;
  logic [15:0] x, y, s;
  logic        cin, cout;
  logic [3:0]  x4, y4, s4;
  logic        cin4, cout4;
  logic [7:0]  x8, y8, s8;
  logic        cin8, cout8;
  int          checks = 0, failures = 0;

  cla_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  cla_adder #(.W(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .s(s4), .cout(cout4));
  cla_adder #(.W(8)) dut8 (.x(x8), .y(y8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic check16(input logic [15:0] xv, input logic [15:0] yv, input logic cv);
    x = xv; y = yv; cin = cv;
    #1;
    checks++;
    if ({cout, s} != 17'(xv) + 17'(yv) + 17'(cv)) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b %h", xv, yv, cv, cout, s);
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
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h0F0F, 16'h00F1, 1'b0);
    check16(16'h8888, 16'h8888, 1'b1);
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'd1, 1'b0);
      check16(16'd1 << k, 16'd1 << k, 1'b0);
    end
    for (int i = 0; i < 5000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = 0; v < 512; v++) begin
      {cin4, x4, y4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} != 5'(x4) + 5'(y4) + 5'(cin4)) begin
        failures++;
        $display("FAIL4 %h + %h + %b -> %b %h", x4, y4, cin4, cout4, s4);
      end
    end
    for (int v = 0; v < 131072; v++) begin
      {cin8, x8, y8} = 17'(v);
      #1;
      checks++;
      if ({cout8, s8} != 9'(x8) + 9'(y8) + 9'(cin8)) begin
        failures++;
        $display("FAIL8 %h + %h + %b -> %b %h", x8, y8, cin8, cout8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
