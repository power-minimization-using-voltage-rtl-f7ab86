// tb_rc_adder: checks the 16-bit ripple-carry adder (default width) on
// corner cases, among them a carry rippling through all 16 bits, and on
// random operands; a 4-bit instance is checked exhaustively. The reference
// is integer addition. Self-checking; prints TB_RESULT.
module tb_rc_adder;
  logic [15:0] x, y, s;
  logic        cin, cout;
  logic [3:0]  x4, y4, s4;
  logic        cin4, cout4;
  int          checks = 0, failures = 0;

  rc_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  rc_adder #(.W(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .s(s4), .cout(cout4));

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
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
