// tb_ha_incrementer: exhaustive check of the 16-bit half-adder incrementer
// (default width) and of a 15-bit one, the two sizes the 32x32 multiplier
// uses, against x + 1. Self-checking; prints TB_RESULT.
module tb_ha_incrementer;
  logic [15:0] x, s;
  logic        cout;
  logic [14:0] x15, s15;
  logic        cout15;
  int          checks = 0, failures = 0;

  ha_incrementer dut (.x(x), .s(s), .cout(cout));
  ha_incrementer #(.W(15)) dut15 (.x(x15), .s(s15), .cout(cout15));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x   = 16'(v);
      x15 = 15'(v);
      #1;
      checks++;
      if ({cout, s} != 17'(v) + 17'd1 ||
          {cout15, s15} != 16'(v % 32768) + 16'd1) begin
        failures++;
        $display("FAIL x=%h -> %b %h ; x15=%h -> %b %h", x, cout, s, x15, cout15, s15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
