// tb_mux2: drives random data on both inputs of a 16-bit and a 15-bit
// 2-to-1 multiplexer with both select values and checks that the selected
// input appears at the output. Self-checking; prints TB_RESULT.
module tb_mux2;
  logic [15:0] d0, d1, y;
  logic [14:0] e0, e1, z;
  logic        sel;
  int          checks = 0, failures = 0;

  mux2 #(.W(16)) dut16 (.d0(d0), .d1(d1), .sel(sel), .y(y));
  mux2 #(.W(15)) dut15 (.d0(e0), .d1(e1), .sel(sel), .y(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d0  = 16'($urandom);
      d1  = 16'($urandom);
      e0  = 15'($urandom);
      e1  = 15'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (y != (i[0] ? d1 : d0) || z != (i[0] ? e1 : e0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
