// tb_pp_combiner: feeds the partial-product combiner with the four true
// half-width products of operand pairs and checks the result against the
// full product. The default H=16 combiner gets corner and random 32-bit
// operands; an H=4 combiner gets every pair of 8-bit operands. For H=16 the
// testbench works out on its own which carries occur (the right-pair carry
// select, the left-pair carry, the carry from the ripple half into the CLA,
// the CLA carry, and the single full adder producing a carry for the top
// bits) and fails if any of them never happened. Prints TB_RESULT.
module tb_pp_combiner;
  logic [31:0]  q_ll, q_hl, q_lh, q_hh;
  logic [63:0]  p;
  logic [7:0]   s_ll, s_hl, s_lh, s_hh;
  logic [15:0]  p8;
  int           checks = 0, failures = 0;
  int           n_cr = 0, n_cl = 0, n_c0 = 0, n_ccla = 0, n_topc = 0, n_both = 0;

  pp_combiner dut (.p_ll(q_ll), .p_hl(q_hl), .p_lh(q_lh), .p_hh(q_hh), .p(p));
  pp_combiner #(.H(4)) dut4 (.p_ll(s_ll), .p_hl(s_hl), .p_lh(s_lh), .p_hh(s_hh), .p(p8));

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    logic [16:0] mid_r, mid_l, lo_f;
    logic [16:0] hi_f;
    logic        cr, cl, c0, ccla;
    q_ll = 32'(a[15:0])  * 32'(b[15:0]);
    q_hl = 32'(a[31:16]) * 32'(b[15:0]);
    q_lh = 32'(a[15:0])  * 32'(b[31:16]);
    q_hh = 32'(a[31:16]) * 32'(b[31:16]);
    #1;
    checks++;
    if (p != 64'(a) * 64'(b)) begin
      failures++;
      $display("FAIL %h * %h -> %h", a, b, p);
    end
    // carries of the adder network, from the products alone
    mid_r = 17'(q_ll[31:16]) + 17'(q_hl[15:0]);
    cr    = mid_r[16];
    mid_l = 17'(q_lh[31:16]) + 17'(q_hh[15:0]);
    cl    = mid_l[16];
    lo_f  = 17'(q_lh[15:0]) + 17'(mid_r[15:0]);
    c0    = lo_f[16];
    hi_f  = 17'(mid_l[15:0]) + 17'(q_hl[31:16] + 16'(cr)) + 17'(c0);
    ccla  = hi_f[16];
    n_cr   += int'(cr);
    n_cl   += int'(cl);
    n_c0   += int'(c0);
    n_ccla += int'(ccla);
    n_topc += int'((int'(q_hh[16]) + int'(cl) + int'(ccla)) >= 2);
    n_both += int'(cl && ccla);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('1, '1);
    check32('0, '0);
    check32(32'hFFFF_0001, 32'h0001_FFFF);
    check32(32'h8000_8000, 32'hFFFF_FFFF);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom);
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] a, b;
      {a, b} = 16'(v);
      s_ll = 8'(a[3:0]) * 8'(b[3:0]);
      s_hl = 8'(a[7:4]) * 8'(b[3:0]);
      s_lh = 8'(a[3:0]) * 8'(b[7:4]);
      s_hh = 8'(a[7:4]) * 8'(b[7:4]);
      #1;
      checks++;
      if (p8 != 16'(a) * 16'(b)) begin
        failures++;
        $display("FAIL4 %0d * %0d -> %0d", a, b, p8);
      end
    end
    $display("events: right-pair carry %0d, left-pair carry %0d, ripple->CLA carry %0d, CLA carry %0d, top FA carry %0d, both carries into top FA %0d",
             n_cr, n_cl, n_c0, n_ccla, n_topc, n_both);
    checks++;
    if (n_cr == 0 || n_cl == 0 || n_c0 == 0 || n_ccla == 0 || n_topc == 0 || n_both == 0) begin
      failures++;
      $display("FAIL some carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
