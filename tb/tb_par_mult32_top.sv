// tb_par_mult32_top: end-to-end test of the 32x32 multiplier at its default
// parameters. Operands come from two 32-bit Galois LFSRs (taps 32,22,2,1),
// mixed with directed corner cases, including the all-zeros then all-ones
// sequence; in_valid is dropped at random to leave gaps. A scoreboard
// checks every product and that it appears exactly two clock cycles after
// its operands, that no extra results appear and that p holds during gaps.
// From the operands alone the testbench also counts, at the top level of
// the tree, how often each carry mechanism of the adder network fires (the
// carry-select increment of the right pair, the left-pair carry, the carry
// into the CLA, the CLA carry out, the carry of the single full adder into
// the top incrementer, and both carries entering that full adder at once),
// plus input gaps and a reset in mid-stream, and fails if any never
// occurred. Prints TB_RESULT.
module tb_par_mult32_top;
  localparam int NVEC = 20000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [31:0] a, b;
  logic        out_valid;
  logic [63:0] p;

  int checks = 0, failures = 0;
  int n_cr = 0, n_cl = 0, n_c0 = 0, n_ccla = 0, n_topc = 0, n_both = 0;
  int n_gap = 0, n_reset = 0;

  par_mult32_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (NVEC * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  // count the carry events of the top-level adder network for a*b
  task automatic count_events(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] q_ll, q_hl, q_lh, q_hh;
    logic [16:0] mid_r, mid_l, lo_f, hi_f;
    q_ll  = 32'(x[15:0])  * 32'(y[15:0]);
    q_hl  = 32'(x[31:16]) * 32'(y[15:0]);
    q_lh  = 32'(x[15:0])  * 32'(y[31:16]);
    q_hh  = 32'(x[31:16]) * 32'(y[31:16]);
    mid_r = 17'(q_ll[31:16]) + 17'(q_hl[15:0]);
    mid_l = 17'(q_lh[31:16]) + 17'(q_hh[15:0]);
    lo_f  = 17'(q_lh[15:0]) + 17'(mid_r[15:0]);
    hi_f  = 17'(mid_l[15:0]) + 17'(q_hl[31:16] + 16'(mid_r[16])) + 17'(lo_f[16]);
    n_cr   += int'(mid_r[16]);
    n_cl   += int'(mid_l[16]);
    n_c0   += int'(lo_f[16]);
    n_ccla += int'(hi_f[16]);
    n_topc += int'((int'(q_hh[16]) + int'(mid_l[16]) + int'(hi_f[16])) >= 2);
    n_both += int'(mid_l[16] && hi_f[16]);
  endtask

  // scoreboard: expected product and the cycle it must appear in
  logic [63:0] exp_q [$];
  longint      due_q [$];
  longint      cycle = 0;
  logic [63:0] last_p = '0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result %h at cycle %0d", p, cycle);
        end else begin
          if (p != exp_q[0] || cycle != due_q[0]) begin
            failures++;
            $display("FAIL cycle %0d: p=%h expected %h due at cycle %0d",
                     cycle, p, exp_q[0], due_q[0]);
          end
          void'(exp_q.pop_front());
          void'(due_q.pop_front());
        end
        last_p = p;
      end else begin
        checks++;
        if (p != last_p) begin
          failures++;
          $display("FAIL p changed without out_valid at cycle %0d", cycle);
        end
      end
    end
  end

  task automatic drive(input logic v, input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    in_valid = v;
    a = x;
    b = y;
    if (v) begin
      exp_q.push_back(64'(x) * 64'(y));
      due_q.push_back(cycle + 2);   // sampled at the next edge, out one edge later
      count_events(x, y);
    end else begin
      n_gap++;
    end
  endtask

  initial begin
    logic [31:0] s1, s2;
    s1 = 32'h1234_5678;
    s2 = 32'hCAFE_F00D;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || p !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    rst_n = 1'b1;

    // directed: all zeros, then all ones, then corners
    drive(1'b1, '0, '0);
    drive(1'b1, '1, '1);
    drive(1'b1, '1, 32'd1);
    drive(1'b1, 32'hFFFF_0000, 32'h0000_FFFF);
    drive(1'b1, 32'h8000_0000, 32'h8000_0000);

    for (int i = 0; i < NVEC; i++) begin
      s1 = lfsr_next(s1);
      s2 = lfsr_next(lfsr_next(s2));
      drive(($urandom % 8) != 0, s1, s2);
      if (i == NVEC / 2) begin
        // reset in mid-stream: results in flight are dropped
        @(negedge clk);
        in_valid = 1'b0;
        rst_n    = 1'b0;
        exp_q.delete();
        due_q.delete();
        last_p = '0;
        n_reset++;
        @(negedge clk);
        checks++;
        if (out_valid !== 1'b0 || p !== '0) begin
          failures++;
          $display("FAIL outputs not cleared by mid-stream reset");
        end
        rst_n = 1'b1;
      end
    end
    drive(1'b0, '0, '0);
    repeat (4) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("events: right-pair carry select %0d, left-pair carry %0d, carry into CLA %0d, CLA carry %0d, top FA carry %0d, both carries into top FA %0d, input gaps %0d, resets %0d",
             n_cr, n_cl, n_c0, n_ccla, n_topc, n_both, n_gap, n_reset);
    checks++;
    if (n_cr == 0 || n_cl == 0 || n_c0 == 0 || n_ccla == 0 || n_topc == 0 ||
        n_both == 0 || n_gap == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL some mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
