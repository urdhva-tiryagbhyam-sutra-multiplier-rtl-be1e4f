// tb_dkg_gate: exhaustive self-checking test of the reversible DKG gate.
// All 16 input patterns are applied. Each is checked against arithmetic worked out
// here, not against the gate's equations: P copies B; S is the parity of B, C, D;
// with A = 0, R is the carry of B + C + D (full adder) and Q = C; with A = 1, R is the
// borrow of B - C - D (full subtractor) and Q = NOT D. Finally the 16 output patterns
// must all differ (the gate is reversible). A watchdog ends the run after 1000 cycles.
module tb_dkg_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];

  dkg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b d=%0b -> p=%0b q=%0b r=%0b s=%0b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, diff;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      total = int'(b) + int'(c) + int'(d);
      diff  = int'(b) - int'(c) - int'(d);
      check(p == b, "P = B");
      check(s == total[0], "S = parity");
      if (!a) begin
        check(r == (total >= 2), "full-adder carry");
        check(q == c, "Q with A=0");
      end else begin
        check(r == (diff < 0), "full-subtractor borrow");
        check(s == diff[0], "full-subtractor difference");
        check(q == ~d, "Q with A=1");
      end
      check(!seen[{p, q, r, s}], "outputs unique (reversible)");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
