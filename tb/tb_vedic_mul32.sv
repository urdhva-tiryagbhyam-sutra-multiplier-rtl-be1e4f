// tb_vedic_mul32: self-checking test of the 32x32 Vedic multiplier with Kogge-Stone
// adders. Corner operands, the worked decimal example, pairs placed at the carry
// boundary of the three-operand middle sum (where the second middle adder, not the
// first, carries out) and 20000 random pairs are compared with a * b computed in 64-bit
// arithmetic. Half of the random pairs have large halves, which exercises the other
// carries between the partial-product adders. A watchdog ends the run after 100000 cycles.
module tb_vedic_mul32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [63:0] q;
  int          checks = 0, failures = 0;

  vedic_mul32 dut (.a(a), .b(b), .q(q));

  task automatic check();
    @(posedge clk);
    checks++;
    if (q !== 64'(a) * 64'(b)) begin
      failures++;
      $display("FAIL %h * %h = %h, got %h", a, b, 64'(a) * 64'(b), q);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corners [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h0000_FFFF, 32'hFFFF_0000,
                                 32'h8000_0001, 32'd3251};
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j]; check();
    end
    // Worked decimal example of the vertically-and-crosswise rule: 9284 * 5137 = 47691908.
    a = 32'd9284; b = 32'd5137; check();
    checks++;
    if (q !== 64'd47691908) begin failures++; $display("FAIL worked example"); end
    // Operands whose middle sum al*bh + ah*bl is exactly 2^32 - 1, so that adding
    // ll[31:16] carries out of the second middle adder and not the first.
    a = {16'h8000, 16'hFFFF}; b = {16'h8001, 16'hFFFF}; check();
    a = {16'h8001, 16'hFFFF}; b = {16'h8000, 16'hFFFF}; check();
    for (int i = 0; i < 2000; i++) begin
      // Small random steps around that boundary.
      a = {16'h8000 + 16'($urandom % 4), 16'hFFFF - 16'($urandom % 64)};
      b = {16'h8001 - 16'($urandom % 4), 16'hFFFF - 16'($urandom % 64)};
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom;
      if (i[0]) begin
        a = a | 32'hFF00_FF00; b = b | 32'hFF00_FF00;
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
