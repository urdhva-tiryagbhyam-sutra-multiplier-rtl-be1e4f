// tb_vedic_mul16: self-checking test of the 16x16 Vedic multiplier. Corner operands
// (0, 1, all ones, single halves) and 20000 random pairs are compared with a * b
// computed in 32-bit arithmetic; the final carry ca2 must stay 0. A watchdog ends the
// run after 100000 cycles.
module tb_vedic_mul16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic [31:0] s;
  logic        ca2;
  int          checks = 0, failures = 0;

  vedic_mul16 dut (.a(a), .b(b), .s(s), .ca2(ca2));

  task automatic check();
    @(posedge clk);
    checks++;
    if (s !== 32'(a) * 32'(b) || ca2 !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d (ca2=%0b)", a, b, 32'(a) * 32'(b), s, ca2);
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
    automatic logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h00FF, 16'hFF00, 16'h8001};
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j]; check();
    end
    // Worked decimal example of the vertically-and-crosswise rule: 9284 * 5137 = 47691908.
    a = 16'd9284; b = 16'd5137; check();
    checks++;
    if (s !== 32'd47691908) begin failures++; $display("FAIL worked example"); end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
