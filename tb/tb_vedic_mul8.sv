// tb_vedic_mul8: exhaustive self-checking test of the 8x8 Urdhva (vertically and
// crosswise) multiplier: all 65536 operand pairs are compared with a * b. A 4x4 instance
// is checked exhaustively too. A watchdog ends the run after 200000 cycles.
module tb_vedic_mul8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int          checks = 0, failures = 0;

  vedic_mul8             dut  (.a(a),  .b(b),  .p(p));
  vedic_mul8 #(.N(4))    dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      {a4, b4} = 8'(v);
      @(posedge clk);
      checks++;
      if (p !== 16'(a) * 16'(b)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, got %0d", a, b, 16'(a) * 16'(b), p);
      end
      if (v < 256) begin
        checks++;
        if (p4 !== 8'(a4) * 8'(b4)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d, got %0d", a4, b4, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
