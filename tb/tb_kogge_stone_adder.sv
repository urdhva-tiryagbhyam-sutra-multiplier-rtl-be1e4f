// tb_kogge_stone_adder: self-checking test of the Kogge-Stone adder.
// The default 16-bit adder gets corner cases and random operands, the 32-bit adder used
// by the 32x32 multiplier gets random operands, and a 4-bit adder is checked
// exhaustively. Each {cout, sum} is compared with x + y + cin in wider arithmetic.
// A watchdog ends the run after 100000 cycles.
module tb_kogge_stone_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] x16, y16, s16;
  logic [31:0] x32, y32, s32;
  logic [3:0]  x4, y4, s4;
  logic        ci16, co16, ci32, co32, ci4, co4;
  int          checks = 0, failures = 0;

  kogge_stone_adder              dut16 (.x(x16), .y(y16), .cin(ci16), .sum(s16), .cout(co16));
  kogge_stone_adder #(.WIDTH(32)) dut32 (.x(x32), .y(y32), .cin(ci32), .sum(s32), .cout(co32));
  kogge_stone_adder #(.WIDTH(4))  dut4  (.x(x4),  .y(y4),  .cin(ci4),  .sum(s4),  .cout(co4));

  task automatic step_and_check();
    @(posedge clk);
    checks += 3;
    if ({co16, s16} !== 17'(x16) + 17'(y16) + 17'(ci16)) begin
      failures++; $display("FAIL 16: %h + %h + %0b got %h", x16, y16, ci16, {co16, s16});
    end
    if ({co32, s32} !== 33'(x32) + 33'(y32) + 33'(ci32)) begin
      failures++; $display("FAIL 32: %h + %h + %0b got %h", x32, y32, ci32, {co32, s32});
    end
    if ({co4, s4} !== 5'(x4) + 5'(y4) + 5'(ci4)) begin
      failures++; $display("FAIL 4: %h + %h + %0b got %h", x4, y4, ci4, {co4, s4});
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
    x16 = 16'hFFFF; y16 = 16'h0000; ci16 = 1'b1;
    x32 = 32'hFFFF_FFFF; y32 = 32'h0; ci32 = 1'b1;
    x4 = '0; y4 = '0; ci4 = 1'b0;
    step_and_check();
    x16 = 16'hFFFF; y16 = 16'hFFFF; ci16 = 1'b1;
    x32 = 32'hFFFF_FFFF; y32 = 32'hFFFF_FFFF; ci32 = 1'b0;
    step_and_check();
    for (int i = 0; i < 3000; i++) begin
      x16 = 16'($urandom); y16 = 16'($urandom); ci16 = 1'($urandom);
      x32 = $urandom; y32 = $urandom; ci32 = 1'($urandom);
      {ci4, x4, y4} = 9'(i);
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
