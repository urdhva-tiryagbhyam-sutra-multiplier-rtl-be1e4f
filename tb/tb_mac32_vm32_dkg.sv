// tb_mac32_vm32_dkg: end-to-end self-checking test of the 32-bit MAC at its default
// sizes (no parameter overrides).
//
// A reference accumulator kept in the testbench predicts y after every rising edge:
// 0 if rst was 1 before the edge, else (y + a*b) mod 2^64 with the a, b present before
// the edge. That also checks the timing: y moves exactly one clock after a, b change.
// Phases:
//   1. the published example: rst held, then a = 3251, b = 1235 for nine clocks, so
//      y steps through 4014985, 8029970, ... 36134865 (k * 3251 * 1235);
//   2. random operands with random synchronous clears;
//   3. all-ones operands until the 64-bit accumulator wraps past 2^64 at least twice.
// Each mechanism (clear, accumulate, wrap) is counted; one that never happened is a
// failure. A watchdog ends the run after 20000 cycles.
module tb_mac32_vm32_dkg;
  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [31:0] a, b;
  logic [63:0] y;
  logic [63:0] model;
  int          checks = 0, failures = 0;
  int          n_clear = 0, n_accum = 0, n_wrap = 0;

  mac32_vm32_dkg dut (.clk(clk), .rst(rst), .a(a), .b(b), .y(y));

  // One clock: update the reference from the inputs present before the edge, then compare.
  task automatic tick();
    logic [64:0] next;
    next = 65'(model) + 65'(64'(a) * 64'(b));
    if (rst) begin
      model = '0;
      n_clear++;
    end else begin
      model = next[63:0];
      n_accum++;
      if (next[64]) n_wrap++;
    end
    @(posedge clk); #1;
    checks++;
    if (y !== model) begin
      failures++;
      $display("FAIL t=%0t rst=%0b a=%0d b=%0d: expected %0d got %0d", $time, rst, a, b, model, y);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    // Phase 1: published example.
    rst = 1'b1; a = '0; b = '0;
    tick(); tick();
    rst = 1'b0; a = 32'd3251; b = 32'd1235;
    for (int k = 1; k <= 9; k++) begin
      tick();
      checks++;
      if (y !== 64'(k) * 64'd4014985) begin
        failures++;
        $display("FAIL example step %0d: expected %0d got %0d", k, 64'(k) * 64'd4014985, y);
      end
    end
    checks++;
    if (y !== 64'd36134865) begin
      failures++;
      $display("FAIL example final value %0d", y);
    end
    // Phase 2: random operands and clears.
    for (int i = 0; i < 3000; i++) begin
      rst = ($urandom % 16) == 0;
      a = $urandom; b = $urandom;
      tick();
    end
    // Phase 3: drive the accumulator across 2^64 (about 2^64 / (2^32-1)^2 = 1 step each).
    rst = 1'b1; tick();
    rst = 1'b0; a = '1; b = '1;
    for (int i = 0; i < 8; i++) tick();
    $display("mechanisms: clear=%0d accumulate=%0d wrap=%0d", n_clear, n_accum, n_wrap);
    checks++;
    if (n_clear == 0 || n_accum == 0 || n_wrap < 2) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
