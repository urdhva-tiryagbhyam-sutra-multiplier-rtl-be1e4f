// tb_dkg_rca: self-checking test of the DKG ripple-carry parallel adder.
// The default 64-bit adder and a 4-bit one (the four-gate chain) are driven with
// corner cases (all ones plus carry in, carry through every bit) and random operands;
// {cout, sum} is compared with x + y + cin computed in wider integer arithmetic.
// The 4-bit adder is tested exhaustively. A watchdog ends the run after 100000 cycles.
module tb_dkg_rca;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] x, y, sum;
  logic        cin, cout;
  logic [3:0]  x4, y4, sum4;
  logic        cin4, cout4;
  int          checks = 0, failures = 0;

  dkg_rca dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));
  dkg_rca #(.WIDTH(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .sum(sum4), .cout(cout4));

  task automatic check64();
    logic [64:0] ref_sum;
    @(posedge clk);
    ref_sum = {1'b0, x} + {1'b0, y} + 65'(cin);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL 64: %h + %h + %0b = %h, got %h", x, y, cin, ref_sum, {cout, sum});
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
    x4 = '0; y4 = '0; cin4 = 1'b0;
    x = '1; y = '0; cin = 1'b1; check64();
    x = '1; y = '1; cin = 1'b1; check64();
    x = '0; y = '0; cin = 1'b0; check64();
    x = 64'h5555_5555_5555_5555; y = 64'hAAAA_AAAA_AAAA_AAAA; cin = 1'b1; check64();
    for (int i = 0; i < 2000; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; cin = 1'($urandom);
      check64();
    end
    for (int v = 0; v < 512; v++) begin
      {cin4, x4, y4} = 9'(v);
      @(posedge clk);
      checks++;
      if ({cout4, sum4} !== 5'(x4) + 5'(y4) + 5'(cin4)) begin
        failures++;
        $display("FAIL 4: %h + %h + %0b, got %h", x4, y4, cin4, {cout4, sum4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
