// tb_mac_accumulator: self-checking test of the 64-bit accumulator register.
// A reference register kept in the testbench predicts q after every rising edge:
// 0 while rst is 1, else the d present before the edge. rst is asserted at random
// (about one cycle in eight), d is random. A watchdog ends the run after 10000 cycles.
module tb_mac_accumulator;
  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [63:0] d, q, expected;
  int          checks = 0, failures = 0, clears = 0;

  mac_accumulator dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = {$urandom, $urandom};
    @(posedge clk); #1;
    checks++;
    if (q !== 64'd0) begin failures++; $display("FAIL clear at start: %h", q); end
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom % 8) == 0;
      d   = {$urandom, $urandom};
      expected = rst ? 64'd0 : d;
      if (rst) clears++;
      @(posedge clk); #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL cycle %0d rst=%0b: expected %h got %h", i, rst, expected, q);
      end
    end
    if (clears == 0) begin failures++; $display("FAIL no clear exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
