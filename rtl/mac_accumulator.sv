// mac_accumulator: WIDTH-bit accumulator register of the MAC with synchronous clear.
//
// On every rising clock edge the register loads d, the sum from the accumulate adder,
// gated by NOT rst: while rst is 1 it loads 0. There are no other controls; the MAC
// accumulates on every clock. The AND-with-inverted-reset in front of a plain D
// flip-flop follows the design's schematic; the register has no asynchronous reset.
// Interface: clk, rst (active high, synchronous), d in, q out; q follows d one edge later.
module mac_accumulator #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    q <= d & {WIDTH{~rst}};
  end
endmodule
