// mac32_vm32_dkg: 32-bit unsigned multiply-accumulate unit.
//
// Datapath:  a, b -> 32x32 Vedic multiplier (vedic_mul32) -> 64-bit product
//            product + y -> 64-bit DKG ripple-carry adder (dkg_rca, carry in 0)
//            sum -> 64-bit accumulator register (mac_accumulator) -> y
// Every rising edge of clk the accumulator takes y + a*b; while rst is 1 it takes 0
// instead (synchronous clear). The adder's carry out is dropped, so the accumulator
// wraps modulo 2^64. a and b are not registered: the product of the values present
// before an edge is added at that edge, so y changes one clock after a, b are applied.
// The three-stage structure, the 64-bit adder made of DKG gates and the gated flip-flop
// follow the design; unsigned arithmetic and the wrap on overflow are this design's reading.
// The only state is the 64 accumulator flip-flops.
module mac32_vm32_dkg
  import mac_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [ACC_W-1:0]  y
);
  logic [ACC_W-1:0] product;
  logic [ACC_W-1:0] sum;
  logic             sum_carry;  // carry out of the accumulate adder, dropped (wrap)

  vedic_mul32 u1 (.a(a), .b(b), .q(product));

  dkg_rca #(.WIDTH(ACC_W)) u2 (
    .x(product), .y(y), .cin(1'b0), .sum(sum), .cout(sum_carry)
  );

  mac_accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .d(sum), .q(y)
  );
endmodule
