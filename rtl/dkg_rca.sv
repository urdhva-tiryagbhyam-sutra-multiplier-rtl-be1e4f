// dkg_rca: WIDTH-bit ripple-carry parallel adder built from reversible DKG gates.
//
// Bit i is one dkg_gate with its control input A tied to 0, which makes it a full adder:
// B = x[i], C = y[i], D = carry into bit i; R is the carry into bit i+1 and S is sum[i].
// The P and Q outputs of each gate are garbage outputs of the reversible gate and are
// left unused inside the adder. The chain is the four-gate parallel adder of the design
// extended to WIDTH gates; the default of 64 bits is the MAC's accumulate adder.
// Purely combinational; the delay grows linearly with WIDTH.
module dkg_rca #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] garbage_p, garbage_q;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dkg_gate u_dkg (
      .a (1'b0),
      .b (x[i]),
      .c (y[i]),
      .d (carry[i]),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (carry[i+1]),
      .s (sum[i])
    );
  end

  assign cout = carry[WIDTH];
endmodule
