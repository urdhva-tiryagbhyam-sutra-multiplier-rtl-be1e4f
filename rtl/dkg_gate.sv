// dkg_gate: the 4-input, 4-output reversible DKG gate.
//
//   P = B
//   Q = A'C + AD'
//   R = (A xor B)(C xor D) xor CD
//   S = B xor C xor D
//
// Every input pattern maps to a distinct output pattern, so no information is lost.
// Input A selects the arithmetic role: with A = 0 the gate is a full adder
// (R = carry out of B + C + D, S = sum) and with A = 1 a full subtractor
// (R = borrow out of B - C - D, S = difference). P and Q are the "garbage" outputs
// that keep the mapping one-to-one. The equations are the gate's published definition;
// the gate is purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = b;
  assign q = (~a & c) | (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;
endmodule
