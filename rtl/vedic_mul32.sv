// vedic_mul32: 32 x 32 unsigned Vedic multiplier built from four 16 x 16 Vedic
// multipliers, with Kogge-Stone adders summing the partial products.
//
// With A = {Ah, Al} and B = {Bh, Bl} (16-bit halves) the sub-products are
// ll = Al*Bl, lh = Al*Bh, hl = Ah*Bl and hh = Ah*Bh (32 bits each). Then
//   q[15:0]  = ll[15:0]
//   first Kogge-Stone stage:  lh + hl + {16'b0, ll[31:16]}  -> t (32 bits) and carry
//   q[31:16] = t[15:0]
//   second Kogge-Stone stage: hh + {15'b0, carry, t[31:16]} -> q[63:32]
// The first stage is a three-operand sum, built here as two 32-bit Kogge-Stone adders
// in series; at most one of their two carries can be set (the three operands add to
// less than 2^33), so OR-ing them is exact. The split into four 16x16 multipliers and
// the two Kogge-Stone stages follow the design; the adder chaining inside the first stage
// is this design's choice. Purely combinational.
module vedic_mul32
  import mac_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [ACC_W-1:0]  q
);
  logic [31:0] ll, lh, hl, hh;
  logic [31:0] t0, t;
  logic        c0, c1;
  logic [3:0]  sub_carry;  // ca2 of each 16x16 multiplier, always 0
  logic        top_carry;  // carry out of bit 63, always 0

  vedic_mul16 u_ll (.a(a[15:0]),  .b(b[15:0]),  .s(ll), .ca2(sub_carry[0]));
  vedic_mul16 u_lh (.a(a[15:0]),  .b(b[31:16]), .s(lh), .ca2(sub_carry[1]));
  vedic_mul16 u_hl (.a(a[31:16]), .b(b[15:0]),  .s(hl), .ca2(sub_carry[2]));
  vedic_mul16 u_hh (.a(a[31:16]), .b(b[31:16]), .s(hh), .ca2(sub_carry[3]));

  kogge_stone_adder #(.WIDTH(32)) u_ksa0 (
    .x(lh), .y(hl), .cin(1'b0), .sum(t0), .cout(c0)
  );
  kogge_stone_adder #(.WIDTH(32)) u_ksa1 (
    .x(t0), .y({16'b0, ll[31:16]}), .cin(1'b0), .sum(t), .cout(c1)
  );
  kogge_stone_adder #(.WIDTH(32)) u_ksa2 (
    .x(hh), .y({15'b0, c0 | c1, t[31:16]}), .cin(1'b0), .sum(q[63:32]), .cout(top_carry)
  );

  assign q[31:16] = t[15:0];
  assign q[15:0]  = ll[15:0];
endmodule
