// vedic_mul16: 16 x 16 unsigned Vedic multiplier built from four 8 x 8 Vedic multipliers.
//
// With a = {ah, al} and b = {bh, bl} (8-bit halves) the four sub-products are
// ll = al*bl, lh = al*bh, hl = ah*bl and hh = ah*bh. Three 16-bit ripple-carry adders
// combine them:
//   adder 1: hl + lh                      -> t1, carry ca1
//   adder 2: t1 + {8'b0, ll[15:8]}         -> t2, carry c2;  s[15:8] = t2[7:0]
//   adder 3: hh + {7'b0, ca1|c2, t2[15:8]} -> s[31:16], carry ca2
// and s[7:0] = ll[7:0]. At most one of ca1 and c2 can be set (hl + lh + ll[15:8] is
// below 2^17), so OR-ing them is exact. ca2 is always 0 for 16-bit operands and is
// brought out only as the adder's carry. The arrangement of the four multipliers and
// three adders follows the design; routing the second adder's carry into the third
// adder, and using the DKG ripple-carry adder for the three adders, are this design's
// choices. Purely combinational.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] s,
  output logic        ca2
);
  logic [15:0] ll, lh, hl, hh;
  logic [15:0] t1, t2;
  logic        ca1, c2;

  vedic_mul8 #(.N(8)) u_ll (.a(a[7:0]),  .b(b[7:0]),  .p(ll));
  vedic_mul8 #(.N(8)) u_lh (.a(a[7:0]),  .b(b[15:8]), .p(lh));
  vedic_mul8 #(.N(8)) u_hl (.a(a[15:8]), .b(b[7:0]),  .p(hl));
  vedic_mul8 #(.N(8)) u_hh (.a(a[15:8]), .b(b[15:8]), .p(hh));

  dkg_rca #(.WIDTH(16)) u_add1 (
    .x(hl), .y(lh), .cin(1'b0), .sum(t1), .cout(ca1)
  );
  dkg_rca #(.WIDTH(16)) u_add2 (
    .x(t1), .y({8'b0, ll[15:8]}), .cin(1'b0), .sum(t2), .cout(c2)
  );
  dkg_rca #(.WIDTH(16)) u_add3 (
    .x(hh), .y({7'b0, ca1 | c2, t2[15:8]}), .cin(1'b0), .sum(s[31:16]), .cout(ca2)
  );

  assign s[15:8] = t2[7:0];
  assign s[7:0]  = ll[7:0];
endmodule
