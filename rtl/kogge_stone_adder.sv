// kogge_stone_adder: WIDTH-bit parallel-prefix (Kogge-Stone) adder with carry in.
//
// Bit i first forms generate g = x & y and propagate p = x ^ y. The carry in enters
// the prefix tree as an extra position below bit 0 (position -1, generate = cin,
// propagate = 0). Stage s (s = 1 .. log2 WIDTH) combines every position with the one
// 2^(s-1) places below it:  G = G_hi | P_hi & G_lo,  P = P_hi & P_lo. A position whose
// group already reaches position -1 only needs G (a "grey" cell); the others need both
// (a "black" cell). After log2(WIDTH) stages the group generate at position i-1 is the
// carry into bit i, sum[i] = p[i] ^ carry[i], and the carry out is one more grey cell on
// top of bit WIDTH-1. Default width 16 is the adder drawn in the design; the MAC uses it at 32.
// Purely combinational; log2(WIDTH) prefix levels, maximum fan-out 2.
module kogge_stone_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned STAGES = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] g, p;
  // Prefix positions 0..WIDTH-1 stand for bits -1..WIDTH-2 (position 0 is the carry in).
  logic [WIDTH-1:0] gg [STAGES+1];
  logic [WIDTH-1:0] pp [STAGES+1];
  logic [WIDTH-1:0] c;   // c[i] = carry into bit i

  assign g = x & y;
  assign p = x ^ y;

  always_comb begin
    gg[0] = {g[WIDTH-2:0], cin};
    pp[0] = {p[WIDTH-2:0], 1'b0};
    for (int unsigned s = 1; s <= STAGES; s++) begin
      for (int unsigned k = 0; k < WIDTH; k++) begin
        if (k >= (1 << (s - 1))) begin
          gg[s][k] = gg[s-1][k] | (pp[s-1][k] & gg[s-1][k - (1 << (s - 1))]);
          pp[s][k] = pp[s-1][k] & pp[s-1][k - (1 << (s - 1))];
        end else begin
          gg[s][k] = gg[s-1][k];
          pp[s][k] = pp[s-1][k];
        end
      end
    end
  end

  assign c    = gg[STAGES];
  assign sum  = p ^ c;
  assign cout = g[WIDTH-1] | (p[WIDTH-1] & c[WIDTH-1]);
endmodule
