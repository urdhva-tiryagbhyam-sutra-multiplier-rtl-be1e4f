// vedic_mul8: N x N unsigned multiplier by the Urdhva Tiryagbhyam ("vertically and
// crosswise") rule, N = 8 by default.
//
// The product is formed column by column, as in the decimal hand method: column k
// (k = 0 .. 2N-2) adds every cross product a[i] & b[j] with i + j = k, plus the carry
// handed on from column k-1. The low bit of that column sum is product bit k and the
// rest is the carry into column k+1; what is left after the last column is the top
// product bit. There are 2N-1 columns, holding 1, 2, .., N, .., 2, 1 cross products.
// The column-wise structure follows the sutra; writing the column sums as counters with
// a multi-bit carry is this implementation's choice. Purely combinational.
module vedic_mul8 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // A column sum is at most N cross products plus a carry below 2N.
  localparam int unsigned CW = $clog2(3 * N) + 1;

  logic [CW-1:0] col;
  logic [CW-1:0] carry;

  always_comb begin
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * N - 1; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if ((k - i) >= 0 && (k - i) < N) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end
endmodule
