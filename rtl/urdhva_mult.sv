// urdhva_mult: unsigned N x N multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule.
//
// The product is built column by column, exactly as the rule is worked by
// hand. Column k (k = 0 .. 2N-2) collects every cross product a[i]&b[j]
// with i + j = k; for N = 4 these are a0b0, a1b0+a0b1, a2b0+a1b1+a0b2,
// a3b0+a2b1+a1b2+a0b3, a3b1+a2b2+a1b3, a3b2+a2b3 and a3b3. The carry left
// over from column k-1 is added to the column's count, the low bit of that
// sum is product bit k and the rest is carried into column k+1. The carry
// left after the last column is the top product bit. All 2N-1 column sums
// are independent of each other; only the carries ripple.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). Purely combinational,
// no clock. The column scheme follows the rule; rippling the carries
// between columns is this design's choice of how to combine them.
module urdhva_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Wide enough for any column count plus carry (< 2^(2N+1)).
  localparam int unsigned CW = 2 * N + 1;

  always_comb begin
    logic [CW-1:0] carry;
    logic [CW-1:0] col;
    carry = '0;
    p     = '0;
    for (int k = 0; k <= 2 * N - 2; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N)
          col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end

endmodule
