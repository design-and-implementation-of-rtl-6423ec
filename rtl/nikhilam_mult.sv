// nikhilam_mult: unsigned N x N multiplier by the Nikhilam rule
// ("all from 9 and the last from 10", taken here in base 2).
//
// Each operand is replaced by its deviation from the base B = 2^N:
// dev_a = B - a, dev_b = B - b. In binary this is the two's complement of
// the operand (invert every bit, add one). The product is then
//   a * b = B * (a - dev_b) + dev_a * dev_b
// i.e. the cross difference a - dev_b (= b - dev_a = a + b - B) shifted up
// by N bits, plus the product of the deviations. The deviations are
// multiplied by an N x N Urdhva multiplier. The cross difference is
// negative when a + b < B; since B times it is needed only modulo 2^(2N),
// its value modulo 2^N is enough, and the 2N-bit sum is always the true,
// non-negative product. An operand of zero would have
// deviation B, which does not fit N bits, so a zero operand forces p = 0.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). Combinational.
// The three steps (deviation, product of deviations, cross add) follow the
// rule; the base 2^N, the Urdhva sub-multiplier and the zero case are this
// design's choices.
module nikhilam_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0]   dev_a, dev_b;
  logic [2*N-1:0] dev_prod;
  logic [N-1:0]   cross_diff; // a - dev_b modulo 2^N (only its low N bits matter)
  logic [2*N-1:0] sum;

  assign dev_a = ~a + 1'b1;
  assign dev_b = ~b + 1'b1;

  urdhva_mult #(.N(N)) u_dev_mult (
    .a (dev_a),
    .b (dev_b),
    .p (dev_prod)
  );

  always_comb begin
    cross_diff = a - dev_b;
    // B * cross, taken modulo 2^(2N): cross_diff modulo 2^N suffices.
    sum   = {cross_diff, {N{1'b0}}} + dev_prod;
    p     = (a == '0 || b == '0) ? '0 : sum;
  end

endmodule
