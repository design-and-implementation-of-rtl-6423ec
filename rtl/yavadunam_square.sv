// yavadunam_square: N-bit squarer by the Yavadunam rule
// ("whatever the deficiency, lessen by that much and write the square of
// the deficiency").
//
// The deficiency of a from the base B = 2^N is d = B - a, the two's
// complement of a. Lessening a by d gives a - d, which is shifted up by N
// bits (multiplied by the base); the square of the deficiency is added:
//   a^2 = B * (a - d) + d^2
// a - d is negative when a < B/2 and is kept in two's complement; the sum
// taken modulo 2^(2N) is the true square. d^2 comes from an N x N Urdhva
// multiplier with both inputs tied to d. For a = 0 the deficiency B wraps
// to 0 in N bits, and the formula still gives 0.
//
// Interface: a (N bits, unsigned) -> sq (2N bits). Combinational.
// The steps follow the rule; the base 2^N and the Urdhva squarer of the
// deficiency are this design's choices.
module yavadunam_square #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq
);

  logic [N-1:0]   def;
  logic [2*N-1:0] def_sq;
  logic [N-1:0]   lessened; // a - d modulo 2^N (only its low N bits matter)

  assign def = ~a + 1'b1;

  urdhva_mult #(.N(N)) u_def_square (
    .a (def),
    .b (def),
    .p (def_sq)
  );

  always_comb begin
    lessened = a - def;
    sq       = {lessened, {N{1'b0}}} + def_sq;
  end

endmodule
