// vedic_mac: multiply-accumulate unit built on a Vedic multiplier.
//
// A combinational Vedic multiplier forms the product of the two N-bit
// operands; the PIPO adder adds it to the 2N-bit accumulator on every
// clock. The SUTRA parameter picks the multiplier:
//   URDHVA    - urdhva_mult, general a*b (the 4-bit and 8-bit MACs)
//   NIKHILAM  - nikhilam_mult, general a*b through deviations from 2^N
//   YAVADUNAM - yavadunam_square, a*a; operand b is ignored, so this MAC
//               sums squares (x^2 + y^2 style equations, one term a clock)
//
// Interface: clk, rst (synchronous, active high: acc = 0, ovf = 0),
// a, b (N bits, unsigned) -> acc (2N bits), ovf (sticky: the running sum
// has passed 2^(2N) - 1 since reset; acc then holds it modulo 2^(2N)).
// Timing: one multiply-accumulate per clock; operands presented before a
// rising edge are in acc after that edge. There is no enable: an idle
// cycle needs a zero operand.
// Multiplier, adder and fed-back accumulator register follow the design;
// the 2N-bit accumulator width, reset and overflow flag are this design's
// choices. b is unused when SUTRA is YAVADUNAM, which is intended.
module vedic_mac
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter sutra_e      SUTRA = URDHVA
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] acc,
  output logic           ovf
);

  logic [2*N-1:0] product;

  generate
    if (SUTRA == NIKHILAM) begin : g_nikhilam
      nikhilam_mult #(.N(N)) u_mult (.a(a), .b(b), .p(product));
    end else if (SUTRA == YAVADUNAM) begin : g_yavadunam
      yavadunam_square #(.N(N)) u_mult (.a(a), .sq(product));
    end else begin : g_urdhva
      urdhva_mult #(.N(N)) u_mult (.a(a), .b(b), .p(product));
    end
  endgenerate

  pipo_adder #(.W(2 * N)) u_accum (
    .clk    (clk),
    .rst    (rst),
    .addend (product),
    .acc    (acc),
    .ovf    (ovf)
  );

endmodule
