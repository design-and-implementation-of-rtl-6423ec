// vedic_mac_top: the four Vedic MAC units of the design, side by side.
//
//   u4 - 4-bit MAC with an Urdhva Tiryagbhyam multiplier, 8-bit accumulator
//   n4 - 4-bit MAC with a Nikhilam multiplier,           8-bit accumulator
//   y4 - 4-bit MAC with a Yavadunam squarer (sums a^2),  8-bit accumulator
//   u8 - 8-bit MAC with an Urdhva Tiryagbhyam multiplier, 16-bit accumulator
//
// They are alternative implementations of the same MAC and do not exchange
// data; they share only clock and reset and each has its own operands,
// accumulator and sticky overflow flag. Every unit performs one
// multiply-accumulate per clock (see vedic_mac).
//
// Interface: clk, rst (synchronous, active high, clears all four units).
// Timing: operands presented before a rising edge are in the accumulators
// after that edge.
// The set of units follows the design; putting them in one top with a
// shared clock and reset is this design's choice.
module vedic_mac_top
  import vedic_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  u4_a,
  input  logic [3:0]  u4_b,
  output logic [7:0]  u4_acc,
  output logic        u4_ovf,
  input  logic [3:0]  n4_a,
  input  logic [3:0]  n4_b,
  output logic [7:0]  n4_acc,
  output logic        n4_ovf,
  input  logic [3:0]  y4_a,
  output logic [7:0]  y4_acc,
  output logic        y4_ovf,
  input  logic [7:0]  u8_a,
  input  logic [7:0]  u8_b,
  output logic [15:0] u8_acc,
  output logic        u8_ovf
);

  vedic_mac #(.N(4), .SUTRA(URDHVA)) u_mac4_urdhva (
    .clk (clk), .rst (rst), .a (u4_a), .b (u4_b), .acc (u4_acc), .ovf (u4_ovf)
  );

  vedic_mac #(.N(4), .SUTRA(NIKHILAM)) u_mac4_nikhilam (
    .clk (clk), .rst (rst), .a (n4_a), .b (n4_b), .acc (n4_acc), .ovf (n4_ovf)
  );

  // The squarer uses only a; b is tied off.
  vedic_mac #(.N(4), .SUTRA(YAVADUNAM)) u_mac4_yavadunam (
    .clk (clk), .rst (rst), .a (y4_a), .b (4'd0), .acc (y4_acc), .ovf (y4_ovf)
  );

  vedic_mac #(.N(8), .SUTRA(URDHVA)) u_mac8_urdhva (
    .clk (clk), .rst (rst), .a (u8_a), .b (u8_b), .acc (u8_acc), .ovf (u8_ovf)
  );

endmodule
