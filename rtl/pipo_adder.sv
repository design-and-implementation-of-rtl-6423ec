// pipo_adder: the accumulate adder and accumulator register of the MAC.
//
// A W-bit adder adds the incoming product to the accumulator; a PIPO
// register stores the sum on every rising clock edge, and its output is
// fed back to the adder, so each clock adds one more product:
//   acc(t+1) = acc(t) + addend(t)   (mod 2^W)
// The adder's carry out marks an accumulation that no longer fits W bits;
// it sets the overflow flag, which stays set until reset. The accumulator
// keeps the wrapped low W bits.
//
// Interface: clk, rst (synchronous, active high: acc = 0, ovf = 0),
// addend (W bits, unsigned) -> acc (W bits), ovf.
// Timing: an addend present before a clock edge is in acc after that edge.
// The adder-plus-register loop follows the design; detecting overflow as
// an unsigned carry out and making it sticky are this design's choices.
module pipo_adder #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] addend,
  output logic [W-1:0] acc,
  output logic         ovf
);

  logic [W-1:0] sum;
  logic         carry;

  assign {carry, sum} = {1'b0, acc} + {1'b0, addend};

  pipo_register #(.W(W)) u_acc_reg (
    .clk (clk),
    .rst (rst),
    .d   (sum),
    .q   (acc)
  );

  always_ff @(posedge clk) begin
    if (rst)        ovf <= 1'b0;
    else if (carry) ovf <= 1'b1;
  end

endmodule
