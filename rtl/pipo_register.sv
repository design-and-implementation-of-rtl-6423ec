// pipo_register: W-bit parallel-in parallel-out register.
//
// All W inputs are presented at once and move to the W outputs together on
// the same rising clock edge; the register both loads and unloads on that
// one clock pulse, so it is a one-cycle storage/delay element. In the MAC
// it is the accumulator register of the PIPO adder.
//
// Interface: clk, rst (synchronous, active high, clears q), d -> q.
// Timing: q shows d one clock edge after d is presented.
// The parallel load on every clock follows the design; the synchronous
// reset is this design's choice.
module pipo_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
