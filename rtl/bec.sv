// bec: binary to excess-1 converter.
//
// Adds one to an N-bit word with XOR and AND gates only: bit 0 is inverted,
// and bit i toggles when all bits below it are one (an AND chain). In the
// carry select adder its input is {carry, sum} of a group computed with a
// carry input of 0, so its output is the same group's result for a carry
// input of 1. The use of XOR and AND gates is published; the AND-chain
// arrangement is this design's choice.
//
// Interface: b[N-1:0] in; x[N-1:0] = b + 1 (mod 2^N) out. N defaults to 5
// (four sum bits and the carry). Timing: purely combinational.
module bec #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  logic [N-1:0] all_ones;  // all_ones[i]: bits i-1..0 of b are all one

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < N; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end
  assign x = b ^ all_ones;
endmodule
