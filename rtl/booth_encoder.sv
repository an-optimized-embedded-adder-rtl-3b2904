// booth_encoder: modified Booth (radix-4 recoding) encoder, "BE".
//
// Looks at one overlapping 3-bit group {x[2i+1], x[2i], x[2i-1]} of the
// recoded operand and outputs the digit -2*x[2i+1] + x[2i] + x[2i-1] as
// control lines: one = x[2i] xor x[2i-1]; two = (x[2i+1] xor x[2i]) and not
// one; neg = x[2i+1] and not (x[2i] and x[2i-1]), so the group 111 gives a
// plain zero rather than a negative zero. The XOR-based form follows the
// idea of building encoder and decoder from XOR gates; the exact gate
// arrangement is this design's choice.
//
// Interface: grp[2:0] in; dig (booth_digit_t) out. Timing: combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   grp,
  output booth_digit_t dig
);
  always_comb begin
    dig.one = grp[1] ^ grp[0];
    dig.two = (grp[2] ^ grp[1]) & ~(grp[1] ^ grp[0]);
    dig.neg = grp[2] & ~(grp[1] & grp[0]);
  end
endmodule
