// pro_ha: one-bit half adder.
//
// The sum is the same A xor B stage that starts the full adder; the carry is
// A and B, formed with a transmission-gate AND (B passes A when B is high).
// Used as bit 0 of the adders whose carry input is always zero.
//
// Interface: a, b in; sum, carry out. Timing: purely combinational.
module pro_ha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb sum   = b ? ~a : a;
  always_comb carry = b ? a : 1'b0;
endmodule
