// pro_fa: one-bit full adder built around a shared partial-sum node F.
//
// The cell first forms F = A xor B (the "xor gate 1" stage). The sum is a
// second XOR of F with the carry input, and the carry is a 2:1 pass-transistor
// selection controlled by F: when A and B differ the carry input propagates,
// when they agree the carry equals A (which then equals B). This follows the
// cell's logic equations; the 13-transistor circuit itself, its sizing and its
// electrical behaviour are not modelled.
//
// Interface: a, b, cin in; sum, carry out; f brings the partial-sum node out,
// as the cell's in-out node is reused by other blocks.
// Timing: purely combinational.
module pro_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic f
);
  // xor gate 1: B high -> inverter path gives ~A; B low -> TG passes A.
  always_comb f = b ? ~a : a;
  // xor gate 2: CIN high -> inverter on F; CIN low -> pass transistor passes F.
  always_comb sum = cin ? ~f : f;
  // Carry pass transistors: ~F selects A, F selects CIN.
  always_comb carry = f ? cin : a;
endmodule
