// rcaha: ripple adder for a carry input of zero.
//
// Bit 0 is a half adder (pro_ha), the upper N-1 bits are pro_fa cells. It
// computes the "carry in = 0" result of every carry select group except the
// first; the "carry in = 1" result is derived from it by the bec block.
// The half adder plus full adders split is the published structure.
//
// Interface: x, y [N-1:0] in; s[N-1:0], cout out. N defaults to 4 (the linear
// adder); the square-root adder uses 2 to 5. Timing: purely combinational.
module rcaha #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:1]   c;
  logic [N-1:0] f_unused;

  pro_ha u_ha (.a(x[0]), .b(y[0]), .sum(s[0]), .carry(c[1]));
  assign f_unused[0] = 1'b0;
  for (genvar i = 1; i < N; i++) begin : g_bit
    pro_fa u_fa (.a(x[i]), .b(y[i]), .cin(c[i]), .sum(s[i]), .carry(c[i+1]), .f(f_unused[i]));
  end
  assign cout = c[N];
endmodule
