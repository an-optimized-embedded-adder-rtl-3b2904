// rca: ripple carry adder of pro_fa cells with a carry input.
//
// Bit i adds x[i], y[i] and the carry of bit i-1; the carry input enters bit 0
// and cout leaves bit N-1. It forms the least significant group of the carry
// select adder/subtractor, where its carry input is the add/subtract mode.
// The structure, a chain of the proposed cells, is the published one.
//
// Interface: x, y [N-1:0], cin in; s[N-1:0], cout out. N defaults to 4.
// Timing: purely combinational, N carry stages deep.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0]   c;
  logic [N-1:0] f_unused;

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    pro_fa u_fa (.a(x[i]), .b(y[i]), .cin(c[i]), .sum(s[i]), .carry(c[i+1]), .f(f_unused[i]));
  end
  assign cout = c[N];
endmodule
