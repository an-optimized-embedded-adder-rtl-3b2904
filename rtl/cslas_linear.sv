// cslas_linear: linear carry select adder/subtractor.
//
// Computes s = x + b (cin = 0) or s = x - b (cin = 1) in four phases:
//   1. addsub: every 4-bit slice of b is XORed with cin;
//   2. the lowest 4-bit group is a ripple adder (rca) whose carry input is
//      cin; every other 4-bit group is an rcaha, i.e. a ripple adder with a
//      carry input of 0;
//   3. a 5-bit bec turns each rcaha's {carry, sum} into the value for a carry
//      input of 1;
//   4. a 10:5 multiplexer picks one of the two with the carry out of the group
//      below, which produces this group's sum bits and carry out.
// The carry therefore passes one multiplexer per group instead of rippling
// through every bit. carry is the final carry out; in subtraction it is 1
// when no borrow occurs (x >= b unsigned).
//
// Widths above 16 bits are built as a cascade of the 16-bit structure: the
// first group of every 16-bit section is again an rca, whose carry input is
// the carry out of the section below, while cin still drives every addsub.
// The cascade is this design's reading of how the 32- and 64-bit versions are
// formed (their gate counts are exact multiples of the 16-bit one).
//
// Interface: x, b [WIDTH-1:0], cin in; s[WIDTH-1:0], carry out.
// WIDTH must be a multiple of 16 (default 16). Timing: purely combinational.
module cslas_linear #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             carry
);
  localparam int unsigned NG = WIDTH / 4;  // number of 4-bit groups

  logic [WIDTH-1:0] y;       // b after the addsub stage
  logic [NG:0]      gc;      // gc[g]: carry into group g

  // Phase 1: conditional inversion of b.
  for (genvar g = 0; g < NG; g++) begin : g_addsub
    addsub #(.N(4)) u_addsub (.cin(cin), .b(b[4*g +: 4]), .y(y[4*g +: 4]));
  end

  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    if (g % 4 == 0) begin : g_rca
      // First group of a 16-bit section: plain ripple adder.
      rca #(.N(4)) u_rca (
        .x(x[4*g +: 4]), .y(y[4*g +: 4]), .cin(gc[g]),
        .s(s[4*g +: 4]), .cout(gc[g+1])
      );
    end else begin : g_sel
      logic [4:0] r0;  // {carry, sum} for carry input 0
      logic [4:0] r1;  // {carry, sum} for carry input 1
      logic [4:0] rq;
      rcaha #(.N(4)) u_rcaha (.x(x[4*g +: 4]), .y(y[4*g +: 4]), .s(r0[3:0]), .cout(r0[4]));
      bec #(.N(5)) u_bec (.b(r0), .x(r1));
      cslas_mux #(.N(5)) u_mux (.d0(r0), .d1(r1), .sel(gc[g]), .q(rq));
      assign s[4*g +: 4] = rq[3:0];
      assign gc[g+1]     = rq[4];
    end
  end

  assign carry = gc[NG];

  initial begin
    assert (WIDTH % 16 == 0 && WIDTH >= 16)
      else $error("cslas_linear: WIDTH must be a multiple of 16");
  end
endmodule
