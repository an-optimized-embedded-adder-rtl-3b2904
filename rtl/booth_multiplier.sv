// booth_multiplier: 8x8 signed modified Booth multiplier.
//
// Three steps: booth_ppg recodes x into four Booth digits and forms four
// partial products of y; wallace_tree compresses them (and the negation
// corrections) to two rows with pro_fa cells; a 16-bit linear carry select
// adder/subtractor in add mode adds the last two rows. Both operands and the
// product are two's complement.
//
// Interface: x[7:0], y[7:0] in; p[15:0] = x * y out.
// Timing: combinational.
module booth_multiplier
  import booth_pkg::*;
(
  input  logic [MW-1:0] x,
  input  logic [MW-1:0] y,
  output logic [PW-1:0] p
);
  logic [PPW-1:0] pp [NPP];
  logic [NPP-1:0] neg;
  logic [PW-1:0]  row_s, row_c;
  logic           carry_unused;

  booth_ppg    u_ppg (.x(x), .y(y), .pp(pp), .neg(neg));
  wallace_tree u_wt  (.pp(pp), .neg(neg), .row_s(row_s), .row_c(row_c));
  cslas_linear #(.WIDTH(PW)) u_cpa (
    .x(row_s), .b(row_c), .cin(1'b0), .s(p), .carry(carry_unused)
  );
endmodule
