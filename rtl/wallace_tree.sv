// wallace_tree: carry-save reduction of the Booth partial products.
//
// The four 9-bit partial products are sign-extended, shifted to weight 4^i
// and placed in 16-bit rows; a fifth row holds the neg correction bits at
// positions 0, 2, 4 and 6. Three layers of 3:2 compressors, each a row of
// pro_fa cells, reduce the five rows to two:
//   layer 1: rows 0, 1, 2       -> s1, c1   (rows 3 and 4 wait)
//   layer 2: s1, c1, row 3      -> s2, c2
//   layer 3: s2, c2, neg row    -> row_s, row_c
// Carries are shifted one place left and anything beyond bit 15 is dropped,
// so row_s + row_c equals the product modulo 2^16. The tree shape is this
// design's choice.
//
// Interface: pp[4][8:0], neg[3:0] in; row_s, row_c [15:0] out.
// Timing: combinational, three full-adder delays.
module wallace_tree
  import booth_pkg::*;
(
  input  logic [PPW-1:0] pp [NPP],
  input  logic [NPP-1:0] neg,
  output logic [PW-1:0]  row_s,
  output logic [PW-1:0]  row_c
);
  logic [PW-1:0] r [NPP+1];

  always_comb begin
    for (int i = 0; i < NPP; i++)
      r[i] = PW'($signed(pp[i])) << (2 * i);
    r[NPP] = '0;
    for (int i = 0; i < NPP; i++) r[NPP][2*i] = neg[i];
  end

  logic [PW-1:0] s1, k1, s2, k2, s3, k3;   // k: raw carries before the shift
  logic [PW-1:0] c1, c2;
  logic [PW-1:0] f_unused_1, f_unused_2, f_unused_3;  // partial-sum nodes, not needed here
  logic [2:0]    carry_unused;                       // carries out of bit 15, beyond the product

  for (genvar j = 0; j < PW; j++) begin : g_col
    pro_fa u_l1 (.a(r[0][j]), .b(r[1][j]), .cin(r[2][j]),   .sum(s1[j]), .carry(k1[j]), .f(f_unused_1[j]));
    pro_fa u_l2 (.a(s1[j]),   .b(c1[j]),   .cin(r[3][j]),   .sum(s2[j]), .carry(k2[j]), .f(f_unused_2[j]));
    pro_fa u_l3 (.a(s2[j]),   .b(c2[j]),   .cin(r[NPP][j]), .sum(s3[j]), .carry(k3[j]), .f(f_unused_3[j]));
  end

  assign c1    = {k1[PW-2:0], 1'b0};
  assign c2    = {k2[PW-2:0], 1'b0};
  assign row_s = s3;
  assign row_c = {k3[PW-2:0], 1'b0};
  assign carry_unused = {k1[PW-1], k2[PW-1], k3[PW-1]};
endmodule
