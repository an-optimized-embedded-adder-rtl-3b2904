// booth_decoder: modified Booth decoder, "BD".
//
// Produces one 9-bit partial product from the 8-bit operand y and a Booth
// digit. Bit j selects y[j] (digit +/-1) or y[j-1] (digit +/-2, a left shift)
// and is XORed with neg. For a negative digit the result is therefore the
// ones' complement of |digit| * y; the missing +1 is added by the Wallace
// tree from the neg line. Bit 8 uses y[7] as the sign extension of y.
//
// Interface: y[7:0], dig in; pp[8:0] out (PP_0 .. PP_8).
// Timing: combinational.
module booth_decoder
  import booth_pkg::*;
(
  input  logic [MW-1:0]  y,
  input  booth_digit_t   dig,
  output logic [PPW-1:0] pp
);
  logic [PPW-1:0] y1;  // y sign-extended to 9 bits
  logic [PPW-1:0] y2;  // 2*y in 9 bits

  always_comb begin
    y1 = {y[MW-1], y};
    y2 = {y, 1'b0};
    for (int j = 0; j < PPW; j++)
      pp[j] = ((dig.one & y1[j]) | (dig.two & y2[j])) ^ dig.neg;
  end
endmodule
