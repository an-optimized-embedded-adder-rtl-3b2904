// booth_ppg: partial product generator of the 8x8 modified Booth multiplier.
//
// Four encoders look at the overlapping groups (0, x0, x1), (x1, x2, x3),
// (x3, x4, x5) and (x5, x6, x7) of x; each drives a decoder that forms a
// 9-bit partial product from y. Row i carries weight 4^i. The neg line of
// each row is brought out so that the adder tree can add the +1 that
// completes a negative row's two's complement.
//
// Interface: x[7:0], y[7:0] in (two's complement); pp[4][8:0], neg[3:0] out.
// Timing: combinational.
module booth_ppg
  import booth_pkg::*;
(
  input  logic [MW-1:0]  x,
  input  logic [MW-1:0]  y,
  output logic [PPW-1:0] pp [NPP],
  output logic [NPP-1:0] neg
);
  logic [MW:0] xe;  // x with the implicit 0 below bit 0
  assign xe = {x, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_row
    booth_digit_t dig;
    booth_encoder u_be (.grp(xe[2*i +: 3]), .dig(dig));
    booth_decoder u_bd (.y(y), .dig(dig), .pp(pp[i]));
    assign neg[i] = dig.neg;
  end
endmodule
