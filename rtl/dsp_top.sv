// dsp_top: the proposed arithmetic units side by side.
//
// Holds the 4-tap transposed FIR filter (whose multipliers contain the Booth
// encoders and decoders, the pro_fa Wallace trees and linear carry select
// final adders) together with a stand-alone linear and a stand-alone
// square-root carry select adder/subtractor, each with its own ports. The
// units share no signals; the filter alone is clocked.
//
// Interface:
//   clk, rst_n, fir_x[7:0], fir_h[4][7:0] -> fir_y[ACC_W-1:0]   (filter)
//   lin_x, lin_b [CSLAS_W-1:0], lin_cin   -> lin_s, lin_carry   (linear)
//   sq_x,  sq_b  [CSLAS_W-1:0], sq_cin    -> sq_s,  sq_carry    (square-root)
// cin = 0 adds, cin = 1 subtracts. Timing: see fir4; the adders are
// combinational.
module dsp_top #(
  parameter int unsigned CSLAS_W = 16,
  parameter int unsigned ACC_W   = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         fir_x,
  input  logic [7:0]         fir_h [4],
  output logic [ACC_W-1:0]   fir_y,
  input  logic [CSLAS_W-1:0] lin_x,
  input  logic [CSLAS_W-1:0] lin_b,
  input  logic               lin_cin,
  output logic [CSLAS_W-1:0] lin_s,
  output logic               lin_carry,
  input  logic [CSLAS_W-1:0] sq_x,
  input  logic [CSLAS_W-1:0] sq_b,
  input  logic               sq_cin,
  output logic [CSLAS_W-1:0] sq_s,
  output logic               sq_carry
);
  fir4 #(.ACC_W(ACC_W)) u_fir (
    .clk(clk), .rst_n(rst_n), .x_in(fir_x), .h(fir_h), .y_out(fir_y)
  );

  cslas_linear #(.WIDTH(CSLAS_W)) u_lin (
    .x(lin_x), .b(lin_b), .cin(lin_cin), .s(lin_s), .carry(lin_carry)
  );

  cslas_sqrt #(.WIDTH(CSLAS_W)) u_sq (
    .x(sq_x), .b(sq_b), .cin(sq_cin), .s(sq_s), .carry(sq_carry)
  );
endmodule
