// fir4: 4-tap FIR filter in transposed form.
//
// y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3]. The new sample is
// broadcast to four Booth multipliers at once; the products are summed in a
// chain of three registers (tg_dff) and pro_fa ripple adders:
//   z3 <= h3*x,  z2 <= h2*x + z3,  z1 <= h1*x + z2,  y = h0*x + z1.
// The path from input to output is one multiplier and one adder, whatever
// the number of taps. Coefficients are inputs, as they are chosen by the
// filter design; samples and coefficients are 8-bit two's complement and the
// running sums ACC_W bits (18 holds any sum of four 16-bit products).
// The transposed structure with three registers and four Booth multipliers
// is the published one; the word widths, the reset and the use of ripple
// adders between the taps are this design's choices.
//
// Interface: clk, rst_n, x_in[7:0], h[4][7:0] in; y_out[ACC_W-1:0] out.
// Timing: one sample per clock; y_out is combinational in x_in of the same
// cycle and the registered sums of earlier samples.
module fir4
  import booth_pkg::*;
#(
  parameter int unsigned ACC_W = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [MW-1:0]        x_in,
  input  logic [MW-1:0]        h [4],
  output logic [ACC_W-1:0]     y_out
);
  logic [PW-1:0]    prod [4];
  logic [ACC_W-1:0] prod_x [4];   // products sign-extended to ACC_W
  logic [ACC_W-1:0] z [1:3];      // register outputs
  logic [ACC_W-1:0] sum [0:2];    // adder outputs
  logic [2:0]       cout_unused;

  for (genvar k = 0; k < 4; k++) begin : g_tap
    booth_multiplier u_mul (.x(h[k]), .y(x_in), .p(prod[k]));
    assign prod_x[k] = ACC_W'($signed(prod[k]));
  end

  // Taps 0..2: product plus the delayed partial sum from the next tap.
  for (genvar k = 0; k < 3; k++) begin : g_add
    rca #(.N(ACC_W)) u_add (
      .x(prod_x[k]), .y(z[k+1]), .cin(1'b0), .s(sum[k]), .cout(cout_unused[k])
    );
  end

  tg_dff #(.W(ACC_W)) u_z3 (.clk(clk), .rst_n(rst_n), .d(prod_x[3]), .q(z[3]));
  tg_dff #(.W(ACC_W)) u_z2 (.clk(clk), .rst_n(rst_n), .d(sum[2]),    .q(z[2]));
  tg_dff #(.W(ACC_W)) u_z1 (.clk(clk), .rst_n(rst_n), .d(sum[1]),    .q(z[1]));

  assign y_out = sum[0];
endmodule
