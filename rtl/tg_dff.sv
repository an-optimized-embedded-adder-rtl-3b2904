// tg_dff: W-bit register of D flip-flops, the delay element of the FIR filter.
//
// Captures d on the rising clock edge. The asynchronous active-low reset
// clears it to zero; the reset is this design's addition so that the filter
// starts from a known state.
//
// Interface: clk, rst_n, d[W-1:0] in; q[W-1:0] out. Timing: one clock delay.
module tg_dff #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
