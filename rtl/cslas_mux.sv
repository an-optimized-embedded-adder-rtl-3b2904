// cslas_mux: the 2N:N selection stage of the carry select adder/subtractor.
//
// Chooses, per group, between the result computed for a carry input of 0 (d0,
// from the rcaha block) and the one for a carry input of 1 (d1, from the bec
// block). The select is the carry out of the group below. The top bit of the
// chosen word is the group's carry out. A transmission-gate multiplexer in the
// original circuit; here a plain 2:1 selection per bit.
//
// Interface: d0, d1 [N-1:0], sel in; q[N-1:0] out. N defaults to 5 (10:5).
// Timing: purely combinational.
module cslas_mux #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] q
);
  always_comb q = sel ? d1 : d0;
endmodule
