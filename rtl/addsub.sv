// addsub: first stage of the carry select adder/subtractor.
//
// Every bit of operand B goes through an XOR with the mode input cin, so
// y = B when cin = 0 (addition) and y = ~B when cin = 1 (subtraction). The
// same cin is the carry into the least significant adder, which supplies
// the +1 of the two's complement. The XOR-per-bit structure is the published
// one; as RTL it is a plain XOR.
//
// Interface: cin, b[N-1:0] in; y[N-1:0] out. N = 4 as in the adder's
// four-bit groups. Timing: purely combinational.
module addsub #(
  parameter int unsigned N = 4
) (
  input  logic         cin,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  always_comb y = b ^ {N{cin}};
endmodule
