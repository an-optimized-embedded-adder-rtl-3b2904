// cslas_sqrt: square-root carry select adder/subtractor.
//
// Same four phases as the linear version (addsub, ripple adders, bec,
// multiplexer), but the groups of a 16-bit section grow in size so that the
// ripple delay of each group is roughly matched by the multiplexer chain
// below it: bits 1:0 (rca with the carry input), then 3:2, 6:4, 10:7 and
// 15:11, each an rcaha of 2, 3, 4 and 5 bits with a 3-, 4-, 5- and 6-bit bec
// and a 6:3, 8:4, 10:5 and 12:6 multiplexer. The addsub stage still works on
// 4-bit slices of b.
//
// Widths above 16 bits cascade 16-bit sections: the bits 1:0 group of every
// section is an rca fed by the carry out of the section below; cin drives
// every addsub. This cascade is this design's reading of the 32- and 64-bit
// versions.
//
// Interface: x, b [WIDTH-1:0], cin in (0 add, 1 subtract); s[WIDTH-1:0],
// carry out. WIDTH must be a multiple of 16 (default 16).
// Timing: purely combinational.
module cslas_sqrt #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             carry
);
  localparam int unsigned NSEC = WIDTH / 16;
  localparam int unsigned NGRP = 5;
  // Lowest bit and size of each group inside a 16-bit section.
  localparam int unsigned GLO [NGRP] = '{0, 2, 4, 7, 11};
  localparam int unsigned GSZ [NGRP] = '{2, 2, 3, 4, 5};

  logic [WIDTH-1:0]       y;
  logic [NSEC*NGRP:0]     gc;   // carry into each group, in order

  for (genvar g = 0; g < WIDTH / 4; g++) begin : g_addsub
    addsub #(.N(4)) u_addsub (.cin(cin), .b(b[4*g +: 4]), .y(y[4*g +: 4]));
  end

  assign gc[0] = cin;

  for (genvar sec = 0; sec < NSEC; sec++) begin : g_sec
    for (genvar k = 0; k < NGRP; k++) begin : g_grp
      localparam int unsigned LO = 16 * sec + GLO[k];
      localparam int unsigned SZ = GSZ[k];
      localparam int unsigned GI = NGRP * sec + k;
      if (k == 0) begin : g_rca
        rca #(.N(SZ)) u_rca (
          .x(x[LO +: SZ]), .y(y[LO +: SZ]), .cin(gc[GI]),
          .s(s[LO +: SZ]), .cout(gc[GI+1])
        );
      end else begin : g_sel
        logic [SZ:0] r0, r1, rq;
        rcaha #(.N(SZ)) u_rcaha (.x(x[LO +: SZ]), .y(y[LO +: SZ]), .s(r0[SZ-1:0]), .cout(r0[SZ]));
        bec #(.N(SZ+1)) u_bec (.b(r0), .x(r1));
        cslas_mux #(.N(SZ+1)) u_mux (.d0(r0), .d1(r1), .sel(gc[GI]), .q(rq));
        assign s[LO +: SZ] = rq[SZ-1:0];
        assign gc[GI+1]    = rq[SZ];
      end
    end
  end

  assign carry = gc[NSEC*NGRP];

  initial begin
    assert (WIDTH % 16 == 0 && WIDTH >= 16)
      else $error("cslas_sqrt: WIDTH must be a multiple of 16");
  end
endmodule
