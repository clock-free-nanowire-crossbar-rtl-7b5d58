// ncl_ripple_adder: WIDTH-bit delay-insensitive ripple-carry adder built
// from crossbar full adders.
//
// How it works: bit i is an ncl_fa_xbar whose dual-rail carry-out feeds the
// carry-in of bit i+1. Since every full adder is input-complete, the
// WIDTH+1 outputs together change from NULL to DATA only when every input
// has arrived, and back to NULL only when every input has left. The chaining
// of crossbar full adders into a multi-bit adder is this design's reading of
// the architecture's multi-bit adder, of which only the idea is given; the
// default width of one bit is the demonstrated configuration.
//
// Interface: rst, dual-rail operands a and b (bit 0 first), carry in ci;
// dual-rail sum s and carry out co. Timing: clock-free; the DATA wavefront
// ripples through up to WIDTH carry gates.
module ncl_ripple_adder
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic            rst,
  input  dr_t [WIDTH-1:0] a,
  input  dr_t [WIDTH-1:0] b,
  input  dr_t             ci,
  output dr_t [WIDTH-1:0] s,
  output dr_t             co
);

  dr_t [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_fa
    ncl_fa_xbar u_fa (
      .rst (rst),
      .a   (a[i]),
      .b   (b[i]),
      .ci  (c[i]),
      .s   (s[i]),
      .co  (c[i+1])
    );
  end

  assign co = c[WIDTH];

endmodule
