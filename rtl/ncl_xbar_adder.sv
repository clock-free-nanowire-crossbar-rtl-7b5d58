// ncl_xbar_adder: clock-free NCL adder pipeline on the nanowire crossbar.
//
// How it works: an input NCL register bank captures the dual-rail operands
// (a, b and carry in), the crossbar adder computes the dual-rail sum and
// carry, and an output NCL register bank captures the result. There is no
// clock: the output bank's Ko ("request for data"/"request for null") is the
// input bank's Ki, so each register lets the next wavefront through only
// when the stage after it has taken the previous one. A DATA wavefront and a
// NULL wavefront alternate on every path. The input registers, the 2x2
// crossbar adder and the output registers are the architecture's
// demonstration layout (WIDTH = 1); for WIDTH > 1 the adder is a ripple
// chain of crossbar full adders, which is this design's extension.
//
// Interface (all dual-rail buses bit 0 first):
//   rst            resets every gate to NULL; both Ko outputs then request data
//   a, b, ci       operands and carry in from the environment
//   ko             request to the environment: 1 = send DATA, 0 = send NULL
//   s, co          sum and carry out to the environment
//   ki             request from the environment: 1 = it wants DATA, 0 = NULL
// Timing: four-phase return-to-NULL handshake on both sides.
//
// Tools report combinational loops here: the Ko-to-Ki acknowledgement runs
// back against the data flow, and every gate holds its state through its
// own feedback (see pgmb). Both are how a clock-free NCL pipeline keeps
// state, so the warnings stand.
module ncl_xbar_adder
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic            rst,
  input  dr_t [WIDTH-1:0] a,
  input  dr_t [WIDTH-1:0] b,
  input  dr_t             ci,
  output logic            ko,
  output dr_t [WIDTH-1:0] s,
  output dr_t             co,
  input  logic            ki
);

  localparam int unsigned N_IN  = 2 * WIDTH + 1;
  localparam int unsigned N_OUT = WIDTH + 1;

  dr_t [N_IN-1:0]  in_q;
  dr_t [N_OUT-1:0] sum_d;
  dr_t [N_OUT-1:0] out_q;
  logic            out_ko;

  // Input register: bits are a[WIDTH-1:0], b[WIDTH-1:0], ci from the top.
  ncl_reg #(.N(N_IN)) u_in_reg (
    .rst (rst),
    .d   ({ci, b, a}),
    .ki  (out_ko),
    .q   (in_q),
    .ko  (ko)
  );

  ncl_ripple_adder #(.WIDTH(WIDTH)) u_adder (
    .rst (rst),
    .a   (in_q[WIDTH-1:0]),
    .b   (in_q[2*WIDTH-1:WIDTH]),
    .ci  (in_q[2*WIDTH]),
    .s   (sum_d[WIDTH-1:0]),
    .co  (sum_d[WIDTH])
  );

  ncl_reg #(.N(N_OUT)) u_out_reg (
    .rst (rst),
    .d   (sum_d),
    .ki  (ki),
    .q   (out_q),
    .ko  (out_ko)
  );

  assign s  = out_q[WIDTH-1:0];
  assign co = out_q[WIDTH];

endmodule
