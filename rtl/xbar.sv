// xbar: programmable cross-point array, used for the input stage (micro
// wires crossing nanowires), for the routing cross points between the routing
// nanowires and the PGMB rows, and for the output taps.
//
// How it works: N_IN wires cross N_OUT wires. A programmed crosspoint
// (cfg[j][i] = 1) connects input wire i to output wire j through a diode; an
// output wire is pulled down, so it reads the OR of every input programmed
// onto it and 0 when none is. Routing one signal means programming exactly
// one crosspoint per output wire; the wired-OR reading of several
// crosspoints on one wire is this design's model of the diode array.
//
// Interface: in (N_IN wires), cfg (one row of N_IN crosspoint bits per
// output wire), out (N_OUT wires). Timing: combinational.
module xbar #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 8
) (
  input  logic [N_IN-1:0]             in,
  input  logic [N_OUT-1:0][N_IN-1:0]  cfg,
  output logic [N_OUT-1:0]            out
);

  always_comb begin
    for (int j = 0; j < int'(N_OUT); j++)
      out[j] = |(in & cfg[j]);
  end

endmodule
