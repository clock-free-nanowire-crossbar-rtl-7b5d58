// ncl_reg: N-bit NCL register bank with a single handshake pair.
//
// How it works: N ncl_reg1 cells share Ki. Their individual Ko outputs are
// merged by a chain of TH22 gates (each one a PGMB programmed as TH22), so
// the bank's Ko falls to "request for null" only once every bit holds DATA
// and rises to "request for data" only once every bit holds NULL. The bank
// and its single Ki/Ko pair follow the register blocks of the adder
// layout; how the per-bit completion signals are merged (a TH22 chain) is
// this design's choice, as the architecture does not show it.
//
// Interface: rst (resets to NULL), d/q arrays of N dual-rail bits, Ki from
// the successive stage, Ko to the preceding stage. Timing: clock-free,
// four-phase handshake; the completion chain adds up to N-1 gate delays.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic          rst,
  input  dr_t [N-1:0]   d,
  input  logic          ki,
  output dr_t [N-1:0]   q,
  output logic          ko
);

  logic [N-1:0] bit_ko;
  logic [N-1:0] done;

  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    ncl_reg1 u_bit (
      .rst (rst),
      .d   (d[i]),
      .ki  (ki),
      .q   (q[i]),
      .ko  (bit_ko[i])
    );
  end

  assign done[0] = bit_ko[0];

  for (genvar i = 1; i < int'(N); i++) begin : g_done
    pgmb u_th22 (
      .rst (rst),
      .cfg (CFG_TH22),
      .in  ({2'b00, bit_ko[i], done[i-1]}),
      .z   (done[i])
    );
  end

  assign ko = done[N-1];

endmodule
