// pgmb: programmable gate macro block, the unit cell of the crossbar.
//
// How it works: every product-term column is a nanowire with a pull-up
// resistor; a programmed diode crosspoint pulls the column low when its row
// is low, so a column computes the AND of the rows programmed on it (a column
// with no crosspoint reads 1). The output row, with a pull-down resistor, ORs
// the columns programmed on it. One extra input row carries the gate's own
// output back (the feedback loop), which gives an NCL threshold gate its
// hysteresis: Z = set(A..D) + hold(A..D)*Z*.
//
// The feedback wire is a loop through the gate. Here the plane is evaluated
// twice, once with the feedback row at 0 ("set") and once at 1 ("hold"), and
// a level-sensitive latch closes the loop: Z becomes 1 when set is 1, becomes
// 0 when hold is 0, and otherwise keeps its value. For a monotone
// programming this is the same function as the wired loop. The latch is
// therefore intended (a circuit warning about it stands): it is the
// state-holding element of an NCL gate, and the design has no clock.
//
// Interface: cfg selects the programmed crosspoints (static while in use),
// in[0..3] are rows A..D, z is the gate output. rst forces z to 0 (NULL);
// the reset is this design's addition, the architecture names none.
// Timing: purely level-driven, no clock.
module pgmb
  import ncl_pkg::*;
(
  input  logic              rst,
  input  pgmb_cfg_t         cfg,
  input  logic [PGMB_IN-1:0] in,
  output logic              z
);

  logic [PGMB_PT-1:0] col_set;   // column values with the feedback row at 0
  logic [PGMB_PT-1:0] col_hold;  // column values with the feedback row at 1
  logic               set, hold;

  always_comb begin
    for (int p = 0; p < int'(PGMB_PT); p++) begin
      col_hold[p] = &(in | ~cfg.and_in[p]);
      col_set[p]  = col_hold[p] & ~cfg.and_fb[p];
    end
    set  = |(col_set  & cfg.or_pt);
    hold = |(col_hold & cfg.or_pt);
  end

  always_latch begin
    if (rst)               z = 1'b0;
    else if (set || !hold) z = set;
  end

endmodule
