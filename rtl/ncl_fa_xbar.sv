// ncl_fa_xbar: delay-insensitive dual-rail 1-bit full adder mapped onto a
// 2x2 PGMB fabric.
//
// How it works: four threshold gates compute the dual-rail sum and carry.
//   row 1, col 1: TH23(a0, b0, c0)       -> co0 (carry is 0: at most one 1)
//   row 1, col 2: TH23(a1, b1, c1)       -> co1 (carry is 1: at least two 1s)
//   row 2, col 1: TH34w2(co1*2, c0, a0, b0) -> s0
//   row 2, col 2: TH34w2(co0*2, c1, a1, b1) -> s1
// The carry output, with weight 2, joins the three inputs of the opposite
// rail in the sum gate. The gate types, their placement in the grid and the
// netlist follow the architecture's adder; which TH23 takes rail 0 and which
// column is which, and the track numbering, are this design's choices.
// The output goes from NULL to DATA only once all three inputs are DATA, and
// back to NULL only once all three are NULL (input completeness).
//
// Routing: the six input rails enter through the input stage on tracks 4..9
// (a0, a1, b0, b1, c0, c1), the gate outputs drive tracks 0..3, each gate row
// taps one track, and the output taps read s0, s1, co0, co1.
//
// Interface: rst, dual-rail a, b, ci in; dual-rail s, co out.
// Timing: clock-free; each output settles one or two gate delays after the
// input wavefront is complete.
module ncl_fa_xbar
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);

  localparam int unsigned NG    = 4;
  localparam int unsigned N_PI  = 6;
  localparam int unsigned N_PO  = 4;
  localparam int unsigned N_TRK = 10;
  localparam int unsigned N_SRC = NG + N_PI;

  // Track numbers.
  localparam int unsigned T_CO0 = 0, T_CO1 = 1, T_S0 = 2, T_S1 = 3;
  localparam int unsigned T_A0 = 4, T_A1 = 5, T_B0 = 6, T_B1 = 7, T_C0 = 8, T_C1 = 9;

  pgmb_cfg_t [NG-1:0]               gate_cfg;
  logic [N_TRK-1:0][N_SRC-1:0]      src_cfg;
  logic [NG*PGMB_IN-1:0][N_TRK-1:0] row_cfg;
  logic [N_PO-1:0][N_TRK-1:0]       out_cfg;
  logic [N_PO-1:0]                  po;

  // Programming of the crosspoints.
  always_comb begin
    gate_cfg[0] = CFG_TH23;
    gate_cfg[1] = CFG_TH23;
    gate_cfg[2] = CFG_TH34W2;
    gate_cfg[3] = CFG_TH34W2;

    // Source s drives track s: gate g is source g, primary input k is
    // source NG+k, so every source owns the track of the same number.
    src_cfg = '0;
    for (int t = 0; t < int'(N_TRK); t++) src_cfg[t][t] = 1'b1;

    row_cfg = '0;
    row_cfg[0*PGMB_IN + 0][T_A0]  = 1'b1;
    row_cfg[0*PGMB_IN + 1][T_B0]  = 1'b1;
    row_cfg[0*PGMB_IN + 2][T_C0]  = 1'b1;
    row_cfg[1*PGMB_IN + 0][T_A1]  = 1'b1;
    row_cfg[1*PGMB_IN + 1][T_B1]  = 1'b1;
    row_cfg[1*PGMB_IN + 2][T_C1]  = 1'b1;
    row_cfg[2*PGMB_IN + 0][T_CO1] = 1'b1;   // weight-2 input
    row_cfg[2*PGMB_IN + 1][T_C0]  = 1'b1;
    row_cfg[2*PGMB_IN + 2][T_A0]  = 1'b1;
    row_cfg[2*PGMB_IN + 3][T_B0]  = 1'b1;
    row_cfg[3*PGMB_IN + 0][T_CO0] = 1'b1;   // weight-2 input
    row_cfg[3*PGMB_IN + 1][T_C1]  = 1'b1;
    row_cfg[3*PGMB_IN + 2][T_A1]  = 1'b1;
    row_cfg[3*PGMB_IN + 3][T_B1]  = 1'b1;

    out_cfg = '0;
    out_cfg[0][T_S0]  = 1'b1;
    out_cfg[1][T_S1]  = 1'b1;
    out_cfg[2][T_CO0] = 1'b1;
    out_cfg[3][T_CO1] = 1'b1;
  end

  pgmb_fabric #(
    .ROWS(2), .COLS(2), .N_PI(N_PI), .N_PO(N_PO), .N_TRK(N_TRK)
  ) u_fabric (
    .rst      (rst),
    .pi       ({ci.r1, ci.r0, b.r1, b.r0, a.r1, a.r0}),
    .po       (po),
    .gate_cfg (gate_cfg),
    .src_cfg  (src_cfg),
    .row_cfg  (row_cfg),
    .out_cfg  (out_cfg)
  );

  assign s  = '{r1: po[1], r0: po[0]};
  assign co = '{r1: po[3], r0: po[2]};

endmodule
