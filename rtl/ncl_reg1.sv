// ncl_reg1: 1-bit NCL register built from three PGMBs on a 2x2 fabric.
//
// How it works: each output rail is a TH22 (C-element) of its data rail and
// Ki, so a DATA wavefront passes only while the next stage requests data
// (Ki = 1) and a NULL wavefront only while it requests NULL (Ki = 0); in
// between, the TH22 hysteresis holds the current value. A TH12 over Q0 and
// Q1 detects that the register holds DATA; Ko is its complement, so Ko = 1
// ("request for data") while the register holds NULL and Ko = 0 ("request
// for null") while it holds DATA.
// The gates (two TH22, one TH12), the port names and the placement (TH12 and
// one TH22 in the first row, the other TH22 below it, one block unused)
// follow the architecture's register. The crossbar cannot invert a signal,
// so the complement that makes Ko is taken at the output of the block; that
// inverter and the reset are this design's choices.
//
// Interface: rst (resets to NULL, Ko = 1), dual-rail d in, q out, Ki from the
// successive stage, Ko to the preceding stage. Timing: clock-free, four-phase
// handshake.
module ncl_reg1
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  d,
  input  logic ki,
  output dr_t  q,
  output logic ko
);

  localparam int unsigned NG    = 4;
  localparam int unsigned N_PI  = 3;
  localparam int unsigned N_PO  = 3;
  localparam int unsigned N_TRK = 7;
  localparam int unsigned N_SRC = NG + N_PI;

  // Gate g drives track g; D0, D1 and Ki enter on tracks 4, 5 and 6.
  localparam int unsigned T_DONE = 0, T_Q0 = 1, T_Q1 = 3;
  localparam int unsigned T_D0 = 4, T_D1 = 5, T_KI = 6;

  pgmb_cfg_t [NG-1:0]               gate_cfg;
  logic [N_TRK-1:0][N_SRC-1:0]      src_cfg;
  logic [NG*PGMB_IN-1:0][N_TRK-1:0] row_cfg;
  logic [N_PO-1:0][N_TRK-1:0]       out_cfg;
  logic [N_PO-1:0]                  po;

  always_comb begin
    gate_cfg[0] = CFG_TH12;     // row 1, col 1: completion
    gate_cfg[1] = CFG_TH22;     // row 1, col 2: rail 0
    gate_cfg[2] = PGMB_UNUSED;  // row 2, col 1
    gate_cfg[3] = CFG_TH22;     // row 2, col 2: rail 1

    src_cfg = '0;
    for (int t = 0; t < int'(N_TRK); t++) src_cfg[t][t] = 1'b1;

    row_cfg = '0;
    row_cfg[0*PGMB_IN + 0][T_Q0] = 1'b1;
    row_cfg[0*PGMB_IN + 1][T_Q1] = 1'b1;
    row_cfg[1*PGMB_IN + 0][T_D0] = 1'b1;
    row_cfg[1*PGMB_IN + 1][T_KI] = 1'b1;
    row_cfg[3*PGMB_IN + 0][T_D1] = 1'b1;
    row_cfg[3*PGMB_IN + 1][T_KI] = 1'b1;

    out_cfg = '0;
    out_cfg[0][T_Q0]   = 1'b1;
    out_cfg[1][T_Q1]   = 1'b1;
    out_cfg[2][T_DONE] = 1'b1;
  end

  pgmb_fabric #(
    .ROWS(2), .COLS(2), .N_PI(N_PI), .N_PO(N_PO), .N_TRK(N_TRK)
  ) u_fabric (
    .rst      (rst),
    .pi       ({ki, d.r1, d.r0}),
    .po       (po),
    .gate_cfg (gate_cfg),
    .src_cfg  (src_cfg),
    .row_cfg  (row_cfg),
    .out_cfg  (out_cfg)
  );

  assign q  = '{r1: po[1], r0: po[0]};
  assign ko = ~po[2];

endmodule
