// pgmb_fabric: a two-dimensional grid of programmable gate macro blocks
// surrounded by routing nanowires.
//
// How it works: ROWS x COLS PGMBs (gate g = row*COLS + col) share N_TRK
// routing nanowires ("tracks"). Three cross-point arrays are programmed:
//   * the input stage and the PGMB output crosspoints drive the tracks: the
//     sources are the PGMB outputs (indices 0..NG-1) followed by the N_PI
//     primary inputs (indices NG..NG+N_PI-1), and src_cfg places each source
//     on a track;
//   * row_cfg connects each PGMB input row (gate g, row i at index
//     g*PGMB_IN+i) to a track;
//   * out_cfg taps tracks onto the N_PO output wires.
// gate_cfg programs each PGMB's AND/OR planes (see ncl_pkg::th_cfg).
// The grid, the shared routing wires and the programmable cross points
// between them follow the architecture; the exact split into three arrays
// and the number of tracks are this design's choices.
//
// Because the routing is programmable, a path exists from every PGMB output
// back to every PGMB input, so tools report a combinational loop through
// the fabric. It stands: a sensible programming is acyclic apart from the
// latching feedback inside each PGMB, and NCL needs no clock to break it.
//
// Interface: rst (resets every PGMB output to 0), pi/po primary inputs and
// outputs, static configuration inputs. Timing: clock-free; outputs settle
// after the input wavefront has propagated through the programmed gates.
module pgmb_fabric
  import ncl_pkg::*;
#(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 2,
  parameter int unsigned N_PI  = 6,
  parameter int unsigned N_PO  = 4,
  parameter int unsigned N_TRK = 10,
  localparam int unsigned NG    = ROWS * COLS,
  localparam int unsigned N_SRC = NG + N_PI
) (
  input  logic                               rst,
  input  logic [N_PI-1:0]                    pi,
  output logic [N_PO-1:0]                    po,
  input  pgmb_cfg_t [NG-1:0]                 gate_cfg,
  input  logic [N_TRK-1:0][N_SRC-1:0]        src_cfg,
  input  logic [NG*PGMB_IN-1:0][N_TRK-1:0]   row_cfg,
  input  logic [N_PO-1:0][N_TRK-1:0]         out_cfg
);

  logic [NG-1:0]         gate_z;
  logic [N_TRK-1:0]      trk;
  logic [NG*PGMB_IN-1:0] rows;

  xbar #(.N_IN(N_SRC), .N_OUT(N_TRK)) u_src (
    .in ({pi, gate_z}), .cfg(src_cfg), .out(trk)
  );

  xbar #(.N_IN(N_TRK), .N_OUT(NG*PGMB_IN)) u_rows (
    .in (trk), .cfg(row_cfg), .out(rows)
  );

  xbar #(.N_IN(N_TRK), .N_OUT(N_PO)) u_out (
    .in (trk), .cfg(out_cfg), .out(po)
  );

  for (genvar g = 0; g < int'(NG); g++) begin : g_gate
    pgmb u_pgmb (
      .rst (rst),
      .cfg (gate_cfg[g]),
      .in  (rows[g*PGMB_IN +: PGMB_IN]),
      .z   (gate_z[g])
    );
  end

endmodule
