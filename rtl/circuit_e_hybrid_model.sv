// circuit_e_hybrid_model - two-time-frame delay test generation model of the
// F-scannable circuit E (hybrid skewed-load / broad-side).
//
// For transition (delay) faults a pattern pair is needed: an initialization
// pattern and a launch pattern. The hybrid model copies the combinational
// part of the F-scannable circuit into two time frames:
//   frame 1 (launch):  inputs pi1 and the pseudo primary inputs ppi_x, ppi_y
//                      (the initialization pattern held in X and Y);
//   frame 2 (capture): its pseudo primary inputs are wired straight to the
//                      pseudo primary outputs of frame 1;
//   outputs: po1, po2 and frame 2's pseudo primary outputs ppo_x, ppo_y.
// Each frame has its own F-scan enable. fse1 = 1 gives a skewed-load pair
// (the launch pattern is the initialization pattern shifted one step along
// the F-scan-path, with a new word entering from In1); fse1 = 0 gives a
// broad-side pair (the launch pattern is the circuit's functional response).
// fse2 is normally 0 so that frame 2 captures functionally. No multiplexers
// sit between the frames: the F-scan-paths are already inside the
// combinational part, so an ATPG tool chooses skewed-load or broad-side per
// pattern simply by choosing fse1.
//
// The structure follows the method's hybrid model; applying it to circuit E,
// and giving each frame its own controller selects, are this design's
// choices. Purely combinational; used for test generation, not on silicon.
module circuit_e_hybrid_model
  import fscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         fse1,      // F-scan enable, frame 1 (launch)
  input  logic         fse2,      // F-scan enable, frame 2 (capture)
  input  logic [W-1:0] pi1,       // In1 in frame 1
  input  logic [W-1:0] pi2,       // In1 in frame 2
  input  logic [W-1:0] ppi_x,     // initialization pattern of X
  input  logic [W-1:0] ppi_y,     // initialization pattern of Y
  input  x_sel_e       x_sel1,    // controller selects, frame 1
  input  y_sel_e       y_sel1,
  input  out_sel_e     out_sel1,
  input  x_sel_e       x_sel2,    // controller selects, frame 2
  input  y_sel_e       y_sel2,
  input  out_sel_e     out_sel2,
  output logic [W-1:0] po1,       // Out in frame 1
  output logic [W-1:0] po2,       // Out in frame 2
  output logic [W-1:0] launch_x,  // frame 1 -> frame 2 (the launch pattern)
  output logic [W-1:0] launch_y,
  output logic [W-1:0] ppo_x,     // captured response of X
  output logic [W-1:0] ppo_y      // captured response of Y
);

  circuit_e_comb #(.W(W)) u_frame1 (
    .test    (fse1),
    .in1     (pi1),
    .x       (ppi_x),
    .y       (ppi_y),
    .x_sel   (x_sel1),
    .y_sel   (y_sel1),
    .out_sel (out_sel1),
    .x_next  (launch_x),
    .y_next  (launch_y),
    .out     (po1)
  );

  circuit_e_comb #(.W(W)) u_frame2 (
    .test    (fse2),
    .in1     (pi2),
    .x       (launch_x),
    .y       (launch_y),
    .x_sel   (x_sel2),
    .y_sel   (y_sel2),
    .out_sel (out_sel2),
    .x_next  (ppo_x),
    .y_next  (ppo_y),
    .out     (po2)
  );

endmodule
