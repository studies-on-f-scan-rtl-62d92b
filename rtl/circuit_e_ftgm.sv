// circuit_e_ftgm - F-scan test generation model (stuck-at) of circuit E.
//
// Constrained ATPG does not scan values straight into the pseudo primary
// inputs (PPIs) of the combinational part, as full scan would. Instead every
// PPI is driven through an F-scan constraint module and every pseudo primary
// output (PPO) is read through one. A constraint module is the F-path logic
// of the F-scan-path with the scan pin tied to 1, copied once per clock of
// the test environment. For circuit E (path In1 -> X -> Y -> Out):
//   justification of X : In1(t1) -> X
//   justification of Y : In1(t0) -> X -> Y        (In1(t1) enters the masked
//                                                   adder input, seen as 0)
//   test phase (t2)    : combinational part with test = 0, In1(t2)
//   propagation of Y   : Y -> Out                  (observed at t3)
//   propagation of X   : X -> Y -> Out             (observed at t4)
// An ATPG tool run on this model only produces patterns the F-scan-paths can
// deliver, and its responses are exactly what Out shows at t2, t3 and t4 when
// the pattern is applied with the F-scan test sequence.
//
// The construction follows the method, which uses circuit E as its own
// example; each constraint submodule is an instance of circuit_e_comb with
// test tied to 1. The unused ADN selects of those copies are tied to their
// hold / zero values (any value gives the same result while test = 1).
// Purely combinational; used for test generation, not on silicon.
module circuit_e_ftgm
  import fscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in1_t0,   // In1 during the scan-in clocks t0, t1
  input  logic [W-1:0] in1_t1,
  input  logic [W-1:0] in1_t2,   // In1 during the test phase
  input  logic [W-1:0] in1_t3,   // In1 during the scan-out clocks t3, t4
  input  logic [W-1:0] in1_t4,
  input  x_sel_e       x_sel,    // controller selects during the test phase
  input  y_sel_e       y_sel,
  input  out_sel_e     out_sel,
  output logic [W-1:0] ppi_x,    // justified X and Y (for observation)
  output logic [W-1:0] ppi_y,
  output logic [W-1:0] out_t2,   // Out during the test phase
  output logic [W-1:0] out_t3,   // Out during scan-out: captured Y
  output logic [W-1:0] out_t4    // Out during scan-out: captured X
);

  logic [W-1:0] x_after_t0;   // X after In1(t0) -> X
  logic [W-1:0] ppo_x, ppo_y; // response captured in the test phase
  logic [W-1:0] y_after_t3;   // Y after X -> Y during t3

  // Justification: In1(t0) -> X
  circuit_e_comb #(.W(W)) u_jx0 (
    .test (1'b1), .in1 (in1_t0), .x ('0), .y ('0),
    .x_sel (XSEL_HOLD), .y_sel (YSEL_HOLD), .out_sel (OSEL_ZERO),
    .x_next (x_after_t0), .y_next (), .out ()
  );

  // Justification at t1: X -> Y and In1(t1) -> X
  circuit_e_comb #(.W(W)) u_jxy1 (
    .test (1'b1), .in1 (in1_t1), .x (x_after_t0), .y ('0),
    .x_sel (XSEL_HOLD), .y_sel (YSEL_HOLD), .out_sel (OSEL_ZERO),
    .x_next (ppi_x), .y_next (ppi_y), .out ()
  );

  // Test phase: the combinational part in normal mode
  circuit_e_comb #(.W(W)) u_core (
    .test (1'b0), .in1 (in1_t2), .x (ppi_x), .y (ppi_y),
    .x_sel (x_sel), .y_sel (y_sel), .out_sel (out_sel),
    .x_next (ppo_x), .y_next (ppo_y), .out (out_t2)
  );

  // Propagation at t3: Y -> Out and X -> Y
  circuit_e_comb #(.W(W)) u_p3 (
    .test (1'b1), .in1 (in1_t3), .x (ppo_x), .y (ppo_y),
    .x_sel (XSEL_HOLD), .y_sel (YSEL_HOLD), .out_sel (OSEL_ZERO),
    .x_next (), .y_next (y_after_t3), .out (out_t3)
  );

  // Propagation at t4: Y -> Out
  circuit_e_comb #(.W(W)) u_p4 (
    .test (1'b1), .in1 (in1_t4), .x ('0), .y (y_after_t3),
    .x_sel (XSEL_HOLD), .y_sel (YSEL_HOLD), .out_sel (OSEL_ZERO),
    .x_next (), .y_next (), .out (out_t4)
  );

endmodule
