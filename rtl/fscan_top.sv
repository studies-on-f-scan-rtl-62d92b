// fscan_top - F-scan example system.
//
// The main design is the F-scannable circuit E together with its
// controller's state register, augmented for F-scan:
//   * circuit_e_fscan: registers X, Y on the F-scan-path In1 -> X -> Y -> Out,
//     scanned by the pin e_test;
//   * fscan_state_reg: the controller's state register, loaded from In1 and
//     shown on Out in initialize mode (pin e_init) and held while e_test = 1
//     (e_test doubles as the hold pin, so the whole circuit needs two test
//     pins). The controller's next-state logic and its ADN selects are not
//     part of this design: they enter as e_state_next and e_x_sel / e_y_sel /
//     e_out_sel and the present state leaves as e_state.
// Test sequence for one pattern (state first, then the data registers):
//   initialize (1 clock) -> F-scan-in (2) -> test phase (1) -> initialize,
//   which scans the new state out and the next one in -> F-scan-out of X, Y
//   overlapped with the next scan-in (2) ...
// During the initialize clocks the controller selects must hold X and Y.
//
// Standing beside it, each with its own ports:
//   * wcg_example_fscan: the second example circuit (A, B; path PI->A->B->PO);
//   * fscan_slice_reg: a 16-bit register on an 8-bit F-scan-path, 2 slices;
//   * circuit_e_ftgm: the stuck-at test generation model of circuit E;
//   * circuit_e_hybrid_model: the two-frame delay test generation model of E.
// The two models are combinational and serve test generation only.
// All registers use the single clock clk and the asynchronous active-low
// reset rst_n. Widths are parameters; the method gives none for these
// examples except the 16-bit/8-bit slicing example and the modulus 128.
module fscan_top
  import fscan_pkg::*;
#(
  parameter int unsigned W       = 8,    // data width of circuits E and A/B
  parameter int unsigned STATE_W = 3,    // controller state of circuit E
  parameter int unsigned MOD     = 128,  // modulus of the A/B circuit
  parameter int unsigned SL_W    = 16,   // width of the sliced register
  parameter int unsigned SL_PATH = 8     // F-scan-path width at the slices
) (
  input  logic               clk,             // clock of all registers
  input  logic               rst_n,           // asynchronous reset, active low

  // circuit E with its augmented state register
  input  logic               e_test,          // F-scan pin, also holds the state
  input  logic               e_init,          // initialize pin (state scan-in/out)
  input  logic [W-1:0]       e_in1,           // In1: data input, F-scan input and state scan-in
  input  x_sel_e             e_x_sel,         // controller select of X's ADN (normal mode)
  input  y_sel_e             e_y_sel,         // controller select of Y's ADN (normal mode)
  input  out_sel_e           e_out_sel,       // controller select of Out's ADN (normal mode)
  input  logic [STATE_W-1:0] e_state_next,    // next state from the controller's logic
  output logic [W-1:0]       e_out,           // Out: data output, F-scan output and state scan-out
  output logic [STATE_W-1:0] e_state,         // present state, to the controller
  output fscan_mode_e        e_mode,          // decoded test mode
  output logic [W-1:0]       e_x,             // register X (observation)
  output logic [W-1:0]       e_y,             // register Y (observation)

  // A/B example circuit
  input  logic               ab_test,         // F-scan pin of the A/B circuit
  input  logic [W-1:0]       ab_pi,           // primary input of the A/B circuit
  input  logic               ab_ld_a,         // controller: A takes (PI + B) mod MOD
  input  logic               ab_ld_b,         // controller: B takes A + 1
  input  logic               ab_po_en,        // controller: PO shows B
  output logic [W-1:0]       ab_po,           // primary output of the A/B circuit
  output logic [W-1:0]       ab_a,            // register A (observation)
  output logic [W-1:0]       ab_b,            // register B (observation)

  // sliced register
  input  logic               sl_scan,         // F-scan pin of the sliced register
  input  logic               sl_en,           // functional load enable
  input  logic [SL_W-1:0]    sl_d,            // functional next value
  input  logic [SL_PATH-1:0] sl_scan_in,      // F-scan-path input word
  output logic [SL_W-1:0]    sl_q,            // sliced register value
  output logic [SL_PATH-1:0] sl_scan_out,     // F-scan-path output word

  // stuck-at test generation model of circuit E
  input  logic [W-1:0]       tg_in1_t0,       // model: In1 at scan-in clock t0
  input  logic [W-1:0]       tg_in1_t1,       // model: In1 at scan-in clock t1
  input  logic [W-1:0]       tg_in1_t2,       // model: In1 in the test phase
  input  logic [W-1:0]       tg_in1_t3,       // model: In1 at scan-out clock t3
  input  logic [W-1:0]       tg_in1_t4,       // model: In1 at scan-out clock t4
  input  x_sel_e             tg_x_sel,        // model: X select in the test phase
  input  y_sel_e             tg_y_sel,        // model: Y select in the test phase
  input  out_sel_e           tg_out_sel,      // model: Out select in the test phase
  output logic [W-1:0]       tg_out_t2,       // model: Out in the test phase
  output logic [W-1:0]       tg_out_t3,       // model: Out at t3 (captured Y)
  output logic [W-1:0]       tg_out_t4,       // model: Out at t4 (captured X)

  // two-frame delay test generation model of circuit E
  input  logic               hy_fse1,         // model: F-scan enable, launch frame (1 skewed-load, 0 broad-side)
  input  logic               hy_fse2,         // model: F-scan enable, capture frame
  input  logic [W-1:0]       hy_pi1,          // model: In1 in the launch frame
  input  logic [W-1:0]       hy_pi2,          // model: In1 in the capture frame
  input  logic [W-1:0]       hy_ppi_x,        // model: initialization value of X
  input  logic [W-1:0]       hy_ppi_y,        // model: initialization value of Y
  input  x_sel_e             hy_x_sel,        // model: X select (both frames)
  input  y_sel_e             hy_y_sel,        // model: Y select (both frames)
  input  out_sel_e           hy_out_sel,      // model: Out select (both frames)
  output logic [W-1:0]       hy_po1,          // model: Out in the launch frame
  output logic [W-1:0]       hy_po2,          // model: Out in the capture frame
  output logic [W-1:0]       hy_ppo_x,        // model: captured X
  output logic [W-1:0]       hy_ppo_y         // model: captured Y
);

  // ---------------------------------------------------------------- circuit E
  logic [W-1:0] e_out_func;

  circuit_e_fscan #(.W(W)) u_circuit_e (
    .clk     (clk),
    .rst_n   (rst_n),
    .test    (e_test),
    .in1     (e_in1),
    .x_sel   (e_x_sel),
    .y_sel   (e_y_sel),
    .out_sel (e_out_sel),
    .out     (e_out_func),
    .x_q     (e_x),
    .y_q     (e_y)
  );

  fscan_state_reg #(.W(W), .STATE_W(STATE_W)) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .hold_scan  (e_test),
    .init       (e_init),
    .pi         (e_in1),
    .state_next (e_state_next),
    .po_func    (e_out_func),
    .state_q    (e_state),
    .po         (e_out),
    .mode       (e_mode)
  );

  // ---------------------------------------------------------------- A/B circuit
  wcg_example_fscan #(.W(W), .MOD(MOD)) u_ab (
    .clk   (clk),
    .rst_n (rst_n),
    .test  (ab_test),
    .pi    (ab_pi),
    .ld_a  (ab_ld_a),
    .ld_b  (ab_ld_b),
    .po_en (ab_po_en),
    .po    (ab_po),
    .a_q   (ab_a),
    .b_q   (ab_b)
  );

  // ---------------------------------------------------------------- sliced register
  fscan_slice_reg #(.W_REG(SL_W), .W_PATH(SL_PATH)) u_slice (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan     (sl_scan),
    .en       (sl_en),
    .d        (sl_d),
    .scan_in  (sl_scan_in),
    .q        (sl_q),
    .scan_out (sl_scan_out)
  );

  // ---------------------------------------------------------------- test generation models
  circuit_e_ftgm #(.W(W)) u_ftgm (
    .in1_t0  (tg_in1_t0),
    .in1_t1  (tg_in1_t1),
    .in1_t2  (tg_in1_t2),
    .in1_t3  (tg_in1_t3),
    .in1_t4  (tg_in1_t4),
    .x_sel   (tg_x_sel),
    .y_sel   (tg_y_sel),
    .out_sel (tg_out_sel),
    .ppi_x   (),
    .ppi_y   (),
    .out_t2  (tg_out_t2),
    .out_t3  (tg_out_t3),
    .out_t4  (tg_out_t4)
  );

  circuit_e_hybrid_model #(.W(W)) u_hybrid (
    .fse1     (hy_fse1),
    .fse2     (hy_fse2),
    .pi1      (hy_pi1),
    .pi2      (hy_pi2),
    .ppi_x    (hy_ppi_x),
    .ppi_y    (hy_ppi_y),
    .x_sel1   (hy_x_sel),
    .y_sel1   (hy_y_sel),
    .out_sel1 (hy_out_sel),
    .x_sel2   (hy_x_sel),
    .y_sel2   (hy_y_sel),
    .out_sel2 (hy_out_sel),
    .po1      (hy_po1),
    .po2      (hy_po2),
    .launch_x (),
    .launch_y (),
    .ppo_x    (hy_ppo_x),
    .ppo_y    (hy_ppo_y)
  );

endmodule
