// fscan_state_reg - state register augmented for F-scan (initialize / hold).
//
// A controller's state register usually has no path from a primary input or
// to a primary output, so it cannot sit in an F-scan-path. It is handled by
// two added connections and one extra test pin instead:
//   PI -> state   (the state ADN gets the primary input as an extra choice)
//   state -> PO   (the output ADN gets the state as an extra choice)
// The shared hold/scan pin and the initialize pin select the mode:
//   hold_scan init  mode        state register        po
//       0      0    normal      <= state_next         = po_func
//       0      1    initialize  <= pi[STATE_W-1:0]    = state (zero-extended)
//       1      0    hold/scan   keeps its value       = po_func
//       1      1    forbidden   keeps its value       = po_func  (asserted)
// In initialize mode the old state leaves on PO in the same clock in which
// the new one enters from PI, so scan-out of the state overlaps scan-in.
// While the other registers F-scan (hold/scan = 1) the state is held, so the
// test phase starts from the initialized state.
//
// The mode table and the two added connections follow the method; the
// zero-extension of the state onto PO, the behaviour in the forbidden
// combination (hold) and the asynchronous reset to zero are this design's
// choices. po is combinational from state_q, po_func and init.
module fscan_state_reg
  import fscan_pkg::*;
#(
  parameter int unsigned W       = 8,  // width of the PI and PO used
  parameter int unsigned STATE_W = 3   // width of the state register
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hold_scan,   // shared F-scan / hold pin
  input  logic               init,        // initialize pin
  input  logic [W-1:0]       pi,          // primary input shared with the scan-in
  input  logic [STATE_W-1:0] state_next,  // next-state logic of the controller
  input  logic [W-1:0]       po_func,     // PO value in normal and scan mode
  output logic [STATE_W-1:0] state_q,     // present state, to the controller
  output logic [W-1:0]       po,          // primary output
  output fscan_mode_e        mode         // decoded mode
);

  initial begin
    assert (STATE_W <= W) else $fatal(1, "STATE_W must not exceed W");
  end

  assign mode = mode_of(hold_scan, init);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
    end else begin
      unique case (mode)
        MODE_NORMAL: state_q <= state_next;
        MODE_INIT:   state_q <= pi[STATE_W-1:0];
        default:     state_q <= state_q;  // hold/scan and forbidden
      endcase
    end
  end

  assign po = (mode == MODE_INIT) ? W'(state_q) : po_func;

  // The two test pins must never be 1 together.
  a_no_forbidden_mode : assert property (
    @(posedge clk) disable iff (!rst_n) mode != MODE_FORBIDDEN
  ) else $error("hold/scan and initialize are both 1");

endmodule
