// circuit_e_comb - combinational part of the F-scannable example circuit E.
//
// Circuit E has one data input In1, two registers X and Y and one output Out.
// Two adders feed three assignment decision nodes (ADNs, i.e. multiplexers):
//   add1 = 10 + In1          -> ADN of X
//   add2 = In1' + X          -> ADN of X and ADN of Y
//   Y                        -> ADN of Out
// F-scan makes the circuit scannable along In1 -> X -> Y -> Out by
//   * giving every ADN a test control that, when test = 1, picks the F-path
//     input (X <= add1, Y <= add2, Out = Y), and
//   * inserting a C0 mask on the In1 input of add2 (In1' = 0 when test = 1),
//     so that add2 passes X unchanged and Y <= X while scanning.
// X's F-path is an essential path: X receives In1 + 10, so the scan-in value
// is the wanted X value minus 10 (any X value is reachable, modulo 2^W).
//
// When test = 0 the ADNs are steered by the circuit's controller, which the
// method leaves out; its selects arrive here as x_sel / y_sel / out_sel. The
// ADN topology, the constant 10, the mask and the test-mode selections follow
// the method's example; the normal-mode select encodings, the extra "hold"
// and "zero" ADN inputs and the width W are this design's choices.
// Purely combinational: the registers live in circuit_e_fscan, and the same
// logic is reused for the test-generation models.
module circuit_e_comb
  import fscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         test,     // F-scan pin: 1 = scan along the F-scan-path
  input  logic [W-1:0] in1,      // primary input In1
  input  logic [W-1:0] x,        // present value of register X
  input  logic [W-1:0] y,        // present value of register Y
  input  x_sel_e       x_sel,    // controller select of X's ADN (test = 0)
  input  y_sel_e       y_sel,    // controller select of Y's ADN (test = 0)
  input  out_sel_e     out_sel,  // controller select of Out's ADN (test = 0)
  output logic [W-1:0] x_next,   // next value of X
  output logic [W-1:0] y_next,   // next value of Y
  output logic [W-1:0] out       // primary output Out
);

  localparam logic [W-1:0] K10 = W'(E_CONST);

  logic [W-1:0] in1_masked;
  logic [W-1:0] add1;
  logic [W-1:0] add2;

  fscan_mask #(.KIND(MASK_C0), .W(W)) u_c0_mask (
    .scan (test),
    .d    (in1),
    .q    (in1_masked)
  );

  assign add1 = K10 + in1;
  assign add2 = in1_masked + x;

  // ADN of X
  always_comb begin
    if (test) begin
      x_next = add1;
    end else begin
      unique case (x_sel)
        XSEL_HOLD:  x_next = x;
        XSEL_CONST: x_next = add1;
        XSEL_SUM:   x_next = add2;
        XSEL_ZERO:  x_next = '0;
        default:    x_next = x;
      endcase
    end
  end

  // ADN of Y
  always_comb begin
    if (test || y_sel == YSEL_SUM) y_next = add2;
    else                           y_next = y;
  end

  // ADN of Out
  always_comb begin
    if (test || out_sel == OSEL_Y) out = y;
    else                           out = '0;
  end

endmodule
