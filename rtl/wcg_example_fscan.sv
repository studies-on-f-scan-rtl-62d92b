// wcg_example_fscan - F-scannable version of the small weighted-connectivity
// example circuit (registers A and B, one PI, one PO).
//
// Function of the circuit:
//   A <= (PI + B) mod MOD        (MOD = 128)
//   B <= A + 1
//   PO = B
// Each assignment passes through an ADN steered by the controller in normal
// mode. The F-scan-path chosen is PI -> A -> B -> PO (scan length 2):
//   * PI -> A: the side input B of the adder gets a C0 mask, so A <= PI mod
//     MOD. Values of A are always below MOD, so this path justifies every
//     value A can hold (an essential F-path, not a complete one).
//   * A -> B: the +1 is invertible, so B <= A + 1 is an essential F-path;
//     to scan v into B, A must hold v - 1.
//   * B -> PO: direct.
// With test = 1 every ADN selects its F-path input; a value captured in A
// appears on PO one clock later (as A + 1, via B), and a value captured in B
// appears on PO at once (PO is combinational from B).
//
// The circuit and its path costs come from the method's example; which
// F-paths are used, the C0 mask on B, the width W, the normal-mode ADN
// selects (load or hold for A and B, B or 0 for PO) and the asynchronous
// reset to zero are this design's choices.
module wcg_example_fscan
  import fscan_pkg::*;
#(
  parameter int unsigned W   = 8,
  parameter int unsigned MOD = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,    // F-scan pin
  input  logic [W-1:0] pi,
  input  logic         ld_a,    // controller: A takes (PI + B) mod MOD
  input  logic         ld_b,    // controller: B takes A + 1
  input  logic         po_en,   // controller: PO shows B (else 0)
  output logic [W-1:0] po,
  output logic [W-1:0] a_q,     // register values, for observation only
  output logic [W-1:0] b_q
);

  logic [W-1:0] b_masked;
  logic [W-1:0] sum_a;
  logic [W-1:0] a_func;
  logic [W-1:0] b_func;

  fscan_mask #(.KIND(MASK_C0), .W(W)) u_c0_mask (
    .scan (test),
    .d    (b_q),
    .q    (b_masked)
  );

  assign sum_a  = pi + b_masked;
  assign a_func = W'(sum_a % W'(MOD));
  assign b_func = a_q + W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      if (test || ld_a) a_q <= a_func;
      if (test || ld_b) b_q <= b_func;
    end
  end

  assign po = (test || po_en) ? b_q : '0;

endmodule
