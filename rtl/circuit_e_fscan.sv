// circuit_e_fscan - the F-scannable example circuit E with its registers.
//
// Registers X and Y (W bits each) are updated every clock from
// circuit_e_comb. With test = 1 the circuit forms one F-scan-path
//   In1 -> X -> Y -> Out          (scan length 2)
// so per clock X <= In1 + 10, Y <= X and Out shows Y. One F-scan cycle for a
// test pattern is therefore
//   t0, t1 : scan-in (test = 1): drive In1 = Y_wanted - 10, then X_wanted - 10
//   t2     : test phase (test = 0): one functional clock captures into X, Y
//   t3, t4 : scan-out (test = 1): Out shows the captured Y in t3 and the
//            captured X (moved into Y) in t4, while t3/t4 already scan in the
//            next pattern.
// With scan-in and scan-out overlapped, N patterns take 3*N + 2 clocks.
//
// Out is combinational from Y (it is the output of an ADN, not a register).
// X and Y reset asynchronously to zero on rst_n = 0; the method says nothing
// about reset, so that, like the width W and the normal-mode ADN selects, is
// this design's choice. Everything else follows the method's circuit E.
module circuit_e_fscan
  import fscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,     // F-scan pin (scan mode when 1)
  input  logic [W-1:0] in1,      // primary input In1 (also F-scan input)
  input  x_sel_e       x_sel,    // controller selects, used when test = 0
  input  y_sel_e       y_sel,
  input  out_sel_e     out_sel,
  output logic [W-1:0] out,      // primary output Out (also F-scan output)
  output logic [W-1:0] x_q,      // register values, for observation only
  output logic [W-1:0] y_q
);

  logic [W-1:0] x_next, y_next;

  circuit_e_comb #(.W(W)) u_comb (
    .test    (test),
    .in1     (in1),
    .x       (x_q),
    .y       (y_q),
    .x_sel   (x_sel),
    .y_sel   (y_sel),
    .out_sel (out_sel),
    .x_next  (x_next),
    .y_next  (y_next),
    .out     (out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else begin
      x_q <= x_next;
      y_q <= y_next;
    end
  end

endmodule
