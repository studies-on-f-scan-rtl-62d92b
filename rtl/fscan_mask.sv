// fscan_mask - mask element placed on the side input of an operation.
//
// An F-path may run through an arithmetic operation only if the operation's
// other (side) input is a known constant while scanning; then the value on
// the path input can be recovered exactly from the operation's output. When
// the side input is not a constant by itself, a mask element forces it:
//   KIND = MASK_C0  : output 0       (side input of an adder or subtractor)
//   KIND = MASK_C1  : output 1       (side input of a multiplier or divider)
//   KIND = MASK_CA1 : output all 1s  (alternative for multiplier or divider)
//   KIND = MASK_CQ  : output 10...0  (Cq': side input of a modulo operation;
//                     the largest power of two the line can carry, which
//                     restricts the values the path can pass)
// With scan = 0 the element is transparent: q = d.
//
// The four constants and the transparent normal mode follow the method; the
// element is purely combinational (no timing) and has one scan pin.
module fscan_mask
  import fscan_pkg::*;
#(
  parameter mask_kind_e  KIND = MASK_C0,
  parameter int unsigned W    = 8
) (
  input  logic         scan,  // 1: force the mask constant
  input  logic [W-1:0] d,     // functional value of the side input
  output logic [W-1:0] q      // value seen by the operation
);

  localparam logic [W-1:0] ONE     = W'(1);
  localparam logic [W-1:0] MSB_ONE = ONE << (W - 1);

  logic [W-1:0] forced;

  always_comb begin
    unique case (KIND)
      MASK_C0:  forced = '0;
      MASK_C1:  forced = ONE;
      MASK_CA1: forced = '1;
      MASK_CQ:  forced = MSB_ONE;
      default:  forced = '0;
    endcase
  end

  assign q = scan ? forced : d;

endmodule
