// fscan_pkg - types and helpers shared by the F-scan blocks.
//
// F-scan turns the registers of a functional RTL circuit into scan paths
// (F-scan-paths) that run through the circuit's own adders and multiplexers.
// This package holds what several of those blocks agree on:
//   * mask_kind_e : the constant a mask element forces on a side input while
//                   the scan pin is 1 (C0, C1, Ca1 and the modulo mask Cq').
//   * fscan_mode_e: the operating mode decoded from the two test pins, the
//                   shared hold/scan pin and the initialize pin. The four rows
//                   are the method's own mode table; 1/1 is forbidden.
//   * ADN selects for the functional (controller-driven) inputs of the
//                   assignment decision nodes of the example circuit E. The
//                   method leaves that controller out, so these encodings are
//                   this design's choice.
package fscan_pkg;

  // Constant forced by a mask element when its scan pin is 1.
  typedef enum logic [1:0] {
    MASK_C0  = 2'd0,  // all zeros: side input of an adder / subtractor
    MASK_C1  = 2'd1,  // value one: side input of a multiplier / divider
    MASK_CA1 = 2'd2,  // all ones: alternative for multiplier / divider
    MASK_CQ  = 2'd3   // 10...0: modulo side input (Cq')
  } mask_kind_e;

  // Mode of an F-scannable circuit with a state register (hold/scan, init).
  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'b00,
    MODE_INIT      = 2'b01,
    MODE_HOLD_SCAN = 2'b10,
    MODE_FORBIDDEN = 2'b11
  } fscan_mode_e;

  function automatic fscan_mode_e mode_of(input logic hold_scan, input logic init);
    return fscan_mode_e'({hold_scan, init});
  endfunction

  // Functional selects of the ADN in front of register X of circuit E.
  typedef enum logic [1:0] {
    XSEL_HOLD  = 2'd0,  // keep X
    XSEL_CONST = 2'd1,  // X <= 10 + In1
    XSEL_SUM   = 2'd2,  // X <= In1 + X
    XSEL_ZERO  = 2'd3   // X <= 0
  } x_sel_e;

  // Functional selects of the ADN in front of register Y of circuit E.
  typedef enum logic {
    YSEL_HOLD = 1'b0,   // keep Y
    YSEL_SUM  = 1'b1    // Y <= In1 + X
  } y_sel_e;

  // Functional selects of the ADN driving the primary output Out of circuit E.
  typedef enum logic {
    OSEL_ZERO = 1'b0,   // Out = 0
    OSEL_Y    = 1'b1    // Out = Y
  } out_sel_e;

  // The constant operand of the first adder of circuit E.
  localparam int unsigned E_CONST = 10;

endpackage
