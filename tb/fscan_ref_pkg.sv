// fscan_ref_pkg - reference models used by the F-scan testbenches.
//
// Written independently of the RTL, at the level of the example circuits'
// equations: circuit E (X, Y, Out with constant 10) and the A/B circuit
// (A = (PI + B) mod 128, B = A + 1, PO = B), both in normal and scan mode.
// Values are computed in 32-bit integers and reduced modulo 2^W.
package fscan_ref_pkg;
  import fscan_pkg::*;

  typedef struct {
    int unsigned x;
    int unsigned y;
    int unsigned out;
  } e_step_t;

  function automatic int unsigned wrap(input int unsigned v, input int unsigned w);
    if (w >= 32) return v;
    return v & ((32'd1 << w) - 1);
  endfunction

  // One clock of circuit E: next X, next Y and the present Out.
  function automatic e_step_t e_step(input int unsigned w, input bit test,
                                     input int unsigned in1, input int unsigned x,
                                     input int unsigned y, input int xs,
                                     input int ys, input int os);
    e_step_t r;
    if (test) begin
      r.x   = wrap(in1 + 10, w);
      r.y   = x;
      r.out = y;
    end else begin
      case (xs)
        0: r.x = x;
        1: r.x = wrap(in1 + 10, w);
        2: r.x = wrap(in1 + x, w);
        default: r.x = 0;
      endcase
      r.y   = (ys == 1) ? wrap(in1 + x, w) : y;
      r.out = (os == 1) ? y : 0;
    end
    return r;
  endfunction

  // Value to drive on In1 so that X receives v through the +10 F-path.
  function automatic int unsigned e_scan_word(input int unsigned w, input int unsigned v);
    return wrap(v + (32'd1 << w) - 10, w);
  endfunction

endpackage
