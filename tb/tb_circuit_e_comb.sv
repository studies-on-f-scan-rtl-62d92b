// tb_circuit_e_comb - self-checking test of circuit E's combinational part.
//
// Drives random In1, X, Y, ADN selects and test pin values and compares the
// next X, next Y and Out with the reference equations of circuit E. Also
// checks the two F-path properties directly: in scan mode Y receives X
// unchanged whatever In1 is (C0 mask) and X receives In1 + 10.
module tb_circuit_e_comb;
  import fscan_pkg::*;
  import fscan_ref_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic         test;
  logic [W-1:0] in1, x, y, x_next, y_next, out;
  x_sel_e       x_sel;
  y_sel_e       y_sel;
  out_sel_e     out_sel;

  circuit_e_comb #(.W(W)) dut (.*);

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (test=%0b in1=%0d x=%0d y=%0d sel=%0d/%0d/%0d)",
               what, got, exp, test, in1, x, y, x_sel, y_sel, out_sel);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_step_t r;
    for (int i = 0; i < 2000; i++) begin
      test    = ($urandom % 3) == 0;
      in1     = W'($urandom);
      x       = W'($urandom);
      y       = W'($urandom);
      x_sel   = x_sel_e'($urandom % 4);
      y_sel   = y_sel_e'($urandom % 2);
      out_sel = out_sel_e'($urandom % 2);
      #1;
      r = e_step(W, test, in1, x, y, int'(x_sel), int'(y_sel), int'(out_sel));
      check("x_next", x_next, r.x);
      check("y_next", y_next, r.y);
      check("out",    out,    r.out);
      if (test) begin
        check("scan: Y <= X", y_next, x);
        check("scan: X <= In1+10", x_next, wrap(in1 + 10, W));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
