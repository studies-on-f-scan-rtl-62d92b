// tb_circuit_e_ftgm - checks the stuck-at test generation model of E.
//
// For random In1 values in the five clocks of an F-scan cycle and random
// test-phase selects, works out by hand what the pattern in X and Y is after
// scan-in (X = In1(t1) + 10, Y = In1(t0) + 10), what circuit E captures in
// the test phase, and what Out shows at t2, t3 and t4; the model's outputs
// must match. This is the property the constraint modules exist for: every
// pattern the model admits is one the F-scan-path can deliver.
module tb_circuit_e_ftgm;
  import fscan_pkg::*;
  import fscan_ref_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] in1_t0, in1_t1, in1_t2, in1_t3, in1_t4;
  logic [W-1:0] ppi_x, ppi_y, out_t2, out_t3, out_t4;
  x_sel_e       x_sel;
  y_sel_e       y_sel;
  out_sel_e     out_sel;

  circuit_e_ftgm #(.W(W)) dut (.*);

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int unsigned xj, yj;
    for (int i = 0; i < 1000; i++) begin
      in1_t0 = W'($urandom); in1_t1 = W'($urandom); in1_t2 = W'($urandom);
      in1_t3 = W'($urandom); in1_t4 = W'($urandom);
      x_sel = x_sel_e'($urandom % 4); y_sel = y_sel_e'($urandom % 2);
      out_sel = out_sel_e'($urandom % 2);
      #1;
      xj = wrap(in1_t1 + 10, W);
      yj = wrap(in1_t0 + 10, W);
      check("justified X", ppi_x, xj);
      check("justified Y", ppi_y, yj);
      r = e_step(W, 1'b0, in1_t2, xj, yj, int'(x_sel), int'(y_sel), int'(out_sel));
      check("Out at t2", out_t2, r.out);
      check("Out at t3 (captured Y)", out_t3, r.y);
      check("Out at t4 (captured X)", out_t4, r.x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
