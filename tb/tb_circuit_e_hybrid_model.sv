// tb_circuit_e_hybrid_model - checks the two-frame delay test model of E.
//
// For random initialization patterns (ppi_x, ppi_y), inputs and selects:
//  * skewed-load (fse1 = 1): the launch pattern must be the initialization
//    pattern shifted one step along In1 -> X -> Y (X = pi1 + 10, Y = ppi_x);
//  * broad-side (fse1 = 0): the launch pattern must be the functional
//    response of circuit E to the initialization pattern;
//  * frame 2 must be circuit E applied to the launch pattern.
// Both modes are counted and each must occur.
module tb_circuit_e_hybrid_model;
  import fscan_pkg::*;
  import fscan_ref_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;
  int n_skewed = 0, n_broad = 0;

  logic         fse1, fse2;
  logic [W-1:0] pi1, pi2, ppi_x, ppi_y, po1, po2, launch_x, launch_y, ppo_x, ppo_y;
  x_sel_e       x_sel1, x_sel2;
  y_sel_e       y_sel1, y_sel2;
  out_sel_e     out_sel1, out_sel2;

  circuit_e_hybrid_model #(.W(W)) dut (.*);

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (fse1=%0b fse2=%0b)", what, got, exp, fse1, fse2);
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
    e_step_t f1, f2;
    for (int i = 0; i < 1000; i++) begin
      fse1 = 1'($urandom); fse2 = ($urandom % 4) == 0;
      pi1 = W'($urandom); pi2 = W'($urandom);
      ppi_x = W'($urandom); ppi_y = W'($urandom);
      x_sel1 = x_sel_e'($urandom % 4); y_sel1 = y_sel_e'($urandom % 2);
      out_sel1 = out_sel_e'($urandom % 2);
      x_sel2 = x_sel_e'($urandom % 4); y_sel2 = y_sel_e'($urandom % 2);
      out_sel2 = out_sel_e'($urandom % 2);
      #1;
      f1 = e_step(W, fse1, pi1, ppi_x, ppi_y, int'(x_sel1), int'(y_sel1), int'(out_sel1));
      f2 = e_step(W, fse2, pi2, f1.x, f1.y, int'(x_sel2), int'(y_sel2), int'(out_sel2));
      if (fse1) begin
        n_skewed++;
        check("skewed-load launch X", launch_x, wrap(pi1 + 10, W));
        check("skewed-load launch Y", launch_y, ppi_x);
      end else begin
        n_broad++;
        check("broad-side launch X", launch_x, f1.x);
        check("broad-side launch Y", launch_y, f1.y);
      end
      check("po1", po1, f1.out);
      check("po2", po2, f2.out);
      check("ppo_x", ppo_x, f2.x);
      check("ppo_y", ppo_y, f2.y);
    end
    checks++;
    if (n_skewed == 0 || n_broad == 0) failures++;
    $display("skewed-load pairs %0d, broad-side pairs %0d", n_skewed, n_broad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
