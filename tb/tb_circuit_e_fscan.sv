// tb_circuit_e_fscan - applies the F-scan test sequence to circuit E.
//
// Part 1 tests the F-scan-path alone: random words are scanned in with
// test = 1 and never a normal clock; Out must show, two clocks later, the
// word plus 10 (In1 -> X adds 10, X -> Y -> Out pass it unchanged).
// Part 2 applies N random test patterns with the pipelined test sequence:
// two scan-in clocks, one test-phase clock, then two clocks that scan the
// response out while the next pattern is scanned in. It checks that X and Y
// hold the pattern before each test phase, that Out carries the expected
// test-phase output and the captured Y then X, and that the whole sequence
// takes 3*N + 2 clocks.
module tb_circuit_e_fscan;
  import fscan_pkg::*;
  import fscan_ref_pkg::*;

  localparam int unsigned W = 8;
  localparam int NPAT = 40;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         test;
  logic [W-1:0] in1, out, x_q, y_q;
  x_sel_e       x_sel;
  y_sel_e       y_sel;
  out_sel_e     out_sel;

  circuit_e_fscan #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at cycle %0d", what, got, exp, cycles);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned px[NPAT], py[NPAT], pin[NPAT];
  int          pxs[NPAT], pys[NPAT], pos[NPAT];
  int unsigned words[$];

  initial begin
    e_step_t r;
    int unsigned start;
    rst_n = 1'b0; test = 1'b0; in1 = '0;
    x_sel = XSEL_HOLD; y_sel = YSEL_HOLD; out_sel = OSEL_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: F-scan-path test, no normal mode
    test = 1'b1;
    for (int k = 0; k < 30; k++) begin
      int unsigned w;
      w = $urandom % (1 << W);
      words.push_back(w);
      in1 = W'(w);
      if (k >= 2) check("path test Out", out, wrap(words[k-2] + 10, W));
      @(negedge clk);
    end

    // ---- Part 2: pipelined test sequence
    for (int p = 0; p < NPAT; p++) begin
      px[p] = $urandom % (1 << W);  py[p] = $urandom % (1 << W);
      pin[p] = $urandom % (1 << W);
      pxs[p] = $urandom % 4; pys[p] = $urandom % 2; pos[p] = $urandom % 2;
    end
    start = cycles;
    // first scan-in: Y's word goes first, X's word second
    test = 1'b1;
    in1 = W'(e_scan_word(W, py[0])); @(negedge clk);
    in1 = W'(e_scan_word(W, px[0])); @(negedge clk);
    for (int p = 0; p < NPAT; p++) begin
      check("X justified", x_q, px[p]);
      check("Y justified", y_q, py[p]);
      // test phase
      test = 1'b0;
      in1 = W'(pin[p]);
      x_sel = x_sel_e'(pxs[p]); y_sel = y_sel_e'(pys[p]); out_sel = out_sel_e'(pos[p]);
      r = e_step(W, 1'b0, pin[p], px[p], py[p], pxs[p], pys[p], pos[p]);
      #1 check("test-phase Out", out, r.out);
      @(negedge clk);
      // scan-out of the response overlapped with scan-in of the next pattern
      test = 1'b1;
      in1 = W'((p + 1 < NPAT) ? e_scan_word(W, py[p+1]) : $urandom % (1 << W));
      #1 check("scan-out captured Y", out, r.y);
      @(negedge clk);
      in1 = W'((p + 1 < NPAT) ? e_scan_word(W, px[p+1]) : $urandom % (1 << W));
      #1 check("scan-out captured X", out, r.x);
      @(negedge clk);
    end
    check("test application time 3N+2", cycles - start, 3 * NPAT + 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
