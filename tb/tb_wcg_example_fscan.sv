// tb_wcg_example_fscan - F-scan test sequence on the A/B example circuit.
//
// Scan-in of a pattern (A = a, B = b) takes two clocks on PI -> A -> B:
// first PI = b - 1 (A gets it, then B gets A + 1 = b), then PI = a. One
// test-phase clock with random controller selects follows, and the response
// is scanned out on PO in the next two clocks (captured B at once, captured
// A as A + 1 a clock later) while the next pattern enters. Checks the
// justified values, the test-phase PO, the scanned-out response against the
// circuit equations and the 3*N + 2 clock test application time.
module tb_wcg_example_fscan;

  localparam int unsigned W = 8;
  localparam int unsigned MOD = 128;
  localparam int NPAT = 40;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n, test, ld_a, ld_b, po_en;
  logic [W-1:0] pi, po, a_q, b_q;

  wcg_example_fscan #(.W(W), .MOD(MOD)) dut (.*);

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

  int unsigned pa[NPAT], pb[NPAT], ppi[NPAT];
  bit          pla[NPAT], plb[NPAT], ppo[NPAT];

  initial begin
    int unsigned start, ea, eb;
    rst_n = 1'b0; test = 1'b0; ld_a = 1'b0; ld_b = 1'b0; po_en = 1'b0; pi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPAT; p++) begin
      pa[p] = $urandom % MOD;           // every value A can hold
      pb[p] = 1 + $urandom % MOD;       // every value B can hold
      ppi[p] = $urandom % (1 << W);
      pla[p] = 1'($urandom); plb[p] = 1'($urandom); ppo[p] = 1'($urandom);
    end
    start = cycles;
    test = 1'b1;
    pi = W'(pb[0] - 1); @(negedge clk);
    pi = W'(pa[0]);     @(negedge clk);
    for (int p = 0; p < NPAT; p++) begin
      check("A justified", a_q, pa[p]);
      check("B justified", b_q, pb[p]);
      test = 1'b0; pi = W'(ppi[p]); ld_a = pla[p]; ld_b = plb[p]; po_en = ppo[p];
      ea = pla[p] ? (ppi[p] + pb[p]) % MOD : pa[p];
      eb = plb[p] ? (pa[p] + 1) % (1 << W) : pb[p];
      #1 check("test-phase PO", po, ppo[p] ? pb[p] : 0);
      @(negedge clk);
      test = 1'b1; ld_a = 1'b0; ld_b = 1'b0; po_en = 1'b0;
      pi = W'((p + 1 < NPAT) ? pb[p+1] - 1 : $urandom);
      #1 check("scan-out captured B", po, eb);
      @(negedge clk);
      pi = W'((p + 1 < NPAT) ? pa[p+1] : $urandom);
      #1 check("scan-out captured A (+1)", po, (ea + 1) % (1 << W));
      @(negedge clk);
    end
    check("test application time 3N+2", cycles - start, 3 * NPAT + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
