// tb_fscan_top - end-to-end test of the F-scan example system at its
// default sizes.
//
// Circuit E with its augmented state register is tested with the complete
// test sequence, state first:
//   initialize (state in; previous state out on Out)
//   -> 2 F-scan clocks (Y word, X word in; previous response out; state held)
//   -> 1 test-phase clock (controller selects and next state random)
//   -> initialize ... and, after the last pattern, initialize + 2 scan-out.
// That is 4 clocks per pattern plus 3, which is checked. Every value is
// compared with the circuit equations. The same In1 sequences are fed to the
// stuck-at test generation model, whose outputs must equal what Out showed.
// Then pattern pairs are applied to circuit E for delay testing, both as
// skewed-load (launch clock with test = 1) and broad-side (launch clock with
// test = 0), and the captured X, Y (read back by F-scan-out) must equal the
// two-frame model's outputs for the same pair. The A/B example circuit and
// the sliced register are taken through scan-in, test phase and scan-out.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fscan_top;
  import fscan_pkg::*;
  import fscan_ref_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned STATE_W = 3;
  localparam int NPAT = 24;
  localparam int NDELAY = 24;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_init = 0, n_hold = 0, n_test = 0, n_overlap = 0, n_state_out = 0;
  int n_skewed = 0, n_broad = 0, n_ftgm = 0, n_ab = 0, n_slice = 0, n_path = 0;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               e_test, e_init;
  logic [W-1:0]       e_in1, e_out, e_x, e_y;
  x_sel_e             e_x_sel;
  y_sel_e             e_y_sel;
  out_sel_e           e_out_sel;
  logic [STATE_W-1:0] e_state_next, e_state;
  fscan_mode_e        e_mode;
  logic               ab_test, ab_ld_a, ab_ld_b, ab_po_en;
  logic [W-1:0]       ab_pi, ab_po, ab_a, ab_b;
  logic               sl_scan, sl_en;
  logic [15:0]        sl_d, sl_q;
  logic [7:0]         sl_scan_in, sl_scan_out;
  logic [W-1:0]       tg_in1_t0, tg_in1_t1, tg_in1_t2, tg_in1_t3, tg_in1_t4;
  x_sel_e             tg_x_sel;
  y_sel_e             tg_y_sel;
  out_sel_e           tg_out_sel;
  logic [W-1:0]       tg_out_t2, tg_out_t3, tg_out_t4;
  logic               hy_fse1, hy_fse2;
  logic [W-1:0]       hy_pi1, hy_pi2, hy_ppi_x, hy_ppi_y, hy_po1, hy_po2, hy_ppo_x, hy_ppo_y;
  x_sel_e             hy_x_sel;
  y_sel_e             hy_y_sel;
  out_sel_e           hy_out_sel;

  fscan_top dut (.*);

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

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive circuit E's pins for one clock: mode, In1, selects
  task automatic e_drive(input bit t, input bit i, input int unsigned in1v,
                         input int xs, input int ys, input int os,
                         input int unsigned sn);
    e_test = t; e_init = i; e_in1 = W'(in1v);
    e_x_sel = x_sel_e'(xs); e_y_sel = y_sel_e'(ys); e_out_sel = out_sel_e'(os);
    e_state_next = STATE_W'(sn);
    if (t) n_hold++;
    if (i) n_init++;
  endtask

  // pattern set for circuit E
  int unsigned px[NPAT], py[NPAT], ps[NPAT], pin[NPAT], pns[NPAT];
  int          pxs[NPAT], pys[NPAT], pos[NPAT];
  // what Out showed, to compare with the test generation model
  int unsigned seen_t2[NPAT], seen_t3[NPAT], seen_t4[NPAT];

  task automatic run_circuit_e();
    e_step_t r;
    int unsigned start, prev_state;
    bit have_prev;
    for (int p = 0; p < NPAT; p++) begin
      px[p] = $urandom % (1 << W); py[p] = $urandom % (1 << W);
      ps[p] = $urandom % (1 << STATE_W); pin[p] = $urandom % (1 << W);
      pns[p] = $urandom % (1 << STATE_W);
      pxs[p] = $urandom % 4; pys[p] = $urandom % 2; pos[p] = $urandom % 2;
    end
    start = cycles;
    have_prev = 1'b0;
    prev_state = 0;
    for (int p = 0; p <= NPAT; p++) begin
      // initialize: next state in, captured state out; X and Y held
      e_drive(1'b0, 1'b1, (p < NPAT) ? ps[p] : 0, XSEL_HOLD, YSEL_HOLD, OSEL_ZERO, 0);
      #1 check("mode initialize", e_mode, MODE_INIT);
      if (have_prev) begin
        check("state out on Out (initialize)", e_out, prev_state);
        n_state_out++;
      end
      @(negedge clk);
      // F-scan clock 1: Y's word in, captured Y out
      e_drive(1'b1, 1'b0, (p < NPAT) ? e_scan_word(W, py[p]) : 0, 0, 0, 0, 0);
      #1 check("mode hold/scan", e_mode, MODE_HOLD_SCAN);
      if (have_prev) begin
        check("scan-out captured Y", e_out, r.y);
        seen_t3[p-1] = e_out;
        if (p < NPAT) n_overlap++;
      end
      @(negedge clk);
      // F-scan clock 2: X's word in, captured X out
      e_drive(1'b1, 1'b0, (p < NPAT) ? e_scan_word(W, px[p]) : 0, 0, 0, 0, 0);
      #1;
      if (have_prev) begin
        check("scan-out captured X", e_out, r.x);
        seen_t4[p-1] = e_out;
      end
      @(negedge clk);
      if (p == NPAT) break;
      // test phase
      check("X justified", e_x, px[p]);
      check("Y justified", e_y, py[p]);
      check("state held through F-scan", e_state, ps[p]);
      e_drive(1'b0, 1'b0, pin[p], pxs[p], pys[p], pos[p], pns[p]);
      r = e_step(W, 1'b0, pin[p], px[p], py[p], pxs[p], pys[p], pos[p]);
      #1 check("mode normal", e_mode, MODE_NORMAL);
      check("test-phase Out", e_out, r.out);
      seen_t2[p] = e_out;
      n_test++;
      @(negedge clk);
      check("state after test phase", e_state, pns[p]);
      prev_state = pns[p];
      have_prev = 1'b1;
    end
    check("test application time 4N+3", cycles - start, 4 * NPAT + 3);
  endtask

  // the stuck-at model must predict what Out showed
  task automatic check_ftgm();
    for (int p = 0; p < NPAT; p++) begin
      tg_in1_t0 = W'(e_scan_word(W, py[p]));
      tg_in1_t1 = W'(e_scan_word(W, px[p]));
      tg_in1_t2 = W'(pin[p]);
      tg_in1_t3 = W'((p + 1 < NPAT) ? e_scan_word(W, py[p+1]) : 0);
      tg_in1_t4 = W'((p + 1 < NPAT) ? e_scan_word(W, px[p+1]) : 0);
      tg_x_sel = x_sel_e'(pxs[p]); tg_y_sel = y_sel_e'(pys[p]); tg_out_sel = out_sel_e'(pos[p]);
      #1;
      check("model Out t2 = circuit", tg_out_t2, seen_t2[p]);
      check("model Out t3 = circuit", tg_out_t3, seen_t3[p]);
      check("model Out t4 = circuit", tg_out_t4, seen_t4[p]);
      n_ftgm++;
    end
  endtask

  // delay test pattern pairs on circuit E, compared with the two-frame model
  task automatic run_delay_pairs();
    int unsigned ix, iy, l1, c2;
    int xs, ys, os;
    bit skew;
    for (int k = 0; k < NDELAY; k++) begin
      skew = k[0];
      ix = $urandom % (1 << W); iy = $urandom % (1 << W);
      l1 = $urandom % (1 << W); c2 = $urandom % (1 << W);
      xs = $urandom % 4; ys = $urandom % 2; os = $urandom % 2;
      // initialization pattern by F-scan
      e_drive(1'b1, 1'b0, e_scan_word(W, iy), 0, 0, 0, 0); @(negedge clk);
      e_drive(1'b1, 1'b0, e_scan_word(W, ix), 0, 0, 0, 0); @(negedge clk);
      check("init pattern X", e_x, ix);
      check("init pattern Y", e_y, iy);
      // launch: skewed-load keeps F-scan on for one more shift, broad-side
      // goes to normal mode
      e_drive(skew, 1'b0, l1, xs, ys, os, $urandom);
      @(negedge clk);
      // capture: always normal mode, at speed
      e_drive(1'b0, 1'b0, c2, xs, ys, os, $urandom);
      hy_fse1 = skew; hy_fse2 = 1'b0;
      hy_pi1 = W'(l1); hy_pi2 = W'(c2); hy_ppi_x = W'(ix); hy_ppi_y = W'(iy);
      hy_x_sel = x_sel_e'(xs); hy_y_sel = y_sel_e'(ys); hy_out_sel = out_sel_e'(os);
      #1 check("capture-clock Out = model po2", e_out, hy_po2);
      @(negedge clk);
      // read the captured response back by F-scan-out
      e_drive(1'b1, 1'b0, 0, 0, 0, 0, 0);
      #1 check("captured Y = model ppo_y", e_out, hy_ppo_y);
      @(negedge clk);
      #1 check("captured X = model ppo_x", e_out, hy_ppo_x);
      if (skew) n_skewed++; else n_broad++;
    end
  endtask

  task automatic run_ab();
    int unsigned a, b, piv, ea, eb;
    bit la, lb, pe;
    for (int k = 0; k < 16; k++) begin
      a = $urandom % 128; b = 1 + $urandom % 128; piv = $urandom % (1 << W);
      la = 1'($urandom); lb = 1'($urandom); pe = 1'($urandom);
      ab_test = 1'b1; ab_pi = W'(b - 1); @(negedge clk);
      ab_pi = W'(a); @(negedge clk);
      check("A/B: A justified", ab_a, a);
      check("A/B: B justified", ab_b, b);
      ab_test = 1'b0; ab_pi = W'(piv); ab_ld_a = la; ab_ld_b = lb; ab_po_en = pe;
      ea = la ? (piv + b) % 128 : a;
      eb = lb ? (a + 1) % (1 << W) : b;
      #1 check("A/B: test-phase PO", ab_po, pe ? b : 0);
      @(negedge clk);
      ab_test = 1'b1; ab_ld_a = 1'b0; ab_ld_b = 1'b0; ab_po_en = 1'b0;
      #1 check("A/B: scan-out B", ab_po, eb);
      @(negedge clk);
      #1 check("A/B: scan-out A+1", ab_po, (ea + 1) % (1 << W));
      n_ab++;
    end
    ab_test = 1'b0;
  endtask

  task automatic run_slice();
    logic [15:0] v, old;
    for (int k = 0; k < 16; k++) begin
      sl_scan = 1'b0; sl_en = 1'b1; sl_d = 16'($urandom); @(negedge clk);
      check("slice: functional load", sl_q, sl_d);
      old = sl_q; v = 16'($urandom);
      sl_scan = 1'b1; sl_en = 1'b0;
      sl_scan_in = v[15:8]; #1 check("slice: out high", sl_scan_out, old[15:8]); @(negedge clk);
      sl_scan_in = v[7:0];  #1 check("slice: out low", sl_scan_out, old[7:0]);   @(negedge clk);
      check("slice: scanned in two clocks", sl_q, v);
      n_slice++;
    end
    sl_scan = 1'b0; sl_en = 1'b0;
  endtask

  // F-scan-path test of circuit E: scan only, no normal clock
  task automatic run_path_test();
    int unsigned w[$];
    for (int k = 0; k < 20; k++) begin
      w.push_back($urandom % (1 << W));
      e_drive(1'b1, 1'b0, w[k], 0, 0, 0, 0);
      #1;
      if (k >= 2) begin
        check("F-scan-path test", e_out, wrap(w[k-2] + 10, W));
        n_path++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    e_drive(1'b0, 1'b0, 0, XSEL_HOLD, YSEL_HOLD, OSEL_ZERO, 0);
    n_hold = 0; n_init = 0;
    ab_test = 1'b0; ab_pi = '0; ab_ld_a = 1'b0; ab_ld_b = 1'b0; ab_po_en = 1'b0;
    sl_scan = 1'b0; sl_en = 1'b0; sl_d = '0; sl_scan_in = '0;
    tg_in1_t0 = '0; tg_in1_t1 = '0; tg_in1_t2 = '0; tg_in1_t3 = '0; tg_in1_t4 = '0;
    tg_x_sel = XSEL_HOLD; tg_y_sel = YSEL_HOLD; tg_out_sel = OSEL_ZERO;
    hy_fse1 = 1'b0; hy_fse2 = 1'b0; hy_pi1 = '0; hy_pi2 = '0; hy_ppi_x = '0; hy_ppi_y = '0;
    hy_x_sel = XSEL_HOLD; hy_y_sel = YSEL_HOLD; hy_out_sel = OSEL_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    run_path_test();
    run_circuit_e();
    check_ftgm();
    run_delay_pairs();
    run_ab();
    run_slice();

    need("F-scan-path test (scan only)", n_path);
    need("initialize clocks", n_init);
    need("hold/scan clocks", n_hold);
    need("test phases", n_test);
    need("state scanned out on PO", n_state_out);
    need("scan-out overlapped with scan-in", n_overlap);
    need("stuck-at model agreed", n_ftgm);
    need("skewed-load pairs", n_skewed);
    need("broad-side pairs", n_broad);
    need("A/B circuit patterns", n_ab);
    need("sliced register scans", n_slice);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
