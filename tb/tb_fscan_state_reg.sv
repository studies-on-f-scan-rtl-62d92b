// tb_fscan_state_reg - self-checking test of the augmented state register.
//
// Drives random sequences of the three legal modes (normal, initialize,
// hold/scan) with random PI, next-state and functional PO values and compares
// the state register and the PO multiplexer with a model of the mode table.
// Also checks the initialize round trip: the state scanned out on PO while a
// new one is scanned in, and the new state kept through hold/scan clocks.
module tb_fscan_state_reg;
  import fscan_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned STATE_W = 3;

  int checks = 0;
  int failures = 0;
  int n_init = 0, n_hold = 0, n_norm = 0;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               hold_scan, init;
  logic [W-1:0]       pi, po_func, po;
  logic [STATE_W-1:0] state_next, state_q;
  fscan_mode_e        mode;

  fscan_state_reg #(.W(W), .STATE_W(STATE_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (hold_scan=%0b init=%0b)", what, got, exp,
               hold_scan, init);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned model;
    int m;
    rst_n = 1'b0; hold_scan = 1'b0; init = 1'b0; pi = '0; po_func = '0; state_next = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 0;
    check("reset state", state_q, 0);
    for (int i = 0; i < 2000; i++) begin
      m = $urandom % 3;
      hold_scan  = (m == 2);
      init       = (m == 1);
      pi         = W'($urandom);
      po_func    = W'($urandom);
      state_next = STATE_W'($urandom);
      #1;
      check("mode", int'(mode), (m == 0) ? 0 : (m == 1) ? 1 : 2);
      check("po", po, (m == 1) ? model : int'(po_func));
      @(posedge clk);
      case (m)
        0: begin model = int'(state_next); n_norm++; end
        1: begin model = int'(pi) % (1 << STATE_W); n_init++; end
        default: n_hold++;
      endcase
      @(negedge clk);
      check("state", state_q, model);
    end
    // round trip: scan in 5, hold for 4 clocks, scan out while scanning in 2
    hold_scan = 1'b0; init = 1'b1; pi = 8'd5; @(negedge clk);
    hold_scan = 1'b1; init = 1'b0;
    repeat (4) begin pi = W'($urandom); @(negedge clk); end
    check("held state", state_q, 5);
    hold_scan = 1'b0; init = 1'b1; pi = 8'd2; #1;
    check("state on PO during initialize", po, 5);
    @(negedge clk);
    check("new state", state_q, 2);
    checks++;
    if (n_init == 0 || n_hold == 0 || n_norm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
