// tb_fscan_slice_reg - self-checking test of the sliced register.
//
// A 16-bit register on an 8-bit F-scan-path: checks that a value is scanned
// in in exactly two clocks (high slice first, since slices shift upward),
// that its old contents leave on scan_out in the same two clocks, low slice
// last, and that normal-mode loading and holding work. A second instance,
// 32 bits in four 8-bit slices, is checked the same way.
module tb_fscan_slice_reg;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n, scan, en;
  logic [15:0] d, q;
  logic [7:0]  scan_in, scan_out;
  logic [31:0] d4, q4;
  logic [7:0]  scan_out4;

  fscan_slice_reg #(.W_REG(16), .W_PATH(8)) dut (.*);
  fscan_slice_reg #(.W_REG(32), .W_PATH(8)) dut4 (
    .clk, .rst_n, .scan, .en, .d(d4), .scan_in, .q(q4), .scan_out(scan_out4)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic [15:0] old, nw;
    logic [31:0] old4, nw4;
    rst_n = 1'b0; scan = 1'b0; en = 1'b0; d = '0; d4 = '0; scan_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      // functional load
      scan = 1'b0; en = 1'b1; d = 16'($urandom); d4 = $urandom;
      @(negedge clk);
      check("load", q, d); check("load32", q4, d4);
      old = q; old4 = q4;
      en = 1'b0; d = 16'($urandom); d4 = $urandom;
      @(negedge clk);
      check("hold", q, old); check("hold32", q4, old4);
      // scan 16-bit: two clocks, overlapped scan-out
      nw = 16'($urandom);
      scan = 1'b1; en = 1'b1;
      scan_in = nw[15:8]; #1 check("scan-out slice 1", scan_out, old[15:8]);
      @(negedge clk);
      scan_in = nw[7:0];  #1 check("scan-out slice 0", scan_out, old[7:0]);
      @(negedge clk);
      check("scanned-in value (2 clocks)", q, nw);
      // scan 32-bit: four clocks (the 16-bit one now shifts on, ignored)
      nw4 = $urandom;
      old4 = q4;
      for (int s = 3; s >= 0; s--) begin
        scan_in = nw4[s*8 +: 8];
        #1 check("scan-out 32", scan_out4, 32'(old4[s*8 +: 8]));
        @(negedge clk);
      end
      check("scanned-in value (4 clocks)", q4, nw4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
