// tb_fscan_mask - self-checking test of the four mask elements.
//
// Instantiates C0, C1, Ca1 and Cq' masks at 8 bits and a Cq' mask at 32 bits,
// drives random values with the scan pin on and off and checks that each
// passes the line in normal mode and forces its own constant in scan mode.
module tb_fscan_mask;
  import fscan_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        scan;
  logic [7:0]  d8;
  logic [31:0] d32;
  logic [7:0]  q_c0, q_c1, q_ca1, q_cq;
  logic [31:0] q_cq32;

  fscan_mask #(.KIND(MASK_C0),  .W(8))  u_c0   (.scan, .d(d8),  .q(q_c0));
  fscan_mask #(.KIND(MASK_C1),  .W(8))  u_c1   (.scan, .d(d8),  .q(q_c1));
  fscan_mask #(.KIND(MASK_CA1), .W(8))  u_ca1  (.scan, .d(d8),  .q(q_ca1));
  fscan_mask #(.KIND(MASK_CQ),  .W(8))  u_cq   (.scan, .d(d8),  .q(q_cq));
  fscan_mask #(.KIND(MASK_CQ),  .W(32)) u_cq32 (.scan, .d(d32), .q(q_cq32));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (scan=%0b d8=%h)", what, got, exp, scan, d8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      scan = i[0];
      d8   = 8'($urandom);
      d32  = $urandom;
      #1;
      if (scan) begin
        check("C0",  32'(q_c0),  32'h00);
        check("C1",  32'(q_c1),  32'h01);
        check("Ca1", 32'(q_ca1), 32'hff);
        check("Cq'", 32'(q_cq),  32'h80);
        check("Cq'32", q_cq32,   32'h8000_0000);
      end else begin
        check("C0 pass",  32'(q_c0),  32'(d8));
        check("C1 pass",  32'(q_c1),  32'(d8));
        check("Ca1 pass", 32'(q_ca1), 32'(d8));
        check("Cq' pass", 32'(q_cq),  32'(d8));
        check("Cq'32 pass", q_cq32,   d32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
