// fscan_slice_reg - a register wider than its F-scan-path, scanned in slices.
//
// When a register is wider than the PI/PO bit width chosen for its
// F-scan-path, it is divided into slices of the path width and the slices are
// connected to each other through multiplexers. In scan mode the register
// then behaves as a short shift register of NSLICE words:
//   slice[0] <= scan_in, slice[i] <= slice[i-1], scan_out = slice[NSLICE-1]
// so a W_REG-bit register needs NSLICE = W_REG / W_PATH clocks to scan in or
// out, and scan-in and scan-out overlap. Slice 0 is the least significant
// slice. In normal mode (scan = 0) the register loads d when en = 1 and holds
// otherwise.
//
// The default 16-bit register in two 8-bit slices is the method's own
// example; which slice receives scan_in, the load enable and the asynchronous
// reset to zero are this design's choices. scan_out is the registered last
// slice (no combinational path from scan_in).
module fscan_slice_reg #(
  parameter int unsigned W_REG  = 16,  // register width
  parameter int unsigned W_PATH = 8    // F-scan-path width (slice width)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scan,      // F-scan pin
  input  logic              en,        // functional load enable (scan = 0)
  input  logic [W_REG-1:0]  d,         // functional next value
  input  logic [W_PATH-1:0] scan_in,   // from the previous element of the path
  output logic [W_REG-1:0]  q,         // register value
  output logic [W_PATH-1:0] scan_out   // to the next element of the path
);

  localparam int unsigned NSLICE = W_REG / W_PATH;

  initial begin
    assert (NSLICE * W_PATH == W_REG && NSLICE >= 1)
      else $fatal(1, "W_REG must be a multiple of W_PATH");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (scan) begin
      q[W_PATH-1:0] <= scan_in;
      for (int unsigned i = 1; i < NSLICE; i++) begin
        q[i*W_PATH +: W_PATH] <= q[(i-1)*W_PATH +: W_PATH];
      end
    end else if (en) begin
      q <= d;
    end
  end

  assign scan_out = q[(NSLICE-1)*W_PATH +: W_PATH];

endmodule
