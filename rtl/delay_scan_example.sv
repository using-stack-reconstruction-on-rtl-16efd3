// delay_scan_example: two byte registers joined by a delay data path, the
// case where a scan path costs nothing (insertion rule 1).
//
// Function: A <= a_in and B <= A on every rising clock edge. The scan path
// from A to B is the functional path itself: scan mode and functional mode
// move the same data, so inserting the scan path adds no multiplexer and the
// module has no scan-enable input. Data on a_in reaches b after two edges.
//
// Interface: clk, synchronous active-high rst (clears A and B), a_in, b.
//
// The A-to-B path follows the document's rule-1 example; feeding A from a
// port and the reset are this design's own choices.
module delay_scan_example
  import scan_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  byte_t a_in,
  output byte_t b
);

  byte_t reg_a, reg_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '0;
    end else begin
      reg_a <= a_in;
      reg_b <= reg_a;
    end
  end

  always_comb b = reg_b;

endmodule
