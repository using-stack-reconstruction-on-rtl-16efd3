// rule3_op_reg: register behind an operational data path, with a scan path
// inserted by a new multiplexer (insertion rule 3).
//
// Function: on each rising clock edge q takes op_result (the output of an
// arithmetic or logic unit) in functional mode, and scan_d (one of that
// unit's operands, the register on the scan path) in scan mode. The new
// multiplexer is the scan cost: the rule charges three gates per bit for it.
// The operation itself stays outside, so the same cell serves any unit.
//
// Interface: clk, synchronous active-high rst (clears q), scan_en,
// op_result, scan_d, q. All three data buses are W bits wide.
// Timing: one clock from op_result/scan_d to q.
//
// The multiplexer on scan_en follows the document's rule-3 example; the
// reset is this design's own addition.
module rule3_op_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         scan_en,
  input  logic [W-1:0] op_result,
  input  logic [W-1:0] scan_d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (scan_en) q <= scan_d;
    else              q <= op_result;
  end

endmodule
