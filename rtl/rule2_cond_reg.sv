// rule2_cond_reg: register behind a conditional data path, with a scan path
// inserted through the existing multiplexer (insertion rule 2).
//
// Function: on each rising clock edge q takes d1 when sel is high and d0 when
// it is low. The scan path is routed through the same 2:1 multiplexer: the
// select is ORed with scan_en, so in scan mode q always takes d1. The only
// added logic is one 2-input OR gate on the select, which is why the rule
// charges a conditional edge a cost equal to the register width. The caller
// wires the scan-path source to d1; when the functional condition selects the
// scan source on its low side, the caller inverts the condition into sel.
//
// Interface: clk, synchronous active-high rst (clears q), sel, scan_en,
// d1 (scan-path and sel=1 input), d0 (sel=0 input), q.
// Timing: one clock from d0/d1 to q.
//
// The OR-gate structure follows the document's rule-2 example; the reset is
// this design's own addition.
module rule2_cond_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sel,
  input  logic         scan_en,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d0,
  output logic [W-1:0] q
);

  logic sel_eff;

  always_comb sel_eff = sel | scan_en;

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (sel_eff) q <= d1;
    else              q <= d0;
  end

endmodule
