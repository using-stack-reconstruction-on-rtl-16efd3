// cond_scan_example: a register behind a conditional data path, with the scan
// path B -> A inserted through the existing multiplexer (insertion rule 2).
//
// Function: B <= b_in and C <= c_in on every rising clock edge. A takes B
// when addr is high and C when it is low. With scan_en high, A takes B
// whatever addr is: the multiplexer select becomes addr OR scan_en, one
// 2-input OR gate per select line. Data on b_in or c_in reaches a after two
// edges.
//
// Interface: clk, synchronous active-high rst (clears all registers), addr,
// scan_en, b_in, c_in, a.
//
// The A/B/C registers and the OR-gated select follow the document's rule-2
// example; feeding B and C from ports and the reset are this design's own
// choices.
module cond_scan_example
  import scan_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  addr,
  input  logic  scan_en,
  input  byte_t b_in,
  input  byte_t c_in,
  output byte_t a
);

  byte_t reg_b, reg_c;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_b <= '0;
      reg_c <= '0;
    end else begin
      reg_b <= b_in;
      reg_c <= c_in;
    end
  end

  rule2_cond_reg #(.W(DATA_W)) u_reg_a (
    .clk     (clk),
    .rst     (rst),
    .sel     (addr),
    .scan_en (scan_en),
    .d1      (reg_b),
    .d0      (reg_c),
    .q       (a)
  );

endmodule
