// mult_scan_example: a register behind an operational data path, with the
// scan path B -> A inserted by a new multiplexer (insertion rule 3).
//
// Function: B <= b_in and C <= c_in on every rising clock edge. In
// functional mode A <= B * C; A is a byte, so it keeps the low eight bits of
// the product. With scan_en high, A <= B. Data on b_in or c_in reaches a
// after two edges.
//
// Interface: clk, synchronous active-high rst (clears all registers),
// scan_en, b_in, c_in, a.
//
// The byte registers, the multiplier and the scan multiplexer follow the
// document's rule-3 example; feeding B and C from ports and the reset are
// this design's own choices.
module mult_scan_example
  import scan_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  scan_en,
  input  byte_t b_in,
  input  byte_t c_in,
  output byte_t a
);

  byte_t reg_b, reg_c, product;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_b <= '0;
      reg_c <= '0;
    end else begin
      reg_b <= b_in;
      reg_c <= c_in;
    end
  end

  always_comb product = byte_t'(reg_b * reg_c);

  rule3_op_reg #(.W(DATA_W)) u_reg_a (
    .clk       (clk),
    .rst       (rst),
    .scan_en   (scan_en),
    .op_result (product),
    .scan_d    (reg_b),
    .q         (a)
  );

endmodule
