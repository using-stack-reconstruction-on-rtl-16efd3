// mul_orth_scan: byte multiplier with an orthogonal scan chain built into its
// own data paths and reconstructed as a 16-bit-wide stack form.
//
// Function (scan_en low). A three-stage pipeline on rising clock edges:
//   temp1 <= in1, temp2 <= in2
//   addr=1: temp3 <= temp1 - 10, temp4 <= temp2
//   addr=0: temp3 <= temp2 + 10, temp4 <= temp1
//   out1  <= temp3 * temp4            (full 16-bit product)
// All byte arithmetic wraps modulo 256.
//
// Scan chain (scan_en high). The data path graph of this module gives two
// orthogonal scan paths of least cost:
//   SP1: in1 -> temp1 -> temp4 -> out1   (cost 0 + 8 + 24)
//   SP2: in2 -> temp2 -> temp3           (cost 0 + 24)
// Stacking SP2 on SP1 gives one 16-bit-wide chain of four columns,
//   {in1,in2} -> {temp1,temp2} -> {temp4,temp3} -> {out1},
// so SP2, which ended on an internal register, is also observed at out1.
// Each link reuses the cheapest hardware its data path allows:
//   temp1, temp2  delay paths, shared as they are (no added logic);
//   temp4         conditional path: the existing multiplexer is forced to
//                 temp1 by ORing scan_en into its select (rule2_cond_reg);
//   temp3         operational path: a new multiplexer picks temp2 instead of
//                 the +/-10 result (rule3_op_reg);
//   out1          operational path: a new multiplexer picks {temp3, temp4}
//                 instead of the product (rule3_op_reg).
// In scan mode the primary inputs are the scan inputs and out1 is the scan
// output: a pair (in1, in2) applied at edge k is on out1 as
// {in2, in1} after edge k+2, that is three edges through the four columns.
// A test pattern is applied by two scan edges that fill both register
// columns, one functional capture edge, and two scan edges that bring the
// captured registers to out1 (out1 itself is visible after the capture).
//
// Interface: clock, reset (synchronous, active high, clears every register),
// addr, scan_en, in1, in2 (DATA_W bits), out1 (PROD_W bits).
//
// The function, the scan paths, their stacking order and the chain follow
// the document. Which half of out1 each byte of a column lands in (SP1 in the
// low byte, the path stacked on it in the high byte), the inverted select
// used to steer temp4's multiplexer, the reset, and the port scan_en are this
// design's own choices.
module mul_orth_scan
  import scan_pkg::*;
(
  input  logic  clock,
  input  logic  reset,
  input  logic  addr,
  input  logic  scan_en,
  input  byte_t in1,
  input  byte_t in2,
  output prod_t out1
);

  byte_t   temp1, temp2, temp3, temp4;
  byte_t   temp3_func;
  prod_t   product;
  column_t col_reg2;

  // Column 2 of the stack form: delay data paths, shared unchanged.
  always_ff @(posedge clock) begin
    if (reset) begin
      temp1 <= '0;
      temp2 <= '0;
    end else begin
      temp1 <= in1;
      temp2 <= in2;
    end
  end

  // Column 3, lower entry (SP1): temp4 <= addr ? temp2 : temp1. The scan
  // source temp1 sits on the addr=0 side, so the select is the inverted addr.
  rule2_cond_reg #(.W(DATA_W)) u_temp4 (
    .clk     (clock),
    .rst     (reset),
    .sel     (~addr),
    .scan_en (scan_en),
    .d1      (temp1),
    .d0      (temp2),
    .q       (temp4)
  );

  // Column 3, upper entry (SP2): temp3 from the subtractor/adder, or temp2.
  always_comb temp3_func = addr ? byte_t'(temp1 - byte_t'(OFFSET))
                                : byte_t'(temp2 + byte_t'(OFFSET));

  rule3_op_reg #(.W(DATA_W)) u_temp3 (
    .clk       (clock),
    .rst       (reset),
    .scan_en   (scan_en),
    .op_result (temp3_func),
    .scan_d    (temp2),
    .q         (temp3)
  );

  // Column 4: out1 from the multiplier, or the whole register column.
  always_comb begin
    product        = prod_t'(temp3) * prod_t'(temp4);
    col_reg2.upper = temp3;
    col_reg2.lower = temp4;
  end

  rule3_op_reg #(.W(PROD_W)) u_out1 (
    .clk       (clock),
    .rst       (reset),
    .scan_en   (scan_en),
    .op_result (product),
    .scan_d    (col_reg2),
    .q         (out1)
  );

  // The stack form must be as wide as the output column.
  initial assert (STACK_N == PROD_W && STACK_N == $bits(column_t)
                  && STACK_N == stack_width(2 * DATA_W, PROD_W, 2 * DATA_W))
    else $error("stack form width does not match the chain");

  // Three scan edges carry an input pair to out1 unchanged.
  a_scan_transfer : assert property (@(posedge clock)
    scan_en && $past(scan_en, 1) && $past(scan_en, 2)
      && !reset && !$past(reset, 1) && !$past(reset, 2)
    |=> out1 == {$past(in2, 3), $past(in1, 3)})
    else $error("scan chain lost data");

endmodule
