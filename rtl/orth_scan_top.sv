// orth_scan_top: the orthogonal RTL scan designs side by side.
//
// The main design is the byte multiplier with its 16-bit stack-form scan
// chain (mul_orth_scan). Beside it stand the three small circuits that
// show what each kind of data path costs when a scan path is routed through
// it: a delay path (delay_scan_example, no cost), a conditional path
// (cond_scan_example, one OR gate per select) and an operational path
// (mult_scan_example, one new multiplexer). The four share the clock and the
// synchronous active-high reset; every other port is brought out on its own
// and prefixed with the circuit it belongs to. Timing is that of each
// circuit: three edges from mul_in1/mul_in2 to mul_out1, two edges through
// each of the small circuits.
module orth_scan_top
  import scan_pkg::*;
(
  input  logic  clock,
  input  logic  reset,

  // Multiplier with the orthogonal scan chain.
  input  logic  mul_addr,
  input  logic  mul_scan_en,
  input  byte_t mul_in1,
  input  byte_t mul_in2,
  output prod_t mul_out1,

  // Delay-path example.
  input  byte_t dly_a_in,
  output byte_t dly_b,

  // Conditional-path example.
  input  logic  cond_addr,
  input  logic  cond_scan_en,
  input  byte_t cond_b_in,
  input  byte_t cond_c_in,
  output byte_t cond_a,

  // Operational-path example.
  input  logic  mult_scan_en,
  input  byte_t mult_b_in,
  input  byte_t mult_c_in,
  output byte_t mult_a
);

  mul_orth_scan u_mul (
    .clock   (clock),
    .reset   (reset),
    .addr    (mul_addr),
    .scan_en (mul_scan_en),
    .in1     (mul_in1),
    .in2     (mul_in2),
    .out1    (mul_out1)
  );

  delay_scan_example u_dly (
    .clk  (clock),
    .rst  (reset),
    .a_in (dly_a_in),
    .b    (dly_b)
  );

  cond_scan_example u_cond (
    .clk     (clock),
    .rst     (reset),
    .addr    (cond_addr),
    .scan_en (cond_scan_en),
    .b_in    (cond_b_in),
    .c_in    (cond_c_in),
    .a       (cond_a)
  );

  mult_scan_example u_mult (
    .clk     (clock),
    .rst     (reset),
    .scan_en (mult_scan_en),
    .b_in    (mult_b_in),
    .c_in    (mult_c_in),
    .a       (mult_a)
  );

endmodule
