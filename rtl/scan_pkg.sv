// scan_pkg: shared widths and constants of the orthogonal scan chain designs.
//
// The byte width, the 16-bit product width and the +/-10 offsets of the
// multiplier come from the worked multiplier example. The stack-form
// dimensions follow from the width rule N = max(min(Nin, Nout), Nreg):
// inputs in1+in2 give 16 bits, the output out1 is 16 bits and the widest
// register column {temp1,temp2} or {temp4,temp3} is 16 bits, so N = 16. The
// chain has M = 4 columns: inputs, two register columns, output.
package scan_pkg;

  localparam int unsigned DATA_W  = 8;            // in1, in2, temp1..temp4
  localparam int unsigned PROD_W  = 2 * DATA_W;   // out1
  localparam int unsigned OFFSET  = 10;           // temp1 - 10, temp2 + 10

  // Stack form of the multiplier's scan chain.
  localparam int unsigned STACK_N = 16;           // width of every column
  localparam int unsigned STACK_M = 4;            // number of columns

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [PROD_W-1:0] prod_t;

  // One register column of the stack form: the lower entry is the first
  // scan path pushed (SP1), the upper one the path stacked on it (SP2).
  typedef struct packed {
    byte_t upper;
    byte_t lower;
  } column_t;

  // Width rule for the stack form: N = max(min(n_in, n_out), n_reg).
  function automatic int unsigned stack_width(int unsigned n_in,
                                              int unsigned n_out,
                                              int unsigned n_reg);
    int unsigned m;
    m = (n_in < n_out) ? n_in : n_out;
    return (n_reg > m) ? n_reg : m;
  endfunction

endpackage
