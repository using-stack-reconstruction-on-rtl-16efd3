// tb_orth_scan_top: end-to-end test of the whole design at its default sizes.
//
// Runs the four circuits of orth_scan_top together from one clock and reset.
// Each is driven with random traffic and compared after every rising edge
// with a cycle model written here. On top of that, the multiplier goes
// through complete scan test patterns (scan load of both register columns,
// functional capture, scan unload to out1), and the time a byte pair takes
// from the inputs through the four-column chain to out1 is measured.
//
// Mechanisms counted, each of which must occur at least once:
//   mul functional cycles with addr=1 and with addr=0, mul scan shifts,
//   rule-2 overrides in the multiplier (scan_en with addr=1, where the
//   functional select would pick temp2), complete scan patterns, the
//   cond example's override (scan_en with addr=0), and the mult example's
//   scan bypass and functional product.
module tb_orth_scan_top;
  import scan_pkg::*;

  logic  clock = 1'b0;
  logic  reset;
  logic  mul_addr, mul_scan_en;
  byte_t mul_in1, mul_in2;
  prod_t mul_out1;
  byte_t dly_a_in, dly_b;
  logic  cond_addr, cond_scan_en;
  byte_t cond_b_in, cond_c_in, cond_a;
  logic  mult_scan_en;
  byte_t mult_b_in, mult_c_in, mult_a;

  int checks = 0, failures = 0;
  int n_func_a1 = 0, n_func_a0 = 0, n_shift = 0, n_r2_override = 0;
  int n_patterns = 0, n_cond_override = 0, n_mult_scan = 0, n_mult_func = 0;

  // Cycle models.
  byte_t m_t1, m_t2, m_t3, m_t4;
  prod_t m_out;
  byte_t d_a, d_b;
  byte_t c_b, c_c, c_a;
  byte_t p_b, p_c, p_a;

  orth_scan_top dut (.*);

  always #5 clock = ~clock;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h expected %h", what, got, want);
    end
  endtask

  // Next state of every model from the inputs set up for the coming edge.
  task automatic model_step;
    byte_t n_t3, n_t4, n_ca, n_pa, prod8;
    prod_t n_out;
    if (reset) begin
      m_t1 = '0; m_t2 = '0; m_t3 = '0; m_t4 = '0; m_out = '0;
      d_a = '0; d_b = '0; c_b = '0; c_c = '0; c_a = '0;
      p_b = '0; p_c = '0; p_a = '0;
      return;
    end
    if (mul_scan_en) begin
      n_shift++;
      if (mul_addr) n_r2_override++;
      n_t4 = m_t1; n_t3 = m_t2; n_out = {m_t3, m_t4};
    end else begin
      if (mul_addr) n_func_a1++; else n_func_a0++;
      n_t4 = mul_addr ? m_t2 : m_t1;
      n_t3 = mul_addr ? m_t1 - 8'd10 : m_t2 + 8'd10;
      n_out = 16'(m_t3) * 16'(m_t4);
    end
    m_t1 = mul_in1; m_t2 = mul_in2; m_t3 = n_t3; m_t4 = n_t4; m_out = n_out;

    d_b = d_a; d_a = dly_a_in;

    if (cond_scan_en && !cond_addr) n_cond_override++;
    n_ca = (cond_addr || cond_scan_en) ? c_b : c_c;
    c_a = n_ca; c_b = cond_b_in; c_c = cond_c_in;

    prod8 = 8'(p_b * p_c);
    if (mult_scan_en) begin n_pa = p_b; n_mult_scan++; end
    else              begin n_pa = prod8; n_mult_func++; end
    p_a = n_pa; p_b = mult_b_in; p_c = mult_c_in;
  endtask

  task automatic check_all;
    check(mul_out1, m_out, "mul_out1");
    check(16'(dly_b), 16'(d_b), "dly_b");
    check(16'(cond_a), 16'(c_a), "cond_a");
    check(16'(mult_a), 16'(p_a), "mult_a");
  endtask

  // Random stimulus for the three small circuits.
  task automatic drive_examples;
    dly_a_in     = 8'($urandom);
    cond_addr    = 1'($urandom);
    cond_scan_en = 1'($urandom_range(0, 2) == 0);
    cond_b_in    = 8'($urandom);
    cond_c_in    = 8'($urandom);
    mult_scan_en = 1'($urandom);
    mult_b_in    = 8'($urandom);
    mult_c_in    = 8'($urandom);
  endtask

  // One clock: set the multiplier inputs, random examples, advance models.
  task automatic step(input logic s, input logic a, input byte_t x1, input byte_t x2);
    @(negedge clock);
    mul_scan_en = s; mul_addr = a; mul_in1 = x1; mul_in2 = x2;
    drive_examples();
    model_step();
    @(posedge clock); #1;
    check_all();
  endtask

  initial begin
    int    lat;
    byte_t x, y, u, v, w, z, e_t3, e_t4;
    logic  a;

    reset = 1'b1;
    mul_scan_en = 1'b0; mul_addr = 1'b0; mul_in1 = '1; mul_in2 = '1;
    drive_examples();
    model_step();
    @(posedge clock); #1;
    check_all();
    reset = 1'b0;

    // Chain latency through the four stack-form columns.
    step(1'b1, 1'b1, 8'ha5, 8'h5a);
    lat = 1;
    while (mul_out1 != 16'h5aa5 && lat < 10) begin
      step(1'b1, 1'($urandom), 8'h00, 8'h00);
      lat++;
    end
    checks++;
    if (lat != STACK_M - 1) begin
      failures++;
      $display("scan latency %0d edges, expected %0d", lat, STACK_M - 1);
    end

    // Complete scan test patterns.
    repeat (50) begin
      x = 8'($urandom); y = 8'($urandom); u = 8'($urandom);
      v = 8'($urandom); w = 8'($urandom); z = 8'($urandom);
      a = 1'($urandom);
      step(1'b1, 1'($urandom), x, y);
      step(1'b1, 1'($urandom), u, v);
      step(1'b0, a, w, z);
      check(mul_out1, 16'(x) * 16'(y), "pattern product");
      e_t4 = a ? v : u;
      e_t3 = a ? u - 8'd10 : v + 8'd10;
      step(1'b1, 1'($urandom), 8'($urandom), 8'($urandom));
      check(mul_out1, {e_t3, e_t4}, "pattern temp3/temp4");
      step(1'b1, 1'($urandom), 8'($urandom), 8'($urandom));
      check(mul_out1, {z, w}, "pattern temp2/temp1");
      n_patterns++;
    end

    // Free random traffic on all four circuits.
    repeat (3000)
      step(1'($urandom_range(0, 2) == 0), 1'($urandom), 8'($urandom), 8'($urandom));

    $display("mul: functional addr=1 %0d, addr=0 %0d, scan shifts %0d, rule-2 overrides %0d, patterns %0d",
             n_func_a1, n_func_a0, n_shift, n_r2_override, n_patterns);
    $display("cond overrides %0d, mult scan %0d, mult functional %0d",
             n_cond_override, n_mult_scan, n_mult_func);
    checks++;
    if (n_func_a1 == 0 || n_func_a0 == 0 || n_shift == 0 || n_r2_override == 0
        || n_patterns == 0 || n_cond_override == 0 || n_mult_scan == 0 || n_mult_func == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
