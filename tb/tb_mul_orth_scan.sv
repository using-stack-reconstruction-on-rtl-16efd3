// tb_mul_orth_scan: self-checking test of the byte multiplier with its
// stack-form orthogonal scan chain.
//
// Three parts:
//  1. Chain latency: with scan_en held high, a marked input pair must come
//     out on out1 as {in2, in1} after exactly STACK_M-1 = 3 rising edges.
//  2. Full test-pattern procedure, repeated with random data: two scan edges
//     load {temp4,temp3} and {temp1,temp2}, one functional capture edge with
//     a random addr, then two scan edges unload. The captured product, the
//     captured {temp3,temp4} and the captured {temp2,temp1} are checked on
//     out1 against values worked out here.
//  3. Random traffic: scan_en, addr and the inputs change at random, and
//     out1 is compared after every edge with a cycle model of the pipeline.
module tb_mul_orth_scan;
  import scan_pkg::*;

  logic  clock = 1'b0;
  logic  reset, addr, scan_en;
  byte_t in1, in2;
  prod_t out1;
  int    checks = 0, failures = 0;

  // Cycle model of the registers.
  byte_t m_t1, m_t2, m_t3, m_t4;
  prod_t m_out;

  mul_orth_scan dut (.*);

  always #5 clock = ~clock;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input prod_t got, input prod_t want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: out1=%h expected %h", what, got, want);
    end
  endtask

  // Apply inputs on the falling edge, then wait past the rising edge.
  task automatic step(input logic s, input logic a, input byte_t x1, input byte_t x2);
    @(negedge clock);
    scan_en = s; addr = a; in1 = x1; in2 = x2;
    @(posedge clock); #1;
  endtask

  task automatic model_step;
    byte_t n_t3, n_t4;
    prod_t n_out;
    if (reset) begin
      m_t1 = '0; m_t2 = '0; m_t3 = '0; m_t4 = '0; m_out = '0;
    end else begin
      if (scan_en) begin
        n_t4 = m_t1;
        n_t3 = m_t2;
        n_out = {m_t3, m_t4};
      end else begin
        n_t4 = addr ? m_t2 : m_t1;
        n_t3 = addr ? m_t1 - 8'd10 : m_t2 + 8'd10;
        n_out = 16'(m_t3) * 16'(m_t4);
      end
      m_t1 = in1; m_t2 = in2; m_t3 = n_t3; m_t4 = n_t4; m_out = n_out;
    end
  endtask

  initial begin
    int    lat;
    byte_t x, y, u, v, w, z;
    logic  a;
    byte_t e_t3, e_t4;

    reset = 1'b1; scan_en = 1'b0; addr = 1'b0; in1 = 8'hff; in2 = 8'hff;
    @(posedge clock); #1;
    check(out1, '0, "reset");
    reset = 1'b0;

    // 1. Chain latency.
    step(1'b1, 1'b0, 8'h3c, 8'hc3);
    lat = 1;
    while (out1 != 16'hc33c && lat < 10) begin
      step(1'b1, 1'($urandom), 8'h00, 8'h00);
      lat++;
    end
    checks++;
    if (lat != STACK_M - 1) begin
      failures++;
      $display("scan latency %0d edges, expected %0d", lat, STACK_M - 1);
    end

    // 2. Test-pattern procedure: load, capture, unload.
    repeat (100) begin
      x = 8'($urandom); y = 8'($urandom); u = 8'($urandom);
      v = 8'($urandom); w = 8'($urandom); z = 8'($urandom);
      a = 1'($urandom);
      step(1'b1, 1'($urandom), x, y);     // temp1=x, temp2=y
      step(1'b1, 1'($urandom), u, v);     // temp4=x, temp3=y, temp1=u, temp2=v
      step(1'b0, a, w, z);                // capture
      check(out1, 16'(y) * 16'(x), "captured product");
      e_t4 = a ? v : u;
      e_t3 = a ? u - 8'd10 : v + 8'd10;
      step(1'b1, 1'($urandom), 8'($urandom), 8'($urandom));
      check(out1, {e_t3, e_t4}, "captured temp3/temp4");
      step(1'b1, 1'($urandom), 8'($urandom), 8'($urandom));
      check(out1, {z, w}, "captured temp2/temp1");
    end

    // 3. Random traffic against the cycle model.
    reset = 1'b1;
    @(negedge clock);
    @(posedge clock); #1;
    model_step();
    reset = 1'b0;
    repeat (2000) begin
      @(negedge clock);
      scan_en = 1'($urandom_range(0, 2) == 0);
      addr    = 1'($urandom);
      in1     = 8'($urandom);
      in2     = 8'($urandom);
      model_step();
      @(posedge clock); #1;
      check(out1, m_out, "random traffic");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
