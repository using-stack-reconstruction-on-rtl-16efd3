// tb_mult_scan_example: self-checking test of the operational-path example.
//
// Drives random b_in, c_in and scan_en. Two edges after a byte pair enters,
// a must hold the low byte of B*C in functional mode and B in scan mode.
module tb_mult_scan_example;

  logic       clk = 1'b0;
  logic       rst, scan_en;
  logic [7:0] b_in, c_in, a;
  logic [7:0] b_q, c_q, expect_a;
  logic [15:0] full;
  int         checks = 0, failures = 0, n_scan = 0, n_func = 0;

  mult_scan_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; scan_en = 1'b0; b_in = 8'hff; c_in = 8'hff;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (a !== 8'h00) begin failures++; $display("reset: a=%h", a); end
    rst = 1'b0;
    b_q = 8'h00; c_q = 8'h00;
    repeat (400) begin
      @(negedge clk);
      scan_en = 1'($urandom);
      b_in    = 8'($urandom);
      c_in    = 8'($urandom);
      full    = 16'(b_q) * 16'(c_q);
      if (scan_en) begin expect_a = b_q;       n_scan++; end
      else         begin expect_a = full[7:0]; n_func++; end
      @(posedge clk); #1;
      b_q = b_in; c_q = c_in;
      checks++;
      if (a !== expect_a) begin
        failures++;
        $display("scan_en=%b a=%h expected %h", scan_en, a, expect_a);
      end
    end
    checks++;
    if (n_scan == 0 || n_func == 0) begin failures++; $display("a mode was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
