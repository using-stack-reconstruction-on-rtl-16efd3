// tb_cond_scan_example: self-checking test of the conditional-path example.
//
// Drives random b_in, c_in, addr and scan_en. Two edges after a byte pair
// enters, a must hold B when addr or scan_en was high in the second cycle
// and C otherwise. Counts the cycles where scan_en overrode addr=0.
module tb_cond_scan_example;

  logic       clk = 1'b0;
  logic       rst, addr, scan_en;
  logic [7:0] b_in, c_in, a;
  logic [7:0] b_q, c_q, expect_a;
  int         checks = 0, failures = 0, overrides = 0;

  cond_scan_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; addr = 1'b0; scan_en = 1'b0; b_in = 8'hff; c_in = 8'hff;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (a !== 8'h00) begin failures++; $display("reset: a=%h", a); end
    rst = 1'b0;
    b_q = 8'h00; c_q = 8'h00;
    repeat (400) begin
      @(negedge clk);
      addr    = 1'($urandom);
      scan_en = 1'($urandom_range(0, 2) == 0);
      b_in    = 8'($urandom);
      c_in    = 8'($urandom);
      expect_a = (addr || scan_en) ? b_q : c_q;
      if (scan_en && !addr) overrides++;
      @(posedge clk); #1;
      b_q = b_in; c_q = c_in;
      checks++;
      if (a !== expect_a) begin
        failures++;
        $display("addr=%b scan_en=%b a=%h expected %h", addr, scan_en, a, expect_a);
      end
    end
    checks++;
    if (overrides == 0) begin failures++; $display("scan override never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
