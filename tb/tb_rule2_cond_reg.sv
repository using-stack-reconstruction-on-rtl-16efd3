// tb_rule2_cond_reg: self-checking test of the rule-2 scan cell.
//
// Drives random sel, scan_en, d1 and d0 for a few hundred cycles and checks
// after every rising edge that q holds d1 when sel or scan_en was high and
// d0 otherwise, with a one-cycle latency. It also checks the reset and
// counts the cycles in which scan_en overrode a low select.
module tb_rule2_cond_reg;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic         sel, scan_en;
  logic [W-1:0] d1, d0, q, expect_q;
  int           checks = 0, failures = 0, overrides = 0;

  rule2_cond_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sel = 1'b0; scan_en = 1'b0; d1 = '1; d0 = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst = 1'b0;
    repeat (400) begin
      @(negedge clk);
      sel     = 1'($urandom);
      scan_en = 1'($urandom_range(0, 3) == 0);
      d1      = W'($urandom);
      d0      = W'($urandom);
      if (sel || scan_en) expect_q = d1;
      else                expect_q = d0;
      if (scan_en && !sel) overrides++;
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("sel=%b scan_en=%b d1=%h d0=%h q=%h expected %h",
                 sel, scan_en, d1, d0, q, expect_q);
      end
    end
    checks++;
    if (overrides == 0) begin failures++; $display("scan override never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
