// tb_rule3_op_reg: self-checking test of the rule-3 scan cell.
//
// Drives random scan_en, op_result and scan_d and checks after every rising
// edge that q holds scan_d when scan_en was high and op_result otherwise,
// one cycle later. It also checks the reset.
module tb_rule3_op_reg;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         scan_en;
  logic [W-1:0] op_result, scan_d, q, expect_q;
  int           checks = 0, failures = 0, n_scan = 0, n_func = 0;

  rule3_op_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; scan_en = 1'b0; op_result = '1; scan_d = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst = 1'b0;
    repeat (400) begin
      @(negedge clk);
      scan_en   = 1'($urandom);
      op_result = W'($urandom);
      scan_d    = W'($urandom);
      if (scan_en) begin expect_q = scan_d;    n_scan++; end
      else         begin expect_q = op_result; n_func++; end
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("scan_en=%b op=%h scan_d=%h q=%h expected %h",
                 scan_en, op_result, scan_d, q, expect_q);
      end
    end
    checks++;
    if (n_scan == 0 || n_func == 0) begin failures++; $display("a mode was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
