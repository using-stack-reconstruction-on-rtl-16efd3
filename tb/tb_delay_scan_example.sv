// tb_delay_scan_example: self-checking test of the delay-path example.
//
// Feeds a random byte stream into a_in and checks that b shows each byte
// exactly two rising edges later, and that reset clears both registers.
module tb_delay_scan_example;

  logic  clk = 1'b0;
  logic  rst;
  logic [7:0] a_in, b;
  logic [7:0] hist [0:2];
  int    checks = 0, failures = 0;

  delay_scan_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; a_in = 8'hff;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (b !== 8'h00) begin failures++; $display("reset: b=%h", b); end
    rst = 1'b0;
    hist[0] = 8'h00; hist[1] = 8'h00; hist[2] = 8'h00;
    repeat (300) begin
      @(negedge clk);
      a_in = 8'($urandom);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = a_in;
      @(posedge clk); #1;
      checks++;
      if (b !== hist[1]) begin
        failures++;
        $display("b=%h expected %h", b, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
