// tb_clk_div: checks that the divided clock is low for two and high for two
// input clock cycles, starting low out of reset, i.e. a period of four cycles.
module tb_clk_div;
  logic clk = 0, rst = 1, div_clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rises = 0;
  logic exp;

  clk_div dut (.clk, .rst, .div_clk);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (div_clk !== 1'b0) begin failures++; $display("FAIL not low after reset"); end
    // after reset release: counter 0 -> out 0, 1 -> hold, 2 -> out 1, 3 -> hold
    for (cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk); #1;
      // value after edge number cyc+1: counter was cyc%4 at that edge
      exp = ((cyc % 4) == 2 || (cyc % 4) == 3);
      checks++;
      if (div_clk !== exp) begin failures++; $display("FAIL cycle %0d: %b", cyc, div_clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
