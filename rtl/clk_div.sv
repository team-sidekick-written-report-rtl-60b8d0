// clk_div: derives the slower co-processor clock (ourClk) from the PCI-E clock.
//
// A 2-bit counter advances on every rising edge of clk. The output register is
// loaded with 0 when the counter reads 0 and with 1 when it reads 2, and holds
// otherwise, so the output is a square wave with a 50% duty cycle and a period
// of four clk cycles. This counter rule is the one the source design describes;
// that design also calls the result "twice the period" of the PCI-E clock, which
// the counter rule does not give, and the counter rule is followed here.
// Synchronous active-high reset clears counter and output.
//
// Ports: clk, rst in; div_clk out (registered, changes just after a clk edge).
module clk_div (
  input  logic clk,
  input  logic rst,
  output logic div_clk
);
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      div_clk <= 1'b0;
    end else begin
      cnt <= cnt + 2'd1;
      if (cnt == 2'd0)      div_clk <= 1'b0;
      else if (cnt == 2'd2) div_clk <= 1'b1;
    end
  end
endmodule
