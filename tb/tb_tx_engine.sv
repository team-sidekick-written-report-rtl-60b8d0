// tb_tx_engine: sends random completion requests under random back-pressure
// and checks every word of every completion TLP against the PCI-E completion
// layout, the start/end markers, and the single acknowledge per packet.
module tb_tx_engine;
  import sk_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] completer_id = 16'h0100;
  logic cpl_valid = 0, cpl_ack;
  cpl_req_t cpl = '0;
  logic [31:0] tx_data;
  logic tx_sof, tx_eof, tx_valid, tx_ready = 0;
  int checks = 0, failures = 0, stalls = 0;

  tx_engine dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (tx_valid && !tx_ready) stalls++;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] exp [4];
    int k, acks;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (200) begin
      @(negedge clk);
      cpl.requester_id = $urandom; cpl.tag = $urandom; cpl.tc = $urandom;
      cpl.attr = $urandom; cpl.lower_addr = $urandom; cpl.data = $urandom;
      cpl_valid = 1;
      exp[0] = {8'h4A, 1'b0, cpl.tc, 4'h0, 2'b00, cpl.attr, 2'b00, 10'd1};
      exp[1] = {completer_id, 3'b000, 1'b0, 12'd4};
      exp[2] = {cpl.requester_id, cpl.tag, 1'b0, cpl.lower_addr};
      exp[3] = cpl.data;
      k = 0; acks = 0;
      while (k < 4) begin
        @(posedge clk);
        if (tx_valid && tx_ready) begin
          expect_eq(tx_data, exp[k], $sformatf("word %0d", k));
          expect_eq({31'd0, tx_sof}, 32'(k == 0), "sof");
          expect_eq({31'd0, tx_eof}, 32'(k == 3), "eof");
          if (cpl_ack) acks++;
          k++;
        end else if (cpl_ack) acks++;
      end
      expect_eq(32'(acks), 1, "one ack");
      #1 cpl_valid = 0;
      // idle gap: no packet without a request
      @(posedge clk); #1;
      expect_eq({31'd0, tx_valid}, 0, "idle");
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
