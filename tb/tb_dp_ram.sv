// tb_dp_ram: writes random words on one clock and reads them back on an
// unrelated second clock, checking the data and the one-edge read latency.
module tb_dp_ram;
  localparam int W = 16, D = 300;
  logic wclk = 0, rclk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [$clog2(D)-1:0] wr_addr = 0, rd_addr = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.wr_clk(wclk), .wr_en, .wr_addr, .wr_data,
                                      .rd_clk(rclk), .rd_en, .rd_addr, .rd_data);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge wclk);
      wr_en = 1; wr_addr = i; wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge wclk) wr_en = 0;
    // overwrite some words at random
    repeat (200) begin
      @(negedge wclk);
      wr_en = 1; wr_addr = $urandom_range(0, D-1); wr_data = $urandom; model[wr_addr] = wr_data;
    end
    @(negedge wclk) wr_en = 0;
    repeat (600) begin
      @(negedge rclk);
      rd_en = 1; rd_addr = $urandom_range(0, D-1);
      @(posedge rclk); #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++; $display("FAIL addr %0d: %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
      // with rd_en low the output holds
      rd_en = 0;
      @(posedge rclk); #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
