// tb_dma_reg_file: writes and reads back every BAR0 set-up register, then
// starts transfers in each direction and checks the one-cycle start pulse, the
// busy and done bits the driver polls, that a second start while busy is
// ignored, and that both directions can run at once.
module tb_dma_reg_file;
  import sk_pkg::*;
  logic clk = 0, rst = 1;
  logic reg_wren = 0;
  logic [31:0] reg_wr_addr = 0, reg_data_in = 0, reg_rd_addr = 0, reg_data_out;
  logic [31:0] wr_host_addr, wr_fpga_addr, wr_size, rd_fpga_addr, rd_host_addr, rd_size;
  logic wr_start, rd_start, wr_done = 0, rd_done = 0;
  int checks = 0, failures = 0;
  int wr_starts = 0, rd_starts = 0;
  logic [31:0] vals [6];

  dma_reg_file dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (wr_start) wr_starts++;
    if (rd_start) rd_starts++;
  end

  task automatic wr(input logic [4:0] addr, input logic [31:0] data);
    @(negedge clk);
    reg_wren = 1; reg_wr_addr = {$urandom} << 5 | 32'(addr); reg_data_in = data;
    @(negedge clk);
    reg_wren = 0;
  endtask

  task automatic rd(input logic [4:0] addr, output logic [31:0] data);
    @(negedge clk);
    reg_rd_addr = 32'(addr);
    @(posedge clk); #1;
    data = reg_data_out;
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic pulse_done(input bit wr_dir);
    @(negedge clk);
    if (wr_dir) wr_done = 1; else rd_done = 1;
    @(negedge clk);
    wr_done = 0; rd_done = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 0, "status after reset");
    foreach (vals[i]) begin vals[i] = $urandom; wr(5'(i), vals[i]); end
    foreach (vals[i]) begin rd(5'(i), d); expect_eq(d, vals[i], $sformatf("register %0d", i)); end
    expect_eq(wr_host_addr, vals[0], "wr_host_addr port");
    expect_eq(wr_fpga_addr, vals[1], "wr_fpga_addr port");
    expect_eq(wr_size,      vals[2], "wr_size port");
    expect_eq(rd_fpga_addr, vals[3], "rd_fpga_addr port");
    expect_eq(rd_host_addr, vals[4], "rd_host_addr port");
    expect_eq(rd_size,      vals[5], "rd_size port");
    rd(5'd20, d);
    expect_eq(d, 0, "unmapped word");

    // host -> FPGA transfer
    wr(DMA_CTRL_STAT, 32'h1);
    repeat (2) @(posedge clk); #1;
    expect_eq(32'(wr_starts), 1, "one write start pulse");
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 32'h1, "write busy");
    wr(DMA_CTRL_STAT, 32'h1);  // ignored while busy
    repeat (2) @(posedge clk); #1;
    expect_eq(32'(wr_starts), 1, "start ignored while busy");
    pulse_done(1);
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 32'h2, "write done");

    // both directions at once
    wr(DMA_CTRL_STAT, 32'h5);
    repeat (2) @(posedge clk); #1;
    expect_eq(32'(wr_starts), 2, "second write start");
    expect_eq(32'(rd_starts), 1, "read start");
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 32'h5, "both busy, write done cleared");
    pulse_done(0);
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 32'h9, "read done, write busy");
    pulse_done(1);
    rd(DMA_CTRL_STAT, d);
    expect_eq(d, 32'hA, "both done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
