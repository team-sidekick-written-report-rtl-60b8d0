// tb_instr_reg_file: drives the BAR2 register-file port as the host would:
// checks edgeReset after reset, loads a small random image into main_mem,
// releases edgeReset, polls isDone, reads avg_mem and compares every interior
// result with the reference Sobel model. It then raises edgeReset, loads a
// second image and runs again, and checks that main_mem and unmapped words
// read as 0. The run time is checked against 11 divided-clock cycles per grid.
module tb_instr_reg_file;
  import sk_pkg::*;
  import tb_sobel_ref_pkg::*;
  localparam int H = 8, W = 7, N = H * W;
  localparam int GRIDS = (H - 2) * (W - 2);

  logic clk = 0, rst = 1;
  logic reg_wren = 0;
  logic [31:0] reg_wr_addr = 0, reg_data_in = 0, reg_rd_addr = 0, reg_data_out;
  logic [7:0] img [N];
  int checks = 0, failures = 0;

  instr_reg_file #(.MAX_HEIGHT(H), .MAX_WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] a(input rf_region_e r, input int idx);
    return {12'd0, r, 17'(idx)};
  endfunction

  task automatic wr(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    reg_wren = 1; reg_wr_addr = addr; reg_data_in = data;
    @(negedge clk);
    reg_wren = 0;
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    reg_rd_addr = addr;
    @(posedge clk); #1;
    data = reg_data_out;
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run_image();
    logic [31:0] d;
    int polls;
    foreach (img[i]) begin img[i] = $urandom; wr(a(RGN_MAIN, i), {24'hABCDEF, img[i]}); end
    wr(a(RGN_CTRL, 0), 0);
    rd(a(RGN_CTRL, 0), d);
    expect_eq(d, 0, "edgeReset written 0");
    polls = 0;
    do begin rd(a(RGN_CTRL, 1), d); polls++; end while (d == 0 && polls < 20000);
    expect_eq(d, 1, "isDone");
    // 11 divided cycles per grid, 4 clk cycles per divided cycle, 1 poll per clk
    checks++;
    if (polls < GRIDS * 11 * 4 - 8 || polls > GRIDS * 11 * 4 + 8) begin
      failures++; $display("FAIL run took %0d clk cycles, expected about %0d", polls, GRIDS * 44);
    end
    for (int r = 1; r < H - 1; r++)
      for (int c = 1; c < W - 1; c++) begin
        longint unsigned q [9];
        for (int k = 0; k < 9; k++) q[k] = img[(r-1+k/3)*W + (c-1+k%3)];
        rd(a(RGN_AVG, r*W+c), d);
        expect_eq(d, 32'(sobel_ref(q)), $sformatf("avg_mem(%0d,%0d)", r, c));
      end
    wr(a(RGN_CTRL, 0), 1);
    repeat (8) @(posedge clk);
    rd(a(RGN_CTRL, 1), d);
    expect_eq(d, 0, "isDone cleared by edgeReset");
  endtask

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    rd(a(RGN_CTRL, 0), d);
    expect_eq(d, 1, "edgeReset after reset");
    rd(a(RGN_CTRL, 1), d);
    expect_eq(d, 0, "isDone after reset");
    run_image();
    run_image();
    rd(a(RGN_MAIN, 3), d);
    expect_eq(d, 0, "main_mem not readable");
    rd(a(RGN_CTRL, 5), d);
    expect_eq(d, 0, "unmapped control word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
