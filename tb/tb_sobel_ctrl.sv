// tb_sobel_ctrl: runs the sequencer over a small random image held in a
// testbench memory with one-cycle read latency, answers its grids with the
// reference Sobel model, and checks every result written, that no border word
// is written, the 11-cycle-per-grid timing, isDone, and a second run after
// edge_reset is raised and released again.
module tb_sobel_ctrl;
  import tb_sobel_ref_pkg::*;
  localparam int H = 6, W = 7, N = H * W, AW = $clog2(N);
  localparam int GRIDS = (H - 2) * (W - 2);
  localparam int CYC_PER_GRID = 11;

  logic clk = 0, edge_reset = 1;
  logic mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  logic [7:0] mem_rd_data;
  logic [31:0] matrix [9];
  logic [31:0] sobel_out;
  logic res_wr_en;
  logic [AW-1:0] res_wr_addr;
  logic [15:0] res_wr_data;
  logic is_done;

  logic [7:0]  img [N];
  logic [15:0] res [N];
  bit          written [N];
  int checks = 0, failures = 0;

  sobel_ctrl #(.MAX_HEIGHT(H), .MAX_WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= img[mem_rd_addr];

  always_comb begin
    longint unsigned q [9];
    foreach (q[i]) q[i] = matrix[i];
    sobel_out = 32'(sobel_ref(q));
  end

  always @(posedge clk) if (res_wr_en) begin
    res[res_wr_addr]     <= res_wr_data;
    written[res_wr_addr] <= 1'b1;
  end

  task automatic run_image();
    int cycles;
    foreach (img[i]) img[i] = $urandom;
    foreach (written[i]) written[i] = 0;
    @(negedge clk) edge_reset = 0;
    cycles = 0;
    while (!is_done && cycles < 100000) begin @(posedge clk); cycles++; #1; end
    checks++;
    if (cycles != GRIDS * CYC_PER_GRID) begin
      failures++; $display("FAIL isDone after %0d cycles, expected %0d", cycles, GRIDS * CYC_PER_GRID);
    end
    repeat (5) @(posedge clk);
    #1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (r == 0 || c == 0 || r == H-1 || c == W-1) begin
          if (written[r*W+c]) begin failures++; $display("FAIL border (%0d,%0d) written", r, c); end
        end else begin
          longint unsigned q [9];
          for (int k = 0; k < 9; k++) q[k] = img[(r-1+k/3)*W + (c-1+k%3)];
          if (!written[r*W+c] || 64'(res[r*W+c]) != sobel_ref(q)) begin
            failures++;
            $display("FAIL (%0d,%0d): got %0d expected %0d", r, c, res[r*W+c], sobel_ref(q));
          end
        end
      end
    // nothing more is written once done
    checks++;
    if (!is_done) begin failures++; $display("FAIL isDone dropped"); end
    @(negedge clk) edge_reset = 1;
    @(negedge clk);
    checks++;
    if (is_done) begin failures++; $display("FAIL isDone not cleared by edge_reset"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run_image();
    run_image();
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
