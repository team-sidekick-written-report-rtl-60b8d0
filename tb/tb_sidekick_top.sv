// tb_sidekick_top: end-to-end test of the co-processor at its full size
// (320 rows of 240 pixels), acting as the host through the TLP streams.
//
//  1. BAR0: writes the six DMA set-up registers, reads them back, starts a
//     transfer in each direction, answers with the DMA engine's done pulses and
//     polls the done bits.
//  2. BAR2: checks edgeReset after reset, loads a random image with 32-word
//     memory-write TLPs, clears edgeReset, polls isDone with memory reads (it
//     must read 0 at least once and then 1), reads every interior word of
//     avg_mem and compares it with the reference Sobel model.
//  3. Sends TLPs that must be dropped (a message and a write to BAR1) and
//     checks that nothing changed, then re-raises edgeReset and checks that
//     isDone clears.
// Completions are checked word by word (format, IDs, tag, byte count, data)
// while tx_ready is pulled low at random. Each mechanism is counted and one
// that never happened counts as a failure.
module tb_sidekick_top;
  import sk_pkg::*;
  import tb_sobel_ref_pkg::*;
  localparam int H = 320, W = 240, N = H * W;
  localparam logic [15:0] CPL_ID = 16'h0300;
  localparam logic [5:0] HIT0 = 6'b000001, HIT1 = 6'b000010, HIT2 = 6'b000100;

  logic clk = 0, rst = 1;
  logic [31:0] rx_data = 0;
  logic rx_sof = 0, rx_eof = 0, rx_valid = 0, rx_ready;
  logic [NUM_BARS-1:0] rx_bar_hit = 0;
  logic [31:0] tx_data;
  logic tx_sof, tx_eof, tx_valid, tx_ready = 1;
  logic [31:0] dma_wr_host_addr, dma_wr_fpga_addr, dma_wr_size;
  logic [31:0] dma_rd_fpga_addr, dma_rd_host_addr, dma_rd_size;
  logic dma_wr_start, dma_rd_start, dma_wr_done = 0, dma_rd_done = 0;

  logic [7:0] img [N];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_bar0_wr = 0, n_bar0_rd = 0, n_bar2_burst = 0, n_bar2_rd = 0;
  int n_dma_wr = 0, n_dma_rd = 0, n_tx_stall = 0, n_rx_stall = 0, n_drop = 0;
  int n_busy_poll = 0, n_done = 0, n_restart = 0;
  bit stall_tx = 0;

  sidekick_top dut (.clk, .rst, .completer_id(CPL_ID),
    .rx_data, .rx_sof, .rx_eof, .rx_valid, .rx_bar_hit, .rx_ready,
    .tx_data, .tx_sof, .tx_eof, .tx_valid, .tx_ready,
    .dma_wr_host_addr, .dma_wr_fpga_addr, .dma_wr_size, .dma_wr_start, .dma_wr_done,
    .dma_rd_fpga_addr, .dma_rd_host_addr, .dma_rd_size, .dma_rd_start, .dma_rd_done);

  always #2 clk = ~clk;
  always @(negedge clk) tx_ready = stall_tx ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (!rst) begin
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (rx_valid && !rx_ready) n_rx_stall++;
  end

  // the DMA engine: finish a transfer 20 cycles after it starts
  initial forever begin
    @(posedge clk);
    if (dma_wr_start) fork begin repeat (20) @(negedge clk); dma_wr_done = 1; @(negedge clk); dma_wr_done = 0; n_dma_wr++; end join_none
    if (dma_rd_start) fork begin repeat (25) @(negedge clk); dma_rd_done = 1; @(negedge clk); dma_rd_done = 0; n_dma_rd++; end join_none
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send(input logic [31:0] d, input bit sof, input bit eof, input logic [5:0] hit);
    @(negedge clk);
    rx_valid = 1; rx_data = d; rx_sof = sof; rx_eof = eof; rx_bar_hit = hit;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    #1 rx_valid = 0; rx_sof = 0; rx_eof = 0;
  endtask

  // memory write of consecutive words starting at word address waddr
  task automatic mwr(input logic [5:0] hit, input logic [31:0] waddr, input logic [31:0] d [$]);
    send({8'h40, 14'd0, 10'(d.size())}, 1, 0, hit);
    send({16'h0008, 8'h00, 8'hFF}, 0, 0, hit);
    send({waddr[29:0], 2'b00}, 0, d.size() == 0, hit);
    foreach (d[i]) send(d[i], 0, i == d.size() - 1, hit);
  endtask

  // one-word memory read; waits for and checks the completion
  task automatic mrd(input logic [5:0] hit, input logic [31:0] waddr, output logic [31:0] data);
    logic [7:0] tag;
    logic [31:0] w [4];
    int k;
    tag = $urandom;
    send({8'h00, 1'b0, 3'd0, 6'd0, 2'b00, 2'b00, 10'd1}, 1, 0, hit);
    send({16'h0008, tag, 8'h0F}, 0, 0, hit);
    send({waddr[29:0], 2'b00}, 0, 1, hit);
    k = 0;
    while (k < 4) begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        checks++;
        if (tx_sof !== (k == 0) || tx_eof !== (k == 3)) begin failures++; $display("FAIL sof/eof"); end
        w[k] = tx_data; k++;
      end
    end
    expect_eq(w[0], 32'h4A00_0001, "completion DW0");
    expect_eq(w[1], {CPL_ID, 16'h0004}, "completion DW1");
    expect_eq(w[2], {16'h0008, tag, 1'b0, waddr[4:0], 2'b00}, "completion DW2");
    data = w[3];
    if (hit == HIT0) n_bar0_rd++; else n_bar2_rd++;
  endtask

  function automatic logic [31:0] a2(input rf_region_e r, input int idx);
    return {12'd0, r, 17'(idx)};
  endfunction

  task automatic wr1(input logic [5:0] hit, input logic [31:0] waddr, input logic [31:0] v);
    logic [31:0] q [$];
    q.push_back(v);
    mwr(hit, waddr, q);
    if (hit == HIT0) n_bar0_wr++;
  endtask

  initial begin
    logic [31:0] d, regs [6];
    logic [31:0] q [$];
    int polls;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    stall_tx = 1;

    // ---- 1. BAR0 DMA registers ----
    foreach (regs[i]) begin regs[i] = $urandom; wr1(HIT0, 32'(i), regs[i]); end
    foreach (regs[i]) begin mrd(HIT0, 32'(i), d); expect_eq(d, regs[i], $sformatf("BAR0 reg %0d", i)); end
    expect_eq(dma_wr_host_addr, regs[0], "dma_wr_host_addr");
    expect_eq(dma_rd_size, regs[5], "dma_rd_size");
    wr1(HIT0, 32'(DMA_CTRL_STAT), 32'h5);
    polls = 0;
    do begin mrd(HIT0, 32'(DMA_CTRL_STAT), d); polls++; end while (d != 32'hA && polls < 100);
    expect_eq(d, 32'hA, "both DMA directions done");
    // a write sent right behind a read waits until the completion has gone out
    fork
      begin
        send({8'h00, 14'd0, 10'd1}, 1, 0, HIT0);
        send({16'h0008, 8'h5A, 8'h0F}, 0, 0, HIT0);
        send({30'(DMA_WR_SIZE), 2'b00}, 0, 1, HIT0);
        wr1(HIT0, 32'(DMA_WR_SIZE), ~regs[2]);
      end
      begin
        int k;
        k = 0;
        while (k < 4) begin
          @(posedge clk);
          if (tx_valid && tx_ready) begin if (k == 3) d = tx_data; k++; end
        end
      end
    join
    expect_eq(d, regs[2], "read ahead of the queued write returns the old value");
    mrd(HIT0, 32'(DMA_WR_SIZE), d);
    expect_eq(d, ~regs[2], "queued write landed after the read");

    // ---- 2. Sobel on a full image through BAR2 ----
    mrd(HIT2, a2(RGN_CTRL, 0), d);
    expect_eq(d, 1, "edgeReset after reset");
    foreach (img[i]) img[i] = $urandom;
    for (int base = 0; base < N; base += 32) begin
      q.delete();
      for (int i = 0; i < 32; i++) q.push_back({24'd0, img[base + i]});
      mwr(HIT2, a2(RGN_MAIN, base), q);
      n_bar2_burst++;
    end
    stall_tx = 0;
    wr1(HIT2, a2(RGN_CTRL, 0), 0);
    polls = 0;
    do begin
      mrd(HIT2, a2(RGN_CTRL, 1), d);
      if (d == 0) n_busy_poll++;
      polls++;
    end while (d == 0 && polls < 2_000_000);
    expect_eq(d, 1, "isDone");
    if (d == 1) n_done++;
    stall_tx = 1;
    for (int r = 1; r < H - 1; r++)
      for (int c = 1; c < W - 1; c++) begin
        longint unsigned p [9];
        for (int k = 0; k < 9; k++) p[k] = img[(r-1+k/3)*W + (c-1+k%3)];
        mrd(HIT2, a2(RGN_AVG, r*W+c), d);
        expect_eq(d, 32'(sobel_ref(p)), $sformatf("result (%0d,%0d)", r, c));
      end

    // ---- 3. dropped TLPs, then restart ----
    send(32'h7200_0001, 1, 0, HIT2); send(0, 0, 0, HIT2); send(0, 0, 0, HIT2);
    send(0, 0, 0, HIT2); send(32'hFFFF, 0, 1, HIT2);
    n_drop++;
    q.delete(); q.push_back(32'h1);
    mwr(HIT1, a2(RGN_CTRL, 0), q);   // BAR1 is not decoded
    n_drop++;
    mrd(HIT2, a2(RGN_CTRL, 0), d);
    expect_eq(d, 0, "edgeReset untouched by dropped TLPs");
    wr1(HIT2, a2(RGN_CTRL, 0), 1);
    repeat (10) @(posedge clk);
    mrd(HIT2, a2(RGN_CTRL, 1), d);
    expect_eq(d, 0, "isDone cleared by edgeReset");
    if (d == 0) n_restart++;

    $display("mechanisms: bar0_wr=%0d bar0_rd=%0d bar2_burst=%0d bar2_rd=%0d dma_wr=%0d dma_rd=%0d tx_stall=%0d rx_stall=%0d drop=%0d busy_poll=%0d done=%0d restart=%0d",
             n_bar0_wr, n_bar0_rd, n_bar2_burst, n_bar2_rd, n_dma_wr, n_dma_rd, n_tx_stall, n_rx_stall, n_drop, n_busy_poll, n_done, n_restart);
    begin
      int m [12];
      m = '{n_bar0_wr, n_bar0_rd, n_bar2_burst, n_bar2_rd, n_dma_wr, n_dma_rd,
                     n_tx_stall, n_rx_stall, n_drop, n_busy_poll, n_done, n_restart};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
