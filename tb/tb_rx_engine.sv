// tb_rx_engine: feeds the receive engine random memory-write and memory-read
// TLPs for BAR0 and BAR2 (with idle gaps in the stream), plus TLPs it must drop
// (other types, other BARs). Two testbench register files with one-edge read
// latency stand behind the BAR ports. Checks: every write lands at the right
// word of the right BAR with the right data and nothing else is written; every
// read produces one completion request carrying the requester ID, tag, TC,
// attributes, lower address and the word read; the stream stalls while a
// completion is pending.
module tb_rx_engine;
  import sk_pkg::*;
  localparam int B0W = 32, B2W = 256;

  logic clk = 0, rst = 1;
  logic [31:0] rx_data = 0;
  logic rx_sof = 0, rx_eof = 0, rx_valid = 0, rx_ready;
  logic [NUM_BARS-1:0] rx_bar_hit = 0;
  logic bar0_wren, bar2_wren;
  logic [31:0] bar0_wr_addr, bar0_wr_data, bar0_rd_addr, bar0_rd_data;
  logic [31:0] bar2_wr_addr, bar2_wr_data, bar2_rd_addr, bar2_rd_data;
  logic cpl_valid, cpl_ack = 0;
  cpl_req_t cpl;

  logic [31:0] m0 [B0W], m2 [B2W];       // register files behind the ports
  logic [31:0] e0 [B0W], e2 [B2W];       // expected contents
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_drop = 0, stall_cycles = 0;

  rx_engine #(.BAR0_AW(5), .BAR2_AW(8)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (bar0_wren) m0[bar0_wr_addr[4:0]] <= bar0_wr_data;
    if (bar2_wren) m2[bar2_wr_addr[7:0]] <= bar2_wr_data;
    bar0_rd_data <= m0[bar0_rd_addr[4:0]];
    bar2_rd_data <= m2[bar2_rd_addr[7:0]];
  end
  always @(posedge clk) if (!rst && !rx_ready) stall_cycles++;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // send one DW; may insert an idle cycle first
  task automatic send(input logic [31:0] d, input bit sof, input bit eof, input logic [5:0] hit);
    @(negedge clk);
    if ($urandom_range(0, 3) == 0) begin rx_valid = 0; @(negedge clk); end
    rx_valid = 1; rx_data = d; rx_sof = sof; rx_eof = eof; rx_bar_hit = hit;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    #1 rx_valid = 0; rx_sof = 0; rx_eof = 0;
  endtask

  task automatic mwr(input int bar, input logic [5:0] hit, input int waddr, input int len, input bit drop);
    logic [31:0] d;
    send({8'h40, 14'd0, 10'(len)}, 1, 0, hit);
    send({16'h0200, 8'h11, 8'hFF}, 0, 0, hit);
    send({waddr[29:0], 2'b00}, 0, 0, hit);
    for (int i = 0; i < len; i++) begin
      d = $urandom;
      if (!drop) begin
        if (bar == 0) e0[(waddr + i) % B0W] = d; else e2[(waddr + i) % B2W] = d;
      end
      send(d, 0, i == len - 1, hit);
    end
  endtask

  task automatic mrd(input int bar, input int waddr);
    logic [15:0] rid;
    logic [7:0] tag;
    logic [2:0] tc;
    logic [1:0] attr;
    logic [5:0] hit;
    logic [31:0] exp;
    rid = $urandom; tag = $urandom; tc = $urandom; attr = $urandom;
    hit = (bar == 0) ? 6'b000001 : 6'b000100;
    exp = (bar == 0) ? e0[waddr % B0W] : e2[waddr % B2W];
    send({8'h00, 1'b0, tc, 6'd0, attr, 2'b00, 10'd1}, 1, 0, hit);
    send({rid, tag, 8'h0F}, 0, 0, hit);
    send({waddr[29:0], 2'b00}, 0, 1, hit);
    // the stream is held off until the completion is acknowledged
    @(negedge clk);
    checks++;
    if (rx_ready) begin failures++; $display("FAIL stream not stalled during read"); end
    while (!cpl_valid) @(negedge clk);
    repeat ($urandom_range(0, 6)) begin
      @(negedge clk);
      checks++;
      if (rx_ready) begin failures++; $display("FAIL accepted a TLP before the completion went out"); end
    end
    expect_eq(cpl.data, exp, "read data");
    expect_eq(32'(cpl.requester_id), 32'(rid), "requester id");
    expect_eq(32'(cpl.tag), 32'(tag), "tag");
    expect_eq(32'(cpl.tc), 32'(tc), "tc");
    expect_eq(32'(cpl.attr), 32'(attr), "attr");
    expect_eq(32'(cpl.lower_addr), 32'({waddr[4:0], 2'b00}), "lower address");
    cpl_ack = 1;
    @(negedge clk) cpl_ack = 0;
    n_rd++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (e0[i]) e0[i] = 0;
    foreach (e2[i]) e2[i] = 0;
    // clear both register files through the engine
    mwr(0, 6'b000001, 0, B0W, 0);
    mwr(2, 6'b000100, 0, B2W, 0);
    repeat (150) begin
      int kind, bar;
      kind = $urandom_range(0, 9);
      if (kind < 4) begin
        bar = ($urandom_range(0, 1) == 0) ? 0 : 2;
        mwr(bar, bar == 0 ? 6'b000001 : 6'b000100, $urandom_range(0, 300), $urandom_range(1, 6), 0);
        n_wr++;
      end else if (kind < 8) begin
        mrd(($urandom_range(0, 1) == 0) ? 0 : 2, $urandom_range(0, 300));
      end else if (kind == 8) begin
        mwr(2, 6'b000010, $urandom_range(0, 300), 3, 1);   // BAR1: not decoded
        n_drop++;
      end else begin
        // a message TLP (fmt/type 0x72) with two data words: dropped
        send(32'h7200_0002, 1, 0, 6'b000100);
        send(32'h0, 0, 0, 6'b000100);
        send(32'h0, 0, 0, 6'b000100);
        send(32'h0, 0, 0, 6'b000100);
        send($urandom, 0, 0, 6'b000100);
        send($urandom, 0, 1, 6'b000100);
        n_drop++;
      end
    end
    repeat (4) @(posedge clk);
    foreach (e0[i]) expect_eq(m0[i], e0[i], $sformatf("BAR0 word %0d", i));
    foreach (e2[i]) expect_eq(m2[i], e2[i], $sformatf("BAR2 word %0d", i));
    checks++;
    if (n_wr == 0 || n_rd == 0 || n_drop == 0 || stall_cycles == 0) begin
      failures++; $display("FAIL coverage wr=%0d rd=%0d drop=%0d stall=%0d", n_wr, n_rd, n_drop, stall_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
