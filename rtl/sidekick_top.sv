// sidekick_top: FPGA side of a PCI-E image co-processor. The host PC writes a
// greyscale image into the board through one PCI-E base address register
// (BAR2), starts a Sobel edge detection in hardware, and reads the result back;
// a second BAR (BAR0) holds the DMA set-up registers for bulk transfers
// between host memory and board DDR2.
//
//   endpoint TLP stream -> rx_engine -+-> dma_reg_file   (BAR0) -> DMA engine ports
//                                     +-> instr_reg_file (BAR2): main_mem, avg_mem,
//                                     |     clk_div, sobel_ctrl, sobel_sed
//   endpoint TLP stream <- tx_engine <-+  (completions for memory reads)
//
// The PCI-E endpoint itself (hard block and its wrapper), the DMA engine, the
// DDR2 controller and the DDR2 memory are outside this design: the endpoint's
// receive and transmit TLP streams and the DMA engine's register outputs and
// done inputs are the ports of this module. Everything runs on clk, the
// endpoint's user clock, except the Sobel logic, which runs on a clock divided
// from it inside instr_reg_file. rst is synchronous and active high.
//
// The partitioning into engines, a BAR0 DMA register file and a BAR2 register
// file holding the image memories and the edge detector follows the source
// design; the stream format and address maps are described in each module.
module sidekick_top
  import sk_pkg::*;
#(
  parameter int unsigned MAX_HEIGHT = 320,
  parameter int unsigned MAX_WIDTH  = 240
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [15:0]         completer_id,
  // receive TLP stream from the endpoint
  input  logic [31:0]         rx_data,
  input  logic                rx_sof,
  input  logic                rx_eof,
  input  logic                rx_valid,
  input  logic [NUM_BARS-1:0] rx_bar_hit,
  output logic                rx_ready,
  // transmit TLP stream to the endpoint
  output logic [31:0]         tx_data,
  output logic                tx_sof,
  output logic                tx_eof,
  output logic                tx_valid,
  input  logic                tx_ready,
  // DMA engine (outside this design)
  output logic [31:0]         dma_wr_host_addr,
  output logic [31:0]         dma_wr_fpga_addr,
  output logic [31:0]         dma_wr_size,
  output logic                dma_wr_start,
  input  logic                dma_wr_done,
  output logic [31:0]         dma_rd_fpga_addr,
  output logic [31:0]         dma_rd_host_addr,
  output logic [31:0]         dma_rd_size,
  output logic                dma_rd_start,
  input  logic                dma_rd_done
);
  logic        b0_wren, b2_wren;
  logic [31:0] b0_wr_addr, b0_wr_data, b0_rd_addr, b0_rd_data;
  logic [31:0] b2_wr_addr, b2_wr_data, b2_rd_addr, b2_rd_data;
  logic        cpl_valid, cpl_ack;
  cpl_req_t    cpl;

  rx_engine u_rx (
    .clk, .rst,
    .rx_data, .rx_sof, .rx_eof, .rx_valid, .rx_bar_hit, .rx_ready,
    .bar0_wren(b0_wren), .bar0_wr_addr(b0_wr_addr), .bar0_wr_data(b0_wr_data),
    .bar0_rd_addr(b0_rd_addr), .bar0_rd_data(b0_rd_data),
    .bar2_wren(b2_wren), .bar2_wr_addr(b2_wr_addr), .bar2_wr_data(b2_wr_data),
    .bar2_rd_addr(b2_rd_addr), .bar2_rd_data(b2_rd_data),
    .cpl_valid, .cpl, .cpl_ack
  );

  tx_engine u_tx (
    .clk, .rst, .completer_id,
    .cpl_valid, .cpl, .cpl_ack,
    .tx_data, .tx_sof, .tx_eof, .tx_valid, .tx_ready
  );

  dma_reg_file u_bar0 (
    .clk, .rst,
    .reg_wren(b0_wren), .reg_wr_addr(b0_wr_addr), .reg_data_in(b0_wr_data),
    .reg_rd_addr(b0_rd_addr), .reg_data_out(b0_rd_data),
    .wr_host_addr(dma_wr_host_addr), .wr_fpga_addr(dma_wr_fpga_addr),
    .wr_size(dma_wr_size), .wr_start(dma_wr_start), .wr_done(dma_wr_done),
    .rd_fpga_addr(dma_rd_fpga_addr), .rd_host_addr(dma_rd_host_addr),
    .rd_size(dma_rd_size), .rd_start(dma_rd_start), .rd_done(dma_rd_done)
  );

  instr_reg_file #(.MAX_HEIGHT(MAX_HEIGHT), .MAX_WIDTH(MAX_WIDTH)) u_bar2 (
    .clk, .rst,
    .reg_wren(b2_wren), .reg_wr_addr(b2_wr_addr), .reg_data_in(b2_wr_data),
    .reg_rd_addr(b2_rd_addr), .reg_data_out(b2_rd_data)
  );
endmodule
