// dma_reg_file: the BAR0 register file through which the host driver sets up
// and starts DMA transfers between host memory and the board's DDR2 memory.
//
// The host port is the same word-addressed port as the BAR2 register file
// (reg_wren/reg_wr_addr/reg_data_in for writes, reg_rd_addr in and reg_data_out
// one clk edge later for reads); only address bits 4:0 decode, BAR0 being 128
// bytes. Word offsets (see sk_pkg):
//   0 host->FPGA source address in host memory    3 FPGA->host source offset in board RAM
//   1 host->FPGA destination offset in board RAM  4 FPGA->host destination address in host memory
//   2 host->FPGA size in bytes                     5 FPGA->host size in bytes
//   6 control/status: bit0 host->FPGA start (write 1) / busy (read),
//     bit1 host->FPGA done, bit2 FPGA->host start / busy, bit3 FPGA->host done
// Writing a start bit pulses wr_start or rd_start for one cycle, sets busy and
// clears done; the DMA engine's wr_done/rd_done pulse clears busy and sets done,
// which the driver polls. Separate registers for the two directions allow a
// transfer each way at once. Unmapped words read 0.
//
// That there are host address, board address, size and a control register with
// a start bit and a pollable done flag for each direction follows the source
// design; the offsets and bit positions are this design's own.
module dma_reg_file
  import sk_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wren,
  input  logic [31:0] reg_wr_addr,
  input  logic [31:0] reg_data_in,
  input  logic [31:0] reg_rd_addr,
  output logic [31:0] reg_data_out,
  // to / from the DMA engine
  output logic [31:0] wr_host_addr,
  output logic [31:0] wr_fpga_addr,
  output logic [31:0] wr_size,
  output logic        wr_start,
  input  logic        wr_done,
  output logic [31:0] rd_fpga_addr,
  output logic [31:0] rd_host_addr,
  output logic [31:0] rd_size,
  output logic        rd_start,
  input  logic        rd_done
);
  logic [4:0] wa, ra;
  logic       wr_busy, wr_fin, rd_busy, rd_fin;
  logic       wr_go, rd_go;

  assign wa    = reg_wr_addr[4:0];
  assign ra    = reg_rd_addr[4:0];
  assign wr_go = reg_wren && wa == DMA_CTRL_STAT && reg_data_in[0];
  assign rd_go = reg_wren && wa == DMA_CTRL_STAT && reg_data_in[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_host_addr <= '0; wr_fpga_addr <= '0; wr_size <= '0;
      rd_fpga_addr <= '0; rd_host_addr <= '0; rd_size <= '0;
      wr_start <= 1'b0; rd_start <= 1'b0;
      wr_busy  <= 1'b0; wr_fin   <= 1'b0;
      rd_busy  <= 1'b0; rd_fin   <= 1'b0;
    end else begin
      if (reg_wren) begin
        unique case (wa)
          DMA_WR_HOST_ADDR: wr_host_addr <= reg_data_in;
          DMA_WR_FPGA_ADDR: wr_fpga_addr <= reg_data_in;
          DMA_WR_SIZE:      wr_size      <= reg_data_in;
          DMA_RD_FPGA_ADDR: rd_fpga_addr <= reg_data_in;
          DMA_RD_HOST_ADDR: rd_host_addr <= reg_data_in;
          DMA_RD_SIZE:      rd_size      <= reg_data_in;
          default: ;
        endcase
      end
      wr_start <= wr_go && !wr_busy;
      rd_start <= rd_go && !rd_busy;
      if (wr_go && !wr_busy) begin wr_busy <= 1'b1; wr_fin <= 1'b0; end
      else if (wr_done)      begin wr_busy <= 1'b0; wr_fin <= 1'b1; end
      if (rd_go && !rd_busy) begin rd_busy <= 1'b1; rd_fin <= 1'b0; end
      else if (rd_done)      begin rd_busy <= 1'b0; rd_fin <= 1'b1; end
    end
  end

  always_ff @(posedge clk) begin
    unique case (ra)
      DMA_WR_HOST_ADDR: reg_data_out <= wr_host_addr;
      DMA_WR_FPGA_ADDR: reg_data_out <= wr_fpga_addr;
      DMA_WR_SIZE:      reg_data_out <= wr_size;
      DMA_RD_FPGA_ADDR: reg_data_out <= rd_fpga_addr;
      DMA_RD_HOST_ADDR: reg_data_out <= rd_host_addr;
      DMA_RD_SIZE:      reg_data_out <= rd_size;
      DMA_CTRL_STAT:    reg_data_out <= {28'd0, rd_fin, rd_busy, wr_fin, wr_busy};
      default:          reg_data_out <= '0;
    endcase
  end
endmodule
