// sk_pkg: types and constants shared by the Sidekick PCI-E image co-processor.
//
// TLP header fields follow the PCI-E transaction-layer layout (a 3DW header for
// 32-bit addressed memory requests and for completions). The BAR2 address map,
// which splits the word address into a region select and an index, is this
// design's own choice: the driver that talks to BAR2 does all the addressing,
// so any fixed split works as long as host software and hardware agree.
package sk_pkg;

  // ---- TLP format/type byte (DW0 bits 31:24) ----
  localparam logic [7:0] FMT_TYPE_MRD32 = 8'h00;  // memory read, 3DW, no data
  localparam logic [7:0] FMT_TYPE_MWR32 = 8'h40;  // memory write, 3DW, with data
  localparam logic [7:0] FMT_TYPE_CPLD  = 8'h4A;  // completion with data, 3DW

  // BAR-hit vector: one bit per base address register
  localparam int unsigned NUM_BARS = 6;
  localparam int unsigned BAR0     = 0;  // DMA register file
  localparam int unsigned BAR2     = 2;  // instruction register file (custom logic)

  // What the receive engine hands to the transmit engine for one completion.
  typedef struct packed {
    logic [15:0] requester_id;
    logic [7:0]  tag;
    logic [2:0]  tc;
    logic [1:0]  attr;
    logic [6:0]  lower_addr;
    logic [31:0] data;
  } cpl_req_t;

  // ---- BAR2 (instruction register file) word-address map ----
  // word address bits [19:17] select the region, bits [16:0] index it.
  localparam int unsigned RF_IDX_BITS = 17;
  typedef enum logic [2:0] {
    RGN_MAIN = 3'd0,  // main_mem: input image, one pixel per word (bits 7:0), write only
    RGN_AVG  = 3'd1,  // avg_mem: result image, one 16-bit value per word, read only
    RGN_CTRL = 3'd2   // control_mem: edgeReset (index 0, R/W), isDone (index 1, R)
  } rf_region_e;
  localparam logic [RF_IDX_BITS-1:0] CTRL_EDGE_RESET = 'd0;
  localparam logic [RF_IDX_BITS-1:0] CTRL_IS_DONE    = 'd1;

  // ---- BAR0 (DMA register file) word offsets ----
  localparam logic [4:0] DMA_WR_HOST_ADDR = 5'd0;  // host->FPGA: source address in host memory
  localparam logic [4:0] DMA_WR_FPGA_ADDR = 5'd1;  // host->FPGA: destination offset in board RAM
  localparam logic [4:0] DMA_WR_SIZE      = 5'd2;  // host->FPGA: bytes
  localparam logic [4:0] DMA_RD_FPGA_ADDR = 5'd3;  // FPGA->host: source offset in board RAM
  localparam logic [4:0] DMA_RD_HOST_ADDR = 5'd4;  // FPGA->host: destination address in host memory
  localparam logic [4:0] DMA_RD_SIZE      = 5'd5;  // FPGA->host: bytes
  localparam logic [4:0] DMA_CTRL_STAT    = 5'd6;  // bit0 wr start, bit1 wr done, bit2 rd start, bit3 rd done

endpackage
