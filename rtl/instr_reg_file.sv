// instr_reg_file: the BAR2 register file, the host's window onto the image
// co-processor.
//
// The host sees a plain word-addressed memory: a write arrives as reg_wren with
// reg_wr_addr/reg_data_in, a read as reg_rd_addr, answered on reg_data_out one
// clk edge later. Bits [19:17] of a word address pick a region (see sk_pkg):
//   main_mem (76800 x 8 bits)   the input image, one pixel in bits 7:0 of each
//                               word; written by the host, read by the sequencer
//   avg_mem  (76800 x 16 bits)  the edge-detected image; written by the sequencer,
//                               read by the host
//   control  index 0: edgeReset (32-bit, R/W, 1 after reset); index 1: isDone (R),
//            which reads 0 while edgeReset is non-zero
// Reads of main_mem and of unmapped words return 0.
//
// Use: load the image while edgeReset is non-zero, write 0 to edgeReset to start,
// poll isDone, read avg_mem. Writing edgeReset non-zero again clears the
// sequencer for the next image.
//
// The Sobel sequencer and detector run on ourClk, made from clk by clk_div (one
// quarter of the clk rate). The two block RAMs each have one port per clock
// domain; edgeReset and isDone cross between the two related clocks directly.
// The ports, the two memories and their sizes, edgeReset/isDone and the divided
// clock follow the source design; the address map and the read latency are this
// design's own.
module instr_reg_file
  import sk_pkg::*;
#(
  parameter int unsigned MAX_HEIGHT = 320,
  parameter int unsigned MAX_WIDTH  = 240
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wren,
  input  logic [31:0] reg_wr_addr,
  input  logic [31:0] reg_data_in,
  input  logic [31:0] reg_rd_addr,
  output logic [31:0] reg_data_out
);
  localparam int unsigned DEPTH = MAX_HEIGHT * MAX_WIDTH;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic                   our_clk;
  rf_region_e             wr_rgn, rd_rgn, rd_rgn_q;
  logic [RF_IDX_BITS-1:0] wr_idx, rd_idx;
  logic [31:0]            edge_reset_q;
  logic [31:0]            ctrl_q;
  logic                   is_done;
  logic                   edge_reset;

  logic          mm_rd_en;
  logic [AW-1:0] mm_rd_addr;
  logic [7:0]    mm_rd_data;
  logic [31:0]   matrix [9];
  logic [31:0]   sobel_out;
  logic          am_wr_en;
  logic [AW-1:0] am_wr_addr;
  logic [15:0]   am_wr_data, am_rd_data;

  assign wr_rgn = rf_region_e'(reg_wr_addr[RF_IDX_BITS +: 3]);
  assign wr_idx = reg_wr_addr[RF_IDX_BITS-1:0];
  assign rd_rgn = rf_region_e'(reg_rd_addr[RF_IDX_BITS +: 3]);
  assign rd_idx = reg_rd_addr[RF_IDX_BITS-1:0];
  assign edge_reset = |edge_reset_q;

  clk_div u_clk_div (.clk(clk), .rst(rst), .div_clk(our_clk));

  dp_ram #(.WIDTH(8), .DEPTH(DEPTH)) main_mem (
    .wr_clk (clk),
    .wr_en  (reg_wren && wr_rgn == RGN_MAIN),
    .wr_addr(AW'(wr_idx)),
    .wr_data(reg_data_in[7:0]),
    .rd_clk (our_clk),
    .rd_en  (mm_rd_en),
    .rd_addr(mm_rd_addr),
    .rd_data(mm_rd_data)
  );

  dp_ram #(.WIDTH(16), .DEPTH(DEPTH)) avg_mem (
    .wr_clk (our_clk),
    .wr_en  (am_wr_en),
    .wr_addr(am_wr_addr),
    .wr_data(am_wr_data),
    .rd_clk (clk),
    .rd_en  (1'b1),
    .rd_addr(AW'(rd_idx)),
    .rd_data(am_rd_data)
  );

  sobel_ctrl #(.MAX_HEIGHT(MAX_HEIGHT), .MAX_WIDTH(MAX_WIDTH)) u_ctrl (
    .clk        (our_clk),
    .edge_reset (edge_reset),
    .mem_rd_en  (mm_rd_en),
    .mem_rd_addr(mm_rd_addr),
    .mem_rd_data(mm_rd_data),
    .matrix     (matrix),
    .sobel_out  (sobel_out),
    .res_wr_en  (am_wr_en),
    .res_wr_addr(am_wr_addr),
    .res_wr_data(am_wr_data),
    .is_done    (is_done)
  );

  sobel_sed u_sed (
    .p0(matrix[0]), .p1(matrix[1]), .p2(matrix[2]),
    .p3(matrix[3]),                 .p5(matrix[5]),
    .p6(matrix[6]), .p7(matrix[7]), .p8(matrix[8]),
    .sobel_out(sobel_out)
  );

  // control registers (PCI-E clock)
  always_ff @(posedge clk) begin
    if (rst) edge_reset_q <= 32'd1;
    else if (reg_wren && wr_rgn == RGN_CTRL && wr_idx == CTRL_EDGE_RESET)
      edge_reset_q <= reg_data_in;
  end

  // read path: one clk edge from reg_rd_addr to reg_data_out
  always_ff @(posedge clk) begin
    rd_rgn_q <= rd_rgn;
    if (rd_rgn == RGN_CTRL && rd_idx == CTRL_EDGE_RESET) ctrl_q <= edge_reset_q;
    else if (rd_rgn == RGN_CTRL && rd_idx == CTRL_IS_DONE) ctrl_q <= 32'(is_done && !edge_reset);
    else ctrl_q <= '0;
  end

  always_comb begin
    unique case (rd_rgn_q)
      RGN_AVG:  reg_data_out = 32'(am_rd_data);
      RGN_CTRL: reg_data_out = ctrl_q;
      default:  reg_data_out = '0;
    endcase
  end
endmodule
