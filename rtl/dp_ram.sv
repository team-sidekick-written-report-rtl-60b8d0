// dp_ram: block RAM with one write port and one read port on independent clocks.
//
// Used for the two image memories of the instruction register file: main_mem
// (DEPTH bytes of input image, written from the PCI-E clock, read by the Sobel
// sequencer on ourClk) and avg_mem (DEPTH 16-bit results, written on ourClk,
// read back on the PCI-E clock). The read is synchronous: rd_data holds the word
// at rd_addr one rd_clk edge after rd_en. Contents are not initialised, as in a
// block RAM. The defaults are the 320x240 image of one byte per pixel.
module dp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 76800,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk)
    if (wr_en && wr_addr < AW'(DEPTH)) mem[wr_addr] <= wr_data;

  always_ff @(posedge rd_clk)
    if (rd_en) rd_data <= (rd_addr < AW'(DEPTH)) ? mem[rd_addr] : '0;
endmodule
