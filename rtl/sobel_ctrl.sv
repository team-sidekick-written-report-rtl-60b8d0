// sobel_ctrl: the sequencer that feeds the Sobel edge detector from main_mem and
// stores its results in avg_mem.
//
// It walks every 3x3 grid of the image in row-major order. (row, col) is the
// grid's top-left pixel; pixel (r, c) lives at word r*MAX_WIDTH + c of main_mem.
// For each grid a 4-bit registerCount steps through the nine pixels:
//   count 0..8  read pixel (row + count/3, col + count%3) from main_mem
//   count 1..9  store the pixel read one cycle earlier in matrix[count-1]
//   count 10    (state A) the grid is complete: clear the count, raise
//               writePixel, note the grid's centre address, advance col, or
//               wrap col to 0 and advance row at the end of a row, or raise
//               isDone after the last grid
//   writePixel  (state C) in the next cycle avg_mem[centre] <= sobel_out[15:0]
// One grid therefore takes 11 cycles. While edge_reset is high every register
// is held at 0; processing starts when it falls and stops with is_done high
// until edge_reset is raised again. Border pixels of avg_mem are never written.
//
// The three states, the register names and the row-major walk follow the source
// design. The exact cycle of each step, the one-cycle read latency and the
// choice to write the result at the grid's centre are this design's own.
//
// Timing: everything is on clk (the divided co-processor clock). mem_rd_data
// must hold the word addressed by mem_rd_addr one clk edge after mem_rd_en.
module sobel_ctrl #(
  parameter int unsigned MAX_HEIGHT = 320,  // rows of the image
  parameter int unsigned MAX_WIDTH  = 240,  // pixels per row (row stride)
  localparam int unsigned AW = $clog2(MAX_HEIGHT * MAX_WIDTH)
) (
  input  logic          clk,
  input  logic          edge_reset,
  // main_mem read port
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  logic [7:0]    mem_rd_data,
  // to / from the Sobel edge detector
  output logic [31:0]   matrix [9],
  input  logic [31:0]   sobel_out,
  // avg_mem write port
  output logic          res_wr_en,
  output logic [AW-1:0] res_wr_addr,
  output logic [15:0]   res_wr_data,
  output logic          is_done
);
  localparam int unsigned RW = $clog2(MAX_HEIGHT);
  localparam int unsigned CW = $clog2(MAX_WIDTH);

  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [3:0]    register_count;
  logic          write_pixel;
  logic [AW-1:0] out_addr;
  logic [1:0]    dr, dc;
  logic [AW-1:0] matrix_write_addr;  // main_mem address of the pixel being read

  // offset of pixel number register_count inside the grid
  always_comb begin
    unique case (register_count)
      4'd0, 4'd1, 4'd2: dr = 2'd0;
      4'd3, 4'd4, 4'd5: dr = 2'd1;
      default:          dr = 2'd2;
    endcase
    unique case (register_count)
      4'd0, 4'd3, 4'd6: dc = 2'd0;
      4'd1, 4'd4, 4'd7: dc = 2'd1;
      default:          dc = 2'd2;
    endcase
    matrix_write_addr = AW'((32'(row) + 32'(dr)) * MAX_WIDTH + 32'(col) + 32'(dc));
  end

  assign mem_rd_en   = !edge_reset && !is_done && register_count < 4'd9;
  assign mem_rd_addr = matrix_write_addr;

  always_ff @(posedge clk) begin
    if (edge_reset) begin
      row            <= '0;
      col            <= '0;
      register_count <= '0;
      write_pixel    <= 1'b0;
      is_done        <= 1'b0;
      out_addr       <= '0;
      for (int i = 0; i < 9; i++) matrix[i] <= '0;
    end else if (is_done) begin
      write_pixel <= 1'b0;
    end else begin
      write_pixel <= 1'b0;
      if (register_count > 4'd9) begin
        // state A: grid complete
        register_count <= '0;
        write_pixel    <= 1'b1;
        out_addr       <= AW'((32'(row) + 1) * MAX_WIDTH + 32'(col) + 1);
        if (32'(row) == MAX_HEIGHT - 3 && 32'(col) == MAX_WIDTH - 3) begin
          is_done <= 1'b1;
        end else if (32'(col) == MAX_WIDTH - 3) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end else begin
        // state B: read the next pixel, store the previous one
        register_count <= register_count + 4'd1;
        if (register_count != 4'd0)
          matrix[register_count - 4'd1] <= 32'(mem_rd_data);
      end
    end
  end

  // state C: store the result of the finished grid
  assign res_wr_en   = write_pixel;
  assign res_wr_addr = out_addr;
  assign res_wr_data = sobel_out[15:0];

  // a grid is loaded one pixel per cycle, so the count never skips 10
  ap_count_range: assert property (@(posedge clk) disable iff (edge_reset) register_count <= 4'd10);
endmodule
