// rx_engine: receive engine of the data controller. It decodes the transaction
// layer packets (TLPs) that the PCI-E endpoint delivers and turns memory
// requests to BAR0 and BAR2 into simple register-file accesses.
//
// Input stream: one 32-bit header or data word (DW) per beat, rx_valid/rx_ready
// handshake, rx_sof on the first DW and rx_eof on the last, and rx_bar_hit (one
// bit per BAR, sampled with the first DW) telling which BAR the address fell in.
// Supported TLPs, 3DW header:
//   DW0 [31:24] fmt/type (0x40 memory write, 0x00 memory read), [22:20] TC,
//       [13:12] attributes, [9:0] length in DW
//   DW1 [31:16] requester ID, [15:8] tag, [7:4] last-DW and [3:0] first-DW byte enables
//   DW2 [31:2]  DW address
// A memory write stores every data DW into the selected register file at
// consecutive word addresses (one reg_wren pulse per DW). A memory read stalls
// the stream, presents the word address to the register file, waits RD_WAIT
// cycles, takes the word and hands a completion request to the transmit engine,
// then waits for cpl_ack before accepting the next TLP. Every other TLP, and
// requests that hit neither BAR0 nor BAR2, are dropped.
//
// The two-BAR routing and the header layout follow the source design; the
// 32-bit stream, the word-address outputs (byte address bits 31:2 masked to the
// BAR's size), whole-word writes regardless of byte enables, and one-DW reads
// are this design's own simplifications.
module rx_engine
  import sk_pkg::*;
#(
  parameter int unsigned BAR0_AW = 5,   // BAR0 is 128 bytes = 32 words
  parameter int unsigned BAR2_AW = 20,  // BAR2 decodes 2^20 words
  parameter int unsigned RD_WAIT = 2    // cycles from read address to read data
) (
  input  logic                clk,
  input  logic                rst,
  // TLP stream from the endpoint
  input  logic [31:0]         rx_data,
  input  logic                rx_sof,
  input  logic                rx_eof,
  input  logic                rx_valid,
  input  logic [NUM_BARS-1:0] rx_bar_hit,
  output logic                rx_ready,
  // BAR0 register-file port
  output logic                bar0_wren,
  output logic [31:0]         bar0_wr_addr,
  output logic [31:0]         bar0_wr_data,
  output logic [31:0]         bar0_rd_addr,
  input  logic [31:0]         bar0_rd_data,
  // BAR2 register-file port
  output logic                bar2_wren,
  output logic [31:0]         bar2_wr_addr,
  output logic [31:0]         bar2_wr_data,
  output logic [31:0]         bar2_rd_addr,
  input  logic [31:0]         bar2_rd_data,
  // completion request to the transmit engine
  output logic                cpl_valid,
  output cpl_req_t            cpl,
  input  logic                cpl_ack
);
  typedef enum logic [2:0] {S_IDLE, S_H1, S_H2, S_DATA, S_RD, S_CPL, S_DROP} state_e;
  state_e state;

  logic        is_wr, is_rd, to_bar0, to_bar2;
  logic [29:0] dw_addr;
  logic [$clog2(RD_WAIT+1)-1:0] wait_cnt;
  logic        beat;

  assign beat     = rx_valid && rx_ready;
  assign rx_ready = (state inside {S_IDLE, S_H1, S_H2, S_DATA, S_DROP});

  assign bar0_rd_addr = 32'(dw_addr[BAR0_AW-1:0]);
  assign bar2_rd_addr = 32'(dw_addr[BAR2_AW-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      bar0_wren <= 1'b0;
      bar2_wren <= 1'b0;
      cpl_valid <= 1'b0;
      is_wr     <= 1'b0;
      is_rd     <= 1'b0;
      to_bar0   <= 1'b0;
      to_bar2   <= 1'b0;
      dw_addr   <= '0;
      wait_cnt  <= '0;
      cpl       <= '0;
      bar0_wr_addr <= '0;
      bar0_wr_data <= '0;
      bar2_wr_addr <= '0;
      bar2_wr_data <= '0;
    end else begin
      bar0_wren <= 1'b0;
      bar2_wren <= 1'b0;
      unique case (state)
        S_IDLE: if (beat && rx_sof) begin
          is_wr    <= rx_data[31:24] == FMT_TYPE_MWR32;
          is_rd    <= rx_data[31:24] == FMT_TYPE_MRD32;
          to_bar0  <= rx_bar_hit[BAR0];
          to_bar2  <= rx_bar_hit[BAR2] && !rx_bar_hit[BAR0];
          cpl.tc   <= rx_data[22:20];
          cpl.attr <= rx_data[13:12];
          state    <= rx_eof ? S_IDLE : S_H1;
        end
        S_H1: if (beat) begin
          cpl.requester_id <= rx_data[31:16];
          cpl.tag          <= rx_data[15:8];
          state            <= rx_eof ? S_IDLE : S_H2;
        end
        S_H2: if (beat) begin
          dw_addr        <= rx_data[31:2];
          cpl.lower_addr <= {rx_data[6:2], 2'b00};
          wait_cnt       <= '0;
          if (!(to_bar0 || to_bar2) || !(is_wr || is_rd))
            state <= rx_eof ? S_IDLE : S_DROP;
          else if (is_rd)
            state <= rx_eof ? S_RD : S_DROP;
          else
            state <= rx_eof ? S_IDLE : S_DATA;
        end
        S_DATA: if (beat) begin
          if (to_bar0) begin
            bar0_wren    <= 1'b1;
            bar0_wr_addr <= 32'(dw_addr[BAR0_AW-1:0]);
            bar0_wr_data <= rx_data;
          end else begin
            bar2_wren    <= 1'b1;
            bar2_wr_addr <= 32'(dw_addr[BAR2_AW-1:0]);
            bar2_wr_data <= rx_data;
          end
          dw_addr <= dw_addr + 30'd1;
          if (rx_eof) state <= S_IDLE;
        end
        S_RD: begin
          if (32'(wait_cnt) == RD_WAIT) begin
            cpl.data  <= to_bar0 ? bar0_rd_data : bar2_rd_data;
            cpl_valid <= 1'b1;
            state     <= S_CPL;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_CPL: if (cpl_ack) begin
          cpl_valid <= 1'b0;
          state     <= S_IDLE;
        end
        S_DROP: if (beat && rx_eof) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a completion request is held until the transmit engine has sent it
  ap_cpl_hold: assert property (@(posedge clk) disable iff (rst)
    cpl_valid && !cpl_ack |=> cpl_valid && $stable(cpl));
endmodule
