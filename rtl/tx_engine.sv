// tx_engine: transmit engine of the data controller. It turns a completion
// request from the receive engine into a completion-with-data TLP for the
// PCI-E endpoint.
//
// The packet is four 32-bit words on a valid/ready stream, tx_sof on the first
// and tx_eof on the last:
//   DW0 fmt/type 0x4A, TC and attributes copied from the request, length 1
//   DW1 completer ID, status 000 (successful), byte count 4
//   DW2 requester ID and tag copied from the request, lower address
//   DW3 the data word
// The request (cpl_valid with cpl) must stay stable until cpl_ack, which pulses
// for one cycle in the cycle the last word is accepted. A new request is taken
// one cycle after the previous one was acknowledged. The header layout is the
// PCI-E completion format; sending one completion of one word per read is this
// design's choice, matching the one-word reads of the receive engine.
module tx_engine
  import sk_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] completer_id,
  input  logic        cpl_valid,
  input  cpl_req_t    cpl,
  output logic        cpl_ack,
  output logic [31:0] tx_data,
  output logic        tx_sof,
  output logic        tx_eof,
  output logic        tx_valid,
  input  logic        tx_ready
);
  logic [1:0] beat_no;
  logic       busy;

  assign tx_valid = busy;
  assign tx_sof   = busy && beat_no == 2'd0;
  assign tx_eof   = busy && beat_no == 2'd3;
  assign cpl_ack  = busy && tx_ready && beat_no == 2'd3;

  always_comb begin
    unique case (beat_no)
      2'd0:    tx_data = {FMT_TYPE_CPLD, 1'b0, cpl.tc, 4'b0000, 1'b0, 1'b0, cpl.attr, 2'b00, 10'd1};
      2'd1:    tx_data = {completer_id, 3'b000, 1'b0, 12'd4};
      2'd2:    tx_data = {cpl.requester_id, cpl.tag, 1'b0, cpl.lower_addr};
      default: tx_data = cpl.data;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      beat_no <= '0;
    end else if (!busy) begin
      busy    <= cpl_valid && !cpl_ack;
      beat_no <= '0;
    end else if (tx_ready) begin
      beat_no <= beat_no + 2'd1;
      if (beat_no == 2'd3) busy <= 1'b0;
    end
  end

  ap_tx_hold: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));
endmodule
