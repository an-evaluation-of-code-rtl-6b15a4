// hs_rx: input interface of the hardware run-time system.
//
// Receives one SDL message per four-phase handshake on a channel and offers
// it on a valid/ready stream towards the message queue. Channel protocol:
// the sender drives ch_data and raises ch_req; the receiver raises ch_ack
// once the data is captured; the sender then drops ch_req and the receiver
// drops ch_ack, which ends the transfer. ch_data must be stable while ch_req
// is high. ch_req and ch_data are first registered (the channel may come from
// another entity), so a message is offered on out_valid two clock cycles
// after ch_req is first seen high. Together with the one-cycle message queue
// this gives the three cycles for "input interface and message queue" that
// the ping-pong measurement reports. The four-phase protocol, the input
// register and the reset values are this design's choices; the document
// only names "a handshake protocol". Active-low synchronous reset.
module hs_rx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // channel side
  input  logic         ch_req,
  input  logic [W-1:0] ch_data,
  output logic         ch_ack,
  // queue side
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);

  typedef enum logic [1:0] {RX_IDLE, RX_PUSH, RX_WAIT_LOW} rx_state_e;

  rx_state_e    st;
  logic         req_q;
  logic [W-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= RX_IDLE;
      req_q    <= 1'b0;
      data_q   <= '0;
      ch_ack   <= 1'b0;
      out_data <= '0;
    end else begin
      req_q  <= ch_req;
      data_q <= ch_data;
      case (st)
        RX_IDLE: if (req_q) begin
          out_data <= data_q;
          ch_ack   <= 1'b1;
          st       <= RX_PUSH;
        end
        RX_PUSH: if (out_ready) st <= RX_WAIT_LOW;
        RX_WAIT_LOW: if (!req_q) begin
          ch_ack <= 1'b0;
          st     <= RX_IDLE;
        end
        default: st <= RX_IDLE;
      endcase
    end
  end

  assign out_valid = (st == RX_PUSH);

endmodule
