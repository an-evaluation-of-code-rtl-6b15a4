// hs_tx: output interface of the hardware run-time system.
//
// Takes one message from a valid/ready stream (the EFSM side) and sends it
// on a channel with the four-phase req/ack handshake described in hs_rx.
// The message is captured in the first cycle and put on the channel, with
// ch_req raised, in the second, which gives the two cycles for the output
// interface that the ping-pong measurement reports. A new message is taken
// only after ch_ack has returned low. The handshake style is this design's
// choice. Active-low synchronous reset.
module hs_tx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // EFSM side
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  // channel side
  output logic         ch_req,
  output logic [W-1:0] ch_data,
  input  logic         ch_ack
);

  typedef enum logic [1:0] {TX_IDLE, TX_CONV, TX_WAIT_ACK, TX_WAIT_ACKLOW} tx_state_e;

  tx_state_e    st;
  logic [W-1:0] buf_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= TX_IDLE;
      buf_q   <= '0;
      ch_req  <= 1'b0;
      ch_data <= '0;
    end else begin
      case (st)
        TX_IDLE: if (in_valid) begin
          buf_q <= in_data;
          st    <= TX_CONV;
        end
        TX_CONV: begin
          ch_data <= buf_q;
          ch_req  <= 1'b1;
          st      <= TX_WAIT_ACK;
        end
        TX_WAIT_ACK: if (ch_ack) begin
          ch_req <= 1'b0;
          st     <= TX_WAIT_ACKLOW;
        end
        TX_WAIT_ACKLOW: if (!ch_ack) st <= TX_IDLE;
        default: st <= TX_IDLE;
      endcase
    end
  end

  assign in_ready = (st == TX_IDLE);

endmodule
