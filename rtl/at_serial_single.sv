// at_serial_single: "serialized activity thread - single queue" architecture.
//
// The SDL example with both activity threads in one sequential engine
// (at_engine) fed by a single input message queue. The external events m11
// and m21 arrive on their own handshake channels; their input interfaces
// are multiplexed into the one queue in arrival order, and the engine
// processes one event at a time. Results leave on the m14 and m24 channels.
// An event therefore waits for every event queued before it, whatever its
// deadline. Only the border signals of the model have interfaces; no
// messages are sent between the SDL processes. Response time of an isolated
// event: 3 cycles into the queue, 1 to take it, 3 tasks, then the 2-cycle
// output interface, i.e. ch_req rises 9 cycles after the event's ch_req is
// first seen.
module at_serial_single
  import sdl_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  m11_req,
  input  msg_t  m11_data,
  output logic  m11_ack,
  input  logic  m21_req,
  input  msg_t  m21_data,
  output logic  m21_ack,
  output logic  m14_req,
  output msg_t  m14_data,
  input  logic  m14_ack,
  output logic  m24_req,
  output msg_t  m24_data,
  input  logic  m24_ack,
  output logic [$clog2(DEPTH+1)-1:0] q_level
);

  logic [1:0] rx_valid, rx_ready, tx_valid, tx_ready;
  msg_t [1:0] rx_data;
  logic       m_valid, m_ready, q_valid, q_ready;
  msg_t       m_data, q_data, e_data;
  data_t      var_c;
  pre_state_e st_e;

  hs_rx #(.W(MSG_W)) u_rx11 (
    .clk, .rst_n, .ch_req(m11_req), .ch_data(m11_data), .ch_ack(m11_ack),
    .out_valid(rx_valid[0]), .out_data(rx_data[0]), .out_ready(rx_ready[0])
  );
  hs_rx #(.W(MSG_W)) u_rx21 (
    .clk, .rst_n, .ch_req(m21_req), .ch_data(m21_data), .ch_ack(m21_ack),
    .out_valid(rx_valid[1]), .out_data(rx_data[1]), .out_ready(rx_ready[1])
  );

  stream_arb #(.W(MSG_W), .N(2)) u_mux (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_data(rx_data), .in_ready(rx_ready),
    .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready)
  );

  msg_queue #(.W(MSG_W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(m_valid), .in_data(m_data), .in_ready(m_ready),
    .out_valid(q_valid), .out_data(q_data), .out_ready(q_ready),
    .level(q_level)
  );

  at_engine u_engine (
    .clk, .rst_n,
    .ev_valid(q_valid), .ev_data(q_data), .ev_ready(q_ready),
    .o_valid(tx_valid), .o_data(e_data), .o_ready(tx_ready),
    .var_c, .st_e
  );

  hs_tx #(.W(MSG_W)) u_tx14 (
    .clk, .rst_n, .in_valid(tx_valid[0]), .in_data(e_data), .in_ready(tx_ready[0]),
    .ch_req(m14_req), .ch_data(m14_data), .ch_ack(m14_ack)
  );
  hs_tx #(.W(MSG_W)) u_tx24 (
    .clk, .rst_n, .in_valid(tx_valid[1]), .in_data(e_data), .in_ready(tx_ready[1]),
    .ch_req(m24_req), .ch_data(m24_data), .ch_ack(m24_ack)
  );

endmodule
