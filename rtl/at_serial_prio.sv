// at_serial_prio: "serialized activity thread - priority queue" architecture.
//
// As at_serial_single, but the two external events belong to two priority
// classes, each with its own input message queue. Whenever the engine is
// free it takes the next event from the highest-priority queue that is not
// empty (prio_select), so an event of the high class waits for at most the
// one event already in execution, not for a whole queue. Which event is
// the high class is fixed at build time by M21_HIGH (0: m11 first, the
// default, 1: m21 first); the document assigns classes by deadline but gives
// no deadline values, so the default is this design's choice. Response time
// of an isolated event is the same 9 cycles as in the single-queue version.
module at_serial_prio
  import sdl_pkg::*;
#(
  parameter int unsigned DEPTH    = 2,
  parameter bit          M21_HIGH = 1'b0
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
  output logic [$clog2(DEPTH+1)-1:0] q11_level,
  output logic [$clog2(DEPTH+1)-1:0] q21_level
);

  logic [1:0] rx_valid, rx_ready, q_valid, q_ready, tx_valid, tx_ready;
  msg_t [1:0] rx_data, q_data;
  logic [1:0] p_valid, p_ready;   // queues in priority order, 0 = highest
  msg_t [1:0] p_data;
  logic       e_valid, e_ready;
  msg_t       e_in, e_data;
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

  msg_queue #(.W(MSG_W), .DEPTH(DEPTH)) u_q11 (
    .clk, .rst_n,
    .in_valid(rx_valid[0]), .in_data(rx_data[0]), .in_ready(rx_ready[0]),
    .out_valid(q_valid[0]), .out_data(q_data[0]), .out_ready(q_ready[0]),
    .level(q11_level)
  );
  msg_queue #(.W(MSG_W), .DEPTH(DEPTH)) u_q21 (
    .clk, .rst_n,
    .in_valid(rx_valid[1]), .in_data(rx_data[1]), .in_ready(rx_ready[1]),
    .out_valid(q_valid[1]), .out_data(q_data[1]), .out_ready(q_ready[1]),
    .level(q21_level)
  );

  // order the queues by priority class
  assign p_valid = M21_HIGH ? {q_valid[0], q_valid[1]} : q_valid;
  assign p_data  = M21_HIGH ? {q_data[0],  q_data[1]}  : q_data;
  assign q_ready = M21_HIGH ? {p_ready[0], p_ready[1]} : p_ready;

  prio_select #(.W(MSG_W), .N(2)) u_prio (
    .in_valid(p_valid), .in_data(p_data), .in_ready(p_ready),
    .out_valid(e_valid), .out_data(e_in), .out_ready(e_ready)
  );

  at_engine u_engine (
    .clk, .rst_n,
    .ev_valid(e_valid), .ev_data(e_in), .ev_ready(e_ready),
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
