// sdl_hw_top: SDL-to-hardware implementation models, side by side.
//
// Holds the ping-pong server-model process and the five-process SDL example
// (PrA..PrE, external events m11/m21, responses m14/m24) in each of the four
// hardware architectures compared for it:
//   srv_*  server model, one entity with its own queue per SDL process
//   ats_*  serialized activity thread, single input queue
//   atp_*  serialized activity thread, one queue per priority class
//   atl_*  parallel activity threads with a lock on PrC's shared data
// Beside them stands the CAN physical layer (can_phy), the real-world
// example, built as a serialized activity thread with its own ports.
// The four example implementations are functionally equivalent: for events
// that arrive one at a time they produce the same responses and differ only
// in response time and area. Each has its own handshake channels (see
// hs_rx for the protocol), so they can be driven independently or with the
// same stimulus. The status outputs expose queue fill levels and the lock
// so that waiting and blocking can be observed from outside.
module sdl_hw_top
  import sdl_pkg::*;
#(
  parameter int unsigned PP_MSG_W = 8,
  parameter int unsigned PP_QLEN  = 2,
  parameter int unsigned DEPTH    = 2,
  parameter bit          M21_HIGH = 1'b0,
  parameter int unsigned CAN_TICKS_PER_BIT = 8,
  parameter int unsigned CAN_SAMPLE_TICK   = 6,
  parameter int unsigned CAN_SJW           = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // ping-pong process
  input  logic                pp_ping_req,
  input  logic [PP_MSG_W-1:0] pp_ping_data,
  output logic                pp_ping_ack,
  output logic                pp_pong_req,
  output logic [PP_MSG_W-1:0] pp_pong_data,
  input  logic                pp_pong_ack,
  output logic [15:0]         pp_n_exchanged,
  output logic [$clog2(PP_QLEN+1)-1:0] pp_q_level,
  // server model
  input  logic srv_m11_req, input  msg_t srv_m11_data, output logic srv_m11_ack,
  input  logic srv_m21_req, input  msg_t srv_m21_data, output logic srv_m21_ack,
  output logic srv_m14_req, output msg_t srv_m14_data, input  logic srv_m14_ack,
  output logic srv_m24_req, output msg_t srv_m24_data, input  logic srv_m24_ack,
  output logic [$clog2(DEPTH+1)-1:0] srv_prc_q_level,
  // serialized activity thread, single queue
  input  logic ats_m11_req, input  msg_t ats_m11_data, output logic ats_m11_ack,
  input  logic ats_m21_req, input  msg_t ats_m21_data, output logic ats_m21_ack,
  output logic ats_m14_req, output msg_t ats_m14_data, input  logic ats_m14_ack,
  output logic ats_m24_req, output msg_t ats_m24_data, input  logic ats_m24_ack,
  output logic [$clog2(DEPTH+1)-1:0] ats_q_level,
  // serialized activity thread, priority queues
  input  logic atp_m11_req, input  msg_t atp_m11_data, output logic atp_m11_ack,
  input  logic atp_m21_req, input  msg_t atp_m21_data, output logic atp_m21_ack,
  output logic atp_m14_req, output msg_t atp_m14_data, input  logic atp_m14_ack,
  output logic atp_m24_req, output msg_t atp_m24_data, input  logic atp_m24_ack,
  output logic [$clog2(DEPTH+1)-1:0] atp_q11_level,
  output logic [$clog2(DEPTH+1)-1:0] atp_q21_level,
  // parallel activity threads
  input  logic atl_m11_req, input  msg_t atl_m11_data, output logic atl_m11_ack,
  input  logic atl_m21_req, input  msg_t atl_m21_data, output logic atl_m21_ack,
  output logic atl_m14_req, output msg_t atl_m14_data, input  logic atl_m14_ack,
  output logic atl_m24_req, output msg_t atl_m24_data, input  logic atl_m24_ack,
  output logic [1:0] atl_lock_req,
  output logic [1:0] atl_lock_gnt,
  output logic [$clog2(DEPTH+1)-1:0] atl_q11_level,
  output logic [$clog2(DEPTH+1)-1:0] atl_q21_level,
  // CAN physical layer (serialized activity thread)
  input  logic       can_reset, input  logic can_sleep, input logic can_rx_sync,
  output logic       can_awoken,
  input  logic [7:0] can_controller_period,
  input  logic       can_start_stuff, input logic can_reset_stuff,
  input  logic       can_tx_valid, input logic can_tx, output logic can_tx_taken,
  output logic       can_rx_valid, output logic can_rx,
  input  logic       can_bus_level, output logic can_tx_level,
  output logic       can_rx_edge, output logic can_error, output logic [1:0] can_seg,
  output logic       can_ctrl_clock, output logic can_can_clock,
  output logic       can_sample_now, output logic can_stuff_now
);

  pingpong_process #(.MSG_W(PP_MSG_W), .QLEN(PP_QLEN)) u_pingpong (
    .clk, .rst_n,
    .ping_req(pp_ping_req), .ping_data(pp_ping_data), .ping_ack(pp_ping_ack),
    .pong_req(pp_pong_req), .pong_data(pp_pong_data), .pong_ack(pp_pong_ack),
    .n_exchanged(pp_n_exchanged), .q_level(pp_q_level)
  );

  server_net #(.DEPTH(DEPTH)) u_server (
    .clk, .rst_n,
    .m11_req(srv_m11_req), .m11_data(srv_m11_data), .m11_ack(srv_m11_ack),
    .m21_req(srv_m21_req), .m21_data(srv_m21_data), .m21_ack(srv_m21_ack),
    .m14_req(srv_m14_req), .m14_data(srv_m14_data), .m14_ack(srv_m14_ack),
    .m24_req(srv_m24_req), .m24_data(srv_m24_data), .m24_ack(srv_m24_ack),
    .prc_q_level(srv_prc_q_level)
  );

  at_serial_single #(.DEPTH(DEPTH)) u_at_single (
    .clk, .rst_n,
    .m11_req(ats_m11_req), .m11_data(ats_m11_data), .m11_ack(ats_m11_ack),
    .m21_req(ats_m21_req), .m21_data(ats_m21_data), .m21_ack(ats_m21_ack),
    .m14_req(ats_m14_req), .m14_data(ats_m14_data), .m14_ack(ats_m14_ack),
    .m24_req(ats_m24_req), .m24_data(ats_m24_data), .m24_ack(ats_m24_ack),
    .q_level(ats_q_level)
  );

  at_serial_prio #(.DEPTH(DEPTH), .M21_HIGH(M21_HIGH)) u_at_prio (
    .clk, .rst_n,
    .m11_req(atp_m11_req), .m11_data(atp_m11_data), .m11_ack(atp_m11_ack),
    .m21_req(atp_m21_req), .m21_data(atp_m21_data), .m21_ack(atp_m21_ack),
    .m14_req(atp_m14_req), .m14_data(atp_m14_data), .m14_ack(atp_m14_ack),
    .m24_req(atp_m24_req), .m24_data(atp_m24_data), .m24_ack(atp_m24_ack),
    .q11_level(atp_q11_level), .q21_level(atp_q21_level)
  );

  at_parallel #(.DEPTH(DEPTH)) u_at_parallel (
    .clk, .rst_n,
    .m11_req(atl_m11_req), .m11_data(atl_m11_data), .m11_ack(atl_m11_ack),
    .m21_req(atl_m21_req), .m21_data(atl_m21_data), .m21_ack(atl_m21_ack),
    .m14_req(atl_m14_req), .m14_data(atl_m14_data), .m14_ack(atl_m14_ack),
    .m24_req(atl_m24_req), .m24_data(atl_m24_data), .m24_ack(atl_m24_ack),
    .lock_req(atl_lock_req), .lock_gnt(atl_lock_gnt),
    .q11_level(atl_q11_level), .q21_level(atl_q21_level)
  );

  can_phy #(.TICKS_PER_BIT(CAN_TICKS_PER_BIT), .SAMPLE_TICK(CAN_SAMPLE_TICK), .SJW(CAN_SJW)) u_can_phy (
    .clk, .rst_n,
    .controller_period(can_controller_period),
    .reset(can_reset), .sleep(can_sleep), .rx_sync(can_rx_sync), .awoken(can_awoken),
    .start_stuff(can_start_stuff), .reset_stuff(can_reset_stuff),
    .tx_valid(can_tx_valid), .tx(can_tx), .tx_taken(can_tx_taken),
    .rx_valid(can_rx_valid), .rx(can_rx),
    .bus_level(can_bus_level), .tx_level(can_tx_level),
    .rx_edge(can_rx_edge), .error(can_error), .seg(can_seg),
    .ctrl_clock(can_ctrl_clock), .can_clock(can_can_clock),
    .sample_now(can_sample_now), .stuff_now(can_stuff_now)
  );

endmodule
