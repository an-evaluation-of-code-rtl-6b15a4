// server_net: server-model implementation of the five-process SDL example.
//
// Every SDL process is its own entity with its own queue (server_process):
// PrA receives m11 from the environment and sends m12 to PrC; PrB receives
// m21 and sends m22 to PrC; PrC sends m13 to PrD and m23 to PrE; PrD and PrE
// return m14 and m24 to the environment. All channels, internal and
// external, use the four-phase handshake of hs_rx/hs_tx with messages of
// type sdl_pkg::msg_t. The entities work in parallel and form a pipeline,
// so several events can be in flight, but the response time to one event is
// the sum of the three entities it passes: 21 cycles from the event's
// request to the response's request, 7 per entity as in the ping-pong
// process. This topology is the document's.
module server_net
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
  // fill level of PrC's queue, the process both chains share
  output logic [$clog2(DEPTH+1)-1:0] prc_q_level
);

  logic       ac_req, ac_ack, bc_req, bc_ack;
  msg_t       ac_data, bc_data;
  logic [1:0] c_out_req, c_out_ack;
  msg_t [1:0] c_out_data;
  logic [$clog2(DEPTH+1)-1:0] lvl_a, lvl_b, lvl_d, lvl_e;

  server_process #(.PROC(PR_A), .DEPTH(DEPTH)) u_pra (
    .clk, .rst_n,
    .in_req(m11_req), .in_data(m11_data), .in_ack(m11_ack),
    .out_req(ac_req), .out_data(ac_data), .out_ack(ac_ack),
    .q_level(lvl_a)
  );

  server_process #(.PROC(PR_B), .DEPTH(DEPTH)) u_prb (
    .clk, .rst_n,
    .in_req(m21_req), .in_data(m21_data), .in_ack(m21_ack),
    .out_req(bc_req), .out_data(bc_data), .out_ack(bc_ack),
    .q_level(lvl_b)
  );

  server_process #(.PROC(PR_C), .N_IN(2), .N_OUT(2), .DEPTH(DEPTH)) u_prc (
    .clk, .rst_n,
    .in_req({bc_req, ac_req}), .in_data({bc_data, ac_data}), .in_ack({bc_ack, ac_ack}),
    .out_req(c_out_req), .out_data(c_out_data), .out_ack(c_out_ack),
    .q_level(prc_q_level)
  );

  server_process #(.PROC(PR_D), .DEPTH(DEPTH)) u_prd (
    .clk, .rst_n,
    .in_req(c_out_req[0]), .in_data(c_out_data[0]), .in_ack(c_out_ack[0]),
    .out_req(m14_req), .out_data(m14_data), .out_ack(m14_ack),
    .q_level(lvl_d)
  );

  server_process #(.PROC(PR_E), .DEPTH(DEPTH)) u_pre (
    .clk, .rst_n,
    .in_req(c_out_req[1]), .in_data(c_out_data[1]), .in_ack(c_out_ack[1]),
    .out_req(m24_req), .out_data(m24_data), .out_ack(m24_ack),
    .q_level(lvl_e)
  );

endmodule
