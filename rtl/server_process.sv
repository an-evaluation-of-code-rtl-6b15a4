// server_process: one process of the SDL example as a server-model entity.
//
// The run-time shell (input interfaces, multiplexer, FIFO queue, output
// interfaces) wrapped around the process' EFSM. N_IN and N_OUT give the
// number of channels; PrC has two of each, the other processes one. The
// channels carry whole messages (signal identifier and parameter), so a
// channel could carry several signal types. Latency through one entity is
// 3 (input and queue) + 2 (EFSM) + 2 (output) = 7 cycles when it is idle.
module server_process
  import sdl_pkg::*;
#(
  parameter proc_e       PROC  = PR_A,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1,
  parameter int unsigned DEPTH = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_IN-1:0]             in_req,
  input  msg_t [N_IN-1:0]             in_data,
  output logic [N_IN-1:0]             in_ack,
  output logic [N_OUT-1:0]            out_req,
  output msg_t [N_OUT-1:0]            out_data,
  input  logic [N_OUT-1:0]            out_ack,
  output logic [$clog2(DEPTH+1)-1:0]  q_level
);

  localparam int unsigned CW = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic    q_valid, q_ready, o_valid, o_ready, o_chan;
  msg_t    q_data, o_data;
  data_t   var_c;
  pre_state_e st_e;

  sdl_rts_shell #(.W(MSG_W), .N_IN(N_IN), .N_OUT(N_OUT), .DEPTH(DEPTH)) u_shell (
    .clk, .rst_n,
    .in_req, .in_data, .in_ack,
    .out_req, .out_data, .out_ack,
    .efsm_q_valid(q_valid), .efsm_q_data(q_data), .efsm_q_ready(q_ready),
    .efsm_o_valid(o_valid), .efsm_o_chan(CW'(o_chan)), .efsm_o_data(o_data),
    .efsm_o_ready(o_ready),
    .q_level
  );

  example_efsm #(.PROC(PROC)) u_efsm (
    .clk, .rst_n,
    .q_valid, .q_data, .q_ready,
    .o_valid, .o_chan, .o_data, .o_ready,
    .var_c, .st_e
  );

endmodule
