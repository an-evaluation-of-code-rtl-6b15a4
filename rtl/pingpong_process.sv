// pingpong_process: the "ping-pong" server-model example.
//
// A single SDL process with one input and one output channel, both using
// the handshake protocol of hs_rx/hs_tx, and a FIFO message queue of
// QLEN messages of MSG_W bits. Its EFSM answers every received message
// (ping) with one outgoing message (pong) carrying the same parameter, and
// counts the exchanges in a process variable. The EFSM takes two cycles per
// transition: it removes the message from the queue in the first and
// produces the output in the second. The response time from the cycle ch
// request is first seen to the cycle the answer's request rises is therefore
// 3 + 2 + 2 = 7 cycles, the split reported for this example (input interface
// and queue, EFSM, output interface). Message size and queue length are the
// two parameters the area measurement varies; the defaults are an 8-bit
// message and a queue of 2. What the process does with the message beyond
// answering it is not described, so echoing the parameter is this design's
// choice.
module pingpong_process #(
  parameter int unsigned MSG_W = 8,
  parameter int unsigned QLEN  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ping_req,
  input  logic [MSG_W-1:0] ping_data,
  output logic             ping_ack,
  output logic             pong_req,
  output logic [MSG_W-1:0] pong_data,
  input  logic             pong_ack,
  output logic [15:0]      n_exchanged,
  output logic [$clog2(QLEN+1)-1:0] q_level
);

  typedef enum logic [1:0] {PP_WAIT, PP_EXEC, PP_SEND} pp_state_e;

  pp_state_e        st;
  logic             q_valid, q_ready, o_valid, o_ready;
  logic [MSG_W-1:0] q_data, cur, o_data;

  sdl_rts_shell #(.W(MSG_W), .N_IN(1), .N_OUT(1), .DEPTH(QLEN)) u_shell (
    .clk, .rst_n,
    .in_req(ping_req), .in_data(ping_data), .in_ack(ping_ack),
    .out_req(pong_req), .out_data(pong_data), .out_ack(pong_ack),
    .efsm_q_valid(q_valid), .efsm_q_data(q_data), .efsm_q_ready(q_ready),
    .efsm_o_valid(o_valid), .efsm_o_chan(1'b0), .efsm_o_data(o_data),
    .efsm_o_ready(o_ready),
    .q_level
  );

  // EFSM
  assign q_ready = (st == PP_WAIT);
  assign o_valid = (st == PP_SEND);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= PP_WAIT;
      cur         <= '0;
      o_data      <= '0;
      n_exchanged <= '0;
    end else begin
      case (st)
        PP_WAIT: if (q_valid) begin
          cur <= q_data;
          st  <= PP_EXEC;
        end
        PP_EXEC: begin
          o_data      <= cur;
          n_exchanged <= n_exchanged + 1'b1;
          st          <= PP_SEND;
        end
        PP_SEND: if (o_ready) st <= PP_WAIT;
        default: st <= PP_WAIT;
      endcase
    end
  end

endmodule
