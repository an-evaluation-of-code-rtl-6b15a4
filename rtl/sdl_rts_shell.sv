// sdl_rts_shell: server-model run-time shell of one SDL process.
//
// This is the reusable part of a server-model entity: one input interface
// (hs_rx) per incoming channel, a multiplexer (stream_arb) onto the
// process' single FIFO message queue (msg_queue), and one output interface
// (hs_tx) per outgoing channel. The extended finite state machine, which is
// specific to each SDL process, attaches to the efsm_* ports: it takes
// messages from the queue and hands outgoing messages with the index of the
// channel to send them on. Input interfaces, queue, EFSM and output
// interfaces all run in parallel, which realises SDL's non-blocking send and
// queued receive. This structure is the document's; the valid/ready streams
// between the parts are this design's choice. A message reaches the EFSM
// three cycles after its ch_req is first seen (two in hs_rx, one in the
// queue) and leaves two cycles after the EFSM hands it over.
module sdl_rts_shell #(
  parameter int unsigned W     = 8,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned CW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // incoming channels
  input  logic [N_IN-1:0]         in_req,
  input  logic [N_IN-1:0][W-1:0]  in_data,
  output logic [N_IN-1:0]         in_ack,
  // outgoing channels
  output logic [N_OUT-1:0]        out_req,
  output logic [N_OUT-1:0][W-1:0] out_data,
  input  logic [N_OUT-1:0]        out_ack,
  // EFSM: message queue head
  output logic                    efsm_q_valid,
  output logic [W-1:0]            efsm_q_data,
  input  logic                    efsm_q_ready,
  // EFSM: outgoing message and its channel
  input  logic                    efsm_o_valid,
  input  logic [CW-1:0]           efsm_o_chan,
  input  logic [W-1:0]            efsm_o_data,
  output logic                    efsm_o_ready,
  // number of messages waiting in the queue
  output logic [$clog2(DEPTH+1)-1:0] q_level
);

  logic [N_IN-1:0]          rx_valid, rx_ready;
  logic [N_IN-1:0][W-1:0]   rx_data;
  logic                     mux_valid, mux_ready;
  logic [W-1:0]             mux_data;
  logic [N_OUT-1:0]         tx_valid, tx_ready;

  for (genvar i = 0; i < N_IN; i++) begin : g_rx
    hs_rx #(.W(W)) u_rx (
      .clk, .rst_n,
      .ch_req(in_req[i]), .ch_data(in_data[i]), .ch_ack(in_ack[i]),
      .out_valid(rx_valid[i]), .out_data(rx_data[i]), .out_ready(rx_ready[i])
    );
  end

  stream_arb #(.W(W), .N(N_IN)) u_mux (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_data(rx_data), .in_ready(rx_ready),
    .out_valid(mux_valid), .out_data(mux_data), .out_ready(mux_ready)
  );

  msg_queue #(.W(W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(mux_valid), .in_data(mux_data), .in_ready(mux_ready),
    .out_valid(efsm_q_valid), .out_data(efsm_q_data), .out_ready(efsm_q_ready),
    .level(q_level)
  );

  for (genvar k = 0; k < N_OUT; k++) begin : g_tx
    assign tx_valid[k] = efsm_o_valid && (int'(efsm_o_chan) == k);
    hs_tx #(.W(W)) u_tx (
      .clk, .rst_n,
      .in_valid(tx_valid[k]), .in_data(efsm_o_data), .in_ready(tx_ready[k]),
      .ch_req(out_req[k]), .ch_data(out_data[k]), .ch_ack(out_ack[k])
    );
  end

  assign efsm_o_ready = tx_ready[efsm_o_chan];

endmodule
