// at_thread: one activity thread of the parallel activity-thread
// architecture.
//
// THREAD = 1 is the chain m11 -> c11, c12, c13 -> m14, THREAD = 2 the chain
// m21 -> c21, c22, c23 -> m24. The thread has its own input interface,
// input queue and output interface and runs independently of the other
// thread, except where it executes a transition of PrC (c12 or c22): PrC is
// split over both threads, so its variable var_c lives outside and the
// thread must hold the lock while reading and updating it. Sequence: take
// the event (1 cycle), run the first task (1), request the lock and wait for
// the grant (at least 1), run PrC's task and write var_c back under the
// lock (1), run the last task (1), hand the result to the output interface.
// PrE is used by thread 2 only, so its state st_e stays inside that thread
// and needs no lock. The split into threads and the lock are the document's;
// the cycle budget is this design's. Uncontended response time: ch_req out
// rises 11 cycles after the event's ch_req is first seen.
module at_thread
  import sdl_pkg::*;
#(
  parameter int unsigned THREAD = 1,
  parameter int unsigned DEPTH  = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ev_req,
  input  msg_t  ev_data,
  output logic  ev_ack,
  output logic  res_req,
  output msg_t  res_data,
  input  logic  res_ack,
  // lock and shared data of PrC
  output logic  lock_req,
  input  logic  lock_gnt,
  input  data_t var_c_rd,
  output logic  var_c_we,
  output data_t var_c_wd,
  output logic [$clog2(DEPTH+1)-1:0] q_level
);

  localparam sig_e TRIG = (THREAD == 2) ? M21 : M11;
  localparam sig_e MID  = (THREAD == 2) ? M22 : M12;
  localparam sig_e LAST = (THREAD == 2) ? M23 : M13;
  localparam sig_e RES  = (THREAD == 2) ? M24 : M14;

  typedef enum logic [2:0] {TH_WAIT, TH_FIRST, TH_LOCK, TH_SHARED, TH_LAST, TH_SEND} th_state_e;

  th_state_e  st;
  logic       rx_valid, rx_ready, q_valid, q_ready, o_valid, o_ready;
  msg_t       rx_data, q_data, o_data;
  data_t      x;
  pre_state_e st_e;

  hs_rx #(.W(MSG_W)) u_rx (
    .clk, .rst_n, .ch_req(ev_req), .ch_data(ev_data), .ch_ack(ev_ack),
    .out_valid(rx_valid), .out_data(rx_data), .out_ready(rx_ready)
  );

  msg_queue #(.W(MSG_W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_data(rx_data), .in_ready(rx_ready),
    .out_valid(q_valid), .out_data(q_data), .out_ready(q_ready),
    .level(q_level)
  );

  hs_tx #(.W(MSG_W)) u_tx (
    .clk, .rst_n, .in_valid(o_valid), .in_data(o_data), .in_ready(o_ready),
    .ch_req(res_req), .ch_data(res_data), .ch_ack(res_ack)
  );

  assign q_ready  = (st == TH_WAIT);
  assign o_valid  = (st == TH_SEND);
  assign o_data   = '{sig: RES, data: x};
  assign lock_req = (st == TH_LOCK) || (st == TH_SHARED);
  assign var_c_we = (st == TH_SHARED);
  assign var_c_wd = var_c_rd + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= TH_WAIT;
      x    <= '0;
      st_e <= EX;
    end else begin
      case (st)
        TH_WAIT: if (q_valid && q_data.sig == TRIG) begin
          x  <= q_data.data;
          st <= TH_FIRST;
        end
        TH_FIRST: begin
          x  <= c_task(TRIG, x, '0, st_e);
          st <= TH_LOCK;
        end
        TH_LOCK: if (lock_gnt) st <= TH_SHARED;
        TH_SHARED: begin
          x  <= c_task(MID, x, var_c_rd, st_e);
          st <= TH_LAST;
        end
        TH_LAST: begin
          x <= c_task(LAST, x, '0, st_e);
          if (LAST == M23) st_e <= (st_e == EX) ? EY : EX;
          st <= TH_SEND;
        end
        TH_SEND: if (o_ready) st <= TH_WAIT;
        default: st <= TH_WAIT;
      endcase
    end
  end

  // PrC's data is only written while this thread holds the lock
  a_write_locked: assert property (@(posedge clk) disable iff (!rst_n) var_c_we |-> lock_gnt);

endmodule
