// at_engine: serialized activity-thread engine for the SDL example.
//
// In the activity-thread model the whole chain of transitions that an
// external event sets off is executed in one go, with no messages between
// the SDL processes. This engine holds both activity threads of the example
// in one sequential process: an m11 event runs c11, c12, c13 and emits m14;
// an m21 event runs c21, c22, c23 and emits m24. It takes one event at a
// time from its input stream (the queue, or the priority selection in
// front of several queues), executes one task per clock cycle with a single
// shared task unit, and offers the result to output interface 0 (m14) or
// 1 (m24). Because only one thread runs at a time, the process data of PrC
// (var_c) and PrE (st_e) need no lock. Timing: the event is taken in the
// first cycle, the three tasks take three cycles, and the result is offered
// from the fifth cycle on until it is taken. Threads and their task order
// are the document's; one task per cycle is this design's choice.
module at_engine
  import sdl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ev_valid,
  input  msg_t       ev_data,
  output logic       ev_ready,
  output logic [1:0] o_valid,
  output msg_t       o_data,
  input  logic [1:0] o_ready,
  output data_t      var_c,
  output pre_state_e st_e
);

  typedef enum logic [1:0] {AT_WAIT, AT_RUN, AT_SEND} at_state_e;

  at_state_e st;
  sig_e      step;   // signal whose transition runs next
  data_t     x;
  logic      thr2;   // the running thread is the m21 thread

  assign ev_ready = (st == AT_WAIT);
  assign o_valid  = (st == AT_SEND) ? (thr2 ? 2'b10 : 2'b01) : 2'b00;
  assign o_data   = '{sig: (thr2 ? M24 : M14), data: x};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= AT_WAIT;
      step  <= SIG_NONE;
      x     <= '0;
      thr2  <= 1'b0;
      var_c <= '0;
      st_e  <= EX;
    end else begin
      case (st)
        AT_WAIT: if (ev_valid) begin
          // only m11 and m21 start an activity thread; others are dropped
          if (ev_data.sig == M11 || ev_data.sig == M21) begin
            step <= ev_data.sig;
            x    <= ev_data.data;
            thr2 <= (ev_data.sig == M21);
            st   <= AT_RUN;
          end
        end
        AT_RUN: begin
          x    <= c_task(step, x, var_c, st_e);
          step <= next_sig(step);
          if (step == M12 || step == M22) var_c <= var_c + 1'b1;
          if (step == M23) st_e <= (st_e == EX) ? EY : EX;
          if (step == M13 || step == M23) st <= AT_SEND;
        end
        AT_SEND: if (|(o_valid & o_ready)) st <= AT_WAIT;
        default: st <= AT_WAIT;
      endcase
    end
  end

endmodule
