// sdl_timer: SDL timer of the hardware run-time system.
//
// An SDL timer is set by its process with a duration and, when that time
// has elapsed, sends a timer signal to the process through the process'
// own message queue. Here the duration is counted in 'tick' pulses (one
// per clock cycle if tick is tied high). set (re)starts the timer with
// 'duration' ticks (a duration of 0 expires at the next tick); cancel
// stops it without a signal, like SDL's reset. On expiry the timer offers
// the message 'sig' on its valid/ready stream until the queue takes it;
// 'active' is high while the timer runs or its signal waits. Setting the
// timer again withdraws a signal that has not yet been taken, as SDL
// requires. That timers feed the process' queue is from the document; the
// tick input, the set/cancel ports and the widths are this design's
// choices.
module sdl_timer #(
  parameter int unsigned TW = 16,
  parameter int unsigned W  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          set,
  input  logic          cancel,
  input  logic [TW-1:0] duration,
  input  logic [W-1:0]  sig,
  output logic          out_valid,
  output logic [W-1:0]  out_data,
  input  logic          out_ready,
  output logic          active
);

  logic          running;
  logic [TW-1:0] remain;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      remain    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (set) begin
      running   <= 1'b1;
      remain    <= duration;
      out_data  <= sig;
      out_valid <= 1'b0;
    end else if (cancel) begin
      running   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (running && tick) begin
        if (remain <= TW'(1)) begin
          running   <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          remain <= remain - 1'b1;
        end
      end
    end
  end

  assign active = running || out_valid;

endmodule
