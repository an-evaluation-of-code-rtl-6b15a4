// example_efsm: EFSM of one process of the five-process SDL example.
//
// PROC selects the process (PrA..PrE). A transition takes two cycles, as in
// the ping-pong EFSM: the first removes the message from the queue, the
// second executes the task c_ij of the triggering signal m_ij and prepares
// the output signal m_i(j+1); the output is then offered to the output
// interface on channel o_chan until it is taken. Signals a process has no
// transition for are consumed without effect (SDL's implicit transition).
// PrC owns a variable, its transition counter var_c, which both of its
// transitions read and increment; PrE switches between EX and EY on every
// m23. Which process handles which signal, PrC's two output channels and
// PrE's two states are the example's; the task bodies (sdl_pkg::c_task) and
// the counter variable are this design's own.
module example_efsm
  import sdl_pkg::*;
#(
  parameter proc_e PROC = PR_A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       q_valid,
  input  msg_t       q_data,
  output logic       q_ready,
  output logic       o_valid,
  output logic       o_chan,
  output msg_t       o_data,
  input  logic       o_ready,
  output data_t      var_c,
  output pre_state_e st_e
);

  typedef enum logic [1:0] {EF_WAIT, EF_EXEC, EF_SEND} ef_state_e;

  ef_state_e st;
  msg_t      cur;
  logic      handled;

  always_comb begin
    case (PROC)
      PR_A:    handled = (cur.sig == M11);
      PR_B:    handled = (cur.sig == M21);
      PR_C:    handled = (cur.sig == M12) || (cur.sig == M22);
      PR_D:    handled = (cur.sig == M13);
      PR_E:    handled = (cur.sig == M23);
      default: handled = 1'b0;
    endcase
  end

  assign q_ready = (st == EF_WAIT);
  assign o_valid = (st == EF_SEND);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= EF_WAIT;
      cur    <= '{sig: SIG_NONE, data: '0};
      o_data <= '{sig: SIG_NONE, data: '0};
      o_chan <= 1'b0;
      var_c  <= '0;
      st_e   <= EX;
    end else begin
      case (st)
        EF_WAIT: if (q_valid) begin
          cur <= q_data;
          st  <= EF_EXEC;
        end
        EF_EXEC: begin
          if (handled) begin
            o_data.sig  <= next_sig(cur.sig);
            o_data.data <= c_task(cur.sig, cur.data, var_c, st_e);
            // PrC sends m13 to PrD on channel 0 and m23 to PrE on channel 1
            o_chan      <= (PROC == PR_C) && (cur.sig == M22);
            if (PROC == PR_C) var_c <= var_c + 1'b1;
            if (PROC == PR_E) st_e  <= (st_e == EX) ? EY : EX;
            st <= EF_SEND;
          end else begin
            st <= EF_WAIT;
          end
        end
        EF_SEND: if (o_ready) st <= EF_WAIT;
        default: st <= EF_WAIT;
      endcase
    end
  end

endmodule
