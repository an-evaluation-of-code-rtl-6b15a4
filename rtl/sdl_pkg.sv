// sdl_pkg: types and task functions shared by the server-model and
// activity-thread implementations of the five-process SDL example.
//
// The example network has processes PrA..PrE exchanging signals m11..m24.
// A transition triggered by signal m_ij runs task c_ij and outputs m_i(j+1);
// m11 and m21 come from the environment, m14 and m24 go back to it. PrC
// serves both chains; PrE alternates between states EX and EY and runs
// task c23' in EX and c23'' in EY. This network structure is the one the
// design follows. The task bodies are not specified by the example, so this
// package defines simple ones of its own: constant additions, PrC adding its
// transition counter (a process variable shared by both chains), and PrE
// adding in EX but XOR-ing in EY so that its state is visible in the data.
// Messages are carried as a signal identifier plus an 8-bit parameter.
package sdl_pkg;

  parameter int unsigned DATA_W = 8;
  typedef logic [DATA_W-1:0] data_t;

  // SDL signal identifiers; SIG_NONE is never sent.
  typedef enum logic [3:0] {
    SIG_NONE = 4'd0,
    M11 = 4'd1, M12 = 4'd2, M13 = 4'd3, M14 = 4'd4,
    M21 = 4'd5, M22 = 4'd6, M23 = 4'd7, M24 = 4'd8
  } sig_e;

  typedef struct packed {
    sig_e  sig;
    data_t data;
  } msg_t;

  localparam int unsigned MSG_W = $bits(msg_t);

  typedef enum logic [2:0] {PR_A, PR_B, PR_C, PR_D, PR_E} proc_e;

  // States of PrE; PrA..PrD have a single state.
  typedef enum logic {EX = 1'b0, EY = 1'b1} pre_state_e;

  localparam data_t K11 = 8'h11;
  localparam data_t K13 = 8'h13;
  localparam data_t K21 = 8'h21;
  localparam data_t K23 = 8'h23;

  // Task c_ij executed by the transition triggered by signal trig.
  // var_c is PrC's transition counter, st_e the current state of PrE.
  function automatic data_t c_task(sig_e trig, data_t x, data_t var_c, pre_state_e st_e);
    data_t y;
    case (trig)
      M11:     y = x + K11;
      M12,
      M22:     y = x + var_c;
      M13:     y = x + K13;
      M21:     y = x + K21;
      M23:     y = (st_e == EX) ? (x + K23) : (x ^ K23);
      default: y = x;
    endcase
    return y;
  endfunction

  // Signal output by the transition that signal trig triggers.
  function automatic sig_e next_sig(sig_e trig);
    sig_e s;
    case (trig)
      M11: s = M12;
      M12: s = M13;
      M13: s = M14;
      M21: s = M22;
      M22: s = M23;
      M23: s = M24;
      default: s = SIG_NONE;
    endcase
    return s;
  endfunction

endpackage
