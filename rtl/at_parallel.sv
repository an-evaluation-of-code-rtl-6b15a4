// at_parallel: "parallel activity thread" architecture of the SDL example.
//
// Each activity thread (m11 -> m14 and m21 -> m24) runs in its own
// at_thread with its own queue, so both can be in execution at once. PrC is
// part of both threads; its variable var_c (the state data shared by the
// threads) is held here and protected by at_lock: a thread may read and
// write it only while it holds the grant. When both threads reach PrC's
// transition together, one of them waits; that blocking time adds to its
// response time. The two threads run in parallel but each processes one
// event at a time, so there is no pipelining across the processes.
module at_parallel
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
  output logic [1:0] lock_req,
  output logic [1:0] lock_gnt,
  output logic [$clog2(DEPTH+1)-1:0] q11_level,
  output logic [$clog2(DEPTH+1)-1:0] q21_level
);

  logic [1:0] we;
  data_t      wd [2];
  data_t      var_c;

  at_thread #(.THREAD(1), .DEPTH(DEPTH)) u_thr1 (
    .clk, .rst_n,
    .ev_req(m11_req), .ev_data(m11_data), .ev_ack(m11_ack),
    .res_req(m14_req), .res_data(m14_data), .res_ack(m14_ack),
    .lock_req(lock_req[0]), .lock_gnt(lock_gnt[0]),
    .var_c_rd(var_c), .var_c_we(we[0]), .var_c_wd(wd[0]),
    .q_level(q11_level)
  );

  at_thread #(.THREAD(2), .DEPTH(DEPTH)) u_thr2 (
    .clk, .rst_n,
    .ev_req(m21_req), .ev_data(m21_data), .ev_ack(m21_ack),
    .res_req(m24_req), .res_data(m24_data), .res_ack(m24_ack),
    .lock_req(lock_req[1]), .lock_gnt(lock_gnt[1]),
    .var_c_rd(var_c), .var_c_we(we[1]), .var_c_wd(wd[1]),
    .q_level(q21_level)
  );

  at_lock #(.N(2)) u_lock (
    .clk, .rst_n, .req(lock_req), .gnt(lock_gnt)
  );

  // shared data of PrC: written only by the lock holder
  always_ff @(posedge clk) begin
    if (!rst_n)                    var_c <= '0;
    else if (we[0] && lock_gnt[0]) var_c <= wd[0];
    else if (we[1] && lock_gnt[1]) var_c <= wd[1];
  end

endmodule
