// tb_pp_case: one ping-pong process of a given message size and queue
// length, driven and checked on its own clock (used by tb_pingpong_sweep).
// It sends N_ISO isolated pings and checks each answer's parameter and
// response time (7 cycles from the request seen to the answer's request;
// 6 when the queue has length 0 and is a plain pass-through), then a burst
// against a randomly stalling receiver that must fill the queue and still
// be answered completely and in order (the receiver is held until the
// queue is full). checks, failures and done are read
// by the sweep.
module tb_pp_case #(
  parameter int unsigned W = 8,
  parameter int unsigned Q = 2
) (
  input logic clk,
  input int   cyc
);
  localparam int N_ISO = 6, N_BURST = 2 * Q + 20;
  localparam int EXP_RT = (Q == 0) ? 6 : 7;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0, n_full = 0, done = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL W=%0d Q=%0d %s at cycle %0d", W, Q, what, cyc); end
  endtask

  logic preq, pack, oreq, oack, hold = 1'b0, stall = 1'b0;
  logic [W-1:0] pd, od;
  logic [15:0] nx;
  logic [$clog2(Q+1)-1:0] lvl;
  logic [W-1:0] exp_q[$];

  tb_hs_src  #(.W(W)) src (.clk, .rst_n, .cyc, .hold, .ch_req(preq), .ch_data(pd), .ch_ack(pack));
  tb_hs_sink #(.W(W)) snk (.clk, .rst_n, .cyc, .stall, .ch_req(oreq), .ch_data(od), .ch_ack(oack));
  pingpong_process #(.MSG_W(W), .QLEN(Q)) dut (.clk, .rst_n, .ping_req(preq), .ping_data(pd), .ping_ack(pack),
    .pong_req(oreq), .pong_data(od), .pong_ack(oack), .n_exchanged(nx), .q_level(lvl));

  always @(posedge clk) if (rst_n && Q > 0 && int'(lvl) == Q) n_full++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_ISO; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
      while (snk.got.size() < i + 1) @(posedge clk);
      chk(snk.t_got[i] - (src.t_req[i] + 1) == EXP_RT,
          $sformatf("response time %0d", snk.t_got[i] - (src.t_req[i] + 1)));
      repeat (4) @(posedge clk);
    end
    for (int i = 0; i < N_BURST; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
    end
    // hold the receiver until the queue is full, then stall at random
    stall = 1'b1;
    while (Q > 0 && n_full == 0 && src.pending.size() > 0) @(negedge clk);
    while (snk.got.size() < N_ISO + N_BURST) begin
      @(negedge clk);
      stall = ($urandom % 8) != 0;
    end
    stall = 1'b0;
    repeat (5) @(posedge clk);
    chk(snk.got.size() == N_ISO + N_BURST, "answer count");
    for (int i = 0; i < N_ISO + N_BURST; i++) chk(snk.got[i] == exp_q[i], $sformatf("pong %0d", i));
    chk(int'(nx) == N_ISO + N_BURST, "n_exchanged");
    chk(Q == 0 || n_full > 0, "queue filled");
    chk(snk.proto_err == 0, "channel protocol");
    done = 1;
  end
endmodule
