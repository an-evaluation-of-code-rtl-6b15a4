// tb_pingpong_process: checks the ping-pong process at its default size
// (8-bit messages, queue of 2). Isolated pings must be answered after
// 3 + 2 + 2 = 7 cycles (request seen to answer's request raised) with the
// same parameter. A burst against a stalling receiver must fill the queue
// and still answer every ping in order; n_exchanged counts the answers.
module tb_pingpong_process;
  localparam int W = 8, N_ISO = 8, N_BURST = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0, n_full = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic preq, pack, oreq, oack, hold = 1'b0, stall = 1'b0;
  logic [W-1:0] pd, od;
  logic [15:0] nx;
  logic [1:0] lvl;
  logic [W-1:0] exp_q[$];

  tb_hs_src  #(.W(W)) src (.clk, .rst_n, .cyc, .hold, .ch_req(preq), .ch_data(pd), .ch_ack(pack));
  tb_hs_sink #(.W(W)) snk (.clk, .rst_n, .cyc, .stall, .ch_req(oreq), .ch_data(od), .ch_ack(oack));
  pingpong_process dut (.clk, .rst_n, .ping_req(preq), .ping_data(pd), .ping_ack(pack),
                        .pong_req(oreq), .pong_data(od), .pong_ack(oack), .n_exchanged(nx), .q_level(lvl));

  always @(posedge clk) if (rst_n && lvl == 2'd2) n_full++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_ISO; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
      while (snk.got.size() < i + 1) @(posedge clk);
      chk(snk.t_got[i] - (src.t_req[i] + 1) == 7, $sformatf("response time %0d", snk.t_got[i] - (src.t_req[i] + 1)));
      repeat (4) @(posedge clk);
    end
    for (int i = 0; i < N_BURST; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
    end
    while (snk.got.size() < N_ISO + N_BURST) begin
      @(negedge clk);
      stall = ($urandom % 8) != 0;
    end
    stall = 1'b0;
    repeat (5) @(posedge clk);
    chk(snk.got.size() == N_ISO + N_BURST, "answer count");
    for (int i = 0; i < N_ISO + N_BURST; i++) chk(snk.got[i] == exp_q[i], $sformatf("pong %0d", i));
    chk(int'(nx) == N_ISO + N_BURST, "n_exchanged");
    chk(n_full > 0, "queue filled");
    chk(snk.proto_err == 0, "channel protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
