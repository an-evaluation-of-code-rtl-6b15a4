// tb_hs_tx: checks the output interface. Random messages are offered on
// the stream side; a testbench receiver acknowledges with random delay.
// Checks: every message appears on the channel once, in order; ch_req
// rises 2 cycles after an idle interface accepts a message; the channel
// protocol holds (data stable while requested).
module tb_hs_tx;
  localparam int W = 10;
  localparam int N = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic iv, ir, req, ack, stall = 1'b0;
  logic [W-1:0] id, d;
  logic [W-1:0] exp_q[$];
  int t_acc[$];

  hs_tx #(.W(W)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
                      .ch_req(req), .ch_data(d), .ch_ack(ack));
  tb_hs_sink #(.W(W)) snk (.clk, .rst_n, .cyc, .stall, .ch_req(req), .ch_data(d), .ch_ack(ack));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n && iv && ir) t_acc.push_back(cyc);
  // random receiver stalls once the latency samples are taken
  always @(negedge clk) stall <= (snk.got.size() >= 5) && (($urandom % 2) == 0) && !done;
  bit done = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 1'b0; id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      iv = 1'b1;
      id = W'($urandom);
      exp_q.push_back(id);
      @(posedge clk);
      while (!ir) @(posedge clk);
      @(negedge clk);
      iv = 1'b0;
      if (i < 5) while (snk.got.size() < i + 1) @(posedge clk);
      repeat ($urandom % 3) @(negedge clk);
    end
    done = 1;
    while (snk.got.size() < N) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(snk.got.size() == N, "message count");
    for (int i = 0; i < N; i++) chk(snk.got[i] == exp_q[i], $sformatf("data %0d", i));
    // accepted at edge A, ch_req set at edge A+1, seen by the receiver at A+2
    for (int i = 0; i < 5; i++) chk(snk.t_got[i] - t_acc[i] == 2, $sformatf("tx latency %0d", snk.t_got[i] - t_acc[i]));
    chk(snk.proto_err == 0, "channel protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
