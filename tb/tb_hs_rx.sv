// tb_hs_rx: checks the input interface. A testbench sender transmits
// random messages; the queue side takes them with random back-pressure.
// Checks: every message arrives once, in order, with its data; out_valid
// rises exactly 2 cycles after the request is first seen when the
// interface is idle; ch_ack follows the four-phase protocol.
module tb_hs_rx;
  localparam int W = 12;
  localparam int N = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic req, ack, ov, ordy, hold = 1'b0;
  logic [W-1:0] d, od;
  logic [W-1:0] exp_q[$];
  int got = 0, lat_checked = 0;

  tb_hs_src #(.W(W)) src (.clk, .rst_n, .cyc, .hold, .ch_req(req), .ch_data(d), .ch_ack(ack));
  hs_rx #(.W(W)) dut (.clk, .rst_n, .ch_req(req), .ch_data(d), .ch_ack(ack),
                      .out_valid(ov), .out_data(od), .out_ready(ordy));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  int t_first_valid;
  logic ov_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    ov_q <= ov;
    if (ov && !ov_q && src.t_req.size() > got) begin
      // latency measured only for the first few, sent while idle
      if (lat_checked < 5) begin
        chk(cyc - (src.t_req[got] + 1) == 2, $sformatf("rx latency %0d", cyc - (src.t_req[got] + 1)));
        lat_checked++;
      end
    end
    if (ov && ordy) begin
      chk(od == exp_q[got], "data");
      got++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ordy = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // isolated messages with an always-ready queue
    for (int i = 0; i < 5; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
      while (got < i + 1) @(posedge clk);
      repeat (4) @(posedge clk);
    end
    // back-to-back messages with a stalling queue
    for (int i = 5; i < N; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      exp_q.push_back(v);
      src.pending.push_back(v);
    end
    while (got < N) begin
      @(negedge clk);
      ordy = ($urandom % 3) != 0;
    end
    repeat (10) @(posedge clk);
    chk(got == N, "message count");
    chk(src.n_sent == N, "all handshakes completed");
    chk(ack == 1'b0 && req == 1'b0, "channel idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
