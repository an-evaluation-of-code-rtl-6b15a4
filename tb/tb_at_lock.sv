// tb_at_lock: checks the lock with 3 requesters that each take it for a
// random number of cycles. Checks every cycle: at most one grant, a grant
// only to a requester, a holder keeps the grant while it requests, a free
// lock is granted one cycle after a request, and a waiting requester is
// served within two other holders (round robin).
module tb_at_lock;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0, n_wait = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [N-1:0] req, gnt, req_q, gnt_q;
  int served_since [N];
  at_lock #(.N(N)) dut (.clk, .rst_n, .req, .gnt);

  always @(posedge clk) if (rst_n) begin
    req_q <= req; gnt_q <= gnt;
    chk($onehot0(gnt), "mutual exclusion");
    chk((gnt & ~req & ~req_q) == '0, "grant only to requester");
    // a holder that still requests keeps the grant
    chk(((gnt_q & req_q) & ~gnt) == '0, "holder keeps grant");
    // lock free and nobody held it last cycle: a requester gets it now
    if (gnt_q == '0 && req_q != '0) chk(gnt != '0, "free lock granted in one cycle");
    for (int k = 0; k < N; k++) begin
      if (gnt[k] && !gnt_q[k]) begin
        for (int j = 0; j < N; j++) if (j != k && req[j] && !gnt[j]) served_since[j]++;
        served_since[k] = 0;
      end
      chk(served_since[k] <= N - 1, "bounded waiting");
      if (req[k] && !gnt[k] && gnt != '0) n_wait++;
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each requester: idle a while, request, hold for a while after grant, release
  for (genvar k = 0; k < N; k++) begin : g_req
    initial begin
      req[k] = 1'b0;
      served_since[k] = 0;
      wait (rst_n);
      repeat (200) begin
        repeat ($urandom % 4) @(negedge clk);
        req[k] = 1'b1;
        @(negedge clk);
        while (!gnt[k]) @(negedge clk);
        repeat (1 + $urandom % 3) @(negedge clk);
        req[k] = 1'b0;
        @(negedge clk);
      end
    end
  end

  initial begin
    req_q = '0; gnt_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    chk(n_wait > 0, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
