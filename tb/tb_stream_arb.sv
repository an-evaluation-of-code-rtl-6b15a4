// tb_stream_arb: checks the round-robin input multiplexer with 3 inputs.
// Each input holds a message until it is accepted. Checks: at most one
// input accepted per cycle and only when valid; the output carries that
// input's data; nothing is lost; with all inputs waiting the grants rotate
// 0,1,2,0,...
module tb_stream_arb;
  localparam int W = 8, N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [N-1:0] iv, ir;
  logic [N-1:0][W-1:0] id;
  logic ov, orr;
  logic [W-1:0] od;
  int sent [N], acc [N];
  int last = -1, n_rot = 0;
  bit all_mode = 0;

  stream_arb #(.W(W), .N(N)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
                                  .out_valid(ov), .out_data(od), .out_ready(orr));

  always @(posedge clk) if (rst_n) begin
    chk($onehot0(ir), "one grant");
    chk((ir & ~iv) == '0, "grant only to valid");
    chk(ov == (iv != '0), "out_valid");
    for (int k = 0; k < N; k++) if (ir[k]) begin
      chk(od == id[k], "data of granted input");
      acc[k]++;
      if (all_mode && last >= 0) begin
        chk(k == (last + 1) % N, "round robin");
        n_rot++;
      end
      last = k;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = '0; id = '0; orr = 1'b0;
    for (int k = 0; k < N; k++) begin sent[k] = 0; acc[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // all inputs permanently valid, sink always ready
    @(negedge clk);
    all_mode = 1; iv = '1; orr = 1'b1;
    for (int i = 0; i < 30; i++) begin
      for (int k = 0; k < N; k++) id[k] = W'($urandom);
      @(negedge clk);
    end
    all_mode = 0; iv = '0;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < N; k++) if (ir[k] || !iv[k]) begin
        iv[k] = ($urandom % 2) == 1;
        id[k] = W'($urandom);
        if (iv[k]) sent[k]++;
      end
      orr = ($urandom % 4) != 0;
      @(posedge clk);
      @(negedge clk);
      for (int k = 0; k < N; k++) ;
    end
    chk(n_rot >= 25, "rotation observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
