// tb_prio_select: checks strict-priority selection among 3 queues under
// random valid/ready: the lowest-index valid input is selected, its data
// is output, and only it is acknowledged.
module tb_prio_select;
  localparam int W = 8, N = 3;
  int checks = 0, failures = 0;
  logic [N-1:0] iv, ir;
  logic [N-1:0][W-1:0] id;
  logic ov, orr;
  logic [W-1:0] od;
  int n_conflict = 0;

  prio_select #(.W(W), .N(N)) dut (.in_valid(iv), .in_data(id), .in_ready(ir),
                                   .out_valid(ov), .out_data(od), .out_ready(orr));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int win;
      iv = N'($urandom);
      orr = $urandom % 2;
      for (int k = 0; k < N; k++) id[k] = W'($urandom);
      #1;
      win = -1;
      for (int k = N - 1; k >= 0; k--) if (iv[k]) win = k;
      if ($countones(iv) > 1) n_conflict++;
      chk(ov == (win >= 0), "out_valid");
      if (win >= 0) begin
        chk(od == id[win], "selected data");
        chk(ir == (orr ? (N'(1) << win) : '0), "ready to winner only");
      end else begin
        chk(ir == '0, "no ready when idle");
      end
      #1;
    end
    chk(n_conflict > 0, "conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
