// tb_sdl_rts_shell: checks the run-time shell with 2 input and 2 output
// channels and a queue of 3. The testbench plays the EFSM: it takes each
// message from the queue and sends it on the output channel named by the
// message's top bit. Checks: every message sent on either input comes out
// on the right output, per-input order is kept, and the queue level
// reaches its maximum while the outputs stall.
module tb_sdl_rts_shell;
  localparam int W = 9, N = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0, n_full = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [1:0] ireq, iack, oreq, oack;
  logic [1:0][W-1:0] idat, odat;
  logic qv, qr, ov, orr, hold = 1'b0;
  logic [1:0] stall = '0;
  logic [W-1:0] qd, o_d;
  logic oc;
  logic [1:0] lvl;

  tb_hs_src  #(.W(W)) s0 (.clk, .rst_n, .cyc, .hold, .ch_req(ireq[0]), .ch_data(idat[0]), .ch_ack(iack[0]));
  tb_hs_src  #(.W(W)) s1 (.clk, .rst_n, .cyc, .hold, .ch_req(ireq[1]), .ch_data(idat[1]), .ch_ack(iack[1]));
  tb_hs_sink #(.W(W)) k0 (.clk, .rst_n, .cyc, .stall(stall[0]), .ch_req(oreq[0]), .ch_data(odat[0]), .ch_ack(oack[0]));
  tb_hs_sink #(.W(W)) k1 (.clk, .rst_n, .cyc, .stall(stall[1]), .ch_req(oreq[1]), .ch_data(odat[1]), .ch_ack(oack[1]));

  sdl_rts_shell #(.W(W), .N_IN(2), .N_OUT(2), .DEPTH(3)) dut (
    .clk, .rst_n, .in_req(ireq), .in_data(idat), .in_ack(iack),
    .out_req(oreq), .out_data(odat), .out_ack(oack),
    .efsm_q_valid(qv), .efsm_q_data(qd), .efsm_q_ready(qr),
    .efsm_o_valid(ov), .efsm_o_chan(oc), .efsm_o_data(o_d), .efsm_o_ready(orr),
    .q_level(lvl));

  // testbench EFSM: one-entry buffer between queue and outputs
  logic full_b = 1'b0;
  assign qr = !full_b;
  assign ov = full_b;
  assign oc = o_d[W-1];
  always @(posedge clk) begin
    if (!rst_n) full_b <= 1'b0;
    else if (full_b && orr) full_b <= 1'b0;
    else if (!full_b && qv) begin full_b <= 1'b1; o_d <= qd; end
    if (rst_n && lvl == 2'd3) n_full++;
  end

  logic [W-1:0] e0[$], e1[$];   // expected per output channel
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] v;
      // bits [W-2:W-3] tag the source, bit W-1 chooses the output
      v = W'($urandom);
      v[W-2] = i % 2;
      if (v[W-1]) e1.push_back(v); else e0.push_back(v);
      if (i % 2 == 0) s0.pending.push_back(v); else s1.pending.push_back(v);
    end
    while (k0.got.size() + k1.got.size() < N) begin
      @(negedge clk);
      stall[0] = ($urandom % 4) != 0;
      stall[1] = ($urandom % 3) != 0;
    end
    stall = '0;
    repeat (5) @(posedge clk);
    chk(k0.got.size() == e0.size() && k1.got.size() == e1.size(), "counts per output");
    // per-source order on each output channel
    for (int ch = 0; ch < 2; ch++) begin
      for (int src = 0; src < 2; src++) begin
        logic [W-1:0] a[$], b[$];
        if (ch == 0) begin
          foreach (e0[i]) if (e0[i][W-2] == src) a.push_back(e0[i]);
          foreach (k0.got[i]) if (k0.got[i][W-2] == src) b.push_back(k0.got[i]);
        end else begin
          foreach (e1[i]) if (e1[i][W-2] == src) a.push_back(e1[i]);
          foreach (k1.got[i]) if (k1.got[i][W-2] == src) b.push_back(k1.got[i]);
        end
        chk(a.size() == b.size(), "per-source count");
        for (int i = 0; i < a.size() && i < b.size(); i++) chk(a[i] == b[i], "per-source order");
      end
    end
    chk(n_full > 0, "queue full reached");
    chk(k0.proto_err == 0 && k1.proto_err == 0, "channel protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
