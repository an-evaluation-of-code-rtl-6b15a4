// tb_server_process: checks PrC as a server-model entity (2 input and
// 2 output handshake channels). m12 and m22 arrive on separate channels;
// m13 must leave on channel 0 and m23 on channel 1 with PrC's counter
// added. Isolated messages must take 7 cycles through the entity; a burst
// on both inputs must be served completely with each count used once.
module tb_server_process;
  import sdl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [1:0] ireq, iack, oreq, oack, stall = '0;
  msg_t [1:0] idat, odat;
  logic hold = 1'b0;
  logic [1:0] lvl;

  tb_hs_src  #(.W(MSG_W)) s0 (.clk, .rst_n, .cyc, .hold, .ch_req(ireq[0]), .ch_data(idat[0]), .ch_ack(iack[0]));
  tb_hs_src  #(.W(MSG_W)) s1 (.clk, .rst_n, .cyc, .hold, .ch_req(ireq[1]), .ch_data(idat[1]), .ch_ack(iack[1]));
  tb_hs_sink #(.W(MSG_W)) k0 (.clk, .rst_n, .cyc, .stall(stall[0]), .ch_req(oreq[0]), .ch_data(odat[0]), .ch_ack(oack[0]));
  tb_hs_sink #(.W(MSG_W)) k1 (.clk, .rst_n, .cyc, .stall(stall[1]), .ch_req(oreq[1]), .ch_data(odat[1]), .ch_ack(oack[1]));

  server_process #(.PROC(PR_C), .N_IN(2), .N_OUT(2)) dut (
    .clk, .rst_n, .in_req(ireq), .in_data(idat), .in_ack(iack),
    .out_req(oreq), .out_data(odat), .out_ack(oack), .q_level(lvl));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cnt;
    logic [7:0] x0[$], x1[$];
    bit used[256];
    msg_t r;
    int b0, b1;
    cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      logic [7:0] x;
      x = 8'($urandom);
      if (i % 2 == 0) begin
        s0.pending.push_back({M12, x});
        while (k0.got.size() < i / 2 + 1) @(posedge clk);
        r = k0.got[$];
        chk(r.sig == M13 && r.data == 8'(x + cnt), "m13 on channel 0");
        chk(k0.t_got[$] - (s0.t_req[$] + 1) == 7, $sformatf("entity time %0d", k0.t_got[$] - (s0.t_req[$] + 1)));
      end else begin
        s1.pending.push_back({M22, x});
        while (k1.got.size() < i / 2 + 1) @(posedge clk);
        r = k1.got[$];
        chk(r.sig == M23 && r.data == 8'(x + cnt), "m23 on channel 1");
        chk(k1.t_got[$] - (s1.t_req[$] + 1) == 7, $sformatf("entity time %0d", k1.t_got[$] - (s1.t_req[$] + 1)));
      end
      cnt++;
      repeat (3) @(posedge clk);
    end
    b0 = k0.got.size(); b1 = k1.got.size();
    for (int i = 0; i < 30; i++) begin
      logic [7:0] x;
      x = 8'($urandom); x0.push_back(x); s0.pending.push_back({M12, x});
      x = 8'($urandom); x1.push_back(x); s1.pending.push_back({M22, x});
    end
    while (k0.got.size() < b0 + 30 || k1.got.size() < b1 + 30) begin
      @(negedge clk);
      stall[0] = ($urandom % 3) == 0;
      stall[1] = ($urandom % 2) == 0;
    end
    stall = '0;
    for (int i = 0; i < 256; i++) used[i] = 0;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] c;
      r = k0.got[b0 + i]; c = 8'(r.data - x0[i]);
      chk(r.sig == M13 && c >= cnt && c < cnt + 60 && !used[c], "burst m13 count");
      used[c] = 1;
      r = k1.got[b1 + i]; c = 8'(r.data - x1[i]);
      chk(r.sig == M23 && c >= cnt && c < cnt + 60 && !used[c], "burst m23 count");
      used[c] = 1;
    end
    chk(k0.proto_err == 0 && k1.proto_err == 0, "channel protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
