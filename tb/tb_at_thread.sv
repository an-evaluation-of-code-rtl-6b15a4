// tb_at_thread: checks one parallel activity thread of each kind with a
// testbench lock that grants after a programmable delay and a testbench
// copy of PrC's variable. Checks: results against the reference model,
// the variable is written exactly once per event and only under the grant,
// the lock is requested only around PrC's transition, uncontended response
// time is 11 cycles, and a lock delay of D cycles adds D cycles.
module tb_at_thread;
  import sdl_pkg::*;
  import tb_model_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [1:0] ereq, eack, rreq, rack, lreq, lgnt, we;
  msg_t edat [2];
  msg_t rdat [2];
  data_t wd [2];
  data_t var_c;
  logic hold = 1'b0, stall = 1'b0;
  logic [1:0] lv0, lv1;
  int lock_delay = 0, wait_cnt [2], n_writes = 0;

  tb_hs_src  #(.W(MSG_W)) s0 (.clk, .rst_n, .cyc, .hold, .ch_req(ereq[0]), .ch_data(edat[0]), .ch_ack(eack[0]));
  tb_hs_src  #(.W(MSG_W)) s1 (.clk, .rst_n, .cyc, .hold, .ch_req(ereq[1]), .ch_data(edat[1]), .ch_ack(eack[1]));
  tb_hs_sink #(.W(MSG_W)) k0 (.clk, .rst_n, .cyc, .stall, .ch_req(rreq[0]), .ch_data(rdat[0]), .ch_ack(rack[0]));
  tb_hs_sink #(.W(MSG_W)) k1 (.clk, .rst_n, .cyc, .stall, .ch_req(rreq[1]), .ch_data(rdat[1]), .ch_ack(rack[1]));

  at_thread #(.THREAD(1)) t1 (.clk, .rst_n, .ev_req(ereq[0]), .ev_data(edat[0]), .ev_ack(eack[0]),
    .res_req(rreq[0]), .res_data(rdat[0]), .res_ack(rack[0]), .lock_req(lreq[0]), .lock_gnt(lgnt[0]),
    .var_c_rd(var_c), .var_c_we(we[0]), .var_c_wd(wd[0]), .q_level(lv0));
  at_thread #(.THREAD(2)) t2 (.clk, .rst_n, .ev_req(ereq[1]), .ev_data(edat[1]), .ev_ack(eack[1]),
    .res_req(rreq[1]), .res_data(rdat[1]), .res_ack(rack[1]), .lock_req(lreq[1]), .lock_gnt(lgnt[1]),
    .var_c_rd(var_c), .var_c_we(we[1]), .var_c_wd(wd[1]), .q_level(lv1));

  // testbench lock: grants a request after lock_delay further cycles,
  // one thread at a time (only one thread is active per test step)
  always @(posedge clk) begin
    if (!rst_n) begin
      lgnt <= '0; var_c <= '0; wait_cnt[0] <= 0; wait_cnt[1] <= 0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (!lreq[k]) begin lgnt[k] <= 1'b0; wait_cnt[k] <= 0; end
        else if (wait_cnt[k] >= lock_delay) lgnt[k] <= 1'b1;
        else wait_cnt[k] <= wait_cnt[k] + 1;
        if (we[k]) begin
          chk(lgnt[k], "write under grant");
          var_c <= wd[k];
          n_writes++;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cnt;
    bit ey;
    msg_t r;
    cnt = 0; ey = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] x;
      int b, w;
      x = 8'($urandom);
      lock_delay = (i < 8) ? 0 : $urandom % 4;
      w = n_writes;
      if (i % 2 == 0) begin
        b = k0.got.size();
        s0.pending.push_back({M11, x});
        while (k0.got.size() < b + 1) @(posedge clk);
        r = k0.got[b];
        chk(r == '{sig: M14, data: thread1(x, cnt)}, "thread 1 result");
        chk(k0.t_got[b] - (s0.t_req[$] + 1) == 11 + lock_delay, $sformatf("thread 1 time %0d (lock delay %0d)", k0.t_got[b] - (s0.t_req[$] + 1), lock_delay));
      end else begin
        b = k1.got.size();
        s1.pending.push_back({M21, x});
        while (k1.got.size() < b + 1) @(posedge clk);
        r = k1.got[b];
        chk(r == '{sig: M24, data: thread2(x, cnt, ey)}, "thread 2 result");
        chk(k1.t_got[b] - (s1.t_req[$] + 1) == 11 + lock_delay, $sformatf("thread 2 time %0d (lock delay %0d)", k1.t_got[b] - (s1.t_req[$] + 1), lock_delay));
        ey = !ey;
      end
      cnt++;
      chk(n_writes == w + 1, "one write per event");
      chk(var_c == cnt, "shared variable");
      repeat (3) @(posedge clk);
      chk(lreq == 2'b00, "lock released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
