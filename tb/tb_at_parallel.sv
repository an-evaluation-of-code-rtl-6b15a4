// tb_at_parallel: self-checking testbench of at_parallel.
// Phase 1 sends single events (m11 or m21 at random) one at a time and
// checks each response against the reference model and the response time
// of an isolated event (11 cycles from the event's request being seen to
// the response's request being seen). Phase 2 sends bursts on both
// channels at once while the receivers stall at random; it checks that
// every response arrives, in order per thread, and that PrC's transitions
// were mutually exclusive (each transition count used exactly once).
// Also counts lock blocking and both threads running at once.
module tb_at_parallel;
  import sdl_pkg::*;
  import tb_model_pkg::*;

  localparam int N_SEQ = 24;
  localparam int N_BURST = 40;
  localparam int LAT = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cyc = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic m11_req, m11_ack, m21_req, m21_ack, m14_req, m14_ack, m24_req, m24_ack;
  msg_t m11_data, m21_data, m14_data, m24_data;
  logic hold = 1'b0, stall14 = 1'b0, stall24 = 1'b0;

  tb_hs_src  #(.W(MSG_W)) s11 (.clk, .rst_n, .cyc, .hold, .ch_req(m11_req), .ch_data(m11_data), .ch_ack(m11_ack));
  tb_hs_src  #(.W(MSG_W)) s21 (.clk, .rst_n, .cyc, .hold, .ch_req(m21_req), .ch_data(m21_data), .ch_ack(m21_ack));
  tb_hs_sink #(.W(MSG_W)) k14 (.clk, .rst_n, .cyc, .stall(stall14), .ch_req(m14_req), .ch_data(m14_data), .ch_ack(m14_ack));
  tb_hs_sink #(.W(MSG_W)) k24 (.clk, .rst_n, .cyc, .stall(stall24), .ch_req(m24_req), .ch_data(m24_data), .ch_ack(m24_ack));

  logic [1:0] lreq, lgnt, l11, l21;
  at_parallel dut (.clk, .rst_n, .m11_req, .m11_data, .m11_ack, .m21_req, .m21_data, .m21_ack, .m14_req, .m14_data, .m14_ack, .m24_req, .m24_data, .m24_ack, .lock_req(lreq), .lock_gnt(lgnt), .q11_level(l11), .q21_level(l21));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // mechanism counters
  int n_qfill = 0, n_state_ey = 0;
  int n_block = 0, n_both = 0;
  always @(posedge clk) if (rst_n) begin
    if (l11 >= 2 || l21 >= 2) n_qfill++;
    if (lreq == 2'b11 && lgnt != 2'b00) n_block++;
    if (dut.u_thr1.st != dut.u_thr1.TH_WAIT && dut.u_thr2.st != dut.u_thr2.TH_WAIT) n_both++;
    chk(lgnt != 2'b11, "lock mutual exclusion");
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cnt;
    bit         st_ey;
    logic [7:0] xs11[$], xs21[$];
    bit         used[256];
    int         base;
    cnt = 0; st_ey = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // phase 1: isolated events
    for (int i = 0; i < N_SEQ; i++) begin
      logic [7:0] x;
      bit t2;
      int b;
      x  = 8'($urandom);
      t2 = ($urandom % 2) == 1;
      if (!t2) begin
        b = k14.got.size();
        s11.pending.push_back({M11, x});
        while (k14.got.size() < b + 1) @(posedge clk);
        @(posedge clk);
        chk(k14.got[$] == {M14, thread1(x, cnt)}, "m14 value");
        chk(k14.t_got[$] - (s11.t_req[$] + 1) == LAT, $sformatf("m14 latency %0d", k14.t_got[$] - (s11.t_req[$] + 1)));
      end else begin
        b = k24.got.size();
        s21.pending.push_back({M21, x});
        while (k24.got.size() < b + 1) @(posedge clk);
        @(posedge clk);
        chk(k24.got[$] == {M24, thread2(x, cnt, st_ey)}, "m24 value");
        chk(k24.t_got[$] - (s21.t_req[$] + 1) == LAT, $sformatf("m24 latency %0d", k24.t_got[$] - (s21.t_req[$] + 1)));
        st_ey = !st_ey;
        if (st_ey) n_state_ey++;
      end
      cnt++;
      repeat (3) @(posedge clk);
    end

    // phase 2: bursts on both channels with stalling receivers
    base = int'(cnt);
    begin
      int b14, b24;
      b14 = k14.got.size();
      b24 = k24.got.size();
      hold = 1'b1;
      for (int i = 0; i < N_BURST; i++) begin
        logic [7:0] x;
        x = 8'($urandom);
        if (i % 3 != 2) begin s11.pending.push_back({M11, x}); xs11.push_back(x); end
        else            begin s21.pending.push_back({M21, x}); xs21.push_back(x); end
        x = 8'($urandom);
        if (i % 3 != 1) begin s21.pending.push_back({M21, x}); xs21.push_back(x); end
      end
      @(posedge clk);
      hold = 1'b0;
      fork
        begin
          while (k14.got.size() < b14 + xs11.size() || k24.got.size() < b24 + xs21.size()) begin
            stall14 = ($urandom % 4) == 0;
            stall24 = ($urandom % 3) == 0;
            @(posedge clk);
          end
          stall14 = 1'b0; stall24 = 1'b0;
        end
      join
      repeat (5) @(posedge clk);
      chk(k14.got.size() == b14 + xs11.size(), "m14 count");
      chk(k24.got.size() == b24 + xs21.size(), "m24 count");
      for (int i = 0; i < 256; i++) used[i] = 0;
      for (int i = 0; i < xs11.size(); i++) begin
        logic [7:0] c;
        msg_t r;
        r = k14.got[b14 + i];
        chk(r.sig == M14, "m14 signal");
        c = cnt_of_m14(xs11[i], r.data);
        chk(int'(c) >= base && int'(c) < base + xs11.size() + xs21.size() && !used[c], $sformatf("PrC count %0d from m14", c));
        used[c] = 1;
      end
      for (int i = 0; i < xs21.size(); i++) begin
        logic [7:0] c;
        msg_t r;
        r = k24.got[b24 + i];
        chk(r.sig == M24, "m24 signal");
        c = cnt_of_m24(xs21[i], r.data, st_ey);
        chk(int'(c) >= base && int'(c) < base + xs11.size() + xs21.size() && !used[c], $sformatf("PrC count %0d from m24", c));
        used[c] = 1;
        st_ey = !st_ey;
        if (st_ey) n_state_ey++;
      end
    end
    chk(k14.proto_err == 0 && k24.proto_err == 0, "channel protocol");
    // every mechanism must have happened
    chk(n_qfill > 0, "queue held two or more events");
    chk(n_state_ey > 0, "PrE state switch");
    chk(n_block > 0, "a thread blocked on the lock");
    chk(n_both > 0, "both threads executing at once");
    $display("mechanisms: queue_fill=%0d pre_ey=%0d blocked=%0d parallel=%0d", n_qfill, n_state_ey, n_block, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
