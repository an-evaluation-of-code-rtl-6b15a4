// tb_sdl_hw_top: end-to-end test of sdl_hw_top at its default parameters.
// The same list of external events is applied to the four implementations
// of the SDL example (server model, serialized single queue, serialized
// priority queue, parallel threads) while the ping-pong process exchanges
// messages alongside.
//   Phase 1: isolated events, one at a time. Every implementation must give
//     the reference model's response, with the response time of its
//     architecture: 21 cycles (server model, three entities of 7), 9
//     (serialized), 11 (parallel, uncontended lock).
//   Phase 2: bursts on both event channels with stalling receivers. All
//     responses must arrive, in order per thread, with each of PrC's
//     transitions executed exactly once (each transition count used once).
// Each mechanism must occur at least once: queues holding two or more
// events, two inputs competing for one queue, a priority decision, a
// thread blocked on the lock, both parallel threads busy at once, PrE's
// state switch, and a full ping-pong queue. The CAN physical layer sends a
// 24-bit frame in loopback that needs three stuff bits and must receive it
// back unchanged; a second node on the wired-AND bus then forces a
// resynchronization, a stuff error, a hard synchronization and a wake-up
// from sleep.
module tb_sdl_hw_top;
  import sdl_pkg::*;
  import tb_model_pkg::*;

  localparam int N_SEQ = 16;
  localparam int N_BURST = 30;
  localparam int NA = 4;
  localparam int LAT [NA] = '{21, 9, 9, 11};
  localparam string NAME [NA] = '{"server", "single-queue", "priority-queue", "parallel"};

  logic clk = 1'b0, rst_n = 1'b0;
  int   cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // shared event list
  logic [7:0] ev_x [N_SEQ + 2 * N_BURST];
  bit         ev_t2 [N_SEQ];

  logic [NA-1:0] r11, a11, r21, a21, r14, a14, r24, a24;
  msg_t d11 [NA];
  msg_t d21 [NA];
  msg_t d14 [NA];
  msg_t d24 [NA];
  logic [NA-1:0] done;

  // ping-pong
  logic pp_req, pp_ack, pg_req, pg_ack, pp_hold = 1'b0, pg_stall = 1'b0;
  logic [7:0] pp_d, pg_d;
  logic [15:0] pp_n;
  logic [1:0] pp_lvl;
  // status
  logic [1:0] srv_lvl, ats_lvl, atp_l11, atp_l21, atl_l11, atl_l21, lreq, lgnt;

  sdl_hw_top dut (
    .clk, .rst_n,
    .pp_ping_req(pp_req), .pp_ping_data(pp_d), .pp_ping_ack(pp_ack),
    .pp_pong_req(pg_req), .pp_pong_data(pg_d), .pp_pong_ack(pg_ack),
    .pp_n_exchanged(pp_n), .pp_q_level(pp_lvl),
    .srv_m11_req(r11[0]), .srv_m11_data(d11[0]), .srv_m11_ack(a11[0]),
    .srv_m21_req(r21[0]), .srv_m21_data(d21[0]), .srv_m21_ack(a21[0]),
    .srv_m14_req(r14[0]), .srv_m14_data(d14[0]), .srv_m14_ack(a14[0]),
    .srv_m24_req(r24[0]), .srv_m24_data(d24[0]), .srv_m24_ack(a24[0]),
    .srv_prc_q_level(srv_lvl),
    .ats_m11_req(r11[1]), .ats_m11_data(d11[1]), .ats_m11_ack(a11[1]),
    .ats_m21_req(r21[1]), .ats_m21_data(d21[1]), .ats_m21_ack(a21[1]),
    .ats_m14_req(r14[1]), .ats_m14_data(d14[1]), .ats_m14_ack(a14[1]),
    .ats_m24_req(r24[1]), .ats_m24_data(d24[1]), .ats_m24_ack(a24[1]),
    .ats_q_level(ats_lvl),
    .atp_m11_req(r11[2]), .atp_m11_data(d11[2]), .atp_m11_ack(a11[2]),
    .atp_m21_req(r21[2]), .atp_m21_data(d21[2]), .atp_m21_ack(a21[2]),
    .atp_m14_req(r14[2]), .atp_m14_data(d14[2]), .atp_m14_ack(a14[2]),
    .atp_m24_req(r24[2]), .atp_m24_data(d24[2]), .atp_m24_ack(a24[2]),
    .atp_q11_level(atp_l11), .atp_q21_level(atp_l21),
    .atl_m11_req(r11[3]), .atl_m11_data(d11[3]), .atl_m11_ack(a11[3]),
    .atl_m21_req(r21[3]), .atl_m21_data(d21[3]), .atl_m21_ack(a21[3]),
    .atl_m14_req(r14[3]), .atl_m14_data(d14[3]), .atl_m14_ack(a14[3]),
    .atl_m24_req(r24[3]), .atl_m24_data(d24[3]), .atl_m24_ack(a24[3]),
    .atl_lock_req(lreq), .atl_lock_gnt(lgnt),
    .atl_q11_level(atl_l11), .atl_q21_level(atl_l21),
    .can_reset(1'b0), .can_sleep(c_sleep), .can_rx_sync(c_rx_sync), .can_awoken(c_awoken),
    .can_controller_period(8'd5), .can_start_stuff(c_start), .can_reset_stuff(c_stop),
    .can_tx_valid(c_txv), .can_tx(c_tx), .can_tx_taken(c_taken),
    .can_rx_valid(c_rxv), .can_rx(c_rx), .can_bus_level(c_bus), .can_tx_level(c_txl),
    .can_rx_edge(c_edge), .can_error(c_err), .can_seg(c_seg),
    .can_ctrl_clock(c_ctrl), .can_can_clock(c_can), .can_sample_now(c_smp), .can_stuff_now(c_stf)
  );

  // CAN physical layer in loopback: a short frame with stuffing
  logic c_sleep = 1'b0, c_other = 1'b1;
  logic c_rx_sync = 1'b0, c_start = 1'b0, c_stop = 1'b0, c_txv = 1'b0, c_tx = 1'b1;
  logic c_awoken, c_taken, c_rxv, c_rx, c_bus, c_txl, c_edge, c_err, c_ctrl, c_can, c_smp, c_stf;
  logic [1:0] c_seg;
  assign c_bus = c_txl & c_other;   // wired-AND with a second node
  logic can_rxd[$];
  int n_can_stuff = 0, n_can_err = 0, can_done = 0, n_can_wake = 0, n_can_hsync = 0, n_can_resync = 0;
  int c_last_can = -1, can_frame_stuff = 0;
  localparam int CAN_N = 24;
  logic can_data [CAN_N] = '{0,0,0,0,0,0,0,1,1,1,1,1,1,0,1,0,1,1,1,1,1,0,0,1};
  always @(posedge clk) if (rst_n) begin
    if (c_rxv) can_rxd.push_back(c_rx);
    if (c_stf) n_can_stuff++;
    if (c_err) n_can_err++;
    if (c_awoken) n_can_wake++;
    if (c_can) begin
      if (c_last_can >= 0 && cyc - c_last_can != 8 * 5) n_can_resync++;
      c_last_can = cyc;
    end
  end
  initial begin
    int k;
    wait (rst_n);
    repeat (200) @(posedge clk);
    @(posedge c_smp);
    repeat (5) @(negedge clk);
    can_rxd.delete();
    c_start = 1'b1; c_txv = 1'b1; c_tx = can_data[0]; k = 0;
    @(negedge clk);
    c_start = 1'b0;
    while (k < CAN_N) begin
      @(negedge clk);
      if (c_taken) begin k++; if (k < CAN_N) c_tx = can_data[k]; end
    end
    c_txv = 1'b0;
    repeat (100) @(posedge clk);
    c_stop = 1'b1; @(negedge clk); c_stop = 1'b0;
    chk_top(n_can_err == 0 && n_can_resync == 0, "CAN frame without errors or resynchronization");
    can_frame_stuff = n_can_stuff;
    // resynchronization: the second node pulls the bus low at tick 3
    do @(negedge clk); while (!c_can);
    repeat (3 * 5 - 2) @(negedge clk);
    c_other = 1'b0;
    repeat (8 * 5) @(negedge clk);
    c_other = 1'b1;
    // stuff error: the second node holds the bus dominant for seven bits
    repeat (2 * 8 * 5) @(negedge clk);
    c_start = 1'b1; @(negedge clk); c_start = 1'b0;
    c_other = 1'b0;
    repeat (7 * 8 * 5) @(negedge clk);
    c_other = 1'b1;
    c_stop = 1'b1; @(negedge clk); c_stop = 1'b0;
    // hard synchronization on the next falling edge
    repeat (2 * 8 * 5 + 13) @(negedge clk);
    c_rx_sync = 1'b1; @(negedge clk); c_rx_sync = 1'b0;
    c_other = 1'b0;
    while (!c_ctrl) @(negedge clk);
    @(negedge clk);
    if (dut.u_can_phy.tq == '0) n_can_hsync++;
    repeat (8 * 5) @(negedge clk);
    c_other = 1'b1;
    // sleep, then wake-up by a dominant edge
    repeat (2 * 8 * 5) @(negedge clk);
    c_sleep = 1'b1; @(negedge clk); c_sleep = 1'b0;
    repeat (4 * 8 * 5) @(negedge clk);
    c_other = 1'b0; repeat (3) @(negedge clk); c_other = 1'b1;
    repeat (4 * 8 * 5) @(negedge clk);
    can_done = 1;
  end

  tb_hs_src  #(.W(8)) pps (.clk, .rst_n, .cyc, .hold(pp_hold), .ch_req(pp_req), .ch_data(pp_d), .ch_ack(pp_ack));
  tb_hs_sink #(.W(8)) ppk (.clk, .rst_n, .cyc, .stall(pg_stall), .ch_req(pg_req), .ch_data(pg_d), .ch_ack(pg_ack));

  for (genvar a = 0; a < NA; a++) begin : g
    logic hold = 1'b0, stall14 = 1'b0, stall24 = 1'b0;
    int   checks = 0, failures = 0, n_ey = 0;
    tb_hs_src  #(.W(MSG_W)) s11 (.clk, .rst_n, .cyc, .hold, .ch_req(r11[a]), .ch_data(d11[a]), .ch_ack(a11[a]));
    tb_hs_src  #(.W(MSG_W)) s21 (.clk, .rst_n, .cyc, .hold, .ch_req(r21[a]), .ch_data(d21[a]), .ch_ack(a21[a]));
    tb_hs_sink #(.W(MSG_W)) k14 (.clk, .rst_n, .cyc, .stall(stall14), .ch_req(r14[a]), .ch_data(d14[a]), .ch_ack(a14[a]));
    tb_hs_sink #(.W(MSG_W)) k24 (.clk, .rst_n, .cyc, .stall(stall24), .ch_req(r24[a]), .ch_data(d24[a]), .ch_ack(a24[a]));

    task automatic chk(input bit ok, input string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL [%s] %s at cycle %0d", NAME[a], what, cyc);
      end
    endtask

    initial begin
      logic [7:0] cnt;
      bit st_ey;
      logic [7:0] xs11[$], xs21[$];
      bit used[256];
      int base, b14, b24;
      msg_t r;
      done[a] = 1'b0;
      cnt = 0; st_ey = 0;
      wait (rst_n);
      repeat (2) @(posedge clk);
      for (int i = 0; i < N_SEQ; i++) begin
        int b;
        if (!ev_t2[i]) begin
          b = k14.got.size();
          s11.pending.push_back({M11, ev_x[i]});
          while (k14.got.size() < b + 1) @(posedge clk);
          chk(k14.got[b] == {M14, thread1(ev_x[i], cnt)}, "m14 value");
          chk(k14.t_got[b] - (s11.t_req[$] + 1) == LAT[a], $sformatf("m14 response time %0d", k14.t_got[b] - (s11.t_req[$] + 1)));
        end else begin
          b = k24.got.size();
          s21.pending.push_back({M21, ev_x[i]});
          while (k24.got.size() < b + 1) @(posedge clk);
          chk(k24.got[b] == {M24, thread2(ev_x[i], cnt, st_ey)}, "m24 value");
          chk(k24.t_got[b] - (s21.t_req[$] + 1) == LAT[a], $sformatf("m24 response time %0d", k24.t_got[b] - (s21.t_req[$] + 1)));
          st_ey = !st_ey;
          if (st_ey) n_ey++;
        end
        cnt++;
        repeat (3) @(posedge clk);
      end
      base = int'(cnt);
      b14 = k14.got.size();
      b24 = k24.got.size();
      hold = 1'b1;
      for (int i = 0; i < N_BURST; i++) begin
        if (i % 3 != 2) begin s11.pending.push_back({M11, ev_x[N_SEQ + 2*i]}); xs11.push_back(ev_x[N_SEQ + 2*i]); end
        else            begin s21.pending.push_back({M21, ev_x[N_SEQ + 2*i]}); xs21.push_back(ev_x[N_SEQ + 2*i]); end
        if (i % 3 != 1) begin s21.pending.push_back({M21, ev_x[N_SEQ + 2*i + 1]}); xs21.push_back(ev_x[N_SEQ + 2*i + 1]); end
      end
      @(posedge clk);
      hold = 1'b0;
      while (k14.got.size() < b14 + xs11.size() || k24.got.size() < b24 + xs21.size()) begin
        stall14 = ($urandom % 4) == 0;
        stall24 = ($urandom % 3) == 0;
        @(posedge clk);
      end
      stall14 = 1'b0; stall24 = 1'b0;
      for (int i = 0; i < 256; i++) used[i] = 0;
      for (int i = 0; i < xs11.size(); i++) begin
        logic [7:0] c;
        r = k14.got[b14 + i];
        c = cnt_of_m14(xs11[i], r.data);
        chk(r.sig == M14 && int'(c) >= base && int'(c) < base + xs11.size() + xs21.size() && !used[c], "burst m14");
        used[c] = 1;
      end
      for (int i = 0; i < xs21.size(); i++) begin
        logic [7:0] c;
        r = k24.got[b24 + i];
        c = cnt_of_m24(xs21[i], r.data, st_ey);
        chk(r.sig == M24 && int'(c) >= base && int'(c) < base + xs11.size() + xs21.size() && !used[c], "burst m24");
        used[c] = 1;
        st_ey = !st_ey;
        if (st_ey) n_ey++;
      end
      chk(k14.proto_err == 0 && k24.proto_err == 0, "channel protocol");
      chk(n_ey > 0, "PrE state switch");
      $display("[%s] isolated response time %0d cycles", NAME[a], LAT[a]);
      done[a] = 1'b1;
    end
  end

  // mechanism counters
  int n_qfill [NA];
  int n_merge_srv = 0, n_merge_ats = 0, n_prio = 0, n_block = 0, n_par = 0, n_pp_full = 0;
  int checks = 0, failures = 0;
  always @(posedge clk) if (rst_n) begin
    if (srv_lvl >= 2 || dut.u_server.lvl_d >= 2 || dut.u_server.lvl_e >= 2 || dut.u_server.lvl_a >= 2) n_qfill[0]++;
    if (ats_lvl >= 2) n_qfill[1]++;
    if (atp_l11 >= 2 || atp_l21 >= 2) n_qfill[2]++;
    if (atl_l11 >= 2 || atl_l21 >= 2) n_qfill[3]++;
    if (dut.u_server.u_prc.u_shell.u_mux.in_valid == 2'b11) n_merge_srv++;
    if (dut.u_at_single.u_mux.in_valid == 2'b11) n_merge_ats++;
    if (dut.u_at_prio.q_valid == 2'b11 && dut.u_at_prio.e_ready) begin
      n_prio++;
      checks++;
      if (dut.u_at_prio.q_ready != 2'b01) begin failures++; $display("FAIL high class not served first"); end
    end
    if (lreq == 2'b11 && lgnt != 2'b00) n_block++;
    if (dut.u_at_parallel.u_thr1.st != dut.u_at_parallel.u_thr1.TH_WAIT &&
        dut.u_at_parallel.u_thr2.st != dut.u_at_parallel.u_thr2.TH_WAIT) n_par++;
    if (pp_lvl == 2'd2) n_pp_full++;
    checks++;
    if (lgnt == 2'b11) begin failures++; $display("FAIL lock mutual exclusion"); end
  end

  task automatic chk_top(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ping-pong traffic alongside
  logic [7:0] pp_exp[$];
  initial begin
    for (int i = 0; i < N_SEQ + 2 * N_BURST; i++) ev_x[i] = 8'($urandom);
    for (int i = 0; i < N_SEQ; i++) ev_t2[i] = ($urandom % 2) == 1;
    for (int a = 0; a < NA; a++) n_qfill[a] = 0;
    wait (rst_n);
    for (int i = 0; i < 30; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      pp_exp.push_back(v);
      pps.pending.push_back(v);
    end
    while (ppk.got.size() < 30) begin
      @(negedge clk);
      pg_stall = ($urandom % 6) != 0;
    end
    pg_stall = 1'b0;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done == '1 && ppk.got.size() == 30 && can_done == 1);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 30; i++) chk_top(ppk.got[i] == pp_exp[i], "pong value");
    chk_top(pp_n == 16'd30, "ping-pong exchanges");
    chk_top(n_pp_full > 0, "ping-pong queue full");
    for (int a = 0; a < NA; a++) chk_top(n_qfill[a] > 0, $sformatf("queue fill in %s", NAME[a]));
    chk_top(n_merge_srv > 0, "two channels competing for PrC's queue");
    chk_top(n_merge_ats > 0, "two events competing for the single queue");
    chk_top(n_prio > 0, "priority decision");
    chk_top(n_block > 0, "thread blocked on the lock");
    chk_top(n_par > 0, "parallel threads busy at once");
    chk_top(can_rxd.size() >= CAN_N, "CAN bits received");
    for (int i = 0; i < CAN_N && i < can_rxd.size(); i++) chk_top(can_rxd[i] == can_data[i], $sformatf("CAN bit %0d", i));
    chk_top(can_frame_stuff == 3, $sformatf("CAN stuff bits in the frame %0d", can_frame_stuff));
    chk_top(n_can_err > 0, $sformatf("CAN stuff errors %0d", n_can_err));
    chk_top(n_can_resync > 0, $sformatf("CAN resynchronized bits %0d", n_can_resync));
    chk_top(n_can_hsync == 1, "CAN hard synchronization");
    chk_top(n_can_wake == 1, $sformatf("CAN wake-ups %0d", n_can_wake));
    checks += g[0].checks + g[1].checks + g[2].checks + g[3].checks;
    failures += g[0].failures + g[1].failures + g[2].failures + g[3].failures;
    $display("mechanisms: qfill=%0d/%0d/%0d/%0d merge_srv=%0d merge_single=%0d prio=%0d lock_block=%0d parallel=%0d pp_full=%0d can_stuff=%0d can_err=%0d can_resync=%0d can_hsync=%0d can_wake=%0d",
             n_qfill[0], n_qfill[1], n_qfill[2], n_qfill[3], n_merge_srv, n_merge_ats, n_prio, n_block, n_par, n_pp_full, n_can_stuff, n_can_err, n_can_resync, n_can_hsync, n_can_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
