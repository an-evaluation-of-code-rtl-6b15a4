// tb_can_phy: checks the CAN physical layer in loopback (bus = tx_level
// wired-AND with a second, testbench-controlled node) at the default
// 8 ticks per bit with a controller period of 4 clock cycles, the shortest one the
// 4-cycle thread allows.
// Checks: tick period, bit time of 8 ticks, sample point 6 ticks after the
// bit start, rx_valid exactly 4 cycles after its ctrl_clock, a random bit
// stream with long runs sent with stuffing and received back unchanged,
// the bus stream equal to the independently stuffed reference, a stuff
// error when the other node holds the bus dominant, hard synchronization on
// a dominant edge, resynchronization by one tick (SJW) for edges seen at
// every tick of a bit, and sleep / wake-up by bus activity.
module tb_can_phy;
  localparam int P = 4, T = 8, S = 6, SJW = 1, NBITS = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic reset = 0, sleep = 0, rx_sync = 0, start_stuff = 0, reset_stuff = 0;
  logic tx_valid = 0, tx = 1, other = 1;
  logic awoken, tx_taken, rx_valid, rx, tx_level, rx_edge, error;
  logic [1:0] seg;
  logic ctrl_clock, can_clock, sample_now, stuff_now, bus;
  assign bus = tx_level & other;

  can_phy dut (.clk, .rst_n, .controller_period(8'(P)), .reset, .sleep, .rx_sync, .awoken,
               .start_stuff, .reset_stuff, .tx_valid, .tx, .tx_taken, .rx_valid, .rx,
               .bus_level(bus), .tx_level, .rx_edge, .error, .seg,
               .ctrl_clock, .can_clock, .sample_now, .stuff_now);

  // timing monitors
  int t_ctrl[$];
  int n_resync = 0;
  int last_ctrl = -1, last_can = -1, n_ctrl = 0, n_can = 0, n_stuff = 0, n_err = 0, n_edge = 0;
  bit check_timing = 1;
  logic [0:0] bus_at_sample[$];
  logic [0:0] rx_bits[$];
  always @(posedge clk) if (rst_n) begin
    if (ctrl_clock) begin
      if (check_timing && last_ctrl >= 0) chk(cyc - last_ctrl == P, $sformatf("tick period %0d", cyc - last_ctrl));
      last_ctrl = cyc; n_ctrl++;
      t_ctrl.push_back(cyc);
      if (t_ctrl.size() > 8) void'(t_ctrl.pop_front());
    end
    if (can_clock) begin
      if (check_timing && last_can >= 0) chk(cyc - last_can == T * P, $sformatf("bit time %0d", cyc - last_can));
      last_can = cyc; n_can++;
    end
    if (sample_now) begin
      if (check_timing && last_can >= 0) chk(cyc - last_can == S * P, "sample point");
      bus_at_sample.push_back(bus);
    end
    if (rx_valid) begin
      // the ctrl_clock that started this thread was seen 4 cycles ago
      // (with a period of 4 the next ctrl_clock falls in this very cycle)
      chk(cyc - 4 inside {t_ctrl}, "ctrl_clock to rx 4 cycles");
      rx_bits.push_back(rx);
    end
    if (stuff_now) n_stuff++;
    if (error) n_err++;
    if (rx_edge) n_edge++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic data[$];
  logic ref_bus[$];
  initial begin
    int k, run;
    logic lastb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20 * P * T) @(posedge clk);
    chk(n_ctrl > 100 && n_can > 15, "clock and timing running");

    // data with long runs of equal bits
    for (int i = 0; i < NBITS; i++) begin
      if (i % 17 < 7) data.push_back(1'b0);
      else if (i % 17 < 13) data.push_back(1'b1);
      else data.push_back(1'($urandom));
    end
    // reference stuffing: after five equal bits insert the complement
    run = 0; lastb = 1'b1;
    foreach (data[i]) begin
      ref_bus.push_back(data[i]);
      run = (run > 0 && data[i] == lastb) ? run + 1 : 1;
      lastb = data[i];
      if (run == 5) begin ref_bus.push_back(!lastb); lastb = !lastb; run = 1; end
    end
    // start a frame (and stuffing) after the last idle bit has been
    // received, so that the next bit start sends data[0]
    @(posedge sample_now);
    repeat (5) @(negedge clk);
    rx_bits.delete();
    bus_at_sample.delete();
    start_stuff = 1'b1;
    k = 0;
    tx_valid = 1'b1; tx = data[0];
    @(negedge clk);
    start_stuff = 1'b0;
    while (k < NBITS) begin
      @(negedge clk);
      if (tx_taken) begin
        k++;
        if (k < NBITS) tx = data[k];
      end
    end
    tx_valid = 1'b0;
    repeat (2 * T * P) @(posedge clk);
    reset_stuff = 1'b1; @(negedge clk); reset_stuff = 1'b0;
    chk(rx_bits.size() >= NBITS, $sformatf("received %0d of %0d bits", rx_bits.size(), NBITS));
    for (int i = 0; i < NBITS && i < rx_bits.size(); i++) chk(rx_bits[i] == data[i], $sformatf("received bit %0d", i));
    for (int i = 0; i < ref_bus.size() && i < bus_at_sample.size(); i++) chk(bus_at_sample[i] == ref_bus[i], $sformatf("bus bit %0d", i));
    chk(n_stuff > 0, "stuff bits inserted");
    chk(n_err == 0, "no stuff error in a correct frame");

    // stuff error: the other node holds the bus dominant for 8 bits
    @(posedge can_clock);
    @(negedge clk);
    start_stuff = 1'b1; @(negedge clk); start_stuff = 1'b0;
    other = 1'b0;
    repeat (8 * T * P) @(posedge clk);
    other = 1'b1;
    reset_stuff = 1'b1; @(negedge clk); reset_stuff = 1'b0;
    chk(n_err > 0, "stuff error detected");

    // hard synchronization on a dominant edge at an arbitrary time
    repeat (3 * T * P) @(posedge clk);
    check_timing = 0;
    rx_sync = 1'b1; @(negedge clk); rx_sync = 1'b0;
    repeat (T * P + 17) @(posedge clk);
    @(negedge clk);
    k = n_edge;
    other = 1'b0;
    while (!ctrl_clock) @(posedge clk);
    @(posedge clk);
    @(negedge clk);
    chk(n_edge == k + 1 && dut.tq == '0, "hard sync: edge tick becomes tick 0");
    last_can = -1;
    other = 1'b1;
    repeat (3 * T * P) @(posedge clk);
    check_timing = 1;
    // the next bit starts T ticks after the edge
    repeat (2 * T * P) @(posedge clk);

    // resynchronization: a falling edge seen at tick E (1..T-1) of a bit
    // moves the bit timing by at most SJW ticks; ticks 0 and 1 are in phase
    check_timing = 0;
    for (int e = 1; e < T; e++) begin
      int t0, tc, n, exp_s, exp_c;
      int ts = 0;
      repeat (2 * T * P) @(posedge clk);
      do @(negedge clk); while (!can_clock);
      t0 = cyc;
      n = 0;
      while (n < e - 1) begin @(negedge clk); if (ctrl_clock) n++; end
      @(negedge clk);
      other = 1'b0;
      // (an edge after the sample point comes after this bit's sample)
      if (e <= S) begin
        do @(negedge clk); while (!sample_now);
        ts = cyc;
      end
      do @(negedge clk); while (!can_clock);
      tc = cyc;
      other = 1'b1;
      if (e <= 1)      begin exp_s = S * P;                                   exp_c = T * P; end
      else if (e <= S) begin exp_s = (S + ((e - 1) < SJW ? e - 1 : SJW)) * P; exp_c = T * P + (exp_s - S * P); end
      else             begin exp_s = S * P;                                   exp_c = (T - ((T + 1 - e) < SJW ? T + 1 - e : SJW)) * P; end
      if (e <= S) chk(ts - t0 == exp_s, $sformatf("resync edge at tick %0d: sample after %0d cycles, expected %0d", e, ts - t0, exp_s));
      chk(tc - t0 == exp_c, $sformatf("resync edge at tick %0d: bit of %0d cycles, expected %0d", e, tc - t0, exp_c));
      if (tc - t0 != T * P) n_resync++;
    end
    chk(n_resync == T - 2, $sformatf("resynchronized bits %0d", n_resync));
    repeat (2 * T * P) @(posedge clk);
    last_can = -1;
    check_timing = 1;
    repeat (2 * T * P) @(posedge clk);

    // sleep and wake-up
    @(negedge clk);
    sleep = 1'b1; @(negedge clk); sleep = 1'b0;
    check_timing = 0;
    repeat (2 * P) @(posedge clk);
    k = n_ctrl;
    repeat (5 * T * P) @(posedge clk);
    chk(n_ctrl == k, "clock stopped while asleep");
    @(negedge clk);
    other = 1'b0;
    repeat (3) @(posedge clk);
    other = 1'b1;
    repeat (4 * P) @(posedge clk);
    chk(n_ctrl > k, "clock restarted after wake-up");
    chk(dut.asleep == 1'b0, "awake");
    $display("stuff bits %0d, edges %0d, errors %0d, resynchronized bits %0d", n_stuff, n_edge, n_err, n_resync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_awoken = 0;
  always @(posedge clk) if (awoken) n_awoken++;
  final chk(n_awoken == 1, "one wake-up");
endmodule
