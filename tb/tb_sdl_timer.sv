// tb_sdl_timer: checks the SDL timer. Random durations with tick tied high
// and with a sparse tick: the signal must appear on exactly the
// duration-th tick after set and stay until taken; cancel must suppress
// it; setting again must restart the count and withdraw a pending signal.
module tb_sdl_timer;
  localparam int TW = 8, W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic tick, set, cancel, ov, ordy, active;
  logic [TW-1:0] dur;
  logic [W-1:0] sig, od;
  int nticks = 0;

  sdl_timer #(.TW(TW), .W(W)) dut (.clk, .rst_n, .tick, .set, .cancel, .duration(dur), .sig,
                                   .out_valid(ov), .out_data(od), .out_ready(ordy), .active);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 1'b0; set = 1'b0; cancel = 1'b0; ordy = 1'b0; dur = '0; sig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      int d, sparse, n;
      d = 1 + $urandom % 20;
      sparse = i % 2;
      @(negedge clk);
      set = 1'b1; dur = TW'(d); sig = W'($urandom);
      @(negedge clk);
      set = 1'b0;
      n = 0;
      // count ticks until the signal appears
      while (!ov && n <= d + 1) begin
        tick = sparse ? (($urandom % 3) == 0) : 1'b1;
        @(negedge clk);
        if (tick) n++;
        tick = 1'b0;
      end
      chk(ov && n == d, $sformatf("expiry after %0d ticks, expected %0d", n, d));
      chk(od == sig, "timer signal");
      chk(active, "active while signal waits");
      repeat ($urandom % 3) begin @(negedge clk); chk(ov, "signal held until taken"); end
      ordy = 1'b1;
      @(negedge clk);
      ordy = 1'b0;
      chk(!ov && !active, "signal taken once");
    end
    // cancel
    @(negedge clk); set = 1'b1; dur = 8'd5; @(negedge clk); set = 1'b0;
    tick = 1'b1; repeat (2) @(negedge clk);
    cancel = 1'b1; @(negedge clk); cancel = 1'b0;
    repeat (10) begin @(negedge clk); chk(!ov && !active, "cancelled timer silent"); end
    // re-set withdraws a pending signal and restarts
    @(negedge clk); set = 1'b1; dur = 8'd2; @(negedge clk); set = 1'b0;
    repeat (2) @(negedge clk);
    chk(ov, "expired");
    set = 1'b1; dur = 8'd4; @(negedge clk); set = 1'b0;
    chk(!ov, "pending signal withdrawn by set");
    repeat (3) begin @(negedge clk); chk(!ov, "restarted count"); end
    @(negedge clk);
    chk(ov, "expired after restart");
    tick = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
