// tb_at_engine: checks the serialized activity-thread engine driven
// directly by an event stream. Each m11 must yield m14 on output 0 and
// each m21 m24 on output 1, with values from the reference model; events
// other than m11/m21 are dropped. Timing: the result is offered 4 cycles
// after the event is taken (three tasks of one cycle each), and the next
// event is taken only after the result has gone.
module tb_at_engine;
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

  logic ev_valid, ev_ready;
  msg_t ev_data, o_data;
  logic [1:0] o_valid, o_ready;
  data_t var_c;
  pre_state_e st_e;

  at_engine dut (.clk, .rst_n, .ev_valid, .ev_data, .ev_ready, .o_valid, .o_data, .o_ready, .var_c, .st_e);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cnt;
    bit ey;
    cnt = 0; ey = 0;
    ev_valid = 1'b0; ev_data = '{sig: SIG_NONE, data: 8'h00}; o_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      logic [7:0] x;
      int r, t0, lat;
      x = 8'($urandom);
      r = $urandom % 5;
      @(negedge clk);
      ev_valid = 1'b1;
      ev_data  = '{sig: (r == 4) ? M13 : (r < 2 ? M11 : M21), data: x};
      @(posedge clk);
      while (!ev_ready) @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      ev_valid = 1'b0;
      if (r == 4) begin
        repeat (6) begin chk(o_valid == 2'b00, "unknown event dropped"); @(negedge clk); end
        continue;
      end
      lat = 0;
      while (o_valid == 2'b00 && lat < 10) begin @(negedge clk); lat++; end
      chk(cyc - t0 == 4, $sformatf("thread time %0d", cyc - t0));
      chk(!ev_ready, "engine busy while result pending");
      if (r < 2) begin
        chk(o_valid == 2'b01 && o_data == '{sig: M14, data: thread1(x, cnt)}, "m14");
      end else begin
        chk(o_valid == 2'b10 && o_data == '{sig: M24, data: thread2(x, cnt, ey)}, "m24");
        ey = !ey;
      end
      cnt++;
      // hold the output a few cycles before taking it
      repeat ($urandom % 3) begin @(negedge clk); chk(o_valid != 2'b00, "result held"); end
      o_ready = 2'b11;
      @(negedge clk);
      o_ready = 2'b00;
      chk(var_c == cnt, "PrC variable");
      chk(st_e == (ey ? EY : EX), "PrE state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
