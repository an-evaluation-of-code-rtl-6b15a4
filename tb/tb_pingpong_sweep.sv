// tb_pingpong_sweep: the ping-pong example over the sizes of its area
// study. Message sizes 1, 4, 16, 24 and 31 bits at queue length 2 (the
// message-size sweep; a 0-bit message has no parameter and cannot be
// built as a port), and queue lengths 0, 1, 4, 16 and 24 at 8-bit messages
// (the queue-length sweep). Each size is an independent tb_pp_case; every
// case must answer all its pings in order with the expected response time
// and fill its queue. The result line sums all cases.
module tb_pingpong_sweep;
  logic clk = 1'b0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  tb_pp_case #(.W(1),  .Q(2))  c_w1  (.clk, .cyc);
  tb_pp_case #(.W(4),  .Q(2))  c_w4  (.clk, .cyc);
  tb_pp_case #(.W(16), .Q(2))  c_w16 (.clk, .cyc);
  tb_pp_case #(.W(24), .Q(2))  c_w24 (.clk, .cyc);
  tb_pp_case #(.W(31), .Q(2))  c_w31 (.clk, .cyc);
  tb_pp_case #(.W(8),  .Q(0))  c_q0  (.clk, .cyc);
  tb_pp_case #(.W(8),  .Q(1))  c_q1  (.clk, .cyc);
  tb_pp_case #(.W(8),  .Q(4))  c_q4  (.clk, .cyc);
  tb_pp_case #(.W(8),  .Q(16)) c_q16 (.clk, .cyc);
  tb_pp_case #(.W(8),  .Q(24)) c_q24 (.clk, .cyc);

  function automatic int sum_checks();
    return c_w1.checks + c_w4.checks + c_w16.checks + c_w24.checks + c_w31.checks
         + c_q0.checks + c_q1.checks + c_q4.checks + c_q16.checks + c_q24.checks;
  endfunction
  function automatic int sum_failures();
    return c_w1.failures + c_w4.failures + c_w16.failures + c_w24.failures + c_w31.failures
         + c_q0.failures + c_q1.failures + c_q4.failures + c_q16.failures + c_q24.failures;
  endfunction
  function automatic int n_done();
    return c_w1.done + c_w4.done + c_w16.done + c_w24.done + c_w31.done
         + c_q0.done + c_q1.done + c_q4.done + c_q16.done + c_q24.done;
  endfunction

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("FAIL watchdog (%0d of 10 sizes done)", n_done());
    $display("TB_RESULT checks=%0d failures=%0d", sum_checks(), sum_failures() + 1);
    $finish;
  end

  initial begin
    while (n_done() != 10) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("ping-pong sweep: 10 sizes run");
    $display("TB_RESULT checks=%0d failures=%0d", sum_checks(), sum_failures());
    $finish;
  end
endmodule
