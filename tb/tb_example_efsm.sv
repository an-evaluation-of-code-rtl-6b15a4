// tb_example_efsm: checks the EFSMs of all five example processes, driven
// directly through their queue and output streams. For each process it
// sends the signals it handles plus one it does not; checks output signal,
// channel and parameter against the reference model, that unhandled signals
// are consumed silently, PrC's counter and PrE's EX/EY alternation, and the
// two-cycle transition (output offered 2 cycles after the message is taken).
module tb_example_efsm;
  import sdl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [4:0] qv, qr, ov, orr, oc;
  msg_t qd [5];
  msg_t od [5];
  data_t vc [5];
  pre_state_e se [5];

  example_efsm #(.PROC(PR_A)) ua (.clk, .rst_n, .q_valid(qv[0]), .q_data(qd[0]), .q_ready(qr[0]), .o_valid(ov[0]), .o_chan(oc[0]), .o_data(od[0]), .o_ready(orr[0]), .var_c(vc[0]), .st_e(se[0]));
  example_efsm #(.PROC(PR_B)) ub (.clk, .rst_n, .q_valid(qv[1]), .q_data(qd[1]), .q_ready(qr[1]), .o_valid(ov[1]), .o_chan(oc[1]), .o_data(od[1]), .o_ready(orr[1]), .var_c(vc[1]), .st_e(se[1]));
  example_efsm #(.PROC(PR_C)) uc (.clk, .rst_n, .q_valid(qv[2]), .q_data(qd[2]), .q_ready(qr[2]), .o_valid(ov[2]), .o_chan(oc[2]), .o_data(od[2]), .o_ready(orr[2]), .var_c(vc[2]), .st_e(se[2]));
  example_efsm #(.PROC(PR_D)) ud (.clk, .rst_n, .q_valid(qv[3]), .q_data(qd[3]), .q_ready(qr[3]), .o_valid(ov[3]), .o_chan(oc[3]), .o_data(od[3]), .o_ready(orr[3]), .var_c(vc[3]), .st_e(se[3]));
  example_efsm #(.PROC(PR_E)) ue (.clk, .rst_n, .q_valid(qv[4]), .q_data(qd[4]), .q_ready(qr[4]), .o_valid(ov[4]), .o_chan(oc[4]), .o_data(od[4]), .o_ready(orr[4]), .var_c(vc[4]), .st_e(se[4]));

  // send one message to process p; returns whether an output came, and it
  task automatic fire(input int p, input sig_e s, input logic [7:0] x,
                      output bit got, output msg_t o, output logic ch, output int lat);
    int t0;
    @(negedge clk);
    qv[p] = 1'b1; qd[p] = '{sig: s, data: x};
    @(posedge clk);
    while (!qr[p]) @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    qv[p] = 1'b0;
    got = 0; lat = 0;
    for (int i = 0; i < 6; i++) begin
      if (ov[p]) begin got = 1; o = od[p]; ch = oc[p]; lat = cyc - t0; break; end
      @(negedge clk);
    end
    if (got) begin
      orr[p] = 1'b1;
      @(negedge clk);
      orr[p] = 1'b0;
      chk(!ov[p], "output taken once");
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit got; msg_t o; logic ch; int lat;
    logic [7:0] x, cntc;
    bit ey;
    qv = '0; orr = '0;
    for (int p = 0; p < 5; p++) qd[p] = '{sig: SIG_NONE, data: 8'h00};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cntc = 0; ey = 0;
    for (int r = 0; r < 12; r++) begin
      x = 8'($urandom);
      fire(0, M11, x, got, o, ch, lat);
      chk(got && o.sig == M12 && o.data == 8'(x + 8'h11) && ch == 1'b0, "PrA m11->m12");
      chk(lat == 2, $sformatf("transition time %0d", lat));
      fire(0, M21, x, got, o, ch, lat);
      chk(!got, "PrA ignores m21");
      fire(1, M21, x, got, o, ch, lat);
      chk(got && o.sig == M22 && o.data == 8'(x + 8'h21) && ch == 1'b0, "PrB m21->m22");
      fire(2, M12, x, got, o, ch, lat);
      chk(got && o.sig == M13 && o.data == 8'(x + cntc) && ch == 1'b0, "PrC m12->m13 on channel 0");
      cntc++;
      fire(2, M22, x, got, o, ch, lat);
      chk(got && o.sig == M23 && o.data == 8'(x + cntc) && ch == 1'b1, "PrC m22->m23 on channel 1");
      cntc++;
      fire(2, M13, x, got, o, ch, lat);
      chk(!got, "PrC ignores m13");
      fire(3, M13, x, got, o, ch, lat);
      chk(got && o.sig == M14 && o.data == 8'(x + 8'h13), "PrD m13->m14");
      fire(4, M23, x, got, o, ch, lat);
      chk(got && o.sig == M24 && o.data == (ey ? (x ^ 8'h23) : 8'(x + 8'h23)), "PrE m23->m24");
      ey = !ey;
      chk(se[4] == (ey ? EY : EX), "PrE state");
      chk(vc[2] == cntc, "PrC variable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
