// tb_msg_queue: checks the FIFO message queue at depths 2 (default), 5 and
// 0 (pass-through) against a reference queue under random push/pop.
// Checks: data order, level, in_ready low exactly when full, out_valid
// exactly when not empty, and a write visible one cycle later.
module tb_msg_queue;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int cyc = 0, checks = 0, failures = 0, n_full = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [2:0] iv, ir, ov, orr;
  logic [W-1:0] id [3];
  logic [W-1:0] od [3];
  logic [1:0] l2;
  logic [2:0] l5;
  logic       l0;

  msg_queue #(.W(W))             q2 (.clk, .rst_n, .in_valid(iv[0]), .in_data(id[0]), .in_ready(ir[0]),
                                     .out_valid(ov[0]), .out_data(od[0]), .out_ready(orr[0]), .level(l2));
  msg_queue #(.W(W), .DEPTH(5))  q5 (.clk, .rst_n, .in_valid(iv[1]), .in_data(id[1]), .in_ready(ir[1]),
                                     .out_valid(ov[1]), .out_data(od[1]), .out_ready(orr[1]), .level(l5));
  msg_queue #(.W(W), .DEPTH(0))  q0 (.clk, .rst_n, .in_valid(iv[2]), .in_data(id[2]), .in_ready(ir[2]),
                                     .out_valid(ov[2]), .out_data(od[2]), .out_ready(orr[2]), .level(l0));

  logic [W-1:0] m [2][$];
  localparam int DEP [2] = '{2, 5};

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      int lvl;
      lvl = (k == 0) ? int'(l2) : int'(l5);
      chk(lvl == m[k].size(), $sformatf("level q%0d", DEP[k]));
      chk(ir[k] == (m[k].size() < DEP[k]), $sformatf("in_ready q%0d", DEP[k]));
      chk(ov[k] == (m[k].size() != 0), $sformatf("out_valid q%0d", DEP[k]));
      if (m[k].size() == DEP[k]) n_full++;
      if (ov[k] && orr[k]) begin
        chk(od[k] == m[k][0], $sformatf("data q%0d", DEP[k]));
        void'(m[k].pop_front());
      end
      if (iv[k] && ir[k]) m[k].push_back(id[k]);
    end
    // depth 0: straight through
    chk(ov[2] == iv[2] && ir[2] == orr[2] && (!iv[2] || od[2] == id[2]) && l0 == 1'b0, "pass-through q0");
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = '0; orr = '0;
    for (int k = 0; k < 3; k++) id[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        // phases with more pushes, then more pops
        iv[k]  = ($urandom % 4) < ((i / 200) % 2 == 0 ? 3 : 1);
        orr[k] = ($urandom % 4) < ((i / 200) % 2 == 0 ? 1 : 3);
        id[k]  = W'($urandom);
      end
    end
    chk(n_full > 0, "queues reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
