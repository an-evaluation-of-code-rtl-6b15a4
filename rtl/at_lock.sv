// at_lock: lock protecting shared SDL process data between parallel
// activity threads.
//
// When one SDL process is split over several activity threads that run in
// parallel, its transitions must still exclude each other. Each thread
// raises req[i] and keeps it high while it needs the shared variables and
// state; gnt[i] (registered, one-hot or zero) rises one cycle later when the
// lock is free and stays high until the holder drops req[i]. The lock is
// released in the cycle after req drops, and a waiting thread is granted
// from that edge on. Among waiting threads the one after the last holder
// (round robin) wins, which bounds a thread's blocking time by N-1 critical
// sections. The document requires "a lock mechanism"; the round-robin
// policy and the one-cycle grant are this design's choices.
module at_lock #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;
  logic          held;

  assign held = |(gnt & req);

  always_comb begin
    pick     = '0;
    pick_idx = last;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (pick == '0 && req[idx]) begin
        pick[idx] = 1'b1;
        pick_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(N - 1);
    end else if (!held) begin
      gnt <= pick;
      if (pick != '0) last <= pick_idx;
    end
  end

  // at most one holder at any time
  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  // a grant is only ever given to a requesting thread
  a_granted_req: assert property (@(posedge clk) disable iff (!rst_n)
                                  (gnt & ~req & ~$past(req)) == '0);

endmodule
