// stream_arb: multiplexed input of several input interfaces onto one queue.
//
// N valid/ready streams of W bits are merged into one. When several inputs
// are valid in the same cycle, the grant rotates (round robin) starting
// after the input served last, so no channel can starve another. The grant
// is combinational; the pointer advances on each accepted message. The
// document states only that several input channels need "a multiplexed input
// to the queue"; the round-robin policy is this design's choice.
module stream_arb #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        in_ready,
  output logic                out_valid,
  output logic [W-1:0]        out_data,
  input  logic                out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr, sel;
  logic          found;

  always_comb begin
    sel   = ptr;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!found && in_valid[idx]) begin
        sel   = IW'(idx);
        found = 1'b1;
      end
    end
  end

  assign out_valid = found;
  assign out_data  = in_data[sel];

  always_comb begin
    in_ready = '0;
    in_ready[sel] = found && out_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (found && out_ready) ptr <= (int'(sel) == N - 1) ? '0 : sel + 1'b1;
  end

endmodule
