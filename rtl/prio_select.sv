// prio_select: queue access of the priority-queue architecture.
//
// N input queues, one per priority class, are presented to a single
// consumer. Index 0 is the highest class: a lower class is served only when
// every higher one is empty. Selection is combinational. The rule "serving
// queues with high priorities first" is the document's; strict priority
// without ageing is this design's reading of it.
module prio_select #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        in_ready,
  output logic                out_valid,
  output logic [W-1:0]        out_data,
  input  logic                out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] sel;

  always_comb begin
    sel = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (in_valid[k]) sel = IW'(k);
    end
  end

  assign out_valid = |in_valid;
  assign out_data  = in_data[sel];

  always_comb begin
    in_ready = '0;
    in_ready[sel] = out_valid && out_ready;
  end

endmodule
