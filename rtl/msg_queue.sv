// msg_queue: FIFO message queue of an SDL process.
//
// A circular buffer of DEPTH messages of W bits with valid/ready streams on
// both sides. A message written in one cycle can be read in the next. As in
// the document, the queue is a plain FIFO: save and priority input, which
// would need insertion and removal at arbitrary positions, are not
// supported. DEPTH = 0 ("queue length 0" in the area measurement) leaves no
// storage: the stream passes straight through and the writer waits until
// the reader takes the message. The default length of 2 is the largest of
// the measured queue lengths; the depth is a parameter because it has to be
// dimensioned per application. level reports the number of stored messages.
module msg_queue #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  if (DEPTH == 0) begin : g_bypass
    assign out_valid = in_valid;
    assign out_data  = in_data;
    assign in_ready  = out_ready;
    assign level     = '0;
  end else begin : g_fifo
    localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    localparam int unsigned LW = $clog2(DEPTH+1);

    logic [W-1:0]  mem [DEPTH];
    logic [PW-1:0] wr_ptr, rd_ptr;
    logic [LW-1:0] cnt;
    logic          do_wr, do_rd;

    assign in_ready  = (cnt != LW'(DEPTH));
    assign out_valid = (cnt != '0);
    assign out_data  = mem[rd_ptr];
    assign do_wr     = in_valid && in_ready;
    assign do_rd     = out_valid && out_ready;
    assign level     = cnt;

    function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
      return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
    endfunction

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
        cnt    <= '0;
      end else begin
        if (do_wr) wr_ptr <= incr(wr_ptr);
        if (do_rd) rd_ptr <= incr(rd_ptr);
        cnt <= cnt + LW'(do_wr) - LW'(do_rd);
      end
    end

    always_ff @(posedge clk) begin
      if (do_wr) mem[wr_ptr] <= in_data;
    end
  end

endmodule
