// tb_hs_src: testbench sender for one four-phase req/ack channel.
// Messages pushed onto 'pending' are sent in order. For each one the cycle
// count at which ch_req is raised is recorded in 't_req' (the receiver sees
// the request at the next edge). 'hold' keeps the sender from starting.
module tb_hs_src #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int           cyc,
  input  logic         hold,
  output logic         ch_req,
  output logic [W-1:0] ch_data,
  input  logic         ch_ack
);
  logic [W-1:0] pending[$];
  int           t_req[$];
  int           n_sent;
  typedef enum {S_IDLE, S_REQ, S_DROP} s_e;
  s_e st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_req <= 1'b0; ch_data <= '0; st <= S_IDLE; n_sent <= 0;
    end else begin
      case (st)
        S_IDLE: if (pending.size() != 0 && !hold && !ch_ack) begin
          ch_data <= pending.pop_front();
          ch_req  <= 1'b1;
          t_req.push_back(cyc);
          st      <= S_REQ;
        end
        S_REQ: if (ch_ack) begin
          ch_req <= 1'b0;
          n_sent <= n_sent + 1;
          st     <= S_DROP;
        end
        S_DROP: if (!ch_ack) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
