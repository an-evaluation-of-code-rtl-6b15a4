// tb_hs_sink: testbench receiver for one four-phase req/ack channel.
// Records each message in 'got' and the cycle count at which its request
// was first seen in 't_got'. While 'stall' is high no acknowledge is given.
// Counts protocol errors: data changing while the request is pending, or a
// request withdrawn before it was acknowledged.
module tb_hs_sink #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int           cyc,
  input  logic         stall,
  input  logic         ch_req,
  input  logic [W-1:0] ch_data,
  output logic         ch_ack
);
  logic [W-1:0] got[$];
  int           t_got[$];
  int           proto_err;
  logic         seen;
  logic [W-1:0] seen_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_ack <= 1'b0; seen <= 1'b0; proto_err <= 0; seen_data <= '0;
    end else begin
      if (ch_req && !ch_ack && !seen) begin
        seen <= 1'b1; seen_data <= ch_data;
        t_got.push_back(cyc);
      end
      if (seen && !ch_ack && ch_data != seen_data) proto_err <= proto_err + 1;
      if (seen && !ch_ack && !ch_req) proto_err <= proto_err + 1;
      if (seen && !ch_ack && !stall) begin
        ch_ack <= 1'b1;
        got.push_back(seen_data);
      end
      if (ch_ack && !ch_req) begin
        ch_ack <= 1'b0; seen <= 1'b0;
      end
    end
  end
endmodule
