// ptr_sync - moves a multi-bit value between clock domains.
//
// A toggle handshake: the source side captures src_val into a holding
// register and toggles req; the destination synchronises req through two
// flops, then copies the holding register (stable by then) into dst_val and
// returns the toggle as ack, which the source synchronises before it takes
// the next value. dst_val therefore always holds a value src_val really had,
// a few cycles of both clocks old. Used for FIFO pointers whose depth is not
// a power of two, where Gray-coded pointers cannot be used.
module ptr_sync #(
  parameter int unsigned W = 14
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_val,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_val
);
  logic [W-1:0] hold;
  logic req, ack_s1, ack_s2;
  logic req_d1, req_d2, ack;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold   <= '0;
      req    <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (req == ack_s2) begin
        hold <= src_val;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_d1  <= 1'b0;
      req_d2  <= 1'b0;
      ack     <= 1'b0;
      dst_val <= '0;
    end else begin
      req_d1 <= req;
      req_d2 <= req_d1;
      if (req_d2 != ack) begin
        dst_val <= hold;
        ack     <= req_d2;
      end
    end
  end
endmodule
