// ext_fifo_model - behavioural model of one external FIFO bank (128K x 72).
//
// Not synthesizable logic of the design: it stands for the FIFO chips on
// the board so that testbenches can close the loop. Single clock; a write
// with wen stores wdata unless full; a read with ren presents the oldest word
// on rdata after the clock edge unless empty. full and empty reflect the
// state after the last edge. force_full makes full read high (to test
// backpressure) without blocking writes already accepted.
module ext_fifo_model #(
  parameter int unsigned W     = 72,
  parameter int unsigned DEPTH = 131072
) (
  input  logic         clk,
  input  logic         force_full,
  input  logic         wen,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         ren,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] q [$];
  int unsigned  cnt;

  initial begin
    rdata = '0;
    cnt   = 0;
  end

  always @(posedge clk) begin
    if (ren && q.size() > 0) rdata <= q.pop_front();
    if (wen && q.size() < DEPTH) q.push_back(wdata);
    cnt <= q.size();
  end

  assign empty = (cnt == 0);
  assign full  = force_full || (cnt >= DEPTH);
endmodule
