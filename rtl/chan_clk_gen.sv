// chan_clk_gen - serial channel clock generator.
//
// Derives one serial clock per channel from the reference clock (200 MHz
// crystal). Channel c toggles ser_clk[c] every div[c] reference cycles, so a
// bit lasts 2*div[c] cycles (100 Mbit/s at div = 1). bit_en[c] is a one-cycle
// strobe in the cycle before ser_clk[c] falls: the data path updates its
// output bit on the same clock edge as ser_clk falls, and a receiver samples
// on the rising edge, half a bit later. div = 0 is treated as 1. restart[c] (a configuration load) returns
// the channel to the start of a low half period. The per-channel clock
// follows the document; the divider and the strobe are this design's choice.
module chan_clk_gen #(
  parameter int unsigned NCH   = 2,
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div     [NCH],
  input  logic [NCH-1:0]   restart,
  output logic [NCH-1:0]   ser_clk,
  output logic [NCH-1:0]   bit_en
);
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [DIV_W-1:0] cnt;
    logic [DIV_W-1:0] last;
    logic             wrap;
    assign last = (div[c] == '0) ? '0 : div[c] - 1'b1;
    assign wrap = (cnt >= last);
    // ser_clk falls at the next edge: the data path moves to the next bit then
    assign bit_en[c] = wrap && ser_clk[c] && !restart[c];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt        <= '0;
        ser_clk[c] <= 1'b1;
      end else if (restart[c]) begin
        cnt        <= '0;
        ser_clk[c] <= 1'b1;
      end else begin
        if (wrap) begin
          cnt        <= '0;
          ser_clk[c] <= ~ser_clk[c];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
