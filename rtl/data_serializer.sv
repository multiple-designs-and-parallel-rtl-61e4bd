// data_serializer - serial output stage of one simulated channel.
//
// On every bit_en it registers the bit to send: in the frame sync window the
// next bit of the sync code generator, elsewhere bit (pix_w-1-bit_cnt) of the
// current word from data_gen. With rand_en set every bit after the sync code
// is XORed with a second pn7_gen (seed 1111111, restarted at each frame), so
// the sync code itself stays in clear. The window flags, word clock and end
// of line are registered with the data, so all outputs change together, on
// the clock edge on which the serial clock falls. Both generators restart on
// init and after the last bit of each frame (line_done).
// The sync code generator follows the document; the randomiser sequence
// is this design's choice, as the document only says data may be randomised.
module data_serializer
  import dsa_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic                 init,
  input  logic [4:0]           pix_w,
  input  logic                 rand_en,
  input  logic [4:0]           bit_cnt,
  input  logic [PIX_W_MAX-1:0] word,
  input  logic                 fsc_wnd,
  input  logic                 aux_wnd,
  input  logic                 vid_wnd,
  input  logic                 word_clk,
  input  logic                 eol,
  input  logic                 line_done,
  output logic                 sim_data,
  output logic                 fsc_wnd_q,
  output logic                 aux_wnd_q,
  output logic                 vid_wnd_q,
  output logic                 word_clk_q,
  output logic                 eol_q
);
  logic [4:0] pw, idx;
  logic fsc_bit, rnd_bit, restart, data_bit, tx_bit;

  assign restart = init || line_done;
  assign pw      = (pix_w == '0) ? 5'd1 : ((pix_w > 5'(PIX_W_MAX)) ? 5'(PIX_W_MAX) : pix_w);
  assign idx     = (bit_cnt < pw) ? (pw - 1'b1 - bit_cnt) : 5'd0;

  pn7_gen #(.SEED(PN7_SEED)) u_fsc (
    .clk, .rst_n, .load(restart), .step(bit_en && fsc_wnd), .bit_o(fsc_bit)
  );
  pn7_gen #(.SEED(7'h7F)) u_rnd (
    .clk, .rst_n, .load(restart), .step(bit_en && !fsc_wnd), .bit_o(rnd_bit)
  );

  assign data_bit = word[idx[3:0]];
  assign tx_bit   = fsc_wnd ? fsc_bit : (data_bit ^ (rand_en & rnd_bit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sim_data   <= 1'b0;
      fsc_wnd_q  <= 1'b0;
      aux_wnd_q  <= 1'b0;
      vid_wnd_q  <= 1'b0;
      word_clk_q <= 1'b0;
      eol_q      <= 1'b0;
    end else if (bit_en) begin
      sim_data   <= tx_bit;
      fsc_wnd_q  <= fsc_wnd;
      aux_wnd_q  <= aux_wnd;
      vid_wnd_q  <= vid_wnd;
      word_clk_q <= word_clk;
      eol_q      <= eol;
    end
  end
endmodule
