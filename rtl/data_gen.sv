// data_gen - auxiliary and video word generator of one simulated channel.
//
// Produces, combinationally, the word being sent now (word, low pix_w bits,
// its bit pix_w-1 sent first) for the auxiliary and video windows; the sync
// code comes from pn7_gen and fill words are zero.
//
// Auxiliary field: a bit string numbered from 0 at its first bit. The
// channel identifier (chid_no_bits bits of chid_val, MSB first) starts at
// bit 8*chid_byt_start + chid_bit_start; the line count (lc_bit_cnt bits of
// line_cnt, MSB first, its top 16 bits XORed with lc_msb_inv from the MSB
// down) starts at bit 8*lc_start. The identifier wins where they overlap;
// all other aux bits are zero.
//
// Video field, by vid_mode: VID_STAIR holds a level that starts at vid_step
// on each frame and rises by vid_step every vid_run pixels; VID_RAMP counts
// pixels; VID_CONST sends vid_step; VID_LINE sends the line count. The
// pattern counters advance on the bit_en of the last bit of each video word
// and restart on line_done and init.
// The fields follow the document's parameter list; their bit placement and
// the video patterns are this design's choice (the staircase mirrors the
// steps of 0x14 seen in recorded data).
module data_gen
  import dsa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        init,
  input  sim_cfg_t    cfg,
  input  logic [15:0] word_cnt,
  input  logic [31:0] line_cnt,
  input  logic        word_last,
  input  logic        aux_wnd,
  input  logic        vid_wnd,
  input  logic        line_done,
  output logic [PIX_W_MAX-1:0] word
);
  logic [4:0]  pw;
  logic [15:0] level, ramp, run;
  logic [PIX_W_MAX-1:0] aux_word, pix, mask;

  assign pw = (cfg.pix_w == '0) ? 5'd1 : ((cfg.pix_w > 5'(PIX_W_MAX)) ? 5'(PIX_W_MAX) : cfg.pix_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= 16'(cfg.vid_step);
      ramp  <= '0;
      run   <= '0;
    end else if (init || line_done) begin
      level <= 16'(cfg.vid_step);
      ramp  <= '0;
      run   <= '0;
    end else if (bit_en && word_last && vid_wnd) begin
      ramp <= ramp + 1'b1;
      if (run + 1'b1 >= cfg.vid_run) begin
        run   <= '0;
        level <= level + 16'(cfg.vid_step);
      end else begin
        run <= run + 1'b1;
      end
    end
  end

  // auxiliary word, bit by bit
  always_comb begin
    logic [31:0] p0, p, cs, ls, d;
    logic        b;
    p0 = 32'(word_cnt - cfg.fs_words) * 32'(pw);
    cs = 32'(cfg.chid_byt_start) * 8 + 32'(cfg.chid_bit_start);
    ls = 32'(cfg.lc_start) * 8;
    aux_word = '0;
    for (int j = 0; j < PIX_W_MAX; j++) begin
      p = p0 + 32'(j);
      b = 1'b0;
      d = 32'd0;
      if (p >= cs && p < cs + 32'(cfg.chid_no_bits)) begin
        d = p - cs;
        b = cfg.chid_val[5'(32'(cfg.chid_no_bits) - 1 - d)];
      end else if (p >= ls && p < ls + 32'(cfg.lc_bit_cnt)) begin
        d = p - ls;
        b = line_cnt[5'(32'(cfg.lc_bit_cnt) - 1 - d)];
        if (d < 16) b = b ^ cfg.lc_msb_inv[4'(15 - d)];
      end
      if (32'(j) < 32'(pw)) aux_word[4'(32'(pw) - 1 - 32'(j))] = b;
    end
  end

  always_comb begin
    unique case (cfg.vid_mode)
      VID_STAIR: pix = level;
      VID_RAMP:  pix = ramp;
      VID_CONST: pix = 16'(cfg.vid_step);
      VID_LINE:  pix = line_cnt[15:0];
      default:   pix = level;
    endcase
  end

  assign mask = PIX_W_MAX'((17'd1 << pw) - 1'b1);
  assign word = aux_wnd ? aux_word : (vid_wnd ? (pix & mask) : '0);
endmodule
