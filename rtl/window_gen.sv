// window_gen - bit, word and line timing of one simulated channel.
//
// Counts the bits of a word (pix_w bits), the words of a frame (0 to
// line_last) and the frames sent (line_cnt). The counters describe the bit
// being sent now and advance on bit_en; init (a configuration load) and
// reset return them to the first bit of a frame, and init also clears the
// line count. From the word count it decodes the windows of the generic
// frame: frame sync (words 0 .. fs_words-1), auxiliary data (the next
// aux_words words) and video (the next video_words words); words beyond
// them up to line_last are fill. word_clk is high in the first half of every
// word, eol marks the last word of a frame and line_done pulses with the
// bit_en of its last bit. All outputs are combinational from the counters.
// The window set follows the simulation waveform of the document; the
// decoding details are this design's choice.
module window_gen
  import dsa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        init,
  input  logic [4:0]  pix_w,
  input  logic [15:0] fs_words,
  input  logic [15:0] aux_words,
  input  logic [15:0] video_words,
  input  logic [15:0] line_last,
  output logic [4:0]  bit_cnt,
  output logic [15:0] word_cnt,
  output logic [31:0] line_cnt,
  output logic        word_first,   // first bit of a word
  output logic        word_last,    // last bit of a word
  output logic        fsc_wnd,
  output logic        aux_wnd,
  output logic        vid_wnd,
  output logic        word_clk,
  output logic        eol,
  output logic        line_done
);
  logic [4:0]  pw;
  logic [16:0] aux_end, vid_end;

  assign pw         = (pix_w == '0) ? 5'd1 : pix_w;
  assign word_first = (bit_cnt == '0);
  assign word_last  = (bit_cnt >= pw - 1'b1);
  assign eol        = (word_cnt >= line_last);
  assign line_done  = bit_en && word_last && eol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt  <= '0;
      word_cnt <= '0;
      line_cnt <= '0;
    end else if (init) begin
      bit_cnt  <= '0;
      word_cnt <= '0;
      line_cnt <= '0;
    end else if (bit_en) begin
      if (word_last) begin
        bit_cnt <= '0;
        if (eol) begin
          word_cnt <= '0;
          line_cnt <= line_cnt + 1'b1;
        end else begin
          word_cnt <= word_cnt + 1'b1;
        end
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  assign aux_end  = 17'(fs_words) + 17'(aux_words);
  assign vid_end  = aux_end + 17'(video_words);
  assign fsc_wnd  = (17'(word_cnt) < 17'(fs_words));
  assign aux_wnd  = !fsc_wnd && (17'(word_cnt) < aux_end);
  assign vid_wnd  = (17'(word_cnt) >= aux_end) && (17'(word_cnt) < vid_end);
  assign word_clk = (bit_cnt < ((pw + 1'b1) >> 1));
endmodule
