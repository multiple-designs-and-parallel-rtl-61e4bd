// tb_frame_pkg - reference model of the simulated satellite frame.
//
// Written from the frame description, independently of the RTL: it gives
// the bit a channel sends at bit position pos of frame (line) number line
// for a configuration, so that testbenches can predict both the serial
// simulator output and the qwords the acquisition side must deliver.
package tb_frame_pkg;
  import dsa_pkg::*;

  // 127-bit periods of s[n] = s[n-6] ^ s[n-7] from a 7-bit seed (MSB first)
  function automatic void pn_seq(input logic [6:0] seed, output bit s [127]);
    bit t [134];
    for (int i = 0; i < 7; i++) t[i] = seed[6-i];
    for (int n = 7; n < 134; n++) t[n] = t[n-6] ^ t[n-7];
    for (int n = 0; n < 127; n++) s[n] = t[n];
  endfunction

  bit sync_s [127];
  bit rnd_s  [127];
  bit seq_ok = 0;

  function automatic bit frame_bit(sim_cfg_t c, int unsigned line, int unsigned pos);
    int unsigned pw, w, b, p, v, cs, ls, k, d;
    logic [15:0] pix;
    bit r;
    if (!seq_ok) begin
      pn_seq(7'b0000110, sync_s);
      pn_seq(7'h7F, rnd_s);
      seq_ok = 1;
    end
    pw = (c.pix_w == 0) ? 1 : c.pix_w;
    w  = pos / pw;
    b  = pos % pw;
    if (w < c.fs_words) return sync_s[pos % 127];
    r = 0;
    if (w < c.fs_words + c.aux_words) begin
      p  = (w - c.fs_words) * pw + b;
      cs = c.chid_byt_start * 8 + c.chid_bit_start;
      ls = c.lc_start * 8;
      if (p >= cs && p < cs + c.chid_no_bits) begin
        r = c.chid_val[c.chid_no_bits - 1 - (p - cs)];
      end else if (p >= ls && p < ls + c.lc_bit_cnt) begin
        d = p - ls;
        k = c.lc_bit_cnt - 1 - d;
        r = line[k];
        if (d < 16) r ^= c.lc_msb_inv[15 - d];
      end
    end else if (w < c.fs_words + c.aux_words + c.video_words) begin
      v = w - c.fs_words - c.aux_words;
      case (c.vid_mode)
        VID_STAIR: pix = 16'(c.vid_step * (1 + v / c.vid_run));
        VID_RAMP:  pix = 16'(v);
        VID_CONST: pix = 16'(c.vid_step);
        default:   pix = line[15:0];
      endcase
      r = pix[pw - 1 - b];
    end
    if (c.rand_en) r ^= rnd_s[(pos - c.fs_words * pw) % 127];
    return r;
  endfunction

  function automatic int unsigned frame_len(sim_cfg_t c);
    return (32'(c.line_last) + 1) * ((c.pix_w == 0) ? 1 : c.pix_w);
  endfunction
endpackage
