// decom - decommutation of one channel into 64-bit qwords.
//
// Runs in the channel's bit clock domain. frame_start (from frame_sync)
// comes in the cycle after the last sync bit; a bit_en in that cycle carries
// the first data bit. On frame_start it opens a frame with three qwords written in the next three clock cycles:
// a time code / status qword {status[15:0], tc[47:0]}, then the received
// sync code, bits 127:64 and 63:0. The remaining frame_bits-128 bits of the
// frame are then packed MSB first into qwords, each written when its 64th
// bit arrives; the last one is padded with zeros. q_valid is a one-cycle
// write strobe with q_data and q_tag (sof on the time code qword, eof on the
// last data qword). A frame_start during a frame abandons the rest of it.
// word_clk is the qword clock: high while bits 0..31 of a qword arrive.
// Needs frame_bits >= 192, so a frame's header is out before its first data
// qword. Conversion to 64-bit qwords and the dedicated time code qword
// follow the document; the order within the frame is read from the recorded
// frame, where the sync code follows a qword of its own.
module decom
  import dsa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_en,
  input  logic                bit_in,
  input  logic                frame_start,
  input  logic [FSC_BITS-1:0] sync_word,
  input  logic [31:0]         frame_bits,
  input  logic [TC_W-1:0]     tc,
  input  logic [15:0]         status,
  output logic                q_valid,
  output logic [QW-1:0]       q_data,
  output logic                q_sof,
  output logic                q_eof,
  output logic                word_clk,
  output logic [15:0]         n_frames
);
  logic [1:0]          hdr;        // header qwords still to write
  logic [QW-1:0]       hdr_q [3];
  logic                active;
  logic [31:0]         rem;        // data bits still expected
  logic [5:0]          nb;         // bits in the current qword
  logic [QW-1:0]       sh;
  logic [QW-1:0]       sh_n;

  assign sh_n     = {sh[QW-2:0], bit_in};
  assign word_clk = !nb[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr      <= '0;
      hdr_q    <= '{default: '0};
      active   <= 1'b0;
      rem      <= '0;
      nb       <= '0;
      sh       <= '0;
      q_valid  <= 1'b0;
      q_data   <= '0;
      q_sof    <= 1'b0;
      q_eof    <= 1'b0;
      n_frames <= '0;
    end else begin
      q_valid <= 1'b0;
      q_sof   <= 1'b0;
      q_eof   <= 1'b0;

      // a data qword never meets a header qword (frame_bits >= 192)
      assert (!(hdr != '0 && bit_en && active && !frame_start &&
                (nb == 6'd63 || rem == 32'd1)));
      if (hdr != '0) begin
        q_valid <= 1'b1;
        q_data  <= hdr_q[3 - hdr];
        q_sof   <= (hdr == 2'd3);
        hdr     <= hdr - 1'b1;
      end

      if (frame_start) begin
        hdr      <= 2'd3;
        hdr_q[0] <= {status, tc};
        hdr_q[1] <= sync_word[FSC_BITS-1:QW];
        hdr_q[2] <= sync_word[QW-1:0];
        active   <= (frame_bits > 32'(FSC_BITS));
        n_frames <= n_frames + 1'b1;
        // a bit arriving with frame_start is the first data bit
        if (bit_en) begin
          rem <= frame_bits - 32'(FSC_BITS) - 1;
          nb  <= 6'd1;
          sh  <= {{(QW-1){1'b0}}, bit_in};
        end else begin
          rem <= frame_bits - 32'(FSC_BITS);
          nb  <= '0;
          sh  <= '0;
        end
      end else if (bit_en && active) begin
        sh  <= sh_n;
        nb  <= nb + 1'b1;
        rem <= rem - 1'b1;
        if (nb == 6'd63 || rem == 32'd1) begin
          q_valid <= 1'b1;
          q_data  <= sh_n << (6'd63 - nb);
          q_eof   <= (rem == 32'd1);
          nb      <= '0;
        end
        if (rem == 32'd1) active <= 1'b0;
      end
    end
  end

endmodule
