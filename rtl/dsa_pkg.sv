// dsa_pkg - types and constants shared by the satellite data simulator and
// the data acquisition logic.
//
// The frame sync code is the 128-bit output of a 7-bit shift register that
// obeys s[n] = s[n-6] ^ s[n-7] (x^7 + x^6 + 1), started from 0000110. Its
// 128 bits, first transmitted bit in bit 127, are FSC_PATTERN. The pattern
// and the 128-bit sync length follow the document; the register layout of
// the configuration structs is this design's own.
package dsa_pkg;

  localparam int unsigned FSC_BITS   = 128;          // sync code length, bits
  localparam int unsigned QW         = 64;           // decommutated word width
  localparam int unsigned PIX_W_MAX  = 16;           // widest simulated word
  localparam int unsigned TC_W       = 48;           // parallel BCD time code
  localparam int unsigned TAG_W      = 8;            // FIFO word tag bits
  localparam int unsigned XFIFO_W    = QW + TAG_W;   // 72-bit external FIFO
  localparam logic [6:0]  PN7_SEED   = 7'b0000110;
  localparam logic [FSC_BITS-1:0] FSC_PATTERN =
      128'h0C28_F22C_EA7D_0E24_DADE_C697_732A_FE04;

  // Video pattern generated in the image field.
  typedef enum logic [1:0] {
    VID_STAIR = 2'd0,   // constant level, raised by vid_step every vid_run pixels
    VID_RAMP  = 2'd1,   // pixel counter
    VID_CONST = 2'd2,   // vid_step in every pixel
    VID_LINE  = 2'd3    // low bits of the line count
  } vid_mode_e;

  // Parameters of one simulated satellite channel.
  typedef struct packed {
    logic [7:0]  clk_div;        // serial clock half period, reference cycles
    logic [4:0]  pix_w;          // bits per word (pixel clock width)
    logic [15:0] fs_words;       // frame sync field, words
    logic [15:0] aux_words;      // auxiliary field, words
    logic [15:0] video_words;    // image field, words
    logic [15:0] line_last;      // total frame length in words, minus one
    logic        rand_en;        // randomise everything after the sync code
    vid_mode_e   vid_mode;
    logic [7:0]  vid_step;
    logic [15:0] vid_run;
    logic [31:0] chid_val;       // channel identifier value
    logic [7:0]  chid_byt_start; // byte of the aux field where it starts
    logic [2:0]  chid_bit_start; // bit within that byte, 0 = MSB
    logic [5:0]  chid_no_bits;   // its width, 0 = absent
    logic [7:0]  lc_start;       // byte of the aux field where the line count starts
    logic [4:0]  lc_bit_cnt;     // line count width, 0 = absent
    logic [15:0] lc_msb_inv;     // inversion mask on the top line count bits
  } sim_cfg_t;

  // Reset configuration: the satellite shown in the simulation waveform.
  localparam sim_cfg_t SIM_CFG_DEFAULT = '{
    clk_div:        8'd1,
    pix_w:          5'd8,
    fs_words:       16'd16,
    aux_words:      16'd34,
    video_words:    16'd2350,
    line_last:      16'd2399,
    rand_en:        1'b0,
    vid_mode:       VID_STAIR,
    vid_step:       8'h14,
    vid_run:        16'd256,
    chid_val:       32'd0,
    chid_byt_start: 8'd1,
    chid_bit_start: 3'd2,
    chid_no_bits:   6'd8,
    lc_start:       8'd7,
    lc_bit_cnt:     5'd22,
    lc_msb_inv:     16'h0000
  };

  // Parameters of one acquisition channel.
  typedef struct packed {
    logic [31:0] frame_bits;     // frame length, sync code included
    logic [6:0]  max_err;        // sync bit errors still accepted
    logic [3:0]  check_n;        // consecutive syncs needed to lock
    logic [3:0]  fly_n;          // consecutive misses that drop lock
  } acq_cfg_t;

  localparam acq_cfg_t ACQ_CFG_DEFAULT = '{
    frame_bits: 32'd19200, max_err: 7'd3, check_n: 4'd2, fly_n: 4'd3
  };

  typedef enum logic [1:0] {
    FS_SEARCH = 2'd0,
    FS_CHECK  = 2'd1,
    FS_LOCK   = 2'd2
  } fs_state_e;

  // Tag bits carried with every qword into the external FIFO.
  typedef struct packed {
    logic [4:0] rsvd;
    logic       ch;      // acquisition channel, 0 = I, 1 = Q
    logic       eof;     // last qword of a frame
    logic       sof;     // time code / status qword that opens a frame
  } qw_tag_t;

endpackage
