// data_simulator - configurable satellite data simulator.
//
// Generates NCH independent serial streams in the generic satellite frame
// format: a pseudo-random frame sync code, an auxiliary field carrying the
// channel identifier and the frame (line) count, and a video field filled
// with a test pattern, optionally randomised. Every field length, the word
// (pixel) width, the serial clock rate and the aux field layout come from
// sim_cfg_regs, which the host loads through cfg_*; a configuration load
// restarts that channel at the start of a frame.
//
// Structure per channel: chan_clk_gen makes the serial clock and a bit
// strobe from clk (the 200 MHz reference), window_gen counts bits, words
// and frames, data_gen forms the aux and video words and data_serializer
// sends them bit by bit. ser_data, the windows and eol change on the clock
// edge on which ser_clk falls; a receiver samples ser_data on ser_clk's
// rising edge. Each stream leaves the chip as a clock and a data pin.
// The partition follows the document's block diagram; NCH = 2 follows its
// two data streams.
module data_simulator
  import dsa_pkg::*;
#(
  parameter int unsigned NCH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [$clog2(NCH)+3:0] cfg_addr,
  input  logic [31:0]            cfg_wdata,
  output logic [31:0]            cfg_rdata,
  output logic [NCH-1:0]         ser_clk,
  output logic [NCH-1:0]         ser_data,
  output logic [NCH-1:0]         fsc_wnd,
  output logic [NCH-1:0]         aux_wnd,
  output logic [NCH-1:0]         vid_wnd,
  output logic [NCH-1:0]         word_clk,
  output logic [NCH-1:0]         end_of_line
);
  sim_cfg_t       cfg [NCH];
  logic [NCH-1:0] init, bit_en;
  logic [7:0]     div [NCH];

  sim_cfg_regs #(.NCH(NCH)) u_regs (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .init
  );

  for (genvar c = 0; c < NCH; c++) begin : g_div
    assign div[c] = cfg[c].clk_div;
  end

  chan_clk_gen #(.NCH(NCH), .DIV_W(8)) u_clk (
    .clk, .rst_n, .div, .restart(init), .ser_clk, .bit_en
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [4:0]  bit_cnt;
    logic [15:0] word_cnt;
    logic [31:0] line_cnt;
    logic word_first, word_last, fsc, aux, vid, wclk, eol, line_done;
    logic [PIX_W_MAX-1:0] word;

    window_gen u_win (
      .clk, .rst_n, .bit_en(bit_en[c]), .init(init[c]),
      .pix_w(cfg[c].pix_w), .fs_words(cfg[c].fs_words),
      .aux_words(cfg[c].aux_words), .video_words(cfg[c].video_words),
      .line_last(cfg[c].line_last),
      .bit_cnt, .word_cnt, .line_cnt, .word_first, .word_last,
      .fsc_wnd(fsc), .aux_wnd(aux), .vid_wnd(vid), .word_clk(wclk),
      .eol, .line_done
    );

    data_gen u_gen (
      .clk, .rst_n, .bit_en(bit_en[c]), .init(init[c]), .cfg(cfg[c]),
      .word_cnt, .line_cnt, .word_last, .aux_wnd(aux), .vid_wnd(vid),
      .line_done, .word
    );

    data_serializer u_ser (
      .clk, .rst_n, .bit_en(bit_en[c]), .init(init[c]),
      .pix_w(cfg[c].pix_w), .rand_en(cfg[c].rand_en), .bit_cnt, .word,
      .fsc_wnd(fsc), .aux_wnd(aux), .vid_wnd(vid), .word_clk(wclk), .eol,
      .line_done,
      .sim_data(ser_data[c]), .fsc_wnd_q(fsc_wnd[c]), .aux_wnd_q(aux_wnd[c]),
      .vid_wnd_q(vid_wnd[c]), .word_clk_q(word_clk[c]), .eol_q(end_of_line[c])
    );
  end
endmodule
