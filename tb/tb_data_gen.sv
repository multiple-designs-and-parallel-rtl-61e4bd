// tb_data_gen - checks the aux and video words against the reference frame
// model: channel identifier at a byte/bit offset, line count with inverted
// MSBs, each video pattern, for two lines, with 6-bit and 8-bit words.
`timescale 1ns/1ps
module tb_data_gen;
  import dsa_pkg::*;
  import tb_frame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bit_en = 0, init = 0;
  sim_cfg_t cfg;
  logic [15:0] word_cnt = '0;
  logic [31:0] line_cnt = '0;
  logic word_last = 0, aux_wnd = 0, vid_wnd = 0, line_done = 0;
  logic [PIX_W_MAX-1:0] word;
  always #5 clk = ~clk;

  data_gen dut (.clk, .rst_n, .bit_en, .init, .cfg, .word_cnt, .line_cnt,
                .word_last, .aux_wnd, .vid_wnd, .line_done, .word);

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // send `lines` frames word by word; each word takes pix_w bit strobes
  task automatic run(input int lines, input int first_line);
    int pw, nw;
    pw = cfg.pix_w;
    nw = cfg.line_last + 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int l = first_line; l < first_line + lines; l++) begin
      for (int w = 0; w < nw; w++) begin
        for (int b = 0; b < pw; b++) begin
          @(negedge clk);
          line_cnt = 32'(l);
          word_cnt = 16'(w);
          aux_wnd  = (w >= cfg.fs_words && w < cfg.fs_words + cfg.aux_words);
          vid_wnd  = (w >= cfg.fs_words + cfg.aux_words &&
                      w < cfg.fs_words + cfg.aux_words + cfg.video_words);
          bit_en    = 1;
          word_last = (b == pw - 1);
          line_done = word_last && (w == nw - 1);
          #1;
          if (w >= cfg.fs_words) begin
            bit e;
            e = frame_bit(cfg, l, w * pw + b);
            checks++;
            if (word[pw - 1 - b] !== e) begin
              failures++;
              $display("FAIL line %0d word %0d bit %0d mode %0d got %h", l, w, b, cfg.vid_mode, word);
            end
          end
        end
      end
    end
    @(negedge clk); bit_en = 0; word_last = 0; line_done = 0;
  endtask

  initial begin
    #10ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = SIM_CFG_DEFAULT;
    cfg.pix_w = 6; cfg.fs_words = 4; cfg.aux_words = 12; cfg.video_words = 40;
    cfg.line_last = 58; cfg.vid_step = 8'd5; cfg.vid_run = 16'd7;
    cfg.chid_val = 32'h2D5; cfg.chid_byt_start = 8'd1; cfg.chid_bit_start = 3'd3;
    cfg.chid_no_bits = 6'd10; cfg.lc_start = 8'd4; cfg.lc_bit_cnt = 5'd22;
    cfg.lc_msb_inv = 16'hC003;
    #1 rst_n = 0; #20 rst_n = 1;
    cfg.vid_mode = VID_STAIR; run(2, 1234567);
    cfg.vid_mode = VID_RAMP;  run(1, 77);
    cfg.vid_mode = VID_CONST; run(1, 5);
    cfg.vid_mode = VID_LINE;  run(2, 40000);
    cfg.pix_w = 8; cfg.vid_mode = VID_STAIR; cfg.vid_step = 8'h14; cfg.vid_run = 16'd16;
    cfg.video_words = 100; cfg.line_last = 120; run(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
