// tb_window_gen - checks the bit, word and line counters and every window
// output against a counting model, with a bit strobe every third cycle, for
// three frames, then an init in mid-frame.
`timescale 1ns/1ps
module tb_window_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bit_en = 0, init = 0;
  logic [4:0] bit_cnt;
  logic [15:0] word_cnt;
  logic [31:0] line_cnt;
  logic word_first, word_last, fsc_wnd, aux_wnd, vid_wnd, word_clk, eol, line_done;
  localparam int PW = 5, FS = 3, AUX = 2, VID = 5, LAST = 11;
  always #5 clk = ~clk;

  window_gen dut (
    .clk, .rst_n, .bit_en, .init, .pix_w(5'(PW)), .fs_words(16'(FS)),
    .aux_words(16'(AUX)), .video_words(16'(VID)), .line_last(16'(LAST)),
    .bit_cnt, .word_cnt, .line_cnt, .word_first, .word_last, .fsc_wnd,
    .aux_wnd, .vid_wnd, .word_clk, .eol, .line_done
  );

  int pos = 0, line = 0, done_cnt = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (pos %0d line %0d)", s, pos, line); end
  endtask

  task automatic compare();
    int w, b;
    w = pos / PW; b = pos % PW;
    chk(bit_cnt == 5'(b) && word_cnt == 16'(w) && line_cnt == 32'(line), "counters");
    chk(fsc_wnd == (w < FS), "fsc window");
    chk(aux_wnd == (w >= FS && w < FS + AUX), "aux window");
    chk(vid_wnd == (w >= FS + AUX && w < FS + AUX + VID), "video window");
    chk(eol == (w == LAST), "end of line");
    chk(word_clk == (b < 3) && word_first == (b == 0) && word_last == (b == PW - 1), "word clock");
    chk(line_done == (bit_en && w == LAST && b == PW - 1), "line done");
  endtask

  initial begin
    #100us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #20 rst_n = 1;
    for (int cyc = 0; cyc < 3 * 3 * PW * (LAST + 1) + 40; cyc++) begin
      @(negedge clk);
      bit_en = (cyc % 3 == 2);
      #1 compare();
      if (line_done) done_cnt++;
      @(posedge clk);
      if (bit_en) begin
        pos++;
        if (pos == PW * (LAST + 1)) begin pos = 0; line++; end
      end
    end
    chk(done_cnt == 3, "three frames");
    @(negedge clk); init = 1; bit_en = 1; @(posedge clk); @(negedge clk); init = 0; bit_en = 0;
    pos = 0; line = 0;
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
