// tb_data_serializer - checks the serial output: sync code bits in the sync
// window, words sent MSB first, randomisation of all other bits and its
// restart per frame, and the window flags registered with the data.
`timescale 1ns/1ps
module tb_data_serializer;
  import dsa_pkg::*;
  import tb_frame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bit_en = 0, init = 0, rand_en = 0;
  logic [4:0] pix_w = 5'd7, bit_cnt = '0;
  logic [PIX_W_MAX-1:0] word = '0;
  logic fsc_wnd = 0, aux_wnd = 0, vid_wnd = 0, word_clk = 0, eol = 0, line_done = 0;
  logic sim_data, fsc_q, aux_q, vid_q, wclk_q, eol_q;
  always #5 clk = ~clk;

  data_serializer dut (
    .clk, .rst_n, .bit_en, .init, .pix_w, .rand_en, .bit_cnt, .word,
    .fsc_wnd, .aux_wnd, .vid_wnd, .word_clk, .eol, .line_done,
    .sim_data, .fsc_wnd_q(fsc_q), .aux_wnd_q(aux_q), .vid_wnd_q(vid_q),
    .word_clk_q(wclk_q), .eol_q
  );

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one frame: FSW sync words, then NW data words of pix_w bits
  task automatic frame(input int fsw, input int nw, input bit rnd);
    int pw, k;
    bit e;
    logic [PIX_W_MAX-1:0] wv;
    pw = pix_w; k = 0; rand_en = rnd;
    if (!seq_ok) void'(frame_bit(SIM_CFG_DEFAULT, 0, 0));
    for (int w = 0; w < fsw + nw; w++) begin
      wv = PIX_W_MAX'($urandom);
      for (int b = 0; b < pw; b++) begin
        @(negedge clk);
        bit_en = 0;
        @(negedge clk);
        bit_en = 1; bit_cnt = 5'(b); word = wv;
        fsc_wnd = (w < fsw); aux_wnd = !fsc_wnd && w < fsw + 2; vid_wnd = (w >= fsw + 2);
        word_clk = (b < 4); eol = (w == fsw + nw - 1);
        line_done = eol && (b == pw - 1);
        if (fsc_wnd) e = FSC_PATTERN[127 - (w * pw + b)];
        else begin
          e = wv[pw - 1 - b] ^ (rnd & tb_frame_pkg::rnd_s[k % 127]);
          k++;
        end
        @(posedge clk); #1;
        chk(sim_data == e, $sformatf("bit %0d of word %0d (rand %0d)", b, w, rnd));
        chk(fsc_q == fsc_wnd && aux_q == aux_wnd && vid_q == vid_wnd &&
            wclk_q == word_clk && eol_q == eol, "flags registered with the data");
      end
    end
    @(negedge clk); bit_en = 0; line_done = 0;
  endtask

  initial begin
    #1 rst_n = 0; #20 rst_n = 1;
    frame(4, 30, 0);
    frame(4, 30, 1);
    frame(4, 200, 1);   // longer than the 127-bit randomiser period
    pix_w = 5'd16;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    frame(8, 20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
