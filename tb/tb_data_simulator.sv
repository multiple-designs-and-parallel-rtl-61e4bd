// tb_data_simulator - loads a different satellite into each channel over
// the register port and compares both serial streams, sampled on their own
// serial clocks, bit by bit with the reference frame model for several
// frames, together with the window and end-of-line outputs and the bit rate.
`timescale 1ns/1ps
module tb_data_simulator;
  import dsa_pkg::*;
  import tb_frame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cfg_we = 0;
  logic [4:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic [1:0] ser_clk, ser_data, fsc_wnd, aux_wnd, vid_wnd, word_clk, eol;
  sim_cfg_t k [2];
  always #2.5 clk = ~clk;

  data_simulator #(.NCH(2)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .ser_clk,
    .ser_data, .fsc_wnd, .aux_wnd, .vid_wnd, .word_clk, .end_of_line(eol)
  );

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic load(input int c, input sim_cfg_t s);
    wr({1'(c), 4'd0},  32'(s.pix_w));
    wr({1'(c), 4'd1},  32'(s.fs_words));
    wr({1'(c), 4'd2},  32'(s.aux_words));
    wr({1'(c), 4'd3},  32'(s.video_words));
    wr({1'(c), 4'd4},  32'(s.line_last));
    wr({1'(c), 4'd5},  {29'd0, s.vid_mode, s.rand_en});
    wr({1'(c), 4'd6},  s.chid_val);
    wr({1'(c), 4'd7},  {10'd0, s.chid_no_bits, 5'd0, s.chid_bit_start, s.chid_byt_start});
    wr({1'(c), 4'd8},  {s.lc_msb_inv, 3'd0, s.lc_bit_cnt, s.lc_start});
    wr({1'(c), 4'd9},  {s.vid_run, 8'd0, s.vid_step});
    wr({1'(c), 4'd10}, 32'(s.clk_div));
  endtask

  int frames_ok [2], pos [2], line [2], bad [2], nw [2];
  bit started [2] = '{0, 0}, prev [2] = '{0, 0};
  realtime t_rise [2];
  int rate_ok [2];

  for (genvar c = 0; c < 2; c++) begin : g_mon
    always @(posedge ser_clk[c]) if (started[c]) begin
      if (fsc_wnd[c] && !prev[c]) begin
        if (line[c] >= 1) begin
          checks++;
          if (bad[c] != 0 || pos[c] + 1 != int'(frame_len(k[c])) || nw[c] != k[c].pix_w) begin
            failures++;
            $display("FAIL ch%0d line %0d: %0d errors, %0d bits", c, line[c], bad[c], pos[c] + 1);
          end else frames_ok[c]++;
        end
        line[c]++; pos[c] = 0; bad[c] = 0; nw[c] = 0;
      end else pos[c]++;
      prev[c] = fsc_wnd[c];
      if (line[c] >= 1) begin
        int pw, w;
        pw = k[c].pix_w; w = pos[c] / pw;
        if (ser_data[c] !== frame_bit(k[c], line[c], pos[c])) bad[c]++;
        if (aux_wnd[c] !== (w >= k[c].fs_words && w < k[c].fs_words + k[c].aux_words)) bad[c]++;
        if (vid_wnd[c] !== (w >= k[c].fs_words + k[c].aux_words &&
                            w < k[c].fs_words + k[c].aux_words + k[c].video_words)) bad[c]++;
        if (word_clk[c] !== ((pos[c] % pw) < (pw + 1) / 2)) bad[c]++;
        nw[c] += int'(eol[c]);
      end
      if ($realtime - t_rise[c] == 2.0 * 5.0 * k[c].clk_div) rate_ok[c]++;
      t_rise[c] = $realtime;
    end
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #5ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    k[0] = SIM_CFG_DEFAULT;
    k[0].fs_words = 16; k[0].aux_words = 6; k[0].video_words = 60; k[0].line_last = 84;
    k[0].lc_start = 1; k[0].lc_bit_cnt = 12; k[0].chid_val = 32'h3C; k[0].vid_run = 16'd9;
    k[0].clk_div = 8'd1;
    k[1] = SIM_CFG_DEFAULT;
    k[1].pix_w = 10; k[1].fs_words = 13; k[1].aux_words = 5; k[1].video_words = 30;
    k[1].line_last = 47; k[1].rand_en = 1; k[1].vid_mode = VID_RAMP; k[1].clk_div = 8'd3;
    k[1].chid_val = 32'h155; k[1].chid_no_bits = 6'd9; k[1].lc_msb_inv = 16'h8001;
    #1 rst_n = 0; #20 rst_n = 1;
    load(0, k[0]);
    load(1, k[1]);
    wr({1'b0, 4'd15}, 32'd1);
    wr({1'b1, 4'd15}, 32'd1);
    // both channels are now in frame 0; checking starts with frame 1
    line = '{0, 0};
    prev = '{1, 1};
    started = '{1, 1};
    wait (frames_ok[0] >= 6 && frames_ok[1] >= 6);
    chk(rate_ok[0] > 500 && rate_ok[1] > 500, "serial clock periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
