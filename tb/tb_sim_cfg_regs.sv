// tb_sim_cfg_regs - checks reset values, that writes reach the shadow
// registers only, that a load copies them to the active set of that channel
// alone with a one-cycle init pulse, and the read-back path. A second phase
// writes random values to random registers of both channels, with loads in
// between, and compares every register's read-back and the active sets with
// a model kept as register words.
`timescale 1ns/1ps
module tb_sim_cfg_regs;
  import dsa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cfg_we = 0;
  logic [4:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  sim_cfg_t cfg [2];
  logic [1:0] init;
  int init_cnt [2];
  always #5 clk = ~clk;

  sim_cfg_regs #(.NCH(2)) dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .init);

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, input logic [31:0] e, input string s);
    @(negedge clk); cfg_addr = a; #1;
    chk(cfg_rdata == e, $sformatf("%s: read %h expected %h", s, cfg_rdata, e));
  endtask

  localparam logic [31:0] MASK [16] = '{32'h1F, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF,
      32'h7, 32'hFFFF_FFFF, 32'h003F_07FF, 32'hFFFF_1FFF, 32'hFFFF_00FF, 32'hFF,
      32'h0, 32'h0, 32'h0, 32'h0, 32'h0};

  // a configuration as the words it is written with
  function automatic logic [31:0] enc(sim_cfg_t k, int r);
    case (r)
      0: return 32'(k.pix_w);
      1: return 32'(k.fs_words);
      2: return 32'(k.aux_words);
      3: return 32'(k.video_words);
      4: return 32'(k.line_last);
      5: return {29'd0, k.vid_mode, k.rand_en};
      6: return k.chid_val;
      7: return {10'd0, k.chid_no_bits, 5'd0, k.chid_bit_start, k.chid_byt_start};
      8: return {k.lc_msb_inv, 3'd0, k.lc_bit_cnt, k.lc_start};
      9: return {k.vid_run, 8'd0, k.vid_step};
      10: return 32'(k.clk_div);
      default: return 32'd0;
    endcase
  endfunction

  always @(posedge clk) for (int c = 0; c < 2; c++) if (init[c]) init_cnt[c]++;

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #20 rst_n = 1;
    chk(cfg[0] == SIM_CFG_DEFAULT && cfg[1] == SIM_CFG_DEFAULT, "reset values");
    chk(cfg[0].video_words == 16'd2350 && cfg[0].line_last == 16'd2399, "waveform defaults");
    wr({1'b1, 4'd0}, 32'd12);
    wr({1'b1, 4'd3}, 32'd777);
    wr({1'b1, 4'd5}, 32'b011);
    wr({1'b1, 4'd6}, 32'hDEADBEEF);
    wr({1'b1, 4'd7}, {10'd0, 6'd20, 5'd0, 3'd5, 8'd3});
    wr({1'b1, 4'd8}, {16'hA5A5, 3'd0, 5'd17, 8'd9});
    wr({1'b1, 4'd9}, {16'd33, 8'd0, 8'h22});
    wr({1'b1, 4'd10}, 32'd4);
    chk(cfg[1] == SIM_CFG_DEFAULT, "active set unchanged before load");
    rd({1'b1, 4'd3}, 32'd777, "shadow video_words");
    rd({1'b1, 4'd7}, {10'd0, 6'd20, 5'd0, 3'd5, 8'd3}, "shadow chid");
    rd({1'b0, 4'd3}, 32'd2350, "channel 0 untouched");
    chk(init_cnt[0] == 0 && init_cnt[1] == 0, "no init yet");
    wr({1'b1, 4'd15}, 32'd1);
    @(negedge clk);
    chk(init_cnt[1] == 1 && init_cnt[0] == 0, "one init pulse on channel 1");
    chk(cfg[1].pix_w == 5'd12 && cfg[1].video_words == 16'd777 && cfg[1].rand_en &&
        cfg[1].vid_mode == VID_RAMP && cfg[1].chid_val == 32'hDEADBEEF &&
        cfg[1].chid_byt_start == 8'd3 && cfg[1].chid_bit_start == 3'd5 &&
        cfg[1].chid_no_bits == 6'd20 && cfg[1].lc_start == 8'd9 &&
        cfg[1].lc_bit_cnt == 5'd17 && cfg[1].lc_msb_inv == 16'hA5A5 &&
        cfg[1].vid_step == 8'h22 && cfg[1].vid_run == 16'd33 && cfg[1].clk_div == 8'd4,
        "loaded channel 1");
    chk(cfg[0] == SIM_CFG_DEFAULT, "channel 0 still default");
    wr({1'b0, 4'd15}, 32'd0);
    @(negedge clk);
    chk(init_cnt[0] == 0, "control write without bit 0 does not load");

    // random phase
    begin
      logic [31:0] sh [2][11], act [2][11];
      int r, c, loads [2];
      for (c = 0; c < 2; c++) begin
        for (r = 0; r < 11; r++) begin
          sh[c][r]  = enc(c == 0 ? SIM_CFG_DEFAULT : cfg[1], r);
          act[c][r] = sh[c][r];
        end
        loads[c] = init_cnt[c];
      end
      for (c = 0; c < 2; c++) for (r = 0; r < 11; r++) rd({1'(c), 4'(r)}, sh[c][r], "read-back before random phase");
      repeat (300) begin
        logic [31:0] d;
        c = $urandom_range(0, 1);
        r = ($urandom_range(0, 9) == 0) ? 15 : $urandom_range(0, 10);
        d = $urandom;
        if (r == 15) d[0] = ($urandom_range(0, 3) != 0);
        wr({1'(c), 4'(r)}, d);
        if (r == 15) begin
          if (d[0]) begin
            for (int i = 0; i < 11; i++) act[c][i] = sh[c][i];
            loads[c]++;
          end
        end else sh[c][r] = d & MASK[r];
        @(negedge clk);
        for (int cc = 0; cc < 2; cc++) begin
          chk(init_cnt[cc] == loads[cc], $sformatf("init pulses ch%0d", cc));
          for (int i = 0; i < 11; i++)
            chk(enc(cfg[cc], i) == act[cc][i], $sformatf("active ch%0d reg %0d", cc, i));
        end
        r = $urandom_range(0, 10);
        rd({1'(c), 4'(r)}, sh[c][r], $sformatf("random read-back ch%0d reg %0d", c, r));
      end
      for (c = 0; c < 2; c++) for (r = 0; r < 16; r++)
        rd({1'(c), 4'(r)}, r < 11 ? sh[c][r] : 32'd0, $sformatf("read-back ch%0d reg %0d", c, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
