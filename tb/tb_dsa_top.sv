// tb_dsa_top - end-to-end test of the data simulator and data acquisition
// logic at the default sizes.
//
// The simulator's two serial outputs are cabled back to the acquisition
// inputs with a 2 ns delay, as on the test bench of the real card. Two
// external FIFO bank models sit on the ext_* ports and the testbench plays
// the PCI core, reading both banks alternately. Every bit the simulator sends
// is compared with the reference frame model, and every frame that reaches
// the PCI side is parsed (time code / status qword, sync code, data qwords)
// and compared with the model, too. On the way the test makes these happen
// and counts them:
//   lock        both channels search, check and lock;
//   tolerated   a sync code with 2 bit errors is still accepted;
//   flywheel    a sync code with 8 errors is bridged while locked;
//   lost        three bad sync codes in a row drop lock, which is regained;
//   reconfig    channel 0 is loaded with a second satellite (other lengths,
//               serial rate, randomised data, ramp video) mid-frame;
//   timecode    a changed GPS time code appears in the next frame;
//   backpress   a full FIFO bank stops the drain of on-chip memory;
//   overflow    the on-chip memory fills and drops qwords.
// It also checks the frame period at 100 Mbit/s and the 64-bit word clock.
`timescale 1ns/1ps
module tb_dsa_top;
  import dsa_pkg::*;
  import tb_frame_pkg::*;

  localparam int NCH   = 2;
  localparam int AW    = $clog2(4480);

  int checks = 0, failures = 0;

  logic clk_ref = 1'b0, rd_clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // an edge, so asynchronous resets act
  always #2.5 clk_ref = ~clk_ref;      // 200 MHz reference
  always #33  rd_clk  = ~rd_clk;       // ~15 MHz host side

  logic                   cfg_we = 1'b0;
  logic [4:0]             cfg_addr = '0;
  logic [31:0]            cfg_wdata = '0, cfg_rdata;
  logic [NCH-1:0]         sim_clk, sim_data, sim_fsc_wnd, sim_aux_wnd, sim_vid_wnd;
  logic [NCH-1:0]         sim_word_clk, sim_eol;
  logic [NCH-1:0]         rx_clk, rx_data;
  acq_cfg_t               acq_cfg [NCH];
  logic [TC_W-1:0]        gps_tc = '0;
  logic [NCH-1:0]         ext_full, ext_wen, ext_empty, ext_ren, force_full = '0;
  logic [XFIFO_W-1:0]     ext_wdata [NCH];
  logic [XFIFO_W-1:0]     ext_rdata [NCH];
  logic                   pci_rd_req = 1'b0, pci_valid;
  logic [0:0]             pci_bank = '0;
  logic [XFIFO_W-1:0]     pci_data;
  logic [NCH-1:0]         acq_word_clk;
  fs_state_e              fs_state [NCH];
  logic [15:0]            n_found [NCH], n_flywheel [NCH], n_lost [NCH];
  logic [15:0]            n_frames [NCH], n_ovf [NCH];
  logic [AW:0]            mem_fill [NCH];
  logic [31:0]            pci_words [NCH];
  logic [15:0]            pci_frames [NCH];

  initial acq_cfg = '{default: ACQ_CFG_DEFAULT};

  dsa_top dut (
    .clk_ref, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .sim_clk, .sim_data, .sim_fsc_wnd, .sim_aux_wnd, .sim_vid_wnd,
    .sim_word_clk, .sim_eol,
    .rx_clk, .rx_data, .acq_cfg, .gps_tc, .rd_clk,
    .ext_full, .ext_wen, .ext_wdata, .ext_empty, .ext_ren, .ext_rdata,
    .pci_rd_req, .pci_bank, .pci_valid, .pci_data, .acq_word_clk,
    .fs_state, .n_found, .n_flywheel, .n_lost, .n_frames, .n_ovf,
    .mem_fill, .pci_words, .pci_frames
  );

  for (genvar c = 0; c < NCH; c++) begin : g_fifo
    ext_fifo_model #(.W(XFIFO_W), .DEPTH(131072)) u_bank (
      .clk(rd_clk), .force_full(force_full[c]), .wen(ext_wen[c]),
      .wdata(ext_wdata[c]), .full(ext_full[c]), .ren(ext_ren[c]),
      .rdata(ext_rdata[c]), .empty(ext_empty[c])
    );
  end

  // cable: 2 ns of delay on the clock, bit errors injected on the data
  assign #2 rx_clk = sim_clk;
  // (the injected errors are added in g_mon below)

  // ---------------------------------------------------------------- plan
  sim_cfg_t cfg_a, cfg_b;
  int       phase [NCH];

  initial begin
    cfg_a = SIM_CFG_DEFAULT;
    cfg_b = SIM_CFG_DEFAULT;
    cfg_b.clk_div        = 8'd2;
    cfg_b.aux_words      = 16'd10;
    cfg_b.video_words    = 16'd200;
    cfg_b.line_last      = 16'd225;
    cfg_b.rand_en        = 1'b1;
    cfg_b.vid_mode       = VID_RAMP;
    cfg_b.chid_val       = 32'hA5;
    cfg_b.chid_byt_start = 8'd0;
    cfg_b.chid_bit_start = 3'd0;
    cfg_b.chid_no_bits   = 6'd8;
    cfg_b.lc_start       = 8'd2;
    cfg_b.lc_bit_cnt     = 5'd16;
    cfg_b.lc_msb_inv     = 16'hF000;
    phase = '{default: 0};
  end

  function automatic sim_cfg_t cfg_of(int ph);
    return (ph == 0) ? cfg_a : cfg_b;
  endfunction

  // number of leading sync bits corrupted in a given frame
  function automatic int nflip(int c, int ph, int line);
    if (ph != 0) return 0;
    if (c == 0 && line == 3) return 2;
    if (c == 0 && line == 5) return 8;
    if (c == 1 && (line == 4 || line == 5 || line == 6)) return 8;
    return 0;
  endfunction

  // ------------------------------------------- serial output monitor
  int  tpos [NCH], tline [NCH];
  bit  restart [NCH] = '{default: 1'b1};
  bit  prev_fsc [NCH] = '{default: 1'b0};
  int  mism [NCH], cnt_fsc [NCH], cnt_aux [NCH], cnt_vid [NCH], cnt_eol [NCH];
  int  sim_frames_ok = 0;

  for (genvar c = 0; c < NCH; c++) begin : g_mon
    bit flip = 1'b0;
    assign rx_data[c] = sim_data[c] ^ flip;
    always @(posedge sim_clk[c]) begin
      if (rst_n) begin
        if (sim_fsc_wnd[c] && !prev_fsc[c]) begin
          // close the previous frame
          if (!restart[c] && tline[c] >= 0 &&
              tpos[c] + 1 == int'(frame_len(cfg_of(phase[c])))) begin
            sim_cfg_t k;
            k = cfg_of(phase[c]);
            checks++;
            if (mism[c] != 0 ||
                cnt_fsc[c] != int'(k.fs_words) * k.pix_w ||
                cnt_aux[c] != int'(k.aux_words) * k.pix_w ||
                cnt_vid[c] != int'(k.video_words) * k.pix_w ||
                cnt_eol[c] != k.pix_w) begin
              failures++;
              $display("FAIL sim ch%0d line %0d: %0d bit errors, windows %0d/%0d/%0d eol %0d",
                       c, tline[c], mism[c], cnt_fsc[c], cnt_aux[c], cnt_vid[c], cnt_eol[c]);
            end else sim_frames_ok++;
          end
          tpos[c]  = 0;
          tline[c] = restart[c] ? 0 : tline[c] + 1;
          restart[c] = 1'b0;
          mism[c] = 0; cnt_fsc[c] = 0; cnt_aux[c] = 0; cnt_vid[c] = 0; cnt_eol[c] = 0;
        end else begin
          tpos[c] = tpos[c] + 1;
        end
        prev_fsc[c] = sim_fsc_wnd[c];
        if (!restart[c]) begin
          if (sim_data[c] !== frame_bit(cfg_of(phase[c]), tline[c], tpos[c])) mism[c]++;
          cnt_fsc[c] += int'(sim_fsc_wnd[c]);
          cnt_aux[c] += int'(sim_aux_wnd[c]);
          cnt_vid[c] += int'(sim_vid_wnd[c]);
          cnt_eol[c] += int'(sim_eol[c]);
          flip <= (tpos[c] < nflip(c, phase[c], tline[c]));
        end
      end
    end
  end

  // ---------------------------------------------------- time code
  logic [TC_W-1:0] tc_hist [$];
  int unsigned     tc_ms = 0;

  function automatic logic [TC_W-1:0] to_bcd(int unsigned v);
    logic [TC_W-1:0] r;
    r = '0;
    for (int i = 0; i < TC_W / 4; i++) begin
      r[i*4 +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    tc_hist.push_back('0);
    forever begin
      #150us;
      tc_ms = tc_ms + 150;
      gps_tc = to_bcd(tc_ms + 86400000);
      tc_hist.push_back(gps_tc);
      if (tc_hist.size() > 4) void'(tc_hist.pop_front());
    end
  end

  // ------------------------------------------------ PCI side checker
  logic [63:0] fbuf [NCH][$];
  bit          open_f [NCH] = '{default: 1'b0};
  bit          chk_en [NCH] = '{default: 1'b1};
  int          last_line [NCH] = '{default: -1};
  int          last_ph [NCH] = '{default: 0};
  int          ok_frames [NCH][2], aborted [NCH], locked_frames [NCH];
  int          tolerated = 0, fly_frames = 0, tc_fresh_seen = 0, gaps [NCH];
  int          bank_words [NCH];
  bit          skip_tr [NCH] = '{default: 1'b0};
  int          skipped [NCH];

  function automatic logic [1:0] st_of(int c);
    return fbuf[c][0][63:62];
  endfunction

  function automatic bit got_bit(int c, int unsigned pos);
    int unsigned i;
    i = pos - FSC_BITS;
    return fbuf[c][3 + i / 64][63 - i % 64];
  endfunction

  task automatic check_frame(int c);
    int          nq, ph, line, nf, bad;
    sim_cfg_t    k;
    logic [15:0] st;
    logic [127:0] exp_sync;
    bit          r, tc_ok;
    int unsigned pw, ls, fl;
    nq = fbuf[c].size() - 3;
    checks++;
    if (nq == (int'(frame_len(cfg_a)) - 128 + 63) / 64)      ph = 0;
    else if (nq == (int'(frame_len(cfg_b)) - 128 + 63) / 64) ph = 1;
    else begin
      failures++;
      $display("FAIL ch%0d: frame of %0d data qwords", c, nq);
      return;
    end
    k  = cfg_of(ph);
    pw = k.pix_w;
    fl = frame_len(k);
    // recover the line count from the aux field
    ls   = k.fs_words * pw + k.lc_start * 8;
    line = 0;
    for (int d = 0; d < k.lc_bit_cnt; d++) begin
      r = got_bit(c, ls + d);
      if (k.rand_en) r ^= tb_frame_pkg::rnd_s[(ls + d - k.fs_words * pw) % 127];
      if (d < 16) r ^= k.lc_msb_inv[15 - d];
      line[k.lc_bit_cnt - 1 - d] = r;
    end
    nf  = nflip(c, ph, line);
    bad = 0;
    for (int unsigned p = FSC_BITS; p < fl; p++)
      if (got_bit(c, p) !== frame_bit(k, line, p)) bad++;
    // padding after the last bit
    for (int unsigned p = fl; p < FSC_BITS + 64 * nq; p++)
      if (got_bit(c, p) !== 1'b0) bad++;
    exp_sync = FSC_PATTERN;
    for (int i = 0; i < nf; i++) exp_sync[127 - i] = ~exp_sync[127 - i];
    if ({fbuf[c][1], fbuf[c][2]} !== exp_sync) bad++;
    st = fbuf[c][0][63:48];
    if (st[12] !== 1'(c) || st[7:0] !== 8'(nf) || st[11:8] !== 4'd0) bad++;
    tc_ok = 0;
    foreach (tc_hist[i]) if (fbuf[c][0][47:0] == tc_hist[i]) tc_ok = 1;
    if (!tc_ok) bad++;
    if (ph == last_ph[c] && line <= last_line[c]) bad++;
    if (bad != 0) begin
      failures++;
      $display("FAIL ch%0d phase %0d line %0d: %0d mismatches (status %h)", c, ph, line, bad, st);
    end else begin
      ok_frames[c][ph]++;
      if (st[15:14] == 2'(FS_LOCK)) locked_frames[c]++;
      if (nf > 0 && nf <= 3) tolerated++;
      if (nf > 3) fly_frames++;
      if (st[13]) tc_fresh_seen++;
      if (ph == last_ph[c] && last_line[c] >= 0 && line > last_line[c] + 1) gaps[c]++;
    end
    last_line[c] = line;
    last_ph[c]   = ph;
  endtask

  logic [NCH-1:0] ren_q = '0;
  always @(posedge rd_clk) ren_q <= ext_ren;

  always @(posedge rd_clk) begin
    if (pci_valid && rst_n) begin
      qw_tag_t tg;
      int      c;
      tg = qw_tag_t'(pci_data[71:64]);
      c  = int'(tg.ch);
      bank_words[c]++;
      if (!ren_q[c]) begin
        checks++; failures++;
        $display("FAIL word of channel %0d read from the other bank at %t", c, $realtime);
      end
      if (tg.sof) begin
        if (open_f[c]) aborted[c]++;
        open_f[c] = 1'b1;
        fbuf[c].delete();
      end
      if (open_f[c]) fbuf[c].push_back(pci_data[63:0]);
      if (tg.eof && open_f[c]) begin
        // frames bridged by the flywheel across the reconfiguration carry
        // no valid data; checking resumes with the first frame found anew
        if (skip_tr[c] && st_of(c) == 2'(FS_CHECK)) skip_tr[c] = 1'b0;
        if (skip_tr[c]) skipped[c]++;
        else if (chk_en[c]) check_frame(c);
        open_f[c] = 1'b0;
      end
    end
  end

  // PCI core: always asking, switching banks every 40 cycles
  int unsigned rd_cyc = 0;
  always @(posedge rd_clk) begin
    rd_cyc++;
    if (rd_cyc % 40 == 0) pci_bank <= ~pci_bank;
  end

  // ----------------------------------------- rate and word clock checks
  realtime     t_last [NCH];
  int          exact_period = 0, wclk_ok = 0, wclk_cnt = 0;
  logic [15:0] nfr_prev [NCH] = '{default: '0};
  bit          wprev = 1'b0;
  int          bp_cycles = 0;

  for (genvar c = 0; c < NCH; c++) begin : g_rate
    always @(posedge rx_clk[c]) begin
      if (n_frames[c] != nfr_prev[c]) begin
        if (phase[c] == 0 && $realtime - t_last[c] == 192000.0) exact_period++;
        t_last[c]   = $realtime;
        nfr_prev[c] = n_frames[c];
      end
    end
  end

  always @(posedge rx_clk[1]) begin
    wclk_cnt++;
    if (acq_word_clk[1] && !wprev) begin
      if (wclk_cnt == 64) wclk_ok++;
      wclk_cnt = 0;
    end
    wprev = acq_word_clk[1];
  end

  always @(posedge rd_clk)
    if (force_full[1] && mem_fill[1] != 0 && !ext_wen[1]) bp_cycles++;

  // ------------------------------------------------------- watchdog
  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [4:0] a, input logic [31:0] d);
    @(posedge clk_ref);
    cfg_we <= 1'b1; cfg_addr <= a; cfg_wdata <= d;
    @(posedge clk_ref);
    cfg_we <= 1'b0;
  endtask

  task automatic expect_ok(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------- sequence
  initial begin
    int ok_before;
    #100ns;
    rst_n = 1'b1;
    pci_rd_req = 1'b1;

    // phase 0: default satellite on both channels, errors injected
    wait (tline[0] >= 8 && sim_vid_wnd[0]);

    // reconfigure channel 0 mid-frame
    cfg_write({1'b0, 4'd2},  32'(cfg_b.aux_words));
    cfg_write({1'b0, 4'd3},  32'(cfg_b.video_words));
    cfg_write({1'b0, 4'd4},  32'(cfg_b.line_last));
    cfg_write({1'b0, 4'd5},  {29'd0, cfg_b.vid_mode, cfg_b.rand_en});
    cfg_write({1'b0, 4'd6},  cfg_b.chid_val);
    cfg_write({1'b0, 4'd7},  {10'd0, cfg_b.chid_no_bits, 5'd0, cfg_b.chid_bit_start, cfg_b.chid_byt_start});
    cfg_write({1'b0, 4'd8},  {cfg_b.lc_msb_inv, 3'd0, cfg_b.lc_bit_cnt, cfg_b.lc_start});
    cfg_write({1'b0, 4'd10}, 32'(cfg_b.clk_div));
    @(posedge clk_ref);
    cfg_addr <= {1'b0, 4'd3};
    @(posedge clk_ref);
    expect_ok(cfg_rdata == 32'(cfg_b.video_words), "register read back");
    acq_cfg[0] = '{frame_bits: frame_len(cfg_b), max_err: 7'd3, check_n: 4'd2, fly_n: 4'd3};
    restart[0] = 1'b1;
    phase[0]   = 1;
    skip_tr[0] = 1'b1;
    cfg_write({1'b0, 4'd15}, 32'd1);

    wait (ok_frames[0][1] >= 20);

    // phase 2: hold bank 1 full until on-chip memory 1 overflows
    chk_en[1]     = 1'b0;
    force_full[1] = 1'b1;
    ok_before     = ok_frames[0][1];
    wait (n_ovf[1] != 0);
    expect_ok(mem_fill[1] >= (AW+1)'(4480 - 8), "memory 1 filled before overflow");
    #100us;
    force_full[1] = 1'b0;
    #300us;
    expect_ok(ok_frames[0][1] > ok_before, "channel 0 kept running during the overflow of channel 1");

    // mechanisms
    expect_ok(sim_frames_ok >= 20,            "simulator frames checked");
    expect_ok(ok_frames[0][0] >= 5,           "channel 0 frames, satellite A");
    expect_ok(ok_frames[1][0] >= 5,           "channel 1 frames, satellite A");
    expect_ok(ok_frames[0][1] >= 20,          "reconfig: channel 0 frames, satellite B");
    expect_ok(locked_frames[0] > 0 && locked_frames[1] > 0, "lock on both channels");
    expect_ok(tolerated > 0,                  "tolerated sync errors");
    expect_ok(fly_frames >= 3 && n_flywheel[0] >= 1 && n_flywheel[1] >= 2, "flywheel");
    expect_ok(n_lost[1] >= 1 && gaps[1] >= 1, "loss of lock and re-acquisition");
    expect_ok(tc_fresh_seen > 0,              "time code update flagged");
    expect_ok(bp_cycles > 100,                "backpressure from a full FIFO bank");
    expect_ok(n_ovf[1] > 0,                   "on-chip memory overflow");
    expect_ok(bank_words[0] > 0 && bank_words[1] > 0, "both banks read");
    expect_ok(exact_period >= 5,              "frame period 192 us at 100 Mbit/s");
    expect_ok(wclk_ok >= 1000,                "64-bit word clock period");
    $display("frames A %0d/%0d B %0d, skipped %0d, aborted %0d/%0d, tolerated %0d, flywheel %0d/%0d, lost %0d, ovf %0d, bp %0d, periods %0d, wclk %0d",
             ok_frames[0][0], ok_frames[1][0], ok_frames[0][1], skipped[0], aborted[0], aborted[1],
             tolerated, n_flywheel[0], n_flywheel[1], n_lost[1], n_ovf[1], bp_cycles,
             exact_period, wclk_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
