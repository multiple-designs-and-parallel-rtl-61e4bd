// tb_acq_200mbps - the acquisition logic at the full rate of the original
// card: both channels at 200 Mbit/s (5 ns bit clock; channel 1 slightly
// slower, 192 Mbit/s), the host side at 15 MHz, and the default frame of
// 2400 eight-bit words. Checks that every frame arrives complete and
// bit-exact, that nothing overflows, that the on-chip memory stays far from
// full, and that the qword rate into each memory is within 2.5 to 4 MHz.
`timescale 1ns/1ps
module tb_acq_200mbps;
  import dsa_pkg::*;
  import tb_frame_pkg::*;
  localparam int NCH = 2, DEPTH = 4480, AW = $clog2(DEPTH);
  int checks = 0, failures = 0;

  logic rst_n = 1, rd_clk = 0;
  logic [NCH-1:0] rx_clk = '0, rx_data = '0;
  acq_cfg_t acq_cfg [NCH];
  logic [TC_W-1:0] gps_tc = 48'h0000_1234_5600;
  logic [NCH-1:0] ext_full, ext_wen, ext_empty, ext_ren, force_full = '0;
  logic [XFIFO_W-1:0] ext_wdata [NCH], ext_rdata [NCH];
  logic pci_rd_req = 0, pci_valid;
  logic [0:0] pci_bank = '0;
  logic [XFIFO_W-1:0] pci_data;
  logic [NCH-1:0] word_clk;
  fs_state_e fs_state [NCH];
  logic [15:0] n_found [NCH], n_flywheel [NCH], n_lost [NCH], n_frames [NCH], n_ovf [NCH];
  logic [AW:0] mem_fill [NCH];
  logic [31:0] pci_words [NCH];
  logic [15:0] pci_frames [NCH];

  always #2.5  rx_clk[0] = ~rx_clk[0];
  always #2.6  rx_clk[1] = ~rx_clk[1];
  always #33.333 rd_clk  = ~rd_clk;

  data_acquisition #(.NCH(NCH), .DEPTH(DEPTH)) dut (.*);
  for (genvar c = 0; c < NCH; c++) begin : g_bank
    ext_fifo_model #(.W(XFIFO_W)) u_bank (
      .clk(rd_clk), .force_full(force_full[c]), .wen(ext_wen[c]), .wdata(ext_wdata[c]),
      .full(ext_full[c]), .ren(ext_ren[c]), .rdata(ext_rdata[c]), .empty(ext_empty[c]));
  end

  sim_cfg_t kc [NCH];
  initial begin
    kc[0] = SIM_CFG_DEFAULT;
    kc[1] = SIM_CFG_DEFAULT;
    kc[1].chid_val = 32'h5A; kc[1].rand_en = 1'b1; kc[1].vid_mode = VID_RAMP;
    for (int c = 0; c < NCH; c++)
      acq_cfg[c] = '{frame_bits: frame_len(kc[c]), max_err: 7'd3, check_n: 4'd2, fly_n: 4'd3};
  end

  function automatic int nflip(int c, int line);
    return 0;
  endfunction

  // ----------------------------------------------------- transmitters
  int tx_line [NCH] = '{0, 0};
  for (genvar c = 0; c < NCH; c++) begin : g_tx
    initial begin
      @(posedge rst_n);
      forever begin
        for (int unsigned p = 0; p < frame_len(kc[c]); p++) begin
          @(negedge rx_clk[c]);
          rx_data[c] = frame_bit(kc[c], tx_line[c], p) ^ (p < nflip(c, tx_line[c]));
        end
        tx_line[c]++;
      end
    end
  end

  // ----------------------------------------------------- time code
  logic [TC_W-1:0] tc_hist [$];
  initial begin
    tc_hist.push_back(gps_tc);
    #300us gps_tc = 48'h0000_1234_5700;
    tc_hist.push_back(gps_tc);
  end

  // ----------------------------------------------------- PCI side
  logic [63:0] fbuf [NCH][$];
  bit open_f [NCH] = '{0, 0};
  int ok [NCH] = '{0, 0}, locked [NCH] = '{0, 0}, tol = 0, fly = 0, fresh = 0, gaps [NCH] = '{0, 0};
  int last_line [NCH] = '{-1, -1};
  bit chk_en [NCH] = '{1, 1};

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  function automatic bit got_bit(int c, int unsigned pos);
    int unsigned i;
    i = pos - FSC_BITS;
    return fbuf[c][3 + i / 64][63 - i % 64];
  endfunction

  task automatic check_frame(int c);
    int unsigned fl, ls;
    int line, nf, bad, nq;
    logic [15:0] st;
    logic [127:0] es;
    bit r, tc_ok;
    sim_cfg_t k;
    k  = kc[c];
    fl = frame_len(k);
    nq = fbuf[c].size() - 3;
    if (nq != (int'(fl) - 128 + 63) / 64) begin
      chk(0, $sformatf("ch%0d frame of %0d data qwords", c, nq));
      return;
    end
    ls = k.fs_words * k.pix_w + k.lc_start * 8;
    line = 0;
    for (int d = 0; d < k.lc_bit_cnt; d++) begin
      r = got_bit(c, ls + d);
      if (k.rand_en) r ^= rnd_s[(ls + d - k.fs_words * k.pix_w) % 127];
      line[k.lc_bit_cnt - 1 - d] = r;
    end
    nf = nflip(c, line);
    bad = 0;
    for (int unsigned p = FSC_BITS; p < fl; p++) if (got_bit(c, p) !== frame_bit(k, line, p)) bad++;
    for (int unsigned p = fl; p < FSC_BITS + 64 * nq; p++) if (got_bit(c, p) !== 1'b0) bad++;
    es = FSC_PATTERN;
    for (int i = 0; i < nf; i++) es[127 - i] = ~es[127 - i];
    if ({fbuf[c][1], fbuf[c][2]} !== es) bad++;
    st = fbuf[c][0][63:48];
    if (st[12] !== 1'(c) || st[11:8] !== 4'd0 || st[7:0] !== 8'(nf)) bad++;
    tc_ok = 0;
    foreach (tc_hist[i]) if (fbuf[c][0][47:0] == tc_hist[i]) tc_ok = 1;
    if (!tc_ok) bad++;
    if (line <= last_line[c]) bad++;
    chk(bad == 0, $sformatf("ch%0d line %0d: %0d mismatches, status %h", c, line, bad, st));
    if (bad == 0) begin
      ok[c]++;
      if (st[15:14] == 2'(FS_LOCK)) locked[c]++;
      if (nf > 0 && nf <= 3) tol++;
      if (nf > 3) fly++;
      if (st[13]) fresh++;
      if (last_line[c] >= 0 && line > last_line[c] + 1) gaps[c]++;
    end
    last_line[c] = line;
  endtask

  logic [NCH-1:0] ren_q = '0;
  always @(posedge rd_clk) ren_q <= ext_ren;
  always @(posedge rd_clk) if (rst_n && pci_valid) begin
    qw_tag_t tg;
    int c;
    tg = qw_tag_t'(pci_data[71:64]);
    c  = int'(tg.ch);
    chk(ren_q[c], "word comes from its channel's bank");
    if (tg.sof) begin open_f[c] = 1; fbuf[c].delete(); end
    if (open_f[c]) fbuf[c].push_back(pci_data[63:0]);
    if (tg.eof && open_f[c]) begin
      if (chk_en[c]) check_frame(c);
      open_f[c] = 0;
    end
  end
  always @(posedge rd_clk) pci_bank <= ~pci_bank;

  int max_fill [NCH] = '{0, 0};
  bit fill_en = 0;
  initial begin @(posedge rst_n); #1us fill_en = 1; end
  always @(posedge rd_clk) if (fill_en) for (int c = 0; c < NCH; c++)
    if (int'(mem_fill[c]) > max_fill[c]) max_fill[c] = int'(mem_fill[c]);

  initial begin
    #5ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0;
    int f0;
    #1 rst_n = 0; #50 rst_n = 1;
    pci_rd_req = 1;
    wait (n_frames[0] == 16'd2);
    t0 = $realtime;
    f0 = int'(n_frames[0]);
    wait (n_frames[0] == 16'd10);
    begin
      real qrate;
      // 301 qwords per frame: time code/status, 2 sync, 298 data
      qrate = real'(int'(n_frames[0]) - f0) * 301.0 / (($realtime - t0) * 1.0e-9) / 1.0e6;
      $display("qword write rate channel 0: %0.3f MHz", qrate);
      chk(qrate >= 2.5 && qrate <= 4.0, $sformatf("qword rate %0.3f MHz within 2.5..4 MHz", qrate));
      chk(qrate > 3.130 && qrate < 3.140, "qword rate is 200 Mbit/s / 19200 bits x 301 qwords");
    end
    wait (tx_line[0] >= 10 && tx_line[1] >= 10);
    #20us;
    chk(ok[0] >= 9 && ok[1] >= 9, $sformatf("frames delivered %0d %0d", ok[0], ok[1]));
    chk(n_ovf[0] == 0 && n_ovf[1] == 0, "no overflow");
    chk(n_flywheel[0] == 0 && n_lost[0] == 0 && n_flywheel[1] == 0 && n_lost[1] == 0, "no sync slips");
    chk(locked[0] > 0 && locked[1] > 0, "lock on both channels");
    chk(fresh >= 1, "time code change flagged");
    chk(max_fill[0] < 64 && max_fill[1] < 64, $sformatf("memory fill stays low: %0d %0d", max_fill[0], max_fill[1]));
    $display("frames %0d %0d, max fill %0d %0d", ok[0], ok[1], max_fill[0], max_fill[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
