// tb_data_acquisition - the acquisition logic fed with serial streams that
// the testbench builds from the frame model, on two unrelated bit clocks
// (100 and about 77 Mbit/s). Two FIFO bank models sit on the ext_* ports and
// the testbench reads them like the PCI core. Every frame delivered is
// parsed and compared bit by bit with the frame that was sent. Injected
// sync errors make the chain tolerate, flywheel, lose and regain lock; a
// GPS time code change must show up in the following frames; a bank held
// full must overflow that channel's memory without disturbing the other.
`timescale 1ns/1ps
module tb_data_acquisition;
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

  always #5    rx_clk[0] = ~rx_clk[0];
  always #6.5  rx_clk[1] = ~rx_clk[1];
  always #10   rd_clk    = ~rd_clk;

  data_acquisition #(.NCH(NCH), .DEPTH(DEPTH)) dut (.*);
  for (genvar c = 0; c < NCH; c++) begin : g_bank
    ext_fifo_model #(.W(XFIFO_W)) u_bank (
      .clk(rd_clk), .force_full(force_full[c]), .wen(ext_wen[c]), .wdata(ext_wdata[c]),
      .full(ext_full[c]), .ren(ext_ren[c]), .rdata(ext_rdata[c]), .empty(ext_empty[c]));
  end

  sim_cfg_t kc [NCH];
  initial begin
    kc[0] = SIM_CFG_DEFAULT;
    kc[0].aux_words = 16'd6; kc[0].video_words = 16'd58; kc[0].line_last = 16'd79;
    kc[0].chid_byt_start = 8'd0; kc[0].chid_bit_start = 3'd0; kc[0].chid_val = 32'h3C;
    kc[0].lc_start = 8'd1; kc[0].lc_bit_cnt = 5'd16; kc[0].vid_run = 16'd20;
    kc[1] = kc[0];
    kc[1].chid_val = 32'hC3; kc[1].rand_en = 1'b1; kc[1].vid_mode = VID_RAMP;
    kc[1].line_last = 16'd95; kc[1].video_words = 16'd74;
    for (int c = 0; c < NCH; c++)
      acq_cfg[c] = '{frame_bits: frame_len(kc[c]), max_err: 7'd3, check_n: 4'd2, fly_n: 4'd3};
  end

  // sync bit errors per frame
  function automatic int nflip(int c, int line);
    if (c == 0 && line == 4) return 3;
    if (c == 0 && line == 7) return 10;
    if (c == 1 && line >= 5 && line <= 7) return 12;
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
    #40us gps_tc = 48'h0000_1234_5700;
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

  initial begin
    #5ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ok0;
    #1 rst_n = 0; #50 rst_n = 1;
    pci_rd_req = 1;
    wait (tx_line[0] >= 40 && tx_line[1] >= 30);
    #2us;
    chk(ok[0] >= 36 && ok[1] >= 22, $sformatf("frames delivered %0d %0d", ok[0], ok[1]));
    chk(locked[0] > 0 && locked[1] > 0, "lock on both channels");
    chk(tol >= 1, "sync with 3 errors tolerated");
    chk(fly >= 1 && n_flywheel[0] >= 1, "flywheel over a bad sync");
    chk(n_lost[1] >= 1 && gaps[1] >= 1 && n_lost[0] == 0, "loss of lock and re-acquisition");
    chk(fresh >= 1, "time code change flagged");
    chk(pci_frames[0] >= 16'(ok[0]) && pci_frames[1] >= 16'(ok[1]), "frame counters");
    // backpressure on bank 0 until its memory overflows
    chk_en[0] = 0;
    force_full[0] = 1;
    ok0 = ok[1];
    wait (n_ovf[0] != 0);
    chk(mem_fill[0] >= (AW+1)'(DEPTH - 8), "memory 0 full before overflow");
    #20us;
    chk(ok[1] > ok0, "channel 1 unaffected by the overflow of channel 0");
    $display("frames %0d %0d found %0d %0d fly %0d %0d lost %0d %0d ovf %0d",
             ok[0], ok[1], n_found[0], n_found[1], n_flywheel[0], n_flywheel[1],
             n_lost[0], n_lost[1], n_ovf[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
