// data_acquisition - front end of the satellite data acquisition hardware.
//
// NCH serial channels (I and Q) arrive as a bit clock and a data line each.
// Per channel, in that channel's bit clock domain: frame_sync finds and
// tracks the 128-bit frame sync code, decom turns each accepted frame into
// 64-bit qwords headed by a time code / status qword, timecode_sync captures
// the parallel BCD GPS time code for it, and mem_ctrl writes the qwords into
// the channel's onchip_mem. In the host clock domain (rd_clk) mem_ctrl
// drains each memory into the channel's external FIFO bank, and
// fifo_rd_ctrl reads the banks out to the PCI core on its request.
//
// Status qword, bits 63:48 of the first qword of every frame:
//   [15:14] frame_sync state, [13] time code changed since the last frame,
//   [12] channel, [11:8] zero, [7:0] sync code bit errors.
// acq_cfg is static configuration, to be changed only while the channel
// is idle. rst_n resets all domains asynchronously; each domain leaves
// reset on its own clock. The chain follows the document's block diagram;
// the channel split of memory and FIFO banks is this design's choice.
module data_acquisition
  import dsa_pkg::*;
#(
  parameter int unsigned NCH   = 2,
  parameter int unsigned DEPTH = 4480,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               rst_n,
  input  logic [NCH-1:0]     rx_clk,
  input  logic [NCH-1:0]     rx_data,
  input  acq_cfg_t           acq_cfg    [NCH],
  input  logic [TC_W-1:0]    gps_tc,
  // host side
  input  logic               rd_clk,
  input  logic [NCH-1:0]     ext_full,
  output logic [NCH-1:0]     ext_wen,
  output logic [XFIFO_W-1:0] ext_wdata  [NCH],
  input  logic [NCH-1:0]     ext_empty,
  output logic [NCH-1:0]     ext_ren,
  input  logic [XFIFO_W-1:0] ext_rdata  [NCH],
  input  logic               pci_rd_req,
  input  logic [$clog2(NCH)-1:0] pci_bank,
  output logic               pci_valid,
  output logic [XFIFO_W-1:0] pci_data,
  // status
  output logic [NCH-1:0]     word_clk,
  output fs_state_e          fs_state   [NCH],
  output logic [15:0]        n_found    [NCH],
  output logic [15:0]        n_flywheel [NCH],
  output logic [15:0]        n_lost     [NCH],
  output logic [15:0]        n_frames   [NCH],
  output logic [15:0]        n_ovf      [NCH],
  output logic [AW:0]        mem_fill   [NCH],
  output logic [31:0]        pci_words  [NCH],
  output logic [15:0]        pci_frames [NCH]
);
  logic rd_rst_n;

  rst_sync u_rd_rst (.clk(rd_clk), .rst_n, .rst_n_o(rd_rst_n));

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic                rx_rst_n;
    logic                frame_start, tc_new, tc_fresh;
    logic [FSC_BITS-1:0] sync_word;
    logic [7:0]          sync_err;
    logic [TC_W-1:0]     tc_q;
    logic [15:0]         status;
    logic                q_valid, q_sof, q_eof;
    logic [QW-1:0]       q_data;
    logic                mem_we, mem_re;
    logic [AW-1:0]       mem_waddr, mem_raddr;
    logic [QW+1:0]       mem_wdata, mem_rdata;

    rst_sync u_rx_rst (.clk(rx_clk[c]), .rst_n, .rst_n_o(rx_rst_n));

    frame_sync u_fs (
      .clk(rx_clk[c]), .rst_n(rx_rst_n), .bit_en(1'b1), .bit_in(rx_data[c]),
      .cfg(acq_cfg[c]), .frame_start, .sync_word, .sync_err,
      .state(fs_state[c]), .n_found(n_found[c]), .n_flywheel(n_flywheel[c]),
      .n_lost(n_lost[c])
    );

    timecode_sync #(.TC_W(TC_W)) u_tc (
      .clk(rx_clk[c]), .rst_n(rx_rst_n), .tc_in(gps_tc), .tc_q, .tc_new
    );

    always_ff @(posedge rx_clk[c] or negedge rx_rst_n) begin
      if (!rx_rst_n)        tc_fresh <= 1'b0;
      else if (frame_start) tc_fresh <= tc_new;
      else if (tc_new)      tc_fresh <= 1'b1;
    end

    assign status = {fs_state[c], tc_fresh || tc_new, 1'(c), 4'd0, sync_err};

    decom u_decom (
      .clk(rx_clk[c]), .rst_n(rx_rst_n), .bit_en(1'b1), .bit_in(rx_data[c]),
      .frame_start, .sync_word, .frame_bits(acq_cfg[c].frame_bits),
      .tc(tc_q), .status, .q_valid, .q_data, .q_sof, .q_eof,
      .word_clk(word_clk[c]), .n_frames(n_frames[c])
    );

    mem_ctrl #(.DEPTH(DEPTH), .AW(AW), .CH(1'(c))) u_ctrl (
      .wclk(rx_clk[c]), .wrst_n(rx_rst_n), .q_valid, .q_data, .q_sof, .q_eof,
      .mem_we, .mem_waddr, .mem_wdata, .n_ovf(n_ovf[c]),
      .rclk(rd_clk), .rrst_n(rd_rst_n), .mem_re, .mem_raddr, .mem_rdata,
      .ext_full(ext_full[c]), .ext_wen(ext_wen[c]), .ext_wdata(ext_wdata[c]),
      .fill_r(mem_fill[c])
    );

    onchip_mem #(.DW(QW+2), .DEPTH(DEPTH), .AW(AW)) u_mem (
      .wclk(rx_clk[c]), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
      .rclk(rd_clk), .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
    );
  end

  fifo_rd_ctrl #(.NB(NCH)) u_rd (
    .clk(rd_clk), .rst_n(rd_rst_n), .pci_rd_req, .pci_bank, .pci_valid,
    .pci_data, .ext_empty, .ext_ren, .ext_rdata,
    .n_words(pci_words), .n_frames(pci_frames)
  );
endmodule
