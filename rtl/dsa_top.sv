// dsa_top - data simulator and data acquisition logic on one FPGA.
//
// Two independent designs share the chip and run in parallel: the data
// simulator, clocked by the 200 MHz reference, sends NCH serial satellite
// streams (clock and data pin per channel, to the RJ45 connector), and the
// data acquisition logic receives NCH serial streams (bit clock and data
// from the LVDS receivers), frames them into qwords and passes them through
// on-chip memory and the external FIFO banks to the PCI core. Nothing
// inside connects the two: for testing the simulator's outputs are cabled
// to the acquisition inputs outside the chip. The external FIFO banks and
// the PCI core sit on the ext_* and pci_* ports; the host loads the
// simulator through cfg_* and sets acq_cfg.
module dsa_top
  import dsa_pkg::*;
#(
  parameter int unsigned NCH   = 2,
  parameter int unsigned DEPTH = 4480,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk_ref,
  input  logic                   rst_n,
  // data simulator
  input  logic                   cfg_we,
  input  logic [$clog2(NCH)+3:0] cfg_addr,
  input  logic [31:0]            cfg_wdata,
  output logic [31:0]            cfg_rdata,
  output logic [NCH-1:0]         sim_clk,
  output logic [NCH-1:0]         sim_data,
  output logic [NCH-1:0]         sim_fsc_wnd,
  output logic [NCH-1:0]         sim_aux_wnd,
  output logic [NCH-1:0]         sim_vid_wnd,
  output logic [NCH-1:0]         sim_word_clk,
  output logic [NCH-1:0]         sim_eol,
  // data acquisition
  input  logic [NCH-1:0]         rx_clk,
  input  logic [NCH-1:0]         rx_data,
  input  acq_cfg_t               acq_cfg    [NCH],
  input  logic [TC_W-1:0]        gps_tc,
  input  logic                   rd_clk,
  input  logic [NCH-1:0]         ext_full,
  output logic [NCH-1:0]         ext_wen,
  output logic [XFIFO_W-1:0]     ext_wdata  [NCH],
  input  logic [NCH-1:0]         ext_empty,
  output logic [NCH-1:0]         ext_ren,
  input  logic [XFIFO_W-1:0]     ext_rdata  [NCH],
  input  logic                   pci_rd_req,
  input  logic [$clog2(NCH)-1:0] pci_bank,
  output logic                   pci_valid,
  output logic [XFIFO_W-1:0]     pci_data,
  output logic [NCH-1:0]         acq_word_clk,
  output fs_state_e              fs_state   [NCH],
  output logic [15:0]            n_found    [NCH],
  output logic [15:0]            n_flywheel [NCH],
  output logic [15:0]            n_lost     [NCH],
  output logic [15:0]            n_frames   [NCH],
  output logic [15:0]            n_ovf      [NCH],
  output logic [AW:0]            mem_fill   [NCH],
  output logic [31:0]            pci_words  [NCH],
  output logic [15:0]            pci_frames [NCH]
);
  data_simulator #(.NCH(NCH)) u_sim (
    .clk(clk_ref), .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .ser_clk(sim_clk), .ser_data(sim_data), .fsc_wnd(sim_fsc_wnd),
    .aux_wnd(sim_aux_wnd), .vid_wnd(sim_vid_wnd), .word_clk(sim_word_clk),
    .end_of_line(sim_eol)
  );

  data_acquisition #(.NCH(NCH), .DEPTH(DEPTH), .AW(AW)) u_acq (
    .rst_n, .rx_clk, .rx_data, .acq_cfg, .gps_tc, .rd_clk,
    .ext_full, .ext_wen, .ext_wdata, .ext_empty, .ext_ren, .ext_rdata,
    .pci_rd_req, .pci_bank, .pci_valid, .pci_data,
    .word_clk(acq_word_clk), .fs_state, .n_found, .n_flywheel, .n_lost,
    .n_frames, .n_ovf, .mem_fill, .pci_words, .pci_frames
  );
endmodule
