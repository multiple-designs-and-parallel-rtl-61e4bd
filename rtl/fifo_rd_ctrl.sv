// fifo_rd_ctrl - read control of the external FIFO banks towards the PCI core.
//
// In the host-side clock domain. While the PCI core asks for data
// (pci_rd_req) and the bank it selects (pci_bank) is not empty, one 72-bit
// word per cycle is read from that bank (ext_ren); the FIFO presents it one
// cycle later, and it goes to the PCI core with pci_valid. Changing pci_bank
// while a read is in flight is allowed: the returned word is taken from the
// bank it was read from. Counts words and complete frames (eof tags) passed
// per bank. The FIFO banks and the PCI core are outside this block.
// That the FPGA generates the FIFO read control follows the document; the
// request/select interface is this design's choice.
module fifo_rd_ctrl
  import dsa_pkg::*;
#(
  parameter int unsigned NB = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pci_rd_req,
  input  logic [$clog2(NB)-1:0] pci_bank,
  output logic               pci_valid,
  output logic [XFIFO_W-1:0] pci_data,
  input  logic [NB-1:0]      ext_empty,
  output logic [NB-1:0]      ext_ren,
  input  logic [XFIFO_W-1:0] ext_rdata [NB],
  output logic [31:0]        n_words  [NB],
  output logic [15:0]        n_frames [NB]
);
  localparam int unsigned BW = $clog2(NB);

  logic          rd_v;
  logic [BW-1:0] rd_bank;
  qw_tag_t       tag;

  always_comb begin
    ext_ren = '0;
    if (pci_rd_req && !ext_empty[pci_bank]) ext_ren[pci_bank] = 1'b1;
  end

  assign pci_valid = rd_v;
  assign pci_data  = ext_rdata[rd_bank];
  assign tag       = qw_tag_t'(pci_data[XFIFO_W-1:QW]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v     <= 1'b0;
      rd_bank  <= '0;
      n_words  <= '{default: '0};
      n_frames <= '{default: '0};
    end else begin
      rd_v <= |ext_ren;
      if (|ext_ren) rd_bank <= pci_bank;
      if (rd_v) begin
        n_words[rd_bank] <= n_words[rd_bank] + 1'b1;
        if (tag.eof) n_frames[rd_bank] <= n_frames[rd_bank] + 1'b1;
      end
    end
  end
endmodule
