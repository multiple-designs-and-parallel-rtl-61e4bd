// tb_fifo_rd_ctrl - FIFO bank read control with two FIFO bank models that
// the testbench fills. The request and the bank select change at random,
// also while a read is in flight; every word handed to the PCI side must be
// the next one of the bank it was read from, and the per-bank word and
// frame counters must match.
`timescale 1ns/1ps
module tb_fifo_rd_ctrl;
  import dsa_pkg::*;
  int checks = 0, failures = 0;
  localparam int NB = 2;
  logic clk = 0, rst_n = 1, pci_rd_req = 0, pci_valid;
  logic [0:0] pci_bank = '0;
  logic [XFIFO_W-1:0] pci_data;
  logic [NB-1:0] ext_empty, ext_ren, ext_full, wen = '0;
  logic [XFIFO_W-1:0] ext_rdata [NB], wdata [NB];
  logic [31:0] n_words [NB];
  logic [15:0] n_frames [NB];
  always #5 clk = ~clk;

  fifo_rd_ctrl #(.NB(NB)) dut (.*);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    ext_fifo_model #(.W(XFIFO_W), .DEPTH(512)) u_bank (
      .clk, .force_full(1'b0), .wen(wen[b]), .wdata(wdata[b]), .full(ext_full[b]),
      .ren(ext_ren[b]), .rdata(ext_rdata[b]), .empty(ext_empty[b]));
  end

  logic [XFIFO_W-1:0] exp_q [NB][$];
  int got [NB] = '{0, 0}, eofs [NB] = '{0, 0}, total = 0;
  logic [NB-1:0] ren_q = '0;
  logic [0:0] bank_q = '0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) begin
    ren_q  <= ext_ren;
    bank_q <= pci_bank;
  end

  always @(posedge clk) if (rst_n) begin
    chk($onehot0(ext_ren), "at most one bank read");
    if (|ext_ren) chk(ext_ren[pci_bank] && pci_rd_req && !ext_empty[pci_bank], "read only on request from the selected, non-empty bank");
    chk(pci_valid == |ren_q, "valid one cycle after a read");
    if (pci_valid) begin
      int b;
      b = ren_q[1] ? 1 : 0;
      chk(exp_q[b].size() > 0 && pci_data == exp_q[b][0], $sformatf("bank %0d word %0d", b, got[b]));
      if (exp_q[b].size() > 0) void'(exp_q[b].pop_front());
      got[b]++;
      if (pci_data[QW+1]) eofs[b]++;
    end
  end

  // writers: each bank gets bursts of tagged words
  for (genvar b = 0; b < NB; b++) begin : g_wr
    initial begin
      int n = 0;
      wdata[b] = '0;
      @(posedge rst_n);
      repeat (600) begin
        @(negedge clk);
        wen[b] = ($urandom_range(0, 2) == 0);
        if (wen[b]) begin
          wdata[b] = {5'd0, 1'(b), 1'(n % 7 == 6), 1'(n % 7 == 0), 32'(b), 32'(n)};
          exp_q[b].push_back(wdata[b]);
          n++;
        end
      end
      @(negedge clk); wen[b] = 0;
    end
  end

  initial begin
    #1ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #30 rst_n = 1;
    repeat (1500) begin
      @(negedge clk);
      pci_rd_req = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 4) == 0) pci_bank = ~pci_bank;
    end
    pci_rd_req = 1;
    repeat (300) begin @(negedge clk); pci_bank = ~pci_bank; end
    @(negedge clk); pci_rd_req = 0;
    repeat (4) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      chk(exp_q[b].size() == 0, $sformatf("bank %0d drained", b));
      chk(n_words[b] == 32'(got[b]), $sformatf("bank %0d word count %0d", b, n_words[b]));
      chk(n_frames[b] == 16'(eofs[b]) && eofs[b] > 10, $sformatf("bank %0d frame count %0d", b, n_frames[b]));
    end
    $display("words %0d %0d", got[0], got[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
