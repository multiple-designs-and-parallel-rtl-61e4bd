// tb_mem_ctrl - one channel's memory control with its on-chip memory and a
// model of the external FIFO, on unrelated write and read clocks. Checks
// that the memory holds exactly DEPTH qwords when the FIFO refuses data,
// that further qwords are dropped and counted, and that everything accepted
// reaches the FIFO in order with its tag, also under random backpressure.
// Runs with a depth that is not a power of two.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import dsa_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 37, AW = $clog2(DEPTH);
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  logic q_valid = 0, q_sof = 0, q_eof = 0, force_full = 0;
  logic [QW-1:0] q_data = '0;
  logic mem_we, mem_re, ext_full, ext_wen, f_empty, f_ren = 0;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [QW+1:0] mem_wdata, mem_rdata;
  logic [15:0] n_ovf;
  logic [XFIFO_W-1:0] ext_wdata, f_rdata;
  logic [AW:0] fill_r;
  always #5 wclk = ~wclk;
  always #3.3 rclk = ~rclk;

  mem_ctrl #(.DEPTH(DEPTH), .CH(1'b1)) dut (.*);
  onchip_mem #(.DW(QW+2), .DEPTH(DEPTH)) u_mem (
    .wclk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rclk, .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));
  ext_fifo_model #(.W(XFIFO_W)) u_fifo (
    .clk(rclk), .force_full, .wen(ext_wen), .wdata(ext_wdata), .full(ext_full),
    .ren(1'b0), .rdata(f_rdata), .empty(f_empty));

  logic [XFIFO_W-1:0] exp_q [$];
  int sent = 0, got = 0, max_fill = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // scoreboard: what the memory accepts must reach the FIFO unchanged
  always @(posedge wclk) if (wrst_n && mem_we)
    exp_q.push_back({5'd0, 1'b1, q_eof, q_sof, q_data});
  logic ext_full_d = 0;
  always @(posedge rclk) ext_full_d <= ext_full;
  always @(posedge rclk) if (rrst_n && ext_wen) begin
    chk(!ext_full_d, "no write started while the FIFO is full");
    chk(exp_q.size() > 0, "FIFO write without accepted data");
    if (exp_q.size() > 0) chk(ext_wdata == exp_q.pop_front(), $sformatf("word %0d", got));
    got++;
  end
  always @(posedge rclk) if (rrst_n && int'(fill_r) > max_fill) max_fill = int'(fill_r);

  task automatic put(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      q_valid = 1; q_data = {$urandom, $urandom}; q_sof = (sent % 9 == 0); q_eof = (sent % 9 == 8);
      sent++;
      @(negedge wclk); q_valid = 0;
      repeat ($urandom_range(0, gap)) @(negedge wclk);
    end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 wrst_n = 0; rrst_n = 0; #30 wrst_n = 1; rrst_n = 1;
    // 1: FIFO refuses data; the memory fills to DEPTH, the rest overflows
    force_full = 1;
    put(DEPTH + 10, 0);
    repeat (20) @(posedge rclk);
    chk(exp_q.size() == DEPTH, $sformatf("memory holds %0d qwords", exp_q.size()));
    chk(n_ovf == 10, $sformatf("n_ovf %0d", n_ovf));
    chk(int'(fill_r) == DEPTH, $sformatf("fill_r %0d", fill_r));
    chk(got == 0, "nothing written while FIFO is full");
    // 2: release; the memory drains completely
    force_full = 0;
    repeat (4 * DEPTH) @(posedge rclk);
    chk(exp_q.size() == 0 && got == DEPTH, "drained");
    chk(fill_r == 0, "fill_r back to 0");
    // 3: streaming with random backpressure, several pointer wraps
    fork
      put(400, 3);
      repeat (3000) begin @(negedge rclk); force_full = ($urandom_range(0, 3) == 0); end
    join
    force_full = 0;
    repeat (4 * DEPTH) @(posedge rclk);
    chk(exp_q.size() == 0, "all streamed words delivered");
    chk(got + int'(n_ovf) == sent, "accepted + dropped == sent");
    chk(max_fill <= DEPTH, "fill never above depth");
    $display("sent %0d got %0d ovf %0d", sent, got, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
