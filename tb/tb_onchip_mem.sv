// tb_onchip_mem - writes the full default depth on one clock and reads it
// back on an unrelated clock, checking the one-cycle read latency, that a
// read without re holds rdata, and overwrites.
`timescale 1ns/1ps
module tb_onchip_mem;
  int checks = 0, failures = 0;
  localparam int DEPTH = 4480, AW = $clog2(DEPTH), DW = 66;
  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  always #4 wclk = ~wclk;
  always #7 rclk = ~rclk;

  onchip_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.wclk, .we, .waddr, .wdata, .rclk, .re, .raddr, .rdata);

  function automatic logic [DW-1:0] pat(int a, int k);
    return {2'(a ^ k), 32'(a * 2654435761 + k), 32'(~a + k * 7)};
  endfunction

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #10ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fill(input int k, input int step);
    for (int a = 0; a < DEPTH; a += step) begin
      @(negedge wclk); we = 1; waddr = AW'(a); wdata = pat(a, k);
    end
    @(negedge wclk); we = 0;
  endtask

  task automatic check_all(input int k, input int k2, input int step2);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge rclk); re = 1; raddr = AW'(a);
      @(negedge rclk); re = 0;
      chk(rdata == ((a % step2 == 0) ? pat(a, k2) : pat(a, k)), $sformatf("address %0d", a));
      raddr = AW'(a + 1);
      @(negedge rclk);
      chk(rdata == ((a % step2 == 0) ? pat(a, k2) : pat(a, k)), "rdata held without re");
    end
  endtask

  initial begin
    fill(1, 1);
    check_all(1, 1, 1);
    fill(2, 3);
    check_all(1, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
