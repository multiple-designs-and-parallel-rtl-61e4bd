// tb_timecode_sync - changes the asynchronous time code input, sometimes
// with short glitches, and checks that only values held steady for the
// filter time are taken, within the synchroniser latency, with one tc_new
// pulse per accepted change.
`timescale 1ns/1ps
module tb_timecode_sync;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tc_new;
  logic [47:0] tc_in = '0, tc_q;
  int news = 0;
  always #5 clk = ~clk;

  timecode_sync #(.TC_W(48), .STABLE_N(4)) dut (.clk, .rst_n, .tc_in, .tc_q, .tc_new);

  always @(posedge clk) if (rst_n && tc_new) news++;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] v, old;
    #1 rst_n = 0; #20 rst_n = 1;
    repeat (3) @(posedge clk);
    chk(tc_q == '0, "reset value");
    for (int n = 0; n < 20; n++) begin
      old = tc_q;
      v = {$urandom, $urandom};
      // glitch: a value held for 2 cycles only is never taken
      #3 tc_in = ~v;
      repeat (2) @(posedge clk);
      #3 tc_in = v;
      for (int c = 0; c < 12; c++) begin
        @(posedge clk); #1;
        chk(tc_q == old || tc_q == v, "only steady values taken");
        if (c < 5) chk(tc_q == old, "not taken before the filter time");
      end
      chk(tc_q == v, $sformatf("value %0d taken", n));
    end
    chk(news == 20, $sformatf("%0d tc_new pulses", news));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
