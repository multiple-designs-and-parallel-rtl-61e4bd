// tb_pn7_gen - checks the 7-bit sync code generator against the 128-bit
// sync code of the recorded frame, its period of 127, restart on load, hold
// without step, and the randomiser seed against the reference sequence.
`timescale 1ns/1ps
module tb_pn7_gen;
  import dsa_pkg::*;
  import tb_frame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic load = 0, step = 0, b_fsc, b_rnd;
  bit   seq [127];
  always #5 clk = ~clk;

  pn7_gen #(.SEED(PN7_SEED)) u_fsc (.clk, .rst_n, .load, .step, .bit_o(b_fsc));
  pn7_gen #(.SEED(7'h7F))    u_rnd (.clk, .rst_n, .load, .step, .bit_o(b_rnd));

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #10000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] got;
    bit first [7];
    #1 rst_n = 0; #10 rst_n = 1;
    pn_seq(7'h7F, seq);
    @(negedge clk);
    step = 1;
    for (int i = 0; i < 254; i++) begin
      if (i < 128) got[127 - i] = b_fsc;
      if (i < 7) first[i] = b_fsc;
      if (i >= 127) chk(b_fsc == ((i - 127 < 128) ? got[127 - (i - 127)] : 1'b0), "period 127");
      chk(b_rnd == seq[i % 127], $sformatf("randomiser bit %0d", i));
      @(negedge clk);
    end
    chk(got == FSC_PATTERN, $sformatf("sync code %h", got));
    // hold without step
    step = 0;
    begin
      bit h;
      h = b_fsc;
      repeat (5) begin @(negedge clk); chk(b_fsc == h, "hold"); end
    end
    // load restarts
    load = 1; step = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 7; i++) begin
      chk(b_fsc == first[i], "restart after load");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
