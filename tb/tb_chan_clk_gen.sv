// tb_chan_clk_gen - checks the bit period (2*div reference cycles), that
// ser_clk falls on the edge after each bit_en and rises half a bit later,
// div = 0 behaving as 1, and restart.
`timescale 1ns/1ps
module tb_chan_clk_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [7:0] div [2];
  logic [1:0] restart = '0, ser_clk, bit_en;
  always #2.5 clk = ~clk;

  chan_clk_gen #(.NCH(2), .DIV_W(8)) dut (.clk, .rst_n, .div, .restart, .ser_clk, .bit_en);

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #100us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // measure per channel
  int last_en [2] = '{-1, -1}, cyc = 0, periods [2];
  logic [1:0] en_q = '0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int c = 0; c < 2; c++) begin
      if (en_q[c]) chk(ser_clk[c] == 1'b0, "ser_clk low after bit_en");
      if (bit_en[c]) begin
        chk(ser_clk[c] == 1'b1, "bit_en while ser_clk high");
        if (last_en[c] >= 0 && !restart[c]) begin
          int exp;
          exp = 2 * ((div[c] == 0) ? 1 : div[c]);
          chk(cyc - last_en[c] == exp, $sformatf("ch%0d period %0d, expected %0d", c, cyc - last_en[c], exp));
          periods[c]++;
        end
        last_en[c] = cyc;
      end
    end
    en_q <= rst_n ? bit_en : 2'b00;
  end

  initial begin
    div[0] = 8'd1; div[1] = 8'd3;
    #1 rst_n = 0; #20 rst_n = 1;
    repeat (200) @(posedge clk);
    // new rates with a restart
    @(negedge clk); div[0] = 8'd0; div[1] = 8'd5; restart = 2'b11;
    last_en = '{-1, -1};
    @(negedge clk); restart = 2'b00;
    repeat (300) @(posedge clk);
    chk(periods[0] > 150 && periods[1] > 40, "enough periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
