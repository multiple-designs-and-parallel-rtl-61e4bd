// tb_decom - checks the qwords of a frame: time code / status qword with the
// sof tag, the two sync qwords, data packed MSB first, the zero-padded last
// qword with the eof tag, a frame abandoned by an early frame_start, the
// qword clock, and bit strobes with gaps or on every cycle.
`timescale 1ns/1ps
module tb_decom;
  import dsa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bit_en = 0, bit_in = 0, frame_start = 0;
  logic [127:0] sync_word = '0;
  logic [31:0] frame_bits;
  logic [47:0] tc = '0;
  logic [15:0] status = '0, n_frames;
  logic q_valid, q_sof, q_eof, word_clk;
  logic [63:0] q_data;
  always #5 clk = ~clk;

  decom dut (.clk, .rst_n, .bit_en, .bit_in, .frame_start, .sync_word, .frame_bits,
             .tc, .status, .q_valid, .q_data, .q_sof, .q_eof, .word_clk, .n_frames);

  typedef struct { logic [63:0] d; bit sof, eof; } qw_t;
  qw_t got [$];
  int  wclk_bad = 0;

  always @(posedge clk) if (rst_n && q_valid) got.push_back('{q_data, q_sof, q_eof});

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one frame of nbits data bits after the sync; gaps on bit_en if gap
  task automatic frame(input int nbits, input bit gap, input bit complete);
    logic [63:0] exp [$];
    logic [63:0] cur;
    logic [127:0] sw;
    logic [47:0]  t;
    logic [15:0]  st;
    int n;
    sw = {$urandom, $urandom, $urandom, $urandom};
    t  = {$urandom, $urandom};
    st = 16'($urandom);
    got.delete();
    @(negedge clk);
    frame_start = 1; sync_word = sw; tc = t; status = st;
    bit_en = 0;
    exp.push_back({st, t}); exp.push_back(sw[127:64]); exp.push_back(sw[63:0]);
    cur = '0; n = 0;
    for (int i = 0; i < nbits; i++) begin
      bit b;
      if (i > 0 || gap) begin
        @(negedge clk);
        frame_start = 0;
        while (gap && $urandom % 3 == 0) begin bit_en = 0; @(negedge clk); end
      end
      b = 1'($urandom);
      bit_en = 1; bit_in = b;
      #1 if (i > 0 && word_clk != (n < 32)) wclk_bad++;
      cur[63 - n] = b; n++;
      if (n == 64 || i == nbits - 1) begin exp.push_back(cur); cur = '0; n = 0; end
      if (!complete && i == nbits / 2) break;
    end
    @(negedge clk); bit_en = 0; frame_start = 0;
    repeat (4) @(negedge clk);
    if (complete) begin
      chk(got.size() == exp.size(), $sformatf("%0d qwords, expected %0d", got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size()) begin
        chk(got[i].d == exp[i], $sformatf("qword %0d: %h expected %h", i, got[i].d, exp[i]));
        chk(got[i].sof == (i == 0) && got[i].eof == (i == exp.size() - 1), $sformatf("tags of qword %0d", i));
      end
    end else begin
      chk(got.size() >= 3 && got[0].sof, "abandoned frame still has its header");
      foreach (got[i]) chk(!got[i].eof, "abandoned frame has no eof");
    end
  endtask

  initial begin
    frame_bits = 128 + 3 * 64 + 20;
    #1 rst_n = 0; #20 rst_n = 1;
    frame(3 * 64 + 20, 1, 1);
    frame(3 * 64 + 20, 0, 1);
    frame(3 * 64 + 20, 1, 0);      // cut short by the next frame_start
    frame(3 * 64 + 20, 0, 1);
    frame_bits = 128 + 5 * 64;
    frame(5 * 64, 1, 1);
    chk(n_frames == 16'd5, "frame count");
    chk(wclk_bad == 0, "qword clock high in the first half of each qword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
