// tb_frame_sync - drives frames of 320 bits with a planned number of sync
// code errors per frame, bit strobes with random gaps, and checks every
// frame_start (exact cycle), the sync word and error count it reports, the
// state after each frame and the found / flywheel / lost counters:
// search and check to lock, tolerated errors, flywheel, loss of lock after
// three misses and re-acquisition. Frame 3 carries exactly max_err errors.
`timescale 1ns/1ps
module tb_frame_sync;
  import dsa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bit_en = 0, bit_in = 0;
  acq_cfg_t cfg;
  logic frame_start;
  logic [127:0] sync_word;
  logic [7:0] sync_err;
  fs_state_e state;
  logic [15:0] n_found, n_flywheel, n_lost;
  always #5 clk = ~clk;

  frame_sync dut (.clk, .rst_n, .bit_en, .bit_in, .cfg, .frame_start, .sync_word,
                  .sync_err, .state, .n_found, .n_flywheel, .n_lost);

  localparam int FB = 320;
  localparam int NF = 14;
  int errs [NF] = '{0, 0, 0, 3, 0, 8, 0, 8, 8, 8, 0, 0, 4, 0};
  bit start_exp [NF] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 1, 1, 1, 1};
  fs_state_e st_exp [NF] = '{FS_CHECK, FS_LOCK, FS_LOCK, FS_LOCK, FS_LOCK, FS_LOCK, FS_LOCK,
                             FS_LOCK, FS_LOCK, FS_SEARCH, FS_CHECK, FS_LOCK, FS_LOCK, FS_LOCK};

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit           pend = 0;
  logic [127:0] pend_word;
  int           pend_err, starts = 0;

  // every cycle: frame_start exactly when expected
  always @(posedge clk) if (rst_n) begin
    #1;
    chk(frame_start == pend, $sformatf("frame_start %0d expected %0d", frame_start, pend));
    if (pend && frame_start) begin
      chk(sync_word == pend_word && sync_err == 8'(pend_err), "sync word and error count");
      starts++;
    end
    pend = 0;
  end

  initial begin
    logic [127:0] s;
    cfg = '{frame_bits: 32'(FB), max_err: 7'd3, check_n: 4'd2, fly_n: 4'd3};
    #1 rst_n = 0; #20 rst_n = 1;
    // junk ahead of the first frame
    for (int i = 0; i < 77; i++) begin
      @(negedge clk); bit_en = 1; bit_in = 1'($urandom);
    end
    for (int f = 0; f < NF; f++) begin
      s = FSC_PATTERN;
      for (int e = 0; e < errs[f]; e++) s[10 + 13 * e] = ~s[10 + 13 * e];
      for (int i = 0; i < FB; i++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin bit_en = 0; @(negedge clk); end
        bit_en = 1;
        bit_in = (i < 128) ? s[127 - i] : 1'($urandom);
        if (i == 127) begin
          pend = start_exp[f];
          pend_word = s;
          pend_err = errs[f];
        end
        if (i == 129) chk(state == st_exp[f], $sformatf("state after frame %0d: %0d", f, state));
      end
    end
    @(negedge clk); bit_en = 0;
    repeat (3) @(negedge clk);
    chk(starts == 13, $sformatf("%0d frames started", starts));
    chk(n_found == 16'd9 && n_flywheel == 16'd4 && n_lost == 16'd1,
        $sformatf("counters %0d %0d %0d", n_found, n_flywheel, n_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
