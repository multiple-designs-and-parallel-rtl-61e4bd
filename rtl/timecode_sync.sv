// timecode_sync - capture of the parallel BCD time code from the GPS unit.
//
// The time code arrives as TC_W parallel bits that change asynchronously
// to clk. Every bit passes a two-flop synchroniser; a value is accepted
// into tc_q only after it has been seen unchanged for STABLE_N consecutive
// cycles, so a word caught while its bits are changing is never used.
// tc_new pulses for one cycle when tc_q takes a different value. Reading
// and synchronising the time code follow the document; the stability
// filter is this design's choice.
module timecode_sync #(
  parameter int unsigned TC_W     = dsa_pkg::TC_W,
  parameter int unsigned STABLE_N = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TC_W-1:0] tc_in,
  output logic [TC_W-1:0] tc_q,
  output logic            tc_new
);
  localparam int unsigned CW = $clog2(STABLE_N + 1);

  logic [TC_W-1:0] s1, s2, s3;
  logic [CW-1:0]   same;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= '0;
      s2     <= '0;
      s3     <= '0;
      same   <= '0;
      tc_q   <= '0;
      tc_new <= 1'b0;
    end else begin
      s1     <= tc_in;
      s2     <= s1;
      s3     <= s2;
      tc_new <= 1'b0;
      if (s2 != s3) begin
        same <= '0;
      end else if (same < CW'(STABLE_N - 1)) begin
        same <= same + 1'b1;
      end else if (tc_q != s3) begin
        tc_q   <= s3;
        tc_new <= 1'b1;
      end
    end
  end
endmodule
