// pn7_gen - 7-bit shift-register pseudo-random sequence generator.
//
// The register holds the next seven sequence bits, the next one to send in
// bit 6. Every `step` shifts it left and appends s[n+7] = s[n+1] ^ s[n],
// which is the recurrence s[n] = s[n-6] ^ s[n-7] (polynomial x^7 + x^6 + 1,
// period 127). `load` restarts it from SEED and takes priority over `step`.
// `bit_o` is the current bit, valid in the same cycle; it is used both for
// the frame sync code (seed 0000110, which reproduces the sync code of the
// recorded frame) and, with another seed, as the data randomiser.
// The 7-bit shift register follows the document; the polynomial and seed are
// read from the sync code bytes of the recorded frame; the randomiser reuse
// is this design's choice.
module pn7_gen #(
  parameter logic [6:0] SEED = dsa_pkg::PN7_SEED
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  output logic bit_o
);
  logic [6:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= SEED;
    else if (load) sr <= SEED;
    else if (step) sr <= {sr[5:0], sr[6] ^ sr[5]};
  end

  assign bit_o = sr[6];
endmodule
