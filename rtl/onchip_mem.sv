// onchip_mem - dual-clock simple dual-port frame memory.
//
// DEPTH words of DW bits: written on wclk (one word per cycle when we),
// read on rclk with one cycle of latency (rdata holds the word addressed in
// the previous cycle in which re was high). Written as an array, so a
// synthesis tool maps it to block RAM. The default, two of these of
// 4480 x 66 bits (64 data bits plus two frame tag bits), follows the
// document's 64-bit wide on-chip memory of about 573 kbit; the split per
// channel and the tag bits are this design's choice.
module onchip_mem #(
  parameter int unsigned DW    = 66,
  parameter int unsigned DEPTH = 4480,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
