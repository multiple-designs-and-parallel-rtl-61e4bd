// mem_ctrl - control logic of one channel's on-chip memory and FIFO bank.
//
// Write side (wclk, the channel's bit clock): every qword from decom is
// written into onchip_mem at the write pointer with its sof/eof tag. When
// the memory is full the qword is dropped and counted in n_ovf (overflow).
// Read side (rclk, the host-side clock): while the memory holds data and the
// external FIFO is not full, one qword is read and, a cycle later, written
// into the external FIFO as {tag byte, data} (72 bits); a new read starts
// only when no write is pending, so at most one qword moves every two rclk
// cycles, and ext_full stops the drain (backpressure). Because a read
// already started still completes, ext_full should be the FIFO's almost-full
// flag, set with room for at least one more word. Pointers carry a wrap
// bit above the address, are exchanged through ptr_sync and compared for
// full and empty; the synchronised copies lag, which only makes full and
// empty appear early. The memory and FIFO control follow the document's
// block diagram; pointer handling and the tag layout are this design's
// choice.
module mem_ctrl
  import dsa_pkg::*;
#(
  parameter int unsigned DEPTH = 4480,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter logic        CH    = 1'b0
) (
  // write side
  input  logic               wclk,
  input  logic               wrst_n,
  input  logic               q_valid,
  input  logic [QW-1:0]      q_data,
  input  logic               q_sof,
  input  logic               q_eof,
  output logic               mem_we,
  output logic [AW-1:0]      mem_waddr,
  output logic [QW+1:0]      mem_wdata,
  output logic [15:0]        n_ovf,
  // read side
  input  logic               rclk,
  input  logic               rrst_n,
  output logic               mem_re,
  output logic [AW-1:0]      mem_raddr,
  input  logic [QW+1:0]      mem_rdata,
  input  logic               ext_full,
  output logic               ext_wen,
  output logic [XFIFO_W-1:0] ext_wdata,
  output logic [AW:0]        fill_r
);
  logic [AW:0] wptr, rptr, rptr_w, wptr_r;
  logic        full, empty, inflight;
  qw_tag_t     tag;

  function automatic logic [AW:0] ptr_inc(logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH - 1)) return {~p[AW], {AW{1'b0}}};
    return p + 1'b1;
  endfunction

  // write side
  assign full      = (wptr[AW-1:0] == rptr_w[AW-1:0]) && (wptr[AW] != rptr_w[AW]);
  assign mem_we    = q_valid && !full;
  assign mem_waddr = wptr[AW-1:0];
  assign mem_wdata = {q_eof, q_sof, q_data};

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr  <= '0;
      n_ovf <= '0;
    end else if (q_valid) begin
      if (!full) wptr  <= ptr_inc(wptr);
      else       n_ovf <= n_ovf + 1'b1;
    end
  end

  ptr_sync #(.W(AW+1)) u_w2r (
    .src_clk(wclk), .src_rst_n(wrst_n), .src_val(wptr),
    .dst_clk(rclk), .dst_rst_n(rrst_n), .dst_val(wptr_r)
  );
  ptr_sync #(.W(AW+1)) u_r2w (
    .src_clk(rclk), .src_rst_n(rrst_n), .src_val(rptr),
    .dst_clk(wclk), .dst_rst_n(wrst_n), .dst_val(rptr_w)
  );

  // read side
  assign empty     = (wptr_r == rptr);
  assign mem_re    = !empty && !ext_full && !inflight;
  assign mem_raddr = rptr[AW-1:0];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr     <= '0;
      inflight <= 1'b0;
    end else begin
      inflight <= mem_re;
      if (mem_re) rptr <= ptr_inc(rptr);
    end
  end

  assign tag       = '{rsvd: '0, ch: CH, eof: mem_rdata[QW+1], sof: mem_rdata[QW]};
  assign ext_wen   = inflight;
  assign ext_wdata = {tag, mem_rdata[QW-1:0]};

  always_comb begin
    if (wptr_r[AW] == rptr[AW]) fill_r = {1'b0, wptr_r[AW-1:0]} - {1'b0, rptr[AW-1:0]};
    else fill_r = (AW+1)'(DEPTH) - {1'b0, rptr[AW-1:0]} + {1'b0, wptr_r[AW-1:0]};
  end
endmodule
