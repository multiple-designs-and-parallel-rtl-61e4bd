// sim_cfg_regs - configuration parameter registers of the data simulator.
//
// The host writes the parameters of the satellite to simulate, channel by
// channel, into shadow registers over a simple synchronous write port
// (cfg_we, cfg_addr, cfg_wdata, one write per cycle). Writing bit 0 of the
// control register (index 15) of a channel is the configuration load
// (config_init): the shadow copy becomes the active configuration cfg[c]
// and init[c] pulses for one cycle, restarting that channel's generators at
// the start of a frame. Reads return the shadow registers (cfg_rdata,
// combinational). After reset both copies hold SIM_CFG_DEFAULT.
//
// Register map, address = {channel, index[3:0]}:
//   0 pix_w        1 fs_words     2 aux_words    3 video_words
//   4 line_last    5 {vid_mode[2:1], rand_en[0]} 6 chid_val
//   7 {chid_no_bits[21:16], chid_bit_start[10:8], chid_byt_start[7:0]}
//   8 {lc_msb_inv[31:16], lc_bit_cnt[12:8], lc_start[7:0]}
//   9 {vid_run[31:16], vid_step[7:0]}   10 clk_div   15 control (bit 0 load)
// The parameter set follows the document; the map and the load strobe are
// this design's choice.
module sim_cfg_regs
  import dsa_pkg::*;
#(
  parameter int unsigned NCH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [$clog2(NCH)+3:0] cfg_addr,
  input  logic [31:0]            cfg_wdata,
  output logic [31:0]            cfg_rdata,
  output sim_cfg_t               cfg  [NCH],
  output logic [NCH-1:0]         init
);
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1;

  sim_cfg_t shadow [NCH];
  logic [CW-1:0] sel_ch;
  logic [3:0]    sel_reg;

  assign sel_reg = cfg_addr[3:0];
  if (NCH > 1) begin : g_sel
    assign sel_ch = cfg_addr[$clog2(NCH)+3:4];
  end else begin : g_sel1
    assign sel_ch = '0;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic hit;
    assign hit = cfg_we && (sel_ch == CW'(c));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        shadow[c] <= SIM_CFG_DEFAULT;
        cfg[c]    <= SIM_CFG_DEFAULT;
        init[c]   <= 1'b0;
      end else begin
        init[c] <= 1'b0;
        if (hit) begin
          unique case (sel_reg)
            4'd0:  shadow[c].pix_w       <= cfg_wdata[4:0];
            4'd1:  shadow[c].fs_words    <= cfg_wdata[15:0];
            4'd2:  shadow[c].aux_words   <= cfg_wdata[15:0];
            4'd3:  shadow[c].video_words <= cfg_wdata[15:0];
            4'd4:  shadow[c].line_last   <= cfg_wdata[15:0];
            4'd5: begin
              shadow[c].rand_en  <= cfg_wdata[0];
              shadow[c].vid_mode <= vid_mode_e'(cfg_wdata[2:1]);
            end
            4'd6:  shadow[c].chid_val    <= cfg_wdata;
            4'd7: begin
              shadow[c].chid_byt_start <= cfg_wdata[7:0];
              shadow[c].chid_bit_start <= cfg_wdata[10:8];
              shadow[c].chid_no_bits   <= cfg_wdata[21:16];
            end
            4'd8: begin
              shadow[c].lc_start   <= cfg_wdata[7:0];
              shadow[c].lc_bit_cnt <= cfg_wdata[12:8];
              shadow[c].lc_msb_inv <= cfg_wdata[31:16];
            end
            4'd9: begin
              shadow[c].vid_step <= cfg_wdata[7:0];
              shadow[c].vid_run  <= cfg_wdata[31:16];
            end
            4'd10: shadow[c].clk_div <= cfg_wdata[7:0];
            4'd15: if (cfg_wdata[0]) begin
              cfg[c]  <= shadow[c];
              init[c] <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    sim_cfg_t s;
    s = shadow[0];
    for (int c = 0; c < NCH; c++)
      if (sel_ch == CW'(c)) s = shadow[c];
    cfg_rdata = '0;
    unique case (sel_reg)
      4'd0:  cfg_rdata[4:0]  = s.pix_w;
      4'd1:  cfg_rdata[15:0] = s.fs_words;
      4'd2:  cfg_rdata[15:0] = s.aux_words;
      4'd3:  cfg_rdata[15:0] = s.video_words;
      4'd4:  cfg_rdata[15:0] = s.line_last;
      4'd5:  cfg_rdata[2:0]  = {s.vid_mode, s.rand_en};
      4'd6:  cfg_rdata       = s.chid_val;
      4'd7:  cfg_rdata       = {10'd0, s.chid_no_bits, 5'd0, s.chid_bit_start, s.chid_byt_start};
      4'd8:  cfg_rdata       = {s.lc_msb_inv, 3'd0, s.lc_bit_cnt, s.lc_start};
      4'd9:  cfg_rdata       = {s.vid_run, 8'd0, s.vid_step};
      4'd10: cfg_rdata[7:0]  = s.clk_div;
      default: cfg_rdata = '0;
    endcase
  end
endmodule
