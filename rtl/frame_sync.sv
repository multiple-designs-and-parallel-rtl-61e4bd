// frame_sync - frame synchroniser (correlator) for one serial channel.
//
// Runs in the channel's bit clock domain; bit_en qualifies each received
// bit (tie it high when clk is the serial clock itself). The last 128 bits
// received are compared with FSC_PATTERN and the mismatches counted; a
// window with at most cfg.max_err of them matches. Synchronisation states:
//   FS_SEARCH  any match starts a frame and moves to FS_CHECK;
//   FS_CHECK   the sync code must match again exactly cfg.frame_bits bits
//              later; cfg.check_n matches in a row give FS_LOCK, a miss
//              returns to FS_SEARCH;
//   FS_LOCK    matches are looked for only at the expected position; a miss
//              there still starts a frame (flywheel) unless it is the
//              cfg.fly_n-th miss in a row, which returns to FS_SEARCH.
// frame_start pulses, with the bit_en of the last sync bit, for every frame
// accepted; sync_word then holds the 128 received sync bits and sync_err
// their mismatch count. The counters report syncs found, flywheel frames and
// losses of lock. The correlation over the 128-bit code follows the
// document; the states and thresholds are this design's choice, as the
// document only says the incoming data is correlated to detect valid frames.
module frame_sync
  import dsa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_en,
  input  logic                bit_in,
  input  acq_cfg_t            cfg,
  output logic                frame_start,
  output logic [FSC_BITS-1:0] sync_word,
  output logic [7:0]          sync_err,
  output fs_state_e           state,
  output logic [15:0]         n_found,
  output logic [15:0]         n_flywheel,
  output logic [15:0]         n_lost
);
  logic [FSC_BITS-1:0] sr, cand;
  logic [7:0]          err;
  logic [31:0]         cnt;        // bits since the last accepted sync end
  logic [3:0]          hits, miss;
  logic                match, expected;

  assign cand = {sr[FSC_BITS-2:0], bit_in};

  always_comb begin
    err = '0;
    for (int i = 0; i < FSC_BITS; i++) err = err + 8'(cand[i] ^ FSC_PATTERN[i]);
  end

  assign match    = (err <= 8'(cfg.max_err));
  assign expected = (cnt + 1 >= cfg.frame_bits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      hits        <= '0;
      miss        <= '0;
      state       <= FS_SEARCH;
      frame_start <= 1'b0;
      sync_word   <= '0;
      sync_err    <= '0;
      n_found     <= '0;
      n_flywheel  <= '0;
      n_lost      <= '0;
    end else begin
      frame_start <= 1'b0;
      if (bit_en) begin
        sr  <= cand;
        cnt <= cnt + 1;
        unique case (state)
          FS_SEARCH: if (match) begin
            state       <= FS_CHECK;
            hits        <= 4'd1;
            miss        <= '0;
            cnt         <= '0;
            frame_start <= 1'b1;
            n_found     <= n_found + 1'b1;
          end
          FS_CHECK: if (expected) begin
            if (match) begin
              cnt         <= '0;
              frame_start <= 1'b1;
              n_found     <= n_found + 1'b1;
              hits        <= hits + 1'b1;
              if (hits + 1'b1 >= cfg.check_n) state <= FS_LOCK;
            end else begin
              state <= FS_SEARCH;
            end
          end
          FS_LOCK: if (expected) begin
            cnt <= '0;
            if (match) begin
              miss        <= '0;
              frame_start <= 1'b1;
              n_found     <= n_found + 1'b1;
            end else if (miss + 1'b1 >= cfg.fly_n) begin
              state  <= FS_SEARCH;
              miss   <= '0;
              n_lost <= n_lost + 1'b1;
            end else begin
              miss        <= miss + 1'b1;
              frame_start <= 1'b1;
              n_flywheel  <= n_flywheel + 1'b1;
            end
          end
          default: state <= FS_SEARCH;
        endcase
        if ((state == FS_SEARCH && match) || (state != FS_SEARCH && expected)) begin
          sync_word <= cand;
          sync_err  <= err;
        end
      end
    end
  end
endmodule
