# Satellite data simulator and data acquisition front end on one FPGA

A remote-sensing satellite sends its image data to the ground as a continuous
serial bit stream, cut into fixed-length frames (also called lines). Each
frame begins with a known 128-bit frame sync code. An auxiliary field follows
with housekeeping data, such as a channel identifier and a line counter. Then
comes the image (video) field. A ground station has to find the frames in the
stream and cut the data into computer words. It also stamps each frame with
GPS time and moves the result into a server.

This RTL holds two independent designs that share one FPGA:

* **Data simulator** (`data_simulator`). It creates satellite-like frames
  on two serial channels, so the acquisition side can be tested without a
  satellite. The frame layout is a set of host-written registers, so one
  piece of hardware can stand in for many satellites.
* **Data acquisition** (`data_acquisition`). It takes two serial channels,
  I and Q. For each channel it finds the frames, turns each frame into
  64-bit words ("qwords") with a time-code/status qword in front, and buffers
  them in on-chip memory. It then passes them on to two external FIFO banks
  and, on request, to a PCI core.

The top, `dsa_top`, places both side by side, with no signal between them.
On the board, the simulator's serial outputs are cabled to the acquisition
inputs. The end-to-end testbench does the same.

```
 clk_ref (200 MHz)                                  rx_clk/rx_data (LVDS, per channel)
   |                                                  |
   v                                                  v
 sim_cfg_regs --> chan_clk_gen --> window_gen      frame_sync --> decom --> mem_ctrl <--> onchip_mem
   (host writes)        |            |    |           ^             ^         |
                        v            v    v           |       timecode_sync   v  rd_clk domain
                   data_serializer <- data_gen      (bit clock)     (gps_tc)  ext FIFO bank (off chip)
                        |                                                     |
                        v                                                 fifo_rd_ctrl --> PCI core
                 sim_clk / sim_data (per channel)
```

## The frame

A frame is `line_last + 1` words of `pix_w` bits (1 to 16), sent MSB first.
It is made of the following fields:

| words | field | contents |
|---|---|---|
| `0 .. fs_words-1` | frame sync | the 128-bit sync code (16 words of 8 bits by default) |
| next `aux_words` | auxiliary | channel identifier and line count at programmable bit positions, zeros elsewhere |
| next `video_words` | image | a test pattern |
| up to `line_last` | fill | zeros |

All fields use the same word width, so the auxiliary words are as wide as
the pixels. The receiver always looks for 128 sync bits. The sync field must
therefore be at least 128 bits long (`fs_words * pix_w >= 128`). A longer
field carries on with the same 127-bit sequence.

The default configuration is 16 sync words, 34 auxiliary words and 2350
video words of 8 bits, 2400 words in all. That is 19200 bits per frame, or
192 µs at 100 Mbit/s.

In the auxiliary field, the bit offset counts from the start of the field,
MSB of each byte first:

* The channel identifier starts at bit `8*chid_byt_start + chid_bit_start`
  and is `chid_no_bits` wide.
* The line count starts at byte `lc_start` and is `lc_bit_cnt` bits wide,
  MSB first. Its top 16 bits are XORed with `lc_msb_inv`, because some
  satellites send inverted counter bits.
* Where the two fields overlap, the identifier wins.

Video patterns (`vid_mode`):

* `STAIR`: a level that starts at `vid_step` and rises by `vid_step` every
  `vid_run` pixels. The default is 0x14 every 256 pixels.
* `RAMP`: the pixel index.
* `CONST`: `vid_step` in every pixel.
* `LINE`: the line count.

The pixel value is cut to `pix_w` bits.

When `rand_en` is set, every bit after the sync field is XORed with a
pseudo-random sequence, and the sync code itself is sent in the clear. The
sequence uses the same polynomial as the sync code, is seeded with 1111111
and restarts at each frame. The acquisition side does not undo this: the
frame is stored as received.

### The frame sync code

The sync code is 128 consecutive outputs of a 7-bit linear feedback shift
register. The register follows `s[n] = s[n-6] XOR s[n-7]` (x^7 + x^6 + 1,
period 127) and starts from 0000110. As bytes, in transmission order:

```
0C 28 F2 2C EA 7D 0E 24 DA DE C6 97 73 2A FE 04
```

`pn7_gen` builds it bit by bit in the simulator. The acquisition side
compares against the constant `FSC_PATTERN` in `dsa_pkg`.

## Data simulator

Everything runs on the 200 MHz reference clock `clk_ref`.

* `chan_clk_gen` divides the reference into each channel's serial clock.
  A bit lasts `2*clk_div` reference cycles, so the clock is 100 Mbit/s at
  `clk_div = 1`. It also gives a one-cycle `bit_en` strobe, at which all
  simulator state advances. Data changes on the falling edge of `sim_clk`,
  so the receiver can sample on the rising edge.
* `window_gen` counts bits within a word, words within a frame, and frames.
  From those counts it decodes the windows: frame sync, auxiliary and video.
  It also produces a word clock (high in the first half of each word) and
  the end-of-line indicator (the last word of the frame).
* `data_gen` builds each auxiliary or video word from the configuration and
  the counters.
* `data_serializer` selects one bit each cycle: the sync code bit inside
  the sync window, or the current word's bit otherwise, with randomisation
  if enabled. It registers that bit together with the window flags, so all
  outputs change on the same edge.

### Configuration registers

The registers are written with `cfg_we`, `cfg_addr = {channel, reg}` and
`cfg_wdata` on `clk_ref`. Writes land in shadow registers, and
`cfg_rdata` reads them back. Writing 1 to register 15 copies that
channel's shadow set into the active set. The channel's clock and counters
restart, and a new frame begins at once.

| reg | bits | field |
|---|---|---|
| 0 | 4:0 | `pix_w` |
| 1 | 15:0 | `fs_words` |
| 2 | 15:0 | `aux_words` |
| 3 | 15:0 | `video_words` |
| 4 | 15:0 | `line_last` (total words - 1) |
| 5 | 2:1, 0 | `vid_mode`, `rand_en` |
| 6 | 31:0 | `chid_val` |
| 7 | 21:16, 10:8, 7:0 | `chid_no_bits`, `chid_bit_start`, `chid_byt_start` |
| 8 | 31:16, 12:8, 7:0 | `lc_msb_inv`, `lc_bit_cnt`, `lc_start` |
| 9 | 31:16, 7:0 | `vid_run`, `vid_step` |
| 10 | 7:0 | `clk_div` |
| 15 | 0 | load |

The reset values are the default satellite above (`SIM_CFG_DEFAULT` in
`dsa_pkg`).

## Data acquisition

Each channel has its own clock domain, clocked by the received bit clock
`rx_clk[c]`, with one data bit per rising edge. The FIFO and PCI side runs on
`rd_clk`. Each domain has its own reset synchroniser (`rst_sync`).

### Frame synchronisation (`frame_sync`)

A 128-bit shift register holds the last 128 received bits. Each bit, it is
compared with the sync code, and a match is accepted with up to `max_err`
differing bits. The synchroniser has three states:

* **SEARCH**: any match is taken as a frame start, and the state moves to
  CHECK.
* **CHECK**: the synchroniser looks only where the next sync code should be,
  `frame_bits` after the last one. After `check_n` hits in a row it moves to
  LOCK. A miss sends it back to SEARCH.
* **LOCK**: a miss at the expected position is bridged. The frame is still
  taken, counted in `n_flywheel`. After `fly_n` misses in a row, lock is lost
  (`n_lost`) and the state returns to SEARCH.

Each frame start gives `decom` the 128 received sync bits and their error
count. The defaults are in `ACQ_CFG_DEFAULT`: 19200-bit frames, up to 3 bit
errors, 2 checks and 3 flywheel frames. `acq_cfg` is static and should be
changed only while the channel is idle.

### Decommutation and the stored frame (`decom`, `timecode_sync`)

For every frame, `decom` emits qwords into the channel's memory, in order:

1. **Time code/status qword.** `{status[15:0], time_code[47:0]}`, tagged
   `sof`. The status fields are:
   * `[15:14]` synchroniser state;
   * `[13]` time code changed since the previous frame;
   * `[12]` channel;
   * `[7:0]` sync bit errors.
2. **Sync code.** The received sync code as two qwords, errors included.
3. **Data.** The rest of the frame, packed MSB first. The last qword is
   left-aligned and zero-padded, and tagged `eof`.

Apart from the first qword and the padding at the end, the stored stream is
exactly the received bit stream. Dropping the first qword of each frame gives back the raw data for
playback. The 19200-bit default frame becomes 1 + 2 + 298 = 301 qwords.
`word_clk` is the 64-bit word clock: high for the first 32 bits of each
qword.

The GPS time code arrives as 48 parallel BCD bits (12 digits) on its own
timing. `timecode_sync` passes it through two flip-flops and takes a value
only once it has been unchanged for 4 bit clocks. This way, a time code
sampled during a change is never stored.

### On-chip memory and external FIFO (`mem_ctrl`, `onchip_mem`, `fifo_rd_ctrl`)

Each channel has a 4480-word memory of 66 bits: a qword plus `sof` and `eof`.
It is written on the bit clock and read on `rd_clk`, which makes it a
dual-clock FIFO.

* **Pointers.** Read and write pointers carry a wrap bit. 4480 is not a
  power of two, so the pointers cannot simply be Gray-coded. Instead, each pointer
  is copied into the other domain with a toggle handshake (`ptr_sync`). The
  copy lags, which makes `full` and `empty` show early but never late.
* **Overflow.** When the memory is full, new qwords are dropped and counted
  in `n_ovf`.
* **Drain.** While the memory holds data and the bank is not full, one qword
  every two `rd_clk` cycles is written into the channel's external FIFO bank.
  The FIFO word is 72 bits: `{tag, qword}`, where the tag is
  `{5'b0, ch, eof, sof}`. `ext_full` must be the bank's almost-full flag,
  with room for one more word, because a read already started still ends in
  a write.
* **Read-out.** `fifo_rd_ctrl` reads the bank selected by `pci_bank` while
  `pci_rd_req` is high, one word per cycle. The word appears on `pci_data`
  with `pci_valid` one cycle later. `pci_bank` may change at any cycle: each
  returned word is taken from the bank it was read from.

The host recognises frame boundaries from the tags.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NCH` | 2 | serial channels (I and Q), in both the simulator and the acquisition logic |
| `DEPTH` | 4480 | qwords of on-chip memory per channel; 2 x 4480 x 64 = 573440 data bits |
| `DIV_W` | 8 | width of the serial clock divider |
| `STABLE_N` | 4 | bit clocks a time code must stay unchanged |
| `FSC_BITS`, `QW`, `TC_W` | 128, 64, 48 | sync code, qword and time code widths (`dsa_pkg`) |

## Where this design departs from the original system, and why

* **Serial rate.** The original card handles up to 200 Mbit/s per channel.
  This simulator produces at most 100 Mbit/s from a 200 MHz clock, because it
  uses one clock edge per half bit. The acquisition side has no rate limit of
  its own: it runs on the received bit clock. `tb/tb_acq_200mbps.sv` runs
  it at 200 Mbit/s per channel with a 15 MHz host clock. The memory is then
  written at 3.1 M qwords/s and drained at up to 7.5 M qwords/s, so it never
  fills. Gate-level timing at 200 MHz has not been checked.
* **Synchroniser rules, time code layout and memory split.** The original
  describes the synchroniser, the time code qword and the memory only by
  what they do. These are this design's choices:
  * the search/check/lock rules;
  * the status bits;
  * the 48-bit time code;
  * the split of the memory into one half per channel;
  * the tag byte;
  * the pointer handshake.
* **Randomiser and patterns.** The randomiser sequence and the video
  patterns other than the staircase are this design's choice.
* **Not included.** The oscillator, the LVDS input buffers, the external
  FIFO chips and the PCI core are not part of this RTL. Their signals are
  ports of `dsa_top` (`clk_ref`, `rx_*`, `ext_*`, `pci_*`).
  `tb/ext_fifo_model.sv` is a behavioural FIFO bank for simulation only.

## Files

* `rtl/dsa_pkg.sv`: shared constants, configuration structs and their
  defaults.
* One module per file:
  * simulator: `chan_clk_gen`, `sim_cfg_regs`, `window_gen`, `data_gen`,
    `pn7_gen`, `data_serializer`, `data_simulator`;
  * acquisition: `frame_sync`, `decom`, `timecode_sync`, `onchip_mem`,
    `mem_ctrl`, `ptr_sync`, `rst_sync`, `fifo_rd_ctrl`, `data_acquisition`;
  * top: `dsa_top`.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each
  prints `TB_RESULT checks=N failures=M`.
* `tb/tb_frame_pkg.sv`: an independent model of the frame, used by the
  testbenches to predict every bit.
* `tb/tb_acq_200mbps.sv`: the acquisition logic alone at 200 Mbit/s per
  channel, with default frames.
* `tb/tb_dsa_top.sv`: the end-to-end test at the default sizes. The
  simulator is cabled to the acquisition inputs, and the testbench plays the
  PCI core. Every frame delivered is compared with the model. Along the way
  the test:
  * locks both channels;
  * tolerates sync codes with 2 bit errors and flywheels over 8;
  * loses and regains lock;
  * reloads channel 0 with a different satellite mid-frame;
  * updates the time code;
  * holds a FIFO bank full until the memory overflows.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dsa_pkg.sv tb/tb_frame_pkg.sv tb/tb_dsa_top.sv --top-module tb_dsa_top
./obj_dir/Vtb_dsa_top
```

Use the same command for any other testbench; the packages must come first.
The end-to-end test simulates about 6 ms and finishes in seconds.

To use another satellite in simulation, write its registers and then register
15. Set `acq_cfg[c].frame_bits` to `(line_last + 1) * pix_w`.
