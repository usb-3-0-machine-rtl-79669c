# Sub-LVDS image sensor to USB 3.0 (FX3) bridge

This is FPGA logic that sits between a Sony multi-lane sub-LVDS CMOS sensor and a Cypress
EZ-USB FX3 USB 3.0 controller. The default configuration targets the IMX226 in its 4096x2160,
10-bit readout mode; setting `PIX_W = 12` gives the 12-bit modes. The sensor sends each image line as ten parallel serial streams. Every
stream carries its own embedded sync codes and has an unknown bit offset. The FPGA does five things:

- recovers the words of each lane and aligns them;
- puts the columns of a line back into one stream in order;
- corrects the colour with a gray-world white balance computed from the previous frame;
- sends each line to the FX3's 32-bit GPIF II slave port, with a small header the host
  software uses to find frame starts;
- generates the sensor's line and frame sync (XHS/XVS, slave mode) and gives I2C register
  access to it.

The pixels stay in Bayer format: each 10-bit (or 12-bit) pixel sits in one 16-bit half of a
32-bit word. Demosaicing is left to the host.

```
           rx_inclock (DDR bit clock)
 10 lanes ──► 5 x [ lvds_deser ─► lvds_comp ─► lvds_to_buf (dual-clock FIFO) ]
                   2 lanes/pair   sync codes,   line write control,
                                  bit slip      zero separators
                                                        │ mem_rd_clk
                                                        ▼
                                               mem_collect (round robin,
                                               one SAV/EAV per line)
                                                        │ 32 bit
                                                        ▼
                                               adp_fifo (32 in / 64 out)
                                                        │ 64 bit, pclk
                                                        ▼
                                               mem_to_fx3 ─► white_balance
                                                        │
                                               o_fx3_dq[31:0], o_fx3_h, o_fx3_v
 inck ──► sensor_sync_gen ─► XHS, XVS (to sensor, and V for the line buffers)
 ctl_clk ─► i2c_master ─► SCL/SDA (open drain)
```

The top is `usb3_camera_top`. Every block has its own file in `rtl/` and a self-checking
testbench in `tb/`.

## Sensor words, sync codes and alignment

Each sensor lane is a DDR bit stream: one bit per edge of `rx_inclock`, with `PIX_W`-bit words
(10 or 12) sent MSB first. `lvds_deser` shifts both edges into a history register. Every five bit-clock
cycles, it picks `PIX_W` bits from a window whose position is set per lane by a slip counter.
`rx_outclk` is the bit clock divided by five (by six for 12-bit words). A rising edge on `rx_channel_data_align[i]` moves
lane *i*'s window by one bit, modulo `PIX_W`. This stands in for the vendor LVDS receiver and its
bit-slip port.

Each line starts and ends with a four-word code. The first three words are 3FFh, 000h, 000h.
The fourth is `{1, 0, V, H, P3..P0, 0, 0}`. For 12-bit words every code is the 10-bit code
shifted left by two bits (FFFh, 000h, 000h, then 800h, 9D0h, AB0h, B60h):

| code                 | V | H | 10-bit word |
|----------------------|---|---|-------------|
| SAV, active line     | 0 | 0 | 200h        |
| EAV, active line     | 0 | 1 | 274h        |
| SAV, blanking line   | 1 | 0 | 2ACh        |
| EAV, blanking line   | 1 | 1 | 2D8h        |

The protection bits P3..P0 are 0000, 1101, 1011 and 0110 for VH = 00, 01, 10 and 11.
`lvds_comp` checks them (`cam_pkg::code_word4`, `is_code_word4`), so a misaligned lane cannot
mistake pixel data for a code.

`lvds_comp` alignment, per lane:

1. **Bit slip.** If no complete code has been seen for `SLIP_TIMEOUT` words, raise `align` for
   three word clocks, which slips one bit. Then wait another full timeout. The wait must be
   longer than a sensor line, or a lane can slip past its correct position before a code
   arrives.
2. **Sync.** A lane is synchronized (`sync[i]`) when an EAV follows a SAV.
3. **Line window.** `line_start` rises on a SAV seen on lane 0 while it is synchronized, and
   only if lane 1 shows the same code in the same word. It falls after the last word of the
   matching EAV. The data outputs are delayed four words, so the window covers the whole SAV,
   the pixels and the whole EAV.

## Channel FIFOs (`lvds_to_buf`)

Each lane pair writes into its own dual-clock FIFO (`dp_fifo`: Gray-coded pointers, two-stage
synchronizers, registered read data). One 32-bit word is `{6'b0, lane1, 6'b0, lane0}`, so one
pixel from each lane.

The write controller:

1. waits for `sync_all` (every active lane synchronized);
2. waits for V (XVS, synchronized into the word clock) to be low, then high;
3. writes every word while `line_start` is high;
4. writes `SEP_WORDS` (8) zero words;
5. goes back to waiting for the next line, or restarts from the beginning if sync was lost.

A write to a full FIFO is dropped and sets the sticky `overflow` flag.

## Putting the columns back together (`mem_collect`)

This is the least obvious part of the design. The sensor hands out the pixels of one line
column by column across its lanes. So the next pixel pair of the line is always in the next
lane pair's FIFO. The FIFOs fill at slightly different times, because each lane's bit offset,
and so its word boundary, differs. They also contain separator zeros and codes.

On `mem_rd_clk`, `mem_collect` does the following:

- **WAIT.** Waits until every active FIFO (`active` mask) has data.
- **HUNT.** Reads each active FIFO and discards zeros until each one shows the first code word
  (03FF03FFh: both lanes at 3FFh).
- **CODE.** Reads the remaining three code words from every FIFO. The status word of the
  first FIFO gives the line type.
- **WR_CODE.** Writes the SAV once to the adaptive FIFO, as two words: 000003FFh and
  `{6'b0, status, 16'h0}`.
- **DATA.** Reads one word from each active FIFO in turn and writes it on, two clocks per
  word. This stops when the first FIFO delivers an end code (03FF03FFh). The EAV is then
  collected from all FIFOs the same way and written once.
- **SEP.** Writes `SEP_WORDS` (2) zero words, plus one more if the line had an odd number of
  words. This keeps every line aligned to a 64-bit entry of the next FIFO.

The collector stalls while `adp_full` is high. `stall_cycles` counts those cycles, and
`err_count` counts lines whose FIFOs disagreed on the codes.

Throughput: the collector spends two clocks per word. So while the pairs each write one
word per word clock, `mem_rd_clk` must run at least 2 x (number of active pairs) times faster
than the word clock, averaged over a line. Line blanking and separators give a little slack. In the full-size simulation a 250 MHz `mem_rd_clk` keeps up with a
25 MHz word clock (exactly 10x, with line blanking as the margin), and the channel FIFOs never fill.

## Adaptive FIFO and the FX3 line format

`adp_fifo` takes 32-bit words and gives 64-bit entries: two words per entry, the first word in
the low half. It is built on a `dp_fifo` of DEPTH/2 entries. `adp_full` is raised one entry
early, so a pair that is half written can always be completed. `adp_usedw` counts 32-bit words.

`mem_to_fx3` splits the entries back into words through a four-word queue and parses them
line by line. For each active line it sends:

| word  | frame's first line | other lines |
|-------|--------------------|-------------|
| 0     | C00C5555h          | 00000000h   |
| 1     | frame number       | 00000000h   |
| 2, 3  | 000003FFh, 02000000h (SAV)      | same |
| 4 ... | pixel words, white-balanced     | same |
| last 2| 000003FFh, 02740000h (EAV)      | same |

`o_fx3_h` is high exactly while a word is on `o_fx3_dq`, and `o_fx3_v` is high for the whole
frame. The FX3 samples only when both are high. If the FIFO runs dry in the middle of a line,
H falls until data come back; `starve_cycles` counts those cycles.

Blanking lines (V = 1 in the code) are read and dropped. The first blanking line after active
lines ends the frame: V falls, the frame number increments, and the white balance starts
computing new gains. `o_fx3_pclk` is `pclk` forwarded.

## White balance (`white_balance`)

The white balance uses the gray-world method: each colour gets the gain that makes its average
equal to the mean of the three averages. The Bayer order of the IMX226 is as follows:

| line \ column | even | odd |
|---------------|------|-----|
| even          | Gb   | B   |
| odd           | R    | Gr  |

Both greens count as G.

**Statistics.** Within a window of `LINE_CNT` lines starting at `LINE_START` (counted from
the first active line), and `PIX_CNT` pixels starting at `PIX_START` (counted from the first
pixel after the SAV), the block sums each colour and counts its pixels. The defaults are
pixels 124..4219 and lines 18..2177, which is the recording area of the 4K2K mode.

**Gains.** At frame end the sums are frozen. One shared 48-bit restoring divider (`seq_div`)
then runs six divisions:

```
Ave_x  = Sum_x / Num_x              (x = r, g, b)
SumRGB = Ave_r + Ave_g + Ave_b
K_x    = (Num_x * SumRGB << 10) / (3 * Sum_x)
```

The gains are unsigned, with 10 fraction bits (1.0 = 1024), and saturate at 16 bits. A colour
with no pixels keeps its old gain. The computation takes about 300 clocks, and `gains_valid`
pulses when it finishes.

**Correction.** New gains take effect at the next frame start, so a frame is never corrected
with a mix of two gain sets. Each pixel becomes `min(1023, (p * K + 512) >> 10)`, one clock
after input. With `wb_enable` low the pixels pass unchanged, but the gains are still computed.

## Sensor control

`sensor_sync_gen` runs on the sensor clock INCK. A line lasts `hmax` INCK cycles and a frame
lasts `vmax` lines. XHS goes low for 8 cycles at each line start. XVS goes low with the first
XHS of a frame, for 8 cycles. The sensor acts on the falling edges. For the 4K2K 10-bit mode
the sensor's minimum is 546 INCK per line and 2199 lines per frame. The same XVS is the V
input of the line buffers.

`i2c_master` reads or writes one 8-bit register at a 16-bit address. A write is
`S, dev+W, addrH, addrL, data, P`. A read is `S, dev+W, addrH, addrL, Sr, dev+R, data, NACK, P`.
Each SCL bit has four quarters of `CLK_DIV` clocks. SCL and SDA are open drain: `*_oe = 1`
pulls the line low. `nack` reports a missing acknowledge, and the transfer then stops.

## Clocks and reset

| clock       | drives                                   | in the full-size test |
|-------------|------------------------------------------|-----------------------|
| rx_inclock  | lane bit clock (DDR); word clock = /5    | 125 MHz (word 25 MHz) |
| mem_rd_clk  | channel FIFO read side, collector, adaptive FIFO write | 250 MHz |
| pclk        | adaptive FIFO read, white balance, FX3 port | 100 MHz            |
| inck        | XHS/XVS generator                        | 100 MHz               |
| ctl_clk     | I2C master                               | 100 MHz               |

All five pairs use the word clock of pair 0, because the lanes share one bit clock. The PLLs
that make these clocks are not part of the RTL. `rst` is asynchronous and active high, and it
resets every domain.

## Top-level parameters

| parameter      | default | meaning |
|----------------|---------|---------|
| PIX_W          | 10      | bits per sensor word, 10 or 12 |
| NLANES         | 10      | sensor lanes (pairs = NLANES/2) |
| BUF_DEPTH      | 512     | words per channel FIFO |
| ADP_DEPTH      | 512     | 32-bit words in the adaptive FIFO |
| SLIP_TIMEOUT   | 1024    | words without a code before a bit slip; must exceed one line |
| WB_PIX_START / WB_PIX_CNT   | 124 / 4096 | white-balance window, pixels |
| WB_LINE_START / WB_LINE_CNT | 18 / 2160  | white-balance window, lines |
| I2C_DIV        | 125     | clocks per quarter SCL bit (100 kHz at 50 MHz) |

`buf_active` selects the lane pairs in use. `hmax` and `vmax` are run-time inputs.

## Capacity

The sensor sends 576 Mbit/s per lane, so the word clock is 57.6 MHz. In the 4K2K mode its
shortest line is 546 INCK. With the 37.125 MHz INCK that is 14.7 us per line, or 30.9 fps at
2199 lines.

- **FX3 port.** The port sends one word per `pclk`. A 4K2K line is 2131 words on the port, so
  at the 100 MHz GPIF II limit the line period must be at least 21.3 us. That means
  `hmax` >= 792 INCK, or about 21 fps. The 40 fps sometimes quoted for this sensor and
  resolution (354 Mpixel/s) would need 8-bit pixels packed four per word, which is not built.
- **Collector.** `mem_collect` spends two clocks per word. At the shortest line it would need
  `mem_rd_clk` of about 300 MHz, averaged over a line (5 x 437 reads x 2 clocks in 14.7 us). This is the first thing to improve for full
  sensor speed.
- **Channel FIFOs.** A 4K2K line needs about 437 words per channel FIFO: 425 pixel words, 4
  code words and 8 separator words. This fits in 512 words even if nothing is read during the
  line.
- **White-balance statistics.** The sums (36 bit) and counts (26 bit) hold a full 4096x2160
  window.
- **Other readout modes.** The modes with fewer lanes work through `buf_active`, for example
  the 4-lane binning mode with two pairs. The 12-bit modes need `PIX_W = 12`: the
  deserializer takes 12 bits per word, the codes are the shifted 12-bit codes, pixels are
  packed `{4'b0, pixel}` and the white balance clips at FFFh. In the 12-bit modes 2 (8 lanes)
  and 3 (4 lanes) a pair's line (543 and 1074 words) is longer than its FIFO, so the collector
  has to keep up while the line arrives. At 250 MHz it reads each of n FIFOs at
  125/n M words/s, against 48 M words/s written per pair; mode 2 builds up about 185 words,
  and mode 3 never builds up. Mode 0 at its shortest line (644 INCK) needs 120 M words/s on the
  FX3 port, so it needs `hmax` >= 776 INCK.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends it with a
failure if it hangs. Build and run with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/cam_pkg.sv tb/tb_usb3_camera_top.sv --top-module tb_usb3_camera_top
./obj_dir/Vtb_usb3_camera_top
```

| testbench              | what it covers |
|------------------------|----------------|
| tb_lvds_deser          | rx_outclk rate; exactly one slip position per lane; per-lane slip; 200-word runs |
| tb_lvds_comp           | alignment by bit slip from a skewed start, sync, line window over SAV..EAV, V flag |
| tb_dp_fifo             | ordering across unrelated clocks, full/empty, fill levels, overflow flag |
| tb_lvds_to_buf         | start on V edge, line content and packing, 8 separator words, restart on sync loss |
| tb_mem_collect         | single SAV/EAV, round-robin order, separators and parity, stall on full |
| tb_adp_fifo            | 32-to-64 packing order, early full, random traffic |
| tb_white_balance       | gains against the formulas, correction, clipping, bypass, gain timing |
| tb_mem_to_fx3          | headers, frame numbers, codes, dropped blanking lines, starvation, V per frame |
| tb_sensor_sync_gen     | XHS period = hmax, XVS period = hmax*vmax, pulse widths, run-time change |
| tb_i2c_master          | writes and reads against a register device model, NACK, bus timing |
| tb_usb3_camera_top     | whole chain, reduced sizes, 4 frames; requires every mechanism to occur |
| tb_usb3_camera_4lane   | 4-lane readout: two active pairs, three masked off, 4 frames |
| tb_usb3_camera_12bit   | same as the top test with `PIX_W = 12`: 12-bit words, codes and clipping |
| tb_usb3_camera_full    | whole chain at default parameters, two full 4K2K frames (~1 min) |

The end-to-end tests use `sensor_model`, which gives the two lanes of pair *p* a skew of
(3p+1) mod `PIX_W` bits, and `fx3_checker`, which recomputes every port word and the gains
independently. `tb_usb3_camera_top` counts these mechanisms and fails if any never happens:
bit slip, frame header, zero header, dropped blanking line, collector stall, gain update,
corrected pixels, I2C write and read.

## Departures and open points

- **FIFO width.** The line buffers are 32 bits in and 32 bits out. Each write already holds
  both lanes. The reference description calls them 16-bit in, 32-bit out, while also packing
  two 10-bit words into 32 bits per write.
- **Line loop.** After a line's separator, the buffer waits for the next line of the same
  frame, not for a new V edge.
- **12-bit deserializer.** For 12-bit words each lane uses one 12-bit shift register, instead
  of two 6-bit deserializers combined into one word. The words that come out are the same.
- **Separators.** The line buffers write 8 separator words (the described range is 8 to 12).
  The collector writes 2, padded to an even count.
- **Collector codes.** The collector writes the SAV/EAV as two 32-bit words, 000003FFh and the
  status word, not as one 64-bit word with 3FFh in both halves.
- **Line start.** `line_start` opens on the start code alone. It is not also qualified by the
  XHS edge, which lives in another clock domain. The data path delay is four words rather
  than one, so the whole code lies inside the line window.
- **Dropped blanking lines.** Blanking lines are not sent to the FX3.
- **Own choices.** Gains are fixed point with 10 fraction bits, computed by a sequential
  divider. The FIFO depths, the slip timeout, the XHS/XVS pulse widths, the I2C command format
  and the shared word clock are also this design's own choices.
- **Not included.** The PLLs, the sensor, the FX3 and its firmware, and the host software are
  not part of the RTL. `tb/sensor_model.sv` and `tb/i2c_slave_model.sv` are behavioural
  stand-ins, used only by the testbenches.
- **Not checked.** The design has been simulated only, never run on hardware. The EAV is not
  checked against the XHS position, and line length is not checked.
