# Intruder alert: camera-to-VGA frame pipeline with a motion-detection hand-off

The system watches a room through an NTSC camera. It keeps a reference ("background") picture and compares each new frame with it. Regions that changed are outlined on a VGA monitor. The comparison runs as software on a soft processor. The hardware described here moves the pictures:

* **Input path.** It takes the camera's digital video stream (ITU-R BT.656 from the board's TV decoder chip). It reduces the stream to a 320 x 240 greyscale frame and writes the frame into SDRAM.
* **Output path.** It reads a stored frame back and shows it on a 640 x 480 VGA screen. Each stored pixel becomes a 2 x 2 block on screen. Two byte values are reserved: 0xFF is painted red and 0xFE green. The software uses them to draw outlines.
* **Circular buffer control.** This decides which SDRAM frame slot the camera writes, which one the processor works on, and which one the screen shows. It moves those three pointers along as work is handed over.

The processor, the SDRAM controller and the bus fabric are not part of this RTL. Their signals are ports of the top module `intruder_alert_top`.

## Frame slots and the hand-over

This is the part that ties everything together.

The 23-bit byte address space (8 MB of SDRAM) is split into frame slots of 128 KB. The slot number sits in address bits 21:17 and the low 17 bits are the byte offset. That gives 32 slots, or 4 MB, for frames. A 320 x 240 frame takes 76,800 bytes, so it fits one slot with room to spare. Pixel (x, y) of a slot is at `base + y*320 + x`; see `pixel_addr` in `ias_pkg`.

`circular_buffer` holds three slot pointers. After reset they are:

| pointer | reset slot | role |
|---|---|---|
| VGA      | 0 | frame being displayed |
| software | 1 | frame the processor analyses and marks |
| TV       | 2 | frame the camera is writing |

A **shift** moves the frames along the chain: the frame the processor finished goes to the screen, and the frame the camera just wrote goes to the processor. The TV pointer takes the next slot:

```
vga <= software;  software <= tv;  tv <= tv + 1 (mod 32, skipping the background slot)
```

What triggers a shift depends on `sw_detect_en` (switch SW0):

* **Detection on.** The processor raises `software_finished` when it is done with its frame. The block registers this request and echoes it on `software_ready`. A shift happens on the first clock where the request is high and `software_ready` is still low. So a level held high gives exactly one shift. The processor drops `software_finished` when it sees `software_ready`, and `software_ready` follows one clock later. While `software_ready` is high, `tv_enable` is low and the write master starts no new writes. This keeps the camera from writing across the pointer change. In this mode the screen updates at the processor's pace (a few frames per second).
* **Detection off.** Each completed camera frame (`frame_written` from the write master) causes the shift. The monitor then shows live video one frame behind the camera.

**Background frame.** Pressing KEY3 (`set_background_n` falling) while detection is on marks the current software slot as the background. Its base address appears on `background_frame_addr` and `background_valid` goes high. From then on the TV pointer steps over that slot, so the reference picture is never overwritten. The press is ignored while detection is off. A new press moves the background to the then-current software slot. The old background slot then rejoins the ring.

A shift changes `vga_base_addr` in the middle of the screen's frame. `video_out` therefore latches the base address once per frame, in the last blanking line, so each frame is displayed from a single slot.

## Input path: BT.656 to a 320 x 240 grey frame

`video_in` chains three blocks. Each takes a one-clock strobe with its data.

1. **`itu656_decoder`** watches for timing reference codes (`FF 00 00 XY`). Bit 6 of XY is the field (F), bit 5 is vertical blanking (V) and bit 4 marks end versus start of active video (H). Inside active video the bytes alternate Cb Y Cr Y. The decoder passes only the Y bytes (720 per line) and drops the colour. It gives `eol` at the end-of-active-video code of a picture line. It gives `field_end` when V rises, at the start of vertical blanking.
2. **`frame_scaler`** keeps only field 0, which halves 480 lines to 240. It keeps only even-indexed samples, which halves 720 to 360.
3. **`deinterlacer`** counts x and y from the line and field markers. It emits pixels only while x < 320 and y < 240. The 40 extra samples on the right of each line are dropped. The packed output `pixel_xy_t` holds `{pix, x[8:0], y[7:0]}`. The counters wait for the first end of field after reset, so a frame that is joined mid-way is never written.

A 64-entry FIFO (`sync_fifo`, show-ahead) absorbs SDRAM stalls between the deinterlacer and `sdram_write_ctrl`. The write master is an Avalon-MM master with one byte write in flight. It writes to `tv_base + y*320 + x` and pulses `frame_written` when pixel (319, 239) has been accepted. If the FIFO ever fills, `fifo_overflow` is set and stays set.

Rates: the camera delivers 27 Mbyte/s (one byte per 3.7 clocks at 100 MHz). Only one byte in four becomes a stored pixel, and only half the fields are kept. That leaves about 2.3 M writes/s, well within the bus even with the read master competing.

## Output path: line doubling from a two-line buffer

`vga_timing` produces standard 640 x 480 at 60 Hz timing:

* horizontal: 640 visible, 16 front porch, 96 sync, 48 back porch (800 total);
* vertical: 480 visible, 10 front porch, 2 sync, 33 back porch (525 total).

Both syncs are active low. It runs on `pix_ce`, a one-in-four enable of the 100 MHz clock, which gives the 25 MHz pixel rate.

Each stored row is shown on two screen lines. `line_buffer` has two banks of 320 bytes, filled by `sdram_read_ctrl` (an Avalon-MM read master with one read in flight). The fetch schedule in `video_out`:

| when (start of line, `h_cnt == 0`) | fetch | into bank |
|---|---|---|
| line 524 (last blanking line) | row 0 of the frame; latch the frame's base address | 0 |
| even visible line v, v < 478 | row v/2 + 1 | (v/2 + 1) mod 2 |

Screen line v reads bank `v[1]` at column `h/2`. Every fetch therefore has two full screen lines (3,200 clocks) to finish before its bank is read. One row needs about 320 x 3 clocks on an idle bus. If a fetch request comes while the previous one is still running, `vga_underrun` is set and stays set.

`pixel_to_rgb` maps a byte to 10-bit colour:

* 0xFF gives red (3FF, 0, 0);
* 0xFE gives green (0, 3FF, 0);
* any other value is grey, with the 8-bit value widened by repeating its top two bits.

`box_shown` pulses for each outline pixel displayed. The colour, blank and sync outputs are registered together on `pix_ce`, so they stay aligned. `vga_sync_n` is held low, and `vga_clk` is the divider's top bit.

## Clocking and reset

Everything runs on one clock, `clk`, at 100 MHz, the SDRAM side's rate.

* The camera byte stream enters as `td_data` with a `td_valid` strobe. A board with the decoder's own 27 MHz clock would need a small clock-crossing FIFO in front of `td_data`.
* The VGA side uses the `pix_ce` enable rather than a separate 25 MHz clock.

`rst_n` (KEY0) is an asynchronous, active-low reset for all state. `td_reset_n` simply follows it.

## Top-level ports

| group | signals |
|---|---|
| board inputs | `rst_n` (KEY0), `sw_detect_en` (SW0), `set_background_n` (KEY3) |
| TV decoder | `td_data[7:0]`, `td_valid`, `td_reset_n` |
| SDRAM write master | `wr_address[22:0]`, `wr_write`, `wr_writedata[7:0]`, `wr_waitrequest` |
| SDRAM read master | `rd_address[22:0]`, `rd_read`, `rd_waitrequest`, `rd_readdata[7:0]`, `rd_readdatavalid` (pipelined reads allowed) |
| processor hand-over | `software_finished`, `software_ready`, `software_base_addr`, `background_frame_addr`, `background_valid` |
| VGA DAC | `vga_r/g/b[9:0]`, `vga_blank_n`, `vga_sync_n`, `vga_hs`, `vga_vs`, `vga_clk` |
| status | `frame_written`, `buffer_shift`, `box_shown` (pulses); `fifo_overflow`, `vga_underrun` (sticky) |

The two masters are meant for a bus fabric that arbitrates them in front of an SDRAM controller. The processor reads and writes frames through the same fabric, using the base addresses above.

## What the processor is expected to do

This is not part of the RTL. The end-to-end testbench contains a model of it.

With detection on, the software waits until it has a frame and compares it with the background in 10 x 10 pixel blocks. A pixel counts as changed if it differs from the background by more than 16 grey levels. A block is flagged if more than 10 % of its pixels changed. This gives a 32 x 24 flag array. The software then writes 0xFF or 0xFE along the block edges that are not shared with another flagged block, so neighbouring blocks merge into one outline. Finally it raises `software_finished` and waits for `software_ready`.

## Where this design makes its own choices

* **One clock and enables** instead of separate 27, 25 and 100 MHz clocks.
* **Automatic shifting while detection is off**, so the monitor shows live video.
* **Background protection.** The TV pointer skips the background slot, and the background is taken from the software slot at the moment of the key press.
* **Pointer update as a shift chain** (vga <= software <= tv). Without a background this gives the same sequence as three counters that each advance by one.
* **Cropping 360 to 320 pixels** by keeping the left part of each line. Field 0 is the kept field.
* **8-to-10-bit colour** by bit repetition.
* **Bus use.** One byte per bus transfer and one transfer in flight per master. This is simple and has plenty of headroom, but it is not the most efficient use of SDRAM bursts.
* **VGA timing.** The standard 640 x 480 numbers are assumed.

Not covered: the I2C set-up of the TV decoder chip, the seven-segment display, the SRAM used by the software, and any processor-side code.

## Files

`rtl/`:

* `ias_pkg.sv`: shared constants, the `pixel_xy_t` type and `pixel_addr`.
* `intruder_alert_top.sv`: the top module.
* `video_in.sv` (`itu656_decoder`, `frame_scaler`, `deinterlacer`), `sync_fifo.sv` and `sdram_write_ctrl.sv`: the input path.
* `circular_buffer.sv`: the slot control.
* `video_out.sv` (`sdram_read_ctrl`, `line_buffer`, `vga_timing`, `pixel_to_rgb`): the output path.

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. Two behavioural models support them:

* `bt656_source.sv` generates BT.656 frames with a known luma pattern and an optional bright rectangle (the "intruder").
* `avalon_sdram_model.sv` is a byte-wide memory with two Avalon ports. It alternates grants when both ports ask at once, stalls periodically and has pipelined read latency.

`tb_intruder_alert_top` runs the whole design at its default sizes:

1. Three frames with detection off. It checks the automatic shifts and compares a stored frame byte for byte.
2. It sets the background, sends frames with an intruder, runs the processor model (block detection and outlining) and hands over.
3. It compares every displayed VGA pixel of two screen frames with the marked frame, including the red and green outline pixels.
4. It runs 40 more hand-overs and checks that the background slot is never given to the camera.

It counts the automatic shifts, software shifts, background skips, bus stalls on both masters, red and green pixels shown and flagged blocks, and fails if any of them never happened.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/ias_pkg.sv rtl/*.sv tb/bt656_source.sv tb/avalon_sdram_model.sv \
  tb/tb_intruder_alert_top.sv --top-module tb_intruder_alert_top
./obj_dir/Vtb_intruder_alert_top
```

Replace the testbench file and top-module name to run a unit test. The full-system test takes a few seconds to build and about 15 s to run. The slowest unit test, `tb_video_out`, checks every pixel of several screen frames.
