# WSTM: serial audio to SRAM write sequencer

WSTM is the write half of a digital audio buffer. It takes a 16-bit stereo
serial audio stream in I2S format (data `SDATA`, word clock `LRCK`, bit clock
`BCK`), turns every left and right word into a 16-bit parallel word, and writes
each one into an external asynchronous SRAM. Once enough bits have been
stored to fill the depth chosen on `DEPTH_SEL`, it raises `RSTART` so that a
separate read sequencer can start playing the buffer back (for example as a
delay line). Everything runs on one system clock `SYSCLK`. The audio clocks
are asynchronous to it and are sampled as ordinary inputs.

The design is small: about 46 flip-flops. Its interest lies in how it is
timed. The whole write side is a single 12-state machine. Each state's code
holds the SRAM strobes as literal bits, so all outputs come straight from
flip-flops. A single bit counter serves three roles: it frames the words, it
is the write address, and it measures the buffer depth.

## Signals

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `XRESET` | in | 1 | asynchronous reset, active low |
| `SYSCLK` | in | 1 | system clock |
| `SDATA`, `LRCK`, `BCK` | in | 1 | I2S stream from the audio source |
| `DEPTH_SEL` | in | 2 | buffer depth: 0 → 0x000f, 1 → 0x00ff, 2 → 0x0fff, 3 → 0xffff bits |
| `XBUFOE` | out | 1 | enable of the external bidirectional data-bus buffer, active low |
| `XWCE`, `XWE`, `XWBHE` | out | 1 | SRAM chip enable, write enable, byte-high enable, active low |
| `WADDRS` | out | 16 | write address |
| `WDATA` | out | 16 | write data |
| `RSTART` | out | 1 | high while the bit count equals the selected depth |

## Structure

```
LRCK ─► edge_oneshot ─ rise ─────────────┐
BCK  ─► edge_oneshot ─ rise, fall ──┬────►  write_fsm ── state code bits ─► XBUFOE XWCE XWE XWBHE
                                    │          ▲   │ WCNTE
                                    │          │   ▼
                                    ├──fall──► write_counter ─► WADDRS
                                    │          ▲     │ bit15 / bit31 flags back to write_fsm
DEPTH_SEL ─► depth_decoder ─ depth ─┘──────────┘     └─ count == depth ─► RSTART
SDATA ─────► shift_register (shift on BCK rise) ─► WDATA
```

* `edge_oneshot` is used twice. It passes `LRCK` or `BCK` through two
  flip-flops and produces one-cycle pulses on rising and falling edges. The
  pulses come two `SYSCLK` cycles after the edge.
* `shift_register` shifts `SDATA` in, MSB first, on every BCK rising pulse.
  It runs freely and never clears. Its contents drive `WDATA` at all times.
* `write_counter` is a 16-bit counter. It counts BCK falling pulses while the
  state machine enables it (`WCNTE`) and wraps from 0xffff to 0. It flags
  `count[4:0] == 15` (the last bit of the first word of a frame is due) and
  `count[4:0] == 31` (the last bit of the second word is due). It also
  compares the whole count with the depth.
* `depth_decoder` is a four-entry table.
* `write_fsm` is the sequencer, described next.

Shared types are in `wstm_pkg`: the state enum `wstate_e` and the output-bit
struct `wstrobe_t`.

## The write sequence

### State code

Each state code is 10 bits. Bits 9:6 number the state. Bits 5:0 are the
outputs, from MSB to LSB: `XBUFOE XWCE XWE XBHE WCNTE RSTART`.

| State | Code | Role | Leaves when |
|---|---|---|---|
| s0 | 0000_111100 | idle after reset | LRCK rising pulse → s1 |
| s1 | 0001_111100 | align to bit clock | BCK falling pulse → s2 |
| s2 | 0010_111100 | first bit (MSB) sampled | BCK rising pulse → s3 |
| s3 | 0011_111110 | counting bits | bit-15 flag → s4; bit-31 flag → s8 |
| s4 | 0100_011110 | first word: bus buffer on | BCK falling pulse → s5 |
| s5, s6 | 010x_000010 | write pulse (CE, WE, BHE low) | always → next |
| s7 | 0111_111110 | recovery | always → s3 |
| s8 | 1000_011110 | second word: bus buffer on | BCK falling pulse → s9 |
| s9, s10 | 10xx_000010 | write pulse | always → next |
| s11 | 1011_111111 | recovery, end of frame | always → s3 |

### One frame

I2S changes `LRCK` and `SDATA` on BCK falling edges, one bit clock before
each word's MSB. Data are sampled on rising edges. The sequence runs as
follows:

1. After reset the machine waits for an LRCK rising edge. The falling BCK
   edge that follows presents the MSB of the next word. The rising edge
   after that samples it, and the machine enters s3. Both edge pulses come
   from the same synchroniser, so the LRCK edge and the coincident BCK
   falling edge are seen in the same cycle.
2. In s3 the counter counts falling edges. It reaches 15 when bit 15 of the
   first word is on the line. The machine moves to s4 and turns on the bus
   buffer. The next rising edge shifts in the 16th bit.
3. On the next falling edge (the counter becomes 16) the machine gives a
   two-cycle write pulse in s5 and s6. It spends one cycle in s7, then
   returns to s3. `WADDRS` is 16 and `WDATA` holds the complete word
   throughout the pulse. The next shift cannot happen before the following
   rising edge.
4. The second word repeats this at count 31, through s8 to s11, and is
   written at address 32.

LRCK is looked at only once. After that the machine stays aligned by
counting 32 bit clocks per frame. The design therefore expects exactly 16
bit clocks per word. A stream with more bit clocks per frame, or a dropped
bit clock, loses alignment until the next reset.

The write address is simply the bit count at the moment of the write. Word
*n* (counting from 0 after lock) is stored at address 16·(n+1) mod 65536.
Consecutive words therefore sit 16 addresses apart, and the 16-bit address
space holds 4096 words before it wraps.

### Depth and RSTART

All four depths end in binary 1111. The count therefore equals the depth
while the last bit of word (depth+1)/16 − 1 is on the line. At that point
(depth+1)/16 − 1 words have been written. `RSTART` stays high until the next
BCK falling edge, which is half a bit period. It comes again only when the
counter has gone once more round its 65536 states.

| DEPTH_SEL | Depth | Words written before RSTART |
|---|---|---|
| 0 | 0x000f | 0 |
| 1 | 0x00ff | 15 |
| 2 | 0x0fff | 255 |
| 3 | 0xffff | 4095 |

### Clock requirement

Each write needs s5, s6 and s7 to complete before the next BCK edge pulse.
`SYSCLK` must therefore give at least four cycles per BCK half period. Each
level of `LRCK` and `BCK` must also last at least two `SYSCLK` cycles. The
testbench runs at 4.7 cycles per half period. For comparison, 44.1 kHz audio
at 32 bit clocks per frame needs `SYSCLK` above about 11.3 MHz.

## Corrections to the original source

This RTL is a fresh SystemVerilog implementation of the WSTM sequencer. The
original Verilog does not work as printed, and it contradicts itself in
several places. The choices made here are:

* **Counter enable in s3 and s7.** The original state constants have WCNTE=0
  in s3 and s7, while their comments say WCNTE=1. With WCNTE=0 in s3 the
  counter never advances and the machine hangs. The comments are followed.
* **s11 code.** The constant for s11 has RSTART=0. The case label and the
  comment have RSTART=1. The label is followed (`1011_111111`).
* **Edge pulse order.** The state comments name the two BCK pulses in the
  opposite order to the signal assignments. The assignments are followed:
  s1 waits for a falling edge, s2 for a rising one. This is the order that
  matches I2S.
* **s8 exit.** In s8 the original also requires the bit-31 flag to be clear.
  That flag is always set in s8, so the machine could never leave. The term
  is dropped. (s4 keeps its equivalent term, which is harmless there.)
* **State register width.** The state register is 10 bits wide, not 8.
* **RSTART source.** The original drives `RSTART` both from the state bit
  and from the depth comparison. Only the comparison drives the port here,
  because otherwise `DEPTH_SEL` would have no effect. The end-of-frame state
  bit (s11) is kept in the state code but is not brought out.
* **Unused state codes.** These return to s0. The original has no default.
* **XWBHE.** The port is taken to be the state bit the original calls XBHE,
  a byte-high enable that is active together with XWE.

The following are not part of this RTL: the read sequencer that `RSTART`
starts, the SRAM, the bus buffer and the audio source. A write-side SRAM
model, `tb/async_sram_model.sv`, is used only by the testbench.

## Files

| File | Contents |
|---|---|
| `rtl/wstm_pkg.sv` | widths, state enum, output struct, depth table |
| `rtl/edge_oneshot.sv` | synchroniser and edge pulses |
| `rtl/depth_decoder.sv` | DEPTH_SEL → depth |
| `rtl/shift_register.sv` | serial-to-parallel register (`WIDTH`, default 16) |
| `rtl/write_counter.sv` | bit counter, address, frame flags, depth match |
| `rtl/write_fsm.sv` | 12-state write sequencer, with handshake assertions |
| `rtl/wstm.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/async_sram_model.sv` | behavioural SRAM write model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wstm \
  -y rtl -y tb rtl/wstm_pkg.sv tb/tb_wstm.sv
./obj_dir/Vtb_wstm
```

For the unit tests, replace the top module and testbench file with
`tb_write_fsm`, `tb_write_counter`, `tb_shift_register`, `tb_edge_oneshot`
or `tb_depth_decoder`. `-y` lets Verilator find each module in the file of
the same name. With `-Wall` the RTL gives only unused-signal warnings:
the LRCK falling pulse, the state code at the top level, and its RSTART
bit.

## Verification

* `tb_wstm` runs the top at full size with nothing overridden. It takes
  about one second.
  * The I2S source runs asynchronously to `SYSCLK`.
  * All four depth settings are covered, each starting from a reset in the
    middle of a word.
  * Every write is checked for strobe levels, a two-cycle `XWE`, address
    16·(n+1), the exact word sent, and one write every 16 bit clocks.
  * `RSTART` is checked for the number of words written and the address when
    it rises.
  * The DEPTH_SEL=3 run continues past the address wrap, 4100 words.
  * The SRAM model's contents are read back and compared.
* `tb_write_fsm` compares the state machine, cycle by cycle, with an
  independent model of the state table under random stimulus. It requires
  every state to be visited.
* `tb_write_counter`, `tb_shift_register`, `tb_edge_oneshot` and
  `tb_depth_decoder` compare their modules with reference models under
  random stimulus. This includes the counter wrap and all depth codes.
* Assertions in `write_fsm` check two rules: `XWE` is only low with the chip
  enabled and the bus buffer on, and each write pulse lasts exactly two
  cycles.

The tests do not cover LRCK jitter, a frame length other than 32 bit clocks,
or `SYSCLK` ratios below the four-cycle minimum.
