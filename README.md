# Nibble-mode parallel CRC-32 for a 100 Mb/s ethernet transmitter

A fast ethernet (IEEE 802.3u) MAC hands data to the PHY four bits at a time,
one nibble per 25 MHz clock. The frame check sequence (FCS) at the end of every
frame is a CRC-32. The textbook CRC circuit is a 32-bit linear feedback shift
register (LFSR) that takes one bit per clock, so it cannot keep up with a nibble
interface at the same clock. This design computes four LFSR steps in one clock.
It replaces the serial register's single-step feedback with 32 XOR equations
that give the register value after four bits directly. Those equations come
from the previous register value and the four data bits. The result is a
32-flip-flop circuit that takes one nibble per clock with no stalls. That is
100 Mb/s at 25 MHz.

Around this generator, the top level adds the step a transmitter needs next.
When the frame ends, the CRC is complemented and sent as four more octets right
behind the data.

## The arithmetic, and the conventions that matter

Most of the difficulty in a CRC circuit lies in its conventions, not its gates.
This design uses:

| item | choice |
|---|---|
| generator | IEEE 802.3 CRC-32, `G(x) = x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1`, i.e. `0x04C11DB7` |
| register bit k | coefficient of x^k of the running remainder; bit 31 is the side the data enters |
| preset | all ones before each frame. This complements the first 32 message bits, so leading zeros change the CRC |
| bit order | each octet enters most significant bit first; in a nibble `Data[3]` is the first serial bit and `Data[0]` the last |
| nibble order | high nibble of each octet first |
| FCS | bitwise complement of the final register, sent most significant nibble first |
| receiver residue | running the whole frame, FCS included, through a ones-preset register leaves `0xC704DD7B` |

With these conventions the CRC is the "CRC-32/BZIP2" variant: not reflected,
ones preset, complemented result. Its standard check value for the ASCII string
`123456789` is `0xFC891918`, and the testbenches test for it. The wire order of
real 802.3 PHYs is the bit-reversed form of this (least significant bit of each
octet first). Use of this block with such a PHY needs the bits of each octet,
and of the FCS, mirrored outside it.

Example, from reset (register `ffffffff`), one nibble per clock:

| Data | 0010 | 1011 | 0100 | 1101 | 0110 |
|---|---|---|---|---|---|
| Crc after the clock | ce327923 | fd60c235 | fd47e831 | ddfcb87e | f4804c81 |

## How the four-step equations are obtained

Take the serial register with bits `c[31:0]`. In one serial step with message
bit `b`, the feedback is `f = c[31] ^ b`. The register shifts up by one and `f`
is XORed into every bit where the polynomial has a 1 (bit 0 included). Repeat
this four times with `b = d[3], d[2], d[1], d[0]`, and write each resulting bit
as an XOR of the original `c` and `d` bits. It turns out that `c[28+j]` and
`d[j]` always appear together. So every equation is written with the four
shared terms

    fb[j] = c[28+j] ^ d[j],   j = 0..3

and each next-state bit is one register bit `c[k-4]` (for k >= 4) XORed with a
subset of `fb`. Examples:

    next[0]  = fb[0]
    next[4]  = c[0]  ^ fb[3] ^ fb[2] ^ fb[0]
    next[26] = c[22] ^ fb[3] ^ fb[0]
    next[31] = c[27]

`rtl/crc32_nibble_next.sv` lists all 32 equations as separate continuous
assignments, with no loop. The widest has four terms after the `fb` terms are
shared (seven raw inputs), so on a LUT-based FPGA each bit fits in one or two
LUTs. To change the polynomial, derive the equations again by the procedure
above. The bit-serial model in `tb/crc32_ref_pkg.sv` is the place to start, and
`tb_crc32_nibble_next` checks the new equations against it.

## Blocks

```
nibble_crc_tx (top)
 ├── parallel_crc_32      32-bit CRC register, preset / enable
 │    └── crc32_nibble_next   the 32 XOR equations (combinational)
 └── fcs_insert           passes the frame through, appends ~CRC, re-presets
crc32_pkg                 widths, polynomial, preset, residue, types
```

### `parallel_crc_32`

The ports are `Clk`, `Reset`, `Enable`, `Data[3:0]` and `Crc[31:0]`. On a
rising clock edge, `Reset` presets the register to ones. Otherwise, when
`Enable` is high, the register takes the four-step value. When `Enable` is low,
it holds. `Reset` is synchronous and has priority over `Enable`. All control
acts on the D inputs, and nothing gates the clock. `Crc` is the register
itself: the CRC including a nibble appears one clock after that nibble is
presented.

### `fcs_insert`

This block sits between the MAC's nibble stream and the line:

- While `in_valid` is high, it drives `crc_enable` high. The nibble is copied to `out_data`
  one clock later.
- In the first clock with `in_valid` low, the register holds the final CRC. The
  block then puts `~crc[31:28]` on the output, loads the remaining 28
  complemented bits into a shift register, and raises `crc_init` for one clock.
  The top ORs `crc_init` into the CRC register's `Reset`, so the register is all
  ones again for the next frame.
- Over the next seven clocks the rest of the FCS goes out, four bits per clock.

The output frame (`out_valid` high) is therefore the input frame, delayed by
one clock and lengthened by 8 clocks, with no gap before the FCS. `in_valid` must
stay low for at least 8 clocks after a frame, and an assertion checks this.
With exactly 8, the next output frame starts straight after the FCS. With 9 or
more, at least one idle clock separates them. An ethernet inter-frame gap is 24
nibble clocks.

### `nibble_crc_tx` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | nibble clock, 25 MHz for 100 Mb/s |
| `reset` | in | 1 | synchronous, active high; presets the CRC register |
| `tx_en_in` | in | 1 | frame nibble valid (destination address through last data octet) |
| `txd_in` | in | 4 | frame nibble, high nibble of each octet first |
| `tx_en_out` | out | 1 | high for the frame plus 8 FCS clocks, one clock after `tx_en_in` |
| `txd_out` | out | 4 | frame nibbles, then FCS nibbles |
| `crc` | out | 32 | the running CRC register |

The MAC itself is outside this design. It must supply the CRC-covered fields
(destination and source address, length/type, data) as one contiguous burst.
Preamble and start-of-frame delimiter do not pass through this block.

## Where this design goes beyond its source description

The nibble CRC generator carries the source's port names, polynomial, ones
preset, bit order and example values. The following are this design's own
choices:

- The preset is synchronous and takes priority over `Enable`.
- Writing the equations with the shared `fb` terms.
- The whole `fcs_insert` block. It covers the order in which the FCS nibbles go
  out, the one-clock pipeline, the automatic re-preset between frames and the
  minimum gap of 8 clocks. The source only says that the final value is
  complemented and appended after the data field.
- The top-level stream interface.

The polynomial is the standard IEEE one with its x^1 term. That term is the one
that reproduces the reference values above and matches a 14-XOR serial
register.

The source compared this circuit with the serial register on several FPGA
families, at 263 MHz and 49 LUTs on a Spartan-3E. Those timing and area
figures were not reproduced here. The logic is 32 flip-flops and 32 XOR
equations. The FCS appender adds a 32-bit shift register, a 3-bit counter and a
2-bit state register.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs.

- `tb_crc32_nibble_next` compares the equations with the bit-serial model. It
  tries all 16 nibbles from zero, all-ones and every single-bit register value,
  plus 20 000 random pairs.
- `tb_parallel_crc_32` checks the five-nibble example above at one nibble per
  clock. It also checks hold with `Enable` low and `Reset` taking priority over
  `Enable`, the `123456789` check value, and 40 random frames with random
  `Enable` gaps against the serial model.
- `tb_fcs_insert` drives the appender against a modelled CRC register. It checks
  the pass-through, the FCS nibbles and their order, one `crc_init` per frame,
  and frames separated by the 9-clock gap.
- `tb_nibble_crc_tx` runs the whole path end to end with no parameters
  overridden. It sends the check string, then minimum (46-octet data field) and
  maximum (1500-octet data field, 3028 nibbles) frames. It also sends 20
  random-length frames with random gaps, and a reset between frames. Every output
  frame is compared with a CRC computed octet by octet, and it must leave the
  receiver residue. The test counts the reset preset, the re-preset between
  frames, the FCS appends, the minimum and maximum frames and the minimum gap,
  and fails if any of them never happened.

All four pass. A deliberately broken copy of each module was also run: a
dropped XOR term, a zero preset, an uncomplemented FCS nibble and a missing
re-preset. Each testbench caught its broken copy.

## Simulating

Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/crc32_pkg.sv tb/crc32_ref_pkg.sv tb/tb_nibble_crc_tx.sv \
    --top-module tb_nibble_crc_tx
./obj_dir/Vtb_nibble_crc_tx
```

To run another testbench, replace the last file and the top-module name. The
other modules are found through `-Irtl`. Every test runs in well under a
second.
