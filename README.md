# A small island-style FPGA in SystemVerilog

This is the RTL of a minimal SRAM-configured, island-style FPGA: a square array
of identical **tiles**, each holding a logic cluster, its share of the routing
channels, and the configuration memory that programs both. The architecture is
the classic academic one: 4-input LUTs, 4 of them per cluster, 16-track routing
channels whose wires span one tile, connection blocks that reach a quarter of
the tracks, and a Wilton switch block at each channel crossing. The default
array is 2 x 2 tiles (four clusters, 16 LUTs), configured in 16-bit words through a
serial port that also reads the configuration back.

The architecture (cluster size, LUT size, channel width, connection-block
flexibility, Wilton switch block, one-tile wires, per-tile configuration
memory addressed in 16-bit words, serial load and readback) follows a published
academic FPGA. Everything the original leaves open is this implementation's
choice and is marked as such below: the pin-to-track pattern, the exact Wilton
permutation, the configuration word map, the serial frame format, reset
behaviour and the perimeter I/O.

## The tile and the array

```
        |              |
   CLB (x,y)    CB_V   |        Tile (x,y) owns:
        |      (right) |          - CLB
   -----+--------------+---       - CB_V on the vertical channel to its right
    CB_H (below)      SB          - CB_H on the horizontal channel below it
        |              |          - SB at the bottom-right corner
                                  - the SRAM manager for all four
```

Tile (x, y) sits in column x (left to right) and row y (top to bottom) and has
index `y*NX + x` for configuration. Each channel **segment** is 16 tracks wide and
one tile long: the horizontal segment below CLB (x,y) runs from switch block
(x-1,y) to switch block (x,y); the vertical segment to its right runs from
switch block (x,y-1) to switch block (x,y).

**CLB pins by side.** Input `In_i` sits on side `i mod 4` (top, right, bottom,
left); the outputs are `Out_0` top, `Out_1` left, `Out_2` bottom, `Out_3`
right. Right and bottom pins meet the tile's own connection blocks. Top and left
pins meet the blocks of the tile above and the tile to the left, so each
connection block serves a **near** CLB (the one in its tile) and a **far** CLB
(across the channel).

| side   | pins (position 0, 1, ...) |
|--------|---------------------------|
| top    | In_0, In_4, In_8, Out_0   |
| right  | In_1, In_5, In_9, Out_3   |
| bottom | In_2, In_6, Out_2         |
| left   | In_3, In_7, Out_1         |

**Perimeter.** The array has no I/O blocks. Instead `fpga_top` brings out:
- the pins that face the outside: row-0 top pins (`io_top_in`, `io_top_out`)
  and column-0 left pins (`io_left_in`, `io_left_out`);
- every open track end: the left end of column-0 horizontal segments
  (`edge_l_*`), the top end of row-0 vertical segments (`edge_t_*`), and the
  outer sides of the last switch blocks (`edge_r_*`, `edge_b_*`). `*_out`
  carries the resolved track; `*_in` is ORed onto it and must be 0 wherever
  nothing outside drives.

## Logic: BLE and cluster

A **BLE** (`ble`) is a 4-LUT (`lut4`, a 16:1 mux tree over the truth table,
with `in[0]` as the least significant address bit), a rising-edge D flip-flop
with asynchronous active-low reset `rst_n`, and a 2:1 mux choosing the LUT
output (combinational) or the flip-flop (registered).

The **CLB** (`clb`) is fully connected: each of the 16 LUT inputs has its own
14:1 mux over the 10 cluster inputs and the 4 BLE outputs. Each select is 4
bits, so one BLE's selects fill one 16-bit word, as does its truth table.

| select code | source            |
|-------------|-------------------|
| 0 .. 9      | cluster input In_n |
| 10 .. 13    | BLE (code-10) output |
| 14, 15      | constant 0        |

BLE b drives cluster output `Out_b`. All flip-flops share `clk` and `rst_n`.

## Routing: wired-OR tracks

This is the part that differs most from an ordinary RTL block. In silicon,
the routing switches are tri-state buffers, each enabled by one configuration
bit, and a track is a bus that any of several buffers may drive. The RTL has
no tri-states. Each switch contributes `enable & value` to its track, and the
track's value is the OR of all contributions. With at most one enabled driver
per track (the rule any valid bitstream follows) this equals the tri-state bus,
and a track nobody drives reads 0. Every module that can drive a segment
outputs a `*_drv` vector and reads back the resolved `*_seg`; `fpga_top` does
the OR.

**Connection block** (`conn_block`). Each pin reaches 4 of the 16 tracks
(25 %), one configuration bit per tap. Near pin at position p taps tracks
`p, p+4, p+8, p+12`; far pin at position p taps the class shifted by two,
`(p+2) mod 4 + 4k`. Input-pin taps drive the pin from the track. Output-pin
taps drive the track from the pin. Word 0 of the block holds the near taps,
bit `p*4+k` for tap k; word 1 holds the far taps the same way.

**Switch block** (`switch_block`). Every wire meets one wire on each of the
other three sides. The pattern is Wilton's (W = 16):

| pair | side a – side b | wire i on a meets |
|------|-----------------|-------------------|
| 0    | left – top      | (16 − i) mod 16   |
| 1    | top – right     | (i + 1) mod 16    |
| 2    | right – bottom  | (30 − i) mod 16   |
| 3    | bottom – left   | (i + 1) mod 16    |
| 4    | left – right    | i                 |
| 5    | top – bottom    | i                 |

Each meeting is a bidirectional switch made of two buffers. Bit
`2*(pair*16 + i)` drives side a from side b, and bit `2*(pair*16+i)+1` drives
side b from side a. That makes 192 bits, or 12 words.

**Combinational loops.** Routing of this kind is full of structural loops: the
two buffers of a switch, paths around a ring of switch blocks, and a BLE's
feedback into its own cluster. Lint tools and synthesis report them. None of
them closes unless the configuration closes it. Enabling both directions of a
switch latches the pair. A combinational LUT fed by its own output can ring.
Such bitstreams are invalid. Simulators stop on a ring ("did not converge")
just as silicon would oscillate.

**Bus-rule assertion.** `fpga_tile` checks its configuration at every fabric
clock edge once configuration reset is released. The assertion fails on any
of these:
- one of the tile's tracks is driven by two of its switches;
- a switch-block switch is enabled in both directions;
- an input pin has two taps.

Contention between switches of two different tiles on a shared segment is
not checked.

## Configuration

### Word map (per tile, 25 words of 16 bits)

| word   | contents |
|--------|----------|
| 0 – 3  | truth table of BLE 0 – 3 |
| 4 – 7  | input-mux selects of BLE 0 – 3, LUT input k in bits 4k+3..4k |
| 8      | bit b = 1: BLE b registered |
| 9, 10  | CB_V: near (right-side) taps, far (right neighbour's left-side) taps |
| 11, 12 | CB_H: near (bottom-side) taps, far (lower neighbour's top-side) taps |
| 13 – 24| switch block, bit n of the 192 in word 13 + n/16, bit n mod 16 |

The memory lives in `sram_manager`, one per tile: a word-line decoder, a write
port, a registered read port and the cells, here as flip-flops. The original
chip's standard-cell version also replaced its 6T SRAM cells with latches. The
analog read sequence (precharge the bitlines, then fire the sense amplifiers)
is one clocked read here. `cfg_decoder` raises the word line of the addressed
tile.

While `cfg_rst_n` is low, the memory is cleared and its outputs are held at
zero. All switches are then open and all LUTs output 0, so an unprogrammed
array cannot form ring oscillators from whatever its cells hold at power-up.

### Serial port (`cfg_serial`)

A frame is 23 bits, `{tile[1:0], word[4:0], data[15:0]}`, shifted in MSB first
on `cfg_sin`, one bit per rising edge of `cfg_clk` while `cfg_shift` is high.

- **Write:** a one-cycle `cfg_write` pulse writes `data` to `word` of `tile`
  on that edge.
- **Read:** shift in a frame with the wanted address, then pulse `cfg_read`
  for one cycle. The SRAM manager returns the word at that edge. One edge
  later it sits in a 16-bit output register whose MSB is on `cfg_sout`. Each
  further `cfg_shift` cycle presents the next bit. Shifting the next frame in
  therefore reads the previous word out.

`cfg_write` and `cfg_read` must not be high together, nor while `cfg_shift` is
high. An assertion checks this.

**Load order.** Write every tile's word 8 (the registered bits) before its LUT
and select words. Otherwise a BLE that feeds back on itself, such as a counter
bit, is briefly combinational and rings; silicon would oscillate the same way.

### Clocks and resets

| signal      | reaches |
|-------------|---------|
| `clk`       | all BLE flip-flops (rising edge) |
| `rst_n`     | asynchronous clear of all BLE flip-flops |
| `cfg_clk`   | serial port, decoder and SRAM managers |
| `cfg_rst_n` | clears the configuration and isolates the fabric while low |

## Worked example: a 4-bit counter

`tb/fpga_top_tb.sv` maps a 4-bit up-counter with synchronous reset by hand.
The next-state function of the top bit has five inputs (reset plus four state
bits), so it does not fit one 4-LUT. The carry `c = q0 & q1` goes to a second
cluster:

- CLB (0,0): BLE3 = q0, BLE2 = q1, BLE0 = q2, BLE1 = q3, all registered;
  reset enters on `In_0` from `io_top_in[0][0]`.
- CLB (1,0): BLE1 = `In_3 & In_7`, combinational.
- q0: `Out_3` → vertical track 3 → `In_7` of CLB (1,0), inside one
  connection block.
- q1: `Out_2` → horizontal track 2 → switch block (0,0), left 2 → top 14 →
  vertical track 14 → `In_3` of CLB (1,0).
- c: `Out_1` of CLB (1,0) → vertical track 0 → `In_1` of CLB (0,0).

The bench loads all 100 words serially, reads them all back, and runs the
counter through wrap-arounds, a synchronous reset and an asynchronous reset,
watching the bits on the perimeter. `tb/fpga_counter1clb_tb.sv` packs the same
counter into one cluster (reset through `rst_n`, so each bit needs at most four
LUT inputs) in the bottom-right tile. It routes the four bits out through the
other three tiles' connection and switch blocks. `tb/fpga_bits_pkg.sv` has the
helpers that build the words (`set_lut`, `set_sel`, `set_reg`, `set_cb`,
`set_sb`); they are the easiest starting point for a new bitstream.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/fpga_pkg.sv tb/fpga_bits_pkg.sv rtl/*.sv tb/fpga_top_tb.sv \
    --top-module fpga_top_tb -o sim
./obj_dir/sim
```

Substitute any other `tb/*_tb.sv` and its module name. Expect `UNOPTFLAT`
warnings from the routing loops described above. The array size is set by
`NX` and `NY` on `fpga_top`. The tile address field of the serial frame
widens with it (`$clog2(NX*NY)` bits). The testbenches are written for the
default 2 x 2.

## Departures from the original and limits

- **Tri-state routing as wired OR.** The behaviour matches the tri-state bus
  for valid bitstreams only. Contention between two enabled drivers shows up
  as OR, not as an electrical conflict.
- **Pin-to-track pattern and Wilton permutation** are this implementation's
  choices. The original gives only the flexibility (25 %, three wires per
  switch-block wire). A bitstream generator for the original chip would not
  match these bits.
- **Word map, select encoding, serial frame and strobes** are this
  implementation's own.
- **No I/O blocks.** The perimeter is plain ports (see above).
- **SRAM as flip-flops, no sense amplifiers, no precharge.** The analog parts
  (6T cell, sense amplifier, pull-ups) are not modelled. No configuration
  scrubbing is built in, but readback allows it from outside.
- **Configuration reset** that clears the memory and isolates the fabric is
  an addition.
- Verified by simulation only: each block against an independent reference
  model, and the whole array with the two counter mappings. Timing, area and
  the analog behaviour of the original silicon are out of scope.

## Files

| file | contents |
|------|----------|
| `rtl/fpga_pkg.sv` | architecture constants, word map, Wilton and tap functions |
| `rtl/lut4.sv`, `rtl/ble.sv`, `rtl/clb.sv` | logic |
| `rtl/conn_block.sv`, `rtl/switch_block.sv` | routing |
| `rtl/sram_manager.sv`, `rtl/cfg_decoder.sv`, `rtl/cfg_serial.sv` | configuration |
| `rtl/fpga_tile.sv`, `rtl/fpga_top.sv` | tile and array |
| `tb/*_tb.sv` | one testbench per module, plus the single-cluster counter |
| `tb/fpga_bits_pkg.sv` | bitstream-building helpers for the testbenches |
