# 8-bit parallel-to-serial converter for an OFDM baseband transmitter

In an OFDM transmitter the IFFT produces its samples as parallel words, but
the stages after it, the cyclic-prefix insertion and finally the RF front
end, take a single serial stream, and a chip rarely has the pins to bring
a whole word out at once. This converter bridges the two: it takes an 8-bit
word in one clock and sends it out on one wire, one bit per clock, most
significant bit first.

It is a shift register with a parallel load. Its whole behaviour fits in
three rules:

1. On a rising clock edge with `load` high, the word on `d` is copied into
   the register. The register's top bit drives `dout`, so `d[7]` is on the
   output from that edge on, and stays there for as long as `load` is held.
2. On a rising edge with `load` low, the register moves one place toward the
   top and a `0` enters at the bottom. `dout` shows `d[6]`, `d[5]`, ...
   `d[0]` on the next seven edges.
3. Once all eight bits are out, the zeros that came in behind them reach the
   top, and `dout` stays low until the next load.

## Load and shift timing

This is the part to get right when connecting the converter. Inputs are
sampled on the rising edge of `clk`; `dout` comes straight from a flip-flop
and changes just after that edge. With a word `w` loaded by a one-cycle
`load` pulse:

| rising edge | `load` sampled | `dout` after the edge |
|-------------|----------------|-----------------------|
| 0           | 1              | `w[7]`                |
| 1           | 0              | `w[6]`                |
| 2           | 0              | `w[5]`                |
| ...         | 0              | ...                   |
| 7           | 0              | `w[0]`                |
| 8 and later | 0              | `0`                   |

- A word occupies exactly eight clock periods on `dout`: edges 0 to 7.
- The next word can be loaded on edge 8, right after the last bit. There is
  no gap, so words can follow each other with no idle bit.
- Holding `load` high for `n` edges re-captures `d` on each of them. The
  first bit then lasts `n` periods, and the other seven follow after `load`
  falls.
- `d` is ignored while `load` is low. The source may change it as soon as
  the load edge has passed.
- A load in the middle of a word wins. The rest of the old word is dropped
  and the new word starts at once, MSB first.
- The first bit is the MSB `d[7]` and the last is `d[0]`. A receiver that
  shifts bits in at the bottom gets the word back in its original order.

At 100 MHz (a 10 ns period), a word therefore leaves in 80 ns. That is a
stream of 100 Mbit/s, or 12.5 Mwords/s if words are loaded back to back.

## Reset

`rst_n` is an active-low, asynchronous reset that clears the register, so
`dout` is low. The original converter has no reset: its output is
undefined until the first load. The reset makes `dout` low from power-up,
the same idle level that follows every word. It is this design's addition.
Tie `rst_n` high if it is not wanted.

## Ports

Both `serial_converter` and the top `p2s_chip_core` have these ports:

| port    | dir | width   | meaning                                      |
|---------|-----|---------|----------------------------------------------|
| `clk`   | in  | 1       | clock, rising edge                           |
| `rst_n` | in  | 1       | asynchronous reset, active low               |
| `load`  | in  | 1       | synchronous load strobe, active high         |
| `d`     | in  | `WIDTH` | parallel word                                |
| `dout`  | out | 1       | serial output, MSB first, registered         |

`WIDTH` defaults to 8 through `p2s_pkg::P2S_WIDTH`. Any width of 2 or more
works, and the timing table holds with 8 replaced by `WIDTH`.

## Structure

- `rtl/p2s_pkg.sv`: the shared word length.
- `rtl/serial_converter.sv`: the register. It is one `always_ff` block with
  a 2:1 choice per bit between `d` and the bit below, plus assertions. One
  assertion checks that `dout` equals the loaded MSB after a load. The
  other checks that `dout` equals the next bit after a shift.
- `rtl/p2s_chip_core.sv`: the top. It is the logic that sits inside the
  chip's pad ring, with one port for each pad signal. On the chip there is
  one input pad per data bit, one each for `clk` and `load`, and one
  output pad for `dout`.

After synthesis the design is 8 flip-flops with asynchronous clear and 8
two-input multiplexers.

## What is not here

- **I/O pads.** The input and output pad cells, corner cells and pad
  placement belong to the cell library and the layout. They are not
  modelled: their only logic function is a buffer.
- **Neighbouring OFDM blocks.** The IFFT that supplies `d` and the cyclic
  prefix stage that takes `dout` are outside this design. Nothing here
  fixes how many words make up an OFDM symbol or how the prefix is formed.
- **Physical results.** An earlier standard-cell implementation of the same
  converter ran at up to 204 MHz at the typical corner, in about
  0.16 mm² of total area, at 0.0294 mW. Those figures depend on the cell
  library, the pads and the layout, so this RTL cannot reproduce them. The
  RTL has a single multiplexer level between flip-flops.

## How far it can be trusted

The load, shift, MSB-first order and zero fill follow the original
converter exactly. Three things are this design's own choices:

- the asynchronous reset;
- the `WIDTH` parameter;
- the assertions.

The behaviour when `load` arrives in the middle of a word was not stated
for the original. This design does what its register does: the load wins.

The reference test pattern is the word `10101010`, given in two forms that
disagree on bit order. As a string on a `7 downto 0` vector it means
`d[7] = 1`. In the accompanying waveform figure it is printed with `d[0] = 1`.
The testbenches run both words.

## Simulation

Three self-checking testbenches each end with a line
`TB_RESULT checks=N failures=M`:

- `tb/tb_serial_converter.sv` tests the register against a reference. The
  reference remembers only the last word loaded and how many shifts have
  passed since. The test covers single and held loads, back-to-back words,
  reloads mid-word, 2000 cycles of random traffic and an asynchronous
  reset. It checks that every bit appears on the right edge.
- `tb/tb_p2s_chip_core.sv` tests the top at its default size. A source
  sends words, and a sink rebuilds each word from `dout` and compares.
  The sink also checks that each word takes eight periods and that `dout`
  returns low afterwards. It counts each scenario (held load, back-to-back
  word, drain to low, mid-word reload, reset) and fails if one never
  happened.
- `tb/tb_p2s_doc_pattern.sv` replays the reference stimulus on the top. It
  uses a 100 MHz clock with its first rising edge at 5 ns, `d = 10101010`
  and a load pulse over the first high phase. It checks `dout` at absolute
  times. The reference raises `load` at the same instant as the clock edge.
  Here it rises 1 ns earlier, so the edge samples it without a race.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
        -y rtl +libext+.sv --top-module tb_p2s_chip_core \
        rtl/p2s_pkg.sv tb/tb_p2s_chip_core.sv -o sim
    ./obj_dir/sim

Use `tb_serial_converter` or `tb_p2s_doc_pattern` in place of
`tb_p2s_chip_core` for the other two. Each one finishes in well under a
second.
