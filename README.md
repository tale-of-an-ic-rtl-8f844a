# Two-line HDB3 encoder/decoder

A serial bit stream is sent over two wires, `tx0` and `tx1`, instead of one.
Every '1' of the input goes out as a pulse on one of the two wires, and the
wires take turns. A '0' sends nothing. A plain code like that loses clock
information when the input is quiet, so no run of zeros is allowed on the
wires. Whenever four '0's arrive in a row, the encoder sends a fixed
four-cycle **special pattern** instead:

| cycle | 1 | 2 | 3 | 4 |
|-------|---|---|---|---|
| tx0   | 1 | 0 | 0 | 1 |
| tx1   | 0 | 1 | 1 | 0 |

The decoder turns the two wires back into one stream. It recognises the
pattern and puts four '0's back in its place, and it flags anything a correct
encoder cannot produce. This is the idea of HDB3 (high-density bipolar, order
3), carried on two unipolar lines instead of one three-level line.

The whole core (`hdb3_complete`) also holds the test logic that was put on
the same chip:
* a 15-stage pseudo-random generator, used as a data source;
* a switch between that source and a manual input pin;
* a switch that either loops the encoder back into the decoder or feeds the
  decoder from two manual pins.

Every flip-flop has an asynchronous active-low clear and preset, and all of
them switch on the rising edge of one clock.

```
            in_toggle                       a
               |                            |
 prbg --prbs-->+                  tx0/tx1-->+
               | stim_switch --> encoder    | stat_switch --> decoder --> main_out
 ser_data ---->+                  rx0/rx1-->+                         --> error flags
```

## Files

| file | contents |
|------|----------|
| `rtl/hdb3_pkg.sv` | run length (4), the two pattern words, the decoder error struct |
| `rtl/d_flipf.sv` | D flip-flop with clear and preset (`_CLR`, `_PRE`) |
| `rtl/dff_01.sv` | D flip-flop with reset and set (`_R`, `_S`), used for the line outputs and the PRBG |
| `rtl/tff.sv` | toggle flip-flop with a toggle enable |
| `rtl/shift_reg.sv` | four-stage shift register of `d_flipf`, with Q and QN of every stage |
| `rtl/counter.sv` | four-cycle window counter, shared by the encoder and the decoder |
| `rtl/line_select.sv` | chooses the wire for each '1' and drives the pattern during a window |
| `rtl/encoder.sv` | shift register + zero-run detect + counter + line selector |
| `rtl/decoder_parts.sv` | pattern detect, output rebuild and error flags |
| `rtl/decoder.sv` | two shift registers + counter + `decoder_parts` |
| `rtl/prbg.sv` | 15-stage XNOR pseudo-random bit generator |
| `rtl/stim_switch.sv` | data-source multiplexer |
| `rtl/stat_switch.sv` | loop-back / manual-input multiplexer in front of the decoder |
| `rtl/hdb3_complete.sv` | top level |
| `tb/hdb3_ref_pkg.sv` | cycle models of the encoder and decoder, written from the rules below and shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Encoder

### Zero-run detection

`ser_data` is shifted into a four-stage register. Stage 0 is the newest bit.
Stage 3 (`q3`) is the bit about to be coded. `big_in` is high when all four
stages are 0. The original cell builds it from a NAND of the four QN outputs
and an inverter, and it is written the same way here.

### The window counter

`counter` turns `big_in` into a window four clock cycles long:
* `spec_en` is high for the four cycles of the window.
* `{q1,q0}` counts 0, 1, 2, 3 through the window.
* `xnor(q0,q1)` therefore gives 1, 0, 0, 1, which is the tx0 pattern. Its
  inverse is the tx1 pattern.

`spec_en` is `~idle | big_in`. It rises combinationally in the same cycle
that `big_in` goes high. That cycle already codes the first pattern bit, so
the four zeros that sit in the register are exactly the four bits that the
window replaces.

The counter is built from three toggle flip-flops, as in the original cell:
two phase bits and an "idle" bit. A `big_in` that arrives during a window is
ignored. When a window ends and `big_in` is still high, the next window
starts immediately. So:
* a run of 8 zeros becomes two patterns back to back;
* a run of 5 to 7 zeros becomes one pattern followed by ordinary zeros.

Ordinary zeros are nothing on both wires for one to three cycles, which is
legal.

The original counter stops by presetting its TFFs and runs from a gated
clock. Here every TFF is on the main clock and has a toggle enable `t`. This
gives the same sequence without clock gating.

### Line selection

`line_select` registers both outputs in `dff_01` flip-flops, so `tx0`/`tx1`
are free of glitches.
* During a window, `tx0 = xnor(q0,q1)` and `tx1 = ~xnor(q0,q1)`.
* Outside a window, a '1' on `q3` goes to the wire chosen by a turn flip-flop
  (a TFF). The turn toggles after each '1' that is sent.
* A pattern does not change the turn.
* After clear, the first '1' goes to `tx0`.

Timing: a bit sampled from `ser_data` at rising edge *n* is on `q3` after
edge *n+3*. Its code is on `tx0`/`tx1` after edge *n+4*.

After clear the register holds 0000. The encoder therefore starts by sending
one special pattern, and the decoder recognises it like any other.

## Decoder

`rx0` and `rx1` each feed a four-stage shift register (`a` and `b`, stage 3
oldest). `decoder_parts` looks at all eight stages:

* **Pattern detect** (`sp_state`): `a == 1001 && b == 0110`. This starts the
  decoder's own copy of `counter`. Its window `sp_en` covers the four cycles
  in which the pattern passes stage 3.
* **Rebuilt data** (`main_out`): 0 inside the window, otherwise
  `a[3] | b[3]`.
* **Errors**, each about the bit on stage 3, so they line up with `main_out`:

| flag (pin, active low) | condition |
|---|---|
| `both_2ones_n` | `a[3]` and `b[3]` both 1 |
| `d0_2ones_n` | `a[3]` 1 in this cycle and the previous one, and neither cycle is part of a special window |
| `d1_2ones_n` | the same on line 1 |
| `four_zeros_n` | all eight stages 0, i.e. four cycles with both lines 0 |
| `error_n` / top `error` | any of the four (`error` on the top is active high) |

The exemption in the two "consecutive ones" rules is the subtle part. The
pattern itself puts two '1's in a row on line 1. A pattern can also start or
end with a '1' on line 0 right next to an ordinary '1' on line 0. This
happens because the turn flip-flop does not take part in the pattern. So a
pair of '1's is only an error when both cycles are outside a window. Three
extra flip-flops in `decoder_parts` keep the previous stage-3 bits and the
previous window flag for this purpose.

The four-zeros rule uses both lines together. One line alone is often quiet
for four cycles or more in a correct stream. For example, in `1000 1000 ...` the
marks alternate, so each line carries a '1' only once every eight cycles.

### Latency

A bit sampled at edge *n* in the encoder reaches the decoder's stage 3 after
edge *n+8*. `main_out` is combinational from there. Counting the sampling edge,
the bit appears at the output nine clock edges after it entered. The
end-to-end testbench checks this for every bit.

## Pseudo-random generator (`prbg`)

The generator is a 15-stage shift register of `dff_01` with XNOR feedback from
stages 15 and 14 (x^15 + x^14 + 1):
* Its period is 32767 bits, and each period holds 16383 ones.
* The XNOR output is both the serial output `tx_prbs` and stage 0's input.
* Clear sets all stages to 0. With XNOR feedback that state starts the
  sequence.
* Preset sets all stages to 1. That is the one state an XNOR generator locks
  up in, so after a preset the output stays at 1 until the next clear.

The 15-stage length is the original one. The tap positions are this design's
choice.

## Test switches and top-level pins

| pin | meaning |
|-----|---------|
| `in_toggle` | 1: PRBG drives the encoder; 0: `ser_data` does |
| `a` | 1: `tx0/tx1` loop back into the decoder; 0: the decoder reads pins `rx0/rx1` |
| `clr_n`, `pre_n` | asynchronous clear and preset of every flip-flop, active low; clear wins when both are low |
| `q3`, `big_in`, `spec_state` | encoder internals: bit being coded, zero run detected, encoder window |
| `sp_st_out`, `sp_en`, `a_shift`, `b_shift` | decoder internals: pattern found, decoder window, stage 3 of each line |
| `prbs_out` | generator output |

## Where this RTL departs from the original circuit

The original was a full-custom CMOS chip. Its gate-level schematics were the
reference for the block structure, but the following differ:

* **One clock, no gated clocks or ripple counters.** The original clocks its
  counter TFFs from a gated clock and from each other, and clocks the turn
  TFF of the line selector through a gate. Here everything is on `clk`, with
  enables. Cycle behaviour is kept; the edge-to-edge skew of the original is
  not modelled.
* **Flip-flops are behavioural.** The original D flip-flop is a master/slave
  pair of latches. Here it is an edge-triggered `always_ff`. Transmission
  gates, buffers and single gates of the cell library appear as operators.
  The pad ring is not included.
* **Clear and preset share one asynchronous load** (`async_n = clr_n & pre_n`,
  value `clr_n`). This gives clear priority and keeps every flop a single-load
  cell for synthesis.
* **Four-zeros rule.** The original specification gives this rule once as
  "either line" and once as "both lines". This design uses "both lines"
  (see above).
* **Pattern exemption on line 0.** The original specification exempts the
  special pattern from the consecutive-ones rule on both lines. The original
  circuit, however, exempted only line 1. The fabricated chip then raised
  `D0_2ones` every few dozen clocks even though its output data was correct.
  That fits a '1' on line 0 that sits next to a pattern's '1' on line 0,
  which a correct encoder does produce. This design exempts both lines, so correct streams never raise a
  flag. The exact cycles covered by the exemption are this design's own
  choice.
* **Decoder internals.** The original decoder's error network is not known
  in detail, and it was purely combinational. `decoder_parts` is the
  simplest logic that follows the rules. It adds three flip-flops and a
  clock input, because a combinational version cannot tell whether a '1'
  next to a pattern belongs to it before the whole pattern has arrived.
* **Counter restart.** Back-to-back windows on long zero runs follow from
  this counter's design. Both encoder and decoder use the same counter, so
  they agree.
* **PRBG taps** are chosen, not taken from the original.
* **Speed.** The original targeted a few hundred MHz in silicon, limited to
  about 33 MHz by its pads. The RTL has no timing of its own. Its deepest
  path is the decoder's 8-bit pattern compare feeding the error OR.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. The
package files must come first:

```
verilator --binary --timing --assert -Irtl --top-module tb_hdb3_complete \
    rtl/hdb3_pkg.sv tb/hdb3_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v hdb3_pkg) tb/tb_hdb3_complete.sv
./obj_dir/Vtb_hdb3_complete
```

For a block testbench, swap the top module and the last file.

`tb_hdb3_complete` runs the whole core at its default size:
* about 18500 cycles in five phases:
  * PRBG loop-back;
  * manual input with zero runs up to 16 bits;
  * manual decoder input with every kind of error;
  * the decoder fed from the rx pins, with those pins wired back to the tx
    pins;
  * preset followed by clear;
* every output is compared with the reference models in every cycle;
* it counts sixteen mechanisms, among them the encoder window, the decoder
  pattern detect, back-to-back windows, each error kind, each switch
  setting, preset and the nine-edge latency. A mechanism that never occurs
  is a failure.

The block testbenches (`tb_counter`, `tb_line_select`, `tb_decoder_parts`, ...)
drive their module with random and directed input and compare against the
same models or against closed-form expectations. For example, `tb_prbg`
checks the period and the number of ones.
