# SerDes digital core with a built-in test module

This is the digital half of a small PCI-Express-1.0-style SerDes (serializer/deserializer). Around it sits a test module that can take each part of the link apart on a finished chip:

- it can drive any block from a test pin, from a neighbouring block or from an on-chip pseudo-random generator;
- it can bring any block's output out to a pin;
- it can compare, on chip, what went into a loop with what came out.

Fifteen operating modes select these paths. A 24-bit serial configuration word loads the mode.

The link itself is conventional:

- **Transmitter:** an 8b/10b encoder followed by a serializer.
- **Receiver:** an oversampling clock-recovery front end, a comma-aligned deserializer and an 8b/10b decoder.

The parallel side of both carries 9-bit characters: bit 8 is the control (K) flag and bits 7:0 are the byte. The analog receiver, the analog line drivers and the pad buffers are full-custom cells and are not part of this RTL. Their digital-side signals are ports of the top module `serdes_top`.

## Block diagram in words

```
               testIn ─┐
 rxpcie_out (analog RX)─┼─[A]─► rx_digital ─► rx_data, rx_clk
      tx_pcie (TX out) ─┤            │
LFSR transmitter out ───┘            ▼ (gated in loop-BIST modes)
                     tx_data ─┐
     received character ──────┼─[B]─► tx_digital ─► tx_pcie
         LFSR character ──────┘
 tx_pcie / testIn / analog RX (modes 3, 7) / LFSR bit ─[C]─► txa_data_p, txa_data_n (= ~)
 tx_pcie / analog RX ÷ 4 / LFSR transmitter out       ─[D]─► testOut_P, testOut_N (registered)
 {0, tx_pcie} / rx_data                               ─[E]─► comparator output side
```

Each multiplexer (A–E) has a 2-bit selector. `mux_decode` turns the 4-bit mode into all five selectors at once. Unused selector codes fall back to input 0.

## Operating modes

| Mode | Name | Path | A B C D E |
|---|---|---|---|
| 0 | normal | analog RX → RX digital; tx_data → TX digital → analog TX | 10 00 00 00 00 |
| 1 | RXD | testIn → RX digital → rx_data | 01 00 00 00 00 |
| 2 | TXA | testIn → analog TX | 00 00 01 00 00 |
| 3 | RXA, divided | analog RX ÷ 4 → testOut | 00 00 00 01 00 |
| 4 | TXD | tx_data → TX digital → testOut | 00 00 01 00 00 |
| 5 | RXD loop | testIn → RX → TX → testOut | 01 01 10 00 00 |
| 6 | TXD loop | tx_data → TX → RX → rx_data | 00 00 00 00 00 |
| 7 | RXA loop | analog RX → analog TX | 00 00 10 00 00 |
| 8 | full loop, serial BIST | analog RX → RX → TX → analog TX | 10 01 00 00 00 |
| 9 | serial LFSR | LFSR bit stream → analog TX | 00 00 11 00 00 |
| 10 | LFSR full loop, parallel BIST | LFSR → TX → analog TX ⇒ (external) ⇒ analog RX → RX | 10 10 00 00 01 |
| 11 | LFSR digital loop, parallel BIST | LFSR → TX → RX | 00 10 00 00 01 |
| 12 | tx_data full loop, parallel BIST | tx_data → TX → analog TX ⇒ analog RX → RX | 10 00 00 00 01 |
| 13 | LFSR RX full loop, serial BIST | LFSR TX → testOut ⇒ analog RX → RX → TX | 10 01 00 10 00 |
| 14 | LFSR RX digital loop, serial BIST | LFSR TX → RX → TX → testOut | 11 01 00 00 00 |

"⇒" is a connection outside the chip: a cable, or the test board. Code 15 behaves like mode 0.

In two places the original mode tables disagree with each other.

- **Mode 3:** multiplexer D selects the divided analog signal (D = 01). That is the only reading in which mode 3 does anything.
- **Mode 10:** multiplexer E selects the received characters (E = 01), like modes 11 and 12. The parallel comparator needs them.

## Clocking and line format

There is one clock, `ref_clk`.

- `clock_divider` makes eight one-cycle phase strobes from it, so a serial bit lasts eight `ref_clk` cycles.
- Phase 0 moves the serializers.
- Phase 7 steps the LFSR in the serial-pattern mode.
- Phase 4 is the mid-bit point where the comparator samples the transmitter output.
- A character (ten bits) takes 80 cycles.

Nothing in the RTL uses a derived clock. The two exceptions are the serial configuration register, which has its own pins, and the divide-by-four on the analog receiver signal.

On the line, 10-bit codes are sent with bit `a` first. Internally a code is held with `a` at bit 0.

The comma used by the test module is K28.7 (`9'h1FC`). The receiver aligns on either polarity of the comma pattern `0011111` / `1100000`, so K28.1, K28.5 and K28.7 all align it.

## Digital receiver (`rx_digital`, `deserializer`, `dec8b10b`)

1. The line goes through a two-flop synchroniser.
2. A 3-bit phase counter restarts at 1 on every line edge, and the bit is sampled when the counter reaches 4, roughly mid-bit. This tolerates a cycle of edge jitter either way.
3. Sampled bits enter a 10-bit window.
4. When the oldest seven bits of the window form a comma, the word boundary is set there and the window is emitted at once as a character. From then on, a character is emitted every ten bits.
5. The running disparity restarts from the comma's own polarity.
6. `dec8b10b` decodes the held code. It flags sub-blocks that are not in the code (`code_err`) and disparity violations (`disp_err`).

`data_valid` and `rx_clk` pulse for one cycle per character. The character leaves about 88 cycles after its first bit arrives, which is within two bit periods of its last bit.

## Digital transmitter (`tx_digital`, `serializer`, `enc8b10b`)

- Every 80 cycles the serializer takes the encoded character. In the same cycle it pulses `tx_frame_started`, which is the transmitter's "character taken" strobe.
- The running disparity is kept next to the shift register.
- The encoder implements the full 8b/10b code, including the alternate x.7 form and the twelve control characters.

`disp_clear` forces the next character to be encoded at negative disparity. Its purpose is explained under "Why the loop tests work" below.

## Test pattern generator (`lfsr`, `test_ctrl`)

The LFSR is a 10-bit shift register. It shifts left, with `state[9] ^ state[5] ^ state[4]` fed into bit 0, and its serial output is `state[9]`. It updates on `enable` or `load`, and a load takes the seed. With these taps the sequence from seed 1 has period 63. The taps were kept as designed, and a burst uses only 15 states.

**Parallel modes (10, 11, 13, 14).** The pattern goes out in bursts of 16 characters:

- first the K28.7 comma;
- then the seed's low byte (`0x01`, which encodes as D1.0);
- then 14 further LFSR states, as data bytes (K = 0).

Each character the transmitter takes advances the LFSR. The character that would be the 17th reloads the seed and starts the next burst with the comma. Modes 10 and 11 go through the main transmitter; modes 13 and 14 go through the second "LFSR transmitter".

**Serial mode (9).** The LFSR shifts once per bit period, with seed `0011111000`. It is reseeded every 160 bit periods, the length of a 16-character burst.

Any change of mode reloads the seed and restarts the burst.

## The BIST comparator (`comparator`)

The comparator records up to 16 entries on each side of the loop under test:

- the **input side** is what went in;
- the **output side** is what came back.

It keeps one result bit per position. `result[k]` is 1 only when both sides recorded entry k and the two are equal. The chip shows one of them, `result[bist_sel]`, on the `bist` pin. To read all 16, rewrite the configuration word with the same mode and a new `bist_sel`; the results are held as long as the mode does not change.

All state clears when a BIST mode is entered. The enables drop for the cycle of a mode change, so even two BIST modes in a row start clean.

The hard part is lining up the two sides: the loop has an unknown latency, and in the serial modes it also has an unknown bit phase.

**Parallel mode (10–12).**

- The input side stores the characters the transmitter takes, skipping commas.
- The output side stores the characters the receiver decodes, also skipping commas. It starts at the first character equal to input entry 0.
- Because every LFSR burst starts with the comma and then `0x01`, entry 0 is `0x01`, and the output side locks onto the matching character.
- In mode 12 the user's `tx_data` stream plays the same role. It should start with a K28.7 so that the receiver is aligned before the data arrives.

**Serial mode (8, 13, 14).**

- The input side watches the bit stream the receiver recovers and slides a 10-bit window over it. It starts storing when the window equals D1.0 at negative disparity (`a..j = 0111010100`), and from then on stores every ten bits as one entry.
- The output side samples the transmitter's serial output at mid-bit. It starts when its window equals input entry 0, then stores every ten bits.
- Whole codes are compared, so a disparity or bit-order error shows up as well as a data error.

### Why the loop tests work: gate and disparity

In modes 8, 13 and 14 the receiver's characters are fed back into the transmitter. Two details make the re-encoded stream bit-identical to the incoming one.

1. **The receiver→transmitter gate.** Until a data character arrives directly after a received K28.7, the transmitter is fed `0x00` (D0.0). D0.0 keeps the running disparity where it is. A stray comma pattern seen while the receiver is still finding its word boundary does not open the gate, because it must decode as K28.7 and be immediately followed by data.
2. **Disparity on a mode change.** A mode change clears both transmitters to negative running disparity.

Together these mean the first character the loop forwards is encoded from the same disparity as the incoming stream. The serial comparator's fixed marker (D1.0 at negative disparity) then appears on both sides.

For mode 8 the external stream must follow the same convention:

- idle in D0.0 at negative disparity;
- then K28.7 and D1.0;
- then the data.

The LFSR bursts of modes 13 and 14 have this form by construction.

## Serial configuration (`serial_config`)

Twenty-four bits are shifted in on the rising edge of `configClk`, most significant first, with the new bit entering bit 0. A rising edge of `setConfig` copies them to the outputs:

| Bits | Field |
|---|---|
| 23:16 | settings of the negative analog transmitter (`trans_config_n`) |
| 15:8 | settings of the positive analog transmitter (`trans_config_p`) |
| 7:4 | `bist_sel` |
| 3:0 | `mode` |

Reset clears all fields, which selects mode 0.

## Other blocks

- **`freq_div`:** divides the analog receiver's output by four, so a fast analog signal can be watched on the test pin. It is clocked by that signal and is live only in modes 3 and 7; otherwise its input is held low.
- **`bypass_mux`:** the parameterised routing multiplexer.
- **`serdes_pkg`:** the modes, the selector struct and the shared constants.
- **`code8b10b_pkg`:** the 8b/10b sub-block tables.

## Where this RTL departs from the original design

- **Clocking.** The original clocks blocks from an eight-phase divided clock. Here one `ref_clk` is used with one-cycle phase strobes.
- **Mode table.** The mode 3 and mode 10 selector values are as described under "Operating modes".
- **Multiplexer E, input 0.** It carries the transmitter's serial output, which the serial comparator needs. The original left this input unconnected.
- **Serial comparator input side.** It always takes the receiver's recovered bits, instead of the raw input pin or LFSR transmitter output.
- **LFSR characters.** They are always sent as data bytes (K = 0), so no invalid control character can appear. The burst is counted in characters rather than in bit periods; both give 160 bit periods.
- **LFSR hold.** The LFSR holds still in modes that do not use it.
- **Additions.** The receiver gate rule, the disparity clear and the comparator clear on a mode change are this design's additions. They are needed for the loop tests to pass reliably.
- **Pad buffers.** The buffer chains of the original are plain wires.

## Limits

- At one bit per eight `ref_clk` cycles, the PCIe 1.0 rate of 2.5 Gb/s would need a 20 GHz `ref_clk`. The specified 1.25 GHz clock gives about 156 Mb/s. The rate was not a goal of this RTL.
- The analog receiver, the analog transmitters and the pads are not modelled. `rxpcie_out` stands for the analog receiver output, and `txa_data_p/n` and `trans_config_p/n` go to the line drivers.

## Files

`rtl/` has one module or package per file. `tb/` has one self-checking testbench per block:

- `tb_serdes_top` takes the top through all fifteen modes at its default parameters.
- It checks the 80-cycle character rate, the 160-bit serial LFSR reload and the reception of the LFSR bursts.
- It checks that all 16 BIST entries pass in each BIST mode, and that a corrupted loop makes some fail.

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert \
    rtl/serdes_pkg.sv rtl/code8b10b_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
    tb/tb_serdes_top.sv --top-module tb_serdes_top -o sim
./obj_dir/sim
```

Any other block is built the same way, by naming its testbench instead. The end-to-end test runs in well under a second.

The top's testbench closes the external loops itself:

- In modes 0, 10 and 12 it ties `rxpcie_out` to `txa_data_p`.
- In mode 13 it ties `rxpcie_out` to `testOut_P`.
- Otherwise it drives `rxpcie_out` and `testIn` from its own 8b/10b stream generator.
