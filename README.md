# CCSDS (7, ½) convolutional codec for a nano-satellite FPGA

A small satellite's radio link is limited by transmit power and antenna size,
so forward error correction is the cheapest way to make the link more
reliable. This RTL implements the CCSDS-recommended convolutional code with
constraint length 7 and rate ½:

- a **convolutional encoder** for the transmit side. It is a few flip-flops
  and XOR gates.
- a **hard-decision, trace-back Viterbi decoder** for the receive side. It
  has 64 trellis states and 32 parallel add-compare-select butterflies. It
  decodes the received stream in blocks of `TB` branch-words (the
  trace-back depth, 35 by default).

Both sit side by side in `channel_codec_top`. The channel between them
(modulator, radio, demodulator) is outside this RTL. The design follows a
published FPGA implementation that targeted low-cost Artix-7, Cyclone V and
IGLOO2 parts. Where that source left details open, the choices made here are
listed under "Design choices and departures" below.

## The code and how states are numbered

Generator polynomials are G1 = 171 and G2 = 133 (octal). In each
polynomial the MSB taps the current input bit and the LSB taps the bit six
steps back. Each input bit produces the two symbols C1 (from G1) and C2 (from
G2). C2 is sent **inverted**, as CCSDS requires, so that long runs of zeros
or ones still give symbol transitions.

The encoder state is the 6-bit register `s[5:0]`, with `s[5]` holding the
newest input. An input `b` moves the state from `s` to `{b, s[5:1]}`. This
numbering gives the trellis a simple structure, which every decoder block
relies on:

- **Butterflies.** States `2k` and `2k+1` (call them A and B) both lead to
  states `k` and `k+32`. There are 32 such butterflies.
- **Input bit.** The input that caused a transition is the MSB of the
  destination state.
- **Decision bit.** The surviving source of a destination is A or B. Its
  LSB (0 or 1) is the only thing that has to be stored.
- **Branch labels.** The branch A→k and the branch B→(k+32) carry the same
  code word. So do A→(k+32) and B→k. Each butterfly therefore needs only two
  branch metrics, `bm_top` and `bm_bot`. `acs_top` works out, at elaboration
  time, which of BM0..BM3 these are, using `codec_pkg::branch_word`.

## Encoder (`conv_encoder`)

The encoder runs one operation every five clocks. `enc_signal_gen` is a
mod-5 counter:

| cycle of operation | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| `din_strobe` (enc_ctrl) | 0 | 1 | 0 | 0 | 0 |
| `dout_valid` (mux_ctrl) | 0 | 0 | 0 | 1 | 1 |
| `dout` | – | – | – | C1 | C2 inverted |

In cycle 2, `conv_encoder_core` samples `din`, registers C1 and inverted C2,
and shifts the register. In cycles 4 and 5, `enc_selector` serialises the
two symbols. A toggle flip-flop in `enc_selector` tells the two cycles
apart.

Rates: input bit rate = f_clk / 5, symbol rate = 2·f_clk / 5. To terminate a
message, append six or more zeros so the register returns to state 0. The
test stream uses seven.

## Decoder (`viterbi_decoder`)

### Per-word pipeline

`dec_control` moves every received branch-word through six clock phases:

| phase | strobe | action |
|---|---|---|
| 0 | `bmsig` | word accepted (`sym_valid && sym_ready`). `bmu` registers the Hamming distances BM0..BM3 to 00, 01, 10, 11. |
| 1 | `muxsig` | `pm_mux` loads the ACS input metrics. After reset it loads the initial set: 0 for state 0 and 200 ("unreachable") for the rest. After that it loads the previous ACS results. |
| 2 | `acssig` | `acs_top` registers 64 new path metrics and a 64-bit decision vector. |
| 3 | `musig` | The decision vector is written to word `t` of the current RAM block. |
| 4, 5 | – | idle |

The decoder therefore accepts at most one word every six clocks, so its
information rate is f_clk / 6. If no word is offered, the sequence waits in
phase 0.

Each `acs_unit` computes, for one butterfly:

```
dec0 = (PM_A + bm_top) > (PM_B + bm_bot)   -> new PM of state k    = the smaller sum
dec1 = (PM_A + bm_bot) > (PM_B + bm_top)   -> new PM of state k+32 = the smaller sum
```

On a tie the decision keeps source A.

### Blocks, RAM banks and trace-back

This is the part that needs the most care. The path metrics run on
continuously from reset. Decisions, however, are grouped into blocks of
`TB` consecutive words.

1. **Memory unit (`dec_memory`).** There are three RAM blocks, each of
   `TB` × 64 bits (6720 bits in total at TB = 35). Two one-hot 3-bit FSMs
   select the blocks:
   - the write select names the block being filled;
   - the read select names the block being traced back. It stays one block
     behind the write select.

   Both FSMs step together (`memwrite`, `memread`) when the last word of a
   block is written. Reads are synchronous, like block RAM.
2. **Minimum search (`minu`).** Two clocks after the block's last ACS
   update, `minsig` starts a five-stage pipelined search for the state with
   the smallest path metric. The stages reduce 64 → 16 → 8 → 4 → 2 → 1. On a
   tie the lower index wins.
3. **Trace-back (`tbu`).** Starting from that state, the unit walks the
   block backwards, one time step per clock. At each step:
   - the state's MSB is the decoded bit;
   - the decision bit for this state is read from the stored decision
     vector;
   - the previous state is `{state[4:0], decision}`.

   The control unit reads RAM words TB‑1 down to 0, each one cycle ahead of
   the step that uses it.
4. **Output.** Each block's `TB` bits come out **newest first**.
   `out_last` marks the oldest bit of the block. Putting the bits back into
   time order is left to the consumer (a TB-bit LIFO). Every testbench here
   does this.

Trace-back of a block takes TB + 5 clocks. The next block takes at least
6·TB clocks to arrive, so the two overlap freely.

**Latency.** The first decoded bit appears **6·TB + 5 clocks** after the
block's first word is accepted, when the words arrive back to back. That is
215, 299 and 425 clocks for TB = 35, 49 and 70.

**Accuracy limit.** Each block is traced back from its own best end state,
with no extra convergence window. The last few bits of every block are
therefore less reliable under noise than in a sliding-window decoder. This
behaviour is intended here: it trades some coding gain for a fixed, short
latency and little memory. Error-free streams, and isolated errors away from
block ends, decode exactly.

### Path metrics

Path metrics are `PM_W` = 10 bits wide. `acs_top` normalises them: when
every new metric has its MSB set (≥ 512), the MSB is cleared in all 64. This
subtracts the same constant from every metric, so every later decision is
unchanged. On hard decisions the metrics of the 64 states stay within a few
tens of each other once every state is reachable. The 200 used as the
starting "unreachable" value is overtaken within six words, so 10 bits never
wrap. `norm_event` shows when a normalisation happens.

## Interfaces

`channel_codec_top #(TB = 35)` has a clock and an asynchronous active-low
reset.

| port | dir | meaning |
|---|---|---|
| `enc_din` | in | information bit, sampled while `enc_din_strobe` is high |
| `enc_din_strobe` | out | one cycle in every five |
| `enc_dout`, `enc_dout_valid` | out | serial code symbols C1, C2 inverted |
| `dec_sym[1:0]` | in | received word as sent: `[1]` = C1, `[0]` = C2 inverted |
| `dec_sym_valid` / `dec_sym_ready` | in / out | handshake. A word is taken in a cycle where both are high. |
| `dec_out_bit`, `dec_out_valid` | out | decoded bits, newest first within a block |
| `dec_out_last` | out | oldest (last emitted) bit of a block |

The decoder input undoes the C2 inversion (`INV_C2 = 1`). The received
stream must be a whole number of `TB`-word blocks. To finish a message, pad
after the tail with the coded continuation of zeros, which is the symbol
pair (0, 1) as sent.

Parameters: `TB` (trace-back depth, 2..256), `PM_W` (metric width),
`PM_INF` (initial "unreachable" metric, 200), `INV_C2`.

## Design choices and departures

These points follow the source design:

- the 5-clock encoder operation and its strobe timing;
- C2 inversion;
- hard-decision branch metrics;
- 32 parallel ACS butterflies with 4 adders and 2 comparators each;
- the ACS decision rule (strict `>`);
- initial metrics 0 / 200;
- three decision RAM blocks sized `TB` × 64;
- a 5-clock pipelined minimum search;
- the trace-back step `{state[4:0], decision}` with the state MSB as output;
- output in reverse order, with reordering outside the decoder;
- 6 clocks per received word and latency 6·TB + 5;
- default TB = 35.

These are choices made here:

- **Generator polynomials.** The source shows the polynomials only in a
  figure. The CCSDS pair 171/133 used here reproduces every branch label of
  its 64-state butterfly table.
- **Which symbol is inverted.** The source mostly says C2, and C2 it is.
  One description of its figure says the other output.
- **Phase order.** Within the six clocks the order is BMU, MUX, ACS, memory,
  idle, idle. The decoder waits in phase 0 for input. `sym_valid`,
  `sym_ready`, `din_strobe`, `dout_valid` and `out_last` are added ports.
- **Decoder input inversion.** The decoder's trellis labels carry no
  inversion, so the second symbol is re-inverted at the decoder input.
- **Path metrics.** The 10-bit width and the MSB-clearing normalisation are
  not specified by the source.
- **RAM blocks.** Reads are synchronous. How the three blocks rotate is
  chosen here: one is written, one is traced back, and the third gives
  slack.
- **Tie in the minimum search.** The lower state index wins.
- **Reset.** Asynchronous, active low. The source mentions an asynchronous
  reset but not its polarity.
- **Stream length.** The stream must be whole blocks. The source does not
  say how its final partial block was handled.

Not included: the BPSK modem and AWGN channel used to measure bit-error
rates (a software model), and the output reordering.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. `tb/tb_ref_pkg.sv` holds reference
models written independently of the RTL:

- an encoder written from explicit tap lists;
- an integer block Viterbi decoder with the same block and tie rules.

| testbench | what it establishes |
|---|---|
| `channel_codec_top_tb` | The whole codec at default parameters, on a 3200-bit message plus 7 tail zeros. Encoder symbols and rate are checked. Single channel errors in the middle of blocks are all corrected. The decoded stream is bit-exact with the reference. Latency is 215 clocks. Input stalls are exercised. A 4200-word pure-noise pass drives the metrics through normalisation. Each mechanism (tail flush, stall, initial load, normalisation, all three RAM blocks, minimum search, trace-back, corrected errors) is counted and must occur. |
| `tb_depth_sweep` | TB = 21, 28, 35, 42, 49 and 70. Each runs the same stream, clean and at a 0.5 % channel bit-error rate. Results are bit-exact with the reference, and latency is 6·TB+5. |
| `viterbi_decoder_tb` | TB = 12 at 0 %, 2 % and 6 % channel bit errors with random input gaps. Results are bit-exact with the reference. |
| `dec_control_tb` | Every control strobe, cycle by cycle, against a schedule derived from the accepted words. |
| `dec_output_unit_tb`, `tbu_tb`, `minu_tb`, `dec_memory_tb` | The trace-back path on random decisions and metrics. MINU ties go to the lower index, after exactly 5 clocks. The bank rotation is checked. |
| `acs_top_tb`, `acs_unit_tb`, `pm_mux_tb`, `bmu_tb` | The trellis step against the reference, including normalisation. |
| `conv_encoder_tb` and its part tests | Symbols, order, inversion and the 5-clock timing. |

What has not been checked: operation on an FPGA, timing closure, and
bit-error-rate curves over an AWGN channel.

## Simulating

With Verilator 5, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/codec_pkg.sv tb/tb_ref_pkg.sv \
    tb/channel_codec_top_tb.sv --top-module channel_codec_top_tb -Mdir obj
./obj/Vchannel_codec_top_tb
```

Replace the testbench name to run any other test. Modules are found by file
name (`rtl/<module>.sv`). The end-to-end test finishes in well under a
second.

For synthesis, the decision RAM is written as plain arrays with a
synchronous read, so FPGA tools map it to block RAM. The rest is registers
and adders. At the default TB = 35 there are about 2000 flip-flops, most of
them the 64 × 10-bit path metric registers (held twice: MUX input and ACS
output) and the MINU pipeline.
