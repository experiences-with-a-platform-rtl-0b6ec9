# Frequency-agile OFDM transmit modulator

This is a synthesizable SystemVerilog core that turns a compact byte stream
from a host computer into a continuous OFDM waveform. The waveform has 256
subcarriers, and each one is switched on or off and given its own modulation
(BPSK, QPSK, 16-QAM or 64-QAM) independently. Software can therefore place a
signal of any width anywhere in the band, split it into several sub-bands, or
leave holes for other users, and it can change that layout between any two
OFDM symbols. It implements the FPGA transmit modulator of the platform
described in "Experiences With a Platform for Frequency-Agile Techniques".
Below, "the published design" refers to that description.

The work is divided so that each side handles what it does best:

- **The host** does all bit-level processing: framing, scrambling, coding,
  interleaving, and deciding which bits go on which subcarrier. It sends one
  byte per used subcarrier per symbol, plus small control blocks.
- **The core** does the processing that expands the data rate:
  - constellation mapping,
  - a 256-point inverse FFT,
  - cyclic-prefix insertion,
  - output of one complex 16-bit sample per clock.

At an 80 MHz sample clock the subcarriers are 312.5 kHz apart, the same
spacing as IEEE 802.11a/g. A standard 802.11a/g frame can therefore be sent
on 52 of the 256 bins and received by an ordinary Wi-Fi radio. The other bins
stay free for other uses.

```
 host bytes ─► blk_parser ─► token FIFO ─► symbol_builder ─► input buffer
                                               │   (qam_mapper)   (2 banks)
                                               │                      │
                                          guard queue              ifft256
                                               │                      │
 D/A samples ◄──────────── guard_insert ◄── output buffer (2 banks) ◄─┘
```

## The host byte stream

The host sends a sequence of blocks. Each block starts with an identifier
byte:

| Block      | Id   | Bytes that follow                  | Meaning |
|------------|------|------------------------------------|---------|
| NCARRIERS  | 0x01 | `n`                                | data bytes consumed per symbol, 1–256 (`0` means 256) |
| MOD        | 0x02 | `m`, then `m` × (`addr`, `cfg`)    | each item configures modulators `addr` and `addr+1` |
| GUARD      | 0x03 | `g`                                | cyclic prefix length in samples, 0–255 |
| DATA       | 0x04 | `n`, then `n` data bytes           | `n` = 1–256 (`0` means 256) |

A MOD item carries two 4-bit modulator settings. The low nibble of `cfg`
applies to `addr` and the high nibble to `addr+1` (modulo 256). Each nibble
is laid out as follows:

| bit 3  | bit 2  | bits 1:0 |
|--------|--------|----------|
| enable | unused | 0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM |

Each data byte feeds one enabled subcarrier. BPSK uses bit 0 of the byte,
QPSK bits 1:0, 16-QAM bits 3:0 and 64-QAM bits 5:0, and the higher bits are
ignored. The lower half of the used bits selects the in-phase level and the
upper half the quadrature level. Both use the Gray code of 802.11a. All four
constellations have the same mean power: the unit amplitude is 16384, so the
BPSK point is ±16384 and the 64-QAM levels are multiples of 2528.

A DATA block does not have to line up with symbols. The core counts data
bytes against the current configuration, and a symbol is complete once all
256 bins have been visited. One DATA block can therefore carry several
symbols, or one symbol can be split across several blocks.

A byte in the identifier position that is not one of the four codes is
skipped. It raises `parse_error` for one cycle, and parsing continues with
the next byte.

## Configuration stays in step with the data

The most important property of the interface is *when* a change takes
effect. If the host sends `DATA` (symbol 5), then `MOD`, `GUARD`, then
`DATA` (symbol 6), symbol 5 must use the old configuration and symbol 6 the
new one. This must hold even though thousands of data bytes may still be
queued inside the core when the MOD block arrives.

To guarantee this, the parser does not write any configuration register
directly. It turns every byte that carries meaning into an 18-bit *token*:

- one per data byte,
- one per MOD item,
- one per NCARRIERS value,
- one per GUARD value.

Each token is a kind, an address and a data byte. Tokens go through a single
FIFO (1024 entries by default), so configuration and data leave it in exactly
the order the host sent them. The symbol builder consumes tokens from the
FIFO head, so it sees a MOD token only after all the data that was sent
before it.

The guard length needs one more step. The cyclic prefix is added more than 500
cycles after a symbol was assembled. By then the builder may already have
applied a newer GUARD token for a later symbol. So when the builder finishes
a symbol, it pushes the guard length in force for that symbol into a small
queue (8 entries) next to the sample path. The prefix stage pops one entry
per symbol. Every symbol is therefore sent with the guard it was built
under, and guard changes between symbols of one frame work. The 802.11a
example below relies on this, because its training symbols and its data
symbols use different guards.

## Assembling a symbol: enables, modulations and NCARRIERS

`symbol_builder` holds these settings:

- the 256 modulator settings, which are reset to "disabled",
- NCARRIERS, which is reset to 256,
- the guard length, which is reset to 0.

While no symbol is in progress, configuration tokens at the FIFO head are
applied at one per cycle. A DATA token at the head starts a symbol. The
builder then visits bins 0 to 255, one per cycle, and writes each bin's
value to the input buffer in natural order:

- **Disabled bin:** receives 0 and consumes nothing.
- **Enabled bin while fewer than NCARRIERS bytes have been used in this
  symbol:** takes the next data byte and receives its constellation point.
- **Enabled bin after NCARRIERS bytes have been used:** receives 0, like a
  disabled bin.

NCARRIERS therefore caps the number of bytes per symbol. The enables say
*where* the data goes, and NCARRIERS says *how many* bytes a symbol takes.
With NCARRIERS equal to the number of enabled bins, the two agree.

If the FIFO runs dry while a data byte is due, the scan waits at that bin.
If a configuration token reaches the head while a data byte is due, it is
applied first, in stream order, and the scan continues with the new setting.
The host can therefore change the modulation of carriers later in the
current symbol. A MOD token that arrives between symbols costs one cycle.

After bin 255 the builder hands over the buffer bank and pushes the guard
length. The next symbol starts in the following cycle if data is waiting.

## The 256-point IFFT

`ifft256` is the hardest part of the design to follow, and the reasons it is
built this way are not obvious from the code.

### Structure

The core is a radix-2 decimation-in-frequency pipeline in *single-path
delay-feedback* (SDF) form. It has eight stages, one per bit of the index,
with delay lengths L = 128, 64, …, 1. One complex sample enters per clock
and one leaves per clock, using 255 complex words of delay memory in total.
This is the minimum for this kind of pipeline.

Each stage (`ifft_sdf_stage`) works on blocks of 2L samples:

1. The first L samples of a block (`a`) are written into the stage's L-word
   delay memory. Nothing leaves the stage for them at that moment.
2. As each of the second L samples (`b`) arrives, the stage reads the
   matching `a`. It sends `(a+b)/2` on at once. It writes
   `(a−b)/2 · W^(j·N/2L)` back in place of `a`, where `W = e^{+j2π/256}`
   and `j` is the position within the half-block. That value is now
   *pending*.
3. The pending differences must then leave, one per cycle, in order.

Every butterfly halves its results. The eight halvings together divide by
256, so the core computes

    x[n] = 1/256 · Σ_k X[k] · e^{+j2πkn/256}

This result cannot overflow 16 bits. The largest constellation component is
7 × 2528 = 17696 per axis, so |x| stays below about 25000 even with every
bin at a 64-QAM corner. The twiddle factors are Q2.14 constants. They are
computed with `$cos`/`$sin` in constant functions when the design is
elaborated, so no table file is needed.

The stages pass data forward only on a valid strobe, so a gap at one stage's
input simply travels down the pipeline. The samples leave the last stage in
bit-reversed order. The core numbers them with a counter and outputs the
bit-reversed count as `out_addr`, the natural time index, so the output
buffer can store each sample in place.

### The drain problem and how it is solved

In the textbook SDF schedule, step 3 happens while the first half of the
*next* block enters. The pending differences leave through the same port
that the new `a` values enter. For a stream of symbols with no gaps this is
perfect. A transmitter, however, sends bursts: the last symbol of a frame
has no successor. Its pending differences would stay stuck in the delay
memories until the host sends the next frame, which may be never.

The usual fix is to push a dummy frame of zeros behind every burst. That
delays the last symbol by a whole frame time, and the dummy outputs must be
thrown away. Here each stage drains itself instead:

- **Separate positions.** A stage keeps a read position `rd` for pending
  differences and a `pending` flag, separate from its block counter `cnt`.
  The counter decides where new samples are written.
- **Draining when idle.** While the stage has pending differences and its
  input is idle, it emits one difference per cycle from `rd`. The `draining`
  status shows this.
- **A new block arriving mid-drain.** The next block's `a` values are
  written at position `cnt`, starting at 0. The read position started
  earlier, so the write position never runs ahead of it. When both point
  at the same word, the old value is read in the same cycle as the new one
  is written. A sample is therefore never overwritten before it has left,
  and both positions advance together, one per cycle.
- **The usual case.** When a new block follows immediately, the drain and
  the writes line up exactly. This is the textbook schedule, and the stage
  reaches full throughput.
- **One output per cycle.** During a block's second half the output port is
  taken by the sums. The difference drain always finishes before a new
  block reaches its second half. The stage therefore never has two results
  to emit in one cycle. The assertion `a_no_overrun` checks that this holds.

As a result a symbol's last sample comes out 255 cycles after its first,
whether or not another symbol follows. The system test checks this: the
last symbol of each burst and a symbol sent after a long pause come out on
time and correct.

### Flow control and latency

The feeder starts reading a symbol from the input buffer as soon as a bank
is ready. It reads all 256 words in 256 consecutive cycles, and the next
symbol follows without a gap cycle. If the output side is not ready
(`out_valid && !out_ready`), one global enable freezes the feeder and all
eight stages for that cycle. No sample is lost or duplicated.

The first output of a symbol appears 265 cycles after its first input word
is read, and the last one 255 cycles later.

## Buffers and the cyclic prefix

There are two `symbol_buffer` instances. Each holds two 256-word banks and
passes whole symbols from a writer to a reader:

- **The input buffer** lets the builder write in natural bin order, at its
  own pace, while the IFFT reads the previous symbol.
- **The output buffer** lets the IFFT store its bit-reversed output in
  natural time order. It then lets `guard_insert` read the end of the
  symbol before its start, which a cyclic prefix needs.

`guard_insert` sends each symbol in two parts:

1. the last G samples, from addresses 256−G to 255,
2. all 256 samples, from addresses 0 to 255.

The output is one sample per clock with `dac_valid` high, and `sym_start`
marks the first sample. A symbol takes 256 + G cycles. When the next symbol
is ready, it starts in the following cycle, so a frame leaves without gaps.
When no symbol is ready, the port outputs zeros with `dac_valid` low.

Backpressure passes back along the whole chain:

1. The output buffer fills.
2. The IFFT freezes.
3. The input buffer fills.
4. The builder stops.
5. The token FIFO fills.
6. `host_ready` falls.

## Timing and throughput

- **Clock:** the clock is the sample clock. At 80 MHz, one symbol of
  256 + G samples lasts 3.2 µs plus the guard. A 64-sample guard gives the
  4 µs symbol of 802.11a.
- **Sustained rate:** the output runs without gaps as long as two things
  hold:
  - The host keeps the token FIFO supplied. The byte port accepts at most
    one byte per clock.
  - Building each symbol takes no longer than sending one. Building takes
    256 cycles, plus one per configuration token between symbols.

  With G = 0 and no configuration change, the two rates are equal. The
  buffers between the builder and the output absorb short differences.
- **Cost of reconfiguration:** a MOD block that rewrites all 256
  modulators is 258 bytes, almost a symbol's worth of host bandwidth by
  itself. Sent between two symbols, it can delay the next symbol. In the
  system test the largest such delay was 114 cycles. It occurred where the
  used band was rewritten entirely between short symbols. A host that
  needs gap-free output should send only the MOD items that change. In
  every test, symbols with only data between them followed each other
  without a gap.
- **Host bandwidth:** the host sends about one byte per *used* carrier per
  symbol. An 802.11a symbol needs 52 bytes (48 data and 4 pilots) every
  4 µs, which is 13 MB/s. Raw 16-bit I/Q samples at 80 MHz would need
  320 MB/s.
- **Latency:**
  - Assembling the symbol takes 256 cycles.
  - The IFFT adds 265 + 255 cycles, and the prefix stage 2 more.
  - In total, roughly 800 cycles (10 µs at 80 MHz) pass from a symbol's first
    data byte to its first output sample, if the host keeps up.
  - The system test measures 1060 cycles from the first host byte. This
    includes the configuration of the first symbol and host idle cycles.
- **Size:** a generic synthesis of `ofdm_tx_top` gives about 970 logic
  cells, 560 flip-flops and 68 kbit of memory. The memory consists of the
  token FIFO (18 kbit), the four buffer banks (32 kbit) and the IFFT delay
  lines (8 kbit).

## Example: an 802.11a/g frame on 256 bins

An 802.11a subcarrier k (−26 … 26) lands on bin `k mod 256`. At 80 MHz,
802.11a's 0.8 µs guard is 64 samples and its 1.6 µs double guard is 128.
Because each symbol carries its own guard, the host can build the whole
preamble from ordinary symbols:

1. **Short training:** enable the 12 bins k = ±4, ±8, … ±24 as QPSK, set
   NCARRIERS 12 and send two symbols. The first has GUARD 128 and the
   second GUARD 0. The waveform repeats every 0.8 µs, so its prefix simply
   continues the pattern, and the two symbols give the ten repetitions in
   8 µs.
2. **Long training:** enable bins −26…26 (without 0) as BPSK, set
   NCARRIERS 52 and send the training values twice, the first time with
   GUARD 128 and the second with GUARD 0.
3. **SIGNAL:** set GUARD 64 and send one BPSK symbol.
4. **Payload:** send one MOD block that turns the data bins into 64-QAM and
   leaves the four pilots (±7, ±21) as BPSK, then the payload symbols.

The rest of the band stays free. A second signal can be placed on other bins
in the same symbols, or the whole frame can be moved by changing the bins.
The system testbench uses a simplified form of this frame: guard 0 for both
short symbols, 128 for both long ones, then 64.

## Where this design departs from the published design, and what it assumes

- **Guard range.** The published design allows a guard of 0–100 % of the
  symbol. A 256-sample guard does not fit the one-byte GUARD field, so this
  core allows 0–255 samples, which is 0–99.6 %. A wider field would lift the
  limit, but the block layout gives GUARD one byte.
- **Identifier codes.** The published design does not give the values of
  the identifier codes. The values 0x01–0x04 are this design's choice.
- **Modulator nibble encoding** (enable in bit 3, type in bits 1:0). This is
  this design's choice. The published design shows two modulator settings
  per configuration byte but not the bits inside them.
- **Count encoding.** A count byte of 0 means 256 for NCARRIERS and DATA, so
  that a full symbol fits in one block. For MOD, 0 means no items.
- **Meaning of NCARRIERS.** The published design says that NCARRIERS sets
  how many subcarriers the modulation unit consumes per symbol. It does not
  say what happens when that number differs from the count of enabled
  modulators. Here it is a cap on data bytes per symbol.
- **Buffer depth.** The published design does not size the buffering
  between host and modulator. Here the token FIFO depth is a parameter,
  `FIFO_DEPTH`, with a default of 1024 tokens.
- **Constellations.** The bit order, the Gray code and the amplitudes are
  chosen to match 802.11a.
- **Scaling.** The 1/256 scaling is chosen so that the transform can never
  overflow. The price is resolution when few carriers are used. With 52
  carriers the output is about 460 LSB rms, while the rounding error stays
  within a few LSB.
- **Reset and errors.** Unknown identifiers are skipped with an error
  pulse, and the reset state is all carriers off, NCARRIERS 256 and
  GUARD 0. These are this design's choices.

### Not included

These parts of the published system are outside this core:

- the bus interface to the host (PCI) and its DMA,
- the D/A converters,
- the radio front end,
- any transmit filtering or interpolation after the IFFT,
- the host software that frames, codes and interleaves the bits.

The published design also discusses a fully software transmitter, in
which the host computes the time-domain samples itself. This core has no
path for such samples.

The core's boundary is a valid/ready byte port on the host side and a
sample port with a valid strobe on the converter side.

## Simulating

The sources and testbenches are written for Verilator 5. `--timing` is
needed for the testbenches' delays:

```sh
verilator --binary --timing -Irtl -Itb rtl/ofdm_pkg.sv tb/tb_ofdm_tx_top.sv \
          --top-module tb_ofdm_tx_top
./obj_dir/Vtb_ofdm_tx_top
```

Replace `tb_ofdm_tx_top` with any other testbench name to run that one.
Add `--assert` to enable the design's assertions. The other source files are
found through `-Irtl -Itb`.

Every testbench is self-checking. It ends with a line of the form
`TB_RESULT checks=<n> failures=<m>`, and a watchdog stops it if the design
hangs. The system testbench takes a few seconds.

| Testbench           | What it checks |
|---------------------|----------------|
| `tb_sync_fifo`      | order, full/empty flags and count under random push/pop |
| `tb_qam_mapper`     | all 256 byte values under all four modulations against a reference mapping |
| `tb_blk_parser`     | an example packet, every block type, 256-byte DATA, an unknown identifier, token backpressure |
| `tb_symbol_buffer`  | bit-reversed writes read back in natural order, bank alternation, read latency, the full/free handshake |
| `tb_symbol_builder` | enables, all modulations, NCARRIERS cap, a MOD change in mid-symbol, guard per symbol, 256 cycles per symbol |
| `tb_ifft256`        | random frames against a floating-point inverse DFT (±3 LSB), latency 265, back-to-back frames, self-drain, output backpressure |
| `tb_guard_insert`   | prefix content and length for several guards, back-to-back timing, idle output |
| `tb_ofdm_tx_top`    | the full chain at default size |

The system testbench sends an 802.11a-style burst with three different
guards, a capped symbol and an unknown identifier. After a pause it sends
sixteen full-band 16-QAM symbols with a 255-sample guard, which fills the
token FIFO and forces host backpressure, followed by 52-carrier QPSK
symbols with no guard. A third burst sends:

- a small packet (NCARRIERS 64, GUARD 64, 32 MOD items, two DATA blocks of
  64 bytes),
- a symbol with a single subcarrier,
- a 112-carrier (35 MHz) 64-QAM band that moves from positive to negative
  frequencies and then splits into two sub-bands with a hole between them.

Every output sample is compared with a floating-point model. Symbols with
only data between them must leave exactly 256 + G cycles apart. A symbol
with configuration in front of it may leave later, but never earlier. The
test counts each mechanism it is meant to exercise and fails if any count
is zero:

- parse error,
- backpressure,
- IFFT self-drain,
- IFFT stall,
- guard change,
- NCARRIERS cap,
- disabled carriers,
- each modulation,
- a full-band symbol,
- a single-carrier symbol,
- a move of the used band.

## How far to trust it

What has been shown:

- Every block and the complete chain pass their testbenches.
- The system test compares 14,176 output samples (36 symbols) against a floating-point
  model. The largest error observed is 2.6 LSB, against a tolerance of
  3 LSB.
- Each testbench was also run against a copy of its block with one
  deliberate bug, and each of these copies was caught with many failures.
  The bugs included a swapped 64-QAM code, an output index that is not
  bit-reversed, a prefix taken from the wrong end, an ignored NCARRIERS cap
  and a FIFO read off by one.
- The sources build without warnings in Verilator's default lint.

What has not been shown:

- The core has not been placed on an FPGA, checked against a timing
  constraint or run at 80 MHz.
- Its spectrum has not been measured, and no 802.11a receiver has decoded
  its output.
- The 802.11a frame in the test checks the arrangement of bins, guards and
  modulations. It does not check a bit-exact 802.11a preamble.
- The error of ±3 LSB in time-domain samples has not been translated into
  EVM for a particular configuration.

## Source files

| File                       | Contents |
|----------------------------|----------|
| `rtl/ofdm_pkg.sv`          | sizes, sample and token types, block identifiers, constellation levels |
| `rtl/ofdm_tx_top.sv`       | top level: the chain above and the guard queue |
| `rtl/blk_parser.sv`        | host byte stream to tokens |
| `rtl/sync_fifo.sv`         | show-ahead FIFO, used for tokens and for guard lengths |
| `rtl/symbol_builder.sv`    | modulator table, NCARRIERS/GUARD, symbol assembly |
| `rtl/qam_mapper.sv`        | byte to constellation point |
| `rtl/symbol_buffer.sv`     | two-bank symbol buffer |
| `rtl/ifft256.sv`           | 256-point IFFT: feeder, eight stages, output indexing |
| `rtl/ifft_sdf_stage.sv`    | one delay-feedback butterfly stage with self-drain |
| `rtl/guard_insert.sv`      | cyclic prefix and output sequencing |
| `tb/ofdm_ref_pkg.sv`       | reference mapping and floating-point inverse DFT for the testbenches |
