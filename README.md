# Streaming OFDM baseband datapath for 1 Gbit/s at 100 MHz

This is SystemVerilog RTL for the digital datapath of a gigabit OFDM link: a
transmitter and a receiver. It follows a published FPGA architecture that runs at
a 100 MHz clock. Neither an FFT nor a Viterbi decoder can run at the
400 MSPS / 1 Gbit/s rate the air interface needs, so the design parallelizes
both:

- **The FFT takes four samples per clock.** A 256-point FFT is built from four
  64-point FFTs followed by a 4-point stage.
- **The coded data is split into up to 12 streams.** Each OFDM symbol belongs
  to exactly one stream. Each stream has its own convolutional encoder and
  its own Viterbi decoder, and each of those needs only a twelfth of the total
  rate, about 100 Mbit/s or one bit per clock.

Splitting into streams ("streaming") is what makes the control logic hard.
Both ends must agree, symbol by symbol, on:

- which stream a symbol belongs to;
- whether it is a normal data symbol or a low-order reference symbol;
- whether it ends its stream with a zero termination byte.

The transmitter works this out from the frame configuration. The receiver
works it out again from the decoded signal field and stores the result in
*symbol scheme buffers*, which steer the receiver.

## Air interface

| quantity | value |
|---|---|
| FFT size / bandwidth | 256 points, 400 MHz (1.5625 MHz spacing) |
| data / pilot / zero subcarriers | 192 / 16 / 5 |
| symbol | 800 ns = 256 samples + 64-sample (160 ns) cyclic prefix |
| preamble | 11 OFDM symbols |
| code | K=7, generators 133/171 (octal), rates 1/2, 2/3, 3/4 |
| modulations | BPSK, QPSK, 16-QAM, 64-QAM (reference symbols: BPSK or QPSK) |
| clock | 100 MHz, 4 samples per clock |
| streams | 1..12 encoders / decoders, 6 transmitter interleavers |

In 64-QAM rate 3/4 a symbol carries 864 bits, which gives 1.08 Gbit/s.

The rest of the air interface is this design's own choice, because the
published architecture does not give it. These choices follow IEEE 802.11a
where that standard has an equivalent:

- the puncturing patterns;
- the interleaver permutation (16 columns, two steps);
- the Gray constellation maps;
- the x^7+x^4+1 scrambler, with seed `7F`.

The subcarrier layout is also this design's own:

- bins -106..+106 are occupied;
- bins -2..+2 are the zero carriers;
- every 13th remaining bin is a pilot.

## Frame and symbol scheme

A frame consists of the following, in order:

- the preamble;
- one **signal symbol**: BPSK rate 1/2, stream 0, terminated;
- the data symbols.

The signal field is 5 bytes plus a CRC-8 (polynomial x^8+x^2+x+1). It carries
`ofdm_pkg::frame_cfg_t`:

- the payload length in bytes;
- the modulation and code rate of normal symbols;
- the modulation and code rate of reference symbols;
- the number of streams S;
- N, the number of normal symbols between reference groups.

Data symbol `d` (counted from 0 after the signal symbol) is handled as
follows (`ofdm_pkg::data_sym_info`):

- **Stream:** it belongs to stream `d mod S`.
- **Reference symbol:** it is one when `d mod (N+4) >= N`. After every N
  normal symbols comes a group of four reference symbols, which the channel
  estimator can re-estimate from.
- **Termination:** a symbol is *terminated* in two cases. A reference
  symbol is terminated when the next symbol of the same stream lies beyond
  its reference group. Every stream's last symbol in the frame is also
  terminated. The last byte of a terminated symbol is a zero byte.
  The zero byte drives that stream's encoder back to state 0, so the decoder
  can finish its traceback from a known state. Decisions made on reference
  symbols can then be fed back to the channel estimate.

The exact termination rule is this design's reading of the stream diagram.
The published text only says that streams are terminated "in the reference
symbols" and at the end of the frame.

The number of data symbols follows from the payload length. `symbol_calc`
walks the scheme one symbol per clock until the capacity covers the length.
Bytes after the payload are zero padding.

## Transmitter (`ofdm_tx`)

Data flows through these blocks in order:

1. **`input_control`** takes a configuration (valid/ready) and 32-bit payload
   words. It builds the signal-field bytes and their CRC, and starts
   `symbol_calc`.
2. **`scrambler`** scrambles 32 bits per clock.
3. **`symbol_mapping`** sends each byte to its symbol.
   - It emits the signal symbol first.
   - For every data symbol it decides stream, data or reference, modulation,
     and termination.
   - It inserts the zero termination byte and the padding.
   - It tags each symbol with the interleaver that will take it, which is
     `g mod 6` for frame symbol `g`.
4. **12 × (`fifo` + `conv_encoder`)**, one pair per stream. Each encoder takes
   one data bit per clock and emits the mother-code pair {A,B} with keep flags
   for puncturing.
5. **`stream_interface`** connects 1..12 encoders to the fixed six
   interleavers. Each interleaver keeps a register with the stream whose
   symbol it expects next, and takes bits only from that encoder. This keeps
   every interleaver in frame order even when some encoders run ahead.
6. **6 × `interleaver`** use address tables for all four modulations. The
   tables are computed at elaboration and indexed `mod*1152 + k`.
   - Write phase: up to two kept bits per clock.
   - Read phase: 48 clocks of four subcarriers.
7. **`subcarrier_mapper`** takes the six interleavers' symbols in frame order.
   It places 4 × 48 data subcarriers into IFFT bin order, inserts the pilots
   (polarity from a per-symbol x^7+x^4+1 sequence) and the zero bins, and
   emits 64 beats of 4 bins.
8. **`qam_mapper`** does the Gray mapping. Every modulation is scaled to the
   same mean power (unit amplitude 2^11).
9. **`fft256`** is the inverse FFT, built from four `fft64`, a twiddle stage
   and a 4-point stage. Sample `4m+l` of a block goes to FFT-64 number `l`,
   and output lane `k2` in beat `k1` carries bin `k1 + 64*k2`. The overall
   scaling is 1/16.
10. **`preamble_insertion`** emits 880 clocks of preamble per frame. It then
    emits each symbol as 80 clocks: 16 clocks of cyclic prefix followed by 64
    clocks of IFFT output. The real preamble is specified elsewhere, so a ±1
    PN sequence (x^15+x^14+1) stands in for it.

For testing and for a loop-back without RF, the frequency-domain symbols
(mapper output) are also brought out on the `fd_*` ports.

## Receiver (`ofdm_rx`)

Synchronization and channel estimation are outside this datapath. The
receiver input is the 192 equalized data subcarriers of each symbol, four per
clock in ascending frequency, each with an 8-bit power weight (64 = 1.0).
`frame_start` marks a new frame.

- **`demapper_weighting`** has four stages:
  - A 64-beat symbol buffer.
  - Four `soft_demapper`s that compute max-log LLRs. A positive LLR favours a
    one.
  - Weighting by subcarrier power and a per-modulation correction factor.
  - Rounding to 5-bit soft values, saturated at ±15.

  A symbol leaves the buffer only when its scheme entry (modulation, stream,
  termination) is known. This is the receiver's main stall point.
- **12 × `deinterleaver`**, one per stream. Each writes 48 beats of up to
  24 soft bits. It then reads one {A,B} pair per clock in code order and
  inserts zero metrics where bits were punctured.
- **12 × `viterbi_decoder`**, described in the next section.
- **`signal_field_interpreter`** takes the first 12 bytes of decoder 0 (the
  signal symbol) and checks the CRC and the field values. It then computes
  the symbol count and writes one scheme word per symbol into the two
  `symbol_scheme_buffer`s. One buffer steers the demapper; the other steers
  the data collector.
- **`data_collector`** has 12 collect FIFOs. Following the scheme, it takes
  each symbol's bytes from the FIFO of that symbol's stream, removes the
  termination byte and the padding, and descrambles the payload.
- **`output_interface`** produces 32-bit words with byte enables and a last
  flag.

The demapper needs the scheme, and the scheme comes out of decoder 0. So the
signal symbol passes through the whole chain before data symbol 1 can be
demapped. The symbol buffer and the input handshake absorb this wait.

## Viterbi decoder

The decoder is the hardest block. Each decoder takes one code-bit pair per
clock and updates all 64 path metrics per clock (add-compare-select). It
writes the 64 survivor decisions into a trellis memory of 256 columns.

- **No best-state search.** Tracebacks always start from state 0. A
  traceback of 96 steps is long enough for the surviving paths to merge, and
  only the oldest 48 of the 96 decoded bits are delivered.
- **Two traceback units** are served alternately. Each delivers 48 bits per
  96 clocks, so together they deliver one bit per clock and no wait cycles
  are needed.
- **Commands.** A master issues traceback commands. A normal command covers
  a 96-step window. When a terminated segment ends (last pair of a
  terminated symbol), the master issues a final command instead: it starts
  at the segment end from the known zero state and covers all remaining
  bits, however many there are. The path metrics then restart at state 0 for
  the data that continues in the same stream.
- **Output order.** The units produce bits newest first. Each unit gathers
  them in a shift register and copies them to an output register. An output
  arbiter reads that register out at 8 bits per clock, always from the unit
  holding the oldest command. So bytes leave in order, even when a short
  final traceback overtakes a long one.

Path metrics are 12-bit modular numbers, compared by their signed
difference, so no normalization is needed.

## Throughput

At the default sizes, the following hold:

- **The receiver keeps up with 64-QAM rate 3/4 (1.08 Gbit/s).**
  - Each deinterleaver and decoder needs 48 + 864 clocks per symbol, and 12
    of them give one symbol per 76 clocks. The 800 ns symbol period is 80
    clocks.
  - The demapper needs 48 clocks per symbol.
- **The FFT and preamble insertion keep up with the 400 MSPS sample stream**:
  64 and 80 clocks per symbol.
- **The transmitter does not reach the peak rate.**
  - Each interleaver is single-buffered and takes one mother-code pair (one
    data bit) per clock.
  - Six interleavers therefore handle one 64-QAM 3/4 symbol per 152 clocks,
    about 570 Mbit/s.
  - Reaching the 1 Gbit/s target would need double-buffered interleavers that
    take two pairs per clock.
  - The published design states that six interleavers at 100 MHz are
    sufficient, but gives no internal detail.

## Departures and own choices

- Puncturing, interleaver permutation, constellation maps, scrambler,
  subcarrier layout, pilot sequence, signal-field format and CRC are all own
  choices, listed above.
- The preamble content is a stand-in. Synchronization and channel estimation
  are not part of this RTL.
- Several internals are only described in outline, and the simplest working
  structure is used for each:
  - `fft64` loads a block, computes six radix-2 stages with 32 butterflies
    each, then outputs the block.
  - Interleavers and deinterleavers are single-buffered.
  - The stream-to-interleaver arbitration is own.
- In the Viterbi decoder, the traceback command FIFO and traceback arbiter
  described for the original are reduced to one register. That register
  records which unit holds the oldest command, which is all that two units
  served in turn need. The trellis memory is a single register array rather
  than two dual-port RAMs.
- The preamble is generated on the fly by an LFSR rather than read from a
  preamble memory.
- The depuncturing patterns come from a function (`ofdm_pkg::punct_keep`).
  Depuncturing in the deinterleaver would allow patterns that do not repeat;
  only the three repetitive 802.11a patterns are provided.
- The demapper correction factors (16/23/51/104 with a final shift by 18) and
  the 5-bit saturation are own choices.
- Frame length: the length field is 16 bits, but the scheme buffers hold 1024
  entries (`SCH_DEPTH`), so a frame may have at most 1023 data symbols. That
  is about 11 kbyte at BPSK 1/2 and 110 kbyte at 64-QAM 3/4. The limit is not
  checked in hardware: the transmitting side must respect it, or `SCH_DEPTH`
  must be raised.

## Files

- `rtl/ofdm_pkg.sv`: shared types, constants, and the scheme, code and layout
  functions.
- `rtl/ofdm_baseband.sv`: the top. Transmitter and receiver sit side by side
  with their ports brought out.
- `rtl/ofdm_tx.sv`, `rtl/ofdm_rx.sv`: the two datapaths.
- One file per block, as named above. `rtl/fifo.sv` is the generic FIFO.
- `tb/tb_<module>.sv`: self-checking unit testbenches.
- `tb/tb_ofdm_baseband.sv`: the end-to-end test.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ofdm_pkg.sv tb/tb_viterbi_decoder.sv \
    --top-module tb_viterbi_decoder -o sim && ./obj_dir/sim
```

The same form works for every testbench. The `-Irtl` option lets Verilator
find the modules by file name.

`tb_ofdm_baseband` runs the top at its default parameters. It sends three
frames through the transmitter:

- 16-QAM 1/2 with 3 streams;
- 64-QAM 3/4 with all 12 streams;
- QPSK 2/3 with one stream.

It checks the pilots and zero bins of every frequency-domain symbol, and the
preamble and symbol clock counts. It feeds the symbols, with noise, into the
receiver and compares the decoded configuration and every payload byte.

It also counts how often each mechanism occurs and fails any that never
happens:

- reference symbols;
- termination inside a reference group and at the frame end;
- all 12 streams and all 6 interleavers;
- receiver stalls;
- sliding-window and final tracebacks;
- partial output words.

The unit testbenches compare each block with an independent reference model:

- the encoder with a delay-line model;
- the interleavers with their own permutation code;
- the FFTs with direct DFTs;
- the decoder with a reference encoder plus errors and erasures;
- the symbol count with a brute-force search.
