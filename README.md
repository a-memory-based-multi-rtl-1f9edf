# Multi-standard ITU-T J.83 FEC decoder

Cable TV systems built on ITU-T J.83 use four different forward error
correction (FEC) chains, one per annex. Annexes A and C are the DVB-C style
chain, annex D is the ATSC style chain, and annex B is the North American
chain with a trellis code and a 7-bit Reed-Solomon code. The stages are
always the same kinds of thing: a randomizer, a Reed-Solomon (RS) code and a
convolutional interleaver, plus a trellis code in annex B. Only their sizes,
fields and polynomials differ.

This design decodes all four annexes with a single datapath. There is one
deinterleaver whose memory layout is computed from (I, J), and one RS
decoder whose arithmetic units switch between GF(2^8) and GF(2^7) and
between t = 3, 8 and 10. Each annex keeps its own small de-randomizer. The
architecture follows a published memory-based multi-standard decoder. The
handshakes, the cycle schedules and a few details it leaves open are this
implementation's own; they are listed under "Departures and open points".

| annex | RS code | field, roots | t | interleaver (I, J) | randomizer | trellis |
|---|---|---|---|---|---|---|
| A, C | (204,188) | GF(2^8) 0x11D, α^0..α^15 | 8 | (12,17) | PRBS 1+x^14+x^15, restarted every 8 packets | none |
| B | (128,122) extended | GF(2^7) 0x89, α^1..α^5, plus C(α^6) | 3 | I = 128,64,32,16,8; J = 1..8,2,4,8,16 | GF(128) recurrence, f(x) = x^3+x+α^3 | rate 4/5 punctured, G = (25,37) octal |
| D | (207,187) | GF(2^8) 0x11D, α^0..α^19 | 10 | (52,4) | 16-bit PRBS, preload F180h at field sync | none |

## Data flow

```
 annex B groups ──► trellis_decoder_b ──► descrambler_b ──┐
 (grp_i, grp_q)     (2 x viterbi_decoder)   (GF(128))      │ mux
                                                          ├──► conv_deinterleaver ──► rs_decoder ──┬──► descrambler_acd ──► out  (A/C/D)
 annex A/C/D bytes ───────────────────────────────────────┘     │  external memory         │          └──────────────────────► out  (B)
 (sym_data)                                                      ▼  (mem_* ports)           ▼
                                                           deint_addr_gen       rs_syndrome → rs_kes → rs_chien → rs_forney
                                                                                 rs_buffer (2 banks x 376 bytes)
```

In annex B the randomizer sits before the interleaver on the transmit side,
so its inverse comes before the deinterleaver here. The RS output is then
the decoder output. In annexes A, C and D the RS output goes through the
de-randomizer.

## The universal deinterleaver

A convolutional deinterleaver with depth I and unit delay J has I branches.
Branch b delays its symbols by (I-1-b)·J branch periods, and the last branch
has no delay. Built as I separate FIFOs it needs I pointers and a memory per
branch. Here all the FIFOs are laid end to end in one memory of

    M = J·I·(I-1)/2 + J   words

(1139 words for (12,17), 5308 for (52,4), 65032 for the largest annex B
setting (128,8)). Every symbol needs exactly one read and one write. The
read fetches the oldest symbol of its branch, and the write puts the new
symbol in the word just freed.

`deint_addr_gen` keeps two running addresses. Within a group of I symbols:

- The write address advances by a *branch address*. That step starts at
  (I-1)·J and shrinks by J per symbol.
- The read address runs one branch ahead of the write address. It starts
  at (I-1)·J and advances by the already shrunk branch address.

The I-th symbol of a group is on the zero-delay branch. It is passed
straight through (`direct`), and both group start addresses step back by
one. All address arithmetic is modulo M, done with one conditional
subtraction. Thanks to this, the same hardware serves every (I, J) with
I ≤ 255 and J ≤ 31 whose M fits the address width (2^16 words by
default). The only per-mode difference is the value of M, which is
reported on `mem_bound`.

The memory itself is external, because 64 KB is too large to put on chip.
`conv_deinterleaver` drives a simple synchronous SRAM port:

- `mem_we`, `mem_waddr` and `mem_wdata` write.
- `mem_re` and `mem_raddr` read.
- `mem_rdata` must be valid the cycle after `mem_re` and hold while `mem_re`
  is low.

A symbol on the direct branch is held in a bypass register for that cycle,
so the output latency is always one cycle. The configuration is loaded on
`restart`, and by itself in the first cycle after reset.

Timing alignment: the interleaver and deinterleaver together delay a symbol
by I·(I-1)·J symbols. For (12,17) that is 2244 = 11·204, so RS codeword
boundaries survive it. For (52,4) it is 10608, which is not a multiple of 207.
In that case the RS decoder's codeword boundary must be set up by starting
it (through reset) at the right point of the stream.

## The multi-mode RS decoder

`rs_decoder` runs five units in a pipeline. Four codewords are in flight at
a time: one being received, one in syndrome/key-equation work, one in
search/evaluation, and one being corrected and sent out.

**Field multiplier (`rs_ffm`).** The carry-less product of the two
operands is formed once. It is then reduced by x^8+x^4+x^3+x^2+1 and by
x^7+x^3+1 in parallel, and a mux picks the result by mode. Every
multiplier in the decoder is one of these, so no unit needs a copy per
field.

**Syndromes (`rs_syndrome`).** There are 20 Horner cells,
acc ← acc·α^i + r. Cells 1..6 have dual-field constants. Annexes A/C use
cells 0..15, D uses 0..19, and B uses cells 1..6 in GF(2^7). In annex B the
128th symbol is the extended parity C(α^6). It is added into S_6 without a
Horner step, and the other cells hold. If the first t syndromes are zero,
then for up to t errors the codeword is clean. Such a codeword skips the
solver and the search and is sent out unchanged.

**Key equation (`rs_kes`).** This is an inversionless Berlekamp-Massey
solver working one coefficient per cycle with three multipliers:

- δ·σ_j and Δ·τ_{j-1} form the new σ_j.
- S·σ_j accumulates the next discrepancy while σ is being updated.

In annex B an error on the extended symbol changes only S_6. The
locator of up to t-1 other errors then already follows from S_1..S_5, and
the last discrepancy is nonzero. In that iteration a length change would
lead to a degree above t, which no correctable pattern of the 127 other
symbols can produce. So the solver skips that update, in effect forcing the
discrepancy to zero, and keeps σ. The decoder then corrects the other
errors as usual.

After 2t iterations the same S·σ multiplier forms the evaluator
Ω_i = Σ_{j≤i} S_{i+1-j}·σ_j, for i < t. The solver takes
2t(t+1) + t(t+1)/2 + 1 cycles: 31 for B, 181 for A/C, 276 for D.

**Chien search (`rs_chien`).** Cell j holds σ_j·α^(-j·l) and multiplies
itself by α^-j every step. The sum of the cells is σ(α^-l). Cells 0..3 are
dual-field. A separate location cell tracks β = α^-l. Symbol powers l run
from 0, the last symbol of a codeword, to N-1; in annex B they run to 126,
so the extended symbol is never a location. Roots go into a 10-entry
register file. If the number of roots differs from the degree of σ, the
codeword is flagged as uncorrectable.

**Error values (`rs_forney`).** Two multipliers work side by side:

- One squares β and then evaluates σ' (the odd coefficients of σ) at β² by
  Horner's rule. In annexes A, C and D it then multiplies the result by β.
- The other evaluates Ω(β).

The result is e = Ω(β)/(β·σ'(β)) for A/C/D, whose first root is α^0, and
e = Ω(β)/σ'(β) for B, whose first root is α^1. The inverse comes from a
table built at elaboration (256 and 128 entries). Each root takes t+2
cycles.

**Codeword memory (`rs_buffer`).** Only the K message symbols are stored,
in four slots. Two dual-port banks of 376×8 (the `dp_sram` helper) hold two
slots each. Consecutive codewords alternate between banks, so writing the
newest codeword and correcting an older one never touch the same bank. On
the way out each symbol is compared with the stored error locations and
XORed with the matching error value. `out_fail` marks every symbol of an
uncorrectable codeword, whose data then pass through uncorrected.

### Throughput

Error-free streams run at one symbol per clock in every annex. Codewords
that need correction can take longer than N cycles in the serial stages:

- Annex D: the solver alone takes 276 cycles per 207-symbol codeword.
- Annex A/C with t errors: the search plus evaluation takes about
  205 + 8·10 cycles per 204-symbol codeword.

In those cases `sym_ready` drops and the source must wait. Annex B symbols
arrive at most about one every 3.5 cycles from the trellis decoder, so the
B path never stalls; an assertion in the top checks this. At the 83 MHz
of the reference chip, even the stalled rate is far above any J.83 channel
rate.

## De-randomizers

- **`descrambler_acd`, annexes A/C.** Eight steps of the 15-bit PRBS are
  computed per byte, one byte per clock. A first sync byte of B8h (the
  inverted sync that opens each group of eight packets) reloads
  100101010000000 and is output as 47h. Other sync bytes pass through
  unchanged while the PRBS runs on.
- **`descrambler_acd`, annex D.** The 16-bit generator
  x^16+x^13+x^12+x^11+x^7+x^6+x^3+x+1 is reloaded with F180h at field sync.
  It steps once per byte, and its top eight register bits are the
  randomizing byte.
- **`descrambler_b`.** The GF(128) sequence p[n+3] = p[n+1] + α^3·p[n]
  starts from all ones at `frame_start` and is XORed onto each 7-bit symbol.

## Trellis decoder (annex B)

Each of the I and Q rails carries its own rate-1/2, 16-state code with
generators 25 and 37 (octal), punctured with P1 = 0001, P2 = 1111. Over
four steps only the fourth c1 bit is sent, so five bits arrive per rail per
four steps. `trellis_decoder_b` takes one such group per rail (`grp_i`,
`grp_q`: bits 3..0 are c2 of steps 0..3, bit 4 is c1 of step 3). It feeds
both `viterbi_decoder`s one step per cycle, marking the missing c1 bits as
erased.

The Viterbi decoders are hard-decision register-exchange decoders:

- Each state keeps its whole survivor sequence in a register.
- Path metrics are 8-bit and compared modulo 2^8, so they never need
  rescaling.
- After 40 steps the bit is taken from the survivor of the best state.

The decoded I and Q bits are packed I first, MSB first, into 7-bit symbols.

## Top-level interface (`fec_decoder_top`)

| signal | dir | meaning |
|---|---|---|
| `mode` | in | 0 = A, 1 = B, 2 = C, 3 = D. Reset after changing it. |
| `cfg_i`, `cfg_j` | in | Annex B interleaver I and J. Pulse `restart` after changing them. |
| `sym_valid/ready/data` | in/out/in | A/C/D input bytes (after QAM de-mapping). |
| `grp_valid/ready`, `grp_i`, `grp_q` | in/out/in | Annex B punctured trellis groups. |
| `b_frame_start` | in | The next trellis-decoded symbol opens an FEC frame (randomizer reload). |
| `d_field_sync` | in | The next RS output packet opens an annex D field (PRBS reload). |
| `mem_*`, `mem_bound` | out/in | External deinterleaver memory port; `mem_bound` = words used. |
| `out_valid/sop/eop/data/fail` | out | Decoded message bytes (annex B: 7-bit symbols in bits 6..0), packet start/end, uncorrectable flag. |

Output packets carry K bytes (188, 122 or 187). For A/C, byte 0 is the 47h
sync byte.

## Departures and open points

- **Frame synchronisation is not built.** Annex B FEC frame sync and annex
  D field sync detection are outside this design. Their results enter on
  `b_frame_start` and `d_field_sync`. QAM de-mapping and the uncoded QAM bits
  of annex B are outside as well.
- **Errors on the extended symbol.** An error on the annex B extended
  parity symbol is recognised, but its value is not computed. The symbol is
  not part of the output, so nothing is lost.
- **Annex D randomizer bits.** Which eight register bits form the annex D
  randomizing byte is an assumption (the top eight bits of the register in
  Galois form). Check it against the ATSC A/53 tap list before using this
  with real signals.
- **Stalls.** The stall behaviour under heavy errors (see "Throughput") is
  a consequence of the serial schedules chosen here.
- **Truncation length.** The Viterbi truncation length 40 and the 8-bit
  path metrics are this design's choice.
- **Chip-level results are not reproduced.** The reference chip reports
  83 MHz, about 54.5 K gates and two 376×8 SRAMs. This RTL is sized the
  same but has not been taken through synthesis timing or area.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references are written independently
of the RTL:

- `tb_rs_pkg`: shift-and-add field arithmetic, a systematic RS encoder with
  the annex B extended symbol, syndromes and locator polynomials.
- `ext_sram_model`: a 64K×8 behavioural model of the external memory.

| testbench | what it checks |
|---|---|
| `tb_rs_ffm` | all GF(2^7) products, 20000 GF(2^8) products |
| `tb_rs_syndrome` | syndromes and the zero flag, all modes, 0..t+2 errors |
| `tb_rs_kes` | exact solver latency, σ against ∏(1+α^l x), error values via Ω |
| `tb_rs_chien` | root positions and β, N+1 cycle latency, failure flag |
| `tb_rs_forney` | error values for 1..t errors, zero-derivative flag |
| `tb_rs_buffer` | four slots, simultaneous read and write in different banks |
| `tb_rs_decoder` | all modes; back-to-back clean codewords at full rate (exactly 6N cycles); correctable and uncorrectable codewords; annex B extended-symbol errors |
| `tb_deint_addr_gen` | every (I, J) in the table, including (128,8) with M = 65032 |
| `tb_conv_deinterleaver` | interleaver → deinterleaver identity with random gaps and back-pressure |
| `tb_descrambler_acd`, `tb_descrambler_b` | sequences against bit-level reference generators |
| `tb_viterbi_decoder`, `tb_trellis_decoder_b` | error-free decoding through channel bit errors and metric wrap-around |
| `tb_fec_decoder_top` | full chain at default size in all four annexes |

`tb_fec_decoder_top` builds a reference transmitter for each annex:
randomizer, RS encoder, symbol errors, convolutional interleaver, and for
annex B the GF(128) randomizer and punctured trellis encoder with channel
bit errors. It checks every output byte, the sop/eop positions, the failure
flag and `mem_bound`. It also requires each mechanism to occur at least
once:

- input stall
- deinterleaver bypass branch
- corrected packet, clean packet and flagged packet
- B8 PRBS restart
- annex B extended-symbol error
- annex D field sync
- annex B frame start with trellis corrections
- mode switch

A packet with more than t errors may be decoded to a different codeword
without a flag. With t = 3 in annex B this happens quite often. The test
accepts such a packet only if the re-encoded output lies within distance t
of the received word, which makes it a valid bounded-distance decode, and
it reports the packet.

It runs, with data, the (12,17) and (52,4) interleavers and the annex B
settings (8,16), (16,8), (32,4), (64,2), (128,1) and (128,8). The last one
uses 65032 of the 65536 memory words.

Running one test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/fec_pkg.sv tb/tb_rs_pkg.sv tb/tb_fec_decoder_top.sv \
  --top-module tb_fec_decoder_top -o sim
./obj_dir/sim
```

Replace the last file and the top module name for any other testbench. The
full chain test takes about ten seconds.

## Files

- `rtl/fec_pkg.sv`: mode type, code parameters, field multiplication and
  the elaboration-time power and inverse tables.
- `rtl/fec_decoder_top.sv`: the top level.
- `rtl/rs_*.sv`, `rtl/dp_sram.sv`: the RS decoder and its units.
- `rtl/deint_addr_gen.sv`, `rtl/conv_deinterleaver.sv`: the deinterleaver.
- `rtl/descrambler_acd.sv`, `rtl/descrambler_b.sv`: the de-randomizers.
- `rtl/viterbi_decoder.sv`, `rtl/trellis_decoder_b.sv`: the annex B trellis
  decoder.
- `tb/`: the testbenches listed above, plus `tb_rs_pkg.sv` and
  `ext_sram_model.sv`.
