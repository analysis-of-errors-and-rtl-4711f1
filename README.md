# Parity-sharing Reed-Solomon codec, PS(32,28,32,26,M)

A long Reed-Solomon code protects well but needs a big Galois field and a
decoder whose delay grows with the square of its check symbols. A
parity-sharing (PS) code gets similar protection from two short RS codes
over GF(2^8):

* K2 data rows are each encoded with a row code RS(N1,K1).
* Only the first M symbols of each row codeword are sent (K1 < M < N1). The
  last N1-M row check symbols are held back.
* The held-back symbols, stacked over the K2 rows, form N1-M columns. Each
  column is encoded with a column code RS(N2,K2). Only the column check
  symbols are sent: these are the *shared parities*.

```
              <-------------- N1 = 32 --------------->
              <------ K1 = 28 -----><- row checks ->
   row 0      d d d d ... d d d d d | c c | x x          x = untransmitted
   row 1      d d d d ... d d d d d | c c | x x              (N1-M of them)
    ...                                   : :
   row K2-1   d d d d ... d d d d d | c c | x x
                                          ------
   shared parities (N2-K2 = 6 rows)       p p    <- RS(32,26) over each
                                                    x column
              <------------- M = 30 ------------>
```

A PS codeword carries K2*K1 data symbols in K2*M + (N1-M)(N2-K2) transmitted
symbols. Its rate is K1*K2 / (K2*M + (N1-M)(N2-K2)). The default code
PS(32,28,32,26,30) has rate 728/792 = 0.919.

M can change from one PS codeword to the next without any change in
structure. Only a multiplexer in the column encoder and the counters of the
control FSMs depend on it. With the default row code, M can be 29, 30 or 31.
A smaller M sends fewer symbols per row, and the rows then lean more on the
shared parities.

Symbols are bytes in GF(2^8). The field uses the primitive polynomial
x^8+x^4+x^3+x^2+1 (0x11D) and alpha = 2. An RS code with P check symbols has
the generator g(x) = (x+alpha^0)(x+alpha^1)...(x+alpha^(P-1)). Codewords are
sent highest degree first, data before check symbols. These field conventions
are this design's choice; any GF(2^8) convention would work.

## Decoding in three steps

Decoding depends on erasures: symbols known to be unreliable, whose
positions the decoder is told. An RS(n,k) decoder corrects e errors and s
erasures as long as 2e + s <= n-k. The PS decoder uses three RS decoders,
and its control FSM decides which symbols are treated as erasures:

1. **Rows (row decoder 1, erasure signal Er1).** Each row is rebuilt as N1
   symbols: the M received ones, with the channel's erasure flags, and N1-M
   zero symbols flagged as erasures (the untransmitted ones). The N1-M
   untransmitted symbols use up part of the row's budget. With M = 30, a row
   can therefore still take 2e + s <= 2, for example one error or two
   erasures. Corrected rows, including their now-known check symbols, go to
   RAM1. A row that fails is stored as received, its *Fail* bit is set, and
   its received erasure flags are kept next to RAM1.
2. **Columns (column decoder, erasure signal Er2).** Each column codeword is
   made of:
   - K2 row check symbols from RAM1, erased where the row's Fail bit is set;
   - N2-K2 received shared parities, with their channel erasure flags (Er2).
   So a failed row costs each column only one erasure, and a column can
   absorb up to six failed rows. Corrected check symbols go to RAM2. A column
   that fails is remembered.
3. **Rows again (row decoder 2, erasure signal Er3).** Each row is decoded
   again from:
   - the M symbols in RAM1, erased where the channel flagged them if the row
     had failed;
   - the N1-M recovered check symbols from RAM2, erased only where the column
     failed.
   A row that failed step 1 now has all N1-K1 check symbols available again.

Each row's K1 data symbols come out with a fail flag. The flag is set when
the row could not be corrected even in step 3.

**Example.** Take M = 30. A row with three erased symbols fails step 1:
3 + 2 untransmitted = 5 > 4. Suppose at most six rows fail. Each column then
has at most six erasures and decodes. In step 3 the row has only its three
erasures, so it is corrected.

If seven rows fail step 1, every column gets seven erasures and fails. In
step 3 those rows then also have N1-M erased check symbols, and they can
fail for good. The testbenches use both cases.

## RS decoder building block (`rs_ee_decoder`)

The three decoders are one errors-and-erasures RS decoder module with
different N and K. A codeword enters on N consecutive cycles with an erasure
flag per symbol. The decoder has four stages, each holding one codeword:

| stage | what it does |
|---|---|
| input | Horner syndromes S_j = r(alpha^j) for j < N-K. Builds the erasure locator Gamma(x) = prod(1 + alpha^pos x), one factor per flagged symbol. Counts the erasures. Writes the symbols into a circular buffer. |
| solve | Berlekamp-Massey, started from Gamma with length = erasure count: one iteration per cycle over the free syndromes. Then Omega = S*Lambda mod x^(N-K). Then a one-cycle root count of Lambda over all N positions. |
| hold | Keeps the result so that every codeword takes exactly the same time. |
| output | Chien search in transmission order. Where Lambda(x) = 0, adds the Forney value Omega(x) / (x Lambda'(x)) to the buffered symbol. |

Decoding fails if any of these is true:
- there are more erasures than N-K;
- the Berlekamp-Massey length differs from the degree of Lambda;
- the number of roots of Lambda among the N real positions differs from
  that degree.

A failed codeword passes through unchanged, with `out_fail` high on all of
its symbols. The PS decoder relies on this: a failed row is stored as
received.

The timing is fixed and follows the usual figures for this kind of decoder:

| code | processing delay PD = (N-K)(N-K+2)+3 | latency N+PD+7 | new codeword every |
|---|---|---|---|
| RS(32,28), rows | 27 | 66 | 32 cycles (continuous) |
| RS(32,26), columns | 51 | 90 | 51 cycles (`ready` low for 19) |

The solver needs only N-K+2 cycles, or at least 7. The rest of PD is spent
waiting in the hold stage, so the figures above are exact, not upper bounds.
The circular buffer holds every symbol still in flight: 128 bytes for
N = 32.

## Encoder (`ps_encoder`)

The encoder has four parts:

* `rs_lfsr_encoder`: the row encoder, a systematic RS(N1,K1) division LFSR.
  Data passes straight through. The N1-K1 check symbols follow on the next
  cycles, and `in_ready` is low meanwhile.
* `rs_mc_encoder`: the multiple-channel column encoder. It is an RS(N2,K2)
  LFSR in which every delay element is a chain of up to N1-K1-1 registers. A
  multiplexer taps the chain at length N1-M, so the N1-M columns are encoded
  interleaved, one symbol per column per row. Registers past the tap are held
  at zero, so M may change between PS codewords.
* `ps_enc_ctrl`: the FSM. Its outputs are:
  - **H/V**: selects row symbols or shared parities for the output;
  - **En**: the row symbol goes into the column encoder;
  - **DV**: the slot is transmitted;
  - **RFD**: ready for data.
* The H/V multiplexer and an output register.

The output shows every slot, one cycle after it is produced:
- K2*N1 row slots, of which the first M of each row have DV high;
- then (N2-K2)(N1-M) shared parities, with DV high. They come ordered by
  parity degree, and for each degree column 0 first.

`out_sof`/`out_eof` frame a PS codeword. With data always available, a PS
codeword takes K2*N1 + (N2-K2)(N1-M) cycles. RFD is low for the row check
symbols and for the shared parities.

## Decoder (`ps_decoder`)

Input is the transmitted stream:
- K2 rows of M symbols;
- then the shared parities, in the encoder's order.

Each symbol comes with `in_era`. Once a row's first symbol is accepted, its M
symbols must arrive on consecutive cycles. The row decoder then runs on N1
consecutive cycles, and `in_ready` is low while the N1-M filler erasures are
inserted. The shared parities may arrive with gaps.

The memories are built from `ps_ram`:

| memory (per bank) | size | content |
|---|---|---|
| RAM1 | K2*N1 x 8 | rows after step 1 |
| RAM1 erasure plane | K2*N1 x 1 | received erasure flags of the rows |
| RAM2 | N2*(N1-K1-1) x 9 | column codewords with erasure flags: first the received shared parities, then the corrected check symbols |

`evt_row_fail` pulses once for each row that fails step 1. `evt_col_fail`
pulses once for each column that fails.

### Banks, sequencing and throughput

Within one PS codeword the steps follow each other:
- Step 2 starts when the last row has left row decoder 1 and all shared
  parities are in. A column needs every row, so it cannot start earlier.
- The columns are decoded back to back, 51 cycles apart.
- Step 3 starts when the last column is out.

Consecutive PS codewords overlap. RAM1, its erasure plane, RAM2 and the
Fail and column-fail flags exist in `NB` banks (default 3), one per PS
codeword in flight. Each step has its own bank pointer that moves on when
the step has finished a codeword. So while row decoder 1 works on codeword
n+2, the column decoder can work on n+1 and row decoder 2 on n. A bank is
released when step 3 has read its last row. The input waits only if the
next bank is still in use.

Step 2 takes (N1-M) x 51 + 39 cycles. That is at most 192 cycles, far below
the 844 or so cycles a PS codeword needs at the input. This is the
condition for continuous operation: the columns of one codeword must be
decoded before the next codeword has arrived. Step 3 reads N1 symbols per
row, as row decoder 1 does, so it keeps pace too.

With three banks, the decoder stalls its input only for the N1-M filler
cycles of each row. Those are exactly the slots in which the encoder sends
nothing (DV low). Three banks are needed because the work on codeword n
(steps 2 and 3, about 1050 cycles) is longer than the time codeword n+1
takes to arrive. With `NB = 2` the decoder still works, but the input then
stalls for part of every codeword.

Latency is measured from the last received symbol of a PS codeword to its
first decoded data symbol: about 300 cycles (299 to 366 in the top-level
test). It is roughly row decoder latency + column decoding + row decoder
latency. Step 3 of one codeword can also wait for step 3 of the previous
one, since they share row decoder 2.

## Interfaces of the top (`ps_codec_top`)

The encoder and the decoder stand side by side. The channel between them is
outside: it carries the slots with `enc_out_dv` high and supplies
`dec_in_era`. That flag comes from whatever "channel side information" the
medium provides, for example a detected fault in a memory, or a demodulator
flag.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `enc_m_sel[5:0]` | in | M for the next PS codeword (sampled with its first row symbol) |
| `enc_in_valid`, `enc_in_data[7:0]`, `enc_rfd` | in/in/out | data symbols, taken when valid and RFD |
| `enc_out_valid`, `enc_out_dv`, `enc_out_data[7:0]`, `enc_out_sof`, `enc_out_eof` | out | encoded slots |
| `dec_m_sel[5:0]` | in | M of the next received PS codeword |
| `dec_in_valid`, `dec_in_data[7:0]`, `dec_in_era`, `dec_in_ready` | in/in/in/out | received symbols and erasure flags |
| `dec_out_valid`, `dec_out_data[7:0]`, `dec_out_fail`, `dec_out_sof`, `dec_out_eof` | out | decoded data, row fail flag, framing |
| `dec_evt_row_fail`, `dec_evt_col_fail` | out | step-1 row failure and column failure events |

Parameters: `N1`, `K1`, `N2` and `K2`, default 32/28/32/26. M must satisfy
K1 < M < N1. At K1 = 26 (six row check symbols) the same RTL runs the codes
PS(32,26,32,26,M) with M from 27 to 31.

## What follows the published design and what does not

The following match the published design:
- the code construction and rate;
- the encoder structure, with its LFSR row encoder, its multiple-channel
  column encoder with the M-selecting multiplexer, and its H/V, En, DV and
  RFD signals;
- the three decoding steps, with the Fail/Er2 erasure rule for the columns;
- the processing delay and latency of the RS decoder building block.

The following are this design's own:
- **Field and generator.** The primitive polynomial 0x11D and the roots
  alpha^0..alpha^(P-1) are a choice here.
- **Inside of the RS decoder.** The published design uses an existing
  decoder and gives only its timing. The algorithm here is written to match
  that timing.
- **Er3.** Step 3's erasures are not fully specified there. Here:
  - the M stored symbols of a row that failed step 1 keep their channel
    erasure flags;
  - the recovered check symbols are erased when their column failed.
- **Column decoder.** One RS(N2,K2) decoder handles the N1-M columns in
  turn, which is enough because of the condition for continuous operation.
- **Banks.** The RAMs and flags are kept in three banks so that PS codewords
  overlap. That is three times the memory of a single RAM1/RAM2 pair. The
  published design speaks of two RAMs and gives no sizes.
- **Latency.** The overall latency is about 300 cycles from the end of a PS
  codeword. The published figure is about 222 cycles, the sum of the three
  decoder latencies. Here each column waits for the codeword's last row, and
  the columns of a codeword are decoded one after another.
- **Decoder input.** The M symbols of a row must arrive back to back. The
  untransmitted symbols are filled in as zeros.
- **Decoder output.** Only data symbols come out, one fail flag per row.
- **Erasure source.** The block that turns channel side information into
  erasure flags depends on the medium and is not included. Its output is
  the `dec_in_era` input.
- **Default parameters.** They give the main configuration
  PS(32,28,32,26,M). The error-rate study of these codes also uses six row
  check symbols (K1 = 26, M = 28..30). That configuration is a parameter
  change and has its own testbench.
- **Reference code.** The long RS(255,235) code that PS codes are usually
  compared with is not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against a reference model in `tb/rs_ref_pkg.sv` and `tb/ps_ref_pkg.sv`. That
model is written independently: a carry-less multiplier and polynomial long
division.

| testbench | what it shows |
|---|---|
| `tb_rs_lfsr_encoder` | row codewords match the reference; parity phase lasts N-K cycles; gaps in the input are tolerated |
| `tb_rs_mc_encoder` | shared parities match the reference for 1, 2 and 3 interleaved channels, including changes of chain length |
| `tb_ps_enc_ctrl` | counts of DV, En and H/V per PS codeword for M = 29, 30, 31; RFD low during H/V |
| `tb_ps_encoder` | every output slot and its DV flag for M = 29, 30, 31, with random input gaps |
| `tb_rs_ee_decoder` | RS(32,28) and RS(32,26) with random errors and erasures within 2e+s <= N-K: exact correction; more than N-K erasures: failure, symbols passed through; latency 66 and 90; codeword spacing 32 and 51 |
| `tb_ps_ram` | reads against a shadow copy |
| `tb_ps_decoder` | six PS codewords with patterns whose outcome is fixed: step-1 corrections, rows recovered in step 3, failing columns and unrecoverable rows, M changes; counts each event |
| `tb_ps_codec_top` | encoder, error-injecting channel and decoder end to end at the default parameters; eight PS codewords; checks all data and fail flags; requires each mechanism (RFD pause, M change, step-1 failure, column failure, step-3 recovery, final failure) to occur; checks that the decoder input stalls only for filler cycles, i.e. keeps up with the stream |
| `tb_ps_codec_ber_config` | the same chain at K1 = 26 for M = 28, 29, 30, with every row at its step-1 limit and four rows per codeword failing step 1 and being recovered |

What the tests do not establish:
- Error patterns beyond the code's guarantee can be miscorrected rather than
  flagged, which is inherent to RS codes. The tests only use patterns whose
  outcome is certain.
- Timing closure has not been studied. The root count and the Forney
  division are single-cycle combinational blocks.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv tb/rs_ref_pkg.sv tb/ps_ref_pkg.sv tb/tb_ps_codec_top.sv \
    --top-module tb_ps_codec_top -o sim --Mdir obj
./obj/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. The
packages `gf_pkg` and, for testbenches, `rs_ref_pkg` and `ps_ref_pkg` must
come first on the command line. Verilator finds the other modules through
`-y`.

## Files

| file | content |
|---|---|
| `rtl/gf_pkg.sv` | GF(2^8) multiply, power, inverse, generator polynomial |
| `rtl/rs_lfsr_encoder.sv` | RS(N1,K1) row encoder |
| `rtl/rs_mc_encoder.sv` | multiple-channel RS(N2,K2) column encoder |
| `rtl/ps_enc_ctrl.sv` | encoder FSM (H/V, En, DV, RFD) |
| `rtl/ps_encoder.sv` | PS encoder |
| `rtl/rs_ee_decoder.sv` | errors-and-erasures RS decoder |
| `rtl/ps_ram.sv` | RAM1 / RAM2 |
| `rtl/ps_decoder.sv` | three-step PS decoder with its FSM |
| `rtl/ps_codec_top.sv` | top: encoder and decoder |
| `tb/*.sv` | testbenches and reference packages |
