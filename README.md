# Bi-orthogonal code link: encoder, serial line and minimum-distance decoder

This design protects 5-bit data words on a serial line. It maps each word to one of 32 16-bit
*bi-orthogonal* codewords, sends the codeword bit by bit, and recovers the data at the far end
by finding the codeword nearest to what arrived. Any two distinct codewords differ in at least
8 of their 16 bits. So up to 3 flipped bits are always corrected. Any non-zero number of
flipped bits is detected unless the corruption happens to produce another codeword exactly.
Only 32 of the 65,536 possible 16-bit words are codewords, so 99.95 % of received words reveal
an error. Every codeword has even parity, so no parity bit needs to be sent: a receiver can
recompute it and expect zero.

## The code

With `K` data bits the codeword length is `N = 2**(K-1)`. The defaults are `K = 5` and `N = 16`.

* The low `K-1` data bits select a row of the `N x N` Walsh–Hadamard matrix in Sylvester order.
  Bit `j` of row `i` is the parity of `i & j`.
* The top data bit, when set, inverts that row. The inverted row is the *antipodal* code.

That gives 16 mutually orthogonal codes plus their 16 complements. Bit `j = 0` is the first bit
on the line and is stored in the word's MSB. Examples:

| data    | codeword           |
|---------|--------------------|
| `00000` | `0000000000000000` |
| `00001` | `0101010101010101` |
| `00010` | `0011001100110011` |
| `10001` | `1010101010101010` |

Two different orthogonal rows differ in exactly `N/2 = 8` positions. A row and its complement
differ in all 16. The table is not stored as literal data. `ocode_pkg::code_bit` computes it
from the parity formula at elaboration, so synthesis turns it into constants.

## Decoding by minimum distance

The receiver XORs the received 16-bit word with each of the 32 codewords, and a ones counter
counts the set bits of each result. That count is the Hamming distance to that codeword. A
minimum search then picks the smallest count:

* `cnt`: the minimum distance, which is the number of bit errors if the word was decodable. It
  is 0 for a clean word. `err` is high when it is non-zero.
* `p_data`: the nearest codeword, i.e. the corrected code.
* `data_out`: the data word whose codeword that is.
* `parity_err`: the parity of the received word. Every codeword has even parity, so any odd
  number of flipped bits shows here, although no parity bit travels on the line.
* `req`: high when two or more codewords share the minimum distance. The nearest codeword is
  then undefined. `data_out` and `p_data` report the lowest-numbered of the tied codewords,
  and the result should not be trusted.

Why 3 errors: codewords are at least 8 apart. With `e <= 3` errors the sent codeword is at
distance `e` and every other codeword is at least `8 - e >= 5` away, so the decision is always
right and `req` stays low. With 4 errors the received word can sit exactly halfway between two
codewords. That is the threshold `n/4 = 4`, and `req` flags it. For example, `0101011100011111`
is at distance 4 from both `00001` and `00100`. With 5 or more errors a wrong codeword can be
strictly nearer and the word is silently miscorrected. A receiver that must not miscorrect
should treat `cnt >= 4` as uncorrectable. The design reports `cnt` and leaves that decision to
the user.

All 32 comparisons run in parallel in `ocode_decoder`, one `ocode_lut` and one `ones_counter`
per codeword. This lets it take a new word every clock. It is a 2-stage pipeline: all 32
distances are registered, then the minimum search is registered.

## Link structure and timing

```
 data ──► ocode_encoder ──► p2s_shift_reg ──► (line, XOR chan_flip) ──► s2p_shift_reg ──► ocode_decoder ──► data_out
          \____________ ocode_transmitter ____/                          \__________ ocode_receiver ________/
                                         ocode_top
```

Each stage has a `*_rdy` strobe that is high for one clock per valid word (or per valid bit, on
the line). Reset is synchronous and active high, and clears every register and strobe to zero.

| stage | behaviour | delay |
|---|---|---|
| `ocode_encoder` | registers the codeword of `data_in` when `data_rdy` | 1 clock |
| `p2s_shift_reg` | loads the codeword, then shifts it out MSB first, 1 bit/clock, `data_out_rdy` marking each bit | first bit 1 clock after load |
| line | `line_bit = tx_bit ^ (chan_flip & line_rdy)` | 0 |
| `s2p_shift_reg` | shifts in valid bits and emits the word on the N-th one | 1 clock after the last bit |
| `ocode_decoder` | distances, then minimum search | 2 clocks |

From the cycle a word is offered (and taken) on `ocode_top` to `data_out_rdy` takes `N + 5 = 21`
clocks. The transmitter's `ready` output paces the source. `ready` is low while a codeword waits
in the encoder or while more than one bit is left in the shift register. A source that offers a
word whenever `ready` is high gets one codeword every `N + 1 = 17` clocks. Between codewords the
line carries one idle (not valid) cycle.

Words are framed only by counting valid bits since reset. The line has no sync pattern. A lost
or spurious `line_rdy` pulse shifts the framing of every later word until the next reset.

`chan_flip` is the channel: while a bit is valid on the line, driving `chan_flip` high inverts
it. The top brings out the intermediate signals so a link can be observed end to end:
* the transmitted code (`p_data_tx`)
* the line (`line_bit`, `line_rdy`)
* the received word (`p_data1`)
* the decoder results

## Files

| file | contents |
|---|---|
| `rtl/ocode_pkg.sv` | default `K`, and the codeword bit function |
| `rtl/ocode_lut.sv` | codeword table, combinational |
| `rtl/ocode_encoder.sv` | registered encoder |
| `rtl/p2s_shift_reg.sv` | parallel-to-serial shift register with `ready` |
| `rtl/ocode_transmitter.sv` | encoder + p2s |
| `rtl/s2p_shift_reg.sv` | serial-to-parallel shift register, framing by bit count |
| `rtl/ones_counter.sv` | registered population count |
| `rtl/ocode_decoder.sv` | 32 parallel distance lanes, minimum search, tie flag |
| `rtl/ocode_receiver.sv` | s2p + decoder |
| `rtl/ocode_top.sv` | transmitter + channel + receiver |
| `tb/ocode_ref_pkg.sv` | reference model for the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module |

The modules take parameters `K` (data bits), `N` (code length, derived from `K`) and `CW`
(count width, `$clog2(N+1)`). Other `K` values elaborate. The testbenches, and the reference
model in `tb/ocode_ref_pkg.sv`, cover only the default `K = 5`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its own. A watchdog
ends a hung run. For example, the end-to-end test of the link at its default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ocode_pkg.sv tb/ocode_ref_pkg.sv tb/ocode_top_tb.sv --top-module ocode_top_tb
./obj_dir/Vocode_top_tb
```

Each run takes a few seconds. What the testbenches establish:

* `ocode_lut_tb`:
  * all 32 codewords match an independent recursive Hadamard construction (`H2n = [Hn Hn; Hn ~Hn]`);
  * every codeword has zero parity;
  * every pair of codewords is 8 apart, except complementary pairs, which are 16 apart.
* `ocode_decoder_tb`: streams all 65,536 possible 16-bit words, one per clock, and compares
  every output with a brute-force nearest-codeword search. It confirms:
  * 32 words are undetectable (detection 99.95 %);
  * all 22,272 words 1 to 3 bits from a codeword decode correctly with `req` low;
  * `parity_err` for every word;
  * the 2-clock latency.
* `ocode_receiver_tb`: random codewords with 0 to 4 random bit errors, sent with random gaps
  between valid bits. Checks the 3-clock latency after the last bit.
* `ocode_transmitter_tb`: every data word is sent as fast as `ready` allows. Checks the
  serialized codeword, the 2-clock delay to the first bit and the 17-clock word period.
* `ocode_top_tb`: the full link at default parameters. It runs:
  * the five reference cases for data `00001`, received with 0, 1, 2 and 3 errors and one
    4-error tie;
  * every data word with 0 to 4 random line errors;
  * a reset in the middle of a word, followed by more traffic.

  It counts clean decodes, 1-, 2- and 3-bit corrections, ties, back-to-back words, odd error
  counts flagged by `parity_err`, and even error counts that parity misses but `cnt` reveals.
  It fails if any of these never happened. It also checks the 21-clock end-to-end latency.

Two assertions guard the internal handshakes:
* the transmitter never offers a codeword to a busy shift register;
* the 32 decoder lanes always run in step.

## Design choices beyond the basic scheme

The following are this implementation's own decisions rather than part of the basic encode /
shift / correlate / decode scheme:

* The codeword table ordering. Walsh–Hadamard rows in Sylvester order are indexed by the low
  data bits, with the top bit selecting the complement. Only the mapping `00001 →
  0101010101010101` is fixed by the scheme's reference examples. Another row ordering gives a
  code with the same properties but different data↔codeword pairs.
* The MSB-first bit order on the line.
* One-clock `*_rdy` pulses, synchronous reset, and the `ready` back-pressure signal on the
  transmitter.
* The bit counter in the serial-to-parallel converter wraps at `N` instead of running past it.
* Parallel distance lanes. A single counter stepped through the 32 codewords would use less
  logic, but would take 32 clocks per word and could not keep up with the 17-clock word period.
* Lowest index on a tie. The `err` output and the `chan_flip` channel input are also
  additions.
* No explicit correlation threshold. The `n/4` threshold shows up only as the tie flag. `cnt`
  is reported so a user can apply a stricter acceptance rule.
