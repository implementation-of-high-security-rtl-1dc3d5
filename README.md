# Orthogonal-code encrypted serial link with nearest-code error correction

This is a small point-to-point link that protects data against both eavesdropping and bit
errors on the line. Each data word of `a` bits is expanded to a `b = 2^(a-1)` bit orthogonal
code word. The code word is XORed with a key from a linear feedback shift register (LFSR), and
the result is sent one bit per clock. The receiver runs an identical LFSR and XORs the key back
out. It then compares the word with every code word in a table and keeps the closest one,
counting the differing bits. The closest code word gives the data back. The number of differing
bits is the number of errors corrected. If the closest match is not unique, a resend request
(`req`) is raised.

The default build carries 5-bit data as 16-bit code words with a 16-bit key. It corrects up to
3 bit errors per word. Every word with 4 errors seen in testing was flagged with `req`. The
parameter `A` selects 4, 6, 7 or 8-bit data instead (8, 32, 64 or 128-bit codes).

```
 t_data[A]   +---------+ t_ortho[B] +-----------------+ t_out[B] +------------+  ser
 ----------->| encoder |----------->| XOR  <-- LFSR   |--------->| shift reg  |------+
             +---------+            +-----------------+          | (par->ser) |      |
                          transmitter                             +------------+      |
                                                                               chan_err (XOR)
                                                                                      |
 r_out[A], count, req  +---------+ r_ortho[B] +-----------------+ r_data[B] +------------+
 <---------------------| decoder |<-----------| XOR  <-- LFSR   |<----------| shift reg  |<-+
                       +---------+            +-----------------+           | (ser->par) |
                          receiver                                          +------------+
```

## The code

Code word `i` is a row of a Hadamard matrix, optionally inverted. The low `a-1` bits of the data
select row `r`. Bit `p` of that row is `parity(r & p)`. The data MSB inverts the whole row.
This gives `2^a` code words of length `b`:

* every word except all-zeros and all-ones has exactly `b/2` ones;
* any two different words differ in at least `b/2` bits, or in `b` bits if one is the inverse
  of the other.

So a received word with at most `b/4 - 1` flipped bits is closer to its own code word than to
any other. With exactly `b/4` flips, it can be as close to two code words, and the decoder then
raises `req`. Beyond `b/4` flips, the decoder may pick a wrong word without noticing.

| data bits `A` | code bits `B` | code words | errors always corrected | decode cycles `2B+2` |
|---|---|---|---|---|
| 4 | 8 | 16 | 1 | 18 |
| **5 (default)** | **16** | **32** | **3** | **34** |
| 6 | 32 | 64 | 7 | 66 |
| 7 | 64 | 128 | 15 | 130 |
| 8 | 128 | 256 | 31 | 258 |

Data `5'b01001` (row 9) gives code `16'h55AA`. Data `5'b00001` gives `16'hAAAA`. The bit sent
first is bit `B-1`.

## The key stream

`lfsr_keygen` is a `B`-bit Fibonacci LFSR. On each step it shifts towards the MSB, and bit 0
takes the XOR of the tap bits. For 16 bits the taps are 16, 15, 13 and 4. The 8, 32, 64 and
128-bit widths use standard maximal-length tap sets (see `ortho_pkg::lfsr_taps`). The `TAPS`
parameter of `lfsr_keygen` overrides the polynomial. The whole
state is used as the key. After reset the state is `SEED`, which defaults to `1`. So the first
frame after reset is encrypted with key `0001h`: code `AAAAh` goes out as `AAABh`.

Both ends step their LFSR exactly once per frame:

* the transmitter steps when it takes a word;
* the receiver steps when a frame has been fully shifted in, even if the decoder is busy and
  the frame is dropped.

The two ends therefore stay in step for as long as they agree on the frame count since a
common reset. The link has no other synchronisation: a lost or extra frame on the line puts the
keys out of step for good. The key stream is a linear sequence that repeats every `2^B - 1`
frames. It hides the data from a casual observer. It is not cryptographically strong.

XOR encryption does not spread bit errors. A bit flipped on the line is still exactly one
flipped bit after decryption, which is why error correction can come after decryption.

## Timing

All logic is on the rising edge of `clk`. Reset `rst_n` is synchronous and active low.

**Transmitter.** `t_ortho` and `t_out` show, combinationally, the code and cipher word for the
current `t_data`. A word is taken at the edge where `t_valid && t_ready`. In the next `B`
cycles `ser_out` carries the `B` cipher bits, MSB first, with `ser_valid` high. `t_ready` is
low during those cycles, so the transmitter can take at most one word per `B + 1` cycles.

**Receiver.** The serial-to-parallel shift register samples `ser_in` on every edge where
`ser_valid` is high. Frames are counted from reset. The edge that samples the `B`-th bit stores
the word in `r_data` and raises `frame_done` for one cycle. Call that edge 0. Then:

| edge | what happens |
|---|---|
| 0 | last bit sampled; `r_data` updated |
| 1 | decoder latches `r_data ^ key` (shown as `r_ortho`); receiver LFSR steps |
| 2 … 2B+1 | one table entry per cycle: XOR with the latched word, count the ones, keep the minimum and note ties |
| 2B+2 | `r_out`, `count`, `req` registered; `r_valid` high for one cycle |

The decoder is busy from edge 1 to edge `2B+2`. A frame takes only `B` cycles on the line, so
the sender must leave at least `2B+2` cycles between the last bits of consecutive frames.
Waiting for `r_valid` before sending again is enough. If a frame completes while the decoder is
busy, it is dropped and `overrun` pulses. Its key step is still taken.

When `req` is high, `r_out` is the lowest-numbered of the tied code words. It should not be
used.

## Modules

| file | role |
|---|---|
| `rtl/ortho_pkg.sv` | code-length and counter-width functions, the code-word function, LFSR tap masks |
| `rtl/lfsr_keygen.sv` | `W`-bit LFSR key generator |
| `rtl/ortho_encoder.sv` | data → code word (combinational) |
| `rtl/ortho_encryptor.sv` | LFSR + XOR on the transmit side |
| `rtl/piso_shift_register.sv` | transmit shift register, parallel to serial |
| `rtl/ortho_transmitter.sv` | encoder + encryptor + shift register, with valid/ready |
| `rtl/sipo_shift_register.sv` | receive shift register, serial to parallel, with frame counting |
| `rtl/ortho_decryptor.sv` | LFSR + XOR on the receive side |
| `rtl/ortho_decoder.sv` | code table and sequential nearest-code search |
| `rtl/ortho_receiver.sv` | shift register + decryptor + decoder, with overrun flag |
| `rtl/ortho_crypto_system.sv` | top: transmitter, a line with an error-injection XOR (`chan_err`), receiver |

Parameters: `A` is the data width (default 5). `B = 2**(A-1)` is derived from it and should not
be set on its own. `SEED` is the LFSR start value and must be non-zero. `CW = $clog2(B+1)` is
the width of `count`. Supported values of `A` are 4 to 8, limited by the tap table and by the
128-bit width of the package functions.

Synthesised at the default size, the top holds a 32 × 16-bit code table and about 135
flip-flops. The table is a constant array computed at elaboration. The encoder
computes the same formula as `ortho_pkg::ortho_code`, which fills the decoder table; a different
code assignment has to be changed in both places.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares the module with
reference models in `tb/tb_ref_pkg.sv`. Those models are written differently from the RTL:

* the code is built by Sylvester doubling;
* the LFSR is stepped from an explicit tap list;
* decoding is a brute-force search.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

* `tb_lfsr_keygen`: key sequence, hold without `step`, period 65535 for 16 bits and 255 for
  8 bits.
* `tb_ortho_encoder`: all code words for A = 4, 5, 8, balance, and minimum distance.
* `tb_ortho_encryptor` and `tb_ortho_decryptor`: XOR with the reference key sequence.
* `tb_piso_shift_register` and `tb_sipo_shift_register`: bit order, strobes, framing, and an
  ignored load while busy.
* `tb_ortho_decoder`: 0–3 errors corrected, 4-error and random words against brute force, a
  latency of exactly `2^A + 1` edges after `start`, `start` ignored while busy, and the word
  `8AA8h`, two bits away from `AAAAh`, decoded with a count of 2.
* `tb_ortho_transmitter` and `tb_ortho_receiver`: whole frames against the reference. The
  receiver test checks the `2B+2` latency, provokes one overrun, and checks that the keys stay
  in step after it.
* `tb_ortho_crypto_system`: end to end at the default size, with no parameter overrides. It
  injects 0–4 line errors per word, checks the published first-frame example, and counts clean
  frames, corrected frames, resend requests, one overrun and per-frame key changes. It fails if
  any of these never happens.
* `tb_workloads`: the same link at A = 4, 6, 7 and 8, through `tb_link_exerciser`. Each width
  gets words with up to `B/4 - 1` errors and a `2B+2` latency check.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ortho_pkg.sv tb/tb_ref_pkg.sv tb/tb_link_exerciser.sv tb/tb_workloads.sv \
    --top-module tb_workloads
./obj_dir/Vtb_workloads
```

For the other testbenches, replace the last two file names and the top module name. Each
testbench runs in a few seconds.

## Where this design makes its own choices

The overall scheme is taken as given:

* the orthogonal code with `b = 2^(a-1)`;
* XOR encryption with an LFSR key as wide as the code word;
* serial transmission through shift registers;
* a decoder that XORs the received word with every stored code word, counts the ones, takes the
  minimum, and raises a resend request when the minimum is shared;
* the `2b+2` cycle processing time;
* the correction limit of `b/4 - 1` bits.

These points are choices made here:

* **Code-word assignment.** The Hadamard row order is the standard one. In the reference
  example, data `01001` gives code `AAAAh`. Here `01001` gives `55AAh`, and `AAAAh` is the code
  of `00001`. Any row order gives the same correction power.
* **LFSR polynomial, structure and update rate.** The scheme does not fix these. The seed value
  1 matches the example's first key, `0001h`.
* **Bit order, framing and handshakes.** This covers MSB-first transmission, `ser_valid`
  framing counted from reset, the `t_valid`/`t_ready` handshake, the `overrun` flag and the
  `chan_err` line model.
* **Decoder schedule.** The decoder tests one table entry per cycle, with a combinational
  count of ones. This reproduces the `2b+2` cycle count exactly.
* **Resend request.** `req` is raised only when the minimum distance is shared. A unique but
  large minimum (more than `b/4` errors) is reported as a normal result, with its count.
* **Reset.** The reset is active low and synchronous.

No timing constraints or FPGA-specific primitives are included. The design is plain
synthesizable SystemVerilog.
