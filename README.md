# Majority-logic decoding with early error detection for an EG-LDPC protected memory

Memories hit by soft errors need a code that corrects more than one flipped bit, yet
a decoder that is simple enough to put on every read path. One-step majority-logic
(ML) decoding of Euclidean-geometry LDPC codes is that simple: a shift register, a
few XOR gates and a majority vote. Its drawback is time: a plain ML decoder spends one
clock per codeword bit on every read, error or not.

This design removes most of that time. The decoder watches its own check sums during
the first three decoding iterations. If none of them fires, the word is passed out
straight away; only words that show an error go through all fifteen iterations. No
syndrome generator is added for this: the detector reuses the decoder's XOR matrix and
adds two flip-flops, two OR gates and a small FSM.

The RTL implements a 16-word memory protected by the (15,7,5) EG-LDPC code:

```
 wr_data[6:0] -> eg_encoder -> eg_encoder_checker -> cw_memory (16 x 15) -> mldd -> rd_data[6:0]
                  (8 XORs)     (reject -> re-encode)                        (3 or 15 iterations)
```

## The code

A 7-bit word `i` becomes a 15-bit codeword `c`. The code is systematic: `c[6:0] = i`
and the parity bits are

| bit | equation            | bit | equation            |
|-----|---------------------|-----|---------------------|
| c7  | i0 ^ i4 ^ i6        | c11 | i0 ^ i2 ^ i3        |
| c8  | i0 ^ i1 ^ i4 ^ i5 ^ i6 | c12 | i1 ^ i3 ^ i4     |
| c9  | i0 ^ i1 ^ i2 ^ i4 ^ i5 | c13 | i2 ^ i4 ^ i5     |
| c10 | i1 ^ i2 ^ i3 ^ i5 ^ i6 | c14 | i3 ^ i5 ^ i6     |

Example: `i = 0000101` (i6 first) encodes to `c = 010010110000101` (c14 first).

Two properties make the decoder work, and both can be checked from the table:

* **The code is cyclic.** Rotating a codeword by any number of places gives another
  codeword. So check equations wired to fixed register positions can decode every bit
  in turn while the word rotates past them.
* **Four checks are orthogonal on one bit.** The parity-check matrix has 15 rows of
  weight 4 (the rotations of `c0^c8^c12^c14`). Exactly four of them contain bit 14:

  ```
  B1 = c0 ^ c8  ^ c12 ^ c14
  B2 = c1 ^ c2  ^ c10 ^ c14
  B3 = c3 ^ c5  ^ c6  ^ c14
  B4 = c7 ^ c11 ^ c13 ^ c14
  ```

  Apart from c14 no bit appears in more than one of them. If c14 is wrong and at most
  one other bit is wrong, at least three checks are 1; if c14 is right and at most two
  other bits are wrong, at most two checks are 1. A vote "more ones than zeros" therefore
  decides c14 correctly whenever the word holds at most two errors (minimum distance 5).

All constants are in `rtl/eg_ldpc_pkg.sv`. The check equations are not tabulated in
the source description of this decoder; they were derived here from the encoder.

## The decoder/detector (`mldd`)

```
          +---------------------------------------------+
 cw_in -->| cyclic_shift_reg  q[14] ... q[0]            |<-- (q[14] ^ maj) wraps to q[0]
          +---------------------------------------------+
                 | fixed taps
            xor_matrix --> B1..B4 --> majority_gate --> maj
                               \--> mldd_control --> shift, finish, early
                                                      |
                           output muxes (undo rotation) --> y
```

**Decoding.** The codeword is loaded into a 15-bit register. In every iteration the
XOR matrix forms B1..B4 on the register as it stands, the majority gate votes, and the
register rotates one place towards the MSB; the MSB, the bit under decoding, is XORed
with the vote as it wraps to bit 0. After 15 iterations each bit has been under
decoding once and the word is back in its original order.

**Detection.** `mldd_control` ORs the four check sums (`or1`) in every iteration. In
iterations 1 and 2 `or1` is shifted into two detection flip-flops (`dff1`, `dff2`). In
iteration 3 a second OR gate forms `or2 = or1 | dff1 | dff2`. If `or2` is 0, no check
fired during three iterations: twelve check evaluations, covering 9 distinct rows of
the 15-row parity-check matrix, were all satisfied: the word is declared error-free, `finish` is raised with
`early = 1`, and the register is not rotated again. Otherwise decoding runs to
iteration 15.

Why three iterations are enough: every pattern of one to four flipped bits violates at
least one of those 12 checks (all 1,940 such patterns were enumerated). Five-bit
patterns can escape: 18 of the 3,003 do. So a word with up to two errors is always
corrected, a word with three or four errors is always at least flagged
(`err_detected`), and only five or more errors can slip through unseen. While no check
has fired the majority gate outputs 0, so the shortcut never changes a bit.

**Output multiplexers.** After an early finish the register has rotated twice, so the
output multiplexers rotate it back by two. After a full decode they take the
register's next value, which is in original order.

**Timing** (clock periods, counting from the one in which `start` is high):

| word              | periods | clock edges from the one that takes `start` to `done` high |
|-------------------|---------|-----------------------------------------|
| no error detected | 5 = 1 load + 3 iterations + 1 output | 3 |
| error detected    | 17 = 1 load + 15 iterations + 1 output | 15 |

A plain ML decoder would take 17 for every word. `start` is taken only while `busy`
is low. `done` is a one-cycle pulse, and `y` and `err_detected` hold until the next
word finishes.

## The memory system (`mldd_memory_system`)

**Write.** `wr_en` with `wr_addr`/`wr_data` while `wr_ready` is high. The word is
encoded and checked in the same cycle. `eg_encoder_checker` computes the full 15-bit
syndrome of the encoder output. If it is non-zero the codeword is not written,
`enc_retry` pulses, `wr_ready` drops, and the held word is encoded again next cycle.
This repeats until it passes. The input `enc_fault_mask` is XORed onto the encoder
output ahead of the checker and models a transient encoder fault. Keep it at zero in
normal use.

**Read.** `rd_en` with `rd_addr` while `rd_ready` is high. The memory takes one cycle,
then the decoder runs. `rd_valid` rises 4 clock edges after the edge that takes
`rd_en` for a clean word, and 16 edges after it when an error was detected. It comes
with `rd_data` (the 7 corrected information bits), `rd_codeword` and
`rd_err_detected`. One read is in flight at a time. Corrected words are not written
back: a soft error stays in memory until the word is written again.

**Soft errors.** `upset_en`, `upset_addr` and `upset_mask` flip the masked bits of a
stored word. This models upsets in the storage array. If a write hits the same word in
the same cycle, the write wins.

## Files

| file | contents |
|------|----------|
| `rtl/eg_ldpc_pkg.sv` | N=15, K=7, J=4, parity and check masks, rotation function |
| `rtl/eg_encoder.sv` | systematic encoder, 8 XOR gates |
| `rtl/eg_encoder_checker.sv` | syndrome check of the encoder output |
| `rtl/cw_memory.sv` | 16 x 15 codeword array, sync read, upset port |
| `rtl/cyclic_shift_reg.sv` | load/rotate register with correcting wrap |
| `rtl/xor_matrix.sv` | J check sums from masks |
| `rtl/majority_gate.sv` | strict majority of J inputs |
| `rtl/mldd_control.sv` | detection registers, OR gates, FSM, iteration counter |
| `rtl/mldd.sv` | decoder/detector |
| `rtl/mldd_memory_system.sv` | top: encoder, checker, memory, decoder |
| `tb/eg_ref_pkg.sv` | reference encoder written gate by gate, helpers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself; a watchdog
counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/eg_ldpc_pkg.sv tb/eg_ref_pkg.sv tb/tb_mldd.sv --top-module tb_mldd
./obj_dir/Vtb_mldd
```

Replace `tb_mldd` with any other `tb_*` name; Verilator finds the remaining files
through `-I`. What the testbenches cover:

* `tb_eg_encoder`: all 128 words, plus the reference example pairs.
* `tb_mldd`: every codeword, clean and with every 1- and 2-bit error. These must be
  corrected (15,360 cases). Then every 3-, 4- and 5-bit error pattern, each on a
  random codeword. All 3- and 4-bit patterns must be flagged, and exactly 18 of the
  5-bit ones escape. It checks the 3- or 15-edge latency of each decode. It also
  shows that most 3-bit errors, one more than the code corrects, come out
  uncorrected.
* `tb_mldd_memory_system`: runs the default-size top end to end. It covers clean
  reads, corrected reads, flagged-only reads and encoder retries, and counts each one.

## Where this design makes its own choices

The source describes the code, the encoder gates, and the structure of the decoder and
its control unit. The following are choices made here:

* **Check equations.** B1..B4 are derived from the encoder (see above).
* **Encoder table conflict.** The source also prints a generator matrix that disagrees
  with its own encoder circuit and its encoder simulation results. This design follows
  the circuit, whose code is cyclic with distance 5.
* **Shift direction.** The register rotates towards the MSB and the MSB wraps to bit 0.
  The correcting XOR sits in that wrap path.
* **Iteration count.** A full decode is 15 iterations. That is what brings the word
  back into its original order.
* **Majority ties.** A 2-2 tie does not flip the bit.
* **Counters.** A single iteration counter runs 1..15. The control unit's separate
  2-bit counter, whose role is not described, is not reproduced.
* **Early-finish timing.** On an early finish the register is not rotated in
  iteration 3.
* **Top level.** Memory depth (16 words), reset (asynchronous, active low), the
  handshakes, the two fault-injection ports and the re-encode-on-reject write path are
  this design's own.

**Not built:**

* A final "all checks zero" test that would flag a word that could not be corrected.
* Larger codes such as (73,36,19). The encoder and check masks are specific to
  (15,7,5). A longer code needs new masks in the package and a wider register.
* The plain ML decoder and the syndrome-detector variant. These are only reference
  points the design is compared with.
