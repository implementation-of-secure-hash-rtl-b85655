# SHA-1 and Groestl-256 hash engines for small FPGAs

Two independent, area-oriented hash engines in SystemVerilog:

* **SHA-1 as a memory-mapped peripheral.** The engine sits behind one port of a
  dual-port RAM. A CPU writes padded 512-bit message blocks into the other port,
  starts the engine with a single signal and later reads the 160-bit digest from
  the same RAM. The RAM has two message areas, so the CPU can write block *k+1*
  while the engine hashes block *k*. One SHA-1 step is done per clock.
* **Groestl-256 with one shared round unit.** A single round unit computes both
  permutations P and Q, one after the other, and also the final output
  transformation. The round unit itself works on one 64-bit state column per
  clock, so it needs only eight S-boxes and one MixBytes column multiplier.

The two engines share nothing but the clock and reset. `hash_top` places them
side by side with their own ports.

## SHA-1 engine

### Memory map and CPU protocol

The shared RAM has 256 words of 32 bits (8-bit word address).

| Word address | Contents |
|---|---|
| `0x00`-`0x0F` | message area 0: words W0..W15 of a block, W0 first |
| `0x10`-`0x1F` | message area 1 |
| `0x20`-`0x24` | digest H0..H4, H0 at `0x20` |

A message of *n* padded blocks is hashed like this:

1. Write block 0 into area 0 and raise `execute`. The engine loads the SHA-1
   initial value and starts on area 0.
2. While it runs, write block 1 into area 1.
3. Wait for `sha1_digest_ready`. The chaining value after block 0 is now in
   `0x20`-`0x24`.
4. Pulse `new_block`. The engine hashes the other area, starting from the
   current chaining value. The rising edge is what counts. A pulse that comes
   while a block is still running is remembered. A level held high starts only
   one block.
5. Repeat until the last block. Then read the digest and lower `execute`.
   Lowering `execute` at any time sends the engine back to idle. The next
   `execute` starts a new message from area 0.

The engine does no padding. The CPU appends the `1` bit, the zero bits and the
64-bit bit length (FIPS 180-1).

### Timing

`sha1_digest_ready` rises **88 clocks** after the edge that samples `execute`, or
the rising edge of `new_block`. Those 88 clocks are:

* 1 idle-to-start clock;
* 1 prefetch clock, because the RAM returns data one clock after the address;
* 80 step clocks;
* 1 clock for the update H ← H + (A..E);
* 5 clocks to write H0..H4;
* the write-done handshake.

The message words are read only during the first 16 steps. That leaves the RAM
port free otherwise, and the CPU port is never blocked.

### Inside `sha1_core`

| Module | Role |
|---|---|
| `sha1_control` | FSM IDLE → PREFETCH → RUN (80 steps) → UPDATE → WRITE → DONE; handles `execute`, `new_block` and the alternating message area |
| `sha1_read_data` | address of the next message word: word 0 in the prefetch clock, then word *t*+1 during step *t* < 15 |
| `sha1_calc_digest` | registers A..E and H0..H4, the step counter *t*, and a 16-word schedule shift register |
| `sha1_write_digest` | writes H0..H4 to `0x20`-`0x24`, one word per clock |

The schedule needs only the last 16 words. For *t* ≥ 16 the new word is
`rotl1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16])`. These are taps 13, 8, 2 and 0
of the shift register, where entry 15 is the newest word. Step *t* computes:

`T = rotl5(A) + F_t(B,C,D) + W_t + K_t + E`

and then shifts the registers: A ← T, B ← A, C ← rotl30(B), D ← C, E ← D. The
constants K_t and the functions F_t are the FIPS 180-1 ones:

| Steps | F_t | K_t |
|---|---|---|
| 0-19 | choose | `5a827999` |
| 20-39 | parity | `6ed9eba1` |
| 40-59 | majority | `8f1bbcdc` |
| 60-79 | parity | `ca62c1d6` |

They live in `sha1_pkg`, together with the memory-map constants.

`sha1_system` joins `sha1_core` and `dual_port_ram`. The RAM has a synchronous
read with one clock of latency, and a write returns the old word on its own
port (read-first). The CPU may write a message area while the engine reads the
other one. The RAM does not arbitrate between its ports:

* Both ports writing the same word in the same clock is an error, and an
  assertion reports it.
* Rewriting the area that is being hashed, during its first 16 steps, changes
  the result.

## Groestl-256 engine

### Algorithm, as implemented

This is the original (round-1) Groestl-256 definition:

* The state is an 8×8 byte matrix, 512 bits. Byte *k* of a 64-byte string goes
  to row *k* mod 8, column *k* / 8.
* Each of P and Q runs 10 rounds. A round is
  MixBytes ∘ ShiftBytes ∘ SubBytes ∘ AddRoundConstant.
* **AddRoundConstant** XORs the round number *i* (0..9) into byte (0,0) for P.
  For Q it XORs *i* ⊕ `ff` into byte (7,0).
* **SubBytes** is the Rijndael S-box.
* **ShiftBytes** rotates row *r* left by *r* positions, for P and Q alike.
* **MixBytes** multiplies each column by circ(02,02,03,04,05,03,05,07) over
  GF(2^8), modulo x^8+x^4+x^3+x+1.
* Compression: `h ← P(h ⊕ m) ⊕ Q(m) ⊕ h`. The initial value is the 512-bit
  encoding of 256 (`…0100`).
* Output: `trunc256(P(h) ⊕ h)`, the last 32 bytes.
* Padding (done by the host): append a `1` bit, then `w = (−N − 65) mod 512`
  zero bits. Then append the number of blocks as 64 bits, not the bit length.

The later, tweaked Groestl has different round constants and shift vectors, so
its published test vectors do **not** apply to this core.

### State layout in the RTL

`groestl_pkg` defines `state_t` as `logic [0:7][0:7][7:0]`, indexed
`[column][row]`. Column 0 / row 0 is the most significant byte. A 512-bit
message bus therefore carries byte 0 of the block in bits 511:504, and each
column is one contiguous 64-bit slice.

### The column-serial round (`groestl_round`)

ShiftBytes moves bytes between columns. Output column *j* takes row *r* from
input column (*j*+*r*) mod 8. So one output column needs one byte from every
input column, and the input state must stay intact for the whole round. The
round unit therefore reads `state_in`, which the caller holds stable, and
builds the result in its own 512-bit register:

```
state_in ──► AddRoundConstant on column 0 ──► ShiftBytes: pick column j
         ──► 8 S-boxes ──► MixBytes (one column) ──► shift into state_out
```

A 3-bit counter supplies *j*:

* The clock edge that samples `start` stores column 0.
* The next seven edges store columns 1..7. Each new column is shifted in at
  the end, so column 0 ends up first.
* `done` is high for one clock after the eighth edge.

AddRoundConstant only ever touches column 0 (`groestl_add_round_constant`
selects the row with `sel_q`). ShiftBytes becomes an 8:1 byte selection per
row (`groestl_shift_bytes`). MixBytes keeps one set of coefficients and
rotates the input column for each output row, instead of storing eight
different rows of the matrix (`groestl_mix_bytes`).

### Sequencing (`groestl_256`)

One `block_valid` pulse runs a whole compression:

* The working state is loaded with h ⊕ m, or iv ⊕ m when `first` is set.
* 10 P rounds run. Their result is kept in a register.
* The working state is reloaded with m, and 10 Q rounds run.
* Finally h ← P ⊕ Q ⊕ h.

`finalize` runs 10 P rounds on h and presents `trunc256(P(h) ⊕ h)` on `digest`,
with `digest_valid` high. `digest_valid` stays high until the next request.

Timing:

* Each round takes 9 clocks: one to start the round unit and eight columns.
* `busy` falls **180 clocks** after the edge that samples `block_valid`.
* `digest_valid` rises **90 clocks** after the edge that samples `finalize`.

Requests must only come while `busy` is low, and an assertion checks this.

Registers: h, m, the working state, the P result and the round unit's output
register, 5 × 512 bits in all. The S-box is a 256-entry constant table, which
is the Rijndael S-box.

## Files

| File | Contents |
|---|---|
| `rtl/hash_top.sv` | both engines side by side |
| `rtl/sha1_system.sv`, `rtl/dual_port_ram.sv` | SHA-1 engine plus shared RAM |
| `rtl/sha1_core.sv`, `rtl/sha1_control.sv`, `rtl/sha1_read_data.sv`, `rtl/sha1_calc_digest.sv`, `rtl/sha1_write_digest.sv`, `rtl/sha1_pkg.sv` | SHA-1 engine |
| `rtl/groestl_256.sv`, `rtl/groestl_round.sv`, `rtl/groestl_add_round_constant.sv`, `rtl/groestl_sub_bytes.sv`, `rtl/groestl_shift_bytes.sv`, `rtl/groestl_mix_bytes.sv`, `rtl/groestl_pkg.sv` | Groestl-256 engine |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/sha1_ref_pkg.sv`, `tb/groestl_ref_pkg.sv` | reference models used by the testbenches |

## Verification

Every testbench compares against reference models that are written
differently from the RTL:

* The SHA-1 model uses an 80-word schedule array.
* The Groestl model transforms the whole 8×8 matrix at once and computes its
  S-box from the field inverse and the affine map.

Every testbench ends with a `TB_RESULT checks=N failures=M` line and has a
clock watchdog.

* SHA-1 results are also checked against the FIPS known answers for "abc"
  (`a9993e36…9cd0d89d`) and the 56-byte two-block message (`84983e44…e54670f1`).
* The SHA-1 system test hashes a 512-bit message the CPU's way. That takes two
  blocks, the second holding only padding and the length `0x200`. It also
  hashes messages of up to five blocks.
* The Groestl-256 test covers messages of 0 to 200 bytes, which is one to four
  blocks.
* Block latencies (88, 180 and 90 clocks; 8 columns per round) are checked.
* `tb_hash_top` runs both engines at once at full size. It counts:
  * chained SHA-1 blocks;
  * CPU writes during hashing;
  * an aborted message;
  * use of both message areas;
  * Groestl P and Q passes, chained blocks and output transformations.

  It fails if any of these never happens.

There is no published test vector for the original Groestl-256 in this
package. The Groestl results are therefore checked only against the
independent model, and both follow the definition above.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/sha1_pkg.sv rtl/groestl_pkg.sv tb/sha1_ref_pkg.sv tb/groestl_ref_pkg.sv \
  tb/tb_hash_top.sv --top-module tb_hash_top -o sim
./obj_dir/sim
```

Replace `tb_hash_top` with any other `tb_*` module. The full top-level test
simulates in well under a minute.

## Choices made here, and what is not included

* **Memory map.** The addresses (0x00, 0x10, 0x20) and the order of the digest
  words are a reconstruction. The original design specifies two message areas
  and one digest area in one RAM, read and written as 32-bit words through an
  8-bit address.
* **Handshakes and cycle timing.** The SHA-1 prefetch clock, the 88-clock block
  time, the remembered `new_block` edge, and the whole Groestl host interface
  (`block_valid`/`first`/`finalize`/`busy`/`digest_valid`) belong to this
  design. The original Groestl core was sequenced step by step from outside.
* **Groestl round schedule.** The original aimed at minimum area with shift
  registers. The exact schedule of its round unit is not known, and the
  one-column-per-clock datapath here is one reasonable reading.
* **Not built:**
  * the CPU, played by the testbenches;
  * padding hardware, done by the host in software for both hashes;
  * the I/O reductions the original used only to fit an FPGA's pins during
    testing (an internal message and a 256-bit digest output as two 128-bit
    halves).
* **No vendor primitives.** The RAM is an inferred array. It maps to a
  dual-port block RAM on FPGAs that have one.
* **Reference results.** The original FPGA builds were reported on a Spartan-3E
  at 1113 slices and 56 MHz (SHA-1, including its RAM interface), and at 1865
  slices and 86 MHz (Groestl-256). This RTL has not been placed and routed, so
  those numbers are not reproduced.
