# SHA-256 hash accelerator for a 32-bit microcontroller

This is a small SHA-256 engine meant to sit next to a 32-bit microcontroller.
The split of work follows what each side does well. Padding a message and
cutting it into 512-bit blocks is cheap, so the host does it in software.
The 64 rounds of expansion and compression per block are expensive, and the
core does them in hardware. Host and core share one 32-bit bidirectional
bus. The host writes the sixteen words of a block, and later reads back the
eight words of the digest.

The architecture is the canonical, unpipelined one. One compression round
runs per clock, and the hardware that does it is used again for every
round. A block takes **65 clock cycles**: 64 rounds plus one cycle to add
the result into the running hash. An implementation of this architecture in
the SkyWater 130 nm process has been reported at 97.9 MHz in 104,585 µm².
At that clock, 65 cycles per block is about 1.5 million blocks per second,
or about 96 MB/s of message data. This RTL has not been taken through a
layout flow.

## Pins and how the host drives them

| Pin    | Dir   | Width | Meaning |
|--------|-------|-------|---------|
| `clk`  | in    | 1     | clock; everything is on its rising edge |
| `rst`  | in    | 1     | synchronous master reset; loads the initial hash H(0) and clears `eoc` |
| `soc`  | in    | 1     | start of computation; one cycle, with W0 on `data` |
| `rd`   | in    | 1     | read the digest; the core drives `data` while it is high |
| `data` | inout | 32    | message words in, hash words out |
| `eoc`  | out   | 1     | end of computation; high from the cycle after a block's update until the next `soc` or `rst` |

How to hash one message of N padded blocks:

1. Pulse `rst` for one cycle.
2. For each block, drive `soc` high for one cycle with word W0 of the block
   on `data`. In each of the next 15 cycles, drive W1 ... W15, then release
   the bus. No other input is needed. `eoc` goes high 65 clock edges after
   the edge that sampled `soc`. Once it is high, the next block can be
   started the same way; do **not** reset between blocks of one message.
   The host may wait any number of cycles before starting the next block.
3. After the last block, raise `rd`. In the cycle `rd` is first high, the
   core drives H0 on `data`. Each later cycle with `rd` high drives the next
   word, H1 ... H7. If `rd` stays high after H7, the digest starts again at
   H0. Dropping `rd` for a cycle and raising it again also restarts at H0.
   Reading does not disturb the hash state.

```
clk    _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_|‾|_ ...
soc    __|‾‾‾|__________________________________________________
data   --< W0 >< W1 > ... <W15>------ ... -------< H0 >< H1 > ... < H7 >< H0 >
eoc    ‾‾‾‾‾‾|_____________________________ ... __|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
rd     _________________________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
          cycle 0 = round 0   rounds 1..63, then update (cycle 64)
```

Word order is big-endian, as in FIPS 180-4. The first message byte is
bits 31:24 of W0, and the digest is H0 || H1 || ... || H7. Padding is the
standard one: a 1 bit, then zeros, then the 64-bit message length.

Protocol rules the core relies on:

* `soc` while a block is running is ignored. An assertion in the counter
  reports it in simulation.
* `rd` is ignored while a block is running, so the core never drives the
  bus while the host may be writing. The host must not drive `data` while
  `rd` is high.
* `rst` at any time abandons the current message.

## The block cycle

Everything is sequenced by a 7-bit counter (`sha256_counter`). The count is
the round index, and every control signal is decoded from it:

| Cycle (from `soc`) | count    | what happens |
|--------------------|----------|--------------|
| 0                  | 65 (idle) + `soc` | round 0; W0 from the bus; a..h taken from H |
| 1 .. 15            | 1 .. 15  | rounds 1..15; W_t from the bus |
| 16 .. 63           | 16 .. 63 | rounds 16..63; W_t from the expander |
| 64                 | 64       | H_j += X_j (no round) |
| after              | 65       | idle, `eoc` high |

The hardest detail is how the block fits in 65 cycles. Two things make it
work:

* **No load cycle for the working variables.** At the start of a block,
  the working variables a..h must equal the current hash H(i-1). The
  compressor does not copy H into its registers in a separate cycle. In
  round 0 its round logic reads H directly, through a multiplexer driven
  by `first`. From round 1 on it reads its own registers. So round 0 runs
  in the same cycle that `soc` is sampled.
* **W_t is combinational.** The expander's output for round t is either
  the word on the bus (rounds 0..15) or
  σ1(W_{t-2}) + W_{t-7} + σ0(W_{t-15}) + W_{t-16} (rounds 16..63). It is
  used by the compressor in the same cycle, and shifted into the schedule
  register at the clock edge.

The critical path therefore runs through the bus-or-schedule mux, the T1
sum (five 32-bit operands), and the a = T1 + T2 addition. The round
constant comes from a combinational ROM addressed by the count.

## Blocks

| File | Block | What it is |
|------|-------|------------|
| `rtl/sha256_pkg.sv` | package | word and state types, the initial hash H(0), and the σ0, σ1, Σ0, Σ1, Ch and Maj functions |
| `rtl/sha256_k_rom.sv` | constant ROM | asynchronous 64 × 32 ROM of K_0..K_63 |
| `rtl/sha256_expander.sv` | message expander | 16 × 32-bit shift register and the schedule recurrence; `sel` picks bus or computed word |
| `rtl/sha256_compressor.sv` | compressor | working registers a..h and one round of T1/T2 logic |
| `rtl/sha256_state_reg.sv` | state register | H0..H7; loads H(0) on reset and adds a..h at the end of each block |
| `rtl/sha256_counter.sv` | counter | 7-bit sequencer; makes the ROM address and all control signals, including `eoc` |
| `rtl/sha256_io.sv` | bus interface | word-serial digest read-out with a wrapping 3-bit index, output enable, and the input path |
| `rtl/sha256_top.sv` | top | wires the blocks together and holds the tri-state driver of `data` |

```
           data (inout, 32)
             │  ▲
             │  │ tri-state (data_oe = rd while idle)
             ▼  │
        ┌──────────────┐  din   ┌───────────┐  W_t  ┌──────────────┐
        │ sha256_io    │───────▶│ expander  │──────▶│ compressor   │──▶ a..h
        │ read index   │◀─┐     │ 16×32 SR  │       │ a..h, T1, T2 │     │
        └──────────────┘  │     └───────────┘       └──────────────┘     │
                          │            ▲ sel,en        ▲ K_t  ▲ first,en │
                          │  H0..H7    │               │      │          ▼
                    ┌─────┴──────┐     │        ┌──────┴──┐   │   ┌──────────────┐
                    │ state reg  │◀────┼────────┤ K ROM   │   │   │ H += a..h    │
                    │ H0..H7     │     │        └─────────┘   │   │ (upd)        │
                    └────────────┘     │             ▲ addr   │   └──────────────┘
                          ▲ rst,upd    │             │        │
                          └────────────┴──── sha256_counter ──┘◀── soc, rst ── eoc ▶
```

## Where this RTL makes its own choices

The general structure comes from the source design. That covers the split
with the host, the 16-word shift-register expander, the compressor with
its state registers, the asynchronous 64 × 32 K ROM, the 7-bit counter
that makes all controls, the shared 32-bit bus, and 65 cycles per block.
The following details are this implementation's own decisions:

* W0 is on the bus in the same cycle as `soc`, and W1..W15 in the next 15
  cycles.
* The working variables are initialised through a bypass mux in round 0,
  not by a load cycle (see above). The 65-cycle count depends on this.
* `eoc` is a level. It rises in the cycle after the update and falls at
  the next `soc` or `rst`.
* `rst` is synchronous and active high. Only the counter, the state
  register and the read index are reset. The expander and compressor
  registers are always written before they are read.
* The digest is read one word per cycle with a wrapping index. The index
  restarts at H0 whenever `rd` is low. `rd` is gated off while a block is
  running.
* The tri-state driver is in the top level. `sha256_io` makes the word to
  drive and the enable. Keeping `inout` ports off the lower modules
  keeps them usable with open-source synthesis front ends.
* The source design lists its digest output as two signals ("hash1" and
  "hash2") without saying how they split the work. Here the digest simply
  flows from the state register through the bus interface.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. Expected values come from `tb/sha256_ref_pkg.sv`. This is a
software model of SHA-256, written separately from the RTL. It computes
the round constants and H(0) from their definitions (fractional parts of
the cube roots of the first 64 primes and the square roots of the first
8), so it does not share any tables with the RTL.

| Testbench | Checks |
|-----------|--------|
| `tb_sha256_k_rom` | all 64 constants, forwards and backwards, with no clock |
| `tb_sha256_expander` | W_0..W_63 in every cycle for 8 random blocks; holds when stalled |
| `tb_sha256_compressor` | a..h after each of 64 rounds for 6 random states; the round-0 bypass; holds when `en` is low |
| `tb_sha256_state_reg` | H(0) on reset; modulo-2^32 update with carries; holds; reset has priority |
| `tb_sha256_counter` | every control signal in every cycle of a block; the 65-cycle latency; `eoc`; reset in mid-block |
| `tb_sha256_io` | bus write path; H0..H7 read order; wrap-around; restart at H0 |
| `tb_sha256_top` | end to end, at full size (the top has no parameters) |
| `tb_sha256_long` | two longer FIPS 180-4 examples against their published digests: the 896-bit message, and one million `a` (15,626 blocks back to back) |

The end-to-end test checks the FIPS 180-4 examples: `abc` gives
`ba7816bf…f20015ad` (one block), and `abcdbcdecdefdefg…nopq` gives
`248d6a61…19db06c1` (two blocks). It also checks 25 random messages of 0
to 250 bytes (one to five blocks) against the model. It checks that each
block takes exactly 65 cycles. It counts each of these mechanisms and
fails if one never occurs: single-block messages, multi-block messages,
idle gaps between blocks, reading the digest for more than 8 cycles
(repeat from H0), and a reset that abandons a half-hashed message.

To run a testbench with Verilator 5 (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sha256_pkg.sv tb/sha256_ref_pkg.sv tb/tb_sha256_top.sv \
  --top-module tb_sha256_top
./obj_dir/Vtb_sha256_top
```

Replace `tb_sha256_top` with any other testbench name. Each test runs in
about a second or less. The one-million-`a` run simulates about one million
clock cycles.

## Not included

* Message padding and block splitting. This is the host's job, and the
  testbench does it in `sha256_ref_pkg::ref_pad`.
* The host microcontroller and its bus adapter.
* Physical implementation (standard cells, layout, pads).
