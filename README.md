# 8-bit image cipher from two reversible 4-bit LFSRs

A 4-bit linear feedback shift register with the feedback `Q1 <= Q3 xor Q4`
(polynomial x^4 + x^3 + 1) visits all 15 non-zero states in one cycle. If a
nibble is loaded as the seed and the register is clocked *k* times, the result
is another nibble; clocking the result 15 − *k* more times brings back the
original. This design uses that to encrypt an image: each 8-bit pixel is split
into two nibbles, each nibble seeds its own 4-bit LFSR, and both are clocked
7 times (encryption) or 8 times (decryption). A 64-pixel image is moved from
an input memory through an encryption engine into a second memory, and from
there through a decryption engine into a third memory, which then holds the
original image again.

The LFSR and its storage are drawn from reversible-logic building blocks:
Feynman (controlled-NOT), Fredkin (controlled-swap) and modified-Fredkin (MF)
gates, and a D flip-flop whose next state is produced by an MF gate. In RTL
these gates are ordinary combinational logic, so the reversible structure is
kept as a visible hierarchy rather than as a physical property.

**A word on security.** With no key, a fixed number of LFSR steps is a fixed
permutation of the 16 nibble values, applied independently to both halves of
every pixel. It hides nothing from anyone who knows the scheme, and equal
pixels encrypt to equal values. Treat this as a demonstration of reversible
LFSR hardware, not as cryptography.

## The 4-bit LFSR (`rev_lfsr4`)

```
        din ──┐
              ▼
  sel ──► Fredkin ──► Q1 ─► Q2 ─► Q3 ─► Q4
              ▲                 │     │
              └──── Feynman ◄───┴─────┘      fb = Q3 xor Q4
```

* Four `rev_dff` stages form a serial-in parallel-out register (`sipo_reg`).
* A Feynman gate computes the feedback bit `Q3 xor Q4`.
* A Fredkin gate, used as a 2:1 multiplexer, chooses what enters Q1. With
  `sel = 0` it passes the serial input `din`, which is how a seed is loaded.
  With `sel = 1` it passes the feedback bit, which is how the LFSR runs.
* `q = {Q1,Q2,Q3,Q4}`, so a state written `1100` means Q1 = Q2 = 1.
* A seed `v` is loaded in four enabled clocks, `v[0]` first and `v[3]` last.

From the seed `1100` the running register passes through

```
1100 0110 1011 0101 1010 1101 1110 1111 | 0111 0011 0001 1000 0100 0010 1001 | 1100
└──────────── 7 steps: encrypt ───────┘   └──────── 8 steps: decrypt ────────────┘
```

So seven steps take 1100 to 1111, and eight more return it to 1100. The
all-zero state maps to itself: a zero nibble stays zero in both directions.
As a table, 7 steps map each nibble as follows:

| in  | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | A | B | C | D | E | F |
|-----|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| out | 0 | B | D | 6 | A | 1 | 7 | C | 5 | E | 8 | 3 | F | 4 | 2 | 9 |

Decryption is the inverse of this table.

## Reversible building blocks

| module | equations | role here |
|---|---|---|
| `feynman_gate` | p = a, q = a ⊕ b | XOR on the feedback path; copies a bit when b = 0 |
| `fredkin_gate` | p = a, q = a'b ⊕ ac, r = a'c ⊕ ab | a = 0 passes b, c; a = 1 swaps them. Output q is the LFSR input multiplexer |
| `mf_gate` | p = a, q = a'b ⊕ ac', r = ab ⊕ a'c | like Fredkin, but a = 1 swaps b with the complement of c |
| `rev_dff` | Q+ = D·E + E'·Q | clock-enabled D flip-flop |

`rev_dff` feeds its MF gate with a = E, b = D and c = the stored Q. The r
output is then the clock-enabled latch equation. The q output is a garbage
line that is brought out as `g` and otherwise left unused. A Feynman gate with
a constant-0 input copies the stored bit to `q`.

In a reversible circuit this latch would close its loop through a
master-slave pair clocked by E and not-E. Here the pair is a single
positive-edge register on `clk`, and E becomes an ordinary clock enable.
Every flip-flop in the design is a `rev_dff` with a synchronous, active-high
reset to 0.

## Cipher engine (`lfsr8_cipher`)

One engine holds two `rev_lfsr4`. The high nibble goes to one and the low
nibble to the other. After a `start` pulse, the engine runs this sequence
for each address 0 … DEPTH−1:

| state | cycles | what happens |
|---|---|---|
| FETCH | 1 | the address is presented to the source memory |
| CAPT  | 1 | the byte read is captured into a pixel register |
| LOAD  | 4 | `sel = 0`; bit *i* of each nibble is shifted in on cycle *i* |
| RUN   | SHIFTS | `sel = 1`; both LFSRs step with feedback |
| WRITE | 1 | `{hi, lo}` is written to the same address of the destination |

A pixel therefore takes 7 + SHIFTS cycles, and a whole image takes
DEPTH × (7 + SHIFTS) cycles. That is 896 cycles to encrypt and 960 to
decrypt at the defaults. `done` pulses during the last WRITE cycle, and
`busy` is high from the cycle after `start` until that cycle. A `start`
that arrives while the engine is busy is ignored. The source memory must have
a one-cycle registered read, like `pixel_ram`.

Parameters: `SHIFTS` (default 7, for encryption; use 8 for decryption) and
`DEPTH` (default 64). Any pair of engines whose SHIFTS add up to 15 undo each
other.

## The system (`lfsr_crypt_top`)

```
 img_wr_* ──► [pixel_ram: image] ──► lfsr8_cipher SHIFTS=7 ──► [pixel_ram: encrypted] ──► enc_rd_data
                                                                       │
                                                lfsr8_cipher SHIFTS=8 ◄┘
                                                       │
                                             [pixel_ram: decrypted] ──► dec_rd_data
```

* **Memories.** There are three 64 × 8 simple dual-port memories, 1,536 bits
  in all. Each has one write port and one read port with a registered output.
* **Loading the image.** While the system is idle, the host writes pixels
  through `img_wr_en / img_wr_addr / img_wr_data`. Writes are ignored while
  `busy` is high.
* **Running.** A `start` pulse runs the encryption pass, then the decryption
  pass. The two passes never overlap. `done` goes high when the decrypted
  image is complete and stays high until the next `start`. At the default
  size, `done` rises 64 × 29 + 1 = 1,857 cycles after `start` is sampled.
* **Reading results.** While the system is idle, `host_rd_addr` reads the
  encrypted memory (`enc_rd_data`) and the decrypted memory (`dec_rd_data`).
  The data arrives one cycle after the address. During the decryption pass,
  the encrypted memory's read port belongs to the decryptor.
* **Side registers.** Two more registers sit beside the cipher with their own
  ports and no connection to it:
  * `siso_reg` (`siso_*`): a serial-in serial-out register of N = 4
    `rev_dff` stages. A bit appears at `siso_dout` after four enabled clocks.
  * `psa` (`psa_*`): a parallel signature analyzer. Every enabled clock,
    `psa_sig <= psa_sig xor psa_din`, with one Feynman gate per bit. It is
    meant to compress the responses of a circuit under test into one
    signature.

Assertions in the top check that the two engines are never busy together,
and that each is busy only in its own phase.

## Where the design makes its own choices

These points are not fixed by the design this RTL follows, and each was
settled here:

* **Feedback taps.** The taps Q3, Q4 were inferred from the documented state
  sequence 1100 → 0110 → … → 1111. They are the only two-tap choice that
  produces it.
* **Step counts.** The source describes both directions as "eight
  iterations". The RTL reads this as eight *states* (seven steps) for
  encryption and eight steps for decryption. This is the only split that
  reproduces its example (1100 → 1111 → 1100), and 7 + 8 equals the period.
* **Seed loading.** Seeds are loaded serially through the Fredkin
  multiplexer. The polarity of `sel` and the bit order are this design's
  choices. The per-pixel state machine and the start/busy/done handshake are
  too.
* **Nibble assignment.** Which nibble goes to which LFSR is a choice. Since
  both LFSRs are identical, it does not change the result.
* **Flip-flops.** Flip-flops are edge-triggered registers with a clock
  enable, not master-slave latch pairs. Reset is synchronous and active-high.
* **Passes.** The two passes run back to back rather than overlapped. The
  host write and read ports are additions.
* **SISO and PSA.** The SISO length and the PSA width (both 4) are choices.
  The PSA is the plain XOR accumulator that the function calls for. It has
  no internal shift or feedback polynomial, because none is specified.
* **Scope of the comparison.** The reference FPGA implementation reports 55
  registers, 144 ALUTs and 103 pins. Those figures belong to a different
  (VHDL) implementation, and this RTL does not try to match them. It does
  match the 1,536 memory bits. By default it has 75 flip-flops, including the
  SISO and PSA.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
packages must be read first. Example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lfsr_crypt_top \
    -y rtl -y tb +libext+.sv rtl/lfsr_pkg.sv tb/tb_lfsr_crypt_top.sv -o sim
./obj_dir/sim
```

What each testbench checks:

* **`tb_lfsr_crypt_top`** runs the whole system at its default size.
  * It encrypts and decrypts two 64-pixel images, which include 0xCC
    (expected to encrypt to 0xFF), zero nibbles and a write attempted while
    busy.
  * It compares every encrypted pixel with a software model and every
    decrypted pixel with the original.
  * It checks the 1,857-cycle latency.
  * It counts each mechanism and requires each to occur at least once: seed
    loads, feedback runs, both passes, zero nibbles, refused writes, a
    restart from done, and SISO and PSA activity.
* **`tb_rev_lfsr4`** checks the documented state sequence, the period of 15
  for all seeds, and that 7 + 8 steps restore every seed.
* **`tb_lfsr8_cipher`** checks the per-pixel result and the
  DEPTH × (7 + SHIFTS) timing of both engine configurations.
* **The gate testbenches** are exhaustive, and they also check that each
  3 × 3 gate is a bijection.

## Files

* `rtl/lfsr_pkg.sv`: widths, step counts, state enums
* `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/mf_gate.sv`: reversible gates
* `rtl/rev_dff.sv`: MF-gate D flip-flop
* `rtl/sipo_reg.sv`, `rtl/siso_reg.sv`: shift registers of `rev_dff`
* `rtl/rev_lfsr4.sv`: the 4-bit LFSR
* `rtl/psa.sv`: parallel signature analyzer
* `rtl/pixel_ram.sv`: image memory
* `rtl/lfsr8_cipher.sv`: encryption/decryption engine
* `rtl/lfsr_crypt_top.sv`: the complete system
