# A swappable RSA / Blowfish accelerator slot

This design puts two block-cipher engines behind one streaming interface:
an RSA engine (modular exponentiation with Montgomery products) and a
Blowfish engine (16-round Feistel cipher with on-chip key expansion). Only
one of them is "loaded" at a time. The system it comes from uses FPGA
partial reconfiguration. A single reconfigurable region sits between a DMA
engine and a GPIO register, and software loads RSA for a key exchange,
Blowfish for bulk traffic, or a blank module when neither is needed. Both
engines speak the same protocol: a 32-bit control word from the GPIO
register, 64-bit words in over an AXI4-Stream style channel, 64-bit words
out with TLAST, and one interrupt line.

The RTL models that slot in plain synthesizable SystemVerilog.
`crypto_accel_top` contains both engines and connects whichever one
`rm_sel` selects. It holds a freshly loaded engine in reset for a few
cycles, the way the FPGA resets a region after reconfiguring it. Both
engines work on 64-bit blocks. RSA uses a 64-bit modulus and exponent.
Blowfish uses a 64-bit key.

```
crypto_accel_top            slot model: rm_sel, post-load reset, output mux
├── rsa_accel               stream protocol + phase control for RSA
│   ├── mont_precompute     k, n', r mod n from the modulus (bit-serial)
│   └── mont_exp            left-to-right exponentiation, Montgomery domain
│       ├── mod_shift_reduce   M * 2^k mod n (shift-and-subtract)
│       └── mont_mul           a*b*2^-k mod n on one shared W x W multiplier
└── blowfish_accel          stream protocol + phase control for Blowfish
    └── blowfish_core       P-array, rounds, key expansion sequencer
        ├── blowfish_pi_rom    1042 words of pi (P-array then S-boxes)
        ├── blowfish_sbox_ram  x4, 256 x 32, one write + one read port
        └── blowfish_f         F(x) = ((S1[a] + S2[b]) ^ S3[c]) + S4[d]
crypto_pkg                  shared widths, control-word bit positions, enums
```

## The job protocol

Software starts a job in three steps:

1. Write the control word.
2. Program the DMA to send a buffer of 64-bit words.
3. Program the DMA to receive the results.

Each engine works through the job one input word at a time:

| Engine   | Words in, in order                                   | Words out          |
|----------|------------------------------------------------------|--------------------|
| RSA      | exponent, modulus, block 1 … block N, one spare word | N results          |
| Blowfish | key, block 1 … block N, one spare word               | N results          |

Control word:

| Engine   | bits 31:0                                                                                   |
|----------|---------------------------------------------------------------------------------------------|
| RSA      | N, the number of blocks (all 32 bits)                                                       |
| Blowfish | bit 31 = 1: keep the key already expanded; bit 30 = 1: decrypt; bits 29:0 = N               |

Rules both engines follow:

- **Sampling.** The control word is sampled when the first word of the job
  is taken.
- **Blowfish key reuse.** With bit 31 set, Blowfish still takes a first
  word but ignores it. A typical session encrypts with the key expanded
  (`control = N`). It then decrypts with the same tables
  (`control = 0xC000_0000 | N`).
- **Last block.** The last result leaves with `m_tlast` high, which ends the
  DMA's receive transfer. At the same moment `irq` rises.
- **Interrupt clearing.** `irq` stays high until software writes the control
  word to zero or the next input word is taken. The interrupt handler
  normally writes the control word to zero.
- **Spare word.** Its value does not matter. It returns the engine to the
  start of the protocol, so the DMA transfer length is always
  `8 * (N + header words + 1)` bytes.
- **Idle.** While the control word is zero, the engine takes any word that
  arrives and drops it. It never stalls the DMA in that state.
- **Order and stalls.** Output words are in input order. `s_tready` is low
  while an engine is busy, so the input side simply stalls. The output word
  is held stable under back-pressure; an assertion in `rsa_accel` checks
  this.

## RSA: Montgomery exponentiation

This is the part of the design that takes the most explaining.

RSA encryption and decryption are the same operation, `C = M^e mod n`,
with the public or the private exponent. Reducing modulo an arbitrary `n`
after every multiplication needs a division. Montgomery's method replaces
it with a mask and a shift.

### The Montgomery product (`mont_mul`)

Let `k` be the bit length of `n`, so `2^(k-1) <= n < 2^k`. Let `r = 2^k`.
Because `n` is odd, there is an `n'` with `n * n' = -1 (mod r)`. For
`a, b < n` the product computes `a * b * r^-1 mod n`:

```
t = a * b                     (2W bits)
m = (t * n') mod r            (keep the low k bits)
u = (t + m * n) >> k          (exact: t + m*n is a multiple of r)
if u >= n: u = u - n          (u < 2n, so one subtraction is enough)
```

`mont_mul` has a single W×W multiplier. It uses it three times in a row
(`a*b`, `t*n'`, `m*n`), then does the add, shift and subtract. The sum
`t + m*n` is held in 2W+1 bits, so moduli close to `2^W` do not overflow.
A product takes 4 cycles from `start` to `done`. The original describes
the step as three separate multiplications. Running them on one shared
multiplier is this design's choice, and keeps the area to one 64×64
multiplier.

### Per-modulus constants (`mont_precompute`)

When the modulus word arrives, `mont_precompute` derives three things.

- **`k`**: the position of the highest 1 bit of `n`.
- **`n'`**: computed one bit per cycle by Hensel lifting, with no division.
  Start with `s = 1`. In each of `k` steps:
  1. If `s` is odd, set bit `i` of `n'` and add `n` to `s`.
  2. Halve `s`.

  Each addition clears the low bit, because `n` is odd. After `k` steps,
  `n * n' + 1` is a multiple of `2^k`. The original computes `n'` as
  `(r * r^-1 - 1) / n`, with `r^-1` from the extended Euclidean algorithm.
  Both give the unique `n'` below `r`.
- **`r mod n`**: this is `r - n`, because `n < r < 2n`. It is the Montgomery
  form of 1.

This takes `k + 3` cycles.

### Exponentiation (`mont_exp`)

```
M_bar = M * r mod n          (mod_shift_reduce)
x_bar = r mod n
for i = k-1 downto 0:
    x_bar = monPro(x_bar, x_bar)
    if e[i]: x_bar = monPro(M_bar, x_bar)
C = monPro(x_bar, 1)
```

- `M * r mod n` comes from `mod_shift_reduce`. It is a restoring division
  that shifts in the W bits of `M` and then `k` zero bits, subtracting `n`
  whenever the remainder reaches it. It needs one subtractor and takes
  `W + k + 2` cycles.
- Only the low `k` bits of the exponent are scanned, so `e` must be smaller
  than `2^k`. In RSA this always holds, because `e < n`.
- A block takes `W + k + 4 + 5 * (k + ones + 1)` cycles, where `ones` is the
  number of 1 bits in the scanned exponent. For a 64-bit modulus and an
  exponent with 32 ones, that is 617 cycles.

Small moduli run proportionally faster, because the loop length follows
`k`, not `W`.

Worked example with `n = 899 = 29 * 31`, `e = 307`, `d = 643`:

- `k = 10`, `r = 1024`, `n' = 213`, `r mod n = 125`.
- Encrypting `M = 73` gives `M_bar = 135` and `C = 292`. The chain of
  products passes through values such as 125, 135, 865, 412, 236, 147, 500
  and 540, and ends with `monPro(540, 1) = 292`.
- Decrypting 292 with `d` returns 73.

`tb_mont_mul` checks eight products from this chain one by one.
`tb_mont_exp` checks both end results.

The demonstration key pair is:

- `n = 0x1D1D96CC09FD4BEF`
- `e = 0x0E52BEB9D61E0DE7`
- `d = 0x00CFAB57EE0038D7`

It encrypts the text "Ejemplo" (`0x00456A656D706C6F`) to
`0x12A231A4A56447F5` and decrypts it back.

### `rsa_accel` phases

`rsa_accel` moves through four phases:

1. **Exponent**: takes the exponent word and latches the block count.
2. **Modulus**: takes the modulus word and runs `mont_precompute`.
3. **Crypt**: takes one block at a time, runs `mont_exp`, and presents the
   result until the output handshake completes.
4. **Flush**: takes the spare word.

The original state diagram draws only the first three phases. The spare
word that its text requires is what the Flush phase handles.

## Blowfish

### Round engine (`blowfish_core`)

- **Storage.** The 18 P-array words sit in registers. The four S-boxes are
  separate 256×32 RAMs with synchronous reads.
- **Rounds.** A round takes two cycles. In the first cycle, `L ^= P[i]` and
  the four bytes of the new `L` address the S-boxes. In the second,
  `R ^= F(L)` and the halves swap.
- **Whitening.** After 16 rounds the final swap is undone, and the halves
  are XORed with P17/P18 when encrypting or P2/P1 when decrypting.
  Decryption walks the P-array backwards.
- **Timing.** One block takes 34 cycles from `crypt_start` to `done`.
- **Block layout.** The stream word's bits 63:32 are the left half and
  bits 31:0 the right half, in both directions.

### Initial tables (`blowfish_pi_rom`)

Blowfish starts from 1042 fixed 32-bit words: P1..P18, then S-box 1..4
with 256 words each. They are the hexadecimal digits of the fractional
part of pi, taken in order, eight digits per word. Digit `j` is
`floor(frac(pi) * 16^j) mod 16`. They are stored in
`rtl/blowfish_pi.hex` and read with `$readmemh`.
`tb_blowfish_pi_rom` does not trust that file. It recomputes every word
from Machin's formula, `pi = 16 atan(1/5) - 4 atan(1/239)`, in multiword
arithmetic, and compares.

### Key expansion, and how it differs from standard Blowfish

Key expansion does the following in order:

1. Reload the tables from the ROM, which takes 1043 cycles.
2. XOR key material into the 18 P words.
3. Encrypt an all-zero block 521 times. The first 9 results replace
   P1/P2 … P17/P18 in pairs. The other 512 replace the S-box entries in
   pairs.

The whole expansion takes 18 749 cycles. After reset the core also loads
the plain pi tables once, with `s_tready` low during those 1043 cycles.

**The key material is not standard Blowfish.** Standard Blowfish cycles
through the key bytes, most significant first. This engine, like the
design it comes from, builds each 32-bit P mask one hex digit at a time:

- It starts at the least significant digit of the 64-bit key.
- Each digit is shifted into the mask from the right.
- When the part of the key still unused becomes zero, it restarts from
  the full key.

For key `0x0E52BEB9D61E0DE7` the first three masks are:

- `0x7ED0E16D`
- `0x9BEB25E7`
- `0xED0E16D9`

The leading zero digit is never used. A key with zero high digits
therefore repeats sooner.

As a result, ciphertexts do not match published Blowfish test vectors.
They match the reference model below. For example, with key
`0x0E52BEB9D61E0DE7` the block `0x004973616B45646F` ("IsakEdo")
encrypts to `0xD09C4AC1117F4750`. With an all-zero key the schedule
degenerates to standard Blowfish with an all-zero mask. The zero block
then encrypts to the published value `0x4EF997456198DD78`, which checks
the round function independently.

The original key schedule XORs the key into whatever the P-array holds.
A second key expansion there would start from the tables left by the
first one. Here every expansion reloads pi first, so a key always gives
the same tables. The tables are also reloaded after every reconfiguration.

### `blowfish_accel` phases

`blowfish_accel` moves through these phases:

1. **Setup**: takes the key word. It runs key expansion unless control
   bit 31 is set.
2. **Crypt**: runs the core on each block.
3. **Out**: presents the result.
4. **Flush**: takes the spare word.

A block costs about 37 cycles when words arrive back to back.

## The reconfigurable slot (`crypto_accel_top`)

`rm_sel` selects the loaded module:

| `rm_sel` | Module loaded |
|----------|---------------|
| 0        | blank         |
| 1        | RSA           |
| 2        | Blowfish      |
| 3        | treated as blank |

Behaviour:

- **Blank.** It drives every output low, `s_axis_tready` included, so it
  takes nothing from the stream.
- **Inactive engine.** The engine that is not loaded is held in reset.
  Its outputs are not connected.
- **Loading.** When `rm_sel` changes, the newly selected engine is held in
  reset for `RECONFIG_RESET_CYCLES` (16) cycles, with `reconfiguring`
  high and its outputs disconnected. It then starts from its reset state.
  This mirrors the region's reset-after-reconfiguration.
- **State lost.** Engine state does not survive a swap: an expanded
  Blowfish key has to be set up again.

On the FPGA, the two engines would occupy the same region at different
times. In this model both are present, so the area is the sum of the two.

## Performance

The original board measured jobs from first word in to last word out at
100 MHz. Those figures include the DMA and the PS–PL traffic.
`tb_workload_delay` runs the same job sizes through `crypto_accel_top`.
Its RSA jobs use the demonstration key pair. Its Blowfish jobs use the
demonstration key with key expansion. The output side applies random
back-pressure.

| Bytes | RSA cycles, this RTL | RSA cycles, original | Blowfish cycles, this RTL | Blowfish cycles, original |
|------:|------:|-------:|------:|------:|
|   32  |  2539 |  14071 | 19944 | 36789 |
|   64  |  5006 |  23461 | 19049 | 37078 |
|  128  |  9943 |  42319 | 19344 | 37633 |
|  256  | 19821 |  79978 | 19943 | 38750 |
|  512  | 39562 | 155334 | 21135 | 40976 |
| 1024  | 79055 | 305985 | 23499 | 45481 |

Reading the table:

- **Same shape as the original.** RSA grows linearly, at about 617 cycles
  per block. Blowfish is dominated by key expansion, with about 37 cycles
  per block on top.
- **The 32-byte Blowfish job is slower.** It is the first job after
  loading the engine, so it also waits for the 1043-cycle pi load.

## Assumptions and departures from the original

- The original accelerators were generated from C by high-level
  synthesis. This RTL is written by hand from the algorithms and from the
  accelerators' observable behaviour:
  - the word order;
  - the control word;
  - the spare word;
  - TLAST and the interrupt;
  - the idle rule;
  - the nibble key schedule.

  Cycle timing is this design's own.
- The following are this design's choices:
  - the multiplier sharing in `mont_mul`;
  - the bit-serial `n'`;
  - the serial `M * r mod n`;
  - two-cycle Blowfish rounds;
  - the P-array in registers.
- Interrupt clearing is this design's choice (control word written to
  zero, or the next word taken). In the original, the interrupt is the
  accelerator's return value, and software clears it by writing the
  control word to zero.
- The reset window after a reconfiguration is this design's choice,
  `RECONFIG_RESET_CYCLES = 16`.
- Tables are reloaded from pi on every key expansion (see above).
- Nothing is checked at run time:
  - the modulus must be odd and greater than 1;
  - message blocks must be below the modulus for the result to be
    meaningful RSA.
- The platform around the slot is not part of this RTL:
  - the processor system;
  - the DMA;
  - the AXI GPIO;
  - the interconnect;
  - the interrupt concatenation;
  - the reconfiguration controller.

  The top's ports are the signals those blocks would drive.
- The RSA width is the parameter `W`, default 64, set on the top as
  `RSA_W`; the top requires `RSA_W >= 64`. `tb_rsa_wide` runs a 128-bit
  key pair through `rsa_accel` built with `W = 128`. Area grows with the square of `W`, because the W×W multiplier
  dominates it. 4096-bit keys are not practical with a single-multiplier
  datapath.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Expected values
are computed independently in the testbench.

| Testbench | Checks |
|---|---|
| `tb_mont_mul` | every Montgomery product of the `n = 899` example; random operands against `a*b*r^-1 mod n`; 4-cycle latency |
| `tb_mont_precompute` | `n = 899` gives `k = 10`, `n' = 213`, `r mod n = 125`; random odd moduli; `k + 3` latency |
| `tb_mod_shift_reduce` | fixed and random reductions; `W + k + 2` latency |
| `tb_mont_exp` | 73^307 and 292^643 mod 899; the 64-bit key pair; random cases against square-and-multiply; the latency formula |
| `tb_rsa_accel` | "Ejemplo" encrypted and decrypted; idle drops; interrupt set and clear; TLAST; output stable under back-pressure |
| `tb_rsa_wide` | `rsa_accel` at `W = 128` with a 128-bit key pair: a known ciphertext, random blocks against square-and-multiply, decrypt round trips, per-block time |
| `tb_blowfish_f` | F against a byte-serial reference |
| `tb_blowfish_sbox_ram` | reads and writes against an array model |
| `tb_blowfish_pi_rom` | all 1042 words against pi computed in the testbench |
| `tb_blowfish_core` | all-zero and all-ones standard vectors; several vectors under the nibble schedule; decrypt round trips; re-keying; cycle counts |
| `tb_blowfish_accel` | encrypt with set-up, decrypt with reused key, 32-byte job time, per-block slope |
| `tb_crypto_accel_top` | see below |
| `tb_workload_delay` | the job sizes of the table above, every block checked, each job at or under the original cycle count |

`tb_crypto_accel_top` runs the full design at its default parameters. It
counts, and requires at least one occurrence of, each mechanism:

- reconfiguration;
- blank-module refusal;
- dropped idle word;
- RSA job;
- Blowfish key set-up;
- Blowfish key reuse;
- decryption;
- back-pressure stall;
- TLAST;
- interrupt.

The Blowfish expected values come from a separate software model of the
same schedule.

## Simulating and changing it

With Verilator 5, from the repository root (the pi ROM is loaded by the
relative path `rtl/blowfish_pi.hex`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/crypto_pkg.sv tb/tb_crypto_accel_top.sv --top-module tb_crypto_accel_top
./obj_dir/Vtb_crypto_accel_top
```

Replace the testbench name to run any other. Every testbench finishes in
seconds.

Parameters worth knowing:

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `RSA_W` / `W` | `crypto_accel_top` / RSA modules | 64 | operand width of the RSA datapath |
| `RECONFIG_RESET_CYCLES` | `crypto_accel_top` | 16 | reset window after `rm_sel` changes |
| `INIT_FILE` | `blowfish_pi_rom` | `rtl/blowfish_pi.hex` | initial tables |

The block-format constants live in `crypto_pkg`:

- the stream and control widths;
- the Blowfish control-bit positions;
- the number of rounds;
- the table sizes.

To add an engine:

1. Give it the same port list as `rsa_accel`.
2. Add an `rm_sel` code and an output-mux branch in `crypto_accel_top`.
