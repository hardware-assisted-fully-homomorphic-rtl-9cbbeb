# Recryption box for the FV homomorphic encryption scheme

Somewhat homomorphic encryption lets a server compute on encrypted bits. Each
operation adds noise to the ciphertext, and after a few operations the
ciphertext can no longer be decrypted. Bootstrapping removes that noise, but
it is very expensive. The alternative built here is a *recryption box*: a
small hardware processor that holds a share of the secret key. It receives a
noisy ciphertext, which the server has masked first. It decrypts the
ciphertext and encrypts the resulting bit again under the user's public key.
What comes back is a fresh ciphertext with small noise, and the server never
learns the bit.

The processor works on the FV scheme with the following parameters:

- ring Z_q[x]/(x^n + 1), with n = 1024;
- a 40-bit modulus q = q0 · q1, where q0 = 878593 and q1 = 890881;
- error distribution: a discrete Gaussian with s = 11.32 (σ ≈ 4.52);
- secret key and encryption randomness u: signed binary (ternary) polynomials;
- one message bit per ciphertext, held in coefficient 0.

One recryption computes:

```
decrypt:  v  = c0 + NTT⁻¹( NTT(s) ⊙ NTT(c1) )       (coefficient-wise ⊙)
          m  = decode(v[0])                          (1 if q/4 < v[0] < 3q/4)
encrypt:  c0' = Δm + e1 + NTT⁻¹( NTT(b) ⊙ NTT(u) )   Δ = floor(q/2)
          c1' =      e2 + NTT⁻¹( NTT(a) ⊙ NTT(u) )
```

`(b, a)` is the public key and `s` the box's secret key share. All three are
stored already in the NTT domain. `e1` and `e2` are Gaussian, and `u` is
ternary.

At default parameters, one full recryption takes about **72,300 clock
cycles**. The published implementation takes 53,576 cycles. The
difference is explained below, under [Cycle counts](#cycle-counts).

## Architecture

The 40-bit arithmetic is split into two 20-bit residue channels by the
Chinese remainder theorem (CRT). The two channels never interact, except
once: decoding coefficient 0 needs its value modulo q.

```
                 +-------------------- ctrl_addr_unit --------------------+
host port -----> |  command FSM, recryption program, NTT address sequence |
                 +----+------------------+-------------------+------------+
                      | micro-ops        | read/write        | sample requests
          +-----------+---------+        | addresses         v
          |                     |        |            knuth_yao_dgs <-- 9 TRNG bits
     palu (mod q0)        palu (mod q1)  |             (LUT1, LUT2, bit scan)
     mod_mul, add/sub     mod_mul, ...   |
     twiddle_rom          twiddle_rom    |
          |                     |        |
     poly_mem q0          poly_mem q1 <--+
     M0..M5 x 512x40b     M0..M5 x 512x40b
          |                     |
          +---- CRT products ---+--> icrt --> decode_encode --> dec_bit, encoded coeff
```

| Module | Role |
|---|---|
| `recryption_box` | Top. Two residue channels, the controller, the sampler, the inverse CRT and the decoder. It has a host port for loading and reading polynomials. |
| `ctrl_addr_unit` | Runs commands. Generates every memory address and PALU micro-op. Holds the fixed recryption program. |
| `palu` | Polynomial arithmetic unit for one prime. Contains a modular multiplier, a modular adder/subtractor, twiddle registers, a small constant ROM and the write-back logic. |
| `mod_mul` | 20×20-bit multiplier followed by window-based reduction. Pipelined over 4 cycles. |
| `mod_addsub` | (z+t) mod Q and (z−t) mod Q. Combinational. |
| `twiddle_rom` | Per-stage roots of unity and constants. Computed at elaboration from Q and the root. |
| `poly_mem`, `bram_sdp` | Six RAM blocks of 512 × 40 bits. Two read ports and one write port. Registered reads. |
| `icrt` | Adds the two 40-bit CRT products and does one conditional subtraction of q. |
| `decode_encode` | Tests q/4 < a < 3q/4. Outputs the bit and its encoding Δ·bit as two residues. |
| `knuth_yao_dgs` | Knuth–Yao discrete Gaussian sampler. Also has a ternary mode. |
| `fv_pkg`, `dgs_pkg` | Shared constants and types. `dgs_pkg` holds the probability matrix. |

Two parts of the real system are not included. The true random number
generators are represented by a 9-bit `trng` input, which must carry fresh
random bits every cycle. The Gigabit Ethernet link is replaced by the plain
host port.

## The memory-efficient NTT

This is the hardest part of the design.

### Word layout

Each RAM word holds two coefficients of one residue polynomial. Word `j`
(0 ≤ j < n/2) holds `{a[j+n/2], a[j]}`: `a[j]` in bits 19:0 and `a[j+n/2]` in
bits 39:20. The host writes and reads polynomials in this layout. The NTT
leaves its result in the same layout, so a coefficient-wise product is simply
a word-by-word pass.

### Bit reversal

The iterative Cooley–Tukey NTT starts by permuting the coefficients into
bit-reversed order. With the layout above, position `i` and position `i+n/2`
differ only in the top index bit. After bit reversal that bit becomes the
lowest bit. So the permutation never splits a word: it only swaps whole words
`j ↔ bitrev_{log2(n/2)}(j)`. The controller reads both words in the same cycle
through its two read ports and writes them back swapped on its own write port.
This takes 2 cycles per swapped pair.

### Stages m = 2 … n/2

After the swap, each word holds the two inputs of one butterfly of the first
stage. A stage with butterfly distance `m` does the following:

- It reads two words, `k/2 + j` and `k/2 + j + m/2`. These supply four
  coefficients: two butterflies that use the same twiddle factor.
- Both PALUs compute the two butterflies (u ± w·t) in lockstep.
- The result is written back re-paired. Word `k/2 + j` gets the two sums.
  One cycle later, word `k/2 + j + m/2` gets the two differences.

After this re-pairing, every word again holds the two inputs of one butterfly
of the next stage. No coefficient ever has to be moved on its own.

### Last stage (m = n)

The last stage has one butterfly per word, written as `{diff, sum}`. This
puts the result back into the natural layout. Output `A[i]` is the polynomial
evaluated at ψ^(2i+1), where ψ is a primitive 2n-th root of unity.

### Negacyclic wrapping

Reduction modulo x^n + 1 normally needs the input to be multiplied by ψ^i
before the NTT. Here that step is folded into the forward transform: each
stage starts its twiddle sequence at ψ^(n/m) instead of 1.

The inverse transform uses ω_m⁻¹ and starts at 1. It is followed by one
scaling pass:

- the low half of each word is multiplied by n⁻¹ψ⁻ʲ;
- the high half is multiplied by n⁻¹ψ⁻ʲ·ψ^(−n/2).

Both scale factors are generated on the fly in two twiddle registers.

### Twiddle factors

No twiddle table is stored. The ROM holds five entries per stage: the start
value, ω_m, ω_m⁻¹, ω_m² and ω_m⁻². A new twiddle is computed by issuing a
multiply into the PALU's own multiplier. The result goes to a *next* register,
which is committed when the loop moves on.

The multiplier pipeline is 5 cycles from issue to write-back. With a single
chain (w ← w·ω_m) every j-iteration would wait out that latency. Instead, all
stages after the first run two interleaved chains:

- the first twiddle register serves the even j and the second the odd j;
- both step by ω_m², so the next pair of twiddles is computed in parallel;
- at the start of a stage the second chain is set to start·ω_m, which costs
  one short wait per stage.

When a pair of j-iterations still has fewer butterflies than the latency, the
controller stalls until the next twiddles are ready. This happens in the last
two stages, where each j has only one or two butterflies. The stall is the
main remaining cost of this schedule.

### Hazards

Between stages, the controller waits for the last write-back of a stage
before the next stage reads. This wait is `DRAIN` = 8 cycles.

There are two rules on port use:

- the PALU write port and the controller's write port must never write in
  the same cycle;
- the two read ports must never read the same block in the same cycle.

Both rules are checked by assertions in `palu` and `poly_mem`.

## PALU and modular reduction

`mod_mul` multiplies two 20-bit residues into a 40-bit product. It then
reduces the product with fixed windows:

- The upper 20 bits of the product are cut into five 4-bit windows.
- Each window indexes a 16-entry table of (v·2^(20+4k)) mod Q.
- The five table values are added to the low 20 bits.
- The few carry bits left over are folded once more.
- At most two subtractions of Q finish the reduction.

The method does not depend on the shape of the prime, and the tables are
computed at elaboration from Q. Latency is 4 cycles. The multiplier also
outputs the plain integer product, which the inverse CRT uses.

A PALU executes these micro-ops:

| Micro-op | What it does |
|---|---|
| `P_BFLY` | Butterfly, with either twiddle register. |
| `P_MUL` | Coefficient-wise product. |
| `P_ADD` | Coefficient-wise sum. |
| `P_TWUP`, `P_TWUP2` | Update a twiddle register. |
| `P_SCALE` | INTT post-scaling. |
| `P_CRT1` | Computes [a·q_other⁻¹] mod Q. |
| `P_CRT2` | Computes that result times q_other as a 40-bit integer. |

Write-back tags travel through the pipeline with each operation, so the PALU
writes its own results to memory.

## Inverse CRT and decoding

Decryption only needs coefficient 0 modulo q, because every other coefficient
of a valid one-bit ciphertext decodes to 0. The steps are:

1. Each PALU forms its 40-bit term of
   `a = [a0·q1⁻¹]_q0·q1 + [a1·q0⁻¹]_q1·q0`.
2. `icrt` adds the two terms and subtracts q once.
3. `decode_encode` computes the bit `q < 4a < 3q`.
4. The controller writes the encoded polynomial Δm, with Δ = floor(q/2), into
   the destination block: coefficient 0 gets Δm and every other coefficient
   gets 0.

## Discrete Gaussian sampler

The sampler performs a Knuth–Yao random walk over a probability matrix:

- The matrix has 52 rows (|x| ≤ 51, about 11σ) and 96 columns of binary
  probability.
- It is stored column by column in `dgs_pkg`. Bit k of column c is bit (95−c)
  of P(|x| = k). P(0) = ρ(0)/S, and P(k) = 2ρ(k)/S for k > 0.

Most walks end after a few columns, so two lookup tables take over the start
of the walk:

1. **LUT1** is addressed by 8 random bits. It returns either a sample
   (249 of 256 entries) or the walk distance reached after 8 columns.
2. **LUT2** is addressed by 3 distance bits and 5 fresh random bits. It covers
   columns 8–12.
3. **Bit scan.** If both tables fail (probability 0.00134 per sample), the
   walk continues one matrix bit per cycle. A ScanReg holds the current
   column. Columns start at 13.

Details:

- The 9th random bit is the sign.
- Both tables are built at elaboration by a constant function that walks the
  matrix.
- A sample is produced in most cycles. The measured rate is 0.875 samples per
  cycle.

In ternary mode, two random bits select 0, +1 or −1, and the pattern `11` is
rejected. The controller uses this mode to sample the polynomial u.

Every sample is output both as a signed value and as its two residues.

## Command interface and the recryption program

To issue a command, put it on `cmd` with its blocks on `bank_a`, `bank_b` and
`bank_dst`, then pulse `start`. `busy` stays high until `done` pulses.

The commands are:

| Command | Operation |
|---|---|
| `CMD_NTT a` | Forward NTT of block a, in place. |
| `CMD_INTT a` | Inverse NTT of block a, in place. |
| `CMD_PMUL a,b→d` | Coefficient-wise product. |
| `CMD_PADD a,b→d` | Coefficient-wise sum. |
| `CMD_GAUSS →d` | Fill d with Gaussian samples. |
| `CMD_TERN →d` | Fill d with ternary samples. |
| `CMD_DECODE a→d` | Decode coefficient 0 of a into `dec_bit` and write the encoded polynomial to d. |
| `CMD_RECRYPT` | Run the whole recryption program below. |

While the box is idle, the host port writes and reads word pairs in both
memory files at once. Read data appears one cycle after `host_re`.

The block assignment for a recryption is:

- **Before** — M0 = NTT(s), M1 = NTT(b), M2 = NTT(a), M3 = c1, M4 = c0.
- **After** — c0' in M3, c1' in M5.

The program runs these 16 steps:

```
 1 NTT M3          5 DECODE M3->M3     9 NTT M5           13 INTT M5
 2 PMUL M0,M3->M3  6 GAUSS ->M4 (e1)  10 PMUL M1,M5->M4   14 PADD M3,M4->M3
 3 INTT M3         7 PADD M3,M4->M3   11 PMUL M2,M5->M5   15 GAUSS ->M4 (e2)
 4 PADD M3,M4->M3  8 TERN ->M5 (u)    12 INTT M4          16 PADD M5,M4->M5
```

The input holds c1 in M3, because s multiplies c1 when decrypting. The
blocks used for e2 and for the second half of the ciphertext are this
design's choice.

## Cycle counts

These counts were measured at n = 1024 and a 125 MHz reference clock:

| Operation | This design | Published design |
|---|---|---|
| NTT | 9,381 | 7,181 |
| INTT (including scaling) | 13,999 | 9,910 |
| Coefficient-wise add | 1,035 | 1,032 |
| Coefficient-wise mul | 1,035 | 1,040 |
| Gaussian sampling (1024 samples) | 1,100 to 1,270 | 1,080 |
| Decode (inverse CRT + decode + writing the n/2-word encoded polynomial) | 540 | 28 for the inverse CRT alone |
| Whole recryption | about 72,300 | 53,576 |

Coefficient-wise operations and sampling match closely. The sampling time
varies with the random bits, because a bit-scan sample takes tens of cycles.
The NTT is 1.3 times slower and the INTT 1.4 times slower, for three reasons:

- the twiddle-update stalls in the last two stages, described above;
- a fixed drain between stages;
- the INTT post-scaling pass, which generates two scale factors per word with
  a single chain each, and so waits for the multiplier on every word (about
  4,600 cycles).

More chains for the last stages and for the scaling pass would close most of
the remaining gap. The unit testbench checks the exact counts of this
schedule, so a schedule change shows up there.

## Departures and design choices

These points are not fixed by the published description:

- **Roots of unity.** ψ = 47147 (mod q0) and 322387 (mod q1) are primitive
  2048-th roots, chosen here. For a smaller n, the RTL uses ψ^(1024/n).
- **Twiddle ROM.** It holds 5·log2(n) stage entries plus 6 constants, not just
  log2(n) roots. The extra entries serve the merged negacyclic scaling, the
  two interleaved twiddle chains and the inverse CRT.
- **Two twiddle chains.** Running the even and odd j on separate twiddle
  registers is this design's way of hiding part of the multiplier latency.
- **Reduction details.** The window width (4 bits), the pipeline depth and
  all port protocols are this design's own.
- **Sampler tables.** The LUT sizes and the failure probability (0.00134,
  against 0.0016 published) come from this design's tables.
- **Sampling u.** The ternary mode, and using it for u, are additions.
- **Not included.** There is no Ethernet interface and no true random
  generator. Side-channel countermeasures are not included either.
- **Reset.** Reset is asynchronous and active low. Memory contents are not
  reset.

## Simulating

All testbenches are self-checking. Each one prints
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fv_pkg.sv rtl/dgs_pkg.sv tb/fv_ref_pkg.sv tb/tb_recryption_box.sv \
    --top-module tb_recryption_box -o sim && ./obj_dir/sim
```

`tb_recryption_box` works end to end at full size (n = 1024):

- It generates keys and encrypts a bit with extra noise (up to 2^34).
- It runs three recryptions through `CMD_RECRYPT`.
- For each one it decrypts the result in the reference model. It checks the
  bit, that all other coefficients decode to 0, that the remaining noise is
  below 2^20, and the cycle count.
- It counts how often each mechanism occurred: word swaps, twiddle stalls,
  scaling words, LUT2 hits, bit-scan samples, ternary rejections and
  inverse-CRT runs. It fails if any of them never occurred.

One run takes about 15 s to compile and under a second to simulate.

`tb_ctrl_addr_unit` runs each command on its own and compares the result with
`fv_ref_pkg`, a plain SystemVerilog reference (schoolbook negacyclic product,
direct NTT evaluation). The other testbenches test one module each, against
independently computed values.

`N` on `recryption_box` is a parameter. The RTL is written for any power of
two up to 1024, with ψ taken as a power of the 2048-th root. The testbenches
above run only at 1024. Going beyond 1024 also needs deeper RAM blocks and a
new root of unity.
