# CGU: a vectorized, reconfigurable CDMA code generator

CDMA receivers and transmitters need spreading and scrambling codes:
pseudo-random LFSR sequences, their delayed copies, and Hadamard/OVSF codes,
combined into complex chip streams. A vector processor with a 16-lane data
path needs 16 such chips every clock cycle. A plain LFSR makes one chip per
cycle, and cascading 16 copies of its feedback logic makes the critical path
16 times longer.

This RTL implements a Code Generation Unit (CGU) that produces **16 complex
code chips per clock cycle** and is reprogrammed by loading a configuration
vector, not by changing hardware. Its core is a 32-bit Fibonacci LFSR that
advances 16 steps per cycle. The 16-step feedback is factorized into two
shallow AND/XOR layers, so the logic depth grows with log(N·W) instead of
with W. The same LFSR serves every polynomial length up to 32, makes a
delayed copy of its own sequence, and compresses a 16-bit input word per
cycle for CRC / signature analysis.

The supported codes are the UMTS long and short scrambling codes, the
downlink code S_dl, the preamble codes, the channelisation/signature
(Hadamard/OVSF) codes up to spreading factor 512, the GPS C/A code, and CRCs.

## Block structure

```
              scalar_in ──┬───────────────────────────────┐
                          │ (CRC bits)                    │ (TLU value)
 vector_in ─┬─► cgu_config_reg (256 b) ──► all units      ▼
            │                                        tlu_register ─ LUT(2i), LUT(2i+1) ─┐
            ├─► prn_generator #1 ── LFSR1, SLFSR1 ─────────────────────────────────────┤
            │        └── signature ──► scalar_out                                      ├─► code_combiner ─┐
            ├─► prn_generator #2 ── LFSR2, SLFSR2 ─────────────────────────────────────┤                  │
            └─► hadamard_gen ────── H1 ────────────────────────────────────────────────┘                  ▼
                  (state load)                                   state snapshot ──────────────► mux ─► vector_out
```

| Module | Role |
|---|---|
| `cgu_top` | instruction decode, output mux, state snapshot, SSND register |
| `cgu_config_reg` | 256-bit configuration register (written by CONFIG) |
| `prn_generator` | (32+16)/16 LFSR: buffer, step logic, normal and delayed output |
| `lfsr_step`, `lfsr_pfactors` | factorized 16-step next-state logic and its p-factors |
| `hadamard_gen` | 16 Hadamard chips per cycle, SF up to 512 |
| `tlu_register` | 32-bit table look-up register loaded from the scalar input |
| `code_combiner`, `combiner_branch` | select / double / mask / add / negate |
| `cgu_pkg` | sizes, opcodes, configuration struct, state layout |

## The multi-step LFSR (`lfsr_step`)

The register holds x_0..x_31, with x_0 the next chip. One step shifts
everything down one place and appends x_32 = Σ g_j·x_j (mod 2). In matrix
form this is X(t+1) = F·X(t), and 16 steps are X(t+16) = F^16·X(t). Written
out, F^16 has huge symbolic entries. Instead, the logic uses the
factorization F^W = P_W·G_W:

* **G_W** copies x_W..x_{N-1} into the low N-W positions. For the W new
  positions it forms the partial dot products
  `s_{k+1} = XOR_{j=0..N-1-k} g_j & x_{j+k}`. These are W independent
  AND/XOR trees that use only current state bits.
* **P_W** is lower-triangular Toeplitz. New bit k is
  `n_k = XOR_{m=0..k} p_{k-m} & s_{m+1}`.
* The **p-factors** depend only on the polynomial:
  `p_0 = 1, p_i = XOR_{n<i} p_n & g_{N-i+n}`. For N = 16 they reduce to
  p_1 = g15, p_2 = g14+g15, p_3 = g13+g15, and so on. The testbench checks
  p_0..p_7 in that closed form. They change only when the configuration
  changes, so they are off the critical path (and could be clock-gated).

The critical path is therefore 2 AND levels plus about log2(N·W) XOR levels.
A direct cascade needs W AND levels plus (log N + W) XOR levels.

**CRC input.** Compressing one input bit per step (x_new = Σ g_j·x_j + y)
across 16 steps reduces to X(t+16) = P_W·(G_W·X(t) + Y). Input bit y_k is
simply XORed onto s_{k+1} before the P_W layer, so the CRC input costs 16 XOR
gates. Note that a Fibonacci register with input at the feedback produces a
signature that is a linear function of the message. For a non-zero initial
state, that signature is not the same bit pattern as the remainder of a
textbook CRC.

## The PRN generator window (`prn_generator`)

The generator state X' has 48 bits: `xp[15:0]` is an output buffer holding
the 16 chips most recently shifted out, and `xp[47:16]` is the 32-bit
register. One LEAP moves register bits 0..15 into the buffer and advances
the register 16 steps. It also latches two 16-bit output pipeline registers
from the 48-bit window as it was before the LEAP:

* **Normal output** `Z = O_W·X'`: a barrel shifter that takes `xp[o +: 16]`,
  where `o = cfg.unused = 32 − M`.
* **Delayed output** `Z' = H_W·X'`: `zd[i] = XOR_j h_j & xp[i+j]`. A linear
  combination of sequence bits is the same sequence shifted, so the delay
  polynomial h selects the delay. For an LFSR with characteristic polynomial
  C(X), the delay d is obtained with h(X) = X^d mod C(X).

**Shorter polynomials.** A polynomial of length M < 32 is multiplied by
X^(32−M): g and h are shifted up by 32−M bits and `unused` is set to 32−M.
The M real state bits then live at the top of the register. The bits below
them take no part in the feedback, and the barrel shifter starts the output
where the real sequence is. Generation starts at once, with no run-in whose
length depends on M. Because the window is N+W = 48 bits long, lengths below
16 (GPS uses 10, the UMTS short code 8) still give 16 valid chips per LEAP.

**Loading a sequence.** Write the M-bit initial state s_0..s_{M−1} (s_0
first out) into register bits 32−M..31, that is `xp[48−M .. 47]`. The first
LEAP after a load only fills the window. Its output is not valid code.
From the second LEAP on, LEAP number t outputs chips 16(t−2)..16(t−2)+15.
Saving and restoring all 48 bits continues the sequence exactly.

## Hadamard / OVSF generator (`hadamard_gen`)

Chip k of Hadamard code s is parity(s AND k). The unit is built for SF 512:
a 5-bit counter supplies the upper index bits, and the 16 lanes supply the
lower 4 bits. One XOR tree reduces `code_nr[8:4] & counter` to a common bit.
Each lane adds the parity of `code_nr[3:0] & lane` to it. A code with a
smaller SF and s < SF automatically repeats every SF chips, so no SF setting
exists. OVSF code n of spreading factor SF is Hadamard code bitreverse(n)
over log2(SF) bits. That mapping is left to software. CONFIG clears the
counter, and RCV_STATE restores it.

## Code combiner (`code_combiner`)

Two identical branches each compute:

1. **f_s**: XOR of the inputs selected by the 7-bit `ks`. Input order is
   0 LFSR1, 1 LFSR2, 2 SLFSR1, 3 SLFSR2, 4 LUT(2i), 5 LUT(2i+1), 6 H1.
   The result is 16 binary chips C(n).
2. **f_r**: doubling to 16 complex chips. In each group of 4 output bits,
   bits 4n and 4n+1 take C(2n+kr[0]), and bits 4n+2 and 4n+3 take
   C(2n+kr[1]).
3. **f_m**: AND with the 8-bit mask `km`, repeated 4 times.

The two branches are XORed (f_a), then XORed with the 32-bit `kcn` (f_cn).
In the ±1 domain, XOR is multiplication and XOR with 1 is negation. Output
bit 2n is the real part of chip n, and bit 2n+1 is the imaginary part.

Constants verified by the testbenches (binary fields written MSB first, so kr = 10 means kr[1] = 1, kr[0] = 0):

| Code | ks1 | kr1 | km1 | ks2 | kr2 | km2 | kcn |
|---|---|---|---|---|---|---|---|
| C_long (C1 = LFSR1+LFSR2, C2 = SLFSR1+SLFSR2) | 0000011 | 10 | FF | 0001100 | 00 | AA | 88888888 |
| C_short (LUT bits added) | 0110011 | 10 | FF | 0010011 | 00 | AA | 88888888 |
| S_dl (Hadamard added to both) | 1000011 | 10 | 55 | 1001100 | 10 | AA | 0 |
| C_pre / C_c-acc / C_c-cd | 1000011 | 10 | FF | 0 | 00 | 00 | B4B4B4B4 |
| GPS C/A (LFSR1 + SLFSR2) | 0001001 | 10 | FF | 0 | 00 | 00 | 0 |

The rotation e^{j(π/4+kπ/2)} of the preamble codes is replaced by adding a
cycling bit pattern (kcn = B4B4B4B4). This rotates over a square instead of
a circle. The missing weighting factor has to be applied outside the unit.

## Programming model

One instruction per cycle, `cmd = {vopc[2:0], sopc, srcv}`:

| Field | Value | Effect |
|---|---|---|
| vopc | 0 NOP, 1 CONFIG, 2 RCV_STATE, 3 SND_STATE, 4 LEAP | vector operation |
| sopc | 0 NOP, 1 SSND | send the signature of generator 1 on `scalar_out` |
| srcv | 0 NONE, 1 VMU | load `scalar_in` into the TLU register; when `input_en` of generator 1 is set, a LEAP in the same instruction also consumes `scalar_in[15:0]` as CRC input |

A LEAP or SND_STATE in cycle t shows on `vector_out` with
`vector_out_valid` in cycle t+1, and SSND shows on `scalar_out` with
`scalar_out_valid` in cycle t+1. The generator outputs (normal, delayed,
Hadamard) are registered when the LEAP executes. The code combiner sits
after those registers and drives `vector_out` combinationally from them,
the TLU register and the configuration. So the code of a LEAP is a
pipeline register plus one combiner delay away from the output pins. A TLU
value received in the cycle of a LEAP is combined into that LEAP's output. The code sits in
`vector_out[31:0]`, and all other bits are zero. SSND returns the full
32-bit register of generator 1, before any LEAP in the same instruction.
For a polynomial of length M, the signature is its top M bits.

Configuration vector (`cgu_pkg::cgu_cfg_t`, LSB first):

| Bits | Field | Bits | Field |
|---|---|---|---|
| 31:0 | prn1.poly_g (bit j = g_j; g_32 = 1 implied) | 148:140 | code_nr |
| 63:32 | prn1.poly_h | 155:149 | ks1 |
| 64 | prn1.input_en | 162:156 | ks2 |
| 69:65 | prn1.unused (= 32 − M) | 164:163 | kr1 |
| 101:70 | prn2.poly_g | 166:165 | kr2 |
| 133:102 | prn2.poly_h | 174:167 | km1 |
| 134 | prn2.input_en (reserved) | 182:175 | km2 |
| 139:135 | prn2.unused | 214:183 | kcn |
| | | 255:215 | reserved |

State vector: generator 1 X' in bits 47:0, generator 2 in bits 95:48, and
the Hadamard counter in bits 100:96. Bits 255:101 are zero on SND_STATE and
ignored on RCV_STATE. The TLU register and the configuration are not part
of the state.

## Sizes

Every size is a parameter whose default is the design's own value: LFSR
length 32, 16 chips per cycle, SF 512, 256-bit vectors. The 32-bit scalar
width is this design's choice. `prn_generator` accepts N ≤ 32 (the `unused`
field is 5 bits), and `lfsr_step` accepts any W ≤ N. After coarse synthesis,
the whole unit is about 4,700 word-level cells and 563 flip-flops. One
factorized step is about 1,200 cells, mostly single-bit AND/XOR.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against an independent bit-serial model and prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_lfsr_step` | 16 single serial steps vs the factorized step, with and without input, N=32/W=16 and N=8/W=8; p-factor closed forms |
| `tb_prn_generator` | lengths 32, 25, 18, 10, 8, 2: normal output, delayed output, signature, CRC input, save/restore, 1-cycle latency |
| `tb_hadamard_gen` | parity definition over full periods, the SF = 8 code table, periodicity, orthogonality of all SF = 16 pairs, wrap, clear, load; OVSF codes from the code tree (SF 4 to 512) equal Hadamard codes with the bit-reversed number |
| `tb_code_combiner` | random per-bit model, and the generalized equations of every named code |
| `tb_tlu_register`, `tb_cgu_config_reg` | element split, field positions |
| `tb_cgu_top` | whole unit at default size through the instruction port: UMTS long code with state save / garbage restore / restore, S_dl with Hadamard past the counter wrap, GPS C/A, short code with TLU, CRC with SSND; counts each mechanism and fails if one never occurred |
| `tb_gps_ca` | GPS C/A codes of satellites 1–5 on the whole unit: first 10 chips equal the published octal values, every chip equals a stage-by-stage model of G1/G2, period 1023, 512 ones per period |
| `tb_umts_delay` | UMTS long code (delay 16,777,232 chips) and S_dl (delay 131,072 chips) run through the full delay on the whole unit: the delayed output must equal the normal output that many chips later |

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/cgu_pkg.sv tb/tb_cgu_top.sv \
          --top-module tb_cgu_top -o sim && obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl` (or add
`-y rtl`). The synthesizable RTL reads no files.

## Where this design departs from, or goes beyond, its source description

* Bit positions of the configuration and state fields, opcode encodings,
  the 32-bit scalar width, the code placement in `vector_out`, the reset
  values and the state snapshot register are choices made here.
* The UMTS long code polynomials are taken as degree 25
  (X^25+X^3+1, X^25+X^3+X^2+X+1). That degree matches the 16,777,232-chip
  delay of the second code, and `tb_umts_delay` confirms it.
* The UMTS quaternary short-code component is not generated in hardware. It
  is computed elsewhere (one period is 256 values) and supplied through the
  TLU register: bit 2i of the TLU word is the MSB of element i, and bit 2i+1
  its LSB.
* Only generator 1 accepts CRC input.
* CRC input order: scalar_in bit k is the input consumed in the k-th of
  the 16 single steps. That is, it is added to the partial sum of the k-th
  new bit before the P layer. This follows the bit-serial definition
  (x_new = Σ g_j·x_j + y at each step). A compact matrix form of the same
  statement can be read as listing the input bits in the opposite order.
  Bit-reverse the input word if a different convention is needed.
* The TLU register is not part of the saved state. The state vector holds
  only the two generators and the Hadamard counter. After a context switch,
  the TLU value has to be received again.
* Polynomial conventions differ between standards, and the mapping to g
  is done in software. UMTS writes its recursions directly:
  X^25+X^3+1 means x(i+25) = x(i+3)+x(i), so g = 0x9. GPS describes shift
  registers that shift from stage 1 to stage 10 and output stage 10. Stage
  k holds the chip that comes out 10−k shifts later, so the taps are
  reversed: G1 = 1+X^3+X^10 becomes g = 0x081 and
  G2 = 1+X^2+X^3+X^6+X^8+X^9+X^10 becomes g = 0x197. A satellite's G2 phase
  selection (stages a, b) becomes h = X^(10−a) + X^(10−b). Both GPS
  registers start at all ones.
* Not built: emulating LFSRs longer than 32 bits (such as the 42-bit
  CDMA2000 LFSR) by several sequential steps of the 32-bit LFSR. This is a
  software technique on the same datapath whose control is not defined. An
  optional third code generator for other standards is also not built.
* No clock gating of the p-factor logic is inserted. No timing closure or
  frequency claim is made. The intended operating point is 300 MHz, which
  gives about 4.8 Gchip/s.
