# NTRU-HPS key encapsulation accelerator

This is a synthesizable SystemVerilog accelerator for the NTRU-HPS key
encapsulation mechanism. It has two independent cores:

- **Encapsulation.** Inputs: a packed public key and a stream of random bits.
  Outputs: the packed ciphertext and a 256-bit session key.
- **Decapsulation.** Inputs: a packed private key and a packed ciphertext.
  Output: the session key. If the ciphertext is malformed, it outputs the
  implicit-rejection key instead and raises a `fail` flag.

The default build is the `ntruhps2048677` parameter set: n = 677,
q = 2048 (11-bit coefficients), and d = 127 ones and 127 minus ones in the
message polynomial. This gives 930 ciphertext bytes. Each core has its own
polynomial multiplier, memories and SHA3-256 unit. By default the multipliers
are x-nets; a single-MAC Comba multiplier can be chosen instead.

The architecture follows the design in "A Flexible ASIC-oriented Design for a
Full NTRU Accelerator":
- x-net and Comba multipliers;
- an embed unit with a Mersenne mod-3 reducer;
- rejection and modulo variable-weight samplers;
- a Fisher-Yates fixed-weight sampler;
- a four-check validator;
- an implicit-rejection key path.

Where that design leaves details open (byte formats, port protocols, memory
allocation, phase overlap), this implementation makes its own choices. They
are listed under "Design choices" below.

## What the cores compute

Notation:
- R_q = Z_q[x]/(x^n − 1).
- S_q = Z_q[x]/Φn and S_3 = Z_3[x]/Φn, where Φn = 1 + x + … + x^(n−1).
- Ternary coefficients are stored as 2-bit codes: 0, 1, and 2 meaning −1.

Encapsulation (`ntru_encap`):

1. Sample r (variable weight) and m (fixed weight: d ones, d minus ones).
   Coefficient n−1 of both is 0.
2. h = UNPACK_q(public key).
3. c = r·h + Lift(m) mod (q, x^n − 1). Lift is the HPS one: −1 becomes q−1.
4. Ciphertext = PACK_q(c). Key = SHA3-256(PACK_3(r) ‖ PACK_3(m)).

Decapsulation (`ntru_decap`), with secret key (f, f_p, h_q, s):

1. a = f·c mod (q, x^n − 1), then reduced to S_3 (centred, then mod 3).
2. m = a·f_p mod (3, Φn).
3. r = (c − Lift(m))·h_q mod (q, Φn).
4. Validation:
   - r is ternary;
   - m has exactly d ones and d minus ones;
   - the coefficients of c sum to 0 mod q.
5. On success the key is k1 = SHA3-256(PACK_3(r) ‖ PACK_3(m)) and `fail` = 0.
   Otherwise it is k2 = SHA3-256(s ‖ c_pkd) and `fail` = 1.
6. Both keys are always computed, so the latency does not depend on the outcome.

## Top level: `ntru_kem`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock (rising edge) and asynchronous active-low reset, shared by both cores |
| `enc_start` | in | 1 | One-cycle pulse that starts an encapsulation |
| `enc_busy` / `enc_done` | out | 1 | Busy level; one-cycle pulse when `enc_key` is valid |
| `enc_rnd_valid` / `enc_rnd_data` / `enc_rnd_ready` | in/in/out | 1/16/1 | Random words (valid/ready). Only the low 2, 8 or 10 bits are used, depending on the sampler |
| `enc_pk_valid` / `enc_pk_byte` / `enc_pk_ready` | in/in/out | 1/8/1 | Packed public key, byte 0 first (valid/ready) |
| `enc_ct_valid` / `enc_ct_byte` / `enc_ct_last` | out | 1/8/1 | Packed ciphertext, byte 0 first, no back-pressure |
| `enc_key` | out | 256 | Session key; byte i is in bits [8i+7:8i] |
| `dec_start` | in | 1 | One-cycle pulse that starts a decapsulation |
| `dec_busy` / `dec_done` | out | 1 | Busy level; pulse when `dec_key` and `dec_fail` are valid |
| `dec_in_valid` / `dec_in_byte` / `dec_in_ready` | in/in/out | 1/8/1 | Input stream (valid/ready): f_pkd, f_p_pkd, h_q_pkd, s (32 bytes), c_pkd |
| `dec_key` / `dec_fail` | out | 256/1 | Session key and rejection flag |

A byte or word moves on a clock edge where both valid and ready are high.

Byte formats:
- **Ternary polynomials (PACK_3).** Five coefficients per byte, packed as
  Σ t_i·3^i with t_i ∈ {0, 1, 2}. There are ceil((n−1)/5) bytes, 136 at
  n = 677, and the last byte is partial.
- **R_q polynomials (PACK_q).** Coefficients 0 … n−2, each LOGQ bits, are
  packed least significant bit first and zero-padded to a whole byte. That is
  930 bytes at n = 677.
- **Unpacking.** Unpacking c and h rebuilds coefficient n−1 as minus the sum
  of the others.

Parameters of `ntru_kem`, `ntru_encap` and `ntru_decap`:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 677 | Ring degree n |
| `LOGQ` | 11 | log2 q |
| `D` | 127 | Number of +1 and of −1 coefficients in m (q/16 − 1) |
| `VAR_ALG` | `SAMPLE_REJECTION` | Variable-weight sampler: rejection of code 3 in a 2-bit word, or an 8-bit word mod 3 (`SAMPLE_MODULO`). Encapsulation only |
| `MUL_ARCH` | `MUL_XNET` | `MUL_XNET`: n multiply-accumulate lanes, n steps per product. `MUL_COMBA`: one MAC, about n² cycles per product |

The other NTRU-HPS sets need different parameters:
- `ntruhps2048509`: N = 509, D = 127.
- `ntruhps4096821`: N = 821, LOGQ = 12, D = 255. The 12-bit coefficient
  path has been simulated end to end at n = 37.

NTRU-HRSS is not supported. Its message is not fixed-weight and its Lift is
different.

## Architecture

### Building blocks (`rtl/`)

| File | Function |
|---|---|
| `ntru_pkg.sv` | Defaults, trit codes, sampler/multiplier selectors, size helpers |
| `poly_ram.sv` | Simple dual-port polynomial memory, one coefficient per word, 1-cycle synchronous read |
| `xnet_mul.sv` | x-net multiplier (details below) |
| `comba_mul.sv` | Product-scanning multiplier: one MAC and three dual-port memories; same ports as `xnet_mul` |
| `poly_addsub.sv` | Coefficient-wise add/subtract mod q, registered |
| `mod3_reduce.sv` | Two-stage mod-3 reducer that folds 2-bit digits (2² ≡ 1 mod 3) |
| `embed.sv` | R_q → S_q or S_3 (details below) |
| `sampler_var.sv` | Variable-weight ternary sampler: rejection or modulo algorithm |
| `sampler_fixed.sv` | Fixed-weight sampler (details below) |
| `validator.sv` | The four streaming checks (details below) |
| `pack_q.sv` / `unpack_q.sv` | R_q polynomial ↔ byte stream |
| `pack_p.sv` / `unpack_p.sv` | Ternary polynomial ↔ byte stream, 5 trits per byte. Unpacking divides by 3 by multiplying by 171 and shifting |
| `sha3_256.sv` | SHA3-256 (details below) |
| `byte_fifo.sv` | Small byte FIFO with a last flag |
| `kgen.sv` | Reads r and m from the core memories and streams PACK_3(r) ‖ PACK_3(m) to the hash |
| `ntru_encap.sv`, `ntru_decap.sv`, `ntru_kem.sv` | The two cores and the top |

Details:
- **`xnet_mul`:**
  - It has n multiply-accumulate lanes arranged as a rotating ring, so the
    x^n − 1 reduction costs nothing.
  - b enters from b_{n−1} down to b_0, one coefficient per cycle. The product
    is ready n steps later.
  - The result leaves c_{n−1} first, one coefficient per shift.
  - In ternary mode each lane selects 0, b or −b instead of multiplying.
- **`embed`:**
  - It captures the top coefficient, which arrives first, and subtracts it
    from every coefficient (reduction mod Φn).
  - It then reduces mod q, or centres the value and reduces mod 3. Latency
    is 3 cycles.
  - With `phi` = 0 the subtraction is skipped.
- **`sampler_fixed`:** it sets d ones and d minus ones, then runs a
  Fisher–Yates shuffle over the first n−1 positions. The swap index is drawn
  by rejection on masked random words.
- **`validator`:** it computes four checks:
  - ternary (α);
  - count of 1s (β) and count of −1s (γ), both compared with D;
  - sum of the first n−1 coefficients (δ), which must cancel the last one mod q.
- **`sha3_256`:** one Keccak-f[1600] round per cycle, byte-wide absorption,
  and the 0x06 … 0x80 padding.

### Encapsulation schedule

The memories are S1 (r), S2 (m) and L1 (h, then r·h, then c). The phases are:

1. **Load.** h is unpacked into L1. At the same time r is sampled, streamed
   into the multiplier's operand register and written to S1.
2. **Multiply.** L1 is streamed into the multiplier as b. The fixed-weight
   sampler builds m in S2 at the same time.
3. **Unload.** r·h is written back to L1.
4. **Add.** Lift(m) is added coefficient by coefficient.
5. **Pack.** The sum is packed straight to the ciphertext port.
6. **Key.** `kgen` streams PACK_3(r) ‖ PACK_3(m) into the SHA3 unit.

### Decapsulation schedule

The input stream is unpacked as it arrives:
- f goes into the multiplier's operand register;
- f_p goes to S_FP;
- h_q goes to L_HQ;
- s goes into a register;
- c goes to L_C.

The validator checks the sum of c while c arrives. One large-by-large
multiplier then computes three products in sequence:

1. f·c. The embed unit turns it into a mod (3, x^n − 1) trit polynomial in L_T.
2. f_p·a. The result is reduced mod (3, Φn) and written to S_M, with the
   weight check on the fly.
3. h_q·(c − Lift(m)). The operand is formed by the adder. The result is
   reduced mod (q, Φn), and r is written to S_R with the ternary check.

k1 is then hashed from S_R and S_M. After it, k2 is hashed from s and a
repack of c. The outputs choose between k1 and k2 without a branch in the
schedule.

### Latency

Measured at n = 677 with the x-net multipliers:

| Operation | Cycles | Reference design, narrowest configuration |
|---|---|---|
| Encapsulation | 7088 to 7111 (varies with the number of rejected random words) | 6435 to 6465 |
| Decapsulation | 12754 (independent of the outcome) | 10048 |

The difference comes from overlapping fewer phases. For example, hashing and
packing here start only after the previous phase has finished.

With `MUL_ARCH = MUL_COMBA`, each product takes n² + 2 cycles after its last
operand coefficient.

## Verification (`tb/`)

Every block has a self-checking testbench:
- Each prints `TB_RESULT checks=<n> failures=<n>`.
- Each has a watchdog timer.
- Each compares against independent models in `tb/ntru_ref_pkg.sv`: a
  software SHA3-256, cyclic convolution, PACK_q and PACK_3.

| Testbench | What it checks |
|---|---|
| `tb_sha3_256` | FIPS 202 examples ("abc", 200 × 0xA3), random lengths across block boundaries, and the 28-cycle block time |
| `tb_xnet_mul`, `tb_comba_mul` | Ternary and large-operand products against schoolbook convolution (n = 37) and exact latency |
| `tb_embed` | All three modes against a model (n = 29) |
| `tb_validator` | Polynomials built to pass or fail each check (n = 41, D = 6) |
| `tb_sampler_var`, `tb_sampler_fixed` | Replays the random stream in software; checks weights and rejections |
| `tb_pack_q`, `tb_unpack_q`, `tb_pack_p`, `tb_unpack_p` | Byte formats, round trips and the rebuilt last coefficient |
| `tb_mod3_reduce`, `tb_poly_addsub`, `tb_poly_ram` | Exhaustive or random arithmetic, and memory read/write behaviour |
| `tb_ntru_encap` | Both samplers, one core on each multiplier architecture, against a full software encapsulation (n = 37) |
| `tb_ntru_decap` | Valid, tampered and random ciphertexts on x-net and Comba cores against a software decapsulation (n = 37) |
| `tb_ntru_kem` | Full size with default parameters (below) |

`tb_ntru_kem` runs the full-size top with its default parameters.

Encapsulation runs twice, with random public keys and a random source that
sometimes idles:
- The testbench records the random words the core takes.
- It replays both samplers in software.
- The ciphertext bytes and the key must match a software encapsulation.

Decapsulation uses a consistent key/ciphertext pair: f = 1, f_p = 1,
h_q = 3⁻¹ mod q and c = 3r + Lift(m).
- It must be accepted, with key k1.
- With one ciphertext coefficient changed, it must be rejected, with key k2.

It also counts every mechanism: sampler rejections, overlap of sampling with
multiplication, stalls, hash blocks, the three embed modes, and the accept and
reject paths. It fails if any of them never occurred.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/ntru_pkg.sv tb/ntru_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v ntru_pkg) tb/tb_ntru_kem.sv --top-module tb_ntru_kem
./obj_dir/Vtb_ntru_kem
```

## Design choices

These choices are this implementation's own, not taken from the reference
design:

- **Transfer width.** Every transfer moves one coefficient per cycle: operand
  loads, result unloads, adder, key generation and validation. The reference
  design also explores wider transfers.
- **Interfaces.** Keys, ciphertexts and random bits move on byte or word
  streams rather than through a shared system memory. The random source is
  external: a 16-bit valid/ready port.
- **Decapsulation input.** The secret key is streamed in again for every
  decapsulation, ahead of the ciphertext.
- **Sum check.** The printed form of the check ("δ equals a_{n−1}") is
  implemented as "δ + a_{n−1} ≡ 0 (mod q)". This is the condition for a
  polynomial to vanish mod (q, Φ1).
- **Implicit rejection.** The final key choice follows the NTRU
  specification: k1 on success, k2 = SHA3-256(s ‖ c_pkd) on failure.
- **Decapsulation multiplier.** It uses one large-by-large multiplier for all
  three products.
- **Comba ordering.** The Comba unit sums each output column together with its
  wrap-around column, so every result coefficient is written exactly once.

## Not implemented

- **HRSS Lift.** It is not built, so NTRU-HRSS parameter sets are not
  supported.
- **Key generation.** It is not part of this accelerator, which covers
  encapsulation and decapsulation only.
- **Random number generator.** It is outside the accelerator and connects to
  the random port.
- **Wider transfer widths.** Loading several coefficients per cycle, as
  explored in the reference design's design-space tables, is not offered.
