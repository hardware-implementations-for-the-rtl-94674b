# Keystream generators for MUGI, SNOW 2.0, MICKEY-128 and TRIVIUM

A stream cipher encrypts by XORing the message with a pseudo-random keystream
that both ends derive from a shared key and a public initial value (IV). All
the security lives in the keystream generator. This RTL holds four of them:

| core        | standard / origin               | key / IV        | keystream per clock | setup cycles after key strobe |
|-------------|---------------------------------|-----------------|---------------------|-------------------------------|
| `mugi`      | ISO/IEC 18033-4 (PANAMA family) | 128 / 128 bit   | 64 bits             | 18 + 34 (two strobes, see below) |
| `snow2`     | ISO/IEC 18033-4                 | 128 / 128 bit   | 32 bits             | 33                            |
| `mickey128` | eSTREAM candidate               | 128 / 0..128 bit| 1 bit               | iv_len + 256                  |
| `trivium`   | eSTREAM candidate               | 80 / 80 bit     | 1 bit               | 1152                          |

Every core works the same way. First it mixes key and IV into its state
for a fixed number of clocks. During that time its output register is
frozen, so no bit of the half-mixed state ever appears on a port. Then it
produces one keystream word on every clock in which the consumer asks for one.
A reported FPGA implementation of these same architectures (Xilinx Virtex-E)
ran at 95, 122/141 (LUT/ROM), 166 and 211 MHz. That is 6080, 3904/4512, 166 and
211 Mbit/s at the widths above. The cores here keep the one-word-per-clock
structure behind those numbers.

`stream_ciphers_top` places the four cores side by side. They share only
`clk` and `rst_n`, and each core's ports appear on the top with a prefix:
`mugi_`, `snow_`, `mickey_` or `triv_`.

## Common conventions

* `rst_n` is an asynchronous active-low reset that clears every register.
* A key setup is started by a one-cycle strobe: `start`, or `ki_valid` for
  MUGI. The clock edge that sees the strobe also loads the key. A new strobe
  restarts the core at any time, including in the middle of keystream output.
* `busy` is high while the key and IV are being mixed.
* After setup, each cycle with `ks_en = 1` clocks the cipher once. At the same
  edge the output register `ks` takes the next keystream word, and `ks_valid`
  is high during the following cycle. With `ks_en = 0` the core holds its
  state, so the consumer can stall it for any number of cycles.
* Rates and latencies are exact: the testbenches count them.

## MUGI

MUGI has a 192-bit *State a* (three 64-bit words a0, a1, a2) and a 1024-bit
*Buffer b* (sixteen 64-bit words). Each round updates both at once:

* `rho` (`mugi_rho`) updates State a as a Feistel-like step with two F-functions:
  `a0' = a1`, `a1' = a2 ^ F(a1, b4) ^ C1`, `a2' = a0 ^ F(a1, b10 <<< 17) ^ C2`.
* `F` (`mugi_f`) XORs a1 with a buffer word. It then sends each byte through the
  AES S-box, multiplies each 4-byte half by the AES MixColumns matrix, and
  reorders the bytes as Q4 Q5 Q2 Q3 Q0 Q1 Q6 Q7.
* `lambda` (`mugi_lambda`) updates Buffer b. It is a word shift with three XOR
  taps: `b0' = b15 ^ a0`, `b4' = b3 ^ b7` and `b10' = b9 ^ (b13 <<< 32)`.
* The output of a round is a2 as it was *before* that round.

C0, C1 and C2 are the first 64 bits of the fractional parts of √2, √3 and √5.

### Key setup, cycle by cycle

`mugi_ctrl` steps through eight phases (`mugi_pkg::mugi_phase_t`):

| phase    | cycles | State a gets                          | Buffer b gets                |
|----------|--------|---------------------------------------|------------------------------|
| KEY_LOAD | 1      | KIinit(K) (mux input IN2)             | held                         |
| STEP1    | 16     | rho(a, 0)                             | rho's new a0 shifted into b0 |
| IV_WAIT  | any    | held; `iv_req` = 1                    | held                         |
| IV_ADD   | 1      | a ^ KIinit(I) (mux input IN1)         | held                         |
| STEP2    | 16     | rho(a, 0)                             | held                         |
| STEP3    | 16     | rho(a, b)                             | lambda(b, a0)                |
| GEN      | per `ks_en` | rho(a, b)                        | lambda(b, a0)                |

`KIinit(X0‖X1) = (X0, X1, (X0 <<< 7) ^ (X1 >>> 7) ^ C0)` is `mugi_kiinit`.
The key and the IV enter through the same 128-bit port `ki` and the same
128-bit register. The key strobe is `ki_valid` in IDLE or GEN, and `iv_req`
rises 18 cycles after it. The IV strobe is `ki_valid` while `iv_req` is high,
and `busy` falls 34 cycles after it.

Two details of the setup are easy to misread:

* The first step fills Buffer b *from State a*. After 16 shifts, word
  `b[15-i]` holds the a0 word produced by the (i+1)-th iteration of rho. During
  STEP1 and STEP2, rho must see zeros instead of b4 and b10. Two gates do
  this: one on the buffer side that zeroes b4 and b10, and one that keeps a0
  away from lambda.
* `mugi_din`/`mugi_dout` form the 64-bit message XOR: `dout = din ^ ks`.
  The same path encrypts and decrypts.

## SNOW 2.0

SNOW 2.0 (`snow2`) has two parts: a 16-word LFSR over GF(2^32)
(`snow2_lfsr`) and a small FSM (`snow2_fsm`) with two 32-bit registers R1
and R2. Words s0 (oldest) … s15:

```
s16  = alpha*s0 ^ s2 ^ alpha^-1*s11 [^ F during key setup]
F    = (s15 + R1) ^ R2          (+ is addition mod 2^32)
R1'  = s5 + R2,   R2' = S(R1)
z    = F ^ s0
```

* **Multiplication by alpha.** Multiplying by alpha or alpha^-1
  (`snow2_alpha`) is a byte shift plus one table look-up:
  `alpha*w = (w << 8) ^ MUL_a[w >> 24]` and
  `alpha^-1*w = (w >> 8) ^ MUL_ainverse[w & 0xff]`.
  - beta is the element 0x02 of GF(2^8) modulo x^8+x^7+x^5+x^3+1.
  - `MUL_a[c] = (c·β^23, c·β^245, c·β^48, c·β^239)`.
  - `MUL_ainverse[c] = (c·β^16, c·β^39, c·β^6, c·β^64)`.
* **The S transform.** S is the AES round function on one column: SubBytes,
  then MixColumn, with byte 0 least significant. It is built as four
  256×32 T-tables whose outputs are XORed together.
* **Where the tables come from.** `cipher_pkg` computes every table when the
  design is elaborated, from the field definitions above. No table appears in
  the sources.
* **Key setup.** `start` loads the LFSR in one cycle from the key and IV,
  through an OR gate at the input of every stage. The loaded words are
  `s15 = k3^IV0, s12 = k0^IV1, s10 = ~k2^IV2, s9 = ~k1^IV3`, the other words
  are k or ~k, and R1 = R2 = 0. The cipher then runs 32 clocks with F
  fed back into the LFSR, plus one clock without output. So `busy` lasts 33
  cycles, and the first word delivered is z1.

### LUT and ROM variants (`ROM_BASED`)

There are two ways to build the six tables (MUL_a, MUL_ainverse, T0..T3). The
parameter `ROM_BASED` selects one, at every level of the SNOW hierarchy:

* `ROM_BASED = 0`: asynchronous look-up tables, read directly from the
  register that holds the operand.
* `ROM_BASED = 1` (default): synchronous ROMs, each with a registered output,
  which map onto FPGA block RAM. The six tables hold 6 × 256 × 32 bits =
  48 Kbit.

A synchronous ROM returns its data one clock after the address, so the
address must run one step ahead of the data:

* In the ROM variant every ROM is addressed with the **next** value of its
  operand register. These are `s_next[0]`, `s_next[11]` and the input of R1.
  The registered ROM output therefore always belongs to the current contents
  of that register.
* This holds through loads, stalls and shifts alike. A stalled register's next
  value equals its present value.
* The ROMs reset to entry 0, to match registers that reset to zero.

Both variants give identical keystream with identical timing. `tb_snow2` runs
them side by side.

## MICKEY-128

`mickey128` holds two 128-bit registers that are clocked together.

* **R (`mickey_r`)** is an LFSR. Its feedback bit `r127 ^ input_bit_R` is XORed
  into the stages listed in `RTAPS`. When `Control_bit_R = s43 ^ r85` is 1, an
  AND gate at each stage also XORs the stage's own value into its next value.
  The register is then multiplied by x+1 instead of x, which makes the
  clocking irregular.
* **S (`mickey_s`)** is a non-linear register. It applies
  `t_i = s_{i-1} ^ ((s_i ^ COMP0_i) & (s_{i+1} ^ COMP1_i))`. Its feedback bit
  goes to the stages in FB0 or FB1, selected by `Control_bit_S = s85 ^ r42`.
* While mixing, a multiplexer feeds R with `input_bit ^ s64`.
* The keystream bit is `r0 ^ s0`, taken through an output flip-flop.
* The setup clocks in the IV bits (`iv[0]` first, `iv_len` of them), then the
  128 key bits, then 128 zero bits, all with mixing on.

**Caution:** the constant vectors RTAPS, COMP0, COMP1, FB0 and FB1
(`mickey_pkg`) are placeholders chosen for this RTL. They are not the
published MICKEY-128 constants. The structure, control and timing are
complete, but the core produces a MICKEY-like keystream, not MICKEY-128's.
To turn it into MICKEY-128, copy the five 128-bit vectors from the cipher's
specification into `mickey_pkg`, or pass them as parameters. Then check the
result against the specification's test vectors.

## TRIVIUM

`trivium` keeps the 288-bit state s1..s288 in 288 flip-flops. Each stage has
an OR gate at its input through which `start` forces in the starting state:
the key in s1..s80, the IV in s94..s173, ones in s286..s288 and zeros
elsewhere. Each clock does the following, with 11 XOR and 3 AND gates:

```
t1 = s66^s93   t2 = s162^s177   t3 = s243^s288   z = t1^t2^t3
s1  <- t3 ^ s286&s287 ^ s69
s94 <- t1 ^ s91&s92   ^ s171
s178<- t2 ^ s175&s176 ^ s264     (everything else shifts by one)
```

The setup takes 4 × 288 = 1152 clocks. `key[i]` is key bit K(i+1) and `iv[i]`
is IV bit IV(i+1). eSTREAM test-vector files number the bits within each byte
differently, so reorder the bits when comparing with them.

## How far it can be trusted

* **MUGI and SNOW 2.0** reproduce published test vectors:
  - MUGI with all-zero key and IV starts `C76E14E70836E6B6 CB0E9C5A0BF03E1E`.
  - SNOW 2.0 with key `80000000 00000000 00000000 00000000` and IV 0 starts
    `8D590AE9 A74A7D05 6DC9CA74 B72D1A45 99B0A083`.
  - SNOW 2.0 with key `AAAA…AA` and IV 0 starts with `E00982F5`.
  - The AES S-box and the SNOW table entries MUL_a[1] = E19FCF13 and
    MUL_ainverse[1] = 180F40CD are checked directly.
* **All four cores** are also compared, word by word or bit by bit, with
  behavioural models in `tb/tb_ref_pkg.sv`. The models are written
  independently of the RTL. The comparisons cover random keys and IVs,
  random stalls and restarts.
* **TRIVIUM** is checked only against that model, not against published
  vectors.
* **MICKEY-128** is checked against the same model using the same placeholder
  constants. That proves the structure, not the cipher.

Choices made in this RTL where the architecture leaves the details open:

* The key/IV handshakes (`start`, `ki_valid`/`iv_req`, `ks_en`/`ks_valid`) and
  the asynchronous reset.
* **MUGI Buffer b fill.** Buffer b is filled in STEP1 by shifting, not by an
  addressed write.
* **MUGI auxiliary buffers.** These are plain gates. The reported MUGI
  implementation has about 1000 more flip-flops (2437) than this one (about
  1420). That suggests its buffer-side auxiliary buffer held a full
  1024-bit copy of Buffer b. The gated form computes the same function.
* **SNOW 2.0 byte lanes.** Some drawings of this architecture attach the alpha
  table to the low byte of s0 and the alpha^-1 table to the high byte of s11,
  with the shifts swapped. This RTL follows the defining equations above,
  which are the ones that reproduce the test vectors.
* **MUGI IV addition.** The IV is XORed into all 192 bits of State a. The
  third word receives `(I0 <<< 7) ^ (I1 >>> 7) ^ C0`. Some descriptions of
  this architecture count only a 128-bit XOR at this point. The full-width
  XOR is what the MUGI definition requires.
* **MICKEY key and IV registers.** `mickey128` captures key and IV in 256 bits
  of registers on `start`, so the ports may change during setup. A leaner
  version would stream the bits in from outside.
* **Output protection.** Each core carries an assertion that `ks_valid` is
  never high while `busy` is.
* **Adders** are written as `+`. Carry-save adders are left to synthesis.
* **Default SNOW variant.** `ROM_BASED` defaults to 1, the variant with the
  best throughput per unit area in the reported results.
* **MICKEY-128.** The IV-length port and the initialization order follow the
  MICKEY family. The register constants are placeholders (see above).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  tb/tb_ref_pkg.sv rtl/cipher_pkg.sv rtl/mugi_pkg.sv rtl/snow2_pkg.sv rtl/mickey_pkg.sv \
  tb/tb_stream_ciphers_top.sv --top-module tb_stream_ciphers_top -Mdir obj
./obj/Vtb_stream_ciphers_top
```

Replace the testbench name to run any other test:

* `tb_mugi`, `tb_snow2`, `tb_mickey128` and `tb_trivium` are the per-core
  tests.
* `tb_mugi_f`, `tb_mugi_rho`, `tb_mugi_lambda`, `tb_mugi_kiinit`,
  `tb_mugi_ctrl`, `tb_aes_sbox`, `tb_snow2_alpha`, `tb_snow2_fsm`,
  `tb_snow2_lfsr`, `tb_mickey_r` and `tb_mickey_s` test single blocks.

`tb_throughput` holds `ks_en` high on all four cores for 256 cycles. It checks that a correct word arrives on every cycle: 64, 32, 1 and 1 bits per clock.

`tb_stream_ciphers_top` runs the four cores at once, at their default
parameters. It takes each through setup and keystream output, a MUGI
encrypt/decrypt round trip and restarts. It also counts each mechanism it
exercises: IV wait, re-key, stalls, restarts, empty and non-empty MICKEY IVs.

## Files

| file | contents |
|------|----------|
| `rtl/cipher_pkg.sv` | GF(2^8) arithmetic, AES S-box, SNOW T-tables and alpha tables (computed), MUGI constants |
| `rtl/aes_sbox.sv` | 8-bit AES S-box |
| `rtl/mugi_pkg.sv`, `mugi_ctrl.sv` | MUGI phases and control unit |
| `rtl/mugi_f.sv`, `mugi_rho.sv`, `mugi_lambda.sv`, `mugi_kiinit.sv` | MUGI round functions and key/IV expansion |
| `rtl/mugi.sv` | MUGI generator |
| `rtl/snow2_pkg.sv`, `snow2_alpha.sv`, `snow2_fsm.sv`, `snow2_lfsr.sv`, `snow2.sv` | SNOW 2.0 |
| `rtl/mickey_pkg.sv`, `mickey_r.sv`, `mickey_s.sv`, `mickey128.sv` | MICKEY-128 structure (placeholder constants) |
| `rtl/trivium.sv` | TRIVIUM |
| `rtl/stream_ciphers_top.sv` | the four cores side by side |
| `tb/tb_ref_pkg.sv` | behavioural reference models |
| `tb/tb_*.sv` | self-checking testbenches |
