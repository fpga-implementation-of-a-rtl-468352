# IPsec authentication accelerator: MD5 hash engine and GF(2^193) elliptic-curve scalar multiplier

IPsec's Authentication Header protects a packet with a message authentication
code computed by a hash function. A digital signature then encrypts that hash
with the sender's private key. This accelerator provides hardware for both
steps. It has two independent engines:

* **MD5 hash engine** (`md5_hash`). Message bytes stream in at one byte per
  clock. The engine pads the message and hashes each 512-bit block in a single
  clock through a fully unrolled, purely combinational 64-step MD5 core. A
  two-stage input buffer overlaps loading the next block with hashing the
  current one.
* **Elliptic-curve public-key generator** (`ec_io_ctrl` and below). It
  computes Q = k·P on the binary curve y² + xy = x³ + ax² + b over GF(2^193)
  by double-and-add. All field arithmetic goes through one small *combined
  operator*. That operator adds, multiplies, squares and inverts with a single
  register set, and it inverts with the Almost Inverse Algorithm.

The engines share only clock and reset (`crypto_accel_top`). Combining them,
for instance signing a digest, is left to the host.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench in `tb/`.

## Top level: `crypto_accel_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `md5_msg`, `md5_valid`, `md5_last` | in | 8, 1, 1 | message byte, valid, last byte of the message |
| `md5_ready` | out | 1 | a byte is taken on a clock edge where valid and ready are both high |
| `md5_aout` .. `md5_dout` | out | 4 × 32 | digest words A, B, C, D |
| `md5_digest_valid` | out | 1 | one-clock pulse when the digest registers change |
| `ec_wr_en`, `ec_addr`, `ec_wdata` | in | 1, 6, 32 | register write port of the EC engine |
| `ec_rdata` | out | 32 | combinational read data for `ec_addr` |
| `ec_irq` | out | 1 | one-clock pulse when a scalar multiplication ends |

Parameters: `EC_M` (field degree, default 193) and `EC_POLY` (reduction
polynomial, default x^193 + x^15 + 1).

## MD5 engine

```
 msg ──► md5_buffer_far ──(512b, 1 clock)──► md5_buffer_close ──► md5_main ──► mainout
           ▲  padding, length                                      ▲   (64 steps,   │
           │                                                       │  combinational)│
      md5_pad_ctrl ── strobes ─────────────────────────────── md5_cvreg ◄───────────┤
                                                                                    ▼
                                                                         md5_digest_reg ─► aout..dout
```

### Block flow and timing

* `md5_pad_ctrl` keeps the byte position within the block (`count64`, 6 bits)
  and the message length in bytes (`msgsizeout`, 61 bits). Each accepted byte
  is written into the first buffer stage at position `count64`.
* When byte 63 of a block has been written, `buf_clo_ld` copies all 512 bits
  into the second stage on the next clock. The first stage takes byte 0 of the
  next block on that same clock. Loading therefore never waits for hashing:
  this is the double buffering.
* `md5_main` computes the 64 steps and the final chaining addition
  combinationally, from `md5_buffer_close` and `md5_cvreg`. One clock after
  `buf_clo_ld`, `cvreg_ld` stores the result back into the chaining register.
* The message's last block also raises `digest_ld`, which loads `aout..dout`,
  and `cv_init`, which returns the chaining register to the MD5 initial value.
  The next message can therefore start at once.

A 64-byte block takes 64 clocks of input. The digest appears 4 clocks after
the last byte, or 5 when an extra padding block is needed. For long messages
the rate is 512 bits per 64 clocks, i.e. 800 Mbit/s at 100 MHz. Each message
also stalls the input for 1 or 2 clocks while its padding is written. Four
back-to-back 1500-byte packets take 6,003 clocks, i.e. 799.5 Mbit/s at
100 MHz.

### Padding

After the byte marked `msg_last`, the controller stops taking input and writes
the padding into the first stage in one clock per write. The length field is
the byte count shifted left by three (the bit length), stored little-endian in
bytes 56..63.

| bytes in the last block | padding writes (`padtype`) | blocks added |
|---|---|---|
| 1..55 | `PAD_ONE_LEN` at the next position: 0x80, zeros, length | 0 |
| 56..63 | `PAD_ONE` (0x80, zeros), then `PAD_LEN` from byte 0 (zeros, length) | 1 |
| 64 (an exact multiple of 64 bytes) | `PAD_ONE_LEN` from byte 0 | 1 |

A message must hold at least one byte, because `msg_last` marks a byte.

### Digest format

`{dout, cout, bout, aout}` is the final chaining value `{D, C, B, A}`. The
digest bytes in the usual hex order are `aout[7:0]`, `aout[15:8]`, …,
`dout[31:24]`. For example, "abc" gives `aout = 32'h98500190`, i.e. the digest
`900150983cd2…`.

## Elliptic-curve public-key generator

```
ec_io_ctrl (register port)
  └─ ec_point_mult (double-and-add, special cases)
       ├─ ec_double_fsm ─┐
       ├─ ec_add_fsm ────┼─ one request/response port, one operation at a time
       └─ gf2m_alu ◄─────┘  (combined GF(2^m) operator)
```

### The combined field operator, `gf2m_alu`

Elements of GF(2^m) are polynomials over GF(2) of degree below m. They are
held as m-bit vectors in polynomial (standard) basis and reduced modulo
f = `POLY`. Addition is XOR. One set of registers carries every operation.
`Z` holds the first operand (the multiplicand), `B` the second (the
multiplier) and `D` the result. `F`, `G`, `C` and a counter `K` join `B` for
inversion.

* **Add** (1 iteration): `D = Z ^ B`.
* **Multiply** (m iterations), most significant multiplier bit first: each
  clock computes `D = (D·x mod f) ⊕ (b_i ? Z : 0)`. The product D·x needs one
  conditional XOR with f.
* **Square**: a multiplication with `B = Z`. It has no separate squarer.
* **Invert**, in two phases.
  1. *Almost Inverse Algorithm.* Start with F = a, G = f, B = 1, C = 0, k = 0.
     Each clock does exactly one of:
     * if F is even, F = F/x, C = C·x and k = k+1;
     * else if F = 1, leave the loop;
     * else if deg F < deg G, swap F with G and B with C, then F = F+G and
       B = B+C;
     * else F = F+G and B = B+C.

     The invariant B·a ≡ x^k·F (mod f) holds throughout. When F reaches 1,
     B = a⁻¹·x^k. The degree test needs no priority encoder:
     deg F < deg G ⇔ F < G and F < F⊕G.
  2. *Correction.* k clocks of B = B/x mod f. Each such clock adds f when B is
     odd and then shifts right. B is then a⁻¹.

  F, G, B and C are m+1 bits wide, because G starts as f. Inverting 0 returns
  0. The loop takes at most about 3m clocks and the correction up to 2m. Over
  200 random elements of GF(2^193), an inversion took 739–852 clocks, 798 on
  average.

Interface: `start` with `op` (`GF_ADD`, `GF_MUL`, `GF_SQR`, `GF_INV`), `opa`
and `opb`. `done` pulses with the result on `result`, which holds until the
next operation. Latency from `start` to `done` is 1 clock for add and m+1 for
multiply and square.

### Point doubling and addition

Both use affine coordinates on y² + xy = x³ + ax² + b. The coefficient b is
never needed, so it is not stored.

* `ec_double_fsm`: λ = x₁ + y₁/x₁, x₃ = λ² + λ + a, y₃ = x₁² + λx₃ + x₃. This
  takes 10 field operations: 1 inversion, 2 multiplications, 2 squarings and
  5 additions. It measures about 1,560–1,600 clocks at m = 193.
* `ec_add_fsm` (x₁ ≠ x₂): λ = (y₁+y₂)/(x₁+x₂),
  x₃ = λ² + λ + x₁ + x₂ + a, y₃ = λ(x₁+x₃) + x₃ + y₁. This takes 12 field
  operations: 1 inversion, 2 multiplications, 1 squaring and 8 additions. It
  measures about 1,400 clocks at m = 193.

Each sequencer issues one operation, waits for `done` and writes the result to
a local temporary. Each operation therefore costs the operator's latency plus
about two clocks. Only one sequencer is active at a time, so both share the
single operator through a multiplexer.

### Scalar multiplication, `ec_point_mult`

The scalar k has m bits and is scanned from the top bit down. For each bit,
Q is doubled, and P is added when the bit is 1. The affine formulas do not
cover every case, so the controller handles these itself:

| situation | result |
|---|---|
| Q is the point at infinity, double | stays at infinity (no field work) |
| Q has x = 0, double | infinity (a point of order two) |
| Q is infinity, add P | Q = P (copy) |
| Qx = Px and Qy = Py, add P | doubling of Q |
| Qx = Px and Qy ≠ Py (Q = −P), add P | infinity |

P must be a finite point. k, P and a are captured on `start`. With m = 193 and
random 193-bit scalars, one multiplication takes 431,000–437,000 clocks. That
is 6 ms at about 73 MHz.

### Register port, `ec_io_ctrl`

`addr = {reg[2:0], word[2:0]}`. Each m-bit value is split into 32-bit words,
word 0 least significant (7 words for m = 193). Bits above m read as zero.

| reg | contents | access |
|---|---|---|
| 0 | k | read/write |
| 1 | Px | read/write |
| 2 | Py | read/write |
| 3 | a | read/write |
| 4 | Qx | read |
| 5 | Qy | read |
| 6 | control/status, word 0 | write bit 0 = 1 starts; read `{29'b0, q_inf, done, busy}` |

Operand writes are ignored while the engine is busy. `done` stays set until
the next start. `irq` pulses at the end.

## Where this implementation departs from, or goes beyond, the original

* **Reduction polynomial.** The original builds the field size into VHDL
  parameters and shows polynomial inputs on its operator. Here the polynomial
  is a parameter. The default x^193 + x^15 + 1 is the trinomial of the
  standard 193-bit binary curves, not a value taken from the original.
* **Operator datapath.** The register roles (Z multiplicand, B multiplier, D
  product, B reused by the inverter) and the Almost Inverse Algorithm come
  from the original. Its exact multiplexer network (registers named A, S, R
  and others) is not reproduced. The bit-serial multiplier is this
  implementation's choice.
* **Relative speeds.** The original reports addition 0.1 µs, multiplication
  4.5 µs, inversion 26 µs and EC addition or doubling about 39 µs, without
  naming a clock. Here the cycle ratios differ: multiplication is 194 add
  times, and inversion is about 4 multiplications (798 against 194 clocks),
  where the original has about 6. Absolute times cannot be compared.
* **MD5 rate.** The original reports about 500 Mbit/s at 100 MHz. This engine
  takes one byte per clock, i.e. 800 Mbit/s at 100 MHz. Whether the
  combinational 64-step core meets a given clock depends on the device. No
  FPGA timing or area was checked here; the original used 5,067 Virtex XCV800
  slices.
* **Own choices:** the byte-stream handshake, the padding-type encoding, the
  `cv_init` strobe, affine coordinates, the scan direction and the
  special-case handling of scalar multiplication, and the whole I/O register
  map.
* **Not built:** the encryption, decryption and comparison steps of the
  authentication protocol. These are the host's job and the original does not
  specify them.

## Files

`rtl/`:
* packages `md5_pkg.sv` (MD5 constants, step functions, padding types) and
  `gf2m_pkg.sv` (field-operation codes, default field);
* MD5 modules `md5_main`, `md5_buffer_far`, `md5_buffer_close`, `md5_cvreg`,
  `md5_digest_reg`, `md5_pad_ctrl` and `md5_hash`;
* EC modules `gf2m_alu`, `ec_double_fsm`, `ec_add_fsm`, `ec_point_mult` and
  `ec_io_ctrl`;
* the top, `crypto_accel_top`.

`tb/` has one testbench `tb_<module>.sv` per module and
`tb_crypto_accel_full.sv`. The full testbench runs the top with default
parameters: it hashes two strings and does one 193-bit scalar multiplication,
in about 3 s. `ec_ref_pkg.sv` is the reference model for the EC testbenches.
It uses schoolbook multiplication, inversion by Fermat's little theorem
(a^(2^m−2)), the full group law and least-significant-bit-first scalar
multiplication, so it shares no algorithm with the hardware. The MD5
testbenches compare with published MD5 digests. `tb_md5_main` also uses a
rolled step-by-step model that computes the constants from sin() at run time.

Two testbenches measure performance. `tb_gf2m_timing` gives the clock counts
of field addition, multiplication and inversion at m = 193.
`tb_md5_throughput` hashes 1500-byte packets back to back and checks the clock
count.

`tb_crypto_accel_top` runs both engines at once. Its EC field is GF(2^8), so
that a sweep of scalars reaches every special case. It counts each mechanism
(each padding case, input stall, overlapped loading, addition, doubling, copy,
Q = P, Q = −P, x = 0, refused write) and fails if one never occurs.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf2m_pkg.sv rtl/md5_pkg.sv tb/ec_ref_pkg.sv tb/tb_crypto_accel_full.sv \
    --top-module tb_crypto_accel_full -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run another. Verilator reports
`SYNCASYNCNET` lint warnings for `rst_n`: the reset is asynchronous in the
flip-flops and is also used in the assertions' `disable iff`. This is
intended.

## Changing the design

* **Another binary field:** set `EC_M` and `EC_POLY` on the top, or `M` and
  `POLY` on `ec_io_ctrl`/`ec_point_mult`/`gf2m_alu`. `POLY` must have bit M
  set. The register port limits m to 256. The testbenches use GF(2^8) with
  x^8 + x^4 + x^3 + x + 1.
* **MD5 input width:** the controller and the first buffer stage assume one
  byte per clock. A wider input would change `count64` stepping and the write
  logic of `md5_buffer_far` only.
