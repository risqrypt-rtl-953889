# RISQrypt accelerator system

Lattice schemes such as Kyber (ML-KEM) and Dilithium (ML-DSA) spend most of their time on three kinds of work:

- polynomial arithmetic modulo a small prime;
- Keccak hashing and sampling;
- in side-channel protected variants, converting masked values between arithmetic and Boolean sharings.

This design puts one accelerator next to a 32-bit RISC-V processor for each kind of work. The software stays in charge of the protocol. The accelerators are configured through memory-mapped registers and fetch and store their operands in the shared data RAM themselves. This keeps the hardware agile, because one accelerator serves every parameter set and both schemes, and it still removes the processor from the inner loops.

```
             +-------------+   fetch   +-----------+
             |  RISC-V     |---------->| instr_ram |
             |  (external) |           +-----------+
             +------+------+
                    | Wishbone data bus (MMIO)
             +------v---------------------------------------------+
             |                wb_mmio_decoder                     |
             +--+---------+-----------+------------+-----------+--+
                |         |           |            |           |
          +-----v----+ +--v-------+ +-v--------+ +-v------+  other
          | data_ram | | ntt_lite | |keccak_acc| |x2x_acc |  peripherals
          | A: bus   | +--+-------+ +-+------+-+ +-+----+-+  (port)
          | B: DMA   |    |           |sh0   |sh1  |sh0 |sh1
          +-----^----+  +-v-----------v------v-----v----v-+
                |       |   dma_arbiter (5 masters, RR)   |
                +-------+---------------------------------+
```

`risqrypt_top` holds everything except the processor. The processor's data bus (`cpu_d_req`/`cpu_d_rsp`), its fetch port (`cpu_i_*`) and a port for loading the program (`imem_load_*`) are top-level ports. Addresses outside the RAM and the accelerators go to `per_req`/`per_rsp` for any other peripherals. `irq_done[2:0]` carries the done flags of NTT-Lite, Keccak and X2X.

## Address map

| Address | Target |
|---|---|
| `0x0000_0000` .. `DMEM_BYTES-1` | data RAM (default 64 KiB) |
| `0x1000_0000` .. `0x1000_00FF` | NTT-Lite registers |
| `0x1000_0100` .. `0x1000_01FF` | Keccak registers |
| `0x1000_0200` .. `0x1000_02FF` | X2X registers |
| anything else | `per_req` / `per_rsp` |

The data RAM has two ports:

- Port A serves the processor's bus.
- Port B serves the DMA. It accepts one word per cycle and returns read data one cycle later.

Every accelerator reaches port B through a `dma_engine`. This engine turns a byte address and a length into a word stream with valid/ready handshakes. `dma_arbiter` shares port B among the five DMA masters in round-robin order. Keccak and X2X each have one master per share and use the two masters one after the other, so the shares of a secret never travel on the bus in the same cycle.

All three accelerators follow the same command pattern:

1. Write the address and length registers.
2. Write `CTRL` with bit 31 set.
3. Poll `STATUS[1]` (done) or wait for `irq_done`.

A register write is acknowledged one cycle after the strobe.

## NTT-Lite: one datapath for every polynomial operation

NTT-Lite is the largest and least obvious block. It holds three memories:

- **RAM_0:** two banks of 128x32. This is the working array.
- **RAM_1:** one 256x32 memory for twiddle factors and second operands.
- **BU:** a pipelined butterfly unit with three inputs, two outputs and 4 cycles of latency.

Two smaller units sit beside them:

- an encode unit (EU), which packs and unpacks d-bit fields;
- a sampling unit (SU), which does centred binomial and rejection sampling.

An FSM generates every address, so one command runs a whole operation on a polynomial.

### Word modes

Every arithmetic unit works in one of three modes, chosen per command in `CTRL[6:5]`:

- **single:** one 32-bit coefficient per word. Used by Dilithium, q = 8380417.
- **dual:** two independent 16-bit coefficients per word. Used by Kyber, q = 3329. The modulus is `Q[15:0]` for both halves.
- **poly:** the same as dual, except that multiplication treats the pair (a0 + a1·X) as a degree-1 polynomial. This is what Kyber's incomplete NTT needs for its pointwise product.

The multiplier forms a 32x32 product from three 16x16 products, Karatsuba-style. The same three products give the poly-mode terms a0·b0, a1·b1 and a0·b1 + a1·b0.

### Reduction by an arbitrary modulus

Reduction is plain Barrett with a 64-bit constant. The software writes `DELTA = floor((2^64-1)/q)` into `DELTA_LO`/`DELTA_HI`. The multiplier then:

1. estimates the quotient as `(P·DELTA) >> 64`;
2. computes the remainder with a truncated 32-bit product;
3. corrects both the quotient and the remainder at most twice.

Because the quotient comes out too, the same unit does the divisions inside compress, decompress and decompose.

### Command phases

A command runs these phases in order, each only if its flag is set in `CTRL`:

| Phase | Flag | Effect |
|---|---|---|
| LD1 | `[7]` | `IN_LEN` words from `SRC` into RAM_1 |
| LD0 | `[8]` | `IN_LEN` words from `SRC` into RAM_0 |
| MAIN | opcode `[4:0]` | the operation |
| OUT | `[10]` | the result words to `DST` |
| CLR | `[11]` | zero the memories, overlapped with OUT |

Source words are consumed consecutively from `SRC` across all phases of a command. One command can therefore load twiddles, load an operand and stream a third operand from one buffer.

Operands come from one of these source types:

- a RAM;
- the DMA input stream itself (forwarding): with `FWD` (`CTRL[9]`) it replaces operand A, with `FWDB` (`CTRL[16]`) operand B, and it is used as it arrives without being stored;
- a register constant (`BCONST` uses `BETA` as operand B).

If a command has neither LD nor OUT, its operands and result stay in the RAMs. The next command can then continue on them (chaining).

For example, the sum of three arrays D0 + D1 + D2 takes two commands:

1. `ADD` with `LD1 | FWD`: D1 is loaded into RAM_1 while D0 streams in as operand A. The sum stays in RAM_0.
2. `ADD` with `FWDB | OUT`: D2 streams in as operand B, and the result goes out.

This costs about 4n' cycles instead of the 8n' that separate loads and stores would cost. With n' = 128 it took 271 + 269 cycles.

### Operations

| Opcode | Operation | Cycles, n' = words |
|---|---|---|
| 1 / 2 | NTT / INTT in place on RAM_0. Twiddle k is read from `RAM_1[k]`. INTT twiddles must include the factor 1/2. | n'/2·log n' + pipeline |
| 3 / 7 | PWM / MAC (the MAC addend is streamed). Poly mode takes two passes: the first keeps a1·b1 in `RAM_0[n'+i]`, the second multiplies it by ζ_i from `RAM_1[n'+i]`. | n', poly about 2n' |
| 4 / 5 | ADD, SUB | about n' |
| 6 | SUM. The result is one word. | n' |
| 8 / 9 | COMPRESS / DECOMPRESS with d = `PARAM[5:0]` | about n' |
| 10 | DECOMPOSE. r1 goes to RAM_0, r0 to RAM_1. `POST` enables the q-1 corner case. | about n' |
| 11 | CHK_NORM. Stops at the first coefficient with \|x\| > `INV2`. `STATUS[2]` is the result. | up to n' |
| 12 / 13 | MAKE_HINT / USE_HINT (single mode) | about n' |
| 14 / 15 | ENCODE / DECODE of d-bit fields | per word |
| 16 / 17 | CBD with eta = `PARAM[11:8]`, or rejection sampling below `BETA` (optionally centred) | per input word |

`STATUS[31:16]` reports how many words ENCODE or rejection sampling produced.

Registers, as word offsets from the base:

| Offset | Register |
|---|---|
| 0 | CTRL |
| 1 | STATUS |
| 2 | LOGN |
| 3 | PARAM |
| 4 | SRC |
| 5 | DST |
| 6 | IN_LEN |
| 8 | Q |
| 9 | DELTA_LO |
| 10 | DELTA_HI |
| 11 | BETA |
| 12 | INV2 |

`INV2` carries whatever auxiliary constant the operation needs:

- 2^-1 mod q for the divide-by-two in the INTT;
- the norm bound for CHK_NORM;
- the corner value for DECOMPOSE;
- gamma for the hint operations.

### Reading two butterfly operands per cycle

RAM_0 word `a` lives in bank `XOR(bits of a)`, at row `a >> 1`. The two words of any radix-2 butterfly differ in exactly one address bit, so they always sit in different banks. The same holds for words `i` and `i+n'`. A butterfly therefore reads and writes both operands in one cycle, and the measured NTT of 256 words takes 1074 cycles against 1024 butterflies.

Write-back lags reads by the BU latency. The FSM waits for the pipeline to drain between NTT stages.

### Measured cycle counts

These counts come from the end-to-end testbench at default sizes: n' = 256 for the NTT and CHK_NORM, 128 words (256 Kyber coefficients) for the rest.

| Operation | Cycles |
|---|---|
| NTT, data already in RAM | 1074 |
| NTT with load of 256 twiddles and 256 coefficients, and write-back | 1852 |
| Poly-mode PWM of 128 words, with loads and output | 920 |
| Dual-mode ADD of 128 words, with forwarding and output | 400 |
| Chained dual-mode ADD, right operand streamed, with output | 268 |
| Poly-mode MAC of 128 words with load, streamed addend and output (NTT-Lite testbench) | 536 |
| CHK_NORM, stopping early at a failing coefficient | 22 |

## Keccak accelerator

`keccak_acc` runs the whole sponge in hardware. The software supplies the padded message and the rate in words, and gets the digest back. The message is read with `SRC`/`IN_LEN` and absorbed in blocks of `RATE` words, with one permutation per block. The output is then squeezed to `DST`/`OUT_LEN`.

The state is kept in two Boolean shares. `keccak_core` is a first-order domain-oriented-masking (DOM) Keccak-f[1600]:

- Each round takes 4 cycles: theta, then rho+pi, then the masked chi products, then their compression with iota.
- A permutation therefore takes 96 cycles.
- Fresh randomness, 1600 bits per round, comes from 25 LFSRs seeded through `SEED_LO`/`SEED_HI`.

In unmasked mode (`CTRL[0] = 0`) the core gets no randomness, share 1 stays zero, and only DMA port 0 is used.

One 50x32 FIFO per share decouples the DMA from the state. The next block is fetched while the permutation runs.

Registers, as word offsets from `0x100`:

| Offset | Register |
|---|---|
| 0 | CTRL |
| 1 | STATUS |
| 2 | SRC0 |
| 3 | SRC1 |
| 4 | DST0 |
| 5 | DST1 |
| 6 | IN_LEN |
| 7 | OUT_LEN |
| 8 | RATE, in words, 1..50 |
| 9 | SEED_LO |
| 10 | SEED_HI |

## X2X: masked conversions and randomness

`x2x_acc` works on up to 16 elements per command. It keeps one 16x32 register file per share. A command:

1. loads share 0 and then share 1 by DMA;
2. streams the elements through the processing units, one per cycle;
3. writes the two register files back to their destinations.

It has these units:

- **x2x_core:** a 13-stage A2B/B2A converter, 32-bit or dual 16-bit. For a modulus 2^k it uses Goubin's conversions:
  - A2B iterates a masked carry vector 31 times, three iterations per stage, with one fresh random word;
  - B2A uses the affine identity `A = F(x',g) ^ F(x',r^g) ^ x'` with `F(a,b) = (a^b) - b`.
- **x2x_mru:** a one-cycle mask refreshing unit. It does refresh and initial masking for arithmetic sharings (mod q or mod 2^k) and for Boolean sharings. It can be placed in front of the converter (`REFX2X`), which adds one cycle.
- **x2x_prng:** 16 64-bit LFSRs, unrolled so that 12 give 64 bits per cycle, 2 give 48 and 2 give 32. From these bits it forms 28 numbers mod 2^16, 9 numbers mod 2^32 and two numbers below q. Each number below q is the first of three ceil(log2 q)-bit candidates that falls below q. For q = 3329 a number is found with probability 0.9934. When none is found, the element waits and `STATUS[31:16]` counts the stall.

The opcodes in `CTRL[2:0]` are PRNG, X2X, REF, MASK and REFX2X. `CTRL[4:3]` selects the mode:

- A2B;
- B2A;
- B2A of single bits. One word pair is loaded, and bits `j·STRIDE` for j = 0..LEN-1 are each converted to an arithmetic sharing. This serves bit-sliced masked comparisons.

Registers, as word offsets from `0x200`:

| Offset | Register |
|---|---|
| 0 | CTRL |
| 1 | STATUS |
| 2 | SRC0 |
| 3 | SRC1 |
| 4 | DST0 |
| 5 | DST1 |
| 6 | LEN, 1..16 |
| 7 | Q |
| 8 | K |
| 9 | STRIDE |
| 10 | SEED_LO |
| 11 | SEED_HI |

`CTRL` bits:

- `[5]` dual;
- `[6]` prime modulus;
- `[7]` arithmetic domain for REF/MASK;
- `[8]` PRNG output restricted to non-zero values (a zero is redrawn and counts as a stall);
- `[31]` start.

## Where this RTL departs from the published design

- **Prime-modulus conversion is not protected.** With a prime q, `x2x_core` recombines the shares and re-shares with a fresh number below q. The results are correct, but the intermediate value is unmasked. The published system uses a separately published first-order secure converter, which is not reproduced here. The 2^k conversions are masked.
- **The Keccak core is this design's own DOM core** with the published timing (4 cycles per round). It is not the published open-source core. Its randomness comes from internal LFSRs.
- **Some operations are missing in some modes.** MAKE_HINT and USE_HINT work in single mode only. MAKE_HINT reads a second operand from RAM_1 for its corner case, where the published operation list has a single operand.
- **Padding and some X2X ordering are left to software or fixed.** Padding for Keccak is done by software. X2X loads all elements before processing them instead of overlapping the two.
- **The surrounding system is this design's own choice.** This covers the register maps, address map, memory sizes (64 KiB data and 64 KiB instruction RAM), DMA handshake and round-robin arbitration.
- **The processor and its firmware are not part of this RTL.** Cycle counts for complete KeyGen/Encaps/Decaps or Sign/Verify can therefore not be reproduced here.

## Verification and trust

Every module has a self-checking testbench in `tb/`. Each compares against a reference model written independently in the testbench and prints `TB_RESULT checks=N failures=M`. The checks cover:

- **Arithmetic units:** random operands in all modes against direct `%` arithmetic, with corner values.
- **NTT:** checked against direct polynomial evaluation at the powers of the root, for Dilithium's q = 8380417. The INTT is checked by round trip.
- **Keccak:** the all-zero permutation against the known first lane `F1258F7940E1DDE7`, and SHA3-256 of the empty string, masked and unmasked. A three-block sponge is compared with a behavioural Keccak-f.
- **X2X:** every opcode, with the shares recombined and checked. The PRNG acceptance rate is measured.
- **Bus and memory blocks:** random traffic, with arbiter fairness checked.

`tb_risqrypt_top` runs the complete system at its default sizes. It drives the processor bus and:

- loads the program memory;
- runs NTT, INTT and chained commands;
- runs forwarding and poly-mode PWM;
- ends CHK_NORM early;
- runs masked Keccak concurrently with an X2X conversion, so that DMA contention occurs;
- runs the PRNG with stalls.

It counts each of these mechanisms and fails if one never occurs. Each testbench has also been seen to fail against a deliberately broken version of its module.

Nothing has been tested on silicon or an FPGA. Timing closure was not examined. The multiplier's 64x64 Barrett product sits in two pipeline stages and is the likely critical path inside the accelerators.

## Simulating

Verilator 5 is enough. For example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/risq_pkg.sv \
    $(ls rtl/*.sv | grep -v risq_pkg) tb/tb_risqrypt_top.sv --top-module tb_risqrypt_top
./obj_dir/Vtb_risqrypt_top
```

Replace `tb_risqrypt_top` with any other testbench name. All testbenches finish in seconds and end with the `TB_RESULT` line. `rtl/risq_pkg.sv` must come first on the command line.

To change sizes, use these parameters:

- `risqrypt_top`: `DMEM_WORDS`, `IMEM_WORDS`.
- `dma_engine`: `FIFO_DEPTH`.
- `sync_fifo`: `DEPTH`/`WIDTH`.

The NTT-Lite memory sizes follow the maximum degree n' = 256, that is log n' = 8.
