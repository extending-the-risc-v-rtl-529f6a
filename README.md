# LAC post-quantum instruction-set extension for a RISC-V execute stage

LAC is a lattice-based public-key scheme (Ring-LWE). Its run time on a small
processor goes into three places: expanding seeds into polynomials with
SHA256, multiplying polynomials in Z_251[x]/(x^n + 1), and the Chien search of
its BCH error-correcting decoder. This RTL adds hardware for these steps
directly inside the execute stage of a 32-bit RISC-V core (a PULPino/RISCY-type
four-stage pipeline). Software reaches it through four custom R-type
instructions, so operands travel through the register file and no bus
transfers are needed:

| instruction    | func3 | unit                                                      |
|----------------|-------|-----------------------------------------------------------|
| `pq.mul_ter`   | 0     | ternary x general polynomial multiplier, n = 512, q = 251 |
| `pq.mul_chien` | 1     | four GF(2^9) multipliers for the Chien search             |
| `pq.sha256`    | 2     | external SHA256 accelerator (ports only, not in this RTL) |
| `pq.modq`      | 3     | constant-time Barrett reduction modulo 251                |

All four share the opcode `0x77` (`instr[6:0]`), with the usual R-type fields
`rd[11:7] func3[14:12] rs1[19:15] rs2[24:20] func7[31:25]`; func7 is unused.

The main idea is that LAC's secret and error polynomials are *ternary*
(coefficients -1, 0, +1). A product with such a polynomial needs no
multipliers, only modular additions and subtractions, and a fully parallel
n-coefficient accumulator can finish one product in n clock cycles. Every unit
has a fixed run time, independent of the data, which keeps the decoder free of
timing leaks.

## Module hierarchy

```
lac_pq_top            decoder + PQ-ALU, the core-facing ports
├── pq_decoder        opcode 0x77 / func3 -> unit select, register fields
└── pq_alu            steers one request to one unit, muxes rd and ready
    ├── mul_ter_io    a/b input buffers, coefficient packing, start/read
    │   └── mul_ter   ring of N coefficient registers and N MAUs
    │       └── mau   (c +- b) mod 251 or c
    ├── mul_chien_io  alpha/lambda operand registers, load/calculate
    │   └── mul_chien four lanes with loop feedback, xor of the products
    │       └── mul_gf bit-serial GF(2^9) multiplier
    └── mod_q         Barrett reduction of rs1
lac_pkg               q, GF polynomial, opcode, enums, request/response structs
```

## The ternary multiplier (`mul_ter`)

The unit computes c = a * b modulo x^N - 1 (`conv_n = 0`) or modulo x^N + 1
(`conv_n = 1`, the one LAC uses), with a ternary, b and c in Z_251 and
N = 512.

It is a ring of N 8-bit registers c_{N-1} ... c_0 and N modular arithmetic
units (MAU). The MAU fed by register c_k also receives the fixed coefficient
b_k and writes register c_{k-1}; the MAU fed by c_0 writes c_{N-1}, closing the
ring. In cycle `cntr` = 0 ... N-1 every MAU receives the same ternary
coefficient a_cntr and adds b_k (+1), subtracts it (-1) or passes c unchanged
(0), all modulo 251.

Why this yields the product: the term a_i * b_k enters the ring in cycle i at
position k-1 and then moves one position down per cycle for the remaining
N-1-i cycles, so it ends in register (k + i) mod N, exactly the place of
x^(i+k) in a product modulo x^N - 1. For x^N + 1 the terms with i + k >= N must
be negated. That is what the per-MAU select does: MAU k uses -a_cntr instead
of a_cntr when `conv_n = 1` and k > N-1-cntr. No separate reduction step is
needed, and after N cycles register c_k holds coefficient k.

Timing: a start cycle clears the ring and latches `conv_n`, N compute cycles
follow, and `done` pulses one cycle later; the whole operation is N + 1 cycles
after the start cycle. The control unit picks a_cntr out of the stored a by
index rather than shifting a copy, so the a and b buffers must not change while
it runs (the instruction interface guarantees this by stalling).

The ring is by far the largest part of the design: N = 512 gives 512 MAUs and
4096 flip-flops for c, plus 1024 + 4096 flip-flops of input buffers in
`mul_ter_io`; the whole top synthesises to about 9,400 flip-flops.

### Driving it with `pq.mul_ter`

`rs2[31:30]` chooses the operation; `rs2[28:18]` is a group address g;
`rs2[29]` is `conv_n`.

| mode | operation | operands / result                                                                 | cycles |
|------|-----------|-----------------------------------------------------------------------------------|--------|
| 0    | write     | b[5g..5g+3] = rs1 bytes 0..3, b[5g+4] = rs2[7:0], a[5g+i] = rs2[9+2i:8+2i]         | 1      |
| 1    | start     | multiply with `conv_n`; stalls until done                                          | N + 2  |
| 2    | read      | rd = c[4g+3..4g], c[4g] in rd[7:0]                                                 | 1      |
| 3    | none      | rd = 0                                                                             | 1      |

Ternary coefficients are two-bit two's complement: `01` = +1, `11` = -1,
`00` (and `10`) = 0. Indices at or beyond N are ignored on write and read as 0.
A full 512-coefficient product therefore costs 103 writes, one start of 514
cycles and 128 reads: 745 cycles in PQ instructions.

### Length-1024 products (LAC-192, LAC-256)

The 512-coefficient unit reduces only modulo x^512 +- 1, so a product modulo
x^1024 + 1 is split in software in two levels. Each length-1024 operand is cut
into halves of 512, each of those into halves of 256, and the sixteen
256 x 256 products are done in hardware with the operands zero-padded to 512
(their degree, at most 510, never wraps). The partial products are recombined
as c = ll + (lh + hl) x^256 + hh x^512 per 512 x 512 product, and the final
recombination folds coefficients beyond x^1023 back with a minus sign. Karatsuba
is not used, because it would need general-by-general products. The testbench
`lac_split_mul_tb` carries this out through instructions: 16 hardware products,
11,920 cycles in PQ instructions.

## Chien search (`mul_gf`, `mul_chien`)

The BCH decoders of LAC, BCH(511, 367, 16) for LAC-128/256 and
BCH(511, 439, 8) for LAC-192, work in GF(2^9) with the primitive polynomial
p(x) = 1 + x^4 + x^9. The Chien search evaluates the error locator
Lambda(x) = lambda_0 + ... + lambda_t x^t at alpha^i; a zero at alpha^l marks an
error at position 511 - l. Since the message is only 256 bits of a systematic
code word, only alpha^112 ... alpha^368 (t = 16) or alpha^184 ... alpha^440
(t = 8) need checking.

`mul_gf` is a bit-serial multiplier: a 9-bit shift register c accumulates
c <- c * x mod p(x) + b_s * a, scanning b from b_8 down to b_0. Multiplying by x
is a shift whose outgoing bit c_8 is fed back into c_0 and c_4. The start cycle
clears c and captures b; nine enabled cycles follow; `done` pulses in the tenth.

`mul_chien` runs four `mul_gf` side by side. Lane k multiplies the constant
alpha^m (m = 1+k+4j) by lambda_m in a round started with `loop = 0`, or by its
own previous product with `loop = 1`. Each round so advances every term from
lambda_m alpha^(i m) to lambda_m alpha^((i+1) m) without reloading anything. The
four products are registered and xor-ed into out_j; one round takes 11 cycles.
Software adds lambda_0 and the t/4 groups j.

`pq.mul_chien` modes (`rs2[31:30]`): 0 loads alpha/lambda of lanes 0 and 1,
1 loads lanes 2 and 3 (each lane: alpha in `rsX[8:0]`, lambda in `rsX[17:9]`,
rs1 for the lower lane, rs2 for the upper one), 2 runs one round with
`loop = rs2[29]` and returns out_j in `rd[8:0]` (12 cycles), 3 does nothing.
To start the search at alpha^first, software loads lambda_m * alpha^((first-1) m).
`lac_chien_tb` runs both full searches: 12,344 cycles for t = 16 and 6,172 for
t = 8 in PQ instructions.

## Barrett reduction (`mod_q`)

`pq.modq` returns rs1 mod 251 for any 32-bit rs1. The quotient is estimated as
(x * m) >> 40 with m = floor(2^40 / 251). Since x < 2^40 the estimate is low by
at most one, and one conditional subtraction, always computed, corrects it. It
is combinational, so the instruction completes in one cycle, and it runs the
same operations for every input.

## Pipeline interface and handshake

`lac_pq_top` sees the instruction in the execute stage (`instr_valid_i`,
`instr_i`), gives the core the register addresses (`rs1_addr_o`,
`rs2_addr_o`), and takes the values back (`rs1_data_i`, `rs2_data_i`).
`ready_o` low stalls the pipeline. The core must hold the instruction and its
operands until `ready_o` is high; in that cycle `rd_we_o`, `rd_addr_o` and
`rd_data_o` write the result, and the request takes effect on that clock edge.
An assertion in `pq_alu` checks that stalled requests are held. Instructions
that are not PQ instructions leave `pq_instr_o` and `rd_we_o` low.

The SHA256 accelerator is not part of this RTL. `pq_alu` hands it the request
(`sha_en_o`, `sha_rs1_o` with the data bytes, `sha_rs2_o` with address and
configuration) and returns its `sha_rd_i` once it raises `sha_ready_i`.

## Where this RTL makes its own choices

The published architecture fixes the structure of the units, the opcode, the
R-type format, n = 512, q = 251, GF(2^9) with 1 + x^4 + x^9, four Chien lanes
with loop feedback, Barrett reduction, five-plus-five coefficients per write
and four per read. The following are this implementation's choices:

- func3 codes 0..3 as in the table above; func7 ignored.
- bit layout and mode codes of all `pq.mul_ter` and `pq.mul_chien` operands,
  ternary code `01`/`11`;
- the ready/stall handshake, and the choice that start and calculate stall
  until the result exists (N + 2 and 12 cycles);
- an extra start cycle in `mul_ter` and `mul_gf` that clears the registers;
  `mul_gf` capturing its b operand at start (this is what lets the Chien lane
  feed its own product back);
- Barrett parameters (32-bit input, shift 40, one correction);
- asynchronous active-low reset of all state.

The RISC-V core itself (prefetch, decoder, register file, ALU, CSR, multiplier,
load/store unit) and the SHA256 accelerator are not included; the top exposes
the signals they exchange with the PQ-ALU.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
reference models written separately (`tb/lac_ref_pkg.sv`: schoolbook products
modulo x^n -+ 1, carry-less GF(2^9) multiplication, integer remainders):

- `mau_tb`: all 251 x 251 x 4 input combinations;
- `mul_ter_tb` (N = 24): random and corner products, both convolutions,
  latency N + 1;
- `mul_gf_tb`: the powers alpha^9, alpha^10, alpha^11, exhaustive rows, random
  products, latency 10;
- `mul_chien_tb`, `mul_chien_io_tb`: rounds with and without loop, latencies;
- `mul_ter_io_tb` (N = 13, partial groups), `pq_alu_tb` (N = 8),
  `pq_decoder_tb`, `mod_q_tb` (300,000 values);
- `lac_pq_top_tb`: the top at full size, driven only by instructions.
  It runs 512-coefficient products modulo x^512 + 1 and x^512 - 1, Chien
  rounds, modq, SHA256 through a stand-in responder, and an ignored non-PQ
  instruction. It counts every stall, both convolutions, loop rounds, the
  SHA256 wait and the ignored instruction, and fails if any never occurs;
- `lac_split_mul_tb`, `lac_chien_tb`: the LAC workloads described above.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/lac_pkg.sv tb/lac_ref_pkg.sv tb/lac_pq_top_tb.sv --top-module lac_pq_top_tb -o sim
./obj_dir/sim
```

Each prints `TB_RESULT checks=<n> failures=<m>`. The full-size top compiles in
about ten seconds and simulates in well under a second.

To change the multiplier size, set `N` on `lac_pq_top` (or `pq_alu`,
`mul_ter_io`, `mul_ter`). The group address field has 11 bits, enough for
N up to 8192.
