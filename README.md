# A customisable GF(p) crypto-processor for ECC and HECC scalar multiplication

Elliptic-curve (ECC) and hyper-elliptic-curve (HECC) public-key schemes share
one expensive operation: the scalar multiplication `[k]P`. It is a long chain
of point doublings and additions, and each of those is a short sequence of
additions, multiplications and inversions in a prime field GF(p). HECC works
in a field half as wide as ECC for the same security (128 instead of 256
bits) but needs more field operations per curve operation. Which one wins in
hardware depends on how many field units run in parallel, and how wide they
are.

This processor has a fixed skeleton and a variable number of arithmetic units:

* one modular adder/subtracter,
* one modular inverter,
* `N_M` Montgomery multipliers, each processing `N_B` 32-bit words per cycle.

A small controller runs a program of 25-bit instructions. The program moves
operands word by word from a points memory into a unit, starts the unit, waits
for it, and writes the result back. Because a start does not block, a program
can keep several multipliers busy at once. A key-recoding unit turns the
scalar into signed digits (binary, NAF, 3NAF or 4NAF), and the program
consumes them most significant first. The curve arithmetic lives entirely in
software, so the same hardware runs ECC or HECC programs. Only the field width
and the unit counts change.

```
             k (scalar words)
                  |
           +--------------+  digit k_i
           | recoding_unit|-------------+
           +--------------+             |
 +----------+   instr (25b)   +------+  |     operand bus (32b words)
 | prog_mem |---------------->| ctrl |--+-----+------------+-----------+
 +----------+<------ pc ------+------+        |            |           |
                                 |  |   +------------+ +---------+ +----------+
            address, we, ld/start|  |   | mod_addsub | | mod_inv | | mont_mul |xN_M
                                 v  |   +------------+ +---------+ +----------+
                          +------------+        |            |           |
                          | points_mem |<---- fu_result_mux <+-----------+
                          +------------+   result word (32b)
```

## Files

| file | content |
|---|---|
| `rtl/hecc_pkg.sv` | word size, instruction format, opcodes, unit numbers, recoding methods |
| `rtl/hecc_processor.sv` | top level: all blocks, modulus register, host interface |
| `rtl/ctrl.sv` | instruction fetch and execution |
| `rtl/mont_mul.sv` | word-serial Montgomery multiplier, `NB` words per cycle |
| `rtl/mod_addsub.sv` | modular adder/subtracter |
| `rtl/mod_inv.sv` | binary extended-Euclid inverter |
| `rtl/recoding_unit.sv` | BIN / NAF / 3NAF / 4NAF recoding with an MSB-first digit buffer |
| `rtl/prog_mem.sv`, `rtl/points_mem.sv` | program and data memories |
| `rtl/fu_result_mux.sv` | result path from the units to the memory |
| `tb/tb_*.sv` | self-checking testbenches (see *Verification*) |
| `tb/tb_ecc_prog_pkg.sv` | generator of the example programs (an assembler in SystemVerilog functions) |
| `tb/tb_util_pkg.sv` | wide-integer reference arithmetic for the testbenches |

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `FIELD_BITS` | 256 | field and scalar width. 256 for ECC, 128 for HECC. Must be a multiple of 32, and at least 64 |
| `N_M` | 1 | number of Montgomery multipliers. Evaluated ranges: 1–5 (ECC), 1–12 (HECC) |
| `N_B` | 1 | words per cycle in each multiplier: 1, 2 or 4. Must divide `FIELD_BITS/32` |
| `RECODING` | `REC_4NAF` | `REC_BIN`, `REC_NAF`, `REC_3NAF` or `REC_4NAF` |
| `PROG_DEPTH` | 1024 | instructions in the program memory |

The default is the smallest ECC configuration: 256 bits, one multiplier,
`N_B = 1`, and 4NAF recoding. The word size `W = 32` is fixed in the package.
`FIELD_BITS/32` must be at least 2.

## Data representation: everything in Montgomery form

This is the part most likely to trip up a user. The multiplier computes
`a*b*R^-1 mod p` with `R = 2^FIELD_BITS`. So every field value `x` in the
points memory is stored as `x*R mod p`. Sums and differences of such values
stay in that form, and so do Montgomery products. The host converts on the way
in and out: it writes `x*R mod p` and reads `y*R mod p` back.

The inverter is a plain modular inverter. Given `x*R` it returns
`x^-1 * R^-1`. One Montgomery product by the constant `R^3 mod p` restores
Montgomery form (`x^-1 * R`). The example programs keep that constant in the
memory, and the host writes it there.

An element occupies `NW = FIELD_BITS/32` consecutive memory words, least
significant word first. Its word address is `{element[7:0], word}`, which
gives 256 elements.

The modulus `p` is written word by word through `p_we/p_idx/p_word`. When word
0 is written, the top also computes the multiplier's constant
`-p^-1 mod 2^32` (Newton iteration, `hecc_pkg::mont_neg_inv`). `p` must be odd
and below `2^FIELD_BITS`. The inverter needs `p` prime.

## Instruction set

Instructions are 25 bits: `[24:21]` opcode, `[20:16]` unit, `[15:8]` a,
`[7:0]` b. Unit numbers: 0 = adder/subtracter, 1 = inverter, 2… =
multipliers. Jump targets are the 16-bit field `{a, b}`.

| instruction | effect | cycles |
|---|---|---|
| `read fu, a, b` | load element a into operand A and element b into operand B of unit fu | NW+1 |
| `launch fu` | start unit fu. Does not wait | 1 |
| `wait fu` | stall until unit fu is idle | 1 + stall |
| `write fu, a` | store unit fu's result into element a | NW |
| `set 0, b` | OPMODE := b[0] (0 add, 1 subtract), sampled at the adder's launch | 1 |
| `jmp t` | pc := t | 1 |
| `recode` | recode the loaded scalar. Stalls until done | digits + 4 |
| `nextd t` | take the next digit (most significant first). If none is left, pc := t | 1 |
| `jtab t` | pc := t + digit + 8. This is a 16-entry jump table on the signed digit | 1 |
| `halt` | stop. `done` rises | 1 |

Example: `r = ((a*b)+c) + (d*e)` on two multipliers, with `a..e` in elements
0..4:

```
read   2, 0, 1    launch 2          // a*b on multiplier 0
read   3, 3, 4    launch 3          // d*e on multiplier 1, overlapping
wait   2          write 2, 5
set    0, 0                          // addition
read   0, 5, 2    launch 0
wait   3          write 3, 6
wait   0          write 0, 5
read   0, 5, 6    launch 0   wait 0   write 0, 5
halt
```

Nothing in the hardware stops a program from reloading a unit that is still
busy. Each unit has an assertion that flags it in simulation.

## Arithmetic units

All units share one interface. Operand words arrive through
`ld_en/ld_idx/ld_a/ld_b` while the unit is idle. `start` begins the
operation. `busy` is high from the next cycle until the result is ready. The
result is read combinationally, one word at a time, as `rd_word =
result[rd_idx]`, and it holds until the next start.

**Montgomery multiplier (`mont_mul`).** This is the operand-scanning method.
For each word `a_i` of A: `m = (T_0 + a_i*b_0) * (-p^-1) mod 2^32`, then
`T = (T + a_i*B + m*p) / 2^32`. The words of B and p are taken in chunks of
`NB`. One chunk enters a three-stage pipeline per cycle:

1. **Issue.** Pick `a_i` and the chunk. On an iteration's first chunk,
   compute `m` from the current `T_0`.
2. **Multiply.** Form the `2*NB` word products `a_i*b_k` and `m*p_k`.
3. **Accumulate.** Add `T_k`, the products and the carry from the previous
   chunk. Store the sums one word lower, which is the division by 2^32.

There is one hazard. An iteration's `m` needs the `T_0` written by the chunk
that holds word 1 of the previous iteration. When an iteration has fewer than
about three chunks, the issue stage waits for that write. After the pipeline
drains, one more cycle subtracts `p` if `T >= p`. The busy time is

    NW*NCH + (NW-1)*max(0, WCH + 3 - NCH) + 3   cycles

where:

* `NCH = NW/NB` is the number of chunks per iteration;
* `WCH` is 1 when `NB = 1` and 0 otherwise.

With `NW = 8`, that is 67 cycles for `NB = 1`, 26 for `NB = 4` and 25 for
`NB = 8`. `N_B` is the speed/area knob inside a multiplier. `N_M` is the knob
across multipliers.

**Adder/subtracter (`mod_addsub`).** It computes `a ± b`, then conditionally
adds or subtracts `p`. Both steps are full-width and finish in one busy cycle.

**Inverter (`mod_inv`).** This is binary extended Euclid, one step per cycle.
It takes at most `4*FIELD_BITS + 1` steps, and about `2.1*FIELD_BITS` on
average (about 540 cycles at 256 bits).

## Key recoding and the scalar-multiplication program

`recoding_unit` loads the scalar as `NW` words. It computes the digits from
the least significant end, one per cycle, into a buffer of `FIELD_BITS+1`
signed 4-bit digits:

* Binary: `d = k mod 2`.
* Width-L NAF (L = 2, 3, 4): for odd `k`, `d` is the residue of `k` modulo
  `2^L` in the range `(-2^(L-1), 2^(L-1))`. For even `k`, `d = 0`.
* Then `k = (k - d)/2`.

The controller pops the digits from the most significant end. So a program
does left-to-right double-and-add with signed digits, and `jtab` dispatches on
each digit.

`tb/tb_ecc_prog_pkg.sv` generates such a program. It runs 4NAF
scalar multiplication on `y^2 = x^3 + a*x + b` in affine coordinates:

1. Precompute 2P, 3P, 5P and 7P, and their negatives.
2. Copy the table entry of the leading digit into Q.
3. For each further digit, compute `Q = 2Q`, then `Q = Q + T[d]` when the
   digit is not zero.

Each field operation costs four or five instructions (read, launch, wait,
write, and set for the adder). The program takes 639 instructions and 48
elements. The point-at-infinity and `Q = ±T[d]` cases are not handled, because
random 128/256-bit inputs never reach them. The program uses one multiplier.
It shows the mechanisms and gives a correct result. It is not a tuned
schedule. With this program the inverter dominates: about 310 inversions of
roughly 540 cycles each in a 256-bit `[k]P`. So more multipliers or a larger
`N_B` gain little. At 256 bits, a run takes about 313,000 cycles with
(N_M, N_B) = (1, 2) and about 300,000 with (3, 4) or (5, 4). Inversion-free
projective formulas, scheduled across several multipliers, are what make
those parameters pay off.

## How far this RTL matches the reference processor

Taken from the processor description:

* the block structure (recoding unit, program memory, controller, arithmetic
  units, points memory, and the multiplexers between them);
* the 32-bit data words and the 25-bit instructions;
* one adder/subtracter, one inverter and `N_M` Montgomery multipliers with
  `N_B` parallel words;
* the read/launch/wait/write/set instruction semantics and the OPMODE
  encoding;
* BIN/NAF/3NAF/4NAF recoding;
* the 256/128-bit sizes and the evaluated ranges of `N_M` and `N_B`.

This design's own choices:

* the instruction field layout and opcode numbers;
* the digit control-flow instructions;
* the unit interface;
* every cycle count;
* the memory sizes and port layout;
* the host interface;
* the inversion algorithm;
* the multiplier's word schedule.

Known departures:

* **Multiplier pipeline stages are this design's own.** The reference
  multiplier has three pipeline stages, but their split is not published.
  The split used here (issue, multiply, accumulate) is one plausible choice.
* **Timing is not comparable.** The reference design reports about 28 ms per
  256-bit `[k]P` at about 230 MHz for one multiplier with `N_B = 1`, roughly
  6.5 million cycles. Here, one 256-bit `[k]P` with the affine example
  program takes about 360,000 cycles. The difference comes from a different
  program (affine coordinates with one inversion per curve operation, where
  the reference uses inversion-free formulas costing about 7M+3S per doubling
  and 12M+2S per addition), a different multiplier, and full-width one-cycle
  adders that would not close timing at 230 MHz. No FPGA results (slices,
  frequency) are claimed for this RTL.
* **No HECC program.** The hardware runs at 128 bits with up to 30
  multipliers, but no genus-2 divisor addition or doubling program is
  included. The 128-bit tests run the ECC program.
* **GF(p) only.** GF(2^m) arithmetic is not built.
* **Program memory read is asynchronous.** It is not a block RAM. The points
  memory is block-RAM shaped (synchronous reads).

## Verification

Each testbench checks its results against values computed independently in
the testbench. Wide modular arithmetic uses the simulator's multi-word `*`
and `%`. Inverses come from Fermat's little theorem. The scalar-multiplication
reference is a plain binary double-and-add.

| testbench | what it checks |
|---|---|
| `tb_mont_mul` | 256-bit products for NB = 1 and 4, with the P-256 prime and random odd moduli, including edge operands. Checks `r*2^256 ≡ a*b` and `r < p`, and the exact latency |
| `tb_mod_addsub` | add and subtract at 256 bits, including edge values, and the one-cycle busy |
| `tb_mod_inv` | inverse against `a^(p-2)`, the zero input, and the cycle bound |
| `tb_recoding_unit` | all four methods: reconstruction of k, digit ranges, non-adjacency, no leading zero, and cycles = digits + 1 |
| `tb_ctrl` | controller against model units, memory and recoder: data movement, read/write cycle counts, wait stalls, OPMODE, and jump-table dispatch per digit |
| `tb_prog_mem`, `tb_points_mem`, `tb_fu_result_mux` | memory contents, dual-port reads, read-during-write, and the mux select |
| `tb_hecc_processor` | end to end at 128 bits with `N_M = 2`, `N_B = 2`: the two-multiplier expression program and six `[k]P` on random curves over GF(2^127-1). It counts stalls, multiplier overlap, additions, subtractions, inversions, recoding, positive/negative/zero digits, end of digits halt and the multiplier's pipeline stall, and fails any that never happens |
| `tb_hecc_configs` | five configurations side by side, each with one full-length `[k]P` checked against the reference: 256 bits with (N_M, N_B) = (1,2), (3,4), (5,4), and 128 bits with (6,2), (12,2) |
| `tb_hecc_full` | the default build (256 bits, one multiplier, `N_B = 1`, 4NAF): one full `[k]P` over the P-256 prime, about 360,000 cycles, under a second of simulation |

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/hecc_pkg.sv tb/tb_util_pkg.sv tb/tb_ecc_prog_pkg.sv tb/tb_hecc_full.sv \
  --top-module tb_hecc_full -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Unit testbenches
need only `rtl/hecc_pkg.sv`, `tb/tb_util_pkg.sv`, the unit's file and the
testbench. A lint run is
`verilator --lint-only -Wall -Irtl rtl/hecc_pkg.sv rtl/hecc_processor.sv`.

## Using it

1. Hold `rst_n` low, then release it.
2. With `running = 0`:
   * write the program (`prog_we/prog_addr/prog_wdata`);
   * write `p` (`p_we/p_idx/p_word`);
   * write the scalar (`k_we/k_idx/k_word`);
   * write the inputs in Montgomery form (`mem_we/mem_addr/mem_wdata`).
3. Pulse `start`.
4. Wait for `done`.
5. Read the results: put a word address on `mem_addr`; the data appears on
   `mem_rdata` one cycle later.

While a program runs, host writes are ignored.
