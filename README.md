# RSA and IDEA on one 96-bit ALU

This is a single-chip encryption engine for the usual hybrid scheme: RSA
exchanges the keys, and the block cipher IDEA encrypts the data. Each
cipher normally needs its own arithmetic hardware. Here one 96-bit ALU does
both jobs:

* RSA needs modular products of 768-bit numbers. The ALU acts as a 96 x 8-bit
  multiplier-adder and works through a 768-bit number one 96-bit field per
  clock.
* IDEA needs 16-bit multiplications modulo 2^16+1. The same ALU splits into
  two 16 x 16 multipliers. In the next cycle it does the modular reduction
  of both products.

The RTL follows the architecture of the published design "A VLSI
implementation of RSA and IDEA encryption engine" (a 1.0 µm CMOS chip,
25 MHz). That design runs its algorithms from microcode held in an external
ROM. The microcode format was never published, so this implementation
replaces the microcode with hardwired sequencers. Everything else about them
keeps to the published description: the modular-multiply algorithm, the
IDEA schedule and the cycle counts.

| operation | cycles | at 25 MHz |
|---|---|---|
| 768 x 768-bit modular multiply | 2985 (2944 of digit work + 41 of setup) | 8375 per second |
| IDEA transform of a 64-bit block | 50 | 500 000 blocks/s, 32 Mbit/s |

## Block map

```
            host command pins
                   |
        high_level_commands ---------------------------+
          |            |                  |            |
     (single cmd)  modmul_ctrl ----+   idea_core    self_test (hashes every
          |         |        |     |      |          state machine; prng)
          +--> alu_sequencer  index_calc  |
                    |        |     |      |
            +-------+--------+-- er_unit  |
            |       |              |      |
          ram8   ram128 ---------->+      |
            |       |                     |
            +---> alu (4 x alu24) <-------+
```

The host can also reach `alu_sequencer`, `index_calc` and `er_unit`
directly, one command at a time, when no multiply is running.

| file | block |
|---|---|
| `rtl/rsaidea_pkg.sv` | sizes, ALU request/response structs, command enums |
| `rtl/alu24.sv`, `rtl/alu.sv` | 24-bit slice, 96-bit ALU in three configurations |
| `rtl/ram8.sv`, `rtl/ram128.sv` | 8x96 accumulator register, 128x96 register file |
| `rtl/er_unit.sv` | 24-bit register ER and its digit multiplexers |
| `rtl/index_calc.sv` | four 8-bit index registers |
| `rtl/alu_sequencer.sv` | whole-register arithmetic, one field per cycle |
| `rtl/modmul_ctrl.sv` | modular multiplication program |
| `rtl/idea_core.sv` | IDEA round schedule |
| `rtl/high_level_commands.sv` | external command decoder |
| `rtl/self_test.sv`, `rtl/sig_analyser8.sv`, `rtl/sig_analyser32.sv` | state hashing |
| `rtl/prng.sv` | test random generator |
| `rtl/rsa_idea_top.sv` | the engine |

## Data registers

A data register is 768 bits wide and is stored as eight 96-bit fields, with
the least significant field first.

* **RAM8** (8 x 96) holds one register. It is the accumulator `P` of every
  long operation.
* **RAM128** (128 x 96) holds sixteen registers. Register `r`, field `f`, is
  at address `{r, f}`. The IDEA subkeys also live in RAM128.

Both RAMs have an asynchronous read port and a synchronous write port. A
field can therefore be read, passed through the ALU and written back in one
cycle.

A long result can grow beyond 768 bits. For example, `64*P + d*B` is up to
775 bits, and a subtraction can go negative. To hold this, the accumulator
has an 8-bit **extension** `ext`. It is kept in two's complement beside the
ALU carry, and it is visible on the top-level port `ext`.

Operations can also run on shorter numbers. With `nfields` set from 1 to 8, a
command touches only the low `nfields` fields of each register. The
extension then sits directly above field `nfields-1`.

## The ALU: four slices, three configurations

Each slice `alu24` computes the following in one cycle:

```
{cout[8:0], out[23:0]} = (negx ? ~x : x) * e[7:0] + y + z + cin[7:0]
```

Two things make this possible: the 24 x 8 product and the three addends are
summed as one carry-save tree, and the width of the slice fits the product.
The slices are called alu24.1 to alu24.4. `alu.sv` wires them in one of
three ways, chosen by `req.mode`:

**`ALU_MOD`, long-number mode.** The slices form a chain: alu24.1 holds bits
23:0, then alu24.2, alu24.3, and alu24.4 holds bits 95:72. Each slice's
8-bit carry feeds the next.

```
{cout[7:0], out[95:0]} = (negx ? ~x : x) * e + y + cin
```

This never overflows: (2^96-1)(2^8-1) + (2^96-1) + 255 = 2^104-1. The
sequencer keeps `cout` and passes it in as `cin` of the next field, so a
96 x 8 multiply-add runs across any number of fields. The same form gives
the other long operations:

* addition: `e = 1`
* subtraction of `e * x`: `negx = 1`, with `e` as the first carry. This
  works because `-x = ~x + 1`.
* negation: `negx = 1` with `y = 0`

**`ALU_IDEA_MUL`, two 16 x 16 multipliers.**

* alu24.1 forms `ma[7:0] * mb`.
* alu24.3 adds `ma[15:8] * mb` to the upper 16 bits of that result. This
  gives `ma*mb = {alu24.3, alu24.1[7:0]}`.
* alu24.2 and alu24.4 do the same for `md*mc`.

**`ALU_IDEA_RED`, low-high reduction.** This step relies on the identity
`ab mod (2^16+1) = lo - hi`, where `lo` and `hi` are the two halves of the
32-bit product. If `lo - hi` is negative, add 2^16+1 (called F4). Each
slice forms one candidate in 24-bit two's complement:

| slice | candidate |
|---|---|
| alu24.1 | `lo1 - hi1` |
| alu24.3 | `lo1 - hi1 + F4` |
| alu24.2 | `lo2 - hi2 + add2` |
| alu24.4 | `lo2 - hi2 + add2 + F4` |

The sign of the first candidate of each pair picks the result. With `add2`,
the IDEA addition that follows a multiplication happens in the same cycle
as the reduction. The `+F4` needs no extra adder: it is `z = 0x10000`
together with one extra unit of carry-in.

## Long-number commands (`alu_sequencer`)

`P` is RAM8 with its extension. `R` is RAM128 register `rsel`. Each command
takes `nfields` cycles, except `SQ_TOPCMP`, which takes one. A new command
can start in the last cycle of the previous one (`ready`), so commands run
back to back with no gap.

| command | effect |
|---|---|
| `SQ_CLR8` | `P := 0` |
| `SQ_LOAD8` / `SQ_STORE8` | `P := R` / `R := P` |
| `SQ_ADD` / `SQ_SUB` | `P := P ± R` |
| `SQ_NEG` | `R := -R` |
| `SQ_MULACC` | `P := 64*P + e*R` |
| `SQ_REDUCE` | `P := P - e*R` |
| `SQ_CMP` | flag `P - e*R < 0`; nothing is written |
| `SQ_TOPCMP` | one-cycle estimate of the same flag |

In `SQ_MULACC`, the shift by 64 is not a separate pass. The top 6 bits of
each field are held for one cycle and enter the next field at the bottom.

## Modular multiplication (`modmul_ctrl`)

`RAM8 := A * B mod C`. The operands must satisfy `B < C`. The multiplier
`A` is read from the top, one 6-bit digit at a time:

```
P := 0; S := index of the top 24-bit part of A
repeat
    ER := A[S]; S := S - 1                      1 cycle
    4 times:
        P := 64*P + ER[23:18] * B               nfields cycles
        ER := ER << 6
        m := largest 7-bit m with m*C <= P      7 cycles (binary search)
        P := P - m*C                            nfields cycles
until S counted past zero (index bit 7 set)
```

Before each digit, `P < C`. So `64*P + digit*B < 127*C`, and `m` always
fits in 7 bits. After the reduction, `P < C` again. Any value can be
reduced first with the same command, since `A mod C = A * 1 mod C`.

**The binary search** tries the bits of `m` from bit 6 down. Each trial
`m*C <= P` is decided in one cycle from the top field alone. Call the top
fields `TP` (104 bits, including the extension) and `TC` (96 bits), and let
`v = TP - m*TC`. The lower fields add less than `m < 128` units of the top
field, which gives three cases:

* `v < 0`: `m*C > P` for certain.
* `v >= 128`: `m*C <= P` for certain.
* `0 <= v < 128`: the numbers are "almost equal". Only then does the
  controller run a full `SQ_CMP` of `nfields` cycles.

For random operands the full compare is needed with probability about
2^7 / 2^96 = 2^-89, so it does not count in the timing. If the modulus has a
very small top field, it happens often; the result is still exact, only
slower. The testbenches use such moduli on purpose to exercise this path.

**Time**, from the start cycle to the `done` pulse:

```
nfields + 1 + len_chunks * (4 * (2*nfields + 7) + 1) + nfields * (full compares)
```

At full size (`nfields = 8`, `len_chunks = 32`), this is 2985 cycles: 2944
for the 128 digits of 23 cycles each, plus 41 for clearing `P`, loading ER
and finishing.

ER is the 24-bit register of `er_unit`, which loads one 24-bit part of a
RAM word. `S` is index register 0 of `index_calc`. An index register points
at a field (bits 6..4), a 24-bit part (bits 3..2) and a 6-bit digit
(bits 1..0).

## IDEA on the shared ALU (`idea_core`)

Every IDEA multiplication takes two cycles: MUL, then RED. A round has
three dependent multiplication steps, so it takes 6 cycles:

| step | mode | work |
|---|---|---|
| 0 | MUL | `X1*K1`, `X4*K4` |
| 1 | RED | `Y1`, `Y4` from the products; `Y2 = X2+K2`, `Y3 = X3+K3` (16-bit adders) |
| 2 | MUL | `(Y1^Y3)*K5` on both multipliers |
| 3 | RED | `M3 = (Y1^Y3)⊙K5`; in parallel `A3 = M3 + (Y2^Y4)` |
| 4 | MUL | `A3*K6` on both multipliers |
| 5 | RED | `M4 = A3⊙K6`; in parallel `M3 + M4` |

Here `⊙` is multiplication modulo 2^16+1. The new state is
`(Y1^M4, Y3^M4, Y2^(M3+M4), Y4^(M3+M4))`.

After 8 rounds, one more MUL/RED pair does the output transform:
`(X1⊙K49, X3+K50, X2+K51, X4⊙K52)`. The total is 8*6 + 2 = 50 cycles.

The word 0 stands for 2^16. When an operand is 0, the product is replaced
before reduction by `lo = 0, hi = other operand`, or by `hi = 2^16` if both
operands are 0.

**Subkeys** are read from RAM128 starting at `key_base`. Each round uses one
word:

* word `key_base + r` = `{K1, K2, K3, K4, K5, K6}` of round `r` (K1 in
  bits 95:80)
* word `key_base + 8` = `{K49, K50, K51, K52, 32'h0}`

The direction of the transform depends only on which subkey set
`key_base` points at. The host computes the key schedule and the inverse
(decryption) keys and writes them to RAM128. The testbench package
`tb/idea_ref_pkg.sv` shows both computations.

## Self-test (`self_test`) and PRNG

Each cycle a command runs, the state codes of the four state machines are
hashed in parallel into four 8-bit signature analysers. The four machines
are the command decoder, the ALU sequencer, the modular multiply and IDEA.

Every 255 hashed states, the four bytes are shifted as one 32-bit word
into a 32-bit analyser. That signature can be read with `HC_SIGRD`, and
only when `test_mode` is high; otherwise it reads as zero. Running a known
program from reset gives a known signature. The signature therefore checks
both the result and the path of states that produced it.

The analysers are multiple-input LFSRs:

* 8-bit: x^8+x^4+x^3+x^2+1
* 32-bit: the CRC-32 polynomial

`prng` is a 96-bit LFSR (taps 96, 94, 49, 47), advanced 96 steps per word.
It is meant for tests only, not for real keys.

## Using the engine (`rsa_idea_top`)

**Protocol.** Put a command code on `cmd` and assert `cmd_valid` while
`cmd_ready` is high. Hold the operands until `cmd_done` pulses. Results
appear on `rdata`. Reset is synchronous and active low.

| code | command | operands | result |
|---|---|---|---|
| 1 | `HC_WR128` | `addr`, `wdata` | RAM128 word written |
| 2 | `HC_RD128` | `addr` | `rdata` |
| 3 / 4 | `HC_WR8` / `HC_RD8` | `addr[2:0]`, `wdata` | RAM8 field |
| 5 | `HC_SEQ` | `seq_op`, `reg_b`, `seq_e`, `nfields`; `reg_a[3]`, `reg_a[2]` | one long-number command |
| 6 | `HC_MODMUL` | `reg_a`, `reg_b`, `reg_c`, `len_chunks`, `nfields` | RAM8 = A*B mod C |
| 7 | `HC_IDEA` | `wdata[63:0]`, `addr` = key base | `rdata[63:0]` |
| 8 | `HC_RAND` | `addr` | RAM128 word := PRNG |
| 9 | `HC_SIGRD` | `test_mode` = 1 | `rdata[31:0]` = signature |
| 10 | `HC_IX` | `seq_op[2:0]` = op, `reg_a` = destination, `reg_c` = source kind, `reg_b` = source register, `seq_e` = immediate | one index register command |
| 11 | `HC_ER` | `seq_op[1:0]` = `ER_LOAD`/`ER_SHL6`/`ER_SHR1`; for a load, `reg_b` = register and `reg_a` = index register | one ER command |
| 12 | `HC_STAT` | `seq_e[0]` = 8-bit digit | `rdata` = status word, see below |

The status word is laid out as follows:

* bits 31:0: the four index registers
* bits 55:32: ER
* bits 63:56: digit `j` of index register 0
* bits 71:64: the extension
* bit 72: the compare flag, the sign of the last host `SQ_CMP`

In `HC_SEQ`, setting `reg_a[3]` takes the multiplier `e` from the ER digit
multiplexer instead of `seq_e`. The digit is digit `j` of index register 0,
8 bits wide if `reg_a[2]` is set, otherwise 6. This is the datapath's
general multiplier path. The modular multiply uses the same multiplexer with
`j = 3`, the top 6 bits of ER.

An `ER_LOAD` reads register `reg_b`. The index register gives the field in
bits 6..4 and the 24-bit part in bits 3..2.

The microcode of the original has two kinds of command: index commands,
which include loading and shifting ER, and arithmetic commands. `HC_IX` and
`HC_ER` give the host the first kind, one at a time, and `HC_SEQ` the
second. With them a host can run programs that need bit-level control
of long numbers. The bit-serial part of division is an example: shift ER
right, test a bit, compare, subtract.

Latency is counted from the clock edge that accepts the command to the
first cycle with `cmd_done` high:

* memory, index, ER and status commands: 1 cycle
* `HC_SEQ`: `nfields + 1`
* `HC_IDEA`: 52 (50 of them are the transform)
* `HC_MODMUL`: the multiply time given above, plus 1

**RSA.** An exponentiation is a host loop over this command set. For
`X := M^65537 mod N`, with `M` in register 1 and `N` in register 3:

1. Write `M` to register 4.
2. Sixteen times: `HC_MODMUL(4, 4, 3)` followed by `HC_SEQ(SQ_STORE8, 4)`.
3. Once: `HC_MODMUL(4, 1, 3)` followed by `HC_SEQ(SQ_STORE8, 4)`.

This is 17 multiplications of about 3000 cycles each. The end-to-end
testbench runs exactly this sequence.

## Where this implementation departs from the published design

* **No microcode.** The published chip has a command fetcher, an external
  code ROM and a jump table that maps the 32 external commands to microcode
  programs. Here each external command starts a hardwired sequencer.
  `index_calc` and `er_unit` exist as in the original. The modular multiply
  drives them, and the host can also issue their commands one at a time
  (`HC_IX`, `HC_ER`). Exponentiation is a host loop of `HC_MODMUL`.
  Key generation, key inversion and division were microcode programs in the
  original. Their code was never published, so they are not provided here.
  A host can build them from the single commands, but far more slowly,
  because every step is a pin transaction.
* **Accumulator.** The published steps disagree on whether RAM8 first
  receives the operand B or accumulates the product. Here RAM8 is the
  accumulator and is cleared first; B and C stay in RAM128.
* **Subtraction.** `m*C` is subtracted with the negator (`P + m*~C + m`).
  The modulus is not negated in memory first. The published step `C := -C`
  is still available as `SQ_NEG`.
* **IDEA step 5.** The published schedule table shows subkey K5 in the
  second MA multiplication. IDEA uses K6 there, and so does this RTL.
* **"Almost equal" made precise.** The condition `0 <= v < 128` is this
  implementation's own definition. It is what makes the one-cycle search
  exact, and it matches the published 2^-89 probability.
* **Our own choices.** The following are not specified by the original and
  were chosen here:
  * the host pin protocol and the command codes
  * the subkey word layout
  * the extension register
  * which state bits are hashed, and the analyser polynomials
  * the PRNG type
  * all reset values
* **Left out.** Physical and process details are not modelled: the pads,
  the 1.0 µm layout, and the datapath tile generation.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. They run with plain Verilator 5. List the
package first, including `tb/idea_ref_pkg.sv` where a testbench uses it:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rsaidea_pkg.sv tb/idea_ref_pkg.sv tb/tb_rsa_idea_top.sv \
    --top-module tb_rsa_idea_top -o sim
./obj_dir/sim
```

| testbench | what it establishes |
|---|---|
| `tb_alu24`, `tb_alu` | slice and ALU arithmetic in all modes, including that the low-high reduction equals `a*b mod 65537` |
| `tb_alu_sequencer` | every command against wide-integer arithmetic for 1 to 8 fields, with cycle counts; the top-field estimate hits all three outcomes and always agrees with the exact compare |
| `tb_modmul_ctrl` | random 96- to 768-bit modular products; operand edge values; moduli that force full compares; the exact cycle formula |
| `tb_idea_core` | the published IDEA test vector (key 0001…0008, plaintext 0000 0001 0002 0003, ciphertext 11FB ED2B 0198 6DE5); random keys, zero words, decryption; 50 cycles |
| `tb_rsa_idea_top` | the whole engine at full size through its pins: long commands, `A mod C`, 768-bit products in 2985 cycles, RSA with e = 65537, IDEA interleaved with RSA work, PRNG, signature reproducible from reset, host index/ER commands against a model, a bit-count program using ER right shifts, and multiplies by the ER digit. Each mechanism is counted and must occur at least once. It takes about 15 s. |
| others | RAMs, ER, index registers, analysers, PRNG and command decoder against independent models |

The reference values are computed independently of the RTL. They come from
Verilator's wide-integer `*` and `%` for RSA, and from a textbook IDEA
model for the cipher.
