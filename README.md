# Temporally staged cryptographic hardware: BLAKE2b and carry-save adders

Cryptographic algorithms are specified as sequential, imperative
pseudocode: a list of assignments to named variables. Hardware is a Mealy
machine: on every clock edge it reads an input, updates its registers and
drives an output. *Temporal staging* bridges the two by keeping the
imperative algorithm exactly as written, with its variables held in a
register file, and cutting the sequence of assignments into pieces. Each
piece becomes one clock-cycle transition of the machine. The values
computed are therefore those of the reference algorithm by construction.
Only *when* they are computed changes.

This repository holds four devices built this way:

| module            | what it is                                                              |
|-------------------|-------------------------------------------------------------------------|
| `blake2b_staged`  | BLAKE2b compression function F: 64-bit register file, three stages      |
| `csa`             | carry-save adder that takes a, b, c on three successive cycles           |
| `pcsa`            | the same adder, its reference register operations staged one per cycle  |
| `acsa`            | the staged adder driven by commands that load operands in any order     |

`temporal_staging_top` places all four side by side. They share only
clock and reset.

## The machine model and how to read the timing

Every device is a Mealy machine with **registered outputs**. On a rising
clock edge the device samples its input, does the work of the current
transition, and registers both the new state and the output. So
"the edge that takes X" and "the output after edge N" are the two
timing terms used below.

The output has two forms:

* **DC** ("don't care"): `out_val = 0`. The data outputs keep their last
  value and mean nothing.
* **Val**: `out_val = 1` for exactly one cycle, with the result on the data
  outputs.

A staged transition *ignores the input of the edges that follow it*. Once
a device has started a computation, anything driven on its input is
discarded until it returns to its start state. `busy` (or `ready`) says
which case applies.

Reset (`rst_n`, asynchronous, active low) puts every device in its start
state with the output at DC and every register at zero.

## BLAKE2b compression device (`blake2b_staged`)

### Register file

The device holds the register file of the imperative BLAKE2b reference.
All words are 64 bits:

* `v[0..15]`: the work vector
* `m[0..15]`: the 128-byte message block
* `h[0..7]`: the hash state

Each cycle the input carries a 3-bit command tag, a 2-bit group index and
four 64-bit words (`W64x4`). The output is eight 64-bit words (`W64x8`):
the hash state `h[0..7]` on Val.

### Commands (start state)

| `in_cmd`    | effect                                                                         |
|-------------|--------------------------------------------------------------------------------|
| `B2_NOP`    | nothing                                                                        |
| `B2_LOAD_M` | `m[4*idx .. 4*idx+3] := in_data[0..3]`                                         |
| `B2_LOAD_H` | `h[4*idx .. 4*idx+3] := in_data[0..3]`, `idx` in 0..1 (an assertion checks it) |
| `B2_GO`     | compress; `t = {in_data[1], in_data[0]}` (128 bits), `f = in_data[2][0]`       |

You can issue loads in any order, with idle cycles between them.

### The staged compression

With the default parameters, the compression function F is cut into
three transitions and followed by a Val transition:

| edge | transition       | work                                                                              |
|------|------------------|-----------------------------------------------------------------------------------|
| e    | GO taken, init   | `v[0..7] := h`, `v[8..15] := IV`, `v[12] ^= t[63:0]`, `v[13] ^= t[127:64]`, if `f`: `v[14] := ~v[14]` |
| e+1  | mixing           | all 12 rounds of 8 G calls, in one cycle                                           |
| e+2  | xor two halves   | `h[i] ^= v[i] ^ v[i+8]`                                                            |
| e+3  | Val              | `out_val = 1`, `out_h = h`                                                         |
| e+4  | start state      | this edge's command is taken                                                       |

A block therefore costs at least eight cycles: four `LOAD_M` commands,
then GO through Val.

The mixing stage is where the design's combinational depth lies. Twelve
rounds in one cycle means 96 G functions in series-parallel, each with six
64-bit adders. The parameter `ROUNDS_PER_STAGE` (default 12) lets the
stage repeat over several cycles instead:

* the mixing then takes `12 / ROUNDS_PER_STAGE` cycles;
* Val moves to edge `e + 2 + 12/ROUNDS_PER_STAGE`.

Only divisors of 12 are allowed; an assertion checks this at
elaboration. The computed values do not depend on the split; the
testbench checks both 12 and 3.

`blake2b_round` is one round: G on the four columns, then on the four
diagonals, with message words from the SIGMA schedule row
`round_idx mod 10`. `blake2b_g` is G itself:

```
a := a + b + x;  d := (d ^ a) >>> 32;  c := c + d;  b := (b ^ c) >>> 24
a := a + b + y;  d := (d ^ a) >>> 16;  c := c + d;  b := (b ^ c) >>> 63
```

### Hashing a message

The device computes F and nothing else. The host does the rest, as the
BLAKE2b specification (RFC 7693) describes:

1. Load `h` with `IV`, with `h[0] ^= 0x01010000 ^ (keylen << 8) ^ outlen`
   (`0x01010040` for an unkeyed 64-byte digest). Use two `LOAD_H` commands.
2. For each 128-byte block:
   * load the block as 16 little-endian words (four `LOAD_M` commands);
   * issue `GO` with `t` = the number of bytes hashed so far, including
     this block, and `f = 1` only for the last block, which is zero-padded.
3. The Val after the last GO is the digest: byte `j` is
   `out_h[j/8][8*(j%8) +: 8]`.

`h` persists from one GO to the next, so nothing needs reloading between
blocks. For example, the digest of `"abc"` starts `BA 80 A5 3F ...`, and
the testbench checks all 64 bytes.

## Carry-save adders

`purecsa` is combinational. It reduces three words to two with the same
sum modulo 2^W:

* `carry = ((a&b) | (a&c) | (b&c)) << 1`
* `sum = a ^ b ^ c`

Bit 0 of `carry` is therefore always zero; synthesis reports it as a
constant output of every adder.

The three machines (W = 8 by default) compute the same function with
different schedules:

* **`csa`**: four-edge loop.
  * a, b and c are taken on three successive edges; Val (from `purecsa`)
    follows the edge that takes c.
  * The fourth edge ignores its input and outputs DC.
  * `ready` marks the edge that takes a.
* **`pcsa`**: ten-edge loop. Each edge performs one operation of the
  reference register program, on registers RA, RB, RC, A_and_B, A_and_C
  and B_and_C:

  ```
  k: RA:=a   k+1: RB:=b   k+2: RC:=c   k+3: A_and_B   k+4: A_and_C
  k+5: B_and_C   k+6: tmp1 := (A_and_B|A_and_C|B_and_C)<<1
  k+7: tmp2 := RA^RB^RC   k+8: Val   k+9: DC   (next a at k+10)
  ```

  `tmp1` and `tmp2` are extra registers that carry values between stages.
* **`acsa`**: driven by commands (`csa_pkg::acsa_cmd_e`):
  * `CMD_A`, `CMD_B` and `CMD_C` load RA, RB and RC in any order; `CMD_NOP`
    idles.
  * `CMD_GO` runs the last five operations of the `pcsa` schedule: edges
    e..e+4, with Val after edge e+5.
  * The next command is taken at edge e+6. Operands stay loaded, so Go may
    be repeated after changing only one of them.
  * `busy` marks the edges whose input is ignored.

## Choices this design makes, and where it departs from the specification

* **Command interface of the BLAKE2b device.** It is this design's own:
  the tags, the group index, `t` and `f` carried on GO, and `LOAD_H`.
  The source specifies only:
  * the input type (four 64-bit words);
  * the output type (eight 64-bit words);
  * the asynchronous load-then-go style of `acsa`.
* **Stage contents.** The contents of "init local work vector" and
  "cryptographic mixing" are the standard BLAKE2b ones (RFC 7693). The
  same goes for IV, SIGMA and the rotation amounts 32/24/16/63.
* **Finalisation flag.** One printed form of the staged algorithm applies
  the flag as `v[14] := v[13] ^ ~0`. This design follows the BLAKE2b
  definition, `v[14] := ~v[14]`, which the `"abc"` test vector confirms.
* **Carry-save carry.** Some printed forms of the adder read
  `anb | anb | bnc << 1`. This design uses the carry-save definition,
  `(anb | anc | bnc) << 1`, with the shift applied to the whole OR.
* **`pcsa` loop length.** Its operation list and state diagram give a
  ten-cycle loop, with Val on the ninth edge. A prose description counts
  eleven cycles; this design follows the ten-cycle schedule.
* **Shared conventions.** These are this design's own:
  * reset behaviour;
  * the DC/Val encoding;
  * registered outputs;
  * command tag values (for `acsa`, the constructor order A, B, C, Nop, Go);
  * the `busy`/`ready` outputs.
* **Padding and the parameter block.** These are left to the host.
* **Not included.** The system around the BLAKE2b device (the chip it is
  part of, the host that pads messages) is not described and not part of
  this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_blake2b_g`, `tb_blake2b_round`: random vectors compared with
  `blake2b_ref_pkg`. This is a separate behavioural BLAKE2b model with its
  own constant tables.
* `tb_blake2b_staged`: tests the default device and a `ROUNDS_PER_STAGE=3`
  device.
  * Hashes messages of 0, 3 ("abc"), 128, 129 and 300 bytes, loading them
    in shuffled order with idle gaps.
  * Drives random commands while the device is busy.
  * Checks every compression and the exact Val edge.
  * Checks the full published BLAKE2b-512("abc") digest.
* `tb_purecsa`: checks 2^20 operand triples against a bit-by-bit
  definition and `carry + sum == a + b + c`.
* `tb_csa`, `tb_pcsa`, `tb_acsa`: check random operands, the exact Val
  edge, DC on every other cycle, and that ignored inputs are ignored.
* `tb_temporal_staging_top`: runs all four devices at once at default size
  (a few thousand cycles).
  * Counts each mechanism: loads, GO on final and non-final blocks, inputs
    ignored while busy, Val, out-of-order operands, Nop, Go with kept
    operands.
  * Fails if any mechanism never happens.

Run any testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/blake2b_pkg.sv rtl/csa_pkg.sv tb/blake2b_ref_pkg.sv \
  tb/tb_temporal_staging_top.sv --top-module tb_temporal_staging_top
./obj_dir/Vtb_temporal_staging_top
```

Replace the testbench name to run another; the package files can always
be listed.

## Size

The figures come from yosys coarse synthesis (word-level cells, where one
adder counts as one cell):

* `blake2b_staged`: about 3,700 cells and 3,080 flip-flops. Of the
  flip-flops, 1,024 are `v`, 1,024 `m`, 512 `h` and 512 the output
  register.
* The three adders: a few dozen cells each.

## Files

* `rtl/blake2b_pkg.sv`: IV, SIGMA and the BLAKE2b command type
* `rtl/blake2b_g.sv`, `rtl/blake2b_round.sv`, `rtl/blake2b_staged.sv`
* `rtl/csa_pkg.sv`: the `acsa` command type
* `rtl/purecsa.sv`, `rtl/csa.sv`, `rtl/pcsa.sv`, `rtl/acsa.sv`
* `rtl/temporal_staging_top.sv`
* `tb/blake2b_ref_pkg.sv`: behavioural reference model
* `tb/tb_*.sv`: testbenches
