# PPR AES-128: a pipelined, partially rolled AES encryption core

A fully unrolled AES-128 pipeline uses 16 S-boxes in every one of its ten
rounds: 160 table S-boxes, 320 K-bit of block RAM on an FPGA. A rolled (iterative) core
uses 16 S-boxes once but runs at a tenth of the rate. This core sits between
the two. It keeps all ten rounds as separate pipeline stages, so a dozen or so blocks
are in flight. Inside each round, though, only 4 or 8 table S-boxes are built, and they are
reused over 4 or 2 clocks to substitute the 16 bytes of the state. This is
*pipelined partial rolling* (PPR). The round keys are computed alongside the data by
logic-only S-boxes, so the key may change with every block and no key memory is
needed.

| configuration | `NUM_SM` | clocks per block (`STEPS`) | table S-boxes | S-box ROM bits | latency (clocks) |
|---|---|---|---|---|---|
| AES-4SM (default) | 4 | 4 | 40 | 80 K-bit | 50 |
| AES-8SM | 8 | 2 | 80 | 160 K-bit | 30 |

One 128-bit block enters every `STEPS` clocks. The rolling clock therefore has
to run `STEPS` times faster than the block rate: 6.45 Gbit/s (4SM) or
12.8 Gbit/s (8SM) need about a 200 MHz clock. That is the rate a block RAM
read path typically allows on the FPGA families this architecture targets.

## The rolling part

SubBytes and ShiftRows are done together by the *rolling part*. It has three pieces:

* a **control part** (`rolling_ctrl`): a step counter 0..STEPS-1;
* a **byte picker** that hands one share of the bytes to the S-Modules in each step;
* **S-Modules** (`s_module`): each is an S-box ROM (`sbox_rom`, 256 x 8 bit)
  followed by a byte-wide shift register.

Bytes are numbered as in FIPS-197: X0..X15, column by column, so byte 4c+r is
row r, column c. X0 occupies bits 127:120 of every 128-bit vector.

**4SM** (`rolling_part_4sm`). A 16-byte cyclic shifter (`cyclic_shifter`)
outputs bytes X[K], X[K+4], X[K+8], X[K+12] (mod 16). The control part drives K
= {step, step}, i.e. 0, 5, 10, 15. With those values the four bytes are exactly
row 0, 1, 2, 3 of the ShiftRows result, so ShiftRows costs nothing beyond the shifter.
S-Module j substitutes the byte of column j and shifts it into a 32-bit
register. After four steps, S-Module j holds column j of
ShiftRows(SubBytes(state)).

Worked example, state `00 10 20 30 01 11 21 31 02 12 22 32 03 13 23 33`:

| step | K | shifter output | S-box outputs (stored at the end of the step) |
|---|---|---|---|
| 0 | 0  | 00 01 02 03 | 63 7c 77 7b |
| 1 | 5  | 11 12 13 10 | 82 c9 7d ca |
| 2 | 10 | 22 23 20 21 | 93 26 b7 fd |
| 3 | 15 | 33 30 31 32 | c3 04 c7 23 |

After step 3 the four registers read `63 82 93 c3 | 7c c9 26 04 | 77 7d b7 c7 | 7b ca fd 23`.
That is SubBytes+ShiftRows of the input.

**8SM** (`rolling_part_8sm`). A fixed permutation (`perm_selector`) reorders
the 16 bytes as

    X0 X10 X4 X14 X8 X2 X12 X6 | X5 X15 X9 X3 X13 X7 X1 X11

That is the ShiftRows result, with rows 0 and 2 of each column in the upper
half and rows 1 and 3 in the lower half. A selector passes the upper half in
step 0 and the lower half in step 1. Eight S-Modules with 16-bit registers
collect (row 0, row 1) and (row 2, row 3) of each column. Their concatenation
is again the state in FIPS-197 order.

The ROM read is asynchronous. The step counter changes on a clock edge, the
shifter output and the ROM data follow in the same clock, and the S-Module
register stores the data at the next edge. On an FPGA, two ROMs share one
dual-port 4 K-bit block RAM. The ROM contents are computed at elaboration from
the S-box definition: entry x = affine(x^-1). The inverse comes from the
powers of the generator 3 (the inverse of 3^i is 3^(255-i)), so no data file
is needed.

## A round and its timing

`round_unit` = rolling part -> 128-bit pipeline register -> MixColumns
(`mix_columns`, an XOR/xtime network) -> AddRoundKey (`add_round_key`).
Round 10 has no MixColumns (`FINAL=1`).

The S-Module registers hold the complete result for exactly one clock: the
clock after the last step, which is also step 0 of the next block. After that
they are overwritten byte by byte. So the pipeline register loads at the end of
that clock (`preg_load` = step 0). MixColumns and AddRoundKey are
combinational behind it, so the round output is stable for a full block period.
It feeds the next round, whose steps therefore run **one clock later**. Each
round's control part resets to a step one lower than the previous round's
(`aes_pkg::round_phase0`). 4SM example, clocks after reset:

    clock            0  1  2  3  4  5  6  7  8
    round 1 step     0  1  2  3  0  1  2  3  0     in_ready when step = 3
    round 2 step     3  0  1  2  3  0  1  2  3
    round 3 step     2  3  0  1  2  3  0  1  2

A round takes STEPS+1 clocks, over two register stages: the S-Module registers
and the pipeline register. With the input register (which also performs round
0's AddRoundKey, plaintext ^ key), the pipeline has 1 + 2x10 = 21 register
stages. The latency is 10x(STEPS+1) clocks: 50 for 4SM, 30 for 8SM.

## Online key expansion

`key_expansion` chains ten `round_key_circuit`s. Each one derives round key r
from round key r-1 with the AES-128 recurrence:

    w4 = w0 ^ SubWord(RotWord(w3)) ^ Rcon[r],  w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6

It uses four **combinational** S-boxes (`gf_sbox`) rather than ROMs, so the key
path needs no block RAM. `gf_sbox` works in the composite field GF((2^4)^2):

* map the byte with a linear isomorphism;
* invert it with GF(2^4) multiplications (the GF(2^4) inverse is a^14);
* map it back and apply the affine transform.

This design chooses GF(2^4) mod x^4+x+1, the extension y^2+y+{c}, and
the root beta = {21}. The module header lists the matrices.

The key must stay aligned with the data. Each round key circuit therefore has
the same two register stages as its round unit, loaded by the same strobes:

* register A loads on the round's last rolling step (`roll_last`);
* register B loads with the pipeline register (`preg_load`).

Round key r thus changes in the same clock as round r's pipeline register.
It is the key input of round r's AddRoundKey and of round key circuit r+1. A
valid flag travels through the same registers and produces `out_valid`.

## Interface (`aes_ppr_top`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | single clock for the whole core |
| `rst_n` | in | 1 | synchronous, active low; clears the valid flags and sets the step counters |
| `in_ready` | out | 1 | high for one clock in every STEPS clocks |
| `in_valid` | in | 1 | a block is taken at the end of a clock where `in_ready && in_valid` |
| `plaintext` | in | 128 | FIPS-197 byte order |
| `key` | in | 128 | cipher key; may differ for every block |
| `out_valid` | out | 1 | one-clock pulse, high in the clock after the 10x(STEPS+1)-th edge following the accepting edge |
| `ciphertext` | out | 128 | valid with `out_valid` and unchanged for STEPS clocks |

There is no back-pressure: the pipeline never stalls. A block slot where
`in_valid` is low becomes a bubble that produces no `out_valid`. Blocks come
out in order. Only 128-bit keys are supported.

## Files

`rtl/`: `aes_pkg` (types, xtime, S-box table, Rcon and phase functions),
`sbox_rom`, `s_module`, `rolling_ctrl`, `cyclic_shifter`, `perm_selector`,
`rolling_part_4sm`, `rolling_part_8sm`, `mix_columns`, `add_round_key`,
`round_unit`, `gf_sbox`, `round_key_circuit`, `key_expansion`, `aes_ppr_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`) and
`tb_aes_ppr_top_8sm` for the second configuration. There is also `aes_ref_pkg`,
an independent behavioural AES model. It finds the S-box inverse by exhaustive
search and evaluates the affine map bit by bit. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, for example the end-to-end test at the default configuration:

    verilator --binary --timing --assert -y rtl -y tb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
        tb/tb_aes_ppr_top.sv --top-module tb_aes_ppr_top
    ./obj_dir/Vtb_aes_ppr_top

Swap in any other `tb_*` name to test one block. The end-to-end tests run in
well under a second. They encrypt the FIPS-197 Appendix B and C.1 vectors and
then 118 random blocks, each with its own random key. The first half runs
back-to-back, the second half with random bubbles. They check:

* every ciphertext against the reference model;
* the exact latency;
* the `in_ready` period;
* that the output is held for STEPS clocks;
* that the pipeline fills (13 blocks in flight for 4SM).

To switch to AES-8SM, set `NUM_SM = 8` on `aes_ppr_top`.

Concurrent assertions in the RTL check the timing rules during any simulation:
`rolling_ctrl` checks that step 0 always follows the last step, and
`aes_ppr_top` checks that `in_ready` and `out_valid` are never high in two
clocks in a row. Run Verilator with `--assert` to enable them.

## How far to trust it, and where it is this design's own

Verified in simulation: functional correctness of both configurations,
including every round key, the worked 4SM example step by step, and the
latency and rate stated above. Not verified: clock frequency, FPGA resource use
and block-RAM mapping. The table ROM is written as a 256-entry array so that
synthesis keeps it as a memory.

Choices this design makes where the architecture leaves them open:

* **Single clock, one block per STEPS clocks.** The architecture states
  throughput as 128 bits per block-rate clock and a 4- or 2-step rolling part.
  Here one fast clock drives everything and the block rate is derived from it;
  there is no second, slower clock.
* **Round timing.** The pipeline register loads one clock after the last
  rolling step, and consecutive rounds are skewed by one clock (see above).
  Other arrangements are possible, such as double-buffered S-Module registers or a
  divided clock, but they change the register count.
* **Asynchronous ROM read.** A synchronous block RAM would add one clock per
  round unless its address register takes the place of the control part's
  output.
* **Interface.** `in_ready`/`in_valid`, `out_valid`, the valid flags in the
  key pipeline and the reset behaviour are this design's.
* **Composite field** of `gf_sbox` (polynomials and basis), and the
  xtime-based MixColumns network.
* **Not built:** AES-192/256 key schedules and decryption, which the
  architecture does not cover, and the unrolled reference designs it is
  compared against.
