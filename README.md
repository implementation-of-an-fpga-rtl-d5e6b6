# Cipher accelerators for an FPGA card in a memory slot

IPSec VPN gateways spend most of their time encrypting packets, and on an
ordinary PC the software cipher library caps throughput well below the
network's line rate. This RTL offloads the cipher work to an FPGA card
that plugs into a PC's SDRAM DIMM slot. The memory slot moves 64-bit words
much faster than the PCI bus. The host writes a buffer of 64-bit blocks
into the card, starts it, polls a control register, and reads the
encrypted blocks back.

Four accelerators are provided. On the card, each one is a separate FPGA
configuration that uses the whole address window:

| prefix in the top | accelerator | cipher core | buffer |
|---|---|---|---|
| `tdes_` | Triple-DES, CBC mode (the one used by the VPN) | three combinational DES cores, E-D-E | 248 blocks |
| `des_`  | DES, CBC mode | one combinational DES core | 248 blocks |
| `ecb_`  | DES, ECB mode | 16-stage pipelined DES core | 32 blocks |
| `idea_` | IDEA, ECB mode | one 21-stage round pipeline used nine times | 175 blocks |

The top module, `vpn_accel_top`, places the four side by side. They share
a clock and reset, and each has its own host bus.

## The host window and the protocol

The card appears to the host as 256 words of 64 bits, with an 8-bit word
address. Every accelerator has the same bus:

- `host_we` with `host_addr` and `host_wdata` writes a word.
- `host_re` with `host_addr` reads a word. The data appear on `host_rdata`
  on the next clock.

| word address | write | read |
|---|---|---|
| 0 .. N-1 | input block RAM, block *i* | output block RAM, block *i* |
| 248 `CTRL` | 0: reset the controller and clear done. Bit 0 = 1: start. Bit 1: decrypt. | bit 0 = done |
| 249..251 `KEY1..KEY3` | raw 64-bit DES keys, parity bits included (KEY1 only for single DES) | the key, read back |
| 252 `IV` | CBC initial chaining value | the IV, read back |

A call from the host goes like this:

1. Write the keys and the IV.
2. Write 0 to `CTRL`.
3. Write the blocks.
4. Write 1 to `CTRL`, or 3 to decrypt.
5. Poll `CTRL` until bit 0 reads 1.
6. Read the results from the same addresses.

A message longer than the buffer is split by the host into several calls.
For CBC, each later call carries the last ciphertext block of the previous
call as its IV.

The DES ECB accelerator differs in one way: the host writes 1 to `CTRL`
right after the first block and then writes the rest. The pipeline
therefore starts while the transfer is still going on.

The IDEA accelerator has no key registers. Its key schedule is fixed when
the design is built, through the `KEY` parameter (default
`0001 0002 ... 0008`, in 16-bit words).

Only 248 words can hold data because the top eight addresses are reserved
for registers. The placement of the registers inside that range, the
decrypt bit, and the IV register are this design's choices.

## Clocking

The bus runs at the system clock, 100 MHz on the card. The DES cores are
too slow for that, so the DES accelerators run their cipher side at half
rate. `clk_div2_en` produces a clock enable that is high on every second
clock. A divided clock is not used. The block RAMs (`dp_ram`, synchronous
read, one clock of latency) have one port on the bus side and one on the
cipher side. The IDEA core runs at the full bus clock.

## DES building blocks

`des_pkg` holds the FIPS 46 tables:

- the initial permutation and its inverse;
- E, P, PC-1, PC-2 and the rotation counts;
- the eight S-boxes.

It also holds the functions built on them. `des_key_schedule` turns a raw
key into K1..K16. It is pure wiring: only permutations and fixed rotations,
no gates. `des_round` computes one Feistel round:
L' = R, R' = L xor P(S(E(R) xor K)).

`des_comb` chains sixteen rounds between IP and IP^-1, undoes the last
swap, and for decryption feeds the subkeys in reverse order. `tdes_comb`
chains three of these:

- encryption: E(K1), then D(K2), then E(K3);
- decryption: D(K3), then E(K2), then D(K1).

With K1 = K2 it reduces to single DES under K3.

## The CBC controller (`cbc_ctrl`, `cbc_accel`)

In CBC mode each block depends on the previous ciphertext, so a pipeline
cannot help. The core is therefore fully combinational. A small state
machine walks the buffer and gives the core a fixed number of half-rate
cycles to settle:

- `S_FETCH` reads block 0 and forms the first core input.
- `S_RUN` waits `WAIT_CYCLES` per block. On the last count it:
  - writes the core output to the output RAM;
  - updates the chaining register;
  - loads the next block's core input (the next block's RAM read has
    already happened).
- `S_DONE` holds done until `CTRL` is written again.

The same xor and chaining register serve both directions:

| | core input | output | next chaining value |
|---|---|---|---|
| encrypt | P_j xor C_{j-1} | C_j = E(core input) | C_j (the core output) |
| decrypt | C_j | P_j = D(C_j) xor C_{j-1} | C_j (the consumed input) |

Wait times and throughput:

- Triple-DES: `WAIT_CYCLES` = 32. One block takes 32 cycles at 50 MHz, or
  64 bus clocks, which is 100 Mb/s. A 248-block call takes 1 + 248·32
  half-rate cycles.
  The published measurements of the original hardware (about 120 Mb/s with
  host overhead, a core speed of 2.135 MHz) point to a shorter settle time
  of about 24 cycles. `WAIT_CYCLES` = 24 gives that speed if the core meets
  it.
- Single DES: the default wait is 9 cycles, about 355 Mb/s. The wait is a
  parameter. Timing closure of a real device decides the smallest safe
  value for either core; in Triple-DES the settling path runs through all
  three DES cores.

A call always processes all `N_BLOCKS` buffer words; there is no
block-count register. A short message therefore costs a full buffer pass,
about 159 µs for Triple-DES. Throughput measured on the bus (transfers
included, 100 MHz bus) rises with message size:

| message | calls | throughput |
|---|---|---|
| 8 B | 1 | 0.4 Mb/s |
| 1 KB | 1 | 50 Mb/s |
| 4 KB | 3 | 66 Mb/s |
| 10 KB | 6 | 82 Mb/s |

`cbc_accel` (`TRIPLE` = 1 or 0) contains the key and IV registers, the two
block RAMs, the controller and the core.

## The pipelined DES ECB accelerator (`des_pipe`, `des_ecb_accel`)

`des_pipe` places a register after each of the sixteen rounds. Each word
carries a valid bit and a 5-bit tag, its buffer address, so a result goes
back to the address it came from. IP and IP^-1 are wiring outside the
registers. Writing 0 to `CTRL` flushes the valid bits.

Because the core may start before the host has finished writing, the
accelerator keeps one "written" flag per address. The feeder issues block
*i* only once it has been written, and it stalls otherwise. With all
blocks present, done rises N + 17 half-rate cycles after start: one cycle
of RAM read and sixteen stages.

## The IDEA round pipeline (`idea_mulmod`, `idea_key_rom`, `idea_core`)

This is the most involved part.

**Multiplication modulo 2^16 + 1.** In IDEA the operand 0 stands for
2^16. `idea_mulmod` takes the data operand *x* and the subkey already
decremented by one, *yd* = *y* − 1. Multiplier subkeys are stored
pre-decremented, so the key side needs no subtraction.

- It forms *xd* = *x* − 1 and the full product
  *t* = *xd*·*yd* + *xd* + *yd* + 1, taken modulo 2^32. The one overflow
  case, 2^16·2^16, wraps to 0.
- With *tl* and *th* the low and high halves of *t*, the result is
  *tl* − *th*, plus one when *tl* ≤ *th*.

No division and no special case for zero is needed. The operator has seven
pipeline stages:

1. the input decrement;
2. four stages for the 16×16 product (the latency of the original's vendor
   multiplier core; synthesis can retime them into the multiplier);
3. the sum *t*;
4. the final correction.

**One round, 21 cycles deep.** An IDEA round holds three multipliers in
series, so one round is 3 × 7 = 21 cycles:

| cycles | operation |
|---|---|
| 0–7 | X1·Z1, X2+Z2, X3+Z3, X4·Z4. The adders are followed by 7-cycle delays to keep the lanes aligned. |
| 7–14 | P = (A1 xor A3)·Z5. A2 xor A4 is delayed 7 cycles alongside it. |
| 14–21 | Q = (P + (A2 xor A4))·Z6 and R = P + Q. The four outputs are A1 xor Q, A3 xor Q, A2 xor R, A4 xor R. The A values reach this point through 14-cycle delays. |

**Reuse.** Only one round is built. A batch of up to 21 blocks is taken on
21 consecutive clocks. Round *r*'s outputs go straight back into the
round's input, a combinational feedback path with no extra register, for
eight passes.

The ninth pass is the output transformation: multiply by Z1 and Z4, add Z2
and Z3. It is exactly the first 7-cycle stage. The result is therefore
taken at the tap after stage A, the half-round output, with the two middle
lanes exchanged back.

Each word in the pipeline carries a valid bit and its pass number. The
pass number selects that word's subkeys from `idea_key_rom` at every
multiplier and adder, so blocks on different passes can share the
pipeline.

**Timing.**

- Latency is 21·8 + 7 = 175 clocks.
- A new batch can start every 21·9 = 189 clocks.
- Throughput is (21/189)·64·f bit/s.
- A partial batch, such as the last 7 of 175 blocks, runs with empty
  slots.

**Key schedule ROM.** `idea_key_rom` computes both the encryption and the
decryption schedule from `KEY` at elaboration. Decryption uses the
multiplicative inverses of Z1, Z4, Z5 and Z6 and the additive inverses of
Z2 and Z3, in reversed round order. The multiplier keys are stored
decremented by one.

`idea_ecb_accel` streams the input buffer into the core whenever it
accepts blocks. It writes results in arrival order, which is the input
order. Done rises after the last block.

## Where this RTL departs from, or adds to, the original design

- Raw DES keys are expanded on chip. The S-boxes and other DES tables are
  the FIPS 46 ones, written as lookups. Vendor ROM primitives, shift-register
  delay primitives, the vendor multiplier core and block RAM primitives are
  not used. Plain arrays and always_ff delays stand in for them.
- The published Triple-DES figures disagree: 32 cycles per block at 50 MHz
  against a core speed of 2.135 MHz, about 23 cycles. The 32-cycle figure
  is used.
- The single-DES CBC wait time (9 cycles) is estimated, not given.
- The decrypt control bit, the IV register, the register addresses, the
  host bus handshake, the per-address "written" flags of the ECB
  accelerator and the IDEA batch control are this design's own.
- The DIMM-side SDRAM controller, the DLL clock generator, the
  configuration PROM and the host driver are not part of the RTL. The
  `*_host_*` ports are where the SDRAM controller would connect.

## Simulating

Every testbench is self-checking. It prints a
`TB_RESULT checks=<n> failures=<n>` line and has a watchdog. Build one with
Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_cbc_accel \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/*_pkg.sv tb/tb_ref_pkg.sv tb/tb_cbc_accel.sv -o sim
./obj_dir/sim
```

`tb/tb_ref_pkg.sv` holds reference models written independently of the
RTL: DES, Triple-DES, the IDEA multiplication and IDEA encryption. The
testbenches also check published known-answer vectors:

- DES `133457799BBCDFF1` / `0123456789ABCDEF` → `85E813540F0AB405`;
- the DES CBC example with IV `1234567890ABCDEF`;
- a three-key Triple-DES vector;
- IDEA `0000 0001 0002 0003` → `11FB ED2B 0198 6DE5` under the default key.

| testbench | what it covers |
|---|---|
| `tb_des_pkg`, `tb_des_key_schedule`, `tb_des_round`, `tb_des_comb`, `tb_tdes_comb` | tables, subkeys, rounds, and the full ciphers against the reference models and known vectors |
| `tb_des_pipe` | one block per enable, 16-stage latency, tags, flush |
| `tb_dp_ram`, `tb_clk_div2_en` | the RAM ports and the enable phase |
| `tb_cbc_ctrl` | chaining in both directions, with a stand-in core |
| `tb_cbc_accel` | DES and Triple-DES CBC over the host bus, and the cycle count per call |
| `tb_des_ecb_accel` | early start, stalls on a slow host, results |
| `tb_idea_mulmod`, `tb_idea_key_rom`, `tb_idea_core`, `tb_idea_ecb_accel` | multiplication (including 0 as 2^16), both schedules, 175-cycle latency and 189-cycle batches, and round trips |
| `tb_vpn_accel_top` | all four accelerators at full size, in parallel |
| `tb_tdes_cbc_sizes` | Triple-DES CBC messages of 8 B to 10 KB at full size, split into chained calls; the throughput per size |

`tb_vpn_accel_top` runs all four accelerators at full size:

- 248 blocks each way through both CBC accelerators;
- 32 blocks through the DES ECB accelerator;
- 175 blocks each way through IDEA.

It counts each mechanism: CBC blocks, busy polls, ECB early starts and
stalls, IDEA feedback passes, half-round outputs and partial batches. It
counts a failure for any mechanism that never occurred. It takes about a
quarter of a minute.

## Changing it

- **Buffer size:** `N_BLOCKS` on each accelerator. Keep it at most 248 so
  the registers stay addressable.
- **Cipher settle time:** `WAIT_CYCLES` on `cbc_accel`.
- **IDEA key:** `KEY` on `idea_ecb_accel`, `idea_core` and `idea_key_rom`.
- **Register placement:** the constants in `accel_pkg`.
