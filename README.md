# KASUMI block cipher core: two rounds every three cycles

KASUMI is the 64-bit block cipher with a 128-bit key that sits under the 3GPP
confidentiality (f8) and integrity (f9) algorithms of UMTS. It is an
eight-round Feistel network, and each round applies two keyed functions to
the left half: FL (a cheap AND/OR/rotate mix) and FO (itself a three-round
Feistel network of 16-bit FI functions, each built on two 9-bit and two
7-bit S-boxes).

This core encrypts one block every **12 clock cycles** with a very small
amount of hardware: a single FI unit that evaluates two FI functions per
cycle, four dual-port S-box ROMs, two FL units and a few registers. The trick
is to treat an odd round and the even round that follows it as one unit, and
to reorder the six FI calls of their two FO functions into three identical
cycles of two calls each. Four passes over this two-round datapath make one
block.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with a
self-checking testbench for every module.

## The round pair

For an odd round `i` followed by the even round `i+1`, with input halves
`L, R`:

```
X    = FL_i(L)                  odd round: FL first
L_i  = FO_i(X) xor R            new left half; R_i = L
Z    = FO_i+1(L_i)              even round: FO first
L_i+1 = FL_i+1(Z) xor L         R_i+1 = L_i
```

Write the odd FO's Feistel words as `a1, a2, a3` (its output is `a2 || a3`)
and the even FO's words as `b1, b2, b3`. Only one data dependency really
chains the FI calls: each call needs the word produced by the call before it
*in the same FO*, except that the second FI of an FO depends only on the FO's
input. Sorted by dependency, the six calls fall into three pairs:

| step | FI port A              | FI port B                  | words formed from the results of the previous step |
|------|------------------------|----------------------------|----------------------------------------------------|
| 0    | `FI(Xh ^ KO1, KI1)`    | `FI(Xl ^ KO2, KI2)`        | `b2 = fA ^ b1`, `b3 = fB ^ b2` (previous pair)     |
| 1    | `FI(a1 ^ KO3, KI3)`    | `FI(a2 ^ Rh ^ KO1', KI1')` | `a1 = fA ^ Xl`, `a2 = fB ^ a1`                     |
| 2    | `FI(yr ^ KO2', KI2')`  | `FI(b1 ^ KO3', KI3')`      | `a3 = fA ^ a2`, `yr = a3 ^ Rl`, `b1 = fB ^ yr`     |

(`'` marks the even round's keys; `Xh/Xl`, `Rh/Rl` are the 16-bit halves.)
The XOR with `R` that sits between the two FOs splits into its two 16-bit
halves, which land in steps 1 and 2. If those two XORs are written as XORs
with "R half or zero" in every step, all three steps have the same shape:

```
u = fA ^ carry
v = fB ^ u ^ (step 2 ? Rl : 0)
next A operand = u ^ (step 2 ? Rl : 0) ^ KO,  next B operand = v ^ (step 1 ? Rh : 0) ^ KO
carry <= v              (in step 0: carry <= Xl)
```

That one shape is `kasumi_super_fo`: the dual-port FI, a carry register,
the held `R` halves and a handful of multiplexors selected by `step`.

The FI unit has one cycle of latency, so the results of step 2 arrive in
the next cycle. That cycle is step 0 of the following pair: the even FL and
the Feistel XOR are evaluated combinationally on the arriving results, and
their output feeds straight into the next pair's odd FL and FI operands.
Nothing waits, which is why four pairs take 12 cycles and not 16. After the
fourth pair the same expression gives the ciphertext.

## The dual-port FI and its two clock edges

FI maps a 16-bit word through four Feistel rounds on a 9-bit and a 7-bit
half: S9, S7, key injection (`KI[15:9]` and `KI[8:0]`), S9, S7. The first
S9/S7 pair and the second S9/S7 pair each look up independent addresses, so
the four lookups need only two ROM stages.

`kasumi_fi_dp` computes two FI functions at once (ports A and B). Each S-box
position is one dual-port ROM serving both ports, so the whole unit has two
512x9 S9 ROMs and two 128x7 S7 ROMs. The ROMs are synchronous, as embedded
FPGA block memories are. To get both ROM stages into one system clock the
upper pair of ROMs registers on the **falling** edge and the lower pair on
the **rising** edge:

```
rising edge n     operands appear (from the superFO multiplexors)
falling edge n    upper S9/S7 look up; 7-bit half and KI are registered
second half       round-1/2 XORs and key injection settle
rising edge n+1   lower S9/S7 look up; the round-2 7-bit word is registered
after edge n+1    round-3/4 XORs give the FI results
```

The operand logic in front of the FI (FL, XORs, multiplexors) therefore
has half a clock period, and the timing closure of the core is set by that
half cycle. The ROM contents are the S7 and S9 tables of the KASUMI
specification, in `rtl/kasumi_s7.hex` and `rtl/kasumi_s9.hex`. A 512x9 S9
table holds 4608 bits, one more block than a 4-kbit block RAM, so on such
devices each S9 ROM takes two block RAMs (six in all).

## Round keys at one third of the clock rate

The key scheduler (`kasumi_key_sched`) must present the key sets of two
rounds and keep them still for the three cycles of a round pair. It holds
the eight 16-bit key words `K1..K8` and the modified words `K'j = Kj xor Cj`
(with the specification's constants `C1..C8 = 0123 4567 89AB CDEF FEDC BA98
7654 3210`). Two copies of the round-key generator (`kasumi_round_keys`) read
them: one as stored (odd round), one rotated by one word (even round). The
KASUMI key schedule of round `i` is just the words indexed from `i`:

```
KL1 = K1 <<< 1   KL2 = K'3
KO1 = K2 <<< 5   KO2 = K6 <<< 8   KO3 = K7 <<< 13
KI1 = K'5        KI2 = K'4        KI3 = K'8
```

so moving to the next round pair is a rotation of both registers by two
words. That rotation happens once every three cycles, on a tick from the
divide-by-three divider `kasumi_clkdiv3` (a three-state FSM). After four
ticks the registers hold the original key again. The divider is used as a
clock enable on the system clock rather than as a separate clock net, and an
assertion in `kasumi_top` checks that its phase always equals the
controller's step.

The even round's KL pair is needed one cycle after its round pair, when the
even FL runs on the arriving FI results. By then the scheduler has moved on,
so the datapath holds that KL pair in a 32-bit register.

## Control and interface

`kasumi_ctrl` is a 12-state FSM (`S0..S11`, four pairs of three steps) plus
an idle state. It drives `step = state mod 3` and `first` (state `S0`: take
the plaintext register instead of the fed-back halves).

`kasumi_top` ports:

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | system clock (both edges are used inside the FI unit) |
| `rst_n`   | in  | 1     | asynchronous active-low reset of the control state |
| `start_i` | in  | 1     | request to encrypt `pt_i` under `key_i` |
| `key_i`   | in  | 128   | key, `K1` in bits 127:112 |
| `pt_i`    | in  | 64    | plaintext, left half in bits 63:32 |
| `ready_o` | out | 1     | a request is taken at the next rising edge if `start_i` is high |
| `done_o`  | out | 1     | one-cycle pulse; `ct_o` is valid in this cycle |
| `ct_o`    | out | 64    | ciphertext |

A request is taken at a rising edge where `start_i` and `ready_o` are both
high. Key and plaintext are captured at that edge. `done_o` rises 12 edges
later, and `ct_o` is valid only while `done_o` is high; capture it there
if you need it longer. `ready_o` is high in idle and in `S11`, so a new block
can be taken in the last cycle of the previous one, and a stream of requests
completes one block every 12 cycles:

```
cycle      c0     c1   c2  ...  c12   c13  c14 ...  c24   c25
state      IDLE   S0   S1  ...  S11   S0   S1  ...  S11   IDLE
start_i    1 (A)                1 (B)
ready_o    1                    1
done_o                                1 (A)                1 (B)
```

(Each request is taken at the rising edge that ends the cycle in which
`start_i` and `ready_o` are both high.)

Each request carries its own key; a key change between blocks costs
nothing.

Throughput is `64 bits x f_clk / 12`. A published Virtex-E implementation
of this architecture ran at 41.6 MHz, i.e. 222 Mbit/s; the RTL here has the
same cycle count, but its clock rate on a given device has not been
measured.

## Files

| file | contents |
|------|----------|
| `rtl/kasumi_pkg.sv` | word and round-key types, key constants, controller states, `rol16` |
| `rtl/kasumi_top.sv` | the core: controller, divider, key scheduler, datapath |
| `rtl/kasumi_ctrl.sv` | 12-state controller and start/ready/done handshake |
| `rtl/kasumi_clkdiv3.sv` | divide-by-three divider (key-scheduler enable) |
| `rtl/kasumi_key_sched.sv` | key registers, rotation, two round-key generators |
| `rtl/kasumi_round_keys.sv` | one round-key set from the key words |
| `rtl/kasumi_datapath.sv` | two-round datapath: odd FL, superFO, even FL, feedback |
| `rtl/kasumi_super_fo.sv` | both FO functions of a round pair in three cycles |
| `rtl/kasumi_fi_dp.sv` | two FI functions per cycle on shared dual-port ROMs |
| `rtl/kasumi_s9_rom.sv`, `rtl/kasumi_s7_rom.sv` | dual-port synchronous S-box ROMs, edge selectable |
| `rtl/kasumi_fl.sv` | FL function |
| `rtl/kasumi_s9.hex`, `rtl/kasumi_s7.hex` | S-box tables, one hex word per line |
| `tb/kasumi_ref_pkg.sv` | untimed reference model of KASUMI |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The ROMs load their tables with `$readmemh("rtl/kasumi_s9.hex")`, a path
relative to the directory the simulator or synthesis tool runs in: run the
tools from the repository root, or edit the path.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`; each has a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/kasumi_pkg.sv tb/kasumi_ref_pkg.sv tb/tb_kasumi_top.sv \
  --top-module tb_kasumi_top -o sim
./obj_dir/sim
```

Replace `tb_kasumi_top` with any other `tb_<module>` to test one block.

What the tests establish:

* The reference model in `tb/kasumi_ref_pkg.sv` reproduces the 3GPP KASUMI
  known-answer vector (key `2BD6459F82C5B300952C49104881FF48`, plaintext
  `EA024714AD5C4D84`, ciphertext `DF1F9B251C0BF45F`). The end-to-end test
  checks this vector on the core, then 400 random blocks with random keys
  and random gaps. For every block it checks the ciphertext, the 12-cycle
  latency and the 12-cycle spacing of back-to-back results. It counts
  back-to-back requests, requests from idle, requests held off while busy,
  key changes and divider ticks, and fails if any of them never happened.
* The S-box ROM tests check properties of the tables that do not depend on
  the table files: each table is a permutation, its largest difference-table
  entry is 2, and the end entries are correct. They also check each ROM
  variant's clock edge.
* The FI, superFO, FL, round-key, key-scheduler, divider, controller and
  datapath tests compare against the reference model or a cycle model with
  random stimulus.

## Design choices and departures

* **Encryption only.** The same round hardware does not run KASUMI
  backwards: decryption needs the rounds in reverse order with FL and FO
  swapped. f8 and f9 use only the forward direction.
* **Handshake.** start/ready/done, the one-cycle validity of `ct_o` and the
  asynchronous reset of the control state are this design's own.
* **Divided clock as an enable.** The key scheduler runs at one third of the
  clock rate through a clock enable, not through a derived clock.
* **Key-schedule constants.** `K'` has its own register and rotates together
  with `K`, which keeps each constant with its word.
* **Extra hold register for the even KL.** This register is needed because
  the even FL runs one cycle after its round pair, when the scheduler has
  already moved on.
* **FI port assignment and register placement.** The assignment of the six
  FI calls to ports A and B and the exact placement of the synchronising
  registers follow from the data dependencies shown above. Other assignments
  are possible.
* **Falling-edge ROMs.** The upper S-box ROMs and the FI's first
  synchronising registers use the falling clock edge. That halves the time
  for the operand logic, and it needs a clock with a controlled duty cycle.
  An ASIC port would rather use asynchronous-read ROMs or add a pipeline
  stage, which costs cycles.
* **Round-key outputs.** Half of the round-key generator's outputs are plain
  selections of key words, with no logic behind them. This is inherent to
  the KASUMI key schedule.
