# A transport-triggered RNS processor for RSA key generation

Generating an RSA key pair spends nearly all its time in modular exponentiation on
512-bit numbers. That happens while testing random candidates for primality. This design
speeds that up in two ways:

- **Residue Number System (RNS).** A 512-bit operand is stored as 17 residues, each 32 bits,
  modulo a set of small coprime moduli (a *base*). A long multiplication then becomes 17
  independent 32-bit modular multiplications. The modular reduction by the prime candidate N is
  done with the RNS form of Montgomery multiplication. That form uses two bases and two *base
  extensions* and never divides by N.
- **A transport-triggered processor (TTA).** The processor is programmed only with data
  moves. Four 32-bit buses carry up to four moves per cycle between the sockets of the
  function units. Writing a unit's *trigger* socket starts an operation. The unit that does
  the work is the MMAC, a pipelined 32 x 32-bit modular multiply-accumulate. There are four
  of them, and each one has direct inputs from the memory units, so a multiply-accumulate
  stream needs almost no bus traffic.

The RTL in `rtl/` is the processor: function units, memories, transport network, fetch and
decode. Programs are built in the testbenches with a small assembler and list scheduler
(`tb/tta_asm_pkg.sv`). Two programs run on it:

- an RNS modular exponentiation across four channels (`tb/tb_tta_top.sv`);
- a complete RNS Montgomery multiplication with 17-residue bases, the size that 512-bit
  primes need. It is also used, one run per step, for a Miller-Rabin primality test on a
  521-bit prime (`tb/tb_rns_montmul.sv`).

## Machine structure

```
             +------------------------- 4 x 32-bit buses --------------------------+
             |        |         |          |         |        |        |           |
          MMAC1..4  ALU1..2  LDST1..3     LUT        RF     Cond Reg  JMP1..3   long immediates
             ^                  |          |                             |      (from the slots)
             |  direct paths    |          |                             v
             +---- a <----------+          |                           fetch / PC --> instr RAM
             +---- b <---------------------+                             ^               |
                                |          |                             +---- decoder <-+
                          Data RAM1..3   Table1
```

| Unit | Count | Does |
|---|---|---|
| MMAC | 4 | a*b mod m, (a*b + c) mod m, and accumulate acc = (acc + a*b) mod m; one per cycle, 3-cycle latency |
| ALU | 2 | modular add and subtract, shifts, case-select, plus carry arithmetic, logic and compares |
| LDST | 3 | load and store to its own Data RAM; the loaded word also feeds every MMAC directly |
| LUT | 1 | reads and writes Table1 (pre-computed constants); the read word also feeds every MMAC directly |
| RF | 1 | 32 registers; every bus can read and write any register each cycle |
| Cond Reg | 1 | one flag, set to (moved value != 0), tested by branches |
| JMP | 3 | jump, branch on the flag, count-down loop (one counter per unit), halt |

The following follow the processor description:

- the unit kinds and counts;
- the four 32-bit buses;
- the MMAC's multiply and multiply-accumulate;
- the direct paths from LDST to MMAC and from LUT to MMAC;
- the separate data RAMs;
- the ALU's modular add and subtract, shifts and case-select.

These are this design's own: the instruction format, socket map, opcodes, latencies, memory
sizes, the RF size, the host interface, and how the MMAC reduces.

## Programming model

### Instructions and moves

An instruction has four move slots, one per bus. Slot j occupies bits `[j*44 +: 44]`, so an
instruction is 176 bits wide. Each slot is `slot_t` in `rtl/tta_pkg.sv`:

| Field | Bits | Meaning |
|---|---|---|
| `valid` | 1 | the slot moves something |
| `imm` | 1 | `src` is a 32-bit long immediate, put on the bus as is |
| `dst` | 10 | destination socket id |
| `src` | 32 | source socket id in the low 8 bits, or the immediate |

A move reads its source during the cycle. The destination latches the bus value at the end of
that cycle. Within one instruction all moves happen together, and an operand moved in the same
cycle as a trigger is the one that trigger uses. Writing the same destination twice in one
cycle, or naming a source id that does not exist, sets the sticky `err` output.

### Source ids

| Id | Source |
|---|---|
| 0x00-0x1F | RF r0..r31 |
| 0x20-0x23 | MMAC1..4 result |
| 0x24-0x25 | ALU1..2 result |
| 0x26-0x28 | LDST1..3 last loaded word |
| 0x29 | LUT last read word |
| 0x2A | Cond Reg (0 or 1) |

### Destination ids

Every unit has a window of ids. Trigger sockets encode the operation in the id itself. The bus
value of a trigger move is the operation's second operand or its address.

| Window | Unit | Sockets |
|---|---|---|
| 0x000 + r | RF | write r |
| 0x100 + 0x40·n | MMAC n+1 | +0 operand a, +1 addend c, +2 modulus m, +32..63 trigger with `{asel[1:0], bsel, op[1:0]}` |
| 0x200 + 0x20·n | ALU n+1 | +0 operand a, +1 m (modulus, or SEL flag), +16..31 trigger with opcode |
| 0x280 + 8·n | LDST n+1 | +0 store data, +1 load (bus = address), +2 store (bus = address) |
| 0x2A0 | LUT | +0 write data, +1 read (bus = address), +2 write (bus = address) |
| 0x2B0 | Cond Reg | write |
| 0x2C0 + 8·n | JMP n+1 | +0 loop counter, +1 JMP, +2 BT, +3 BF, +4 LOOP, +5 HALT (bus = target) |

MMAC trigger fields:

- `op`: MUL gives a*b. MADD gives a*b + c. MACC gives acc += a*b. MINI starts an
  accumulation with acc = a*b. The result is always reduced mod m.
- `asel`: 0 takes a from the a socket; 1..3 take the word last loaded by LDST1..3.
- `bsel`: 0 takes b from the trigger's bus; 1 takes the word last read by the LUT.

With both direct paths in use, a multiply-accumulate step needs only the trigger move and the
two address moves for the loads.

ALU opcodes (`alu_op_e`): ADD, ADDC, SUB, SUBB, MADD, MSUB, SHR, SAR, SHL, AND, OR, XOR, EQ,
LTU, SEL (m[0] ? a : b) and CRY (the carry or borrow flag of the last ADD, ADDC, SUB or SUBB).
MADD and MSUB expect a, b < m.

### Timing a program must respect

| From the move in cycle t | Readable from |
|---|---|
| MMAC trigger | t+3 (fully pipelined, one trigger per cycle per MMAC) |
| ALU trigger | t+1 |
| LDST load, LUT read | t+2, and over the direct paths at t+2 |
| RF or Cond Reg write | t+1 |

- A result stays until the same unit produces its next result. A program can therefore read it
  later, but only while no other operation has been started on that unit.
- A load or read started in cycle t+1 replaces the word only at the end of t+2, so a consumer
  in t+2 still sees the word from cycle t.
- Jumps take effect after one delay slot: the instruction after the jump still executes. If
  several JMP units request in one cycle, the lowest-numbered one wins.
- LOOP decrements its unit's counter and jumps if the new value is not zero. A body that runs n
  times loads n and ends with LOOP.
- HALT stops at once, drops its delay slot and raises `done`.

## The MMAC

The MMAC is a three-stage pipeline:

1. Stage 1 captures a, b, c and m from the sockets or the direct paths.
2. Stage 2 multiplies to 64 bits and folds twice.
3. Stage 3 folds a third time, subtracts m once and updates the accumulator.

Folding uses the modulus form m = 2^32 - cm with cm < 2^16 (parameter `CMW`). Then
hi·2^32 + lo ≡ hi·cm + lo (mod m), so a 64-bit product shrinks to 49, then 34, then 33 bits,
and one conditional subtract finishes the reduction.

Any 32-bit a, b and c are reduced correctly, including operands that are residues for another
modulus. This matters because base extension multiplies residues of one base by constants of
the other. An assertion checks the form of the modulus. This restriction, pseudo-Mersenne
moduli, is the main design choice behind the 3-cycle latency. Plenty of pairwise-coprime moduli
of this form exist: the workload test takes 34 of them with c < 200.

## RNS Montgomery multiplication on the machine

The sections below describe `tb/tb_rns_montmul.sv`. This is the hardest part of the design to
follow.

### The algorithm

There are two bases, a_1..a_K and b_1..b_K, with products A and B. Let N < A/16 and N < B/16 be
coprime to A, and X, Y < 2N. The multiplication computes r ≡ X·Y·A⁻¹ (mod N):

1. **Base a.** For each i:
   - z_i = x_i·y_i;
   - q_i = z_i·|−N⁻¹|_{a_i};
   - l_i = q_i·|A_i⁻¹|_{a_i}, where A_i = A/a_i.
2. **First base extension.** Form q in base b as
   q_j = Σ_i l_i·|A_i|_{b_j} − w1·|A|_{b_j}, with w1 = ⌊Σ_i l_i/a_i⌋.
3. **Base b.** For each j:
   - r_j = (x_j·y_j + q_j·N_j)·|A⁻¹|_{b_j};
   - l'_j = r_j·|B_j⁻¹|_{b_j}.
4. **Second base extension.** Form r in base a as
   r_i = Σ_j l'_j·|B_j|_{a_i} − w2·|B|_{a_i}, with w2 = ⌊1/2 + Σ_j l'_j/b_j⌋.

### Estimating w

The integer parts w1 and w2 are estimated without division. Each l is shifted right by 6 on
ALU2, the top 26 bits are summed on ALU1, and the sum is shifted right by 26. For w2, 2^25 is
added first, which is the 1/2.

The estimate of w1 can be low by one. Then q grows by A and r by N, so r < 3N is guaranteed,
and in practice r < 2N. The second extension is exact, because r < 3N < B/5 keeps it away from
the rounding edge.

### Data layout

| Memory | Holds |
|---|---|
| Data RAM1 | x, the results, \|A⁻¹\|_{b_j}, and l' |
| Data RAM2 | y, N_j, \|B_j⁻¹\|_{b_j}, and a copy of the two extension matrices (rows \|−A\|_{b_j}, \|A_1\|_{b_j}..\|A_K\|_{b_j} and \|−B\|_{a_i}, \|B_1\|_{a_i}..\|B_K\|_{a_i}) |
| Data RAM3 | the other copy of the matrices |
| Table1 | \|−N⁻¹\|_{a_i} and \|A_i⁻¹\|_{a_i} |
| RF | r1 = w1, r2 = w2, and l_1..l_K in r3..r19 (later l'_1..l'_K) |

### How a stream step is issued

Each step of an extension stream is two moves:

1. an LDST2 or LDST3 load of the matrix word, which reaches the MMAC over the direct path;
2. the MMAC trigger, which carries l from the RF over its bus.

The first step is a MINI. It multiplies w by |−A| (or |−B|) and so folds the correction term
into the same stream.

Because a step takes only two buses, two channels stream at the same time, one on each matrix
copy. The tail of each channel takes its constant into the a socket ahead of time and triggers
with the previous result as b. That is a single move, so it fits beside the streams.

### The schedule

The program is straight-line code of 920 instructions. The list scheduler places each channel
at the earliest cycle where buses, triggers and memory ports are free, and reserves the MMAC
until the channel's last use of its result. The program fills 920 of the 1024 instruction
words, and the multiplication takes 921 cycles:

| Phase | Ends at cycle |
|---|---|
| base a | 92 |
| first extension and base b | 688 |
| second extension | 920 |

### A primality test

The same testbench then runs one Miller-Rabin round with base 3 on two moduli:

- the 521-bit prime 2^521 − 1;
- the composite (2^521 − 1)(2^13 − 1).

The round is a left-to-right exponentiation in the Montgomery domain: the base enters as
3·A mod N and leaves through a final multiplication by 1. Each multiplication is one run of the
program. Between runs the host copies the result residues back into the x and y areas; in a
complete key generation program this would be the program's own loop. The testbench checks
the result against 3^d mod N computed with wide arithmetic, and checks the verdict.

| Modulus | Multiplications | Processor cycles |
|---|---|---|
| the prime | 1039 | 956,919 (about 9.6 ms at 100 MHz) |

This exponent is almost all ones. A random 512-bit candidate needs about 768 multiplications,
about 7.1 ms at 100 MHz. The original design reports 4.1 ms for a primality test, so this
schedule is about 1.7 times slower.

The instruction memory has 104 words left after the multiplication for an on-chip
exponentiation loop. That loop has not been written as processor code.

## Host interface and running a program

`tta_top` ports:

| Port | Use |
|---|---|
| `clk`, `rst_n` | clock and asynchronous active-low reset |
| `imem_we`, `imem_addr`, `imem_wdata` | write one 176-bit instruction per cycle |
| `host_en`, `host_we`, `host_sel`, `host_addr`, `host_wdata`, `host_rdata` | one host port into the memories. `host_sel` 0..2 selects Data RAM1..3 and 3 selects Table1. Read data arrives the cycle after `host_en`. |
| `start` | begin at address 0; the first instruction executes two cycles later |
| `busy`, `done` | running; halted (held until the next `start`) |
| `err` | a program broke a move rule (sticky until `start`) |

The host is meant to load the memories while the processor is idle. The memories are dual
ported: port A belongs to the function unit and port B to the host. Their sizes are
parameters: `DRAM_DEPTH`, `TAB_DEPTH` and `IMEM_DEPTH` = 2^`PCW`, 1024 words each. Reset
clears all registers. Memory contents are not reset.

## Files

| File | Contents |
|---|---|
| `rtl/tta_pkg.sv` | widths, counts, slot format, socket map, opcodes, decode helpers |
| `rtl/tta_top.sv` | the processor |
| `rtl/mmac.sv`, `alu.sv`, `ldst.sv`, `lut.sv`, `rf.sv`, `cond_reg.sv`, `jmp.sv` | function units |
| `rtl/data_ram.sv` | Data RAM1..3 and Table1 |
| `rtl/instr_ram.sv` | instruction memory |
| `rtl/fetch.sv`, `decoder.sv`, `transport_net.sv` | control and interconnect |
| `tb/tta_asm_pkg.sv` | slot and instruction builders, socket-name helpers, list scheduler |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit, against independent reference arithmetic |
| `tb/tb_tta_top.sv` | end to end at the default sizes (below) |
| `tb/tb_rns_montmul.sv` | 512-bit RNS Montgomery multiplication workload and a Miller-Rabin round |

`tb_tta_top` runs an exponentiation of 32-bit exponents on four RNS channels in parallel. It
uses a loop on JMP1's counter, a Cond Reg branch that skips the multiply for zero exponent
bits, both direct paths, and a halt. It counts each of these and fails if one never happens.

Every testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/tta_pkg.sv tb/tta_asm_pkg.sv tb/tb_rns_montmul.sv --top-module tb_rns_montmul -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. Unit tests need only `rtl/tta_pkg.sv` before
the testbench file. Each test runs in a few seconds at most.

Verilator has two states. The testbenches reset or write everything they read.

To change the machine:

- The unit counts live in `tta_pkg`. Socket windows are laid out for up to four MMACs, four
  ALUs and four LDSTs.
- `NBUS` must stay 4 unless the slot packing and `trig_t.bus` width are changed too.

## Where this departs from the original design, and what is missing

- **Not built: the key generation program.** This covers the sieve, the loop over prime
  candidates, the primality test loop and the private-key calculation by binary extended
  Euclid. These are software for this processor, and no program for them is given. The ALU
  has the operations they need (carry add and subtract, shifts, compares, select) and the JMP
  units have branches and loops, but the programs do not exist. The random-number source
  named in the flow of key generation is not part of the processor. Candidates come in
  through the host port.
- **Own choices.** The instruction encoding, socket map, latencies, memory sizes, RF size,
  host port, and the pseudo-Mersenne restriction on MMAC moduli are this design's. Table1 is
  writable, so constants that depend on N can be reloaded for each candidate.
- **Memory layout of the workload.** The test keeps the base-extension matrices in Data RAM2
  and RAM3 rather than in Table1. The LUT is busy with the constants of the first step, and
  two matrix copies let two extension streams run at once.
- **Not measured.** The original design reports a 100 MHz clock and 131k gates. Neither timing
  nor area has been measured for this RTL.
- **Speed.** The 921-cycle multiplication is a straightforward list schedule. A hand schedule,
  or load units with address auto-increment, would shorten it. The latter is not in the
  original design and was not added.
