# A high-issue-rate decoder and AGU-POP core for an x86-style ISA

An out-of-order core that executes x86-style (CISC) instructions can only go as fast as its
decoder turns them into internal operations. Here those operations are called POPs, primitive
operations similar to RISC instructions. A wide decoder that can translate any instruction in any
slot needs a large translation table for every slot. This is expensive. The design here uses the
fact that most instructions need only one or two POPs:

* One slot (I0) takes any instruction that needs at most four POPs, a *general* instruction.
* Three slots (I1–I3) take only instructions of one or two POPs (class *S2*).
* One slot (I4) takes only one-POP instructions (class *S1*).

The rule is written **5I:1G:3S2:1S1:8P**: five instructions in, at most one general, three S2,
one S1, and at most eight POPs out per cycle. Instructions too complex for four POPs go to a
micro-ROM.

The second idea is the **AGU-POP** translation. Address arithmetic is not folded into the load or
store POP. Instead every memory access gets its own address-generation POP (AG), which runs on a
separate address unit. The load/store unit's store buffer **snoops** the result buses for those
addresses. So it knows a store's address long before the store's data exists. Loads can then be
checked against it and sent to the cache early.

For `ADD [r_base + r_index + disp], r1` the decoder produces:

```
AG  temp1 <- base + index + disp
LD  temp2 <- mem[temp1]
ADD temp3 <- temp2 + r1
ST  mem[temp1] <- temp3
```

The result is a core that fetches 5 and decodes, dispatches and retires 8 POPs per cycle.

## Pipeline overview

```
 predecoded        +---------+  window  +-------------+ bundle  +------------+
 instructions ---> | fetcher | -------> | x86_decoder | ------> | dispatcher |
 (in_*)            +---------+  <-take  +-------------+ <-stall +------------+
                                          | urom_* (complex)       |  rename, operand read
                  +------------------+----+-----------+-------------+---------+
                  v                  v                v             v         v
           RS + 4 x alu        RS + branch_unit  RS + 2 x agu     lsu    reorder_buffer
                  |                  |                |        (LD/ST buffer)    |
                  +---- nine result buses (4 ALU, BU, 2 AGU, 2 LSU load) --------+
                                                                             |
                                                                         reg_file
```

There are six stages: fetch, decode, dispatch, reservation station, execute and retire. All
modules share the types in `rtl/cisc_pkg.sv`.

| file | role |
|---|---|
| `cisc_pkg.sv` | widths, instruction and POP structs, POP counts per form, the bus snoop function |
| `fetcher.sv` | instruction queue, presents 5 instructions per cycle, cuts the group after a taken branch |
| `pop_xlate.sv` | translation table k (k = 1..4): the k-th POP of an instruction |
| `x86_decoder.sv` | the 5I:1G:3S2:1S1:8P decoder with its slot crossbar |
| `dispatcher.sv` | register renaming with ROB tags, operand read, in-order whole-bundle dispatch |
| `resv_station.sv` | reservation station, one per unit kind, issuing to several units of that kind |
| `alu.sv`, `branch_unit.sv`, `agu.sv` | one-cycle execution units (4 ALUs, 1 BU, 2 AGUs in the core) |
| `lsu.sv` | snooping load/store buffer, dependency check, forwarding, cache access |
| `reorder_buffer.sv` | 64-entry ROB, 8 allocations and 8 retirements per cycle |
| `reg_file.sv` | 8 general registers plus temp1–temp3 |
| `cisc_core.sv` | top level |

## Instruction format

Full x86 decoding into fields (prefixes, ModRM and so on) is assumed to happen before the
decoder, in a predecoder next to the instruction cache. The core receives one `x86_instr_t` per
instruction:

* `form`: the instruction form.
* `op`: the ALU operation (add, sub, and, or, xor, mov).
* `r1` and `r2`: registers.
* Base and index registers, each with a valid bit.
* A 32-bit immediate or displacement.
* For a conditional branch, the condition select and the predicted direction.

Eight forms are modelled, and together they cover the classes the decoder distinguishes:

| form | meaning | POPs | class |
|---|---|---|---|
| `F_ALU_RR` | r1 = r1 op r2 | ALU | S1 |
| `F_ALU_RI` | r1 = r1 op imm | ALU | S1 |
| `F_LEA` | r1 = base + index + disp | AG | S1 |
| `F_JCC` | branch if r1 ==/!= 0 | BU | S1 |
| `F_LOAD` | r1 = mem[ea] | AG, LD | S2 |
| `F_STORE` | mem[ea] = r1 | AG, ST | S2 |
| `F_ALU_RM` | r1 = r1 op mem[ea] | AG, LD, ALU | G |
| `F_ALU_MR` | mem[ea] = mem[ea] op r1 | AG, LD, ALU, ST | G |
| `F_CPLX` | anything else | micro-ROM | complex |

`ea` is base + index + displacement. Flags are not modelled, so a conditional branch tests a
register for zero or non-zero. Memory is word addressed and all data is 32 bits wide.

## The decoder (the hard part)

`x86_decoder.sv` is the heart of the design. Its eight output slots F0–F7 (POP0–POP7) are wired
to the five input instructions I0–I4 like this:

| slot | translation tables in the slot | fed by |
|---|---|---|
| F0, F1, F2, F3 | table 1, 2, 3, 4 | I0 |
| F4 | table 1 | I1 |
| F5 | tables 1 and 2 | I1, I2 (crossbar) |
| F6 | tables 1 and 2 | I2, I3 (crossbar) |
| F7 | tables 1 and 2 | I2, I3, I4 (crossbar) |

"Table k" (`pop_xlate` with `IDX = k`) produces the k-th POP of an instruction. Only I0 ever
needs tables 3 and 4, so only F2 and F3 hold them. This is where the area saving lies. A decoder
in which every slot can take any instruction would need tables 1–4 in front of every slot.

**Packing.** The POPs of I0 go to F0 upwards. Slots that I0 leaves free stay empty, because
nothing else is wired to F1–F3. I1 always starts at F4. The POPs of I1 to I4 then fill F4–F7
one after the other, so the start slot of each instruction is 4 plus the POP counts of the
instructions before it. The crossbar in front of F5–F7 picks, for each slot, which instruction
feeds it and whether table 1 or table 2 produces the POP. The select is worked out from the POP
counts of I1–I3.

**Acceptance.** Instructions are decoded in order. The first one that breaks the rule ends the
group:

| instruction | decoded when |
|---|---|
| I0 | it is present and not complex (1–4 POPs) |
| I1, I2 | the one before it was decoded and it has 1 or 2 POPs |
| I3 | as above, and its POPs end by F7 |
| I4 | as above, it has exactly one POP, and F7 is still free |

An S1 instruction may sit in an S2 or G position and an S2 instruction in the G position, since
the classes nest. With eight slots, five instructions fit in one cycle only when I1–I4 are all
single-POP. That is the common case for integer code.

**Complex instructions.** A complex instruction in I0 decodes nothing. It is shown on
`urom_req`/`urom_instr` and consumed when `urom_ack` comes back. A complex instruction in
I1–I4 simply ends the group, so it becomes I0 next cycle. The micro-ROM's own POP sequences are
not part of this RTL.

**Timing.** The decoder reads the fetch window combinationally and tells the fetcher how many
instructions it consumed (`take`). The bundle of eight POP slots is registered. While the
dispatcher stalls, the bundle is held and `take` is 0, and the stall propagates back to the
fetcher.

Each POP carries a `last` flag on the final POP of its instruction. The ROB counts these to
report retired x86 instructions.

## Fetch

`fetcher.sv` is a 16-entry queue that accepts groups of up to five predecoded instructions and
presents its oldest five to the decoder. After the first conditional branch predicted taken, the
window ends. The instructions behind that branch reach the decoder one cycle later at the
earliest. Branch prediction is taken as perfect. The incoming stream already follows the
predicted path, and each branch carries its predicted direction.

## Renaming and dispatch

`dispatcher.sv` renames with a register alias table. For each of the 11 logical registers it
keeps a busy bit and the ROB tag of the youngest in-flight producer. The ROB entry number is the
tag. For each source operand the dispatcher takes the first of these that applies:

1. An older POP in the same bundle writes the register: wait for that POP's tag.
2. The alias table points to a producer that has finished (the ROB holds its value), or whose
   result is on a bus this cycle: take the value.
3. The alias table points to an unfinished producer: wait for its tag.
4. Otherwise: read the register file.

A bundle is dispatched whole or not at all. It needs room in the ROB, in the ALU, BU and AGU
stations, and in the LSU buffer. Otherwise `stall` holds it in the decoder. At retirement an
alias entry is cleared if it still points to the retiring tag.

Temporaries temp1–temp3 are renamed like ordinary registers, so the AG/LD/ALU/ST chains of
consecutive instructions do not block each other.

## Execution

* `resv_station.sv` (16 entries in the core) captures missing operands by watching all result
  buses, one bus per unit. Each cycle it issues its `N_ISSUE` oldest ready entries, the oldest on port 0. The
  ALU station serves four ALUs, the AGU station two AGUs and the branch station one branch unit
  (`N_ALU`, `N_AGU` and the LSU's `N_LDP` are in `cisc_pkg`; the bus count follows from them).
* `alu.sv`, `branch_unit.sv` and `agu.sv` are combinational. Their result appears on their bus
  in the cycle of issue and is captured by all listeners at the next clock edge. So the latency
  is one cycle.
* `branch_unit.sv` compares the outcome with the prediction and raises `mispredict`. There is no
  recovery, in line with the perfect-prediction assumption.

## The snooping load/store unit

`lsu.sv` holds every LD and ST POP in program order in one 16-entry buffer. Each entry watches
the buses for the parts it lacks: the address from the AGU, and for a store its data. This merges
two structures that could be kept apart: a reservation station that waits for store data, and a
store buffer that keeps addresses in order. Each cycle:

1. **Dependency check.** Take the two oldest loads whose address is known and for which every
   older store's address is known too.
   * If the youngest older store to the same address already has its data, the load takes it
     from that store (forwarding).
   * If that store has no data yet, the load waits (`ev_dep_wait`).
   * Otherwise the load goes to the cache.

   Each chosen load enters the one-stage register of its load pipe. There are two pipes (`LD_PIPES` in `lsu`, set from `N_LDP` in `cisc_pkg`).
2. **Cache access.** Each registered load reads the data cache through its pipe's read port
   (`dc_rd_*[l]`, data in the same cycle) or uses the forwarded value. It then drives its pipe's
   result bus.
3. **Store.** A store whose older entries are all done, and whose address and data are known,
   writes the cache (`dc_wr_*`). It reports completion to the ROB on `st_done`.

For the four-POP example above this gives the following cycles:

| cycle | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| AG | address | | | | |
| LD | | dependency check | cache access, done | | |
| ADD | | | | done | |
| ST | | | | | cache access, retire |

`tb_lsu` checks these cycles. Take a second, independent load whose address is already known.
It is held only while the store's address is unknown. It is checked in cycle 2 together with the
first load, and it reaches the cache in cycle 3 on the second pipe. The store's data does not
arrive until cycle 4. Without the snooping store buffer, that load would have to wait for the
store's address, which is computed only when the store itself issues.

## Retirement

`reorder_buffer.sv` has 64 entries. It allocates up to 8 POPs per cycle in program order. It
retires up to 8 per cycle from the head and stops at the first unfinished one. Retiring POPs
write the register file in the same clock edge. If two retiring POPs write the same register,
the younger wins. The ROB exposes the done bit and value of every entry for the dispatcher's
operand read.

## Top-level interface (`cisc_core`)

| port | dir | meaning |
|---|---|---|
| `in_instr[5]`, `in_count`, `in_ready` | in/in/out | predecoded instructions. A group is taken whole when `in_ready` is high |
| `urom_req`, `urom_instr`, `urom_ack` | out/out/in | hand-off of a complex instruction |
| `dc_rd_valid`, `dc_rd_addr`, `dc_rd_data` | out/out/in | two data cache read ports (arrays), data returned combinationally |
| `dc_wr_valid`, `dc_wr_addr`, `dc_wr_data` | out | data cache write |
| `regs` | out | architectural registers r0–r7, temp1–temp3 |
| `ret_pops`, `ret_x86` | out | POPs and x86 instructions retired this cycle |
| `idle` | out | nothing in flight |
| `ev_*`, `mispredict` | out | event pulses: instructions decoded, taken-branch cut, dispatch stall, forwarding, load waiting on a store, store address known before data, branch resolved |

Reset (`rst_n`) is asynchronous and active low. It clears the control state and the register
file. Storage arrays are not reset, because none is read before it is written.

Parameters on the top are `RS_DEPTH` (16), `LSQ_DEPTH` (16) and `IQ_DEPTH` (16). The ROB depth,
register count and widths are in `cisc_pkg`. The decode rule is fixed by the structure of
`x86_decoder`.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. The core
test, for example:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_cisc_core \
    rtl/cisc_pkg.sv rtl/*.sv tb/tb_cisc_core.sv -o tb
./obj_dir/tb
```

(List `cisc_pkg.sv` first. Verilator ignores the second mention of it.) For a unit test, replace
the top module and the testbench file, for example `tb_lsu` with `tb/tb_lsu.sv`.

`tb_cisc_core` runs the core at its default sizes. It generates a random program of 3000
instructions of all forms. A sequential reference model executes the program and fixes each
branch's outcome, which is then given to the core as its prediction. The test feeds the core at a
random rate and checks:

* the final registers and memory;
* the order of retirement;
* the sequence of memory writes.

It also fails if any of these never happened: a five-instruction decode, a general instruction, a
taken-branch cut, a dispatch stall, forwarding, a load waiting on a store, an early store
address, a branch resolution, or a micro-ROM hand-off. The test reaches about 2.0 instructions
per cycle. This is limited mostly by the random feed rate, 2.5 instructions per cycle on
average.

`tb_core_rate` checks the peak rates at the default sizes. It feeds five instructions per
cycle in two streams of 200 groups:

* Stream A has five single-POP instructions per group. It must finish at five instructions per
  cycle, and does so in 204 cycles.
* Stream B has one four-POP read-modify-write instruction and four single-POP instructions per
  group, which fills all eight POP slots. It must finish at eight POPs per cycle, and does so in
  208 cycles.

Sustaining stream B is what sets the default depths: 64 ROB entries and 16 per reservation
station. With 32 and 8 the core reaches only about four POPs per cycle.

The unit testbenches compare each block with an independent model written in the
testbench.

## Where this design departs from the reference model

The published evaluation assumes unlimited resources. This RTL makes them finite:

| item | evaluated design | here |
|---|---|---|
| ROB entries | unlimited | 64 |
| reservation station entries | unlimited | 16 per unit kind |
| load/store buffer | not sized | 16 |
| execution units | unlimited | 4 ALUs, 1 BU, 2 AGUs |
| cache ports | unlimited | two loads and one store per cycle |
| branch prediction | perfect | supplied with the stream; a wrong one is only flagged |

Further choices of this design:

* The instruction forms and the predecoded format.
* Flags are left out.
* Word addressing, with no scale factor on the index.
* The LSU reservation station and store buffer are merged.
* A load waits while any older store address is unknown.
* Stores go to the cache only when all older memory operations are done.
* Slots of I0 that it leaves free stay empty.
* Dispatch is whole-bundle.

Not built: the floating-point unit, the micro-ROM contents, the instruction cache with its
predecoder, and the data cache. Their connections are ports of `cisc_core`, except the FPU, for
which there are no floating-point instructions.
