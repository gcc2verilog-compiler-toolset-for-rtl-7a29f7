# C functions as hardware: FSM-plus-datapath IPs on a shared multi-port memory

This RTL follows the hardware model of the GCC2Verilog compiler. GCC2Verilog
turns a C function into a Verilog module by taking the compiler's final
low-level intermediate code and mapping it onto a finite-state machine. Each
FSM state is one clock cycle. It holds a group of independent
register-transfer statements, so each machine instruction becomes one or more
states. The host processor and these hardware IPs share one address space
and one calling convention. Software calls a hardware function much as it
calls a software one: arguments go in registers and on the stack, the link
register is saved, and the result comes back in memory and registers.

The repository contains hand-written SystemVerilog for the parts of that
model that are concretely specified:

* two example IPs, written the way the compiler's output is organised:
  * `hwip_calc` is the `calculate()` loop, with a separate control unit and
    datapath;
  * `hwip_seq` is a five-instruction block, scheduled for either one or two
    memory ports;
* the multi-port memory they run on;
* a system top that dispatches calls by hardware ID (HWID).

It is not the compiler. It shows, cycle by cycle, what the compiler's output
looks like and how it behaves.

## 1. Anatomy of a compiled function

Every IP is built from two parts.

**Control unit.** It holds the state variable `pc`, which acts as the IP's
program counter. It has two processes:

* A combinational process names the next state `nx_pc` from the current
  state. Only jumps and compares live here. A conditional branch is a
  `successor[k]` bit, computed from a datapath register, that picks one of
  two targets for state `k`.
* A clocked process commits the move: `pc <= mem_stall ? pc : nx_pc`.

**Datapath.** It holds every value register and every memory-port output.
Registers are named after the machine registers they were allocated to
(`reg0` is the link register, `reg12`/`reg13` the first two argument
registers). In each state the datapath performs that state's statements. All
assignments are non-blocking, so a register can be read and updated in the
same state. For example, `addr0 <= reg9; reg9 <= reg9 + 4;` sends the old
pointer and advances it in one cycle. Read and write strobes go back to 0 in
every state that does not set them.

**Stalls.** When the memory raises `mem_stall`, both parts freeze: `pc`, the
registers and the port outputs all keep their values. A state that contains
memory accesses therefore lasts until the memory has served them, and
nothing else needs a handshake.

**Framing states.** State 0 is an inserted start state: the IP waits there
for `enable` and copies its arguments. After the body comes a finish state,
where `finish` is high for one cycle. Then comes a hold state, where the IP
stays while `enable` remains high. Dropping `enable` returns it to state 0,
so it can be called again.

## 2. The memory port protocol

This is the part that is easiest to get wrong. All IPs, the host ports of the
top and the memory use the same port protocol. Each port carries a
`mem_req_t` (byte address, `read`, `write`, 4 byte enables), plus `wdata` and
`rdata`. Requests are registered outputs of the requester: the state that
*issues* an access assigns them, so they are visible during the *next*
state.

```
state:        S (issue)         S+1 (request visible)          S+2
load  :       addr<=a; read<=1  [mem_stall=1] ... rdata valid   -
                                 -> reg <= rdata at end of S+1
store :       addr<=a; write<=1 wdata<=value                    wdata on the port;
                                                                memory writes it
```

* **Reads.** The memory returns `rdata` in the last cycle of the request. It
  holds `mem_stall` high until then, and the requester consumes the data in
  that same state. `multiport_mem` reads its array synchronously, so every
  state with reads lasts exactly two cycles.
* **Writes.** Write data follows the request by one state. The memory takes
  the address and byte enables at the end of the unstalled request cycle, and
  the data in the next cycle. This lets the scheduler issue a store's address
  in the same state as the instruction that computes the stored value.
  `hwip_seq` does exactly this: the `st.w` address goes out beside the `rsh`
  that produces the data.
* **Forwarding.** A read captured in the same cycle as a pending write's data
  sees the written bytes. A store followed by a load of the same word
  therefore keeps program order.

## 3. One port versus two: `hwip_seq`

The block is

```
1. rsh  r7, #2      2. st.w (r8+4), r7      3. ld.w r4, (r0)
4. add3 r0, r8, r0  5. mult r7, r3, r3
```

| state | one port (`MEM_PORTS=1`) | two ports (`MEM_PORTS=2`) |
|---|---|---|
| 1 | `r7>>=2`; store address on port 0 | `r7>>=2`; store address on port 0; load address on port 1; `r0=r8+r0` |
| 2 | store data; load address on port 0; `r0=r8+r0`; `r7=r3*r3` | store data; `r7=r3*r3`; `r4=rdata1` |
| 3 | `r4=rdata0` | finish |
| 4 | finish | hold |

With the memory's one-cycle read stall, `finish` comes 5 cycles (one port)
or 4 cycles (two ports) after the enable cycle.

The store and the load are independent only if `r0 != r8+4`. The two-port
schedule relies on that, as a compiler does once it has proved the addresses
differ. If they do alias, the two-port version loads the old word. The
one-port version keeps program order either way. The testbench exercises both
cases.

## 4. The `calculate()` IP

```c
void calculate(int bound, int *coefficient, int scale)
{ for (i = 0; i < bound; i++) Out[i] = (history[i] * coefficient[i]) >> scale; }
```

`Out` and `history` are global pointers. Software fills them at run time
(for example with `malloc`). Their own addresses, `0xBB8` and `0xBB4`, are
fixed at compile time from the software symbol table.

**Inputs.**

* `bound` arrives in `r12`.
* `coefficient` arrives in `r13`.
* `scale` is passed on the stack.
* The link register `r0` is saved on entry and restored on exit.

| state | block | work |
|---|---|---|
| 0 | start | wait for `enable`; take r0, r12, r13, SP |
| 1 | BB2 | push r0: write request at SP-4 |
| 2 | BB2 | push data; SP -= 16; branch: `bound <= 0` → 11, else 3 |
| 3 | BB3 | load `Out` pointer (port 0) and `scale` from SP+20 (port 1) |
| 4 | BB3 | reg11 = Out, reg23 = scale; load `history` pointer |
| 5 | BB3 | reg9 = history |
| 6 | BB4 | load history[i] (port 0), coefficient[i] (port 1); advance both pointers |
| 7 | BB4 | take both elements |
| 8 | BB4 | multiply |
| 9 | BB4 | arithmetic shift by scale; store address Out[i] (port 1); advance; count down r12 |
| 10 | BB4 | store data; branch: count > 0 → 6, else 11 |
| 11 | BB5 | SP += 16; pop r0: read SP+12 |
| 12 | BB5 | r0 = popped value |
| 13 | BB5 | return jump |
| 14 | finish | `finish = 1` |
| 15 | hold | until `enable` drops |

**Stack frame.** The frame is 16 bytes. The saved r0 sits at caller SP - 4,
and the third argument at caller SP + 4, which is SP + 20 after the
adjustment.

**Timing.** With a one-cycle read stall, each loop iteration takes 6 cycles.
`finish` comes `12 + 6*bound` cycles after the enable cycle, or 7 cycles if
the loop is skipped.

**Module split.** The control unit (`hwip_calc_ctrl`) and the datapath
(`hwip_calc_dp`) are separate modules. They share their state numbering
through `hwip_calc_pkg`.

## 5. The system: calls by HWID

A hardware function has no address; software names it by its HWID.
`gcc2v_system` decodes the HWID, enables the chosen IP and returns the
results:

**Calling.** The host pulses `call_valid` with:

* `call_hwid`;
* its register window `call_regs` (r0..r15);
* its stack pointer `call_sp`.

The chosen IP sees `enable` in the next cycle.

**Returning.** When the IP finishes, the system pulses `done` one cycle
later, with the window updated (`ret_regs`) and the stack pointer (`ret_sp`).
An unknown HWID returns at once with `call_err`.

**Port ownership.** Host and IPs never run at the same time, so there is no
coherence problem. While an IP runs, it owns all memory ports. Between calls,
the host owns them through `host_req`/`host_wdata`/`host_rdata`. Write data
is routed by the owner of the *previous* cycle, because it trails its
request. The host must not start a call with a memory access of its own
still open; an assertion checks this.

| HWID | IP |
|---|---|
| 1 | `hwip_calc` |
| 2 | `hwip_seq` (two-port schedule) |

## 6. `multiport_mem`

**Structure.** One array of 32-bit words with `NPORTS` full read/write ports
(the model was evaluated with 1, 2, 4 and 8). Each port has byte enables,
and there is one common `mem_stall`.

**Behaviour.**

* A port's read stalls exactly one cycle, like a block RAM with a registered
  read.
* Writes never stall.
* If several ports write one word in the same cycle, the highest-numbered
  port wins each byte.
* The array has no reset.

The default is 4 ports × 4096 words. The top instantiates it with 2 ports,
the number the example IPs were scheduled for.

## 7. What is this design's own choice

The following come from the GCC2Verilog description:

* the state-machine form: two-process control unit, `successor` compares,
  `pc <= mem_stall ? pc : nx_pc`, finish and hold states;
* the datapath rules: non-blocking statements, strobes defaulting to 0;
* the one- and two-port schedules of `hwip_seq`;
* in `calculate()`: the register use, the pointer addresses `0xBB4`/`0xBB8`,
  the SP+20 argument and the state-6 statements;
* HWID-based calling.

The following were chosen here:

* **Loop body arithmetic.** The exact arithmetic of the `calculate()` loop
  body (multiply, then arithmetic shift by `scale`). The source describes it
  only as "calculating a value".
* **States 7–13 and 16-byte frame.** The split of the remaining
  `calculate()` work over states 7–13, and the 16-byte frame.
* **Pushed registers.** Only r0 is pushed. The host's list of caller-saved
  registers is not known.
* **Memory timing.** The one-cycle read stall, write forwarding, the
  write-priority rule and the memory depth.
* **Call interface.** The call/done handshake, the 16-register window, the
  HWID values and width, and the error response.
* **Hold state.** Leaving the hold state when `enable` drops.

**Not built.**

* The host processor, which is not specified.
* Hardware calling back into software functions (for example `printf`,
  `malloc`, or library floating point). Only its return-address rule is
  known: HWID combined with the current state.
* The benchmark IPs, whose source code is not available.

Testbenches play the host.

## 8. Files

| file | contents |
|---|---|
| `rtl/gcc2v_pkg.sv` | widths, `mem_req_t`, HWIDs, register-window size |
| `rtl/hwip_calc_pkg.sv` | `calculate()` state numbers, pointer addresses, frame constants |
| `rtl/multiport_mem.sv` | N-port memory |
| `rtl/hwip_calc_ctrl.sv`, `rtl/hwip_calc_dp.sv`, `rtl/hwip_calc.sv` | `calculate()` IP |
| `rtl/hwip_seq.sv` | five-instruction IP, `MEM_PORTS` = 1 or 2 |
| `rtl/gcc2v_system.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_mem.sv` | behavioural memory for the IP unit tests: adjustable read stall, direct array access |

## 9. Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each has a watchdog. For example, the end-to-end test at the
default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/gcc2v_pkg.sv rtl/hwip_calc_pkg.sv tb/tb_gcc2v_system.sv \
  --top-module tb_gcc2v_system -o sim
./obj_dir/sim
```

Replace the testbench name to run the others: `tb_multiport_mem`,
`tb_hwip_seq`, `tb_hwip_calc`, `tb_hwip_calc_ctrl`, `tb_hwip_calc_dp`. Each
finishes in well under a second.

**What is checked.**

* **Results.** Every result is compared with a value computed in the
  testbench from the C semantics.
* **Cycle counts.** The counts given above are checked.
* **Longer stalls.** The datapath unit test runs on a memory with a
  two-cycle read stall, so freezing across several stalled cycles is covered.
* **System test.** This is the default-size, end-to-end test. It counts, and
  requires at least once:
  * a call to each IP;
  * an unknown HWID;
  * stalls while an IP runs;
  * both directions of the loop branch;
  * the stack push and pop;
  * a host access on the second port.
