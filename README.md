# Hardware templates with a RAM-based reprogrammable FSM

A *hardware template* is a circuit that is built once and then turned into
different application circuits by rewriting memory, not by re-synthesis. The
template splits a design into a datapath, which holds the operations an
application area needs, and a control unit, which sequences them. The control
unit is a **reprogrammable finite state machine (RFSM)**: a state register
plus a cascade of small RAMs that compute the next state and the outputs.
Loading other RAM contents gives another control algorithm on the same
hardware. A **reconfiguration handler (RH)** does that loading: after reset it
copies a program from a memory block into the RFSM's RAMs and then starts the
RFSM.

This repository holds SystemVerilog for the RFSM, the RH, and the worked
example of the approach: a circuit that counts the ones in an 8-bit vector.
The same circuit, loaded with a different 56-word program, counts zeros
instead. That case is included as a test.

## The cascaded RFSM (`ram_fsm`)

The hard part of the design is how a next state is computed from RAMs only.
A plain RAM-based FSM would address one RAM with `{state, all inputs}`. Its
size doubles with every input. The cascaded RFSM avoids that. It splits each
transition into at most `G` binary tests, one per *level*:

```
             +------------------- level 1 ------------------+   +---- level 2 ----+
 state ----->| mux RAM 1 [state] -> index i1                |   |                 |
  (R bits)   | bit b1 = x[i1]                               |   |  same, with     |
     ^       | level RAM 1 [{state, b1}] -> dummy state d1  |-->|  d1 in, d2 out  |--+
     |       +----------------------------------------------+   +-----------------+  |
     +---- state register (R flip-flops, async clear) <------------------ d2 = next --+
 state ----> output RAM [state] -> y   (Moore outputs)
```

* Each level gets an R-bit code: the current state for level 1, the previous
  level's result for the others.
* Its **mux RAM** (`2**R` words of `clog2(L)` bits) says which of the `L`
  inputs this code tests. A multiplexer picks that input.
* Its **level RAM** (`2**(R+1)` words of `R` bits), addressed by
  `{code, tested bit}`, gives the code passed on.
* The code leaving the last level is the next state. The codes between
  levels are **dummy states**. They need not be real states. They record
  "which branch has been taken so far", and they are never stored in the
  register. A state that does not need a test at some level maps to itself
  there.
* The **output RAM** (`2**R` words of `N` bits) is read by the current
  state. So the outputs are Moore outputs, and they change with the state.

All RAMs write synchronously and read combinationally, so one transition,
through every level, takes one clock cycle. With the defaults `L=8`, `R=3`,
`N=4`, `G=2`, the RFSM runs any machine that has at most 8 state codes (real
and dummy together), 8 inputs and 4 outputs, and that decides each
transition with at most two input tests.

Write port: `we_a[g-1]` and `wem_a[g-1]` enable the level RAM and the mux RAM
of level `g`, and `weo` the output RAM. All RAMs share the data `di` and the
address `ar`. `ar` is `R+1` bits wide. The level RAMs use all of it, and the
smaller RAMs use its low `R` bits.

## The ones-counting example (`ht_count_ones`)

The algorithm, as a Moore machine over the datapath's commands and flags:

| state | outputs | meaning | next |
|---|---|---|---|
| a0 | y1 | copy `count_ones` to `result` | a1 |
| a1 | y2 | clear `tmp`, `count_ones` | x1 ? a0 : (x2 ? a3 : a2) |
| a2 | y3 | `tmp++` | same as a1 |
| a3 | y3, y4 | `tmp++`, `count_ones++` | same as a1 |

Here `x1` means "all 8 bits tested" (`tmp > 7`) and `x2` is `in_vector[tmp]`.
Level 1 tests `x1`. It sends a0 to a1 without a test, and it sends a1..a3 to
a0 on `x1=1` or to dummy state a4 on `x1=0`. Level 2 tests `x2` in a4, which
gives a3 on a one and a2 on a zero. It passes the real states through
unchanged. The codes are a0..a4 = 0..4. `x1` enters the RFSM on input 1 and
`x2` on input 2. Input 0 is tied low.

The datapath (`count_ones_datapath`) acts on the **falling** clock edge and
the RFSM on the rising edge. So in every cycle the datapath carries out the
current state's commands, and the new flags are ready for the next rising
edge. One vector takes `2 + 8 = 10` cycles: a0, a1, then one a2 or a3 cycle
per bit. `result` is loaded at the falling edge inside each a0 cycle
(`y[0]` high). It holds the count of the vector present during the preceding
a1..a3 cycles. The first a0 after reset gives 0. `in_vector` must stay
stable from one a0 falling edge to the next.

## Reconfiguration handler and program format

`reconfig_handler` = `rh_memory` (a table filled from a hex file) +
`rh_controller`. After `reset` is released, the controller reads word 0 to
word `WORDS-1`, one per clock cycle. During that time it holds the RFSM and
the datapath in reset. Then it holds them in reset for one more cycle and
releases them (`ready` goes high). The RFSM's first transition comes
`WORDS+1` rising edges after reset is released: 57 edges by default. Raising
`reset` again at any time restarts the load.

Each 9-bit word is `{WE output RAM, WE mux RAM 2, WE mux RAM 1, WE level RAM
2, WE level RAM 1, data[3:0]}`, with the first field in bit 8. For general
`G` and `N` it is `{weo, wem_a[G-1:0], we_a[G-1:0], di[N-1:0]}`. The word's
address, cut to its low `R+1` bits, is the RAM location written. A program
therefore places each RAM's contents at addresses whose low bits are that
RAM's locations. The ones-counting program (`rtl/rh_count_ones.hex`) uses
this layout:

| words | RAM | contents |
|---|---|---|
| 0-15 | level RAM 1, index `{code, bit}` | 1,1, 4,0, 4,0, 4,0, 4,4, then 0 |
| 16-31 | level RAM 2 | 0,0, 1,1, 2,2, 3,3, 2,3, then 0 |
| 32-39 | mux RAM 1, index code | 0,1,1,1, then 0 |
| 40-47 | mux RAM 2 | 0,0,0,0,2, then 0 |
| 48-55 | output RAM | 1,2,4,C, then 0 |

(Each listed value is the data field. The enable bits select the RAM.)
To change the behaviour, write a new program in this form and pass it
through the `INIT_FILE` parameter. `tb/rh_count_zeros.hex`, for example,
swaps words 24 and 25, so that level 2 goes to a3 on a zero bit.

## Modules

| module | role |
|---|---|
| `rfsm_pkg` | default RFSM shape, word width, signal assignment of the example |
| `rfsm_ram` | RAM with synchronous write and asynchronous read |
| `gen_mux` | L-to-1 multiplexer |
| `prog_mux` | mux RAM + `gen_mux`: the input tested by each code |
| `rfsm_level` | one level: `prog_mux` + level RAM |
| `rfsm_state_reg` | R-bit state register with asynchronous clear |
| `ram_fsm` | register, G levels, output RAM |
| `rh_memory`, `rh_controller`, `reconfig_handler` | program store and loader |
| `count_ones_datapath` | counters, result register, flags of the example |
| `ht_count_ones` | top: RH + RFSM + datapath |

Every module has a self-checking testbench `tb/tb_<module>.sv`. The top's,
`tb_ht_count_ones`, runs the whole design at its defaults, including a
reload in the middle of a vector. `tb_ht_count_zeros` runs it with the other
program. `tb_ram_fsm_shapes` runs the RFSM at a second shape (16 inputs,
4 state bits, 5 outputs, 3 levels). Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

## Simulating

Run from the repository root. Program files are opened by paths relative to
that root.

```
verilator --binary --timing --assert -Irtl -Itb rtl/rfsm_pkg.sv \
    tb/tb_ht_count_ones.sv --top-module tb_ht_count_ones -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All tests finish in well
under a second.

## How this relates to the original description, and what is left out

These parts follow the published design: the split into register, G
levels of mux RAM + level RAM, and output RAM; the parameter names and
defaults (`L=8, R=3, N=4, G=2`, level RAM 16x3, output RAM 8x4); the RH
structure and its 9-bit word format; the 56-word ones-counting program; and
the behaviour of the datapath, including its falling-edge timing.

These are this implementation's own choices, where the description is
silent or unclear:

* The RAMs read combinationally. This is needed for the stated one-cycle
  transitions.
* Level 1 is the level nearest the register.
* The controller's cycle-by-cycle schedule, the extra reset cycle, and the
  `ready` and `state` outputs are additions.
* The datapath is reset together with the RFSM. Its reset also clears
  `result` and the flags.
* `x2` reads 0 once the bit index runs past the last bit.
* The description's general convention puts `x1` in bit 0 of X. Here the
  flags sit on inputs 1 and 2, because the example program's mux RAMs select
  inputs 1 and 2.

These parts of the concept are not implemented:

* Switching between memory *segments* of the RFSM, so that several programs
  are resident at once.
* Loading programs from a host PC over PCI or external ports.
* The datapath of the programmable external-device interface, which is only
  outlined as a block diagram.

Without them, a program is changed by reloading from the RH memory, whose
contents are fixed when the design is built.
