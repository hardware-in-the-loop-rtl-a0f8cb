# Hardware-in-the-loop simulator of a cellular H-bridge inverter — programmable-logic RTL

A cellular H-bridge (CHB) inverter builds a medium-voltage motor drive out of
low-voltage cells: each motor phase is a series string of cells, and each cell
is a three-phase diode rectifier fed from its own transformer secondary, a
DC-link capacitor and a single-phase H-bridge. A hardware-in-the-loop (HIL)
simulator computes such a converter in real time so that its controller, or a
monitoring model on a host PC, can be tested against it without high voltage.

This RTL is the programmable-logic half of such a simulator on a Zynq-7000
class device. The converter is computed in 32-bit fixed point (Q16.16), one
time step per period of a hardware timer (3 us at a 10 ns clock). After each
step the hardware copies the step's results into a block RAM and interrupts the
processor; the processor forwards the data to the host, fetches the next inputs
(grid and motor voltages, cell switching states, model gains), writes them into
the model and acknowledges. The processor, its interrupt controller, DDR,
Ethernet and the host software are outside this RTL; the processor's two
AXI master ports appear as two AXI4-Lite slave ports on the top module.

```
 s_axi_cfg ──► axi_interconnect_1 ──► chb_model registers   0x0000-0x0FFF
 (processor)                    └───► hw_timer registers    0x1000-0x1FFF
                hw_timer.start ─────► chb_model
 chb_model (AXI master, archive) ─┐
 s_axi_dat (processor) ───────────┴─► axi_interconnect_2 ──► axil_bram  0x0000-0x0FFF
 chb_model.irq ─────────────────────► irq (to the processor's interrupt controller)
```

## The step handshake (IDL / RUN / RDY)

The one part that needs care is how the free-running timer, the model and the
software share the step. The timer does not wait for anyone: it counts
0, 1, …, L and pulses `start` at each wrap from L to 0 (period L+1 cycles,
reset value L = 299). The model (`chb_ctrl`) has three states:

| state | meaning | leaves on |
|---|---|---|
| IDL | last step finished, `irq` high until acknowledged | `start`: to RUN if the acknowledge already came, else to RDY |
| RUN | solver computing, then archiver writing the BRAM | archive finished: to IDL, raise `irq` |
| RDY | a start arrived before the acknowledge; the step waits | acknowledge: to RUN at once, `irq` cleared |

So one simulation step is always the sequence RUN → IDL → (RDY) → RUN: the
software's acknowledge and the timer's start are both needed, in either order.
When the software is faster than the timer the steps are paced by the timer;
when it is slower (the normal case once network round trips are involved) every
start waits in RDY and the step is launched by the acknowledge. A start that
arrives while a step runs, or while another start already waits in RDY, is
dropped and counted (`MISSED`); starts that had to wait are counted
(`DEFERRED`). The timer period must exceed the step latency; a start during
RUN means it does not.

Software's per-step duty, after `irq`: read the record from the BRAM, write
the next inputs into the model registers, then write CTRL = 0x5 (enable +
acknowledge). Inputs must not be written while the model is in RUN.

After reset the model is IDL with the acknowledge considered received, and
both the timer (CTRL bit 0) and the model (CTRL bit 0) are disabled.

## The converter model

Topology: 3 motor phases × `N_CPP` = 2 cells = 6 cells; cell `c` belongs to
phase `c / 2`. All cells see the same three secondary voltages `vg[a,b,c]`;
the motor is star connected with an isolated neutral, equal leakage
inductance per phase and back EMF `emf[p]`. Each cell's H-bridge is in state
`s ∈ {−1, 0, +1}`, written by software every step (open-loop, precomputed
switching).

One step is an explicit Euler update in which every equation uses the state of
the previous step:

```
rectifier (per cell):  vrect = max(vg) - min(vg)
                       idc'  = max(0, idc + k_lt * (vrect - vdc))      k_lt = dt / (2 L_transformer)
                       input currents: +idc on the highest phase, -idc on the lowest, 0 on the third
H-bridge (per cell):   vout  = s * vdc
                       vdc'  = vdc + k_c * (idc - s * i_phase)        k_c  = dt / C
motor (per phase):     vph   = sum of the phase's cell outputs
                       vn    = (sum vph - sum emf) / 3
                       im'   = im + k_lm * (vph - vn - emf)           k_lm = dt / L_motor
```

The gains are registers, so the time step and the component values can be
changed without rebuilding. Reset values correspond to dt = 3 us,
L = 300 uH (motor and transformer), C = 3 mF: k_lt = 328, k_lm = 655,
k_c = 66 in Q16.16 (the last one carries a 0.8 % rounding error). The DC links
start at 1500 V (`VDC_INIT`), the currents at zero; CTRL bit 1 restores this
state.

**Arithmetic.** Every quantity is a signed Q16.16 word (range ±32768,
resolution 1/65536). Products are formed at 64 bits, shifted right by 16
(rounding toward −∞) and saturated; sums saturate. The helper functions are in
`hil_pkg`.

**Schedule** (`chb_solver`). One rectifier unit and one H-bridge unit are
shared by the six cells, one cell per cycle; then one cycle computes the
neutral voltage and three cycles update the motor phases through one shared
unit. `done` follows `go` by 11 cycles. The archiver then writes the 44-word
record (3 cycles per word with an idle BRAM), so the model raises `irq`
146 cycles after the launching start — inside the 300-cycle period with room to
spare.

**Output record** (word index, also readable at model address 0x100 + 4·k
and archived at BRAM address ARCH_BASE + 4·k):

| words | content |
|---|---|
| 0 | step count |
| 1–3 | motor currents U, V, W |
| 4–6 | phase voltages U, V, W (sum of the cell outputs) |
| 7 | U–V line voltage |
| 8 + 6c + 0…5 | cell c: vdc, vout, idc, input current a, b, c |

With N cells per phase and equal DC links, the phase voltage takes 2N+1 = 5
levels and the line voltage 4N+1 = 9 levels.

## Register maps

Model (`chb_model`, configuration port 0x0000):

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | rw / w1 | bit0 enable; bit1 clear state (write 1); bit2 acknowledge (write 1) |
| 0x04 | STATUS | ro | [1:0] state IDL=0 RUN=1 RDY=2, [2] irq, [3] solver busy, [4] archiver busy |
| 0x08 | STEPS | ro | finished steps |
| 0x0C | DEFERRED | ro | starts that waited in RDY |
| 0x10 | MISSED | ro | starts dropped |
| 0x14 | LATENCY | ro | cycles from the launching start/acknowledge to `irq` of the last step |
| 0x18 | ARCH_BASE | rw | BRAM byte address of record word 0 (reset 0) |
| 0x1C | ARCH_ERR | ro | archive writes answered with an error |
| 0x20–0x28 | VG_A..C | rw | secondary phase voltages |
| 0x2C–0x34 | EMF_U..W | rw | motor EMFs |
| 0x38 | SW | rw | cell switching states, 2 bits per cell (cell c at bits 2c+1:2c, two's complement) |
| 0x3C–0x44 | K_LT, K_LM, K_C | rw | gains |
| 0x100 + 4k | REC[k] | ro | output record |

Register writes take effect only with all four byte strobes set.

Timer (`hw_timer`, configuration port 0x1000): 0x0 CTRL (bit0 enable),
0x4 PERIOD = L, 0x8 COUNT (ro), 0xC number of start pulses (ro).

## Buses

All buses are AXI4-Lite with 32-bit address and data, carried as the packed
structs `axil_req_t` / `axil_rsp_t` from `hil_pkg`. Each slave and
interconnect handles one write and one read at a time; a write is taken when
AW and W are both valid.

* `axi_interconnect_1` — one master to two slaves; address bit 12 selects the
  slave, any address at or above 0x2000 is answered with DECERR.
* `axi_interconnect_2` — the model's archiver (master 0) and the processor's
  data port (master 1) share the BRAM. Writes and reads are arbitrated
  separately, round robin, and a grant is held until the response handshake.
  The processor may read the BRAM while the model archives; it then waits a
  few cycles.
* `axil_bram` — 1024 × 32-bit words (`BRAM_WORDS`), byte strobes honoured,
  synchronous read, addresses wrap.

## Where this design departs from the system it reimplements

* **Model equations.** The original converter model was a Simulink model
  compiled by high-level synthesis; its equations are not available here. The
  ideal-switch, explicit-Euler equations above are this design's own, chosen as
  the simplest ones that reproduce the topology (diode rectifier with
  transformer leakage, DC link, two-level H-bridge, motor with leakage and
  EMF). They do not model diode commutation overlap, phase-shifted transformer
  secondaries or switching dead time. Numerical results will not match the
  original model sample for sample.
* **Latency.** The original implementation took 243 cycles per step with
  heavily shared DSP slices; this one takes 146 (11 compute + archive).
  The step is compute-light here because each cell update is one cycle of
  combinational multiply-add.
* **Unit sharing.** The original shared rectifier and inverter functions across
  a small number of instances. Here one
  rectifier and one inverter unit serve all six cells in turn.
* **Protocol choices.** AXI4-Lite single beats instead of bursts; the register
  and address maps, the level-type IRQ, the missed/deferred counters, the
  reset state and the BRAM size are this design's own.

## Using and changing it

Files: `rtl/hil_pkg.sv` (types, fixed-point helpers, record layout), one module
per file in `rtl/`, one self-checking testbench per module in `tb/`
(`tb_<module>.sv`), plus testbench helpers `axil_tb_master`, `axil_tb_slave`
and the integer reference model `chb_ref_pkg`.

Simulate, for example, the whole design:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/hil_pkg.sv tb/chb_ref_pkg.sv tb/tb_hil_pl_top.sv --top-module tb_hil_pl_top
./obj_dir/Vtb_hil_pl_top
```

Every testbench prints `TB_RESULT checks=N failures=M`. `tb_hil_pl_top` runs
the design at its default parameters for 6800 steps (20.4 ms of simulated
time, one 50 Hz period of grid and motor): it acts as the processor software,
compares every archived record with `chb_ref_pkg`, and requires that each
mechanism happens — steps launched by the timer, steps waiting in RDY, missed
starts, BRAM contention, a decode error, the rectifier's diode clamp, and all
5 phase and 9 line voltage levels. It finishes in seconds.

To change the number of cells per phase, change `N_CPP` in `hil_pkg` (the
record length, the SW register width and the solver schedule follow; the
switching word holds at most 16 cells) and `NCPP` in `chb_ref_pkg`. The
reference model in the testbenches is written with 64-bit integers and the same
rounding and saturation rules, so any change to the equations must be made in
both places.
