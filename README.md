# Adaptive fault-tolerant PR SoC: data processing region

SRAM FPGAs in orbit collect configuration upsets (SEUs) at a rate that rises
and falls with orbital position: high near the South Atlantic Anomaly,
lower near the poles, almost nothing elsewhere. A design that is triple
modular redundant all the time pays for the worst case everywhere.
This design makes the amount of redundancy a run-time choice. The FPGA
has a row of partially reconfigurable regions (PRRs). Software on the
control processor loads one, two or three copies of each processing
module into them as the SEU rate crosses two thresholds:

| SEU rate (per day)           | mode                | copies per module |
|------------------------------|---------------------|-------------------|
| below a power-save threshold | power saving        | 0 (software only, all PRR clocks off) |
| below 2.0                    | low reliability     | 1 |
| 2.0 to 8.0                   | medium reliability  | 2 (compare) |
| above 8.0                    | high reliability    | 3 (majority vote) |
| any, with self-checking (ABFT) modules | hybrid    | 1 for ABFT modules, 1/2/3 for the others |

The software votes on the copies' results. It repairs a copy that
disagrees by scrubbing its region, and it refreshes every region
periodically. PRRs that hold nothing have their clocks stopped.

This repository holds the hardware that makes that possible. It is the
data processing region of one reconfigurable streaming block:

* PRR slots, each with its own gated local clock;
* the FIFO links that carry a module's input and output streams to and
  from the processor;
* a streaming dataflow controller in front of every module;
* I/O modules for external pins;
* a linear switch array for module-to-module streams.

The processor, its bus, the configuration port and the reliability
software are not RTL here. Their connections are ports of the top module.
The end-to-end testbench plays their part.

## Structure

```
            clk_sys domain                         clk_src[i] domain (gated)
 GPIO ──► PRSocket i (DCR) ─clk_en,div─► clock gate/divider ────► PRM clock
                        └─prr_rst──► reset sync ─────────────► PRM / controller reset
 MicroBlaze FSL write ──► consumer FSL (async FIFO) ──► dataflow ──► PRM input
 MicroBlaze FSL read  ◄── producer FSL (async FIFO) ◄── controller ◄── PRM output
 switch i ◄──────────► module interface (two async FIFOs) ◄─────► PRM SCORES stream

 SCORES array:  SW0 ─ SW1 ─ SW2 ─ ... ─ SW(N_PRR) ─ SW(N_PRR+1) ...
                IOM0  PRR0  PRR1         PRR(N-1)   IOM1
```

| file | what it is |
|------|------------|
| `rtl/aft_pkg.sv` | shared types: controller states, SCORES channel word, DCR field positions |
| `rtl/aft_pr_soc.sv` | top: N_PRR PRR slots, N_IOM IOMs, N_PRR+N_IOM switches |
| `rtl/prr_slot.sv` | one PRR: PRSocket, two FSLs, dataflow controller, module interface |
| `rtl/dataflow_ctrl.sv` | the five-state stream controller in front of each module |
| `rtl/fsl_async_fifo.sv` | FSL: gray-pointer asynchronous FIFO, first-word fall-through |
| `rtl/prsocket.sv` | DCR register, clock gate, reset for one PRR or IOM |
| `rtl/lcd_clock_gate.sv` | latch-based glitch-free clock gate with a power-of-two divider |
| `rtl/module_interface.sv` | module ↔ switch clock crossing |
| `rtl/scores_switch.sv` | one switch of the SCORES array |
| `rtl/io_module.sv` | external pins ↔ SCORES |
| `rtl/rst_sync.sv` | reset synchroniser |

Top-level parameters and their defaults:

* `N_PRR = 4`: the evaluated SoC had four PRRs.
* `N_IOM = 2`.
* `DW = 32`: the architecture fixes the stream width at 32 bits.
* `NCH = 2`: one-way channels between neighbouring switches.
* `FSL_DEPTH = 16`.
* `MI_DEPTH = 16`.
* `NMCH = 1`: channels each way between a module and its switch.

NCH, NMCH and the two depths are this design's choices.

## The dataflow controller

This block is the hardest to follow, and the one most closely tied to
the source design. Each PRR's module sees a small handshake:

| signal | dir (at controller) | meaning |
|--------|-----|---------|
| `ce` | out | PRM clock enable: a rising edge with `ce=1` is one PRM *step*; `ce=0` freezes the PRM |
| `start` | out | on a step, `input_data` carries a word to load |
| `input_data` | out | the head word of the consumer FSL |
| `rfd` | in | PRM ready for data |
| `done` | in | PRM output will be valid on the next cycle |
| `dv` | in | `output_data` is valid now; it is taken by the next step |
| `output_data` | in | PRM result word |

The controller has five states. It keeps the module stepping while input
is there and output has somewhere to go:

* **Idle**: waits for the consumer FSL to hold a word.
* **Read_Data**: loads one word per cycle. The module produces nothing
  yet. On the step where `done` is set, the first result appears on the
  next cycle, so the controller moves to Read_Write_Data.
* **Read_Write_Data**: the steady state. Every cycle one word goes in
  and one result comes out. A continuous stream runs at one word per
  clock, and the testbench checks this.
* **Stall**: the producer FSL is full. The module is frozen (`ce=0`).
  The controller returns to Read_Write_Data when there is space again.
* **Write_Data**: input has run out, or `rfd` fell. The module is
  stepped without input to drain its results. When `dv` falls, the
  controller goes back to Idle.

It is built on one invariant: the module takes a step only when no word
can be lost or invented. It loads input only when the FSL holds a word.
A step with `dv=1` happens only when the producer FSL can take the
result. Assertions in the module check the FSL side of this.

The states and transitions follow the original state graph. The guards
differ in a few places:

* In the graph, the exit to Write_Data names the *producer* FSL being
  not ready, which overlaps the exit to Stall. Here it fires when the
  *consumer* FSL is empty or `rfd` is low, and Stall takes priority.
* The Idle→Read_Data edge does not step the module.
* The step on the Read_Data→Read_Write_Data edge also pops the word it
  loads.
* `ce` and `start` stay high in the Read_Write_Data self-loop. The graph's
  rule that unlisted outputs are 0 would otherwise freeze the module in
  mid-stream.

The outputs are Mealy, combinational from state and FSL/PRM flags. A
module must therefore not make `rfd`, `done` or `dv` depend
combinationally on `ce` or `start`.

One consequence matters to anyone who writes a module for a PRR.
Write_Data ends as soon as `dv` is low. A module must deliver the results
it has finished back to back, or the rest waits in it until the next
input burst pushes them out. A frame-based module (an FFT, say) needs
whole frames: words of a partial frame stay inside until the frame is
completed.

## PRSocket and the DCR

Every PRR and every IOM has a PRSocket. It holds a 32-bit device control
register, written by the processor's GPIO (`*_dcr_we`, `*_dcr_wdata`) and
readable on `*_dcr_q`. It resets to zero.

| bits | field | effect |
|------|-------|--------|
| 0 | CLK_EN | local clock of the PRR runs (gate opens/closes within 3 source cycles, always at a low phase) |
| 1 | PRR_RST | holds the dataflow controller and the PRM in reset: used while a region is reconfigured or scrubbed |
| 2 | MI_EN | the module interface passes words |
| 3..17 | switch routing | five 3-bit selects for the PRR's switch (with NCH = 2, NMCH = 1); wider for more channels |
| 30..31 | DIV | local clock = source clock / 2^DIV (1, 2, 4 or 8); change only while CLK_EN is 0 |

The field layout is this design's own. The original architecture only
says that the DCR carries the control of switch, region, IOM and module
interface.

Clocks and resets:

* Each PRR runs on its own source clock `clk_src[i]`, of any frequency or
  phase, through the gate. The gate can also divide it: a counter on
  the source clock lets one whole pulse through in every 2^DIV, so the
  local clock keeps the source's high time and stretches its low time.
* While the region's module reset is asserted the gate is held open,
  whatever CLK_EN says. Every flop in the region is therefore clocked
  while in reset, including at power-up, when CLK_EN is still 0. All crossings to `clk_sys` go through the
  asynchronous FIFOs.
* The FSLs and module-interface FIFOs are reset only by the system reset.
  PRR_RST therefore never puts their two sides out of step.
* Words still queued in a PRR's FSLs survive a PRR reset. Software
  should drain them after a scrub.

## SCORES switches, module interfaces and IOMs

Modules stream to each other over a linear array of switches, one per
module. Neighbouring switches are joined by NCH one-way channels in each
direction. Each PRR has NMCH channels to and NMCH from its switch, each
with its own module interface. An IOM uses the first of them.

* Each switch output is a register. It is loaded every `clk_sys` cycle
  from the input named by its select (3 bits at the defaults):
  * 0: idle;
  * 1–2: west inputs;
  * 3–4: east inputs;
  * 5 to 4+NMCH: the module's output channels;
  * higher codes: idle.
* The selects are ordered east_out[0], east_out[1], west_out[0],
  west_out[1], to_mod[0..NMCH-1], from DCR bit 3 upwards. The select
  width grows with NCH and NMCH; the field must end below bit 30.
  With the defaults it is five 3-bit selects.
* A word advances one switch per cycle.
* There is no flow control on the channels. A module interface drops a
  word that finds its receive FIFO full, and sets a sticky overflow bit
  (`prr_mi_overflow`, `iom_mi_overflow`).
* Switches run on `clk_sys`. A route through a PRR whose clock is
  stopped therefore keeps working.

An IOM registers words from its input pins (`iom_pin_in_valid/data`,
synchronous to `clk_sys`) and puts them on its switch. Words it receives
leave on `iom_pin_out_valid/data`, one per cycle.

The switch internals, the select encoding and the absence of
back-pressure are all this design's choices. The original names the
switch array and its parameters but gives no insides for it.

## What the software layer does with this

In the source design, the reliability policy is C code on the MicroBlaze.
It is not in this RTL. The end-to-end testbench, `tb/tb_aft_pr_soc.sv`,
implements the policy against the hardware ports so that the hardware is
exercised the way it is meant to be used. It:

* picks a mode from the SEU rate;
* loads copies of a module into PRRs, holding each PRR in reset through
  its DCR while the behavioural module is swapped;
* stops the clocks of unused PRRs, and of all PRRs in power-saving mode,
  and checks that they stop;
* runs one PRR at half its source clock rate through the DIV field;
* streams frames through the FSLs, votes on the copies and checks the
  voted words against a reference;
* injects upsets into one copy, checks that the vote catches them, and
  scrubs the PRR;
* refreshes all PRRs every few rounds.

The testbench also computes the normalised PRR utilisation metric
P_nru from the PRRs the hardware reports as clocked:

```
P_free   = P_av - P_used
P_usable = P_free if P_free % P_req == 0 and P_free/P_req >= 1
           P_req  if P_free % P_req == 1 and P_free/P_req >= 1
           0      otherwise
P_nru    = (P_usable + P_req) / P_av
```

It checks the expected values for four PRRs: 1, 1 and 0.75 for one, two
and three copies. A SoC that always uses three copies gets 0.5, 0.5 and
0.75.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_dataflow_ctrl` | continuous stream at one word per cycle; random gaps on both FSLs and on `rfd`; reset mid-stream; every state visited; word-exact results against a reference |
| `tb_fsl_async_fifo` | two clock ratios, random traffic, exactly DEPTH words accepted, ordering, reset |
| `tb_lcd_clock_gate` | no edges while disabled, full-width pulses only, enable latency, division by 2/4/8, gate held open by reset |
| `tb_prsocket` | DCR read-back and fields, clock on/off, divided clock, clock held on by PRR reset, PRR reset vs system reset |
| `tb_module_interface` | both directions across clocks, enable, overflow flag |
| `tb_scores_switch` | every select against a reference with two module channels, idle codes, reset |
| `tb_io_module` | pins to switch and back, overflow |
| `tb_aft_pr_soc_mch` | two PRRs with two module channels each: two SCORES streams at once, one through an echo on channel 1, one into channel 0; order, completeness, unused channels idle |
| `tb_aft_pr_soc` | whole region at default parameters, as described above; every mode, every controller state, upset detection, majority masking, PRR and periodic refresh, clock gating, a divided local clock (PRR2 at half its source rate, edge count checked) and the SCORES route are counted and must all occur |

`tb/prm_model.sv` is a behavioural stand-in for the frame-based FFT
modules. It loads a frame of `frame_len` words (1024, 512, 256 or 128 in
the end-to-end test), then outputs the frame reversed with a key added.
It can be told to corrupt one output bit until its next reset, to
emulate an upset.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_aft_pr_soc -y rtl -y tb +libext+.sv -Irtl \
    rtl/aft_pkg.sv tb/tb_aft_pr_soc.sv
./obj_dir/Vtb_aft_pr_soc
```

Replace the top-module name and file for the other testbenches. The
testbench delays have no unit of their own, so give the 1 ns time unit
as above. In a two-state simulator every flop starts at a random value
until reset reaches it; `+verilator+rand+reset+2 +verilator+seed+N` on the
simulation command line picks those values, and all testbenches pass
for any seed tried. The end-to-end run takes a few
seconds.

## Limits and departures

* The processor, bus, configuration port, memory controllers, UART,
  network and the processing modules themselves are not included.
  Partial reconfiguration is emulated in the testbench.
* PRR clock frequency is set only by dividing the region's source clock by
  1, 2, 4 or 8. Other frequencies would need FPGA clock managers, which
  are not included. Each PRR takes its source clock from outside.
* The original signal table gives the two data buses of the dataflow
  controller the opposite directions from its state graph. The RTL
  follows the state graph and the FSL directions: the consumer FSL's
  head word feeds the module input, and the module output feeds the
  producer FSL.
* The switch count differs from the sample layout. That layout puts five
  modules on four switches; here every module has its own switch.
* The dataflow-controller guards differ from the original state graph as
  listed in that section.
* The clock gate is a latch-based gate in fabric logic. An FPGA
  implementation would map CLK_EN to a dedicated clock buffer enable
  instead.
* Lint reports the reset synchronisers' first flop as both
  asynchronously reset and clocked. This is intended.
