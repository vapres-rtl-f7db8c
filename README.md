# VAPRES streaming fabric in SystemVerilog

VAPRES is an FPGA system-on-chip template for streaming applications that are
assembled at run time. A processor places hardware modules, such as filters,
into partially reconfigurable regions (PRRs). It then wires them together with
point-to-point streaming channels, and it can swap a module for another one
while data keeps flowing. Each PRR runs in its own clock domain, and the
processor picks that clock at run time.

This repository holds RTL for the data processing region of such a system:
- the streaming interconnect,
- the per-region control registers,
- the clock-domain-crossing buffers,
- an I/O module,
- example filter modules that use the module-swapping protocol.

The processor itself is outside the RTL. So are its bus bridge and the FPGA
configuration port. The testbenches play the processor's part.

The default configuration follows the published prototype:
- one reconfigurable streaming block (RSB) with one I/O module (IOM) and two PRRs;
- 32-bit channels, two flowing left and two flowing right between neighbouring switch boxes;
- one input port and one output port per region;
- 512-word FIFOs in every module interface and FSL link.

## Structure

```
vapres_top
 ├─ rsb                        one reconfigurable streaming block, N_SLOTS slots
 │   per slot:
 │   ├─ prsocket               32-bit control register on the DCR bus
 │   ├─ prr_clock              fast/slow clock select + clock enable (model)
 │   ├─ producer_interface     module → fabric, async FIFO   ─┐
 │   ├─ consumer_interface     fabric → module, async FIFO   ─┴─ async_fifo
 │   ├─ fsl_link ×2            r: module → processor, t: processor → module
 │   ├─ slice_macro            isolation of PRR outputs (PRR slots only)
 │   └─ switch_box             one stage of the linear interconnect
 ├─ iom                        slot 0: external pins ↔ fabric, end-of-stream detection
 └─ filter_module ×N_PRR       slots 1..: example modules (filter A, filter B)
```

`vapres_pkg` holds the shared types: the control register layout, the
end-of-stream word and the command opcodes.

Slots are numbered from the left, starting at 0. With the defaults, slot 0 is the IOM,
slot 1 is PRR1 (filter A) and slot 2 is PRR2 (filter B). Each slot's switch box is
called SW0, SW1 and SW2.

## Streaming channels

### Channel words and flow control

A channel carries words of W+1 bits. The extra most significant bit means
"valid". The producer interface sets it only in a cycle where it actually
pops a word from its FIFO. It pops only when three things hold:
- the FIFO is not empty;
- the slot's `FIFO_ren` bit is set;
- the feedback bit coming back along the channel is low.

On idle cycles the word is all zeros. At the far end, the consumer interface
registers the word. It writes the data into its FIFO when the valid bit and the
slot's `FIFO_wen` bit are both set.

There is no per-word handshake. Words simply move forward one register per
switch box on every switch clock. Flow control is a single feedback bit per
channel. It runs backwards through one register per switch box. The consumer
raises it early, while there is still room for everything that can be in
flight. That room is `2*MAX_HOPS + 6` free words, with `MAX_HOPS` equal to the
number of slots. In the worst case, a word is read every clock until the flag
reaches the producer:
- d switch boxes forward and d backward;
- plus the consumer's input register, its registered FIFO flag and some margin.

A word that still arrives at a full FIFO is dropped and flagged on `c_overflow`.
The testbenches check that this never happens.

Latency: the producer pops a word in clock 0. The consumer FIFO writes it d+1
switch clocks later, where d is the number of switch boxes on the path.
`tb_rsb` measures 4 clocks for a path through 3 boxes. Throughput is one word
per switch clock per channel.

### Switch box and multiplexer settings

A switch box has one register on each input port and one multiplexer on each
output port. With KR right-flowing and KL left-flowing channels, KO producer
ports and KI consumer ports, the ports are numbered as follows.

| index | input port                                 | output port                              |
|-------|--------------------------------------------|------------------------------------------|
| 0..KR-1 | right-flowing channel arriving from the left | right-flowing channel leaving to the right |
| KR..KR+KL-1 | left-flowing channel arriving from the right | left-flowing channel leaving to the left |
| KR+KL.. | producer interface k of this slot        | consumer interface k of this slot        |

Each output has a select field `clog2(inputs+1)` bits wide in the 24-bit
`MUX_sel` field of its slot's control register. Output o uses bits
`[o*SELW +: SELW]` of `MUX_sel`. A value of 0 sends idle words; a value of v
forwards input v-1.

The feedback bit of an input is the OR of the feedback bits of all outputs
that currently select it. With the defaults, each switch box has 5 inputs and
5 outputs, so there are 5 fields of 3 bits.

To route slot a to slot b (a < b) on right-flowing channel c:
- in SW a, set output c to the producer (`KR+KL+1`);
- in each switch box between them, set output c to input c (`c+1`);
- in SW b, set the consumer output to input c (`c+1`).

Leftward routes work the same way, using indices KR+c. A slot can also loop
back to itself through its own switch box.

When you move a live channel, write the downstream switch box first, and then
the box where the path forks, in a single register write. Words already past
the fork then still have somewhere to go. `tb_vapres_top` does this.

## The PRSocket control register

There is one 32-bit DCR register per slot, at address `DCR_BASE + slot`.

| bits  | field      | effect |
|-------|------------|--------|
| 0     | SM_en      | opens the slice macros: while 0, every signal a PRR drives into the fabric is forced to 0 |
| 1     | PRR_reset  | resets the module in the slot |
| 2     | FIFO_reset | clears the slot's module interface FIFOs |
| 3     | FSL_reset  | clears the slot's two FSL links |
| 4     | FIFO_wen   | lets the switch box write into the consumer interface |
| 5     | FIFO_ren   | lets the switch box read from the producer interface |
| 6     | CLK_en     | enables the slot's clock |
| 7     | CLK_sel    | 1 = fast global clock, 0 = slow global clock |
| 31..8 | MUX_sel    | the switch box multiplexer fields |

The register resets to zero: slice macros closed, clocks off, nothing routed.
The three resets are ORed with the global reset and act asynchronously.

The bus is a simplified DCR slave:
- a write with a matching address loads the register;
- a read with a matching address returns it on the same cycle, and the output is 0 otherwise;
- `dcr_ack` pulses the cycle after any access to the socket's address.

## Local clock domains

Every slot, the IOM included, gets its clock from `prr_clock`. That block
models the vendor clock multiplexer and the regional clock buffer. It uses a
glitch-free two-input multiplexer and a clock enable sampled while the clock is
low.

Module interfaces and FSL links are dual-clock FIFOs. These are the only
crossings between a slot's clock and the static clock (the switch boxes, the
DCR and the processor side of the FSLs). They use Gray-code pointers with
two-flop synchronizers, so their full and empty flags are pessimistic by a few
clocks.

## Swapping a module without stopping the stream

The example modules and `tb_vapres_top` implement the swap procedure. Filter A
(PRR1) is replaced by filter B (PRR2) while the IOM keeps streaming.

1. Routes p0→c1 (IOM to A) and p1→c0 (A to IOM) are set up. PRR2 is held in
   reset with its clock off.
2. Filter A sends monitoring words on its r link. Each word holds the largest
   input in each block of `MON_PERIOD` samples.
3. PRR2 is brought up: clock on, reset released, slice macros open. It then
   receives `CMD_LOAD`, so it waits for its state and does not filter yet.
4. p0 is rerouted to c2: SW2's consumer output first, then SW1. Filter A
   receives `CMD_DRAIN`.
5. Filter A keeps filtering until its consumer FIFO has been empty for
   `DRAIN_IDLE` clocks. It then pushes the end-of-stream word `0xAAAAAAAA`.
6. Filter A then sends its state on r1, with the control bit set: first the
   last sample x[n-1], then its sample count. Filter A then halts.
7. The processor forwards both words to filter B on t2. Filter B starts
   filtering the data already waiting in c2, with the state it was given.
8. The IOM pops the end-of-stream word instead of forwarding it. It writes
   `{16'hE05D, words forwarded}` on r0.
9. p2 is routed to c0 and slot 2's `FIFO_ren` is set. Filter B's buffered
   results start flowing.

No input word is lost or duplicated. The output is filter A's result up to the
switch point and filter B's after it, with no gap in the filter state. The test
checks both.

## The example modules

`filter_module` computes `y[n] = C0*x[n] + C1*x[n-1]` in 32-bit wrap-around
arithmetic. It pops and pushes in the same clock whenever its input FIFO has
data and its output FIFO has room.

In the top, slot 1 is filter A (C0=1, C1=1) and the other PRRs are filter B
(C0=1, C1=-1). Command words arrive on t with the control bit set and the
opcode in bits 31..28: `CMD_DRAIN` = 1 and `CMD_LOAD` = 2.

`iom` connects a valid/ready input stream to its producer port and its consumer
port to a valid/ready output stream. The end-of-stream word is consumed and
reported, as described above.

Neither module escapes data that happens to equal `0xAAAAAAAA`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/vapres_pkg.sv tb/tb_vapres_top.sv \
  --top-module tb_vapres_top -Mdir obj && obj/Vtb_vapres_top
```

`tb_vapres_top` runs the whole swap at the default sizes: 3000 words, 512-word
FIFOs. The external sink stalls in long stretches, so the feedback has to stop
the producers. PRR1's clock also switches from slow to fast mid-stream. The
test counts each of these mechanisms and fails if one never happens. It takes
a few seconds.

`tb_vapres_chain4` builds the four-PRR block (`N_PRR=4`). It chains four
filters, IOM → PRR1 → PRR2 → PRR3 → PRR4 → IOM, with alternating slow and fast
clocks. The result returns to the IOM across four switch boxes, and every output
is compared with a reference model of the four filters in series.

`tb_rsb` exercises three simultaneous channels: a rightward, a leftward and a
loop-back channel. It also tests slice-macro isolation, module clock periods,
FSL traffic in both directions and the channel latency.

Flops on module clocks use asynchronous reset. When a slot's clock is off
during reset, a simulation needs a rising edge on `rst` for them to reset. The
testbenches start with `rst` low and raise it after 1 ns.

## Where this RTL departs from the published design, and its limits

- **Partial reconfiguration is not modelled.** Each PRR holds a fixed module. "Loading" a
  module means releasing its reset, enabling its clock and opening its slice
  macros. The ICAP, the bitstream storage and the reconfiguration times are
  outside the RTL.
- **Early-full threshold.** The published rule sets the threshold from the FIFO size and
  the hop count d, with the in-flight words on the round trip being about 2d.
  This RTL uses the worst-case d of the block plus 6 words of margin, so the
  threshold does not depend on the route.
- **Own choices.** The following are this design's own: the multiplexer select
  encoding, letting every output multiplexer choose any input of its box, the
  port numbering, the DCR handshake and addressing, and the register's reset
  value. So are the FSL control-bit convention, the filter
  function, the command opcodes, the drain rule and the IOM message format.
- **FIFOs.** The FIFOs are first-word-fall-through. The array has one write port and one
  registered read port, addressed by the next read pointer, so it maps onto a
  dual-port block RAM.
- **`prr_clock` is a behavioural model.** It stands for FPGA clock primitives. Its clock enable is
  a latch, which is intended. The DCM/PMCD clock generators are not included:
  the fast and slow clocks are inputs.
- **Fixed modules.** The slot-to-module assignment in `vapres_top` is fixed at elaboration. The
  `rsb` block itself takes any slot count and any KR, KL, KI and KO, as long as
  the multiplexer fields fit in 24 bits.
