# SOLAR: a self-organizing learning array of PicoBlaze neurons

This is a single-chip array of tiny 8-bit processors used as neurons. Each
neuron runs its own program from a private dual-port memory. Through a
multiplexer it can read any external input and the output of any neuron,
including itself. The neuron's function, its connections and its threshold
are all words of its program. To reshape the network you rewrite program
words. That works one word of one neuron at a time, while every other neuron
keeps running. A host computer trains the network off-chip, loads the result
word by word, feeds in input samples and reads back each neuron's output and
vote.

The default array has 2 rows and 14 layers, so 28 neurons. It has two
external inputs, one per row, and each neuron has a 30:1 input multiplexer.
The same RTL can be built as 4 rows x 7 layers for a four-feature
classifier (see "Reshaping the array").

## Block structure

```
pico_solar (top)
 ├─ host_regs      host register decoder: input registers, strobes, readback
 ├─ cfg_bus_ctrl   configuration word, delayed write enable, neuron select
 └─ solar_neuron × ROWS*LAYERS
     ├─ kcpsm_core   8-bit KCPSM-compatible controller
     ├─ dp_imem      256 x 16 dual-port program memory
     └─ input_mux    registered (ROWS + NN):1 input multiplexer
solar_pkg           shared types, instruction encoding, register map
```

Every neuron sees the same source vector:

| multiplexer port | source |
|---|---|
| 0 .. ROWS-1 | external input registers (the "layer 0" neurons) |
| ROWS + k | output register of neuron k, k = ROWS*(layer-1) + (row-1) |
| anything larger | reads 0 |

For the 2 x 14 array, port 0 is input 1, port 1 is input 2, port 2 is
neuron (1,1), port 3 is neuron (1,2), port 4 is neuron (2,1), and so on up to
port 29.

## How a neuron works

A neuron is a controller with three things around it:

* **Program memory (`dp_imem`).** Port A is the controller's fetch port. It
  is a synchronous read: the word appears one clock after its address. Port
  B is a write port that all neurons share through the configuration bus.
  Each neuron has its own enable on that bus. A write and a fetch of the
  same word in one clock return the old word. At power-up every neuron holds
  the same program: `A000 A101 C014 E000 8100`. That is INPUT s0,00; INPUT
  s1,01; ADD s0,s1; OUTPUT s0,00; JUMP 00, which adds the two inputs.
* **Input multiplexer (`input_mux`).** The select is the controller's
  `port_id`. An `INPUT sX, pp` therefore reads source `pp`. A neuron's
  connections are just the port fields of its INPUT instructions, and
  rewiring it means rewriting those words. The output goes through one
  register stage.
* **Output registers.** An OUTPUT to port 02 loads `vote_out`. An OUTPUT to
  any other port loads `data_out`, the value every other neuron can read.

### Why the registered multiplexer costs no cycles

The controller takes two clocks per instruction. It holds `port_id` valid
for both clocks and samples `in_port` at the end of the second. The
multiplexer's output register is loaded at the end of the first clock,
which is in time. So an INPUT still takes two clocks, and the long 30-input
multiplexer has a full clock period.

The controller's fetch timing is built around the same trick. `address` is
combinational. It shows the current instruction's address in the first
clock and the next instruction's address in the second. The synchronous
memory therefore holds the current instruction word through both clocks.

## The controller (`kcpsm_core`)

This is a KCPSM-compatible 8-bit core. It has 16 registers (s0..sF), zero
and carry flags, a 15-entry call stack, 256 words of program and 8-bit port
I/O. It runs the 49 KCPSM instructions. Every instruction takes two clocks,
so at the 45-46 MHz the original FPGA reached, a neuron runs at about
23 MIPS.

| bits 15..12 | instruction |
|---|---|
| 0..7 | `op sX, kk`: LOAD, AND, OR, XOR, ADD, ADDCY, SUB, SUBCY (= bits 14..12) with the constant kk = bits 7..0 |
| C | `op sX, sY`: the same eight operations, op = bits 2..0, sY = bits 7..4 |
| D | shift/rotate sX. Bit 3 = right. Left: SLA 0, RL 2, SLX 4, SL0 6, SL1 7. Right: SRA 0, SRX 2, RR 4, SR0 6, SR1 7 |
| A / B | INPUT sX, pp / INPUT sX, (sY) |
| E / F | OUTPUT sX, pp / OUTPUT sX, (sY) |
| 8 / 9 | flow control. Bit 12 = conditional; bits 11..10 = Z, NZ, C, NC; bits 9..8 = 01 JUMP, 11 CALL, 00 other. For "other", bits 7..6 = 10 RETURN, 11 RETURNI, 00 ENABLE/DISABLE INTERRUPT, and bit 5 is the new interrupt enable |

Some words as examples: `C014` is ADD s0,s1 and `C016` is SUB s0,s1.
`8010` is DISABLE INTERRUPT, `0Fkk` is LOAD sF,kk, `A003` is INPUT s0,03
and `8100` is JUMP 00.

Flags:

* LOAD, INPUT and OUTPUT leave the flags alone.
* AND, OR and XOR clear the carry.
* For SUB and SUBCY, the carry is the borrow.
* Shifts put the bit shifted out into the carry.

Interrupts work as follows. A request seen while interrupts are enabled
replaces the instruction about to complete. The core pushes that
instruction's address, saves the flags, disables interrupts and jumps to FF.
RETURNI restores the flags and the address. The neurons tie `interrupt`
low.

Reset is synchronous. It clears the pc, flags, stack pointer and interrupt
enable. The register file and the stack are RAM and are not cleared.

## Configuration bus and its timing (`cfg_bus_ctrl`)

The host writes one 29-bit word:

| bits | field |
|---|---|
| 28..24 | neuron select code: code k+2 selects neuron k (0-based, layer-major). Codes 0, 1 and those above NN+1 select none |
| 23..8 | instruction word |
| 7..0 | instruction address |

Clock edges are counted from the edge that takes the host's write:

* edge 1: the word is latched, and the address and data buses change;
* edge 3: the select code has passed two registers;
* edge 4: the write strobe has passed four registers and the selected
  neuron's memory write enable rises;
* edge 5: the word is written.

So address and data are stable for several clocks around the write. **Keep
at least five clocks between configuration writes.**

For the 2 x 14 array, code 2 is neuron (1,1) and code 3 is neuron (1,2).
Code 4 is neuron (2,1), the third neuron, and so on up to code 29 for
neuron (14,2). After reset the select register holds all ones, which selects
no neuron.

## Host register map (`host_regs`)

The top stands in for the board's PCI interface with a plain register bus:
`write_strobe`, `read_strobe`, a 6-bit `address`, 32-bit `wdata` and
`rdata`. Addresses 0 and 1 belong to that interface and are not decoded.

| address (2 x 14) | general | access | meaning |
|---|---|---|---|
| 2, 3 | 2 + r | write / read | external input r (8 bits) |
| 4 | 2 + ROWS | read | programme reset: every neuron restarts at address 0. Memories and host registers are kept |
| 5 | 3 + ROWS | write | configuration word (above) |
| 12, 13, 15, 14, 10, 11, 9, 8, 24, 25, 27, 26, 30, 31, 29, 28, 20, 21, 23, 22, 18, 19, 17, 16, 48, 49, 51, 50 | gray(k + 8) | read | output of neuron k = (1,1), (1,2), (2,1), ... (14,2) |

The neuron addresses look scattered, but they are simply the Gray code of
8, 9, ..., 35. Readback is an AND-OR multiplexer: each register is ANDed
with its decoded select and the results are ORed together. `rdata` is
combinational and valid while `read_strobe` is high, and reads 0
otherwise. The vote registers are not on the register bus. They come out
of the top as the `vote_out` array.

## Using it: load, restart, run, read

1. For each word of each neuron, write `{code, word, addr}` to the
   configuration address, then wait five clocks.
2. Read the programme-reset address. Every neuron starts its new program
   from address 0.
3. Write the input registers.
4. Read the neuron outputs. A neuron's output settles a few of its program
   loops after its sources change. With the short programs used here, each
   layer adds about 12 clocks.

A typical neuron program, with the fixed word addresses that a host-side
loader expects:

```
00  8010        DISABLE INTERRUPT
01  A0 <port>   INPUT  s0, <first connection>
02  A1 <port>   INPUT  s1, <second connection>
03  0F <thr>    LOAD   sF, <threshold>
04  ...         function, e.g. C014 (ADD s0,s1) or C016 (SUB s0,s1)
    E0 01       OUTPUT s0, 01          result -> data_out
    ...         compare with sF, OUTPUT s3, 02   vote -> vote_out
    81 01       JUMP   01
```

To rewire a running neuron, rewrite word 01 or 02. To change its
threshold, rewrite word 03. To change its function, rewrite the function
word. None of these need a reset, and no other neuron sees the change.

## Reshaping the array

`ROWS` and `LAYERS` are parameters of `pico_solar`. The multiplexer grows to
ROWS + ROWS*LAYERS inputs, and the register map moves with ROWS (table
above). The limits are checked at elaboration: at most 30 neurons, because
the select code has 5 bits, and ROWS + 3 < 8, because the input registers
must stay below the first neuron address.

With `ROWS = 4, LAYERS = 7` you get the four-feature layout:

* inputs at 2..5, programme reset at 6 and configuration at 7;
* 32:1 multiplexers;
* the neurons of layer 1, row 3 and layer 1, row 4 (overall neurons 7 and
  8, counting the four inputs as neurons 1..4) have select codes 4 and 5
  and read addresses 15 and 14.

## Verification

Each testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_kcpsm_core` | ALU, shift, I/O, branch, call/return, loop and interrupt behaviour against hand-worked results. Also the 2-clock instruction rate: 4 clocks between two OUTPUTs two instructions apart, and 16 clocks for an 8-instruction loop path |
| `tb_dp_imem` | power-up program, read latency, 200 random writes against a reference, read-first collisions |
| `tb_input_mux` | 500 random selects, including out-of-range ones, with one clock of latency |
| `tb_cfg_bus_ctrl` | all 32 select codes. The enable is high in exactly one clock, four clocks after the write, for the right neuron only |
| `tb_host_regs` | input registers, all 28 readback addresses (typed in, not computed), strobe decoding at all 64 addresses |
| `tb_solar_neuron` | start-up program, then a "max(0, x − y/2) and vote" program with random connections and thresholds, with a connection rewritten at run time |
| `tb_pico_solar` | the full 2 x 14 array at default parameters (see below) |
| `tb_pico_solar_iris` | the 4 x 7 array running two trained voting neurons |
| `tb_neuron_functions` | one neuron running basis-function programs: ADD, SUB = max(0, x−y), x/2 + y/2, max(0, x − y/2), and MULT and SQRE as the high byte of an 8 x 8 shift-and-add product in a CALLed subroutine. Each is checked over random inputs, and the result must appear within two program passes |

`tb_pico_solar` works only through the host bus. It builds a six-neuron
network:

* n1 = n2 = in1 + in2;
* n3 = in2 + n1;
* n4 = n1 + n2;
* n5 = n2 + n4;
* n6 = n3 + n4.

It restarts the array, sets the inputs to 6 and 2 and reads all 28 outputs.
The expected values are 08 08 0A 10 18 1A for n1..n6 and 08 for the rest.
It then rewires n3 to n1 + n2 and n5 to n3 + n4 while the array runs. The
outputs must become 08 08 10 10 20 20, and neurons 1, 2 and 4 must not move
at any clock.

It also checks:

* that writes with unused select codes change nothing;
* that neuron 7's vote goes each way for two thresholds;
* that a neuron that computes once and halts ignores a new input until a
  programme reset.

It counts each mechanism (configuration write, enable pulse, programme
reset, restart, rewiring, readback, input write, vote, unused code) and
fails if one never happened.

`tb_pico_solar_iris` loads two trained neurons:

* neuron 7 computes (n1/2)/2 + (n3/2)/2 with threshold 35h;
* neuron 8 computes max(0, n4 − n3/2) with threshold 4Ah.

For the feature vector 71 EE 76 6A it checks 39h with vote 1 and 2Fh with
vote 0. It then checks 30 random feature vectors against a model.

To run one, for example the full array:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_pico_solar \
  -y rtl -y tb +libext+.sv rtl/solar_pkg.sv tb/tb_pico_solar.sv
./obj_dir/Vtb_pico_solar
```

Every testbench finishes in a few seconds. Use `--timescale 1ns/1ps` if
your flow needs an explicit time unit.

## Where this RTL departs from, or goes beyond, the described design

* **The controller is written from scratch.** The original used the
  vendor's PicoBlaze (KCPSM) core unchanged apart from a dual-port program
  memory, and its insides are not published with this design. This core
  follows the KCPSM instruction set, 2-clock timing and interface.
  Cycle-level details that only the original netlist defines (for example
  exactly when an interrupt is taken) may differ.
* **Source ordering on the multiplexer.** Inputs come first, then neurons
  in layer-major order. This agrees with every worked example, but the
  original VHDL may order them differently.
* **Output ports.** `data_out` takes OUTPUT to any port except 02, and
  `vote_out` takes port 02. The original examples write results to ports
  00, 01 and 02 in different places, and the vote port is not stated.
* **Neuron-select decoder.** It is combinational. The original inferred
  latches that hold their value between codes, which produces the same
  pulses.
* **Readback.** It is an AND-OR multiplexer and has no read register. Votes
  are brought out as ports, not register addresses.
* **Resets.** The host registers use an asynchronous reset and the neurons
  a synchronous one. The programme reset is a one-clock pulse generated by
  reading its address.
* **Register map for other shapes.** For ROWS ≠ 2, the programme-reset and
  configuration addresses are placed right after the input registers. Only
  the input addresses of the 4-row map are known from the original.
* **Not built:**
  * the board's PCI interface and its control/status and DMA registers
    (vendor IP);
  * the clock DLL (FPGA primitive);
  * neurons rewriting their own program memory ("set locally by a neuron"
    is mentioned but not described);
  * links between chips for the planned multi-chip 3D array;
  * the host-side training and loading software.
