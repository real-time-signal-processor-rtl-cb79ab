# Real-time pulsar signal processor: one sub-band

This is RTL for the hardware of a real-time pulsar processor. The processor sits behind the FFT stage of a radio-telescope correlator. For every spectrum (256 frequency channels, one channel per 16 MHz clock, with two circular polarisations L and R as complex voltages) it:

- computes the four Stokes parameters I, Q, U and V of each channel;
- splits the spectrum across eight floating-point DSP nodes, 32 consecutive channels per node;
- lets the node processors fold, average or dedisperse the data in software;
- collects their result blocks, at a programmable rate, into a FIFO that a PC reads over its ISA bus, and sends the same words out on a recorder port.

A control PC loads each node's program and parameters over a separate program bus.

The design has three parts, which follow the data:

```
 spectra ──► data input module ──► 8 node paths (16-bit, I,Q,U,V multiplexed)
 (36 bits/clk)  Stokes, reorder,        │
                distribute              ▼
                              ┌─── DSP node ×8 ───────────────────────────┐
 control PC ─ program bus ───►│ code DPRAM 8K×48 ◄─► processor PM bus     │
 (pages, 24 chip selects)     │ formatter ─► input FIFO 32K×32 ─► PM bus  │
                              │ SRAM-A 256K×32 ◄─► processor DM bus       │
                              │ SRAM-B 256K×32 ◄─► DM bus  or result bus  │
                              └───────────────────────────────┬───────────┘
                                          shared result bus   │ (32 bits, 18-bit address)
                                                              ▼
 PC ISA bus ◄── 32K×16 FIFO ◄── result collection module ──► recorder port
```

The node processors are commercial DSP chips, so they are not part of this RTL. The program- and data-memory buses of each processor, and its interrupt lines, are ports of the top module, `spps_top`. Everything the processors connect to is built.

## Clocks

| Clock | Rate | What runs on it |
|---|---|---|
| `clk_dim` | 16 MHz, one channel per cycle | data input module; write side of each node's input FIFO |
| `clk_dsp` | 25 MHz | the nodes: FIFO read side, memories, bus control |
| `clk_rcm` | 16 MHz | result collection module |
| `clk_pc` | PC side | program bus |

Signals that cross from one clock domain to another go through two-flop synchronisers:

- ENABLE DIM;
- BUS-FREE into the collector, and ENGAGED into the node's interrupt logic;
- the semaphore flags;
- the ISA strobes.

The FIFO pointers cross as Gray code. ENGAGED and OE also act directly, without synchronisers, on the SRAM-B output buffers. The collector's address and data timing gives them a full state of margin.

## Data input module (`data_input_module`)

The module is a four-stage pipeline. Each input sample carries four 9-bit sign-magnitude numbers: LR, LI, RR, RI, the real and imaginary parts of L and R (`spps_pkg::pol_sample_t`).

### 1. Product tables (`stokes_lut`)

This stage works on magnitudes and signs separately, as a set of look-up tables would.

- **Power terms.** |L|² = LR² + LI² and |R|² = RR² + RI² are 17-bit sums. Each keeps its upper 16 bits, so it holds half the true power.
- **Cross terms.** The four products LI·RI, LR·RR, LI·RR and LR·RI fit in 16 bits.
- **Signs.** The sign of each cross product is the XOR of its two input signs.

The stage is one register.

### 2. Adders (`stokes_addsub`)

The adders form, with L and R circular:

```
I = |L|² + |R|²        V = |L|² − |R|²
Q = Re(2·L·R*) = LR·RR + LI·RI
U = Im(2·L·R*) = LI·RR − LR·RI
```

The signed cross products are added at full precision. Every result then becomes a 16-bit sign-magnitude word: the sign, then |sum|>>2 in 15 bits. All four parameters share one scale, equal to 1/8 of the true value (for example, `I = (|L|²+|R|²)/8`). The stage takes two clocks.

The assignment of the two cross terms to Q and U follows the usual definition for circular feeds.

**Pass-through mode.** This mode (`pass_through`) sends the input voltages through both stages unchanged:

- I = LR, Q = LI, U = RR, V = RI;
- each value keeps its sign and its magnitude zero-extended to 15 bits.

Use it to test the data paths.

### 3. Reordering memory (`dim_corner_turn`)

The nodes need their channels grouped: node k gets channels 32k…32k+31. A spectrum arrives in channel order, so it is written into one half of a double-buffered 2×256-word memory. Once the spectrum is complete, that half is read in the order:

```
0, 32, 64, …, 224, 1, 33, …, 225, 2, …, 255
```

Meanwhile the next spectrum fills the other half. Reading starts two clocks after the last write and runs at one channel per clock, so it keeps pace with the input. Each word read out carries its node number (the read address's low three bits).

### 4. Distribution (`dim_distributor`)

Each node path has a four-word shift register, loaded with the channel's I, Q, U, V every eighth clock. It sends the words one at a time on a 16-bit path:

- each word is held for two clocks;
- a one-clock write strobe marks the start of each word.

That is 8 Mwords/s per node, which is 4 Stokes × 32 channels per 16 µs spectrum. The eight paths are staggered by one clock because the reordering memory serves one node per clock.

**Latency.** The first word of a spectrum leaves NCH+5 clocks (261) after its channel 0 came in. `enable` (ENABLE DIM) blocks the input while it is low.

## DSP node (`dsp_node`)

Each of the eight nodes holds the blocks below.

### Formatter (`node_formatter`)

Turns each 16-bit sign-magnitude word into 32-bit two's complement, which the processor can convert to floating point. The FIFO write strobe is delayed by the same one clock.

### Input FIFO (`async_fifo`)

32K × 32, dual-clock, first-word-fall-through.

- Its half-full flag (at least 16K words) goes to the processor. Software waits for it and then reads a block of 16K words.
- The processor reads the FIFO on its program-memory bus when address bit 23 is set. The word appears on `pm_rdata[47:16]`.

### Code memory (`code_dpram`)

8K × 48, built from three 8K × 16 dual-port RAMs.

- The processor's program-memory port sees all 48 bits.
- The PC's program bus sees one 16-bit device per chip select. Device 0 holds bits 15:0, device 1 bits 31:16, device 2 bits 47:32.

Two locations act as mailboxes:

| Location | Direction | Set by | Raises | Cleared by |
|---|---|---|---|---|
| 8191 | PC → processor | PC writes it | processor interrupt `irq_param` | processor reads it |
| 8190 | processor → PC | processor writes it | `pb_int` | PC reads it, through device 0 |

The PC uses 8191 to announce new parameters, for example dedispersion or calibration values. The processor uses 8190 to acknowledge them.

### SRAM-A and SRAM-B (`node_sram`)

Both are 256K × 32, with a write on the clock edge and an asynchronous read, so the processor sees no wait states.

- **SRAM-A** is the working memory. Software uses it as two halves: one is being accumulated while the other is finished.
- **SRAM-B** holds finished results.

### Data-memory glue (`node_bus_ctrl`)

Address bits 21:20 of the data-memory bus select one of four regions:

| dm_addr[21:20] | Region |
|---|---|
| 0 | SRAM-A |
| 1 | SRAM-B (when attached) |
| 2 | status port (read) |
| 3 | control port (write) |

**Control port bits**

| Bit | Meaning |
|---|---|
| 0 | attach SRAM-B to the processor |
| 1 | BUS-FREE |
| 2 | write 1 to clear the ENGAGED interrupt flag |

**Status port bits**

| Bit | Meaning |
|---|---|
| 0 | FIFO empty |
| 1 | FIFO half full |
| 2 | parameter semaphore pending |
| 3 | attached |
| 4 | BUS-FREE |
| 5 | ENGAGED |
| 6 | ENGAGED interrupt flag |

## Moving results: the BUS-FREE / ENGAGED handshake

This is the part of the design that takes most care. All eight SRAM-Bs share one 32-bit result bus and one 18-bit result address bus, which the result collection module drives. A node uses the handshake below.

1. **Results are written.** The processor writes a finished block into SRAM-B while SRAM-B is attached to it (control bit 0 = 1).
2. **SRAM-B is released.** The processor detaches SRAM-B (bit 0 = 0) and raises BUS-FREE (bit 1 = 1). From now on the result address bus addresses SRAM-B.
3. **The collector engages the node.** It polls the BUS-FREE lines in its programmed node order. When it finds one raised, it raises that node's ENGAGED line and reads the address range LOWER…UPPER.
4. **Each location is read in eight states.** At every location the collector asserts the node's OE for three of the eight states. SRAM-B's data reaches the bus only while the node is ENGAGED and OE is high. At all other times the node drives zeros, so the top ORs the eight node outputs in place of tri-state buffers.
5. **The collector releases the node.** After UPPER it drops ENGAGED. The falling edge gives the processor an `irq_engaged` pulse and sets a sticky flag.
6. **The processor takes SRAM-B back.** It drops BUS-FREE and may attach SRAM-B again.

The collector does not engage the same node again until that node has dropped and raised BUS-FREE once more.

A node that is not ready is skipped. The collector comes back to it on a later round. It stops only to poll while no node has BUS-FREE raised.

## Program bus (`code_bus_decoder`)

The PC drives the program bus from its parallel ports:

- a page-load strobe;
- a 13-bit address;
- 16 data lines;
- write and read strobes.

A page-load strobe latches the page number (0–23) from the data lines. Later reads and writes go to that page's DPRAM device: chip select 3n + d is device d of node n. The page stays selected until it is changed. Read data from the 24 devices is ORed back to the PC, and each device drives zeros when it is not selected.

## Result collection module (`result_collection_module`)

### ISA window (`rcm_isa_regs`)

The module is a 64 KB block of ISA memory at `BASE` (default `0xD0000`). It runs in 16-bit, zero-wait-state mode: `memcs16_n` and `zerows_n` are asserted. The ISA strobes are synchronised, and each access takes effect at the end of its strobe.

| Offset | Access | Contents |
|---|---|---|
| 0x0000–0x7FFF | read | the result FIFO; each read removes one word |
| 0x8000 + 2·0 | write | CTRL: bit 0 acquire, bit 1 enable DIM, bits 5:2 configure DIM, bit 6 clear FIFO |
| 0x8000 + 2·1 | write | RATE (8 bits) |
| 0x8000 + 2·2 / 2·3 | write | LOWER bits 15:0 / 17:16 |
| 0x8000 + 2·4 / 2·5 | write | UPPER bits 15:0 / 17:16 |
| 0x8000 + 2·6 / 2·7 | write | NODESEQ bits 15:0 / 31:16 |
| 0x8000 + 2·8 | read | STATUS: 7:0 BUS-FREE, 11:8 DIM configured, 12 FIFO empty, 13 half full, 14 PAFE |

The registers read back at their own offsets.

### Node sequence

NODESEQ holds eight 4-bit entries. Entry k sits in bits 4k+3:4k and reads `{valid, node[2:0]}`. The sequence runs up to the first invalid entry, so one 32-bit pattern sets both how many nodes take part and their order.

Examples:

| Pattern | Sequence |
|---|---|
| `0xFEDCBA98` | all eight nodes, in order |
| `0x0000009C` | node 4, then node 1 |

### Sequencer (`rcm_sequencer`)

The sequencer is a 29-bit counter chain:

- an 8-bit rate section, which ticks every RATE+1 clocks;
- a 3-bit state counter;
- an 18-bit address counter;
- the node sequencer.

Each location takes eight ticks:

| State | Action |
|---|---|
| 0 | address out |
| 1–3 | OE asserted; data latched at the end of state 3 |
| 4 | low 16 bits written to the FIFO |
| 6 | high 16 bits written to the FIFO |
| 7 | next address |

At 16 MHz this spans 8 Mbytes/s (RATE = 0) down to 31.25 kbytes/s (RATE = 255).

### Result FIFO (`sync_fifo`)

32K × 16. Its flags are:

- empty;
- half full;
- PAFE, the almost-empty/almost-full flag, with both offsets set to 127.

The PC is expected to start a block read when the half-full flag rises. If the FIFO still fills up, further words are dropped from the FIFO, though not from the recorder port, and a simulation assertion reports it. The collector does not wait for space.

### Recorder port

`rec_data` and `rec_wr` are copies of the FIFO's write data and strobe, for a recorder that takes the words at full speed.

## Parameters and sizes

The defaults are the full sizes, and the end-to-end test runs at them.

| Parameter | Default | Where |
|---|---|---|
| `N_CHAN`, `N_NODES` | 256, 8 | `spps_pkg` |
| `FIFO_AW` | 15 (32K × 32 input FIFO) | `spps_top`, `dsp_node` |
| `SRAM_AW` | 18 (256K × 32 SRAM-A/B) | `spps_top`, `dsp_node` |
| `CODE_AW` | 13 (8K × 48 code memory) | `dsp_node` |
| `RCM_FIFO_AW` | 15 (32K × 16 result FIFO) | `spps_top` |
| `BASE` | `20'hD0000` | `result_collection_module` |

The top holds about 146 Mbit of memory. Almost all of it is the sixteen node SRAMs.

## Where this design makes its own choices

The block structure, widths, memory sizes, rates and handshake follow the original description of the instrument. The following are this design's own choices.

- **Stokes outputs:** the scaling (1/8 of the true value) and the pass-through field mapping.
- **Word timing:** the two-clock word timing and one-clock strobe on the node paths, and the latency.
- **Programming interface:** all address maps and register bit assignments (node data-memory map, ISA registers, status bits), and `BASE`.
- **Mailboxes:** the mailbox locations 8191 and 8190 and their clear-on-read rule.
- **Collector protocol:** the node-sequence encoding, the use of the eight sequencer states, and the order of the 16-bit halves (low half first).
- **Bus structure:** OR-combined buses in place of tri-state buffers.
- **Input FIFO:** a single dual-clock FIFO in place of a bank of FIFO chips.
- **Channel and node order:** fixed. The original allows other orders by reprogramming the input logic.

## Not included

- **The node processors and their software.** This covers accumulation, folding, dedispersion, Faraday-rotation correction and the result transfer. The testbenches contain a small processor model that averages or folds.
- **Node-to-node transfers through SRAM-B.** A global-bus write path was foreseen for these but is not needed for the processing described.
- **Processor reset control by the PC, the PC software, and the differential line drivers and receivers.**
- **The SETUP line of the recorder interface,** whose function is not defined.

## How far it has been checked

- **Simulation:** every block and the two full-size top-level tests pass in two-state simulation, with registers starting at random values before reset.
- **Fault detection:** each testbench has been shown to fail when its block is deliberately broken.
- **Synthesis:** the design synthesises as generic logic, with no latches.
- **Not checked:** timing against real parts, for example the 25 ns SRAMs and the ISA bus cycle. The clock-domain crossings are checked only by simulation with unrelated clock periods.

## Simulation

Every block has a self-checking testbench in `tb/<block>_tb.sv`. Each one:

- compares the block's outputs with values it computes itself;
- has a watchdog;
- ends by printing `TB_RESULT checks=N failures=M`.

`tb/isa_host.svh` holds the ISA read and write tasks that three testbenches share. Build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module spps_top_tb \
    -Irtl -Itb -y rtl -y tb rtl/spps_pkg.sv tb/spps_top_tb.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `spps_top_tb` with its name.

### End-to-end test (`spps_top_tb`)

This test drives the top at its default sizes. It plays the FFT stage, the control PC and the eight node processors.

1. It loads code and parameter semaphores over the program bus and checks the acknowledgements.
2. It sends one spectrum with ENABLE DIM off, which must reach no node.
3. It programs the collector over ISA.
4. It sends 128 random spectra and one pass-through spectrum.
5. Each modelled processor waits for half full, averages its 32 channels × 4 Stokes into SRAM-A, copies the sums into SRAM-B and hands SRAM-B over.
6. The PC reads all 2048 result halves over ISA and compares them with sums computed from the input voltages.

The test counts the mechanisms it exercises, and each must occur at least once:

- the enable gate;
- pass-through;
- FIFO half full;
- ENGAGED;
- both interrupts;
- the semaphore acknowledgements;
- skipped polls.

The run takes a few seconds.

### Folding test (`spps_fold_tb`)

This test runs a pulse-folding job through the whole top, also at the default sizes. The front end sends a test pulse one frame wide every eighth spectrum, with small noise in between. Each modelled processor folds its 32 channels at that period into 8-bin profiles of all four Stokes parameters, so 1024 locations per node.

The PC programs the collector for the node order 7 down to 0 and RATE = 1, and turns acquisition on once every node shows BUS-FREE. The test checks that:

- the nodes are served in the programmed order;
- the locations are 16 clocks apart on the recorder port;
- the 16384 result words fill the result FIFO to exactly half full, and the PC starts its block read on that flag;
- every profile value matches the reference;
- the pulse stands out in bin 0 of every channel.

The run takes about 6 seconds.

### Other testbenches

The block testbenches check the following in detail.

- **Stokes stages:** random sign-magnitude inputs in normal and pass-through mode, with products and sums worked out in the testbench, and the one- and two-clock latencies.
- **Data input module:** at full size, two ramp spectra (every component of channel c equal to c), random spectra, a pass-through spectrum and a disabled one; every word on all eight paths, one word per two clocks, the paths starting together, and the 261-clock latency.
- **FIFOs:** the orderings and flags, including full, empty and half-full boundaries.
- **Collector timing:** the clocks per location at several RATE values.
