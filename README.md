# QiCell qubit controller: programmable logic in SystemVerilog

Superconducting qubits are driven and read out with short microwave pulses.
The pulses must be placed with nanosecond precision. The controller may have
to react to a measurement within a few hundred nanoseconds. This RTL is the
FPGA part of an RFSoC-based controller for such qubits. It is built from
identical **digital unit cells**, one per qubit. Each cell has everything
needed for its qubit:

- a small RISC-V sequencer that runs the experiment;
- two pulse generators, one for control pulses and one for readout pulses;
- a recorder that demodulates the readout signal and decides the qubit state;
- a result memory;
- a flux-pulse player;
- digital trigger outputs.

Two shared blocks sit next to the cells:

- The **cell coordinator** keeps the cells in step. It provides barriers, the
  distribution of qubit states, and register transfers between cells.
- The **cell signal router** adds the pulse streams of all cells onto the
  converter channels (frequency-division multiplexing). It also hands each
  cell the ADC channel it listens to.

Every latency in the design is fixed and known in clock cycles. That is the
main idea. One clock domain is used throughout, and bus accesses have
constant latency. One trigger word, written to every module of a cell in the
same cycle, starts all pulses and recordings. A sequencer program therefore
places events on an exact 4 ns grid.

```
            AXI4-Lite (one port per cell, coordinator, router)
                 |            |                 |
   +-------------v--+   +-----v------------+  +-v------------------+
   | qicell x10     |<->| cell_coordinator |  | cell_signal_router |
   |  sequencer     |   | busy, start,     |  | per DAC channel:   |
   |  wb_interconn. |   | barrier, states, |  |  control sum       |
   |  2x sig. gen.  |   | data transfer    |  |  readout sum       |
   |  recorder      |   +------------------+  |  pulse player      |
   |  data storage  |--- control/readout/---->|  -> DAC channels   |
   |  pulse player  |    flux streams         |  ADC select        |
   |  digital trig. |<--- ADC stream ---------|  <- ADC channels   |
   +----------------+                         +--------------------+
```

## Clock, samples and formats

- **Clock.** Everything runs at one clock, intended to be 250 MHz (one step
  = 4 ns).
- **Sample streams.** Each stream carries `SPC = 4` samples per clock,
  which is 1 GS/s per channel.
  - A complex stream (`iq_beat_t`) has 4 I and 4 Q samples, 16-bit signed.
  - The pulse player emits real streams (`real_beat_t`).
- **Converter channels.** A converter channel is one I/Q pair. The 8 DACs and
  8 ADCs of the target device are 4 DAC channels and 4 ADC channels (`N_DAC`,
  `N_ADC`).
- **Shared definitions.** All types, register indices, opcodes and latencies
  are in `rtl/qi_pkg.sv`.

## The bus inside a cell and the trigger word

This is the part that makes the timing work, so it is described first.

### Addressing

The cell bus is Wishbone with 16-bit register addresses and 32-bit data.

- The top three address bits select the slave (the module).
- `111` is a **broadcast** to all seven slaves at once.
- Byte address on AXI = 4 × register address.

| slave | module | AXI byte base |
|---|---|---|
| 0 | sequencer | 0x00000 |
| 1 | readout signal generator | 0x08000 |
| 2 | control signal generator | 0x10000 |
| 3 | signal recorder | 0x18000 |
| 4 | data storage | 0x20000 |
| 5 | pulse player | 0x28000 |
| 6 | digital trigger | 0x30000 |

### Latencies

Every slave sits behind `wb_slave_if`. It never stalls and answers exactly
two cycles after the request. `wb_interconnect` registers the request on its
way to the slaves and registers the answer on its way back.

- **Sequencer (master 0).** A read takes exactly 4 cycles. The interconnect
  accepts one new request every cycle while earlier ones are still in flight.
- **Host (master 1, via `axil_wb_bridge`).** The host has lower priority. It
  is stalled in any cycle in which the sequencer uses the bus. Without a
  stall, an AXI access completes 6 cycles after its handshake.

| path | cycles |
|---|---|
| slave request → ack | 2 |
| master request accepted → ack at master | 4 |
| AXI handshake → B/R valid (no stall) | 6 (+1 per stalled cycle) |

### The trigger word

Every module has the same register layout at the bottom:

| register | content |
|---|---|
| 0 | info `{id, version}` |
| 1 | status |
| 2 | control |
| 3 | trigger |

The trigger word is bits 31:12 of register 3. The sequencer writes it with
one broadcast (`TRIG`), so all modules see it in the same cycle. Each module
uses its own field. A field value of 0 means "nothing to do".

| bits | field |
|---|---|
| 19:18 | digital trigger set (1..3) |
| 17:14 | pulse player: 17:16 channel 2 set, 15:14 channel 1 set (1..3 each) |
| 13:10 | control signal generator set (1..15) |
| 9:8 | recorder mode: 1 single, 2 one-shot, 3 continuous |
| 7:4 | readout signal generator set (1..15) |
| 2 | sync: clear the NCO phase accumulators |
| 1 | start (not used by any module) |
| 0 | reset: stop pulses, clear storage, averages and continuous modes |

The pulse-player field is bits 17:14 of the trigger word. Its low two bits
(word bits 15:14) select the set of channel 1. Its high two bits (word bits
17:16) select the set of channel 2.

### End-to-end latency

From the cycle a `TRIG` request is on the bus (one cycle after the
instruction executes):

| output | first sample after |
|---|---|
| digital output (offset 0) | 3 cycles |
| pulse player | 6 cycles |
| readout / control signal generator | 7 cycles |
| recorder window | opens 3 + trigger-offset cycles later |

These numbers are checked by `tb_qicell`.

## Sequencer

`rtl/sequencer.sv` is a multi-cycle RV32I core. It has:

- 32 registers, with `x0` reading as zero;
- a 1024-word program memory in block RAM, loaded through its slave port at
  register 0x1000 + i.

### Instruction set

Besides the RV32I computational instructions it implements these:

- branches, `JAL`, `JALR`;
- `LW`/`SW`, which access the cell's register space;
- `MUL` (low 32 bits);
- the sequencing instructions below.

The sequencing instructions use the RISC-V custom opcodes.

| instruction | encoding | effect |
|---|---|---|
| `TRIG t` | custom-0, rd=0, [31:12]=t | broadcast trigger word t; does not wait for the bus |
| `WAIT n` | custom-0, rd=1, [31:12]=n | wait n cycles (including itself) |
| `WAIT-REG rs1` | custom-2, funct3=0 | wait x[rs1] cycles |
| `WAIT-REG-TRIG rs1` | custom-2, funct3=1 | wait x[rs1]−1 cycles, so that a following TRIG lands x[rs1] cycles later |
| `SYNC-STATE rd, c` | custom-2, funct3=2, imm[3:0]=c | wait for a new qubit state of cell c, put it in rd |
| `SYNC-START` | custom-2, funct3=3 | end of program, back to idle |
| `CELL-SYNC mask` | custom-3, funct3=0, [31:16]=mask | barrier with the cells in mask |
| `CELL-DATA-SEND rs, mask` | custom-3, funct3=1, [11:7]=rs | offer x[rs] to the cells in mask |
| `CELL-DATA-RECV rd, c, mask` | custom-1, [15:12]=c, [11:7]=rd | receive cell c's register into rd |

`tb/seq_asm.svh` has small assembler functions for all of them.

### Cycle counts

| instruction | cycles |
|---|---|
| ALU, LUI/AUIPC, untaken branch, TRIG, SYNC-START | 1 |
| taken branch, JAL, JALR | 3 |
| MUL | 6 |
| LW, SW | 8 |

The next instruction is fetched from the synchronous program memory while the
current one executes, so one-cycle instructions really take one cycle.

### Loads and stores after a trigger

`TRIG` is a pipelined write. The sequencer continues while the write is still
on the bus. A following `LW`/`SW` first waits until every outstanding trigger
write has been acknowledged. It must, because the answers come back in order
and the load would otherwise take the trigger's acknowledge as its own. A
load directly after a `TRIG` therefore costs 6 extra cycles.

### Slave registers

| register | content |
|---|---|
| 1 | status: bit 0 busy, [15:4] PC word index |
| 2 | control: bit 0 start, bit 1 stop |
| 32..63 | read the register file |

A reset trigger stops an idle-waiting program.

## Keeping cells in step: the cell coordinator

`rtl/cell_coordinator.sv` is a star point. Everything it returns is
registered once and goes to all cells in the same cycle. That single
register stage sets all the cross-cell timing:

- **Barrier (`CELL-SYNC`).** The cell raises its sync flag and waits until
  every cell of its mask shows in the distributed flag vector. All waiting
  cells see the last flag in the same cycle and continue together. The next
  instruction runs 3 cycles after the last cell executed `CELL-SYNC`.
- **Qubit states.** Each recorder reports its state. The coordinator keeps the
  last state of every cell and a one-cycle "new" strobe per cell. Any
  sequencer can wait for a state with `SYNC-STATE` and branch on it.
- **Register transfer.** The sender puts a register on its data output and
  raises its data-sync flag. A receiver names the source cell, which switches
  the coordinator's multiplexer, and raises its flag too. Data and flags pass
  through the same single register stage. So when a receiver sees all flags
  of its mask, its multiplexer output already holds the sender's value. The
  transfer ends 3 cycles after the last participant arrives. One sender may
  serve several receivers. Disjoint groups may transfer in parallel.
- **Start and busy.** Writing a cell mask to the start register starts those
  sequencers in the same cycle. The busy flags of all cells, and their OR,
  can be read back.

Coordinator registers (AXI byte offsets):

| offset | content |
|---|---|
| 0x0 | info |
| 0x4 | busy vector |
| 0x8 | any busy |
| 0xC | start mask (write only) |
| 0x10 | last states |

## Making pulses

### Signal generator (`rtl/signal_generator.sv`)

Two instances per cell, one for readout and one for control.

**Trigger sets.** The 4-bit trigger field picks one of 15 trigger sets. A set
holds:

- duration in clocks;
- amplitude and phase;
- start rows of the I and Q envelopes in a 4096-sample envelope memory;
- three flags:
  - `no_q`: a real envelope;
  - `hold`: keep the last value after the pulse, for continuous tones and
    stretched shapes;
  - `persist`: add the phase to the oscillator permanently, which is a
    virtual Z rotation.

**Datapath.**

1. `sample_player` reads SPC samples per clock from per-sample banks and
   scales them.
2. They are multiplied with the `nco` output: (env_i + j·env_q)(cos + j·sin).
3. Each quadrature gets a calibration gain.

**NCO.** `nco` is a 32-bit phase accumulator that steps SPC phases per clock.
A 1024-entry sine table is computed at elaboration, so no data file is needed.

**Registers.**

| register | content |
|---|---|
| 4 | frequency (phase step per sample, 2^32 = one turn) |
| 5 | calibration gains |
| 16+4(s−1) .. 19+4(s−1) | set s |
| 0x1000 + n | envelope sample n |

### Pulse player (`rtl/pulse_player.sv`)

Two real channels for flux pulses, played as stored, without an oscillator.

- The 4-bit field is split in two 2-bit values, giving 3 sets per channel.
- Each set holds a duration, a start row, an amplitude and the hold option.
  The hold option builds trapezoids and DC levels.
- Each channel has 2048 samples of memory and its own gain.

### Digital trigger (`rtl/digital_trigger.sv`)

Eight outputs for external equipment. Three sets, each holding:

- an output mask;
- a duration;
- a continuous flag, which keeps the outputs on until the output is triggered
  again or a reset trigger arrives.

Every output also has its own delay after the trigger and an invert bit.

## Reading out: recorder and storage

### Signal recorder (`rtl/signal_recorder.sv`)

The recorder works continuously on the ADC stream:

1. It corrects the stream with a 2×2 matrix (Q2.14) after subtracting a DC
   offset.
2. It mixes the stream down with the conjugate of its own NCO.

**The window.** A trigger opens a window after a programmable offset, which
covers the cable delay to the chip and back. During the window:

- the corrected samples go to a 4096-sample trace memory;
- the mixed samples are summed (boxcar integration).

**Results.** When the window ends:

- the sums become the I/Q result;
- the state is 1 when the I result is above a signed threshold;
- results are also summed into averaging registers until a reset trigger.

**Modes.**

| mode | behaviour |
|---|---|
| single | result and state go to the data storage and the coordinator |
| one-shot | the state only goes to the coordinator |
| continuous | windows back to back until the next continuous trigger |

**Timing.** Trigger in cycle t with offset o: the window covers the beats
entering in cycles t+1+o … t+o+duration. The result appears 4 cycles after
the last beat.

### Data storage (`rtl/data_storage.sv`)

Four memories of 1024 words. Each appends words from a chosen source:

- result I;
- result Q;
- single states;
- 32 one-bit states packed per word;
- ten 3-bit states packed per word;
- words written by the sequencer or host.

Each memory either stops when full (with an overflow flag) or wraps as a
circular buffer. The second port of every memory is readable and writable in
the register space. A reset trigger empties all memories.

## Routing and frequency multiplexing (`rtl/cell_signal_router.sv`)

Each DAC channel has two adders:

- one over the control streams of all cells;
- one over the readout streams of all cells.

A per-channel mask selects which cells take part in each adder. The cells play
at different base-band frequencies, so a sum is a frequency multiplex. A
selector then drives the channel with one of:

- the control sum;
- the readout sum;
- the two pulse-player channels of one cell (channel 1 on I, channel 2 on Q).

Sums saturate at 16 bits. Each cell picks its ADC channel. All paths are
registered once.

| register | content |
|---|---|
| 16+d | control mask of DAC channel d |
| 32+d | readout mask of DAC channel d |
| 48+d | `{cell[11:8], source[1:0]}` |
| 64+c | ADC channel of cell c |

## Top level (`rtl/qicontroller_top.sv`)

The top has 10 cells, the coordinator and the router. Each of these 12 blocks
has its own AXI4-Lite port. The processing system's AXI interconnect that
would sit in front of them is not part of this RTL. Neither are:

- the converters;
- the processors and their software;
- the analog front end;
- the experiment compiler.

The top's ports are the AXI ports, the DAC and ADC channels and the digital
outputs.

Default parameters:

| parameter | value |
|---|---|
| `N_CELLS` | 10 |
| `N_DAC` / `N_ADC` | 4 |
| `IMEM_DEPTH` | 1024 |
| `ENV_DEPTH` | 4096 |
| `TRACE_DEPTH` | 4096 |
| `STORE_DEPTH` | 1024 |
| `PP_DEPTH` | 2048 |
| `N_DIG` | 8 |

## Simulation

Each file in `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, with a watchdog in case it
hangs. Build and run one with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/qi_pkg.sv tb/tb_qicell.sv --top-module tb_qicell -Mdir obj_qicell
./obj_qicell/Vtb_qicell
```

### Testbenches

| testbench | what it checks |
|---|---|
| `tb_wb_slave_if` | 2-cycle response; register strobes; trigger decode |
| `tb_wb_interconnect` | 4-cycle latency; routing; priority and stall; pipelining; broadcast |
| `tb_axil_wb_bridge` | address translation; latency with random stalls |
| `tb_sequencer` | cycle counts of every instruction class (from trigger spacing); barrier, state and transfer protocols against a coordinator model; results |
| `tb_nco` | against a floating-point model |
| `tb_signal_generator` | sets; envelopes; mixing; hold; persist; calibration; 5-cycle latency |
| `tb_signal_recorder` | conditioning; window timing; DDC; modes; state; averaging; trace |
| `tb_data_storage` | all sources; packing; full / circular / overflow |
| `tb_pulse_player` | both channels; hold; gains; latency |
| `tb_digital_trigger` | offsets; durations; continuous; invert |
| `tb_cell_coordinator` | random traffic against a reference model |
| `tb_cell_signal_router` | masked saturating sums; pulse-player path; ADC selection against a model |
| `tb_qicell` | one cell with readout looped back to its ADC: a sequencer program configures a module, fires a broadcast trigger, waits for the measured state and branches on it; output latencies; stored results; a host access stalled by the sequencer |
| `tb_ramsey` | a Ramsey sequence on one cell: a loop of two control pulses with a growing free-evolution delay (`WAIT-REG-TRIG`), readout and storage of each result; checks the pulse spacing to the cycle in every iteration |
| `tb_vna_sweep` | one cell used as a network analyser: a held tone looped back to the ADC, frequency stepped by the sequencer, each step recorded with the recorder's oscillator matched and detuned by one turn per window; matched magnitudes are flat, detuned ones rejected |
| `tb_qicontroller_top` | the full design at its default size (10 cells, full memories) with DAC 0 looped back to ADC 0 |

In `tb_qicontroller_top`, three cells run a coordinated program. It exercises
these mechanisms:

- simultaneous start;
- broadcast trigger;
- readout;
- state distribution;
- a barrier, checked to release together 3 cycles after the last arrival;
- a register transfer;
- the frequency-multiplexed DAC sum, compared sample by sample;
- pulse-player routing;
- host stall;
- busy aggregation.

It counts each mechanism and fails if one never happens. It runs in under a
minute.

Unit testbenches shrink memory depths to stay short. The two system
testbenches use the real sizes (`tb_qicell` shrinks memories only).

## Where this design departs from the published description or fills gaps

- **Digital trigger sets.** The description gives the digital trigger 4
  trigger sets. Its trigger-word field is 2 bits wide, and value 0 means "no
  operation", so only 3 sets can be selected. This design has 3.
- **Instruction count.** The description counts 36 sequencer instructions
  without listing them. The set above is this design's reading. So are:
  - the custom encodings;
  - `JALR` taking 3 cycles like `JAL`;
  - `WAIT-REG-TRIG` waiting n−1 cycles.
- **State decision.** The rule that turns a result into a qubit state is not
  given. Here it is a threshold on the I sum.
- **Memory sizes not given.** Assumed values:
  - recorder trace 4096 samples;
  - data storage 1024 words per memory;
  - pulse player 2048 samples per channel.
- **Sample rate.** 4 samples per 250 MHz clock and the 16-bit formats (Q1.15
  gains and amplitudes, Q2.14 matrix) are assumptions.
- **Register maps.** All register maps, the slave numbering and the bit
  assignment inside the pulse-player field are this design's own.
- **Unused start bit.** The start bit of the trigger word is decoded by no
  module.
- **Envelope memories.** The envelope memories can be written but not read
  back over the bus.
- **Coordinator width.** The coordinator is sized for up to 16 cells (vector
  widths and cell fields). Its multiplexers and busy logic cover the cells
  actually instantiated.
- **AXI.** Each module has its own AXI4-Lite port instead of a shared AXI
  interconnect. The bridge handles one access at a time.
