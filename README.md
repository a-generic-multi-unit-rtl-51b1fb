# A multi-unit architecture of data-synchronised functional units

This RTL builds a template architecture for mixed hardware/software systems
that run static data-flow applications, such as telecom and audio signal
processing. The system is a set of coarse-grain **functional units** (FUs):
hardware operators, memories, I/O ports and, in a full system, processor
cores. The units share a **communication network** and are wrapped so that
they all look the same from outside. A unit does not follow a global
micro-schedule. It runs its own list of coarse instructions ("do an FFT on
the block that arrives from unit 0, send the result to unit 2"). It
synchronises with the other units only through the data it exchanges with
them.

Two kinds of network are provided:

* **FIFO crossbar.** Every crosspoint between a unit output and a unit input
  is a FIFO queue. Sender and receiver need not be active at the same time
  (asynchronous transfer). This mode is general but costs a FIFO per
  crosspoint.
* **Synchronous buses.** There are a few shared buses and no storage. A word
  moves only in a cycle where sender and receiver meet (a rendez-vous). This
  is cheaper, but only correct when the off-line schedule places every pair
  of communicating instructions so that they overlap in time.

The design was published as a target for hardware/software co-design flows.
The flow partitions and schedules the application graph, then works out
which edges can be turned from asynchronous into synchronous transfers and
how few buses are needed. That off-line tool is software and is not part of
this RTL. The RTL is the architecture the tool targets, instantiated for a
frequency-domain adaptive echo canceller (GMDF-alpha). That instance has an
FFT operator, an adder, two coefficient memories, an input unit and a DSP
processor on two synchronous buses.

## How a unit is built

```
            network inputs (2)            network output (1)
                 |   |                          ^
        +--------v---v--------------------------|---------+
        |  specific_controller  <-- instruction | -------+|-- instr_mem <-- main_controller
        |    protocol gating, start/end         |        ||      ^  read/addr     | start
        |        |  valid/ready streams         |        ||      +----------------+
        |  computation cell (fft / add / mem / input)    ||   end  ----------------> main_controller
        +------------------------------------------------+
```

`fu_tile` is one unit. It holds four parts:

* **`main_controller`** walks the unit's **`instr_mem`**. It reads an
  instruction (1 cycle), gives it to the unit with a `start` pulse (1
  cycle), and waits for the unit's `end` pulse. Then it moves to the next
  address. After `last_addr` it starts again at 0 and pulses `loop_wrap`.
  This global loop is all the sequencing a static application needs. `run`
  gates the fetching of new instructions. The shortest instruction takes 3
  cycles.
* **`specific_controller`** runs one instruction. It latches it, pulses the
  cell's `start` with the op-code, length and base address, and connects the
  cell's two input streams and one output stream to the crosspoints the
  instruction names. It applies each port's protocol (see below). When the
  cell pulses `done`, it pulses `end` one cycle later.
* **The computation cell** is chosen by the `CELL` parameter. All cells have
  the same interface: `start`/`op`/`len`/`base`/`done`, plus valid/ready
  streams `in[0]`, `in[1]` and `out`.

The network ports and the control interface are the same whatever the cell.
That is what lets different kinds of unit (and a processor with the same
interface) sit side by side.

## The coarse-grain instruction (`dspa_pkg::instr_t`)

| field | bits | meaning |
|---|---|---|
| `op` | 3 | `OP_FFT`, `OP_IFFT`, `OP_ADD`, `OP_STORE`, `OP_LOAD`, `OP_INPUT`; a cell ends at once on an op-code that is not its own |
| `len` | 12 | words to move (unused by the FFT, whose size is fixed) |
| `base` | 12 | start address (memory cell) |
| `in[p].en / prot / bus / src` | 1+1+4+4 | for each input p: used, blocking or not, bus to listen on, unit expected |
| `out.en / prot / bus / dst` | 1+1+4+4 | output used, blocking or not, bus to drive, receiving input `unit*2+p` |

Each instruction names both the bus (used by the bus network) and the
destination input (used by the FIFO crossbar). The same program therefore
runs on either network.

## Transfers: asynchronous or synchronous, blocking or non-blocking

This is the part that needs care when you write programs.

**Blocking port.** The unit checks availability before each word:

* A blocking input reads only when the crosspoint shows a word (`rx_valid`).
* A blocking output offers a word only when the crosspoint can take it
  (`tx_ready`: a FIFO that is not full, or a bus receiver that is waiting
  for this unit).

A blocking sender does not drive `tx_valid` while it waits. So several
senders may wait on one bus without colliding.

**Non-blocking port.** Nothing is checked:

* An input hands the cell whatever the crosspoint holds.
* An output sends whenever the cell has a word.

This is correct only if the schedule guarantees the other side is there. A
non-blocking write into a full FIFO is dropped and sets that crosspoint's
sticky `overflow` flag. A non-blocking send on a bus with no listener is
lost.

**Bus network rules (`sync_bus_net`).**

* A receiver names both a bus and the sending unit. It sees a word only from
  that unit.
* A sender is ready when at least one receiver on its bus is ready for it.
  All such receivers take the word (broadcast).
* Two senders driving one bus in the same cycle is a schedule error. The bus
  then carries nothing, a sticky `conflict` bit is set and an assertion
  fires.

Because the receiver picks its sender, the hazards are of one kind: two
pairs of units that talk on the same bus at the same time. There is also a
less obvious case. A receiver that starts listening to unit U early can take
words that U meant for someone else on that bus. The end-to-end test has
such a case: the DSP must not listen to memory Hr until Hr has finished
feeding the adder. This is the timing information the off-line schedule must
provide. The FIFO crossbar has neither problem, because each crosspoint is
point-to-point and buffers.

**FIFO crossbar rules (`fifo_crossbar`, `xpoint_fifo`).**

* The crossbar has NS unit outputs and NR unit inputs.
* Crosspoint (s, r) exists when bit `s*NR+r` of `CONNECT` is set. All
  crosspoints exist by default.
* Crosspoints are first-word-fall-through FIFOs of `DEPTH` words. They
  accept a read and a write in the same cycle, even when full.

## The GMDF-alpha instance (`gmdf_arch`, the top)

| index | unit | cell | inputs |
|---|---|---|---|
| 0 | In | `input_cell`, fed by the input data queue (`in_valid/in_data/in_ready`, 64 words) | 0, 1 |
| 1 | FFT | `fft_cell`, FFT and inverse FFT | 2, 3 |
| 2 | DSP | not built: its network ports are the `dsp_*` ports | 4, 5 |
| 3 | Add | `adder_cell` | 6, 7 |
| 4 | Hr | `data_mem_cell` (coefficients, real parts) | 8, 9 |
| 5 | Hi | `data_mem_cell` (coefficients, imaginary parts) | 10, 11 |

Parameters of the top:

* `NET_FIFO = 0` (default) selects two synchronous buses (`NBUS = 2`). This
  is the network after communication synthesis.
* `NET_FIFO = 1` selects the raw FIFO crossbar with one line per unit output,
  as the system looks before that optimisation.
* `NET_MIXED = 1` (with `NET_FIFO = 0`) builds both networks. This is the
  general result of communication synthesis: edges the schedule cannot make
  synchronous keep their FIFO, the rest use the buses. A port takes its FIFO
  crosspoint when its instruction names the reserved bus number `BUS_ASYNC`
  (all ones), and a bus otherwise. `FIFO_CONNECT` (bit `s*12+r`: unit s to
  input r) keeps only the FIFO crosspoints that are needed.
* Programs are loaded through `prog_we/prog_unit/prog_addr/prog_instr`.
  `seg_last[u]` is the last address of unit u's loop. Units run while `run`
  is high.
* Status outputs: per-unit instruction ends, loop wraps and blocking-wait
  flags; the words carried per bus; and the sticky conflict and overflow
  flags.

## Computation cells

All data words are complex: the signed 16-bit real part is in bits 31:16 and
the imaginary part in bits 15:0. Cycle counts run from the edge that takes
`start` to the edge that raises `done`, with every stream always ready.

* **`fft_cell`** (`NFFT = 64`).
  * It loads NFFT words at bit-reversed addresses, then runs log2(NFFT)
    radix-2 stages in place, one butterfly per cycle, then sends the results
    in natural order.
  * Twiddles are Q1.14 constants computed at elaboration:
    cos(2πk/N) ∓ j·sin(2πk/N).
  * The forward transform is unscaled and saturates each butterfly to 16
    bits. Keep inputs below 32767/NFFT to avoid saturation. The inverse
    transform halves each stage, so IFFT(FFT(x)) ≈ x.
  * Products are truncated. Error against a double-precision DFT stays
    within about a dozen LSB at 64 points.
  * Timing: NFFT + (NFFT/2)·log2 NFFT + NFFT + 1 cycles, which is 321 for
    64 points.
* **`adder_cell`** (`MAXLEN = 64`). It reads `len` words from input 0 into a
  buffer, then `len` words from input 1 and adds them component by component
  with saturation, then sends the sums. Timing: 3·len + 1 cycles. Taking the
  streams one at a time is deliberate. With two buses, one memory can both
  feed the adder and, with its next instruction, store the result.
* **`data_mem_cell`** (`DEPTH = 1024`). `OP_STORE` writes `len` words from
  input 0 starting at `base`. `OP_LOAD` sends `len` words starting at `base`.
  Addresses wrap at DEPTH. Timing: len + 1 cycles.
* **`input_cell`**. `OP_INPUT` passes `len` words from the input queue to the
  output, with no storage. Timing: len + 1 cycles.

## Clocking and reset

Everything runs on one clock `clk`. Reset `rst_n` is synchronous and
active-low. It clears controllers, pointers and flags, but not memory
contents. The published architecture allows each unit its own clock, since
units synchronise only on data. This RTL does not model that: the FIFOs are
single-clock.

## Simulating

Every file is named after the module it holds, so verilator can find
modules by itself:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dspa_pkg.sv tb/tb_gmdf_arch.sv --top-module tb_gmdf_arch
./obj_dir/Vtb_gmdf_arch
```

Each testbench prints `TB_RESULT checks=N failures=M`. There is one per
module, `tb_<module>`. The end-to-end tests are listed below.

* **`tb_gmdf_arch`**: the top at its default parameters (two buses).
* **`tb_gmdf_arch_fifo`**: the same scenario on the FIFO crossbar.
* **`tb_gmdf_arch_mixed`**: the mixed network, with a single FIFO crosspoint
  (DSP to Hr). The coefficient block of step 1 takes it; everything else
  uses the buses.

Both are driven by `tb/gmdf_host.sv`, which loads the unit programs and
plays the DSP. It runs two iterations of the following sequence.

1. The DSP sends a coefficient block to Hr.
2. An input block goes through In to the FFT. The result comes back to the
   DSP non-blocking and is checked against a DFT.
3. The DSP sends the spectrum back for the inverse FFT and checks that the
   input block returns.
4. The DSP sends an error block through FFT → Add, while Hr → Add → Hr
   updates the coefficients. The DSP then reads Hr back and checks it
   against H + DFT(e).
5. A block goes through Hi and back.

On the FIFO crossbar, and on the mixed network, steps 1 and 2 run at the
same time. On two buses alone they must not overlap, and the host checks
that they did not.

At the end the host checks instruction counts, loop wraps, words per bus, no
conflict and no overflow. It also checks that every mechanism actually
happened. A 64-point iteration takes about 1375 cycles.

Last, the host makes one schedule error on purpose and checks that the
network reports it. On the FIFO crossbar it overflows a crosspoint that no
instruction reads. On the buses it drives bus 0 non-blocking while In sends
on it, which must set the conflict flag (the bus assertion is switched off
for this).

## Relation to the published architecture

Taken from the published architecture:

* units with a main controller, a local instruction memory and a specific
  controller;
* instructions that name crosspoints, protocols and op-codes;
* the global instruction loop;
* FIFO crosspoints on a crossbar, and synchronous shared buses;
* blocking and non-blocking protocols;
* the GMDF-alpha unit set: FFT/FFT⁻¹ operator, adder, Hr and Hi memories,
  input unit, DSP, six FIFO buses before and two synchronous buses after
  communication synthesis.

Choices made in this design, not given by the source:

* all widths, the word format and the instruction encoding;
* the FFT size (64) and its fixed-point algorithm;
* FIFO, memory and instruction-memory depths;
* the two-inputs/one-output shape of every unit;
* how the adder sequences its inputs;
* the bus receiver naming its sender, broadcast, the conflict flag;
* selecting FIFO or bus per port through a reserved bus number;
* dropping words on FIFO overflow;
* one clock for all units.

Not included:

* the DSP56002 (only its ports);
* the off-line partitioning, scheduling and communication-synthesis
  algorithms;
* the DMA and memory-mapped transfer modes of processor units;
* the software nodes of the echo canceller.

The source gives block sizes only as symbols (N, K, R). Its timings are in
microseconds with no clock frequency, so the 8 ms real-time budget of the
echo canceller cannot be checked against this RTL.
