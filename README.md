# RaPiD application pipelines in SystemVerilog

RaPiD ("Reconfigurable Pipelined Datapath") is a coarse-grained configurable
array. It is a linear row of identical cells, each with a multiplier, ALUs,
registers and small local memories, joined by segmented 16-bit buses. The
array is not programmed with instructions. Each application is laid out as
a deep, one-dimensional pipeline: data streams in at one end, every cell does
a fixed piece of the work each cycle, and results stream out at the other
end. The few things that change from cycle to cycle (load a weight now,
start a new row, swap buffers) are carried by one-bit control signals that
travel down their own pipelined buses next to the data.

This repository implements the RaPiD-1 units, six application mappings
built from them as fixed netlists, and a generic programmable array of
RaPiD cells with its configuration memory:

| Mapping | Module | Size at default parameters |
|---|---|---|
| FIR filter, one tap per cell | `fir_array` | 16 taps |
| FIR filter, several taps per cell (time-shared multipliers) | `firx_array` | 16 cells x 4 taps = 64 taps |
| Matrix multiply / 8-point 1-D DCT | `mm_array` | 8 cells |
| 8x8 2-D DCT with transpose | `dct2d_array` | 16 cells |
| Motion estimation (full search, minimum block difference) | `me_array` | 16 stages, 16x16 super block, 32-row window |
| Cubic Bezier curves (Apex) | `apex_array` | 12 cells |
| Programmable array (any of the above, written as configuration bits) | `rapid_fabric` | 16 cells |

`rapid_top` puts all seven behind one set of stream FIFOs with an array-wide
stall, plus the memory controller's three address generators. A static
configuration input, `cfg_app`, selects which mapping is connected. Changing
it stands for reconfiguring the array.

## The RaPiD-1 units

All words are 16-bit two's-complement integers (`rapid_pkg::WORD_W`). A
RaPiD-1 array has 16 cells (`NUM_CELLS`) and 32-word local memories
(`MEM_WORDS`).

* `rapid_alu`: add, subtract, pass, and/or/xor/not. It has a carry in/out
  for chaining into wider words, and sign and zero status outputs that can
  drive control (motion estimation uses the sign).
* `rapid_mult`: 16x16 signed multiplier with a 32-bit product. The product
  is shifted right by a static `SHIFT` (fixed-point scaling), both halves are
  outputs, and an optional pipeline register is set by `PIPE`.
* `rapid_dpreg`: a datapath register with its input multiplexer. The input
  can select one of `NBUS` bus segments, constant zero, or its own output
  (hold).
* `rapid_local_mem`: 32 x 16 memory with an address register that can
  clear, load or increment. Read is combinational and write is clocked.
* `rapid_bus_connector`: joins two segments of a bus track. It can be open,
  or drive either way, with 0 to 3 pipeline registers.
* `rapid_ctrl_lut`: a 3-input lookup table for computing control bits.
* `rapid_stream_fifo`: the FIFO of one I/O stream. It is first-word
  fall-through, and assertions catch overflow and underflow.
* `rapid_stream_agen`: an address generator for one stream. It produces a
  two-level loop of addresses: base, inner stride and count, outer stride
  and count, with a ready/valid handshake.

Every clocked unit has an `en` input. The top drives one `en` for the whole
selected pipeline, so a stall freezes every register and memory in the same
cycle.

The six mappings are fixed netlists of these units. Each is wired as the
published RaPiD mapping lays out one cell, and is replicated per cell. The
same cells can also be built from configuration bits, on the programmable
array described next.

## The programmable array (`rapid_fabric`, `rapid_cell`)

A cell has 14 16-bit tracks and 15 one-bit control buses running left to
right. Everything static is set by the cell's configuration word
(`rapid_fabric_pkg::cell_cfg_t`, 432 bits):

* **Inputs.** Each unit input has a 16:1 multiplexer: any of the 14 track
  segments, zero, or the unit's own output (feedback, for holding or
  accumulating).
* **Outputs.** Each track segment is either driven by one unit output of the
  cell or continues the segment from the left. ALU and multiplier outputs
  always pass through a register.
* **Bus connectors.** At the right edge of the cell, each track's connector
  is open or passes the segment on through 0 to 3 registers. A zero-delay
  connector makes a longer segment. The registered ones build pipelines
  such as the FIR's doubly pipelined X bus.
* **Control.** Each control bus can have a register in each cell, and each
  cell may overwrite a bus with a control source. A dynamic control input
  (register load, memory write/increment/clear/load, the choice between an
  ALU's two functions) takes one of:
  * a constant;
  * a control bus;
  * the registered sign of an ALU;
  * the cell's 3-input lookup table, or its register.

The configuration memory is written one 16-bit word per cycle: 27 words per
cell. Word w holds bits 16w..16w+15 of `cell_cfg_t`. Write it only while
the array is idle. Reset clears it, which leaves every connector open.

In `rapid_top` (`cfg_app` 6), the data word enters on track 0 and the
context bits on control buses 0..8. The result is track 1 of the last cell.
It is written to the output stream in cycles where control bus 8 leaves the
last cell high, so the configuration decides which cycles produce output.

Its testbench programs two configurations and checks them:
* the one-tap-per-cell FIR filter;
* the 2-D DCT's token machine in every cell's lookup table, with an
  |a−b| accumulator and a local memory.

The end-to-end test runs the FIR configuration through the top.

Choices of this design where RaPiD leaves room:
* every track is cut into one segment per cell;
* connectors drive left to right only;
* unit outputs are always registered;
* the bit layout of the configuration is its own.

## Streams, context bits and the stall

```
in0 FIFO  {context bits[8:0], data[15:0]} --+
in1 FIFO  reference-block data (ME only) ---+--> selected pipeline --> out FIFO (32 bit)
                          en = words available && out FIFO not full
```

* In RaPiD a global pipeline controller injects a few control bits per cycle
  at the head of the control buses. Here those bits arrive as the upper
  9 bits of each input-stream-0 word. Whoever fills the stream (the host, or
  a testbench) plays the controller. Each mapping's header comment gives its
  bit assignment and the exact word schedule it expects.
* The pipeline advances only if every stream word it needs this cycle is
  present and the output FIFO has room. Otherwise it stalls. Stall cycles
  are counted on `stall_cycles`.
* The output word is 32 bits:
  * Apex puts y above x.
  * Motion estimation puts the position index above the block difference.
  * The other mappings use the low half.

| `cfg_app` | Mapping | Context bits `c[]` |
|---|---|---|
| 0 | FIR | `c[0]` sample valid, `c[1]` weight load |
| 1 | matrix multiply | `c[0]` valid, `c[1]` row end, `c[2]` weight write |
| 2 | 2-D DCT | `{ld, p1, s1, rend1, p0, s0, we, rend0, av}` |
| 3 | Apex | `c[0]` run, `c[1]` load, `c[5:2]` register select |
| 4 | motion estimation | `rapid_pkg::me_ctl_t` |
| 5 | extended FIR | `c[0]` sample valid, `c[1]` load phase, `c[2]` weight write |
| 6 | programmable array | control buses 0..8, as the configuration uses them |

## The mappings

### FIR, one tap per cell (`fir_array`, `fir_cell`)

* The X bus has two registers per cell and the partial-sum (Y) bus has one.
  Every partial sum therefore meets each input sample exactly once.
* Weights are loaded through the X bus, sent as W[15] first, with a load bit
  on a singly pipelined control bus. That bit overtakes the weights, so each
  cell's weight register captures exactly one weight. It then switches to
  hold.
* Throughput is one sample per cycle.
* Latency: Y[i] appears 17 enabled cycles after X[i].

### FIR with more taps than multipliers (`firx_array`, `firx_cell`)

This is the least obvious of the mappings.

**Schedule.**
* Each cell holds M weights in one local memory and M pending partial sums
  in another.
* The first stage takes a sample once (`in_rdy` handshake) and repeats it on
  the X bus for M cycles. Each cell uses those cycles to apply its M taps in
  turn, highest tap first.
* In phase 0 the cell starts a new partial sum from the value arriving on
  the Y bus.
* In phases 1..M-1 it continues the sums it started in earlier periods,
  reading them back from the second memory.
* The sum finished in phase M-1 goes to the next cell.

**Cells and buses.**
* Cell k holds taps (N-1-k)·M .. (N-1-k)·M+M-1. Partial sums therefore
  travel in the same direction as the samples and finish in the last cell.
* The X bus has one register per cell and the Y bus has two. That offset is
  exactly what makes a sum leaving one cell in phase M-1 arrive at the next
  cell in its phase 0.

**The second memory as a delay line.**
* It is a circular buffer of M+1 words whose address increments every
  cycle. A partial sum written in phase p is read back exactly one period
  plus one cycle later, in phase p+1.
* This needs M+1 ≤ 32, so M ≤ 31, up to 496 taps.

**Loading.**
* Weights load in M groups of N words.
* A write enable that travels at half the data speed writes word k of each
  group into cell k.
* The partial-sum memory is not cleared. The first N·M−1 outputs use partial sums
  that began before the first sample, so they are undefined and should be
  dropped.

**Timing.**
* One sample and one output every M cycles.
* Y[n] appears N+M enabled cycles after X[n] is taken.

### Matrix multiply and 1-D DCT (`mm_array`, `mm_cell`)

* Cell k holds one column of W in its local memory and accumulates one dot
  product per row of A.
* The results merge onto an output bus with two registers per cell. A later
  cell's result has to overtake the ones behind it, so a row leaves in
  reverse cell order. Loading W's columns in reverse (cell k gets column
  N-1-k) gives row-major output.
* The write enable for loading W travels at half speed, so one pulse per W
  row fills every cell.
* The first result of a row appears N+2 cycles after the row's last element.
* The DCT scale factor is left out.

### 2-D DCT with the transpose (`dct2d_array`, `dct2d_cell`)

**Structure.**
* Y = ((A·W)ᵀ·W)ᵀ on 16 cells: two groups of 8 matrix-multiply cells.
* Each cell stores its results in two alternating 8-word buffers.
* The first group's output is read out column-major, which transposes it,
  and becomes the second group's input.

**The transpose controller.**
* The column-major read-out is the part that does not fit the plain
  pipeline. Each cell has a three-register token machine (T, S, P) with a
  3-input LUT computing `T <= S ? P : T`.
* A start/stop pulse S every 8 words and a token pulse P every 64 words
  make each cell, in turn, empty its buffer onto the output bus for 8
  cycles.
* The controller's size does not depend on how long each cell holds the
  token.

**Loading and output.**
* While loading, a multiplexer at the group boundary lets the input bus run
  through into the second group. That way one half-speed write-enable bus
  loads W into both groups; each W row is sent twice.
* The output block is WᵀAW in row-major order.
* Three blocks of flush words follow the last block.

### Motion estimation (`me_array`, `me_cell`)

**Layout.**
* The reference frame is handled as 16x16 "super blocks", each made of four
  8x8 blocks. Each is compared with every position inside a 32-row search
  window.
* Stage c holds column c of the super block, in two buffers chosen by a
  parity bit, so the next block loads while this one is compared. It also
  holds one 32-word column of the window.

**Per row.**
* One ALU subtracts. Its sign selects add or subtract in a second ALU, which
  adds |difference| to a running row sum on the sum bus.
* Two sum buses keep the left and right halves apart.
* The window memory's address is reloaded from a StartRow register at the
  end of each block difference, which slides the block down one row.

**Between column positions.**
* Every window column moves one stage along; this is the QW shift phase, and
  a new column enters at the start.

**Final stage.**
* It totals the row sums separately for the four 8x8 blocks and keeps each
  block's minimum.
* Its position index is h·(32−16+1)+s, where h is the column position and s
  the start row.

### Bezier curves (`apex_array`, `apex_cell`)

* Each coordinate uses six cells as a de Casteljau triangle, with two such
  trees side by side.
* Each node computes `l + ((r − l)·t) >>> 15` with its own copy of t, which
  it advances by dt.
* The trigger reaches each tree level two cycles after the level below, so
  all nodes use the same t.
* t and dt are Q1.15 fractions, with 0x8000 = 1.0.
* After loading dt and the eight control points, each `run` cycle produces
  one curve point 5 cycles later.

## How far to trust it

Every mapping is checked against an independent software model in its
testbench. The checks run at the default size, with random data and random
stall cycles, and cover every output value plus the stated latencies and
rates.

`tb_rapid_top` runs the unmodified top (default parameters). It takes all
six mappings and the programmable array (configured as a FIR filter)
through the shared streams with a starving producer and a blocking
consumer, and counts that each mechanism occurred:

* empty-input stall
* full-output stall
* configuration switch
* FIR weight load
* matrix weight load
* DCT token
* Apex point
* window shift
* buffer parity switch
* extended-FIR weight load
* configuration write and output of the programmable array
* address generation

It prints `TB_RESULT checks=… failures=…` like every other testbench.

Choices this design makes where the published mapping is silent:

* the number formats (Q1.15 in Apex, 16-bit wrap-around elsewhere)
* the context-bit encodings and the word schedules
* the loading protocols of the FIR variants
* the second sum bus and the position index in motion estimation
* the separate column-shift phase in motion estimation (the window shift is
  not overlapped with computation)
* FIFO depth 8 and address-generator widths

Not included:

* the global pipeline controller as a separate unit (its bits come with the
  stream)
* external memory
* right-to-left bus connectors and tracks with longer fixed segments in the
  programmable array
* the 32-bit t option of Apex
* reconfiguration timing

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/rapid_pkg.sv tb/tb_rapid_top.sv --top-module tb_rapid_top -o sim
./obj_dir/sim
```

Replace `tb_rapid_top` with any `tb/tb_<module>.sv` to test one unit or
mapping. Each testbench has a watchdog and ends with a `TB_RESULT` line.
Parameters that set sizes (`NUM_TAPS`, `N`, `M`, `C`, `R`, `QR`,
`FIFO_DEPTH`) can be changed at instantiation. The constraints on them are
stated in each module's header comment.
