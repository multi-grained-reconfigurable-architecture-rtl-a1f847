# MuGRA: a reconfigurable array of tiny neural networks for approximate function evaluation

Many error-tolerant programs spend their time evaluating the same few
arithmetic functions over and over, for example `sin`, `tanh`, `2^x`,
`log2(1+x)` or a Euclidean distance inside k-means. MuGRA (multi-grained
reconfigurable architecture) does not build a separate circuit for each
function. It learns each function as a very small neural network of a special
shape, the **bisection neural network (BNN)**, and runs many such networks at
once on one large array of identical neuron processing elements (PEs).

- The array is wired once, in the BNN pattern. A configuration only sets
  weights, biases and a few mode bits.
- "Multi-grained" means the array can be cut up at any granularity. One big
  kernel, or dozens of small kernels of different shapes, can share it, each
  computing its own function.
- Every kernel is fully pipelined. It accepts one sample per clock and returns
  its result a fixed number of cycles later.

This repository holds synthesizable SystemVerilog for the accelerator side of
such a system:
- the PE array;
- its configuration, instruction and data buffers;
- the memory-sharing interconnect;
- the controller.

It also holds a self-checking testbench for every block and an end-to-end
testbench at full size. The host CPU, its bus, the DMA engine and DRAM are not
part of the RTL. Their side of each buffer is a plain port.

## 1. The bisection kernel

In an ordinary fully connected network every neuron sees every neuron of the
layer before it. In a BNN each neuron sees exactly **two** neighbouring
neurons of the previous layer:

    y = LReLU( W1 * x_left + W2 * x_right + b )

A kernel is described by its layer widths, for example `1-2-3-2-1`. That
kernel has five layers and nine neurons, takes one input and gives one output.
A layer may grow by one neuron, shrink by one or keep its width. With two
inputs per neuron, a kernel maps directly onto a fixed mesh in which every PE
is hard-wired to two PEs of the row above. No routing network is needed.

The row above is the kernel's previous layer. How a layer sits relative to the
layer above depends on the row parity, as shown in section 3.

## 2. The processing element (`pe`, `neuron_unit`)

Each PE has four parts:

- **A 56-bit configuration register**, laid out as
  `{W1[15:0], W2[15:0], b[15:0], ctrl[7:0]}`. The control byte is
  `{RD, WR, p[1:0], Q[3:0]}`:
  - `RD` selects the input-buffer word instead of the neuron result. This
    makes the PE an input-layer PE.
  - `WR` sends the result to the output buffer instead of the output register.
    This makes the PE an output-layer PE.
  - `Q` is the number of fraction bits of the fixed-point format.
  - `p` sets the Leaky-ReLU slope `alpha = 2^-p`.
  
  The register resets to zero. It is written only by the configuration
  broadcast, and only when the entry's PE index equals the PE's own.

- **A neuron unit**, which is purely combinational:
  1. It computes two 16 x 16 signed products at full 32 bits.
  2. It shifts each product arithmetically right by `Q` and truncates it back
     to 16 bits.
  3. It adds the two terms and then the bias, wrapping in 16 bits.
  4. It applies the Leaky-ReLU. A negative sum is shifted right by `p`; a
     non-negative sum passes unchanged. A multiplexer on the sign bit chooses.
     No multiplier is spent on `alpha`.

- **An RD multiplexer and a WR demultiplexer**, which give each PE one of three
  roles:

  | RD | WR | role | output register | output-bank port |
  |----|----|------|-----------------|------------------|
  | 1  | 0  | input layer | loads the input-buffer word | idle |
  | 0  | 0  | hidden layer | loads the neuron result | idle |
  | 0  | 1  | output layer | held at zero | neuron result, written at the next edge |

- **A valid bit**, which travels with every output register. This is this
  design's addition. It is how the array knows which values are real samples:
  - An input whose weight is non-zero counts as *used*.
  - A neuron result is valid when all its used inputs are valid.
  - A PE with both weights zero is never valid.
  
  The valid bit lets samples stream with gaps. It tells an output PE exactly
  when to write. It also gives the controller an "array still busy" signal.

**Kernel isolation.** A PE ignores a neighbour whose weight is zero, so
kernels packed right next to each other cannot disturb each other. Unused PEs
keep their reset state of all zeros and produce nothing.

## 3. The PE array and kernel placement (`pe_array`)

`ROWS x COLS` PEs, by default 28 x 28 = 784, are wired like a brick wall. PE
(r, c) takes its two inputs from row r-1:

| source row r-1 | left input | right input |
|----------------|------------|-------------|
| even           | (r-1, c)   | (r-1, c+1)  |
| odd            | (r-1, c-1) | (r-1, c)    |

A neighbour outside the array reads as value 0 and not valid. PE numbers are
`row * COLS + col`.

Placing a kernel with its top-left neuron at (x, y) follows from this wiring.
Walk down the layers. A layer that grows by one must start one column further
left when it leaves an even row. A layer that shrinks by one must start one
column further right when it leaves an odd row. Otherwise the layer keeps its
start column. A kernel fits when every PE it needs is inside the array and
still free.

The testbench package `tb/tb_bnn_pkg.sv` implements this rule in
`array_model::place()`. It also holds an independent row-by-row reference
model, which every array-level test compares against.

Choosing *where* to put kernels, and keeping the table of which PE does what,
is the host compiler's job. It is not hardware.

**Pipeline timing.** Every PE has one register stage, so a kernel of `d` layers
is `d - 1` stages deep after its input registers. Sample `s` loaded into the
input PEs at edge `t` leaves the output PE combinationally during cycle
`t + d - 1` and is written into the output bank at the next edge. A new sample
can enter every cycle.

## 4. Memory sharing and the double-buffered banks (`bank_group`, `dbuf_bank`, `data_buffer`)

Giving every PE its own input and output memory would need 784 x 2 memories.
Instead, the `GROUP_ROWS = 4` PEs of one column in rows `4g .. 4g+3` form a
**group** that shares one input bank and one output bank. That gives
7 x 28 = 196 banks on each side. Bank `g * COLS + c` serves group row `g` of
column `c`.

The sharing works because of the placement rule. Within a group only one PE
reads the input bank (RD) and only one PE writes the output bank (WR).
- **Input side.** `bank_group` offers the bank's word to all four PEs. Only
  the PE with RD set sees it as valid.
- **Output side.** `bank_group` forwards the valid result of the PE with WR
  set. If two PEs of one group ever write in the same cycle, the
  lower-numbered one wins and `conflict` is raised. That can only happen with
  a bad configuration.

The group is a real constraint on placement: two kernels can share a group
only if they do not both need the same bank.

**Banks.** Each bank (`dbuf_bank`) is one 16 x 2304-bit memory split into two
halves of 1152 words:
- one half faces the PE array while the DMA fills or drains the other;
- `swap` exchanges them;
- both ports read synchronously, one cycle after the address.

**Addressing.**
- All input banks are read in lockstep at one sample address. Sample `n` of
  every kernel is word `n` of its input banks.
- Each output bank has its own write pointer, which restarts at 0 at every
  swap. The `n`-th result of an output PE lands at word `n`.

A batch therefore holds at most 1152 samples per bank.

**DMA handshake.** This is this design's own choice:

| flag | set by | cleared by | meaning |
|------|--------|------------|---------|
| `ib_full` | `dma_ib_done` pulse | input swap | a fresh input batch is waiting |
| `ob_free` | reset, `dma_ob_done` pulse | output swap | the last output batch has been taken |

`store_req` pulses with `store_count` = batch size after each output swap.
The DMA then reads `dma_ob_bank` / `dma_ob_addr`, and the data appears one
cycle later. Because of the two halves, the DMA can prefetch batch `k+1` and
drain batch `k-1` while batch `k` is computed.

## 5. Controller and instruction stream (`fsm_controller`, `instr_decoder`, `instr_buffer`, `config_buffer`)

The host writes a program into the instruction buffer (256 x 32 bits). It
writes configuration entries `{PE index[9:0], 56-bit configuration}` into the
configuration buffer (1024 entries, one per PE and spare). It then raises
`enable`. The controller runs the program from address 0.

**Instruction word.** The format is this design's own:

| bits | field |
|------|-------|
| 31:30 | opcode: 0 END, 1 CONFIG, 2 COMPUTE |
| 29 | CONFIG only: compute right after configuring |
| 27:16 | number of configuration entries |
| 11:0 | number of samples in the batch |

An unknown opcode, or a compute of zero samples, is treated as END.

**States.** There are six states:

- **Idle.** Fetch and decode (one cycle of read latency). CONFIG goes to Load
  Config. COMPUTE goes to Load Data. END raises `done` until `enable` drops.
- **Load Config.** Wait for `cb_ready`: the host has finished writing entries.
- **Run Config.** Read one entry per cycle and broadcast it to all PEs.
  Afterwards, go back to Idle ("hold": the configuration stays for any number
  of later COMPUTEs) or straight to Load Data.
- **Load Data.** Wait for `ib_full`, then swap the input halves.
- **Execution.** Issue `n` sample reads, one per cycle. Allow two cycles for
  the bank read and the input register. Then wait until no PE holds a valid
  value.
- **Store Data.** Wait for `ob_free`, swap the output halves, pulse
  `store_req`, and go back to Idle with the program counter advanced.

The swaps are combinational on the state and the flag. The halves therefore
change at the very edge that leaves Load Data or Store Data, and the first
sample read already sees the new batch.

Assertions in the controller check two things:
- a swap lasts one cycle;
- an output swap is always followed by `store_req`.

**Cycle counts** at the default size:
- Configuring the whole array takes 784 cycles plus a few cycles of overhead.
- A batch of `n` samples whose deepest kernel has `d` layers stays
  `n + d + 1` cycles in Execution. That is one sample per clock, plus the
  pipeline depth, plus the buffer read and the exit check.

## 6. Sizes and parameters

| parameter | default | where |
|-----------|---------|-------|
| data / weight / bias width | 16-bit signed fixed point, Q set per PE (4 bits) | `mugra_pkg::NW` |
| PE configuration | 56 bits = 3 x 16 + 8 | `mugra_pkg::CFG_W` |
| array | 28 x 28 | `ROWS`, `COLS` |
| PEs per shared bank | 4 (one column) | `GROUP_ROWS` |
| bank | 2304 x 16 bits, two halves of 1152 | `BANK_DEPTH` |
| configuration buffer | 1024 entries | `CB_DEPTH` |
| instruction buffer | 256 words | `IB_DEPTH` |

The following follow the original architecture:
- the array size;
- the 16-bit format;
- the 56-bit PE word;
- the four PEs per bank;
- the bank size.

The following are this design's own choices:
- the two buffer depths;
- the bit layout of the control byte;
- the entry and instruction formats;
- the handshake flags;
- the valid bit.

Workloads of the kind the architecture targets all fit at the defaults:
- one-variable functions on `1-2-3-2-1` (9 PEs) or `1-2-3-4-3-2-1` (16 PEs);
- two-variable functions on `2-3-2-1` (8 PEs) or `2-3-4-3-2-1` (18 PEs);
- a k-means colour-distance kernel `3-4-3-2-1` (13 PEs).

A test set larger than 1152 points, such as a 55 x 55 grid of 3025 points, is
sent as several COMPUTE batches.

## 7. How far to trust it, and what differs

- **Verified.** Every block has a self-checking testbench. Each testbench has
  been shown to fail on a deliberately broken copy of its block. The
  end-to-end test runs the full 28 x 28 design with its defaults:
  - five kernels of three shapes, two batches;
  - a complete reconfiguration of all 784 PEs;
  - seven-layer kernels.
  
  It checks every output word against the reference model and every
  Execution length against `n + d + 1`. It also counts that each controller
  path and handshake wait actually happened.
- **Overflow.** Arithmetic wraps on overflow rather than saturating, and
  shifts round towards minus infinity. Weights must be trained for this
  format.
- **No placement check in hardware.** The hardware does not check placement.
  If two output PEs share a group, `conflict` flags it. If two input PEs
  share a group, both silently receive the same input word.
- **Not included.** The following are left to the system around the RTL:
  - the host processor and the AXI bus (plain host write ports stand in);
  - the DMA engine and DRAM (a DMA-side bank port stands in);
  - the compiler that trains masked networks and places kernels.

## 8. Files and simulation

`rtl/`

| file | contents |
|------|----------|
| `mugra_pkg.sv` | widths, PE configuration struct, entry and instruction formats, state enum |
| `neuron_unit.sv`, `pe.sv`, `pe_array.sv` | datapath |
| `bank_group.sv`, `dbuf_bank.sv`, `data_buffer.sv` | memory sharing and double buffers |
| `config_buffer.sv`, `instr_buffer.sv`, `instr_decoder.sv`, `fsm_controller.sv` | control |
| `mugra_top.sv` | the accelerator |

`tb/` has one `tb_<block>.sv` per block, plus `tb_bnn_pkg.sv`, the reference
model and placement rule.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mugra_pkg.sv tb/tb_bnn_pkg.sv tb/tb_mugra_top.sv -y rtl \
        --top-module tb_mugra_top -o sim
    ./obj_dir/sim

Replace the testbench name for the other blocks. The full-size end-to-end
test needs about a minute to compile and well under a second to run.
