# Analog matrix-vector coprocessor for a hybrid analog + RISC-V tile

Resistive-memory crossbars can compute a whole matrix-vector product
`y = A x` in one analog step. The matrix sits in the crossbar as programmed
conductances. The vector `x` drives the wordlines as voltages. Each cell
multiplies (Ohm's law) and each bitline sums the currents (Kirchhoff's law).
Programming the cells is slow, so the approach pays off when one matrix is used
many times, as in iterative linear solvers such as conjugate gradient (CG) and
BiCG-Stab.

This RTL treats such crossbars as a functional unit of a general-purpose
RISC-V core. Each tile has one core and one **analog coprocessor**. The
coprocessor holds one or more **compute arrays**, and the core drives it with
five custom instructions over a RoCC-style (Rocket Custom Coprocessor) command
port. Vectors do not travel through that command port. They go through memory:
the coprocessor has its own port into the tile's cache, shared by all of its
arrays. An array's result can also go straight into another array's input
buffer, so chained products keep their intermediate vectors on chip.

What is here: the coprocessor's controller, buffers and array organisation
(synthesizable), a behavioural model of the analog crossbar with its DACs and
ADCs, and testbenches that run CG and BiCG-Stab through the design. What is not
here: the RISC-V core, the caches, the coherence directory and the mesh
network. These are standard components, and the tile brings their connection
points out as ports.

## The five instructions

Every instruction uses `rs1` to name an array. Where memory is touched, `rs2`
is the byte address of the first word. Words are IEEE-754 binary64 values at
consecutive 8-byte addresses.

| mnemonic | funct7 | rs1    | rs2              | effect |
|----------|--------|--------|------------------|--------|
| `mvm.set`| 0      | array  | matrix address   | reads `DIM*DIM` words, row-major (`A[r][c]` at `rs2 + 8*(r*DIM+c)`), and programs them into the array |
| `mvm.l`  | 1      | array  | vector address   | reads `DIM` words into the array's input buffer |
| `mvm`    | 2      | array  | unused           | multiplies: input buffer → crossbar → output buffer |
| `mvm.s`  | 3      | array  | result address   | writes the `DIM` output-buffer words to memory |
| `mvm.mv` | 4      | source | destination array| copies the source's output buffer into the destination's input buffer, with no memory traffic |

A typical product is `mvm.set` once, then `mvm.l`, `mvm` and `mvm.s` for each
vector. Two arrays in series compute `B (A x)` with `mvm.l`, `mvm` on the
first array, `mvm.mv`, `mvm` on the second, then `mvm.s`.

This design chose the following:

- the funct7 numbering;
- the row-major matrix layout;
- `rs2` as the destination array of `mvm.mv`;
- the status response described next.

If the instruction's `xd` bit is set, the coprocessor returns a response to
register `rd` when the command has finished. The response carries a status:

- 0: done;
- 1: an array number is out of range;
- 2: unknown funct7.

A bad command has no other effect. Software can use `xd` as a completion
fence before it reads a stored vector. It can also wait for `busy` to fall.

## How a command runs (`mvm_controller`)

The controller takes one command at a time. `cmd_ready` is high only when the
controller is idle. `busy` is high from the clock after a command is accepted
until the command has finished and its response, if any, has been taken.

**Memory streaming** (`mvm.set`, `mvm.l`, `mvm.s`):

- A request goes out on every clock that `mem_req_ready` is high, so several
  can be in flight.
- Each request gets exactly one response, in order. A store's response is its
  acknowledgement. The controller always accepts responses.
- Loads are placed by counting responses, not requests. So load latency and
  back-pressure never reorder data.
- A command ends when its last response arrives. After `mvm.s` completes, the
  vector is therefore in memory.

With a memory that takes one request per clock and answers after `L` clocks,
these commands take about the following:

| command | clocks |
|---------|--------|
| `mvm.l`, `mvm.s` | `DIM + L` |
| `mvm.set` | `DIM*DIM + L` |
| `mvm` | `MVM_LATENCY + 2` |
| `mvm.mv` | exactly `DIM` (one word per clock) |

Add one clock for a response.

**Array side.** The controller sends one set of signals to all arrays:

- write index and data;
- programming row, column and value;
- start.

These come with an array number, `wr_id`. Each `compute_array` compares
`wr_id` with its own `ARRAY_ID` and ignores signals meant for another array.
Reads use a separate number, `rd_id`, which selects whose output-buffer word
the coprocessor passes on. That lets `mvm.mv` read one array and write another
in the same clock. Because commands run one at a time, at most one array
multiplies at once; an assertion checks this.

## Compute array and crossbar model

`compute_array` = `input_buffer` + `analog_crossbar` + `output_buffer`.

- **Input buffer.** Written one word per clock. It presents all `DIM` words at
  once to the DACs, one DAC per wordline.
- **Crossbar** (`analog_crossbar`). A **behavioural model**, not synthesizable
  (it uses `real`). Wordline `c` carries `x[c]` and bitline `r` delivers
  `y[r]`, so cell `(c, r)` holds `A[r][c]`.
  - On `start` it samples the input vector.
  - After `MVM_LATENCY` clocks it produces all `y[r] = Σc A[r][c]·x[c]` in
    binary64 and pulses `done`. Rows are summed in increasing `c`.
  - Programming writes one cell per clock.
  - Reset clears the handshake state but keeps the conductances, since the
    cells are non-volatile.
- **Output buffer.** Captures all `DIM` ADC results in one clock. After that
  it is read one word at a time, for `mvm.s` and `mvm.mv`.

From `start` to the result being readable takes `MVM_LATENCY + 1` clocks.

Real analog arrays give only about 4–8 bits per cell and per conversion. The
architecture assumes that each visible array is really a group of
low-precision arrays. Their outputs are combined so that the array presents a
floating-point interface. The model implements that interface directly:

- DACs and ADCs are ideal;
- arithmetic is exact binary64;
- the combining scheme is not modelled;
- device write timing is not modelled.

Treat any result that depends on analog error as outside what this model can
show. Replacing `analog_crossbar` with a model that has noise or quantisation
needs no other change, because its ports are the real part's ports: DAC
inputs, ADC outputs, programming port, start/done.

## Mapping a solver onto the arrays

An array holds at most `DIM x DIM`, so the software side (not the RTL) does
two things:

- **Zero padding.** A smaller matrix is padded with zeros to a multiple of
  `DIM`.
- **Blocking.** A larger matrix is cut into `DIM x DIM` blocks, one array
  each. For block row `i`, the core sums the products of the blocks in that
  row.

On many tiles, each tile takes a contiguous block of rows and splits it
further across its own arrays. Arrays favour weak scaling: an array that is
only partly filled wastes its capacity.

`tb/tile_driver.sv` does exactly this. It plays the core: it runs CG and
BiCG-Stab in `real` arithmetic and sends every matrix-vector product to the
arrays.

## Top level: `hybrid_tile`

The tile contains the coprocessor only. Its ports are packed structs from
`mvm_pkg`:

| port group | direction | what connects there |
|------------|-----------|---------------------|
| `rocc_cmd_valid/ready`, `rocc_cmd` (`rocc_cmd_t`: 32-bit instruction, `rs1`, `rs2`) | in | the core's RoCC command |
| `rocc_resp_valid/ready`, `rocc_resp` (`rocc_resp_t`: `rd`, 64-bit data) | out | the core's RoCC response |
| `rocc_busy` | out | the core (fence) |
| `l1_req_valid/ready`, `l1_req` (`mem_req_t`: 64-bit byte address, `we`, 64-bit data) | out | the tile's L1 cache |
| `l1_resp_valid`, `l1_resp` (`mem_resp_t`: 64-bit data) | in | the tile's L1 cache |

The reset is asynchronous and active low. It clears every buffer to +0.0 and
all control state.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DIM` | 256 | rows = columns of one array; the single-accelerator study uses 256, the fixed 1024×1024 study uses 128 |
| `NUM_ARRAYS` | 2 | compute arrays per tile; the fixed-size study ranges from 1 to 64 per tile |
| `MVM_LATENCY` | 8 | clocks of one analog multiply; this design's own figure, not a measured one |

The defaults give two 256 × 256 arrays: the two-array chain of `mvm.mv`, at
the array size of the single-accelerator study. `DIM=128, NUM_ARRAYS=64`
holds a whole 1024 × 1024 matrix in one tile. The testbench for that case is
`tb_workload_1024`.

The synthesizable part is mostly buffer flip-flops. That is `2 × DIM × 64`
bits per array: 64 Kbit for the default tile, 1 Mbit for 64 arrays of 128. The
crossbar model is not synthesizable. Synthesis tools will stop at it, or need
it replaced by the real macro.

## Not built

| part | why it is only a port here |
|------|----------------------------|
| RISC-V core (out of order, with FPU and TLB) | an existing core; only its pipeline sizes are specified |
| L1 (32 KB) and L2 (4 MB) caches, MESI directory | existing memory-hierarchy components |
| 2D mesh router, 8 GB/s links, DRAM controllers | existing interconnect; only topology and bandwidth are known |
| multi-array floating-point emulation | a separate published scheme, not specified here; the crossbar model presents its interface |

## Testbenches

All of them are self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_input_buffer`, `tb_output_buffer` | random writes or captures against a reference copy |
| `tb_analog_crossbar` | small-integer matrices and vectors against an integer product; latency = `MVM_LATENCY`; a start while busy is ignored |
| `tb_compute_array` | ID decode (signals sent with the other ID must be ignored); product; latency `MVM_LATENCY+1` |
| `tb_mvm_controller` | every instruction against a memory model with 30 % random back-pressure and a model of the array side; `mvm.mv` takes `DIM` clocks; status codes |
| `tb_analog_coprocessor`, `tb_hybrid_tile` | end-to-end at reduced size, see below |
| `tb_hybrid_tile_full` | the same run at the default size: two 256 × 256 arrays, CG and BiCG-Stab at N = 4, 8, …, 256, each zero-padded into one array |
| `tb_workload_1024` | CG and BiCG-Stab on 1024 × 1024 over 64 arrays of 128 × 128 in one tile |

The end-to-end runs (`tile_driver`) go through these steps:

1. A two-array chain `M1 (M0 x)` on integers, checked exactly.
2. Illegal commands.
3. Up to ten iterations each of CG and BiCG-Stab.

Checks during and after the run:

- Every block product must match, bit for bit, the same sum formed in the
  testbench.
- Each solver's true residual `‖b − Ax‖/‖b‖` must fall below 1e-6.
- A failure is counted for any mechanism that never occurred: each
  instruction, memory back-pressure, several requests in flight, a command
  waiting on `busy`, a held-back response, both error statuses, and, where the
  configuration allows, block summation and zero padding.

`tb_hybrid_tile` uses four 8 × 8 arrays and a 13 × 13 problem. That exercises
both padding and 2 × 2 blocking.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hybrid_tile \
    rtl/mvm_pkg.sv tb/tb_rocc_pkg.sv tb/tb_hybrid_tile.sv -o sim
./obj_dir/sim
```

Swap in another testbench name as needed. Other files are found through
`-Irtl -Itb`. The default-size run and the 1024 × 1024 run each simulate in a
few seconds. Compiling the 64-array model takes about a minute.

## Choices this design makes where the architecture is silent

- **Word format:** binary64 words. The architecture only asks for a
  floating-point interface.
- **Encoding:** funct7 codes, the matrix layout in memory, `rs2` of `mvm.mv`,
  and the status response.
- **Memory port protocol:** valid/ready requests with in-order responses, and
  an acknowledgement for every store.
- **Execution:** one command at a time. Arrays do not overlap their work.
  `mvm.mv` moves one word per clock.
- **Timing:** `MVM_LATENCY` = 8. Programming takes one cell per clock.
- **Array model:** an ideal floating-point array, without analog error.
- **Reset:** reset values, and conductances that survive reset.
