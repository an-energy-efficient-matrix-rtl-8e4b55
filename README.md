# XIMA: binary matrix multiplication inside RRAM crossbars

This is SystemVerilog for a processor-attached memory that multiplies matrices
where the data lives. The memory is split into data/logic pairs. Each pair
holds a data array and a logic block built from stacked binary RRAM
crossbars. A logic block computes the inner product of two binary vectors in
three clocked steps, with no ADCs:

1. **Digitize.** The crossbar turns the inner product into a thermometer code.
2. **Detect the transition.** A row of AND gates turns that code into a
   one-hot vector.
3. **Encode.** A small row-select crossbar turns the one-hot vector into a
   binary number.

The processor drives the pairs with four instructions (SW, LW, ST, WT). A
CMOS adder-merger combines results across pairs. It either weights each pair
by a power of two, for multi-bit data split into bit-planes, or sums the
pairs' partial products, for vectors longer than one crossbar.

The design follows the XIMA accelerator proposed for in-memory matrix
multiplication on binary RRAM crossbars ("An Energy-efficient Matrix
Multiplication Accelerator by Distributed In-memory Computing on Binary RRAM
Crossbar"). The proposal describes the units, the instruction set, the
address layout and the three-step datapath. It leaves sizes, encodings,
handshakes and timing details open, and this RTL fills those in. Section
"How far this follows the original" lists each such choice.

## The three-step inner product

Take two N-bit binary vectors: `phi`, stored in the crossbar, and `x`, applied
to the word lines. Their inner product is `s = popcount(x & phi)`, a number
from 0 to N.

### Step 1: the digitizing crossbar (`rram_digitize_xbar`)

The crossbar has N word lines and N bit lines. The cell at word line i holds
`phi[i]`, and it holds the same value on every bit line. All N columns are
therefore identical and carry the same current,
`I = V_r * (s * g_on + (number of active off cells) * g_off)`.
A resistor R_s turns the current into a voltage. Each column has its own
sense amplifier, and their thresholds form a ladder:

    V_th,k = (2k + 1) * V_r * g_on * R_s / 2        k = 0 .. N-1

Column k reads 1 exactly when `s > k`. The outputs `o1` are a thermometer code
with the first `s` columns at 1. With N = 8 and s = 5, `o1` reads 11111000
(column 0 first). The off cells leak, but the leakage stays below half a
threshold step when the off/on conductance ratio is small enough. The model
uses a ratio of 1/1000.

The thresholds can be reprogrammed. Each column holds a code in half-steps,
`V_th = code * V_r * g_on * R_s / 2`, and reset restores the ladder
`code = 2k+1`. With other codes the columns act as general threshold gates on
the same inner product.

This block is analog, so `rram_digitize_xbar.sv` is a **behavioural model**.
It computes the currents and voltages with `real` arithmetic and cannot be
synthesized. The rest of the design is synthesizable. A real implementation
would replace this model with the crossbar macro and its sense amplifiers,
behind the same ports.

### Step 2: transition detection (`xor_layer`)

    o2[k]   = o1[k] & ~o1[k+1]
    o2[N-1] = o1[N-1]

On a thermometer code this equals the XOR of neighbouring bits. `o2` is
one-hot at column `s-1`, or all zero when `s = 0`. For example, 11111000
becomes 00001000.

### Step 3: the encoder (`encoder_layer`)

The encoder is another crossbar. Each of its N rows stores a W-bit word, and
row k holds `k+1`. The one-hot `o2` selects one row, whose word is the result.
W is log2(N): 3 bits for an 8-column crossbar, 4 bits for the default of 16.

**The encoder wraps at s = N.** The top row holds `N mod 2^W = 0`, so an
inner product equal to N reads as 0, exactly like `s = 0`. The original
8-to-3 look-up table defines this behaviour (00000001 → 000), and the RTL
keeps it. Widen `W` to `$clog2(N+1)` in `encoder_layer` and `xima_logic` if
the full range is needed. The row words are writable, so the encoder can
also be reprogrammed to any other mapping.

### Sequencing (`xima_logic`)

A logic block stacks four layers. The layer numbers below are also the
layer field of an address:

| layer | name       | holds                                                    |
|-------|------------|----------------------------------------------------------|
| 0     | input data | ROWS word-line patterns `x_r`                            |
| 1     | digitizing | word 0: vector `phi`; word k+1: threshold code of column k |
| 2     | XOR        | nothing; reads return the last transition vector         |
| 3     | encoding   | write word k: encoder row k; read word r: result of row r |

An ST instruction starts the block. The block then runs every input row
through the three steps, one clock per step. It writes row r's 4-bit result
into the pair's result SRAM in the third clock. The steps of successive rows
are not overlapped, so one pass over `ROWS` rows takes exactly `3*ROWS`
clocks (48 at the defaults). This matches the original's figure of 3 cycles
per matrix row.

## Pairs, the control bus and the instruction set

    processor ──cmd──► block_decoder ──► xima_pair[0..NUM_PAIRS-1]
                       (tree of block_decoder_node)
                       ◄──rsp──────────   ├─ control_bus: instr_queue → instr_decoder
                                          │               → addr_decoders → data path
                                          │               + sram_array (row results)
                                          ├─ data_array (non-volatile words)
                                          └─ xima_logic (4 crossbar layers)
    all pairs' sram_array[merge_row] ──► adder_merger ──► merge_result

An address is 12 bits, with fields in this order (widths are set in
`xima_pkg`):

| block index (3) | module (1): 0 data array, 1 logic | layer (2): 0 for the data array | in-layer address (6) |

An instruction (`instr_t`) is an opcode and two operands:

| opcode     | op1              | op2     | action                                                    |
|------------|------------------|---------|-----------------------------------------------------------|
| OP_SW_MOVE | source address   | address | copy one word: data→logic configures, logic layer 3→data writes results back |
| OP_SW_DATA | 16-bit word      | address | store an immediate word                                    |
| OP_LW      | address          | –       | read a word; the answer comes back on `rsp`, tagged with its pair |
| OP_ST      | block index      | –       | start that pair's logic block                              |
| OP_WT      | –                | –       | hold each pair's queue until its logic is idle             |

The routing and execution rules are as follows:

- **Routing.** The block decoder sends SW to the pair of op2, LW to the pair
  of op1, and ST to the block index in op1. WT names no pair, so it is
  broadcast and accepted only when every pair's queue has room. NOPs and
  block indices with no pair behind them are dropped.
- **The decoder tree.** The block decoder is a binary tree of
  `block_decoder_node` junctions, placed like the decoders on an H-shaped
  command bus. The root decodes the top bit of the block index, and each
  level below decodes the next bit. With 8 pairs there are 1 + 2 + 4
  junctions. Every junction passes commands straight through (no registers)
  and merges answers coming up, the lower branch first.
- **Execution.** Each pair's control bus executes its queue in order, one
  instruction per clock. Reads are combinational and the write lands at the
  clock edge, so an SW move takes one clock.
- **Hold conditions.** WT stays at the head of its queue while the logic is
  busy. An LW waits while the previous answer has not been taken. When both
  pairs answer in the same cycle, the lower-numbered pair goes first.
- **Hazards.** There is no interlock: a write to a logic layer during a run
  takes effect immediately. Programs must place a WT between ST and anything
  that touches that pair's logic or results.
- **Bad addresses.** A data-array address with a nonzero layer field is
  ignored on write and reads as 0.

A typical program for one pair:

    SW_DATA phi        -> {p,1,layer1,0}       // or SW_MOVE from the data array
    SW_DATA x_r        -> {p,1,layer0,r}       // r = 0..ROWS-1
    ST p
    WT
    LW {p,1,layer3,r}                          // result of row r
    SW_MOVE {p,1,layer3,r} -> {p,0,0,r}        // write it back to the data array

## Multi-bit data and longer vectors: the adder-merger

The crossbars only multiply bits. The `adder_merger` extends them in two ways.
The `merge_bitplane` input of the top selects between them, and both read row
`merge_row` of every pair's result SRAM at once.

- **Bit-plane mode** (`merge_bitplane = 1`). Pair b holds bit b of each
  8-bit data element in its input rows, and every pair holds the same binary
  vector. The merged result is `sum_b result_b * 2^b`, which is the integer
  inner product of 8-bit data with a binary vector of 16. The result needs 12
  bits. The tree has log2(8) = 3 levels of `merge_node` adders, each 12 bits
  wide.
- **Sub-vector mode** (`merge_bitplane = 0`). Each pair holds a 16-element
  slice of a longer vector, and the merged result is the plain sum. Eight
  pairs give inner products of up to 128 elements.

Because of the encoder wrap, a bit-plane or slice whose own inner product
equals 16 contributes 0.

## Sizes

| parameter | default | meaning                                      |
|-----------|---------|----------------------------------------------|
| NUM_PAIRS | 8       | data/logic pairs                             |
| N         | 16      | crossbar size (vector length per pair)       |
| ROWS      | 16      | input rows per logic block                   |
| W         | 4       | result bits per row, log2(N)                 |
| MW        | 12      | merged result bits                           |
| data array| 64 x 16 | words per pair                               |
| queue     | 4       | instructions per pair                        |

N = 16 and ROWS = 16 match the original's 16x16 logic blocks, and the 12-bit
merge matches its adders. The 8 pairs match the original's architecture
drawing. The memory depths and queue depth are this design's own. The command and data words are fixed at 16 bits in
`xima_pkg`, so N must not exceed 16 without widening `DATA_W` there.

The 16-element examples, the 8-bit × 16 real-valued example and one 16x16
binary matrix per pair all fit in one pass.

The original evaluates a 328x356 by 356x64 Boolean product, and image
dimensions from 356 up to 864. At the default size the crossbars hold 2,048
matrix bits at a time, and one merged inner product reaches 128 elements.
These products therefore run as many passes, with the processor reloading
the crossbars and adding partial sums. `tb_workload_matmul` does this for
328x356 by 356x64 and for 328x864 by 864x64:

- 356 is cut into 23 slices of 16, with the last one zero-padded.
- The slices are handled in 3 groups of 8, one slice per pair.
- Each group's partial sums come from the adder-merger in sub-vector mode.

The first product takes 4,032 passes, with 3,465 busy crossbar cycles per
column of the right operand. The original's fully sized design needs 984
cycles, 3 per row. Every one of the 20,992 entries is checked against the
exact product, in both products.

## How far this follows the original

The original gives the following, and the RTL follows it:

- the three steps and their equations: threshold ladder, AND-based
  transition detection, row-select encoder and its 8-to-3 table;
- identical crossbar columns with one sense amplifier per bit line;
- configurable thresholds;
- block decoders at the junctions of the command bus, eight pairs as leaves;
- pairing of data arrays and logic through a local control bus made of an
  instruction queue, an instruction decoder, an address decoder and an SRAM;
- the SW/LW/ST/WT instructions and the fields of an address;
- the four-layer stack (input data, digitizing, XOR, encoding) under an
  adder-merger;
- 3 cycles per row.

This design chose the following itself:

- all widths and depths listed above;
- the numeric opcodes, with the two SW forms as separate opcodes;
- the meaning of each word inside a layer;
- one instruction per clock and the valid/ready handshakes;
- broadcasting WT;
- one bit of the block index per level of the decoder tree, and no
  registers at its junctions;
- fixed-priority answers tagged with the pair;
- the threshold code format;
- resets: the SRAM, the thresholds and the encoder rows are reset, while the
  RRAM cells are non-volatile and are not;
- a dedicated read port from every result SRAM into the adder-merger, and a
  mode input selecting bit-plane or sub-vector merging.

The design simplifies or leaves out the following:

- **Merge nodes.** The original's merge nodes are distributed along the
  command-bus tree. Here the adder tree has the same shape, joining pairs
  2i and 2i+1 first, but its nodes sit together in `adder_merger`.
- **Device effects.** The crossbar model is ideal apart from a fixed off-cell
  leakage. Device variability and programming error are not modelled.
- **The data array** is a plain memory array. Its analog read path is not
  modelled.
- **The host processor** is not part of the design. Its side is the top's
  `cmd`/`rsp` port.
- **The training ASIC.** The original's machine-learning flow trains the
  second neural layer online on a separate ASIC. It is named but not
  described, and it is not built.

## Files

`rtl/`: `xima_pkg` (types, address and instruction formats), `xima_top`,
`block_decoder`, `block_decoder_node`, `xima_pair`, `control_bus`, `instr_queue`, `instr_decoder`,
`addr_decoder`, `sram_array`, `data_array`, `xima_logic`,
`rram_digitize_xbar` (behavioural), `xor_layer`, `encoder_layer`,
`adder_merger`, `merge_node`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The most useful ones
are:

- `tb_xima_top` runs the whole accelerator at its default size, through the
  command port only. Its first pass multiplies a 16x16 matrix of 8-bit data
  by a binary vector in bit-plane mode. Its second pass runs a
  128-element-vector product in sub-vector mode. It counts WT stalls, command
  back-pressure, simultaneous answers, both directions of SW move, both merge
  modes, the s = N wrap and the 48-cycle run of every pair, and it fails if
  any of these never happens.
- `tb_workload_matmul` runs the two large Boolean products described under
  "Sizes" through the whole accelerator. It takes about half a minute.
- `tb_xima_logic` checks every row result and the exact 3*ROWS cycle count.
- `tb_rram_digitize_xbar` checks the 8x8 worked example, random 16x16
  vectors and reprogrammed thresholds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/xima_pkg.sv tb/tb_xima_top.sv --top-module tb_xima_top -o sim
    ./obj_dir/sim

Swap `tb_xima_top` for any other testbench. Every run except
`tb_workload_matmul` takes well under a second; `-Wno-fatal` keeps the testbenches' width warnings from stopping
the build. To lint a module: `verilator --lint-only -Wall -Irtl -y rtl
rtl/xima_pkg.sv rtl/<module>.sv`. The `real` arithmetic in
`rram_digitize_xbar` means a synthesis flow must replace that module. Every
other module synthesizes as written.
