# ONe-ChAn: a two-FPGA chess analyzer with a tiny neural-network processor

This design looks for a good chess move by splitting the work between two boards:

- The **tree-traversal FPGA** holds the game and walks the move tree a fixed number of plies deep (three by default). It scores the tree with negamax.
- The **tiny TPU FPGA** is a small programmable processor with an 8x8 weight-stationary systolic array. It scores the positions at the bottom of the tree.

For each leaf of the tree, the traversal side sends one SPI packet to the TPU side. The packet holds the leaf board and every move possible from it. The TPU runs a neural-network program once per move and sends back the best value. The traversal side folds these values up the tree. The best first move is shown on the LEDs.

The player talks to the traversal FPGA through the board's controls:

- twelve switches give a move as a from square and a to square;
- buttons play the move, take it back, start the search and scroll the display;
- an eight-digit seven-segment display shows one row of the board.

Everything is plain synthesizable SystemVerilog. There is one module per file in `rtl/` and one self-checking testbench per block in `tb/`.

## Block map

```
onechan_top
├── tt_fpga              (clk_tt)  tree-traversal board
│   ├── tt_buttons         synchroniser + debounce, one pulse per press
│   ├── tt_board           64-byte board, search apply/undo, player history
│   ├── tt_movegen         stateful 5x5 move generator
│   ├── tt_traversal       step-step-spray search, negamax on the stack, packets
│   ├── spi_master         mode-0 byte master
│   └── tt_sevenseg        one board row on eight digits
└── tpu_fpga             (clk_tpu) tiny TPU board
    ├── spi_slave          mode-0 byte slave with synchronisers
    ├── tpu_packet_rx      packet check, grid RAM, move stack, result answer
    ├── tpu_instr_rom      4096 x 32 instruction memory (load port)
    ├── tpu_main_mem       4096 x 32 main memory (load port, two reads)
    ├── tpu_regfile        3 groups x 64 x 32-bit registers
    ├── tpu_core           single-cycle processor (tpu_decoder, tpu_alu)
    └── tpu_layer_engine   multi-cycle special instructions
        ├── tpu_systolic_feeder  input skew
        ├── tpu_systolic_array   8x8 tpu_pe
        └── tpu_accumulator      de-skew / column sum, bias, leaky ReLU
```

`onechan_pkg` holds the shared types and constants: board bytes, moves, opcodes, special-instruction codes, register numbers and the instruction-builder functions.

## Board and moves

A square is numbered `row*8 + col`. Row 0 is white's back rank. Each square holds one byte:

- bits 0..5 are a one-hot piece type: pawn, knight, bishop, rook, queen, king;
- bit 6 is set for a black piece;
- `8'h00` is an empty square.

Each move is `{from, to}`, six bits each.

### The move generator (`tt_movegen`)

The move generator checks one candidate per clock. A `from` register walks the squares upward until it finds a piece of the side to move. For that piece, a candidate index 0..24 walks the 5x5 neighbourhood in raster order: `dy` from -2 to 2, and within each `dy`, `dx` from -2 to 2.

A candidate is a move when all of these hold:

- it is on the board;
- it does not land on a friendly piece;
- the piece's reach map allows it:
  - queen and bishop on the diagonals,
  - queen and rook on the lines,
  - king on the inner ring,
  - knight on the eight knight squares;
- for a two-square line or diagonal step, the inner-ring square in between is empty.

Sliding pieces therefore travel at most two squares per move.

Pawns have their own rules:

- one step forward onto an empty square;
- two steps from their start row when both squares are empty;
- a diagonal capture.

There is no castling, en passant, promotion or check detection. A king can be captured like any other piece.

The generator keeps no state between requests. It starts from a resume point `(from, idx)` and works in one of two modes:

- **step** returns the next single move from the resume point, or `none`.
- **spray** returns every move of the position in order.

The traversal stores `(from, idx+1)` of the last returned move on its stack. The next step at that node therefore returns a new move. `idx = 25` means "continue at the next square".

A step or spray costs one cycle per candidate examined, plus one cycle per square passed.

### The search (`tt_traversal`)

The search is a depth-first walk with an explicit move stack of `DEPTH` entries:

- **step down**: ask for the next move of the current node, play it on the board, push it together with the captured piece and the resume point.
- **step up**: when the node has no move left, take the top move back and pop it. The popped node's value `v` updates its parent: `best = max(best, -v)`.
- **spray**: when the stack is full, the node is a leaf. The generator sprays all the leaf's moves into a buffer (up to `MAX_MOVES`). The leaf is then sent to the TPU in one packet. The traversal polls until the answer arrives, stores the returned value as the leaf's value, and steps up.

Other rules of the search:

- Every node starts at `NEG_INF = -1000`. A node without moves keeps that value.
- The root is always played by white.
- At the root, the move whose child set the best value becomes `best_move`.
- When the search ends, the board is back where it started.

### Link protocol (SPI mode 0, MSB first)

The traversal board is the SPI master. SCLK is `clk_tt / (2*CLK_DIV)`. One transaction sends one packet or one poll:

| transaction | bytes sent by the master | TPU answer |
|---|---|---|
| leaf packet | `A5`, side, N, 64 grid bytes, N x {from, to}, XOR of all bytes after `A5` | — |
| poll | `3C`, 0, 0, 0 | byte 1 = ready flag, byte 2 = value (signed 8 bit), byte 3 = index of the best move |

The TPU accepts a packet only if all of these hold:

- `1 <= N <= MAX_MOVES`;
- every square number is below 64;
- the length is right;
- the checksum matches.

A rejected packet only pulses `pkt_err`. An accepted packet writes N into register r1, which starts the program. It also clears the ready flag.

The slave samples the SPI wires with its own clock through two-flop synchronisers. `clk_tpu` must therefore be at least `2*clk_tt/CLK_DIV`.

## The tiny TPU

### Processor (`tpu_core`, `tpu_decoder`, `tpu_alu`)

The processor is single-cycle: every ordinary instruction completes in the cycle it is fetched from the asynchronous-read instruction memory. The multi-cycle special instructions hold the PC until the layer engine reports done.

Instruction fields:

| bits | 31:29 | 28 | 27 | 26 | 25 | 24:23 | 22:18 | 17:13 | 17:6 | 11:0 | 5:0 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| use | alu/branch funct | src2_sel (immediate) | wrd_sel (memory write-back) | pc_sel (branch) | jump_sel | rd group | src1 | src2 | imm / load offset | branch/jump label | rd |

- ALU functions are `add mul shl shra and xor or`. Branch conditions are `eq ne ge le gt lt neg`, where `neg` means src1 < 0.
- Loads read `mem[reg[src1] + offset]` into the register group given by `rd_group`. That group is 0 for information, 1 for weights and 2 for biases.
- Special instructions have `instr[31:23]` all ones and the code in `instr[3:0]`. `set_ifmap_o` writes its result to group-0 register `instr[9:4]`.

| code | special instruction | done by | action |
|---|---|---|---|
| 0 | decode_layer | core, 1 cycle | split reg[src1] into input height [31:28], width [27:24] and layer count [23:20]; write them to r20..r22 |
| 1 | compute_grid | engine | working grid = received grid with move number reg[src1] played |
| 2 | decode_layer_info | core, 1 cycle | split a layer record (below) into r23..r31 |
| 3 | compute_ifmap | engine | input map = material value of each square: P1 N3 B3 R5 Q9 K50, positive for the side to move |
| 4 | send_layer_info | engine | latch r23..r31 as the current layer |
| 5 | load_weight | engine | copy wh*ww words from `0x100+waddr` into group 1, one per cycle, then load the whole 8x8 array at once |
| 6 | load_bias | engine | copy bh*bw words from `0x200+baddr` into group 2 |
| 7 | send_systolic_data | engine | run the layer (matrix multiply or convolution) |
| 8 | set_ifmap_o | engine | output map becomes the next input map (flattened if the layer says so); rd = output[0][0] |
| 9 | send_optimal_move | core, 1 cycle | report value = reg[src1] saturated to 8 bits and index = reg[src2][7:0] |

Layer record (one 32-bit word per layer):

| bits | 31:29 | 28:26 | 25:18 | 17:15 | 14:12 | 11:4 | 3 | 2 | 1 |
|---|---|---|---|---|---|---|---|---|---|
| field | weight height-1 | weight width-1 | weight offset | bias height-1 | bias width-1 | bias offset | leaky ReLU | convolution | flatten |

Main memory holds the network's information, weights and biases:

- word 0 is the layer-count record;
- words 1.. are the layer records;
- weights start at `0x100`;
- biases start at `0x200`.

Both memories are written through load ports while the TPU is held in reset.

### Register groups (`tpu_regfile`)

There are three groups of 64 registers, each 32 bits wide:

- **Group 0** (information):
  - r0 reads as zero;
  - r1 is the move count written by the packet receiver;
  - r20..r31 are the decoded layer fields: sizes stored as the field plus one, offsets, and flags.
- **Group 1** (weights) is seen by the systolic array as 64 parallel values.
- **Group 2** (biases) is seen by the accumulator as 64 parallel values.

While the layer engine is busy, it owns the write port.

### Systolic array and layer engine

This is the hardest part of the design to follow. Each `tpu_pe` keeps one weight, w[k][n], where k is the row (input) and n is the column (output). Every clock, the PE passes its input to the right. It also passes `p_in + a*w` down. Data widths are 16-bit activations, 8-bit weights and 32-bit sums.

**Matrix multiply, `Y = X*W + B`.** Each row of X enters the array as one 8-element vector. The feeder delays element k by k cycles. Column n of the array then produces the dot product of that row with weight column n, `ROWS + n` cycles after the row entered. The accumulator delays column n by a further `COLS-1-n` cycles, so that all columns of one output row arrive together. It then adds the bias (broadcast along a dimension of size 1), applies leaky ReLU (`x >>> 3` for negative x), and saturates to 16 bits. X needs no transpose: the rows go in one after another.

**Convolution.** The kernel is stored with each row mirrored left to right, which turns the array's column sums into a correlation. Output row r is computed in one pass:

1. Input rows r .. r+wh-1 enter as vectors, one input column per cycle.
2. The accumulator adds all 8 column outputs of the same cycle (no de-skew).
3. After the first ww-1 columns, each cycle gives one output pixel.

**Timing.**

| operation | cycles |
|---|---|
| load_weight | wh*ww + 3 |
| one matrix pass | rows + 16 |
| one convolution output row | input width + 16 |

A layer runs as many passes as it needs, plus 2 cycles.

**Sizes.** A layer's input and weight sizes are limited to 8x8, the size of the array and of the maps. `flatten` turns the output into one row of at most 8 values.

### Program

The testbench package builds a 26-instruction program that does the following:

1. Wait while r1 = 0.
2. For each move m: play it, make the material map, and run every layer of the network.
3. Keep the largest output and its move index.
4. Report them with `send_optimal_move`.
5. Clear r1 and wait again.

The network used in the tests has two layers:

1. The 8x8 material map multiplied by an 8x1 column of ones gives the row sums. They are flattened to 1x8.
2. That row multiplied by an 8x1 column of ones gives the material balance.

Any other network that fits the layer limits can be loaded instead, with no change to the RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 3 | plies searched (stack size) |
| `MAX_MOVES` | 128 | moves per leaf packet / TPU move stack |
| `CLK_DIV` | 8 | SCLK = clk_tt / (2*CLK_DIV) |
| `DEBOUNCE` | 100000 | button stable time in clk_tt cycles |
| `REFRESH` | 100000 | display digit period in clk_tt cycles |
| `HIST` | 16 | player moves that can be taken back |
| `AW` | 12 | TPU instruction and main memory address width |
| `ROWS`, `COLS` | 8, 8 | systolic array size |
| `ACT_W`, `WGT_W`, `ACC_W` | 16, 8, 32 | activation, weight, sum widths |

## Board controls (`tt_fpga`)

- `sw[11:6]` / `sw[5:0]`: from and to square of the player's move.
- `btn[0]` starts the search.
- `btn[1]` plays the switch move, without checking that it is legal.
- `btn[2]` takes back the last played move.
- `btn[3]` / `btn[4]` scroll the displayed row up and down.

Buttons are ignored while a search runs.

The LED outputs are:

- `led[11:6]` / `led[5:0]`: from and to square of the best move;
- `led[12]`: a move was found;
- `led[13]`: a search is running.

The display shows digit codes: 0 empty, 1 pawn, 2 knight, 3 bishop, 4 rook, 5 queen, 6 king. The decimal point is lit for a black piece. The leftmost digit is column 0.

## Simulation

Each testbench compiles on its own with verilator 5. Every file in `rtl/` and `tb/` is found by module name. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_onechan_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/onechan_pkg.sv tb/onechan_tb_pkg.sv \
  tb/tb_onechan_top.sv
obj_dir/Vtb_onechan_top
```

Every testbench prints `TB_RESULT checks=N failures=M`. The reference models are in `tb/onechan_tb_pkg.sv`:

- the move rules;
- the material evaluation;
- an iterative negamax;
- the TPU program and the test network.

| testbench | what it checks |
|---|---|
| `tb_onechan_full` | whole design at default parameters. Sets up a sparse position with the switches and buttons (including a take-back), runs a depth-3 search, and compares the LED move and the root value with the reference negamax. |
| `tb_onechan_top` | the same at depth 2 with short debounce. Counts that every mechanism happened: step down/up, spray, packets, poll retries, captures, processor stalls, flatten, player move/undo, scrolling. |
| `tb_tpu_fpga` | the TPU board alone over SPI at default parameters. Sends the start position with five moves, random packets of 1..40 moves, and broken packets that must be rejected. |
| `tb_tt_traversal` | search against the reference negamax with the real move generator and a byte-level TPU model. Checks every packet. |
| `tb_tt_movegen` | spray and chained steps against the reference move list on 200 positions; spray latency. |
| `tb_tt_board`, `tb_tt_buttons`, `tb_tt_sevenseg`, `tb_spi_link` | the board, the buttons, the display and the SPI pair. |
| `tb_tpu_*` | each TPU block against independent models, including cycle counts of the layer operations. |

The full-size test runs a little over 30 million cycles.

The TPU answers a five-move packet with the material network 534 to 536 TPU cycles after the last packet byte. That is 5.4 us at 100 MHz. About 100 of these cycles are spent per move.

## Where this design departs from the description it follows

- **Unspecified details.** The description leaves these open, and this design fills them in: the piece bit order, the order of the 25 candidates, the SPI mode, the packet framing, the checksum and the polled answer, the register numbers of the decoded fields, the operand fields of special instructions, the data widths, the leaky-ReLU slope, the bias broadcast, and the material values used by `compute_ifmap`.
- **Loosely described instructions.** `compute_grid`, `compute_ifmap` and `send_layer_info` are only named in the description. Their actions here are this design's reading.
- **Network.** The trained network of the original evaluation is not available, so the tests use a material-counting network. A packet with the initial grid and five moves runs through the TPU, but the original network's output value cannot be reproduced.
- **Program generation.** Programs are built by SystemVerilog functions in the testbench package, not by a separate tool.
- **Chess rules.** Only the moves the 5x5 reach map allows are played. Sliding pieces are therefore limited to two squares, and the special chess moves are missing. This follows the described generator; it is not full chess.
- **Convolution channels.** Only one channel is convolved at a time, and maps are limited to 8x8.
