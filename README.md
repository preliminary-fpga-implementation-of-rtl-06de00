# GBDT inference accelerator (SystemVerilog)

A Gradient Boosting Decision Tree (GBDT) model classifies by running many
small binary decision trees and adding up the values of the leaves they reach.
With the one-vs-all scheme each class has its own trees; the class with the
highest sum wins. Each tree node compares one input feature with a threshold,
so the whole inference is integer comparisons plus some additions. That makes
it cheap in hardware when the inputs are integers, as the 16-bit band values
of a hyperspectral pixel are.

This design gives every class its own engine. The engines run side by side on
the same pixel. Each one walks all the trees of its class, one node per clock,
and an argmax picks the winning class at the end. A host processor loads the
trees and the pixels over AXI: an AXI4-lite register file carries commands
and status, and a 64-bit AXI-stream input (fed by a DMA engine) carries the
data. The intended target is a Zynq-7000 class SoC at 100 MHz. The default
configuration is 6 classes, 2048 tree nodes per class and up to 256 features
per pixel.

## Block diagram

```
            AXI4-lite                          AXI-stream (64 bit)
               |                                     |
        +--------------+   command   +---------+     |
        | axi_lite_regs|------------>| gbdt_uc |<----+ (ready back)
        +--------------+<--status----+---------+     |
           ^    ^    ^         |  strobes            +--> checksum ----> CHECKSUM
           |    |    |         v                     +--> load_reg (addr, word) --+
 debug_readback |  scores  features_ram <------------+                            |
           ^    |    |       | 6 read ports                                       |
           |    |    |       v                                                    v
           |    |   class_module x6  (trees_ram + class_ctrl + datapath)  <-------+
           |    |        | finish                 | score
           |  finish_detect (AND)              argmax --> predicted class
           +-- node_data of the selected class
```

## The node word

Every tree node is one 64-bit word with a fixed layout. The fields map
straight onto datapath signals, so there is no decoding. The low byte says
whether the word is a leaf; a non-zero flag byte counts as true.

| bits    | split node            | leaf node                                |
|---------|-----------------------|------------------------------------------|
| [63:56] | feature index         | unused                                   |
| [55:40] | threshold (unsigned)  | prediction (signed 16-bit fixed point)   |
| [39:24] | left child address    | [39:32] unused, [31:24] last-tree mark   |
| [23:8]  | right child address   | address of the next tree's root          |
| [7:0]   | is_leaf = 0           | is_leaf = 1                              |

The trees do not have to be full or balanced, because every split node holds
both child addresses. The trees of one class are stored in one memory. Every
leaf of tree *t* points at the root of tree *t+1*. The leaves of the last tree
carry the last-tree mark instead. The first tree's root is at address 0. The
scale of the fixed-point predictions is up to the model converter: the
hardware only adds them, in a 32-bit signed accumulator.
`gbdt_pkg::make_split` and `gbdt_pkg::make_leaf` build the two word types.

## The tree walk (`class_module`)

This is the heart of the design. REG0 holds the current node address. In
every clock of a run:

1. the node word is read from `trees_ram` (an asynchronous read, so it
   appears in the same clock);
2. its feature index goes to the shared `features_ram`, which returns the
   feature value, also in the same clock;
3. for a split node, `feature <= threshold` selects the left child and
   anything greater selects the right one. Equal values go left;
4. for a leaf, the prediction is added into REG1 and REG0 takes the
   next-tree address. A leaf with the last-tree mark ends the run instead.

The whole loop, from REG0 through both memories, the comparator and two
multiplexers back to REG0, is one combinational path. A class therefore
takes exactly **1 + (nodes visited)** clocks from `start` to `finish`. A
pixel takes as long as the slowest class. With 100 random trees of depth up
to 4 per class, that is about 390 clocks. The single-cycle loop relies on
both memories having asynchronous reads, which suits FPGA LUT
(distributed) RAM. To use block RAM with synchronous reads, the loop would
need one more pipeline stage per node.

`class_ctrl` is a three-state machine:

- **IDLE**: the external `addr` drives the RAM. `load` writes `data` there,
  and `node_data` shows the stored word for read-back.
- **RUN**: entered on `start`, which also clears REG0 and REG1.
- **DONE**: `finish` stays high here. Loads and read-back work as in IDLE.

## Host interface

### Registers

All registers are 32 bits wide. The byte offsets are defined in
`gbdt_pkg`.

| offset    | access | contents |
|-----------|--------|----------|
| 0x00 CTRL | W (R shows the last command) | [1:0] command, [15:8] class, [31:16] length. The write issues the command. |
| 0x04 DBG_ADDR | RW | tree address for a debug read |
| 0x08 STATUS | R | [0] busy, [1] done, [2] all classes finished, [15:8] predicted class, [31:16] words counted by the checksum |
| 0x0C CHECKSUM | R | 32-bit sum of both halves of every tree word in the last load |
| 0x10 / 0x14 | R | read-back word, low / high |
| 0x18 CYCLES | R | clocks from start to finish of the last classification |
| 0x1C MAXSCORE | R | the winning score |
| 0x20 + 4k | R | score of class k |

A write must present its address and its data in the same clock. The
responses are always OKAY. Byte strobes are ignored.

### Commands

Commands are ignored while STATUS.busy is high, so poll it between
commands.

- **LOAD_TREES (1)**: the next *length* stream beats are node words for the
  given class. They are written to addresses 0 to *length*−1. The checksum
  restarts at the start of each load, so the host can compare it with its
  own sum.
- **CLASSIFY (2)**: the next ceil(*length*/4) beats carry the pixel, four
  features per beat. Feature 4k+i is in bits [16i+15:16i] of beat k. All
  classes then start together. When every class has finished, the argmax
  result is latched, STATUS.done is set and `irq_done` goes high. On a tie,
  the lowest class index wins.
- **DEBUG_READ (3)**: the word at DBG_ADDR in the given class's trees RAM is
  copied to the read-back registers.

Stream ready is high only while a load command still expects data. The
command carries the length, so the stream's last-beat marker is not used.
Processing is strictly sequential: a pixel is loaded, classified, and only
then can the next one be loaded.

## Where this departs from, or goes beyond, the original design

The original design describes the node formats, the class module datapath,
the parallel class modules, the argmax and the finish detection. It also
names the AXI block, the control unit, the checksum, the debug path and a
holding register. The following details are choices made for this RTL:

- the bit order inside a node word (the first field listed is placed in
  the most significant bits), and the flag encoding;
- unsigned feature and threshold comparison, and signed predictions in a
  32-bit score;
- the memory depth: 2048 words per class, an estimate from the LUT-RAM
  budget of the original FPGA build;
- the register map, the command set and the stream packing;
- the checksum algorithm, and reading back one word per debug command;
- the holding register (`load_reg`), read as the latch for the word and
  address being written into a class RAM;
- the argmax tie rule, and the one-clock "all finished" pulse.

Not included:

- the processor, the DMA engine and the DRAM. The testbench models them.
- input double-buffering and per-class tree parallelism. These were only
  proposed as future work.

## Files

| file | role |
|------|------|
| `rtl/gbdt_pkg.sv` | widths, node structs, commands, register offsets |
| `rtl/gbdt_top.sv` | top level |
| `rtl/axi_lite_regs.sv` | AXI4-lite register file (with response-hold assertions) |
| `rtl/gbdt_uc.sv` | command sequencer |
| `rtl/class_module.sv`, `rtl/class_ctrl.sv`, `rtl/trees_ram.sv` | per-class tree engine |
| `rtl/features_ram.sv` | pixel features, one read port per class |
| `rtl/argmax.sv`, `rtl/finish_detect.sv` | result selection and completion |
| `rtl/load_reg.sv`, `rtl/checksum.sv`, `rtl/debug_readback.sv` | load path and checking |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_decision_tree_example.sv` | one class module running a small worked example tree |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. To build and run one with Verilator from the project
root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/gbdt_pkg.sv tb/tb_gbdt_top.sv --top-module tb_gbdt_top -o sim
./obj_dir/sim
```

`tb_gbdt_top` runs the complete flow at the default size:

- it loads 100 random, unbalanced trees for each of the 6 classes and checks
  the checksums;
- it reads back tree words through the debug path;
- it classifies 2276 random 204-feature pixels.

For every pixel it checks each class score, the predicted class and the
cycle count against a software walk of the same trees. The stream model
inserts gaps and sends data before the command arrives, so stream stalls
are exercised too. The test takes a few seconds. All the testbenches
generate their data themselves, and no data files are needed.

## Trust and limits

- The testbenches compare against independent software models. Each one
  has also been shown to fail on a deliberately broken copy of its module.
- The design has only been simulated. It has not been run on an FPGA, and
  no timing closure has been attempted. The single-cycle node loop is the
  critical path.
- The random trees check the mechanism, not accuracy on a real trained
  model. A model converter must produce the node format above and keep
  each class within 2048 nodes. 100 trees per class then means an average
  of at most about 20 nodes per tree. For bigger models, raise
  `TREE_DEPTH`.
