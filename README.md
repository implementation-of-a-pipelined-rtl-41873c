# Fast control cell processor

A control cell processor (CCP) sits in an ATM cell stream. Most cells pass
through it untouched. A few are *control cells*: they are addressed to this
module and ask it to write or read an external SRAM, to read one of its
statistics counters, or to change the VCI it answers on. The CCP carries out
the request and sends the cell on with the answer written into it.

In an earlier, non-pipelined processor, a control cell was read completely,
acted on, and only then sent on. A cell with four SRAM writes kept the stream
busy for about 52 clock cycles, and a cell with four reads for about 80. This
design handles control cells the way a cell on a wire is handled: one 32-bit
word per clock. The cell moves through fourteen registers, one per word. The
request is decoded when the command word goes past, and each SRAM access
happens as its payload word goes past. Back-to-back control cells leave **14
cycles apart**, which is the line rate.

The RTL is SystemVerilog (IEEE 1800-2017) and is synthesizable. Verilator and
slang accept it without errors.

## The cell

A cell is 14 words of 32 bits, arriving on consecutive cycles. A pulse on
`soc_in` marks word 0.

| word | contents |
|------|----------|
| 0 | ATM UNI header: GFC[31:28], VPI[27:20], **VCI[19:4]**, PTI[3:1], CLP[0] |
| 1 | **HEC** in [31:24]: CRC-8 (x^8+x^2+x+1) of the four header bytes, XOR 0x55 |
| 2 | command: **Module ID** [31:24], **opcode** [23:16], sequence number [15:0] |
| 3..12 | payloads 1..10 |
| 13 | last word, passed on unchanged |

A cell is a control cell for this module only if all four checks pass:

- its VCI is x0040..x004F, or the value of the programmable VCI register (x0023 after reset);
- its HEC is correct;
- its Module ID equals the parameter `MODULE_ID`;
- its opcode is one of those below.

Otherwise the cell passes through unchanged. In an answered cell, the opcode
byte is replaced by opcode + 1.

| opcode | request | what the CCP does |
|--------|---------|-------------------|
| x12 | set VCI | loads payload 1 [31:16] into the programmable VCI register |
| x14 | SRAM access | runs the burst that payload 1 describes (see below) |
| x18 | statistics read | if payload 1 bit 31 is set, writes counter number payload 1 [16:9] into payload 2. Payloads 5 and 6 work the same way. |

### SRAM command (payload 1 of an x14 cell)

| bits | field |
|------|-------|
| 31 | 1 = read, 0 = write |
| 30 | device (0 or 1) |
| 29:27 | burst length − 1 (1 to 8 words) |
| 18:0 | first word address; the burst uses consecutive addresses |

The data words are payloads 2 onward. A write sends them to the SRAM. A read
overwrites them with the words read.

### Statistics

Each counter is 32 bits. Its number is 8 bits: a 2-bit type followed by the
low six bits of the cell's VCI.

- `00` counts cells arriving on one of this module's 17 VCIs.
- `01` counts SRAM read cells, per VCI.
- `10` counts SRAM write cells, per VCI.
- Counter `11000000` counts every cell that passes through, whether or not it is for this module.

So counter x23 counts control traffic on the default VCI. Counter xA3 counts
SRAM write cells on that VCI. Counters wrap. They are cleared after reset by a
256-cycle sweep, and no cell is taken in until the sweep is done.

## How a cell moves

```
d_in ─► reg ─► input FIFO FSM ─► input FIFO ─► CCP FSM ─► 14 pipeline registers ─► output FIFO FSM ─► output FIFO ─► reg ─► d_out
 (256x32)                                                      (256x32)
                                │        ▲
              SRAM interface ◄──┤        ├── patch ports: opcode, SRAM read data, counter value
         statistics interface ◄─┘
                                │
                    statistics counter bank (256x32)
```

`fast_ccp` is the top. It registers its ports and connects the blocks.

**Input side** (`ccp_in_fifo_fsm`, `ccp_fifo`).
- The input FIFO FSM writes each arriving cell into the input FIFO and counts the cells held.
- At 18 cells (252 of the 256 words) it raises `tca_out`. High means "do not start another cell".
- If a cell arrives anyway, it is dropped.
- A cell counts as held until its last word has been read out. A frozen reader therefore cannot let the FIFO overflow.

**The pipeline** (`ccp_pipeline`).
- There are fourteen registers. Each holds one word, the word's index inside its cell, and a valid bit. Gaps between cells travel as invalid words.
- The whole chain moves one step per cycle unless `freeze_pipe` is high.
- Answers are written into the cell as it passes. There are three patch ports: the response opcode, SRAM read data and counter values. Each patch carries a word index, and the register holding the word with that index takes the new data.
- This matching by index is how a result lands in the right word after it has waited any number of frozen cycles.

**The CCP FSM** (`ccp_fsm`) is where the control happens.
- It starts reading a cell from the input FIFO only when all of these hold:
  - a cell has started arriving in the input FIFO (words are read one cycle behind the writes);
  - the counters are cleared;
  - fewer than 18 cells are in the output FIFO or already in the pipeline.
- The 14 words are read on consecutive cycles. The next cell can start right after, so cells follow with no gap.
- When word 2 reaches register 0, words 1 and 0 are in registers 1 and 2. All four checks are made in that cycle.
- The events, counter reads, SRAM accesses and the VCI register update are then issued as each payload word reaches register 0.
- At most one statistics event is issued per cycle, spread over words 0, 1 and 3 of a cell.

**SRAM** (`ccp_sram_if`).
- Each of the two devices has a request and a grant. The grant belongs to an arbiter outside this design, which may be serving another module.
- The request goes up while payload 1 is in register 0. That is one cycle before the first access. A grant returned on the next cycle therefore costs nothing.
- If the grant has not come when a data word reaches register 0, `freeze_pipe` goes high. It stops the reader, the pipeline, the FSM and the output writer together. Nothing else changes until the grant arrives.
- Each word makes one access cycle.
- Read data comes back `SRAM_RD_LAT` cycles (default 4) after the access. It is patched into the same word, which by then is a few registers further along.
- `SRAM_RD_LAT` must be at most 12, so that the data returns before the word leaves the pipeline. An assertion checks this.

**Statistics** (`ccp_stat_if`, `stat_counter_plus`).
- The interface turns event strobes into counter numbers.
- The counter bank is a single 256×32 memory. An increment is a two-cycle read-modify-write. When the same counter is incremented in consecutive cycles, the second increment takes the first's result by forwarding.
- A counter read returns one cycle later. The value is patched into payload 2 or 6.

**Output side** (`ccp_out_fifo_fsm`, `ccp_fifo`).
- The CCP FSM raises `start_write_fifo_out` when word 0 of a cell leaves the last register.
- The output FIFO FSM then writes the cell's words into the output FIFO, skipping frozen cycles.
- A cell goes out when `tca_in` is low and either of these holds:
  - all 14 of its words are in the FIFO;
  - it may leave by cut-through (below).
- Cells go out back to back. `d_out` is zero between cells.

**Cut-through.** The CCP FSM drives `quiet`, a count of the cycles, starting
with the current one, in which a freeze is impossible. Only an SRAM data word
(payload 2 onward of an SRAM cell) in register 0 can cause a freeze. Cells
are contiguous in the pipeline, so the nearest possible freeze is the one
listed for the first matching row:

| state of the pipeline | nearest possible freeze |
|---|---|
| an SRAM cell has reached payload 1 in register 0 and has accesses left | now (`quiet` = 0) |
| the cell in register 0 has not yet been checked | when its word 4 arrives |
| otherwise | when word 4 of the next cell to be read arrives |

The output FIFO FSM may start sending the cell it is writing if three things
hold:

- no complete cell is queued ahead of it;
- it has written at least word 0;
- the words left to write fit inside `quiet`.

In that case each word is written at least one cycle before it is read.

## Timing

| | cycles |
|--|--|
| back-to-back cells, SOC to SOC, with the grant arriving one cycle after the request | **14** |
| isolated cell, SOC in to SOC out | **27** |
| extra delay per cycle of missing SRAM grant | 1 |

The 14-cycle rate holds for any mix of cells, including cells with 4-word
SRAM reads and writes. The end-to-end testbench measures this for groups of
such cells.

## Where this design departs from, or adds to, the original description

- **Latency 27 instead of 24 cycles.** The original processor's delay from SOC in to SOC out is 24 cycles, which is only possible if it starts sending a cell while the cell is still being written into the output FIFO. Doing that blindly is unsafe here. A missing SRAM grant can freeze the writer for any number of cycles, and a cell that is already leaving must not run out of words. This design starts a cell early only when it can prove that no freeze will come before the cell's last word is written (see *Cut-through* above). Otherwise it waits for the whole cell. For an isolated cell the proof allows the send to start 7 words into the write. Throughput is the same as the original.
- **Field positions**, as shown in the tables above, are this design's own. The original description fixes the opcodes, the new-VCI field (payload 1 [31:16]), the counter-number field ([16:9] of payloads 1 and 5), the read flag (bit 31) and the answer positions (payloads 2 and 6). It does not fix these:
  - the Module ID and opcode positions;
  - the response opcode;
  - the SRAM command word.
- **SRAM timing.** These are this design's own choices:
  - a fixed read latency (`SRAM_RD_LAT`);
  - 19-bit word addresses;
  - two devices;
  - a request held until its grant.
- **Statistics.** Per-VCI counts cover only the module's own 17 VCIs, so that other VCIs sharing the low six bits are not counted on top of them. The total counts every cell. An SRAM cell counts once, not once per word. The original text is not consistent about whether the total counts all cells or only control cells; all cells are counted here.
- **Flow control polarity.** `tca_out` high means "full". `tca_in` high means "do not send". Cells arriving while the input FIFO is full are dropped.
- **Reset** is synchronous and active high. After reset, `tca_in` inside the module is treated as high until the first sampled value arrives.
- **Not included.** The SRAM devices and their arbiter are outside this design. The testbenches use a behavioural model, `tb/sram_model.sv`. The model can hold back its grant and has the same fixed read latency.

Block RAM use matches the original: three 256×32 memories, which is six
4-Kbit block RAMs on a Virtex-E. Slice count and clock rate have not been
measured.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `MODULE_ID` | `fast_ccp`, `ccp_fsm` | 8'h01 | Module ID this CCP answers to |
| `SRAM_RD_LAT` | `fast_ccp`, `ccp_sram_if` | 4 | SRAM read latency, 1..12 |
| `DEPTH` | `ccp_fifo` | 256 | FIFO words |
| `MAX_CELLS` | `ccp_in_fifo_fsm`, `ccp_fsm` | 18 | cells before flow control |
| `NUM`, `CW` | `stat_counter_plus` | 256, 32 | counters and their width |

Cell size, opcodes, VCIs and field positions are constants in `rtl/ccp_pkg.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/ccp_pkg.sv` | cell types, field positions, opcodes, HEC function |
| `rtl/fast_ccp.sv` | top |
| `rtl/ccp_fsm.sv` | reader, checks, opcode handling, freeze |
| `rtl/ccp_pipeline.sv` | 14 registers with patch ports |
| `rtl/ccp_fifo.sv` | 256×32 FIFO, registered read |
| `rtl/ccp_in_fifo_fsm.sv`, `rtl/ccp_out_fifo_fsm.sv` | FIFO control, `tca` flow control |
| `rtl/ccp_sram_if.sv` | request/grant, access strobes, read-data return |
| `rtl/ccp_stat_if.sv`, `rtl/stat_counter_plus.sv` | event numbers, counter bank |
| `tb/tb_ccp_pkg.sv` | cell builder and an independent HEC for the testbenches |
| `tb/sram_model.sv` | behavioural SRAM with grant and read latency |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_fast_ccp.sv` | end-to-end test of the top at default parameters |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ccp_pkg.sv tb/tb_ccp_pkg.sv rtl/*.sv tb/sram_model.sv tb/tb_fast_ccp.sv \
    --top-module tb_fast_ccp -o sim && obj_dir/sim
```

To run a block's testbench, use the same command with `tb/tb_<block>.sv` and
`--top-module tb_<block>`.

`tb_fast_ccp` runs the whole design at its default parameters. It contains a
reference model that predicts every cell leaving the processor and the SRAM
contents. It runs these phases:

- isolated cells of every kind, checking the 27-cycle latency;
- back-to-back groups of 4-word SRAM write cells and read cells, checking the 14-cycle spacing;
- cells that fail each of the checks, and a VCI change;
- SRAM grants held back, causing freezes;
- the receiver stopped, so that both FIFOs fill and `tca_out` rises;
- a random mix.

At the end it reports how often each mechanism occurred, and it fails if any
of them never did:

- freeze;
- `tca_in`;
- `tca_out`;
- a full output FIFO;
- cut-through (a cell leaving in fewer than 34 cycles, which is only possible when it starts leaving before it is completely written);
- back-to-back cells;
- each pass-through reason;
- SRAM reads, writes and device 1;
- counter reads.
