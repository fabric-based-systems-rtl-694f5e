# Fabric-Based System: compute cells that the processor sees as memory

A Fabric-Based System joins an ordinary embedded processor to a *computational
fabric*. A fabric is an array of small datapath cells, each with its own local
memory and wired to its neighbours by point-to-point channels. The processor
never programs the cells through special instructions. It only sees memory:

- The local memories of all cells, together with the cells' microprogram
  stores, form one **global memory**.
- This memory is dual-ported. A cell uses it every cycle while the processor
  loads or reads it through a DMA engine.
- A run has four steps. The processor loads data and programs, pulses
  *start*, waits until every cell is idle again, and reads the results back.

Each cell is driven by a **microcoded sequencer**. A sequencer emits one wide
control word per cycle, and each bit of that word drives one control signal of
the datapath: a memory enable, a counter reset, a channel get. One sequencer
can drive one cell (MIMD style) or a whole group of identical cells (SIMD
style). That is how hundreds of cells cost only a handful of controllers.

This repository holds synthesizable SystemVerilog for that system model and
for the four fabrics described with it: two applications and two small examples.

| # | fabric | what it computes | default size |
|---|---|---|---|
| 0 | K-means | for each pixel, the nearest of N class centres (L1 distance) | 150 classes, 3 components per pixel |
| 1 | spectral matched filter | inner product of every pixel spectrum with N filters | 140 filters, 32 bands |
| 2 | broadcast example | one Send cell broadcasts a vector; N Receive cells compute `m1 = ch + m0` | 140 cells, 256 words |
| 3 | linear bi-directional array | P_0 streams words through three Ele cells and back | 3 Ele cells, 256 words |

The arithmetic is 8-bit data with 16-bit accumulation, and every cell memory
is 256 × 8. With these sizes the K-means fabric uses exactly 152 such
memories, the matched filter 142 and the broadcast example 282.

## System structure

```
        processor (AHB master, via bridge)        dual-port RAM (16K x 32)
                  |  h*[s]                             ^  dp_*[s], 16-bit words
                  v                                    |
            slave_ctrl  --reg_*-->  dma_ctrl  ---------+
                                       |  gm_req (cell no., address, data,
                                       |          WR_Data, RD_Data, WR_Program,
                                       v          Reset_Fabric, Start_Fabric)
                                  <fabric s>  --gm_rsp (read data, idle)-->
```

`fbs_top` contains four such systems (s = 0..3), one per fabric, with
independent ports. In the original system each fabric is a separate FPGA
configuration, so they never share a host interface. Here they simply sit side
by side.

Three parts are outside the RTL: the processor, its AHB bridge and the
dual-port RAM. Their signals are ports of `fbs_top`.

## Sequencer and microprograms

The sequencer (`fab_sequencer`) is the part to understand first, because every
fabric's behaviour is defined by its programs.

### Instruction

One micro-instruction is 64 bits (`uinstr_t` in `fbs_pkg`):

| bits | field | meaning |
|---|---|---|
| 63:32 | `ctrl` | control word driven onto the datapath while this instruction runs |
| 31:16 | `count` | cycle count of `OP_WAIT`, iteration count of `OP_LOOP` |
| 15:8 | `target` | jump label (instruction index) |
| 7:4 | `cond` | condition bit tested by `OP_JCOND` |
| 3:0 | `op` | flow operation |

A control-word bit that an instruction does not set is zero. The flow
operations are:

| op | assembler meaning | behaviour |
|---|---|---|
| `OP_NEXT` | plain instruction | one cycle, then pc+1 |
| `OP_WAIT` | `wait_cycles n` | the same control word for n cycles, then pc+1 |
| `OP_WAIT_START` | `wait_start label` | hold until the start pulse, then jump to label |
| `OP_JMP` | `jmp label` | jump |
| `OP_LOOP` | `EndLoop label n` | run the body (label..here) n times, then fall through; n = 0 loops forever |
| `OP_JCOND` | branch on a datapath condition | jump if `cond[bit]` is set, else pc+1 |

There is one loop counter, so loops do not nest. None of the default programs
uses `OP_JCOND`. It exists so that a datapath condition can steer a program.

### Program store, reset and start

Each sequencer holds 16 instructions in registers.

- **Power-on reset** loads the store with the fabric's default program and
  sets pc to `ENTRY`. Both are parameters, filled in by the fabric from the
  program functions in `fbs_pkg`.
- **Fabric reset** (`Reset_Fabric`) returns pc to `ENTRY` and clears the cell
  address counters. Memory contents and loaded programs are kept.
- **The host may rewrite any instruction at any time.** It writes 16 bits at a
  time: address `{index[3:0], part[1:0]}`, where part 0 is bits 15:0 and part 3
  is bits 63:48. So a new program, or new loop counts, can be loaded without
  rebuilding the hardware.

Every default program has the same shape. The entry instruction is
`start: wait_start process`, and its control word clears the address counters.
After the start pulse the `process` section runs and ends by falling into the
`wait_start` again.

A sequencer's `waiting` output is high while it sits on a `wait_start`. The
fabric's `idle` (in `gm_rsp`) is the AND of all its sequencers' `waiting`. The
host polls this to learn that a phase has finished.

### Example: the Receive program

| pc | instruction | control word |
|---|---|---|
| 0 | `OP_NEXT` (noop) | — |
| 1 | `OP_WAIT 256` | get channel; m0 enable; m1 enable + write |
| 2 (entry) | `OP_WAIT_START → 0` | m0 and m1 counter reset |

The single-cycle noop covers the channel register between Send and Receive.
Over the next 256 cycles each Receive cell computes
`m1[i] = channel + m0[i]` over consecutive addresses.

### Cycle numbering

In every program comment, cycle 0 is the first cycle after the start pulse.
Because `idle` is registered through the sequencer pc, a fabric whose programs
run C cycles shows `idle` low for C+1 cycles after the start.

## Cells and their datapaths

All cells share one memory module, `fab_dpmem`, which is 256 × 8 and dual
ported.

**Cell port.** The sequencer's memory signals (`memctl_t`) drive this port:

- `en` accesses a word and then advances the address counter. This gives
  sequential access, and because the counter wraps it is also circular.
- `rw` = 1 writes.
- `rst_cnt` clears the counter.
- `load_cnt` loads the counter from the 8-bit `operand`, for random access
  under program control.
- `idx` uses a second address register instead, the index register.
  `load_idx` loads it. This lets a cell read one region sequentially while
  writing results to another.

Cell-port reads are combinational, so a read, an operation and a write can
happen in one cycle, as the Receive program needs.

**Host port.** It is random access, with reads registered (one cycle of
latency). If both ports write the same word in one cycle, the cell's write is
kept.

**Channels.** A channel is a register plus a valid bit. A `put` loads it, and
the word is visible the next cycle. There is no back-pressure: producer and
consumer are scheduled by their programs. An assertion flags any `get` of a
channel that holds no valid data.

The cells:

| cell | datapath | control (`fbs_pkg` struct) |
|---|---|---|
| `send_cell` | two buffers → mux → output channel; buffer select is a host register | `send_ctrl_t`: memory signals, `put_ch` |
| `rec_cell` | `m1 ← ch + m0` | `rec_ctrl_t`: `m0`, `m1`, `get_ch` |
| `dist_cell` | compare picks a−b or b−a (=\|a−b\|), pipeline register, 16-bit accumulator, output channel | `dist_ctrl_t`: `get_ch`, `acc_clr`, `put_ch` |
| `index_cell` | comparator and two muxes: forwards the smaller (distance, class) of its own pair and its neighbour's | `index_ctrl_t`: `get_dist`, `cmp` |
| `res_cell` | two host-readable registers: minimum distance, class | `res_ctrl_t`: `get` |
| `mf_cell` | signed 8×8 multiply, product register, 16-bit accumulator, byte select written back to memory | `mf_ctrl_t`: `get_ch`, `acc_clr`, `wsel_hi` |
| `p_cell` | read memory → output channel; input channel → store memory | `p_ctrl_t`: `mr`, `ms`, `put_ch`, `get_ch` |
| `ele_cell` | per direction: mux(memory, input channel) → output channel | `ele_ctrl_t`: `mem_l`, `mem_r`, `put_l`, `put_r` |

## Global memory map

The DMA controller reaches a fabric through `gm_req`. Its fields:

- `proc`: the cell number for data, or the sequencer number for programs.
- `addr`: `{region[1:0], word[7:0]}` inside a cell.
- `wdata`: 16 bits.
- `wr_data`, `rd_data`, `wr_prog`: access strobes.
- `reset`, `start`: one-cycle pulses to the whole fabric.

Read data comes back in `gm_rsp.rdata` one cycle after `rd_data`. Byte-wide
memories return their byte in bits 7:0.

| fabric | cell numbers | regions | sequencers |
|---|---|---|---|
| K-means | 0 Send_0, 1..N Dist_0..N−1, N+1 Res_0 | Send: 0/1 buffers, 2 buffer select; Dist: 0 class centre; Res: word 0 distance, word 1 class | 0 Send, 1 all Dist, 2 Index_0..N−2, 3 Index_N−1, 4 Res |
| matched filter | 0 Send_0, 1..N MF_0..N−1 | MF: coefficients at 0..D−1, result of pixel p at D+2p (low byte) and D+2p+1 (high byte) | 0 Send, 1 all MF |
| broadcast | 0 Send_0, 1..N Rec_0..N−1 | Rec: 0 m0, 1 m1 | 0 Send, 1 all Rec |
| linear | 0 P_0, 1..3 Ele_0..Ele_2 | P: 0 read memory, 1 store memory; Ele: 0 memory | 0 P, 1 all Ele |

## Host interface: slave controller and DMA controller

`slave_ctrl` is a zero-wait AHB-Lite slave:

- The address phase is registered.
- A write's data phase produces `reg_we`; a read returns `reg_rdata`.
- `HADDR[4:2]` selects one of eight 32-bit registers.
- `HREADYOUT` is always 1 and `HRESP` always OKAY. They are constant outputs.

`dma_ctrl` registers:

| reg | name | meaning |
|---|---|---|
| 0 | CMD | write: command in bits 2:0; read: as STATUS |
| 1 | RAM_ADDR | 16-bit word address in the dual-port RAM (15 bits used) |
| 2 | PROC | cell number (data) or sequencer number (program) |
| 3 | GM_ADDR | first address inside the cell or program |
| 4 | LEN | number of 16-bit words |
| 5 | STATUS | bit 0 busy, bit 1 fabric idle |

| cmd | action |
|---|---|
| 1 | copy LEN words RAM → cell memory (WR_Data) |
| 2 | copy LEN words RAM → sequencer program (WR_Program) |
| 3 | copy LEN words cell memory → RAM (RD_Data) |
| 4 | one-cycle fabric reset |
| 5 | one-cycle start |

A command written while busy is ignored. A copy takes one command cycle plus
two cycles per word (RAM read then fabric write, or fabric read then RAM
write). Word i goes between RAM_ADDR+i and GM_ADDR+i of the same cell. The RAM
is seen as 32K words of 16 bits (16K × 32).

A typical run goes like this:

1. Load each cell's data (cmd 1).
2. Optionally load programs (cmd 2).
3. Reset (cmd 4).
4. Start (cmd 5).
5. Poll STATUS until idle.
6. Read results back (cmd 3).

## The fabrics

### K-means clustering (`kmeans_fabric`)

Each class i has a Dist_i/Index_i pair.

- Send_0 broadcasts the D components of one pixel.
- Each Dist_i accumulates `sum |c_ik − p_k|` against its stored centre.
- The Index cells form a chain from Index_N−1 down to Index_0. Each forwards
  the smaller of its own (distance, i) and its neighbour's pair.
- Res_0 holds the final pair.

Ties keep the lower class number. Five sequencers run the whole array, as
listed in the map above.

The default programs process **one pixel per start**:

| cycles after start | what happens |
|---|---|
| 0..D−1 | Send puts the components |
| 1..D | Dist cells get and accumulate (one pipeline register) |
| D+2 | Dist puts its distance |
| D+3 | Index cells take their own distance |
| D+4..D+N+3 | the chain compares; the minimum moves one cell per cycle |
| D+N+4 | Res_0 captures |

`idle` is low for D+N+5 cycles (159 at the defaults).

The Send address counter keeps its value between starts, so successive starts
walk through the pixel buffer, 85 RGB pixels per buffer. While the fabric works
on one buffer, the host fills the other. Switching buffers is a write to
Send_0's region 2, followed by a fabric reset.

### Spectral matched filter (`mf_fabric`)

Send_0 broadcasts a block of NP pixels, each D bands long, stored
band-interleaved (pixel p, band k at p·D+k). Each MF cell holds one filter's
coefficients. For every pixel it forms the signed inner product in its 16-bit
accumulator, then writes it back to its own memory as two bytes through the
index register.

- A pixel enters every D+3 cycles: D multiply-accumulates, one cycle to drain
  the product register, and two byte writes.
- A start processes the whole block, NP·(D+3) cycles. The pixel loop is an
  `EndLoop NP`.

### Broadcast example (`bcast_fabric`)

Send_0 puts L words. After the one-cycle noop, every Rec cell adds them to its
m0 and writes m1. Sequencer 1 drives all N Rec cells. Loading a Receive program
with a different `wait_cycles` count changes the vector length at run time.
The end-to-end test does this.

### Linear bi-directional array (`linear_fabric`)

The stream runs P_0 → Ele_2 → Ele_1 → Ele_0, turns round at Ele_0, and comes
back the same way: seven channel registers in all. P_0 stores what returns.

- With `MEM_SEL = 0` the Ele cells forward, and P_0 receives its own words.
- With `MEM_SEL = 1` each Ele cell replaces the leftward stream with its own
  memory, so P_0 receives Ele_0's memory.

## Where this design departs from, or adds to, the original description

- **Program storage.** The original flow assembles each program into a
  dedicated state machine. Here every sequencer is a small microcode engine
  whose store is reset to the assembled program and can be rewritten by the
  host. The instruction encoding and the 16-entry depth are this design's.
- **Cell-memory and channel details.** The access modes (sequential, circular,
  indexed, random) are named but not specified. The counter, index register,
  combinational cell read and registered host read are this design's. Channels
  have no handshake; programs schedule them.
- **Send double buffering.** The buffer in use is chosen by a host-visible
  register. The original says only that the processor fills one buffer while
  the fabric works on the other.
- **K-means.**
  - The class count is N Dist cells, Dist_0..Dist_N−1: one pair per class.
  - The pixel width D = 3 (a colour pixel) is an assumption.
  - The tie rule is an assumption.
  - The 16-bit distance is an assumption.
  - The fabric handles one pixel per start and does not overlap the index
    chain of one pixel with the distances of the next. The original quotes
    4.5 G operations/s at 33 MHz, which needs that overlap (about 136
    operations per cycle). This design does 150 per cycle while distances are
    computed, but about 2.8 per cycle averaged over a pixel (3·150/159).
- **Matched filter.**
  - D = 32 bands and 8 pixels per block are assumptions.
  - Signed coefficients, a wrapping 16-bit accumulator and the result layout
    are this design's.
  - Sustained rate: 140·D/(D+3) MACs per cycle. With the default D = 32
    that is 128 per cycle, 4.2 G MAC/s at 33 MHz, against the quoted 4.5 G.
    Hyperspectral pixels of 113 bands or more reach 4.5 G on the same
    hardware; D = 128 gives 136.8 per cycle, 4.51 G MAC/s.
- **Linear array.** What the free end of the array does is not specified. Here
  Ele_0 turns the stream round. Each Ele cell has one mux per direction.
- **Host interface.** The protocol (AHB-Lite), the register map, the commands
  and the two-cycle-per-word copy are this design's. Only the signal set
  towards the fabric and the 16-bit RAM side follow the original system
  diagram.
- **Four systems in one top.** They are four separate configurations in the
  original.

## Not included

- The processor, the bus bridge and the 16K × 32 dual-port RAM. These are
  vendor hard blocks; their signals are ports of `fbs_top`.
- The 52-cell reference fabric of the original system diagram. Its cells are
  not described.
- The floating-point modules of the original generator library. They are
  named only.
- The fabric generator and assembler. These are software. The programs they
  would produce are written as SystemVerilog functions in `fbs_pkg`
  (`rec_prog`, `km_dist_prog`, `mf_prog`, …), one per sequencer.

## Size at the default parameters

Coarse synthesis of `fbs_top` with yosys gives:

- about 17.7k cells;
- 38k flip-flop bits;
- 1.19 Mbit of memory (581 memories of 256 × 8; the program stores are
  registers).

72 of the top's outputs are constant. These are `hreadyout` and `hresp`, and
`hrdata` bits the registers do not use.

## Simulating

Each module sits in `rtl/<name>.sv`, and each testbench in `tb/<name>.sv`.
Testbench-only models (`dpram_model`, a behavioural dual-port RAM) and the
shared end-to-end body (`fbs_top_body.svh`) are also in `tb/`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb \
          rtl/fbs_pkg.sv tb/tb_kmeans_fabric.sv --top-module tb_kmeans_fabric
./obj_dir/Vtb_kmeans_fabric
```

Every testbench is self-checking. Each ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_fab_sequencer` | every flow operation, loop counts, start, fabric reset, host program writes |
| `tb_fab_dpmem` | sequential / circular / loaded / indexed access, host port, collisions |
| `tb_send_cell` … `tb_ele_cell` | each datapath against a reference model |
| `tb_kmeans_fabric`, `tb_mf_fabric`, `tb_bcast_fabric`, `tb_linear_fabric` | each fabric through its global-memory bus, results and busy-cycle counts |
| `tb_slave_ctrl`, `tb_dma_ctrl` | AHB transfers; each DMA command with its cycle count |
| `tb_fbs_top` | all four systems end to end at reduced sizes, through AHB, DMA and RAM models (details below) |
| `tb_fbs_top_full` | the same sequence with `fbs_top` at its default sizes, about 15 s |
| `tb_mf_hyperspectral` | 140 filters on 128-band pixels: every result, and the sustained rate of 136.8 MACs per cycle |

In the two `fbs_top` tests:

- Results are compared with a model.
- The busy time of every run is checked: D+N+5, NP·(D+3)+1, L+1 and L+7
  cycles.
- Each mechanism is counted and must occur at least once: AHB reads and
  writes, data and program loads, read-back, fabric reset, start, buffer
  switch, program reload and a K-means tie.

To change a fabric's behaviour without touching the datapath, edit or add a
program function in `fbs_pkg`, or load a new program at run time with DMA
command 2.
