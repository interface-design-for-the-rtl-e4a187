# GTM interface: host, memory and region-function control for template matching on an FPGA board

Many image operations (2-D filtering, morphology, motion estimation, template
matching) are the same computation in disguise: a template is moved over the
image pixel by pixel in scan-line order, and at each position some function
combines the image pixels under the template's taps. This is *generalized
template matching* (GTM). The template can be sparse, with only a few taps
used in a large window.

The arithmetic at each pixel is simple. The hard part of putting GTM on an
FPGA board is the interface around it:

- moving the image from the host into on-board memory;
- giving the FPGA the region to process and the template;
- feeding the compute pipeline from memory at the highest rate the memory
  ports allow;
- storing results and handing them back to the host.

This RTL is that interface, built as separate blocks. Where the blocks are
wired to the board's memory ports, and how the compute loop is pipelined, is
set by parameters. The design compiles with Verilator and slang, and every
block has a self-checking testbench.

## The pieces and how they connect

```
             host (tagged accesses)
                     |
                    HI ---------------- GC  (task, Mux_Sel, Reset, Assert)
          image |    | result      |region/template/status
                v    ^             v
            HMI (one, or two: in / out)      RF = RF controller + UF (one, or one per port)
                |    ^                        |   ^
          mux per memory port (Mux_Sel) <-----+   |
                |                                 |
               MI per port  ----------------------+ (read data)
                |
        on-board SRAM bank per port
```

| Block | Module | Role |
|---|---|---|
| HI, host interface | `gtm_hi` | Tag decoding: each tag maps to one storage type. Only accesses that belong to the current task are let through. It also multiplexes read returns. |
| GC, global controller | `gtm_gc` | Follows the host's task commands. Drives `Mux_Sel` for every memory port, and `Reset`/`Assert` for each RF. Tracks which RFs take part in the current task. |
| HMI, host-memory interface | `gtm_hmi` | Writes host image words to memory (to several ports if the image must be duplicated). Reads result words back for the host. |
| Port multiplexer | `gtm_port_mux` | Picks which unit drives a memory port: the RF, the first HMI or the second HMI. |
| MI, memory interface | `gtm_mi` | Registers requests onto the memory pins and returns synchronous-SRAM read data. |
| RF, region function | `gtm_rf` | The UF plus its controller. Applies the template to every pixel of one image region. |
| RFC, RF controller | `gtm_rfc` | Four parts: RC, TC, RSC and LC. |
| RC, region controller | `gtm_rc` | Holds the region boundary. |
| TC, template controller | `gtm_tc` | Holds the template taps: a word offset and a weight for each. |
| RSC, result and status controller | `gtm_rsc` | Result summary and status for the host. |
| LC, loop controller | `gtm_lc` | Walks the region. Issues the template reads and the result writes in the pipelined schedule. |
| UF, unit function | `gtm_uf` | NBF basic functions working on one memory word (NBF pixels) at a time. |
| BF, basic function | `gtm_bf` | The template at one pixel: multiply-accumulate, then saturate. |

Shared types, widths and the schedule functions are in `gtm_pkg`.

## Operation: tasks driven by the host

The host runs the operation as five tasks, each started by a command write:

1. **T1: image.** Image words go through the HMI into memory.
2. **T2: region.** The region boundary goes to the RC.
3. **T3: template.** The taps go to the TC.
4. **T4: compute.** The GC pulses `Reset` and then `Assert`. The LC processes the region, and the GC waits for the RF's done.
5. **T5: results.** The host reads result words from memory through the HMI, and the summary from the RSC.

The host may repeat any task:

- T1, if the image changes or does not fit;
- T2, for another region;
- T3, for another template on the same region.

The hardware does not count these iterations. The GC stays in the last
commanded task. A command that arrives during T4 is refused (`cmd_err`).

### Two region functions

A board with two memory ports can hold two RFs, one per port. They can work
in parallel on two regions, or apply two templates to one region. Each
command names the RFs that take part in its task; the other RFs rest. The
schedule for two RFs that share the image and the template but work on
different regions is then seven commands:

| Step | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| RF1 | T1 | T2 | | T3 | T4 | T5 | |
| RF2 | T1 | | T2 | T3 | T4 | | T5 |

- T1 to both RFs gives the image HMI both ports, so every image word written by the host lands in both memory banks (a broadcast).
- T2 and T3 writes reach only the RFs named in the command.
- T4 to both starts both RFs with one Reset/Assert pulse pair. The GC leaves T4 when every named RF has reported done.
- T5 goes to one RF at a time, because results come back through one read path. T5 to both is refused.

### Host port

An access is taken when `h_valid && h_ready`. Reads complete with
`h_rvalid`/`h_rdata`. Only one read may be outstanding: `h_ready` stays low
until its data returns.

| `h_tag` | Dir | Allowed in | Meaning |
|---|---|---|---|
| 0 `TAG_CMD` | write | always | `h_wdata[2:0]` = task 1..5; `[4:3]` = RFs taking part (bit 0 RF1, bit 1 RF2; 0 means all) |
| 1 `TAG_IMAGE` | write | T1 | image word at memory word address `h_addr` |
| 2 `TAG_REGION` | write | T2 | region register `h_addr`, listed below |
| 3 `TAG_TEMPLATE` | write | T3 | tap `h_addr`: `h_wdata[23:8]` signed word offset, `[7:0]` signed weight |
| 4 `TAG_RESULT` | read | T5 | memory word at `h_addr`, on the result port |
| 5 `TAG_STATUS` | read | always | 0 `{done,busy}`, 1 computation count, 2 best value, 3 best pixel index; with two RFs, RF k's register r is at 4k + r |

An access outside its task pulses `acc_err`. A refused read returns zero.

Region registers (word units):

| Register | Meaning |
|---|---|
| 0 | first row |
| 1 | last row |
| 2 | first word column |
| 3 | last word column |
| 4 | words per image row |
| 5 | image base address |
| 6 | result base address |

### What is computed

For each word position (r, c) in the region, BF lane j (pixel j of the
word) computes:

    res_j = sat16( sum_t  weight[t] * pixel_j( mem[img_base + r*stride + c + offset[t]] ) )

- Pixels are unsigned 8-bit values. Lane 0 is the low byte.
- Weights are signed 8-bit values.
- Results are signed 16-bit values, saturated.
- The NBF = 4 results of a word position fill two 32-bit result words, written to `res_base + 2k` and `res_base + 2k + 1`, where k counts word positions in scan order.

The RSC also tracks the largest single result and its index `k*4 + j`. On a
tie, the earlier pixel wins. This is the best match for correlation-style
template matching.

Offsets are whole memory words. A horizontal template offset must therefore
be a multiple of 4 pixels, or the image must be stored pre-shifted; this
design does not do that layout for you. The number of taps is the number of
read cycles of the UF (six in all shipped configurations).

## Loop pipelining: the central idea

The UF is described by its timing, not by what it computes:

| Timing | R1 | R2 | C | W |
|---|---|---|---|---|
| 6/3/2 (default) | 6 reads on the read port | — | 3 compute cycles | 2 result writes |
| 3/3/3/2 | 3 reads on port 0 | 3 reads on port 1 | 3 compute cycles | 2 writes |

The loop controller starts a new computation every **P** cycles, before the
previous one has finished. P is limited by how busy each memory port is.
`gtm_pkg::pipe_period` and `gtm_pkg::write_start` derive both the period and
the result-write slot, in the following steps:

1. The reads of stage 1 are at offsets 0..R1-1 after a start, on port 0. The reads of stage 2 are at offsets R1..R1+R2-1, on port 1.
2. The UF result is ready at offset `R1 + R2 + MEM_LAT + C` = 11. Here MEM_LAT = 2 is the MI register plus the SRAM.
3. The W writes go to port WP. They start at the first offset at or after "ready" whose W cycles, taken modulo P, do not meet any read on that port.
4. P is the smallest period for which such a slot exists. It is at least the busiest port's read-plus-write count.

| Configuration | Parameters | P | Write at offset |
|---|---|---|---|
| (a) one port, one bidirectional HMI (default) | `N_PORTS=1` | 8 | 14 |
| (b) one port, one HMI per direction | `N_PORTS=1, SPLIT_HMI=1` | 8 | 14 |
| (c) image on port 0, results on port 1 | `N_PORTS=2, SPLIT_HMI=1, WP=1` | 6 | 11 |
| (d) two read stages on duplicated images | `N_PORTS=2, SPLIT_HMI=1, R1_LEN=3, R2_LEN=3, IMG_MASK=2'b11` | 5 | 13 |
| (e) two RFs, RF r alone on port r | `N_PORTS=2, N_RF=2, SPLIT_HMI=1, IMG_MASK=2'b11` | 8 each | 14 |

In (a) and (b), the single port spends 6 cycles reading computation k+1 and
then 2 cycles writing computation k's results. Those results wait three
cycles in the LC's result buffer. In (c), reads own port 0 and writes own
port 1, so reads alone set the rate. In (d), the two read stages use
different ports and different BF multipliers/accumulators. That lets stage 1
of the next computation overlap stage 2 of the current one. Port 0 carries
3 reads and 2 writes per period, so P = 5.

The LC's state is a shift register of "a computation started d cycles ago"
flags, with each computation's base address beside it. Each cycle it issues:

- the read for tap d, for a computation whose d is below R1 (port 0) or below R1+R2 (port 1);
- result word d-WS, for a computation whose d is in the write window, at an incrementing result pointer.

The UF uses the same kind of start shift register to know which tap arrives
on which port. An elaboration check makes sure that a result is written
before the next one arrives, so one result register is enough.

## Memory side

Each port has an MI. The MI registers `M_EN`, `M_RW` (1 = write), `M_Addr`
and the write data onto the pins, and expects a synchronous SRAM that
returns read data one cycle after it sees a read. Read data therefore
reaches the UF two cycles after the LC issues the read.

The GC gives each port to one unit through the port multiplexer:

- in T1, to the image HMI, on the ports in `IMG_MASK` of the named RFs;
- in T4, to the RF that owns the port, if it is named;
- in T5, to the result HMI, on port WP (with two RFs: on the named RF's port);
- otherwise, to no unit.

An assertion in the multiplexer fires if a unit requests a port it does not
own.

## Sizes and widths

| Item | Value | Where |
|---|---|---|
| memory data / address | 32 / 16 bits | `gtm_pkg::DW`, `AW` |
| pixel, weight, result | 8 unsigned, 8 signed, 16 signed | `PIX_W`, `WGT_W`, `RES_W` |
| BFs per UF | 4 (= DW / PIX_W) | `NBF` |
| template storage | 16 taps | `MAX_TAPS` |
| memory read latency | 2 cycles | `MEM_LAT` |

`NBF * RES_W` must equal `W_LEN * DW`, so that the results exactly fill the
write cycles. The UF checks this at elaboration.

Timing on an FPGA has not been checked.

## How far it follows the source design, and where it departs

These parts follow the published interface method:

- the block structure (HI, HMI, GC, multiplexers, MI, RF with UF and an RFC split into RC, TC, RSC and LC);
- the signal roles `Mux_Sel`, `Reset`, `Assert`, `Start`, `Ok`, `Done` and `M_EN`/`M_RW`/`M_Addr`;
- the five-task scenario;
- the five connectivity graphs of the table above;
- the two-RF task schedule: image broadcast, separate regions, shared template, parallel computation;
- the UF timings 6/3/2 and 3/3/3/2;
- the loop periods 8, 6 and 5, with the result write placed after the next computation's reads in (a) and (d).

These are this design's own choices:

- **The UF function.** The weighted sum with saturation is this design's. The method treats the UF as a given, application-specific pipeline. Only its R/C/W timing matters to the interface, so another UF can replace `gtm_bf` as long as it keeps the port timing of `gtm_uf`.
- **Widths.** All widths are this design's (see the table above).
- **Host protocol.** The tag encoding, the command format (including how a command names RFs), the refusal of out-of-task accesses, and the single outstanding read are this design's. So is refusing T5 to two RFs at once.
- **Memory latency.** The memory latency of 2 cycles makes "ready" fall at offset 11. In (c) the write therefore starts at 11, rather than straight after the third compute cycle. The periods are not affected.
- **RSC contents.** What the RSC reports (count, best value, best index) is this design's choice.
- **One clock.** Host and memory share one clock, so the HMI needs no buffer. With asynchronous host and memory clocks a FIFO would be needed inside the HMI.

Not built:

- **More than two RFs, or RFs sharing a port.** Each RF has its own port. Sharing one port between RFs would bring no speed-up.
- **Burst accesses.** The MI does single-word accesses only.
- **Direct host access to memory.** A board where the host reaches memory directly, without an HMI, is not covered.
- **Parts outside the FPGA.** The host, the board FIFO/crossbar and the memory chips are outside the FPGA. `tb/gtm_sram_model.sv` models a memory bank for simulation.

## Simulating

All tests are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/gtm_pkg.sv tb/tb_gtm_fpga_top.sv --top-module tb_gtm_fpga_top
    ./obj_dir/Vtb_gtm_fpga_top

Replace the testbench name to run another test.

| Testbench | What it shows |
|---|---|
| `tb_gtm_fpga_top` | Default top, end to end, at default parameters: 12x6-word image, region A with two templates, a second region, and a partly rewritten image. Every result word and the RSC summary are checked against a reference model. The period of 8 is measured. Each mechanism must occur: every task, loop-backs to T1/T2/T3, overlapped computations, the deferred write, saturation, refused accesses and refused commands. |
| `tb_gtm_fpga_top_cg` | Configurations (b), (c) and (d) side by side, with the same checks and periods 8, 6 and 5. |
| `tb_gtm_fpga_top_mrf` | Configuration (e) through the seven-step two-RF schedule. It checks the image in both banks, both RFs computing at once, each RF's results and status, and a refused T5 to both. A second template goes to RF2 alone; RF1 must keep the first template and its port must stay quiet while RF2 runs alone. Last, both RFs take one region with a different template each. |
| `tb_gtm_lc` | The loop controller against a cycle-by-cycle reference schedule, for (a), (c) and (d). |
| `tb_gtm_uf`, `tb_gtm_bf` | UF timing (`Ok` at offset 11) and arithmetic, including two-stage accumulation and saturation. |
| `tb_gtm_rf`, `tb_gtm_rfc` | A region run against memory, with exact cycle count and results. |
| `tb_gtm_gc` | Task commands, Mux_Sel, Reset/Assert for one RF and for two RFs through the two-RF schedule. |
| `tb_gtm_hi`, `tb_gtm_hmi`, `tb_gtm_mi`, `tb_gtm_port_mux`, `tb_gtm_rc`, `tb_gtm_tc`, `tb_gtm_rsc` | Each block's own rules. |

Shared testbench helpers:

- `gtm_host_env`: host and memory model plus checker for the top;
- `gtm_lc_harness`: loop controller schedule checker;
- `gtm_sram_model`: memory bank.

The simulator is two-state, so everything that is read is reset or
initialised. Assertions are active with `--assert`.

## Changing it

- **Another UF timing.** Set `R1_LEN`, `R2_LEN`, `C_LEN` and `W_LEN` on the top. The period and the write slot follow automatically. Keep `NBF*RES_W == W_LEN*DW`. Use `R2_LEN > 0` only with `N_PORTS = 2` and an image duplicated on both ports (`IMG_MASK = 2'b11`).
- **Another board.** Change `DW`/`AW` in `gtm_pkg`, and the MI if the memory is not a one-cycle synchronous SRAM. Then update `MEM_LAT`: the schedule functions use it.
- **Two RFs.** Set `N_RF=2`. This requires `N_PORTS=2`, `R2_LEN=0` and `WP=0` (each RF reads and writes its own port); an elaboration check enforces it. Use `SPLIT_HMI=1` and `IMG_MASK=2'b11` so that the image can be broadcast.
- **Another host protocol.** Only `gtm_hi` knows the tag map.
