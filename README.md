# Reconfigurable array processor for GAN deconvolution and convolution

A GAN generator up-samples with deconvolution (transposed convolution), and its
discriminator down-samples with ordinary convolution. Accelerators usually build
separate hardware for each, or turn deconvolution into convolution by inserting
zeros between input pixels, which wastes most of the multiplications.

This design runs both layer kinds on **the same 4x4 group of processing elements
(PEs)**. Every PE keeps two configuration contexts:

- **PC1** holds its deconvolution role.
- **PC2** holds its convolution role.

One *call* command, broadcast over an H-tree network, switches a whole group from
PC1 to PC2 in a single cycle. The group then works on the result it has just
stored. Nothing is reloaded and no zeros are inserted.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is a design of
its own, built from a published architecture description: the *dynamic
programmable reconfigurable array processor* (DPRAP) and its DCGAN mapping. The
block structure, the 16-PE group, the two contexts, the H-tree, the role names
and the order of operations come from that description. The description gives no
instruction set, widths, timing or interconnect details. Those are choices made
here; they are listed in [Departures and assumptions](#departures-and-assumptions).

## The array

```
 host bus ──► host_if ──► global_imem ──► global_ctrl ──► htree (3 register levels)
                │                              ▲              │
                │ DIM writes / DOM reads       │ done         ▼ one leaf per PE
                ▼                              │      ┌────────────────────────┐
        input_memory[g] ──► PE00 ─── peg[g] (4x4 PEs) ── PE33 ◄──► output_memory[g]
                                      └────────────────────────┘      g = 0..N_PEG-1
```

| block | module | role |
|---|---|---|
| host interface | `host_if` | Decodes the host bus (address, write flag, data). It starts the controller, loads the program and input memories, and reads the output memories. |
| global instruction memory | `global_imem` | 64 x 64-bit program store. The host writes it in 32-bit pieces. |
| global controller | `global_ctrl` | Runs the program. It sends configuration, call and run packets, and waits for groups to finish. |
| H-tree | `htree`, `htree_node` | Routes packets from the root to groups, then to 2x2 quads, then to PEs. Every PE is reached in exactly 3 cycles. |
| PE group | `peg` | 16 `dprap_pe` on three shared buses, plus the partial-sum adder used on readout. |
| PE | `dprap_pe`, `ctx_store` | A two-context configuration store, a weight register, a multiplier, a 11x11 partial-sum buffer and small control FSMs. |
| input memory (DIM) | `input_memory` | One bank per group: kernels and the input map, stored column by column. |
| output memory (DOM) | `output_memory` | One bank per group: the deconvolution result, which is read back, and the convolution result. |

`N_PEG = 4` by default: the original array is drawn as four groups of 16 PEs.
Each group has its own memory banks and can run its own image. The DCGAN program
broadcasts the same configuration to all of them.

## Inside a group: roles instead of instructions

A PE does not run an instruction stream. Its active context is one configuration
word (`cfg_t` in `dprap_pkg`). The word holds role bits, which may be combined,
and the geometry of the layer:

| role | what the PE does |
|---|---|
| `kld` (kernel load) | On RUN, reads the 9 weights from its memory port and broadcasts them as `WEIGHT` tokens. It then sends `KDONE`. |
| `db` (data distribution, "Db") | On `KDONE`, streams the input map column by column as `PIXEL(y,x)` tokens. It then sends `DDONE`. |
| `op` ("ConOp"/"DeconOp") | Keeps the weight of its tap `cfg.tap` and multiplies every pixel by it. The product goes on lane `tap` of the product bus one cycle later. |
| `inte` ("Coninte"/"Deconinte") | Adds the products of the taps in `cfg.mask` into its own partial-sum buffer (addressing below). |
| `send` ("Send Results") | On `DDONE`, waits 2 cycles, then walks the result area. It sums the buffers of all 16 PEs at each position, rescales the sum and writes it to memory. It then pulses `done`. |

The three group buses are built by OR-ing the PEs' outputs. A PE drives zero on
a bus when it has nothing to send.

- **Distribution bus:** carries `tok_t`, which is one of WEIGHT, KDONE, PIXEL or DDONE.
- **Product bus:** carries nine 32-bit lanes plus the pixel coordinates.
- **Readout bus:** the send PE drives a buffer index onto it, and the group adds every PE's partial sum at that index.

`KDONE` and `DDONE` are the handshakes that let the next stage start.

PE00 is the only PE wired to the input memory. PE33 is the only one wired to the
output memory.

### The DCGAN role map

`dprap_pkg::dcgan_role(pe, conv, ...)` builds the role map that the example
program loads. PE index = row*4 + col.

```
            PC1 (deconvolution, stride 2)          PC2 (convolution)
          col0     col1     col2     col3       col0     col1     col2      col3
 row0   kld db   op t1    inte     op t2      kld      op t1    inte      op t2
        op t0             {0,2,6,8}           op t0             {0,1}
 row1   op t3    -        op t4    -          op t3    inte{3}  op t4     inte{2}
                                                                inte{4}
 row2   inte     op t5    op t6    inte       inte{5}  op t5    op t6     -
        {1,7}                      {3,5}                        inte{6}
 row3   op t7    op t8    inte{4}  send       op t7    op t8    -         db send
                                              inte{7}  inte{8}
```

`t k` is the kernel tap the Op PE holds, with tap = ky*3 + kx. `{...}` lists the
taps an Inte PE integrates.

**The nine Op PEs are the same in both contexts.** Each multiplies by one tap of
the 3x3 kernel, and only its weight changes between layers.

**Deconvolution integration.** A stride-2 deconvolution splits its output into
four phases by (row mod 2, column mod 2):

- Phase (even, even) receives taps {0,2,6,8}.
- Phase (even, odd) receives taps {1,7}.
- Phase (odd, even) receives taps {3,5}.
- Phase (odd, odd) receives tap {4}.

The four deconvolution-integration PEs (PE02, PE20, PE23, PE32) each own one
phase.

**Convolution integration.** In the convolution context, eight PEs share the
nine taps. The four PEs that are both Op and Inte integrate their own product.

**Distribution.** The deconvolution input comes from the input memory through
PE00. The convolution input is the stored deconvolution result, which PE33
reads back from the output memory.

## How one layer runs

Times are in cycles after the RUN packet reaches the PEs:

```
RUN packet at the PEs
 +1 ..  +9        kld PE reads the 9 weights; WEIGHT tokens follow one cycle later
 +11              KDONE            -> db PE starts reading pixels, one per cycle
 n*n cycles       PIXEL tokens     -> Op PEs multiply (1 cycle), Inte PEs add (same edge)
 then             DDONE            -> send PE waits 2 cycles for the last sums
 m*m cycles       one result word per cycle, column by column, then the done pulse
 total            at most K*K + n*n + m*m + 8 cycles
```

`n` is the input side and `m` is the result side. In the example the
deconvolution has n = 5, m = 9 and the convolution has n = 9, m = 7. Both finish
in under 160 cycles. Add 3 cycles for the H-tree and 2 cycles per global
instruction. The testbenches check every layer against the bound
K*K + n*n + m*m + 8.

## Deconvolution and convolution without zero insertion

Both layer kinds use the same step. When pixel (y, x) arrives, it is multiplied
by all nine weights at once, and each product is scattered into a partial-sum
buffer:

- **deconvolution:** the product of tap (ky, kx) goes to (y*S + ky, x*S + kx).
  The windows of neighbouring pixels overlap (for S = 2, K = 3, one row and one
  column), and the overlap is summed in the buffers. The send PE skips `crop`
  border pixels on each side, so a 5x5 input gives an 11x11 full result and a
  9x9 result after a one-pixel border is removed.
- **convolution:** the product goes to (y - ky, x - kx) if that output exists.
  A valid (unpadded) n x n convolution gives (n-2)x(n-2) outputs. This is a
  correlation, which is the usual CNN convention.

For one pixel, the nine taps always land on nine different positions, so a
buffer can take all its taps in one cycle without write conflicts.

**Number format:**

- Data and weights are 16-bit signed Q8.8.
- Products and sums are 32-bit and wrap on overflow.
- On writing, the sum is shifted right arithmetically by 8 bits and saturated to 16 bits.

### Several input channels

An output map of a real layer is the sum of the contributions of every input
map. A RUN normally clears the partial-sum buffers first. If the active
configuration has `accum` set, the buffers are kept instead. To add up N input
maps, the program runs the layer once per map:

- Each run uses that map's address (`src`) and kernel (`kbase`).
- `accum` is set from the second run on.
- The last run's send writes the finished map; earlier sends write running totals.

Rescaling happens only on the full 32-bit sum, so the result is the same as a
single pass over all maps.

## Contexts, the H-tree and updates while running

The H-tree carries packets (`hpkt_t`) of four kinds:

- `CFG` writes a configuration word into slot 0 or 1 of one PE, or of all PEs.
- `CALL` makes a slot active.
- `RUN` starts a layer with the active slot.
- `NOP` carries nothing.

Each tree node registers the packet and passes it only to the children it
addresses: group, then quad (`{row[1], col[1]}`), then PE in quad
(`{row[0], col[0]}`). Broadcast flags pass it to all children. Every path has
three registers, so all PEs of a group see a CALL or RUN in the same cycle.

A `CFG` may target the inactive slot while a layer runs; the running layer does
not notice. The example program loads PC2 this way while the deconvolution is in
progress.

## Programming the array

**Global instruction** (`ginstr_t`, 64 bits, MSB first):

| field | bits | meaning |
|---|---|---|
| `op` | 3 | 0 CFG, 1 CALL, 2 RUN (start, do not wait), 3 WAIT (until every started group is done), 4 HALT |
| `all_peg`, `peg` | 1, 2 | target group(s) |
| `all_pe`, `pe` | 1, 4 | target PE(s) |
| `slot` | 1 | context, 0 = PC1, 1 = PC2 |
| `cfg` | 52 | `kld db op inte send conv accum`, `tap`(4), `mask`(9), `in_dim`(4), `stride`(2), `crop`(2), `kbase`(8), `src`(8), `dst`(8) |

**Host address map** (16-bit word address; data 32 bits; reads answer one cycle
later with `host_rvalid`):

| address | access |
|---|---|
| `0x0000` | write bit 0 = start; read = `{halted, busy}` |
| `0x1000 + 2*i + p` | write piece p (0 = bits 31:0) of instruction i |
| `0x2g00 + a` | write word a of input memory bank g |
| `0x3g00 + a` | read word a of output memory bank g |

A map stored "in columns" puts pixel (y, x) at `base + x*side + y`.

**The DCGAN program** used by `tb_dprap_top`:

- **Memory layout:** the deconvolution kernel is at DIM 0, the convolution kernel at DIM 16, and the 5x5 image at DIM 32. The 9x9 deconvolution result goes to DOM 0 and the 7x7 convolution result to DOM 128.
- **Program:**
  1. 16 x CFG slot 0.
  2. CALL 0.
  3. RUN.
  4. 16 x CFG slot 1, sent while the deconvolution runs.
  5. WAIT.
  6. CALL 1.
  7. RUN.
  8. WAIT.
  9. 16 x CFG slot 1 again: a second input channel. It reuses the deconvolution result with a third kernel at DIM 64, sets `accum`, and writes to DOM 192.
  10. RUN.
  11. WAIT.
  12. HALT.

## Parameters and limits

| parameter | default | where |
|---|---|---|
| `N_PEG` | 4 | `dprap_top`, `htree`, `host_if`, `global_ctrl` |
| `GIM_DEPTH` | 64 | `dprap_top` |
| `K` | 3 (fixed) | `dprap_pkg` |
| `MAX_IN`, `MAX_S` | 5, 2 | `dprap_pkg`: size of the partial-sum buffers (`BUF_DIM` = 11) |
| `DATA_W`, `ACC_W`, `FRAC` | 16, 32, 8 | `dprap_pkg` |
| memory banks | 256 x 16 bit | `MEM_AW` = 8 in `dprap_pkg` |

The design has these limits:

- **Feature maps:** up to 5x5 for a stride-2 deconvolution, or up to 11x11 for a convolution.
- **Channels:** one input map and one output map per RUN; more input maps are added up over several RUNs (see below); output maps are separate layer runs.
- **Kernel:** 3x3 only.

A full DCGAN generator (5x5 kernels, 32x32 maps, hundreds of channels) does not
fit. The buffer size grows with `MAX_IN`. Each PE holds BUF_DIM² 32-bit words in
flip-flops, written through nine ports, so synthesis time grows quickly with
this size.

## Departures and assumptions

The following are this design's own choices:

- **PE internals and interconnect.** No PE instruction set is given in the original description. PEs are configured dataflow units, and they talk over shared group buses rather than neighbour links.
- **Op and Inte PEs.** Nine Op PEs cover the 3x3 kernel. The original role map also marks PE11 and PE13 as deconvolution Op PEs; here they are idle in PC1. The tap subsets of the Inte PEs are chosen here.
- **Data distribution.** PE00, and later PE33, broadcast each pixel to all Op PEs. In the original, data is passed "in blocks" to PE01 and PE10, which then start on a handshake.
- **Memory banks.** Each group has its own input and output memory bank, where the original draws one of each for the array.
- **Formats and encodings.** The number format, stride 2, the one-pixel border, the 5x5 input size, the instruction encoding, the host address map and all latencies are assumed.
- **Convolution mode.** Convolution is stride 1 and unpadded.
- **Result path.** The original text sends the convolution results to PE33 from PE23 and PE32. Its role map gives those two PEs no convolution role, and the role map is what is followed here: in PC2 they are idle, and PE33 collects the sums over the readout bus.
- **Reset.** Control state resets asynchronously (`rst_n` low). Memories and the global instruction memory are not reset. The PE partial-sum buffers are cleared by reset and by every RUN whose configuration does not set `accum`.
- **Not modelled.** The FPGA implementation figures of the original (150 MHz, LUT and FF counts) are not reproduced or checked.

## Simulation

Every testbench in `tb/` checks itself. Each one:

- prints `TB_RESULT checks=N failures=M`;
- calls `$finish`;
- has a watchdog that counts a failure if the run hangs.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/dprap_pkg.sv tb/dprap_ref_pkg.sv \
          tb/tb_dprap_top.sv --top-module tb_dprap_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Verilator finds the other modules
through `-Irtl`. `dprap_ref_pkg` is only needed by `tb_dprap_top`, `tb_peg` and
`tb_dprap_pe`.

| testbench | what it shows |
|---|---|
| `tb_dprap_top` | The whole array at default size (4 groups). It loads data and the program over the host bus, runs deconvolution, switches context and runs convolution. All 4 x (81 + 49 + 49) results are compared with a reference model: the deconvolution, the convolution, and the convolution with a second input channel accumulated. Group 3 gets large values so that saturation is exercised. It also counts the handshakes, overlapping deconvolution outputs, configuration writes during a run, controller wait cycles, context switches and accumulating runs, and fails if any never happens. |
| `tb_peg` | One group on its own: 3 random images through both layers with cycle budgets, then a two-input-channel convolution run as two accumulating RUNs. |
| `tb_dprap_pe` | One PE holding all roles, looped back on itself. It runs single-tap deconvolution and convolution, and rewrites the other context mid-run. |
| `tb_ctx_store` | Context writes and calls against a model. |
| `tb_htree` | 500 random packets, including broadcasts. Checks exact delivery, 3-cycle latency and that PEs not addressed see nothing. |
| `tb_global_ctrl` | Program order, the WAIT stall and restart. |
| `tb_host_if`, `tb_global_imem`, `tb_input_memory`, `tb_output_memory` | Decoding and memories against models. |

`dprap_ref_pkg` (in `tb/`) computes the expected results directly from the
definitions of deconvolution (scatter, then crop) and convolution (window sum).
It does not use the RTL's dataflow.
