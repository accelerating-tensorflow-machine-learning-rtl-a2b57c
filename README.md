# Float32 fully connected layer accelerator for a Zynq UltraScale+ edge system

This RTL builds an offload engine that sits beside an ARM application processor. A machine-learning runtime hands it one dense layer at a time:

- a vector of up to 32 float32 inputs;
- a weight matrix;
- a bias vector.

The engine returns `ReLU(W·x + b)` for up to 32 outputs. The processor moves all data itself with plain memory-mapped AXI accesses; there is no DMA. Four small block RAMs hold the data, one per data set: inputs, weights, biases and outputs. Each RAM has two ports. One faces the processor through an AXI BRAM controller; the other faces the accelerator.

The engine is deliberately simple. It has one float multiplier and one float adder, used in turn, with no pipelining, loop unrolling or parallel lanes. It is a working prototype of the hardware/software split, not a throughput design.

The system it models has these parts:

- a TensorFlow Lite delegate;
- user-space drivers that use `/dev/mem`;
- an FC IP generated with a high-level synthesis tool;
- a Vivado block design around it.

This repository gives RTL for the programmable-logic side of that system. The processor, the delegate and the drivers are software, or a vendor hard block, and are not part of it.

## Block diagram

```
 processor AXI4 master  ──►  axi_smartconnect ──M00──► AXI4→AXI-Lite ──► fully_connected (s_axi_control)
   (s_axi / s_axi_rsp)       (1 manager,        ──M01──► axi_bram_ctrl ──A► bram_tdp "input"   B◄── fully_connected
                              5 subordinates)   ──M02──► axi_bram_ctrl ──A► bram_tdp "weights" B◄── fully_connected
                                                ──M03──► axi_bram_ctrl ──A► bram_tdp "bias"    B◄── fully_connected
                                                ──M04──► axi_bram_ctrl ──A► bram_tdp "output"  B◄── fully_connected
 pl_resetn0 ──► proc_sys_reset ──► interconnect_aresetn / peripheral_aresetn
                                        fully_connected.interrupt ──► interrupt (top port)
```

| File | Module | Role |
|---|---|---|
| `rtl/fcc_pkg.sv` | package | AXI4, AXI-Lite and BRAM port structs, sizes, register offsets, address map |
| `rtl/fcc_system.sv` | **top** | wires everything above; contains the small AXI4→AXI-Lite adapter for the control window |
| `rtl/fully_connected.sv` | IP wrapper | the accelerator: register file and compute core |
| `rtl/fc_ctrl_s_axi.sv` | | AXI-Lite control and status registers, interrupt |
| `rtl/fc_core.sv` | | sequential multiply-accumulate state machine, ReLU |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | | combinational IEEE-754 single-precision multiply and add |
| `rtl/axi_smartconnect.sv` | | address decoder / router, 1 manager to 5 subordinates |
| `rtl/axi_bram_ctrl.sv` | | AXI4 subordinate to a BRAM port, with bursts |
| `rtl/bram_tdp.sv` | | true dual-port RAM, 32-bit words, byte enables |
| `rtl/proc_sys_reset.sv` | | reset synchroniser and sequencer |

The top's ports are:

- `pl_clk0`: one clock for everything (100 MHz in the reference system);
- `pl_resetn0`: active-low reset;
- `s_axi`/`s_axi_rsp`: one AXI4 port, 32-bit data, 40-bit address, 16-bit ID;
- `interrupt`.

## Using the accelerator from software

### Address map

This design's choice is 64 KiB windows:

| Base | Window | Contents |
|---|---|---|
| `0x8000_0000` | control | registers below |
| `0x8001_0000` | input | 32 words, `x[i]` at word `i` |
| `0x8002_0000` | weights | 1024 words, `W[o][i]` at word `o*in_size + i` |
| `0x8003_0000` | bias | 32 words, `b[o]` at word `o` |
| `0x8004_0000` | output | 32 words, `y[o]` at word `o` |

The weight rows are packed using the *current* `in_size`. For a 7-input layer, row 1 therefore starts at word 7, not word 32. This is the row-major layout of a dense layer's kernel. An address outside all five windows gets a DECERR response from the interconnect. Inside a window the address wraps modulo the RAM size.

### Control registers

The layout follows the common HLS block-level convention:

| Offset | Name | Bits |
|---|---|---|
| `0x00` | AP_CTRL | 0 start (W1; self-clearing); 1 done (cleared on read); 2 idle; 3 ready (cleared on read); 7 auto-restart |
| `0x04` | GIE | 0 global interrupt enable |
| `0x08` | IER | 0 done, 1 ready |
| `0x0C` | ISR | 0 done, 1 ready; writing 1 toggles |
| `0x10` | IN_SIZE | number of inputs; values above 32 act as 32 |
| `0x18` | OUT_SIZE | number of outputs; values above 32 act as 32 |

The control window accepts single-beat accesses only; an assertion flags bursts.

A layer runs as follows:

1. Write the inputs, weights and biases; bursts are fine.
2. Write IN_SIZE and OUT_SIZE.
3. Write 1 to AP_CTRL.
4. Poll AP_CTRL until bit 1 is set. Alternatively, enable GIE and IER and wait for `interrupt`.
5. Read the outputs.

The software in the reference system polls. The interrupt is wired, but using it is optional.

## The compute core (`fc_core`)

This is the part that needs the most care to use correctly.

### Arithmetic

For each output `o`, the core computes:

```
acc = +0
for i in 0 .. in_size-1:  acc = round(acc + round(x[i] * W[o][i]))
acc = round(acc + b[o])
y[o] = (sign(acc) == 1) ? +0 : acc          // ReLU; -0 and negative NaN also become +0
```

Every operation rounds to float32, to nearest with ties to even. The order is fixed, so results are bit-exact and repeatable. They may differ in the last bit from a software kernel that sums in another order or uses fused multiply-add.

Special values are handled as follows:

- Subnormal inputs are read as zero, and subnormal results are flushed to zero.
- Infinities follow IEEE rules.
- Any NaN result is the single quiet NaN `0x7FC0_0000`.
- A NaN result has its sign bit clear, so ReLU passes it through.

### Schedule and latency

The core has one multiplier and one adder, and BRAM reads take one cycle. Each input therefore costs three states:

1. read `x[i]` and `W[o][i]`;
2. multiply;
3. accumulate.

Each output adds four more states:

1. clear the accumulator;
2. read the bias;
3. add the bias;
4. write the result.

A run therefore takes

```
LATENCY = out_size * (3*in_size + 4) cycles      (start taken → done pulse)
```

For a 32×32 layer, that is 3200 cycles, or 32 µs at 100 MHz. `ap_done` and `ap_ready` pulse together for one cycle, and the core is idle again one cycle later. A layer with zero inputs writes `ReLU(bias)`. A layer with zero outputs finishes at once.

The floating-point units are combinational. The multiplier, and the adder with its 8-bit alignment and normalisation shifts, each sit in a single 10 ns cycle. At 100 MHz this is plausible on UltraScale+ fabric but has not been timed here. If timing fails, register each unit's output and add one cycle per step; the formula above then changes accordingly.

## Interconnect, BRAM controllers and reset

**`axi_smartconnect`** decodes `addr & ~0xFFFF` against five base addresses. It keeps one write and one read in flight, and each can go to a different subordinate. All paths are combinational, so the interconnect adds no cycles. For unmapped addresses it answers by itself: it swallows the write data and returns DECERR, or it returns `len+1` zero beats with DECERR.

**`axi_bram_ctrl`** handles one burst at a time and alternates writes and reads when both wait. Write beats go to the RAM one per cycle, with strobes. Read beats take two cycles each, one for the RAM and one for the response. It supports FIXED, INCR and WRAP bursts and always responds OKAY.

**`bram_tdp`** is a two-port RAM:

- synchronous read, read-first;
- byte write enables;
- the output holds while the port is disabled;
- an assertion forbids both ports writing the same word in the same cycle.

The accelerator writes only the output RAM, and the processor reads it only after `done`, so in normal use that cannot happen.

**`proc_sys_reset`** synchronises `pl_resetn0` with two flops. It releases the interconnect reset 16 cycles later and the peripheral reset 32 cycles later. The ports of the vendor block are kept; the processor-reset and high-active outputs are left unconnected in the top.

## Where this RTL departs from, or goes beyond, the reference system

- **Activation.** The reference system describes the FC block as using ReLU in most places, but one results passage calls it sigmoid. This RTL implements ReLU.
  - The model's own 51-unit output layers use sigmoid. They are wider than 32 outputs anyway, so they cannot run on this engine in one pass.
- **Latency.** The reported HLS latency ranges from 16 to 199,681 cycles; the inner loop is 10–775 cycles and one outer iteration 15–780 cycles. That reflects the generated schedule of multi-cycle floating-point cores. This hand-written core needs `out*(3*in+4)` cycles, at most 3200. The cycle count depends only on the sizes. Nothing is skipped for zero weights.
- **Resources.** The reported HLS build uses 3 DSPs, 416 FFs and 764 LUTs. These numbers were not targeted. This RTL maps its multiplier to whatever the synthesis tool infers.
- **Register offsets, address map, memory depths and AXI widths** are not published. The values above are choices, following the usual HLS and Vivado conventions.
- **Interconnect.** The published block diagram shows a second manager port on the interconnect. Only one manager is modelled.
- **BRAM pins.** The memories' busy outputs are omitted. The BRAM port is a struct `{en, we[3:0], addr (bytes), wdata}` plus a separate read-data input.
- **Interrupt.** The interrupt, unused by the published software, is brought out as a top-level port.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M`, has a watchdog, and compares against independent references:

- `fp_ref_pkg` computes float32 results in double precision and rounds them by hand;
- `axi_bfm_tasks.svh` provides AXI4 manager tasks with random back-pressure.

With Verilator 5, the end-to-end test looks like this:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fcc_pkg.sv tb/fp_ref_pkg.sv tb/tb_fcc_system.sv \
    --top-module tb_fcc_system -o sim
./obj_dir/sim
```

The packages are listed first; the other modules are found through `-y`. For a unit test, substitute another `tb/tb_*.sv` and top module.

`tb_fcc_system` runs the whole system at its default sizes, with no parameter overrides. It acts as the driver software and runs these layers:

- a full 32×32 layer;
- a cascaded 32→20 layer fed with the first layer's outputs;
- a 7→5 layer completed by interrupt instead of polling;
- a 40×40 request, which is clamped to 32×32;
- a zero-output layer;
- an access to an unmapped address.

It counts each mechanism and fails if any never occurs:

- ReLU clamping;
- size clamping;
- polling;
- the interrupt;
- cascading;
- the empty layer;
- the decode error.

It also checks every output bit-exactly and every run's cycle count. It runs about 12,400 clock cycles (124 µs at 100 MHz) and takes well under a second once built.

To change the maximum layer size, change `FC_MAX_IN`, `FC_MAX_OUT` and the `DEPTH_*` constants in `fcc_pkg`; the weight RAM needs `FC_MAX_IN*FC_MAX_OUT` words. Widen `MAP_MASK` if a window outgrows 64 KiB.
