# Clustered Kummer-HECC scalar-multiplication accelerator

This is RTL for a small, microcoded accelerator that computes the scalar
multiplication `[k]P` on the Kummer surface of a genus-2 hyperelliptic curve
(Kummer-HECC). The curve is defined over a 128-bit prime field. Scalar
multiplication runs as a Montgomery ladder. Each ladder step is one combined
doubling-and-addition, `xDBLADD`, on two points `V1` and `V2`. Each point has four
coordinates in GF(P), and an `xDBLADD` is a fixed network of 32 field
multiplications and 32 additions/subtractions.

The organisation built here is the **two-cluster ("A4") architecture**. The
`xDBLADD` network splits into two symmetric halves, one per point. So the
hardware is two identical clusters driven by one controller in lock step:

```
                 +------------------ Control <-- Program memory (512 x 36)
                 |   (one instruction stream for both clusters)
     +-----------+-----------+                 +-----------------------+
     | cluster 0             |                 | cluster 1             |
     |  MEM0 (512 x W, 2 ports)                |  MEM1 (512 x W, 2 ports)
     |   |  A   B            |                 |   |  C   D            |
     |   |  |   +-> AddSub0 -+--+           +--+-- AddSub1 <-+   |     |
     |   |  +---+------------+--+--> CSWAP <--+--------------+---+     |
     |   |                   |     bridge     |                  |     |
     |   |            Mult0 <+------+   +-----+-> Mult1          |     |
     |   +<-- Data MUX0 <----+ AddSub0, Mult0 | Data MUX1 <------+     |
     +-----------------------+                +------------------------+
```

Cluster 0 always works on one point and cluster 1 on the other. The only place
where data crosses between the clusters, and the only place that sees the secret
scalar, is the **CSWAP bridge** in front of the two multipliers.

## Number representation and data layout

* A field element is 128 bits and is stored as `S = 136/W` words of `W` bits,
  least significant word first, at `S` consecutive word addresses.
  `W = 34` is the default. `W = 68` and `W = 136` are also supported, with `S = 2`
  and `S = 1`.
* Each data memory is 512 words of `W` bits. At `W = 34` that is one 512 x 36 block
  RAM. Wider configurations put 2 or 4 of them side by side, so a wider `W` buys
  fewer cycles per memory access with more block RAMs.
* The multiplier computes Montgomery products `a*b*2^-136 mod P`. Data in memory
  are therefore kept in Montgomery form (`x*2^136 mod P`). Converting in and out
  is the host's job.
* The default prime is `P = 2^127 - 1`, the field of the usual Kummer surface. Any
  odd `P < 2^128` can be set through the `P` parameter, and the Montgomery
  constant `-P^-1 mod 2^34` is computed at elaboration (`khecc_pkg::mont_pinv`).

## Instruction set

Instructions are 36 bits, MSB first:

| bits  | field   | meaning |
|-------|---------|---------|
| 35:32 | opcode  | 0 nop, 1 read, 2 write, 3 wait, 4 jump, 5 end |
| 31:29 | unit    | 0 AddSub, 1 Mult, 2 CSWAP |
| 28:27 | mode    | unit- or jump-specific, see below |
| 26:18 | addr1   | word address (port A) |
| 17:9  | addr2   | word address (port B) |
| 8:0   | imm     | immediate |

* `read` streams the element at `addr1` (port A) and the element at `addr2`
  (port B) to the unit, in both clusters at once. It takes `S` cycles, and the
  unit starts when the last word has arrived. AddSub mode 0 adds and mode 1
  subtracts. Mult mode selects the bridge routing: 0 straight, 1 CS0, 2 CS1.
* `read` of unit CSWAP moves the scalar-bit pointer instead, in one cycle: mode
  0 points at the top bit `k_(m-1)`, mode 1 steps to the next lower bit.
* `write` stores the unit's result at `addr1` in both memories (`S` cycles) and
  releases it.
* `wait` idles for `imm` cycles, and `nop` takes one cycle.
* `jump` mode 0 jumps to `imm`. Mode 1 loads the loop counter with `imm`, and
  mode 2 decrements the counter and jumps to `imm` while it is still above zero.
  The loop count is public, so control flow never depends on the key.
* `end` stops the run and raises `done`.

**Timing.** The next instruction is prefetched during the last cycle of the
current one, so there are no fetch bubbles:

* nop, jump and key operations take 1 cycle.
* read and write take `S` cycles.
* wait takes `imm` cycles.
* A run adds one initial fetch cycle.

**Interlock.** A `read` to a unit that cannot take operands, or a `write` to a
unit whose result is not ready, stalls in place. The stalled cycles are counted
in `stall_cycles`. This makes microcode correct without hand-scheduled
`wait`s, though `wait` remains available for static scheduling.

## The CSWAP bridge and the clustered ladder step

This is the least obvious part of the design.

A textbook ladder swaps `V1` and `V2` before and after each `xDBLADD` when
`k_i = 1`. Here, cluster 0 always computes the doubling and cluster 1 always
computes the addition. The bridge decides from `k_i` which cluster's data feeds
which multiplier. When a multiplication is read, cluster 0 supplies operands
`(A, B)` and cluster 1 supplies `(C, D)`. The bridge routes them:

| mode     | `k_i = 0`: Mult0, Mult1 | `k_i = 1`: Mult0, Mult1 |
|----------|------------------|------------------|
| straight | A*B, C*D | A*B, C*D |
| CS0      | A*B, C*B | C*D, A*D |
| CS1      | A*B, C*D | C*D, A*B |

The routing uses AND/OR masks of the key bit, so its logic is the same for
either value. The controller only issues "init" and "next" to the bridge's key
pointer and never sees a key bit.

One ladder step, in microcode that is identical for both clusters (cluster 0
starts with `X = V1`, cluster 1 with `X = V2`):

1. `U = H(X)`: a Hadamard transform, which is 8 add/sub per cluster.
2. `U' = U * E1`, straight. `E1` holds the same constants in both clusters.
3. `W = CS0(U', U)`. With `k_i = 0`, cluster 0 gets `U1'*U1` (squaring `V1`) and
   cluster 1 gets `U2'*U1` (the product of both points). With `k_i = 1`, cluster
   0 squares `V2` and cluster 1 still gets the cross product.
4. `Y = H(W)`.
5. `Y' = Y * E2`, straight. `E2` differs per cluster: the doubling constants in
   cluster 0 and the difference-point constants in cluster 1.
6. `X = CS1(Y', Y)`. The products `Y'*Y` finish both chains. When `k_i = 1`, CS1
   exchanges them, so that afterwards cluster 0 again holds `V1` and cluster 1
   holds `V2`.
7. Step the key pointer and loop.

A square is written as a product of two stored values (`U'*U = E1*U^2`). So the
multiplier never needs a squaring mode, and the operation count is unchanged.

## Units

* **`gf_mult`: hyper-threaded Montgomery multiplier.** It has three independent
  thread slots that share one datapath. Each cycle the datapath performs one
  34-bit-digit Montgomery step (`T = acc + a*b_i; q = T*(-P^-1) mod 2^34;
  acc = (T + q*P) / 2^34`) for the slot whose turn it is, in fixed round robin.
  A product needs 4 steps and a final conditional subtraction, so it finishes
  within 15 cycles of its last operand word. Results leave in issue order, and a
  slot is freed when its result is written back.
* **`gf_addsub`** computes `a +/- b mod P` in the cycle that receives the last
  operand word, with one conditional correction. It holds one result.
* **`data_mux`** selects the result word of the addressed unit for the memory
  write bus.
* **`data_mem`** is a dual-port, synchronous-read data memory. Port A is used by
  the datapath for reads and writes. Port B is used by the datapath for reads,
  and by the host while the accelerator is idle.
* **`prog_mem`** holds 512 instructions of 36 bits, with a load port.
* **`khecc_ctrl`** is the sequencer described above.
* **`cswap_bridge`** holds the scalar and does the routing.
* **`khecc_a4_top`** wires everything together and exposes the host ports:
  program load, scalar load (`key_load`, `key_in`), memory access (`host_*`),
  `start`/`busy`/`done`, and the `cycles`/`stall_cycles` counters.

## Performance

With the ladder microcode of the end-to-end testbench, the cycle counts for a
256-bit scalar are:

| W   | cycles | of which interlock stalls |
|-----|--------|---------------------------|
| 34  | 86,026 | 19,970 |
| 68  | 58,376 | 25,088 |
| 136 | 49,162 | 32,258 |

The stalls are waits for multiplier results. A microcode that interleaves the
independent add/sub work with the multiplications would hide most of them. The
published implementation of this architecture reports 142,119, 128,021 and
125,456 cycles, using a different multiplier and its own microcode, so the
numbers are not directly comparable.

## How far to trust it, and where it departs from the published architecture

Faithful to the architecture:

* two clusters under one control;
* one AddSub, one three-thread multiplier and one data memory per cluster;
* the CSWAP bridge with the CS0/CS1 definitions above;
* 36-bit instructions with 4/3/2/9/9/9-bit fields, 9-bit addresses and a
  512-entry program;
* `W` in {34, 68, 136}, with 4/2/1 cycles per memory operation;
* key bits confined to the bridge.

This design's own choices:

* **The prime and scalar size.** `P = 2^127 - 1` and a 256-bit scalar are
  defaults chosen here.
* **The multiplier algorithm.** The full 128x34-bit Montgomery step per cycle,
  and the fixed round-robin thread order, are choices made here. The published
  multiplier is a block-RAM-based design whose insides are not reproduced.
* **AddSub width.** AddSub works on the full width in one cycle instead of
  34-bit digit-serially.
* **Opcode and unit encodings.** The numeric opcodes, unit codes and mode codes
  are chosen here.
* **The loop counter.** The loop counter behind `jump` modes 1 and 2 is an
  addition. A plain unconditional jump cannot end a 256-step loop.
* **The interlock.** The read/write interlock is added here.
* **The host interface.** The host interface (memory port B, program and key
  load ports) is added here.
* **Data MUX outputs.** There is one write bus per cluster. The single-cluster
  organisations that this one derives from need two, for a memory-to-memory
  CSWAP unit.

Not included:

* The microcode with the real Kummer constants, so the design has not been run
  on actual curve points. The testbenches use random constants, which check the
  datapath, the routing and the control, not the curve arithmetic.
* Conversion to and from Montgomery form, and the final projective-to-affine
  step, both of which are left to the host.
* The single-cluster variants with one or two multipliers, and the CSWAP_V2
  variant.

## Files

All in `rtl/`:

* `khecc_pkg.sv`: widths, the instruction struct, codes, `mont_pinv`.
* `gf_addsub.sv`, `gf_mult.sv`, `cswap_bridge.sv`, `data_mem.sv`,
  `data_mux.sv`, `prog_mem.sv`, `khecc_ctrl.sv`: the blocks.
* `khecc_a4_top.sv`: the top.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_khecc_a4_top`** is the end-to-end test at default parameters. It
  generates the ladder microcode, loads the program, scalar, points and
  constants, and runs a 256-bit scalar multiplication.
* It compares both resulting points with a wide-integer model of the same
  ladder, and checks the cycle count against the instruction timings plus the
  reported stalls.
* It also counts that every mechanism occurred: write stalls, all three
  multiplier threads busy, CS0 and CS1 with `k_i = 0` and `k_i = 1`, loop jumps,
  wait, add and subtract.
* `tb_khecc_a4_w68` and `tb_khecc_a4_w136` run the same test with `W = 68` and
  `W = 136`.
* `tb_gf_mult_p128` and `tb_gf_addsub_p128` repeat the unit tests with the
  generic prime `2^128 - 159`. This prime gives the widest intermediate values.

With Verilator 5:

```
verilator --binary --timing --assert -j 4 --top-module tb_khecc_a4_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/khecc_pkg.sv tb/tb_khecc_a4_top.sv
./obj_dir/Vtb_khecc_a4_top
```

Replace the top-module and file name to run any other testbench, for example
`tb_gf_mult` or `tb_khecc_ctrl`. The end-to-end run takes well under a second.
Uninitialised state is reset explicitly, so the tests run unchanged with random
initial values (`+verilator+rand+reset+2`).
