# Pipeline-aware layered min-sum LDPC decoder, rate 1/2, (2016,1008)

Layered LDPC decoding converges in about half the iterations of flooding belief
propagation. It has one drawback for hardware: the serial dependence between
layers. Layer *j* reads the a-posteriori LLRs that layer *j-1* has just
written. If a pipeline register is inserted into the check-node path, layer
*j* can enter the pipeline before layer *j-1* has left it. Then every column
the two layers share is a data hazard.

This design removes the hazard through the code, not the hardware.
The code is built so that **no two consecutive layers share a block column**.
The last layer of an iteration and the first layer of the next count as
consecutive. With this property, one pipeline register can be placed in the
middle of the check node unit and the decoder never stalls. Every clock cycle
one complete layer enters the datapath and one leaves it. A frame of 10
iterations over 12 layers takes 12 × 10 + 1 = **121 cycles**.

The RTL follows the pipeline-aware QC-IRA-LDPC decoder architecture published
as *"Pipeline-Aware QC-IRA-LDPC Code and Efficient Decoder Architecture"*. That
decoder reaches 3.08 Gb/s at 185 MHz in a 90 nm process: 2016 bits every 121
cycles. The clock frequency, area and power figures belong to that
implementation. This RTL has not been through synthesis timing or layout.

## The code

The code is a quasi-cyclic irregular repeat-accumulate (QC-IRA) code. Its
parameters:

- circulant size Q = 84;
- 12 block rows (layers) and 24 block columns;
- block columns 0–11 carry the 1008 information bits, and 12–23 the 1008
  parity bits;
- every layer has exactly 7 nonzero circulants (row weight 7);
- a circulant with shift *s* connects check row *r* of its layer to variable
  (*r* + *s*) mod 84 of its block column.

**Parity part.** The accumulator has a dual-diagonal parity part: original
block row *m* touches parity columns *m*−1 and *m*. No tail-biting entry is
used, so the code can be encoded by simple accumulation. Consecutive rows of
a dual diagonal always share a column, so the rows are reordered:

- even original rows become layers 0–5;
- odd original rows become layers 6–11.

After the reordering, neighbouring layers touch parity columns two apart.
Layer 0 has only one parity block, and it takes six information blocks to keep
the row weight at 7.

**Information part.** Each information circulant is placed only where:

- neither neighbouring layer (taken cyclically) uses the same column;
- the shifts within a column are all different;
- no length-4 cycle is formed, anywhere in the whole base matrix.

The published work gives this procedure but not a base matrix. The shifts
below come from one seeded run of it. Any other matrix that meets the same
rules can replace it by editing `BASE` in `rtl/ldpc_pkg.sv`. The derived
tables are recomputed at elaboration.

| layer | block column : shift |
|---|---|
|  0 | 1:53, 3:60, 5:63, 7:10, 8:14, 11:32, 12:0 |
|  1 | 0:13, 2:6, 4:19, 6:33, 9:63, 13:0, 14:0 |
|  2 | 1:37, 3:82, 8:78, 10:21, 11:30, 15:0, 16:0 |
|  3 | 2:78, 4:6, 5:39, 7:1, 9:58, 17:0, 18:0 |
|  4 | 1:29, 3:64, 6:32, 8:48, 11:14, 19:0, 20:0 |
|  5 | 0:78, 2:23, 4:51, 5:11, 7:12, 21:0, 22:0 |
|  6 | 1:4, 6:66, 8:16, 9:57, 10:9, 12:0, 13:0 |
|  7 | 0:30, 4:76, 5:41, 7:31, 11:11, 14:0, 15:0 |
|  8 | 1:27, 2:79, 3:16, 8:77, 9:62, 16:0, 17:0 |
|  9 | 0:23, 4:32, 6:64, 10:6, 11:13, 18:0, 19:0 |
| 10 | 1:72, 5:60, 7:55, 8:51, 9:30, 20:0, 21:0 |
| 11 | 0:19, 2:74, 4:40, 6:77, 10:54, 22:0, 23:0 |

**Encoding.** The parity blocks follow by accumulation in original row order.
Let *p*₋₁ = 0. For *m* = 0 to 11:

    p_m[r] = p_{m-1}[r] XOR (XOR over the information circulants (c, s) of row m: u[84c + (r + s) mod 84])

Original row *m* is layer *m*/2 when *m* is even, and layer 6 + (*m*−1)/2 when
*m* is odd. The end-to-end testbench encodes this way and checks every parity
equation.

## Decoding algorithm

The decoder uses layered min-sum with a normalisation factor of 0.75. For each
check row of layer *l* and each of its 7 edges:

    L = P − R_old                        (variable-to-check message)
    R_new = 0.75 · Π sign(L_others) · min |L_others|
    P = L + R_new                        (updated a-posteriori LLR)

- *R_old* is the message the same edge produced one iteration earlier. It is
  zero in the first iteration.
- There is no early termination: all 10 iterations always run.

## Datapath: one layer per clock, two sections

```
           +-------------------- bypass: new LLRs of the layer in section B -------+
           v                                                                       |
   LLR memory --> mux register (7 block columns + 7 rotations)                     |
   R memory  --> R register  (read in step with the mux)                           |
                      |                                                            |
   SECTION A     7 switch networks (rotate 84 LLRs each)                           |
                 84 row units:  L = P - R_old ;  compare-and-select (7 -> 4 groups)|
                 ============= pipeline register (groups, signs, L) ============== |
   SECTION B     2 compare-unit stages -> min1, min2, index, sign product          |
                 scale by 0.75 -> R_new ;  P_new = L + R_new  --------------------+
                 write P_new to LLR memory, R_new to R memory
```

The two sections run concurrently on neighbouring layers. Take a cycle in
which section A holds layer *t+1* and section B holds layer *t*. In that cycle
the mux register is being loaded for layer *t+2*:

- **Layer *t+1* is not a hazard.** It shares no column with layer *t+2*, by
  construction of the code.
- **Layer *t* is.** It may share columns with layer *t+2*, and its results
  reach the memory only at the same clock edge at which the mux register
  captures. For each of its seven slots, the mux compares the wanted block
  column with the seven columns section B is writing. On a match it takes
  section B's fresh value instead of the memory's.
- **Older layers** have already been written.

The pipeline therefore matches the plain sequential layered algorithm exactly.
The testbench checks this bit for bit.

**Check node unit.** The pipeline register sits inside the check node unit,
just before the compare units:

- Section A pairs the edges (0,1), (2,3), (4,5) and (6, dummy maximum) in
  compare-and-select cells. This gives four (min1, min2, index) groups.
- Section B merges the groups in two compare-unit levels, 4 → 2 → 1.
- Each edge then gets min2 if it holds the minimum, and min1 otherwise. Its
  sign is the product of all signs times its own.
- The L values cross the same register to reach the adders.

**Differential rotation.** There is no inverse switch network after the
adders. A block column is written back in the row order of the layer that
updated it: it is rotated by that layer's shift. When a layer later reads the
column, its switch network rotates by the difference between its own shift
and the shift of the previous layer holding that column. These differences
are constants of the code, and `ldpc_pkg` computes them at elaboration. There
are two tables:

- `DELTA_FIRST` covers the first iteration. A column not yet touched is still
  in natural order.
- `DELTA_STEADY` covers later iterations, and looks back cyclically across the
  iteration boundary.

After the last layer, each column sits in the rotation of its last layer
(`FINAL_SHIFT`). The output returns it to natural order with fixed wiring.

**Check-message memory.** Check messages are stored uncompressed: 7 messages
× 84 rows per layer, one word per layer. The word is read in step with the
mux register and written by section B. A layer's word is read again only 12
layers after it was written, so the ports never conflict. The first iteration
does not clear the memory; a read-as-zero control is used instead.

## Number formats

| quantity | width | range |
|---|---|---|
| channel LLR (input) | 6 bits, two's complement | ±31; positive means bit 0 |
| check-to-variable message R | 6 bits | ±23 after scaling |
| a-posteriori LLR P and L = P − R | 8 bits | ±127, saturating |
| magnitudes inside the check node unit | 5 bits | L clipped to ±31 first |

The scaling is computed as (*m* >> 1) + (*m* >> 2), rounding toward zero.

All sums saturate symmetrically. The LLRs are two bits wider than the
messages, because a saturated LLR loses its extrinsic part: when P is kept at
6 bits, decoding at moderate noise diverges. With the 8-bit P, a frame at
noise σ = 0.6 (86 raw bit errors, channel LLR scale 8 per unit amplitude)
decodes without error.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller only) |
| `load_valid`, `load_col`, `load_llr` | in | 1, 5, 84×6 | write the channel LLRs of one block column; element *v* of column *c* is code bit 84*c*+*v*; ignored while busy |
| `start` | in | 1 | begin decoding the loaded frame; ignored while busy |
| `busy` | out | 1 | a layer is in the pipeline |
| `done` | out | 1 | rises at the 121st clock edge after the edge that sampled `start`; stays high until the next start |
| `hard_bits` | out | 2016 | decisions in natural order (bit 0–1007 = information), valid while `done` |
| `app_llr` | out | 24×84×8 | final a-posteriori LLRs in natural order, valid while `done` |

A frame takes 24 load cycles, then 121 decoding cycles. Loading does not
overlap decoding, so the sustained frame rate with this interface is 2016 bits
per 145 cycles. The 121-cycle figure is the decoding core alone. An input
double buffer would be needed to reach it back to back.

Cost at the default size, from a coarse generic synthesis (word-level cells):

- about 30 k flip-flop bits in the LLR store, mux register and pipeline
  registers;
- about 42 k bits of check-message memory;
- 84 check node units, 588 subtractors and 588 adders;
- seven 84 × 8-bit barrel shifters.

## Modules

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | code constants, base matrix, rotation tables, types |
| `rtl/ldpc_decoder.sv` | top: wiring of everything below |
| `rtl/ldpc_ctrl.sv` | layer sequencer, first-iteration flag, start/busy/done |
| `rtl/ldpc_app_mem.sv` | a-posteriori LLR store (24 block columns), natural-order view |
| `rtl/ldpc_r_mem.sv` | check-message store (12 layers) |
| `rtl/ldpc_mux_reg.sv` | mux with registered outputs, bypass, rotation lookup |
| `rtl/ldpc_sn.sv` | switch network: cyclic rotation of 84 values |
| `rtl/ldpc_row.sv` | one check row: subtract, check node unit, scale, add |
| `rtl/ldpc_cnu.sv` | pipelined check node unit |
| `rtl/ldpc_cnu_cs.sv` | compare-and-select cell |
| `rtl/ldpc_cnu_cu.sv` | compare unit (merge of two min1/min2 results) |
| `rtl/ldpc_scale.sv` | ×0.75 normalisation |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against values computed independently in the testbench, ends with a
`TB_RESULT checks=… failures=…` line, and has a watchdog.

`tb_ldpc_decoder` runs the whole decoder at its default size:

- three frames of random data, encoded as above, at noise levels σ = 0.6,
  0.85 and 1.1;
- a sequential, unpipelined, natural-order layered min-sum model in the
  testbench must agree with `app_llr` and `hard_bits` exactly;
- decoding must take exactly 121 cycles;
- the low-noise frame must decode to the transmitted codeword;
- each mechanism must occur at least once: section A and B overlap, mux
  bypass, first-iteration zero messages, and loads ignored while busy.

`tb_ldpc_ber` measures bit error rates. It decodes 100 random frames, for
10 iterations, at each of three signal-to-noise ratios. Every frame must
match the reference model bit for bit. A typical run gives:

| Eb/N0 | bit errors / bits | BER | frames in error |
|---|---|---|---|
| 1.5 dB | 3531 / 201600 | 1.8e-2 | 62 of 100 |
| 2.0 dB | 53 / 201600 | 2.6e-4 | 19 of 100 |
| 2.25 dB | 84 / 201600 | 4.2e-4 | 11 of 100 |

How this compares with the published fixed-point curve (about 7e-2, 3e-4 and
5e-6 at these points):

- At 1.5 and 2.0 dB the results are close.
- At 2.25 dB the published curve is far lower. The few frames in error each
  keep a handful of wrong bits, which looks like small trapping sets of this
  particular base matrix.
- The published construction mentions an optional 6-cycle condition, which
  is not applied here. A matrix drawn with that condition added was tried.
  It failed about as many frames (11 of 100 at 2.25 dB, with fewer bits
  wrong per failed frame, and 26 of 100 at 2.0 dB), so it was not adopted.

The encoder, channel and reference model shared by these two testbenches are
in `tb/ldpc_ref_pkg.sv`.

To simulate with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
    ./obj_dir/Vtb_ldpc_decoder

Replace the testbench name for any other block. The end-to-end test builds in
under a minute and runs in well under a second. The BER run takes a few
seconds.

## Where this RTL goes beyond, or departs from, the published architecture

Taken from the published work:

- the code family and its construction rules;
- the sizes: Q = 84, 12 layers, row weight 7, 10 iterations;
- the factor 0.75;
- the order of the datapath: mux with registered outputs, seven switch
  networks, subtract, check node unit, scale, add, memory;
- the pipeline register between the compare-and-select stage and two
  compare-unit stages;
- one layer per cycle, and the 121-cycle count.

Chosen here:

- **The base matrix shifts.** These are one draw of the construction
  procedure.
- **No tail-biting entry.**
- **The cycle count.** The published count is written as layers × iterations
  + *i* = 121 with pipeline depth *i* = 2. The count met here is 12 × 10 + 1,
  with one register stage.
- **Number formats.** The published decoder is described only as using 6-bit
  quantisation. Here the messages have 6 bits and the LLRs 8.
- **Scaling per edge.** The published diagram shows one scaler per edge, while its description
  scales min1 and min2 once. The two give identical values.
- **Differential rotation instead of a de-rotation network.** The architecture
  diagram draws no inverse network, and this is read here as differential
  rotation.
- **The bypass into the mux register.** This is read from the diagram's
  feedback path from the adders to the mux.
- **Uncompressed check-message storage.**
- **Register-based memories.**
- **The load/start/done interface**, without an input double buffer.
- **Reset limited to the controller.**
