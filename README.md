# Layered LDPC decoder with memory bypassing

This is a partially parallel, layered min-sum decoder for quasi-cyclic LDPC
codes. It is built to make as few accesses to its main memory as it can, and to
spend as few idle cycles as it can.

In a layered decoder, each layer (block row of the parity-check matrix) reads
the a-posteriori values (APP) of its block columns. It subtracts its own old
check messages, runs the check-node update, adds the new messages back, and
writes the APP values back. Consecutive layers often share block columns.
Without special care, layer q+1 has to wait until layer q has written such a
column to the channel RAM, and then read it back.

This design has two features that avoid most of that cost:

* **One memory for two roles.** While a layer is working on a column, the
  column's APP value is not valid anywhere. So the intermediate values
  `T = APP - E_old` are stored in the same memory entry, and one four-port
  memory serves as both the channel RAM and the intermediate data RAM.
* **Memory bypassing.** Suppose the add-array is producing a column's updated
  APP in exactly the cycle in which the next layer wants to read that column.
  The value then goes straight back to the shifter through a mux-array. The
  channel-RAM write and the channel-RAM read are both skipped. The next layer
  rewrites the column anyway, so nothing is lost.

The read and write order of the block columns in each layer comes from a
schedule ROM, and it is chosen so that shared columns meet in this way as
often as possible.

## The code

The decoder is written for one quasi-cyclic code, defined in `rtl/ldpc_pkg.sv`:

* The base matrix is 6 x 12 (`BASE`), and the sub-matrix size is `Z = 24`.
  This gives N = 288 and K = 144, so the rate is 1/2.
* Each non-null entry is an identity matrix cyclically shifted by
  `BASE[r][c] mod Z`.
* Block columns 0-5 are the information part, with column weight 3.
* Block columns 6-11 are a staircase of unshifted identities. This makes
  encoding a simple back-substitution, and the testbench uses it.
* Layer degrees are 4, 5, 5, 5, 5, 5. The largest degree is `DMAX = 5`.

This code is this design's own choice. To use another QC code, change `BASE`,
`MB`, `NB` and `DMAX`.

The layer decoding order is the decoder parameter `ORDER`. Element l is the
block row decoded at position l, and the default is the natural order
(`LAYER_ORDER`). The order is meant to be found offline, by exhaustive search
or simulated annealing, so that consecutive layers share as many columns as
possible. That search is not part of the hardware. Its result only has to be
passed in as `ORDER`.

Number formats:

| Quantity | Format |
|---|---|
| Channel LLR | 5 bits, two's complement; positive means bit 0 |
| APP and T | 6 bits, saturated symmetrically to ±31 |
| Check-message magnitude | 5 bits |

## Datapath

One block column (Z messages) moves through the datapath per clock cycle.

```
 read side   order_rom ─► bypass_unit ─► R0 ┐
                                            ├─ mux-array ─► cyclic_shifter ─► sub_array ─► W1 (T)
                          post-add reg ─────┘                                          └─► Z x siso_unit
 write side  layer queue ─► R1 (T) ─► add_array ─► inverse cyclic_shifter ─► post-add reg ─► W0
```

| Stage | Cycle | Work |
|---|---|---|
| read issue | t | Schedule lookup. Pending/bypass decision. R0 read. Message-RAM read of the layer's old records (at slot 0). |
| rs1 | t+1 | Mux-array (R0 data, the post-add register, or the value captured in a W0 cycle). Shift to check-row order. `T = sat(APP - E_old)`. |
| rs2 | t+2 | W1 writes T at the column's address. The SISO units absorb T. On the layer's last slot, the finished records go into the layer queue. |
| write issue | ≥ t+3 | R1 reads T. At slot 0 of a layer, that layer's new records are written to the message RAM. |
| ws1 | +1 | `APP = sat(T + E_new)`. Inverse shift. Hard-decision update. |
| post-add | +2 | W0 write-back, unless the value was bypassed. |

The read side of a layer runs while the write side of earlier layers is still
busy. Up to three layers can be in flight: one being read, and up to two
finished and waiting in a 3-deep queue (`sync_fifo`) for their write-back.
This allows the three-layer overlap: layer q+2 can be read while layer q is
still writing.

### Pending columns, stalls and bypass (`bypass_unit`)

Each block column has a *pending* bit:

* It is **set** when a layer issues the read of the column. From then on, the
  memory entry holds T, not APP.
* It is **cleared** when the updated APP is written back through W0.

Each read request has one of four outcomes:

| Column state | Outcome |
|---|---|
| Not pending | Normal R0 read. |
| Pending, and the add-array (ws1) is producing that column this cycle | **Bypass.** The read is issued without R0. One cycle later the mux-array takes the post-add register. That register's W0 write is dropped. The column stays pending, now owned by the new layer. |
| Pending, and the post-add register is writing that column through W0 this cycle | **Forward.** The value being written is captured and taken through the mux-array one cycle later, instead of an R0 read that would still return the old contents. The W0 write does happen. |
| Pending otherwise | **Stall** for one idle cycle, then try again. |

Because stalls are resolved dynamically, any schedule decodes correctly. The
schedule only affects how many idle cycles and bypasses there are. The result
is always identical to plain sequential layered decoding.

### The schedule (`order_rom`)

The tables are computed at elaboration time from `BASE` and `ORDER`.

**Write order of layer q:**

1. Columns shared with layer q+1 come first.
2. Columns shared only with layer q+2 come last.
3. All other columns go in between.

**Read order of layer q:**

1. Columns used by neither of the two previous layers come first.
2. Then columns shared only with layer q-2.
3. Then columns shared with layer q-1, in the order layer q-1 writes them.

Within each group, columns are taken in ascending order.

The ROM also gives the *read-slot position* of each written column. The
add-array compares this position with the index stored by the SISO unit to
pick min1 or min2.

### Check-node units (`siso_unit`)

There are Z units, one per check row of a layer. Each unit takes one T per
cycle and keeps a compressed record of the row, as in the two-output
approximation:

* the smallest magnitude (min1);
* the second-smallest magnitude (min2);
* the slot of min1;
* the sign of every slot.

The record becomes available in the same cycle as the last input. An
offset-min-sum correction (subtract `OFFSET = 1`, floor at 0) is applied to
both magnitudes at that point.

The message to slot k is:

```
E_k = (XOR of all signs) ^ sign_k applied to (k == idx ? min2 : min1)
```

`sub_array` rebuilds the old message from the record in the message RAM. On
the first iteration the old message is 0. `add_array` rebuilds the new message
from the record held in the layer queue.

### Combined channel / intermediate RAM (`fourport_ram`)

The memory has 12 entries of Z x 6 bits, one entry per block column, and four
ports:

| Port | Use |
|---|---|
| R0 | APP read |
| W0 | APP write-back, and loading the frame |
| R1 | T read |
| W1 | T write |

Reads are synchronous and return the contents from before a write in the same
cycle. An assertion checks that W0 and W1 never write the same entry together.
The memory is written as an array. In silicon, a four-port macro or a banked
equivalent would take its place.

### Stopping (`hd_unit`)

The hard decisions are kept in a separate NB x Z register file:

* It is loaded with the signs of the channel LLRs.
* It is refreshed with the signs of every column the add-array produces.

While a layer is read, the signs of the APP values it reads are XORed per check
row. An iteration **converges** when both of these hold:

* every layer's checks were met by the values it read;
* no hard decision changed during the iteration.

Together, these mean the stored hard decisions satisfy every parity check.

Decoding stops when an iteration converges, or after `MAX_ITER = 15`
iterations. The decision is made when the last layer of an iteration finishes
its write-back. Any work already started for the next iteration is then
discarded. At that moment the hard-decision file holds exactly the result of
the finished iteration.

## Interface and timing

`ldpc_decoder #(Z = 24, MAX_ITER = 15, OFFSET = 1, ORDER = natural order)`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and asynchronous active-low reset. Memories are not reset. |
| `in_valid`, `in_ready`, `in_llr[Z][5]` | in/out/in | Frame input: 12 beats, beat c holds block column c. `in_ready` is high while the decoder waits for a frame. |
| `out_valid`, `out_ready`, `out_hd[Z]`, `out_col`, `out_last` | out/in/out | Hard decisions: 12 beats in column order. |
| `out_iters`, `out_converged` | out | Iterations run (1–15), and whether all parity checks were met. Valid while `out_valid` is high. |
| `stat_cycles`, `stat_idle`, `stat_bypass`, `stat_forward`, `stat_r0_reads`, `stat_w0_writes` | out | Per-frame counts during decoding: cycles, idle read cycles, bypassed reads, forwarded reads, R0 reads, W0 writes. |

Decoding starts the cycle after the last input beat. A layer of degree d takes
d issue cycles plus any stalls.

The following numbers were measured with the default code and parameters:

| Run | Cycles | Idle | Bypassed | Forwarded | R0 reads | W0 writes |
|---|---|---|---|---|---|---|
| 1 iteration | 38 | 2 | 12 | 6 | 18 | 17 |
| 15 iterations | 458 | 14 | 178 | 88 | 169 | 257 |

Each iteration reads 29 block columns (the sum of the layer degrees). In steady
state an iteration takes about 30 cycles. Of the 29 column reads, about 12 are
bypassed and about 6 are forwarded, so only about 11 reach the RAM through R0.
W0 writes drop from 29 to about 17 per iteration.

Without the forward path, reads that land in the W0 cycle of their column would
stall instead. With this code, that raises the time for 15 iterations to 548
cycles, with 104 idle cycles.

### Effect of the layer order

The same 12 frames were decoded with three orders. "Shared" counts the columns
shared by cyclically adjacent layers. The other columns are averages per
iteration.

| Order | Shared | Cycles | Idle | Bypassed | R0 + W0 accesses |
|---|---|---|---|---|---|
| 0 3 4 1 2 5 | 5 | 30.3 | 0.1 | 2.8 | 39.5 |
| 0 1 2 3 4 5 (default) | 8 | 31.2 | 1.0 | 11.9 | 29.0 |
| 0 1 3 5 4 2 | 12 | 31.2 | 1.0 | 15.9 | 27.0 |

More overlap gives more bypasses and fewer channel-RAM accesses. With this
short code, it also gives slightly more stalls. Where layers share little, the
forward path catches most of the remaining overlap, so the cycle counts stay
close.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_ldpc_decoder` runs the whole decoder at its default parameters. It sends
24 random codewords at four noise levels: none, light, moderate and heavy. It
compares every output with an independent behavioural layered min-sum model
that computes each message directly as an offset minimum over the other edges.
The model uses no compressed records and no pipelining.

The following must match exactly:

* the hard decisions;
* the iteration count;
* the converged flag.

Clean and lightly noisy frames must also decode to the transmitted codeword.

The testbench also checks the cycle and access counts:

* there is at least one read per edge per iteration;
* the cycle count is at most the number of edge reads plus the idle cycles
  plus a short pipeline tail, so apart from stalls the decoder processes one
  block column per cycle.

It requires each of these to happen at least once:

* a bypass;
* a forward;
* a stall;
* early termination;
* the iteration limit;
* three layers in flight.

`tb_layer_order` builds three decoders that differ only in `ORDER`. It checks
each one against the reference model run in the same order. It also requires
the order with the most shared columns to bypass more reads, and to make fewer
R0 + W0 accesses per iteration, than the order with the fewest. The stimulus
and the reference model are shared by both decoder testbenches, in
`tb/ldpc_ref_pkg.sv`.

To simulate with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_ldpc_decoder \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/[!l]*.sv rtl/ldpc_decoder.sv \
    tb/tb_ldpc_decoder.sv -o sim
./obj_dir/sim
```

A unit testbench is run the same way, for example with
`--top-module tb_siso_unit rtl/ldpc_pkg.sv rtl/siso_unit.sv tb/tb_siso_unit.sv`.

## Departures and open points

* **Code and layer order.** The parity-check matrix, Z, and the default layer
  order are this design's own. The source design's codes are not reproduced, so its
  reported idle-cycle and energy savings cannot be compared here.
* **Schedule.** Columns that the intended schedule places "randomly" are taken
  in ascending order instead. The read order is this design's own rule.
* **Latency.** From the last read of a layer to its first T read is 3 cycles,
  and to the first bypassable result is 4 cycles. The source design describes a
  two-cycle data-path latency.
* **Stalls.** Idle cycles are inserted by a dynamic hazard check, not by a
  fixed, precomputed pipeline schedule.
* **Forward path.** Forwarding from the post-add register in its W0 cycle is
  an addition to the bypass of the source design. It removes most of the idle
  cycles.
* **Check-node correction.** The correction is an offset of 1 LSB. Whether to
  subtract or multiply, and by how much, is left open for the code in use.
* **Stopping rule.** The exact early-termination rule (per-layer checks plus
  "no hard decision changed") is this design's reading of "stop when the signs
  satisfy all parity checks".
* **Not implemented in RTL:** the offline layer-order search (brute force or
  simulated annealing), and any power measurement.
