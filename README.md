# CEDAR: shared-estimator packet counters in SystemVerilog

A router that wants a packet counter for each of hundreds of thousands of flows
runs out of on-chip SRAM long before it runs out of flows. CEDAR (Counter
Estimation Decoupling for Approximate Rates) trades exactness for memory. Each
flow keeps only a short **pointer** (12 bits here). The pointer indexes a small,
shared table of **estimator values** `A_0 < A_1 < ... < A_{L-1}`. The estimate of
a flow's packet count is `A[F_j]`, the table entry its pointer selects.

This RTL implements the CEDAR hardware engine for that scheme. It takes a stream
of flow indices, one per packet, keeps the pointers in a dual-port RAM, and lets
a client read any flow's estimate at any time through the second RAM port.

## The update rule

When a packet of flow `j` arrives and `F_j = i`, the pointer moves to `i+1` with
probability `1 / D_i`, where `D_i = A_{i+1} - A_i`. Otherwise it stays at `i`.
Reaching entry `l` therefore takes on average `D_0 + ... + D_{l-1} = A_l`
packets, so the estimate is unbiased whatever the table holds (as long as
`D_i >= 1`).

Example table `0, 1, 4, 9, 11, 54.7, 132, 211`:
- the first packet always moves the pointer from 0 to 1 (gap 1);
- the next one moves it to `A_2 = 4` with probability 1/3;
- then to `A_3 = 9` with probability 1/5.

The testbenches use this table.

### Choosing the table

The table decides the error. For a target relative error `d` (standard deviation
divided by mean), the table that keeps every entry at exactly `d` is also the
table that reaches the largest maximum value. It is given by the recursion

    D_0 = 1 / (1 - d^2)
    D_l = (1 + 2 d^2 (D_0 + ... + D_{l-1})) / (1 - d^2)
    A_0 = 0,  A_{l+1} = A_l + D_l

With 4096 entries, this gives a largest value `A_4095` of:

| d    | A_4095  |
|------|---------|
| 1%   | 6,341   |
| 2%   | 31,840  |
| 3%   | 882,300 |

With 1024 entries, it gives about 33·10³ at 5%, and about 4·10¹⁰ at 10%.

The table is computed by software. The hardware only reads it. Values are
stored as 32-bit unsigned fixed point scaled by 1000, so no floating point is
needed. That caps an estimate at 4,294,967 packets.

### Up-scaling with two tables

When the counters outgrow the table, the error target is raised by a step
(for example from 1% to 1.5%). This gives a new table with a larger range. Every
pointer is then moved to the new table without stopping the update stream:

- If flow `j` points to `A'_l`, find `m` with `A''_m <= A'_l < A''_{m+1}`.
- Set `F_j = m+1` with probability `(A'_l - A''_m) / (A''_{m+1} - A''_m)`.
  Otherwise set `F_j = m`.

The conversion is unbiased too. The two tables are used ping-pong: after a walk,
the new table is the current one. The old RAM is then refilled for the next
error step.

## Architecture

```
              +------------------- cedar_top ---------------------+
 in_valid --->|  cedar_core (3-state FSM)       cedar_io_regs     |<--- reg bus
 in_flow  --->|   |  cedar_rng, cedar_prob_inc    (cfg, irq)      |---> irq
 in_ready <---|   |                                               |
              |   +--port 1 R/W--> cedar_flow_ram  <--port 2 R/W--|<--> app_fp_*
              |   +--port 1 R/O--> cedar_est_ram[0] <-port 2 R/W--|<--> app_est_*[0]
              |   +--port 1 R/O--> cedar_est_ram[1] <-port 2 R/W--|<--> app_est_*[1]
              +---------------------------------------------------+
```

| Module           | Role |
|------------------|------|
| `cedar_top`      | Wires the engine together. Port 2 of every RAM and the register bus are brought out for the client. |
| `cedar_core`     | State machine: fetch pointer, fetch two estimators, update. It also selects the estimator bank and locks the flow being converted. |
| `cedar_prob_inc` | Combinational decision: increment iff `rnd * (A_hi - A_lo) < 1000 * 2^32`. |
| `cedar_rng`      | xorshift32 random source; advances once per completed packet. |
| `cedar_io_regs`  | Configuration and status registers, and the interrupt. |
| `cedar_flow_ram` | Flow pointer array: 131072 × 12 bits (192 KB). True dual port. |
| `cedar_est_ram`  | Estimator array: 4096 × 32 bits (16 KB). Instantiated twice (A', A''). |
| `cedar_pkg`      | Register map, configuration struct, state type. |

Default parameters of `cedar_top`:

| Parameter | Default      | Meaning |
|-----------|--------------|---------|
| `N_FLOWS` | 131072       | Number of flows. |
| `N_EST`   | 4096         | Number of estimators. The pointer width is `log2(N_EST)`. |
| `EST_W`   | 32           | Estimator width in bits. |
| `SCALE`   | 1000         | Fixed-point scale. |
| `SEED`    | `32'h2545F491` | Random-source seed. |

### Packet timing

Each packet takes exactly 4 clock cycles. The next packet is accepted only after
the current one is finished.

| Cycle | State     | Action |
|-------|-----------|--------|
| 0     | FETCH_PTR | Accept packet (`in_valid && in_ready`). Read `F_j`. |
| 1     | FETCH_EST | `F_j` arrives. Read `A[F_j]`. |
| 2     | FETCH_EST | `A[F_j]` arrives. Read `A[F_j+1]`. |
| 3     | UPDATE    | Decide. Write `F_j + 1` if incrementing. |

A packet uses three RAM accesses, or four when the pointer moves. The two
estimator reads share the one read-only port, which is why FETCH_EST takes two
cycles. At 170 MHz with packets of at least four 32-bit words, this keeps up
with a 5.4 Gb/s stream. No timing analysis has been done here.

All RAMs have one cycle of read latency, and so does the register bus.
Reset (`rst_n`, asynchronous, active low) clears the state machine and the
registers. The RAMs are not reset.

### The stream interface

The stream is a valid/ready handshake carrying a flow index. Every packet counts
as one. A packet for a flow index at or above `NUM_FLOWS` is accepted and
ignored. A pointer that has reached `NUM_EST-1` stays there.

## Up-scaling while packets flow

This is the subtle part of the design. The walk over all flows is done by
software through port 2 of the flow RAM, while the state machine keeps updating
through port 1. Three mechanisms keep the two consistent.

- **Bank selection.** While CTRL.upscale is set, a flow below the
  current-up-scaled-flow-index `f` (register UPS_IDX) has already been converted.
  Its estimators are read from the new bank, `!cur_bank`. Every other flow still
  uses `cur_bank`.
- **Lock.** A packet for flow `f` itself waits in FETCH_PTR, with `in_ready`
  low, until software moves `f` on. So the walk's read-modify-write of `F_f`
  cannot race with an update.
- **Re-check (this design's addition).** In UPDATE the core checks the lock
  and the bank again. If software moved `f` onto this flow, or past it,
  while the packet was in flight, nothing is written. The packet is then
  retried from FETCH_PTR with the right bank. Without this check, a packet
  fetched just before `f` reached its flow could overwrite the converted
  pointer with a value in the old scale.

Software sequence for one up-scaling event:

1. Wait for `irq`. Optionally read MAX_PTR.
2. Write UPS_IDX = 0. Write CTRL with upscale = 1 and the current bank.
3. For each flow `j < NUM_FLOWS`:
   1. Write UPS_IDX = `j`.
   2. Read `F_j` on port 2. This must come after the register write, which
      takes effect at the next clock edge.
   3. Write the converted pointer on port 2.
4. Write UPS_IDX = `NUM_FLOWS`. Write CTRL with upscale = 0 and the bank bit
   flipped.
5. Write 1 to STATUS[0] to clear the interrupt.
6. Refill the now-unused bank with the table for the next error step.

No threshold event is raised while CTRL.upscale is set.

To read an estimate, the client reads `F_j` on the flow RAM's port 2, then
`A[F_j]` on port 2 of the current bank. That is two reads of one cycle each.

## Register map (`cedar_pkg::cedar_reg_e`)

| Addr | Name      | Bits |
|------|-----------|------|
| 0    | CTRL      | [0] enable (start/stop)<br>[1] interrupt enable<br>[2] up-scaling in progress<br>[3] current bank |
| 1    | STATUS    | [0] interrupt pending (write 1 to clear)<br>[1] busy (read only) |
| 2    | THRESH    | Interrupt when a written pointer value is `>=` THRESH. Reset value `N_EST-1`. |
| 3    | NUM_FLOWS | Flows in use. Reset value `N_FLOWS`; writes are limited to `N_FLOWS`. |
| 4    | NUM_EST   | Estimators in use. Reset value `N_EST`; writes are limited to `N_EST`. |
| 5    | UPS_IDX   | Current-up-scaled-flow-index. |
| 6    | MAX_PTR   | Largest pointer written since the last write to this register. Read only; any write clears it. |

When the engine is stopped (CTRL.enable = 0), `in_ready` is low and the stream
is held back.

## Where this RTL departs from, or adds to, the original design

The original design is the published CEDAR algorithm and its FPGA prototype.

- **Same as the original:** the three states, one packet at a time, the
  dual-port RAMs with the port directions shown above, the array sizes and
  value format, the programmable threshold interrupt, the
  current-up-scaled-flow-index and its two uses, and the up-scaling walk
  done in software.
- **Left out:** the prototype's stream carries a packet size next to the flow
  index. This RTL counts packets only, as the algorithm does, so there is no
  size input.
- **Choices of this design:** the register map and bus, the valid/ready
  stream, the fixed 4-cycle packet, the random source, the multiply-compare
  probability test, the sticky interrupt, MAX_PTR, the saturation and
  out-of-range behaviour, and the in-flight re-check and retry.
- **Not built:** the up-scaling walk itself and the computation of the tables,
  which run in software in the original too.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench           | What it checks |
|---------------------|----------------|
| `tb_cedar_rng`      | Against a reference xorshift32. |
| `tb_cedar_prob_inc` | Against a division-based reference, and the 1/3 and 1/5 rates. |
| `tb_cedar_flow_ram`, `tb_cedar_est_ram` | Both ports against a reference copy. |
| `tb_cedar_io_regs`  | Every register, the interrupt and MAX_PTR. |
| `tb_cedar_core`     | See below. |
| `tb_cedar_top`      | See below. |

`tb_cedar_core` checks:
- exact pointer prediction on the example table, using its own random model;
- a packet every 4 cycles;
- saturation;
- unbiasedness over 512 flows on a 5% table (mean estimate 150.4 for 150 packets);
- threshold events and out-of-range flows;
- bank selection, lock and retry.

`tb_cedar_top` runs the whole engine at the default size. It plays the client
software as well as the packet source:
- It clears the 131072 pointers and loads 1% and 1.5% tables.
- It streams about 420,000 packets and handles two interrupts, each with a full
  up-scaling walk run concurrently with the stream.
- It checks every heavy flow's estimate against its true count (within 12%),
  and the sum of all estimates against the number of packets (within 3%).
- It counts each mechanism: interrupt, walk, new-bank updates, lock waits,
  retries, and client reads. A mechanism that never happened fails the test.

It takes a couple of seconds.

`tb_cedar_workload` repeats two evaluation set-ups on synthetic traffic at the
default size. Each group of flows gets an exact packet count, and the packets
of all flows are interleaved at random. For each group the testbench checks
that the estimates are unbiased and that the RMS relative error stays within
1.4 times the final error target. It takes about 20 seconds. One run's
results:

12-bit table (1% start, 0.5% steps, threshold at pointer 4000). Four up-scaling
events take the error target to 3%.

| Packets per flow | Flows | Mean estimate | RMS relative error |
|------------------|-------|---------------|--------------------|
| 10               | 512   | 9.99          | 3.2%               |
| 100              | 512   | 99.98         | 1.3%               |
| 1,000            | 512   | 999.8         | 1.0%               |
| 10,000           | 256   | 10,007        | 1.4%               |
| 500,000          | 8     | 503,503       | 2.9%               |

Flows that stopped growing early keep roughly the error of the table they last
moved in, plus what later conversions add.

8-bit table (256 entries, threshold at pointer 240). Twenty up-scaling events
take the error target to 11% for counts up to 10,000.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/cedar_pkg.sv \
    tb/tb_cedar_top.sv --top-module tb_cedar_top -Mdir obj_top
./obj_top/Vtb_cedar_top
```

Any other testbench is built the same way, with its own name. The block
testbenches override parameters for speed: for example, 1024 flows and 256
estimators in `tb_cedar_core`.

## Limits worth knowing

- Values are 32-bit, scaled by 1000. With 4096 entries the 3% table (largest
  value about 8.8·10⁵) fits. The 3.5% table (about 9.3·10⁶) does not, so at
  this width up-scaling cannot go past 3%. Widen `EST_W` for more range.
- `cedar_prob_inc` has a 32 × `EST_W` multiplier on the path from the
  estimator RAM output to the write enable. If that limits the clock, register
  the gap one cycle earlier.
- The probability is accurate to 2⁻³² per step. The random source is a plain
  xorshift32, which is adequate for counting but not cryptographic.
