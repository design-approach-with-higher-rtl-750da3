# Heterogeneous multiplication server farms

A *server farm* spreads incoming jobs over a pool of identical servers and
hands the results back to the caller in the order the jobs arrived, even
though the servers finish them in a different order. This design builds two
such farms for multiplication and runs them side by side on the same job
stream:

* **Farm 1** uses four *paper-and-pencil* (shift-and-add) multipliers whose
  time per job depends on the operand value, so jobs routinely finish out of
  order.
* **Farm 2** uses four *modified Booth* multipliers: a 17 x 17-bit two's
  complement multiplier with radix-4 Booth recoding, a tree of 4:2
  carry-save adders and a carry-chain final adder, in a 2-stage pipeline.

Jobs come from an AES-128 random number generator; a comparator checks both
farms' results against the product of the job's operands.

```
             rng (AES-128, counter mode)
                  |  job {m1, m2}
        +---------+----------------+------------------+
        v                          v                  v
  mult_farm KIND=PENCIL     mult_farm KIND=BOOTH   job queue (sync_fifo)
  input buffer              input buffer              |
  rr_arbiter                rr_arbiter                |
  4 x pencil_server         4 x booth_server          |
  completion_buffer         completion_buffer         |
        |  product               |  product           |
        +------------+-----------+--------------------+
                     v
              result_compare  ->  checked / mismatches / error
```

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The top module is
`msfarm_top`.

## The job and its results

A job is two 16-bit unsigned operands (`mf_pkg::job_t`, `m1` in the upper
half), and its result is the 32-bit product. Sixteen bits cover every operand
of the farm experiment this design reproduces: the largest printed operand is
49702 and the largest product 841678519. The Booth core itself multiplies
17-bit two's complement numbers. The Booth server therefore zero-extends the
operands to 17 bits and keeps the low 32 of the 33 result bits.

## How a farm keeps job order: the completion buffer

This is the part that makes a farm work. Read `completion_buffer.sv` first.

The completion buffer (a reorder buffer) has `SLOTS` result slots used as a
circular queue. It has three operations:

1. **reserve.** When a job is dispatched, the slot at the tail is reserved.
   Its index, the *token*, is already on `reserve_token` in that cycle. The
   farm sends the token with the job to the server as a tag.
2. **complete.** When a server finishes, it writes its result into the slot
   named by its tag and marks the slot filled. It uses its own completion
   port, so there are `PORTS` ports, one per server, and any port can write
   any slot.
3. **drain.** The oldest reserved slot (the head) is offered on `drain_*`
   once it is filled. A job that finished early waits in its slot until every
   older job has been drained.

Each slot goes free -> reserved -> filled -> free. Assertions check two
rules: a completion may only write a slot that is reserved and not yet
filled, and no two ports may write the same slot in one cycle.

Dispatch in `mult_farm` happens in a single cycle, when three things hold:

* the input buffer has a job;
* the round-robin arbiter has found a ready server;
* the completion buffer has a free slot.

The job then leaves the buffer, a slot is reserved, and the granted server
starts. So at most `SLOTS` jobs are ever in flight. A stalled
output (`out_ready` low) back-pressures through the full completion buffer
and the input buffer to the caller.

The farm has four one-cycle status outputs for observation:

* `ev_dispatch`: a job went to a server.
* `ev_ooo`: a younger job completed while the oldest had not.
* `ev_wait_server`: a job waited because no server was free.
* `ev_wait_rob`: a job waited because every slot was taken.

## The two kinds of server

`pencil_server` handles one multiplier bit per cycle, least significant bit
first. The multiplicand is added when the bit is 1, then the multiplicand
shifts left and the multiplier shifts right. The job stops as soon as the
remaining multiplier bits are zero. The result pulse `result_valid` comes
`max(1, bitlength(m2)) + 1` rising edges after the accepting edge. The server
takes one job at a time; `start_ready` is low while it is busy.

`booth_server` wraps `mul17_b`. Its `start` is always ready, as the original
wrapper's always-enabled start method was, so it takes a job every cycle. A
valid bit and the tag travel beside the two pipeline stages, so the result
comes exactly 2 edges after the job. Booth jobs therefore complete in order.
The farm still routes them through the completion buffer, and that buffer
fills up whenever the comparator waits for the slower pencil farm.

## The modified Booth multiplier (`mul17_b`)

The ports keep the names of the original IP: `result[32:0]`,
`multiplicand[16:0]`, `multiplier[16:0]`, `clock`, `reset`.

*Stage 1, partial products* (`booth_ppgen`). The multiplier B is read in
overlapping 3-bit groups `{B[2i+1], B[2i], B[2i-1]}`, with B[-1] = 0 and
B[17] = B[16]. Each group gives a digit in {-2, -1, 0, +1, +2}, nine digits in
all. The selected multiple of A is made as follows:

* 0, A or 2A: 2A is A shifted left by one bit.
* A negative digit: the multiple is inverted, and a `neg` bit adds the
  missing +1.

Sign extension is replaced by sign generation. Row 0 carries `{~s, s, s}`
above its 17 low bits, and each later row carries `{1, ~s}`. Modulo 2^33,
these bits sum to the same value as the full sign extensions. The `neg` bit of
row i sits in row i+1, two places below that row's lowest bit. The last
`neg` bit needs a tenth row. The module outputs all ten rows, each shifted to
its weight.

*Stage 1, Wallace tree* (`wallace_tree`, `csa42`). The tree has three levels
of 4:2 carry-save adders:

1. Rows 0-3 and rows 4-7 are reduced to four vectors.
2. Those four are reduced to two.
3. Those two, row 8 and the tenth row are reduced to one sum vector and one
   carry vector.

The sum and carry vectors are registered at the end of stage 1.

*Stage 2* (`carry_chain_adder`). A 33-bit ripple-carry adder adds the two
vectors, and the sum is registered as `result`.

The result of operands applied before rising edge k appears after edge k+1.
It is the product modulo 2^33, which is exact except for
(-2^16) x (-2^16): that product needs 34 bits.

The original is a full-custom layout. One of its area-saving details is an
n-to-1 multiplexer built from nMOS pass switches, with a weak pMOS pull-up
that restores the high level. That detail has no RTL counterpart: here the
selection is an ordinary multiplexer.

## The random number generator (`rng`, `aes_core`, `aes_key_expand`)

`aes_core` is an iterative AES-128 encryption core with the ports `ld`,
`key`, `text_in`, `done` and `text_out`. It runs in these steps:

1. In the cycle with `ld`, the initial AddRoundKey result is stored.
2. Nine round cycles follow: SubBytes, ShiftRows, MixColumns, AddRoundKey.
3. A final round leaves out MixColumns.
4. `done` pulses 10 rising edges after the edge that sampled `ld`.

`aes_key_expand` makes each round key on the fly, one per cycle. The S-box is
computed, not stored: it is the inverse in GF(2^8) (x^254, with 0 mapped to
0) followed by the AES affine map. Both are in `aes_pkg`.

`rng` encrypts a 128-bit counter under `key`. The counter starts at
`ctr_init` after reset. Each cipher block gives four jobs, most significant
32-bit word first, with `m1` the upper 16 bits of the word. One block is being
sent while the next is encrypted, so an always-ready consumer gets four jobs
every 13 cycles.

## Top level (`msfarm_top`)

While `run` is high, a generated job is given in the same cycle to three
places:

* both farms' input buffers;
* the comparator's job queue.

This happens only when all three can take it, so the farms always see
identical job sequences. `result_compare` takes one result from each farm and
the job from the queue. It checks `r1 == r2 == m1*m2` and counts `checked`
and `mismatches`; `error` is sticky. `last_job`, `last_r1` and `last_r2`
show the latest comparison, in the style of a log line such as
`( 1101 * 49702 = ) 54721902, 54721902`.

| parameter | default | meaning |
|---|---|---|
| `SERVERS` | 4 | multiplier servers per farm |
| `SLOTS` | 8 | completion-buffer slots per farm (jobs in flight) |
| `IN_DEPTH` | 4 | input buffer entries per farm |
| `REF_DEPTH` | 16 | comparator job queue (keep >= IN_DEPTH + SLOTS) |

The original design names four servers per farm. The other three sizes are
this implementation's choice. Synthesis of the top gives about 7500
word-level cells and 1510 flip-flops, plus 1280 memory bits. The two AES
blocks are most of the logic.

Reset is synchronous and active high throughout (`rst`; `reset` on
`mul17_b`).

## Where this departs from, or fills in, the original description

* **Servers per farm.** The original gives the number only in its block
  diagram, which shows four.
* **Pencil multiplier.** The original calls these multipliers "pipelined"
  paper-and-pencil multipliers whose time depends on the operands, and gives
  no more. Here they are sequential one-bit-per-cycle units with early
  termination, one job at a time.
* **Booth farm timing.** The original says both kinds of server take an
  operand-dependent time. It also describes the Booth multiplier as a
  fixed 2-stage pipeline. This design follows the pipeline, so only the
  pencil farm completes out of order.
* **AES core.** The original reuses an existing AES core and gives only its
  interface and block diagram. This core is written from the AES standard.
* **Random numbers.** Counter mode and the word split are this design's
  reading of "AES as a random number generator".
* **Generator and comparator.** In the original these lived in the test
  environment. Here they are synthesizable, so the whole arrangement is one
  design.
* **Sizes and interfaces.** Slot and buffer sizes, the round-robin order,
  the valid/ready handshakes, the 16-bit job operands and the reset style
  are not given by the original.
* **Not modelled.** The custom layout's figures (9.5 ns, 9115 transistors,
  1135 x 1545 um^2 in 0.6 um CMOS) are properties of that layout.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
with a `TB_RESULT checks=N failures=M` line and has a watchdog. The values
they check against are computed independently:

* **Arithmetic:** the `*` and `+` operators.
* **AES:** published test vectors (FIPS-197 appendices B and C.1, SP 800-38A
  ECB, and the all-zero key at counters 0, 1 and 2).
* **Buffers and arbiter:** queue and pointer models.

Latencies are checked cycle-exactly: 2 edges for the Booth multiplier and
server, `bitlength + 1` for the pencil server, 10 for AES and 4 for an empty
Booth farm.

`tb_mult_farm` and `tb_msfarm_top` check results and also count the farm
events. They fail if any of these never happened:

* a dispatch;
* an out-of-order completion;
* a wait for a server;
* a wait for a completion slot;
* input-buffer back-pressure on the generator.

`tb_msfarm_top` runs 1000 jobs through the design at its default sizes,
with `run` dropped partway through. It finishes in well under a second.
`tb_fig9_jobs` pushes a fixed list of 22 small and large operand pairs
through both farms. It checks the printed products of the original
experiment's log.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mf_pkg.sv rtl/aes_pkg.sv tb/tb_msfarm_top.sv --top-module tb_msfarm_top
./obj_dir/Vtb_msfarm_top
```

Replace `tb_msfarm_top` with any other testbench name. Lint one module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/mf_pkg.sv rtl/aes_pkg.sv
rtl/<module>.sv --top-module <module>`. The remaining lint warnings are
unused bits: the carry out of the final adder, the top bit of the 33-bit
Booth result, and the unused current-round-key output of the key expansion.
