# Split-Row threshold LDPC decoder, partially parallel

This is a soft-decision decoder for low-density parity-check (LDPC) codes,
written in synthesizable SystemVerilog. It targets low-cost wireless
receivers. It runs normalized min-sum belief propagation with two ideas that
keep the hardware small.

* **Partial parallelism.** Every code bit has its own small column unit.
  The check (row) processing is done by a few shared units that walk the
  rows of the parity-check matrix H one per clock cycle. So one iteration
  takes M + 1 cycles (M rows, then one parity-check cycle), not one cycle.
* **Split-Row with a threshold.** Each row is cut into column partitions
  (two by default). Each partition finds its own first and second minimum
  over its own columns only. The partitions exchange just two wires: the
  XOR of their signs, and a one-bit *threshold flag* saying "I have a
  magnitude below T". A partition whose own minimum is large, but which
  sees a neighbour's flag, uses T as its minimum instead. This recovers most
  of the accuracy that a blind split loses, while the wiring between
  partitions stays at two bits per row.

After every iteration the hard decisions are checked against H
(H·r<sup>T</sup> = 0). Decoding stops as soon as every parity check holds,
or after `MAX_ITER` iterations.

The default configuration decodes the 3 × 6 irregular rate-1/2 example code:

```
      col: 0 1 2 3 4 5
H = row 0: 1 1 1 1 0 0
    row 1: 0 0 1 1 0 1
    row 2: 1 0 0 1 1 0
```

H, M and N are parameters, so any binary matrix can be decoded. The same RTL
has been run on a 16-bit, rate-1/2 code with 16 column units (see
*Verification*).

## Block structure

```
                 row_idx ─────────────────────────────┐
  ldpc_ctrl ───► load/row_en/iter_end ──┐              ▼
     ▲                                  │        row mask = H[row_idx]
     │ parity_ok                        ▼              │
  ldpc_parity_check ◄── r[0..N-1] ── N × { ldpc_cnu + ldpc_mu }  (one per column)
     │                                  │ beta ▲ alpha │
     ▼                                  ▼      │       ▼
  ldpc_decision_mu ──► dec_out     SPLIT × ldpc_chnu  (one per partition,
                                    ◄── sign / thr_en ──►  shared by all rows)
```

| module | role |
|---|---|
| `ldpc_decoder` | top: wiring, row mask from H, partition exchange |
| `ldpc_ctrl` | controller: row sequencing, iteration count, early stop |
| `ldpc_cnu` | *control node unit*, one per column: channel LLR, posterior, variable-to-check message, hard decision |
| `ldpc_mu` | *memory unit*, one per column: the message each row last sent to that column |
| `ldpc_chnu` | *check node unit*, one per partition: Split-Row threshold min-sum |
| `ldpc_parity_check` | syndrome Z = H·r<sup>T</sup>, `result_decode` |
| `ldpc_decision_mu` | output register with `out_valid` |
| `ldpc_pkg` | the example matrix and the controller state type |

The naming follows the architecture this design comes from. *Check node
units* do the row (check) work. *Control node units* produce the per-bit
decisions r that the parity check multiplies by H, so they are the
variable-node (column) processors.

## The Split-Row threshold check node (`ldpc_chnu`)

This is the least obvious part of the design. For the current row, partition
p receives the variable-to-check messages β of its NP = N/SPLIT columns,
plus a mask of which of those columns have a 1 in the row. All the logic is
combinational.

1. **Sign.** `sign_out` is the XOR of the masked β signs. `sign_in` is the
   XOR of all other partitions' `sign_out`. The row sign is
   `sign_out ^ sign_in`, so the sign part of min-sum is exact despite the
   split.
2. **Local minima.** Min1 (and the column it came from) and Min2 are found
   over the masked magnitudes of this partition only. Magnitudes saturate
   at 2<sup>W-1</sup>−1.
3. **Threshold.** `thr_en_out = (Min1 < T)`. `thr_en_in` is the OR of the
   other partitions' flags; with two partitions it is simply the other
   partition's flag. The minima used are then:

   | local Min1 < T | local Min2 < T | `thr_en_in` | Min1 used | Min2 used |
   |:-:|:-:|:-:|:-:|:-:|
   | yes | yes | any | Min1 | Min2 |
   | yes | no | 1 | Min1 | **T** |
   | yes | no | 0 | Min1 | Min2 |
   | no | – | 1 | **T** | **T** |
   | no | – | 0 | Min1 | Min2 |

4. **Output.** α(n) = sign · ⌊S · m⌋, where m is Min2 for the Min1 column
   and Min1 for every other column. The sign is the row sign XOR the
   column's own β sign. The scaling factor is S = `S_NUM` / 2<sup>`S_SHIFT`</sup>,
   3/4 by default. Columns outside the row get α = 0.

Worked example (one partition, all four columns in the row, T = 8, S = 3/4,
`sign_in` = 1, `thr_en_in` = 0). For β = (+10, −3, +20, −40): Min1 = 3 at
column 1, Min2 = 10, the local sign is 0 and the row sign is 1. The result
is α = (−2, +7, −2, +2), with `thr_en_out` = 1.

With `SPLIT = 1` the exchange inputs are tied off, and the unit is a plain
normalized min-sum check node over the whole row.

The partitions are contiguous column ranges: columns 0…NP−1 form partition
0, and so on. N must be a multiple of SPLIT; elaboration stops with an error
otherwise.

## Column side: control node units and memory units

Each column n keeps three values:

* L(n): the channel LLR;
* P(n): the posterior of the last iteration;
* an accumulator that starts each iteration at L(n).

When row m is presented, the column computes β = sat(P(n) − α<sub>old</sub>(m,n)),
where α<sub>old</sub> is what row m sent last iteration. `ldpc_mu` supplies
that value through its asynchronous read port, and it is taken as 0 in the
first iteration. The check node unit's new α(m,n) is written back to the
same memory word in the same cycle (read-before-write) and added to the
accumulator. On the last row the accumulator becomes the new P(n).

The schedule is therefore *flooding*: every row in an iteration sees the
posteriors of the previous iteration. P is `W + clog2(M+1)` bits wide and
cannot overflow. β saturates to ±(2<sup>W-1</sup>−1). The hard decision is
r(n) = 1 when P(n) < 0. Positive LLRs mean bit 0, as in BPSK with 0 sent as
+1.

The memories are not reset. Nothing reads them before the first iteration
has written them.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low; `llr_in` is sampled in that cycle |
| `llr_in` | in | N × W | channel LLRs, two's complement, positive = bit 0 |
| `threshold` | in | W−1 | Split-Row threshold T, in LLR units |
| `busy` | out | 1 | a frame is being decoded |
| `out_valid` | out | 1 | one-cycle pulse at the end of a frame |
| `dec_out` | out | N | decoded bits, bit n = column n; held until the next frame ends |
| `result_decode` | out | 1 | all parity checks hold for `dec_out` |
| `iter_count` | out | clog2(MAX_ITER+1) | iterations used |

A frame that stops after k iterations raises `out_valid` exactly
k·(M+1)+1 cycles after the `start` cycle. With the default code this is
4k+1 cycles.

`threshold` is an input rather than a parameter because the best T depends
on the channel quality. An external SNR estimate can drive it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M`, `N` | 3, 6 | rows and columns of H |
| `H` | the example matrix | `logic [M-1:0][N-1:0]`; bit n of `H[m]` is column n |
| `SPLIT` | 2 | partitions per row (check node units) |
| `W` | 8 | message and LLR width |
| `S_NUM`, `S_SHIFT` | 3, 2 | scaling factor S_NUM / 2<sup>S_SHIFT</sup> (must be ≤ 1) |
| `MAX_ITER` | 50 | iteration limit |

Cost at the defaults, after generic synthesis: about 190 flip-flops and
144 memory bits.

## How this relates to the source architecture

These parts follow the published architecture:

* the partially parallel organisation;
* one memory unit and one control node unit per code bit;
* the Split-Row partitions exchanging a sign signal and a threshold flag;
* Min1 and Min2 found per partition, used unchanged when Min1 < T, with the
  flag then raised;
* the XOR-based check logic;
* the parity check H·V<sup>T</sup> = 0 and its `result_decode` output;
* the 3 × 6 example matrix and the 8-bit data width.

These are choices of this design, where the source gives no detail:

* the threshold rules for the cases other than Min1 < T (taken from the
  usual Split-Row threshold formulation);
* the scaling factor value and the iteration limit;
* the flooding schedule and the memory organisation;
* the controller, the reset behaviour and all timing.

Known differences and parts that are not built:

* **16-bit code.** The architecture is drawn with sixteen control node units
  and sixteen memory units for a 16-bit code, but no 16-column matrix is
  given. The default is therefore the 3 × 6 example code. Pass a 16-column
  H to get sixteen column units.
* **Number of check node units.** The architecture's block diagram also
  shows sixteen check node units. Here there is one per Split-Row partition,
  shared over all rows, which is what makes the design partially parallel.
* **Control node unit gate network.** The source also shows a four-input
  gate-level network for the control node unit, but its inputs cannot be
  identified. The unit here is a standard variable-node update.
* **Blocks that are only named.** The automatic gain unit, the SNR estimator
  and the "reference" block have no described function and are not built.
  The channel LLR input is where the gain unit's output would connect, and
  `threshold` is where an SNR-driven setting would connect.
* **Test sequence source.** The sequence generator seen in the source's
  simulation waveform is not built.
* **Reported FPGA figures.** The source reports 271.66 MHz and sub-15 ns
  input/output delays on an FPGA. Those are not reproduced or checked here.

## Verification

Each testbench is self-checking. It ends with a
`TB_RESULT checks=N failures=F` line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ldpc_chnu` | hand-worked cases, then 4000 random vectors against the reference model; every threshold rule must occur |
| `tb_ldpc_cnu` | β, saturation, posterior update, hard decision over many random iterations |
| `tb_ldpc_mu` | read-back against a shadow copy, read-before-write |
| `tb_ldpc_parity_check` | all 64 words of the example code, and 8 codewords exactly |
| `tb_ldpc_decision_mu` | capture, hold, one-cycle `out_valid`, reset |
| `tb_ldpc_ctrl` | row sequence, check cycle, capture at k·(M+1), early stop and iteration limit |
| `tb_ldpc_decoder` | top at default parameters: 3200 AWGN frames at 0–7 dB, bit-exact against the reference model including latency; counts threshold flags, T substitutions, sign exchange, early stops, iteration-limit stops and corrected frames |
| `tb_ldpc_decoder_16` | N = 16, M = 8, rate 1/2, at W = 8 and W = 16, 1–7 dB, same checks |

`tb/ldpc_ref_pkg.sv` is the reference model used by the testbenches. It is
an integer, edge-by-edge description of the same fixed-point algorithm, and
it shares no code with the RTL. The 8 × 16 matrix in `tb_ldpc_decoder_16` is
a test matrix made for that bench (column weights 2 and 3, full rank).

Measured on the 16-bit test code with W = 8 and 150 frames per point:

| Eb/N0 | channel BER | decoded BER |
|---|---|---|
| 1 dB | 0.13 | 0.12 |
| 4 dB | 0.068 | 0.033 |
| 7 dB | 0.012 | 0 |

These are small samples on a short code. They show that the decoder works;
they are not a performance claim.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ldpc_decoder rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

Substitute any testbench name. Leave out `tb/ldpc_ref_pkg.sv` for the
benches that do not import it (`mu`, `cnu`, `ctrl`, `parity_check`,
`decision_mu`). Every run finishes in seconds.

## Changing the code

Give `M`, `N` and `H`, and usually `SPLIT`, when instantiating
`ldpc_decoder`:

```
ldpc_decoder #(.M(8), .N(16), .H(my_h), .SPLIT(2)) u_dec (...);
```

In `H[m]`, bit n is column n. Rows may have any weight, and a partition may
have no columns in a given row: it then sends no flag, and its α outputs
are 0. Throughput is N bits per k·(M+1)+1 cycles. A larger `SPLIT` shortens
the minimum-finding logic per unit but makes the threshold approximation
coarser.
