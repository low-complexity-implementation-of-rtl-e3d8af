# Partially parallel LDPC decoder with 2-bit min-sum messages

This is a low-density parity-check (LDPC) decoder for soft channel input. It
keeps hardware small by passing only **2-bit messages** between its variable
nodes and check nodes, the modified min-sum (MMS) algorithm. Only the channel
log-likelihood ratios (LLRs) keep a wider fixed-point format. With 2-bit
messages the check-node update reduces to one XOR tree and one AND tree. The
message store costs 2 bits per Tanner-graph edge, however wide the LLRs are.
The decoder is *partially parallel*: only a few node units are built, and they
work through the parity-check matrix H one slice at a time.

Everything is SystemVerilog-2017 and synthesizable. The code is a parameter.
The default is a small regular example code: 6 checks, 12 bits, row weight 4,
column weight 2.

## The algorithm as built

A 2-bit message is `{sign, magnitude}`:

| message | meaning       | value f(m) |
|---------|---------------|-----------:|
| `01`    | strong, +     | +W         |
| `00`    | weak, +       | +w         |
| `10`    | weak, −       | −w         |
| `11`    | strong, −     | −W         |

A positive value favours bit 0.

**Variable node** (column i, degree DV): the unit forms
`L(Q_i) = LLR_i + Σ_j f(G_j)` over the check messages G_j of the column. On
edge k it sends `g(L(Q_i) − f(G_k))`, which is the LLR plus all the other
edges. The mapping g() works as follows:

```
g(s) = 01  if s >  T_M
       00  if 0 <= s <= T_M
       10  if -T_M <= s < 0
       11  if s < -T_M
```

The hard decision is `c_i = 1` when `L(Q_i) < 0`.

**Check node** (row, degree DC): on edge k the outgoing sign is the XOR of
the other edges' sign bits. The outgoing magnitude is the AND of the other
edges' magnitude bits. The AND is the min-sum minimum: a single weak input
makes the output weak.

**Schedule** (flooding): the first variable-node pass has no check messages
yet, so every edge gets `g(LLR)`. Then come `MAX_ITER` iterations, each one a
full check-node pass followed by a full variable-node pass. The decisions of
the last variable-node pass are the output. There is no early stop: the
iteration count is fixed at 10.

Defaults chosen for this design: LLR 6 bits with 1 fraction bit (units of
0.5), `W = 6`, `w = 2`, `T_M = 6`.

## Architecture

```
 y, 2/σ² ─► llr_quantizer ─► mms_llr_mem ──────────────┐ LLRs of the P_V columns
                                                       ▼
             ┌────────── mms_network (columns) ───► P_V × mms_vnu ─┐
             │                                                     │ write back
        mms_edge_mem  (2 bits per edge, updated in place)   ◄──────┤ same edges
             │                                                     │
             └────────── mms_network (rows) ──────► P_C × mms_cnu ─┘
                                mms_ctrl: phases, partitions, iterations
```

- **`llr_quantizer`** forms `2·y/σ²` from an 8-bit sample (5 fraction bits)
  and an 8-bit `2/σ²` (4 fraction bits). It rounds half-up and clips
  symmetrically to ±31. It has one register stage.
- **`mms_llr_mem`** holds the N LLRs for the whole decoding, because every
  variable-node pass adds them again.
- **`mms_edge_mem`** has one 2-bit word per one in H. The word for an edge
  holds the variable-to-check message after a VN pass. The CN pass
  overwrites it with the check-to-variable message, so a single store
  serves both directions.
- **`mms_network`** (two instances) is the routing between store and units.
  H is split into partitions of `P` consecutive rows (check side) or columns
  (variable side). For the active partition, port k of unit u reaches the
  k-th edge of its row or column. The routing table is worked out from `H`
  at elaboration, with edges numbered row by row. Each unit's results are
  written back through the same addresses.
- **`mms_cnu`**, **`mms_vnu`** are combinational units, as described above.
- **`mms_ctrl`** accepts N samples, then runs VN (masked), then
  MAX_ITER × (CN, VN), one partition per clock cycle, then raises `done`.
- **`ldpc_pp_decoder`** is the top level and wires these together. It also
  holds the N decision bits.

Unit counts are parameters. The defaults are 2 check-node units (3 row
partitions) and 4 variable-node units (3 column partitions). At the defaults
the top synthesises to about 600 word-level cells and 160 flip-flop bits.

## Interface and timing (`ldpc_pp_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake; a sample is taken when both are high |
| `y` | in | `Y_W` (8) | received sample, signed, codeword order |
| `scale` | in | `S_W` (8) | 2/σ², held during loading |
| `done` | out | 1 | one-cycle pulse: `dec_bits` are final |
| `dec_bits` | out | N | decided bits, held until the next codeword finishes |
| `iter` | out | 4 | iterations completed |

`in_ready` is high while the decoder is idle or still loading. It stays low
from the N-th accepted sample until the cycle after `done`. If the last
sample is accepted in cycle t, `done` is high in cycle
`t + 2 + NGV + MAX_ITER·(NGC + NGV)`, where `NGC = M/P_C` and `NGV = N/P_V`.
At the defaults that is t + 65: an iteration takes 6 cycles, and each
codeword also needs 12 load cycles.

Parameters of the top: `M, N, H, DC, DV` (the code), `P_C, P_V` (the unit
counts; they must divide M and N), `MAX_ITER`, `LLR_W, W_HI, W_LO, T_M` (the
message arithmetic) and `Y_W, Y_F, S_W, S_F, LLR_F` (the quantizer format).
`H` is a packed `logic [0:M-1][0:N-1]`, row r, column c. It must be regular:
DC ones in every row and DV in every column. `mms_pkg::H_EXAMPLE` is the
default.

## What is this design's own

These points come from the MMS algorithm itself: the message format,
f() and g(), the XOR/AND check update, the flooding iterations, the count of
10, the LLR formula 2y/σ², the example code, and a partially parallel
organisation with routing networks and a message memory. No particular
partially parallel datapath was given, so everything concrete about it was
chosen here:

- the values of W, w and T_M, and all bit widths;
- the quantizer's fixed-point formats, rounding and saturation;
- the single in-place edge store and the register-array memories;
- one partition per cycle, with consecutive-row and consecutive-column
  partitions;
- the valid/ready input and the `done` output.

In the check-node update, signs are combined with XOR and magnitudes with
AND, because AND is the minimum over {weak, strong}. The hard decision uses
f() of the final 2-bit check messages.

Not built: a fully parallel variant (one unit per node, hard-wired, one
iteration per clock). It exists only as a point of comparison for the
partially parallel design.

## Limits

- The memories are register arrays and the networks are full multiplexers
  over the edge store. That suits small and medium codes. For long codes, the
  store would be split into banks per circulant, and the networks would become
  shifters; that is not built here.
- Only regular codes are supported.
- The PEG-constructed 1200-bit code behind the BER evaluation is not
  available. Instead, the 1200-bit test uses a quasi-cyclic lift of the
  example code.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_mms_cnu` | all 256 inputs at degree 4, random at degree 6, against counting negatives/weaks |
| `tb_mms_vnu` | random inputs at degrees 2 and 3 plus g() threshold corners, against integer arithmetic |
| `tb_llr_quantizer` | random samples against real-valued 2y/σ², one-cycle latency, saturation |
| `tb_mms_edge_mem`, `tb_mms_llr_mem` | random writes and reads against a reference array |
| `tb_mms_network` | each partition reaches the right row/column edges, in order, each edge exactly once |
| `tb_mms_ctrl` | phase order, partition order, masked first pass, refused extra samples, latency |
| `tb_ldpc_pp_decoder` | the default decoder on 300 noisy codewords of the example code (all 128 codewords found by search), compared bit for bit with a reference MMS model; latency per codeword; counts corrected frames, LLR saturation, strong and weak messages, sign flips and refused samples |
| `tb_ldpc_workload_qc` | a 600 × 1200 quasi-cyclic code (the example matrix lifted by 100-bit circulants) with 100 + 100 units and 10 iterations, 20 frames at each of Eb/N0 = 2, 3, 4 dB; bit-exact against the reference; latency per frame; prints channel and decoded BER |

For the example code at the noise levels used, the decoder corrects 107 of the
150 frames that had channel-bit errors. On the 1200-bit code the decoded BER is
about 3.5e-2, 1.7e-2 and 8e-3 at 2, 3 and 4 dB, against 1.0e-1, 7.6e-2 and
5.4e-2 on the channel. A code with column weight 2 is weak, so these figures show that the
decoder works; they are not meant as a performance benchmark.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mms_pkg.sv \
          tb/tb_ldpc_pp_decoder.sv --top-module tb_ldpc_pp_decoder
./obj_dir/Vtb_ldpc_pp_decoder
```

The 1200-bit testbench is built the same way, with `tb_ldpc_workload_qc`.
It takes about a minute to compile, because the 600 × 1200 matrix is a
parameter, and about a second to run.

Lint: `verilator --lint-only -Wall -Irtl rtl/mms_pkg.sv rtl/ldpc_pp_decoder.sv`.
The remaining warnings are expected: ascending ranges for H, an unconnected
debug output, and reset used inside assertions.
