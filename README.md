# Layered min-sum LDPC decoder with parallel "tree-way" check nodes

This is synthesizable SystemVerilog for a flexible decoder for quasi-cyclic LDPC codes of the
kind used by IEEE 802.11n (WiFi) and 802.16e (WiMax). It follows a published architecture
whose main idea is to make each **check node fully parallel**. A conventional layered decoder
streams the dc inputs of a parity check through a serial check node, one per cycle. Here all
dc inputs arrive at once. They are processed by a small tree of compare-select units that is
reused over a few cycles. The memory that holds the soft bits is organised so that all dc
inputs can be fetched in one cycle.

The default build covers all 802.11n codes:

- 27 check nodes in parallel (P = 27);
- check node degree up to 22 (the row weight of the rate-5/6 code), so 22 memory banks;
- 24 block columns, up to 12 layers;
- expansion factor Z up to 81 (Z/P up to 3);
- 7-bit LLRs.

The code itself (base matrix, shifts, memory organisation, Z, iteration count) is loaded at run
time, so one build decodes many codes.

## Decoding algorithm

The parity-check matrix H is built from a base matrix. Each entry of the base matrix is either
empty or a Z x Z identity matrix cyclically shifted by s (a *circulant*). A block row is a
*layer*. Layered min-sum keeps one a-posteriori LLR (APP) per code bit. It also keeps, for
every edge, the message the check node sent last time (beta). For each row of each layer:

    t[j]      = APP[v_j] - beta_old[j]                       (beta_old = 0 in iteration 1)
    beta[j]   = prod_{i != j} sign(t[i]) * min_{i != j} |t[i]|
    APP[v_j]  = t[j] + beta[j]

All values saturate to +-63. A zero counts as positive. After a fixed number of iterations the
hard decision is 1 where APP < 0. There is no early stop on a satisfied syndrome.

## The tree-way check node (`tree_way_magnitude`, `sign_product`, `tree_way_pe`)

This is the least obvious part of the design.

Min-sum needs, for every input j, the minimum over all *other* inputs. The degree is padded to
an even dc' by adding a +infinity input. Inputs are grouped in pairs (I[2k], I[2k+1]), and
compare-select unit CS_k (k = 0 .. dc'/2-1) owns pair k. Every unit keeps a running minimum
over a **window** of consecutive pairs that starts at its own pair. Let L = dc'/2 - 1. The goal
is a window of L pairs, which covers every input except the two just before the unit's own
pair.

| stage | what CS_k does | window after |
|---|---|---|
| DVC (1 cycle) | min(I[2k], I[2k+1]) | 1 pair |
| MSC doubling, shift s = 1, 2, 4, ... | min(own window, window of unit k+s) | 2s pairs |
| MSC remainder, shift = window so far | min(own window, window of 2^b pairs of unit k+shift, read from SM memory) | + 2^b pairs |
| EC1 | min(window, I[2k-1]) | extrinsic of input 2k-2 |
| EC2 | min(window, I[2k-2]) | extrinsic of input 2k-1 |

All indices are taken mod dc'/2 for units and mod dc' for inputs. Doubling runs up to the
largest power of two 2^m <= L. Each remaining set bit b of L adds one remainder stage. For
that stage the window of 2^b pairs is read back from the unit's **switch-matrix (SM)
memory**. The SM memory stores every stage's result at the stage's index, so the window of
2^b pairs sits at address b. The rotation "unit k reads unit k+s" is done by the **ACS
network** (`acs_network`). It is a dc'/2-wide circular barrel shifter, and its modulus is the
*active* unit count, so a datapath built for DC_MAX also serves every smaller degree.

The schedule takes Ncc = 1 + m + (popcount(L) - 1) + 2 cycles:

| dc | 5-6 | 7-8 | 9-10 | 11-12 | 13-14 | 15-16 | 17-18 | 19-20 | 21-22 | 23-24 | 25-26 | 27-28 | 29-30 | 31-32 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| Ncc | 4 | 5 | 5 | 6 | 6 | 7 | 6 | 7 | 7 | 8 | 7 | 8 | 8 | 9 |
| shifts | 1 | 1,2 | 1,2 | 1,2,4 | 1,2,4 | 1,2,4,6 | 1,2,4 | 1,2,4,8 | 1,2,4,8 | 1,2,4,8,10 | 1,2,4,8 | 1,2,4,8,12 | 1,2,4,8,12 | 1,2,4,8,12,14 |

Degrees 3 and 4 also work, with Ncc = 3. Degree 2 is not supported. Only dc'/2 compare-select units exist. They are
reused in every stage, and an input multiplexer selects each unit's two operands: pair inputs,
its own feedback, the ACS output, the EC inputs, or +infinity.

Signs are handled separately (`sign_product`). The sign of output j is the XOR of all active
input signs, XORed with input j's own sign. Inputs at or beyond dc are masked, which makes the
padding input positive.

Timing of `tree_way_pe`: `start` loads the input register bank. Ncc stage cycles follow, and
`done` pulses Ncc + 1 cycles after `start`. `beta[]` is valid from `done` until the next
`start`.

## Layered check node (`layered_cn`)

`layered_cn` wraps the PE with the layered update. Each edge has:

- a **+/- unit**, used to subtract beta_old before the PE and to add beta_new after it;
- a **pipeline register** that holds t[j] while the PE runs (it takes the place of the FIFO a
  serial check node needs);
- a **message memory** of K_WORDS words. The node processes one row per sub-iteration, so
  K_WORDS = layers x Z/P (36 by default).

Protocol: pulse `start` with `app_in[]`, `dc`, `msg_addr` and `first`. `first = 1` treats the
stored messages as zero, which is how iteration 1 starts. `done` pulses Ncc + 3 cycles later,
and `app_out[]` then holds the new APP values. Positions at or beyond dc pass through
unchanged.

## Channel memory organisation (`channel_memory`, `pxp_barrel_shifter`)

Bank level. The APP memory is split into DC_MAX banks, one per check node input, so that one
row's inputs can be read in parallel. The default build has 22 banks. A rate-1/2 code, of
degree at most 8, can use just 8 of them. Each block column (one circulant's Z variable nodes) is
placed in a *slot* of one bank. The bank and slot of each column come from a **column map**
that is loaded with the code. Columns that are never used by the same layer should share a
bank. When a layer does use two columns of the same bank, those two reads take two cycles: a
*memory conflict penalty*. A good map makes the penalty small or zero. The map can be
*regular* (the same number of slots per bank) or *irregular* (unequal bank lengths). One
irregular rate-1/2 WiFi organisation puts five circulants in one bank and one in others;
SLOTS = 5 is sized for it. The top-level testbench uses these two rate-1/2 maps (block
columns numbered from 1). It also uses a third map that puts column c in bank c mod 22:

| bank | A | B | C | D | E | F | G | H |
|---|---|---|---|---|---|---|---|---|
| WiFi 1/2 (irregular) | 12,15,19,21,24 | 2,3,10,23 | 4,8,18,20 | 6,7,11,13 | 14,16,17,22 | 1 | 5 | 9 |
| WiMax 1/2 (irregular) | 18,4,2,1 | 13,21,16,11 | 23,19,17,14 | 9,7,5 | 15,24,22 | 3,6 | 20,8 | 12,10 |

Sub-block level. A bank is P single-port memories wide. Word `slot*Z/P + a`, lane m, holds
variable node `a + m*Z/P` of its circulant, so two neighbours in a word are Z/P apart. For a
circulant with shift s, the rows processed together in sub-iteration t are
`t, t + Z/P, ..., t + (P-1)Z/P`. Row `t + p*Z/P` needs variable node `(t + p*Z/P + s) mod Z`.
All P of these sit in one word:

    word a = (t + s) mod (Z/P)
    rotate by q = floor((t + s) / (Z/P)) mod P     (check node p takes lane (p + q) mod P)

Example: Z = 32, P = 4 and a diagonal starting at column 18 (s = 17). Rows 1, 9, 17 and 25
need variable nodes 18, 26, 2 and 10. These are all in word 2 (counting from 1), rotated by 2.
For row set 8 the diagonal wraps inside the word, and the rotation becomes 3. One
`pxp_barrel_shifter` per bank performs the rotation on reads and the inverse rotation on
write-back. This requires Z to be a multiple of P.

## Controller and schedule (`decoder_controller`)

The controller holds the column map and a layer table. For each layer and each input position
j the table holds {valid, block column, shift}. Valid entries are packed from position 0, and
the layer degree is their count. Each sub-iteration (iteration, layer, t) runs these phases
without overlap:

1. **RD**: 1 + penalty cycles. Each entry is read in the cycle equal to its *rank*, the number
   of earlier entries of the layer in the same bank.
2. **CAP**: the last read word is rotated and captured into the staging registers.
3. **CNS / CNW**: all P check nodes start together; the controller waits for `done`.
4. **WR**: 1 + penalty cycles. Write-back uses the same banks, addresses and ranks, with
   inverse rotation.

Because the phases do not overlap, a layer always sees the APP values written by the previous
layer, and no hazard logic is needed. The cost is throughput:

| code (Z = 81, 20 iterations) | cycles | code bits/s at 300 MHz | published |
|---|---|---|---|
| 12 layers, degrees 7-8 (rate 1/2) | 10,921 | 53 Mb/s | 116 Mb/s |
| 4 layers, degrees 19-22 (rate 5/6) | about 3,840 | about 152 Mb/s | 187 Mb/s |

Overlapping the phases of consecutive
sub-iterations is the obvious next step, but it needs a hazard check between layers, and no
schedule for it is given.

`stat_conflict` counts the penalty cycles of the last run (read phases only).
`stat_subiter` counts its sub-iterations.

## Using the top level (`ldpc_decoder`)

While `busy` is low:

1. Set `zp` = Z/P, `n_layers` and `n_iter`.
2. Write the column map (`map_we`, `map_col`, `map_bank`, `map_slot`).
3. Write the layer table (`ent_we`, `ent_layer`, `ent_pos`, `ent_valid`, `ent_col`,
   `ent_shift`). Set `zp` first: each shift is split into (s div Z/P, s mod Z/P) when it is
   written.
4. Write the channel LLRs. `host_we` with `host_col` and `host_word` (0 .. Z/P-1) stores
   `host_wdata[m]` as the LLR of variable node `host_word + m*Z/P` of that block column.
5. Pulse `start` and wait for `done`.
6. Read the APP LLRs with `host_re`; `host_rdata` is valid in the next cycle.

Block columns and layers are numbered from 0 in the ports. Reset (`rst_n`) is asynchronous
and active low, and it clears the tables.

Parameters (defaults): `P` 27, `DC_MAX` 22, `NB_MAX` 24, `MB_MAX` 12, `SLOTS` 5, `ZP_MAX` 3.
The LLR width (7) is in `ldpc_pkg`. `tree_way_magnitude` and `tree_way_pe` accept any
`DC_MAX` up to 32. For other standards or rates:

- a rate-1/2-only WiFi build can use `DC_MAX` = 8 (8 banks), which is much smaller;
- a WiMax build needs `P` dividing every Z used, for example `P` = 24 with `ZP_MAX` = 4 for
  Z = 24, 48, 72, 96, and `DC_MAX` = 20 for all rates (tested by `tb_ldpc_decoder_wimax`).

## Where this departs from the published architecture

- The two extrinsic stages are ordered as in the published tree drawing: EC1 compares with
  the input one position before the unit's pair. The generic datapath drawing labels the two
  EC input vectors the other way round. Only the cycle in which each output is written
  depends on this choice.
- The degree-dependent EC multiplexers are combinational, not pipelined.
- SM memories and channel/message memories are register arrays. A chip would use SRAM macros
  with the same ports.
- The phases of a sub-iteration are not pipelined (see above), so throughput is lower than
  reported.
- Host interfaces, the code tables, the `first` flag, saturation and the handshakes are this
  implementation's own.
- No early termination, and only Z that are multiples of P.
- Rotations follow from the formula in the sub-block section. The published example lists a
  rotation of 2 for every row set of its Z = 32, P = 4 case. Working the example through shows
  that the last row set, where the diagonal wraps inside the word, needs a rotation of 3 and
  word 1. The design uses the worked-out values, and its testbenches check them against the
  variable nodes each row needs.
- The base matrices of the standards are not included. Codes are loaded at run time.

## Files and simulation

`rtl/` contains one module or package per file:

- `ldpc_pkg`
- `acs_network`
- `sign_product`
- `tree_way_magnitude`
- `tree_way_pe`
- `layered_cn`
- `pxp_barrel_shifter`
- `channel_memory`
- `decoder_controller`
- `ldpc_decoder` (top)

`tb/` holds one self-checking testbench per module, plus a second one for the top level. Each prints `TB_RESULT checks=N
failures=M`. Run one with:

    verilator --binary --timing --assert -Irtl -y rtl rtl/ldpc_pkg.sv \
        tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder -o sim && ./obj_dir/sim

What the testbenches check:

- `tb_tree_way_magnitude`: every degree 3..32 (DC_MAX = 32 build) and 3..8 (DC_MAX = 8 build)
  against a direct minimum. It also checks the cycle count and the ACS shift sequence of the
  table above.
- `tb_tree_way_pe`, `tb_layered_cn`: check the min-sum rule, the message memory and the
  latency against models in the testbench.
- `tb_decoder_controller`: checks every read, capture and write of a schedule against
  addresses and rotations recomputed from the code, and checks the conflict penalty.
- `tb_ldpc_decoder`: the full default build. It decodes four random quasi-cyclic codes:
  - Z = 81, 12 layers, 20 iterations, with the WiFi map;
  - Z = 27, with the WiMax map;
  - Z = 54, 8 layers;
  - Z = 81, 4 layers of degree 19-22, over all 22 banks.

  The results are compared bit-exactly with a row-by-row layered min-sum model that knows
  nothing of banks or rotations. The test also requires that bank conflicts, odd and even
  degrees, degrees above 8, several sub-iterations per layer, rotation wrap, multiple iterations and code
  switches all occur. It runs in well under a second.
- `tb_ldpc_decoder_wimax`: the same test for a WiMax build (`P` = 24, `DC_MAX` = 20,
  `ZP_MAX` = 4). It decodes Z = 96 and Z = 24 codes of 12 layers with the WiMax map, and a
  Z = 48 code of 4 layers with degrees 17-20. The Z = 96 code, with 20 iterations, takes
  12,641 cycles, about 55 Mb/s at 300 MHz. The published range for the WiMax rate-1/2 codes
  is 56-103 Mb/s.
