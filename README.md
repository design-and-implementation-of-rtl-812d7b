# Configurable layered LDPC decoder for IEEE 802.16e and 802.11n

This is a partially parallel decoder for the quasi-cyclic (QC) LDPC codes of WiMAX (IEEE 802.16e)
and Wi-Fi (IEEE 802.11n). It has one fixed datapath of 96 lanes, which serves every expansion factor
Zf from 24 to 96. The decoder runs normalised min-sum in layered form ("row-update message passing").
It decodes one block row of the base matrix (a layer, Zf parity checks) at a time, all Zf checks in
parallel. Updated posteriors are written back at once, so the next layer already sees them.

Two codes are built in: 802.16e rate 1/2 at all 19 sizes (Zf = 24, 28, ..., 96, codeword
length 576 to 2304), and 802.11n rate 5/6 at Zf = 54 and 27. The other rates of both standards use
the same datapath and would only need more code-table entries (see "Limits").

## The codes

A QC-LDPC parity check matrix H is a 12×24 (rate 1/2) or 4×24 (rate 5/6) grid of Zf×Zf blocks.
Each block is zero or a cyclically shifted identity matrix. Block (i, j) with shift p connects
check row r of block row i to bit (r + p) mod Zf of block column j. The standards give the shifts
once, for the largest Zf. For 802.16e, a smaller Zf uses floor(p·Zf/96). For 802.11n, the Zf = 27
table is the Zf = 54 table reduced modulo Zf.

## How a decode proceeds

1. **Load.** The codeword's 24 block columns of 6-bit channel LLRs (positive means bit 0) come in
   one column per cycle and go into the input buffer. While one codeword decodes, the next one can
   already be written. When decoding starts, each column is copied through the permutation unit
   into the process buffer "MS". On the way it is rotated into the alignment its first reader needs.
2. **Layers.** For each layer the controller reads that layer's columns from MS, one per cycle.
   Each lane r of the 96 processing units then sees exactly the bits of its check row r: the
   rotation was applied beforehand.
   - In the **CHK phase** each unit forms q = MS − r_old. Here r_old is the message this row sent
     to that bit in the previous iteration. The unit keeps a running first minimum, second minimum,
     position of the first minimum and sign product of q, and pushes |q| and sign(q) into two FIFOs.
   - After the last column the unit scales both minima by 0.75, computed as x>>1 + x>>2. These are
     "Beta1" and "Beta2".
   - In the **VAR phase** the FIFOs are popped in the same order. The new message is
     r = sign·(position == index ? Beta2 : Beta1), and the new posterior is MS = q + r.
   - The updated column goes through the permutation unit again. The rotation is the difference
     between this layer's shift and the shift of the next layer that uses the column. So every column
     is always stored in the rotation its next reader needs, and only one rotation per update is
     required.
3. **Iterations** repeat the 12 (or 4) layers, up to 10 times.
4. **Output.** Each column is rotated by its inverse shift. The 96 sign bits (hard decisions) of
   each column appear on `out_bits`, one column per cycle.

### Compressed check messages (Beta_ram)

Storing every check-to-bit message would take one word per non-zero block. Instead, min-sum lets a
row's messages be rebuilt from three numbers per row: Beta1, Beta2 (5 bits each) and the index
(5 bits). These are stored once per layer, 12 words of 96 × 15 bits. One sign bit per message is
stored per non-zero block, 88 words of 96 bits. `ldpc_beta_ram` rebuilds r_old for all 96 lanes in
the cycle the processing units need it. In the first iteration r_old is 0.

### Overlapped layers and hazards

The next layer starts reading while the previous one still writes back, overlapping CHK of layer
k+1 with VAR of layer k. Each layer's edges are ordered offline:
- columns the previous layer does not touch come first;
- shared columns follow, in the order the previous layer writes them back.

The controller adds two safety rules:
- **Read-after-write stall:** a scoreboard (one bit per column) blocks the read of a column whose
  update is still in flight.
- **Order stall:** the last read of a layer waits until the previous VAR phase is at most one pop
  from its end. The processing unit's Beta registers can then be reloaded safely.

On the 802.16e rate-1/2 code at Zf = 96 an iteration takes about 95 cycles. Reading and writing
the 76 non-zero blocks one after the other, with 3 cycles of pipeline per layer, would take 188.

### Flexible permutation

The barrel shifter has a fixed width of 96 lanes, but must rotate only the first Zf of them, cyclically.
`ldpc_permute` computes two full-width rotations:
- a left rotation by `s` (the "head" part);
- a left rotation by `s + 96 − Zf` (the "tail" part, wrapping around).

Each lane then selects its result:
- lanes below Zf − s take the head part;
- lanes from there up to Zf take the tail part;
- lanes at or above Zf keep their input.

Each rotation is a 3-level mux tree: steps of 16, 4 and 1, with a 7-bit shift amount.

### Multi-codeword mode

For Zf ≤ 48, half of the lanes would be idle. With `cfg.multi = 1` the datapath carries two
codewords: lanes 0..Zf−1 hold the first and lanes 48..48+Zf−1 the second. Both use the same
addresses, shifts and schedule. The permutation then rotates each 48-lane half on its own, and
early termination waits until both codewords are stable. Throughput doubles for short codewords.

### Early termination

With `cfg.et_en = 1` the termination unit compares, column by column, the hard decisions written
in this iteration with those of the previous one. It stops the decode when nothing changed
during a whole iteration, which means after 2 iterations at the earliest. Evaluating H·xᵀ in
hardware would cost far more; this cheap test replaces it. `iterations` reports how many
iterations were used.

## Number formats

| quantity | width | range |
|---|---|---|
| channel LLR (input, input buffer) | 6 bits, integer | ±31 |
| posterior MS (process buffer, permutation, units) | 8 bits | ±127 |
| Beta1 / Beta2 | 5 bits | 0..23 after scaling |
| |q| used for the minimum search | 5 bits | clipped to 31 |
| index of the first minimum | 5 bits | 0..23 |

**Departure from the original design.** The original keeps the posterior with the same 6 bits as
the channel values, so its process buffer has 96 × 6 = 576-bit words. With a 6-bit posterior,
subtracting a stored message of up to 23 from a posterior saturated at 31 loses enough
information that even error-free codewords fell apart after about three iterations. This was
found with a bit-exact model of the layered schedule. Here the posterior has 8 bits, so MS words
are 96 × 8 = 768 bits. The input buffer keeps 6-bit LLRs (576-bit words), and Beta and the sign
memory are unchanged.

## Interface of `ldpc_decoder_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg` | in | `cfg_t` | `code` (0: 802.16e rate 1/2, 1: 802.11n rate 5/6), `zf`, `multi`, `et_en`; sampled when a decode starts |
| `in_valid` / `in_ready` / `in_data` | in/out/in | 1/1/576 | one block column of 96 × 6-bit LLRs per accepted cycle, column 0 first; lane r in bits [6r+5:6r] |
| `out_valid`, `out_col`, `out_bits` | out | 1/5/96 | decoded hard decisions of one column (1 = bit one), 24 cycles |
| `busy`, `done` | out | 1 | decoding in progress; one-cycle pulse after the last output column |
| `iterations` | out | 4 | iterations used by the last decode |
| `ev_hazard_stall`, `ev_order_stall`, `ev_overlap`, `ev_early_stop` | out | 1 | one-cycle event strobes for performance counting |

The input buffer accepts the next codeword as soon as the current one has been copied into MS.
`cfg` must already hold the next codeword's configuration when the decoder leaves idle.

## Files

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | widths, types, saturation |
| `rtl/ldpc_code_pkg.sv` | the two base matrices in schedule order (edge tables) |
| `rtl/ldpc_code_rom.sv` | per-Zf shift scaling, shift differences, load/output shifts |
| `rtl/ldpc_in_buffer.sv` | single-port input buffer, 24 × 576 |
| `rtl/ldpc_ms_ram.sv` | dual-port process buffer, 24 × 768 |
| `rtl/ldpc_barrel_rotl.sv`, `rtl/ldpc_permute.sv` | flexible permutation |
| `rtl/ldpc_pe.sv` | one CHK/VAR processing unit (96 instances) |
| `rtl/ldpc_beta_ram.sv` | Beta memory, sign memory, r_old rebuild |
| `rtl/ldpc_termination.sv` | hard-decision early termination |
| `rtl/ldpc_controller.sv` | load/decode/output sequencing, overlap and stalls |
| `rtl/ldpc_decoder_top.sv` | top level |

The edge tables in `ldpc_code_pkg` follow these rules, per layer:
- columns not in the previous layer first, then the shared columns in the previous layer's order;
- `PNEXT` is the shift of the same column's next use (wrapping to the next iteration);
- `PFIRST` is the shift of a column's first use in an iteration.

A new code needs only new tables of that form plus an entry in `ldpc_code_rom`.

## Verification

Every block has a self-checking testbench in `tb/` that compares against an independent reference
model. Each prints `TB_RESULT checks=… failures=…`:

- `tb_ldpc_permute`: every Zf, random shifts, single and multi mode, against the index formula.
- `tb_ldpc_pe`: 300 back-to-back random layers with overlapped CHK/VAR, against a min-sum model.
- `tb_ldpc_beta_ram`, `tb_ldpc_in_buffer`, `tb_ldpc_ms_ram`, `tb_ldpc_termination`: against array
  models.
- `tb_ldpc_code_rom`: all 19 802.16e sizes and both 802.11n sizes, against the natural-order
  matrices in `tb/tb_ldpc_codes_pkg.sv`.
- `tb_ldpc_controller`: the schedule, the read-after-write rule, read/write counts and iteration
  counts.
- `tb_ldpc_decoder_top`: the full decoder at its default size.
  - It encodes random codewords with a behavioural encoder (in `tb_ldpc_codes_pkg`).
  - It sends them through a channel with 1–4 % sign errors and random reliabilities.
  - It decodes seven back-to-back cases (both codes; Zf 96, 76, 54, 48, 27, 24; single and
    multi-codeword; early termination on and off).
  - It checks every output bit, the iteration count and a cycle bound.
  - It fails if a stall, an overlap, an early stop or a multi-codeword decode never happened.

To run a testbench with Verilator (for example the full decoder):

```
verilator --binary --timing --assert rtl/ldpc_pkg.sv rtl/ldpc_code_pkg.sv tb/tb_ldpc_codes_pkg.sv \
  rtl/ldpc_barrel_rotl.sv rtl/ldpc_permute.sv rtl/ldpc_in_buffer.sv rtl/ldpc_ms_ram.sv \
  rtl/ldpc_pe.sv rtl/ldpc_beta_ram.sv rtl/ldpc_code_rom.sv rtl/ldpc_termination.sv \
  rtl/ldpc_controller.sv rtl/ldpc_decoder_top.sv tb/tb_ldpc_decoder_top.sv \
  --top-module tb_ldpc_decoder_top -o sim && obj_dir/sim
```

The full-decoder test runs in well under a minute.

## Limits and what is not included

- Only two base matrices are in the code tables: 802.16e rate 1/2 and 802.11n rate 5/6 (Zf 54/27).
  The remaining rates (802.16e 2/3A, 2/3B, 3/4A, 3/4B, 5/6; 802.11n 1/2, 2/3, 3/4) and the
  802.11n Zf = 81 tables are missing.
  - The memories are sized for all of them: at most 12 layers, 88 non-zero blocks, row degree 22.
  - Adding them needs only tables.
- No output buffer. Hard decisions leave on a registered port, one column per cycle.
- No clock divider for a low-power mode; the RTL does not depend on the clock frequency.
- Clock frequency, area and power have not been measured. At 333 MHz, a simulated 802.16e
  rate-1/2, Zf = 96 decode with 10 iterations takes about 1060 cycles, which is about 724 Mb/s of
  coded bits.
- Error-rate performance has only been checked on the test cases above, not measured as a curve.
