# FURBYS: a profile-guided replacement policy for the micro-op cache

A micro-op cache keeps already-decoded x86 micro-ops so the frontend can
skip the instruction cache and the power-hungry legacy decoders. Data center
programs have code footprints far larger than such a cache (512 entries
here), so almost every miss is a capacity or conflict miss. The replacement
policy therefore decides how well the cache works. Ordinary policies (LRU,
SRRIP, Belady-style predictors) fit it poorly, for three reasons:

* **Storage is uneven.** The cache stores *prediction windows* (PWs): a run
  of micro-ops from a branch target up to a predicted-taken branch or the
  end of a 64-byte line. A PW fills 1 to 4 entries of 8 micro-ops, and its
  last entry is usually part empty. All entries of a PW live in the same
  set and are kept or evicted together. What a miss costs depends on how
  many micro-ops must be decoded again.
* **Partial hits.** Two PWs can start at the same address with different
  lengths, because a not-taken branch does not end a window. A stored long
  window can serve a shorter request. A stored short window serves only the
  first part of a longer one.
* **Lookup and insertion are out of step.** A PW is inserted several cycles
  after its miss, once the decoder has rebuilt it, while later lookups go on.

FURBYS moves most of the intelligence offline. A profiling run replays the
program against a near-optimal offline policy. From that run it measures
the hit rate each PW *should* have, and sorts the PWs into eight groups,
from 0 (coldest) to 7. The group number, called the PW's **weight**, is
written into reserved bits of a branch in the PW. The hardware then only
has to:

1. **prefer to keep high-weight PWs**: the victim is the way with the lowest
   weight in the set;
2. **notice local miss pitfalls**: a PW that is usually cold can be hot for
   a while. If the policy is about to evict, for a second time, a way it has
   just evicted, it makes this one decision with SRRIP instead;
3. **bypass PWs that are not worth storing**: a new PW whose weight is below
   the set's lowest weight minus K (K = 1) is not inserted at all. This also
   saves the energy of the insertion.

This RTL implements the hardware side: the accumulation buffer that builds
PWs and carries their weight, and the micro-op cache with the FURBYS
replacement logic. The offline profiling, the x86 decoder that pulls the
hint out of an instruction, the instruction cache and branch prediction are
not part of it. Their signals are ports of the top module.

## Structure

```
            decoded micro-ops + weight hint            lookup (start address, #uops)
                      |                                         |
             +--------v---------+                       +-------v-------------------+
             | furbys_          |  finished PW (pw_t)   | furbys_uop_cache          |
             | accumulator      |---------------------->|  64 sets x 8 ways         |
             | (first hint kept)|   valid/ready         |  entry: 8 uops, 4 imms,   |
             +------------------+                       |  weight(3), RRPV(2),      |
                                                        |  key, seq, PW size/cost   |
       icache line eviction ---------------------------->  insertion FSM            |
                                                        |   +-------------------+   |
                                                        |   | furbys_victim_    |   |
                                                        |   | select            |   |
                                                        |   |  min module       |   |
                                                        |   |  max module       |   |
                                                        |   |  compares + mux   |   |
                                                        |   +---------^---------+   |
                                                        |   furbys_pitfall_buffer   |
                                                        +-----------+---------------+
                                                                    |
                                                      entries, one per cycle + status
```

| File | Contents |
|---|---|
| `rtl/furbys_pkg.sv` | entry format, `pw_t` bundle, decision and lookup-status encodings |
| `rtl/furbys_frontend_top.sv` | top: accumulator feeding the cache |
| `rtl/furbys_accumulator.sv` | accumulation buffer |
| `rtl/furbys_uop_cache.sv` | storage, lookup streamer, insertion FSM, icache inclusion |
| `rtl/furbys_victim_select.sv` | one replacement decision for the active set |
| `rtl/furbys_min_module.sv` | coldest valid way |
| `rtl/furbys_max_module.sv` | SRRIP victim and aging step |
| `rtl/furbys_pitfall_buffer.sv` | per-set record of the last two victims |

## The replacement decision

The policy acts only when an inserted PW needs more ways than its set has
free. The decision is combinational and takes one cycle. It runs in four
steps:

1. **Set activation.** The start address of the pending PW selects the set.
2. **Candidates.** The *min module* scans the valid ways for the lowest
   weight. That way is the FURBYS candidate, and its weight is the set's
   minimum. The *max module* finds the SRRIP victim at the same time: the
   first way with the highest RRPV. It also returns `3 - max`, which is how
   far textbook SRRIP would age the set before a way reached 3.
3. **Two compares.**
   * *bypass*: `new_weight < min_weight - K`. This is computed in a wider
     width, so `min - K` cannot wrap around. It is only checked on the first
     victim search of a PW.
   * *degrade*: the FURBYS candidate equals a way held in the set's pitfall
     record. The record holds the set's last two victims. So this would be
     the second eviction of that way in a short time.
4. **Multiplexer.** The select is `{bypass, degrade}` and picks one of:
   0 = FURBYS victim, 1 = SRRIP victim, 2 = bypass. Bypass takes priority.

What happens next depends on the decision:

* **Bypass.** The PW is dropped. Nothing is evicted.
* **Eviction.** All ways holding the victim's PW are freed in one cycle,
  because a PW is evicted as a whole. The victim way is then pushed into the
  set's pitfall record.
* **SRRIP eviction.** The record is first emptied, so it holds only the
  SRRIP victim. The next decision is then FURBYS again. Every valid RRPV of
  the set is also increased by the aging amount.

If the set still lacks free ways, the search repeats in the next cycle. This
can happen because the PW needs up to 4 entries while a victim PW may free
only one.

An example shows how the pitfall works. Take a set with weights A=1, B=7,
C=7, D=5, and so on. PW I with weight 2 arrives and evicts A, which is the
coldest. Then A comes back. Its weight 1 is not below 2 − 1, so it is not
bypassed. Now the coldest way is the one I took, which is the way evicted
last time. That is a pitfall, so SRRIP chooses instead. If I has been hit
since its insertion, its RRPV is 0 and it survives. `tb_furbys_uop_cache`
runs exactly this sequence.

RRPV maintenance follows SRRIP: a newly inserted entry starts at 2, a hit
sets the PW's entries to 0, and aging happens only when SRRIP picks a
victim.

## Prediction windows in the cache

Each way holds one entry (8 × 56-bit micro-ops, 4 × 32-bit immediates, the
count of valid micro-ops) and this metadata:

| field | bits | meaning |
|---|---|---|
| valid | 1 | |
| key | 42 | start address without the set-index bits |
| seq | 2 | position of this entry inside its PW |
| PW size / cost | 3 / 6 | entries and micro-ops of the whole PW |
| weight | 3 | FURBYS hit-rate group |
| RRPV | 2 | SRRIP state |

The set index is address bits [11:6], the bits just above the 64-byte line
offset. So every PW that starts in one instruction-cache line sits in one
set. An icache eviction (`inv_valid`, `inv_addr`) then removes all of that
line's PWs in a single cycle, which keeps the micro-op cache inclusive of
the icache.

**Lookup.** A request gives the start address and the number of micro-ops
the predicted PW needs (`lk_uops`). From the next cycle on, the cache streams
the PW's entries, one per cycle, in `seq` order. It stops as soon as the
requested micro-ops have been delivered. The last beat (`rsp_last`) carries
the outcome:

| stored PW with that start | outcome | micro-ops delivered |
|---|---|---|
| ≥ requested micro-ops | `LK_HIT` (for a shorter request this uses an intermediate exit point) | requested |
| < requested | `LK_PARTIAL`; the frontend decodes the rest | what is stored |
| none | `LK_MISS`, one beat | 0 |

Exit points are allowed at every micro-op. A hit resets the PW's RRPVs to 0.
A new request is accepted in the cycle of the last beat. So a one-entry PW
can be looked up every cycle, and an n-entry PW every n cycles.

**Insertion.** The insertion FSM handles one PW at a time, alongside
lookups. It goes through three states:

* **CHECK.** If a PW with the same start is already stored and holds at
  least as many micro-ops, the new one is dropped. If the stored one is
  smaller, it is removed, so the larger window is kept. A PW with more
  entries than the set has ways (possible only below 4 ways) is dropped
  (`ev_drop_big`).
* **ALLOC.** The replacement decision above runs until enough ways are free.
* **WRITE.** The entries go into the lowest free ways, one per cycle, with
  the PW's weight and RRPV 2.

If the icache evicts the pending PW's line meanwhile, the insertion is
abandoned. A lookup that loses a PW to a concurrent eviction ends early and
reports `LK_PARTIAL`, or `LK_MISS` if it delivered nothing.

## Accumulation buffer and hints

The decoder side delivers one micro-op per cycle (`dec_valid`/`dec_ready`).
The first micro-op after a finished PW supplies the PW's start address, and
`dec_last` marks the last one. Micro-ops are packed in order into entries.
A new entry is started when the current one holds 8 micro-ops, or when it
already holds 4 immediates and the incoming micro-op has another one.

The first weight hint seen in the PW (`dec_group_valid`, `dec_group`)
becomes the PW's weight. A PW with no hint gets `DEFAULT_WEIGHT` (0).
A finished PW waits in a one-deep output register for the cache's
`ins_ready`. The decoder is stalled only while that register is full.
A PW larger than 4 entries cannot be stored: it is dropped and
`ev_pw_overflow` pulses.

## Interface of `furbys_frontend_top`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `dec_valid` / `dec_ready` | in / out | 1 | micro-op handshake |
| `dec_addr` | in | 48 | PW start address (used on a PW's first micro-op) |
| `dec_uop` | in | 56 | micro-op |
| `dec_has_imm`, `dec_imm` | in | 1, 32 | immediate |
| `dec_last` | in | 1 | last micro-op of the PW |
| `dec_group_valid`, `dec_group` | in | 1, 3 | weight hint |
| `lk_valid` / `lk_ready` | in / out | 1 | lookup handshake |
| `lk_addr`, `lk_uops` | in | 48, 6 | PW start, micro-ops wanted |
| `rsp_valid`, `rsp_last` | out | 1 | response beat, last beat |
| `rsp_entry`, `rsp_nuops` | out | 576, 4 | entry payload, valid micro-ops in it |
| `rsp_status` | out | 2 | `LK_MISS`/`LK_HIT`/`LK_PARTIAL`, valid with `rsp_last` |
| `inv_valid`, `inv_addr` | in | 1, 48 | icache line eviction |
| `ev_*` | out | 1 each | event pulses: hit, partial, miss, insert, bypass, evict_furbys, evict_srrip, drop_dup, supersede, drop_big, inval, pw_overflow |

Parameters: `SETS` (64), `WAYS` (8), `PITFALL_DEPTH` (2), `K` (1),
`DEFAULT_WEIGHT` (0). The entry format, the 3-bit weight, the 2-bit RRPV, the
48-bit address and `MAX_PW_ENTRIES` (4) are constants in `furbys_pkg`.

The storage behind the policy is 5 bits per entry (weight and RRPV) and
2 × 3 bits of pitfall record per set. That is 46 bits per 4608-bit set,
about 1 %. This implementation adds a valid bit per pitfall slot. It also
keeps its own PW bookkeeping per way (key, seq, size, cost), which any
micro-op cache needs in some form.

## Where this design makes its own choices

The sizes, entry format, weight and RRPV widths, insertion RRPV, K, pitfall
depth, the four decision steps and the icache inclusion follow the design
as published. These points are this implementation's own:

* A pitfall is a FURBYS candidate that matches *either* slot of the record.
  After an SRRIP decision, the record restarts with that victim alone.
  Slots carry a valid bit so that reset leaves no record.
* Bypass is considered only on the first victim search of a PW, and never
  when the set has enough free ways.
* A hit sets RRPV to 0. Aging happens in one step, when SRRIP picks a victim.
* Ties in the min and max modules go to the lowest way.
* The address split, the per-way key/seq/size/cost fields and the 4-entry
  cap on a PW are design choices.
* The "keep the larger window" rule for two PWs with the same start is
  applied online, at insertion.
* Exit points are allowed at every micro-op boundary.
* The lookup request names the wanted micro-op count. All cycle timing on
  both ports is this design's own.
* A PW without a hint gets weight 0.
* The one-cycle switch penalty between the micro-op cache and the legacy
  decoders is a frontend matter and is not modelled.

## Simulation

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_furbys_frontend_top rtl/furbys_pkg.sv tb/tb_furbys_frontend_top.sv
./obj_dir/Vtb_furbys_frontend_top
```

| testbench | what it checks |
|---|---|
| `tb_furbys_min_module`, `tb_furbys_max_module` | random sets against a reference scan / textbook SRRIP |
| `tb_furbys_victim_select` | pitfall and bypass corner cases, then random sets against the policy rules |
| `tb_furbys_pitfall_buffer` | random eviction records against a reference copy |
| `tb_furbys_accumulator` | random PWs (lengths, immediates, hints, back-pressure) against a reference packing, and overflow |
| `tb_furbys_uop_cache` | hand-worked scenarios: hit / exit-point / partial / miss with beat timing, supersede and drop, FURBYS eviction, SRRIP degradation, bypass threshold, whole-PW eviction, several victims, inclusion |
| `tb_furbys_config_sweep` | the same kind of stream on eight other geometries side by side: 512 entries at 2, 4, 16 and 32 ways, and 256, 1024, 2048 and 4096 entries at 8 ways |
| `tb_furbys_frontend_top` | end to end at full size: a synthetic program of 120 PWs crowded into 6 sets, 4000 accesses, with decoding on misses and occasional icache evictions. Every delivered micro-op is checked, and every mechanism must occur |

Expect the full-size end-to-end run to take a few seconds. It does not
measure miss rates of real applications: the synthetic stream and its
random weights only exercise the mechanisms. Real weights come from the
offline profiling, which this RTL does not include.
