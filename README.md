# Semantic-based load/store predictor for an x86 out-of-order core

Compiled x86 code keeps local variables and call parameters on the stack.
It addresses them as `[BP + displacement]`, and within one function
activation the displacement alone names the variable. A predictor that sits
at the decode stage can exploit this. It remembers, per displacement, which
operation last wrote or read that stack slot, and the address and data that
operation used. A later BP-based load of the same displacement can then get
its value before its address is even computed. Because BP changes at every
call, the table is kept per call level, as a small stack of *frames*
switched by CALL and RET.

This repository holds synthesizable SystemVerilog for that predictor in its
*classified* form. BP-based loads and stores use the frame mechanism above.
All other loads go to a conventional address predictor. Both kinds of
prediction are recorded in one shared FIFO and checked when the load/store
unit executes the operation. An input switches between the classified mode
and the plain semantic-based mode. The rest of the core (fetch, decode,
reservation stations, reorder buffer, execution units, caches) is not part
of this code. The predictor connects to it through a decode-side port and an
execute-side port.

## The framed-stack buffer (FSB)

The FSB has `NUM_FRAMES` frames of `FRAME_ENTRIES` entries. Each entry holds:

| field | meaning |
|---|---|
| `v` | entry in use |
| `tag` | upper displacement bits (the lower bits are the entry index) |
| `dep uPC` | the operation that owns the slot: the last store to it, or the first load that missed |
| `addr`, `data` | what that operation accessed, once it has executed |
| `dval` | `addr`/`data` are present |

A `frame_selector` points at the frame in use. The displacement is split
directly, with no scaling: the low `log2(FRAME_ENTRIES)` bits are the index,
the rest the tag. Two displacements with the same index therefore evict each
other.

## What happens to a BP-based operation

**At decode** (one micro-op per cycle, in program order) the indexed entry of
the current frame is read, and one of three things happens:

1. **Store, or load that misses** (entry invalid or tag differs). The
   operation takes the entry: it writes the tag, sets `dep uPC` to its own
   uPC and clears `dval`. Its PVB record gets state *initial*.
2. **Load that hits an entry holding data.** The entry's data goes to the
   result bus at once (`rb_*`). The PVB record gets state *predict* and holds
   the producer's uPC and address. A store before the load gives
   store-to-load forwarding. A load before the load gives load-to-load reuse.
3. **Load that hits an entry whose producer has not executed.** Nothing is
   predicted. The record gets state *depend*, and the producer's uPC is
   reported so that the scheduler can order the load behind it.

For cases 2 and 3 the producer's uPC appears on `dep_*`.

**At execute** the load/store unit presents the operation's uPC, its
computed address and the data it stored or loaded. The PVB record, found by
uPC, decides what the verify logic does:

* **initial**: address and data are written into the FSB entry. This is
  done only if the entry's `dep uPC` still names this operation. If a younger
  operation has taken the slot since, the write is dropped.
* **predict**: the computed address is compared with the recorded one.
  * Equal: `ex_res = VERIFIED`. The load needs no cache access, and its
    result-bus value stands.
  * Different: `ex_res = RECOVER`. The core must replay the load and its
    dependents. The FSB entry is rewritten with this load's address and data,
    and the load becomes the entry's producer.
* **depend**: nothing to check (`ex_res = DEPEND`).

Only addresses are compared. A store that reaches a stack slot through a
non-BP pointer, between producer and load, is not seen. The load then
verifies with stale data.

## Frames, CALL and RET

A CALL moves the selector to the next frame and clears it. A RET clears the
current frame and moves back. With fewer frames than the call depth, the
frames form a ring: a deep call reuses, and clears, the oldest frame. The
selector keeps a count of live frames (1..`NUM_FRAMES`). When a RET lands on
a frame that was reused meanwhile, that frame is cleared too. Otherwise the
returning function would see another function's slots. `frame_overflow` and
`frame_underflow` flag these two events. With the default two frames, a
caller keeps its entries across one level of calls. The ring, the live count
and the clearing on RET are this design's resolution of cases the underlying
scheme leaves open.

## The classified scheme and the address predictor

The `op_classifier` routes each decoded memory op:

* BP-based loads and stores go to the FSB.
* Other loads go to the address predictor, when `csb_en = 1`.
* Other stores are ignored.

The address predictor (`ad_predictor`) is a simple stand-in for the
selective address/dependency predictor this scheme is combined with. It is a
direct-mapped table indexed by the load's instruction address. Each entry
holds the last address and two 2-bit counters:

* **confidence**: up when the address repeats, down when it changes.
* **filter**: up when an issued prediction was wrong, down when the address
  repeats.

It predicts the last address when confidence is 3 and filter is below 2. A
predicted address leaves on `spec_*` for a speculative cache access and is
verified at execute, like the FSB predictions. The dependence and forwarding
parts of the original address/dependency predictor are not modelled.

## The prediction valid buffer (PVB)

The PVB is a FIFO of `PVB_DEPTH` records, `{uPC, dep uPC, addr, state}`. It
also stores the FSB frame and index, so that execute-stage write-backs find
their entry. Records are written in decode order. At execute they are found
by a fully associative uPC search and marked done. They leave from the head
once done. While the FIFO is full, `dec_ready` is low and decode must stall.
`flush` empties the FIFO when the core squashes in-flight operations. FSB
entries that point at squashed operations stay as they are: later loads see
them as *depend* until a new owner takes the slot.

## Top-level interface (`csb_predictor`)

| group | signals | timing |
|---|---|---|
| decode | `dec_valid`, `dec_ready`, `dec_kind` (`lsp_pkg::uop_kind_e`), `dec_base_bp`, `dec_disp`, `dec_upc`, `dec_pc` | one op per cycle when `dec_valid && dec_ready` |
| result bus | `rb_valid`, `rb_upc`, `rb_data` | 1 cycle after decode |
| dependence | `dep_valid`, `dep_upc`, `dep_on` | 1 cycle after decode |
| speculative access | `spec_valid`, `spec_upc`, `spec_addr` | 1 cycle after decode |
| execute | `ex_valid`, `ex_upc`, `ex_pc`, `ex_kind`, `ex_base_bp`, `ex_addr`, `ex_data` | one op per cycle, at least 1 cycle after its decode |
| outcome | `ex_res_valid`, `ex_res_upc`, `ex_res` (`lsp_pkg::ex_result_e`) | 1 cycle after execute |
| control/status | `csb_en`, `flush`, `frame_sel`, `frame_overflow`, `frame_underflow`, `pvb_count`, `stat_*` | |

Conventions:

* The uPC is a tag that must be unique among in-flight micro-ops.
* Decode must not present a memory op in the same cycle as a CALL or RET.
  With one op per cycle this holds by construction.
* Reset (`rst_n`) is active-low and asynchronous. It clears valid bits,
  pointers and output valids, but not table contents.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_FRAMES` | 2 | recommended configuration (two frames) |
| `FRAME_ENTRIES` | 128 | recommended configuration (performance saturates beyond 128) |
| `DISP_W` | 16 | x86 8/16-bit displacement |
| `ADDR_W` | 32 | x86 32-bit offset |
| `DATA_W` | 32 | chosen |
| `UPC_W` | 16 | chosen |
| `PVB_DEPTH` | 32 | chosen (power of two) |
| `AD_ENTRIES` | 256 | chosen (power of two) |
| `PC_W` | 32 | chosen |

The frame-size study behind the recommendation used eight frames of 16 to
512 entries. `NUM_FRAMES = 8` with `FRAME_ENTRIES` up to 512 is a legal
setting. So is `NUM_FRAMES = 1`, the lowest-cost option: every CALL and RET
then empties the single frame, so only reuse within one function activation
is tracked. `FRAME_ENTRIES` must be a power of two below `2**DISP_W`.

## Files

`rtl/` holds the design:

| file | content |
|---|---|
| `lsp_pkg.sv` | micro-op kinds, PVB states, execute outcomes |
| `csb_predictor.sv` | top level |
| `op_classifier.sv` | routing of decoded ops |
| `semantic_predictor.sv` | frame selector + FSB + decode decision |
| `frame_selector.sv` | CALL/RET frame pointer and frame clearing |
| `framed_stack_buffer.sv` | the frames (register arrays) |
| `prediction_valid_buffer.sv` | shared PVB FIFO |
| `verify_logic.sv` | execute-stage decision |
| `ad_predictor.sv` | address predictor for non-BP loads |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

* `tb_csb_predictor` runs the whole predictor at its default parameters. It
  plays a core executing a random program with nested calls, BP updates
  inside functions, global loads with constant, alternating and random
  addresses, pointer stores, flushes, slow load/store phases that fill the
  PVB, and a final SB-only phase. It checks these properties:
  * every prediction names a producer with the same displacement in the
    same function activation;
  * predicted data equals that producer's data;
  * verified loads carry the value in memory;
  * every outcome is the one the recorded prediction implies.

  It also counts each mechanism (forwarding, reuse, dependence, verify,
  recover, frame reuse, lost frame, address prediction hit and miss, stall,
  flush, ignored store, SB-only mode) and fails if one never occurs.
* `tb_csb_frame_study` runs the same program on the eight-frame,
  512-entry configuration.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/lsp_pkg.sv rtl/*.sv \
    tb/tb_csb_predictor.sv --top-module tb_csb_predictor -Mdir obj
./obj/Vtb_csb_predictor
```

Smaller testbenches need only their module's files. Every testbench
finishes in seconds.

## Limits and departures

* **Width.** One decode and one execute operation per cycle. A wider core
  would need the FSB lookup to see older ops of the same decode group, and
  several execute write ports. Neither is built.
* **Verification.** Addresses are compared, data is not (see above).
* **Waiting loads.** The *depend* state, and the dependence output for every
  load that hits, are this design's handling of a hit whose producer has not
  executed yet.
* **Address predictor.** It is a minimal last-address predictor with
  confidence and filter counters, not a full address/dependency predictor.
* **Storage.** The FSB, PVB and predictor tables are flip-flop arrays. No
  SRAM macros are assumed; the per-frame valid bits must be able to clear in
  one cycle.
* **Recovery.** Replay of mispredicted loads and squash of their dependents
  belong to the core. The predictor only reports them (`ex_res = RECOVER`)
  and accepts `flush`.
* **Assertions.** The assertions (no PVB overrun; no CALL/RET together with
  a memory op) use `disable iff (!rst_n)`. This is why Verilator reports
  `rst_n` as used both synchronously and asynchronously; the warning is
  expected.
