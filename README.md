# Dual-dictionary ComPacket instruction decompressor

RISC code is bulky. This design lets a SPARC v8 processor run code that is
stored compressed in its instruction cache and memory. A decompressor sits
between the cache and the processor and expands the code on the fly. More
code fits in the cache, so fewer fetches go to main memory. The code image
shrinks too.

The compression replaces runs of two to four instructions by one 32-bit
**ComPacket**. A ComPacket holds 6- or 8-bit indexes into a small instruction
**dictionary**. This design has two dictionaries:

* the **inner-loop dictionary** (64 entries), filled with the instructions
  that the hot inner loops execute most, for speed;
* the **outer dictionary** (256 entries), filled with the instructions that
  occur most often in the rest of the code, for size.

A one-bit register, **Sel Dict**, chooses which dictionary the indexes refer
to. The compressor places a **ChgDict** instruction in the pre-header of each
inner loop and after the loop's exit. ChgDict switches Sel Dict. So inner
loops expand through the inner-loop dictionary and all other code through the
outer one. The same index means a different instruction in each region. This
is why the scheme is called *dual selective*: all of the code is compressed,
and the region decides which dictionary is in force.

Decompression adds no pipeline cycle. With one-cycle fetches the processor
receives one instruction per clock, whether it is a plain word or a slot of a
ComPacket.

## Code-word encodings

Every fetched 32-bit word is one of three kinds.

| kind | how it is recognised | what the processor gets |
|---|---|---|
| ComPacket | `w[31:30]=00`, `w[23:22]=01` (SPARC format-2 `op2` = 001 or 101, unused in v8) | 2–4 instructions from the selected dictionary |
| ChgDict | `w[31:30]=00`, `w[24:22]=011` (`op2` = 011, unused in v8) | one `nop` (`0x01000000`); Sel Dict ← `w[0]` |
| anything else | – | the word unchanged |

The ComPacket header has the escape (4 bits), **TT** (2), **S** (1) and
**B** (1). The other 24 bits are the payload:

```
 31 30 | 29 28 | 27 | 26 | 25 24 | 23 22 | 21 ............ 0
  0  0 |  TT   |  S |  B | P23:22|  0  1 |  P21:0
```

The first instruction to run is in the most significant payload bits.
`{S,B}` selects the format:

| format | S | B | payload | instructions | dictionary reach |
|---|---|---|---|---|---|
| 4  | 0 | 0 | 4 × 6-bit index | 4 | entries 0–63 |
| 3  | 1 | 0 | 3 × 8-bit index | 3 | entries 0–255 |
| 3B | 0 | 1 | 3 × 6-bit index + 6-bit offset | 3 | entries 0–63 |
| 2B | 1 | 1 | 2 × 8-bit index + 8-bit offset | 2 | entries 0–255 |

**Branch formats (3B, 2B).** The last instruction of the packet is a branch.
The dictionary holds the branch with a zero displacement. The packet carries
the real offset. `branch_patch` sign-extends it into `disp22` (Bicc, FBfcc,
CBccc) or `disp30` (CALL). The offset counts words in the *compressed*
address space. The compressor patches all branch targets to that space.

**TT, the branch-entry slot.** A branch may land in the middle of a ComPacket.
At most one slot per packet can be a target, and TT names it. TT applies only
when the packet is reached by a branch (a redirect). When execution reaches
the packet sequentially, expansion starts at slot 0.

The four field widths and formats are those of the ComPacket method. The bit
positions, the ChgDict encoding and "branch = last slot" are choices of this
implementation. They are collected in `rtl/compacket_pkg.sv`, so they are
easy to change.

## How the decompressor works

`dsc_decompressor` (the top) has the following parts:

```
            fetch port                        processor port
 cache  <-> [dict_loader]--+                    inst_valid/ready/data
            [fetch logic]--+-> fetch_queue -> compacket_decode -> slot counter
                                                   |                 |
                                        dual_dictionary (inner|outer, Sel Dict)
                                                   |
                                              branch_patch -> inst_data
```

* **Fetch logic.** Keeps the next sequential word address. It issues one
  request at a time, and a new request may leave in the cycle the previous
  answer arrives. It keeps prefetching until the 3-entry `fetch_queue` (with
  the request in flight) is full. So while a ComPacket is being expanded, the
  next word is normally already inside.
* **Expansion.** The queue head is decoded combinationally. A slot counter
  walks through the ComPacket's indexes. Both dictionaries are read
  asynchronously with the current index. Sel Dict picks one result, and
  `branch_patch` completes the branch slot. The head leaves the queue when
  its last slot is taken.
* **ChgDict.** It is delivered as a `nop` with `inst_bubble` set. Sel Dict
  takes the new value when the processor accepts that `nop`, so the very
  next word already uses the new dictionary. Sel Dict is 1 (outer) after
  reset.
* **Redirect.** `redirect_valid` (a taken branch, call or trap) empties the
  queue and resets the slot counter. A request still in flight is marked,
  and its answer is dropped. Fetching restarts at `redirect_addr`. The first
  word fetched there is flagged as a branch entry, so a ComPacket starts at
  its TT slot. No instruction is taken in a redirect cycle.
* **Dictionary boot.** The dictionaries belong to the program. If
  `dict_boot` is 1 in the first cycle after reset, `dict_loader` uses the
  fetch port to copy 64 + 256 words from `DICT_BASE`, inner-loop dictionary
  first. `DICT_BASE` defaults to the top 320 words of the 1 MB space. This
  takes about one cycle per word, and `boot_busy` is high meanwhile. Code
  fetching starts at `RESET_ADDR` afterwards. With `dict_boot` at 0, the
  `dict_we/dict_sel/dict_addr/dict_wdata` port loads the dictionaries from
  outside instead. That port accepts writes at any time, including during
  reset. If it writes in the same cycle as the boot loader, the loader's
  write wins.

The processor interface reports, with each instruction, the word address
(`inst_addr`) and slot (`inst_slot`) it came from. A processor needs this to
form return addresses and branch-target addresses in the compressed space.

### Interfaces and timing

| group | signals | protocol |
|---|---|---|
| fetch | `fetch_req_valid/ready/addr`, `fetch_rsp_valid/data` | one request in flight; in-order answer ≥ 1 cycle after acceptance |
| processor | `inst_valid/ready/data/addr/slot/bubble` | valid/ready; data is combinational from the queue head |
| redirect | `redirect_valid/addr` | one-cycle pulse; flushes |
| dictionaries | `dict_boot`, `boot_busy`, `dict_we/sel/addr/wdata` | see above |
| status | `sel_dict` | 0 inner, 1 outer |

Latency: after a redirect, the first instruction appears two cycles after
the target request is accepted, given a one-cycle cache. After that the rate
is one instruction per cycle. ChgDict costs one slot, the `nop`.

Assertions check the following rules:
* a branch lands only on a slot that the packet holds (TT < number of slots);
* code in an inner-loop region uses only indexes below `INNER_DEPTH`;
* the memory never answers without a request;
* the fetch queue never overflows or underflows.

## Parameters

| parameter | default | origin |
|---|---|---|
| `INNER_DEPTH` | 64 | main configuration of the method (64/256) |
| `OUTER_DEPTH` | 256 | main configuration; 8-bit indexes cap it at 256 |
| `ADDR_W` | 18 | word address of a 1 MB code memory |
| `QDEPTH` | 3 | implementation choice: enough for one instruction per cycle with one-cycle fetches |
| `RESET_ADDR` | 0 | implementation choice |
| `DICT_BASE` | 2^18 − 320 | implementation choice |

Other dictionary sizes (32–256 for either dictionary) are plain parameter
changes. A region meant to have no dictionary simply contains no
ComPackets.

## Files

| file | contents |
|---|---|
| `rtl/compacket_pkg.sv` | encodings, `word_info_t`, `fetch_entry_t`, `SPARC_NOP` |
| `rtl/compacket_decode.sv` | word classifier and ComPacket unpacker |
| `rtl/dict_ram.sv` | one dictionary, synchronous write, asynchronous read |
| `rtl/dual_dictionary.sv` | both dictionaries, Sel Dict, output mux |
| `rtl/branch_patch.sv` | offset insertion into the branch slot |
| `rtl/fetch_queue.sv` | fetched-word FIFO with flush |
| `rtl/dict_loader.sv` | boot-time copy of the dictionaries from memory |
| `rtl/dsc_decompressor.sv` | top: fetch logic, expansion, redirect |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `loop_walkthrough_tb` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself. It
also has a cycle watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/compacket_pkg.sv rtl/*.sv \
    tb/dsc_decompressor_tb.sv --top-module dsc_decompressor_tb -Mdir obj
./obj/Vdsc_decompressor_tb
```

For a block testbench, list the package, the block's files and its
testbench in the same way.

`dsc_decompressor_tb` runs the top at its default sizes. It acts as
compressor, memory and processor:
* It builds random dictionaries whose branch entries have zero displacement.
* It builds a 3000-word compressed image with all four formats, random TT
  slots and offsets, and ChgDict-delimited inner-loop regions. The dictionary
  image sits at `DICT_BASE`.
* It boots the decompressor from that image.
* It checks the boot load (320 words in 322 cycles).
* It checks one instruction per clock on straight-line code.
* It then runs 60,000 cycles with the following, all at random:
  * fetch latency of 1–4 cycles;
  * fetch back-pressure;
  * processor stalls;
  * branches to any word of the currently active region.

Every delivered instruction, and its address and slot, is compared with a
model computed from the fields the testbench packed, not by decoding words.
The test also counts how often each mechanism occurred, and any count of
zero is a failure. The mechanisms are: boot load, each format, ChgDict in
each direction, entry at TT > 0, Bicc and CALL patching, stalls, fetch waits
and dropped fetches. The full run takes well under a second.

`loop_walkthrough_tb` is a directed test of one inner loop. It uses
memory with two-cycle accesses and loads the dictionaries through the
external port. The code runs as follows:
* a plain instruction;
* a ChgDict into the inner-loop dictionary, which gives a `nop`;
* a five-word loop body with formats 2B, 4 and 3B, taken 50 times by a
  backward branch;
* one branch into slot 1 of the last packet, to exercise TT;
* a ChgDict back to the outer dictionary;
* a format-3 packet.

Index 2 must return the inner-loop entry inside the loop and the outer entry
after it. The test checks all 560 instructions, both bubbles and a cycle
budget. It measures 969 cycles.

## Limits and departures

* **Not included.** The processor, the instruction cache and main memory are
  outside this design. They connect through the fetch and processor ports,
  and the testbench models them.
* **No compressor.** The software compressor (dictionary selection, packet
  marking, ChgDict placement, address patching) is not part of this RTL. The
  top testbench contains a small random generator for it.
* **Processor coupling.** The processor side is a decoupled stream with an
  explicit redirect. A tightly pipeline-integrated version would take the
  fetch address from the processor's PC each cycle instead. Delay-slot
  handling is left to the processor: it raises `redirect_valid` once the
  delay-slot instruction has been taken.
* **Encoding positions.** The bit positions and the ChgDict encoding are this
  implementation's own, as described above. ChgDict carries an explicit
  dictionary value rather than toggling.
* **Inner-loop index range.** Indexes used inside inner loops must be below
  `INNER_DEPTH`. The inner dictionary sees only the low index bits, and an
  assertion flags a violation.
* **Synthesis.** The dictionaries are arrays with an asynchronous read (LUT
  RAM or flip-flops). A block-RAM mapping would need a registered read and one
  more pipeline stage.
* **Idle outputs.** Synthesis reports some outputs as idle:
  * `dict_loader.dict_wdata` is a straight copy of the memory data;
  * a few decoder outputs are constant for some word kinds.
