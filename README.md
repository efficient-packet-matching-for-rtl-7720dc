# TCAM-based packet matching for gigabit intrusion detection

A network intrusion detection system has to do two lookups on every packet.
It compares the payload against thousands of content signatures, and it
compares the header against a few hundred header rules. A ternary CAM
(TCAM) searches all of its entries in one clock and supports "don't care"
bits, so it looks like the ideal engine for both. Two limits get in the way:

* **Signatures longer than a TCAM entry.** A TCAM key is at most 64 bytes
  wide, and 16 bytes if it is to run at full speed. Snort signatures run up
  to 122 bytes, and other rule sets go longer.
* **Port ranges.** A rule such as "source port 80..65535" is not a ternary
  pattern. Expanding it into prefixes can turn one rule into hundreds of
  entries.

This RTL implements the two engines of the scheme published as *"Efficient
Packet Matching for Gigabit Network Intrusion Detection using TCAMs"*:

* `payload_engine` chains two TCAMs so that any signature of up to
  `N_PIECES x L1_BYTES` bytes is found at one byte per clock.
* `header_engine` stores each header rule once in a TCAM with its port
  ranges wildcarded. It checks the real ranges afterwards with small
  comparator units, and it reports every rule that matches a packet in the
  same clock.

`nids_match_top` places the two engines side by side. They share only
clock and reset. Everything upstream and downstream of them lies outside
this RTL. Upstream, TCP/IP processing delivers the reassembled byte stream
and the 5-tuples. Downstream, header and content results are combined into
rule IDs. The top brings all inputs, table-load ports and results out as
plain ports.

All defaults are the published main configuration:

| engine | part | default |
|---|---|---|
| payload | TCAM_1 (front) | 16 bytes x 2976 entries, 12-bit index |
| payload | TCAM_2 (back) | 8 fields x 12 bits (12 bytes) x 610 entries |
| payload | rate | 1 byte/clock (2.128 Gb/s at 266 MHz) |
| header | header TCAM | 16 bytes x 300 entries |
| header | range slots per entry | 20, so 20 Range List RAMs of 300 x 8 bytes (48000 bytes) |
| header | rate | 1 header/clock (250 Mpps at 250 MHz) |

The RTL fixes only the rate per clock. The clock frequencies come from the
original work and have not been checked against any technology.

---

## 1. Cascade TCAMs: matching signatures longer than a TCAM entry

### Pieces and the front TCAM

Take `L1` as the TCAM_1 width in bytes. Signatures of up to `L1` bytes are
*short*. Each is stored whole in TCAM_1, padded at the end with don't-care
bytes. Longer signatures are cut into `L1`-byte *pieces*, and the last
piece is padded the same way. Every piece also gets a TCAM_1 entry.

Each clock, one stream byte enters `byte_window`, and TCAM_1 is searched
with the last `L1` bytes. The oldest byte is in the most significant
position. A padded entry therefore matches when its first byte is the
oldest byte of the window.

TCAM_1 reports only the lowest matching index, so the load order matters.
**Longer entries must sit at lower indexes.** Suppose both `EFGH` and
`EFG*` are loaded:

* If `EFGH` sits below `EFG*`, a hit on `EFGH` means "both matched" and a
  hit on `EFG*` means "only `EFG*` matched".
* In the opposite order, `EFGH` could never be reported.

This is called *true inclusion*. The back TCAM has to account for it (see
below).

### The index FIFO and the back TCAM

Every TCAM_1 search pushes one word into `index_fifo`. The word is the
12-bit hit index, or the invalid code (all ones) on a miss. The FIFO is
`(N_PIECES-1)*L1 + 1` words deep. Number the words A_1 (oldest) to A_113
(newest). The TCAM_2 key is made of `N_PIECES` of them:

    key = { A_1, A_1+L1, A_1+2*L1, ..., A_1+(N_PIECES-1)*L1 }   (A_1 in the top field)

These words are the TCAM_1 results for windows exactly `L1` bytes apart,
which is where the successive pieces of one signature land. A TCAM_2 entry
is the list of piece indexes of one long signature, first piece first. The
unused trailing fields are don't care.

Because of true inclusion, one signature may need several TCAM_2 entries.
Consider the pieces `ABCD` `EFG*` of a 7-byte signature. A stream holding
`ABCDEFGH` makes TCAM_1 report `EFGH` rather than `EFG*`. The signature
therefore needs both `{ABCD, EFG*}` and `{ABCD, EFGH}`. `long_cid_table`
maps each TCAM_2 entry to the signature's content ID (CID), so the output
names the signature, not the entry.

A long signature is recognised when its *first* piece reaches A_1. The
latency after the first piece is therefore fixed at `(N_PIECES-1)*L1`
FIFO pushes, however many pieces the signature has.

### Short patterns

`true_value_table` holds one bit per TCAM_1 entry, set for entries that
are short signatures. A TCAM_1 hit whose bit is set is reported at once on
`short_valid`/`short_cid`. The CID is the TCAM_1 index. An index that by
true inclusion also implies shorter signatures is reported once, as that
index; mapping it to every signature it implies is left to the consumer.

### Timing

Edges are counted from the clock edge that takes a byte into the window:

| edge | event |
|---|---|
| 0 | window holds the byte |
| 1 | TCAM_1 result |
| 2 | **short report**; index FIFO push |
| 3 | TCAM_2 result |
| 4 | **long report** |

* **Short report:** 2 clocks after the byte that completes the window.
* **Long report:** 4 clocks after the stream byte that lies
  `(N_PIECES-1)*L1` bytes (112 by default) after the one that completed
  the first piece.
* **Stalls:** `in_valid` low stalls the stream. Nothing is searched and the
  FIFO holds, so a long match is still found across idle cycles.

### Loading the payload tables

* **TCAM_1 and its flag.** `t1_wr_*` writes one TCAM_1 entry per clock.
  `t1_wr_mask` is a care mask, 1 = compare. The short flag is written with
  the entry.
* **TCAM_2 and its CID.** `t2_wr_*` writes one TCAM_2 entry and its CID.
* **Order.** Sort TCAM_1 entries by descending significant length.
* **Index 0.** Do not load an entry whose first byte is 0x00. The window
  resets to zeros.
* **Index limit.** Keep every TCAM_1 index below `2**A_W - 1`, because all
  ones is the invalid code. `A_W = $clog2(N1+1)` guarantees this when
  addresses stay below `N1`.

---

## 2. Range matching beside the TCAM

### Idea

Each header rule goes into the header TCAM once, with its port ranges
replaced by don't-care bits. Exact ports and exact IP prefixes stay as they
are. A range can be narrowed to its common leading bits: for example,
[4096, 8000] becomes `0x1***`.

Rules that look the same after wildcarding share one entry. The TCAM
returns HID2, the index of the entry that matched first. Three tables
behind it hold the rest:

* **`index_control`**, addressed by HID2, gives three fields:
  * `Index`: the row to read in the Range List.
  * Up to `K_RANGES` **Range HID1** values: the original rule numbers that
    this entry may stand for once their port ranges are checked. Slot *i*
    belongs to Range List sub-table *i*.
  * A **Simple HID1**: the rule without port ranges that this entry stands
    for.
  * HID1 = 0 means "none".
* **`range_list_bram`** x `K_RANGES`: sub-table *i*, row `Index`, holds the
  *i*-th range couple `{SL, SH, DL, DH}` of that entry. All couples are
  read in the same clock. Empty rows hold the invalid couple
  (SL = DL = 65535, SH = DH = 0), which no port satisfies.
* **`rme`** x `K_RANGES` (range matching engine): four 16-bit comparators
  give `Y = (SL <= sport <= SH) && (DL <= dport <= DH)`. Bounds are
  inclusive.
* **`result_mask`**: reports every Range HID1 whose Y is 1, together with
  the Simple HID1.

### Worked example (used by the testbenches)

| rule (HID1) | src | dst | sport | dport | proto |
|---|---|---|---|---|---|
| 1 | EXTERNAL_NET | HOME_NET | 110 | 23 | ICMP |
| 2 | EXTERNAL_NET | any | any | any | TCP |
| 3 | EXTERNAL_NET | any | 4096..8000 | 80 | TCP |
| 4 | EXTERNAL_NET | any | 80..4000 | any | TCP |
| 5 | EXTERNAL_NET | any | 80..65535 | any | TCP |

| TCAM addr (HID2) | TCAM sport / dport | Index | Range HID1 slots | Simple HID1 |
|---|---|---|---|---|
| 0 | 0x006E / 0x0017 | - | - | 1 |
| 1 | 0x1*** / 0x0050 | 1 | 3, 5 | - |
| 2 | 0x0*** / **** | 2 | 4, 5 | - |
| 3 | **** / **** (rules 2 and 5 share it) | 3 | 5 | 2 |

Range List sub-table 0 (source range; every destination range is 0..65535):

| Index | source range |
|---|---|
| 1 | 4096..8000 |
| 2 | 80..4000 |
| 3 | 80..65535 |

Range List sub-table 1:

| Index | source range |
|---|---|
| 1 | 80..65535 |
| 2 | 80..65535 |
| 3 | invalid |

**Completeness depends on the table contents.** Rule 5 is listed under
every entry that a rule-5 packet can hit first. Rule 2's Simple HID1
appears only under the shared entry. A TCP packet from outside with source
port 100 therefore hits entry 2 and reports rules 4 and 5, but not rule 2.
The hardware reports exactly what the tables list. Software that wants
every match must place each rule's HID1 under every entry that includes
it. There is only one Simple HID1 field per entry, so at most one simple
rule can be listed per entry.

### Pipeline and timing

| clock edge after the header is pushed | stage |
|---|---|
| 1 | header TCAM result (HID2) |
| 2 | Index Control read |
| 3 | Range List read |
| 4 | RME compare + mask, **result** |

* **Ports:** the packet's ports travel alongside the pipeline to the RMEs.
* **Rate:** one header per clock.
* **Output:** `out_valid` comes once per header, whether anything matched
  or not.
* **Header queue:** `header_fifo` is popped every clock it holds a header,
  so it can only fill if pushes outrun one per clock. `hdr_overflow`
  flags a refused push.
* **Key layout:** the header TCAM key is the 104-bit 5-tuple
  `{src_ip, dst_ip, src_port, dst_port, proto}` in its top bits. The
  remaining 24 bits are zero; write them as don't care.

### Loading the header tables

* `tc_wr_*`: a TCAM entry.
* `ic_wr_*`: a whole Index Control entry.
* `rl_wr_*`: one Range List row, in sub-table `rl_wr_sel`.
* Write every Range List row that some Index points at.
* Fill unused slots with `nids_pkg::RANGE_INVALID`.

---

## 3. Files

| file | role |
|---|---|
| `rtl/nids_pkg.sv` | `header_t` (5-tuple), `port_range_t`, `RANGE_INVALID` |
| `rtl/tcam.sv` | first-match ternary CAM, write port, 1-clock registered search |
| `rtl/byte_window.sv` | TCAM_1 input window |
| `rtl/true_value_table.sv` | short-pattern flags |
| `rtl/index_fifo.sv` | TCAM_2 input FIFO and taps |
| `rtl/long_cid_table.sv` | TCAM_2 entry -> long signature CID |
| `rtl/payload_engine.sv` | cascade-TCAM payload engine |
| `rtl/header_fifo.sv` | header queue |
| `rtl/index_control.sv` | HID2 -> Index, Range HID1 slots, Simple HID1 |
| `rtl/range_list_bram.sv` | one Range List sub-table |
| `rtl/rme.sv` | range matching engine (4 comparators) |
| `rtl/result_mask.sv` | multiple results mask |
| `rtl/header_engine.sv` | range-matching header engine |
| `rtl/nids_match_top.sv` | both engines |

Every module has a testbench `tb/<module>_tb.sv`. The testbenches compute
their expected results independently of the design: by string search over
the stream for the payload engine, and from the rule definitions for the
header engine.

* `tb/payload_engine_tb.sv` loads the classic small example: `L1` = 4,
  patterns `ABCDEFG` and `EFGHIJKLAB`, both true-inclusion cases.
* `tb/header_engine_tb.sv` loads the five-rule example above.
* `tb/nids_match_top_tb.sv` runs both engines at their **full default
  sizes**:
  * a 122-byte signature using all 8 TCAM_2 fields;
  * a true-inclusion case;
  * short signatures;
  * stream stalls;
  * the header example read through all 20 range slots.

  It checks every report for value and exact clock, and it fails if any of
  these mechanisms never happened.
* `tb/nids_capacity_tb.sv` fills every table to its full default size:
  * 2976 TCAM_1 words, 610 TCAM_2 entries and 300 header TCAM entries;
  * every header entry uses all 20 range slots.

  It then checks a stream with planted signatures and random headers. Each
  report is checked for value and exact clock.

## 4. Simulating

Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/nids_pkg.sv \
        tb/nids_match_top_tb.sv --top-module nids_match_top_tb
    ./obj_dir/Vnids_match_top_tb

Replace the testbench name to run another one. Each testbench prints
`TB_RESULT checks=N failures=M` and finishes. The full-size top-level run
takes about 12 s to build and under a second to simulate.

To change a size, override the top's parameters:

* `L1_BYTES`, `N1`, `N_PIECES` and `N2` for the payload engine;
* `N_ENTRIES`, `RL_DEPTH`, `K_RANGES` and `FIFO_DEPTH` for the header
  engine.

The derived widths (`A_W`, `N2_W`, `HID2_W`, `IDX_W`) follow automatically.
`HID1_W` (default 9) must hold the largest rule number plus the 0 code.

## 5. What is taken from the source and what is not

Taken from the published scheme:

* the cut-and-pad piece scheme and the longest-first ordering;
* the FIFO depth and taps, the invalid word and the true value table;
* multiple TCAM_2 entries per signature;
* the TCAM / Index Control / split Range List / RME / Mask structure;
* the four-comparator RME;
* all default sizes.

Choices made in this RTL, where the source says nothing:

* **Table loading:** a write port on every table, one entry per clock.
  Entries can be rewritten while searching; a write takes effect on the
  next clock.
* **Invalid codes:** all ones in the index FIFO; the invalid range couple;
  HID1 = 0 for "none".
* **Pipeline registers:** the placement, and so the latencies above.
* **Header key:** the bit layout.
* **Stalls:** the stall input of the payload engine.
* **Header FIFO:** the depth (16).
* **Range bounds:** inclusive.
* **Long-signature CID table:** a separate RAM behind TCAM_2.
* **TCAM reporting:** a TCAM miss is reported explicitly (`hit` = 0).
* **Reset:** flags and pipeline registers are reset; table contents are
  not.

Not provided:

* the TCP offload / flow reassembly that feeds the engines;
* the logic that combines header IDs, content IDs and rule options into
  rule IDs and actions;
* the off-line compiler that splits signatures, orders entries and builds
  the tables.

The testbenches do this last step by hand for their examples.

The TCAMs are written as ordinary synthesizable logic of the same function
as the commercial TCAM chips the scheme assumes. This is realistic for
TCAM_2 and the header TCAM. A 2976 x 128-bit TCAM_1 built from flip-flops
and comparators is very large, and a real implementation would use a TCAM
device or macro with the same interface.
