# Two-port 10 Gbps stateless firewall core

This is the FPGA part of a packet filter for two 10 Gbit/s Ethernet ports in a PC. A 10 Gbit/s
line can carry almost 15 million packets per second, one every 67 ns. That is too fast for software,
so every packet is parsed, classified against an ordered rule set and switched in hardware.
The host sees only the traffic the rules send to it.

Classification runs in constant time and needs no TCAM. Each header field is looked up on its own.
The nine results are joined into one 67-bit word. A *perfect hash* built by software maps that word
straight to the number of the first matching rule. The hash has deliberate collisions: every field
combination that should select rule *r* lands on *r*. One compare with the selected rule then
rejects packets that match nothing.

The RTL follows the block structure of the original design. That design ran on a COMBOv2 card with
a Virtex-5 FPGA and an external QDR-II SRAM. Parts it took from its platform are not included: the
XGMII input and output buffers, the DMA buffers to and from the host, the QDR-II chip and the card
interfaces. Their FrameLink and memory sides are ports of `firewall_top`.

## Data path

```
 line 0 (10G in) ──HFE──┬─ packet buffer ──HI──┐                ┌── out 0 (10G out)
 line 1 (10G in) ──HFE──┼─ packet buffer ──HI──┼── crossbar ────┼── out 1 (10G out)
 line 2 (DMA TX) ──HFE──┼─ packet buffer ──HI──┘  3x3, 9 bufs,  └─ Trimming Unit ── out 2 (DMA RX)
                        │                    ▲     DRR per out
                        └── fields ──► classifier ◄──► QDR-II (g table)
```

There are three internal lines, not two: line 2 carries packets that host software sends and
receives. Every line is 128 bits wide at 125 MHz, which is 16 Gbit/s of raw capacity.

* **HFE** (`hfe`): passes each frame unchanged to its packet buffer. It keeps the first 96 payload
  bytes and, after the last word of the frame, extracts the nine fields: source and destination MAC,
  source and destination IPv4 address, protocol, source and destination port, TCP flags, and input
  line.
* **Packet buffer** (`packet_buffer`): a 512-word FIFO per line. It holds the frame while the
  frame's fields are classified.
* **Classifier** (`classifier`): shared by all three lines. It returns one result per header, in
  each line's own order.
* **Header Insert** (`header_insert`): waits at each frame's first word for the line's next result,
  then writes the result into the FrameLink header.
* **Crossbar** (`crossbar`, `drr_arbiter`): sends each frame to the outputs named in its action.
  That can be none (drop), one, or several (copies).
* **Trimming Unit** (`trimming_unit`): shortens frames on the software output to the length the
  action asks for, which saves PCIe bandwidth.

## FrameLink words and the result field

`fw_pkg::fl_word_t` is one 136-bit FrameLink word:

| field     | meaning                                                  |
|-----------|----------------------------------------------------------|
| data      | 128 bits; byte k in data[8k+7:8k]                         |
| sof / eof | first / last word of the frame                            |
| sop / eop | first / last word of a part                               |
| rem       | index of the last valid byte of an eop word               |

Handshakes are active-high `src_rdy`/`dst_rdy`. A word moves when both are high.

A frame has two parts. The first is a single 128-bit header word (sof = sop = eop = 1). The second
is the Ethernet frame (sop on its first word, eop = eof on its last). The Header Insert writes the
classification result (`cls_result_t`) into header bits [57:32]:

| bits    | field    | meaning                                                     |
|---------|----------|-------------------------------------------------------------|
| [41:32] | rule     | rule number                                                 |
| [42]    | match    | 1 if the packet matched a rule                              |
| [45:43] | out_mask | bit i sends to output i; 0 drops                            |
| [57:46] | trim_len | Ethernet bytes kept on output 2; 0 keeps all                |

The other header bits pass through untouched. The testbenches use bits [31:0] as a frame tag.

## The classifier

This is the block that needs the most explanation. It has three stages.

**1. Field lookups**, all in parallel:

| field(s)                  | unit                           | code width | latency   |
|---------------------------|--------------------------------|-----------:|-----------|
| source / destination IPv4 | `treebitmap_lpm`, 32-bit key   | 13 / 13    | 10 cycles |
| source / destination port | `treebitmap_lpm`, 16-bit key   | 10 / 10    | 6 cycles  |
| source / destination MAC  | `mac_cam`, 31 ternary entries  | 5 / 5      | 1 cycle   |
| protocol                  | `lookup_table`, 256 entries    | 4          | 1 cycle   |
| TCP flags                 | `lookup_table`, 256 entries    | 5          | 1 cycle   |
| input line                | `lookup_table`, 4 entries      | 2          | 1 cycle   |

The faster results go through delay lines so that all nine arrive together. Together they form
`cls_key_t`, 67 bits: 13+13+10+10+5+5+4+5+2.

*Tree Bitmap.* `treebitmap_lpm` finds the longest matching prefix, using a trie with 4 bits per level.
It has one node memory and one pipeline stage per level: 9 levels for 32 bits, 5 for 16. The last
level holds only full-length prefixes. Each node word contains:

* `ib`: the internal bitmap, 15 bits, one for each prefix of length 0..3 inside the node. A prefix
  of local length j and value v uses bit 2^j − 1 + v.
* `eb`: the external bitmap, 16 bits, one for each child.
* `child_base`: where the node's children start in the next level's memory.
* `res_base`: the code of the node's first prefix.

The children of a node are stored next to each other, and so are its prefix codes. So:

* child address = `child_base + popcount(eb below the chunk)`
* prefix code = `res_base + popcount(ib below the hit)`

The prefix code is therefore the index into the result array, and no result memory is needed. Code
0 means that no prefix matched. Port ranges in rules must be split into prefixes by software first.

**2. Perfect hash** (`perfect_hash`). Two H3 hashes, h1 and h2, each give a 19-bit address. Each
H3 hash XORs together the rows of a random 67×19 matrix that match the 1-bits of the word. The rule
number is

    rule = (g[h1(w)] + g[h2(w)]) mod N

where g is a table of 2^19 ten-bit words in the QDR-II SRAM.

Software builds the hash this way:

1. List every field-code combination that some rule covers. These are the *pseudorules*: for each
   one, the first rule that covers it in every field.
2. Draw random matrices until the graph with one edge (h1(w), h2(w)) per combination has no cycles.
3. Walk each tree of that graph and choose g so that every edge sums to its rule number modulo N.

A small example shows why pseudorules are needed. Take two dimensions and three rules, ordered by
priority:

* R3 = (101\*, 100\*), highest
* R2 = (1\*, 00\*)
* R1 = (1\*, \*), lowest

The LPM results can form six combinations. Three of them are not rules, and each still needs a
rule number:

* (1\*, 100\*) gives R1
* (101\*, 00\*) gives R2
* (101\*, \*) gives R1

Many combinations map to one rule, so no pseudorule is stored anywhere. The two g reads use one QDR-II
read port in consecutive cycles. The classifier therefore accepts one header every 2 cycles, which
is 62.5 M headers/s. Three full lines need 44.6 M/s. Read data is expected `RD_LAT` (2) cycles after
the request.

**3. Compare** (`rule_check`). The rule table holds 1024 `rule_t` entries (at least 1000 rules).
Each entry has:

* value/mask for the MAC addresses, IP addresses, protocol, flags and input line
* inclusive ranges for the two ports
* an action

The header is compared with the rule the hash chose. The hash returns some rule even for a packet
that matches nothing, and this compare catches that case: such a packet gets `match = 0` and the
default-action register, which resets to "drop". For unmatched packets the rule field is whatever
the hash returned, and means nothing.

**Scheduling.** Each line has an 8-entry header FIFO and a 16-entry result FIFO. A round-robin
arbiter serves a line only while that line has result credit, so results can never overflow. A header
takes 10 + RD_LAT + 2 + 2 = 16 cycles from issue to its result FIFO.

## Crossbar and Deficit Round Robin

Each input writes every word of a frame into the crosspoint buffer of each output named in the
frame's `out_mask`, all in the same cycle. There are 9 buffers of 128 words, one per input/output
pair. An input waits only if one of those buffers is full.

When a frame is complete, its length in words is queued beside the buffer. The crossbar is
store-and-forward: a frame must fit in one crosspoint buffer (an assertion checks this). 1518-byte
frames fit.

Several inputs can load one output at once. Each output then has a Deficit Round Robin arbiter that
picks whole frames:

* Each visit to a backlogged queue adds a quantum of 96 words to its deficit.
* The queue keeps the turn while its head frame fits in the deficit.
* The deficit of an empty queue is cleared.

Over time each busy input gets an equal share of the output, measured in words. Each decision takes
one cycle.

## Trimming

On output 2, `trim_len` = L > 0 keeps the header word and the first L Ethernet bytes. The word with
byte L−1 becomes the last word, with eop = eof and `rem` adjusted. The rest of the frame is consumed
and thrown away. A frame shorter than L passes unchanged.

## Configuration

Everything the classifier uses comes from configuration software, through one write port
(`cfg_we`, `cfg_addr` = {target[3:0], index[15:0]}, 512-bit LSB-aligned `cfg_wdata`). The targets,
from `fw_pkg::cfg_target_e`:

| target | contents                                                                     |
|-------:|------------------------------------------------------------------------------|
| 0–3    | Tree Bitmap node words (sip, dip, sport, dport); index = {level, node}        |
| 4, 5   | MAC CAM entries {valid, mask, value}                                          |
| 6–8    | protocol, flags and input-line tables                                         |
| 9      | rule table; index with bit 15 set = default action                            |
| 10     | hash matrix rows (index 0..66 for h1, 128..194 for h2); index 0x100 = modulus N |
| 11     | g table word: data[50:32] = address, data[9:0] = value; sent to the QDR-II write port |

`tb/tb_fw_sw_pkg.sv` is a full model of this software:

* `tbm_builder` builds the tries.
* `chm_builder` builds the acyclic-graph hash.
* `ruleset` enumerates the pseudorules, writes every table, and classifies headers by linear search
  for reference.

## Where this design departs from the original or adds to it

These are taken from the original design:

* the three-line structure, 128 bits at 125 MHz
* the block chain HFE → packet buffer → Header Insert → crossbar → Trimming Unit
* the nine fields
* Tree Bitmap for the IP addresses and ports, CAMs for the MACs, tables for protocol and input line
* the 67-bit word
* the acyclic-graph perfect hash with two reads of external memory
* the compare step
* nine crosspoint buffers with DRR
* zero-or-more outputs per frame
* at least 1000 rules

These are this design's own choices:

* all buffer and table sizes, Tree Bitmap stride, code widths, and the 67-bit split
* H3 hash functions, the QDR-II read latency and the port timing
* rule and action encoding, and the position of the result in the header
* the default action for unmatched packets
* store-and-forward in the crossbar, and DRR counted in words
* a table for the TCP flags
* the configuration map

The HFE sends its parsed fields to the classifier as a record with valid/ready, not as a second
FrameLink stream. It handles Ethernet II with IPv4 only: no VLAN tags and no IPv6. Ports are taken
only from the first fragment of a TCP/UDP packet, and flags only from TCP. Fields a packet lacks are
zero.

FIFOs use an asynchronously read array. On an FPGA, mapping them to block RAM would add one output
register stage.

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fw_pkg.sv tb/tb_fl_pkg.sv tb/tb_fw_sw_pkg.sv tb/tb_firewall_top.sv \
    --top-module tb_firewall_top -o sim && ./obj_dir/sim
```

Replace the last file and the top with any other `tb/tb_<block>.sv`.

`tb_firewall_top` runs the whole core at its default parameters, with a behavioural QDR-II
(`tb/qdr_model.sv`):

* It builds a 12-rule set (826 pseudorule words) and loads it through the configuration port.
* It sends 80 frames on each line: TCP, UDP, ICMP and non-IPv4, 60 to 600 bytes.
* It checks every delivered frame, its header result and its trimmed length against a linear
  first-match reference.
* It fails if any of these never happened: drop, multicast, trimming, unmatched default action,
  non-IPv4 frames, DRR contention, output back-pressure, input stalls.

`tb_firewall_linerate` also runs the core at its default parameters, at 10 Gbit/s line rate:

* Each line carries minimum-size 64-byte frames. On the wire each takes 84 bytes with preamble and
  gap, so one arrives every 8.4 cycles.
* Every frame must be accepted within 16 cycles of its arrival, and every output must keep pace.
* The core stays within 1 cycle of the wire.
* The shared classifier has its limit at one frame per 6 cycles on each of three busy lines.

The other testbenches cover one block each:

* Tree Bitmap against a linear LPM search, with latency
* the CAM priority
* the perfect hash over 400 words, with latency
* the rule compare
* HFE field extraction with IHL 5..8
* the packet buffer filling up
* Header Insert pairing
* crossbar routing with multicast, drops and contention
* DRR against a cycle model, with fairness
* trimming at every kind of boundary
* the classifier end to end, including its issue rate of one header per 2 cycles
* the three-rule example above (`tb_classifier_pseudorules`): exactly six words per protocol class,
  and the right rule for each of them
