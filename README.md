# Huffman encoder for sensor-node data blocks

A wireless sensor node spends most of its energy on the radio, so sending
fewer bits saves battery. This encoder takes a block of up to 1024 32-bit
sensor samples (for example temperature readings), finds which values occur
and how often, and builds a Huffman code for them: frequent values get short
code words, rare values long ones. The result is a code table — one entry per
distinct value with its probability and its code word — from which the block
can be sent in compressed form.

The design is a chain of five modules that run one after another, each
leaving its result in on-chip memories for the next:

| Module | File | Reads | Writes |
|---|---|---|---|
| Data retriever (DR) | `rtl/huff_dr.sv` | 32-bit input port | DIM: samples |
| Frequency calculator (FC) | `rtl/huff_fc.sv` | DIM | ADM: distinct values, FADM: counts |
| Probability calculator (PC) | `rtl/huff_pc.sv` | FADM counts | FADM: probabilities (in place) |
| Huffman tree generator (HTG) | `rtl/huff_htg.sv` | FADM | APM, FAPM, LPM, LPCM, NAPM, NPCM, PNPM |
| Huffman code generator (HCG) | `rtl/huff_hcg.sv` | tree memories | HCM: code words |

`rtl/huffman_encoder.sv` is the top level: a sequencer that starts each
module when the previous one is done, and the multiplexers that hand the
shared memories from one module to the next. Beside the encoder, the top
also holds a decoder (`rtl/huff_dec.sv`) that turns a code bit stream back
into sample values using the table of the last block. `rtl/huff_alu.sv` is the small
arithmetic unit (add, subtract, divide) that FC, PC and HTG each instantiate;
`rtl/huff_ram.sv` is the one memory model used for every memory;
`rtl/huff_pkg.sv` holds the sizes and the ALU operation type.

## Memories and number formats

| Memory | Size | Holds |
|---|---|---|
| DIM, data insert memory | 1024 x 32 | the samples, in arrival order |
| ADM, arranged data memory | 512 x 32 | distinct sample values, in order of first appearance |
| FADM, frequency arranged data memory | 1024 x 16 | count of each ADM value, later its probability (same address) |
| APM / FAPM | 512 x 16 / 512 x 10 | distinct probabilities in ascending order / how many symbols have each |
| LPM, leaf probabilities | 512 x 25 | leaves in ascending probability: {ADM address, probability} |
| LPCM, leaf connectors | 512 x 10 | each leaf's {parent node, branch bit} |
| NAPM, new added probabilities | 512 x 16 | probability of each internal node (sum of its children) |
| NPCM / PNPM | 512 x 1 / 512 x 9 | each internal node's branch bit / parent node |
| HCM, Huffman codes memory | 512 x 32 | code word of each ADM value: {length[5:0], code[25:0]} |

A probability is an unsigned fixed-point number with 15 fraction bits:
`P = floor(count * 2^15 / N)`, so 1.0 is `0x8000` and fits FADM's 16 bits.
Because every count is at least 1 and N is at most 1024, every probability is
at least 32/32768; that bounds the tree depth (a Fibonacci argument gives at
most about 15 levels), so the 26-bit code field cannot overflow at the
default sizes. A code word is right-aligned and its first transmitted bit
(the one next to the root) is the most significant.

## Counting the frequencies

`huff_fc` loads the first sample into a comparator register and scans the
samples from that position to the end. Every match increments the count and
sets a "counted" flag for that sample, so the sample is not counted again.
The first sample in the pass that is neither counted nor a match becomes the
next comparator value. When a pass ends, the value goes to ADM and its count
to FADM at the next address. A pass that starts at sample i takes N − i + 2
cycles. For K distinct values spread evenly this is about K·N/2 cycles, which
makes FC the slowest module for data with many distinct values.

`huff_pc` then makes one combinational division per cycle: K cycles for K
symbols.

## How the tree is built

This is the part that takes most of the time and most of the logic.
`huff_htg` runs three phases under one state machine:

1. **Sort.** Each probability from FADM is compared against the sorted list
   in APM, from the low end. If the value is already there, its FAPM count is
   incremented (a repeated probability). If not, the entries above its place
   move up one per cycle and the value is inserted with count 1. Cost: about
   K·M/2 cycles for K symbols with M distinct probabilities.
2. **Leaves.** For each APM entry, lowest first, FADM is scanned for symbols
   with that probability; each one found becomes the next leaf in LPM. The
   scan for an entry stops as soon as FAPM's count of symbols has been found.
   The leaves end up in ascending order of probability.
3. **Merge.** The two smallest weights are repeatedly added by the ALU and the
   sum appended to NAPM as a new internal node. Since each sum is at least
   as large as the previous one, NAPM comes out sorted too, so the two
   smallest weights are always among the next unused leaf and the next
   unused node: each pick is one comparison, and the merge takes 2·(K−1)
   cycles. The first (smaller) child gets branch bit 0, the second bit 1. On a
   tie a leaf is taken before a node. With K leaves there are K−1 internal
   nodes; the last one, node K−2, is the root.

The tree is stored as parent pointers: a leaf's parent and bit in LPCM, an
internal node's parent in PNPM and its bit in NPCM. `huff_hcg` then takes the
leaves one by one and walks from each leaf up to the root, placing the leaf's
bit at position 0 of a shift register and each node's bit one position
higher. When the walk reaches the root, the length and code go to HCM at the
leaf's ADM address. A leaf at depth d costs d + 1 cycles.

A block with a single distinct value gets one leaf, no internal node and the
one-bit code `0`.

## Decoding

`huff_dec` decodes bit by bit. Each incoming bit is shifted into an
accumulator, and an address counter then compares the accumulated bits
(value and length) with the table entries, one entry per cycle. On a match
the entry's sample value is output and the accumulator cleared. If no entry
matches, the decoder waits for the next bit. A bit therefore costs one cycle
plus the number of entries compared: up to K cycles, fewer when the
matching entry is near the start of the table. Since the table is in order
of first appearance, values that appear early are found sooner. If 26 bits
match nothing, they are dropped and `dec_error` pulses. `dec_flush` drops a
partly received code. The decoder borrows the encoder's table read port, so
it takes bits only while the encoder is idle.

## Interface and timing

```
clk, rst_n          clock; asynchronous active-low reset (memories are not reset)
start               pulse while idle: open a new block
in_ready            high while samples are accepted
in_valid, in_data   one 32-bit sample per cycle when in_valid is high
in_last             with the block's final sample
busy, done          busy from start to done; done pulses when the table is ready
overflow            >1024 samples or >512 distinct values were presented;
                    the excess is left out of the table
num_samples         samples stored
num_symbols         entries in the code table
tbl_addr  ->        tbl_symbol, tbl_prob, tbl_code_len, tbl_code (combinational)
cyc_dr ... cyc_hcg  cycles spent in each module for the last block
dec_bit_valid, dec_bit, dec_bit_ready
                    code bits into the decoder, first bit of a code first;
                    taken when valid and ready are both high
dec_sym_valid, dec_symbol
                    one-cycle pulse with each decoded sample value
dec_flush, dec_error
                    drop a partial code; no code matched within 26 bits
```

Idle cycles between samples are allowed: the retriever's address counter
simply holds. The table stays readable until the next `start`. A block's
cycle count, with N samples, K distinct values and M distinct
probabilities, is roughly: DR = N plus input idle cycles; FC ≈ Σ(N − first
position of each value) + 2K; PC = K + 2; HTG ≈ K·M + 2K; HCG = Σ code
lengths + K + 3. For a synthetic block of 366 temperature readings with 18
distinct values and 1 to 2 idle cycles between samples the counts are DR 717,
FC 4927, PC 20, HTG 384 and HCG 100 cycles.

## Simulating

Each module has a self-checking testbench in `tb/`, and `tb_huffman_encoder`
runs the whole encoder at its default sizes. Every testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/huff_pkg.sv \
    tb/tb_huffman_encoder.sv --top-module tb_huffman_encoder -o sim
./obj_dir/sim
```

(`-Irtl` lets Verilator find the modules; the package is listed first.) The
module testbenches build the same way with their own name, for example
`tb/tb_huff_htg.sv --top-module tb_huff_htg`. The
end-to-end test encodes four blocks: 366 temperature readings from a random
walk, with idle cycles between samples; five equal samples; 1030 samples of
600 values, which overflows both DIM and ADM; and 1024 samples spread
geometrically over 40 values. For each block it works out the distinct
values, counts and probabilities by itself and checks them against the
table. It also checks that the codes are prefix-free, that the Kraft sum is
exactly 1, and that the average code length equals the optimum from its own
Huffman merge. Finally it encodes the block with the table and decodes it bit
by bit in software, and checks that the decoded samples match the input.
It then sends the same bit stream (up to 400 samples per block) through
the hardware decoder, and checks both the decoded values and the decoder's
scan cycles. It also checks the FC, PC and HCG cycle counts against the
formulas above. The test counts
the mechanisms it exercises and fails if one never occurs: retriever hold,
repeated probability, insertion with shifting, leaf-first and node-first
merges, single value, sample overflow, value overflow, decoder extension by
one more bit, decoder match and decoder error. The whole run takes a few
seconds.

The module testbenches check the tree generator's trees on their own terms
(every symbol appears once as a leaf, leaves ascend, each node has one
0-child and one 1-child, minimum weighted depth, Kraft equality, and the
cycle schedule). The code generator is checked against the three-value
example with probabilities 0.6, 0.1 and 0.3 (codes `1`, `00`, `01`) and
against random trees whose codes the testbench assigns root-first. The
decoder is checked with the same example table and with random complete
prefix codes of up to 512 words.

## Design choices and departures

The module split, the memory names and sizes, the 32-bit input port, the
retriever's hold-when-idle counter and the comparator-based counting in FC
come from the original architecture. So do the in-place probabilities in
FADM, the sort-with-repeat-counts into APM/FAPM, the ALU sums into NAPM and
the 0-for-lower and 1-for-higher branch bits. The following are this
design's own:

- **Probability divisor and format.** P = count / N, the number of samples,
  in 1.15 fixed point. The architecture's description of the divisor could
  also be read as the number of distinct values, but that would not give
  probabilities.
- **Memory timing.** All memories have an asynchronous read and a synchronous
  write, so each address counter reads and compares in the same cycle. A
  version built on synchronous-read SRAM macros would need one cycle of
  pipelining in each state machine.
- **Handshake.** `start`, `in_valid`, `in_last` and the combinational table
  read port are choices of this design; the source architecture does not
  say how a block begins, ends or is read out.
- **Skipping counted samples** in FC uses a 1024-bit flag register.
- **Search for the two lowest probabilities** uses the two-queue method
  described above. The tree it gives is optimal, but for tied probabilities
  it may differ from other Huffman trees; the average code length does not.
- **Tree memory contents.** LPM, LPCM, NPCM and PNPM hold what is described
  above. A separate node-probability memory (NPM) would duplicate NAPM, so
  NAPM serves as both.
- **Code generation direction.** The code generator walks leaf to root, not
  root to leaf. The codes are the same, and codes of internal nodes need no
  storage.
- **HCM word format** {6-bit length, 26-bit code}.
- **Overflow handling** (drop and flag) and **reset** (asynchronous,
  control only).
- **Subtraction in the ALU** (used to count down leaves still to find).
- **The decoder's hardware.** Decoding is given only as a procedure. The
  table scan, the serial handshake, the error rule and the sharing of the
  encoder's table port are this design's own.

Not included:

- A compressed bit-stream packer. The encoder ends with the code table in
  HCM, and how the samples are then sent is outside this design.
- Power, area and layout figures (3.729 mW, about 0.026 mm² in a 0.13 µm
  process at 20 MHz for the original chip). These come from a gate-level
  flow and cannot be judged from RTL.
- Cycle counts for the original 366-reading data set (51394 cycles in total,
  47.6 % of them in the tree generator). The readings themselves are not
  available, and the retriever's share depends on how fast samples arrive.
  With the synthetic readings above, this implementation needs about 6100
  cycles. Its tree generator is relatively cheaper because of the two-queue
  merge, and its FC is dominated by the scans.
