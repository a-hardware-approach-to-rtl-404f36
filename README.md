# KMP string-matching accelerator for protein identification

Protein identification by peptide mapping comes down to exact string matching.
An unknown protein is cut into peptides, for example by a trypsin digest. Each
peptide is then looked up in every protein of a reference database. The host
scores the database proteins by how many of the peptides they contain. The
costly step is the lookup: the peptide count, times the database size, times
the work of one search.

This RTL is the accelerator for that lookup. Each core takes one protein and
one peptide and reports every position at which the peptide occurs in the
protein. It uses the Knuth–Morris–Pratt (KMP) algorithm, so the work grows
with the sum of the two lengths, not their product. Any peptide can be
searched without rebuilding the hardware. This is the advantage over
automaton-per-pattern schemes such as Aho–Corasick.

Two ideas matter most at the system level:

* **Packed transfers.** The host bus is 32 bits wide. Strings travel four
  characters per word, exactly as a `char` array lies in host memory. The
  host never reshapes the data, and the core unpacks each word into
  characters.
* **Protein caching.** A protein is much longer than a peptide. The core
  keeps the last protein in block RAM, so a job can carry only a new peptide.
  The protein then crosses the bus once for all the peptides of the unknown
  protein. This way of working is called *HW2* below. Sending the protein with
  every peptide is called *HW*. One core does both, chosen per job.

## System organisation

`kmp_system` holds `NUM_CORES` (4) independent `kmp_core` instances. On the
intended FPGA-plus-ARM platform, each core has its own DMA channel. The channel
moves input strings from DDR into the core's input AXI-Stream and writes the
core's result stream back to DDR. The ARM host programs the DMAs, collects the
positions and does the scoring in software. The DMAs, the processor, its memory
ports and the DDR are not part of this RTL. For each core `c`, the top brings
out the two stream ports as `s_axis_*[c]` and `m_axis_*[c]`, plus a
`busy[c]` flag. All cores share `clk` and the active-low asynchronous reset
`rst_n`.

```
             s_axis[c] (32 bit)                                m_axis[c] (32 bit)
 DMA MM2S ──► word_unpacker ──► protein RAM ─┐                ┌──► DMA S2MM
                  │  (8-bit chars)           ├─► kmp_search ──┤
                  └──────────► peptide RAM ──┤                │  match words,
                                   │         │                │  end word
                               kmp_prefix ─► failure-table RAM┘
```

## Talking to a core: the stream protocol

This protocol is the part a driver writer needs, and it is this design's own
definition. Every string is a run of 8-bit characters ended by a **sentinel**
character of value 0. Padding then fills out the current 32-bit word, and its
contents are ignored. Within a word, the first character is in bits 7:0
(little-endian `char` layout).

A job on the input stream is:

| Words | Contents |
|---|---|
| 1 | command word: bit 0 = 1 means a new protein follows; bit 0 = 0 means reuse the protein held from an earlier job. The other bits are ignored. |
| ⌈(Lprot+1)/4⌉ | only if bit 0 = 1: protein characters, 0 sentinel, padding |
| ⌈(Lpep+1)/4⌉ | peptide characters, 0 sentinel, padding |

Input `TLAST` is accepted but not needed, because the sentinels frame the strings.

The result stream of a job holds one word per occurrence, in increasing
position order. Overlapping occurrences are included. Then comes one end word
with `TLAST` set:

| Word | Bits |
|---|---|
| match | bit 31 = 0, bits 30:0 = 0-based start position of the peptide in the protein |
| end | bit 31 = 1; bit 30 = protein longer than `MAX_PROT_LEN` (only its first `MAX_PROT_LEN` characters were kept and searched); bit 29 = peptide longer than `MAX_PEP_LEN` (no search done); bit 28 = no protein held (peptide-only job before any protein); bits 23:0 = number of match words sent |

Example: command `0x00000001`, then protein `"KAKAK"` as the words
`0x414B414B 0x0000004B`, then peptide `"KAK"` as `0x004B414B`. The result is
`0x00000000`, `0x00000002`, `0x80000002`.

Jobs can follow each other back to back. While a job is being processed, a
core holds at most one word of the next job. After that, `s_axis_tready` stays
low until the job's end word has been sent.

## Inside a core

`kmp_core` is a small controller that runs the phases of a job in order:
command, load protein, load peptide, build table, scan, end word.

**Unpacking (`word_unpacker`).** A 32-bit holding register hands out one
character per clock. The next word is taken in as the last character leaves,
so a steady input costs no bubble. A `drop` input discards the rest of a word.
The controller uses it after the command byte and after each sentinel, so
padding never reaches the buffers.

**Buffers (`kmp_ram`).** There are three simple dual-port RAMs with one write
port and one registered read port. They hold the protein (`MAX_PROT_LEN` × 8),
the peptide (`MAX_PEP_LEN` × 8) and the failure table (`MAX_PEP_LEN` ×
⌈log2(MAX_PEP_LEN+1)⌉). The protein RAM is rewritten only by a job with
bit 0 set, which is what makes HW2 work. The table builder and the scan never
run at the same time, so they share the read ports of the peptide and table
RAMs through a multiplexer.

**Failure table (`kmp_prefix`).** KMP first computes, for every peptide
prefix `P[0..q]`, the length `fail[q]` of its longest proper prefix that is
also a suffix:

```
fail[0] = 0; k = 0
for q = 1 .. m-1:
  while k > 0 and P[k] != P[q]: k = fail[k-1]
  if P[k] == P[q]: k = k + 1
  fail[q] = k
```

The hardware walks this loop with one RAM read in flight. Each `q` costs
3 clocks: read `P[q]`, read `P[k]`, then compare and write. Each trip round
the `while` costs 2 clocks: read `fail[k-1]`, then read the new `P[k]`. The
total number of `while` trips is below `m`, so the table is done within about
5·m clocks.

**Scan (`kmp_search`).** This is the classic matcher. It never moves
backwards in the protein:

```
q = 0
for i = 0 .. n-1:
  while q > 0 and P[q] != T[i]: q = fail[q-1]
  if P[q] == T[i]: q = q + 1
  if q == m: report i-m+1; q = fail[m-1]
```

The protein read address stays on `T[i]` for as long as `i` does, so a
fallback re-reads only `fail[]` and `P`. A character costs 2 clocks, and a
fallback step 2 more. A match costs 1 clock in the match state, and that state
holds until the result stream takes the word. Back-pressure on the output
therefore stalls the scan. With a 20-letter amino-acid alphabet, fallbacks are
rare, and the scan runs at close to 2 clocks per protein character. The
worst case is about 4 clocks per character plus one per match. A job with an
empty peptide, or a peptide longer than the protein, skips the scan and
reports 0 matches.

**Whole-job timing.** Loading takes 1 clock per input character while the
input keeps up. After that come the table (≤ ~5·m) and the scan (≈ 2·n to
4·n). In HW2, the load phase covers only the peptide.

Measured with `tb_kmp_database`: four cores, full-rate streams, 60 tryptic
peptides per protein, 20-letter random sequences.

| Protein length | Clocks, HW2 | Clocks, HW | Bus words, HW2 | Bus words, HW |
|---|---|---|---|---|
| 50 | 9,027 | 12,034 | 265 | 1,032 |
| 1,043 | 135,104 | 196,698 | 513 | 15,912 |
| 4,023 | 512,934 | 750,350 | 1,258 | 60,612 |
| 7,500 | 952,974 | 1,395,533 | 2,128 | 112,812 |

The scan itself runs at about 2.1 clocks per protein character. HW reloads
the protein for every peptide. That costs 1 clock per character in the core,
and it sends the protein's ⌈(n+1)/4⌉ words once per peptide instead of once
per protein, so the bus carries about 50 times more words for the longer
proteins. The exact numbers depend on the random sequences.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CORES` | 4 | cores in `kmp_system` |
| `MAX_PROT_LEN` | 65536 | protein buffer, characters |
| `MAX_PEP_LEN` | 1024 | peptide and failure-table buffers, characters |

The buffer sizes are a choice, not a given. A 64 Ki × 8 protein RAM,
a 1 Ki × 8 peptide RAM and a 1 Ki × 11 table come to 32 + 1 + 1 = 34
18-Kbit block RAMs. That is the block-RAM count reported for one accelerator
of this kind on a Zynq-7020. A 65,536-character buffer also holds every human
protein; the longest, titin, has 34,350 residues. Tryptic peptides are far
shorter than 1,024. Any power-of-two sizes work. Smaller sizes just lower the
point at which the overflow flags are raised.

## How far to trust it, and what differs from the original accelerator

* The algorithm, the packed 32-bit transfers, the stream-only interfaces,
  the protein caching and the four parallel cores follow the published
  description of the accelerator. That accelerator was produced by
  high-level synthesis, and no RTL of it was published. Everything below the
  level of "what it does" is therefore this design's own: the state
  machines, RAM organisation, sharing of the read ports and cycle timing.
* The original had HW and HW2 as two separate builds of the core. Here one
  core does both, selected by the command word. A driver for the HW way sets
  bit 0 on every job.
* The command word, the sentinel value 0, the byte order, the result word
  format, the end word and its flags are this design's own definitions.
* The DMA engines, the host processor and the memory system are not
  included.
* No clock frequency or cycle counts were published for the original core, so
  its speed cannot be compared cycle for cycle. The design contains no
  vendor primitives. The RAMs are written to infer FPGA block RAM.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure if it
hangs. The references in `tb/tb_kmp_pkg.sv` are brute force. Positions come
from comparing every alignment, and border tables from trying every length.
The references never use KMP itself.

| Testbench | What it covers |
|---|---|
| `tb_kmp_ram` | read latency; read-during-write returns old data |
| `tb_word_unpacker` | byte order, `c_last`, TLAST carry, `drop`, random gaps and back-pressure |
| `tb_kmp_prefix` | 300 random peptides over 1-, 2-, 3- and 20-letter alphabets; every table entry, written once, within 5·m + 4 clocks |
| `tb_kmp_search` | 200 random scans, many overlapping matches; positions, count, and clock bound with random output stalls |
| `tb_kmp_core` | 300 mixed HW/HW2 jobs with small buffers (64/8); overflow and no-protein flags; gaps and stalls on both streams |
| `tb_kmp_system` | all four cores at default sizes, in parallel. A 3,256-residue protein is digested with trypsin into 324 peptides, which are matched HW2-style against references of 3,256 (the unknown itself), 1,200, 7,000 and 34,350 characters. There are also HW jobs, a 65,636-character protein that overflows, an oversized peptide, and a check of the bus-word count of every job. About 24 M clocks, well under a minute in Verilator. |
| `tb_kmp_database` | default sizes. Sixteen reference proteins from 50 to 7,500 characters, dealt to the four cores and matched against 60 tryptic peptides, first the HW2 way, then the HW way. It checks every result and the bus-word saving of HW2. It also checks that HW2 is faster for every protein, and that each protein's clock count stays within the per-phase bound. |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_kmp_system \
  -y rtl -y tb rtl/kmp_pkg.sv tb/tb_kmp_pkg.sv tb/tb_kmp_system.sv
./obj_dir/Vtb_kmp_system
```

`tb_kmp_system` and `tb_kmp_database` set no parameters, so they exercise
the default-size design. The others override the sizes to keep runs short.

## Files

`rtl/kmp_pkg.sv` holds the shared types: character and word types, the
sentinel, the command bit, the end-word struct and the match-word function.
There is one module per file: `kmp_system`, `kmp_core`, `word_unpacker`,
`kmp_prefix`, `kmp_search` and `kmp_ram`.
