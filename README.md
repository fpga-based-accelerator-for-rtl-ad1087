# Systolic FPGA accelerator for K-order epistasis detection

Epistasis detection looks for groups of K genetic markers (SNPs) whose joint
genotype is associated with a disease. An exhaustive search scores every one
of the C(N, K) combinations of N SNPs. To score a combination, it builds the
3^K-entry contingency table of genotypes, counting cases and controls
separately. It then computes the mutual information between that table and
the disease status. Building the tables is the expensive part: it takes one
pass over the bits of every patient for every combination.

This RTL implements a streaming accelerator for that search:

- A chain of Contingency Table Units (CTUs) each hold one SNP.
- The dataset streams past the chain from external memory over AXI4.
- Each unit builds the table of "its" combination with every SNP that streams by.
- Tables are completed and scored by shared units behind the chain.
- Each group of units keeps its best X combinations.

The design is parameterised by:

- the order K (2 and up; 2, 3 and 4 are tested);
- the number of patients;
- the interface width R;
- the number of CTUs.

The defaults describe the third-order build for a balanced 4000-patient
dataset:

- K = 3, 4000 patients, R = 64;
- 140 CTUs;
- 4 saved results per group;
- floating-point adders with 11 pipeline stages.

## Data format

Each SNP is stored as two bit vectors over the patients:

- G0: 1 where the genotype is 0;
- G1: 1 where the genotype is 1.

G2 (genotype 2) is never stored. Wherever it is needed, it is rebuilt as
NOR(G0, G1).

Patients are packed 32 cases and 32 controls per 64-bit word:

- bits 63:32 hold cases and bits 31:0 hold controls;
- words alternate G0, G1 for each group of 32 + 32 patients;
- one SNP therefore takes `WORDS = 2*ceil(N_CASES/32)` words (126 for 4000
  patients).

Patients that pad the last group ("dummy" patients) must be 0 in both G0 and
G1. Their G2 bits are masked off inside the CTUs, so they count nowhere. The
SNPs of a round lie back to back in memory.

## How a round works

The host drives the search in *rounds*. For each round it gives:

- a re-initialisation mode;
- the identifier of the first SNP to stream;
- its byte address;
- the number of words.

It then pulses `start_round`.

1. `count_last`, at the head of the chain, numbers the words of each SNP,
   flags the last word and attaches an identifier (base + ordinal) to every
   word. A round-start marker, carrying the mode, travels down the chain ahead
   of the data.
2. **Claiming.** A `claimed` bit travels with each word.
   - An empty CTU claims the first unclaimed SNP that reaches it and stores it
     in its G0/G1 RAMs.
   - The first CTU stores K-1 SNPs: K-2 *fixed* SNPs, plus its own.
   - The mode m tells the first CTU to replace its last m stored SNPs with the
     first m SNPs of the stream and keep the rest. Mode 1 replaces only its
     own SNP; mode K-1 reloads everything.
   - The other CTUs always take a fresh SNP. The first CTU forwards the fixed
     SNPs' G0/G1/G2 words, and their identifiers, down the chain with every
     streamed word. Every CTU therefore sees all K SNPs of its combinations
     while storing only one.
3. **Three phases per CTU.**
   - Phase 1, while a CTU captures its own SNP: on each odd word it ANDs the
     (K-1) stored SNPs in all 3^(K-1) genotype combinations, popcounts cases
     and controls, and accumulates the (K-1)-order table n(K-1).
   - Phases 2 and 3, for every later SNP: it does the same ANDed with the
     streamed G0 word, then with the G1 word. This gives n(..,0) and n(..,1).
   - After the last word of that SNP, the table is copied to a holding
     register and offered to the reconstruction block.
4. **Reconstruction.**
   - Each reconstruction unit completes one value per cycle as
     n(..,2) = n(K-1) - n(..,0) - n(..,1), for cases and controls.
   - A table crosses in SEND_CYCLES slices. NC = floor(WORDS/SEND_CYCLES) CTUs
     share one block, because a CTU produces only one table every WORDS cycles.
   - At the defaults: 9 slices, 14 CTUs per block, 10 blocks.
5. **Scoring.**
   - Each complete entry goes to a mutual-information unit (MIU). The MIU
     computes f(cases) + f(controls) - f(cases + controls), with
     f(n) = n·log2(n).
   - f is read from a single-precision ROM, so no logarithm unit is built.
   - A floating-point adder tree sums the 3·VPC MIU outputs of a cycle.
   - The *save unit* accumulates the slices of a table. It then inserts the
     table's score, with its K SNP identifiers, into a sorted list of the X
     best.
   - The sum equals N·[H(X) − H(X,Y)] up to a term that is the same for every
     combination, so it ranks combinations exactly as mutual information does.
6. `round_done` pulses once the last word has been read and the pipeline has
   drained. After the last round, `drain` sends every save unit's list out on
   the `res_*` stream:
   - each entry is the score followed by K identifiers, in 64-bit words;
   - empty entries carry −∞.

   Each list holds the best combinations *of its group of CTUs*. The host
   merges the lists to get the global best.

### Host schedule

The accelerator does not enumerate combinations itself. The host must
choose rounds so that every combination is produced exactly once. The
end-to-end testbench (`tb/accel_run.sv`) contains a working scheduler:

- Walk the prefixes P of K−2 fixed SNPs in lexicographic order.
- When the prefix changes at position i, use mode K−1−i and start the stream
  at P[i].
- Within one prefix, the own SNPs start at last(P)+1 and advance by N_CTU
  per round (mode 1 after the first round).
- Each round streams from its first new SNP to the end of the dataset.

A round with own SNPs o..o+N_CTU−1 yields every (P, own, later) combination.

## Blocks

| module | role |
|---|---|
| `epistasis_accel` | top: AXI4 reader, head counter, CTU chain, reconstruction blocks, MIUs, adder trees, save units, result stream |
| `axi4_reader` | AXI4 INCR read master: bursts of up to 256 beats, split at 4 KB, up to 4 outstanding |
| `count_last` | word counter, last-word flag, SNP numbering, round-start forwarding |
| `ctu` | contingency table unit (claiming, fixed-SNP forwarding, 3 phases, table hold and sliced transfer) |
| `snp_ram` | G0/G1 storage of a stored SNP (synchronous-read dual port) |
| `popcount32` | two-level 6-input popcount |
| `rec_block` | arbiter for NC CTUs plus VPC reconstruction units |
| `rec_unit` | n2 = n(K−1) − n0 − n1 |
| `miu` | mutual-information term of one table entry |
| `nlog2n_lut` | n·log2(n) ROM, filled at elaboration |
| `fp_add` | pipelined single-precision adder/subtractor (round to nearest even) |
| `mi_adder_tree` | pipelined floating-point adder tree with a tag path |
| `save_unit` | score accumulator and sorted best-X list |
| `result_streamer` | packs the saved lists onto the output stream |
| `delay_line` | parameterised register delay |
| `epi_pkg` | sizing functions and single-precision helpers |

### Sizing rules (in `epi_pkg`)

- `WORDS = 2*ceil(N_CASES/32)` for R = 64.
- `SEND_CYCLES` is the largest power of 3 that both divides 3^(K−1) and is at
  most WORDS.
- `NC = floor(WORDS/SEND_CYCLES)` CTUs per block.
- `VPC = 3^(K−1)/SEND_CYCLES` reconstruction units per block, and 3·VPC MIUs.
- Count width: `EW = clog2(N_CASES+1)`.

With few patients, tables cross in one cycle and each CTU has its own block.
With many, a single reconstruction unit serves up to 14 CTUs.

## Timing and latencies

| path | latency |
|---|---|
| word through one CTU | 1 cycle (the chain is a pipeline); table ready 5 stages after the word |
| table transfer | SEND_CYCLES cycles, after arbitration |
| MIU | 1 + 2·FP_LATENCY cycles |
| adder tree | clog2(3·VPC) · FP_LATENCY cycles |
| save unit | 1-cycle accumulate, 1 cycle to insert |

Resets are synchronous and active low. Concurrent assertions check three
things:

- the AXI handshake rules and OKAY responses;
- that a granted CTU really has a table;
- that no finished table is overwritten before it is sent (`err_overrun`).

## Departures and open points

- **Accumulator.** The save unit's accumulator closes in one cycle. A
  10-cycle floating-point accumulator core would need interleaving of tables,
  which is not modelled.
- **Floating point.** The adders are written out in RTL: one combinational
  add, then a delay of FP_LATENCY stages. They round to nearest even and flush
  subnormals to zero. This matches a vendor core's results on these inputs but
  not its internal structure.
- **ROMs.** The n·log2(n) ROMs are computed at elaboration instead of being
  loaded from an initialisation file. Each MIU has its own pair of ROMs
  rather than sharing one between two MIUs.
- **RAM layout.** Each stored SNP uses two RAMs (G0 and G1), each holding the
  case and control halves of a word. The alternative layout is four RAMs
  (G0/G1 × cases/controls), which hold the same bits.
- **Claiming and identifiers.** Claiming by a bit in the stream, and carrying
  SNP identifiers with the data, are this design's own mechanisms for
  following the processing order. They replace combination counters in the
  save units.
- **Arbitration.** The arbiter in each reconstruction block uses fixed
  priority. The sizing rule guarantees that every CTU is served in time.
- **Second-order datapath.** The optimised datapath for K = 2 is not built.
  It uses popcounts of the streamed SNP, 2×2 tables and a 9-cycle
  reconstruction. Second-order searches run on the general datapath instead,
  which is tested at K = 2 with 100 patients.
- **Result format.** The host interface for results (a valid/ready stream of
  score + identifiers) and the `round_done` timing are this design's choices.
- **Dataset shape.** Datasets must be balanced as N_CASES = ceil(N/2).
  Patient counts other than N_PATIENTS need a rebuild, or padding by the
  host.

## Simulating

The testbenches use plain Verilator (5.x) with `--timing`. For example, the
end-to-end test at reduced sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/epi_pkg.sv \
    tb/tb_epistasis_accel.sv --top-module tb_epistasis_accel -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs. The end-to-end tests share `tb/accel_run.sv`, a host
model with three parts:

- an AXI4 memory model with random wait states (`tb/axi_mem_model.sv`);
- the round scheduler above;
- a double-precision reference that scores every combination.

The reference checks:

- the number of tables per round;
- each returned score against its reference;
- the ordering of each list;
- that every clearly-top-X combination is returned.

The tests also count how often each mechanism occurs, and a mechanism that
never occurs is a failure:

- re-initialisation modes 1/2/3;
- CTUs waiting for a shared reconstruction block;
- memory bubbles;
- rounds split into several bursts;
- results displaced from a list;
- dummy-patient padding.

The end-to-end testbenches are:

- `tb_epistasis_accel` runs three cases side by side:
  - third order: 200 patients, 5 CTUs, 12 SNPs;
  - fourth order: 64 patients, 3 CTUs, 8 SNPs;
  - second order: 100 patients, 4 CTUs, 10 SNPs.
- `tb_epistasis_accel_full` runs the top at its default parameters (4000
  patients, 140 CTUs) over 20 SNPs. That is 18 rounds and 1140 combinations,
  and it simulates in a few seconds.
