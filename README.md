# OCAPP: a content-addressable parallel processor in SystemVerilog

A conventional memory answers "what is stored at address *a*?". This processor answers "which stored words look like *this*?" for all its words at once. It holds `N_WORDS` words of `WORD_BITS` bits. One comparand, with a mask, is broadcast to every word. Each word sets its own response bit. Searches that need more than equality (greater than, maximum, between two limits, next above, sorted retrieval) are built from a handful of such word-parallel steps. Their cost grows with the word length, not with the number of words.

The architecture is the optical content-addressable parallel processor (OCAPP) of A. Louri (Applied Optics, 1992). That design is meant to be built from free-space optics and SEED logic arrays. Here every cell array becomes ordinary synchronous logic, and one associative step is one clock cycle. The units, registers, equations and search algorithms follow the original. The control unit's instruction set, the host interface and the sizes are this implementation's own. The section on departures lists every point where the original was silent or had to be read a certain way.

## The bit-slice view

Picture the storage as an `N_WORDS` x `WORD_BITS` array. A *word* is a row. A *bit slice* is a column: bit *j* of every word. Slice 0 is the most significant bit.

Every compare works on all rows at once. It can also be restricted to some columns:

* **Dual rail.** Each stored bit is delivered as a true rail and a complement rail. So is each bit of the interrogation register I. A bit *mismatches* when `(I & ~w) | (~I & w)`, and a word mismatches if any bit does.
* **Masking (how I is built from comparand C and mask M).** An unmasked bit *c* gives I rails `(c, ~c)`. A masked bit gives `(0, 0)`, which can never mismatch.
* **Slice enable.** The selection unit blanks disabled slices on *both* rails of the stored word, so they drop out of the compare too. Enabling exactly one slice, *j*, turns the word-parallel compare into one step of a bit-serial scan.
* **Word enable.** The enable register ER is treated as one more column, column 0, whose interrogation bit I0 is 1 during a compare. A disabled word therefore always mismatches:

```
R_i = ~( mismatch_i | ~ER_i )          (ER acts as column 0 with I0 = 1)
G_i |= ER_i & ~I_j &  w_ij             (only slice j enabled: word > I)
L_i |= ER_i &  I_j & ~w_ij             (word < I)
MD   = OR of all R_i
```

R, G and L are one bit per word. MD, the match detector, says whether any word responded. The control unit branches on MD.

## Units

| Unit | Module | Holds | Does |
|---|---|---|---|
| Selection unit | `ocapp_selection_unit` | storage array, ER, A (one bit per word), B (one bit per slice), SR | parallel page load; word write (words with A=1 take B); slice write (slices with B=1 take A); ER/SR updates; slice enable; dual-rail output |
| Match-compare unit | `ocapp_match_compare` | I (dual rail), R, G, L, MD | equivalence compare (R, MD); magnitude compare (R, G, L, MD) |
| Response unit | `ocapp_response_unit` | P | priority circuit: P = the lowest-numbered responder of R. It is a prefix-OR tree of ceil(log2 N) stages |
| Output unit | `ocapp_output_unit` | O, T | single-word output `O_j = OR_i(P_i & w_ij)`; parallel readout `page_out[i] = T_i ? word_i : 0` |
| Router | `ocapp_router` | - | puts R, G, L, P, ER, SR, all-ones or all-zeros onto the route bus |
| Control unit | `ocapp_control_unit` | program memory, operand memory, pc, slice counter j | fetches and decodes one instruction per cycle; branches on MD |
| Multiple match unit | `ocapp_multi_match` | K_ARGS interrogation registers, K_ARGS response registers | compares K_ARGS arguments with every word in one step |
| Top | `ocapp_top` | - | wires the units together |

The route bus is how results move between units. Examples: "disable the words whose R bit is 0" (R into ER with AND), "disable the word just output" (P into SR with AND-NOT), and "read out every word flagged in G" (G into T). A destination combines the bus with its own contents by copy, AND, AND-NOT or OR.

## Instruction set

An instruction is an `instr_t` (see `ocapp_pkg.sv`): `{op, dst, src, fn, slice, imm}`, 22 bits. Every instruction takes one cycle.

| op | effect |
|---|---|
| `OP_LDI` | load I. `fn` picks the source: operand slot `imm` (comparand and mask), all ones, all zeros, or all masked |
| `OP_EQS` | equivalence compare over the slices in `slice` (`SL_ALL`, `SL_J`, `SL_NONE`). Writes R and MD |
| `OP_THS` | magnitude compare. Writes R and MD, and sets bits of G and L |
| `OP_VMOV` | `dst <= fn(dst, src)`. dst is one of ER, SR, R, G, L, T. src is one of R, G, L, P, ER, SR, ones, zeros |
| `OP_SETJ` / `OP_LOOPJ` | set j / increment j and branch to `imm` while slices remain |
| `OP_BMD0` / `OP_BMD1` / `OP_JMP` | branch if MD = 0 / if MD = 1 / always |
| `OP_PRI` | P <= first responder of R |
| `OP_OUT` | output the word selected by P (`o_word`, `o_valid` one cycle later) |
| `OP_WRW` / `OP_WRS` | word write / slice write through A and B |
| `OP_HALT` | stop and raise `done` |

`SL_NONE` is a compare with no slice enabled. Every enabled word then matches, so it copies ER into R and sets MD to "any word enabled".

## The search algorithms as programs

`tb/ocapp_prog_pkg.sv` builds these programs. It is the reference for how to drive the machine.

**Threshold (bit-serial magnitude) search.** Load I. Set R to all ones and clear G and L. Then for j = 0 .. m-1:

```
THS  slice j         ; words that differ from I at slice j get G or L
BMD0 done            ; no enabled word still equal: finish early
VMOV ER &= R         ; decided words drop out, so they keep their G/L mark
LOOPJ
```

At the end, G marks words greater than I, L words less than I, and R words equal to I. Because decided words are disabled, a word's G or L bit is set at its first differing bit from the top. That is exactly the unsigned comparison. The scan stops as soon as no enabled word still equals I. It therefore makes between 1 and m compares.

**Maximum / minimum.** Load I with all ones (all zeros for minimum). At each slice, compare. If any candidate has a 1 there (MD = 1), drop the candidates with a 0. Otherwise keep them all. A last compare with `SL_NONE` copies the surviving candidates into R. This always takes m compares.

**Between limits (LOW < W < HIGH).** Run a threshold search against HIGH, then load ER from L. That step re-enables exactly the words below HIGH, which the first search had disabled one by one. Then run a threshold search against LOW; the answer is in G. To make a bound inclusive, OR R (the words equal to that limit) into the enable set after the first search, or into G after the second. **Outside limits (W < LOW or W > HIGH)** searches against LOW first and saves L in SR. It then re-enables all words, searches against HIGH, and ORs SR into G. Inclusive bounds again add R. That gives eight double-limit searches, all checked.

**Complements.** Not-equal, not-greater and not-smaller come from registers that a search has already set: `T <= ER & ~R` after an equivalence search, and `T <= L | R` or `T <= G | R` after a threshold search.

**Next above / next below.** Run a threshold search, load ER from G (or L), run a minimum (or maximum) search, then PRI and OUT.

**Ordered retrieval.** SR holds the words not yet retrieved. Each round copies SR into ER. It stops if no word is enabled (`SL_NONE` compare, then `BMD0`). Otherwise it finds the minimum (or maximum), picks one word with PRI, outputs it, and removes it with `SR &= ~P`. Equal words come out one per round, lowest index first.

## Timing and cost

Everything is clocked on `clk`'s rising edge, with an asynchronous active-low `rst_n`. The decoded strobes of the instruction at `pc` act on the same edge that advances `pc`. MD written by a compare is seen by the next instruction's branch. Cycle counts for the programs above, from `start` to `done` (HALT included), with n words of m bits:

| search | cycles |
|---|---|
| equivalence | 3, independent of n and of the data |
| threshold | 4m + 7 when some word equals the comparand (every slice scanned); otherwise 4s + 5, where s <= m is the compare after which no enabled word still matches |
| maximum / minimum | at most 4m + 5 (a slice with no 1 among the candidates skips the disable step) |
| ordered retrieval | at most n(4m + 10) + 5, i.e. 132,613 at 256 x 127 |

None of these grows with n, except ordered retrieval, which retrieves n words. That is the property the architecture is built for.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_WORDS` | 256 | words in the array |
| `WORD_BITS` | 127 | bits per word |
| `DEPTH` | 64 | program memory entries |
| `NOPND` | 4 | comparand/mask operand slots |
| `K_ARGS` | 4 | arguments of the multiple match unit |

The original design leaves n and m open; its worked examples use 7 x 5 and 5 x 5. With 256 x 127, the stored array with its enable column, in dual rail, is n x 2(m+1) = 256 x 256 cells. That is the device-array size cited for the cell technology. `K_ARGS`, `DEPTH` and `NOPND` are not given there.

## Departures and interpretations

* **Electronic, not optical.** Lenses, masks, beam splitters and polarization switches become fan-out, OR-reductions and multiplexers. S-SEED latches become flip-flops. SEED NOR arrays become gates. Each associative step is one cycle, not a sum of device response and propagation times.
* **G and L hold their marks.** Between compares they are set-only, and they are gated by ER. This matches the worked threshold example, where a word marked greater stays marked.
* **Every slice is scanned.** The slice loop covers all m slices. A literal reading of "increment j, stop when j = m" would skip the last one. The worked example scans all five bits of a five-bit word.
* **Extremum result.** The extremum search leaves its result in ER and copies it to R at the end. Otherwise R would be empty whenever the last slice scanned had no candidate with the sought bit.
* **Between-limits search.** It reloads ER from L after the first threshold search, and clears G and L before the second. A literal "disable words with L = 0" would leave only the words equal to HIGH.
* **Ordered retrieval.** It keeps the remaining set in SR, so the set survives each extremum search. It always picks the word to output through the priority circuit, even when the extremum is unique. The original sends R straight to the output unit in that case and uses P only for ties. Either way, one word comes out per round.
* **The SR register.** In the original, SR is only the path through which R, G or L reach the set and reset inputs of ER. Here the route bus writes ER directly. SR is an ordinary one-bit-per-word register that a program can use to keep a set of words across searches.
* **Readout register T.** It can be loaded from any route source, not only from R, G or L.
* **Host side.** The processor is loaded by a parallel page port (`page_we`, `page_data`) and by program and operand write ports. The original loads the page from an optical page memory and does not define a host interface.
* **Multiple match unit.** It does masked equality only. Its arguments and compare strobe come from host ports, not from the program.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. The search programs live in `tb/ocapp_prog_pkg.sv`, which the top-level testbenches import. Name the packages explicitly and let verilator find the modules in `rtl/` by name:

```
verilator --binary --timing --assert -j 0 -Irtl -y rtl \
  rtl/ocapp_pkg.sv tb/ocapp_prog_pkg.sv tb/tb_ocapp_top.sv \
  --top-module tb_ocapp_top
./obj_dir/Vtb_ocapp_top
```

For another testbench, name its file and top module instead. Leave out `tb/ocapp_prog_pkg.sv` if the testbench does not import it. Only `tb_ocapp_top`, `tb_ocapp_examples` and `tb_ocapp_control_unit` need the program package.

| testbench | what it checks |
|---|---|
| `tb_ocapp_top` | default size (256 x 127), every search program against a reference model (including all eight double-limit variants and the complement searches), sorted output streams, word and slice writes, parallel readout, multiple match. It also checks cycle counts (equivalence constant, threshold early exit, extremum = m compares) and that each mechanism occurs. About 45 s to build and 7 s to run |
| `tb_ocapp_examples` | the two worked examples (7 x 5 threshold, 5 x 5 maximum): the state after every iteration against the published tables |
| `tb_ocapp_selection_unit`, `tb_ocapp_match_compare`, `tb_ocapp_response_unit`, `tb_ocapp_output_unit`, `tb_ocapp_router`, `tb_ocapp_control_unit`, `tb_ocapp_multi_match` | one unit each, random stimulus against equations computed in the testbench |

To write a new search, build a `prog_t` with the helpers `mk`, `vmov`, `threshold` and `extremum` in `ocapp_prog_pkg`. Write it through `prog_we`, set the operands with `opnd_we`, pulse `start` and wait for `done`.
