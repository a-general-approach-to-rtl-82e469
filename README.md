# A laundry fuzzy controller compiled into programmable logic

A washing machine picks its wash time from two sensor readings: how greasy and how dirty
the load is. The decision is written as fuzzy heuristics, seven rules such as "if greasiness
is low and dirtiness is medium then time is short". Evaluating fuzzy rules at run time
needs a fuzzy processor or a microcontroller. This design does something else. It evaluates
the rules once for every possible input, and stores the answers as a table in programmable
logic. A query is then one table access, with no arithmetic at run time. The heuristics are
also no longer readable from the product.

The inputs are two 4-bit codes, 0..10, meaning 0 %, 10 %, ... 100 %. There are 11 x 11 = 121
input combinations ("events"). The answer is the wash time at two resolutions: a 4-bit value
(time4) and an 8-bit value (time8 = 10 x time4).

The RTL holds both forms of the table side by side:

* **The event look-up table (ROM form).** A 256-word memory, addressed directly by the two
  4-bit codes. After reset, the design fills it in hardware: it runs the whole fuzzy
  inference for each of the 121 events in turn, one per clock. The rules and membership
  functions sit in loadable registers, so the table can be retuned and rebuilt.
* **The PLA form.** A two-level AND/OR array holding a logic-minimised cover of the same
  table: 75 product terms over 8 inputs, in place of 121 terms without minimisation. The
  cover is computed at elaboration from the default knowledge. Like a programmed part, the
  PLA does not change when the knowledge registers are rewritten.

## The fuzzy knowledge

Input terms, the same for greasiness and dirtiness. Grades are at the 11 codes and are
stored as tenths in 4 bits, so every grade is exact.

| code x (percent)      | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | 10 |
|-----------------------|----|----|----|----|----|----|----|----|----|----|----|
| low                   | 10 | 8  | 6  | 4  | 2  | 0  | 0  | 0  | 0  | 0  | 0  |
| medium                | 0  | 2  | 4  | 6  | 8  | 10 | 8  | 6  | 4  | 2  | 0  |
| high                  | 0  | 0  | 0  | 0  | 0  | 0  | 2  | 4  | 6  | 8  | 10 |

The $time universe has 14 elements with values 1..14. The five time terms are singletons
(grade 1.0 at one element):

| term        | very_short | short | moderate | long | very_long |
|-------------|------------|-------|----------|------|-----------|
| value       | 2          | 4     | 7        | 10   | 13        |

Rules (G = greasiness, D = dirtiness):

| # | G      | D              | time       |
|---|--------|----------------|------------|
| 1 | low    | low            | very_short |
| 2 | low    | medium         | short      |
| 3 | low    | high           | moderate   |
| 4 | medium | low or medium  | moderate   |
| 5 | medium | high           | long       |
| 6 | high   | low or medium  | long       |
| 7 | high   | high           | very_long  |

## From rules to a table entry

Each step below is one hardware block. For one event (g, d):

1. **Relations and implication matrices** (`implication_matrices`, `implication_operator`).
   Each rule is split into two relations, "G-term -> time-term" and "D-term -> time-term",
   giving 14 relations. Each becomes an 11 x 14 matrix, R[u][v] = min(muA(u), muB(v)). An
   antecedent naming two terms ("low or medium") uses their pointwise max.
2. **Fuzzification** (`event_sequencer`). A crisp code x becomes the singleton fuzzy set
   with grade 1.0 at x.
3. **Max-min composition** (`detachment_operator`, 14 instances in `inference_engine`).
   B'[v] = max over u of min(A'[u], R[u][v]). With a singleton input this picks row x of
   the matrix.
4. **Rule "and" and aggregation** (`inference_engine`). A rule's conclusion is the pointwise
   min of its two composed sets. The final set is the pointwise max over the seven rules.
5. **Centre of area** (`coa_defuzzifier`). COA = sum(mu_i x m_i) / sum(mu_i), where
   m_i = i + 1. time4 is its integer part and time8 = 10 x time4.

Worked example, greasiness 10 % and dirtiness 0 %: low G = 0.8, medium G = 0.2, low D = 1.0.
Rule 1 fires at min(0.8, 1.0) = 0.8 (very_short). Rule 4 fires at min(0.2, max(1.0, 0)) = 0.2
(moderate). COA = (0.8 x 2 + 0.2 x 7) / 1.0 = 3, so time4 = 3 and time8 = 30.

A note on time8: it is ten times the truncated value, not the truncated value of ten times
the COA. For greasiness 60 %, dirtiness 100 %, COA = 10.6, time4 = 10 and time8 = 100 (not
106). The 8-bit output therefore adds range, not precision. This matches the reference
values the design was checked against.

The resulting control surface (time4, rows = dirtiness, columns = greasiness 0..100 %):

```
100 %:  7  7  8  8  9 10 10 11 11 12 13
 50 %:  4  4  5  5  6  7  7  8  8  9 10
  0 %:  2  3  4  5  6  7  7  8  8  9 10
```

Time never falls as greasiness rises. Along dirtiness it can dip by one unit: at 30–40 %
greasiness, going from 0 to 10 % dirtiness. That is a property of the rules, not an
artefact of the hardware.

## The PLA cover

`flc_pkg::pla_cover()` is a constant function. At elaboration it:

1. evaluates the default controller for all 256 input words;
2. treats codes 11..15 as don't-cares;
3. covers the table greedily. Each event not yet covered seeds a cube. The cube drops one
   literal at a time, dirtiness LSB first, as long as every valid event inside it keeps the
   seed's output word.

For this table the cover has 75 cubes. All cubes that can be true together carry the same
output word, so the OR plane returns that word unchanged.

The 4-bit and 8-bit outputs share one array (12 OR-plane outputs). Because time8 is a
function of time4, the same 75 terms serve both resolutions.

## Hardware sweep, interface and timing

`laundry_flc` (top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| kb_wr_en, kb_wr_sel, kb_wr_term, kb_wr_elem, kb_wr_data | in | 1, 2, 3, 4, 9 | write one knowledge entry (see `knowledge_base`) |
| rebuild | in | 1 | re-run the table build |
| building, table_ready | out | 1 | build running; table matches the knowledge |
| q_valid, q_greasiness, q_dirtiness | in | 1, 4, 4 | query |
| r_valid, r_pla, r_rom | out | 1, 12, 12 | answers {time8, time4}, one clock after the query |

* **Build.** The build starts by itself after reset. The sequencer issues events
  dirtiness-major, one per clock. The inference and COA logic is one combinational stage,
  followed by a register and the table write. `table_ready` rises 123 clocks after reset.
* **Retuning.** Any knowledge-base write clears `table_ready`. Pulse `rebuild` to refill
  the table. `r_pla` keeps the elaboration-time knowledge.
* **Queries.** One query per clock, answered one clock later. Codes above 10 are clamped
  to 10.
* **Rate.** At one inference per clock, 50 M inferences per second needs a 50 MHz clock.

After synthesis the top is about 23 k word-level cells and 660 flip-flops. Most of the
logic is the 14 parallel max-min compositions. The event table is 256 x 12 memory bits.

## Files

| file | content |
|------|---------|
| `rtl/flc_pkg.sv` | sizes, types, default knowledge, COA function, PLA cover generation |
| `rtl/knowledge_base.sv` | membership functions and rules in registers, write port |
| `rtl/implication_operator.sv` | one implication matrix, min(A, B) |
| `rtl/implication_matrices.sv` | the 14 matrices of the rule base |
| `rtl/detachment_operator.sv` | max-min composition |
| `rtl/inference_engine.sv` | 14 compositions, rule AND, max aggregation |
| `rtl/coa_defuzzifier.sv` | centre of area |
| `rtl/event_sequencer.sv` | exhaustive event generator with singleton fuzzification |
| `rtl/event_lut.sv` | event table memory |
| `rtl/pla.sv` | AND/OR array |
| `rtl/laundry_flc.sv` | top |
| `tb/tb_ref_pkg.sv` | floating-point reference controller used by the tests |
| `tb/tb_<block>.sv` | self-checking test per block; `tb_laundry_flc` is end to end |
| `tb/tb_control_surface.sv` | the whole control surface through the top, printed and checked |

## How far to trust it, and what is this design's own

Taken from the source description:

* the input universes and the membership shapes;
* the seven rules;
* the relation-per-antecedent method, the cartesian-product (min) implication, max-min
  composition and max aggregation;
* centre-of-area defuzzification;
* the two output resolutions;
* the ROM and PLA forms;
* the 75-term size of the minimised PLA.

Derived rather than given:

* **Singleton positions.** The very_short, moderate, long and very_long positions follow
  from reference output values for single-rule events. The short_time position (4) was
  fitted to the reference control surface.
* **14-element time universe.** Only the singleton positions affect the result.
* **min as the rule "and".** It reproduces every reference value; max would not.

This design's own choices:

* the tenths grade format;
* computing the table in hardware, and the knowledge-base write port;
* the 256-word direct addressing of the table;
* clamping codes above 10;
* the one-clock query latency;
* the greedy minimiser. It reaches the published term count with different cubes.

The PLD device itself and its timing are not modelled.

All blocks are checked against an independent floating-point model for all 121 events, and
against the published reference rows of the aggregated and defuzzified tables.

## Simulating

Verilator 5 or later. Compile the package first. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/flc_pkg.sv tb/tb_ref_pkg.sv tb/tb_laundry_flc.sv --top-module tb_laundry_flc
./obj_dir/Vtb_laundry_flc
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Swap the top-module name to run
another one. For `tb_<block>`, add `rtl/<block>.sv` or rely on `-y rtl`.

## Changing it

* **Different rules or membership functions at run time.** Write them through the `kb_wr_*`
  port and pulse `rebuild`. `r_rom` follows the new knowledge; `r_pla` does not.
* **Changing the product.** Edit `default_rules`, `default_in_mf` or `time_pos` in
  `flc_pkg`. This changes the reset knowledge and the PLA cover together. `pla_term_count`
  gives the new cover size, and the `pla` port width follows it.
* **A finer time scale.** Change `coa()` in the package and `coa_defuzzifier` together.
