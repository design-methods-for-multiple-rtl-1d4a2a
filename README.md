# Address generators built from memories

An **address generator** answers one question very fast: *is this input
vector one of the k vectors I hold, and if so, which one?* It maps each of k
registered n-bit vectors to a distinct address 1..k and every other vector to
the special address 0. Typical uses are a dictionary (word -> index of its
translation), a database key lookup (researcher ID -> record number), a
router's address table, and a firmware patch circuit (ROM address -> patch
slot). In all of them k is tiny compared with the 2^n possible inputs, the
lookup must be quick, and the registered set changes, so the circuit must be
reprogrammable.

This RTL realises address generators with nothing but ordinary memories
("pq-elements", p address inputs and q data outputs) wired as a **LUT
cascade**, and in its main form adds a small **auxiliary memory** that lets
the cascade be much simpler. No CAM and no per-vector comparator bank is
needed. The multiple-valued inputs of the applications (letters of a 26- or
28-symbol alphabet, for instance) are simply coded in binary, 5 bits per
letter.

## 1. Why a cascade of memories works

Split the inputs into a first group X1 (p bits) and the rest X2. Draw the
function as a table with one column per value of X1 and one row per value of
X2. Only columns that contain a registered vector are non-zero, and there are
at most k of them, so a first memory H can replace X1 by a column number
0..k, which needs only q = ceil(log2(k+1)) bits. The rest of the function,
G(H(X1), X2), is again an address generator with the same k, but with
p - q fewer inputs. Repeating this gives a chain of cells:

```
 x1..xp        x(p+1)..x(p+r)       x(p+r+1)..         ...
   |                |                   |
 [cell 0]--q-->[  cell 1  ]--q-->[  cell 2  ]-- ... -->[cell S-1]--> address
```

Cell 0 reads p primary inputs; every later cell reads the q "rails" from its
neighbour plus r = p - q new inputs. After S = ceil((n - q)/r) cells all n
inputs are consumed. The rail value after cell i simply says *which of the
registered vectors' prefixes* has been seen so far (0 = none). Total memory
is S * q * 2^p bits; the bound on it is smallest for r = 1 or 2, and r = 2 is
the usual choice because it also keeps the chain short. For example, 48
inputs and 255 vectors give q = 8, p = 10, 20 cells and 160 kbit
(`lut_cascade` at its defaults).

## 2. The auxiliary memory: letting the cascade be wrong

An exact generator must output 0 for all 2^n - k unregistered inputs, and
that is what forces q rails everywhere. If those outputs are declared
*don't care*, the cascade only has to be correct for the k registered
vectors, and a synthesis tool can then often use fewer rails, smaller cells,
and skip input bits altogether. The price is that for an unregistered query
the cascade returns some arbitrary **temporary address**. A second, small
memory repairs that:

```
 query ──┬──> cascade for G ──tmp──┬──> auxiliary memory ──registered vector──┐
         │                         │                                           v
         └─────────────────────────┼──────────────────────────────────> [ = ? ] coincidence
                                   └────────────> AND gates <── match ─────────┘
                                                     │
                                                     └──> address (tmp, or 0)
```

The auxiliary memory has alpha = ceil(log2(k+1)) inputs and n outputs and
holds, at each address, the vector registered there. If it equals the query,
the temporary address is right; otherwise the query is not registered and
the output is forced to 0. The auxiliary memory costs n * 2^alpha bits
(20 kbit for 500 forty-bit words), which is typically far less than what the
don't cares save in the cascade.

`addr_gen_aux` implements this structure. Its cascade is a **uniform** one
(q = alpha rails, (alpha+2)-input cells) so that any list can be loaded
without a synthesis step; the savings of an uneven, tool-generated cascade
are shown concretely by `ex71_addr_gen` (section 4). Because the coincidence
check rejects every wrong address, the loader is free to fill every cascade
entry that no registered vector reaches with anything at all; the
testbenches fill them at random on purpose, so the rejection path is
exercised on practically every unregistered query.

## 3. Loading a cascade

The cells are RAMs, and their contents are computed off-line from the list
of registered vectors. A simple rule that always works with q >= alpha
rails (and is what the testbench package `cascade_prog_pkg` does):

1. For cell i let c_i = p + i*r be the number of inputs read so far.
2. Number the distinct c_i-bit prefixes of the registered vectors 1, 2, 3,
   ... (at most k of them, so they fit in q bits).
3. For every registered vector, write into cell i at address
   `{number of its prefix after cell i-1, its next r bits}` the number of its
   prefix after cell i (cell 0: address = its first p bits). The last cell
   writes the vector's address instead.
4. Every other entry is 0 for an exact generator, or anything for a
   generator with an auxiliary memory.
5. Write the auxiliary memory: word j = registered vector j.

Cell addresses put the rails in the upper bits and the new inputs below, and
inputs are taken in the order x1, x2, ... with x1 in the MSB of the input
vector. If p + (S-1)r exceeds n, the missing last inputs are tied to 0 (the
loader pads vectors with zeros the same way).

Updating the list means rewriting the affected cell words and auxiliary
words; there is no other state.

### Trees instead of a chain

Decomposition need not be a chain. Any network of pq-elements in which each
element condenses its inputs (primary inputs or parts of earlier codes) into
a q-bit class code works, and a code may be split so that some bits go to
one successor and the rest to another. Fewer levels mean a shorter path at
the price of more memory. For the 48-input, 255-vector case:

| form | elements | levels | memory | module |
|---|---|---|---|---|
| chain, 10-input cells | 20 | 20 | 160 kbit | `lut_cascade` |
| tree, 11-input elements (one 9-input) | 14 | 8 | 212 kbit | `ex42_net_p11` |
| tree, 12-input elements | 10 | 5 | 320 kbit | `ex42_net_p12` |

The 12-input tree, with e0..e3 reading 12 primary inputs each:

```
 x[47:36] -[e0]--8-------------------------.
 x[35:24] -[e1]--8--.                      [e6]--4-------------.
                    [e4]--4----------------'  '--4--.          |
 x[23:12] -[e2]--4--'  '--4--.                      [e8]--8--[e9]--> y
            '-----4--.       [e7]--8----------------'
 x[11:0]  -[e3]--8--[e5]--8--'
```

The module headers list every connection of both trees. The loading rule
is the same as for the chain, applied element by element in signal order:
each distinct address that some registered vector produces at an element
gets the next free non-zero code, and the last element gets the address.
Each element is then one-to-one on what registered vectors produce, so
working back from the output, equal outputs imply equal vectors: an
unregistered vector cannot end on a registered address. The testbench
package `pq_net_pkg` implements this rule for any network described as a
list of sources per element. Which primary inputs feed which first-level
element, and which bits of a split code go where, are free choices; the
trees here use consecutive input slices and give the first successor the
upper bits.

## 4. The fixed worked generators

Three small generators are built with constant tables, exactly as
published, and serve as references for the method:

* **`ex71_addr_gen`** - 11 inputs, 15 registered vectors. With don't cares
  the cascade shrinks to three cells, x2 x3 x4 x6 x7 -> u1 u2, then
  u1 u2 x8 -> u3 u4, then u3 u4 x9 x10 x11 -> z3..z0: only two rails between
  cells, x1 and x5 not read at all, 208 bits in total, against 4 rails that
  an exact generator for 15 vectors would need. A 16 x 11 auxiliary memory,
  an 11-bit coincidence circuit and four AND gates complete it. Note on the
  third cell's published table: its 4-bit codes have to be read with the
  **leftmost bit as z0**; only then does every registered vector reach its
  own address (read the other way, vector 1 lands on 8, vector 2 on 4, and
  so on). The RTL stores them in z3..z0 order.
* **`ex41_addr_gen`** - 5 inputs, weight 7, two 4-input 3-output memories:
  H numbers the six non-empty columns for x1..x4, G combines that with x5.
* **`ex43_addr_gen`** - 5 inputs, weight 7, but the first memory needs only
  one output because its decomposition chart has just two distinct columns;
  it shows that q = ceil(log2(k+1)) is an upper bound, not a requirement.

## 5. Applications built on the generator

| module | what it does | sizes (defaults) |
|---|---|---|
| `ej_dictionary` | English word (8 letters x 5 bits, blank-padded) -> 80-bit Japanese word. Three word lists of <= 500 words, each an `addr_gen_aux` (40 -> 9 bits) feeding its own 512 x 80 `translation_rom`. The lists are disjoint; the lowest-numbered hitting list drives the outputs. | per list: cascade 16 x 2^11 x 9 = 294912 bits, auxiliary 20480 bits, translations 40960 bits |
| `researcher_db` | Six-character ID (30 bits) -> 13-bit researcher number (<= 8000 researchers) -> record of last name, first name, two research areas and location. | cascade 9 x 2^15 x 13 bits, auxiliary 8192 x 30, records 8192 x 450 |
| `weighted_func` | Any 48-input 16-output function that is non-zero for at most 255 inputs: an exact 20-cell cascade gives each non-zero input an index 1..255, and a decoder of two 8-input 8-output memories turns the index into the 16 outputs (decoder word 0 = 0). In general ceil((n-q)/(p-q)) + ceil(u/q) elements. | 20 x 2^10 x 8 + 2 x 2^8 x 8 bits |
| `memory_patch` | Firmware ROM whose patched addresses an address generator maps to slots of a patch memory; the hit line enables the patch memory and, inverted, the ROM. | 64K x 8 ROM, 15 patch slots |

`mvag_top` places the dictionary, the patch circuit, the researcher database,
the weight-k function, the two 48-input trees and the three fixed generators
side by side (port prefixes `dict_`, `patch_`, `rdb_`, `wf_`, `n12_`, `n11_`,
`ex71_`, `ex41_`, `ex43_`); they share only the load clock.

The dictionary's cascades are uniform and hold any list of up to 511 words.
Cascades tailored to a particular word list with don't cares come out at
roughly a quarter of the size of an exact cascade (around 90 kbit per list
including the auxiliary memory), but their cell sizes depend on the list
and on the synthesis tool, so they are not reproduced here; the generic
cascade is about 3.5 times larger than such a tailored one.

## 6. Module reference

```
mvag_top
├── ej_dictionary ── 3 x { addr_gen_aux, translation_rom }
├── memory_patch  ── addr_gen_aux, aux_memory (patch slots), pq_element (ROM)
├── researcher_db ── addr_gen_aux, translation_rom (records)
├── weighted_func ── lut_cascade, 2 x pq_element (decoder)
├── ex42_net_p12  ── 10 x pq_element (12 in, 8 out)
├── ex42_net_p11  ── 13 x pq_element (11 in) + 1 x pq_element (9 in)
├── ex71_addr_gen ── coincidence_gate
├── ex41_addr_gen
└── ex43_addr_gen

addr_gen_aux ── lut_cascade (── S x pq_element), aux_memory, coincidence_gate
mvag_pkg     ── cascade_cells(), sel_width(), dictionary constants
```

| module | role | key parameters (default) |
|---|---|---|
| `pq_element` | p-input q-output RAM cell | P = 10, Q = 8 |
| `lut_cascade` | uniform programmable cascade | N = 48, P = 10, Q = 8 (20 cells) |
| `aux_memory` | registered vector per address | ADDR_W = 9, DATA_W = 40 |
| `coincidence_gate` | XNOR/AND match, gates the address | N_BITS = 40, ADDR_W = 9 |
| `addr_gen_aux` | cascade + auxiliary memory + check | N_BITS = 40, ADDR_W = 9, P = 11 |
| `translation_rom` | address -> data, zero at address 0 | ADDR_W = 9, DATA_W = 80 |
| `ex42_net_p12`, `ex42_net_p11` | fixed-shape 48-input trees of pq-elements | none (shape fixed) |

**Timing.** Every lookup is purely combinational: a query propagates
through S asynchronous memory reads, then (with an auxiliary memory) one
more read and an n-bit comparator. There are no pipeline registers and no
handshake; add a register at the input and output if the target needs
registered timing, or register between cells to pipeline the cascade (one
cell per stage, one lookup per clock).

**Loading.** All memories have a synchronous write port: put address and
data on the port, raise the write enable, and the word is written on the
rising edge of `clk`. A read of a word being written shows the old value
until that edge. Nothing is reset: every memory word that a lookup can reach
must be written before use (for an auxiliary-memory generator, unwritten
cascade entries are harmless as long as the auxiliary memory is fully
written, since address 0 is forced to "no hit" anyway).

**Bit order.** Vectors are written x1 first: x1 is the MSB. Letters are 5-bit
codes, the first letter in the upper bits. Addresses are plain binary.

## 7. What follows the method and what is this design's choice

Taken from the method: the cascade structure and its sizing (cell count,
rails = ceil(log2(k+1)), r = p - q = 2), the auxiliary-memory scheme and its
coincidence check with AND gates, the generator-plus-decoder form of a
general weight-k function, all tables of the three fixed generators, the
element counts and connection widths of the two 48-input trees,
and the sizes of the applications (40-bit words, 500 words per list, three
lists, 9-bit addresses, 80-bit translations; 30-bit IDs, 13-bit numbers, at
most 8000 researchers).

Choices of this design:

* write ports on every memory and asynchronous reads (the method requires
  programmability and speed but prescribes no interface);
* a uniform cascade inside `addr_gen_aux` instead of a list-specific one
  produced by don't-care synthesis (that synthesis is a software step, done
  with decision diagrams, and is not part of the RTL);
* how the dictionary's three lists are combined (parallel lookup, lowest
  index wins);
* the researcher record layout (5 fields x 18 characters x 5 bits) and the
  character code (blank = 0, a..z = 1..26, underscore = 27) used by the
  testbenches;
* the sizes of the weight-k function (48 inputs, 16 outputs, weight 255);
* all widths of the patch circuit (64K x 8 ROM, 15 slots), and modelling its
  shared output bus as a multiplexer;
* address 0 of the translation/record memory reads as zero.

Not built: the BDD-based simplification that produces small list-specific
cascades (software); the 10-level tree of twenty 10-input elements for the
48-input example (same memory as the 20-cell chain, which is built); a
top-level block for the 32-input, 40000-entry router table
(it is exercised only in simulation, as
`addr_gen_aux #(.N_BITS(32), .ADDR_W(16), .P(18))`, about 32 Mbit of cascade).
The register-and-priority-encoder generator sometimes used as a comparison
(one n-bit register and comparator per vector) is not part of this design.

## 8. Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Reference values
come from the vector lists themselves (searching the list), never from the
tables under test.

| testbench | what it shows |
|---|---|
| `tb_pq_element`, `tb_aux_memory`, `tb_translation_rom` | every word written and read back; write enable and write-edge timing; zero at address 0 |
| `tb_coincidence_gate` | equal, one-bit-off and random vectors; address passed only on a match |
| `tb_lut_cascade` | 48-input, 20-cell cascade loaded exactly for 255 vectors with shared prefixes; all registered vectors, random and one-bit-off misses |
| `tb_addr_gen_aux` | 500 vectors, cascade don't cares filled at random; all hits right, every miss rejected by the auxiliary memory |
| `tb_ej_dictionary` | 3 x 500 random words with translations; hits, misses, one-letter-off misses |
| `tb_ip_address_table` | router table: 40000 IPv4 addresses with shared /8, /16, /24 prefixes in a 32-input, 16-output generator (P = 18); all hit, 20000 others rejected; 200 entries replaced by rewriting only the changed words, then everything rechecked |
| `tb_researcher_db` | 22 sample researchers (IDs and records) and 4000 other IDs |
| `tb_memory_patch` | 64K-word image, 15 patches, all addresses read |
| `tb_weighted_func` | random 48-input 16-output function of weight 255; non-zero inputs, one-bit-off and random inputs |
| `tb_ex42_net_p12`, `tb_ex42_net_p11` | each tree loaded for 255 random 48-bit vectors with shared prefixes; element count, total memory, all registered vectors, 8000 random and one-bit-off vectors |
| `tb_ex71_addr_gen`, `tb_ex41_addr_gen`, `tb_ex43_addr_gen` | every input against the registered-vector list |
| `tb_mvag_top` | the whole top at default sizes, end to end; counts hits per list, misses, auxiliary-memory rejections, patched and plain ROM reads, researcher hits and rejections, non-zero and zero outputs of the weight-k function, hits and rejections of both trees loaded with the same 255 vectors (they must agree with the chain inside the weight-k function), and fails if any of them never happens |

`cascade_prog_pkg` (the chain loader of section 3), `pq_net_pkg` (the tree
loader) and `researcher_table_pkg` (sample records) are testbench packages.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mvag_top \
    -y rtl -y tb rtl/mvag_pkg.sv tb/cascade_prog_pkg.sv tb/pq_net_pkg.sv \
    tb/researcher_table_pkg.sv tb/tb_mvag_top.sv
./obj_dir/Vtb_mvag_top
```

Replace `tb_mvag_top` by any other testbench name; the packages it does not
import may be left on the command line. The full-size top test runs in about
a second.

## 9. Changing sizes

* Number of registered vectors k: set the address width to
  ceil(log2(k+1)) (`ADDR_W` / `Q` / `NUM_W`) and the cell width to that plus
  2 (`P`). The cell count follows from `mvag_pkg::cascade_cells`.
* Input width: `N` / `N_BITS`. Memory grows linearly with the input width
  and as 2^P with the cell width.
* Fewer levels: larger `P` (fewer, bigger cells); less memory: r = 1 or 2.
* A list-specific, don't-care-optimised cascade with uneven cells can be
  written like `ex71_addr_gen`: constant or loadable cells wired by hand,
  followed by `aux_memory` and `coincidence_gate`.
* The two trees (`ex42_net_p12`, `ex42_net_p11`) have a fixed shape and no
  parameters; another tree is written the same way, one `pq_element` per
  node and one `assign` per element address, and loaded with `pq_net_pkg`
  after describing the same connections to it.
