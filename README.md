# Error-tolerant Parity TCAM with ATM VPI/VCI translation

A ternary CAM (TCAM) compares a search key with every stored word at once.
Each stored digit is 0, 1 or X (don't care). That makes it the natural
lookup engine for routing tables, packet filters and ATM connection tables.
Its weakness is soft errors. A particle strike that flips a stored bit
silently changes which packets a word matches. The TCAM has no read-back
step where a per-word code could be checked.

This RTL implements a TCAM that finds and repairs such errors itself. It
adds three things to the array:

- **A parity digit per word.** Each word stores the parity of its data bits
  as one extra digit.
- **A backup copy of every word in an ECC-protected SRAM.**
- **A test mode.** The TCAM is searched with pre-computed *X-keys*. An X-key
  is a search key with don't-care digits, built so that on a healthy table it
  matches exactly one known word. If it matches several words, or the wrong
  word, a stored word has been corrupted. The controller then rewrites the
  words involved from the backup copy. Any number of flipped bits per word
  can be repaired this way.

The error-tolerant TCAM is used as the connection table of an ATM header
translator. The translator looks up the incoming VPI/VCI in the TCAM. It
then reads the outgoing VPI/VCI from a RAM at the match address. Finally it
rebuilds the header and recomputes its HEC.

```
                   +-------------------- et_tcam ---------------------------+
 search key ------>|  key_mux --(n digits)--> parity_tcam --> addr/hit ------+--> result
                   |   ^  ^  ^   sel(2)            |  multi ("refresh bit") |
 X-key (xkey_lut) -|---+  |  |                     v                        |
 backup data ------|------+  |              et_controller <-----------------+
                   |  ecc_sram -> data ------------ | addr
                   +--------------------------------------------------------+
 atm_tcam_top = atm_translator + et_tcam (16 x 28 digits) + xlate_ram
```

## Ternary words and the parity digit (`parity_tcam`, `match_encoder`)

Each digit is held as a value bit and a care bit. `care = 0` means X. The
cell's fourth, unused state is not represented.

When a word is written, one more digit is appended: the XOR of its data
bits. Every search key gets the same digit. Suppose a stored word differs
from the key in exactly one data bit. Then it also differs in the parity
digit, so it shows two mismatching digits instead of one. In a matchline
circuit that doubles the discharge current in the slowest case (a single
mismatch), which is where the speed and energy gain comes from. In logic,
the match result is unchanged, because a match on the data implies a match
on the parity.

There is one subtlety. If a word or key has any X data digit, its parity is
unknown. The parity digit is then stored or searched as X. The parity digit
also has a side effect on soft errors: an odd number of flipped data bits
makes the word mismatch every key that its data alone would still match.

All W words are compared in parallel, and the matchline vector is
registered. `match_encoder` returns the lowest matching index, a hit flag
and a *multiple-match* flag. The multiple-match flag is the "refresh bit"
that the controller watches. Write, search and injection all act at the
clock edge. The result is valid one cycle after `search`.

## Finding and repairing soft errors (`et_controller`, `xkey_lut`, `ecc_sram`, `key_mux`)

This is the part that needs the most care when you use the design.

**Modes.** `mode = MODE_REGULAR` serves searches (`s_ready` high when idle).
`mode = MODE_TEST` runs test passes back to back. Searches are refused
during a pass. Leaving test mode takes effect at the next X-key boundary.

**The multiplexer.** Every word that reaches the TCAM goes through
`key_mux`, with a 2-bit select:

| Select | Source | Used for |
|---|---|---|
| `SEL_SEARCH` | search key | regular searches |
| `SEL_XKEY` | X-key | test searches |
| `SEL_DATA` | backup word from the SRAM | all TCAM writes |

Host writes are never written into the TCAM directly. They go into the
ECC-SRAM in the cycle they are accepted. The controller then copies them
into the TCAM: one cycle to read the SRAM, one cycle to write the TCAM. So
the TCAM is only ever loaded from the protected copy.

**One test pass.** For each valid entry *k* of the X look-up memory:

1. Search with X-key *k*.
2. Check the answer. It is an error if any of these holds:
   - more than one word matched;
   - a hit does not match the expected hit (`exp_hit`);
   - the word that matched is not the expected one (`exp_addr`).
3. If there is an error, count it in `err_cnt` and repair:
   - Rewrite the expected word from the backup.
   - Search again with the rewritten rows disabled (`row_en`). Rewrite the
     lowest match. Repeat until nothing matches.

   Each rewrite takes two cycles and counts in `fix_cnt`.
4. Apply the same X-key once more. If it still fails, count it in
   `fail_cnt` and move on.

After the last entry the controller reads every backup word once, one per
cycle (the *sweep*). The ECC-SRAM writes back any word it corrects, so single
flips in the backup are repaired even for words no X-key complained about.
Then `pass_done` pulses and `pass_cnt` increments. A pass over a healthy
table takes about 2 cycles per X-key plus W + 1 cycles for the sweep.

A backup read with an uncorrectable (double-bit) error is not written into
the TCAM. It is counted in `unc_cnt`, as is an uncorrectable word found by
the sweep. A single-bit error in the backup is corrected on the way out.

**Building the X-keys.** The X-keys and their expected indices are computed
in software from the rule table and loaded through the `x_*` port. An X-key
is only useful if it matches exactly one word of the healthy table. A simple
and effective set is:

- each stored word used as its own key (detects any corruption that makes
  the word stop matching its own pattern);
- each word with some low digits replaced by X (detects corrupted
  neighbours that now fall inside that wider key, through a multiple match).

Coverage is exactly what the X-key set covers. Consider a flip that turns a
cared digit into X. It only widens a word. It is found only if some X-key
now matches that word in addition to its own word. For example, a
word 0100 whose second digit becomes X (0X00) is missed if no X-key lies
inside 0X00 other than its own. If the table changes, reload the X-keys.

**Backup memory.** `ecc_sram` stores each word (care and value bits, 2N
bits) as a SECDED Hamming codeword:

- data bits at the non-power-of-two positions;
- check bits at positions 1, 2, 4, …;
- an overall parity bit at position 0.

For N = 4 a codeword is 13 bits; for N = 28 it is 63 bits. A read is
corrected and flagged one cycle after `re`. A corrected word is also
written back into the SRAM at the same edge, so a single flip in the backup
is repaired the first time the word is read (in test mode that happens when
the word is used for a repair). A double flip is only reported.

## ATM header translation (`atm_translator`, `hec_crc8`, `xlate_ram`)

Header layout, byte 1 in bits 39:32:

| Format | Fields (width in bits) |
|---|---|
| UNI | GFC 4, VPI 8, VCI 16, PT 3, CLP 1, HEC 8 |
| NNI | VPI 12, VCI 16, PT 3, CLP 1, HEC 8 |

The `nni` input selects the NNI layout.

- **Key.** The TCAM key is `{VPI (12, UNI zero-extended), VCI (16)}`, 28
  digits. It is searched with every digit cared for. A stored entry whose
  VCI digits are all X switches a whole virtual path.
- **HEC.** The HEC is the CRC-8 of bytes 1–4 with polynomial
  x^8 + x^2 + x + 1, shifted MSB first, XORed with the standard 0x55 coset.
  Set `COSET` to 0 for a plain CRC.
- **Pipeline.** A header accepted in cycle 0 is handled as follows:

  | Cycle | Action |
  |---|---|
  | 0 | HEC check and TCAM search |
  | 1 | TCAM result and RAM read |
  | 2 | rebuild the header and compute the new HEC |
  | 3 | `out_valid` |

  One header can be accepted per cycle.
- **Field handling.** GFC, PT and CLP pass through unchanged.
- **Bad HEC.** A cell with a bad HEC is not searched. It comes out unchanged
  with `out_hec_err`.
- **Unknown connection.** A cell with an unknown VPI/VCI comes out unchanged
  with `out_hit = 0`.
- **Backpressure.** `in_ready` follows the TCAM's `s_ready`. Cells therefore
  wait while a connection is being written or a test pass is running.

## Top level (`atm_tcam_top`)

Parameters: `W = 16` connections, `NX = 16` X-keys, `CNT_W = 16`-bit
counters. The key width is fixed at 28.

To configure a connection, assert `cfg_wr_en` while `cfg_ready` is high.
This writes the TCAM entry (`cfg_key_val` / `cfg_key_care`) and the outgoing
`cfg_new_vpi` / `cfg_new_vci` in the same cycle. The TCAM copy takes the
next two cycles; a search can be issued from the third cycle on.

Status outputs:

- the five counters;
- `test_busy` and `pass_done`;
- `sram_corrected`;
- `multi_match`, a multiple match seen by a regular search.

The `tinj_*` and `sinj_*` ports XOR a flip mask into a stored TCAM word or
SRAM codeword. They model radiation hits in simulation; tie them to 0 in a
real system.

`et_tcam` on its own has the defaults `N = 4` digits, `W = 4` words and
`NX = 8` X-keys. That is the small configuration the scheme is usually
demonstrated with.

## Departures and open points

- The parity digit's benefit is electrical (matchline sensing). The
  matchline sense amplifiers, search-line drivers and transistor-level
  cells are not modelled. Only their logic function is.
- How X-keys are generated is left to software, as is the number of
  connections (16 is this design's choice). The expected-index check and
  the row-disable repair walk are this implementation's own mechanisms.
  The scheme only prescribes detection by multiple matches and repair from
  the backup.
- X-keys are applied in memory order, not in a random order.
- One backup SRAM is used. A second (secondary) ECC copy is not
  implemented.
- The ATM processor and switch fabric that consume the translated header
  are outside the design.
- The HEC coset, the pipeline, the treatment of bad-HEC and unknown cells,
  reset values and all latencies are choices made here.

## Simulation

Every file in `rtl/` holds one module or package, named after the file, so
verilator finds modules with `-y rtl`; only the package `tcam_pkg.sv` has to
be named on the command line. Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl rtl/tcam_pkg.sv \
    tb/tb_atm_tcam_top.sv --top-module tb_atm_tcam_top -Mdir obj -o sim
./obj/sim
```

| Testbench | What it checks |
|---|---|
| `tb_match_encoder` | all patterns for 4 words, random patterns for 16 words |
| `tb_key_mux` | every select code |
| `tb_parity_tcam` | the 4 × 5 route-table example (search 01101, two matches, address 01); the 5 × 7 parity example (match on word 3, parity column 0,0,1,0,0); random operations against a reference model |
| `tb_ecc_sram` | every single-bit error corrected, double errors flagged, for 8-bit and 56-bit data |
| `tb_xkey_lut`, `tb_xlate_ram` | memory behaviour and latency |
| `tb_et_controller` | the controller against behavioural TCAM/SRAM models: copy path, test pass, sweep of the backup, multi-bit repair, care-bit flip, uncorrectable backup |
| `tb_et_tcam` | the error-tolerant TCAM end to end over 12 rounds of random tables and 1–3-bit soft errors, some with a backup bit flipped too, plus backup-only flips repaired by the sweep |
| `tb_hec_crc8` | known HEC values and random headers against long division |
| `tb_atm_translator` | UNI/NNI translation, bad HEC, misses, whole-path entries, stalls, 3-cycle latency, against behavioural CAM/RAM |
| `tb_atm_tcam_top` | the whole design at its default size. Covers configuration, traffic, injected soft errors that visibly corrupt translations (including a multiple match), a test pass while traffic stalls, ECC-corrected repair, then clean UNI and NNI traffic. It counts each of these events and fails if one never happens. |
