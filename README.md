# X-canceling MISR with partially masked X-chains

Scan test responses increasingly contain unknown values (X's). They come from uninitialised
memories, false and multi-cycle paths, analog blocks and similar sources. One X that reaches a
conventional MISR makes the whole signature unknown. An **X-canceling MISR** accepts the X's
anyway. The MISR is linear, so every signature bit is an XOR of scan-cell values. Off-line
analysis finds sets of signature bits whose XOR contains no X at all. The tester reads only those
*X-canceled combinations*, and each one is a deterministic value it can compare. The cost is
control data: each combination needs an m-bit selection vector, and the number of combinations
needed grows with the number of X's.

This design cuts that cost for responses with many X's. The scan cells that capture X's most
often are stitched into a few **X-chains**. One tester channel drives a single mask bit, and
one AND gate per X-chain forces those chains to 0 in every shift cycle where they carry nothing
worth observing. In the few cycles where an X-chain holds a fault effect (a "D"), the mask opens
for the whole slice. Any X's in that slice then *leak* into the MISR. This costs little,
because the X-canceling MISR handles leaked X's the same way as the X's from the regular chains.
So the MISR sees far fewer X's, for only one control bit per cycle.

The RTL is written in SystemVerilog-2017 and is fully synthesizable. At its defaults it has a
256-bit MISR, 128 scan chains of which 12 are X-chains, and an optional 32-bit X-free MISR.

## Datapath

```
 scan_out[11:0]  (X-chains) ──► AND ◄── xmask_n          (xchain_mask)
                                 │
 scan_out[127:12] (regular) ─────┤
                                 ▼
                          phase shifter  128 ► 256        (phase_shifter)
                                 ▼
                          256-bit MISR  ◄── misr_clear, misr_en     (misr)
                                 │ sig[255:0]
                                 ▼
 sel_din[7:0] ──► 256-bit selection register ──► AND ──► XOR ──► xc_bit
                  (selection_reg)                  (xcancel_xor)     │
                                                                     ▼
                                               optional 32-bit X-free MISR ──► xfree_sig
                                               (xfree_misr, strobed by xfree_en)
```

All blocks are instantiated in `xcanceling_misr_top`. The design has no sequencer of its own.
The tester drives every control line, because the tester is also the one that knows the masking
and selection data.

## How the X's get canceled

This is the key idea of the design, and the hardware alone does not show it.

1. **Symbolic view.** Give every scan cell a symbol: O for a known value, X for an unknown one.
   After the response is shifted in, every MISR stage is an XOR of symbols. Set every O to 0:
   each stage is then a vector over the X's, and stacking those vectors gives a matrix with one
   row per MISR stage and one column per X.
2. **Dependent rows.** If there are fewer X's than MISR stages, some sets of rows XOR to zero.
   Gauss-Jordan elimination on the matrix, carrying an identity matrix alongside to record which
   rows were combined, finds these sets. Every row that becomes all-zero names a set of stages
   whose XOR is free of X's.
3. **Read-out.** The tester picks q of these X-free sets, or XOR-mixes of them. For each, it
   loads a selection vector that has a 1 at each chosen stage, and `xcancel_xor` computes
   `^(sig & sel)`. The result depends only on known cells, so the tester compares it with the
   fault-free value computed in advance. It does not depend on the values the X's took on
   silicon.
4. **Coverage.** An error is missed by one combination with probability 1/2. With q
   combinations, error coverage is 1 − 2^-q. The default q = 7 (`xcm_pkg::Q_COMB`) gives 99.2%.
   One signature can therefore absorb up to m − q = 249 X's. It may span several test vectors:
   capture simply continues until the next vector would exceed that number.

Worked example (6-bit MISR, six chains of three cells; in the table, cells are listed in the
order they are shifted out):

| chain | cells shifted in  | final stage |
|-------|-------------------|-------------|
| 1 | X1, X3, O13  | M1 = X1⊕O3⊕O8⊕O13 |
| 2 | O2, O8, O14  | M2 = X1⊕O2⊕X2⊕X3⊕O9⊕O14 |
| 3 | O3, O9, O15  | M3 = O2⊕O5⊕X3⊕O10⊕O15 |
| 4 | X2, O10, O16 | M4 = X1⊕O6⊕O11⊕O16 |
| 5 | O5, O11, O17 | M5 = X1⊕O2⊕X3⊕O12⊕O17 |
| 6 | O6, O12, X4  | M6 = O2⊕X3⊕X4 |

Elimination finds two X-free combinations:
M1⊕M3⊕M5 = O3⊕O5⊕O8⊕O10⊕O12⊕O13⊕O15⊕O17, and M1⊕M4 = O3⊕O6⊕O8⊕O11⊕O13⊕O16.
`tb_misr` and `tb_xcancel_xor` reproduce this example exactly.

The symbolic simulation, the elimination and the fault simulation that marks the D's are
off-line software, not hardware. The testbench harness contains a compact version of the first
two for checking.

## Partial masking of the X-chains

* `xmask_n = 0` (the normal case): every X-chain bit of the slice enters as 0.
* `xmask_n = 1`: the tester raises it in exactly the slices where at least one X-chain cell is a
  D. The whole slice passes, including any X's it holds. Those are the leaked X's.
* Regular chains are never masked.

The mask bit costs one control bit per shift cycle. Having more X-chains catches more X's, but
it also makes a D more likely in any given slice, and so makes leaks more likely. The best number
of X-chains therefore depends on the circuit. On the main reference circuit it was 12, where
89% of all X's were masked. That is why `N_XCHAINS` defaults to 12. It is a parameter, and the
X-chains are always `scan_out[N_XCHAINS-1:0]`.

## Operating sequence and timing

| phase | cycles | lines the tester drives |
|-------|--------|-------------------------|
| start a signature | 1 | `misr_clear` |
| capture | 1 per scan slice | `scan_out`, `xmask_n`, `misr_en = 1` |
| per combination: clear selection (optional) | 1 | `sel_clear` |
| per combination: load selection | M / SEL_CH = 32 | `sel_shift = 1`, `sel_din` (bits 7:0 of the vector first) |
| per combination: compare | `xc_bit` valid the cycle after the last shift | optionally `xfree_en = 1` for one cycle |

* The signature holds while `misr_en` is low, so read-out does not disturb it.
* `xc_bit` is combinational from the two registers.
* The MISR, the selection register and the X-free MISR have an asynchronous active-low `rst_n`
  and a synchronous `clear`.
* An assertion in the top flags an `xfree_en` strobe while the signature or the selection vector
  is changing.
* A full load replaces the whole selection register, so `sel_clear` is not needed between
  combinations.
* With q = 7, reading out one signature costs 7 × 256 = 1792 selection bits and 7 × 33 cycles:
  32 shifts and one compare cycle per combination.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `M` (MISR width) | 256 | size used in the evaluation |
| `N_XCHAINS` | 12 | best X-chain count for the main reference circuit |
| `N_CHAINS` | 128 | own choice; real circuits differ |
| `SEL_CH` (selection-register load channels) | 8 | own choice; must divide M |
| `XFREE_W` (X-free MISR width) | 32 | own choice |
| `Q_COMB` (combinations per signature) | 7 | coverage target 99.2% |

The defaults are collected in `rtl/xcm_pkg.sv`.

## Block notes

**MISR (`misr.sv`).** Bit 0 is the output end. Each cycle, stage i takes stage i+1, its own input
and, if `TAPS[i]` is set, stage 0. The last stage always takes stage 0. This is the structure the
6-bit example implies: feedback into stages 2, 3, 5 and 6, counted from the top. It is
generalised to M bits. For a polynomial x^n + x^a + x^b + x^c + 1, the tap mask sets bits a−1,
b−1 and c−1. `xcm_pkg::default_taps` holds maximal-length polynomials for 8 to 256 bits. The
256-bit default is x^256 + x^254 + x^251 + x^246 + 1, a standard choice from LFSR tables. No
particular polynomial is required: X-canceling works for any linear register.

**Phase shifter (`phase_shifter.sv`).** Each MISR input is the XOR of three distinct chains.
The first is chain `j mod N_IN`, so every chain is observed. The other two come from a fixed
integer hash; the formula is in the file header. Do not replace the hash with a pattern that
only shifts with the chain number. With such a pattern, chain c+1 at cycle t reaches the
signature as exactly the same vector as chain c at cycle t+1. An X on one chain would then hide
fault effects on its neighbour. With a pure shift pattern, the end-to-end test's injected errors
go undetected. `tb_phase_shifter` checks for this aliasing.

**Selection register (`selection_reg.sv`).** A shift register that takes SEL_CH bits per cycle
at the top. After M/SEL_CH shifts, the first chunk sent sits in the low bits.

**X-free MISR (`xfree_misr.sv`).** Optional. A serial-input MISR that folds the X-canceled bits
into one signature, so they need not be compared one by one. The polynomial is
x^32 + x^22 + x^2 + x + 1. Leave `xfree_en` low to operate without it.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_xchain_mask` | mask 0 forces zeros; mask 1 passes the slice |
| `tb_phase_shifter` | tap formula for every single-chain input; exactly three chains per output; every chain observed; no neighbour aliasing; random slices at 128→256 and 4→6 |
| `tb_misr` | the six equations of the worked example over 300 random symbol assignments; the 256-bit register against a reference model, including clear and hold; a period of 255 for the 8-bit polynomial |
| `tb_selection_reg` | a load takes exactly 32 cycles and not 31; chunk order; hold; clear |
| `tb_xcancel_xor` | parity at 256 bits; both X-free combinations of the worked example for random X values |
| `tb_xfree_misr` | against a reference model; clear; no short period |
| `tb_xcanceling_misr_top` | end to end at the default parameters (see below) |
| `tb_xchain_sweep` | the X-chain-count trade-off, 4 to 36 X-chains (see below) |

The system-level tests share one harness, `tb/xcm_e2e_run.sv`. It acts as both the tester and
the off-line tools:

* It generates responses. In the basic mode, X-chain cells are X 40% of the time and regular
  cells 0.4%. In profile mode, every scan-cell site has its own X rate: 6% of sites at 40%, 10% at
  4% and the rest at 0.1%. The most X-prone sites are stitched into the X-chains. In both modes
  1% of the known cells are D's.
* It drives the mask bit by the D rule.
* It tracks the symbolic MISR state and fills each signature with test vectors up to 249 X's.
* It runs Gauss-Jordan elimination and loads 7 selection vectors per signature. Each vector is
  a random non-zero mix of the X-free basis combinations. The sparse basis rows alone catch an
  error less often than the 1 − 2^-q estimate assumes; the random mixes behave as it assumes.
* It checks every `xc_bit` against the value predicted with all X's at 0. The DUT receives
  random X values, so a match shows the X's really cancel.
* It checks the X-free MISR against a reference.
* From the second signature on, it flips one D value per signature. Each combination must
  disagree exactly as the model predicts, and the error must be caught.
* It counts masked X's, leaked X's, regular-chain X's, signatures that span several vectors,
  combinations and detected errors, and fails if any of these never occurs.

`tb_xcanceling_misr_top` runs the harness once at the default parameters: 55 vectors, 5
signatures, about 5800 X's masked, 490 leaked and 650 from regular chains, all 4 injected errors
caught.

`tb_xchain_sweep` runs five complete designs side by side with 4, 8, 12, 18 and 36 X-chains, in
profile mode, 30 vectors each. Control bits are counted as one mask bit per shift cycle plus
7 × 256 selection bits per signature:

| X-chains | X's in X-chains | X's masked | signatures | control bits |
|---------:|----------------:|-----------:|-----------:|-------------:|
| 4  | 42.1% | 41.3% | 8 | 15056 |
| 8  | 83.0% | 79.3% | 3 | 6096 |
| 12 | 88.4% | 82.0% | 2 | 4304 |
| 18 | 94.2% | 84.0% | 2 | 4304 |
| 36 | 97.6% | 69.2% | 4 | 7888 |

The trade-off shows clearly. More X-chains capture more X's. But D's open the mask more often,
so beyond about 12–18 chains the leaks outweigh the gain. The response profile is synthetic, so
the numbers show the mechanism, not any particular circuit.

Each test finishes in well under a second.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/xcm_pkg.sv tb/tb_xcanceling_misr_top.sv \
          --top-module tb_xcanceling_misr_top -Mdir obj && obj/Vtb_xcanceling_misr_top
```

## Limits and departures

* The scan chains belong to the circuit under test and are not part of this RTL. The same holds
  for the stitching of the X-chains and the choice of their number. `scan_out` is the interface
  to them.
* The symbolic simulation and elimination, the fault simulation that marks D's, and the tester
  are external. The testbench models them only as far as checking requires.
* These are this design's own choices, not taken from the source: the tester-driven control
  interface, holding the signature during read-out (there is no shadow register, so capture
  pauses while combinations are read), the 8-channel selection load, the polynomials, the
  phase-shifter pattern, the 128-chain default and the 32-bit X-free MISR.
* The X-chains could be split into groups, each with its own mask channel. That would leak fewer
  X's, but the gain does not pay for the extra tester channels. Only the single-mask-bit scheme
  is built.
* Other X-chain counts from the evaluation (1 to 36) are a change of `N_XCHAINS`. Only the
  12-chain configuration is simulated at the default parameters; the sweep covers 4 to 36.
  The published control-bit totals depend on the real circuits' responses, which are not
  available, so they are not reproduced.
