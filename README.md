# Thermometer-to-binary encoder built from 2:1 multiplexers

A flash ADC compares its input with 2^N − 1 reference levels at once. The
comparator outputs C1 … C(2^N−1) form a *thermometer code*: every comparator
whose reference lies below the input reads 1, every one above reads 0. To get
an N-bit number, the code has to be encoded. This design does that with
nothing but 2:1 multiplexers. For the 4-bit case, 15 comparator inputs become
4 binary outputs through eleven multiplexers in three ranks.

## The idea: a binary search in wires

In a valid thermometer code, the middle comparator C8 (of 15) is 1 exactly
when the value is 8 or more. So C8 *is* the MSB, X3. It is also the right
control for the next step:

* If C8 = 1, the lower half C1 … C7 are all 1 and carry no information.
  The value minus 8 is held in the upper half C9 … C15.
* If C8 = 0, the upper half is all 0. The value is held in C1 … C7.

So seven multiplexers, all selected by C8, pass either C15 … C9 or C7 … C1.
Their outputs T7 … T1 are again a thermometer code, now 7 bits long. The same
step repeats on that code: its middle bit T4 is X2 and selects three
multiplexers. Their middle output U2 is X1, and it selects the last
multiplexer, whose output is X0.

```
X3 = C8                         rank 1 (7 muxes, sel = C8):  T[j] = C8 ? C[8+j] : C[j]   j = 1..7
X2 = T4                         rank 2 (3 muxes, sel = T4):  U[j] = T4 ? T[4+j] : T[j]   j = 1..3
X1 = U2                         rank 3 (1 mux,   sel = U2):  X0   = U2 ? U3 : U1
```

Input pairs of the first rank: (C15, C7), (C14, C6), (C13, C5), (C12, C4),
(C11, C3), (C10, C2), (C9, C1). The first input of each pair is passed when
the select is 1.

Properties that follow from this structure:

* **Cell count.** An N-bit encoder uses 2^N − N − 1 multiplexers: 11 for
  N = 4. There are no other gates. The MSB is a plain wire.
* **Critical path.** It starts at the middle comparator and runs through the
  select input of one multiplexer per rank, N − 1 in all, to X0. Logically
  the MSB is ready almost at once and the LSB last. Transistor-level
  simulations of this encoder in a 5 V process give per-output settling
  times of about 0.10, 0.16, 0.21 and 0.92 ns for a step that toggles all
  four outputs. The slowest output sets the total, about 0.92 ns. The RTL
  here has no delays and does not model these times.
* **Bubbles are not corrected.** If the comparator code has a bubble (a 0
  below a 1), the tree still performs its binary search: it reads comparator
  p + 2^b for bit b, starting at p = 0 and adding 2^b whenever the bit is 1.
  The result is exact for every valid code. For other codes it is whatever
  that search returns. The testbench checks this behaviour for all 2^15 input
  words. No error flag is produced.

## Modules

| File | Role |
|------|------|
| `rtl/tc_mux_encoder.sv` | Top. Parameter `N_BITS` (default 4). Input `therm_i[2**N_BITS-1:1]`, where bit j is comparator Cj. Output `bin_o[N_BITS-1:0]`, where bit k is Xk. Instantiates one `mux_rank` per rank, from K = N_BITS down to K = 2. The LSB is the one-bit code left after the last rank. |
| `rtl/mux_rank.sv` | One rank. Parameter `K`. It takes a (2^K − 1)-bit code and outputs its middle bit `sel_o` plus the folded (2^(K−1) − 1)-bit code `code_o`, made by 2^(K−1) − 1 `mux2` cells that share `sel_o` as their select. |
| `rtl/mux2.sv` | The cell: `z = a·sel + b·sel'`. |

Every module is purely combinational. There is no clock, no reset and no
state. `bin_o` follows `therm_i` after one pass through the tree. In a flash
ADC the comparators are normally latched on the sampling clock. Any output
register belongs to the surrounding design. This encoder does not include
one.

Not included: the comparator chain, its reference ladder and the sampling
clock. These are analog parts. Their outputs are the `therm_i` port.

## Where the RTL goes beyond the reference circuit

* **Reference circuit.** The reference is a fixed 4-bit circuit. Here the
  same recursion is written for any `N_BITS ≥ 2`, and elaboration stops with
  an error for smaller values. The default, 4, is the reference size.
* **Ranks as modules.** Each rank is its own module (`mux_rank`). The
  reference only describes "series" of multiplexers that share a select line.
* **Wired outputs.** `bin_o[N_BITS-1]` is wired straight to the middle input,
  and each `sel_o` to its rank's middle input. Structural checkers report
  these as feed-through outputs. That is intended: the MSB of this encoder
  is a wire.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|-----------|----------------|
| `tb/mux2_tb.sv` | All 8 input combinations. |
| `tb/mux_rank_tb.sv` | Ranks with K = 4, 3 and 2 against a reference fold over every input word. It also checks that a thermometer code folds into a thermometer code with 2^(K−1) removed when the select is 1. |
| `tb/tc_mux_encoder_tb.sv` | The default 4-bit encoder with no parameter overrides. It covers the 16-row truth table (count of ones → binary), all 32768 input words against the binary-search reference, and the mid-scale steps 7 → 8 and 8 → 7, where all four outputs toggle. It counts, from the outputs, how often each rank select (X3, X2, X1) picked the upper half and the lower half, and fails if either count is zero. |
| `tb/tc_mux_encoder_sizes_tb.sv` | The encoder at N_BITS = 2, 3, 5 and 6. It applies every valid code at each size, plus random bubbled words at sizes 2, 3 and 5. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
          --top-module tc_mux_encoder_tb tb/tc_mux_encoder_tb.sv
./obj_dir/Vtc_mux_encoder_tb
```

Every testbench finishes in well under a second.

## Changing it

* **Another resolution.** Set `N_BITS`. The port widths follow it.
* **Bubble suppression.** If it is needed, add it in front of `therm_i`, for
  example with three-input majority gates. The tree itself assumes a clean
  thermometer code.
* **A latched output.** Register `bin_o` in the instantiating module. With
  the path length above, the encoder needs N_BITS − 1 multiplexer delays.
