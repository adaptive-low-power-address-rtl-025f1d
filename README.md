# Self-organizing-list address bus coding

Driving an off-chip address bus costs power every time a line toggles, and
the pad and board capacitance makes those toggles expensive. Instruction
addresses are mostly sequential, so Gray or INC-XOR style codes already quiet
an instruction bus. Data addresses are not sequential, but they are local: a
program keeps returning to a few regions (two arrays read in turn, the stack,
a buffer). This design exploits that locality with **self-organizing lists**.
The address is cut into small slices. Each slice value is sent not as itself
but as its current **position in a list**. The list reorders itself after
every transfer, so the values used most often sit at the small indices 0, 1,
2, …, which are close to each other in Hamming distance. Encoder and decoder
reorder identical lists in lock step, so no side information is sent. The
coding needs no extra bus lines and no extra cycles.

Two links are provided:

* a **data address bus** link: 32 bits in eight 4-bit list slices, with
  transition signaling on top;
* a **multiplexed address bus** link, carrying instructions and data: the 4
  low bits go through a sequential-stream coder (Delta-TS, or INC-XOR as an
  option) and the 28 upper bits through seven 4-bit list slices.

## The list coders

### Two reorganisation policies

For a slice of `W` bits there are `2^W` symbols. After a symbol is sent at
index `E`:

* **move-to-front (MTF)**: the symbol goes to index 0. The symbols at indices
  `0 .. E-1` each move down one place.
* **transpose (TR)**: the symbol swaps with the symbol at index `E-1`. At index
  0 nothing moves.

MTF adapts fast to a new working region. TR moves at most two entries per
transfer, so less of the logic switches.

### Encoder: one register per symbol, not a searched list

A literal list would have to be searched for the incoming symbol, and the
search would sit in the address path. `sol_encoder` turns this around. Each
possible symbol `x` owns a `W`-bit register `C[x]` that holds its current
index. The incoming symbol drives a select multiplexer that picks `E = C[sym]`.
That value goes to the bus, and `E` is also broadcast to every register, which
updates itself locally:

| policy | next `C[x]` |
|---|---|
| MTF | `0` if `C[x] == E`; `C[x]+1` if `C[x] < E`; else `C[x]` |
| TR  | `C[x]-1` if `C[x] == E` and `E != 0`; `E` if `C[x] == E-1` (and `E != 0`); else `C[x]` |

The only logic in the address path is the `2^W : 1` multiplexer. The update
logic runs from register to register. An assertion checks that the registers
always hold a permutation of `0 .. 2^W-1`.

### Decoder: the list itself

`sol_decoder` stores the list the other way round: `L[k]` is the symbol at
index `k`. The received code selects `L[code]`, which is the decoded symbol.
The code then reorders the list:

* MTF: `L[0]` takes the selected symbol through a `2^W`-input mux. Each
  `L[k]` with `1 <= k <= code` takes `L[k-1]` through a 2-input mux.
* TR: `L[code]` and `L[code-1]` swap.

### Transition signaling (TS)

With `USE_TS = 1`, the list code is not driven directly. The bus becomes
`bus XOR E`. Index 0 (a repeat of the most recent symbol under MTF) then
causes no toggle at all, and small indices toggle one or two lines. The
decoder recovers `E = bus XOR previous bus`. TS is applied before the output
register, so it adds no latency.

### Why slices

Keeping a list of all 2^32 addresses is impossible. Each `W`-bit slice
therefore has its own independent list (`data_bus_encoder` /
`data_bus_decoder`). Wider slices capture more locality but grow as
`2^W` registers and a `2^W`-input mux. `W = 4` is the default; 2 and 3 are
the cheaper options. If `W` does not divide the bus width, the top slice is
narrower. For example, `W = 3` on 32 bits gives ten 3-bit slices and one 2-bit
slice.

## The low-bit coders of the multiplexed bus

On a multiplexed bus most addresses are sequential instruction fetches. The
lowest four bits then carry almost all the toggles: with a unit increment,
bits 0–3 carry 1 + ½ + ¼ + ⅛ of the 2 toggles per step (93.75%). These bits
are coded with a predictor `P = previous address + STRIDE`, computed modulo
2^4:

* **Delta-TS** (`delta_ts_encoder` / `delta_ts_decoder`, the default):
  `bus ← bus XOR (addr − P)`. A sequential fetch gives a delta of 0 and no
  toggle. A short jump gives a small delta and few toggles. The decoder
  computes `addr = (bus XOR previous bus) + P`.
* **INC-XOR** (`incxor_encoder` / `incxor_decoder`): `bus ← addr XOR P`. This
  is a little cheaper, with no subtractor, and usually saves a little less.

The upper 28 bits use MTF slices without TS by default (`USE_TS` can turn TS
on). The increment does not carry from the low 4 bits into the upper slices:
each part is coded independently.

`STRIDE = 1` assumes the bus carries word addresses. For a byte-addressed bus
with 4-byte instructions, set `STRIDE = 4` or feed the coder the word address.

## Interfaces and timing

Every encoder and decoder has the same small handshake:

| encoder | decoder | meaning |
|---|---|---|
| `in_valid`, `addr`/`sym` | `bus_valid`, `bus` | a new value this cycle |
| `bus`, `bus_valid` | `addr`/`sym`, `*_valid` | registered result, one cycle later |

* On cycles with the valid input low, nothing changes: the list stays as it
  is, and the bus and the output hold their values. An idle bus therefore does
  not toggle, and both ends stay in step.
* The encoder has a one-cycle latency: the coded value is registered on its
  way to the pads. The decoder output is also registered. An address
  therefore reaches the far side of `addr_bus_codec_top` two cycles after it
  is presented.
* Reset is asynchronous and active low. It puts symbol `x` at index `x` in
  every list, and sets the bus and previous-address registers to 0. Encoder
  and decoder must be reset together. After reset they must see exactly the
  same sequence of valid transfers, because any lost or extra transfer
  desynchronises the lists. The scheme has no error detection or
  resynchronisation apart from reset.

### Top level

`addr_bus_codec_top` places the two links side by side:
`data_in_* → data_bus → data_out_*` and `mux_in_* → mux_bus → mux_out_*`.
The coded buses are outputs, so their activity can be measured. The links
share only the clock and reset.

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 32 | bus width of both links |
| `DATA_W`, `DATA_POLICY`, `DATA_TS` | 4, MTF, 1 | data link slices |
| `MUX_LSB_W`, `MUX_LSB_SCHEME` | 4, Delta-TS | multiplexed link low bits |
| `MUX_W`, `MUX_POLICY`, `MUX_TS` | 4, MTF, 0 | multiplexed link upper slices |
| `STRIDE` | 1 | predictor increment of the low-bit coder |

Types are in `sol_pkg`: `list_policy_e` (`POLICY_MTF`, `POLICY_TR`) and
`lsb_scheme_e` (`LSB_DELTA_TS`, `LSB_INC_XOR`).

## Files

| file | contents |
|---|---|
| `rtl/sol_pkg.sv` | shared enums |
| `rtl/sol_encoder.sv`, `rtl/sol_decoder.sv` | one list slice |
| `rtl/data_bus_encoder.sv`, `rtl/data_bus_decoder.sv` | a bus of slices |
| `rtl/delta_ts_*.sv`, `rtl/incxor_*.sv` | low-bit coders |
| `rtl/mux_bus_encoder.sv`, `rtl/mux_bus_decoder.sv` | multiplexed bus |
| `rtl/addr_bus_codec_top.sv` | both links |
| `tb/sol_ref_pkg.sv` | reference models: explicit lists that are searched and shifted |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_transition_reduction.sv` | toggle-count comparison of 14 configurations |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end. Example
with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/sol_pkg.sv tb/sol_ref_pkg.sv tb/tb_addr_bus_codec_top.sv \
  --top-module tb_addr_bus_codec_top -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`.

* The unit testbenches compare every output against `sol_ref_pkg`, one cycle
  after the input. They cover the default configuration and at least one other
  (TR, another `W`, TS on or off, another stride).
* Decoder testbenches drive random data on the bus during idle cycles, to show
  that the decoder ignores the bus when `bus_valid` is low.
* `tb_addr_bus_codec_top` runs both links at their default sizes for 20,000
  cycles. It checks the coded bus and the two-cycle round trip. It also
  checks that idle cycles, front hits, moves, sequential and non-sequential
  low bits, and low-bit wrap-around all occur.
* `tb_transition_reduction` prints the toggle reduction of each
  configuration on synthetic streams. A typical run gives these reductions:

  | stream | configuration | toggle reduction |
  |---|---|---|
  | data | W=2 MTF+TS | ≈27% |
  | data | W=3 MTF+TS | ≈40% |
  | data | W=4 MTF+TS | ≈47% |
  | data | W=4 TR+TS | ≈43% |
  | multiplexed | MTF + Delta-TS | ≈39% |
  | multiplexed | MTF + INC-XOR | ≈32% |
  | multiplexed | MTF alone | ≈30% |

  The testbench checks the ordering that the scheme relies on. These are
  synthetic address streams, not program traces, so the absolute numbers are
  illustrations only.

## How far to trust it, and where it departs from the scheme

* **Taken directly from the scheme:** the per-symbol register encoder with its
  MTF and TR update rules, the list decoder with its multiplexer structure,
  transition signaling, the slicing of the bus, the split of the multiplexed
  bus into Delta-TS or INC-XOR on 4 low bits plus list slices, and the
  default sizes (32-bit bus, `W = 4`, 4 low bits).
* **Choices of this design:**
  * the valid handshake and the freezing of state on idle cycles;
  * the reset ordering (identity) and the zero reset values;
  * the registered decoder output;
  * `STRIDE = 1`;
  * the sign of the Delta difference (current minus predicted);
  * TS off on the upper slices of the multiplexed bus;
  * MTF rather than TR as the default policy on the data bus (both are
    built).
* The Delta subtractor is a plain subtractor. A table-based one would only
  change the timing.
* Not included: the earlier coders that the scheme is compared with
  (bus-invert, Gray, T0, whole-bus INC-XOR), and any processor or memory
  attachment.
* All modules have been simulated with Verilator and elaborated with a second
  SystemVerilog front end. No gate-level or timing analysis was done.
