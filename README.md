# Configurable FIR filter on a folded bit-plane array

This is a FIR filter,

    y_n = c_0 x_n + c_1 x_(n-1) + ... + c_(kC-1) x_(n-kC+1),

built from only K rows of bit-level functional units. The number of
coefficients kC and the coefficient length mC can change while the
hardware runs. Each row multiplies an input word by one coefficient *bit*
per clock, and adds the result to a partial sum. A bit-plane filter would
need one row for every coefficient bit, that is kC·mC rows. Here the
kC·mC bit operations are folded onto K rows, with N of them time-shared on
each row (K·N = kC·mC). The array's size is fixed by K and N alone. So one
piece of hardware can run 2 coefficients of 6 bits, 3 of 4 bits, 1 of 12
bits, and so on.

The catch is the order of the coefficient bits. Which row needs which bit in
which clock depends on kC and mC, so a fixed wiring cannot serve every
configuration. The design solves this with a small coefficient bit store,
the **CBSM** (coefficient bit supply module). It is a K × N array of one-bit
cells. Coefficients are shifted into it one bit at a time, and the loading
path itself puts every bit where it has to be. After K·N loading clocks the
store rotates, and each of its rows feeds one row of the array. The rows of
the store can also be shortened to a folding factor n_eff < N. The filter
then runs with fewer coefficient bits and gives an output every n_eff
clocks instead of every N.

Default size: K = 3 rows, N = 4, 5-bit unsigned inputs and a 17-bit output.
The main configuration is kC = 2 coefficients of mC = 6 bits.

## The schedule

Number the bit operations of one output word p = 1 … L, with L = kC·mC.
Operation p uses coefficient i = kC−1−⌊(p−1)/mC⌋ and bit
j = (p−1) mod mC. So the oldest coefficient c_(kC−1) comes first, and
each coefficient goes least significant bit first. Operation p runs on
row

    s = (p−1) mod K        at folding order        r = (p−1) mod N

where r is the clock within a period of N clocks. A word therefore moves one
row down per clock, S_0 → S_1 → … → S_(K−1) → S_0 …, wrapping around the
rows until all L operations are done. A new word starts in S_0 every N
clocks. The word ends in S_(K−1) at r = N−1, after L clocks.
K words are in flight at any time, one per row.

With K = 3 and N = 4, all twelve (s, r) slots are used exactly once. For
kC = 2 and mC = 6 the rows need these bits (c_i^j is bit j of c_i):

| folding order r | S_0     | S_1     | S_2     |
|-----------------|---------|---------|---------|
| 0               | c_1^0   | c_1^4   | c_0^2   |
| 1               | c_0^3   | c_1^1   | c_1^5   |
| 2               | c_0^0   | c_0^4   | c_1^2   |
| 3               | c_1^3   | c_0^1   | c_0^5   |

Because (s, r) must identify p uniquely, **gcd(K, N) must be 1**. This
follows from the Chinese remainder theorem. The same condition holds for a
shortened folding factor n_eff, so with K = 3 the usable values are
n_eff = 4, 2 and 1, and not 3.

## How the CBSM reorders the bits

Name the cells [row, column]. Row 0 is at the bottom and column 0 at the
right. Row K−1−s feeds array row S_s from its leftmost cell, column N−1.

* **Loading.** Bits enter at cell [0,0] in operation order p = 1, 2, …
  (c_(kC−1) first, least significant bit first). Every clock, every bit
  moves one row up and one column left, wrapping in both directions. Cell
  [a, b] therefore takes from [a−1 mod K, b−1 mod N]. With gcd(K, N) = 1
  this diagonal path visits all K·N cells exactly once, so it works like one
  long shift register. After K·N clocks, the bit that entered in clock p−1
  has made K·N−p moves. It then sits at row K−1−((p−1) mod K) and column
  N−1−((p−1) mod N).
* **Run.** Every row rotates right to left: cell [a, b] takes from
  [a, b−1], and the rightmost cell takes from the leftmost one. In run clock
  r, the leftmost cell of row K−1−s holds the bit that sits r columns to its
  right. That is exactly operation p with (p−1) mod K = s and
  (p−1) mod N = r.

For the main example, the store holds this after loading (columns 3 to 0,
left to right):

    row 2 (→ S_0):  c_1^0  c_0^3  c_0^0  c_1^3
    row 1 (→ S_1):  c_1^4  c_1^1  c_0^4  c_0^1
    row 0 (→ S_2):  c_0^2  c_1^5  c_1^2  c_0^5

**Shortened rows.** For n_eff < N, only the n_eff leftmost columns,
N−n_eff … N−1, are used. The cell in column N−n_eff takes the row's
feedback instead of its right neighbour, in both modes. Serial bits enter at
[0, N−n_eff]. Loading takes K·n_eff clocks, and everything above holds with
N replaced by n_eff. The other cells keep their values.

## The folded array

Each row (`fu_row`) is YW bit cells (`bp_cell`). A cell is an AND of the
operand bit with the coefficient bit, followed by a full adder. The row keeps
the partial sum in carry-save form, as a sum vector and a carry vector, so a
row has no carry chain. Each row registers four things: the sum vector, the
carry vector, the operand word and a tag j. The next row reads them one
clock later.

* **Operand.** Normally the next row uses the previous operand shifted left
  by one, so the weight goes from 2^j to 2^(j+1). The tag counts j modulo
  mC. When it wraps to 0, a new coefficient begins, and the row takes the
  current input word instead. This can happen in any row; with kC = 3 and
  mC = 4, the second and third coefficients start in S_1 and S_2.
* **Start.** In the clock where r = 0, S_0 ignores the completed word that
  arrives from S_(K−1). It starts the new word with a zero partial sum and
  tag 0.
* **Output.** In that same clock, `out_adder` adds the sum and carry
  vectors of the completed word in S_(K−1), and registers y.

**Input timing.** An input word is taken in the first clock of each sample
period (`x_take`) and held for the rest of the period. The chain of a word
started in period q reaches its g-th coefficient at clock q·n_eff + mC·g,
and at that point uses the sample that is current then. The result is the
true FIR output only when each coefficient starts exactly one sample period
after the one before it:

    ⌊mC·g / n_eff⌋ = g   for g = 0 … kC−1

This holds for (n_eff, mC) = (4, 6), (4, 4), (4, 12), (2, 3), (2, 2),
(1, 3) and (1, 1). It does **not** hold for (4, 3), (4, 2) or (4, 1), that
is kC = 4, 6 and 12 with n_eff = 4. There, two coefficients start within
one sample period and the filter mixes up its input samples. The hardware
does not reject these settings. To get such tap counts, use a setting that
works and load zeros: for example, shorter coefficients can be padded with
zero MSBs up to a supported mC.

## Control and interface (`cfg_fir_top`)

`fbpa_ctrl` has three states: idle after reset, loading, and running.

1. Pulse `load` for one clock, with `cfg = {n_eff, m_c}`.
   kC = K·n_eff / m_c is implied. An assertion checks that m_c divides
   K·n_eff, that 1 ≤ n_eff ≤ N and that gcd(K, n_eff) = 1.
2. For the next K·n_eff clocks, `coef_req` (and `busy_init`) is high. Drive
   one coefficient bit per clock on `coef_in`: c_(kC−1) first, each
   coefficient LSB first.
3. Run mode follows straight away. In each clock with `x_take` high
   (every n_eff clocks, starting with the first run clock), put the next
   input word on `x_in`. `y_valid` pulses every n_eff clocks. The m-th pulse
   (m = 0, 1, …) carries y_(m−K+kC), where x_0 is the first word taken.
   Words before x_0 count as zero, and negative indices give 0.

The folding order counter also runs during loading. It restarts at 0 with
`load`, so run mode begins at r = 0. The words in flight are already carrying
correct tags at that point, and their partial sums have been held at zero.
A `load` during run mode reconfigures the filter on the fly. The words in
flight are dropped, and filtering resumes after K·n_eff clocks with an
all-zero history.

All registers use an asynchronous active-low reset `rst_n`. The whole design
is unsigned.

## Departures and choices

* **Storage cells.** The store is described with latches; here every cell
  is a flip-flop.
* **Shortened rows.** Which columns stay active when the rows are
  shortened (the leftmost ones), and where the serial input then enters,
  are choices made here.
* **Cell circuit.** The bit cell's circuit is not given. Carry-save rows
  with a separate final adder were chosen because the cell has sum and carry
  pins and the array has a separate adder row. The two-phase clocks ck0 and
  ck1 of the original cell are replaced by single-clock strobes
  (`chain_start`) and by the travelling tag j.
* **Output width.** The original array has 11 output bits. Here the
  default is YW = XW + K·N = 17, so that no valid configuration can
  overflow. Even the main configuration reaches 2·31·63 = 3906, which needs
  12 bits. Set YW lower to truncate.
* **Own additions.** The load/`coef_req`/`x_take`/`y_valid` protocol, the
  idle state and the configuration assertion are this design's own.
* **Closed-form placement.** The closed-form expression usually given
  for the inverse placement (which operation a row performs at a given
  order) is only right when N ≡ 1 (mod K), as with K = 3, N = 4. The
  hardware does not need it: the shift-based loading is correct for any
  coprime K and N.

## Files

| file | content |
|------|---------|
| `rtl/fir_pkg.sv` | configuration struct, state enum, `cfg_ok()` |
| `rtl/bp_cell.sv` | bit cell: AND + full adder |
| `rtl/fu_row.sv` | one functional unit row, operand select, tag, registers |
| `rtl/out_adder.sv` | carry-propagate output adder |
| `rtl/fbpa.sv` | ring of K rows, input word hold register, output adder |
| `rtl/cbsm.sv` | coefficient bit supply module with changeable row length |
| `rtl/fbpa_ctrl.sv` | modes, folding order counter, strobes |
| `rtl/cfg_fir_top.sv` | top level: controller + CBSM + array |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each also has a watchdog that counts a failure if the test hangs. For
example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/fir_pkg.sv \
        tb/tb_cfg_fir_top.sv --top-module tb_cfg_fir_top -Mdir obj -o sim
    ./obj/sim

`tb_cfg_fir_top` runs the top at its default parameters. It loads random
coefficients for all seven working configurations listed above, streams
random words through each one, and compares every output with the FIR sum
computed directly. It also checks the load length (K·n_eff clocks) and
that inputs and outputs come every n_eff clocks. It reloads during
filtering, and it counts coefficients that start outside S_0. It finishes
with about 470 checks and no failures. The testbenches for single modules
work as follows:

* `tb_bp_cell` is exhaustive.
* `tb_fu_row` and `tb_out_adder` use random inputs against integer
  arithmetic.
* `tb_cbsm` checks every run-mode output against the (s, r) → p search, for
  n_eff = 4, 2 and 1, and checks the S_0 sequence of the main example.
* `tb_fbpa_ctrl` checks every strobe clock by clock.
* `tb_fbpa` drives the array with bits computed from the folding
  assignment.

`tb_cfg_fir_top_k4n5` repeats the end-to-end test at a second size:
K = 4, N = 5 and 6-bit inputs. It covers n_eff = 5, 3 and 1 and kC up to 4.

**Not verified:** any parameter set beyond these two, and timing or area on
any technology.
