# Fully pipelined programmable FIR filter (pipelined data *and* pipelined control)

In most programmable FIR filters the input sample and the "load new coefficients"
enable go to every tap at once on a broadcast wire. As filters get longer and
wires get slower than gates, that broadcast sets the clock period. The filter
here has no broadcast wires. Every tap takes all its inputs (data, partial sums
and control) from the tap before it through a register. Only the clock and the
reset reach every cell, so the clock period does not grow with the number of
taps.

Two ideas make this work:

* **Control travels as tags on the data.** Each word on the single 16-bit input
  port has an *x tag*. A second one-bit stream carries a *y tag*. Where the
  two tags meet in a cell, they decide what the cell does. Coefficients come in
  through the same port as the data, so new coefficients load one whole word
  per clock and need no extra pins.
* **The streams move at different speeds.** Data moves one cell every two
  clocks and partial results move one cell every clock. This is the retimed
  direct form of an FIR filter. It is also what makes a control tag meet the
  right coefficient in the right cell without any counter or address.

The RTL has two arrays built on these ideas. They sit side by side in
`pcpd_fir_top`:

| array | cell | what it adds |
|---|---|---|
| `pcpd_lp_fir` (N cells, default 64) | `pcpd_cell` | an N-tap filter, plus a folded linear-phase filter of 2N taps on a third (Z) stream |
| `pcpd_ext_fir` (C cells, default 64) | `pcpd_ext_cell` | coefficients with more than two signed digits, spread over several adjacent cells |

## Number formats

* **Data word:** 16-bit two's complement with 15 fraction bits.
* **Coefficient word:** it arrives on the same 16 bits. It holds a canonic
  signed-digit (CSD) pair, h = s0·2^-p0 + s1·2^-p1, with s ∈ {-1, 0, +1}:
  * bits [11:10] = s0 and bits [9:6] = p0;
  * bits [5:4] = s1 and bits [3:0] = p1;
  * a sign digit is encoded 00 = 0, 01 = +1, 11 = −1;
  * bit 12 is the bypass flag, used only by the extended-precision cells.

  The intended ranges are p0 ∈ 0..13 and p1 ∈ 2..15. The hardware accepts
  any position from 0 to 15 for either digit. `pcpd_pkg::coef_word()` builds
  such a word.
* **Results:** 32-bit two's complement whose least significant bit is worth
  2^-30. Every partial product x·2^-p is then exact. Sums wrap modulo 2^32,
  and there is no rounding or saturation.

Each cell multiplies without a multiplier. It forms two copies of x, one
shifted for each digit and bit-inverted if that digit is −1, and feeds them
into a two-level carry-save tree (`csa_4to2`) together with the incoming sum
and carry words. The "+1" that completes each negation enters as the free
carry-in bit of one tree level. Partial results therefore travel down the
chain as carry-save pairs, and no carry propagates inside a cell. A single
carry-propagate adder after the last cell (`cs_final_adder`, registered)
produces the true result.

## How the tags control the array

A cell reads the x tag and the y tag that arrive together at its inputs:

| x tag | y tag | operation |
|---|---|---|
| 1 | 1 | **store**: the coefficient word is written into the cell |
| 1 | 0 | **pass**: y (and z) leave unchanged, because a coefficient is passing by |
| 0 | 0 | **multiply-add**: y += h·x (and z += h·x) |
| 0 | 1 | **reset** the bypass flag; used only by the extended-precision cells |

The y tag register enables the coefficient register. The x tag drives the
pass/accumulate multiplexers.

### Loading coefficients

Send the coefficients with x tag = 1, last tap first: h(N−1), …, h(0). Raise
the y tag on the same clock as h(0). Then send data with both tags at 0.

* Coefficient h(i) enters i clocks before h(0). Data moves at half the speed
  of the y tag, so h(i) reaches cell i after 2i clocks. That is i clocks after
  h(0) entered.
* The y tag also reaches cell i i clocks after it entered.
* So the y tag meets h(i) in cell i and nowhere else, and each cell stores its
  own coefficient.

Loading takes N clocks. It can start straight after the last data word of the
previous set, with no pause. Results already in the pipeline complete with the
old coefficients.

### Why pass mode gives correct start-up

The Y item for output y(n) enters together with x(n). In cell k it meets the
word that entered k clocks earlier:

* for k ≤ n, that word is data x(n−k), and the cell adds h(k)·x(n−k);
* for k > n, that word is a coefficient, so the cell passes y unchanged.

The output is therefore exactly y(n) = Σ h(i)·x(n−i), with x(i) = 0 before the
first data word. There are no start-up transients after reprogramming.

### Timing

x(n) is the data word applied on clock n, counting from the first data word
after loading.

| output | value | ready at clock |
|---|---|---|
| `y_cs_o` (carry-save) | y(n) | n + N |
| `y_o` | y(n) | n + N + 1 |
| `lp_o` | linear-phase result | n + N + 2 |

One result comes out per clock.

## Linear-phase folding (Z stream)

A symmetric filter of 2N taps, h(2N−1−i) = h(i), needs only N cells:

    y(n) = Σ_{i<N} h(i)·( x(n−i) + x(n−2N+1+i) )

The second sum walks the coefficients in the opposite direction. A third
stream, Z, computes it:

* Z enters cell 0 as zero and moves one cell every three clocks (three
  registers per cell).
* Data moves one cell every two clocks, so a Z item meets data words with
  increasing indices, x(m+i) in cell i.
* Each cell adds the same product h·x to both Y and Z.

At the end of the chain, the Y result goes through one extra register and is
then added to the Z result (`lp_o`). Those two sums are then the two halves of
the same output. In cell i the Y sum for y(n) meets x(n−i) on clock n+i. The Z
sum meets x(n−2N+1+i) on clock n−2N+1+3i, so it leaves the chain one clock
after the Y sum. The extra register on Y makes up for that clock.

`lp_o` is exact from n = N−1 on after each loading. Before that, Z sums that
had already entered met data of the previous run.

**Departure from the source drawing.** The original drawing of this folded
filter puts the extra register on the Z side. With the cell timing above, that
skips two taps: the Z half then covers taps N+2 … 2N+1. This RTL puts the
register on the Y side, which gives the formula above exactly. The
`tb_pcpd_lp_fir` test checks it against that formula.

The odd-length variant, with a middle tap used only once, is not provided. The
same timing cannot give it by simply removing a register.

## Extended-precision coefficients (bypass flags)

Some coefficients need more than two signed digits. A coefficient with L
digits is split into ceil(L/2) digit pairs, one pair per cell in adjacent
cells. Every cell of such a group except the last has its **bypass flag** set.

While a cell's flag is set, that cell's first x register (and first x-tag
register) is skipped. The data word then goes to the next cell in one clock,
the same speed as the partial result. So the next cell adds its digit pair to
the product of the same data word. Cells 0..C−1 thus map onto taps with
tap(0) = 0 and tap(k) = tap(k−1) + (flag(k−1) ? 0 : 1), and

    y(n) = Σ_k h_k · x(n − tap(k)).

Flags change the speed of the data stream. For that reason, loading new pairs
must be preceded by a **reset wave**:

1. Send one word with x tag 0 and y tag 1. Its y tag meets data words (x tag 0)
   in every cell, one cell per clock, and each cell clears its flag. The data
   value is ignored.
2. Send C digit-pair words with x tag 1, last cell's pair first. Each word
   carries its flag in bit 12. Raise the y tag on the word for cell 0.
3. Send data with both tags at 0.

The wave runs one clock ahead of the first coefficient word. Every pair
therefore crosses cells whose flags are already clear, and reaches cell k at
the moment the store tag does. After a cell stores its pair and flag, only
words with lower numbers follow it, and those are already stored. So changing
a flag at that point can drop or duplicate only coefficient words in pass
mode, which never reach a result.

Timing: `y_o` carries y(n) at clock n + C + 1.

The extended-precision cell has no Z stream. A bypassed cell would also need a
shorter Z delay, and no such cell is defined here. Linear-phase folding is
therefore offered only by the two-digit array.

A reset (x tag 0, y tag 1) also writes the data word into the cell's
coefficient register, because both registers use the y tag as their enable.
This is harmless, because new pairs always follow.

## Module overview

| file | role |
|---|---|
| `rtl/pcpd_pkg.sv` | widths, CSD and carry-save structs, `coef_word()` |
| `rtl/csd_term.sv` | one shifted / complemented partial product |
| `rtl/csa_4to2.sv` | two-level carry-save tree with two carry-ins |
| `rtl/cs_final_adder.sv` | registered carry-propagate adder after the last cell |
| `rtl/pcpd_cell.sv` | basic tap (x: 2 regs, y: 1, z: 3, x tag: 2, y tag: 1) |
| `rtl/pcpd_ext_cell.sv` | tap with bypass flag (x and x tag: 2 or 1 regs) |
| `rtl/pcpd_lp_fir.sv` | chain of N basic cells, N-tap and 2N-tap outputs |
| `rtl/pcpd_ext_fir.sv` | chain of C extended cells |
| `rtl/pcpd_fir_top.sv` | both arrays, each with its own ports |

Reset is asynchronous and active low, and it clears every register. After
reset, all coefficients are zero and all tags are 0.

Both arrays bring out the x word and tags at the end of the chain, and also the
stored coefficients and flags, for observation.

The default size of both arrays is 64. The cost and speed comparison behind
this architecture covers N = 4 to 256. Filters of 8 to 64 taps are typical in
applications. A shorter filter fits by loading zero coefficients into the
unused cells.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. For example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pcpd_pkg.sv tb/pcpd_ref_pkg.sv tb/tb_pcpd_fir_top.sv \
        --top-module tb_pcpd_fir_top -Mdir obj_top
    ./obj_top/Vtb_pcpd_fir_top

The testbenches compute the reference products from the CSD digits with
integer multiplication (`tb/pcpd_ref_pkg.sv`), independently of the
shift-and-invert hardware.

| testbench | covers |
|---|---|
| `tb_csd_term`, `tb_csa_4to2`, `tb_cs_final_adder` | arithmetic pieces, exhaustive over digits and positions, random operands |
| `tb_pcpd_cell`, `tb_pcpd_ext_cell` | cycle-by-cycle comparison with a behavioural cell model under random tags |
| `tb_pcpd_lp_fir` | N = 8, three back-to-back programming runs, y / carry-save / linear-phase outputs and latencies |
| `tb_pcpd_ext_fir` | C = 6, four runs with random flags (coefficients of 2 to 12 digits), reset wave and stored flags |
| `tb_pcpd_fir_top` | both arrays at the default size 64, reprogramming while running; counts store, pass, multiply-add, reprogramming, linear-phase outputs, reset waves, flags and multi-cell coefficients |
| `tb_workloads` | the two-digit array at N = 4, 8, …, 256 (each also as a 2N-tap linear-phase filter), and the three-tap example with a four-digit middle coefficient on four extended cells |

## Limits and choices to know about

* These are this design's own choices:
  * field order and sign encoding in the coefficient word;
  * position of the bypass flag;
  * binary point of the result;
  * the output register after the final adder;
  * reset style.
* There is no rounding, truncation or overflow detection. Results wrap
  modulo 2^32.
* An array has no carry-save input, so two arrays cannot be chained into a
  longer filter. Only the x word and tags are brought out at the chain end.
* A cell stores whenever its incoming y tag is 1. In the two-digit array,
  never send the reset combination (x tag 0 with y tag 1), because it would
  load a data word as a coefficient.
* Cycle time, area and wire delay are properties of a layout. They are not
  modelled here.
