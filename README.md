# Self-calibrating synthesizable delay line for a DPWM

A digitally controlled buck converter sets its output voltage through the
duty cycle of a pulse width modulated (DPWM) signal, so fine voltage
resolution needs fine control of where in each switching period the pulse
ends. A tapped delay line does this without a fast clock: the switching
clock runs down a chain of delay cells, and the tap that is selected marks
the end of the pulse. The difficulty is that cell delay moves by about 4x
between the fast and slow process corners, and with temperature.

The usual answer is to build tunable cells and adjust each cell's delay
until the whole line spans exactly one period. This design does the
opposite. All cells are identical and untunable: each is one or more
plain buffers. The line is long enough to cover a period even in the
fastest corner. A small loop measures how many cells span half a period
(`tap_sel`), and the duty word is rescaled to that count before it picks a
tap. Everything except the buffer chain is ordinary synchronous RTL. The
buffer chain is also plain cells, so the design needs no custom layout.

```
            +------------------------- delay_line (NCELLS cells) --------------------+
  clk ----->| cell0 -> cell1 -> ... -> cell(N-1)      each cell = BUFS_PER_CELL bufs |
            +-----------------------------+------------------------------------------+
                                          | taps[N-1:0]
                  +-----------------------+------------------------+
                  v                                                v
             cal_mux (MUX 1)                                 out_mux (MUX 2)
     {taps[sel+1], taps[sel]}                                taps[cal_sel]
                  |                                                |
                  v                                                v
         ddl_controller                                         dpwm_ff ---> dpwm
   sync_ff -> up/down -> tap_sel ---> ddl_mapper ---> cal_sel     ^
                                   ^   tap_sel*word/(N/2)         |
                         word -----+                         clk -+
```

## Measuring half a period (ddl_controller)

The controller is clocked by the same clock that enters the line. Tap `k`
is the clock delayed by `(k+1)` cell delays, and it stays high for half a
period after its rising edge. Sample it at the next rising clock edge:

* If its delay is **less than half a period**, it has already fallen and
  reads 0. The selected tap is too early, so `tap_sel` goes up one tap.
* If its delay is **more than half a period**, it is still high and reads
  1. The tap is too late, so `tap_sel` goes down one tap.

The sample is taken by the first flip-flop of a two-flip-flop synchronizer
(`sync_ff`), because the tap is asynchronous to the sampling edge. After
reset `tap_sel` is 0, and it climbs one tap per clock cycle until it
reaches the lock point `L`, which is the first tap delayed by more than
half a period. At 100 MHz in the typical corner (80 ps cells) that takes
about 62 cycles. Comparing against half a period rather than a full one
means the only question is whether the tap is still high. No edge has to be
chosen, and locking takes half as many steps.

The loop never stops. Whenever the cell delay or the clock period changes,
`tap_sel` follows. One step is taken per cycle, and it is based on a sample
taken `SYNC_STAGES+1` cycles earlier. Because of that delay, `tap_sel` does
not settle on one value after lock. With two synchronizer stages it circles
through `L-3 .. L+2` with a period of about ten cycles. This dither shows
in the output as a small cycle-to-cycle variation of the pulse width (see
below).

Other outputs of the controller:

* `up_down` (`ddl_pkg::dir_e`): the direction of the current step.
* `at_limit`: `tap_sel` is at the last tap and is still asked to go up.
  This happens when the line is shorter than half a period, because the
  clock is too slow for the cell size.
* `locked`: high while, within the last `LOCK_WINDOW` cycles, the pair
  `{taps[sel+1], taps[sel]}` from the calibration multiplexer read `1,0`.
  That reading means the half-period point lay between two adjacent taps.
  This is why the calibration multiplexer has a two-bit output.

## Mapping the duty word (ddl_mapper)

`2*tap_sel` cells span one period, so a duty of `word / 2^WORD_W` needs tap

```
cal_sel = tap_sel * word / (NCELLS/2)        (WORD_W = log2(NCELLS))
```

`NCELLS` is a power of two, so the division is a right shift by
`log2(NCELLS)-1`. In the fast corner `tap_sel` is about `NCELLS/2` and every
word gets its own tap. In the slow corner only about `NCELLS/8` cells span
half a period, so about four consecutive words share a tap. The resolution
is then about 6 bits instead of 8. Results past the last tap are clamped.

## Making the pulse (out_mux, dpwm_ff)

The DPWM output rises at each rising clock edge. It falls at the rising
edge of `taps[cal_sel]`. Two details make this safe:

* **The clear acts on an edge, not a level.** Every tap is a delayed copy
  of the clock and stays high for half a period. A tap delayed by more than
  half a period is therefore still high when the next period starts, and a
  level-sensitive clear would hold the output low. `dpwm_ff` uses two
  flip-flops instead. `set_t` toggles on the clock. `clr_t` copies `set_t`
  on the tap's rising edge. `dpwm = set_t ^ clr_t`.
* **The output selection changes on the falling clock edge.** At that
  moment every tap shorter than half a period is high and has already made
  its rising edge. Every longer tap is low and has not yet made it.
  Switching between taps of the same group makes no new rising edge.
  Switching across the two groups can only make an edge at mid-period,
  which is where both taps' own edges lie anyway. If the selection changed
  at the rising edge, a switch from a low tap to a high tap would make a
  false edge at the start of the period and end that pulse at once.
  `cal_sel` at the top level is this falling-edge copy.

The width of a pulse is `(cal_sel+1)` cell delays. The mapping error is
below `(3*word/128 + 3)` cells. It comes from the `tap_sel` dither, the
truncation in the mapper and the one-cell offset of tap 0. The testbenches
check each pulse against both figures.

## Sizing for a clock frequency and a process

The line must cover one period with the fastest cells:
`NCELLS * BUFS_PER_CELL * t_buf,fast >= T`. `NCELLS` sets the resolution in
the fast corner. The slowest corner sets the resolution you are sure to
get: `NCELLS * t_fast / t_slow` steps per period. For a 32 nm library with
buffers of about 20 ps (fast), 40 ps (typical) and 80 ps (slow), an 8-bit
line gives:

| clock   | BUFS_PER_CELL | line length, fast corner | taps per period, slow corner |
|---------|---------------|--------------------------|------------------------------|
| 50 MHz  | 4             | 256 x 80 ps = 20.48 ns   | about 62                     |
| 100 MHz | 2 (default)   | 256 x 40 ps = 10.24 ns   | about 62                     |
| 200 MHz | 1             | 256 x 20 ps = 5.12 ns    | about 62                     |

The three configurations have the same structure, and only
`BUFS_PER_CELL` changes. In all of them the multiplexers, controller and
mapper are the same.

## Parameters (ddl_top)

| parameter       | default | meaning |
|-----------------|---------|---------|
| `NCELLS`        | 256     | cells in the line, a power of two |
| `BUFS_PER_CELL` | 2       | buffers per cell (sets the clock frequency the line covers) |
| `BUF_DELAY_PS`  | 40      | delay of one buffer in the behavioural model. This is the simulated corner (20 fast, 40 typical, 80 slow) and is ignored by synthesis |
| `SYNC_STAGES`   | 2       | synchronizer flip-flops, the first being the sampling flip-flop |
| `LOCK_WINDOW`   | 8       | cycles a bracketing sample keeps `locked` high |
| `WORD_W`        | log2(NCELLS) | width of the duty word |

Ports: `clk` (switching clock, also the line input), `rst` (active high,
asynchronous), `word` (duty = `word/2^WORD_W`, synchronous to `clk`), and
`dpwm`. For observation there are also `tap_out` (the selected tap),
`tap_sel`, `cal_sel`, `up_down`, `locked` and `at_limit`.

Timing:

* A new `word` reaches `cal_sel` at the next falling clock edge.
* It shapes the pulse of the following period.
* Locking from reset takes about `L + 3` cycles.

## Files

`rtl/`:

* `ddl_pkg.sv`: the `dir_e` type.
* `delay_buffer.sv`: behavioural buffer, two inverters with a transport
  delay.
* `delay_cell.sv`: `BUFS_PER_CELL` buffers in series.
* `delay_line.sv`: the tapped line.
* `cal_mux.sv`: the calibration multiplexer.
* `sync_ff.sv`: the synchronizer.
* `ddl_controller.sv`: the lock loop.
* `ddl_mapper.sv`: the word mapping.
* `out_mux.sv`: output multiplexer with its falling-edge selection
  register.
* `dpwm_ff.sv`: the trailing-edge modulator.
* `ddl_top.sv`: the top level.

`tb/`:

* Unit testbenches: `tb_<module>.sv` for each module.
* `ddl_run.sv`: an end-to-end scenario that the following five testbenches
  use.
* `tb_ddl_top.sv`: 100 MHz, typical corner.
* `tb_ddl_fast_100.sv`: 100 MHz, fast corner.
* `tb_ddl_slow_100.sv`: 100 MHz, slow corner.
* `tb_ddl_fast_50.sv`: 50 MHz, 4-buffer cells.
* `tb_ddl_fast_200.sv`: 200 MHz, 1-buffer cells.
* `tb_ddl_top_full.sv`: the top with every parameter at its default,
  through reset, lock and three duty words.
* `ddl_lin.sv`: a linearity sweep that the next two testbenches use.
* `tb_ddl_linearity_fast.sv` and `tb_ddl_linearity_slow.sv`: the mean
  pulse width at 100 MHz for every word from 1 to 224, in the fast and the
  slow corner. Each is checked against `word/256` of the period and for
  monotonic growth. The number of distinct output steps is also counted:
  about 196 in the fast corner and about 79 in the slow one, where several
  words share a tap.

Each end-to-end run does the following. It locks from reset and sweeps
seven duty words. It changes the clock period by 20 % and checks that the
loop re-locks and the duty stays correct. It then slows the clock until the
line is too short, which drives `at_limit`. It counts up steps, down steps,
lock, re-lock, `at_limit` and measured pulses, and fails any mechanism that
never happened.

## Simulating

Every file sets `timeunit 1ps`. The delay model needs `--timing`. For
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/ddl_pkg.sv tb/tb_ddl_top.sv --top-module tb_ddl_top -Mdir obj_top
./obj_top/Vtb_ddl_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

The full 256-cell line simulates at about 17 ms of wall time per clock
cycle, because every buffer edge is an event. An end-to-end run takes about
20 s.

## Synthesis notes

The buffers are logically the identity. A synthesis tool will remove the
two-inverter pairs and collapse the line unless the flow keeps them, for
example as don't-touch instances of a library buffer or inverter. Map
`delay_buffer` to such a cell in the target library. The rest is plain
synchronous logic:

* a `log2(N) x log2(N)` multiplier in the mapper;
* two `N`-to-1 multiplexers;
* a few counters and flip-flops.

Place the line's cells next to each other, so that their delays match.

## Departures and limitations

* **Dither instead of a one-step toggle.** The lock loop steps every
  cycle on a sample that is `SYNC_STAGES+1` cycles old. After lock it
  therefore oscillates over about six taps rather than alternating
  between two, and the pulse width varies by up to `3*word/128` cells from
  cycle to cycle. Averaging `tap_sel` before the mapper, or stepping only
  every `SYNC_STAGES+1` cycles, would reduce this. Neither is done here.
* **Own choices in this design:**
  * the edge-triggered clear of the modulator;
  * the falling-edge selection register;
  * the meaning of the second calibration-multiplexer bit and the
    `locked` indicator;
  * saturation of `tap_sel` and the `at_limit` flag;
  * clamping in the mapper;
  * an active-high asynchronous reset.
* **Near full scale.** For words close to `2^WORD_W`, a mapped tap taken
  at the top of the dither can lie beyond one period. The clearing edge
  then falls into the next period and removes that pulse. The testbenches
  use words up to 224/256.
* **Not included: the tunable-cell line.** The conventional design, with
  tunable multi-branch cells and a shift-register controller, is not part
  of this RTL.
* **Area is not modelled.** Area figures depend on the standard-cell
  library.
