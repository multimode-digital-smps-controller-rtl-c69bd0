# Multimode digital controller for a low-power buck converter

This is a digital controller for small dc-dc buck converters in handheld devices. It works in two
regulation modes:

- **PWM.** At medium and heavy load it switches at a programmable constant frequency of up to
  20 MHz, with a synchronous rectifier.
- **PFM.** At light load it turns the rectifier off and regulates by changing the switching
  frequency, in the range of tens to hundreds of kHz.

Power stays low because nothing runs on a fast clock. Both modulators are built from chains of
current-starved delay cells. The ADC and the compensator are clocked once per switching cycle by
the modulator itself.

The logic is written as synthesizable SystemVerilog. The delay cells and the two voltage-controlled
delay lines of the ADC are analog in silicon, so they are behavioural models with real-valued
delays. The top level, `smps_controller`, can therefore be simulated but not synthesized.

## Signal flow

```
 vref_code ─► sd_dac ─► dac_filter ─► V_ref ─┐
                                             ▼
 v_sense ───────────────────────► adc_delay_lines ─► adc_encoder ─► e[n]
                                        ▲                            │
                                        │ f_clk                      ▼
                                        │                    lut_compensator
                                        │                     d[n]   f_pf[n]
                                        │            t_on ─┐   │        │ 5 MSBs
                                        │             mode ▼   ▼        ▼
                                  segmented_dpwm ◄── duty mux     dpfm_race_ring
                                        │  c(t)                        │ q
                                        ├──────────────────────────────┤
                                        │                         end_of_race
                                        │  ◄────────── st ─────────────┘
                                        ▼
                                    dead_time ─► gate_hs (Q1), gate_ls (Q2)
```

`mode` = 0 selects PWM:
- The DPWM ring is closed.
- The DPWM input is `d[n]`.
- `dead_time` drives both transistors.

`mode` = 1 selects PFM:
- The DPWM ring is open, and the DPWM makes one on-time pulse per `st`.
- The DPWM input is the programmed `t_on`.
- The signal race sets the off time.
- Q2 stays off, so the inductor current can become discontinuous.

`f_clk` marks the start of every switching period. It starts an ADC conversion and updates the
compensator, which uses the error converted in the previous cycle.

## Segmented-ring DPWM (`segmented_dpwm`, `dpwm_tap_logic`, `cs_delay_cell`)

A plain ring-oscillator DPWM with 8-bit resolution needs 256 cells and a 256:1 multiplexer. This
design uses 16 slow cells, 16 fast cells and two 16:1 multiplexers. A slow cell is exactly 16 fast
cells long.

One short pulse circulates through the 16 slow cells, so the period is 16 slow delays, which is 256
fast delays:

1. Each time the pulse enters the slow line (`ring_in`), the SR latch that forms `c(t)` is set, and
   `f_clk` is produced.
2. MUX-B, addressed by `d[7:4]`, copies the pulse from slow tap `d[7:4]` into the fast line.
3. MUX-A, addressed by `d[3:0]`, takes fast tap `d[3:0]` and resets the latch.

The high time is `d[7:4]` slow delays plus `d[3:0]` fast delays, so the duty ratio is exactly
`d/256`. For example, `1110 1000` gives 232/256 = 0.906. The latch is reset-dominant, so `d = 0`
gives no pulse.

Delay values and frequency range:
- A fast cell takes 0.195 ns at full bias current, which puts the period at 50 ns (20 MHz).
- The 5-bit `dpwm_bias` switches the five bias transistors of every cell (sizes 1, 1, 2, 4, 8). The
  cell delay is inversely proportional to the current switched on.
- The frequency is therefore 20 MHz × w/16, where w = 1..16 is the weight of the code.
- The lowest setting is 1.25 MHz. 6.25 MHz is the setting nearest to a 6 MHz power stage.

With `en = 0` (PFM) the ring is open. Each `st` pulse travels through the lines once and gives one
`c(t)` pulse of `t_on` fast delays.

The pulse width matters:
- The launching pulse (`start`, or `st` from the end-of-race detector) must be shorter than one fast
  delay. With the defaults it is 50 ps.
- A cell passes every edge after its delay (transport delay), so the pulse is not swallowed.

## Signal-race DPFM (`dpfm_race_ring`, `end_of_race`)

Counting out a 50 µs PFM period with fast logic would cost power. A delay line long enough for it
would cost area. Instead, two pulses race around a ring of SR latches:

- The rising edge of the on-time pulse starts a *set* pulse. It moves through current-starved cells,
  taking `ds` per stage, and sets each latch it reaches.
- The falling edge, T_on later, starts a *reset* pulse. It moves through inverters, taking `di < ds`
  per stage, and clears each latch it reaches.
- The reset pulse gains `ds − di` per stage. When it catches the set pulse, all latches are zero.
- `end_of_race` sees the empty ring and raises `st`, which starts the next on-time pulse through the
  DPWM.

The period is therefore about `T_on · ds / (ds − di)`. It grows steeply as `ds` approaches `di`.

`ds` is set by the five MSBs of `f_pf[n]` through the same binary-weighted bias as the DPWM cells. A
larger `f_pf` means more current, a faster set pulse, a longer race and a lower frequency.

Default values, all chosen for this design:

| Parameter | Value |
|---|---|
| Stages `N_STAGES` | 64 |
| `ds` | 12.5 ns with no programmable current, 10 ns with all of it (the set-path cells have a fixed current four times the programmable range) |
| `di` | 9.95 ns |

The race therefore lasts about 5 to 200 times `T_on`. With `T_on` = 500 ns (`t_on = 160` at the
lowest DPWM bias), the free-running modulator spans 415 kHz down to 10 kHz, which covers a 20 to
250 kHz target range. The law is steep near the top codes. `N_STAGES` must exceed `T_on / ds`, so
that the reset pulse starts less than one lap behind.

`end_of_race` is armed by the falling edge of `c(t)`, so the empty ring before the first race does
not count. It is disarmed in PWM mode. `st` lasts until the new race sets the first latch, 50 ps
later in the model.

## Windowed delay-line ADC (`adc_delay_lines`, `adc_encoder`)

`f_clk` launches a pulse into two lines at once:
- The reference line (1 slow + 32 fast cells) is biased by `V_ref`.
- The input line (1 slow + 36 fast cells) is biased by the sensed output voltage.

Cell delay falls as the bias voltage rises. When the reference pulse leaves its line, the encoder
latches the last nine taps of the input line. These form a thermometer code, and
`e[n] = ones − 5`, limited to −4..+4. A positive `e` means the output is above the reference.

Default values:
- The slow cell is 96 fast cells long. This leading slow cell gives the resolution without a long
  line.
- One step is `V_ref/128`, which is 0.78 % of `V_ref`.
- A conversion takes 128 fast delays, 29.95 ns at 1 V and less at higher voltages.
- Outside the ±4-step window the error saturates.

## LUT compensator (`lut_compensator`)

The compensator has two sets of tables, indexed by the nine error values. Because the products are
stored in tables, no multiplier is needed.

- PWM: `d[n] = d[n−1] + A[e[n]] + B[e[n−1]] + C[e[n−2]]`, where the tables hold a·e, b·e and c·e.
- PFM: `f_pf[n] = f_pf[n−1] + P[e[n]]`. `d` holds its value in this mode.

Both sums carry 8 fractional bits and saturate at their limits. The default tables form a PI law:
- a = −27/256 and b = +26/256. This is a proportional gain of about 0.1 LSB and an integral gain of
  1/256 LSB per error step per cycle.
- c = 0.
- a_pf = +2.

These tables were tuned against the testbench's power stage. For a different power stage, replace
the `LUT_*` parameters. The tables may be nonlinear.

## Reference (`sd_dac`, `dac_filter`)

A first-order sigma-delta modulator (10 bits, on `clk_sys`) produces a bit stream whose density of
ones is `code/1024`. One RC pole (τ = 20 µs) turns it into `V_ref = 3.3 V · code/1024`. The slow
filter also acts as a soft start. Use `code = 512` for 1.65 V.

## Dead time (`dead_time`)

In PWM mode:
- `gate_hs = c & c_dly`
- `gate_ls = ~c & ~c_dly`
- `c_dly` is `c(t)` delayed by `dt_code` × 0.5 ns.

Each transistor therefore turns on only after the other has been off for the dead time. In PFM mode
`gate_hs = c` and `gate_ls = 0`.

## Using the top level

Ports of `smps_controller`:

| Port | Meaning |
|---|---|
| `rst_n` | asynchronous reset, active low |
| `clk_sys` | clock for the sigma-delta modulator (10 MHz in the test) |
| `mode` | `smps_pkg::MODE_PWM` / `MODE_PFM` |
| `start` | short pulse (< 0.19 ns): required after reset and after every mode change, to put a pulse in the ring or start the first PFM cycle |
| `vref_code` | reference code, 3.3 V full scale |
| `dpwm_bias` | DPWM frequency (5'h1F = 20 MHz) and T_on scale in PFM |
| `t_on` | PFM on-time in fast DPWM cells |
| `dt_code` | dead time in 0.5 ns steps |
| `v_sense` | sensed output voltage (`real`) |
| `gate_hs`, `gate_ls` | transistor drives |
| `c`, `f_clk`, `st`, `e`, `d`, `f_pf`, `v_ref` | observation |

Run the end-to-end test with plain Verilator. It closes the loop around `tb/buck_model.sv`, a 5 V
to 3.3 V buck (1 µH, 4.7 µF, sense divider 1/2).

```
verilator --binary --timing -Irtl -Itb rtl/smps_pkg.sv tb/tb_smps_controller.sv \
          --top-module tb_smps_controller -Wno-fatal
./obj_dir/Vtb_smps_controller
```

The test runs 1.1 ms of simulated time, a few seconds of CPU:
- 700 µs of PWM at 0.5 A.
- PFM at 10 mA.
- PWM again.

It checks that the output stays inside ±3 % (PWM) and ±5 % (PFM) of 3.3 V, and that the PWM period
is 50 ns. It also requires that each of the following happened at least once:
- PWM cycles
- end-of-race cycles
- mode switches
- dead time
- discontinuous inductor current
- ADC window saturation
- `d` and `f_pf` updates

Two more tests exercise the design as a whole:
- `tb/tb_pfm_frequency_range.sv` sweeps the PFM frequency code with `T_on` = 500 ns. It checks the
  20 to 250 kHz range, that the frequency falls monotonically with the code, that the on-time stays
  constant, and that a sudden code change takes effect at once.
- `tb/tb_closed_loop_workloads.sv` first runs PWM at 6.25 MHz with a 0.9 A load (about 3 W). It
  then runs PFM with `T_on` = 91 ns through a load step from 1 mA to 2 mA. The regulated PFM
  frequency rises from about 175 kHz to about 295 kHz.

Every module also has its own self-checking testbench, `tb/tb_<module>.sv`, run the same way. Each
prints `TB_RESULT checks=N failures=M`.

## What to trust, and where this design chooses for itself

These parts are stated by the architecture:
- The 8-bit DPWM with 16 fast and 16 slow cells (16:1) and two 16:1 multiplexers.
- The split of d[n] into 4 coarse and 4 fine bits.
- The binary-weighted (1, 1, 2, 4, 8) bias of the current-starved cell.
- The two-pulse race ring and its end-of-race detector.
- An ADC of one slow cell plus N_f fast cells against one slow cell plus N_f+4 fast cells, read at
  nine taps, with a window of −4..+4.
- The incremental PID law with three tables and the PI law with one table.
- Clocking of the ADC and compensator at the switching frequency.
- Turning the dead-time circuit and the rectifier off in PFM.

These are this design's own choices:
- **DPWM timing.** The cycle starts, and `c(t)` rises, when the pulse enters the slow line. The
  slow line alone closes the ring, which gives a constant period and a duty ratio of d/256. A
  reading in which the latch is set at MUX-B would not give a constant frequency.
- **Race ring.** The number of stages and the delays are assumed, as is the fixed part of the
  set-path bias that keeps `ds > di` at every code. The model works at the level of the two
  travelling pulses and the latch states, not gate by gate.
- **ADC.** N_f = 32, a slow cell of 96 fast delays, delay ∝ 1/V, and the encoding by counting ones.
- **Widths and tables.** All widths not named above: `f_pf` of 8 bits, 8 fractional bits, 10-bit
  reference, 4-bit dead time. Also all table contents, and all reset values (d and f_pf start at 0).
- **Start-up.** The `start` pulse that launches the ring, and the arming of the end-of-race
  detector.
- **DAC filter and dead time.** The DAC filter, and the dead-time step.

Known limits:
- The lowest PWM frequency is 1.25 MHz, not 1 MHz.
- The PFM frequency law is steep near the top codes of `f_pf`. With `T_on` = 250 ns at 10 mA in the
  end-to-end test, the loop sits at the low-frequency end of the range. Choose `t_on` so that the
  expected load falls inside the range.
- At 2 mA with `T_on` = 91 ns the PFM frequency (about 295 kHz) is above 250 kHz. A longer `T_on`
  moves it down, at the price of more output ripple.
- With the default tables the PWM loop is slow to pull in from a large error, because the integral
  gain is only 1/256 LSB per cycle. Soft start at 20 MHz takes about 0.5 ms. At 6.25 MHz it takes
  about 2 ms.
- Switching modes needs the external `start` pulse. The design does not choose the mode by itself
  from the load.
- Analog behaviour (supply, temperature, cell mismatch) is not modelled.
