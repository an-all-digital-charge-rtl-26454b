# A self-timed charge-to-digital converter

This converter turns the charge on a capacitor into a binary number. It uses
no ADC, no voltage comparator and no system clock. The capacitor `C_SENSE` is
charged to `V_HIGH`. It then becomes the supply of a chain of inverters, and
every edge sent down that chain costs it a little charge. A second, identical
chain runs from a fixed reference `V_LOW`. Each round, one trigger edge goes
into both chains at once, and an arbiter decides which chain answers first:

* If the capacitor-powered chain is faster, `V_SENSE` is still above `V_LOW`.
  The round is counted and another one starts.
* The first time the reference chain wins, the capacitor has drained down to
  `V_LOW` and the conversion stops.

The number of rounds is the output code. The energy that runs the measurement
comes from the charge being measured.

One step of charge sharing gives `V[i+1] = V[i] * C/(C + Cp)`, where `Cp` is
the capacitance charged by one chain transition. It follows that

    V_LOW = V_HIGH * K^n,  K = C/(C + Cp)   =>   n = ln(V_HIGH/V_LOW) / ln(1/K)

This leads to two uses:

* **Capacitance sensing.** With `V_HIGH` and `V_LOW` fixed, `n` is linear in
  `C` (for `C >> Cp`).
* **Voltage sensing.** With `C` fixed, `n` is logarithmic in `V_HIGH`.

In this design each round makes two transitions of the chain (the trigger rises
and falls), so a conversion takes `ln(V_HIGH/V_LOW) / (2 ln(1/K)) + 1` rounds.
The `+1` is the final round, which the reference wins.

## The round-trip loop

There is no clock. `Clk` is made by a ring that runs through the whole design:

```
          start                                  V_SENSE        V_LOW
            |                                       |             |
   +--> signal_generator --Clk--> level_shifter --> chain(H)    chain(L)
   |        ^      |                   (Clk lifted to V_SENSE, drives both chains)
   |        |      +--> event_counter --> d_out        |          |
   |     Done, Ab                                  Signal(H)   Signal(L)
   |        |                                          |          |
   +--------+------------- event_comparator <----------+----------+
```

One round, while the capacitor is above the reference:

| step | event                                       | consequence                                          |
|------|---------------------------------------------|------------------------------------------------------|
| 1    | `Clk` rises                                 | the counter increments; the edge enters both chains  |
| 2    | `Signal(H)` rises first                     | the mutex grants `Aa`; the H-win latch is set        |
| 3    | `Signal(L)` rises                           | the C-element raises `Done`                          |
| 4    | `Done` high                                 | the signal generator drops `Clk`                     |
| 5    | falling edge passes through both chains     | `Aa` drops when `Signal(H)` falls                    |
| 6    | both chains low                             | `Done` falls, the H-win latch clears, `Clk` rises: next round |

Each edge in steps 1 and 5 drains charge from the capacitor. `Done` rises only
after **both** chains have delivered their edge. So the next trigger never
overtakes an edge still inside a chain, however slow the chains become.

The last round is different. `Signal(L)` arrives first (or at the same
instant), and the mutex grants `Ab`. `Ab` forces the signal generator's latch
to disable `Clk`. `Done` never rises in that round. The counter has already
counted the round's rising edge, so the code includes it.

The only place where two independent events race is the mutex. In silicon, a
mutex whose latch goes metastable only delays its decision: its filter keeps
both grants low until the latch has resolved. So the converter needs no extra
comparators or correction arithmetic to handle near-ties. A near-tie costs time,
not a wrong code, and either outcome of a true tie is an acceptable answer.

## Signal generator (`rtl/signal_generator.sv`)

Seven gates: two inverters, two ANDs and three NANDs.

```
t   = NAND(qr, ~Ab)        a1  = AND(Start, t)
ql  = NAND(a1, qr)         qr  = NAND(ql, ~Ab)       (SR latch)
Clk = AND(a1, ql, ~Done)
```

The generator has three states:

| stage | Start | Ab | latch (ql, qr) | Clk          |
|-------|-------|----|----------------|--------------|
| 1     | 0     | x  | 1, 0           | 0            |
| 2     | 1     | 0  | 1, 0           | `~Done`      |
| 3     | 1     | 1  | 0, 1           | 0 (disabled) |

In stage 2, `Clk` is simply the inverse of the comparator's `Done`, which closes
the loop above.

Gate `t` re-arms the latch as soon as `Ab` falls. This is why the comparator
holds `Ab` high until `Start` is lowered (see below). Without that, the
converter would restart by itself once `Signal(L)` returned low.

## Event comparator (`rtl/event_comparator.sv`)

The comparator is built from these parts:

* **`mutex`** (`rtl/mutex.sv`): a cross-coupled NAND latch with a filter.
  `Ra = Signal(H)`, `Rb = Signal(L)`. At most one grant is ever high, and a
  grant holds until its request falls.
* **H-win latch**: set by `Aa`, cleared only when both events are low (a NOR).
  While it is set, `Rb` is blocked. Without it, the mutex would hand `Rb` a
  stray grant in the usual case where `Signal(H)` falls before `Signal(L)`.
* **`c_element`** (`rtl/c_element.sv`): `Done = C(Aa, Signal(L))`. It rises
  when both inputs are 1, falls when both are 0, and holds otherwise.
* **Finish latch**: set by the mutex's `Ab` grant, cleared while `Start` is
  low. It drives the `Ab` output. While it is set, `Ra` is blocked, so no stray
  `Aa` appears as the last round's edges fall.

## Event counter (`rtl/event_counter.sv`)

A 20-bit synchronous counter built from toggle flip-flops (JK with `J = K`).
All of them are clocked by `Clk`, and an AND chain forms the toggle enables:
bit `n` toggles when bits `0..n-1` are all 1. It counts rising edges of `Clk`
and wraps after `2^20 - 1`. The active-low asynchronous clear `rst_n` starts
each conversion from 0.

## The analogue side: behavioural models

These parts are analogue or transistor-level cells. They are modelled with
real-valued voltages and delays, for simulation only:

| module             | models                                               | numbers used (own choices unless noted)                       |
|--------------------|------------------------------------------------------|----------------------------------------------------------------|
| `charge_discharge` | `C_SENSE` with its Precharge and Discharge switches  | ideal charging; each `Signal(H)` edge applies `V *= C/(C+C_LOAD)` |
| `inv_chain`        | one 16-stage inverter chain (16 is the design's number) | alpha-power law: `t = k*Vdd/(Vdd-0.3)^1.3`, 30 ps per inverter at 1 V; no switching at or below 0.3 V |
| `event_generator`  | the pair of chains, on `V_SENSE` and on `V_LOW`      | -                                                              |
| `level_shifter`    | cross-coupled PMOS/NMOS shifter from `V_LOW` to `V_SENSE` | logic unchanged, 50 ps delay, high level = `V_SENSE`      |

Shared constants and the delay law are in `rtl/qdc_pkg.sv`.

The load per transition is 8 inverters at 7.8 fF (`CP_INV_PF`). It was chosen
so that 50 pF charged to 0.8 V against 0.45 V gives the code 232. That number
is the published simulation result for this design in a 90 nm process. The same
load then gives the following codes (from `tb_qdc_sweep`, `V_LOW` = 0.45 V):

| V_HIGH \ C_SENSE | 25 pF | 50 pF | 100 pF | 200 pF | 300 pF | 400 pF | 500 pF |
|------------------|------:|------:|-------:|-------:|-------:|-------:|-------:|
| 0.5 V            |    23 |    44 |     86 |    170 |    255 |    339 |    424 |
| 0.6 V            |    59 |   117 |    232 |    463 |    693 |    924 |   1154 |
| 0.7 V            |    90 |   179 |    356 |    710 |   1064 |   1418 |   1772 |
| 0.8 V            |   117 |   232 |    463 |    924 |   1385 |   1846 |   2307 |
| 0.9 V            |   141 |   279 |    557 |   1113 |   1668 |   2224 |   2779 |
| 1.0 V            |   162 |   322 |    642 |   1281 |   1921 |   2561 |   3201 |

How these compare with the published transistor-level results:

* **500 pF at 0.8 V.** The model gives 2307; the published value is 2306.
* **500 pF at 0.6 V.** The model gives 1154; the published value is 1664.
  The transistor-level circuit loses charge in ways this model leaves out,
  such as the level shifter's own current and leakage.

Response time, from `Start` rising to `Ab` rising, grows with both `V_HIGH`
and `C_SENSE`. At 50 pF it ranges from 0.14 us at 0.5 V to 1.06 us at 1.0 V
under this model's delays.

So read the table as showing the laws (linear in C, logarithmic in V) and the
order of magnitude. It is not a prediction of silicon codes.

The model does not include:

* noise;
* metastability;
* the level shifter's drain on the capacitor;
* the finite charging time of the precharge switch.

## Using `qdc_top`

Parameters:

| name          | default | meaning                                               |
|---------------|---------|-------------------------------------------------------|
| `STAGES`      | 16      | inverters per chain                                   |
| `COUNT_W`     | 20      | width of the code                                     |
| `CP_INV_PF`   | 0.0078  | capacitance charged per rising inverter output, pF    |
| `LS_DELAY_NS` | 0.05    | level-shifter delay, ns                               |

Ports:

* **Inputs:** `rst_n`, `precharge`, `discharge`, `start`, and the real-valued
  `v_high`, `v_low` (volts) and `c_sense_pf` (pF).
* **Outputs:** the code `d_out[COUNT_W-1:0]` and `finished` (`Ab`).
* **Observation outputs:** `aa`, `clk`, `sig_h`, `sig_l`, `done` and the real
  `v_sense`.

One conversion:

1. Hold `start` low and `precharge` high. The capacitor charges to `v_high`.
2. Pulse `rst_n` low to clear the code.
3. Lower `precharge` and raise `discharge`.
4. Raise `start`. The loop runs.
5. Wait for `finished` to rise. `d_out` then holds the code and `clk` stays
   low.
6. Lower `start` to clear `finished` before the next conversion.

`v_low` must be above the model's 0.3 V threshold. A chain below threshold
stops switching, and the loop then waits for good.

The signal generator, event comparator, mutex, C-element and counter are
synthesizable. They are asynchronous logic with intended combinational loops
(the latches of the mutex and the signal generator) and latches (the C-element,
the comparator's two latches), so a standard synchronous flow will report
loops and latches. For silicon, these would be mapped by hand to a
mutex/C-element cell library. The top level also contains the real-valued
models, so it is a simulation model only.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/qdc_pkg.sv tb/qdc_ref_pkg.sv tb/tb_qdc_top.sv --top-module tb_qdc_top
./obj_dir/Vtb_qdc_top
```

(Leave out `tb/qdc_ref_pkg.sv` for the block testbenches, which do not use it.)

| testbench              | what it checks |
|------------------------|----------------|
| `tb_c_element`         | truth table, every transition, random inputs |
| `tb_mutex`             | first-come grant, waiting request, exclusion, simultaneous requests, random sequences against a reference arbiter |
| `tb_signal_generator`  | the three stages, restart after `Start` low, the re-arm gate |
| `tb_event_comparator`  | H-wins rounds with both falling orders, blocking of stray grants, finish and its clear, ties, random rounds |
| `tb_event_counter`     | truth-table rows, rising-edge-only counting, clear, wrap of a 4-bit copy, random counts, carry into bit 17 |
| `tb_inv_chain`         | delay at six supplies against the delay law, monotonicity, odd chain inverts, no switching below threshold |
| `tb_event_generator`   | lead/lag of `Signal(H)` against `Signal(L)` above, at and below `V_LOW` |
| `tb_level_shifter`     | logic preserved, 50 ps delay, complement, output level = `V_SENSE` |
| `tb_charge_discharge`  | precharge, no drain with the switch open, `V_HIGH*K^n` after n transitions |
| `tb_qdc_top`           | end to end at default sizes: codes against a round-by-round reference model and the closed form, code = number of `Clk` edges, one `Aa`/`Done` per counted round but the last, clock stays stopped, restart, linearity in C, log law in V, `V_HIGH < V_LOW` |
| `tb_qdc_sweep`         | the 42-point grid above against the reference model, linearity and log law on every row and column, response time (`Start` to `Ab`) growing with both `V_HIGH` and `C_SENSE`, and the 0.55 V / 50 pF point (code 82) |
| `tb_qdc_chip`          | `V_HIGH` = 2.5 V, `V_LOW` = 1.5 V, 100 nF and 50 nF: about 410,000 rounds, final `V_SENSE` just below `V_LOW`, half the capacitance gives half the rounds and half the time |

`tb/qdc_ref_pkg.sv` holds the reference model. It predicts each round from the
delay law and the charge-sharing law and does not use the RTL. Where the two
delays of a round are within 1.5 ps, it accepts either outcome.

Each of these testbenches runs in a few seconds.

## Departures and open points

These points are this design's own resolution of things the source
description leaves open:

* **Comparator internals.** The source names the comparator's parts (a
  mutex, an SR latch that blocks the losing request, a C-element and three
  NOR gates) but not exactly how they connect. The latch
  structure, the blocking of the losing request in both directions, and the
  use of `Start` to clear the finish flag are reconstructions that meet the
  described behaviour.
* **What the code counts.** It counts every rising edge of `Clk`, including
  the final losing round. One description of the output says it counts the
  rising edges "when V_SENSE > V_LOW", which would be one less.
* **Counter form.** It is the synchronous toggle-flip-flop counter. An
  alternative ripple description gives the same count. It wraps at 2^20.
* **Counter clear.** `rst_n` is an addition.
* **Analogue numbers.** All of them (delay law, thresholds, per-inverter
  load, level-shifter delay) are model choices. Only the 232 calibration point
  is tied to a published figure.
* **Test chip configuration.** The fabricated test chip (350 nm, `V_HIGH` =
  2.5 V, `V_LOW` = 1.5 V, 100 nF and 10 uF off-chip capacitors) has a
  different, unpublished load per transition. With this model's 90 nm-class
  load:
  * 100 nF fits the 20-bit code (about 410,000);
  * 10 uF would need about 4.1e7 rounds and wrap the counter.

  Whether the real chip's codes fit is not known.
