# Counter-based hold-off control for Geiger-mode avalanche photodiodes

A Geiger-mode avalanche photodiode (GM-APD) is biased above its breakdown
voltage. One absorbed photon sets off a self-sustaining avalanche. The
avalanche must be quenched by pulling the bias below breakdown. The diode must
then be held off long enough for trapped charge to escape, and then re-armed.
If the hold-off is too short, the released charge sets off false "afterpulse"
avalanches. If it is too long, the maximum count rate drops. The best value
depends on the individual device.

This design sets the hold-off time digitally, with a counter. It needs no RC
monostable or bank of delay lines. An external clock `clk_in` gives the step
size, and a 6-bit code `hold_code` gives the number of steps:

    hold-off  ≈  hold_code × T(clk_in)        (code 1..63)

With a 2 ns clock, code 30 gives about 60 ns and code 54 about 108 ns. A
20 ns clock stretches code 63 to about 1.26 µs. When the count is reached, the
same logic re-arms the APD by itself. No second pulse generator is needed for
the reset.

## The analog surroundings

The RTL controls an analog front end that is not part of it:

```
          Bias
           |
          APD
           |
 v_anode --+---- R_L ---- GND
           |
           +---- PMOS ---- Vdd     gate = qp         (low  = quench)
           |
           +---- NMOS ---- GND     gate = nmos_gate  (high = reset)
           |
           +---> comparator (+), Vref on (-)  -> compo, compo_b (readout pad)
```

An avalanche drives current through `R_L` and lifts the anode. The comparator
reports this as `compo`. Turning on the PMOS ties the anode to Vdd. This lowers
the diode voltage below breakdown, which quenches the avalanche. Turning on the
NMOS ties the anode to ground, which restores the full bias and re-arms the
diode. `compo_b` is the inverted comparator output. It is brought out so that
avalanches can be counted off chip.

## One detection cycle

| phase     | compo | count           | rn | qp | nmos_gate | what happens                         |
|-----------|-------|-----------------|----|----|-----------|--------------------------------------|
| armed     | 0     | held at 0       | 0  | 1  | 0         | waiting for a photon                 |
| hold-off  | 1     | +1 per clk edge | 0  | 0  | 0         | PMOS quenches, counter runs          |
| reset     | 1     | frozen at code  | 1  | 1  | 1         | PMOS off, NMOS pulls the anode down  |
| re-arm    | 0     | cleared to 0    | 0  | 1  | 0         | anode below Vref, NMOS opens again   |

The cycle closes on itself without a timer:

* The match signal `rn` (count == code) ends the quench and starts the reset.
* `rn` also stops the counter. The frozen count keeps matching, so the reset
  lasts as long as needed rather than a fixed time.
* The reset ends when the anode falls below Vref. At that point `compo` drops
  and clears the counter, the match disappears, and the NMOS opens.

## Hold-off timing

This is the part that needs care when choosing a code.

* `compo` is asynchronous to `clk_in`. The counter counts rising edges of
  `clk_in` from the moment `compo` rises. The quench ends on the N-th edge.
* The hold-off is therefore between (N−1)·T and N·T, depending on where the
  photon falls inside the clock period. The resolution is one clock period and
  the jitter is at most one period.
* For code 1, a photon just before a clock edge leaves almost no time for the
  PMOS to quench the avalanche before the NMOS closes. Use codes of 2 or more,
  or a clock period that is long compared with the quench time.
* Code 0 is not a valid setting. It matches the cleared counter, so `rn`, and
  with it the NMOS, stays on permanently.
* The reset phase lasts until the comparator sees the anode below Vref. Its
  length is set by the NMOS and the diode capacitance, not by the clock.
* Changing `hold_code` during a hold-off moves the end point. Change it only
  while the circuit is armed.

## Blocks and files

| file                        | block                                                                    |
|-----------------------------|--------------------------------------------------------------------------|
| `rtl/holdoff_pkg.sv`        | shared constant `HOLD_CODE_WIDTH = 6`                                    |
| `rtl/holdoff_top.sv`        | whole circuit: comparator plus digital core                              |
| `rtl/comparator.sv`         | behavioural comparator (real-valued inputs), not synthesizable           |
| `rtl/holdoff_core.sv`       | synthesizable digital part: counter, match and control                   |
| `rtl/sync_counter.sv`       | 6-bit synchronous binary counter built from J-K flip-flops               |
| `rtl/jk_ff.sv`              | J-K flip-flop with asynchronous active-low clear                         |
| `rtl/code_match.sv`         | per-bit XNOR of count and code, ANDed into `rn`                          |
| `rtl/quench_reset_logic.sv` | makes `qp`, the counter enable and clear, and `nmos_gate`                |

**Counter.** Every J-K stage has J = K, so it acts as a toggle stage, and
every stage shares one clock. Stage 0 toggles on each enabled edge. Stage i
toggles when all lower bits are 1. The enable is ANDed into the head of the
toggle chain. The chain has one 2-input AND per stage, as in a classic
synchronous ripple-carry counter. The counter is cleared asynchronously while
`compo` is low.

**Control.** The control logic has no state:

    qp        = ~(compo & ~rn)
    cnt_en    =   compo & ~rn
    cnt_rst_n =   compo
    nmos_gate =   rn

An immediate assertion checks that the quench and reset switches are never
on together.

`holdoff_core` synthesizes to 6 flip-flops and a few dozen gates. The top
level is not synthesizable because of the comparator model's `real` ports. In
a real chip the comparator would be an analog macro driving `compo` into
`holdoff_core`.

## Where this RTL departs from the transistor-level circuit

* **Counter enable instead of a gated clock.** The original circuit stops the
  counter by blocking its clock. A signal inverted from `rn` gates the clock
  together with `compo` and `clk_in`. Here `clk_in` clocks the flip-flops
  directly, and the same condition acts as a count enable. The counting
  behaviour is the same, and the design stays a single clean clock domain.
* **The two delay buffers in front of the NMOS gate are not modelled.** They
  exist so that the reset switch closes only after the quench switch has
  opened. In zero-delay RTL, `qp` and `nmos_gate` change in the same instant.
  The required ordering holds logically: the two can never be active together,
  and an assertion checks this. A netlist must still add delay or
  break-before-make logic there.
* **Ideal comparator.** The model has no offset, hysteresis or delay. Vref is
  a free input. The testbench uses 0.3 V.
* **Counter carry chain.** The toggle input of stage i is the AND of all lower
  outputs. A chain that took only the next lower output would not count in
  binary.

## Testbenches

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_jk_ff`: random J/K sequences and asynchronous clears, checked against
  the characteristic equation.
* `tb_sync_counter`: a full count with wrap-around, random enable pauses and
  mid-count clears.
* `tb_code_match`: all 4096 count/code pairs.
* `tb_quench_reset_logic`: the four `compo`/`rn` combinations against the
  phase table above.
* `tb_comparator`: an anode voltage sweep across several reference levels.
* `tb_holdoff_core`: `compo` is driven directly and `hold_code` set to 30, 54,
  1, 63 and 60 random codes. It checks edge by edge that the counter follows
  the clock and that the quench ends exactly on the N-th edge. It also checks
  that the counter stays frozen through the reset, and that releasing `compo`
  clears everything.
* `tb_holdoff_top`: end-to-end test at default parameters. It uses
  `apd_frontend_model`, a testbench-only model of the APD as breakdown
  voltage, series resistance and junction capacitance (27 V, 250 Ω, 2 pF,
  30 V bias), plus the load resistor and the two switches. It runs:
  - code 30 and code 54 at a 2 ns clock;
  - every code from 1 to 63 at 2 ns;
  - code 63 at clock periods of 2, 4, … 20 ns;
  - an extra photon during a hold-off, which must not start a new avalanche.

  It counts each mechanism and fails if one never happens: quench, code match,
  clock blocked during reset, automatic reset, counter clear, and ignored
  photon. Measured results: 59.9 ns for code 30 and 107.6 ns for code 54 at
  2 ns. For code 63 the results run from 126 ns at 2 ns to 1260 ns at 20 ns.

The model's load resistance (50 kΩ), switch on-resistance (500 Ω) and
avalanche latching level are illustrative values, not device data. The
testbench places photons in the first part of a clock period, for the reason
given under the hold-off timing rules above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb rtl/holdoff_pkg.sv tb/tb_holdoff_top.sv \
    --top-module tb_holdoff_top
./obj_dir/Vtb_holdoff_top
```

Replace `tb_holdoff_top` with any other testbench name to run it. The
package must come first on the command line. The `--timescale` option is
needed because the RTL files carry no `` `timescale `` of their own.

## Changing the design

* **Range.** `CODE_WIDTH` (default `HOLD_CODE_WIDTH = 6`) sets the counter and
  code width at every level. W bits give codes 1 … 2^W − 1. The testbenches
  take their width from the package.
* **Step size.** The step is simply the `clk_in` period. Nothing in the RTL
  depends on it.
* **Integration.** For silicon, use `holdoff_core` and connect an analog
  comparator's output to `compo`. `compo` is asynchronous. It acts as the
  counter's asynchronous clear and as the count enable. This matches the
  original circuit, but a synchronizer would add one clock of latency to the
  hold-off.
