# Joint adaptive crosstalk cancellation and AGC/DFE controller

Closely spaced single-ended lanes on a board couple into each other. The far-end
crosstalk that a lane picks up from its neighbour is roughly the derivative of
the neighbour's signal. It peaks when the neighbour switches, which is half a
unit interval (UI) away from the instant where the victim's data is sampled. The
receiver this controller serves cancels that crosstalk with an analog adder. The
adder mixes the victim's own signal with a differentiated copy of the
neighbour's signal in the ratio `G(1-alpha) : G*alpha`. After the adder come a
variable-gain amplifier (gain `A`) and a 3-tap decision-feedback equaliser (taps
`c1..c3`).

All of `alpha`, `A` and `c1..c3` depend on channel length, spacing, process and
temperature, so they have to adapt. The central idea is that the two kinds of
impairment can be watched at two different instants:

* **At the edge instant** (half-way between data samples, 180-degree clock), the
  victim's own transition crosses zero and the neighbour's crosstalk is at its
  peak. The sign of an edge sample taken there says whether crosstalk is still
  visible. This drives `alpha`.
* **At the data instant** (0-degree clock), crosstalk is close to zero and ISI
  dominates. Sign-sign LMS on the equalised sample `z[k]` drives `A` and the
  taps.

Because the two loops watch different instants, they run at the same time and
do not disturb each other. This RTL is the digital part of that receiver, for
two coupled lanes. It takes the slicers' decisions every UI and produces the
control words for the analog adder, the VGA and the DFE.

## The crosstalk detector

This is the least obvious part. Take lane 1 as the victim and lane 2 as the
aggressor. A rising aggressor couples a *negative* bump into the victim, and a
falling aggressor a *positive* one. This holds whichever way the victim itself
is switching.

When both lanes switch in the same UI, the victim's edge sample `x1[t0.5]` is
therefore the predicted crosstalk polarity if crosstalk remains. If it was
over-cancelled, the sample has the opposite sign. The predicted edge bit is
simply the aggressor's bit *before* its transition, `x2[t0]`:

| victim switches | x2[t0] | x2[t1] | x1[t0.5] | meaning            | pulse |
|-----------------|--------|--------|----------|--------------------|-------|
| yes             | 0      | 1      | 0        | under-compensated  | UP    |
| yes             | 0      | 1      | 1        | over-compensated   | DN    |
| yes             | 1      | 0      | 0        | over-compensated   | DN    |
| yes             | 1      | 0      | 1        | under-compensated  | UP    |
| any other case  |        |        |          | no information     | none  |

So `up = both_switch & (x1[t0.5] == x2[t0])` and
`dn = both_switch & (x1[t0.5] != x2[t0])` (`xtc_detect`). With random data, both
lanes switch in one UI out of four. The loop's average slope is therefore a
quarter of its step. The loop settles where the edge sample, taken over these
UIs, has zero mean.

The "no pulse" case matters. The XTC integrator must be able to hold. The
AGC/DFE integrators, in contrast, always get exactly one of UP/DN.

The three bits must refer to the same transition. `xtc_sample_align` provides
that with two flip-flops per path on the 0-degree clock. On the data path, `x[t1]`
comes after the first flip-flop and `x[t0]` after the second. On the edge path,
`x[t0.5]` comes after the second flip-flop. The contract at the inputs is as
follows. At each clock edge the data input carries the decision taken one UI
earlier, and the edge input carries the edge decision taken half a UI earlier.

## XTC control word

`xtc_adapt` integrates the pulses into an 8-bit word, one LSB per pulse. The
word is the digital counterpart of the control voltage `V_CONT`, which spans
0 to 1 V. `alpha = word / 255`, and one LSB (3.9 mV) is close to the charge-pump
step `I_s*T_b/C = 50 uA * 83.3 ps / 1 pF = 4.2 mV`. As a result, the settling
times match the analog loop. For example, reaching 757 mV takes about
`193 / 0.25 = 772` UIs, about 64 ns at 12 Gb/s.

The top 3 bits (`alpha_dac`) are the code for a binary-weighted adder. That adder
steers currents I, 2I and 4I between the forward pair and the XTC pair, giving
`alpha = code/7`. Use the full word for a finer DAC.

## Gain and DFE taps: sign-sign LMS with slicers

The error is `e[k] = z[k] - B*x[k]`. Rather than forming `B*x[k]` at the symbol
rate, two extra slicers compare `z` with `+B` and `-B`. On the positive half of
the differential signal, those thresholds are `+-B/2`. This gives `p = z > B`,
`n = z > -B` and the data bit `x = z > 0`. The error is positive when
`x = 1` and `z > B`, or when `x = 0` and `z > -B`:

    e_i = (p & n) | (n & ~x)                       (err_sign_logic)

With `s()` = +-1, the updates per UI are:

    A [k+1] = A [k] - step * s(x[k])   * s(e[k])   ->  UP = e_i XOR x[k]
    cj[k+1] = cj[k] + step * s(x[k-j]) * s(e[k])   ->  UP = e_i XNOR x[k-j]

`sslms_updn` forms these pulses and keeps `x[k-1..k-3]` in flip-flops. Those bits
are also the DFE feedback selects. `dfe_adapt` adds one integrator per
coefficient:

* `A = agc_gain / 512`, range 0..2, one LSB ≈ 0.002.
* `cj = dfe_tap * 2 mV`, signed, range ±0.256 V.

Both steps correspond to `2*mu = 0.002`. At convergence, the equalised cursor
equals `B` and each tap equals the ISI it cancels, scaled by the VGA.

Note on tap polarity: a minimised logic table for this scheme can be found with
XOR for the tap rows as well. This RTL follows the update equations (XNOR for the
taps). With XOR the taps run away; the fault test of `sslms_updn` is exactly that
change.

## Top level: `xtc_dfe_top`

Two lanes. Each lane has one `xtc_sample_align`, one `xtc_adapt` (whose aggressor
is the other lane) and one `dfe_adapt`. All per-lane ports are arrays indexed by
lane.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | recovered clock, one cycle per UI; asynchronous active-low reset |
| `slicers[l]` (`lane_slicers_t`) | in | `data`, `edge_s`, `errp`, `errn` decisions of lane `l` |
| `xtc_en[l]`, `dfe_en[l]` | in | 0 freezes alpha, or A and the taps, of lane `l` (fixed-ratio operation) |
| `load`, `alpha_init`, `agc_init`, `tap_init` | in | synchronous preset of all words (expected settings of a known board) |
| `alpha_vcont[l]`, `alpha_dac[l]` | out | XTC ratio word and its 3-bit adder code |
| `agc_gain[l]`, `dfe_tap[l][j]` | out | VGA gain word and signed tap words |
| `dfe_fb[l]` | out | `x[k-1..k-3]`, the DFE feedback bits |
| `xtc_pulse`, `agc_pulse`, `tap_pulse`, `err_sign`, `xtc_sat`, `dfe_sat` | out | monitoring: loop pulses, error sign, words at a rail |

Timing:

* The AGC/DFE words change on the clock after the slicer bits of a UI are
  presented.
* The XTC word changes three clocks after its edge sample (two alignment
  flip-flops, then the integrator).
* Everything updates at most once per UI.

Reset values:

* `alpha = 0`
* taps 0
* `A = 1` (`AGC_RESET`)

A large starting gain matters. If `A` starts very small, for example at 0.1, and
the cursor is weak, the taps can random-walk into a wrong equilibrium (inverted
taps, half the decisions wrong) before the gain has grown. The stand-alone
`dfe_adapt` keeps a default start of 0.1, which suits strong cursors.

Parameters (defaults):

* `NTAPS=3`
* `ALPHA_W=8`
* `ALPHA_DAC_W=3`
* `AGC_W=10`
* `TAP_W=8`
* `XTC_STEP=AGC_STEP=TAP_STEP=1`
* `AGC_RESET=512`

The `*_STEP` parameters are the loop gains, in LSBs per pulse. They are the
digital form of `I_s*T_b/C` for the XTC loop and of `2*mu` for the LMS loops. A
larger step converges proportionally faster but leaves more ripple on the
coefficient. On `alpha`, that ripple shows up directly as residual crosstalk.

The design is small: about 260 word-level cells and 98 flip-flops for both lanes.

## What is not here

The analog parts have no logic function, so this RTL takes their decisions as
inputs and drives them with control words:

* channels
* single-ended-to-differential converters
* the XTC adder itself
* the VGA
* the DFE summer
* the clocked comparators and CML-to-CMOS converters
* the charge pumps (replaced by the digital integrators)
* clock recovery

The XTC detector and alignment flip-flops resemble a bang-bang phase detector
and could be shared with clock recovery. They are not shared here.

The logic updates once per UI on a single clock. At 12 Gb/s that is a 12 GHz
clock. A practical implementation would deserialise the slicer outputs and
process several UIs per clock (summing their pulses). That parallel form is not
written here.

## Choices made by this design

* Integrators are saturating up/down counters instead of charge pumps or RC
  integrators.
* Word widths and LSB sizes are as listed above. The XTC step is 3.9 mV against
  4.2 mV for the analog loop.
* Added controls: enable (freeze) and load (preset) inputs.
* Reset: asynchronous, active low.
* Start values: `A = 1` at the top level and 0.1 in `dfe_adapt`; `alpha` and the
  taps start at 0.
* If UP and DN arrive together, the integrator holds. The detector never
  produces that combination.
* Tap update polarity follows the LMS update equations (see above).
* Three DFE taps, as in the integrated architecture. The simpler DFE example
  used two.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_updn_integrator` | reference model of the clamped counter for signed/unsigned words and for a step of 3; rate of one step per clock; rails; hold; load; freeze |
| `tb_xtc_sample_align` | alignment of `x[t0]`, `x[t0.5]`, `x[t1]` against a record of the inputs |
| `tb_xtc_detect` | all 32 input combinations against the truth table above |
| `tb_err_sign_logic` | error sign against `z - B*s(z)` computed in real arithmetic |
| `tb_sslms_updn` | pulses against the update equations in ±1 arithmetic; history bits |
| `tb_xtc_adapt` | open loop against a reference model, with a pulse rate near 1/4; closed loop to 616, 757 and 831 mV (words 157/193/212), settling in 640/729/909 UIs against 629/744/780 UIs for the analog loop (52.4/62/65 ns); load; freeze |
| `tb_dfe_adapt` | closed loop on a channel with cursor/post-cursors 500/200/100 mV and `B` = 250 mV; each step checked against the real-valued error; converges to A = 0.5, c = 100/50/0 mV, A within 2 % by 1000 UIs |
| `tb_xtc_dfe_top` | both lanes closed around a real-valued receiver model; see below |

`tb_xtc_dfe_top` runs both lanes at default parameters around a real-valued
model of the receiver: channel ISI, far-end crosstalk at the edge instant, the
differentiating XTC path, the adder with `G = 4`, VGA, DFE summer and slicers.

It runs nine cases: three pulse responses, standing for increasing insertion
loss, times three crosstalk strengths (60, 120 and 180 mVpp on 500 mVpp data).
Each case starts from reset and runs 20000 UIs. The testbench then checks `alpha`
against the closed-form balance point `alpha/(1-alpha) = KX/(KD*h0)` of the
model, `A` against `B/(G(1-alpha)h0)`, the taps against `B*hj/h0`, and 2000
error-free decisions per lane. It also exercises frozen `alpha` and load, checks
one gain update per UI, and counts every loop pulse type.

As expected, `alpha` grows with crosstalk and with loss, and `A` grows with loss.
The model's channels are illustrative. The model puts no crosstalk and no XTC-path
signal at the data instant. In a real receiver the differentiated path also adds
a small term there, which slightly reduces the taps the DFE needs. The model
also applies the edge slicer to the adder output rather than after the DFE
summer. The edge bit's sign is the same either way, apart from residual ISI.

Run any testbench with plain Verilator from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/xtc_dfe_pkg.sv tb/tb_xtc_dfe_top.sv --top-module tb_xtc_dfe_top
    ./obj_dir/Vtb_xtc_dfe_top

## Files

* `rtl/xtc_dfe_pkg.sv`: default sizes; `lane_slicers_t` and `updn_t` types
* `rtl/updn_integrator.sv`: saturating up/down integrator
* `rtl/xtc_sample_align.sv`: digital delay (alignment of data and edge bits)
* `rtl/xtc_detect.sv`: crosstalk over/under-compensation detector
* `rtl/xtc_adapt.sv`: XTC loop of one lane
* `rtl/err_sign_logic.sv`: error sign from three slicers
* `rtl/sslms_updn.sv`: sign-sign LMS pulses and decision history
* `rtl/dfe_adapt.sv`: AGC and DFE loop of one lane
* `rtl/xtc_dfe_top.sv`: two-lane top level
* `tb/tb_*.sv`: testbenches
