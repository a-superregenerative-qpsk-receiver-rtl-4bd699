# Superregenerative QPSK receiver — digital back end

A superregenerative oscillator (SRO) is a cheap, low-power RF front end.
A quench signal switches it between stable and unstable once per symbol.
In each unstable period it builds up an RF pulse, and the phase of that pulse
follows the phase of the input carrier at the moment the oscillator turned
unstable. The receiver described here uses that fact to demodulate
differential QPSK without any local oscillator or I/Q mixer.

A single flip-flop takes N one-bit samples of each pulse. The clock is chosen
so that these samples sweep exactly one period of the RF signal. Between two
pulses the bit pattern is then simply rotated by an amount proportional to
the phase change. The receiver finds that rotation by correlating the current
pattern against the previous one at all N circular shifts. The best shift
gives the symbol (which quadrant the phase change falls in) and a fine offset
`d`. Averaged, `d` measures frequency error; its spread measures signal
quality.

The RTL in `rtl/` is the digital part of the prototype receiver: 25 MHz
clock, 26.25 MHz oscillator, N = 20, 10 ksymbol/s, 20 kbit/s. It also
includes a behavioural model of the small analog network that turns `d` into
frequency-correction voltages. The oscillator, the low-noise amplifier and
the quench waveform generator are analog, so no RTL is given for them.
`tb/sro_model.sv` stands in for the oscillator in simulation.

## Sampling: why one flip-flop is enough

The sampling clock satisfies

    f_clk = N / (kN + 1) * f_SRO        (k any integer)

With k = 1, N samples span N + 1 RF periods. Each sample therefore lands
`2*pi/N` later in the RF cycle than the previous one. The N samples are an
aliased picture of one RF period. In the prototype, f_clk = 25 MHz and
f_SRO = 25 * 21/20 = 26.25 MHz. A larger k moves the clock further from the
oscillator frequency. The RTL assumes a positive k. A negative k reverses the
direction of the rotation, which swaps the π/2 and 3π/2 decisions and the
sign of `d`.

Sampling starts `T1_CYCLES` clocks after the quench trigger, once the pulse is
large enough for a logic input. The value, 1000 cycles (40 µs), is this
design's own. The first flip-flop of `sample_shift_reg` takes the
oscillator output asynchronously. In a real build its placement and input
timing matter. There is deliberately no synchroniser: that flip-flop *is* the
one-bit sampler.

If one symbol period is a whole number of carrier periods (2625 here), the
rotation between consecutive pulses is exactly the transmitted phase change.
If it is not, there is a fixed extra rotation. The `phase_comp` input
subtracts it, in steps of 2π/N.

## Correlation by shifting and rotating

One symbol period (`SYMBOL_CYCLES` = 2500 clocks) runs as follows, timed
by `qpsk_sequencer`:

| count after quench trigger | action |
|---|---|
| 0 .. 3 | `quench_trig` high, which starts the external quench generator |
| T1 .. T1+N-1 | shift: one oscillator sample per clock into `Q[N-1]`, moving towards `Q[0]` |
| T1+N .. T1+2N-1 | rotate: `Q[0]` is fed back into `Q[N-1]`; in the cycle of rotation k, `c(k)` is evaluated |
| T1+2N | "clk2": the vector, back in its original order after N rotations, is copied into the previous-vector register; the decision is registered |
| T1+2N+1 | `sym_valid` pulse with the new `dibit`, `d`, `led_d`, `c_max`, `k_opt` |

`c(k) = popcount(rot^k(s_n) XNOR s_(n-1))` is one combinational adder tree
(`xnor_correlator`). `peak_finder` keeps the first maximum over k = 0..N-1.
The register is clocked on only 2N = 40 of the 2500 cycles, i.e. 1.6 % of
the time. Everything runs on one clock, with clock enables in place of the
gated clocks in a schematic drawing of the circuit.

## From best shift to symbol and offset

With this register (oldest sample in `Q[0]`, rotating towards `Q[0]`), a phase
advance of m steps of 2π/N is matched at `k_opt = (N - m) mod N`.
`symbol_decider` computes

    m = (N - k_opt - phase_comp) mod N

and splits the N values of m into four regions of N/4 values. The regions are
centred on 0, N/4, N/2 and 3N/4, i.e. phase changes of 0, π/2, π and 3π/2.
For N = 20:

| m | 18 19 **0** 1 2 | 3 4 **5** 6 7 | 8 9 **10** 11 12 | 13 14 **15** 16 17 |
|---|---|---|---|---|
| phase change | 0 | π/2 | π | 3π/2 |
| dibit (Gray) | 00 | 01 | 11 | 10 |
| d | -2 -1 0 +1 +2 | same | same | same |

N must be an odd multiple of 4, so that each region has a centre point. `d`
ranges over ±(N-4)/8. `led_d` is `d` one-hot, with `led_d[0]` for the most
negative offset. It drives five LEDs and the analog averaging network. The
Gray mapping and the sign convention of m are this design's own choices. A
transmitter must use the same mapping.

What `d` tells you:

* **Frequency error.** A carrier off by f_symbol/N (500 Hz here) adds one step
  of rotation per symbol, so every decision sits at d = +1. The offsets the
  decider can tell apart without a symbol error are ±2 steps (±1000 Hz). A
  constant known offset can be removed with `phase_comp`.
* **Quality.** With a clean signal, `c_max` = N and `d` = 0. Noise lowers
  `c_max` and spreads `d`.

## Outputs

* `ber_clk`, `ber_data` (`ber_serializer`): each dibit is sent MSB first, one
  bit per half symbol (20 kbit/s). `ber_clk` rises in the middle of each bit.
  The output stops after a symbol period with no new decision.
* `v_tune_pwm`, `q_dc_pwm` (`pwm_gen`, 8-bit, 256-cycle period): PWM levels
  for the oscillator's varicap tuning and for the DC part of the quench. They
  need external RC filtering. Their duty words are top-level inputs.
* `c_plus`, `c_minus` (`freq_indicator_rc`, behavioural, `real`): two RC
  nodes. The d = +2 and +1 lines (or −2 and −1) drive each node through R
  and 2R, giving `(2*V(±2) + V(±1))/3`, averaged with time constant
  (2/3)·R·C. The defaults are R = 10 kΩ, C = 100 nF and 3.3 V, about seven
  symbols; all three values are this design's choices. Closing the tuning
  loop from these voltages is left to the user.
* Reset holds the sequencer at the last count of a period. `quench_trig`
  stays low during reset, and the first quench period starts one clock after
  release. The first decision after reset has no previous pulse and is
  suppressed.

## Size

`sr_qpsk_digital` holds 114 flip-flops. A generic 4-input-LUT mapping gives
about 300 LUTs. That count includes the two 8-bit PWM counters, the 12-bit
symbol counter and the serializer. Mapped on their own, the 20-input
popcount takes about 50 LUTs. The decision logic, which maps k_opt and
`phase_comp` to the outputs, takes up to about 90. A bit-serial agreement counter (one XNOR
and a 5-bit counter, one bit per clock) would remove most of the popcount.
The clock budget allows it, with 2500 cycles per symbol against the 41 used.

## Files

| file | contents |
|---|---|
| `rtl/sr_qpsk_pkg.sv` | quadrant type, Gray dibit mapping |
| `rtl/sr_qpsk_rx.sv` | top level: digital part plus the averaging network |
| `rtl/sr_qpsk_digital.sv` | all synthesizable logic (what sat in the FPGA) |
| `rtl/qpsk_sequencer.sv` | quench trigger, shift/rotate/clk2 timing |
| `rtl/sample_shift_reg.sv` | N-bit register with shift/rotate multiplexer |
| `rtl/prev_vector_reg.sv` | previous pulse's vector |
| `rtl/xnor_correlator.sv` | agreement count |
| `rtl/peak_finder.sv` | best shift and its correlation |
| `rtl/symbol_decider.sv` | dibit, offset d, LEDs |
| `rtl/ber_serializer.sv` | serial clock and data |
| `rtl/pwm_gen.sv` | PWM output |
| `rtl/freq_indicator_rc.sv` | behavioural model of the R/2R averaging network (not synthesizable) |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/sro_model.sv` | oscillator model for simulation |

Parameters: `N` (20), `SYMBOL_CYCLES` (2500), `T1_CYCLES` (1000),
`PWM_BITS` (8). These must hold: N is an odd multiple of 4, and
`T1_CYCLES + 2N < SYMBOL_CYCLES`. For another band or rate, derive f_clk from
the formula above and set `SYMBOL_CYCLES = f_clk / symbol rate`.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example, the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_sr_qpsk_rx \
        rtl/sr_qpsk_pkg.sv rtl/*.sv tb/sro_model.sv tb/tb_sr_qpsk_rx.sv
    ./obj_dir/Vtb_sr_qpsk_rx

A unit test needs only the package, its module and its testbench, e.g.
`rtl/sr_qpsk_pkg.sv rtl/symbol_decider.sv tb/tb_symbol_decider.sv`.

`tb_sr_qpsk_rx` runs the top at its default sizes, in about a second.
(`tb_sr_qpsk_digital` runs a shorter version of the same test on the logic
alone.) The end-to-end test's data is a PN9 sequence (x⁹ + x⁵ + 1), sent as differential Gray-coded QPSK
through the oscillator model. The test has seven segments of 60 symbols each:

1. nominal carrier
2. +500 Hz
3. +500 Hz with `phase_comp` = 1
4. −1000 Hz
5. +1000 Hz
6. nominal carrier with 2 % of the samples inverted
7. −500 Hz

It checks every dibit, except that in the noisy segment up to two wrong
symbols count as bit errors rather than failures. It also checks every serial
bit as read on `ber_clk`, the decision
latency of T1+2N+1 clocks and the 40 clocked cycles per symbol. It also
checks the expected `d` in each clean segment and that `c_plus` / `c_minus`
respond. It confirms that all four phase changes, all five offsets, phase
compensation and reduced correlation each occurred.

The oscillator model is idealised. Each pulse is a clean sinusoid at
26.25 MHz, whose phase is the carrier phase at the quench instant. "Noise" is
random inversion of samples. The model does not cover amplitude build-up,
logarithmic-mode saturation, timing jitter, or the receiver's sensitivity and
bit error rate against input power. Those depend on the analog front end.

## How far this follows the original design

These follow the published receiver:
* the sampling scheme and its frequency plan
* the shift-then-rotate register with its Sh/Ro multiplexer
* the XNOR/popcount correlation, computed combinationally as in the prototype
* 2N clocked cycles per symbol
* N = 20 with five offset values
* the R/2R frequency-indication network
* the `ber_clk`/`ber_data` and PWM interfaces
* the 25 MHz / 10 ksymbol/s timing

The original's exact decision table was not available. The decision here
assigns each shift to the nearest of the four ideal phase changes, which is
what its constellation drawing shows.

These are this design's own choices:
* T1
* quench trigger width
* the rotation direction and the sign convention that follows from it
* Gray mapping
* tie rule in the peak search (smallest k wins)
* serial bit order and clock phase
* PWM resolution
* RC component values
* suppression of the first decision
* reset behaviour

The prototype generated the quench waveform outside the FPGA from a trigger,
as `quench_trig` does here. A bit-serial correlator (one bit per clock) would
use less logic; it is not provided.
