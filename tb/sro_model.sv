// Behavioural model (testbench only) of the superregenerative oscillator as
// seen by the receiver's sampling flip-flop.
//
// On each rising edge of quench the oscillator starts a new RF pulse at its
// own frequency F_SRO_HZ. The pulse takes the phase the input carrier has at
// that instant, 2*pi*(integral of f_c) + phi_tx, where f_c = F_SRO_HZ + freq_offset_hz
// and phi_tx is the transmitted symbol phase (radians) driven by the
// testbench. Output: s_out = (cos(2*pi*F_SRO_HZ*(t - t_n) + phase_n) >= 0).
// The model only matters at the receiver's sampling instants: it evaluates
// the waveform at each falling edge of sample_clk for the time of the next
// rising edge (half a period of CLK_PERIOD_NS later). With probability
// flip_per_mille/1000 it inverts a sample, standing in for noise.
`timescale 1ns / 1ps
module sro_model #(
  parameter real F_SRO_HZ      = 26.25e6,
  parameter real CLK_PERIOD_NS = 40.0
) (
  input  logic sample_clk,
  input  logic quench,
  input  real  phi_tx,
  input  real  freq_offset_hz,
  input  int   flip_per_mille,
  output logic s_out
);

  localparam real TWO_PI = 6.283185307179586;

  real t_n = 0.0, phase_n = 0.0, carrier_cyc = 0.0;

  // The carrier phase is accumulated between quench instants, so a change
  // of freq_offset_hz changes the frequency without a phase step.
  always @(posedge quench) begin
    real t_now;
    t_now = $realtime * 1.0e-9;
    carrier_cyc = carrier_cyc + (F_SRO_HZ + freq_offset_hz) * (t_now - t_n);
    carrier_cyc = carrier_cyc - $floor(carrier_cyc);
    t_n = t_now;
    phase_n = TWO_PI * carrier_cyc + phi_tx;
  end

  initial s_out = 1'b0;

  always @(negedge sample_clk) begin
    real t, cyc;
    logic v;
    t = ($realtime + CLK_PERIOD_NS / 2.0) * 1.0e-9 - t_n;
    cyc = F_SRO_HZ * t;
    v = $cos(TWO_PI * (cyc - $floor(cyc)) + phase_n) >= 0.0;
    if (flip_per_mille > 0 && $urandom_range(999, 0) < flip_per_mille) v = ~v;
    s_out <= v;
  end

endmodule
