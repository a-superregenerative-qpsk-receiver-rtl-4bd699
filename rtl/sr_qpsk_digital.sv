// Digital part of the superregenerative QPSK receiver (the logic that sat
// in the prototype's FPGA).
//
// The superregenerative oscillator (SRO) produces one RF pulse per symbol,
// started by the quench signal, and the pulse keeps the phase of the received
// carrier. This block triggers the quench generator once per symbol, samples
// the pulse with one flip-flop N times at a clock chosen so that the N samples
// sweep one whole period of the (aliased) RF signal (f_clk = N/(kN+1) f_SRO;
// 25 MHz against 26.25 MHz, N = 20, k = 1 in the prototype), and compares
// the N-bit vector of this pulse with that of the previous pulse at all N
// circular displacements. The displacement of best agreement is the phase
// change between the pulses in steps of 2*pi/N, from which the dibit of a
// differentially encoded QPSK symbol follows directly, together with an
// offset d (quality, frequency displacement).
//
//   qpsk_sequencer    quench trigger, shift / rotate / clk2 timing
//   sample_shift_reg  N-bit shift register with Sh/Ro multiplexer
//   prev_vector_reg   vector of the previous pulse
//   xnor_correlator   c(k) = sum(rot^k(s_n) XNOR s_(n-1))
//   peak_finder       k_opt = argmax c(k), c_max
//   symbol_decider    dibit, offset d, one-hot LEDs
//   ber_serializer    ber_clk / ber_data at twice the symbol rate
//   pwm_gen (x2)      varicap tuning and DC quench level
//
// Interface: s_in is the SRO output, taken asynchronously by the first
// flip-flop of the sample register (as in the prototype, with no
// synchroniser). quench_trig starts each quench period. sym_valid pulses
// when quad, dibit, d, led_d, c_max and k_opt are new; the first decision
// after reset, which has no previous pulse, is suppressed.
// Timing: decision T1_CYCLES + 2N + 1 cycles after the quench trigger;
// ber_data carries the dibit during the following symbol period.
// The structure follows the published schematic, timing diagram and block
// diagram; the values of T1_CYCLES and PWM_BITS are this design's choices.
`timescale 1ns / 1ps
module sr_qpsk_digital
  import sr_qpsk_pkg::*;
#(
  parameter int unsigned N             = 20,
  parameter int unsigned SYMBOL_CYCLES = 2500,
  parameter int unsigned T1_CYCLES     = 1000,
  parameter int unsigned PWM_BITS      = 8,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned KW = $clog2(N),
  localparam int unsigned QN = N / 4,
  localparam int unsigned H  = (QN - 1) / 2,
  localparam int unsigned DW = $clog2(H + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // SRO interface
  input  logic                 s_in,
  output logic                 quench_trig,
  input  logic [PWM_BITS-1:0]  tune_duty,
  input  logic [PWM_BITS-1:0]  qdc_duty,
  output logic                 v_tune_pwm,
  output logic                 q_dc_pwm,
  // decisions
  input  logic [KW-1:0]        phase_comp,
  output logic                 sym_valid,
  output logic [1:0]           quad,
  output logic [1:0]           dibit,
  output logic signed [DW-1:0] d,
  output logic [QN-1:0]        led_d,
  output logic [CW-1:0]        c_max,
  output logic [KW-1:0]        k_opt,
  output logic                 sampling_active,
  // serial output to a BER analyser
  output logic                 ber_clk,
  output logic                 ber_data
);

  logic          shift_en, rot_en, sh_ro, first_k, load_prev;
  logic [KW-1:0] k;
  logic [N-1:0]  s_n, s_prev;
  logic          prev_valid;
  logic [CW-1:0] c_k, c_best;
  quadrant_e     quad_e;

  assign quad = quad_e;

  qpsk_sequencer #(
    .N(N), .SYMBOL_CYCLES(SYMBOL_CYCLES), .T1_CYCLES(T1_CYCLES)
  ) u_seq (
    .clk, .rst_n, .quench_trig, .shift_en, .rot_en, .sh_ro, .first_k, .k,
    .load_prev
  );

  assign sampling_active = shift_en || rot_en;

  sample_shift_reg #(.N(N)) u_sreg (
    .clk, .en(sampling_active), .sh_ro, .s_in, .q(s_n)
  );

  prev_vector_reg #(.N(N)) u_prev (
    .clk, .rst_n, .load(load_prev), .d(s_n), .q(s_prev), .valid(prev_valid)
  );

  xnor_correlator #(.N(N)) u_corr (
    .a(s_n), .b(s_prev), .c(c_k)
  );

  peak_finder #(.N(N)) u_peak (
    .clk, .rst_n, .en(rot_en), .first_k, .c(c_k), .k, .c_max(c_best), .k_opt
  );

  symbol_decider #(.N(N)) u_dec (
    .clk, .rst_n, .decide(load_prev && prev_valid), .k_opt, .c_max_in(c_best),
    .phase_comp, .sym_valid, .quad(quad_e), .dibit, .d, .led_d, .c_max
  );

  ber_serializer #(.SYMBOL_CYCLES(SYMBOL_CYCLES)) u_ser (
    .clk, .rst_n, .load(sym_valid), .dibit, .ber_clk, .ber_data
  );

  pwm_gen #(.WIDTH(PWM_BITS)) u_pwm_tune (
    .clk, .rst_n, .duty(tune_duty), .pwm(v_tune_pwm)
  );

  pwm_gen #(.WIDTH(PWM_BITS)) u_pwm_qdc (
    .clk, .rst_n, .duty(qdc_duty), .pwm(q_dc_pwm)
  );

endmodule
