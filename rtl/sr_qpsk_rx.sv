// Superregenerative QPSK receiver: digital back end plus the analog network
// that turns the decision offset d into frequency-correction voltages.
//
// sr_qpsk_digital holds all the logic: quench trigger, one-bit sampling of
// each oscillator pulse, shift/rotate correlation with the previous pulse,
// symbol decision, serial clock/data output and the two PWM outputs. Its
// one-hot offset lines led_d drive freq_indicator_rc, a behavioural model of
// the R/2R-C network whose node voltages c_plus and c_minus rise when the
// carrier is above or below the expected frequency. The published network
// uses the d = +-1 and +-2 lines (N = 20); for a smaller N without +-2 lines
// those inputs are tied low.
// Interface and timing are those of sr_qpsk_digital, plus the two real-valued
// voltages, which settle with a time constant of about seven symbols with the
// default component values (this design's choice).
`timescale 1ns / 1ps
module sr_qpsk_rx #(
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
  output logic                 ber_data,
  // frequency indication
  output real                  c_plus,
  output real                  c_minus
);

  sr_qpsk_digital #(
    .N(N), .SYMBOL_CYCLES(SYMBOL_CYCLES), .T1_CYCLES(T1_CYCLES), .PWM_BITS(PWM_BITS)
  ) u_digital (
    .clk, .rst_n, .s_in, .quench_trig, .tune_duty, .qdc_duty, .v_tune_pwm,
    .q_dc_pwm, .phase_comp, .sym_valid, .quad, .dibit, .d, .led_d, .c_max,
    .k_opt, .sampling_active, .ber_clk, .ber_data
  );

  logic d_p2, d_p1, d_m1, d_m2;

  always_comb begin
    d_p1 = (H >= 1) ? led_d[(H + 1) % QN] : 1'b0;
    d_m1 = (H >= 1) ? led_d[(H + QN - 1) % QN] : 1'b0;
    d_p2 = (H >= 2) ? led_d[(H + 2) % QN] : 1'b0;
    d_m2 = (H >= 2) ? led_d[(H + QN - 2) % QN] : 1'b0;
  end

  freq_indicator_rc u_find (
    .d_p2, .d_p1, .d_m1, .d_m2, .c_plus, .c_minus
  );

endmodule
