// Pulse-width modulator for the analog controls of the oscillator core.
//
// The receiver drives two of these: the varicap voltage that tunes the
// oscillator's centre frequency and the DC part of the quench signal. A free-
// running WIDTH-bit counter is compared with the duty word: the output is
// high while counter < duty, so the duty cycle is duty / 2**WIDTH and the
// period 2**WIDTH clock cycles. An external RC filter makes the DC level.
// That the two signals are PWM outputs is the prototype's; the counter width
// and comparison scheme are this design's choices.
`timescale 1ns / 1ps
module pwm_gen #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] duty,
  output logic             pwm
);

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      pwm <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      pwm <= cnt < duty;
    end
  end

endmodule
