// Behavioural model (not synthesizable) of the analog resistor network that
// averages the offset indicator d into frequency-correction voltages.
//
// The one-hot lines for d = +2 and d = +1 drive one capacitor node through
// resistors R and 2R; the lines for d = -2 and d = -1 drive a second node the
// same way, and the d = 0 line is left open. A node therefore settles to
//   (2*V(d=+-2) + V(d=+-1)) / 3
// with time constant (2/3)*R*C, so c_plus and c_minus are running averages of
// how far, and in which direction, the decisions sit from the ideal phases. A
// carrier displaced by +-f_symbol/N moves the average decision by +-1 step.
// The R / 2R topology is the published one; the values of R, C and the logic
// high level are this design's choices. The model integrates the node
// equations with a forward-Euler step of STEP_NS nanoseconds.
`timescale 1ns / 1ps
module freq_indicator_rc #(
  parameter real R_OHM   = 10.0e3,
  parameter real C_FARAD = 100.0e-9,
  parameter real VDD     = 3.3,
  parameter real STEP_NS = 1000.0
) (
  input  logic d_p2,     // d = +2 line
  input  logic d_p1,     // d = +1 line
  input  logic d_m1,     // d = -1 line
  input  logic d_m2,     // d = -2 line
  output real  c_plus,
  output real  c_minus
);

  localparam real TAU_S = 2.0 / 3.0 * R_OHM * C_FARAD;
  localparam real ALPHA = (STEP_NS * 1.0e-9) / TAU_S;

  real v_p, v_m;

  initial begin
    c_plus  = 0.0;
    c_minus = 0.0;
  end

  always begin
    #(STEP_NS);
    v_p = VDD * (2.0 * real'(d_p2) + real'(d_p1)) / 3.0;
    v_m = VDD * (2.0 * real'(d_m2) + real'(d_m1)) / 3.0;
    c_plus  = c_plus  + (v_p - c_plus)  * ALPHA;
    c_minus = c_minus + (v_m - c_minus) * ALPHA;
  end

endmodule
