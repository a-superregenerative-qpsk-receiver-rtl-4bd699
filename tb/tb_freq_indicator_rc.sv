// Self-checking testbench of the freq_indicator_rc behavioural model with
// R = 1 kOhm, C = 1 uF (time constant 2/3 ms). Each input line is held high
// for ten time constants and the node voltages are compared with
// (2*V(d=+-2) + V(d=+-1))/3 and with the exponential step response at one
// time constant.
`timescale 1ns / 1ps
module tb_freq_indicator_rc;
  int checks = 0, failures = 0;
  logic d_p2 = 0, d_p1 = 0, d_m1 = 0, d_m2 = 0;
  real c_plus, c_minus;
  localparam real TAU_NS = 2.0 / 3.0 * 1.0e3 * 1.0e-6 * 1.0e9;

  freq_indicator_rc #(.R_OHM(1.0e3), .C_FARAD(1.0e-6), .STEP_NS(100.0)) dut (.*);

  task automatic check_near(real v, real e, string msg);
    checks++;
    if (v > e + 0.03 || v < e - 0.03) begin
      failures++;
      $display("FAIL: %s: %f expected %f", msg, v, e);
    end
  endtask

  initial begin
    #(200.0 * TAU_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10.0 * TAU_NS);
    check_near(c_plus, 0.0, "idle c_plus");
    check_near(c_minus, 0.0, "idle c_minus");
    d_p1 = 1;
    #(TAU_NS);
    check_near(c_plus, 1.1 * (1.0 - $exp(-1.0)), "c_plus after one time constant");
    #(10.0 * TAU_NS);
    check_near(c_plus, 1.1, "c_plus with d=+1");
    check_near(c_minus, 0.0, "c_minus with d=+1");
    d_p1 = 0; d_p2 = 1;
    #(10.0 * TAU_NS);
    check_near(c_plus, 2.2, "c_plus with d=+2");
    d_p2 = 0; d_m1 = 1;
    #(10.0 * TAU_NS);
    check_near(c_plus, 0.0, "c_plus with d=-1");
    check_near(c_minus, 1.1, "c_minus with d=-1");
    d_m1 = 0; d_m2 = 1;
    #(10.0 * TAU_NS);
    check_near(c_minus, 2.2, "c_minus with d=-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
