// Testbench of sr_qpsk_digital, the logic of the receiver without the analog
// averaging network, at its default sizes. A PN9 sequence is sent as
// differential Gray-coded QPSK through the oscillator model for three
// segments of 40 symbols: nominal carrier (d = 0, c_max = N), carrier
// +1000 Hz (d = +2) and carrier -500 Hz (d = -1). Every decided dibit is
// compared with the sent one, and the decision latency (T1 + 2N + 1 clocks
// after the quench trigger), the quadrant output and the clocked-cycle count
// (2N per symbol) are checked.
`timescale 1ns / 1ps
module tb_sr_qpsk_digital;
  localparam int N = 20, SYM = 2500, T1 = 1000;
  localparam real PI = 3.141592653589793;
  localparam int SEGS = 3, SYMS_PER_SEG = 40;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  logic s_in, quench_trig, v_tune_pwm, q_dc_pwm, sym_valid, sampling_active;
  logic ber_clk, ber_data;
  logic [7:0] tune_duty = 8'd50, qdc_duty = 8'd200;
  logic [4:0] phase_comp = '0, c_max, k_opt, led_d;
  logic [1:0] dibit, quad;
  logic signed [2:0] d;

  sr_qpsk_digital dut (.*);

  real phi_tx = 0.0, freq_offset_hz = 0.0;
  int  flip_per_mille = 0;

  sro_model u_sro (
    .sample_clk(clk), .quench(quench_trig), .phi_tx, .freq_offset_hz,
    .flip_per_mille, .s_out(s_in)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat ((SEGS * SYMS_PER_SEG + 10) * SYM) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] pn = 9'h0A5;
  function automatic bit pn9_next();
    bit b;
    b = pn[8] ^ pn[4];
    pn = {pn[7:0], b};
    return b;
  endfunction

  int seg = 0, cyc = 0, last_quench = 0, active_cycles = 0, decisions = 0;
  logic [1:0] sent_q [$];
  logic quench_d = 1'b0;

  always @(posedge clk) begin
    cyc++;
    quench_d <= quench_trig;
    if (sampling_active) active_cycles++;
    if (rst_n && quench_trig && !quench_d) last_quench = cyc;
    if (rst_n && (cyc % SYM) == SYM / 2) begin
      logic [1:0] db;
      db = {pn9_next(), pn9_next()};
      phi_tx = phi_tx + ((db == 2'b00) ? 0 : (db == 2'b01) ? 1 : (db == 2'b11) ? 2 : 3) * PI / 2.0;
      sent_q.push_back(db);
    end
    if (rst_n && sym_valid) begin
      logic [1:0] exp_db;
      decisions++;
      check(cyc - last_quench == T1 + 2 * N + 1, "decision latency");
      exp_db = sent_q.pop_front();
      check(dibit == exp_db, $sformatf("seg %0d dibit %b expected %b", seg, dibit, exp_db));
      check(dibit == (quad == 2'd0 ? 2'b00 : quad == 2'd1 ? 2'b01 : quad == 2'd2 ? 2'b11 : 2'b10), "quad");
      if (decisions % SYMS_PER_SEG != 1)
        case (seg)
          0: check(d == 0 && c_max == 5'(N), $sformatf("seg0 d=%0d c_max=%0d", d, c_max));
          1: check(d == 2, $sformatf("seg1 d=%0d", d));
          default: check(d == -1, $sformatf("seg2 d=%0d", d));
        endcase
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (seg = 0; seg < SEGS; seg++) begin
      if (seg == 1) freq_offset_hz = 1000.0;
      if (seg == 2) freq_offset_hz = -500.0;
      while (decisions < (seg + 1) * SYMS_PER_SEG) @(negedge clk);
    end
    check(active_cycles >= 2 * N * decisions && active_cycles <= 2 * N * (decisions + 2),
          $sformatf("clocked cycles %0d for %0d decisions", active_cycles, decisions));
    $display("decisions=%0d clocked=%0d cycles=%0d", decisions, active_cycles, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
