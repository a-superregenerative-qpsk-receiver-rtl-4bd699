// End-to-end testbench of the superregenerative QPSK receiver at its default
// sizes (N = 20, 25 MHz clock, 2500 cycles per symbol).
//
// A PN9 sequence (x^9 + x^5 + 1) is sent two bits per symbol as differential
// QPSK: each Gray-coded dibit advances the carrier phase by 0, pi/2, pi or
// 3*pi/2. The oscillator model turns the phase into one RF pulse per quench
// trigger. The testbench checks every decided dibit against the sent one,
// re-reads the serial ber_clk / ber_data output as a BER analyser does, and
// checks the decision latency and the 2N clocked cycles per symbol. It runs
// seven segments:
//   1. nominal carrier            : d = 0, c_max = N
//   2. carrier +500 Hz (= f_sym/N): d = +1 every symbol, c_plus rises
//   3. same, with phase_comp = 1  : fixed phase term removed, d = 0
//   4. carrier -1000 Hz           : d = -2, c_minus rises
//   5. carrier +1000 Hz           : d = +2
//   6. nominal carrier, 2 % sample errors: c_max below N, at most two of 60
//      symbols wrong
//   7. carrier -500 Hz            : d = -1
// and counts how often each mechanism occurred: every quadrant decided, every
// offset value, phase compensation, reduced correlation, both PWM outputs.
`timescale 1ns / 1ps
module tb_sr_qpsk_rx;
  localparam int N = 20, SYM = 2500, T1 = 1000;
  localparam real PI = 3.141592653589793;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  logic s_in, quench_trig, v_tune_pwm, q_dc_pwm, sym_valid, sampling_active;
  logic ber_clk, ber_data;
  logic [7:0] tune_duty = 8'd100, qdc_duty = 8'd30;
  logic [4:0] phase_comp = '0, c_max, k_opt, led_d;
  logic [1:0] dibit, quad;
  logic signed [2:0] d;
  real c_plus, c_minus;

  sr_qpsk_rx dut (.*);

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

  localparam int SEGS = 7, SYMS_PER_SEG = 60;

  initial begin
    repeat ((SEGS * SYMS_PER_SEG + 10) * SYM) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PN9 source, two bits per symbol.
  logic [8:0] pn = 9'h1FF;
  function automatic bit pn9_next();
    bit b;
    b = pn[8] ^ pn[4];
    pn = {pn[7:0], b};
    return b;
  endfunction

  int  seg = 0;
  int  cyc = 0, last_quench = 0, active_cycles = 0;
  logic [1:0] sent_q [$];
  bit  ber_q [$];
  int  quad_seen [4], d_seen [5];
  int  comp_used = 0, low_corr = 0, decisions = 0, ber_bits = 0;
  int  pwm_tune_hi = 0, pwm_qdc_hi = 0, noise_errors = 0;
  logic quench_d = 1'b0, ber_clk_d = 1'b0;

  initial begin
    quad_seen = '{0, 0, 0, 0};
    d_seen = '{0, 0, 0, 0, 0};
  end

  // Transmitter: a new symbol before each quench trigger.
  always @(posedge clk) begin
    cyc++;
    quench_d <= quench_trig;
    if (v_tune_pwm) pwm_tune_hi++;
    if (q_dc_pwm) pwm_qdc_hi++;
    if (sampling_active) active_cycles++;
    if (rst_n && quench_trig && !quench_d) last_quench = cyc;
  end

  // Pick the next phase half a symbol before each quench.
  always @(posedge clk) begin
    if (rst_n && (cyc % SYM) == SYM / 2) begin
      logic [1:0] db;
      int q;
      db = {pn9_next(), pn9_next()};
      q = (db == 2'b00) ? 0 : (db == 2'b01) ? 1 : (db == 2'b11) ? 2 : 3;
      phi_tx = phi_tx + q * PI / 2.0;
      if (phi_tx > 2.0 * PI) phi_tx = phi_tx - 2.0 * PI;
      sent_q.push_back(db);
    end
  end

  // Receiver outputs.
  always @(posedge clk) begin
    ber_clk_d <= ber_clk;
    if (rst_n && ber_clk && !ber_clk_d) begin
      ber_bits++;
      if (ber_q.size() == 0) check(1'b0, "serial bit without decision");
      else check(ber_data == ber_q.pop_front(), "serial bit");
    end
    if (rst_n && sym_valid) begin
      logic [1:0] exp_db;
      decisions++;
      check(cyc - last_quench == T1 + 2 * N + 1,
            $sformatf("decision latency %0d", cyc - last_quench));
      if (sent_q.size() == 0) check(1'b0, "decision without symbol");
      else begin
        exp_db = sent_q.pop_front();
        // with sample errors a rare wrong decision is a bit error, not a fault
        if (seg == 5 && dibit != exp_db) noise_errors++;
        else check(dibit == exp_db, $sformatf("seg %0d dibit %b expected %b (k_opt %0d c_max %0d d %0d)",
                                              seg, dibit, exp_db, k_opt, c_max, d));
        ber_q.push_back(dibit[1]);
        ber_q.push_back(dibit[0]);
      end
      quad_seen[dibit == 2'b00 ? 0 : dibit == 2'b01 ? 1 : dibit == 2'b11 ? 2 : 3]++;
      d_seen[d + 2]++;
      check(led_d == 5'(1 << (d + 2)), "led one-hot");
      check(dibit == (quad == 2'd0 ? 2'b00 : quad == 2'd1 ? 2'b01 : quad == 2'd2 ? 2'b11 : 2'b10), "quadrant vs dibit");
      if (c_max < 5'(N)) low_corr++;
      if (phase_comp != 0) comp_used++;
      // skip the first decision of a segment: it spans the change
      if (decisions % SYMS_PER_SEG != 1) begin
        case (seg)
          0: check(d == 0 && c_max == 5'(N), $sformatf("seg0 d=%0d c_max=%0d", d, c_max));
          1: check(d == 1 && c_max == 5'(N), $sformatf("seg1 d=%0d", d));
          2: check(d == 0, $sformatf("seg2 d=%0d", d));
          3: check(d == -2, $sformatf("seg3 d=%0d", d));
          4: check(d == 2, $sformatf("seg4 d=%0d", d));
          6: check(d == -1, $sformatf("seg6 d=%0d", d));
          default: ;
        endcase
      end
    end
  end

  initial begin
    real cp_before, cm_before;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (seg = 0; seg < SEGS; seg++) begin
      case (seg)
        1: freq_offset_hz = 500.0;
        2: phase_comp = 5'd1;
        3: begin freq_offset_hz = -1000.0; phase_comp = '0; end
        4: freq_offset_hz = 1000.0;
        5: begin freq_offset_hz = 0.0; flip_per_mille = 20; end
        6: begin freq_offset_hz = -500.0; flip_per_mille = 0; end
        default: ;
      endcase
      cp_before = c_plus;
      cm_before = c_minus;
      while (decisions < (seg + 1) * SYMS_PER_SEG) @(negedge clk);
      if (seg == 1) check(c_plus > cp_before + 0.3, $sformatf("c_plus %f -> %f", cp_before, c_plus));
      if (seg == 3) check(c_minus > cm_before + 0.3, $sformatf("c_minus %f -> %f", cm_before, c_minus));
    end
    repeat (SYM) @(negedge clk);
    check(active_cycles >= 2 * N * decisions && active_cycles <= 2 * N * (decisions + 2),
          $sformatf("clocked cycles %0d for %0d decisions", active_cycles, decisions));
    check(ber_bits >= 2 * decisions - 2, $sformatf("serial bits %0d", ber_bits));
    foreach (quad_seen[i]) check(quad_seen[i] > 0, $sformatf("quadrant %0d never decided", i));
    foreach (d_seen[i]) check(d_seen[i] > 0, $sformatf("offset %0d never seen", i - 2));
    check(comp_used > 0, "phase compensation never used");
    check(low_corr > 0, "reduced correlation never seen");
    check(noise_errors <= 2, $sformatf("%0d symbol errors with 2 %% sample errors", noise_errors));
    check(pwm_tune_hi > 0 && pwm_qdc_hi > 0, "PWM outputs idle");
    $display("decisions=%0d serial_bits=%0d quadrants=%0d/%0d/%0d/%0d d(-2..2)=%0d/%0d/%0d/%0d/%0d comp=%0d low_corr=%0d",
             decisions, ber_bits, quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3],
             d_seen[0], d_seen[1], d_seen[2], d_seen[3], d_seen[4], comp_used, low_corr);
    $display("clock active %0d of %0d cycles", active_cycles, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
