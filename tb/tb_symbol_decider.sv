// Self-checking testbench of symbol_decider (N = 20). For every k_opt and a
// set of phase_comp values it derives the phase advance m, finds the nearest
// of the four ideal phase changes 0, 5, 10, 15 (in steps of 2*pi/20) by
// circular distance, and checks quadrant, Gray dibit, offset d, the one-hot
// LEDs, the c_max pass-through and the one-cycle sym_valid latency.
`timescale 1ns / 1ps
module tb_symbol_decider;
  import sr_qpsk_pkg::*;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, decide = 1'b0;
  logic [4:0] k_opt = '0, c_max_in = '0, phase_comp = '0, c_max;
  logic sym_valid;
  quadrant_e quad;
  logic [1:0] dibit;
  logic signed [2:0] d;
  logic [4:0] led_d;
  always #20 clk = ~clk;

  symbol_decider #(.N(N)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_d [5];
    logic [1:0] gray [4];
    gray = '{2'b00, 2'b01, 2'b11, 2'b10};
    seen_d = '{0, 0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (gray[pc]) begin
      for (int kk = 0; kk < N; kk++) begin
        int m, bestq, bestdist, dst, signed_off, pcv;
        pcv = (pc == 0) ? 0 : (pc == 1) ? 1 : (pc == 2) ? 19 : 7;
        m = (2 * N - kk - pcv) % N;
        bestdist = 99; bestq = 0; signed_off = 0;
        for (int q = 0; q < 4; q++) begin
          int diff;
          diff = m - 5 * q;
          if (diff > N / 2) diff -= N;
          if (diff < -N / 2) diff += N;
          dst = diff < 0 ? -diff : diff;
          if (dst < bestdist) begin bestdist = dst; bestq = q; signed_off = diff; end
        end
        @(negedge clk);
        decide = 1'b1; k_opt = 5'(kk); phase_comp = 5'(pcv); c_max_in = 5'($urandom_range(N, 0));
        @(negedge clk);
        decide = 1'b0;
        check(sym_valid, "sym_valid one cycle after decide");
        check(int'(quad) == bestq, $sformatf("k=%0d pc=%0d quad=%0d expected %0d", kk, pcv, quad, bestq));
        check(dibit == gray[bestq], "dibit");
        check(int'(d) == signed_off, $sformatf("k=%0d d=%0d expected %0d", kk, d, signed_off));
        check(led_d == 5'(1 << (signed_off + 2)), "led one-hot");
        check(c_max == c_max_in, "c_max");
        seen_d[signed_off + 2]++;
        @(negedge clk);
        check(!sym_valid, "sym_valid single pulse");
      end
    end
    foreach (seen_d[i]) check(seen_d[i] > 0, "every offset value produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
