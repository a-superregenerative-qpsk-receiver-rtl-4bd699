// Self-checking testbench of qpsk_sequencer at its default sizes (N = 20,
// 2500 cycles per symbol, T1 = 1000). Over four quench periods it checks,
// cycle by cycle against its own cycle counter, the quench trigger, the N
// shift cycles, the N rotate cycles with k = 0 .. N-1, the single clk2 pulse,
// the quench period and that the register is clocked on 2N cycles per symbol.
`timescale 1ns / 1ps
module tb_qpsk_sequencer;
  localparam int N = 20, SYM = 2500, T1 = 1000, QP = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  logic quench_trig, shift_en, rot_en, sh_ro, first_k, load_prev;
  logic [4:0] k;

  qpsk_sequencer dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5 * SYM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t, active, last_q, periods;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    active = 0; last_q = -1; periods = 0;
    check(!quench_trig, "trigger low in reset");
    for (t = 0; t < 4 * SYM + 1; t++) begin
      int ph;
      ph = (t + SYM - 1) % SYM;
      check(quench_trig == (ph < QP), $sformatf("quench_trig at %0d", t));
      check(shift_en == (ph >= T1 && ph < T1 + N), $sformatf("shift_en at %0d", t));
      check(rot_en == (ph >= T1 + N && ph < T1 + 2 * N), $sformatf("rot_en at %0d", t));
      check(sh_ro == rot_en, "sh_ro");
      check(first_k == (ph == T1 + N), "first_k");
      if (rot_en) check(int'(k) == ph - T1 - N, $sformatf("k=%0d at %0d", k, ph));
      check(load_prev == (ph == T1 + 2 * N), $sformatf("load_prev at %0d", t));
      if (shift_en || rot_en) active++;
      if (quench_trig && ph == 0) begin
        if (last_q >= 0) check(t - last_q == SYM, "quench period");
        last_q = t;
        periods++;
      end
      @(negedge clk);
    end
    check(active == 4 * 2 * N, $sformatf("active cycles %0d", active));
    check(periods == 4, "four quench triggers");
    $display("clocked fraction: %0d of %0d cycles per symbol", active / 4, SYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
