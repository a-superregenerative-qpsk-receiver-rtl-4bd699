// Self-checking testbench of sample_shift_reg (N = 20). It shifts in random
// vectors, checks the sample order (first sample in Q[0]), rotates k times
// for several k and compares with a circular rotation computed here, checks
// that N rotations restore the vector and that the register holds when not
// enabled.
`timescale 1ns / 1ps
module tb_sample_shift_reg;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic en = 1'b0, sh_ro = 1'b0, s_in = 1'b0;
  logic [N-1:0] q;

  sample_shift_reg #(.N(N)) dut (.*);

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

  logic [N-1:0] v, exp_v;
  initial begin
    for (int trial = 0; trial < 40; trial++) begin
      int kr;
      v = N'({$urandom, $urandom});
      for (int i = 0; i < N; i++) begin
        @(negedge clk); en = 1'b1; sh_ro = 1'b0; s_in = v[i];
      end
      @(negedge clk); en = 1'b0; s_in = ~s_in;
      check(q == v, $sformatf("after shift: %h expected %h", q, v));
      repeat (3) @(negedge clk);
      check(q == v, "hold");
      kr = $urandom_range(N, 1);
      for (int r = 0; r < kr; r++) begin
        @(negedge clk); en = 1'b1; sh_ro = 1'b1; s_in = $urandom;
      end
      @(negedge clk); en = 1'b0;
      for (int j = 0; j < N; j++) exp_v[j] = v[(j + kr) % N];
      check(q == exp_v, $sformatf("rot %0d: %h expected %h", kr, q, exp_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
