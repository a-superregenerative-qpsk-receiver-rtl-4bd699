// Self-checking testbench of peak_finder (N = 20): random correlation
// sequences over k = 0 .. N-1, with ties, against the first maximum found
// here; results must hold between searches.
`timescale 1ns / 1ps
module tb_peak_finder;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first_k = 1'b0;
  logic [4:0] c = '0, k = '0, c_max, k_opt;
  always #20 clk = ~clk;

  peak_finder #(.N(N)) dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      int cs [N];
      int best, bk;
      for (int i = 0; i < N; i++) cs[i] = (s % 3 == 0) ? $urandom_range(6, 3) : $urandom_range(N, 0);
      best = -1; bk = 0;
      for (int i = 0; i < N; i++) if (cs[i] > best) begin best = cs[i]; bk = i; end
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        en = 1'b1; first_k = (i == 0); k = 5'(i); c = 5'(cs[i]);
      end
      @(negedge clk);
      en = 1'b0; first_k = 1'b0; c = 5'(N);
      check(int'(c_max) == best && int'(k_opt) == bk,
            $sformatf("c_max=%0d k_opt=%0d expected %0d %0d", c_max, k_opt, best, bk));
      repeat (2) @(negedge clk);
      check(int'(c_max) == best && int'(k_opt) == bk, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
