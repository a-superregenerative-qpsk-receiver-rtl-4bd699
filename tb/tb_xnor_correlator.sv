// Self-checking testbench of xnor_correlator (N = 20): random and corner
// vector pairs, agreement counted here bit by bit.
`timescale 1ns / 1ps
module tb_xnor_correlator;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b;
  logic [4:0] c;

  xnor_correlator #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int expc;
      a = N'($urandom);
      b = N'($urandom);
      if (i == 0) begin a = '0; b = '0; end
      if (i == 1) begin a = '1; b = '0; end
      if (i == 2) begin a = 20'h0F0F0; b = a; end
      #1;
      expc = 0;
      for (int j = 0; j < N; j++) if (a[j] == b[j]) expc++;
      checks++;
      if (int'(c) != expc) begin
        failures++;
        $display("FAIL: a=%h b=%h c=%0d expected %0d", a, b, c, expc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
