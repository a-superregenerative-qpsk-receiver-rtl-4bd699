// Self-checking testbench of prev_vector_reg (N = 20): reset state, valid
// after the first load, capture on load and hold otherwise.
`timescale 1ns / 1ps
module tb_prev_vector_reg;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, valid;
  logic [N-1:0] d = '0, q, model;
  always #20 clk = ~clk;

  prev_vector_reg #(.N(N)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(q == '0 && !valid, "reset state");
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = ($urandom_range(3, 0) == 0);
      d = N'($urandom);
      if (i < 5) load = 1'b0;
      @(posedge clk);
      if (load) model = d;
      #1;
      check(q == model, $sformatf("q=%h expected %h", q, model));
      if (i < 5) check(!valid, "valid before first load");
    end
    check(valid, "valid after loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
