// Self-checking testbench of ber_serializer with a 100-cycle symbol period.
// It loads a random dibit every period, samples ber_data on every rising edge
// of ber_clk as a BER analyser would, and checks the bit order (MSB first),
// the bit period of SYMBOL_CYCLES/2 cycles and the clock's mid-bit edge.
`timescale 1ns / 1ps
module tb_ber_serializer;
  localparam int SYM = 100;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [1:0] dibit = '0;
  logic ber_clk, ber_data;
  always #20 clk = ~clk;

  ber_serializer #(.SYMBOL_CYCLES(SYM)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (SYM * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_q [$];
  int cyc = 0, last_edge = -1, edges = 0;
  logic ber_clk_d = 1'b0;
  int last_load = 0;

  always @(posedge clk) begin
    cyc++;
    ber_clk_d <= ber_clk;
    if (rst_n && ber_clk && !ber_clk_d) begin
      edges++;
      if (exp_q.size() == 0) check(1'b0, "unexpected bit");
      else check(ber_data == exp_q.pop_front(), $sformatf("bit %0d", edges));
      if (last_edge >= 0) check(cyc - last_edge == SYM / 2, $sformatf("bit period %0d", cyc - last_edge));
      else check(cyc - last_load == SYM / 4 + 2, $sformatf("first edge %0d", cyc - last_load));
      last_edge = cyc;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    check(!ber_clk, "clock idle after reset");
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      @(negedge clk);
      load = 1'b1; dibit = 2'($urandom);
      exp_q.push_back(dibit[1]);
      exp_q.push_back(dibit[0]);
      if (s == 0) last_load = cyc;
      @(negedge clk);
      load = 1'b0;
      repeat (SYM - 2) @(negedge clk);
    end
    repeat (SYM) @(negedge clk);
    check(edges == 400, $sformatf("edges %0d", edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
