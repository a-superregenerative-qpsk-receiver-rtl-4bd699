// Self-checking testbench of pwm_gen (8 bits): for several duty words it
// counts the high cycles over whole 256-cycle periods and checks them
// against the duty word, including 0 % and the largest duty.
`timescale 1ns / 1ps
module tb_pwm_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, pwm;
  logic [7:0] duty = '0;
  always #20 clk = ~clk;

  pwm_gen #(.WIDTH(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int duties [8];
    duties = '{0, 1, 64, 128, 200, 255, 17, 3};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (duties[i]) begin
      int high;
      @(negedge clk);
      duty = 8'(duties[i]);
      repeat (256) @(negedge clk);
      high = 0;
      repeat (2 * 256) begin
        @(negedge clk);
        if (pwm) high++;
      end
      checks++;
      if (high != 2 * duties[i]) begin
        failures++;
        $display("FAIL: duty %0d high %0d of 512", duties[i], high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
