// Serial clock and data output for a bit-error-rate analyser.
//
// Each decision (load) delivers one dibit per symbol period. The serializer
// sends its MSB during the first half of the symbol period and its LSB during
// the second half, so the bit rate is twice the symbol rate (20 kbit/s from
// 10 ksymbol/s). ber_clk is low for the first half of each bit and high for
// the second half, so its rising edge falls in the middle of the bit.
// The ber_clk/ber_data pair is the prototype's; the bit order and clock
// phase are this design's choices.
// Timing: ber_data changes to the new MSB one cycle after load. Loads are
// expected every SYMBOL_CYCLES cycles; the counter restarts on each load, and
// ber_clk stops after one symbol period without a load.
`timescale 1ns / 1ps
module ber_serializer #(
  parameter int unsigned SYMBOL_CYCLES = 2500,
  localparam int unsigned CW = $clog2(SYMBOL_CYCLES)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [1:0] dibit,
  output logic       ber_clk,
  output logic       ber_data
);

  localparam int unsigned BIT_CYCLES  = SYMBOL_CYCLES / 2;
  localparam int unsigned HALF_CYCLES = BIT_CYCLES / 2;

  logic [CW-1:0] cnt;
  logic [1:0]    hold;
  logic          running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      hold    <= 2'b00;
      running <= 1'b0;
    end else if (load) begin
      cnt     <= '0;
      hold    <= dibit;
      running <= 1'b1;
    end else if (running) begin
      if (cnt == CW'(SYMBOL_CYCLES - 1)) begin
        cnt     <= '0;
        running <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  logic          second;
  logic [CW-1:0] in_bit;

  always_comb begin
    second   = cnt >= CW'(BIT_CYCLES);
    in_bit   = second ? cnt - CW'(BIT_CYCLES) : cnt;
    ber_data = second ? hold[0] : hold[1];
    ber_clk  = running && in_bit >= CW'(HALF_CYCLES);
  end

endmodule
