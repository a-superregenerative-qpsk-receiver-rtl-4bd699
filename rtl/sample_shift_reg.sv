// N-bit sample shift register with the Sh/Ro input multiplexer.
//
// While en is high and sh_ro = 0 the register takes the one-bit oscillator
// output s(t) into the top stage Q[N-1] every clock and moves every stage
// down one place, so after N shifts Q[i] holds sample i (Q[0] the oldest).
// The top stage is the flip-flop that samples the oscillator. With en high
// and sh_ro = 1 the multiplexer feeds Q[0] back into Q[N-1], rotating the
// vector by one place per clock; after k rotations Q[j] holds sample
// (j+k) mod N, and after N rotations the vector is back where it started.
// With en low the register holds. The data path follows the published
// schematic; the clock enable replaces the gated clock drawn there, as the
// text says the real implementation is fully synchronous. No reset: every
// bit is written by the N shift cycles before it is read.
`timescale 1ns / 1ps
module sample_shift_reg #(
  parameter int unsigned N = 20
) (
  input  logic         clk,
  input  logic         en,       // clock enable: shift or rotate this cycle
  input  logic         sh_ro,    // 0: shift s(t) in, 1: rotate
  input  logic         s_in,     // oscillator output, one bit
  output logic [N-1:0] q         // current vector s_n
);

  logic d_top;

  always_comb d_top = sh_ro ? q[0] : s_in;

  always_ff @(posedge clk) begin
    if (en) q <= {d_top, q[N-1:1]};
  end

endmodule
