// Per-symbol sequencer of the superregenerative QPSK receiver.
//
// A counter runs over one quench period of SYMBOL_CYCLES clock cycles, one
// quench cycle per symbol. At count 0 it raises quench_trig for
// QUENCH_PULSE_CYCLES cycles; this triggers the external quench generator, so
// count 0 is the instant t = nT at which the oscillator turns unstable.
// T1_CYCLES later the pulse has grown large enough to be sampled, and the
// sequencer enables N shift cycles (sh_ro = 0), in which the sample register
// takes one bit of the oscillator output per clock, followed by N rotate
// cycles (sh_ro = 1), in which the register is rotated and the correlation
// c(k) is evaluated for k = 0 .. N-1. In the cycle after the last rotation
// load_prev (the "clk2" pulse of the timing diagram) copies the vector into
// the previous-vector register and the decision is taken.
//
// Timing, with T1 = T1_CYCLES and counts taken from the quench trigger:
//   shift_en         counts T1 .. T1+N-1
//   rot_en, k = 0..  counts T1+N .. T1+2N-1  (first_k at T1+N)
//   load_prev        count  T1+2N
// so the register is clocked on 2N of the SYMBOL_CYCLES cycles (40 of 2500,
// 1.6 %, in the prototype). The shift-then-rotate order, the 2N clocked
// cycles and clk2 follow the published timing diagram. The value of T1, the
// trigger pulse width and the reset state are this design's choices: reset
// holds the counter at the last count of a period, so the trigger stays low
// during reset and the first quench period starts one clock after release.
`timescale 1ns / 1ps
module qpsk_sequencer #(
  parameter int unsigned N                   = 20,
  parameter int unsigned SYMBOL_CYCLES       = 2500,
  parameter int unsigned T1_CYCLES           = 1000,
  parameter int unsigned QUENCH_PULSE_CYCLES = 4,
  localparam int unsigned CW = $clog2(SYMBOL_CYCLES),
  localparam int unsigned KW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          quench_trig, // trigger of the external quench generator
  output logic          shift_en,    // sample register shifts in s(t)
  output logic          rot_en,      // sample register rotates
  output logic          sh_ro,       // Sh/Ro select: 0 shift, 1 rotate
  output logic          first_k,     // first rotate cycle (k = 0)
  output logic [KW-1:0] k,           // current displacement during rot_en
  output logic          load_prev    // clk2: store vector, take decision
);

  initial begin
    if (T1_CYCLES < QUENCH_PULSE_CYCLES || T1_CYCLES + 2 * N >= SYMBOL_CYCLES)
      $error("qpsk_sequencer: sampling window does not fit in the quench period");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cnt <= CW'(SYMBOL_CYCLES - 1);
    else if (cnt == CW'(SYMBOL_CYCLES - 1)) cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end

  localparam logic [CW-1:0] T_SH  = CW'(T1_CYCLES);
  localparam logic [CW-1:0] T_RO  = CW'(T1_CYCLES + N);
  localparam logic [CW-1:0] T_END = CW'(T1_CYCLES + 2 * N);

  always_comb begin
    quench_trig = cnt < CW'(QUENCH_PULSE_CYCLES);
    shift_en    = cnt >= T_SH && cnt < T_RO;
    rot_en      = cnt >= T_RO && cnt < T_END;
    sh_ro       = rot_en;
    first_k     = cnt == T_RO;
    k           = rot_en ? KW'(cnt - T_RO) : '0;
    load_prev   = cnt == T_END;
  end

endmodule
