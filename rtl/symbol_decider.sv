// Symbol decision from the best displacement k_opt.
//
// With the sample register of this design (oldest sample in Q[0], rotation
// towards Q[0]) a phase advance of m steps of 2*pi/N between two pulses is
// matched at k_opt = (N - m) mod N. The decider therefore forms
//   m   = (N - k_opt - phase_comp) mod N,
// where phase_comp (in steps of 2*pi/N) removes a fixed phase term (when the symbol period is not a
// whole number of carrier periods; 0 otherwise). The N possible phase changes
// are split into four decision regions of N/4 steps, centred on 0, pi/2, pi
// and 3*pi/2. The region gives the quadrant and hence the dibit; the position
// inside the region gives the offset
//   d in -(N-4)/8 .. +(N-4)/8    (-2 .. +2 for N = 20)
// from the ideal phase, which measures decision quality and, averaged,
// frequency displacement. led_d is d one-hot, led_d[0] for the most negative
// offset, to drive the indicator LEDs and the analog averaging network.
// The regions and the offset range follow the published constellation for
// N = 20; the direction convention of m, the Gray dibit mapping and the
// phase_comp input are this design's choices.
// Timing: outputs are registered; sym_valid pulses one cycle after decide.
`timescale 1ns / 1ps
module symbol_decider
  import sr_qpsk_pkg::*;
#(
  parameter int unsigned N = 20,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned KW = $clog2(N),
  localparam int unsigned QN = N / 4,          // steps per decision region
  localparam int unsigned H  = (QN - 1) / 2,   // largest |d|
  localparam int unsigned DW = $clog2(H + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 decide,
  input  logic [KW-1:0]        k_opt,
  input  logic [CW-1:0]        c_max_in,
  input  logic [KW-1:0]        phase_comp,
  output logic                 sym_valid,
  output quadrant_e            quad,
  output logic [1:0]           dibit,
  output logic signed [DW-1:0] d,
  output logic [QN-1:0]        led_d,
  output logic [CW-1:0]        c_max
);

  initial begin
    if (N % 8 != 4) $error("symbol_decider: N must be an odd multiple of 4");
  end

  // All values below are < 2N, so KW+2 bits suffice; the modulo and the
  // division by N/4 are done with compares and subtractions.
  localparam int unsigned AW = KW + 2;

  logic [AW-1:0] t, m, idx, pos;
  logic [1:0]    region;

  always_comb begin
    t = AW'(2 * N) - AW'(k_opt) - AW'(phase_comp);   // 2 .. 2N
    m = t;
    if (m >= AW'(N)) m = m - AW'(N);
    if (m >= AW'(N)) m = m - AW'(N);                 // (N - k - pc) mod N
    idx = m + AW'(H);
    if (idx >= AW'(N)) idx = idx - AW'(N);           // shift by half a region
    if      (idx >= AW'(3 * QN)) region = 2'd3;
    else if (idx >= AW'(2 * QN)) region = 2'd2;
    else if (idx >= AW'(QN))     region = 2'd1;
    else                         region = 2'd0;
    pos = idx - AW'(region) * AW'(QN);               // 0 .. QN-1
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      quad      <= QUAD_0;
      dibit     <= 2'b00;
      d         <= '0;
      led_d     <= '0;
      c_max     <= '0;
    end else begin
      sym_valid <= decide;
      if (decide) begin
        quad  <= quadrant_e'(region);
        dibit <= quad_to_dibit(quadrant_e'(region));
        d     <= DW'(signed'({1'b0, pos}) - signed'(AW'(H)));
        led_d <= QN'(1) << pos;
        c_max <= c_max_in;
      end
    end
  end

endmodule
