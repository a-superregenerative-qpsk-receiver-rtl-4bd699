// Similarity of two N-bit sample vectors: c = sum(a XNOR b), the number of
// positions in which they agree (0 .. N).
//
// Purely combinational, as in the prototype: one XNOR per bit and a
// population count. The count is written as a loop of additions and left to
// synthesis to build as an adder tree.
`timescale 1ns / 1ps
module xnor_correlator #(
  parameter int unsigned N = 20,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  a,  // rotated current vector rot^k(s_n)
  input  logic [N-1:0]  b,  // previous vector s_(n-1)
  output logic [CW-1:0] c
);

  logic [N-1:0] agree;

  always_comb begin
    agree = ~(a ^ b);
    c = '0;
    for (int i = 0; i < N; i++) c = c + CW'(agree[i]);
  end

endmodule
