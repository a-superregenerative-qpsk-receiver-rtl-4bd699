// Previous-vector register s_(n-1) of the correlator.
//
// On load (the clk2 pulse after the N rotations) it copies the sample vector
// of the current pulse, which the rotations have brought back to its original
// order, and holds it as the reference for the next pulse. valid goes high
// after the first load, so that the first decision after reset, which has no
// reference pulse, can be discarded. The register itself is the one in the
// published schematic; the valid flag and the reset are this design's own.
`timescale 1ns / 1ps
module prev_vector_reg #(
  parameter int unsigned N = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (load) begin
      q     <= d;
      valid <= 1'b1;
    end
  end

endmodule
