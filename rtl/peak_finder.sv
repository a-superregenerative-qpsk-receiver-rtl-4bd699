// Running maximum of the correlation c(k) over the N rotations of a symbol.
//
// In the first rotate cycle (first_k) it takes c(0) and k = 0 as the best so
// far. In every later enabled cycle it replaces them when c(k) is strictly
// larger, so on a tie the smallest k wins (this tie rule is this design's
// choice). After the last rotation c_max and k_opt hold the result until the
// next symbol's first rotate cycle. Reset clears both.
`timescale 1ns / 1ps
module peak_finder #(
  parameter int unsigned N = 20,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned KW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,      // a rotate cycle: c and k are valid
  input  logic          first_k, // k = 0: restart the search
  input  logic [CW-1:0] c,
  input  logic [KW-1:0] k,
  output logic [CW-1:0] c_max,
  output logic [KW-1:0] k_opt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_max <= '0;
      k_opt <= '0;
    end else if (en && (first_k || c > c_max)) begin
      c_max <= c;
      k_opt <= k;
    end
  end

endmodule
