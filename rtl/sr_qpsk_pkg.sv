// Shared constants, types and helper functions of the superregenerative QPSK
// receiver.
//
// The receiver takes N one-bit samples of every RF pulse of the
// superregenerative oscillator (SRO). It correlates them against the samples
// of the previous pulse at every circular displacement k. The displacement
// with the highest correlation gives the phase change between the two pulses
// in steps of 2*pi/N. N = 20 and the 25 MHz clock with 2500 cycles per symbol
// (10 ksymbol/s) are the prototype's figures. The dibit encoding of the four
// phase changes is this design's own choice: Gray order, with
// 0 -> 00, pi/2 -> 01, pi -> 11 and 3*pi/2 -> 10.
`timescale 1ns / 1ps
package sr_qpsk_pkg;

  // Phase-change quadrant, in units of pi/2.
  typedef enum logic [1:0] {
    QUAD_0   = 2'd0,
    QUAD_90  = 2'd1,
    QUAD_180 = 2'd2,
    QUAD_270 = 2'd3
  } quadrant_e;

  // Gray mapping from quadrant to the two transmitted bits (MSB sent first).
  function automatic logic [1:0] quad_to_dibit(quadrant_e q);
    unique case (q)
      QUAD_0:   return 2'b00;
      QUAD_90:  return 2'b01;
      QUAD_180: return 2'b11;
      default:  return 2'b10;
    endcase
  endfunction

endpackage
