// Shared types and constants of the programmable clock generator.
//
// The generator multiplies the reference pulse rate by 8 by letting one
// pulse circulate 8 times through a delay line, then divides by 2/4/6/8.
// Its state machine passes through four states after reset: PVT
// compensation (one reference cycle), SAR control (binary search of the
// lock-in delay-line code) and Lock (tracking by +/-1 steps). The state
// names and the 6-bit code widths follow the source design; the binary
// encoding of the state is this design's own choice.
`timescale 1ns / 1ps
package clkgen_pkg;

  // Number of passes of one pulse through the delay line per reference cycle.
  localparam int unsigned CIRCULATIONS = 8;

  // Width of the lock-in delay-line code C[5:0] and PVT-comp. code D[5:0].
  localparam int unsigned CODE_W = 6;

  // Width of the PVT-comp. ring-oscillator counter, count[7:0].
  localparam int unsigned COUNT_W = 8;

  typedef enum logic [1:0] {
    ST_RESET = 2'd0,
    ST_PVT   = 2'd1,
    ST_SAR   = 2'd2,
    ST_LOCK  = 2'd3
  } clkgen_state_e;

endpackage
