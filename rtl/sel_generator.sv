// SEL generator: chooses what enters the delay line, the reference pulse
// (SEL = 1) or the circulating pulse P_OUT (SEL = 0).
//
// In the SAR state a flip-flop clocked on the falling edge of P_REF feeds
// back its inverted output, so SEL toggles once per reference pulse: one
// reference pulse enters, circulates for a whole reference cycle and is
// compared with the next reference pulse, then the path is cleared for a
// cycle. Outside SAR the flip-flop's input is held at 1. In the Lock state
// SEL is instead P_REF OR count_e8: each reference pulse enters, and the
// 8th circulated pulse closes the path so that no 9th pass starts early.
// The structure follows the source design's schematic; the asynchronous
// reset (to 1) is this design's choice.
//
// Interface: p_ref, count_e8, state, rst_n -> sel.
`timescale 1ns / 1ps
module sel_generator
  import clkgen_pkg::*;
(
  input  logic          p_ref,
  input  logic          count_e8,
  input  clkgen_state_e state,
  input  logic          rst_n,
  output logic          sel
);

  logic q;

  always_ff @(negedge p_ref or negedge rst_n) begin
    if (!rst_n) q <= 1'b1;
    else        q <= ~(q & (state == ST_SAR));
  end

  assign sel = (state == ST_LOCK) ? (p_ref | count_e8) : q;

endmodule
