// Behavioural model of the pulse generator (PG). Not synthesizable.
//
// In silicon a D flip-flop is set by the rising edge of v_in and cleared
// through a short delay line from its own output, which gives one pulse of
// fixed width per rising edge. The model produces the same: pulse goes high
// at each rising edge of v_in and falls PULSE_NS later. The width is this
// design's choice: it must stay below one pass through the circulating
// delay line (about an eighth of the reference period) and above the phase
// error of one lock-in step (16 FO2-NAND delays).
//
// Interface: v_in -> pulse.
`timescale 1ns / 1ps
module pulse_generator #(
  parameter real PULSE_NS = 2.0
) (
  input  logic v_in,
  output logic pulse
);

  initial pulse = 1'b0;

  always @(posedge v_in) begin
    pulse = 1'b1;
    #(PULSE_NS);
    pulse = 1'b0;
  end

endmodule
