// Circulation counter of the clock generator.
//
// Counts the pulses that leave the delay line (P_OUT) since the last
// reference pulse and raises count_e8 once the 8th has arrived. The phase
// detector uses count_e8 to pick out the 8th pulse, and in the Lock state
// the SEL generator uses it to stop a 9th pass. The counter stops at 8 and
// is held at zero while the reference pulse P_REF is high. Counting to 8
// and the countE8 flag follow the source design; clearing on P_REF and
// stopping at 8 are this design's choices.
//
// Interface: p_out (clock), p_ref (asynchronous clear, active high) ->
// count_e8. count_e8 rises just after the rising edge of the 8th P_OUT
// pulse, while that pulse is still high.
`timescale 1ns / 1ps
module circulation_counter
  import clkgen_pkg::*;
(
  input  logic p_out,
  input  logic p_ref,
  output logic count_e8
);

  logic [3:0] cnt;

  always_ff @(posedge p_out or posedge p_ref) begin
    if (p_ref)
      cnt <= '0;
    else if (cnt != 4'(CIRCULATIONS))
      cnt <= cnt + 1'b1;
  end

  assign count_e8 = (cnt == 4'(CIRCULATIONS));

endmodule
