// Behavioural model: delay element for the narrow pulses that circulate in
// the clock generator's delay lines. Not synthesizable; a timing model of a
// chain of NAND gates.
//
// Every pulse is delayed by the delay in force at its rising edge: the
// falling edge uses the same value, so a code change while a pulse is in
// flight can neither invert nor swallow it. A pulse narrower than
// MIN_PULSE_NS is absorbed, as a chain of real gates absorbs a glitch; this
// matters where the path-select multiplexer switches while a pulse is
// high. The delay must stay above MIN_PULSE_NS for that filter to act.
//
// Interface: din -> dout, delay_ns is a real input sampled at each rising
// edge of din. Timing is transport delay, one pulse at a time.
`timescale 1ns / 1ps
module pulse_delay #(
  parameter real MIN_PULSE_NS = 0.05
) (
  input  logic din,
  input  real  delay_ns,
  output logic dout
);

  real     d_cap;
  realtime t_rise;
  int      token;
  int      cancelled;

  initial begin
    dout      = 1'b0;
    token     = 0;
    cancelled = -1;
    d_cap     = 0.0;
    t_rise    = 0.0;
  end

  always @(posedge din) begin
    d_cap  = delay_ns;
    t_rise = $realtime;
    token  = token + 1;
    fork
      begin : launch_rise
        automatic int      my = token;
        automatic real     d  = d_cap;
        #(d);
        if (cancelled != my) dout = 1'b1;
      end
    join_none
  end

  always @(negedge din) begin
    if (($realtime - t_rise) < MIN_PULSE_NS && d_cap > MIN_PULSE_NS) begin
      cancelled = token;
    end else begin
      fork
        begin : launch_fall
          automatic real d = d_cap;
          #(d);
          dout = 1'b0;
        end
      join_none
    end
  end

endmodule
