// Behavioural model of the lock-in delay line (LIDL), the fine, tunable
// part of the clock generator's circulating path. Not synthesizable.
//
// The LIDL is a nested lattice of FO2-NAND stages with 14-stage NAND block
// delays. Its locking range is 4 to 130 FO2-NAND delays; this model spreads
// that range evenly over the 64 codes of C[5:0]:
//   delay = (4 + 2*C) * D_NAND_NS.
// The linear code-to-delay law is this design's reading (the range and the
// code width come from the source design, the spacing does not).
// D_NAND_NS is the FO2-NAND delay at the operating point; 0.068 ns matches
// an 11-stage FO2-NAND ring-oscillator period of about 1.5 ns at 0.5 V.
//
// Interface: din, c_code[5:0] -> dout. Transport delay per pulse, see
// pulse_delay.
`timescale 1ns / 1ps
module lock_in_delay_line #(
  parameter real         D_NAND_NS = 0.068,
  parameter int unsigned MIN_STAGES = 4,
  parameter int unsigned STAGES_PER_CODE = 2
) (
  input  logic       din,
  input  logic [5:0] c_code,
  output logic       dout
);

  real delay_ns;

  always_comb
    delay_ns = real'(MIN_STAGES + STAGES_PER_CODE * int'(c_code)) * D_NAND_NS;

  pulse_delay u_delay (
    .din      (din),
    .delay_ns (delay_ns),
    .dout     (dout)
  );

endmodule
