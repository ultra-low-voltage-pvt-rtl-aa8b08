// Behavioural model of the PVT-compensation delay line, the coarse part of
// the clock generator's circulating path. Not synthesizable.
//
// It adds D * 32 FO2-NAND delays in front of the lock-in delay line, so
// that after the one-cycle PVT measurement the remaining delay the lock-in
// line must supply sits near the middle of its range. The step of 32
// FO2-NAND delays and the 6-bit code follow the source design; D = 0 adds
// no delay, as the compensation equation assumes.
//
// Interface: din, d_code[5:0] -> dout. Transport delay per pulse.
`timescale 1ns / 1ps
module pvt_comp_delay_line #(
  parameter real         D_NAND_NS = 0.068,
  parameter int unsigned STAGES_PER_STEP = 32
) (
  input  logic       din,
  input  logic [5:0] d_code,
  output logic       dout
);

  real delay_ns;

  always_comb
    delay_ns = real'(STAGES_PER_STEP * int'(d_code)) * D_NAND_NS;

  pulse_delay u_delay (
    .din      (din),
    .delay_ns (delay_ns),
    .dout     (dout)
  );

endmodule
