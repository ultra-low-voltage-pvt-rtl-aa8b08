// Thermally robust clock buffer: a tunable-width inverter whose width is
// set from the local temperature code through the width look-up table.
//
// The local sensor reports T[9:0]; the table returns B[7:0] = W1 * g(V,T);
// the inverter with that width has the same logical effort, and so nearly
// the same delay, at any temperature. The arrangement (sensor, table,
// tunable buffer beside each clock buffer) follows the source design; the
// sensor itself is outside this module and its code is an input.
//
// Interface: clk_in, t_code[9:0], comp_en, temp_c (real, the die
// temperature seen by the inverter model) -> clk_out (inverted clk_in),
// b_code[7:0] (width in use).
`timescale 1ns / 1ps
module thermal_robust_buffer
  import logical_effort_pkg::*;
#(
  parameter int unsigned VDD_MV   = 500,
  parameter int unsigned W1       = 128,
  parameter real         D_REF_NS = 1.9
) (
  input  logic               clk_in,
  input  logic [TCODE_W-1:0] t_code,
  input  logic               comp_en,
  input  real                temp_c,
  output logic               clk_out,
  output logic [7:0]         b_code
);

  width_lut #(.VDD_MV(VDD_MV), .W1(W1)) u_lut (
    .t_code  (t_code),
    .comp_en (comp_en),
    .b_code  (b_code)
  );

  tunable_width_inverter #(
    .VDD_MV   (VDD_MV),
    .W_REF    (W1),
    .D_REF_NS (D_REF_NS)
  ) u_inv (
    .in     (clk_in),
    .b      (b_code),
    .temp_c (temp_c),
    .out    (clk_out)
  );

endmodule
