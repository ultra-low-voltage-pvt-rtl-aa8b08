// Ultra-low-voltage clock system: programmable clock generator feeding a
// thermally robust buffered H-tree.
//
// The generator turns the reference clock into an output clock at 1/8 to
// 4 times its frequency (FS[2:0]) and compensates its delay line for
// process, voltage and temperature before locking. Its output is the clock
// source of the H-tree, whose 15 buffers are each resized from a local
// temperature code so that their delay, and hence the skew between end
// points in differently heated parts of the die, stays nearly constant.
// Pairing the two follows the source design. The temperature sensors are
// not part of this RTL: their codes are inputs, and so is the die
// temperature at each buffer, which only the buffer timing model uses.
//
// Interface: clk_ref, rst_n, fs[2:0], t_code[15], temp_c[15], comp_en ->
// clk_leaf[8] (clock at the H-tree end points), clk_gen (generator
// output before the tree), locked, state, c_code, d_code, b_code[15].
// The generator's internal observation outputs (P_REF, P_OUT, LEAD, LAG,
// the PVT count) are not brought out at this level; the lint tool reports
// them as unused on purpose.
// Defaults: 0.5 V operating point (FO2-NAND delay 0.068 ns, buffer
// reference width 128X), for a 5 MHz reference. The 0.3 V tree is
// VDD_MV = 300, W1 = 64, D_REF_NS = 34.7.
`timescale 1ns / 1ps
module clock_system_top
  import clkgen_pkg::*;
  import logical_effort_pkg::*;
#(
  parameter real         D_NAND_NS = 0.068,
  parameter real         PULSE_NS  = 2.0,
  parameter int unsigned VDD_MV    = 500,
  parameter int unsigned W1        = 128,
  parameter real         D_REF_NS  = 1.9
) (
  input  logic               clk_ref,
  input  logic               rst_n,
  input  logic [2:0]         fs,
  input  logic [TCODE_W-1:0] t_code [15],
  input  real                temp_c [15],
  input  logic               comp_en,
  output logic [7:0]         clk_leaf,
  output logic               clk_gen,
  output logic               locked,
  output clkgen_state_e      state,
  output logic [CODE_W-1:0]  c_code,
  output logic [CODE_W-1:0]  d_code,
  output logic [7:0]         b_code [15]
);

  logic               p_ref, p_out, lead, lag;
  logic [COUNT_W-1:0] pvt_count;

  programmable_clock_generator #(
    .D_NAND_NS (D_NAND_NS),
    .PULSE_NS  (PULSE_NS)
  ) u_clkgen (
    .clk_ref   (clk_ref),
    .rst_n     (rst_n),
    .fs        (fs),
    .clk_out   (clk_gen),
    .p_ref     (p_ref),
    .p_out     (p_out),
    .state     (state),
    .locked    (locked),
    .c_code    (c_code),
    .d_code    (d_code),
    .pvt_count (pvt_count),
    .lead      (lead),
    .lag       (lag)
  );

  h_tree #(
    .VDD_MV   (VDD_MV),
    .W1       (W1),
    .D_REF_NS (D_REF_NS)
  ) u_tree (
    .clk_src (clk_gen),
    .t_code  (t_code),
    .temp_c  (temp_c),
    .comp_en (comp_en),
    .leaf    (clk_leaf),
    .b_code  (b_code)
  );

endmodule
