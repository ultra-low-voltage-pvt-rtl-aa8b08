// Programmable clock generator for sub/near-threshold DVFS: output clock at
// M/N times the reference, M in {1, 8}, N in {2, 4, 6, 8}, selected by
// FS[2:0] (f_out/f_ref from 1/8 to 4).
//
// The reference clock is turned into pulses (P_REF). Instead of a
// multi-tap DLL, one reference pulse circulates 8 times through a single
// delay line, so every output pulse sees the same gates and the process
// mismatch between taps disappears. The line is a PVT-comp. line (coarse,
// code D, set once from a one-cycle ring-oscillator measurement) followed
// by the lock-in line (fine, code C, set by binary search and then
// tracked). When 8 passes take exactly one reference period, P_OUT carries
// 8 evenly spaced pulses per reference cycle. FS[2] picks P_REF (M = 1) or
// P_OUT (M = 8) as the divider input P_DIV; FS[1:0] picks N:
//   FS = 000 -> 1/8, 001 -> 1/6, 010 -> 1/4, 011 -> 1/2,
//        100 -> 1,   101 -> 4/3, 110 -> 2,   111 -> 4.
// Block structure and table follow the source design. The order of the two
// delay lines, the controller running on the falling reference edge, and
// the P_DIV multiplexer are this design's reading of it. The pulse
// generator, the ring oscillator and both delay lines are behavioural
// timing models, so this module simulates but does not synthesize as a
// whole; everything else in it is synthesizable logic.
//
// Interface: clk_ref, rst_n (asynchronous, active low), fs[2:0] ->
// clk_out, plus observation outputs. Lock is reached 14 reference cycles
// after reset (1 reset, 1 PVT, 12 SAR); the output is valid from then on.
`timescale 1ns / 1ps
module programmable_clock_generator
  import clkgen_pkg::*;
#(
  parameter real D_NAND_NS = 0.068,  // FO2-NAND delay at the operating point
  parameter real PULSE_NS  = 2.0     // width of the reference pulses
) (
  input  logic               clk_ref,
  input  logic               rst_n,
  input  logic [2:0]         fs,
  output logic               clk_out,
  output logic               p_ref,
  output logic               p_out,
  output clkgen_state_e      state,
  output logic               locked,
  output logic [CODE_W-1:0]  c_code,
  output logic [CODE_W-1:0]  d_code,
  output logic [COUNT_W-1:0] pvt_count,
  output logic               lead,
  output logic               lag
);

  logic ctrl_clk;
  logic osc_en, osc;
  logic rst_pd_n;
  logic sel, count_e8;
  logic line_in, line_mid;
  logic p_div;

  assign ctrl_clk = ~clk_ref;

  pulse_generator #(.PULSE_NS(PULSE_NS)) u_pg (
    .v_in  (clk_ref),
    .pulse (p_ref)
  );

  clkgen_controller u_ctrl (
    .clk      (ctrl_clk),
    .rst_n    (rst_n),
    .lead     (lead),
    .lag      (lag),
    .state    (state),
    .c_code   (c_code),
    .osc_en   (osc_en),
    .rst_pd_n (rst_pd_n),
    .locked   (locked)
  );

  pvt_ring_oscillator #(.D_NAND_NS(D_NAND_NS)) u_ring (
    .sw  (osc_en),
    .osc (osc)
  );

  pvt_comp u_pvt (
    .osc    (osc),
    .en     (osc_en),
    .rst_n  (rst_n),
    .count  (pvt_count),
    .d_code (d_code)
  );

  sel_generator u_sel (
    .p_ref    (p_ref),
    .count_e8 (count_e8),
    .state    (state),
    .rst_n    (rst_n),
    .sel      (sel)
  );

  // Path selection: a new reference pulse, or the circulating one.
  assign line_in = sel ? p_ref : p_out;

  pvt_comp_delay_line #(.D_NAND_NS(D_NAND_NS)) u_pvt_line (
    .din    (line_in),
    .d_code (d_code),
    .dout   (line_mid)
  );

  lock_in_delay_line #(.D_NAND_NS(D_NAND_NS)) u_lidl (
    .din    (line_mid),
    .c_code (c_code),
    .dout   (p_out)
  );

  circulation_counter u_cnt (
    .p_out    (p_out),
    .p_ref    (p_ref),
    .count_e8 (count_e8)
  );

  phase_detector u_pd (
    .p_ref    (p_ref),
    .p_out    (p_out),
    .count_e8 (count_e8),
    .rst_pd_n (rst_pd_n),
    .lead     (lead),
    .lag      (lag)
  );

  assign p_div = fs[2] ? p_out : p_ref;

  frequency_divider u_div (
    .p_div   (p_div),
    .fs      (fs[1:0]),
    .rst_n   (rst_n),
    .clk_out (clk_out)
  );

endmodule
