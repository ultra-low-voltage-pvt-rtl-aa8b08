// Buffered clock H-tree with thermally robust buffers.
//
// Four levels of buffers, 1 + 2 + 4 + 8 = 15 in all, each with its own
// temperature code. Buffer 0 is the clock source at the centre; it drives
// the 10 mm horizontal trunk ending in buffers 1 (left) and 2 (right).
// Each of those drives a 10 mm vertical branch ending in buffers 3/4
// (left, top/bottom) and 5/6 (right, top/bottom). Each of those drives a
// 5 mm horizontal branch ending in two leaf buffers:
//   leaf[0..1] from 3, leaf[2..3] from 4, leaf[4..5] from 5, leaf[6..7] from 6.
// leaf[1] (right end of the top-left H) and leaf[4] (left end of the
// top-right H) are the physically close pair A and B whose skew the source
// design measures. Every buffer inverts; with four levels the leaves are
// in phase with the source. The wires are taken as temperature-independent
// and identical by symmetry, so they are not modelled: at ultra-low supply
// the buffers dominate the delay. Topology and segment lengths follow the
// source design; the buffer numbering is this design's own.
//
// Interface: clk_src, t_code[15] (sensor codes), temp_c[15] (die
// temperature at each buffer, for the buffer model), comp_en -> leaf[8],
// b_code[15] (width code of each buffer).
`timescale 1ns / 1ps
module h_tree
  import logical_effort_pkg::*;
#(
  parameter int unsigned VDD_MV   = 500,
  parameter int unsigned W1       = 128,
  parameter real         D_REF_NS = 1.9
) (
  input  logic               clk_src,
  input  logic [TCODE_W-1:0] t_code [15],
  input  real                temp_c [15],
  input  logic               comp_en,
  output logic [7:0]         leaf,
  output logic [7:0]         b_code [15]
);

  localparam int unsigned N_BUF = 15;

  logic [N_BUF-1:0] buf_in;
  logic [N_BUF-1:0] buf_out;

  // Heap numbering inside the tree: buffer i feeds buffers 2i+1 and 2i+2.
  assign buf_in[0] = clk_src;
  for (genvar i = 1; i < N_BUF; i++) begin : g_wire
    assign buf_in[i] = buf_out[(i - 1) / 2];
  end

  for (genvar i = 0; i < N_BUF; i++) begin : g_buf
    thermal_robust_buffer #(
      .VDD_MV   (VDD_MV),
      .W1       (W1),
      .D_REF_NS (D_REF_NS)
    ) u_buf (
      .clk_in  (buf_in[i]),
      .t_code  (t_code[i]),
      .comp_en (comp_en),
      .temp_c  (temp_c[i]),
      .clk_out (buf_out[i]),
      .b_code  (b_code[i])
    );
  end

  assign leaf = buf_out[N_BUF-1:N_BUF-8];

endmodule
