// Behavioural model of the tunable-width inverter used as clock buffer.
// Not synthesizable: a timing model of an analog-sized cell.
//
// In silicon the inverter has eight binary-weighted legs, 1X, 2X ... 128X,
// each enabled by one bit of B[7:0], so the total width is the value of B
// (1X to 255X). Logical effort is inversely proportional to width, and it
// also varies with temperature and supply; the model therefore delays each
// edge by
//   P_NS + D_REF_NS * g(V, temp_c) * W_REF / B,
// where g is the unified logical effort (1 at 25 C; near- or
// sub-threshold fit according to VDD_MV) and
// D_REF_NS is the effort delay of a W_REF-wide inverter with the buffer's
// load at 25 C. With B = 0 no leg drives and the output holds. The leg
// structure follows the source design; the delay law is its logical-effort
// delay equation. D_REF_NS = 1.9 ns is this design's choice, made so that
// three uncompensated buffers at -25 C against three at 125 C give about
// the 3 ns of skew reported for the 0.5 V H-tree. At 0.3 V with
// W_REF = 64 the same fit gives D_REF_NS = 34.7 ns (about 220 ns of skew).
//
// Interface: in, b[7:0], temp_c (real, the local die temperature, an
// environmental input rather than a pin) -> out = ~in after the delay.
`timescale 1ns / 1ps
module tunable_width_inverter
  import logical_effort_pkg::*;
#(
  parameter int unsigned VDD_MV   = 500,
  parameter int unsigned W_REF    = 128,
  parameter real         D_REF_NS = 1.9,
  parameter real         P_NS     = 0.1
) (
  input  logic       in,
  input  logic [7:0] b,
  input  real        temp_c,
  output logic       out
);

  initial out = 1'b1;

  real d_ns;

  always_comb
    d_ns = P_NS + D_REF_NS * logical_effort(real'(VDD_MV) / 1000.0, temp_c)
                * real'(W_REF) / real'((b == 8'd0) ? 8'd1 : b);

  // Transport delay: each input edge is scheduled with the delay in force
  // when it arrives.
  always @(in) begin
    if (b != 8'd0) begin
      fork
        begin : drive_edge
          automatic real  d = d_ns;
          automatic logic v = ~in;
          #(d);
          out = v;
        end
      join_none
    end
  end

endmodule
