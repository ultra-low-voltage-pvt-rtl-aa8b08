// Width look-up table of a thermally robust clock buffer: local
// temperature code T[9:0] in, width code B[7:0] of the tunable-width
// inverter out.
//
// The logical effort of a gate rises as it gets colder (near threshold) and
// falls as it gets hotter. Widening the inverter lowers its logical effort
// in proportion, so choosing W2 = W1 * g(V,T) keeps the effective logical
// effort, and hence the buffer delay, at its 25 C value. The table holds
// W2 for every code, computed at elaboration from the unified
// logical-effort model (logical_effort_pkg) at supply VDD_MV: the
// near-threshold fit from 0.33 V up, the sub-threshold fit below. Codes
// above 125 C read the 125 C entry, and widths are rounded and clipped to
// 1X..255X. With the default W1 = 128 at 0.5 V this gives about 215 at
// -50 C, 171 at -25 C, 128 at 25 C and 100 at 125 C; with W1 = 64 at
// 0.3 V it gives 159 at -25 C, 64 at 25 C and 24 at 125 C (and clips at
// 255 below about -40 C). When comp_en is low the table is bypassed and
// the width stays at W1, the uncompensated reference buffer.
// The rule and the reference widths (128X at 0.5 V, 64X at 0.3 V) follow
// the source design; the code format and the sub-threshold threshold
// voltage are this design's own (see logical_effort_pkg).
//
// Interface: t_code[9:0], comp_en -> b_code[7:0]. Purely combinational.
`timescale 1ns / 1ps
module width_lut
  import logical_effort_pkg::*;
#(
  parameter int unsigned VDD_MV = 500,  // supply voltage in mV
  parameter int unsigned W1     = 128   // reference width, unit sizes
) (
  input  logic [TCODE_W-1:0] t_code,
  input  logic               comp_en,
  output logic [7:0]         b_code
);

  localparam int unsigned DEPTH    = 1 << TCODE_W;
  localparam int unsigned MAX_CODE = (125 - TCODE_OFFSET_C) * TCODE_PER_C;

  typedef logic [7:0] width_table_t [DEPTH];

  function automatic width_table_t build_table();
    width_table_t tab;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int unsigned code;
      code   = (i > MAX_CODE) ? MAX_CODE : i;
      tab[i] = 8'(target_width(real'(VDD_MV) / 1000.0, W1,
                               tcode_to_celsius(TCODE_W'(code))));
    end
    return tab;
  endfunction

  localparam width_table_t TABLE = build_table();

  assign b_code = comp_en ? TABLE[t_code] : 8'(W1);

endmodule
