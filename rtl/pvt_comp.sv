// PVT-compensation block: measures the operating point in one reference
// cycle and sets the coarse delay-line code.
//
// While en (the ring-oscillator switch) is high, an 8-bit counter counts
// rising edges of the PVT-sensing ring oscillator, whose period is about
// 64 FO2-NAND delays. count therefore equals T_ref / (64 * D_NAND). The
// circulating path must delay T_ref / 8 = 8 * count * D_NAND; the lock-in
// line is meant to supply 64 D_NAND of that, and the PVT-comp. line, in
// steps of 32 D_NAND, the rest:
//   d_code = count/4 - 2, or 0 if that is negative.
// The division is a 2-bit shift. This rule, the 8-bit count and the 6-bit
// code follow the source design. The counter saturates at 255 and is
// cleared by rst_n (both this design's choices); count/4 - 2 never exceeds
// 61, so d_code needs no clipping.
//
// Interface: osc (counted clock), en, rst_n (asynchronous, active low) ->
// count[7:0], d_code[5:0]. d_code is combinational from count and is
// stable once en falls.
`timescale 1ns / 1ps
module pvt_comp
  import clkgen_pkg::*;
(
  input  logic               osc,
  input  logic               en,
  input  logic               rst_n,
  output logic [COUNT_W-1:0] count,
  output logic [CODE_W-1:0]  d_code
);

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (en && count != {COUNT_W{1'b1}})
      count <= count + 1'b1;
  end

  // Decoder: count/4 - 2, floored at zero.
  logic [COUNT_W-3:0] quarter;
  assign quarter = count[COUNT_W-1:2];

  always_comb begin
    if (quarter < 2)
      d_code = '0;
    else
      d_code = CODE_W'(quarter - 2'd2);
  end

endmodule
