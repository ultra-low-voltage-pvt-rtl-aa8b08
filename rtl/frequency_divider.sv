// Programmable frequency divider, divide by 2, 4, 6 or 8 with 50% duty.
//
// Four flip-flops form a twisted ring (Johnson counter): the inverted
// output of the last one feeds the loop. Three multiplexers let FS[1:0]
// bypass the first flip-flops, so the loop holds 4, 3, 2 or 1 of them and
// the division ratio is twice that:
//   FS = 00 -> /8, 01 -> /6, 10 -> /4, 11 -> /2.
// Structure and ratios follow the source design; the asynchronous reset
// that clears the ring is this design's choice.
//
// Interface: p_div (clock), fs[1:0], rst_n -> clk_out. clk_out changes on
// rising edges of p_div.
`timescale 1ns / 1ps
module frequency_divider (
  input  logic       p_div,
  input  logic [1:0] fs,
  input  logic       rst_n,
  output logic       clk_out
);

  logic [3:0] q;
  logic       fb;
  logic       use_q0, use_q1, use_q2;
  logic [3:1] d;

  assign fb     = ~q[3];
  assign use_q0 = ~(fs[1] | fs[0]);
  assign use_q1 = ~fs[1];
  assign use_q2 = ~(fs[1] & fs[0]);

  assign d[1] = use_q0 ? q[0] : fb;
  assign d[2] = use_q1 ? q[1] : fb;
  assign d[3] = use_q2 ? q[2] : fb;

  always_ff @(posedge p_div or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {d[3], d[2], d[1], fb};
  end

  assign clk_out = q[3];

endmodule
