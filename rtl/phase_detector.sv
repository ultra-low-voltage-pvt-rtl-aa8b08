// Phase detector of the pulse-circulating clock generator.
//
// Four flip-flops, all cleared while rst_pd_n is low. The first stage has
// one flip-flop that is set by the reference pulse P_REF and one that is
// set by P_OUT gated with count_e8, so only the 8th circulated pulse can
// set it. The second stage decides the order: LAG samples the reference
// flag when the output flag rises (the output came second), LEAD samples
// the output flag when the reference flag rises (the output came first).
// The topology follows the source design's schematic. If the 8th pulse has
// not arrived by the time the result is read, both outputs stay low and the
// controller treats that as lagging.
//
// Interface: p_ref, p_out, count_e8, rst_pd_n (asynchronous, active low)
// -> lead, lag. The results hold until the next reset.
`timescale 1ns / 1ps
module phase_detector (
  input  logic p_ref,
  input  logic p_out,
  input  logic count_e8,
  input  logic rst_pd_n,
  output logic lead,
  output logic lag
);

  logic out8;      // 8th circulated pulse
  logic ref_seen;  // first stage, reference side
  logic out_seen;  // first stage, output side

  assign out8 = count_e8 & p_out;

  always_ff @(posedge p_ref or negedge rst_pd_n) begin
    if (!rst_pd_n) ref_seen <= 1'b0;
    else           ref_seen <= 1'b1;
  end

  always_ff @(posedge out8 or negedge rst_pd_n) begin
    if (!rst_pd_n) out_seen <= 1'b0;
    else           out_seen <= 1'b1;
  end

  always_ff @(posedge out_seen or negedge rst_pd_n) begin
    if (!rst_pd_n) lag <= 1'b0;
    else           lag <= ref_seen;
  end

  always_ff @(posedge ref_seen or negedge rst_pd_n) begin
    if (!rst_pd_n) lead <= 1'b0;
    else           lead <= out_seen;
  end

endmodule
