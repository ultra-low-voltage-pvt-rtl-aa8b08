// Behavioural model of the PVT sensing circuit: a ring of one 2-input NAND
// and 62 FO1 inverters, switched on by the NAND's second input. Not
// synthesizable.
//
// While sw is high the ring oscillates with a period of about 128 inverter
// delays; an FO1 inverter is half an FO2-NAND delay, so the period is
// 64 * D_NAND_NS. While sw is low the NAND output is held high and, through
// the even number of inverters, so is osc. The ring's stage count and period
// come from the source design; D_NAND_NS is the operating-point delay.
//
// Interface: sw -> osc.
`timescale 1ns / 1ps
module pvt_ring_oscillator #(
  parameter real D_NAND_NS = 0.068
) (
  input  logic sw,
  output logic osc
);

  localparam real HALF_PERIOD_NS = 32.0 * D_NAND_NS;

  initial osc = 1'b1;

  always @(posedge sw) begin
    while (sw) begin
      #(HALF_PERIOD_NS);
      if (sw) osc = ~osc;
    end
    osc = 1'b1;
  end

endmodule
