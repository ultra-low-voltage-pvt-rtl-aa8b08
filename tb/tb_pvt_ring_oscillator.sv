// Self-checking testbench of the PVT-sensing ring oscillator model: while
// switched on for one reference cycle it must give T / (64 * D_NAND) rising
// edges (computed here, plus at most one as the ring settles), and none
// while switched off.
`timescale 1ns / 1ps
module tb_pvt_ring_oscillator;
  logic sw = 1'b0, osc;
  int checks = 0, failures = 0;
  int n = 0;

  pvt_ring_oscillator #(.D_NAND_NS(0.068)) dut (.sw, .osc);

  always @(posedge osc) n++;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t_list [3] = '{200.0, 1600.0, 50.0};
    int  n0, expn;
    #50;
    for (int k = 0; k < 3; k++) begin
      #10;  // the ring settles high after the switch opens
      n0 = n;
      #100;
      checks++;
      if (n != n0) begin failures++; $display("FAIL: edges while off"); end
      n0 = n;
      sw = 1'b1;
      #(t_list[k]);
      sw = 1'b0;
      expn = $rtoi(t_list[k] / (64.0 * 0.068));
      #1;
      checks++;
      if (n - n0 < expn || n - n0 > expn + 1) begin
        failures++;
        $display("FAIL: %f ns on: %0d edges, expected %0d", t_list[k], n - n0, expn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
