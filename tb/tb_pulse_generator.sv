// Self-checking testbench of the pulse generator model: one pulse of the
// set width per rising input edge, none on falling edges.
`timescale 1ns / 1ps
module tb_pulse_generator;
  logic v_in = 1'b0, pulse;
  int checks = 0, failures = 0;
  int n_pulses = 0;
  realtime t_rise, width;

  pulse_generator #(.PULSE_NS(2.0)) dut (.v_in, .pulse);

  always @(posedge pulse) begin n_pulses++; t_rise = $realtime; end
  always @(negedge pulse) width = $realtime - t_rise;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k <= 5; k++) begin
      #20 v_in = 1'b1;
      #1;
      checks++;
      if (pulse !== 1'b1) begin failures++; $display("FAIL: no pulse at edge %0d", k); end
      #49 v_in = 1'b0;
      checks++;
      if (n_pulses != k || width < 1.999 || width > 2.001) begin
        failures++;
        $display("FAIL: edge %0d: %0d pulses, width %f", k, n_pulses, width);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
