// Self-checking testbench of the thermally robust buffer: with the sensor
// code following the die temperature, the buffer delay must stay within 2%
// of its 25 C value from -50 C to 125 C; with compensation off it must
// follow the logical effort (about 1.34x the effort delay at -25 C).
`timescale 1ns / 1ps
module tb_thermal_robust_buffer;
  logic clk_in = 1'b0, clk_out, comp_en = 1'b1;
  logic [9:0] t_code;
  logic [7:0] b_code;
  real temp_c = 25.0;
  int checks = 0, failures = 0;
  realtime t_edge;

  thermal_robust_buffer dut (.clk_in, .t_code, .comp_en, .temp_c, .clk_out, .b_code);

  always @(posedge clk_out or negedge clk_out) t_edge = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input real t, output real d);
    realtime t0;
    temp_c = t;
    t_code = 10'($rtoi((t + 50.0) * 4.0 + 0.5));
    #1;
    t0 = $realtime;
    clk_in = ~clk_in;
    #20;
    d = t_edge - t0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d25, d, dn25;
    #10;
    comp_en = 1'b1;
    measure(25.0, d25);
    check(b_code == 8'd128, "128X at 25 C");
    for (int t = -50; t <= 125; t += 25) begin
      measure(real'(t), d);
      check(d > 0.98 * d25 && d < 1.02 * d25,
            $sformatf("compensated delay at %0d C: %f vs %f", t, d, d25));
    end
    comp_en = 1'b0;
    measure(-25.0, dn25);
    check((dn25 - 0.1) / (d25 - 0.1) > 1.30 && (dn25 - 0.1) / (d25 - 0.1) < 1.38,
          $sformatf("uncompensated effort ratio at -25 C: %f", (dn25 - 0.1) / (d25 - 0.1)));
    measure(125.0, d);
    check(d < d25 * 0.9, "uncompensated buffer is faster when hot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
