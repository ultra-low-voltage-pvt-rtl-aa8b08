// Self-checking testbench of the tunable-width inverter model: output is
// the inverted input, delayed by P + D_REF * g(V,T) * 128 / B, with g
// computed here from the near-threshold polynomials; B = 0 holds the output.
`timescale 1ns / 1ps
module tb_tunable_width_inverter;
  logic in = 1'b0, out;
  logic [7:0] b = 8'd128;
  real temp_c = 25.0;
  int checks = 0, failures = 0;
  realtime t_edge;

  tunable_width_inverter dut (.in, .b, .temp_c, .out);

  always @(posedge out or negedge out) t_edge = $realtime;

  function automatic real inv_g(input real t);
    real v = 0.5;
    return (-2.05e-4 * t * t - 4.81e-2 * t + 15.9) * v * v
         + (6.54e-5 * t * t + 5.87e-2 * t - 8.75) * v
         + (3.21e-6 * t * t - 1.22e-2 * t + 1.30);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  widths [4] = '{1, 64, 128, 255};
    real temps  [4] = '{-50.0, -25.0, 25.0, 125.0};
    realtime t0;
    real exp_d;
    #20;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        b = 8'(widths[i]);
        temp_c = temps[j];
        #1;
        t0 = $realtime;
        in = ~in;
        #700;
        exp_d = 0.1 + 1.9 * (inv_g(25.0) / inv_g(temps[j])) * 128.0 / real'(widths[i]);
        check(out == ~in, "inverts");
        check(t_edge - t0 > exp_d - 0.002 && t_edge - t0 < exp_d + 0.002,
              $sformatf("B=%0d T=%f: delay %f expected %f", widths[i], temps[j], t_edge - t0, exp_d));
      end
    end
    b = 8'd0;
    #1 in = ~in;
    #700;
    check(out == in, "no leg enabled: output holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
