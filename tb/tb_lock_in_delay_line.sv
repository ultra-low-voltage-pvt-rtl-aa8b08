// Self-checking testbench of the lock-in delay line model: delay
// (4 + 2C) * D_NAND for several C, from 4 to 130 FO2-NAND delays; a code
// change while a pulse is inside must not corrupt it; a zero-width glitch
// at the input must not come out.
`timescale 1ns / 1ps
module tb_lock_in_delay_line;
  logic din = 1'b0, dout;
  logic [5:0] c_code = '0;
  int checks = 0, failures = 0;
  int n_out = 0;
  realtime t_in, t_out, t_fall;

  lock_in_delay_line #(.D_NAND_NS(0.068)) dut (.din, .c_code, .dout);

  always @(posedge dout) begin t_out = $realtime; n_out++; end
  always @(negedge dout) t_fall = $realtime;

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
    int  codes [5] = '{0, 1, 31, 38, 63};
    real exp_d;
    int  n0;
    for (int k = 0; k < 5; k++) begin
      c_code = 6'(codes[k]);
      #10;
      t_in = $realtime;
      din = 1'b1;
      #2 din = 1'b0;
      #50;
      exp_d = real'(4 + 2 * codes[k]) * 0.068;
      check(t_out - t_in > exp_d - 0.002 && t_out - t_in < exp_d + 0.002,
            $sformatf("C=%0d delay %f expected %f", codes[k], t_out - t_in, exp_d));
      check(t_fall - t_out > 1.998 && t_fall - t_out < 2.002, "width kept");
    end
    // Code change in flight: the pulse keeps the delay it entered with.
    c_code = 6'd50;
    #10 t_in = $realtime;
    din = 1'b1;
    #2 din = 1'b0;
    c_code = 6'd0;
    #50;
    exp_d = real'(4 + 2 * 50) * 0.068;
    check(t_out - t_in > exp_d - 0.002 && t_out - t_in < exp_d + 0.002, "delay fixed at entry");
    check(t_fall > t_out && !dout, "pulse intact after code change");
    // Zero-width glitch.
    n0 = n_out;
    c_code = 6'd20;
    #10 din = 1'b1;
    din = 1'b0;
    #50;
    check(n_out == n0 && !dout, "glitch absorbed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
