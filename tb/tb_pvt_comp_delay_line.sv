// Self-checking testbench of the PVT-comp. delay line model: a pulse must
// come out D * 32 * D_NAND later with its width unchanged, for several D.
`timescale 1ns / 1ps
module tb_pvt_comp_delay_line;
  logic din = 1'b0, dout;
  logic [5:0] d_code = '0;
  int checks = 0, failures = 0;
  realtime t_in, t_out, t_fall;

  pvt_comp_delay_line #(.D_NAND_NS(0.068)) dut (.din, .d_code, .dout);

  always @(posedge dout) t_out = $realtime;
  always @(negedge dout) t_fall = $realtime;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  codes [5] = '{1, 9, 20, 45, 63};
    real exp_d;
    for (int k = 0; k < 5; k++) begin
      d_code = 6'(codes[k]);
      #10;
      t_in = $realtime;
      din = 1'b1;
      #2 din = 1'b0;
      #200;
      exp_d = real'(codes[k]) * 32.0 * 0.068;
      checks++;
      if (t_out - t_in < exp_d - 0.002 || t_out - t_in > exp_d + 0.002) begin
        failures++;
        $display("FAIL: D=%0d delay %f expected %f", codes[k], t_out - t_in, exp_d);
      end
      checks++;
      if (t_fall - t_out < 1.998 || t_fall - t_out > 2.002) begin
        failures++;
        $display("FAIL: D=%0d width %f", codes[k], t_fall - t_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
