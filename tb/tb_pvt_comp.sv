// Self-checking testbench of the PVT-comp. counter and decoder: counts a
// known number of oscillator edges while en is high (and more with en low,
// which must be ignored) and checks count and D = max(count/4 - 2, 0),
// including the floor at zero and saturation of the counter at 255.
`timescale 1ns / 1ps
module tb_pvt_comp;
  logic osc = 1'b0, en = 1'b0, rst_n = 1'b1;
  logic [7:0] count;
  logic [5:0] d_code;
  int checks = 0, failures = 0;

  pvt_comp dut (.osc, .en, .rst_n, .count, .d_code);

  task automatic pulses(input int n);
    repeat (n) begin
      #2 osc = 1'b1;
      #2 osc = 1'b0;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_list [8] = '{0, 3, 8, 9, 45, 46, 100, 300};
    int exp_c, exp_d;
    for (int k = 0; k < 8; k++) begin
      #1 rst_n = 1'b0;
      #1 rst_n = 1'b1;
      en = 1'b1;
      pulses(n_list[k]);
      en = 1'b0;
      pulses(7);
      #1;
      exp_c = (n_list[k] > 255) ? 255 : n_list[k];
      exp_d = (exp_c / 4 < 2) ? 0 : exp_c / 4 - 2;
      checks++;
      if (count != 8'(exp_c)) begin
        failures++;
        $display("FAIL: %0d edges: count %0d expected %0d", n_list[k], count, exp_c);
      end
      checks++;
      if (d_code != 6'(exp_d)) begin
        failures++;
        $display("FAIL: count %0d: D %0d expected %0d", exp_c, d_code, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
