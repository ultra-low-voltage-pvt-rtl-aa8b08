// Self-checking testbench of the frequency divider: for every FS[1:0] the
// output must toggle with period 2, 4, 6 or 8 input clocks (50% duty),
// compared with a reference model in the testbench.
`timescale 1ns / 1ps
module tb_frequency_divider;
  logic p_div = 1'b0, rst_n = 1'b1, clk_out;
  logic [1:0] fs = 2'b00;
  int checks = 0, failures = 0;

  frequency_divider dut (.p_div, .fs, .rst_n, .clk_out);

  always #5 p_div = ~p_div;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int half, hi, lo, prev;
    int ratio [4] = '{8, 6, 4, 2};
    for (int f = 0; f < 4; f++) begin
      fs = 2'(f);
      #1 rst_n = 1'b0;
      #3 rst_n = 1'b1;
      half = ratio[f] / 2;
      // Expected: after reset the output stays low for 'half' edges, then
      // high for 'half' edges, and so on.
      for (int cyc = 0; cyc < 4 * ratio[f]; cyc++) begin
        @(posedge p_div);
        #1;
        checks++;
        if (clk_out !== (((cyc + 1) / half) % 2 == 1)) begin
          failures++;
          $display("FAIL: fs=%0d edge %0d out=%b", f, cyc, clk_out);
        end
      end
      @(negedge p_div);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
