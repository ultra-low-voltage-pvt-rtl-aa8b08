// Self-checking testbench of the circulation counter: count_e8 must rise on
// the 8th P_OUT pulse after a reference pulse, stay high for later pulses,
// and clear when P_REF arrives.
`timescale 1ns / 1ps
module tb_circulation_counter;
  logic p_out = 1'b0, p_ref = 1'b0, count_e8;
  int checks = 0, failures = 0;

  circulation_counter dut (.p_out, .p_ref, .count_e8);

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
    for (int round = 0; round < 3; round++) begin
      #5 p_ref = 1'b1;
      #2 p_ref = 1'b0;
      check(!count_e8, "cleared by P_REF");
      for (int k = 1; k <= 10; k++) begin
        #5 p_out = 1'b1;
        #1;
        check(count_e8 == (k >= 8), $sformatf("round %0d pulse %0d e8=%b", round, k, count_e8));
        #1 p_out = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
