// Self-checking testbench of the SEL generator: outside SAR/Lock SEL is
// held at 1; in SAR it toggles on each falling edge of P_REF; in Lock it
// equals P_REF OR count_e8.
`timescale 1ns / 1ps
module tb_sel_generator;
  import clkgen_pkg::*;
  logic p_ref = 1'b0, count_e8 = 1'b0, rst_n = 1'b1, sel;
  clkgen_state_e state = ST_RESET;
  int checks = 0, failures = 0;

  sel_generator dut (.p_ref, .count_e8, .state, .rst_n, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ref_pulse();
    #10 p_ref = 1'b1;
    #2  p_ref = 1'b0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    check(sel, "reset value 1");
    state = ST_PVT;
    repeat (3) begin ref_pulse(); check(sel, "held at 1 in PVT"); end
    state = ST_SAR;
    exp = 1'b1;
    repeat (6) begin
      ref_pulse();
      exp = ~exp;
      check(sel == exp, "toggles in SAR");
    end
    state = ST_LOCK;
    for (int k = 0; k < 4; k++) begin
      p_ref = k[0];
      count_e8 = k[1];
      #1;
      check(sel == (k[0] | k[1]), $sformatf("Lock: P_REF=%b E8=%b", k[0], k[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
